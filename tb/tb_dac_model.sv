// Self-checking testbench for dac_model.
//
// Every input code of an 8-bit, 8 V model is converted and compared with
// code * 8 / 256 V; a 3-bit, 8 V instance (1 V per LSB) is checked at
// every code too.
module tb_dac_model;
  logic [7:0] code8 = '0;
  logic [2:0] code3 = '0;
  real        v8, v3;

  int checks = 0;
  int failures = 0;

  dac_model #(.N(8), .VFS(8.0)) dut8 (.code(code8), .vout(v8));
  dac_model #(.N(3), .VFS(8.0)) dut3 (.code(code3), .vout(v3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    for (int k = 0; k < 256; k++) begin
      code8 = 8'(k);
      #1;
      checks++;
      if (!close(v8, k * 0.03125)) begin
        failures++;
        $display("FAIL 8-bit code %0d -> %f", k, v8);
      end
    end
    for (int k = 0; k < 8; k++) begin
      code3 = 3'(k);
      #1;
      checks++;
      if (!close(v3, real'(k))) begin
        failures++;
        $display("FAIL 3-bit code %0d -> %f", k, v3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
