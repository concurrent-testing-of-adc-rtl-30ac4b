// Self-checking testbench for analog_comparator.
//
// 3-bit, 8 V instance (LSB = 1 V, window 0.5 V): the reference is held at
// 4 V and the signal swept from 2 V to 6 V in 1/64 V steps; HIT must be high
// exactly for |vsig - 4| <= 0.5. A second instance with a 0.25 LSB window
// checks that the window parameter is honoured.
module tb_analog_comparator;
  real  vsig = 0.0;
  real  vref = 4.0;
  logic hit, hit_narrow;

  int checks = 0;
  int failures = 0;

  analog_comparator #(.N(3), .VFS(8.0), .WINDOW_LSB(0.5)) dut (.vsig, .vref, .hit);
  analog_comparator #(.N(3), .VFS(8.0), .WINDOW_LSB(0.25)) dut_n (.vsig, .vref, .hit(hit_narrow));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits = 0;
    for (int k = 0; k <= 256; k++) begin
      real d;
      vsig = 2.0 + k / 64.0;
      #1;
      d = vsig - vref;
      if (d < 0.0) d = -d;
      checks += 2;
      if (hit != (d <= 0.5)) begin
        failures++;
        $display("FAIL vsig=%f hit=%0b", vsig, hit);
      end
      if (hit_narrow != (d <= 0.25)) begin
        failures++;
        $display("FAIL narrow vsig=%f hit=%0b", vsig, hit_narrow);
      end
      if (hit) hits++;
    end
    checks++;
    if (hits != 65) begin
      failures++;
      $display("FAIL window width %0d steps", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
