// Self-checking testbench for counter_compactor.
//
// Normal mode: conversions with random gate lengths; after each, `code`
// must equal the number of gate-high clocks and `conv_done` must pulse
// once. Test mode: a session seeded with a random value runs a series of
// conversions (conv_start pulses included, which must not clear the count);
// the final count must equal (seed + sum of gate lengths) mod 2^N.
module tb_counter_compactor;
  localparam int N = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         test_mode = 1'b0;
  logic         session_start = 1'b0;
  logic [N-1:0] seed = '0;
  logic         conv_start = 1'b0;
  logic         gate = 1'b0;
  logic [N-1:0] count, code;
  logic         conv_done;

  int checks = 0;
  int failures = 0;
  int done_pulses = 0;

  counter_compactor #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (conv_done) done_pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (count=%0d code=%0d)", what, count, code);
    end
  endtask

  task automatic convert(input int len);
    @(negedge clk);
    conv_start = 1'b1;
    @(negedge clk);
    conv_start = 1'b0;
    gate = 1'b1;
    repeat (len) @(negedge clk);
    gate = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int total, s, len, pulses0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // normal mode
    for (int k = 0; k < 20; k++) begin
      len = $urandom_range(1, 255);
      pulses0 = done_pulses;
      convert(len);
      check(code == N'(len), "normal-mode code equals gate length");
      check(done_pulses == pulses0 + 1, "one conv_done per conversion");
    end
    // test mode sessions
    for (int sess = 0; sess < 10; sess++) begin
      s = $urandom_range(255);
      @(negedge clk);
      test_mode = 1'b1; seed = N'(s); session_start = 1'b1;
      @(negedge clk);
      session_start = 1'b0;
      check(count == N'(s), "seed loaded");
      total = s;
      for (int k = 0; k < int'($urandom_range(1, 12)); k++) begin
        len = $urandom_range(1, 255);
        convert(len);
        total += len;
      end
      check(count == N'(total % 256), "test-mode signature = seed + sum mod 2^N");
    end
    // back to normal mode: conversions clear again
    test_mode = 1'b0;
    convert(17);
    check(code == 8'd17, "normal mode restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
