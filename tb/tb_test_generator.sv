// Self-checking testbench for test_generator.
//
// Loads several (first_code, step, m) sets, advances through every pattern
// with random gaps, and compares `code`, `last` and `exhausted` with a
// reference sequence computed here. Covers modulo-2^N wrap of the word,
// descending sequences (step = 2^N - 1) and advances after the last pattern,
// which must be ignored.
module tb_test_generator;
  localparam int N = 8;
  localparam int CW = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          load = 1'b0;
  logic [N-1:0]  first_code = '0;
  logic [N-1:0]  step = '0;
  logic [CW-1:0] m_count = '0;
  logic          advance = 1'b0;
  logic [N-1:0]  code;
  logic          last, exhausted;

  int checks = 0;
  int failures = 0;

  test_generator #(.N(N), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (code=%0d last=%0b exhausted=%0b)", what, code, last, exhausted);
    end
  endtask

  task automatic run_session(input int f, input int s, input int m);
    int expect_code;
    @(negedge clk);
    first_code = N'(f); step = N'(s); m_count = CW'(m); load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    expect_code = f;
    for (int i = 0; i < m; i++) begin
      check(code == N'(expect_code), "code");
      check(last == (i == m - 1), "last");
      check(!exhausted, "not exhausted");
      repeat ($urandom_range(3)) @(negedge clk);
      check(code == N'(expect_code), "code holds without advance");
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
      expect_code = (expect_code + s) % (1 << N);
    end
    check(exhausted, "exhausted after m advances");
    check(!last, "last clear when exhausted");
    advance = 1'b1;
    @(negedge clk);
    advance = 1'b0;
    check(exhausted, "stays exhausted");
    check(code == N'((f + (m - 1) * s + s) % (1 << N)) || m == 0, "advance ignored once exhausted");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(code == '0 && exhausted, "reset state");
    run_session(201, 1, 5);
    run_session(250, 3, 5);
    run_session(205, 255, 5);
    run_session(0, 1, 256);
    for (int k = 0; k < 5; k++) run_session($urandom_range(255), $urandom_range(255), $urandom_range(1, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
