// Self-checking testbench for test_controller.
//
// A small pattern counter stands in for the test generator (it drives
// tg_last and tg_exhausted from the controller's `advance`). HIT is driven
// as random pulses and long levels. Checked: one add/advance per accepted
// HIT, exactly m of them per session, no HIT accepted during the BLANK
// clocks after `start` or after an accepted HIT, `done` rising on the edge
// after the one that takes the last code, the verdict latched from fault_now at that
// point, an m = 0 session, and a restart in the middle of a session.
module tb_test_controller;
  import conc_test_pkg::*;
  localparam int BLANK = 4;
  localparam int CW = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          hit_sync = 1'b0;
  logic          tg_last, tg_exhausted;
  logic          fault_now = 1'b0;
  logic          seed_load, tg_load, add, advance, blanked, busy, done, fault;
  logic [CW-1:0] hits;
  ctrl_state_e   state;

  int checks = 0;
  int failures = 0;
  int remaining = 0;
  int m_set = 0;
  int adds = 0;
  int since_event = 0;
  int blanked_seen = 0;
  int last_add_cycle = 0;
  int cycle = 0;

  test_controller #(.BLANK(BLANK), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  // generator stand-in
  always_ff @(posedge clk) begin
    if (tg_load) remaining <= m_set;
    else if (advance && remaining > 0) remaining <= remaining - 1;
  end
  assign tg_last = (remaining == 1);
  assign tg_exhausted = (remaining == 0);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d (state=%0d hits=%0d)", what, cycle, state, hits);
    end
  endtask

  // monitor: blanking rule and add/advance pairing, sampled on each edge
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (add) begin
        checks++;
        if (since_event < BLANK || !hit_sync) begin
          failures++;
          $display("FAIL add during blanking at cycle %0d", cycle);
        end
        adds++;
        last_add_cycle = cycle;
      end
      if (blanked) blanked_seen++;
      if (start || add) since_event = 0;
      else since_event++;
    end
  end

  task automatic session(input int m, input int f, input int style);
    int start_adds;
    @(negedge clk);
    m_set = m; start = 1'b1; fault_now = 1'b0;
    @(negedge clk);
    start = 1'b0;
    check(busy && !done, "busy after start");
    start_adds = adds;
    while (!done) begin
      if (style == 0) hit_sync = ($urandom_range(3) == 0);
      else hit_sync = 1'b1;
      fault_now = f[0];
      @(negedge clk);
      if (cycle > 30000) break;
    end
    hit_sync = 1'b0;
    check(adds - start_adds == m, "exactly m adds per session");
    check(hits == CW'(m), "hit counter equals m");
    check(fault == f[0], "verdict latched");
    if (m > 0) check(cycle - last_add_cycle == 1, "done one clock after the edge taking the last code");
    check(!busy && state == ST_DONE, "idle in DONE");
    repeat (3) @(negedge clk);
    hit_sync = 1'b1;
    repeat (8) @(negedge clk);
    hit_sync = 1'b0;
    check(adds - start_adds == m, "no adds after done");
    check(done && fault == f[0], "done holds");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(state == ST_IDLE && !done && !busy, "reset state");
    hit_sync = 1'b1;
    repeat (5) @(negedge clk);
    check(adds == 0, "no add while idle");
    hit_sync = 1'b0;
    session(5, 1, 0);
    session(5, 0, 1);
    session(1, 1, 1);
    session(0, 0, 0);
    session(37, 0, 0);
    // restart in the middle of a session
    @(negedge clk);
    m_set = 10; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    hit_sync = 1'b1;
    repeat (12) @(negedge clk);
    check(busy && hits == 2, "partial session");
    hit_sync = 1'b0;
    session(3, 1, 0);
    check(blanked_seen > 0, "blanking exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
