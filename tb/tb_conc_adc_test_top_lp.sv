// End-to-end testbench for conc_adc_test_top with the compaction modulus
// L = 2^N - 1 = 255 (end-around carry), all other parameters at their
// defaults. Same sessions and checks as the default-modulus end-to-end
// testbench: a triangle-wave operational signal, a behavioural ADC with
// offset faults and transition spread, and for every session an
// independent recomputation of the residue mod 255 (an all-ones register
// read as zero) and of the verdict m < R < 255 - m.
module tb_conc_adc_test_top_lp;
  import conc_test_pkg::*;
  localparam int N = 8;
  localparam int CW = 16;
  localparam real VFS = 8.0;
  localparam real LSB = VFS / 256.0;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  real           v_op = 0.0;
  logic [N-1:0]  adc_code;
  logic          start = 1'b0;
  logic [N-1:0]  first_code = '0, step = '0, seed = '0, dhat = '0, dcheck = '0;
  logic [CW-1:0] m_count = '0;
  logic [N-1:0]  test_code, signature;
  real           v_dac;
  logic          hit, busy, done, fault, hit_blanked, sig_wrap;
  logic [CW-1:0] hits;
  logic [CW+N:0] lo_bound, hi_bound;
  ctrl_state_e   state;
  logic          tdc_test_mode = 1'b0, tdc_session_start = 1'b0, tdc_conv_start = 1'b0, tdc_gate = 1'b0;
  logic [N-1:0]  tdc_seed = '0, tdc_count, tdc_code;
  logic          tdc_conv_done;

  int adc_offset = 0;
  real adc_spread = 0.0;
  bit  use_spread = 1'b0;

  conc_adc_test_top #(.MODULUS(MOD_2N_M1)) dut (.*);
  adc_model #(.N(N), .VFS(VFS)) u_adc (.vin(v_op), .offset(adc_offset), .spread(adc_spread), .code(adc_code));

  int checks = 0;
  int failures = 0;
  // mechanism counters
  int n_accept = 0, n_blanked = 0, n_wrap = 0, n_fault = 0, n_pass = 0;
  int n_descending = 0, n_tdc_conv = 0, n_tdc_session = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (sig=%0d fault=%0b hits=%0d)", what, signature, fault, hits);
    end
  endtask

  // triangle wave, -0.75 .. 255.75 LSB
  real slope = LSB / 8.0;
  always @(negedge clk) begin
    v_op = v_op + slope;
    if (v_op > 255.75 * LSB) slope = -LSB / 8.0;
    if (v_op < -0.75 * LSB) slope = LSB / 8.0;
    adc_spread = use_spread ? (real'($urandom_range(980)) / 1000.0 - 0.49) : 0.0;
  end

  // record the ADC code taken by each accepted HIT
  logic [N-1:0] code_at_edge;
  logic [N-1:0] level_at_edge;
  int           hits_q = 0;
  int           rec_codes[$];
  int           rec_levels[$];
  always @(posedge clk) begin
    code_at_edge  = adc_code;
    level_at_edge = test_code;
    if (sig_wrap) n_wrap++;
    if (hit_blanked) n_blanked++;
  end
  always @(negedge clk) begin
    if (int'(hits) != hits_q && int'(hits) == hits_q + 1) begin
      rec_codes.push_back(int'(code_at_edge));
      rec_levels.push_back(int'(level_at_edge));
      n_accept++;
    end
    hits_q = int'(hits);
  end

  function automatic bit ref_fault(int r, int m, int dh, int dc);
    return (r > m * dh) && (r < 255 - m * dc);
  endfunction

  // expect: 0 fault-free, 1 faulty, -1 work it out from the recorded codes only
  task automatic session(input int f, input int s, input int m, input int off, input int expect_fault);
    int y0, sd, sum, r, waited;
    bit ref_v;
    y0 = 0;
    for (int i = 0; i < m; i++) y0 += (f + i * s) % 256;
    sd = (255 - (y0 % 255)) % 255;
    adc_offset = off;
    if (s > 128) n_descending++;
    @(negedge clk);
    first_code = N'(f); step = N'(s); m_count = CW'(m); seed = N'(sd);
    dhat = 8'd1; dcheck = 8'd1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    rec_codes.delete();
    rec_levels.delete();
    waited = 0;
    while (int'(hits) != m && waited < 2000000) begin
      @(negedge clk);
      waited++;
    end
    check(!done, "done not yet on the clock of the last code");
    @(negedge clk);
    check(done, "done one clock after the last code");
    check(rec_codes.size() == m, "one code per test level");
    sum = 0;
    foreach (rec_codes[i]) begin
      sum += rec_codes[i];
      check(rec_levels[i] == (f + i * s) % 256, "levels visited in generator order");
      if (rec_levels[i] + off >= 0 && rec_levels[i] + off <= 255)
        check(rec_codes[i] - rec_levels[i] - off >= -1 && rec_codes[i] - rec_levels[i] - off <= 1,
              "recorded code within one LSB of level plus offset");
    end
    r = (sd + sum) % 255;
    ref_v = ref_fault(r, m, 1, 1);
    check((int'(signature) % 255) == r, "signature equals seed plus codes mod 255");
    check(fault == ref_v, "verdict matches the tolerance condition");
    check(int'(lo_bound) == m && int'(hi_bound) == ((m >= 255) ? 0 : 255 - m), "bounds m and 255-m");
    if (expect_fault >= 0) check(fault == expect_fault[0], "expected verdict");
    if (fault) n_fault++; else n_pass++;
    $display("session first=%0d step=%0d m=%0d offset=%0d: signature=%0d fault=%0b",
             f, s, m, off, signature, fault);
  endtask

  task automatic tdc_convert(input int len);
    @(negedge clk);
    tdc_conv_start = 1'b1;
    @(negedge clk);
    tdc_conv_start = 1'b0;
    tdc_gate = 1'b1;
    repeat (len) @(negedge clk);
    tdc_gate = 1'b0;
    repeat (2) @(negedge clk);
    n_tdc_conv++;
  endtask

  initial begin
    int total, len, s;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done && state == ST_IDLE, "idle after reset");

    // worked 8-bit example: levels 201..205
    session(201, 1, 5, 0, 0);
    session(201, 1, 5, 2, 1);
    session(201, 1, 5, -3, 1);
    session(205, 255, 5, -3, 1);
    session(205, 255, 5, 0, 0);
    session(20, 2, 40, 0, 0);
    session(20, 2, 40, 2, 1);
    session(10, 3, 60, -2, 1);
    // fault-free ADC whose transitions wander by up to half an LSB
    use_spread = 1'b1;
    session(201, 1, 5, 0, 0);
    session(30, 5, 40, 0, 0);
    session(201, 1, 5, 2, 1);
    for (int k = 0; k < 6; k++)
      session($urandom_range(255), $urandom_range(1, 255), $urandom_range(1, 8),
              int'($urandom_range(6)) - 3, -1);

    // counter compactor: normal mode then a test session
    tdc_test_mode = 1'b0;
    for (int k = 0; k < 4; k++) begin
      len = $urandom_range(1, 200);
      tdc_convert(len);
      check(int'(tdc_code) == len, "counter compactor normal-mode code");
    end
    s = $urandom_range(255);
    @(negedge clk);
    tdc_test_mode = 1'b1; tdc_seed = N'(s); tdc_session_start = 1'b1;
    @(negedge clk);
    tdc_session_start = 1'b0;
    total = s;
    for (int k = 0; k < 6; k++) begin
      len = $urandom_range(1, 200);
      tdc_convert(len);
      total += len;
    end
    check(int'(tdc_count) == total % 256, "counter compactor test-mode signature");
    n_tdc_session++;

    $display("mechanisms: accepted=%0d blanked=%0d wraps=%0d faults=%0d passes=%0d descending=%0d tdc_conv=%0d tdc_sessions=%0d",
             n_accept, n_blanked, n_wrap, n_fault, n_pass, n_descending, n_tdc_conv, n_tdc_session);
    check(n_accept > 0, "HIT accepted");
    check(n_blanked > 0, "HIT ignored while blanked");
    check(n_wrap > 0, "adder wrapped");
    check(n_fault > 0, "fault detected");
    check(n_pass > 0, "fault-free verdict");
    check(n_descending > 0, "descending sequence");
    check(n_tdc_conv > 0, "counter compactor conversions");
    check(n_tdc_session > 0, "counter compactor test session");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
