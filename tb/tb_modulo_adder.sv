// Self-checking testbench for modulo_adder, both moduli.
//
// Two instances share the stimulus: L = 2^N (carry dropped) and L = 2^N - 1
// (end-around carry). The worked 8-bit example is replayed first: seed 9,
// codes 203 203 205 207 206 give residue 9; the fault-free codes summing to
// 1014 give 255. Then random sessions with random seeds, random codes and
// random idle cycles are compared with integer reference sums, and the
// number of `wrap` pulses is compared with the number of carries the
// reference sees.
module tb_modulo_adder;
  import conc_test_pkg::*;
  localparam int N = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         load = 1'b0;
  logic [N-1:0] seed = '0;
  logic         add = 1'b0;
  logic [N-1:0] d = '0;
  logic [N-1:0] r_a, r_b;
  logic         wrap_a, wrap_b;

  int checks = 0;
  int failures = 0;
  int wraps_seen = 0;
  int wraps_expected = 0;

  modulo_adder #(.N(N), .MODULUS(MOD_2N)) dut_a (
    .clk, .rst_n, .load, .seed, .add, .d, .r(r_a), .wrap(wrap_a));
  modulo_adder #(.N(N), .MODULUS(MOD_2N_M1)) dut_b (
    .clk, .rst_n, .load, .seed, .add, .d, .r(r_b), .wrap(wrap_b));

  always #5 clk = ~clk;
  always @(posedge clk) if (wrap_a) wraps_seen++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (r_a=%0d r_b=%0d)", what, r_a, r_b);
    end
  endtask

  // Runs one session on both instances; returns nothing, checks the residues.
  task automatic session(input int s, input int codes[$]);
    int ref_a, ref_b, ra_norm;
    @(negedge clk);
    seed = N'(s); load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(r_a == N'(s), "seed loaded (2^N)");
    ref_a = s;
    ref_b = s % 255;
    foreach (codes[i]) begin
      d = N'(codes[i]); add = 1'b1;
      if (ref_a + codes[i] >= 256) wraps_expected++;
      ref_a = (ref_a + codes[i]) % 256;
      ref_b = (ref_b + codes[i]) % 255;
      @(negedge clk);
      add = 1'b0;
      d = N'($urandom);
      repeat ($urandom_range(2)) @(negedge clk);
    end
    check(r_a == N'(ref_a), "residue mod 2^N");
    ra_norm = (r_b == 8'hFF) ? 0 : int'(r_b);
    check(ra_norm == ref_b, "residue mod 2^N-1");
  endtask

  initial begin
    int codes[$];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(r_a == '0 && r_b == '0, "reset clears");
    codes = '{203, 203, 205, 207, 206};
    session(9, codes);
    check(r_a == 8'd9, "example: faulty ADC residue 9");
    codes = '{201, 203, 203, 203, 204};
    session(9, codes);
    check(r_a == 8'd255, "example: fault-free residue 255");
    // all-ones seed plus codes exercise the end-around carry
    codes = '{255, 255, 1, 128, 127};
    session(255, codes);
    for (int k = 0; k < 40; k++) begin
      codes.delete();
      for (int i = 0; i < int'($urandom_range(1, 60)); i++) codes.push_back(int'($urandom_range(255)));
      session(int'($urandom_range(255)), codes);
    end
    // load wins over add
    @(negedge clk);
    seed = 8'd77; load = 1'b1; add = 1'b1; d = 8'd5;
    @(negedge clk);
    load = 1'b0; add = 1'b0;
    check(r_a == 8'd77, "load has priority over add");
    check(wraps_seen == wraps_expected && wraps_expected > 0, "wrap pulses match carries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
