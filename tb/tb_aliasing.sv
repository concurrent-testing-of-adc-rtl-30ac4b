// Aliasing-rate testbench for the modulo-sum compactor and checker.
//
// Configuration of the worked 8-bit example: N = 8, L = 256, m = 5 codes
// per session, tolerance 1 LSB each side. Each trial feeds the seeded
// modulo adder a fully random, erroneous stream of m codes (every code
// replaced by a uniformly random one) and reads the residue and the
// checker's verdict. Two rates are measured over TRIALS streams:
//   - the fraction whose residue equals the exact fault-free residue 0,
//     which the analysis puts at about 2^-N = 0.0039 for m = 5, and
//   - the fraction the tolerance check passes as fault-free, expected near
//     (2m + 1) / 2^N = 11/256 = 0.043, since the fault-free band holds
//     2m + 1 residues.
// Every residue and verdict is also compared with an integer reference,
// and both rates must fall within five standard deviations of their
// expected values.
module tb_aliasing;
  import conc_test_pkg::*;
  localparam int N = 8;
  localparam int CW = 16;
  localparam int M = 5;
  localparam int TRIALS = 20000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          load = 1'b0;
  logic [N-1:0]  seed = '0;
  logic          add = 1'b0;
  logic [N-1:0]  d = '0;
  logic [N-1:0]  r;
  logic          wrap;
  logic [CW+N:0] lo_bound, hi_bound;
  logic          fault;

  int checks = 0;
  int failures = 0;

  modulo_adder #(.N(N), .MODULUS(MOD_2N)) u_add (.clk, .rst_n, .load, .seed, .add, .d, .r, .wrap);
  signature_checker #(.N(N), .CW(CW), .MODULUS(MOD_2N)) u_chk (
    .residue(r), .m_count(CW'(M)), .dhat(8'd1), .dcheck(8'd1), .lo_bound, .hi_bound, .fault);

  always #5 clk = ~clk;

  initial begin
    repeat (TRIALS * (M + 3) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exact = 0, passed = 0, y0, s, sum, res, ff;
    real p_exact, p_pass, e_exact, e_pass, sd_exact, sd_pass;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < TRIALS; t++) begin
      // stimulus levels: the example's 201..205, ideal codes equal levels
      y0 = 0;
      for (int i = 0; i < M; i++) y0 += 201 + i;
      s = (256 - y0 % 256) % 256;
      seed = N'(s); load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      sum = 0;
      for (int i = 0; i < M; i++) begin
        d = N'($urandom);
        sum += int'(d);
        add = 1'b1;
        @(negedge clk);
        add = 1'b0;
      end
      res = (s + sum) % 256;
      ff = (res <= M) || (res >= 256 - M);
      checks++;
      if (int'(r) != res || fault == ff[0]) begin
        failures++;
        $display("FAIL trial %0d r=%0d ref=%0d fault=%0b", t, r, res, fault);
      end
      if (r == '0) exact++;
      if (!fault) passed++;
    end
    p_exact  = real'(exact) / TRIALS;
    p_pass   = real'(passed) / TRIALS;
    e_exact  = 1.0 / 256.0;
    e_pass   = (2.0 * M + 1.0) / 256.0;
    sd_exact = $sqrt(e_exact * (1.0 - e_exact) / TRIALS);
    sd_pass  = $sqrt(e_pass * (1.0 - e_pass) / TRIALS);
    $display("exact-signature aliasing %f (expected %f), tolerance-band aliasing %f (expected %f)",
             p_exact, e_exact, p_pass, e_pass);
    checks += 2;
    if (p_exact < e_exact - 5 * sd_exact || p_exact > e_exact + 5 * sd_exact) failures++;
    if (p_pass < e_pass - 5 * sd_pass || p_pass > e_pass + 5 * sd_pass) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
