// Signature checker: the pass/fail decision on the final residue.
//
// Each of the m codes may lawfully differ from its ideal value by
// -dcheck .. +dhat LSB (quantisation and permitted transition spread). The
// seeded residue R = (Y - Y0) mod L is therefore fault-free when it lies in
// [0, m*dhat] or in [L - m*dcheck, L - 1], and the ADC is declared faulty when
//     m*dhat < R < L - m*dcheck.
// With dhat = dcheck = 1 this is m < R < -m mod L; test levels placed on
// the ideal transitions use dhat = 0, dcheck = 1 (0 < R < -m mod L). The tolerances are
// runtime inputs (magnitudes), as is m, so one checker serves any stimulus
// set. When the two fault-free bands meet or overlap no residue can be
// flagged and `fault` stays low. For L = 2^N - 1 an all-ones residue is
// read as zero.
//
// Purely combinational; `lo_bound` and `hi_bound` show the limits in use.
module signature_checker
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter int unsigned CW = CNT_BITS,
  parameter modulus_e MODULUS = MOD_2N
) (
  input  logic [N-1:0]    residue,
  input  logic [CW-1:0]   m_count,
  input  logic [N-1:0]    dhat,
  input  logic [N-1:0]    dcheck,
  output logic [CW+N:0]   lo_bound,
  output logic [CW+N:0]   hi_bound,
  output logic            fault
);

  localparam int unsigned W = CW + N + 1;
  localparam logic [W-1:0] L = (MODULUS == MOD_2N) ? (W'(1) << N) : ((W'(1) << N) - W'(1));

  logic [W-1:0] r_norm;
  logic [W-1:0] lo_span;
  logic [W-1:0] hi_span;

  always_comb begin
    r_norm = W'(residue);
    if (MODULUS == MOD_2N_M1 && r_norm == L) r_norm = '0;
    lo_span  = W'(m_count) * W'(dhat);
    hi_span  = W'(m_count) * W'(dcheck);
    lo_bound = lo_span;
    hi_bound = (hi_span >= L) ? '0 : (L - hi_span);
    fault    = (r_norm > lo_bound) && (r_norm < hi_bound);
  end

endmodule
