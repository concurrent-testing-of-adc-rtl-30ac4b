// Digital core of the concurrent ADC test (everything but the analog parts).
//
// Holds the test generator, the HIT synchroniser, the session controller,
// the seeded modulo adder and the signature checker, plus the counter
// compactor of a time-conversion ADC on its own tdc_* ports. The
// comparator's HIT level enters asynchronously on `hit`; the generator's
// word leaves on `test_code` for the DAC. Each accepted HIT adds `adc_code`
// to the adder and steps the generator; after the m-th HIT `done` rises with
// `fault` and `signature` valid. Ports and timing are those of
// conc_adc_test_top, which wraps this core with the DAC and comparator
// models.
module conc_test_core
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter int unsigned CW = CNT_BITS,
  parameter modulus_e MODULUS = MOD_2N,
  parameter int unsigned BLANK = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // comparator output (asynchronous) and the ADC under test
  input  logic          hit,
  input  logic [N-1:0]  adc_code,
  // session set-up
  input  logic          start,
  input  logic [N-1:0]  first_code,
  input  logic [N-1:0]  step,
  input  logic [CW-1:0] m_count,
  input  logic [N-1:0]  seed,
  input  logic [N-1:0]  dhat,
  input  logic [N-1:0]  dcheck,
  // status and result
  output logic [N-1:0]  test_code,
  output logic          busy,
  output logic          done,
  output logic          fault,
  output logic [N-1:0]  signature,
  output logic [CW-1:0] hits,
  output logic          hit_blanked,
  output logic          sig_wrap,
  output logic [CW+N:0] lo_bound,
  output logic [CW+N:0] hi_bound,
  output ctrl_state_e   state,
  // counter compactor of a time-conversion ADC
  input  logic          tdc_test_mode,
  input  logic          tdc_session_start,
  input  logic [N-1:0]  tdc_seed,
  input  logic          tdc_conv_start,
  input  logic          tdc_gate,
  output logic [N-1:0]  tdc_count,
  output logic [N-1:0]  tdc_code,
  output logic          tdc_conv_done
);

  logic        hit_s;
  logic        seed_load, tg_load, add, advance;
  logic        tg_last, tg_exhausted, fault_now;

  test_generator #(.N(N), .CW(CW)) u_tg (
    .clk, .rst_n,
    .load(tg_load), .first_code, .step, .m_count,
    .advance, .code(test_code), .last(tg_last), .exhausted(tg_exhausted)
  );

  sync_2ff u_sync (.clk, .rst_n, .d(hit), .q(hit_s));

  test_controller #(.BLANK(BLANK), .CW(CW)) u_ctrl (
    .clk, .rst_n, .start, .hit_sync(hit_s),
    .tg_last, .tg_exhausted, .fault_now,
    .seed_load, .tg_load, .add, .advance, .blanked(hit_blanked),
    .busy, .done, .fault, .hits, .state
  );

  modulo_adder #(.N(N), .MODULUS(MODULUS)) u_adder (
    .clk, .rst_n, .load(seed_load), .seed, .add, .d(adc_code),
    .r(signature), .wrap(sig_wrap)
  );

  signature_checker #(.N(N), .CW(CW), .MODULUS(MODULUS)) u_check (
    .residue(signature), .m_count, .dhat, .dcheck,
    .lo_bound, .hi_bound, .fault(fault_now)
  );

  counter_compactor #(.N(N)) u_tdc (
    .clk, .rst_n, .test_mode(tdc_test_mode), .session_start(tdc_session_start),
    .seed(tdc_seed), .conv_start(tdc_conv_start), .gate(tdc_gate),
    .count(tdc_count), .code(tdc_code), .conv_done(tdc_conv_done)
  );

endmodule
