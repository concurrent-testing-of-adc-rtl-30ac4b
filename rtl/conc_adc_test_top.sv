// Concurrent ADC test: top level.
//
// The ADC under test keeps converting its operational signal `v_op` while
// this logic checks it. A test generator sets a DAC to one test level at a
// time; an analog comparator raises HIT when v_op passes through that level.
// On each HIT (synchronised to clk) the controller adds the ADC's current
// code to a modulo adder that was seeded with -Y0 mod L, where Y0 is the sum
// of the ideal codes of the m test levels, and steps the generator to the
// next level. After the m-th HIT the residue is the signature R; the ADC is
// reported faulty when m*dhat < R < L - m*dcheck. The test needs no analog
// stimulus of its own: the operational signal is the stimulus.
//
// The ADC itself is outside this module: its code enters on `adc_code`,
// assumed synchronous to clk. The DAC and the comparator are behavioural
// models with real-valued voltages. Beside the modulo-adder test, the
// counter of a time-conversion ADC used as a compactor stands on its own
// ports (tdc_*).
//
// Timing: `start` (one clock) begins a session; `done` rises once the last
// code has been added, with `fault` and `signature` valid, and holds until
// the next `start`. A HIT acts two clocks after the comparator output
// rises (synchroniser), then HIT is ignored for BLANK clocks. For
// observation the top also brings out the accepted-HIT count, a pulse per
// HIT ignored while blanking (hit_blanked), the adder's carry (sig_wrap),
// the two bounds in use and the controller state.
module conc_adc_test_top
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter int unsigned CW = CNT_BITS,
  parameter modulus_e MODULUS = MOD_2N,
  parameter real VFS = 8.0,
  parameter real WINDOW_LSB = 0.5,
  parameter int unsigned BLANK = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // operational signal and the ADC under test
  input  real           v_op,
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
  output real           v_dac,
  output logic          hit,
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

  dac_model #(.N(N), .VFS(VFS)) u_dac (
    .code(test_code), .vout(v_dac)
  );

  analog_comparator #(.N(N), .VFS(VFS), .WINDOW_LSB(WINDOW_LSB)) u_ac (
    .vsig(v_op), .vref(v_dac), .hit
  );

  conc_test_core #(.N(N), .CW(CW), .MODULUS(MODULUS), .BLANK(BLANK)) u_core (
    .clk, .rst_n, .hit, .adc_code,
    .start, .first_code, .step, .m_count, .seed, .dhat, .dcheck,
    .test_code, .busy, .done, .fault, .signature, .hits,
    .hit_blanked, .sig_wrap, .lo_bound, .hi_bound, .state,
    .tdc_test_mode, .tdc_session_start, .tdc_seed, .tdc_conv_start, .tdc_gate,
    .tdc_count, .tdc_code, .tdc_conv_done
  );

endmodule
