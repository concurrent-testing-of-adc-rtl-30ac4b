// Behavioural model of the analog comparator that produces HIT
// (analog part, not synthesisable).
//
// HIT is high while the operational signal `vsig` matches the DAC output
// `vref`, i.e. while |vsig - vref| <= WINDOW_LSB * VFS / 2^N. A window of
// half an LSB is the default because a test voltage more accurate than that
// does not narrow the codes a fault-free ADC may give. The match window is
// this model's reading of "matches"; the output follows the inputs with no
// delay and is asynchronous to any clock.
module analog_comparator
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter real VFS = 8.0,
  parameter real WINDOW_LSB = 0.5
) (
  input  real  vsig,
  input  real  vref,
  output logic hit
);

  localparam real WINDOW = WINDOW_LSB * VFS / (2.0 ** N);

  always_comb hit = ((vsig - vref) <= WINDOW) && ((vref - vsig) <= WINDOW);

endmodule
