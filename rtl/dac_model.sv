// Behavioural model of the test DAC (analog part, not synthesisable).
//
// An ideal N-bit DAC with the same resolution as the ADC under test:
// vout = code * VFS / 2^N volts, so code k sits at the centre of ADC bin k
// (the ideal ADC's transitions lie half an LSB either side). VFS = 8.0 V is
// the full-scale range used to draw the ideal transfer characteristic; it
// may be set to any value. The DAC needs no better accuracy than half an
// LSB for the test to work, so the model has no error terms. The output
// follows the input with no delay.
module dac_model
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter real VFS = 8.0
) (
  input  logic [N-1:0] code,
  output real          vout
);

  localparam real LSB = VFS / (2.0 ** N);

  always_comb vout = real'(code) * LSB;

endmodule
