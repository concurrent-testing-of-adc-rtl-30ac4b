// Shared types and defaults for the concurrent ADC test logic.
//
// The test compacts the output codes of an ADC into a modulo-L sum (the
// signature) while the ADC keeps doing its normal work. Modules here share
// the ADC resolution default, the width of the pattern counter, the choice
// of compaction modulus and the session controller's states.
//
// ADC_BITS = 8 is the resolution of the worked 8-bit example of the method
// (the block diagrams draw a 3-bit version). The modulus 2^n is the method's
// main choice; 2^n - 1 (end-around carry) is the variant offered for
// detecting all single errors. CNT_BITS, the width of the pattern count m,
// is this design's own choice.
package conc_test_pkg;

  localparam int unsigned ADC_BITS = 8;
  localparam int unsigned CNT_BITS = 16;

  // Compaction modulus L.
  typedef enum logic {
    MOD_2N    = 1'b0,   // L = 2^n, carry out of the adder dropped
    MOD_2N_M1 = 1'b1    // L = 2^n - 1, carry out added back in (end-around)
  } modulus_e;

  // Test session controller states.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,    // waiting for start
    ST_RUN   = 2'd1,    // collecting one ADC code per HIT
    ST_CHECK = 2'd2,    // last code added, signature settling
    ST_DONE  = 2'd3     // verdict valid
  } ctrl_state_e;

endpackage
