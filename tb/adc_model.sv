// Behavioural model of the ADC under test (testbench only).
//
// An N-bit ADC with full-scale range VFS whose transitions lie half an LSB
// either side of each code centre: code = floor(vin / LSB + spread + 0.5), clipped
// to 0 .. 2^N - 1. A runtime `offset` (in LSB) shifts every code and models
// the offset failure the method is meant to catch. `spread` (in LSB, kept
// below 0.5 in magnitude by the caller) moves the transitions the way a
// fault-free but imperfect ADC may: it is added to the input before
// quantisation. Combinational.
module adc_model #(
  parameter int unsigned N = 8,
  parameter real VFS = 8.0
) (
  input  real          vin,
  input  int           offset,
  input  real          spread,
  output logic [N-1:0] code
);

  localparam real LSB = VFS / (2.0 ** N);

  always_comb begin
    int c;
    c = $rtoi($floor(vin / LSB + spread + 0.5)) + offset;
    if (c < 0) c = 0;
    if (c > (1 << N) - 1) c = (1 << N) - 1;
    code = N'(c);
  end

endmodule
