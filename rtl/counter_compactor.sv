// Counter of a time-conversion ADC reused as the signature compactor.
//
// In an ADC that first turns the measured value into a time interval, a
// binary counter counts clock pulses while the interval (`gate`) is open;
// the count is the output code. In normal mode (test_mode = 0) the counter
// is cleared at every `conv_start`, so `count` holds one conversion result.
// In test mode the counter is not cleared between conversions: it is loaded
// once with the seed at `session_start` and keeps accumulating over the
// whole series of test conversions, so at the end it holds the modulo-2^N
// sum of all codes plus the seed, the same signature the modulo adder
// forms, with no adder added to the ADC. The seed preload and the
// `conv_done` handshake are this design's choices.
//
// Timing: `count` increments on each clock with `gate` high. `conv_done`
// pulses one clock after `gate` falls; `code` then holds the last
// conversion result in normal mode. Priority: session_start, conv_start,
// gate. Reset is asynchronous, active low.
module counter_compactor
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         session_start,
  input  logic [N-1:0] seed,
  input  logic         conv_start,
  input  logic         gate,
  output logic [N-1:0] count,
  output logic [N-1:0] code,
  output logic         conv_done
);

  logic gate_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      code      <= '0;
      gate_q    <= 1'b0;
      conv_done <= 1'b0;
    end else begin
      gate_q    <= gate;
      conv_done <= gate_q && !gate;
      if (gate_q && !gate) code <= count;
      if (session_start)                count <= test_mode ? seed : '0;
      else if (conv_start && !test_mode) count <= '0;
      else if (gate)                     count <= count + 1'b1;
    end
  end

endmodule
