// Test generator: the source of the digital test words that feed the DAC.
//
// A session visits m test levels. The generator starts at first_code and
// moves on by step (modulo 2^N) each time `advance` is pulsed, which the
// controller does once per accepted HIT. A down-counter of the patterns still
// to visit drives `last` (the word on `code` is the final one) and
// `exhausted` (every pattern has been hit). The method only requires that
// the generator produce a sequence of words and step on HIT; the arithmetic
// progression first_code, first_code+step, ... is this design's choice,
// picked because the worked example uses consecutive codes.
//
// Timing: `load` (one clock) loads first_code and the count m; `code`
// changes on the clock edge after an `advance`. `advance` is ignored once
// the patterns are exhausted. Reset is asynchronous, active low.
module test_generator
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter int unsigned CW = CNT_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  first_code,
  input  logic [N-1:0]  step,
  input  logic [CW-1:0] m_count,
  input  logic          advance,
  output logic [N-1:0]  code,
  output logic          last,
  output logic          exhausted
);

  logic [CW-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code      <= '0;
      remaining <= '0;
    end else if (load) begin
      code      <= first_code;
      remaining <= m_count;
    end else if (advance && remaining != '0) begin
      code      <= code + step;
      remaining <= remaining - 1'b1;
    end
  end

  assign last      = (remaining == CW'(1));
  assign exhausted = (remaining == '0);

endmodule
