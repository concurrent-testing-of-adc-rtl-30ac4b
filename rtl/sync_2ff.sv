// Two-flop synchroniser for the comparator's HIT output.
//
// The analog comparator changes its output independently of the test clock,
// so its level passes through two flip-flops before the controller uses it.
// Output `q` follows `d` two clock edges later. Reset is asynchronous,
// active low, and clears both stages.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
