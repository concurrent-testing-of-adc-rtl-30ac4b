// Modulo adder: the signature compactor of the concurrent ADC test.
//
// An N-bit register r and an N-bit adder with carry in and carry out. Before
// a session the register is loaded with the seed, the two's complement of
// the ideal code sum, -Y0 mod L. Each `add` pulse adds the N-bit ADC code d
// to r modulo L, so after the m-th code r holds R = (Y - Y0) mod L, the
// signature. All N bits of a code are compacted at once. Modulo sum
// compaction keeps the spread of codes a fault-free ADC may give from
// growing, unlike compactors that weight later codes by powers of 2^N.
//
// MODULUS = MOD_2N (the method's main form): L = 2^N, the carry out is
// dropped. MODULUS = MOD_2N_M1: L = 2^N - 1, the carry out is fed back as
// the carry in of the same add (end-around carry, one's complement sum);
// the register may then hold all ones, which stands for zero.
//
// Timing: one add per clock, result on the next edge. `load` has priority
// over `add`. `wrap` is high in a cycle whose add produces a carry out.
// Reset is asynchronous, active low, and clears r.
module modulo_adder
  import conc_test_pkg::*;
#(
  parameter int unsigned N = ADC_BITS,
  parameter modulus_e MODULUS = MOD_2N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         add,
  input  logic [N-1:0] d,
  output logic [N-1:0] r,
  output logic         wrap
);

  logic [N:0]   sum;
  logic [N-1:0] r_next;

  always_comb begin
    sum = {1'b0, r} + {1'b0, d};
    if (MODULUS == MOD_2N_M1) r_next = sum[N-1:0] + N'(sum[N]);
    else                      r_next = sum[N-1:0];
  end

  assign wrap = add && sum[N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= seed;
    else if (add)  r <= r_next;
  end

endmodule
