// mult_unsigned: reversible parity-preserving unsigned N x N multiplier.
//
// p = x * y, with x, y unsigned N-bit and p 2N bits. The circuit is a
// partial-product generator (ppg: E1 blocks and Fredkin gates) followed by a
// partial-product adder (ppa: N/2 MEAM blocks and N(N-2) ZPLG full adders).
// Part of the addition happens in the generator: the E1 blocks on row y[1]
// produce the N/2 half-adder sums x[2k]y[1] ^ x[2k+1]y[0], and each MEAM then
// completes one two-by-two sub-product from them.
//
// The default N = 4 is the design's 4x4 multiplier: 6 FRG, 10 E1, 2 MEAM and
// 8 ZPLG, quantum cost 168, 44 constant inputs and 44 garbage outputs. Any
// even N >= 4 is accepted; the cost figures of
// any size come from rpm_pkg::quantum_cost, const_inputs and garbage_outputs.
//
// garbage carries every garbage output of the reversible circuit (zero
// padded), so ^{x,y} == ^{p,garbage} holds for every input: a single flipped
// line anywhere shows up as a parity mismatch. Purely combinational; the
// output is valid one propagation delay after the inputs.
module mult_unsigned
  import rpm_pkg::*;
#(
  parameter int N = 4,
  localparam int G    = n_groups(N, 1'b0),
  localparam int GW_G = N * N + 2 * N,
  localparam int GW_A = 2 * G + 3 * total_fa(N, 1'b0),
  localparam int GW   = GW_G + GW_A
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic [GW-1:0]  garbage
);
  logic [N-1:0] prod [N];
  logic [G-1:0] hs, dup;

  ppg #(.N(N), .SIGNED(1'b0)) u_ppg (
    .x, .y, .prod, .hs, .dup, .garbage(garbage[GW_G-1:0]));

  ppa #(.N(N), .SIGNED(1'b0)) u_ppa (
    .prod, .hs, .dup, .p, .garbage(garbage[GW-1:GW_G]));
endmodule
