// mult_signed: reversible parity-preserving signed (two's complement) N x N
// multiplier, Baugh-Wooley form.
//
// p = x * y with x, y signed N-bit and p signed 2N-bit. The sign terms
// x[N-1]y[j] and x[i]y[N-1] (i, j < N-1) enter inverted (NAND, from E1
// blocks whose third input is 1) and the constant 1 is added at weights N
// and 2N-1. The generator (ppg) uses (N-1)^2+3 E1 blocks and 2N-4 Fredkin
// gates; the adder (ppa) uses (N-1)/2 MEAM blocks, which complete the
// two-by-two sub-products of the non-sign columns on rows y[0], y[1], and
// (N-1)^2 ZPLG full adders. The 1 at weight N is a constant input of one
// adder; the 1 at weight 2N-1 is the carry-inverting input of the last one.
//
// The default N = 5 is the design's 5x5 multiplier: quantum cost 286, 79
// constant inputs, 79 garbage outputs. N must be odd (the sub-products pair
// up the N-1 non-sign columns). garbage carries every garbage output (zero
// padded): ^{x,y} == ^{p,garbage}. Purely combinational.
module mult_signed
  import rpm_pkg::*;
#(
  parameter int N = 5,
  localparam int G    = n_groups(N, 1'b1),
  localparam int GW_G = N * N + 2 * N,
  localparam int GW_A = 2 * G + 3 * total_fa(N, 1'b1),
  localparam int GW   = GW_G + GW_A
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p,
  output logic [GW-1:0]  garbage
);
  logic [N-1:0] prod [N];
  logic [G-1:0] hs, dup;

  ppg #(.N(N), .SIGNED(1'b1)) u_ppg (
    .x, .y, .prod, .hs, .dup, .garbage(garbage[GW_G-1:0]));

  ppa #(.N(N), .SIGNED(1'b1)) u_ppa (
    .prod, .hs, .dup, .p, .garbage(garbage[GW-1:GW_G]));
endmodule
