// ppg: partial-product generator of the reversible parity-preserving
// multipliers, built from E1 blocks and Fredkin (FRG) gates.
//
// Each product x[i]y[j] is made by one block. Operand x[i] is carried down
// the rows and y[j] across the columns by the blocks themselves (E1 passes
// both operands, FRG passes one), so no signal fans out. Which block sits
// where is decided by rpm_pkg::cell_kind:
//   * the last row and the last column of the chains are Fredkin gates with
//     their third input at 0 (2N-2 of them unsigned, 2N-4 signed);
//   * every other product is an E1 block;
//   * in row y[1], the E1 at even column 2k takes x[2k+1]y[0] on its c input
//     and so produces the half-adder sum x[2k]y[1] ^ x[2k+1]y[0] (P1 for
//     k = 0, "M" terms otherwise), while the E1 at column 2k+1 keeps both
//     copies of x[2k+1]y[1] for the MEAM block of the adder;
//   * signed mode (Baugh-Wooley): the 2N-2 sign terms x[N-1]y[j], x[i]y[N-1]
//     (i,j < N-1) come from E1 blocks with c = 1, i.e. as NANDs.
// The placement of Fredkin gates on the last column and row, the E1 roles and
// the block counts follow the design; the exact visiting order of the chains
// is this implementation's reading of the array drawings.
//
// Interface: prod[j][i] is the product of x[i] and y[j] (NAND for sign
// terms). Entries consumed inside the generator read 0: prod[0][2k+1] (fed to
// the half-adder E1) and prod[1][2k] (replaced by hs[k]). hs[k] is the
// half-adder sum of group k, dup[k] the second copy of x[2k+1]y[1]. garbage
// holds every garbage line, padded with zeros, so the parity of {x, y}
// equals the parity of all outputs. Purely combinational.
module ppg
  import rpm_pkg::*;
#(
  parameter int N      = 4,
  parameter bit SIGNED = 1'b0,
  localparam int G     = n_groups(N, SIGNED),
  localparam int GW    = N * N + 2 * N
) (
  input  logic [N-1:0]  x,
  input  logic [N-1:0]  y,
  output logic [N-1:0]  prod [N],
  output logic [G-1:0]  hs,
  output logic [G-1:0]  dup,
  output logic [GW-1:0] garbage
);

  if (SIGNED ? (N < 3 || N % 2 == 0) : (N < 4 || N % 2 != 0)) begin : g_bad_n
    $error("ppg: N must be even and >= 4 (unsigned) or odd and >= 3 (signed)");
  end

  // xo[j][i] / yo[j][i]: operand lines leaving block (i,j); cp: product line
  // used further on; cg: garbage line of the block (0 if it has none).
  logic [N-1:0] xo [N];
  logic [N-1:0] yo [N];
  logic [N-1:0] cp [N];
  logic [N-1:0] cg [N];

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      localparam cell_kind_e K  = cell_kind(N, SIGNED, i, j);
      localparam int         PJ = chain_prev(N, SIGNED, j);
      localparam int         PI = chain_prev(N, SIGNED, i);
      logic xin, yin;

      if (PJ < 0) begin : g_xin0
        assign xin = x[i];
      end else begin : g_xin
        assign xin = xo[PJ][i];
      end
      if (PI < 0) begin : g_yin0
        assign yin = y[j];
      end else begin : g_yin
        assign yin = yo[j][PI];
      end

      if (K == K_FRG_X) begin : g_frgx
        frg_gate u_frg (.a(xin), .b(yin), .c(1'b0),
                        .p(xo[j][i]), .q(cg[j][i]), .r(cp[j][i]));
        assign yo[j][i] = 1'b0;
      end else if (K == K_FRG_Y) begin : g_frgy
        frg_gate u_frg (.a(yin), .b(xin), .c(1'b0),
                        .p(yo[j][i]), .q(cg[j][i]), .r(cp[j][i]));
        assign xo[j][i] = 1'b0;
      end else begin : g_e1
        logic c_in, r_o, s_o;
        if (K == K_E1_HS) begin : g_hs
          assign c_in = cp[0][i+1];
        end else if (K == K_E1_NAND) begin : g_nand
          assign c_in = 1'b1;
        end else begin : g_and
          assign c_in = 1'b0;
        end
        e1_block u_e1 (.a(xin), .b(yin), .c(c_in), .d(1'b0),
                       .p(xo[j][i]), .q(yo[j][i]), .r(r_o), .s(s_o));
        assign cp[j][i] = r_o;
        if (K == K_E1_DUP) begin : g_dup
          assign dup[i/2] = s_o;
          assign cg[j][i] = 1'b0;
        end else begin : g_one
          assign cg[j][i] = s_o;
        end
      end

      // Routing of the product line.
      if (K == K_E1_HS) begin : g_out_hs
        assign hs[i/2]    = cp[j][i];
        assign prod[j][i] = 1'b0;
      end else if (j == 0 && i < 2 * G && i % 2 == 1) begin : g_out_c
        assign prod[j][i] = 1'b0;  // consumed by the half-adder E1
      end else begin : g_out
        assign prod[j][i] = cp[j][i];
      end
    end
  end

  // Garbage: one line per block, then the x and y lines left at chain ends.
  localparam int XL = chain_last(N, SIGNED);
  for (genvar j = 0; j < N; j++) begin : g_gb
    assign garbage[j*N +: N]   = cg[j];
    assign garbage[N*N + j]    = xo[XL][j];
    assign garbage[N*N + N + j] = yo[j][XL];
  end

endmodule
