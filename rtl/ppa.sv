// ppa: partial-product adder of the reversible parity-preserving
// multipliers, built from MEAM blocks and ZPLG full adders.
//
// Stage 1, MEAM: rows y[0] and y[1] are read as G two-by-two products,
// (x[2k+1] x[2k]) * (y[1] y[0]) at weight 2k. Their middle bit, the
// half-adder sum hs[k], already comes from the generator; MEAM block k
// (inputs 0, x[2k+1]y[1], x[2k]y[0], x[2k+1]y[1], 0) gives the other three
// bits: p at weight 2k, q at 2k+2 and r (the carry) at 2k+3. MEAM 0 yields
// P0 and hs[0] is P1 directly.
//
// Stage 2, ZPLG array: all remaining bits ("dots", listed in rpm_pkg) are
// summed column by column. In column c the first adder takes three bits, each
// further adder takes the running sum and two more bits; carries go to
// column c+1 and are summed there after its own dots. The last sum of a
// column is product bit c, the single carry out of column 2N-2 is the MSB.
// Every column holds an odd number of bits, so no half adder is needed and
// the array has N(N-2) adders (unsigned) or (N-1)^2 (signed), as in the
// design. In signed mode the constant 1 at weight N enters as a dot and the
// 1 at weight 2N-1 is the kc input of the last adder, which inverts the MSB.
// For the 4x4 unsigned multiplier this is the drawn adder network: one adder
// in column 2, two in columns 3 to 5 (the first adding MEAM/row bits, the
// second the M term or the incoming carries), one in column 6. The signed
// 5x5 design is drawn as carry-save rows plus a ripple-carry row; the
// column chains used here have the same adder count and results but not
// that wiring. Column chains for every size are this implementation's
// choice.
//
// Interface: prod/hs/dup as produced by ppg. p is the 2N-bit product (two's
// complement in signed mode). garbage holds all garbage lines (MEAM s,t and
// ZPLG g1,g2,g3). Purely combinational.
module ppa
  import rpm_pkg::*;
#(
  parameter int N      = 4,
  parameter bit SIGNED = 1'b0,
  localparam int G     = n_groups(N, SIGNED),
  localparam int NFA   = total_fa(N, SIGNED),
  localparam int GW    = 2 * G + 3 * NFA
) (
  input  logic [N-1:0]    prod [N],
  input  logic [G-1:0]    hs,
  input  logic [G-1:0]    dup,
  output logic [2*N-1:0]  p,
  output logic [GW-1:0]   garbage
);

  localparam int ND = n_dots(N, SIGNED);

  if (!array_ok(N, SIGNED)) begin : g_bad_n
    $error("ppa: column array cannot be reduced with full adders only");
  end

  // ------------------------------------------------------------ MEAM stage
  logic [G-1:0] mp, mq, mr;
  for (genvar k = 0; k < G; k++) begin : g_meam
    meam_block u_meam (
      .a(1'b0), .b(prod[1][2*k+1]), .c(prod[0][2*k]), .d(dup[k]), .e(1'b0),
      .p(mp[k]), .q(mq[k]), .r(mr[k]),
      .s(garbage[2*k]), .t(garbage[2*k+1]));
  end
  assign p[0] = mp[0];
  assign p[1] = hs[0];

  // ------------------------------------------------------------ dot list
  logic [ND-1:0] dots;
  localparam int BR = 2 * G;
  localparam int BL = BR + N * (N - 2);
  localparam int BS = BL + 2 * (G - 1);
  for (genvar k = 0; k < G; k++) begin : g_dot_hi
    assign dots[2*k]     = mq[k];
    assign dots[2*k + 1] = mr[k];
  end
  for (genvar j = 2; j < N; j++) begin : g_dot_row
    assign dots[BR + (j-2)*N +: N] = prod[j];
  end
  for (genvar k = 1; k < G; k++) begin : g_dot_lo
    assign dots[BL + 2*(k-1)]     = mp[k];
    assign dots[BL + 2*(k-1) + 1] = hs[k];
  end
  if (SIGNED) begin : g_dot_sgn
    assign dots[BS]     = prod[0][N-1];
    assign dots[BS + 1] = prod[1][N-1];
    assign dots[BS + 2] = 1'b1;
  end

  // ------------------------------------------------------------ ZPLG array
  // In column c, item[t] for t < col_dots are the column's dots, followed by
  // the carries of column c-1; each adder f keeps its own sum s and carry co.
  for (genvar c = 2; c <= 2 * N - 2; c++) begin : g_colm
    localparam int NP  = col_dots(N, SIGNED, c);
    localparam int NCI = (c >= 3) ? col_fa(N, SIGNED, c - 1) : 0;
    localparam int NF  = col_fa(N, SIGNED, c);
    // position of this column's first adder in the garbage vector
    localparam int GB  = 2 * G + 3 * total_before(c);
    logic [NP+NCI-1:0] item;

    for (genvar t = 0; t < NP; t++) begin : g_dot
      localparam int DI = col_dot(c, t);
      assign item[t] = dots[DI];
    end
    if (c >= 3) begin : g_cin
      for (genvar f = 0; f < NCI; f++) begin : g_c
        assign item[NP + f] = g_colm[c-1].g_fa[f].co;
      end
    end

    for (genvar f = 0; f < NF; f++) begin : g_fa
      logic a_in, s, co;
      if (f == 0) begin : g_first
        assign a_in = item[0];
      end else begin : g_next
        assign a_in = g_fa[f-1].s;
      end
      zplg_block u_zplg (
        .ks(1'b0),
        .kc((SIGNED && c == 2 * N - 2 && f == NF - 1) ? 1'b1 : 1'b0),
        .a(a_in), .b(item[2*f+1]), .ci(item[2*f+2]),
        .g1(garbage[GB + 3*f]), .carry(co), .sum(s),
        .g2(garbage[GB + 3*f + 1]), .g3(garbage[GB + 3*f + 2]));
    end

    if (NF == 0) begin : g_pass
      assign p[c] = item[0];
    end else begin : g_sum
      assign p[c] = g_fa[NF-1].s;
    end
  end
  assign p[2*N-1] = g_colm[2*N-2].g_fa[0].co;

  // Index in the dot list of the t-th dot of column c.
  function automatic int col_dot(int c, int t);
    int r;
    r = 0;
    for (int d = 0; d < ND; d++)
      if (dot_col(N, SIGNED, d) == c && dot_pos(N, SIGNED, d) == t) r = d;
    return r;
  endfunction

  // Adders in the columns below c.
  function automatic int total_before(int c);
    int r;
    r = 0;
    for (int k = 2; k < c; k++) r += col_fa(N, SIGNED, k);
    return r;
  endfunction

endmodule
