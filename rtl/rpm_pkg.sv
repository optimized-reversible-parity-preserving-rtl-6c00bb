// rpm_pkg: shared types, structure functions and cost figures of the
// reversible parity-preserving multipliers.
//
// The multipliers are built from four parity-preserving reversible blocks:
// the Fredkin gate (FRG), the E1 block, the MEAM block and the ZPLG full
// adder. Every structural decision of the partial-product generator (PPG)
// and the partial-product adder (PPA) is made by the elaboration-time
// functions below, so the same functions that place the blocks also count
// them. That lets a testbench compare the built structure with the
// closed-form quantum cost (QC), constant-input (CI) and garbage-output (GO)
// equations of the design.
//
// Two modes exist:
//   unsigned : N even. N/2 two-by-two sub-multipliers on rows y0,y1.
//   signed   : N odd, Baugh-Wooley two's complement. (N-1)/2 sub-multipliers
//              on rows y0,y1; the sign column x[N-1] and sign row y[N-1]
//              give NAND terms, and a constant 1 is added at weights N and
//              2N-1.
// Chain order: operand x[i] runs down the rows and operand y[j] across the
// columns. The last block on each chain is a Fredkin gate, which passes only
// one operand on; in signed mode the sign column/row is visited before the
// column/row N-2 so that the Fredkin gates sit on column/row N-2.
package rpm_pkg;

  // Kind of block that produces partial product x[i]*y[j] in the PPG.
  typedef enum logic [2:0] {
    K_E1,       // E1 with constants 0,0: AND on R, spare copy is garbage
    K_E1_NAND,  // E1 with C=1: NAND on R, AND copy is garbage
    K_E1_HS,    // E1 with C = x[i+1]*y[0]: R = half-adder sum (P1 or M)
    K_E1_DUP,   // E1 with constants 0,0: both AND copies are used (MEAM B, D)
    K_FRG_X,    // Fredkin, x passes on, y consumed (last column)
    K_FRG_Y     // Fredkin, y passes on, x consumed (last row)
  } cell_kind_e;

  // Quantum cost of each block. FRG = 5 and MEAM = 7 are stated values; E1
  // = 6 and ZPLG = 8 are the values that make the 4x4 unsigned (168) and
  // 5x5 signed (286) totals come out.
  localparam int QC_FRG  = 5;
  localparam int QC_E1   = 6;
  localparam int QC_MEAM = 7;
  localparam int QC_ZPLG = 8;

  function automatic int n_groups(int n, bit sgn);
    return sgn ? (n - 1) / 2 : n / 2;
  endfunction

  // Position of column (row) index k in the operand chain order.
  function automatic int chain_pos(int n, bit sgn, int k);
    if (!sgn || k < n - 2) return k;
    return (k == n - 1) ? n - 2 : n - 1;
  endfunction

  // Index visited right before k on the chain (-1 for the first one).
  function automatic int chain_prev(int n, bit sgn, int k);
    int r;
    r = -1;
    for (int m = 0; m < n; m++)
      if (chain_pos(n, sgn, m) == chain_pos(n, sgn, k) - 1) r = m;
    return r;
  endfunction

  // Last index on the chain (the Fredkin column/row).
  function automatic int chain_last(int n, bit sgn);
    return sgn ? n - 2 : n - 1;
  endfunction

  function automatic cell_kind_e cell_kind(int n, bit sgn, int i, int j);
    int g, lst;
    cell_kind_e k;
    g   = n_groups(n, sgn);
    lst = chain_last(n, sgn);
    k   = K_E1;
    if (sgn && ((i == n - 1) != (j == n - 1)))      k = K_E1_NAND;
    else if (sgn && i == n - 1 && j == n - 1)       k = K_E1;
    else if (j == 1 && i < 2 * g && (i % 2) == 0)   k = K_E1_HS;
    else if (j == 1 && i < 2 * g && (i % 2) == 1)   k = K_E1_DUP;
    else if (j == lst)                              k = K_FRG_Y;
    else if (i == lst)                              k = K_FRG_X;
    return k;
  endfunction

  // ---------------------------------------------------------------- PPA dots
  // Bits entering the ZPLG column array, in this order (within a column the
  // order decides which adder a bit enters):
  //   k = 0..G-1 : MEAM_k.Q (weight 2k+2), MEAM_k.R (weight 2k+3)
  //   j = 2..N-1, i = 0..N-1 : x[i]*y[j] (weight i+j)
  //   k = 1..G-1 : MEAM_k.P (weight 2k), half-adder sum M_k (weight 2k+1)
  //   signed only: ~(x[N-1]y[0]) (N-1), ~(x[N-1]y[1]) (N), constant 1 (N)
  function automatic int n_dots(int n, bit sgn);
    int g;
    g = n_groups(n, sgn);
    return 2 * (g - 1) + 2 * g + n * (n - 2) + (sgn ? 3 : 0);
  endfunction

  function automatic int dot_col(int n, bit sgn, int d);
    int g, b, r;
    g = n_groups(n, sgn);
    r = -1;
    if (d < 2 * g) r = 2 * (d / 2) + 2 + (d % 2);
    else begin
      b = d - 2 * g;
      if (b < n * (n - 2)) r = (b % n) + (b / n) + 2;
      else begin
        b = b - n * (n - 2);
        if (b < 2 * (g - 1)) r = 2 * (b / 2 + 1) + (b % 2);
        else begin
          b = b - 2 * (g - 1);
          r = (b == 0) ? n - 1 : n;
        end
      end
    end
    return r;
  endfunction

  // Index of dot d among the dots of its own column.
  function automatic int dot_pos(int n, bit sgn, int d);
    int r;
    r = 0;
    for (int e = 0; e < d; e++)
      if (dot_col(n, sgn, e) == dot_col(n, sgn, d)) r++;
    return r;
  endfunction

  function automatic int col_dots(int n, bit sgn, int c);
    int r;
    r = 0;
    for (int e = 0; e < n_dots(n, sgn); e++)
      if (dot_col(n, sgn, e) == c) r++;
    return r;
  endfunction

  // Number of ZPLG full adders in column c (columns 2..2N-2 are summed; a
  // column with T bits, dots plus carries in, needs (T-1)/2 adders).
  function automatic int col_fa(int n, bit sgn, int c);
    int f;
    f = 0;
    for (int k = 2; k <= c; k++) f = (col_dots(n, sgn, k) + f - 1) / 2;
    return f;
  endfunction

  // True when every column of the array holds an odd number of bits, so
  // full adders alone reduce it to one bit and the top column sends out
  // exactly one carry (the product MSB).
  function automatic bit array_ok(int n, bit sgn);
    int f, t;
    bit ok;
    ok = 1'b1;
    f  = 0;
    for (int c = 2; c <= 2 * n - 2; c++) begin
      t = col_dots(n, sgn, c) + f;
      if (t % 2 == 0) ok = 1'b0;
      f = (t - 1) / 2;
    end
    if (f != 1) ok = 1'b0;
    return ok;
  endfunction

  function automatic int total_fa(int n, bit sgn);
    int r;
    r = 0;
    for (int c = 2; c <= 2 * n - 2; c++) r += col_fa(n, sgn, c);
    return r;
  endfunction

  // ------------------------------------------------------------ cost figures
  function automatic int count_kind(int n, bit sgn, cell_kind_e k);
    int r;
    r = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (cell_kind(n, sgn, i, j) == k) r++;
    return r;
  endfunction

  function automatic int count_frg(int n, bit sgn);
    return count_kind(n, sgn, K_FRG_X) + count_kind(n, sgn, K_FRG_Y);
  endfunction

  function automatic int count_e1(int n, bit sgn);
    return n * n - count_frg(n, sgn);
  endfunction

  function automatic int quantum_cost(int n, bit sgn);
    return QC_E1 * count_e1(n, sgn) + QC_FRG * count_frg(n, sgn) +
           QC_MEAM * n_groups(n, sgn) + QC_ZPLG * total_fa(n, sgn);
  endfunction

  // Constant inputs: two per E1 (one for the half-adder E1s, whose other
  // input is a product), one per FRG, two per MEAM (A, E), two per ZPLG,
  // and in signed mode the constant 1 added at weight N.
  function automatic int const_inputs(int n, bit sgn);
    return 2 * count_e1(n, sgn) - count_kind(n, sgn, K_E1_HS) +
           count_frg(n, sgn) + 2 * n_groups(n, sgn) + 2 * total_fa(n, sgn) +
           (sgn ? 1 : 0);
  endfunction

  // Garbage outputs: one per PPG block except the duplicating E1s, the
  // operand lines left at the end of a chain, two per MEAM (S, T) and three
  // per ZPLG.
  function automatic int garbage_outputs(int n, bit sgn);
    int ends;
    ends = 0;
    for (int k = 0; k < n; k++) begin
      // y[k] survives its last column unless that block is a K_FRG_X
      if (cell_kind(n, sgn, chain_last(n, sgn), k) != K_FRG_X) ends++;
      // x[k] survives the last row unless that block is a K_FRG_Y
      if (cell_kind(n, sgn, k, chain_last(n, sgn)) != K_FRG_Y) ends++;
    end
    return n * n - count_kind(n, sgn, K_E1_DUP) + ends +
           2 * n_groups(n, sgn) + 3 * total_fa(n, sgn);
  endfunction

  // Equations (6)-(11) of the design, doubled so that the half-integer
  // coefficients stay integral.
  function automatic int eq_qc_x2(int n, bit sgn);
    return sgn ? 2 * (14 * n * n - 18 * n + 7 * (n / 2) + 12)
               : 28 * n * n - 29 * n + 4;
  endfunction
  function automatic int eq_ci_x2(int n, bit sgn);
    return sgn ? 2 * (4 * n * n - 6 * n + (n / 2) + 7)
               : 8 * n * n - 11 * n + 4;
  endfunction
  function automatic int eq_go_x2(int n, bit sgn);
    return sgn ? 2 * (4 * n * n - 6 * n + 2 * (n / 2) + 5)
               : 8 * n * n - 10 * n;
  endfunction

endpackage
