# Reversible parity-preserving multipliers (unsigned and signed)

A reversible circuit maps its input lines one-to-one onto its output lines, so
no information, and in principle no energy, is lost. A *parity-preserving*
reversible circuit additionally keeps the XOR of all its lines: the parity of
the inputs (data plus constants) equals the parity of the outputs (results plus
garbage). Any single line that flips inside such a circuit therefore shows up
as a parity mismatch at the outputs.

This repository holds synthesizable SystemVerilog for two multipliers built
that way, both from the same four parity-preserving blocks:

* an **unsigned N x N multiplier**, main size 4 x 4 (any even N >= 4);
* a **two's complement N x N multiplier** (Baugh-Wooley), main size 5 x 5
  (any odd N >= 3).

Their cost is measured the way reversible circuits are usually compared:
quantum cost (QC, the number of elementary 1- and 2-qubit operations),
constant inputs (CI) and garbage outputs (GO). The structure reproduces the
published figures of the design: 4 x 4 unsigned QC 168, CI 44, GO 44; 5 x 5
signed QC 286, CI 79, GO 79.

The RTL describes the *logic* of the reversible network: each block is written
as the Boolean function of its output lines, not as its internal network of
V, V+ and CNOT operations. Simulated or synthesised in CMOS it is an ordinary
combinational array multiplier whose outputs include every garbage line.

## The four blocks

| block | lines | outputs | role | QC |
|---|---|---|---|---|
| FRG (Fredkin) `frg_gate` | 3 | p=a, q=a'b^ac, r=a'c^ab | AND on r with c=0; a passes on, b is consumed | 5 |
| E1 `e1_block` | 4 | p=a, q=b, r=ab^c, s=ab^d | two AND copies (c=d=0), NAND (c=1), half-adder sum (c = another product) | 6 |
| MEAM `meam_block` | 5 | p=a^c, q=cd^ad'^b, r=cd^ad', s=c'd^ad', t=cd^ad'^e | completes a 2 x 2 product | 7 |
| ZPLG `zplg_block` | 5 | carry=maj^kc, sum=a^b^ci^ks, 3 garbage | full adder | 8 |

The Fredkin and MEAM equations are the published ones. For E1 and ZPLG only
their behaviour is fixed by the original design (which takes them from earlier
work); the equations above are the simplest reversible, parity-preserving
blocks with that behaviour and are this implementation's choice. The E1 and
ZPLG quantum costs (6 and 8) are not stated explicitly either; they are the
values for which the published totals (168 and 286) add up.

All four are bijections on their inputs and keep parity; each block's
testbench checks both exhaustively.

## How the product is formed

Both multipliers have a partial-product generator (`ppg`) and a
partial-product adder (`ppa`). The idea that saves cost is that **the first
two rows of partial products are not added by full adders at all**. They are
read as N/2 two-by-two products

    (x[2k+1] x[2k]) * (y[1] y[0])        at weight 2k

and each such product is finished by very little logic:

* bit 0 is `x[2k]y[0]`;
* bit 1 is the half-adder sum `x[2k]y[1] ^ x[2k+1]y[0]`. The generator makes
  it directly: the E1 block producing `x[2k]y[1]` takes `x[2k+1]y[0]` on its c
  input, so its r output is the XOR (for k = 0 this is already P1);
* bits 2 and 3 follow from `x[2k]y[0]` and `x[2k+1]y[1]` alone, because the
  carry of bit 1 is `x[2k]x[2k+1]y[0]y[1] = (x[2k]y[0])(x[2k+1]y[1])`. MEAM,
  fed `a=0, b=x[2k+1]y[1], c=x[2k]y[0], d=x[2k+1]y[1], e=0`, gives
  `q = x[2k+1]y[1] ^ carry` (bit 2) and `r = carry` (bit 3), plus `p` = bit 0.
  The E1 at (x[2k+1], y[1]) supplies the two copies of `x[2k+1]y[1]` that MEAM
  needs, since a reversible circuit cannot fan a line out.

For 4 x 4 this gives P0 and P1 directly and turns rows y0, y1 into the bits
`{Q0, x2y0}` at weight 2, `{R0, M}` at 3, `Q1` at 4 and `R1` at 5
(M = x2y1 ^ x3y0). Everything that remains, those bits and rows y2 .. y[N-1],
is summed by ZPLG full adders. Every column of that array holds an odd number
of bits, so full adders alone reduce it (no half adders), and exactly
N(N-2) adders are needed: 8 for 4 x 4.

**Operand fan-out.** Each operand line runs through the blocks: x[i] down the
rows, y[j] along the columns. E1 passes both operands on. A Fredkin gate passes
only one, so Fredkin gates sit where a chain ends: the last column
(x[N-1], except row y1, where both copies of the product are needed) and the
whole last row y[N-1]. That is 2N-2 Fredkin gates and N^2-2N+2 E1 blocks.
`rpm_pkg::cell_kind` decides the block at every position.

### Signed multiplier

Two's complement operands use the Baugh-Wooley form: the sign terms
`x[N-1]y[j]` and `x[i]y[N-1]` (i, j < N-1) enter inverted, and a constant 1 is
added at weights N and 2N-1. The inverted terms come from E1 blocks whose c
input is 1 (r = NAND); there are 2N-2 of them. The 2 x 2 grouping covers the
N-1 non-sign columns, so N must be odd and there are (N-1)/2 MEAM blocks. The
Fredkin gates move to column and row N-2, which the chains visit after the
sign column and row: 2N-4 Fredkin gates, (N-1)^2+3 E1 blocks,
(N-1)^2 ZPLG adders. The 1 at weight N is a constant operand of one adder; the
1 at weight 2N-1 is the `kc` input of the last adder, which inverts the final
carry (the product MSB).

### The adder array (`ppa`)

The "dots" still to be summed are listed in `rpm_pkg` (`n_dots`, `dot_col`).
Column c is a chain: the first ZPLG takes three bits, each further ZPLG takes
the running sum and two more bits, and the column's last sum is product bit c.
Carries of column c are summed in column c+1 after its own dots; the single
carry out of column 2N-2 is the MSB. For 4 x 4 that is one adder in column 2
(Q0, x0y2, x2y0), two in each of columns 3 to 5 (the MEAM bit and two row
products, then the sum with M or with the two incoming carries) and one in
column 6 (x3y3 and two carries). `rpm_pkg::array_ok` checks at elaboration
that every column is odd.

## Cost figures

`rpm_pkg` counts the blocks from the same functions that place them:
`quantum_cost`, `const_inputs` and `garbage_outputs` (N, signed).

| size | QC | CI | GO |
|---|---|---|---|
| 4 x 4 unsigned | 168 | 44 | 44 |
| 6 x 6 unsigned | 419 | 113 | 113 |
| 8 x 8 unsigned | 782 | 214 | 214 |
| 5 x 5 signed | 286 | 79 | 79 |
| 7 x 7 signed | 593 | 164 | 164 |

The closed forms of the design hold for the built structure:
QC = 14n^2 - 14.5n + 2 and CI = 4n^2 - 5.5n + 2 (unsigned, even n);
QC = 14n^2 - 18n + 7 floor(n/2) + 12 and CI = 4n^2 - 6n + floor(n/2) + 7
(signed, odd n >= 5). The published garbage-output formulas,
GO = 4n^2 - 5n (unsigned) and GO = 4n^2 - 6n + 2 floor(n/2) + 5 (signed), hold
only at n = 4 and n = 5. A reversible circuit with 2n data inputs and 2n
result lines must have GO = CI, and this one does; the GO formulas are
therefore not followed at other sizes.

## Garbage lines and parity

Every multiplier has a `garbage` output carrying all its garbage lines, so that

    ^{x, y} == ^{p, garbage}

holds for every input (the constant 1s come in even numbers, 2N in the signed
design). Some positions of `garbage` are tied to 0: the vector has a fixed slot
per generator block and per chain end, and a few of those (the duplicating E1
blocks, chain ends whose operand a Fredkin gate consumed) have no line. A
parity checker is not part of the design; the testbench shows that flipping
any single output line breaks the equation.

## Files and parameters

| file | content |
|---|---|
| `rtl/rpm_pkg.sv` | block kinds, placement and dot functions, cost counts and the closed-form equations |
| `rtl/frg_gate.sv`, `e1_block.sv`, `meam_block.sv`, `zplg_block.sv` | the four blocks |
| `rtl/ppg.sv` | generator, parameters `N` (default 4), `SIGNED` (default 0) |
| `rtl/ppa.sv` | adder, parameters `N` (default 4), `SIGNED` (default 0) |
| `rtl/mult_unsigned.sv` | unsigned multiplier, `N` = 4 |
| `rtl/mult_signed.sv` | signed multiplier, `N` = 5 |
| `rtl/rpm_top.sv` | both multipliers side by side, `NU` = 4, `NS` = 5 |

Everything is combinational: a product is valid one propagation delay after
the operands. `garbage` widths are N^2+2N + 2G + 3*(number of ZPLG) with
G = N/2 (unsigned) or (N-1)/2 (signed): 52 bits for 4 x 4, 87 for 5 x 5.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`:

* the four blocks: every input value, equations, parity, bijection;
* `tb_ppg`, `tb_ppa`: every operand pair, unsigned 4 x 4 and signed 5 x 5;
* `tb_mult_unsigned`: every pair at N = 4, 6, 8, parity rule, block counts and
  cost equations up to N = 16;
* `tb_mult_signed`: every pair at N = 3, 5, 7, parity rule, counts and
  equations up to N = 15;
* `tb_rpm_top`: the default design end to end; it also counts that MEAM
  carries, NAND terms at 0 and the constant-1 MSB inversion all occur, and
  that single-line flips are detected.

Run one with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb rtl/rpm_pkg.sv tb/tb_rpm_top.sv --top-module tb_rpm_top
    ./obj_dir/Vtb_rpm_top

## Where this RTL departs from the original drawings

* The blocks are Boolean functions; the V/V+/CNOT networks drawn for each block
  and for the whole multipliers are not modelled, so the quantum cost is
  counted per block rather than derived from gates.
* E1 and ZPLG equations are this implementation's (see above).
* The ZPLG adders form one chain per column. For 4 x 4 unsigned this is the
  drawn adder network (which inputs go to which adder). The 5 x 5 signed
  drawing instead uses carry-save rows of 5, 4 and 3 adders and a final
  ripple-carry row of 4 (product bits 5 to 9); the column chains here use the
  same 16 adders and give the same product, but the wiring and the logic
  depth differ. The n x n drawings leave the middle of the array out; the
  column chains are this implementation's generalisation.
* In one 4 x 4 adder the drawing labels the inputs "0 M"; M is treated as an
  addend, not as a constant input.
* The general signed generator drawing shows x[n-2]y[1] from a Fredkin gate;
  the 5 x 5 drawing (followed here) uses an E1 with two copies, which MEAM
  needs.
* Even N is not supported for the signed multiplier (the 2 x 2 grouping would
  include the sign column). N = 3 works, but its Fredkin row coincides with
  row y1, so its block counts differ from the closed forms.
* The chain visiting order of the operands is read from the drawings; it does
  not change any result.
