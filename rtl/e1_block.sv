// e1_block: 4x4 reversible parity-preserving product block (E1).
//
//   p = a,  q = b,  r = ab ^ c,  s = ab ^ d
//
// Both operands pass on unchanged, so the block also provides the fan-out of
// x and y along the partial-product array. With c = d = 0 it yields two
// copies of the AND; with c = 1 the r output is the NAND (sign terms of the
// signed multiplier); with c fed by another product x[i+1]y[0] the r output
// is the half-adder sum x[i]y[1] ^ x[i+1]y[0]. Only this behaviour of E1 is
// fixed by the design (its pin labels in the array drawings); the two
// equations above are the simplest reversible, parity-preserving block that
// shows all of it: given a and b, c and d are recovered from r and s, and
// p^q^r^s = a^b^c^d. Quantum cost 6. Purely combinational.
module e1_block (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic ab;
  always_comb begin
    ab = a & b;
    p  = a;
    q  = b;
    r  = ab ^ c;
    s  = ab ^ d;
  end
endmodule
