// frg_gate: Fredkin (controlled swap) gate, 3 inputs and 3 outputs.
//
//   p = a,  q = a'b ^ ac,  r = a'c ^ ab
//
// When a is 1 the lines b and c are swapped, otherwise they pass. The gate is
// reversible (it is its own inverse) and parity-preserving (p^q^r = a^b^c).
// With c tied to 0 the r output is the AND of a and b, which is how the
// partial-product generators use it; a then passes on and b is consumed
// (q = a'b becomes a garbage output). Quantum cost 5. Purely combinational.
module frg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
