// zplg_block: 5x5 reversible parity-preserving full adder (ZPLG).
//
//   g1    = maj(a,b,ci) ^ b ^ ci     (garbage)
//   carry = maj(a,b,ci) ^ kc
//   sum   = a ^ b ^ ci ^ ks
//   g2    = a ^ b                    (garbage)
//   g3    = a ^ ci                   (garbage)
//
// With the constant inputs ks = kc = 0 it is a full adder. Setting kc = 1
// inverts the carry, which the signed multiplier uses to add its constant 1
// at weight 2N-1 in the last adder. The design fixes the block's role (full
// adder on the two middle outputs, two constant inputs, three garbage lines)
// but not its equations; the ones above are this implementation's choice.
// They are a bijection on all 32 input values (a follows from g1, g2, g3;
// then b, ci, ks, kc) and keep the parity of the inputs. Quantum cost 8.
// Purely combinational.
module zplg_block (
  input  logic ks,
  input  logic kc,
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic g1,
  output logic carry,
  output logic sum,
  output logic g2,
  output logic g3
);
  logic mj;
  always_comb begin
    mj    = (a & b) | (a & ci) | (b & ci);
    g1    = mj ^ b ^ ci;
    carry = mj ^ kc;
    sum   = a ^ b ^ ci ^ ks;
    g2    = a ^ b;
    g3    = a ^ ci;
  end
endmodule
