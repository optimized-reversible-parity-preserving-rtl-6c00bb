// meam_block: 5x5 reversible parity-preserving block that completes a
// two-by-two multiplier (MEAM).
//
//   p = a ^ c
//   q = cd ^ ad' ^ b
//   r = cd ^ ad'
//   s = c'd ^ ad'
//   t = cd ^ ad' ^ e
//
// Used with a = e = 0, b = d = x[2k+1]y[1] and c = x[2k]y[0]. The middle
// product bit of the 2x2 product, x[2k]y[1] ^ x[2k+1]y[0], is made in the PPG
// by an E1 block; MEAM then gives the other three: p = x[2k]y[0] (bit 0),
// q = x[2k+1]y[1] ^ (carry of the middle bit) (bit 2) and r = carry into bit
// 3. s and t are garbage. The output equations are the block's own; r ^ s
// recovers d, which makes the block reversible, and the parity of the outputs
// equals that of the inputs. Quantum cost 7. Purely combinational.
module meam_block (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic k;
  always_comb begin
    k = (c & d) ^ (a & ~d);
    p = a ^ c;
    q = k ^ b;
    r = k;
    s = (~c & d) ^ (a & ~d);
    t = k ^ e;
  end
endmodule
