// rpm_top: the two reversible parity-preserving multipliers side by side.
//
// The design consists of an unsigned multiplier (4x4 as its main size) and a
// two's complement signed multiplier (5x5 as its main size), both built from
// the same four parity-preserving blocks (FRG, E1, MEAM, ZPLG). They share no
// signals; each has its own operands, product and garbage-output bundle.
// The garbage outputs are brought out because a reversible circuit keeps all
// its lines: with them, the parity of the operands equals the parity of
// product plus garbage, which is what makes single-line faults detectable
// (^{ux,uy} == ^{up,ugarbage}, and likewise for the signed one).
// Both multipliers are purely combinational.
module rpm_top
  import rpm_pkg::*;
#(
  parameter int NU = 4,   // unsigned operand width (even)
  parameter int NS = 5,   // signed operand width (odd)
  localparam int GWU = NU * NU + 2 * NU + 2 * n_groups(NU, 1'b0) + 3 * total_fa(NU, 1'b0),
  localparam int GWS = NS * NS + 2 * NS + 2 * n_groups(NS, 1'b1) + 3 * total_fa(NS, 1'b1)
) (
  input  logic [NU-1:0]          ux,
  input  logic [NU-1:0]          uy,
  output logic [2*NU-1:0]        up,
  output logic [GWU-1:0]         ugarbage,
  input  logic signed [NS-1:0]   sx,
  input  logic signed [NS-1:0]   sy,
  output logic signed [2*NS-1:0] sp,
  output logic [GWS-1:0]         sgarbage
);
  mult_unsigned #(.N(NU)) u_unsigned (.x(ux), .y(uy), .p(up), .garbage(ugarbage));
  mult_signed   #(.N(NS)) u_signed   (.x(sx), .y(sy), .p(sp), .garbage(sgarbage));
endmodule
