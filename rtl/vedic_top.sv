// vedic_top: the multiplier design at its top level, two unsigned
// Urdhva-Tiryakbhyam ("vertically and crosswise") multipliers side by side.
//
//  * a x b -> p: the main N x N multiplier (N = 32), vedic_mul. It is built
//    hierarchically: each level uses four half-size multipliers working in
//    parallel and three ripple-carry adders, down to the 4x4 block (four 2x2
//    blocks and three 4-bit adders) and the 2x2 block.
//  * a8 x b8 -> p8: the 8x8 bit-level multiplier, urdhva_mul8, which sums the
//    64 partial products column by column with half and full adders in four
//    stages and ends with a two-part ripple-carry addition.
//
// Both are purely combinational: no clock, no reset, no registers. A product
// is valid one combinational delay after its operands change.
//
// Interface: a, b (N bits) -> p (2N bits); a8, b8 (N8 bits) -> p8 (2*N8
// bits). All unsigned. The two multipliers share nothing.
// The 32-bit size and the 8x8 scheme follow the design description; putting
// both in one top, rather than using one inside the other, is this design's
// choice, since the description presents them as two ways of building the
// multiplier and does not connect them.
module vedic_top #(
  parameter int unsigned N  = 32,
  parameter int unsigned N8 = 8
) (
  input  logic [N-1:0]    a,
  input  logic [N-1:0]    b,
  output logic [2*N-1:0]  p,
  input  logic [N8-1:0]   a8,
  input  logic [N8-1:0]   b8,
  output logic [2*N8-1:0] p8
);
  vedic_mul #(.N(N)) u_vedic (
    .a(a),
    .b(b),
    .p(p)
  );

  urdhva_mul8 #(.N(N8)) u_tree (
    .a(a8),
    .b(b8),
    .p(p8)
  );
endmodule
