// vedic_mul2x2: 2x2-bit Urdhva-Tiryakbhyam ("vertically and crosswise")
// multiplier, the leaf block of the hierarchical multiplier.
//
// Vertically: p[0] = a0 b0. Crosswise: a1 b0 + a0 b1 in a half adder gives
// p[1] and a carry. Vertically again: a1 b1 plus that carry in a second half
// adder gives p[2] and p[3]. Four AND gates and two half adders; all partial
// products are formed at once and the result needs no clock.
//
// Interface: a, b (2 bits, unsigned) -> p (4 bits). Combinational.
// The 2x2 block and its place in the 4x4 architecture follow the design
// description; the gate-level make-up is the standard Urdhva 2x2 cell.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic cross_c;

  assign p[0] = a[0] & b[0];

  half_adder u_ha_cross (
    .a    (a[1] & b[0]),
    .b    (a[0] & b[1]),
    .sum  (p[1]),
    .carry(cross_c)
  );

  half_adder u_ha_top (
    .a    (a[1] & b[1]),
    .b    (cross_c),
    .sum  (p[2]),
    .carry(p[3])
  );
endmodule
