// vedic_mul4x4: 4x4-bit Urdhva-Tiryakbhyam multiplier built from four 2x2
// blocks and three 4-bit ripple-carry adders.
//
// Split each operand into 2-bit halves (H, L). The four 2x2 blocks form
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (4 bits each)
// all at the same time. Then:
//   adder 1: s1 = q1 + q2                  (carry c1, weight 2^6)
//   adder 2: s2 = s1 + {2'b00, q0[3:2]}    (carry c2, weight 2^6)
//   adder 3: s3 = q3 + {1'b0, c1|c2, s2[3:2]}
//   p = {s3, s2[1:0], q0[1:0]}
// c1 and c2 are never both 1 (if q1+q2 >= 16 its low nibble is at most 2, so
// adding q0[3:2] <= 2 cannot carry again), so one OR gate merges them. The
// carry out of adder 3 is always 0 since the product fits 8 bits.
//
// Interface: a, b (4 bits, unsigned) -> p (8 bits). Combinational.
// The four 2x2 blocks feeding three 4-bit adders follow the design's 4-bit
// architecture figure; which operand goes to which adder and the OR that
// merges the two middle carries are this design's reading of it.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] s1, s2, s3;
  logic       c1, c2, c3;

  vedic_mul2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_mul2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_mul2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_mul2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  ripple_carry_adder #(.W(4)) u_add1 (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
  );
  ripple_carry_adder #(.W(4)) u_add2 (
    .a(s1), .b({2'b00, q0[3:2]}), .cin(1'b0), .sum(s2), .cout(c2)
  );
  ripple_carry_adder #(.W(4)) u_add3 (
    .a(q3), .b({1'b0, c1 | c2, s2[3:2]}), .cin(1'b0), .sum(s3), .cout(c3)
  );

  assign p = {s3, s2[1:0], q0[1:0]};

  // The product fits 8 bits, so the last adder never carries out.
  always_comb assert (!c3);
endmodule
