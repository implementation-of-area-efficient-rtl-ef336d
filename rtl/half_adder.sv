// half_adder: one-bit half adder, the two-input cell of the multiplier's
// partial-product additions.
//
// sum = a ^ b, carry = a & b. Purely combinational, no clock.
// Interface: a, b (1 bit each) -> sum, carry (1 bit each).
// The cell itself is named by the design description; its gate equations
// are the textbook ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
