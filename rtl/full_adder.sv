// full_adder: one-bit full adder, the three-input cell of the multiplier's
// partial-product additions and of the ripple-carry adders.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// Interface: a, b, cin (1 bit each) -> sum, cout (1 bit each).
// The cell is named by the design description; the gate equations are the
// textbook ones.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
