// ripple_carry_adder: W-bit carry-propagate adder made of a chain of
// full_adder cells.
//
// The carry ripples from bit 0 to bit W-1; the delay grows linearly with W,
// which the design accepts where the addition is not on a critical path, in
// exchange for the smallest area and switching power. The "4-bit adders" of
// the 4x4 Vedic block and the split final adder of the 8x8 column-compression
// multiplier are instances of this module.
//
// Interface: a, b (W bits), cin -> sum (W bits), cout. Combinational.
// W defaults to 4, the adder width drawn in the 4x4 architecture.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
