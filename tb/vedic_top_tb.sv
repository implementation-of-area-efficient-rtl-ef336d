// vedic_top_tb: end-to-end self-check of the top level at its default
// parameters (32x32 hierarchical multiplier, 8x8 column-compression
// multiplier), against integer multiplication.
//
// Both multipliers are driven at the same time with independent operands.
// Besides the products it counts how often each carry path of the design is
// exercised and fails if one never is:
//   * c1 / c2: the 32-bit level's first (cross-product) and second adder
//     carrying, worked out from the operands;
//   * the carry from the 8x8 multiplier's first final adder into its second
//     (read from the block);
//   * all-ones operands, the largest products of both multipliers.
module vedic_top_tb;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int          checks = 0, failures = 0;
  int          n_c1 = 0, n_c2 = 0, n_split = 0, n_max = 0;

  vedic_top dut (.a(a), .b(b), .p(p), .a8(a8), .b8(b8), .p8(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y,
                       input logic [7:0] x8, input logic [7:0] y8);
    logic [63:0] q0, q1, q2, s1;
    a = x; b = y; a8 = x8; b8 = y8;
    #1;
    checks++;
    if (p != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL 32x32: %h * %h -> %h", x, y, p);
    end
    checks++;
    if (p8 != 16'(x8) * 16'(y8)) begin
      failures++;
      $display("FAIL 8x8: %h * %h -> %h", x8, y8, p8);
    end
    q0 = 64'(x[15:0]) * 64'(y[15:0]);
    q1 = 64'(x[31:16]) * 64'(y[15:0]);
    q2 = 64'(x[15:0]) * 64'(y[31:16]);
    s1 = q1 + q2;
    if (s1 >= 64'h1_0000_0000) n_c1++;
    if ((s1 & 64'hFFFF_FFFF) + (q0 >> 16) >= 64'h1_0000_0000) n_c2++;
    if (dut.u_tree.lo_cout) n_split++;
    if (x == '1 && y == '1 && x8 == '1 && y8 == '1) n_max++;
  endtask

  initial begin
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply(32'd1, 32'hDEAD_BEEF, 8'd1, 8'hA5);
    // q1 + q2 = 2^32 - 1 and q0 >> 16 = 0xFFFE: only the second adder carries
    apply(32'hFFFF_FFFF, 32'h0002_FFFF, 8'hFF, 8'h02);
    for (int i = 0; i < 10000; i++)
      apply($urandom, $urandom, 8'($urandom), 8'($urandom));
    for (int i = 0; i < 2000; i++)
      apply($urandom | $urandom, $urandom | $urandom,
            8'($urandom | $urandom), 8'($urandom | $urandom));
    $display("events: c1=%0d c2=%0d split_carry=%0d max_operands=%0d",
             n_c1, n_c2, n_split, n_max);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_split == 0 || n_max == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
