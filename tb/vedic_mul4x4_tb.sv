// vedic_mul4x4_tb: exhaustive self-check of the 4x4 Vedic multiplier (four
// 2x2 blocks, three 4-bit adders) against integer multiplication, all 256
// operand pairs. It also counts the operand pairs that make the first
// (cross-product) adder and the second adder carry, worked out from the
// operands alone, and fails if either never happens.
module vedic_mul4x4_tb;
  logic [3:0] a, b;
  logic [7:0] p;
  int         checks = 0, failures = 0;
  int         n_c1 = 0, n_c2 = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q0, q1, q2, s1;
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p != 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
      q0 = int'(a[1:0]) * int'(b[1:0]);
      q1 = int'(a[3:2]) * int'(b[1:0]);
      q2 = int'(a[1:0]) * int'(b[3:2]);
      s1 = q1 + q2;
      if (s1 >= 16) n_c1++;
      if ((s1 % 16) + q0 / 4 >= 16) n_c2++;
    end
    $display("cross-adder carries: c1=%0d c2=%0d", n_c1, n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
