// vedic_mul_tb: self-check of the hierarchical Vedic multiplier against integer
// multiplication at three sizes:
//   * the default N = 32 (the main multiplier): corner and random operands;
//   * N = 16: random operands;
//   * N = 8: all 65536 operand pairs.
// At N = 32 it also counts, from the operands alone, how often the top
// level's cross-product adder (c1) and its second adder (c2) carry, and how
// often both were asked to happen in one vector (never allowed), failing if
// c1 or c2 never occurred.
module vedic_mul_tb;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int          checks = 0, failures = 0;
  int          n_c1 = 0, n_c2 = 0;

  vedic_mul dut32 (.a(a32), .b(b32), .p(p32));
  vedic_mul #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] q0, q1, q2, s1;
    a32 = x; b32 = y;
    #1;
    checks++;
    if (p32 != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL32 %h * %h -> %h", x, y, p32);
    end
    q0 = 64'(x[15:0]) * 64'(y[15:0]);
    q1 = 64'(x[31:16]) * 64'(y[15:0]);
    q2 = 64'(x[15:0]) * 64'(y[31:16]);
    s1 = q1 + q2;
    if (s1 >= 64'h1_0000_0000) n_c1++;
    if ((s1 & 64'hFFFF_FFFF) + (q0 >> 16) >= 64'h1_0000_0000) n_c2++;
  endtask

  initial begin
    a16 = '0; b16 = '0; a8 = '0; b8 = '0;
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'd1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'hFFFF_0000, 32'h0000_FFFF);
    check32(32'h0001_FFFF, 32'hFFFF_0001);
    // q1 + q2 = 2^32 - 1 and q0 >> 16 = 0xFFFE: only the second adder carries
    check32(32'hFFFF_FFFF, 32'h0002_FFFF);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom);
    // operands with many ones make the inner carries likely
    for (int i = 0; i < 2000; i++) check32($urandom | $urandom, $urandom | $urandom);
    $display("top-level carries: c1=%0d c2=%0d", n_c1, n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0) failures++;

    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        $display("FAIL16 %h * %h -> %h", a16, b16, p16);
      end
    end

    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 != 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d * %0d -> %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
