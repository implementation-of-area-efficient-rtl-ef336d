// ripple_carry_adder_tb: self-check of ripple_carry_adder. The default
// 4-bit adder is checked exhaustively (all a, b, cin); a 32-bit instance, the
// width used by the top level of the 32-bit multiplier, is checked on random
// and corner vectors. Expected values come from integer addition.
module ripple_carry_adder_tb;
  logic [3:0]  a4, b4, s4;
  logic        cin4, cout4;
  logic [31:0] a32, b32, s32;
  logic        cin32, cout32;
  int          checks = 0, failures = 0;

  ripple_carry_adder dut4 (
    .a(a4), .b(b4), .cin(cin4), .sum(s4), .cout(cout4)
  );
  ripple_carry_adder #(.W(32)) dut32 (
    .a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(cout32)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] exp;
    a32 = x; b32 = y; cin32 = c;
    #1;
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout32, s32} != exp) begin
      failures++;
      $display("FAIL32 %h + %h + %0d -> %h", x, y, c, {cout32, s32});
    end
  endtask

  initial begin
    a32 = '0; b32 = '0; cin32 = 1'b0;
    for (int v = 0; v < 512; v++) begin
      {a4, b4, cin4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} != 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL4 %0d + %0d + %0d -> %0d", a4, b4, cin4, {cout4, s4});
      end
    end
    check32('1, '0, 1'b1);       // carry through every stage
    check32('1, '1, 1'b1);
    check32('0, '0, 1'b0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
