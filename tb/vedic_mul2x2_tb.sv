// vedic_mul2x2_tb: exhaustive self-check of the 2x2 Urdhva multiplier
// against integer multiplication (all 16 operand pairs).
module vedic_mul2x2_tb;
  logic [1:0] a, b;
  logic [3:0] p;
  int         checks = 0, failures = 0;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (p != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
