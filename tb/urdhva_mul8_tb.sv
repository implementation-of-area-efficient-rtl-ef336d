// urdhva_mul8_tb: exhaustive self-check of the 8x8 column-compression
// multiplier against integer multiplication (all 65536 operand pairs). It
// also checks the structure the scheme calls for: four reduction stages over
// sixteen columns, and a first final adder of five bits. It counts how often
// a carry crosses from the first final adder into the second (read from the
// block's internal carry) and fails if that never happens.
module urdhva_mul8_tb;
  logic [7:0]  a, b;
  logic [15:0] p;
  int          checks = 0, failures = 0;
  int          n_split_carry = 0;

  urdhva_mul8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.NS != 4) begin
      failures++;
      $display("FAIL: %0d reduction stages, expected 4", dut.NS);
    end
    checks++;
    if (dut.W != 16 || dut.LO_W != 5) begin
      failures++;
      $display("FAIL: %0d columns, first final adder %0d bits", dut.W, dut.LO_W);
    end
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p != 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
      if (dut.lo_cout) n_split_carry++;
    end
    $display("carries between the two final adders: %0d", n_split_carry);
    checks++;
    if (n_split_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
