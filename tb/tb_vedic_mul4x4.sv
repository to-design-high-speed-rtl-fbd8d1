// tb_vedic_mul4x4: exhaustive self-checking test of the 4x4 Vedic multiplier
// vedic_mul4x4. All 256 operand pairs are applied and the product is
// compared with a * b computed in the testbench. The multiplier is
// combinational; the result is sampled 1 time unit after the inputs
// change. Time watchdog included.
module tb_vedic_mul4x4;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d = %0d, got %0d", a, b, int'(a) * int'(b), p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
