// tb_vedic_mul2x2: exhaustive self-checking test of the 2x2 Urdhva
// multiplier: all 16 operand pairs, product compared with a * b.
// Time watchdog included.
module tb_vedic_mul2x2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  vedic_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p !== 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
