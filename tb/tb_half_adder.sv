// tb_half_adder: exhaustive self-checking test of the half adder. All four
// input pairs are applied and {carry, sum} is compared with a + b.
// A time watchdog ends the run with a failure if it hangs.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, sum, carry;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(a + b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d sum=%0d carry=%0d", a, b, sum, carry);
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
