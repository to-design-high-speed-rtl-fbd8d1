// tb_vedic_intermediate: exhaustive self-checking test of the block of four
// 2x2 multipliers. For all 256 operand pairs each of q0..q3 is compared
// with the product of the matching operand halves, and the recombination
// q0 + (q1 + q2) * 4 + q3 * 16 is compared with a * b.
// Time watchdog included.
module tb_vedic_intermediate;
  int checks = 0, failures = 0;
  logic [3:0]  a, b;
  logic [15:0] q;
  logic [3:0]  exp_q [4];

  vedic_intermediate dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      exp_q[0] = 4'(int'(a[1:0]) * int'(b[1:0]));
      exp_q[1] = 4'(int'(a[3:2]) * int'(b[1:0]));
      exp_q[2] = 4'(int'(a[1:0]) * int'(b[3:2]));
      exp_q[3] = 4'(int'(a[3:2]) * int'(b[3:2]));
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (q[4*k +: 4] !== exp_q[k]) begin
          failures++;
          $display("FAIL a=%0d b=%0d q%0d=%0d expected %0d", a, b, k, q[4*k +: 4], exp_q[k]);
        end
      end
      checks++;
      if (int'(q[3:0]) + 4 * (int'(q[7:4]) + int'(q[11:8])) + 16 * int'(q[15:12])
          != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d recombined product wrong", a, b);
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
