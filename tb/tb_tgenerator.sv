// tb_tgenerator: exhaustive self-checking test of the partial-product
// generator. For all 256 operand pairs it checks that the weighted sum of
// t1..t15 plus a0b0 equals a * b (each t is weighted by its column:
// t1..t2 by 2, t3..t5 by 4, t6..t9 by 8, t10..t12 by 16, t13..t14 by 32,
// t15 by 64), and that each column holds exactly the products a[i]b[j] of
// that column, counted independently. Time watchdog included.
module tb_tgenerator;
  int checks = 0, failures = 0;
  logic [3:0]  a, b;
  logic [15:1] t;
  int weight [15:1];
  int col_first [1:6];
  int col_len   [1:6];

  tgenerator dut (.a(a), .b(b), .t(t));

  initial begin
    col_first = '{1, 3, 6, 10, 13, 15};
    col_len   = '{2, 3, 4, 3, 2, 1};
    for (int w = 1; w <= 6; w++)
      for (int k = 0; k < col_len[w]; k++) weight[col_first[w] + k] = 1 << w;

    for (int i = 0; i < 256; i++) begin
      int sum, ones_t, ones_ref;
      {a, b} = 8'(i);
      #1;
      sum = int'(a[0] & b[0]);
      for (int k = 1; k <= 15; k++) sum += weight[k] * int'(t[k]);
      checks++;
      if (sum != int'(a) * int'(b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d weighted t sum=%0d", a, b, sum);
      end
      // Per column: the number of ones equals the number of true products.
      for (int w = 1; w <= 6; w++) begin
        ones_t = 0;
        ones_ref = 0;
        for (int k = 0; k < col_len[w]; k++) ones_t += int'(t[col_first[w] + k]);
        for (int x = 0; x < 4; x++)
          if (w - x >= 0 && w - x <= 3) ones_ref += int'(a[x] & b[w-x]);
        checks++;
        if (ones_t != ones_ref) begin
          failures++;
          $display("FAIL a=%0d b=%0d column %0d has %0d ones, expected %0d",
                   a, b, w, ones_t, ones_ref);
        end
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
