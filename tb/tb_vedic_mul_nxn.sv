// tb_vedic_mul_nxn: self-checking test of the recursive NxN block-form
// Vedic multiplier at N = 2, 4 and 8 exhaustively and at N = 16 with
// 20000 random operand pairs; every product is compared with a * b
// computed in the testbench. Time watchdog included.
module tb_vedic_mul_nxn;
  int checks = 0, failures = 0;
  logic [1:0]  a2, b2;
  logic [3:0]  p2, a4, b4;
  logic [7:0]  p4, a8, b8;
  logic [15:0] p8, a16, b16;
  logic [31:0] p16;

  vedic_mul_nxn #(.N(2))  dut2  (.a(a2),  .b(b2),  .p(p2));
  vedic_mul_nxn #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mul_nxn #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mul_nxn #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check(int n, longint a, longint b, longint p);
    checks++;
    if (p != a * b) begin
      failures++;
      $display("FAIL N=%0d %0d * %0d got %0d", n, a, b, p);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      {a4, b4} = 8'(i);
      {a2, b2} = 4'(i);
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (i % 4 == 0) begin
        a16 = 16'hFFFF;          // corner: the largest product
        b16 = 16'($urandom) | 16'h8000;
      end
      #1;
      check(8, a8, b8, p8);
      if (i < 256) check(4, a4, b4, p4);
      if (i < 16)  check(2, a2, b2, p2);
      if (i < 20000) check(16, a16, b16, p16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
