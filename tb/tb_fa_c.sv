// tb_fa_c: exhaustive self-checking test of the ripple adder at both widths
// the multiplier uses, 4 bits (fa4_c) and 6 bits (fa6_c). Every a, b and
// carry-in is applied and {cout, s} is compared with a + b + cin.
// Time watchdog included.
module tb_fa_c;
  int checks = 0, failures = 0;
  logic [3:0] a4, b4, s4;
  logic       c4_in, c4_out;
  logic [5:0] a6, b6, s6;
  logic       c6_in, c6_out;

  fa_c #(.W(4)) dut4 (.a(a4), .b(b4), .cin(c4_in), .s(s4), .cout(c4_out));
  fa_c #(.W(6)) dut6 (.a(a6), .b(b6), .cin(c6_in), .s(s6), .cout(c6_out));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4_in, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({c4_out, s4} !== 5'(int'(a4) + int'(b4) + int'(c4_in))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d got %0d", a4, b4, c4_in, {c4_out, s4});
      end
    end
    for (int i = 0; i < 8192; i++) begin
      {c6_in, a6, b6} = 13'(i);
      #1;
      checks++;
      if ({c6_out, s6} !== 7'(int'(a6) + int'(b6) + int'(c6_in))) begin
        failures++;
        $display("FAIL W=6 %0d + %0d + %0d got %0d", a6, b6, c6_in, {c6_out, s6});
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
