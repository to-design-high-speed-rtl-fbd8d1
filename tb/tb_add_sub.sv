// tb_add_sub: exhaustive self-checking test of the 4-bit adder/subtractor.
// For every a, b: with sub = 0, {cout, s} must equal a + b; with sub = 1,
// s must equal (a - b) mod 16 and cout must be 1 exactly when a >= b.
// Time watchdog included.
module tb_add_sub;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s;
  logic       sub, cout;

  add_sub #(.W(4)) dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {sub, a, b} = 9'(i);
      #1;
      checks++;
      if (!sub) begin
        if ({cout, s} !== 5'(int'(a) + int'(b))) begin
          failures++;
          $display("FAIL %0d + %0d got cout=%0d s=%0d", a, b, cout, s);
        end
      end else begin
        if (s !== 4'(int'(a) - int'(b)) || cout !== (a >= b)) begin
          failures++;
          $display("FAIL %0d - %0d got cout=%0d s=%0d", a, b, cout, s);
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
