// tb_divider: exhaustive self-checking test of the 4-bit divider. For
// every a and nonzero b, q and r are compared with a / b and a % b; for
// b = 0 the flag must be set and q = 15, r = a. Time watchdog included.
module tb_divider;
  int checks = 0, failures = 0;
  logic [3:0] a, b, q, r;
  logic       dbz;

  divider #(.W(4)) dut (.a(a), .b(b), .q(q), .r(r), .div_by_zero(dbz));

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (b != 0) begin
        if (q !== a / b || r !== a % b || dbz !== 1'b0) begin
          failures++;
          $display("FAIL %0d / %0d got q=%0d r=%0d dbz=%0d", a, b, q, r, dbz);
        end
      end else begin
        if (q !== 4'hF || r !== a || dbz !== 1'b1) begin
          failures++;
          $display("FAIL %0d / 0 got q=%0d r=%0d dbz=%0d", a, q, r, dbz);
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
