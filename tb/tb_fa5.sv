// tb_fa5: exhaustive self-checking test of the five-input column counter.
// All 32 input patterns are applied and {v2, v1, y0} is compared with the
// number of ones counted in the testbench. Time watchdog included.
module tb_fa5;
  int checks = 0, failures = 0;
  logic [4:0] x;
  logic y0, v1, v2;
  int expected;

  fa5 dut (.in1(x[0]), .in2(x[1]), .in3(x[2]), .in4(x[3]), .in5(x[4]),
           .y0(y0), .v1(v1), .v2(v2));

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = 5'(i);
      #1;
      expected = 0;
      for (int k = 0; k < 5; k++) expected += int'(x[k]);
      checks++;
      if ({v2, v1, y0} !== 3'(expected)) begin
        failures++;
        $display("FAIL in=%b count=%0d got %b", x, expected, {v2, v1, y0});
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
