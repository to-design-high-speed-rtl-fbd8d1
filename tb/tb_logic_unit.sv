// tb_logic_unit: exhaustive self-checking test of the logical unit: every
// select code and operand pair, result compared with the bitwise function
// written out in the testbench. Time watchdog included.
module tb_logic_unit;
  import vedic_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b, y, e;
  logic_sel_e sel;

  logic_unit #(.W(4)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    for (int i = 0; i < 2048; i++) begin
      sel = logic_sel_e'(i[10:8]);
      {a, b} = i[7:0];
      #1;
      case (i[10:8])
        0: e = a & b;
        1: e = a | b;
        2: e = ~(a | b);
        3: e = a;
        4: e = ~(a & b);
        5: e = a ^ b;
        6: e = ~(a ^ b);
        default: e = ~a;
      endcase
      checks++;
      if (y !== e) begin
        failures++;
        $display("FAIL sel=%0d a=%b b=%b got %b expected %b", i[10:8], a, b, y, e);
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
