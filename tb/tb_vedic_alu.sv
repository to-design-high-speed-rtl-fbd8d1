// tb_vedic_alu: exhaustive self-checking test of the 4-bit Vedic ALU with
// both multiplier forms. All sixteen operation codes (twelve defined, four
// undefined) and all 256 operand pairs are applied; result, div_by_zero
// and op_valid are compared with the integer reference model. The ALU is
// combinational: outputs are sampled 1 time unit after the inputs change.
// A third instance at W = 8 (built on the recursive block-form multiplier)
// gets 20000 random operations. Time watchdog included.
module tb_vedic_alu;
  import vedic_pkg::*;
  import vedic_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] a, b;
  alu_op_e    op;
  logic [7:0] r_blk, r_col;
  logic       dbz_blk, dbz_col, v_blk, v_col;
  alu_exp_t   e;
  logic [7:0]  a8, b8;
  logic [15:0] r8;
  logic        dbz8, v8;

  vedic_alu #(.MUL_ARCH(MUL_BLOCK)) dut_blk (
    .a(a), .b(b), .op(op), .result(r_blk), .div_by_zero(dbz_blk), .op_valid(v_blk));
  vedic_alu #(.MUL_ARCH(MUL_COLUMN)) dut_col (
    .a(a), .b(b), .op(op), .result(r_col), .div_by_zero(dbz_col), .op_valid(v_col));
  vedic_alu #(.W(8), .MUL_ARCH(MUL_BLOCK)) dut_w8 (
    .a(a8), .b(b8), .op(op), .result(r8), .div_by_zero(dbz8), .op_valid(v8));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      op = alu_op_e'(i[11:8]);
      {a, b} = i[7:0];
      #1;
      e = alu_ref(int'(i[11:8]), int'(a), int'(b));
      checks += 2;
      if (r_blk !== e.result || dbz_blk !== e.dbz || v_blk !== e.valid) begin
        failures++;
        $display("FAIL block op=%0d a=%0d b=%0d result=%h expected %h", i[11:8], a, b, r_blk, e.result);
      end
      if (r_col !== e.result || dbz_col !== e.dbz || v_col !== e.valid) begin
        failures++;
        $display("FAIL column op=%0d a=%0d b=%0d result=%h expected %h", i[11:8], a, b, r_col, e.result);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      op = alu_op_e'($urandom % 16);
      a8 = 8'($urandom);
      b8 = (i % 50 == 0) ? 8'd0 : 8'($urandom);
      #1;
      e = alu_ref(int'(op), int'(a8), int'(b8), 8);
      checks++;
      if (r8 !== e.result[15:0] || dbz8 !== e.dbz || v8 !== e.valid) begin
        failures++;
        $display("FAIL W=8 op=%0d a=%0d b=%0d result=%h expected %h", op, a8, b8, r8, e.result);
      end
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
