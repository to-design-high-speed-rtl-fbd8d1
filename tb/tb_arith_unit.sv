// tb_arith_unit: exhaustive self-checking test of the arithmetic unit with
// both multiplier forms. For every select code and operand pair, y and
// div_by_zero are compared with the integer reference model. Also counts
// how often an addition carried, a subtraction borrowed and a division by
// zero occurred, and fails if any of them never happened.
// Time watchdog included.
module tb_arith_unit;
  import vedic_pkg::*;
  import vedic_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_carry = 0, n_borrow = 0, n_dbz = 0;
  logic [3:0] a, b;
  arith_sel_e sel;
  logic [7:0] y_blk, y_col;
  logic       dbz_blk, dbz_col;
  alu_exp_t   e;

  arith_unit #(.MUL_ARCH(MUL_BLOCK)) dut_blk (
    .a(a), .b(b), .sel(sel), .y(y_blk), .div_by_zero(dbz_blk));
  arith_unit #(.MUL_ARCH(MUL_COLUMN)) dut_col (
    .a(a), .b(b), .sel(sel), .y(y_col), .div_by_zero(dbz_col));

  initial begin
    for (int i = 0; i < 1024; i++) begin
      sel = arith_sel_e'(i[9:8]);
      {a, b} = i[7:0];
      #1;
      e = alu_ref(int'(i[9:8]), int'(a), int'(b));
      checks += 2;
      if (y_blk !== e.result || dbz_blk !== e.dbz) begin
        failures++;
        $display("FAIL block sel=%0d a=%0d b=%0d y=%h expected %h", sel, a, b, y_blk, e.result);
      end
      if (y_col !== e.result || dbz_col !== e.dbz) begin
        failures++;
        $display("FAIL column sel=%0d a=%0d b=%0d y=%h expected %h", sel, a, b, y_col, e.result);
      end
      if (sel == ARITH_ADD && y_blk[4]) n_carry++;
      if (sel == ARITH_SUB && y_blk[4]) n_borrow++;
      if (sel == ARITH_DIV && dbz_blk)  n_dbz++;
    end
    $display("events: carry=%0d borrow=%0d div_by_zero=%0d", n_carry, n_borrow, n_dbz);
    checks += 3;
    if (n_carry == 0)  failures++;
    if (n_borrow == 0) failures++;
    if (n_dbz == 0)    failures++;
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
