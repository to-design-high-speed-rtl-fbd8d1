// tb_mac_unit: self-checking test of the multiply-accumulate unit, with an
// 8-bit accumulator so that wrap-around happens quickly. Random operands,
// enables and clears are applied for 2000 cycles; after every clock edge
// acc and ovf are compared with a model kept in the testbench. Checks the
// one-cycle latency (acc shows the new sum right after the edge), that
// clear wins over enable, and that reset empties the unit. Counts
// accumulations, holds, clears and overflows and fails if any never
// happened. A cycle watchdog ends a hung run with a failure.
module tb_mac_unit;
  import vedic_pkg::*;
  localparam int unsigned ACC_W = 8;
  int checks = 0, failures = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_ovf = 0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic [ACC_W-1:0] acc_blk, acc_col;
  logic ovf_blk, ovf_col;
  int model_acc;
  logic model_ovf;

  mac_unit #(.ACC_W(ACC_W), .MUL_ARCH(MUL_BLOCK)) dut_blk (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b), .acc(acc_blk), .ovf(ovf_blk));
  mac_unit #(.ACC_W(ACC_W), .MUL_ARCH(MUL_COLUMN)) dut_col (
    .clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a(a), .b(b), .acc(acc_col), .ovf(ovf_col));

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks++;
    if (acc_blk !== ACC_W'(model_acc) || ovf_blk !== model_ovf ||
        acc_col !== ACC_W'(model_acc) || ovf_col !== model_ovf) begin
      failures++;
      $display("FAIL %s: acc=%0d/%0d ovf=%0d/%0d expected acc=%0d ovf=%0d",
               what, acc_blk, acc_col, ovf_blk, ovf_col, model_acc, model_ovf);
    end
  endtask

  initial begin
    model_acc = 0;
    model_ovf = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    compare("reset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      a   = 4'($urandom);
      b   = 4'($urandom);
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 23) == 0;
      @(posedge clk);
      if (clr) begin
        model_acc = 0;
        model_ovf = 1'b0;
        n_clr++;
      end else if (en) begin
        model_acc = model_acc + int'(a) * int'(b);
        if (model_acc >= (1 << ACC_W)) begin
          model_acc -= (1 << ACC_W);
          model_ovf = 1'b1;
          n_ovf++;
        end
        n_acc++;
      end else begin
        n_hold++;
      end
      #1;
      compare("cycle");
    end
    // Asynchronous reset in mid-cycle empties the accumulator.
    @(negedge clk);
    en = 1'b1;
    a = 4'd15;
    b = 4'd15;
    @(posedge clk);
    #2;
    rst_n = 1'b0;
    #1;
    model_acc = 0;
    model_ovf = 1'b0;
    compare("async reset");
    rst_n = 1'b1;
    $display("events: accumulate=%0d hold=%0d clear=%0d overflow=%0d", n_acc, n_hold, n_clr, n_ovf);
    checks += 4;
    if (n_acc == 0)  failures++;
    if (n_hold == 0) failures++;
    if (n_clr == 0)  failures++;
    if (n_ovf == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
