// tb_vedic_alu_top: end-to-end self-checking test of the whole design at
// its default parameters (16-bit MAC accumulator).
//
// Phase 1 sets the switches to every operation code and every operand pair
// (4096 cases) and compares the ALU outputs with the integer reference
// model; at the same time the Vedic calculator pins get every operand pair
// in turn and its product is compared with a * b. Phase 2 drives the MAC
// from the same switches for 3000 clocks with random enables and clears,
// comparing acc and ovf after each edge with a model, then holds the
// largest product until the 16-bit accumulator wraps. Every mechanism
// of the design is counted: each of the twelve operations, undefined
// codes, addition carry, subtraction borrow, division by zero, MAC
// accumulate, hold, clear and overflow; one that never happened is a
// failure. A cycle watchdog ends a hung run with a failure.
module tb_vedic_alu_top;
  import vedic_pkg::*;
  import vedic_ref_pkg::*;
  localparam int unsigned ACC_W = 16;
  int checks = 0, failures = 0;
  int n_op [16];
  int n_invalid = 0, n_carry = 0, n_borrow = 0, n_dbz = 0, n_calc = 0;
  int n_acc = 0, n_hold = 0, n_clr = 0, n_ovf = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] sw_a = '0, sw_b = '0, calc_a = '0, calc_b = '0;
  alu_op_e sw_op = OP_ADD;
  logic mac_en = 1'b0, mac_clr = 1'b0;
  logic [7:0] alu_result, calc_p;
  logic alu_div_by_zero, alu_op_valid, mac_ovf;
  logic [ACC_W-1:0] mac_acc;
  alu_exp_t e;
  int model_acc;
  logic model_ovf;

  vedic_alu_top dut (
    .clk(clk), .rst_n(rst_n), .sw_a(sw_a), .sw_b(sw_b), .sw_op(sw_op),
    .mac_en(mac_en), .mac_clr(mac_clr), .alu_result(alu_result),
    .alu_div_by_zero(alu_div_by_zero), .alu_op_valid(alu_op_valid),
    .mac_acc(mac_acc), .mac_ovf(mac_ovf),
    .calc_a(calc_a), .calc_b(calc_b), .calc_p(calc_p));

  always #5 clk = ~clk;

  task automatic mac_compare();
    checks++;
    if (mac_acc !== ACC_W'(model_acc) || mac_ovf !== model_ovf) begin
      failures++;
      $display("FAIL MAC acc=%0d ovf=%0d expected acc=%0d ovf=%0d",
               mac_acc, mac_ovf, model_acc, model_ovf);
    end
  endtask

  task automatic mac_step(logic en, logic clr);
    @(negedge clk);
    mac_en  = en;
    mac_clr = clr;
    @(posedge clk);
    if (clr) begin
      model_acc = 0;
      model_ovf = 1'b0;
      n_clr++;
    end else if (en) begin
      model_acc += int'(sw_a) * int'(sw_b);
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
    mac_compare();
  endtask

  initial begin
    foreach (n_op[k]) n_op[k] = 0;
    model_acc = 0;
    model_ovf = 1'b0;

    // Phase 1: ALU and calculator, all combinations.
    for (int i = 0; i < 4096; i++) begin
      sw_op = alu_op_e'(i[11:8]);
      {sw_a, sw_b} = i[7:0];
      {calc_a, calc_b} = 8'(i * 37 + 11);   // walks all 256 pairs 16 times
      #1;
      e = alu_ref(int'(i[11:8]), int'(sw_a), int'(sw_b));
      checks++;
      if (alu_result !== e.result || alu_div_by_zero !== e.dbz || alu_op_valid !== e.valid) begin
        failures++;
        $display("FAIL ALU op=%0d a=%0d b=%0d result=%h dbz=%0d valid=%0d expected %h %0d %0d",
                 i[11:8], sw_a, sw_b, alu_result, alu_div_by_zero, alu_op_valid,
                 e.result, e.dbz, e.valid);
      end
      if (alu_op_valid) n_op[i[11:8]]++;
      else n_invalid++;
      if (sw_op == OP_ADD && alu_result[4]) n_carry++;
      if (sw_op == OP_SUB && alu_result[4]) n_borrow++;
      if (alu_div_by_zero) n_dbz++;
      checks++;
      if (calc_p !== 8'(int'(calc_a) * int'(calc_b))) begin
        failures++;
        $display("FAIL calculator %0d * %0d got %0d", calc_a, calc_b, calc_p);
      end
      n_calc++;
    end

    // Phase 2: MAC after reset.
    @(negedge clk);
    #1;
    mac_compare();                 // still in reset: empty
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      sw_a = 4'($urandom);
      sw_b = 4'($urandom);
      mac_step(($urandom % 4) != 0, ($urandom % 97) == 0);
    end
    // Largest product until the accumulator wraps (at most 292 steps).
    sw_a = 4'd15;
    sw_b = 4'd15;
    mac_step(1'b0, 1'b1);
    for (int k = 0; k < 292; k++) mac_step(1'b1, 1'b0);

    $display("events: ops add=%0d sub=%0d mul=%0d div=%0d and=%0d or=%0d nor=%0d buf=%0d nand=%0d xor=%0d xnor=%0d inv=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[8], n_op[9], n_op[10], n_op[11],
             n_op[12], n_op[13], n_op[14], n_op[15]);
    $display("events: invalid=%0d carry=%0d borrow=%0d div_by_zero=%0d calculator=%0d",
             n_invalid, n_carry, n_borrow, n_dbz, n_calc);
    $display("events: mac accumulate=%0d hold=%0d clear=%0d overflow=%0d",
             n_acc, n_hold, n_clr, n_ovf);
    for (int k = 0; k < 16; k++) begin
      if (k >= 4 && k <= 7) continue;
      checks++;
      if (n_op[k] == 0) failures++;
    end
    checks += 9;
    if (n_invalid == 0) failures++;
    if (n_carry == 0)   failures++;
    if (n_borrow == 0)  failures++;
    if (n_dbz == 0)     failures++;
    if (n_calc == 0)    failures++;
    if (n_acc == 0)     failures++;
    if (n_hold == 0)    failures++;
    if (n_clr == 0)     failures++;
    if (n_ovf == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
