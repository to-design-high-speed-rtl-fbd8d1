// vedic_alu_top: the complete design: the 4-bit Vedic ALU, a MAC unit
// and the stand-alone column-form Vedic calculator, side by side.
//
// sw_a, sw_b and sw_op stand for the board's toggle switches and
// alu_result for the value sent to the board's display; the display driver
// itself is not part of this RTL. The ALU (block-form Vedic multiplier) is
// combinational from switches to result. The MAC unit shares the switch
// operands and accumulates sw_a * sw_b on each clock with mac_en high;
// mac_clr empties it. The Vedic calculator is a separate multiplier with
// its own operand pins calc_a, calc_b and product calc_p, as it was a
// separate full-custom circuit. Joining the three in one top, and the MAC
// sharing the switches, is this design's choice.
//
// W is the ALU and MAC operand width, 4 by default as in the design; the
// calculator is 4x4 by construction.
//
// Timing: alu_result and calc_p are combinational; mac_acc and mac_ovf
// change on the rising edge of clk. rst_n is an active-low asynchronous
// reset of the MAC, the only state in the design.
module vedic_alu_top
  import vedic_pkg::*;
#(
  parameter int unsigned W     = ALU_W,
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     sw_a,
  input  logic [W-1:0]     sw_b,
  input  alu_op_e          sw_op,
  input  logic             mac_en,
  input  logic             mac_clr,
  output logic [2*W-1:0]   alu_result,
  output logic             alu_div_by_zero,
  output logic             alu_op_valid,
  output logic [ACC_W-1:0] mac_acc,
  output logic             mac_ovf,
  input  logic [3:0]       calc_a,
  input  logic [3:0]       calc_b,
  output logic [7:0]       calc_p
);
  vedic_alu #(.W(W), .MUL_ARCH(MUL_BLOCK)) u_alu (
    .a          (sw_a),
    .b          (sw_b),
    .op         (sw_op),
    .result     (alu_result),
    .div_by_zero(alu_div_by_zero),
    .op_valid   (alu_op_valid)
  );

  mac_unit #(.W(W), .ACC_W(ACC_W), .MUL_ARCH(MUL_BLOCK)) u_mac (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (mac_clr),
    .en   (mac_en),
    .a    (sw_a),
    .b    (sw_b),
    .acc  (mac_acc),
    .ovf  (mac_ovf)
  );

  vedic_calculator u_calculator (
    .a(calc_a),
    .b(calc_b),
    .p(calc_p)
  );
endmodule
