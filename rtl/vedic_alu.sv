// vedic_alu: 4-bit ALU whose multiplier is a Vedic (Urdhva Tiryagbhyam)
// multiplier.
//
// The arithmetic unit (add, subtract, multiply, divide) and the logical
// unit (AND, OR, NOR, buffer, NAND, XOR, XNOR, inverter) both work on the
// operands all the time; the operation code chooses which result reaches
// the output. op[3] = 0 selects the arithmetic unit with op[1:0], op[3] = 1
// the logical unit with op[2:0] (see vedic_pkg::alu_op_e). Codes 4 to 7
// are undefined: result 0 and op_valid low. Logical results occupy
// result[3:0]. The unit set follows the design's ALU block diagram; the
// encoding and output format are this design's choices. W is the operand
// width, 4 by default (the design's 4-bit ALU); the result has 2W bits.
//
// The ALU has no clock: operands and operation come from switches and the
// result goes straight to a display, so it is a combinational path.
module vedic_alu
  import vedic_pkg::*;
#(
  parameter int unsigned W        = ALU_W,
  parameter mul_arch_e   MUL_ARCH = MUL_BLOCK
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  alu_op_e        op,
  output logic [2*W-1:0] result,
  output logic           div_by_zero,
  output logic           op_valid
);
  logic [2*W-1:0] arith_y;
  logic           arith_dbz;
  logic [W-1:0]   logic_y;

  arith_unit #(.W(W), .MUL_ARCH(MUL_ARCH)) u_arith (
    .a          (a),
    .b          (b),
    .sel        (arith_sel_e'(op[1:0])),
    .y          (arith_y),
    .div_by_zero(arith_dbz)
  );

  logic_unit #(.W(W)) u_logic (
    .a  (a),
    .b  (b),
    .sel(logic_sel_e'(op[2:0])),
    .y  (logic_y)
  );

  always_comb begin
    result      = '0;
    div_by_zero = 1'b0;
    op_valid    = 1'b1;
    if (op[3]) begin
      result = (2 * W)'(logic_y);
    end else if (!op[2]) begin
      result      = arith_y;
      div_by_zero = arith_dbz;
    end else begin
      op_valid = 1'b0;
    end
  end
endmodule
