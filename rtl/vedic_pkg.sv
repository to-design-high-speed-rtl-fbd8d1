// vedic_pkg: types and constants shared by the 4-bit Vedic ALU.
//
// ALU_W is the default operand width of the ALU (four bits, as the design
// is a 4-bit ALU); the ALU, MAC and top take it as their W parameter. alu_op_e is the operation code set by the operation switches:
// bit 3 picks the unit (0 arithmetic, 1 logical) and bits 2..0 pick the
// function inside it. The twelve functions are the ones drawn in the ALU
// block diagram; the numeric encoding is this design's own choice. Codes
// 4 to 7 are undefined and make the ALU output zero with op_valid low.
// mul_arch_e chooses which of the two 4x4 Vedic multiplier forms an ALU or
// MAC instance uses.
package vedic_pkg;

  localparam int unsigned ALU_W = 4;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,
    OP_SUB  = 4'd1,
    OP_MUL  = 4'd2,
    OP_DIV  = 4'd3,
    OP_AND  = 4'd8,
    OP_OR   = 4'd9,
    OP_NOR  = 4'd10,
    OP_BUF  = 4'd11,
    OP_NAND = 4'd12,
    OP_XOR  = 4'd13,
    OP_XNOR = 4'd14,
    OP_INV  = 4'd15
  } alu_op_e;

  // Select codes inside the arithmetic unit (op[1:0] when op[3:2] = 2'b00).
  typedef enum logic [1:0] {
    ARITH_ADD = 2'd0,
    ARITH_SUB = 2'd1,
    ARITH_MUL = 2'd2,
    ARITH_DIV = 2'd3
  } arith_sel_e;

  // Select codes inside the logical unit (op[2:0] when op[3] = 1).
  typedef enum logic [2:0] {
    LOGIC_AND  = 3'd0,
    LOGIC_OR   = 3'd1,
    LOGIC_NOR  = 3'd2,
    LOGIC_BUF  = 3'd3,
    LOGIC_NAND = 3'd4,
    LOGIC_XOR  = 3'd5,
    LOGIC_XNOR = 3'd6,
    LOGIC_INV  = 3'd7
  } logic_sel_e;

  // Multiplier form: MUL_BLOCK builds the 4x4 product from four 2x2 Vedic
  // multipliers and two ripple adders; MUL_COLUMN is the column-counter
  // form of the stand-alone Vedic calculator.
  typedef enum logic {
    MUL_BLOCK  = 1'b0,
    MUL_COLUMN = 1'b1
  } mul_arch_e;

endpackage
