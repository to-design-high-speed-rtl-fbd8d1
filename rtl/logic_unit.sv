// logic_unit: the logical unit of the Vedic ALU.
//
// Applies one of eight bitwise functions to the W-bit operands: AND, OR,
// NOR, buffer, NAND, XOR, XNOR and inverter, the set drawn in the ALU block
// diagram. Buffer and inverter take one operand; here they act on a. The
// select encoding (vedic_pkg::logic_sel_e) is this design's choice.
// Timing: combinational.
module logic_unit
  import vedic_pkg::*;
#(
  parameter int unsigned W = ALU_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic_sel_e   sel,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (sel)
      LOGIC_AND:  y = a & b;
      LOGIC_OR:   y = a | b;
      LOGIC_NOR:  y = ~(a | b);
      LOGIC_BUF:  y = a;
      LOGIC_NAND: y = ~(a & b);
      LOGIC_XOR:  y = a ^ b;
      LOGIC_XNOR: y = ~(a ^ b);
      LOGIC_INV:  y = ~a;
      default:    y = '0;
    endcase
  end
endmodule
