// mac_unit: multiply-accumulate unit built on the 4x4 Vedic multiplier.
//
// Each clock edge with en high adds a * b to the accumulator; clr empties
// the accumulator and the overflow flag and takes priority over en. ovf is
// sticky: it is set when an accumulation wraps past 2^ACC_W and stays set
// until clr or reset. The accumulator width, the enable and clear controls
// and the overflow flag are this design's choices; the design only names
// a MAC unit.
//
// W is the operand width (4 by default); MUL_COLUMN needs W = 4.
//
// Timing: one accumulation per clock; acc shows the new sum one cycle after
// en is sampled. The multiplier is combinational ahead of the register.
// Reset: rst_n, active low, asynchronous.
module mac_unit
  import vedic_pkg::*;
#(
  parameter int unsigned W        = ALU_W,
  parameter int unsigned ACC_W    = 16,
  parameter mul_arch_e   MUL_ARCH = MUL_BLOCK
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [W-1:0]     a,
  input  logic [W-1:0]     b,
  output logic [ACC_W-1:0] acc,
  output logic             ovf
);
  logic [2*W-1:0] prod;
  logic [ACC_W:0] next_sum;

  if (MUL_ARCH == MUL_COLUMN && W == 4) begin : g_mul_column
    vedic_calculator u_mul (.a(a), .b(b), .p(prod));
  end else if (MUL_ARCH == MUL_BLOCK) begin : g_mul_block
    vedic_mul_nxn #(.N(W)) u_mul (.a(a), .b(b), .p(prod));
  end else begin : g_bad_arch
    $error("mac_unit: the column-form multiplier exists only for W = 4");
  end

  assign next_sum = {1'b0, acc} + (ACC_W + 1)'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (clr) begin
      acc <= '0;
      ovf <= 1'b0;
    end else if (en) begin
      acc <= next_sum[ACC_W-1:0];
      ovf <= ovf | next_sum[ACC_W];
    end
  end
endmodule
