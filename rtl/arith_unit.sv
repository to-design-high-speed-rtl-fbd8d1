// arith_unit: the arithmetic unit of the Vedic ALU: adder, subtractor,
// Vedic multiplier and divisor working on the same operands, with the
// selected result driven out.
//
// All four units compute in parallel; sel (vedic_pkg::arith_sel_e) picks
// one. Result format (this design's choice):
//   ADD  y = {0..., carry, a+b}
//   SUB  y = {0..., borrow, (a-b) mod 2^W}, borrow = 1 when a < b
//   MUL  y = a * b, from the Vedic multiplier
//   DIV  y = {remainder, quotient}; div_by_zero set when b = 0
// W is the operand width (4 by default); y is 2W bits. MUL_ARCH picks the
// multiplier form: MUL_BLOCK (block form, four half-size Vedic multipliers
// and two ripple adders, any power-of-two W) or MUL_COLUMN (the
// column-counter form, W = 4 only).
// Timing: combinational.
module arith_unit
  import vedic_pkg::*;
#(
  parameter int unsigned W        = ALU_W,
  parameter mul_arch_e   MUL_ARCH = MUL_BLOCK
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  arith_sel_e     sel,
  output logic [2*W-1:0] y,
  output logic           div_by_zero
);
  logic [W-1:0]   as_s;
  logic           as_cout;
  logic [2*W-1:0] prod;
  logic [W-1:0]   quo, rem;
  logic           dbz;

  add_sub #(.W(W)) u_add_sub (
    .a   (a),
    .b   (b),
    .sub (sel == ARITH_SUB),
    .s   (as_s),
    .cout(as_cout)
  );

  if (MUL_ARCH == MUL_COLUMN && W == 4) begin : g_mul_column
    vedic_calculator u_mul (.a(a), .b(b), .p(prod));
  end else if (MUL_ARCH == MUL_BLOCK) begin : g_mul_block
    vedic_mul_nxn #(.N(W)) u_mul (.a(a), .b(b), .p(prod));
  end else begin : g_bad_arch
    $error("arith_unit: the column-form multiplier exists only for W = 4");
  end

  divider #(.W(W)) u_divider (
    .a          (a),
    .b          (b),
    .q          (quo),
    .r          (rem),
    .div_by_zero(dbz)
  );

  always_comb begin
    y           = '0;
    div_by_zero = 1'b0;
    unique case (sel)
      ARITH_ADD: y = (2 * W)'({as_cout, as_s});
      ARITH_SUB: y = (2 * W)'({~as_cout, as_s});
      ARITH_MUL: y = prod;
      ARITH_DIV: begin
        y           = {rem, quo};
        div_by_zero = dbz;
      end
      default: ;
    endcase
  end
endmodule
