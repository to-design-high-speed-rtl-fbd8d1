// vedic_mul4x4: 4x4 Vedic multiplier in block form, the multiplier of the
// FPGA ALU.
//
// Each operand is split into 2-bit halves and the four half products come
// from 2x2 Urdhva multipliers (vedic_intermediate). Written out,
//   p = q0 + (q1 + q2) * 4 + q3 * 16.
// A 4-bit ripple adder (fa4_c) adds the two crosswise products q1 + q2
// into five bits. A 6-bit ripple adder (fa6_c) adds that sum to
// {q3, q0[3:2]}, which is q3 * 4 + q0[3:2], giving p[7:2]; p[1:0] is
// q0[1:0] unchanged. The largest sum is 18 + 39 = 57, so fa6_c never
// carries out. The blocks and the two adder widths follow the design;
// the adder wiring is derived from the formula above.
// Timing: combinational: 2x2 multiplier, then 4-bit adder, then 6-bit adder.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [15:0] q;
  logic [3:0]  q0, q1, q2, q3;
  logic [3:0]  cross_s;
  logic        cross_c;
  logic [5:0]  hi_s;
  logic        hi_c;   // always 0: the upper sum stays below 64

  vedic_intermediate u_intermediate (.a(a), .b(b), .q(q));

  assign {q3, q2, q1, q0} = q;

  fa_c #(.W(4)) u_fa4_c (
    .a   (q1),
    .b   (q2),
    .cin (1'b0),
    .s   (cross_s),
    .cout(cross_c)
  );

  fa_c #(.W(6)) u_fa6_c (
    .a   ({1'b0, cross_c, cross_s}),
    .b   ({q3, q0[3:2]}),
    .cin (1'b0),
    .s   (hi_s),
    .cout(hi_c)
  );

  assign p = {hi_s, q0[1:0]};
endmodule
