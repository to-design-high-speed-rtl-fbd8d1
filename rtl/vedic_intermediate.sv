// vedic_intermediate: the four 2x2 Vedic multipliers of the block-form 4x4
// Vedic multiplier, working on the operand halves in parallel.
//
// q0 = a[1:0]*b[1:0], q1 = a[3:2]*b[1:0], q2 = a[1:0]*b[3:2],
// q3 = a[3:2]*b[3:2], packed as q = {q3, q2, q1, q0}. The grouping into
// one block follows the design's schematic; the output order is this
// design's choice. Timing: combinational, one 2x2 multiplier delay.
module vedic_intermediate (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [15:0] q
);
  vedic_mul2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q[3:0]));
  vedic_mul2x2 u_q1 (.a(a[3:2]), .b(b[1:0]), .p(q[7:4]));
  vedic_mul2x2 u_q2 (.a(a[1:0]), .b(b[3:2]), .p(q[11:8]));
  vedic_mul2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q[15:12]));
endmodule
