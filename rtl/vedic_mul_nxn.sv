// vedic_mul_nxn: NxN Vedic multiplier in block form, for any N that is a
// power of two (N >= 2).
//
// The 4x4 block-form multiplier is the same construction applied once:
// split each operand into halves of H = N/2 bits, form the four half
// products with (N/2)x(N/2) Vedic multipliers, and combine them as
//   p = q0 + 2^H * (q1 + q2) + 2^N * q3.
// An N-bit ripple adder adds the crosswise products q1 + q2 (N+1 bits); a
// 3H-bit ripple adder adds that sum to {q3, q0[N-1:H]} and gives p[2N-1:H];
// p[H-1:0] is q0[H-1:0]. N = 4 is the design's own 4x4 block
// (vedic_mul4x4, with fa4_c and fa6_c) and N = 2 the 2x2 Urdhva cell;
// larger N recurse down to them. Scaling the 4x4 structure to NxN this way
// is this design's reading of the design's "NxN arithmetic modules".
// Timing: combinational; the depth grows by two ripple adders per doubling
// of N.
module vedic_mul_nxn #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_2x2
    vedic_mul2x2 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 4) begin : g_4x4
    vedic_mul4x4 u_mul (.a(a), .b(b), .p(p));
  end else if (N > 4 && (N & (N - 1)) == 0) begin : g_split
    localparam int unsigned H = N / 2;
    logic [N-1:0]   q0, q1, q2, q3;
    logic [N-1:0]   cross_s;
    logic           cross_c;
    logic [3*H-1:0] hi_s;
    logic           hi_c;   // always 0: p[2N-1:H] holds the whole sum

    vedic_mul_nxn #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mul_nxn #(.N(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
    vedic_mul_nxn #(.N(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
    vedic_mul_nxn #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));

    fa_c #(.W(N)) u_cross_add (
      .a   (q1),
      .b   (q2),
      .cin (1'b0),
      .s   (cross_s),
      .cout(cross_c)
    );

    fa_c #(.W(3 * H)) u_high_add (
      .a   ((3 * H)'({cross_c, cross_s})),
      .b   ({q3, q0[N-1:H]}),
      .cin (1'b0),
      .s   (hi_s),
      .cout(hi_c)
    );

    assign p = {hi_s, q0[H-1:0]};
  end else begin : g_bad_size
    $error("vedic_mul_nxn: N must be a power of two, at least 2");
  end
endmodule
