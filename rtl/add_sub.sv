// add_sub: W-bit adder/subtractor, the adder and subtractor of the ALU's
// arithmetic unit sharing one carry chain.
//
// With sub = 0 it computes a + b; with sub = 1 it computes a + ~b + 1,
// the two's-complement difference a - b. cout is the carry out of the
// chain: for an addition it is the carry, for a subtraction it is 1 when
// no borrow occurred (a >= b). The design names an adder/subtractor; the
// inverted-operand construction on a ripple adder is this design's choice.
// Timing: combinational.
module add_sub #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W-1:0] b_eff;

  assign b_eff = sub ? ~b : b;

  fa_c #(.W(W)) u_adder (
    .a   (a),
    .b   (b_eff),
    .cin (sub),
    .s   (s),
    .cout(cout)
  );
endmodule
