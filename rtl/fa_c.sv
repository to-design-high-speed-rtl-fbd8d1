// fa_c: W-bit ripple-carry adder built from full-adder cells.
//
// The Vedic calculator uses it at two widths: fa4_c (W = 4) adds the two
// crosswise 2x2 products and fa6_c (W = 6) folds that sum into the high and
// low products. The ALU's adder/subtractor uses it at the ALU width. The
// design names the 4- and 6-bit full adder circuits; building them as a
// plain carry chain is this design's choice.
//
// Interface: s = (a + b + cin) mod 2^W, cout = carry out of bit W-1.
// Timing: combinational, W full-adder delays from cin to cout.
module fa_c #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
