// fa5: five-input column counter of the column-form Vedic calculator.
//
// Counts the ones among in1..in5 and gives the count as {v2, v1, y0}: y0
// stays in the column, v1 is carried to the next column and v2 to the one
// after. Inside, a full adder compresses in1..in3, a second full adder
// adds that sum bit to in4 and in5 (giving y0), and a half adder adds the
// two weight-2 carries (giving v1 and v2). The block name and its pins
// follow the design's schematic; this construction is this design's own.
// Timing: combinational, two full-adder and one half-adder delays.
module fa5 (
  input  logic in1,
  input  logic in2,
  input  logic in3,
  input  logic in4,
  input  logic in5,
  output logic y0,
  output logic v1,
  output logic v2
);
  logic s1, c1, c2;

  full_adder u_fa_a (.a(in1), .b(in2), .cin(in3), .s(s1), .cout(c1));
  full_adder u_fa_b (.a(s1),  .b(in4), .cin(in5), .s(y0), .cout(c2));
  half_adder u_ha   (.a(c1),  .b(c2),  .sum(v1),  .carry(v2));
endmodule
