// vedic_calculator: 4x4 Vedic multiplier in column form, the stand-alone
// "Vedic calculator" circuit that was laid out as a full-custom cell.
//
// The Urdhva Tiryagbhyam sutra forms every column of the product at once
// ("vertically and crosswise"). tgenerator gives the partial products of
// each column; each column is then counted, not added with a rippling
// carry: a column count's bit 0 is the product bit, bit 1 goes to the next
// column and bit 2 to the column after. This is a carry-save scheme: no
// carry travels along the row.
//
//   column (weight)   inputs                               counter
//   0 (1)             a0b0                                 none, p0
//   1 (2)             t1 t2                                h
//   2 (4)             t3 t4 t5, carry of col 1             fa5
//   3 (8)             t6..t9, v1 of col 2                  fa5
//   4 (16)            t10..t12, v2 of col 2, v1 of col 3   fa5
//   5 (32)            t13 t14, v2 of col 3, v1 of col 4    fa5
//   6 (64)            t15, v2 of col 4, v1 of col 5        two h
//   7 (128)           v2 of col 5 and the two h carries    exclusive-or
//
// The product never exceeds 15 * 15 = 225, so at most one of the three
// weight-128 bits is set and an exclusive-or of them is exact.
// The blocks tgenerator, fa5 and h, the pin names a3..a0, b3..b0,
// p7..p0 and the separate a0b0 product follow the design's schematic; the
// assignment of signals to counter inputs is this design's own.
// Timing: combinational; the longest path is AND, four counters, two half
// adders and the final exclusive-or.
module vedic_calculator (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [15:1] t;
  logic k1;                  // carry of column 1
  logic c2a, c2b;            // v1, v2 of column 2
  logic c3a, c3b;
  logic c4a, c4b;
  logic c5a, c5b;
  logic s6, d6, e6;          // column 6 partial sum and its carries

  tgenerator u_tgenerator (.a(a), .b(b), .t(t));

  assign p[0] = a[0] & b[0];

  half_adder u_h1 (.a(t[1]), .b(t[2]), .sum(p[1]), .carry(k1));

  fa5 u_fa5_c2 (.in1(t[3]),  .in2(t[4]),  .in3(t[5]),  .in4(k1),   .in5(1'b0),
                .y0(p[2]), .v1(c2a), .v2(c2b));
  fa5 u_fa5_c3 (.in1(t[6]),  .in2(t[7]),  .in3(t[8]),  .in4(t[9]), .in5(c2a),
                .y0(p[3]), .v1(c3a), .v2(c3b));
  fa5 u_fa5_c4 (.in1(t[10]), .in2(t[11]), .in3(t[12]), .in4(c2b),  .in5(c3a),
                .y0(p[4]), .v1(c4a), .v2(c4b));
  fa5 u_fa5_c5 (.in1(t[13]), .in2(t[14]), .in3(c3b),   .in4(c4a),  .in5(1'b0),
                .y0(p[5]), .v1(c5a), .v2(c5b));

  half_adder u_h6a (.a(t[15]), .b(c4b), .sum(s6),   .carry(d6));
  half_adder u_h6b (.a(s6),    .b(c5a), .sum(p[6]), .carry(e6));

  assign p[7] = c5b ^ d6 ^ e6;
endmodule
