// vedic_mul2x2: 2x2 multiplier by the Urdhva Tiryagbhyam ("vertically and
// crosswise") sutra, the smallest block of the block-form Vedic multiplier.
//
// The three columns of the product are formed at once: vertical a0b0 gives
// p0; the crosswise pair a1b0 + a0b1 goes through a half adder to give p1
// and a carry; vertical a1b1 plus that carry goes through a second half
// adder to give p2 and p3. The design names the block; the two-half-adder
// form is the customary one for this sutra and is this design's reading.
// Timing: combinational, one AND and two half-adder delays.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a1b0, a0b1, a1b1, c1;

  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];
  assign p[0] = a[0] & b[0];

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .sum(p[1]), .carry(c1));
  half_adder u_ha_top   (.a(a1b1), .b(c1),   .sum(p[2]), .carry(p[3]));
endmodule
