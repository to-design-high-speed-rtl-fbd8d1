// tgenerator: partial-product generator of the column-form Vedic
// calculator.
//
// Forms the fifteen bit products a[i] & b[j] other than a0 & b0 (that one
// is p0 and is formed outside), numbered t1..t15 column by column so that
// each column of the Urdhva Tiryagbhyam multiplication is a contiguous
// group: weight 2: t1..t2, weight 4: t3..t5, weight 8: t6..t9,
// weight 16: t10..t12, weight 32: t13..t14, weight 64: t15. Inside a
// column the product with the lower a index comes first. The block and its
// fifteen outputs follow the design's schematic; the numbering is this
// design's choice. Timing: combinational, one AND delay.
module tgenerator (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [15:1] t
);
  always_comb begin
    int k;
    k = 1;
    // Column w holds the products a[i] & b[w-i].
    for (int w = 1; w <= 6; w++) begin
      for (int i = 0; i <= 3; i++) begin
        if (w - i >= 0 && w - i <= 3) begin
          t[k] = a[i] & b[w-i];
          k++;
        end
      end
    end
  end
endmodule
