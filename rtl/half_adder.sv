// half_adder: sum and carry of two bits (the cell "h" of the column-form
// Vedic multiplier). sum = a xor b, carry = a and b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
