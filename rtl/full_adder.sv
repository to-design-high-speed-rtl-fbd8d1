// full_adder: one-bit full adder cell, the building block of the ripple
// adders (fa_c) and of the five-input column counter (fa5).
// s = a xor b xor cin, cout = majority(a, b, cin). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
