// divider: unsigned W-bit divider, the "Divisor" of the ALU's arithmetic
// unit.
//
// Restoring long division, unrolled into W combinational stages: each
// stage shifts the next dividend bit into the partial remainder, tries to
// subtract the divisor, and keeps the difference (quotient bit 1) when it
// does not go negative. The design only names a divisor; the algorithm is
// this design's choice.
//
// Interface: q = a / b, r = a % b. With b = 0 every trial subtraction
// succeeds, so q is all ones and r = a; div_by_zero flags that case.
// Timing: combinational, W subtract-and-select stages.
module divider #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q,
  output logic [W-1:0] r,
  output logic         div_by_zero
);
  logic [W:0] rem;    // partial remainder, one bit wider for the shift
  logic [W:0] trial;

  always_comb begin
    rem = '0;
    q   = '0;
    for (int i = W - 1; i >= 0; i--) begin
      rem   = {rem[W-1:0], a[i]};
      trial = rem - {1'b0, b};
      if (!trial[W]) begin
        rem  = trial;
        q[i] = 1'b1;
      end
    end
    r           = rem[W-1:0];
    div_by_zero = (b == '0);
  end
endmodule
