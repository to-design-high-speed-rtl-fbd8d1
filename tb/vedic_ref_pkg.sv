// vedic_ref_pkg: reference model of the Vedic ALU for the testbenches,
// written with plain integer arithmetic and independent of the RTL
// structure. alu_ref returns the expected result, division-by-zero flag
// and op_valid for one operation at operand width w (up to 15 bits).
package vedic_ref_pkg;

  typedef struct {
    logic [31:0] result;
    logic        dbz;
    logic        valid;
  } alu_exp_t;

  function automatic alu_exp_t alu_ref(int op, int a, int b, int w = 4);
    alu_exp_t e;
    int mask;
    mask = (1 << w) - 1;
    e.result = '0;
    e.dbz    = 1'b0;
    e.valid  = 1'b1;
    case (op)
      0: e.result = 32'(a + b);                                  // carry in bit w
      1: e.result = 32'(((a - b) & mask) | ((a < b) ? (1 << w) : 0)); // borrow in bit w
      2: e.result = 32'(a * b);
      3: begin
        if (b == 0) begin
          e.result = 32'((a << w) | mask);
          e.dbz    = 1'b1;
        end else begin
          e.result = 32'(((a % b) << w) | (a / b));
        end
      end
      8:  e.result = 32'(a & b);
      9:  e.result = 32'(a | b);
      10: e.result = 32'(~(a | b) & mask);
      11: e.result = 32'(a);
      12: e.result = 32'(~(a & b) & mask);
      13: e.result = 32'(a ^ b);
      14: e.result = 32'(~(a ^ b) & mask);
      15: e.result = 32'(~a & mask);
      default: e.valid = 1'b0;
    endcase
    return e;
  endfunction

endpackage
