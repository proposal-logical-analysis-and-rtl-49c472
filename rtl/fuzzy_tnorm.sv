// fuzzy_tnorm: combinational fuzzy t-norm (fuzzy AND) of two codes a, b.
//
// Values are unsigned codes with 0 = false and ONE = true. OPSYS selects the
// operation system of the document:
//   OPS_LOGICAL    min(a, b)                 - one magnitude comparator
//   OPS_ALGEBRAIC  a*b/ONE                   - one multiplier
//   OPS_BOUNDED    max(0, a + b - ONE)       - adder and comparator
//   OPS_DRASTIC    a if b = ONE, b if a = ONE, else 0 - compares with constants
// The algebraic product is truncated to the code below (this design's choice;
// with ONE a power of two the division is a shift). The result never exceeds
// ONE when both inputs are at most ONE.
module fuzzy_tnorm
  import fuzzy_pkg::*;
#(
  parameter op_sys_e     OPSYS = OPS_LOGICAL,
  parameter int unsigned W     = FF_W,
  parameter int unsigned ONE   = FF_ONE
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  localparam logic [W:0]     ONE_S = (W+1)'(ONE);
  localparam logic [2*W-1:0] ONE_P = (2*W)'(ONE);

  logic [W:0]     sum;
  logic [2*W-1:0] prod;
  logic [W-1:0]   prod_q;

  assign sum    = {1'b0, a} + {1'b0, b};
  assign prod   = (2*W)'(a) * (2*W)'(b);
  assign prod_q = W'(prod / ONE_P);

  always_comb begin
    unique case (OPSYS)
      OPS_LOGICAL:   y = (a < b) ? a : b;
      OPS_ALGEBRAIC: y = prod_q;
      OPS_BOUNDED:   y = (sum > ONE_S) ? W'(sum - ONE_S) : '0;
      OPS_DRASTIC: begin
        if (b == W'(ONE))      y = a;
        else if (a == W'(ONE)) y = b;
        else                   y = '0;
      end
      default:       y = '0;
    endcase
  end
endmodule
