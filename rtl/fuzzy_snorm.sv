// fuzzy_snorm: combinational fuzzy s-norm (fuzzy OR) of two codes a, b.
//
// Values are unsigned codes with 0 = false and ONE = true. OPSYS selects the
// operation system of the document:
//   OPS_LOGICAL    max(a, b)                 - one magnitude comparator
//   OPS_ALGEBRAIC  a + b - a*b/ONE           - multiplier and adder
//   OPS_BOUNDED    min(ONE, a + b)           - adder and comparator
//   OPS_DRASTIC    a if b = 0, b if a = 0, else ONE - compares with constants
// The product inside the algebraic sum is truncated (this design's choice), so
// the algebraic sum rounds up; it still never exceeds ONE for inputs at most
// ONE, because a + b - ONE <= floor(a*b/ONE).
module fuzzy_snorm
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
  logic [W:0]     prod_q;
  logic [W-1:0]   alg;

  assign sum    = {1'b0, a} + {1'b0, b};
  assign prod   = (2*W)'(a) * (2*W)'(b);
  assign prod_q = (W+1)'(prod / ONE_P);
  assign alg    = W'(sum - prod_q);

  always_comb begin
    unique case (OPSYS)
      OPS_LOGICAL:   y = (a > b) ? a : b;
      OPS_ALGEBRAIC: y = alg;
      OPS_BOUNDED:   y = (sum > ONE_S) ? W'(ONE) : sum[W-1:0];
      OPS_DRASTIC: begin
        if (b == '0)      y = a;
        else if (a == '0) y = b;
        else              y = W'(ONE);
      end
      default:       y = '0;
    endcase
  end
endmodule
