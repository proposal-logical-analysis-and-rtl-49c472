// t_fff: T fuzzy flip-flop.
//
// Next state from the toggle input T and the current state Q:
//   minterm form  Q(t+1) = (T t Qn) s (Tn t Q)
//   maxterm form  Q(t+1) = (T s Q) t (Tn s Qn)
// where t and s are the t-norm and s-norm of the operation system OPSYS and
// xn = ONE - x is the fuzzy negation. Both forms and the four operation
// systems are the document's; its circuits use the minterm form, which is the
// default here. Under the max-min system the two forms are equal; under the
// others the minterm form never exceeds the maxterm form.
//
// Values are W-bit codes, 0 = false and ONE = true (document: 4 bits with
// ONE = 15, 5 bits with ONE = 16 for the algebraic system). The next-state
// logic is combinational; the state register loads it on every rising clock
// edge. An asynchronous active-low reset clears Q to 0 (this design's choice).
module t_fff
  import fuzzy_pkg::*;
#(
  parameter op_sys_e     OPSYS = OPS_LOGICAL,
  parameter t_form_e     FORM  = T_MINTERM,
  parameter int unsigned W     = FF_W,
  parameter int unsigned ONE   = FF_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] t,
  output logic [W-1:0] q
);
  logic [W-1:0] t_n, q_n;
  logic [W-1:0] term_a, term_b, q_next;

  assign t_n = W'(ONE) - t;
  assign q_n = W'(ONE) - q;

  generate
    if (FORM == T_MINTERM) begin : g_min
      fuzzy_tnorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_ta (.a(t),   .b(q_n), .y(term_a));
      fuzzy_tnorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_tb (.a(t_n), .b(q),   .y(term_b));
      fuzzy_snorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_s  (.a(term_a), .b(term_b), .y(q_next));
    end else begin : g_max
      fuzzy_snorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_sa (.a(t),   .b(q),   .y(term_a));
      fuzzy_snorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_sb (.a(t_n), .b(q_n), .y(term_b));
      fuzzy_tnorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_t  (.a(term_a), .b(term_b), .y(q_next));
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end
endmodule
