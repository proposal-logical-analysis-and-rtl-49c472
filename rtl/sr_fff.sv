// sr_fff: SR fuzzy flip-flop.
//
// Next state from the set input S, the reset input R and the state Q:
//   set type    Q(t+1) = S s (Rn t Q)
//   reset type  Q(t+1) = Rn t (S s Q)
// with t, s the t-norm and s-norm of OPSYS and Rn = ONE - R. For binary
// inputs both give set, reset and hold; for S = R = 1 the set type gives 1
// and the reset type 0. In the set type the three operations run one after
// another; in the reset type the negation of R and the s-norm of S and Q run
// side by side, so its path is shorter. Forms, types and operation systems
// follow the document.
//
// Values are W-bit codes, 0 = false and ONE = true (document: 4 bits with
// ONE = 15; 5 bits with ONE = 16 for the algebraic system). The register loads
// the next state on every rising clock edge; the asynchronous active-low
// reset to 0 is this design's choice.
module sr_fff
  import fuzzy_pkg::*;
#(
  parameter op_sys_e     OPSYS  = OPS_LOGICAL,
  parameter sr_type_e    SRTYPE = SR_SET_TYPE,
  parameter int unsigned W      = FF_W,
  parameter int unsigned ONE    = FF_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] s,
  input  logic [W-1:0] r,
  output logic [W-1:0] q
);
  logic [W-1:0] r_n, inner, q_next;

  assign r_n = W'(ONE) - r;

  generate
    if (SRTYPE == SR_SET_TYPE) begin : g_set
      fuzzy_tnorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_t (.a(r_n), .b(q),     .y(inner));
      fuzzy_snorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_s (.a(s),   .b(inner), .y(q_next));
    end else begin : g_reset
      fuzzy_snorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_s (.a(s),   .b(q),     .y(inner));
      fuzzy_tnorm #(.OPSYS(OPSYS), .W(W), .ONE(ONE)) u_t (.a(r_n), .b(inner), .y(q_next));
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end
endmodule
