// fmem_bounded: bounded type fuzzy memory element.
//
// The max-min element extended by three operations, selected by a 3-bit
// control C:
//   C = 0  hold            Q(t+1) = Q(t)
//   C = 1  load            Q(t+1) = I(t)
//   C = 2  minimum         Q(t+1) = Q(t) min I(t)
//   C = 3  maximum         Q(t+1) = Q(t) max I(t)
//   C = 4  negation        Q(t+1) = 1 - Q(t)
//   C = 5  bounded product Q(t+1) = max(0, Q(t) + I(t) - 1)
//   C = 6  bounded sum     Q(t+1) = min(1, Q(t) + I(t))
// These transitions and the 8-bit coding (1 = 1000_0000) are the document's.
// C = 7 is not defined there; here it holds Q. Inside, one W+1-bit adder
// forms Q + I (which may pass 1 for a moment, as the document notes), a
// subtractor forms 1 - Q and the bounded results, and a comparator serves
// min and max.
//
// Timing: I and C are sampled at the rising edge of clk; Q is the register
// output. An asynchronous active-low reset clears Q to 0 (this design's
// choice).
module fmem_bounded
  import fuzzy_pkg::*;
#(
  parameter int unsigned W   = FMEM_W,
  parameter int unsigned ONE = FMEM_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [2:0]   c,
  output logic [W-1:0] q
);
  localparam logic [W:0] ONE_S = (W+1)'(ONE);

  logic         i_lt_q;
  logic [W:0]   sum;
  logic [W-1:0] q_next;

  assign i_lt_q = (i < q);
  assign sum    = {1'b0, q} + {1'b0, i};

  always_comb begin
    unique case (fmem_ctl_e'(c))
      FM_HOLD:  q_next = q;
      FM_LOAD:  q_next = i;
      FM_MIN:   q_next = i_lt_q ? i : q;
      FM_MAX:   q_next = i_lt_q ? q : i;
      FM_NEG:   q_next = W'(ONE) - q;
      FM_BPROD: q_next = (sum > ONE_S) ? W'(sum - ONE_S) : '0;
      FM_BSUM:  q_next = (sum > ONE_S) ? W'(ONE) : sum[W-1:0];
      default:  q_next = q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  a_input_range: assert property (@(posedge clk)
      (c != 3'd0) |-> (i <= W'(ONE)));
endmodule
