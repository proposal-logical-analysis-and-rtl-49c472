// fmem_maxmin: max-min type fuzzy memory element.
//
// One fuzzy memory word Q with a fuzzy input I and a 2-bit control C:
//   C = 0  hold        Q(t+1) = Q(t)
//   C = 1  load        Q(t+1) = I(t)
//   C = 2  minimum     Q(t+1) = Q(t) min I(t)
//   C = 3  maximum     Q(t+1) = Q(t) max I(t)
// The state transitions and the 8-bit coding (0 = 0000_0000, 1 = 1000_0000)
// are the document's. Besides a memory it is a tiny processor for the min and
// max steps of Mamdani inference, so an array of these works as a SIMD
// membership memory. The circuit here is one shared magnitude comparator
// selecting between Q and I, then a 4-way multiplexer into the register.
//
// Timing: I and C are sampled at the rising edge of clk; Q is the register
// output and is valid the whole following cycle. An asynchronous active-low
// reset clears Q to 0 (this design's choice; the document shows no reset).
module fmem_maxmin
  import fuzzy_pkg::*;
#(
  parameter int unsigned W   = FMEM_W,
  parameter int unsigned ONE = FMEM_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [1:0]   c,
  output logic [W-1:0] q
);
  logic         i_lt_q;
  logic [W-1:0] q_next;

  assign i_lt_q = (i < q);

  always_comb begin
    unique case (c)
      2'd0: q_next = q;                       // hold
      2'd1: q_next = i;                       // load
      2'd2: q_next = i_lt_q ? i : q;          // minimum
      2'd3: q_next = i_lt_q ? q : i;          // maximum
      default: q_next = q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

  // A fuzzy input never exceeds the code of 1 when it is used.
  a_input_range: assert property (@(posedge clk)
      (c != 2'd0) |-> (i <= W'(ONE)));
endmodule
