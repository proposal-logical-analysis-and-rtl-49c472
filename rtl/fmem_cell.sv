// fmem_cell: modified max-min fuzzy memory element, one element of a
// membership memory array.
//
// It holds three registers: the fuzzy memory word, a buffer word and a
// one-bit state (active / inactive). A comparator ("cmp") serves all
// operations. A command word broadcast to the whole array says whether the
// element changes this cycle (Ctrl = hold / operation), where its operand
// comes from (IS = broadcast bus, its own peer-to-peer lane, or the buffer of
// its left or right neighbour) and what it does (Op):
//   OP_LOAD  memory <= operand
//   OP_MIN   memory <= memory min operand
//   OP_MAX   memory <= memory max operand
//   OP_COPY  buffer <= memory
//   OP_SCAN  buffer <= buffer max operand  (operand: a neighbour's buffer)
//   OP_MARK  state  <= active when memory == buffer
// Load, min and max are the transitions of the basic max-min element. The
// memory/buffer/state/cmp structure, the bus, the neighbour links and the
// peer-to-peer path are those of the document's block diagram; the command
// encoding, the buffer operations and the marking rule are this design's
// reading of how the element is used to find a matching degree.
//
// Timing: all registers load at the rising edge of clk from the command and
// operands present before it. The buffer is what neighbours see. An
// asynchronous active-low reset clears everything.
module fmem_cell
  import fuzzy_pkg::*;
#(
  parameter int unsigned W   = FMEM_W,
  parameter int unsigned ONE = FMEM_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cell_cmd_t    cmd,
  input  logic [W-1:0] bus_in,      // broadcast data bus
  input  logic [W-1:0] p2p_in,      // peer-to-peer path
  input  logic [W-1:0] left_buf,    // left neighbour's buffer
  input  logic [W-1:0] right_buf,   // right neighbour's buffer
  output logic [W-1:0] mem_q,       // memory, also the element's output
  output logic [W-1:0] buf_q,       // buffer, seen by the neighbours
  output logic         active       // state
);
  logic [W-1:0] operand;
  logic [W-1:0] cmp_a;
  logic         operand_lt;   // operand < compared register

  always_comb begin
    unique case (cmd.is)
      IS_BUS:   operand = bus_in;
      IS_P2P:   operand = p2p_in;
      IS_LEFT:  operand = left_buf;
      IS_RIGHT: operand = right_buf;
      default:  operand = bus_in;
    endcase
  end

  // The comparator looks at the buffer for scans and at the memory otherwise.
  assign cmp_a      = (cmd.op == OP_SCAN) ? buf_q : mem_q;
  assign operand_lt = (operand < cmp_a);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q  <= '0;
      buf_q  <= '0;
      active <= 1'b0;
    end else if (cmd.ctrl == CTRL_OPERATION) begin
      unique case (cmd.op)
        OP_LOAD: mem_q  <= operand;
        OP_MIN:  mem_q  <= operand_lt ? operand : mem_q;
        OP_MAX:  mem_q  <= operand_lt ? mem_q : operand;
        OP_COPY: buf_q  <= mem_q;
        OP_SCAN: buf_q  <= operand_lt ? buf_q : operand;
        OP_MARK: active <= (mem_q == buf_q);
        default: ;
      endcase
    end
  end

  a_operand_range: assert property (@(posedge clk)
      (cmd.ctrl == CTRL_OPERATION && cmd.op inside {OP_LOAD, OP_MIN, OP_MAX})
      |-> (operand <= W'(ONE)));
endmodule
