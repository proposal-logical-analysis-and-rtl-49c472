// fmem_array: fuzzy membership memory built from N modified fuzzy memory
// elements (fmem_cell).
//
// Element k stores the membership grade of point k of the universe of
// discourse, so the array holds one fuzzy set and applies every command to
// all grades at once (fine-grain SIMD). All elements share one command word
// and one broadcast data bus. Each element also has its own peer-to-peer
// lane (p2p_in[k]) through which a whole membership function is written or
// combined in one cycle, and its memory is read out on mem_out[k].
//
// Neighbour links: element k sees the buffers of elements k-1 and k+1; the
// ends see 0, the identity of max. Repeating OP_SCAN with IS_LEFT N-1 times
// moves a running maximum to the right end; repeating it with IS_RIGHT N-1
// times then gives every buffer the maximum of the whole array.
//
// State chain and bus: a chain runs from element 0 to element N-1 and picks
// the first active element. When bus_src is set, that element's memory is
// driven onto the broadcast bus in place of ext_bus, so an OP_LOAD from
// IS_BUS copies it into every element. If no element is active the bus
// carries 0 and bus_valid is low.
//
// This arrangement (shared control and bus, neighbour links, state chain,
// peer-to-peer input lanes) follows the document's figures of the array and
// of its matching procedure; the exact command set and the first-active
// selection rule are this design's choices. The bus and the selection are
// combinational paths through all N elements; everything else is registered
// in the elements. N defaults to 128 elements, the number of processing
// elements of the SIMD fuzzy processor the document compares against.
module fmem_array
  import fuzzy_pkg::*;
#(
  parameter int unsigned N   = 128,
  parameter int unsigned W   = FMEM_W,
  parameter int unsigned ONE = FMEM_ONE
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cell_cmd_t    cmd,
  input  logic         bus_src,               // 0: ext_bus, 1: selected element
  input  logic [W-1:0] ext_bus,
  input  logic [W-1:0] p2p_in  [N],
  output logic [W-1:0] mem_out [N],
  output logic         active_out [N],
  output logic [W-1:0] bus,                   // value on the broadcast bus
  output logic         bus_valid              // some element is active
);
  logic [W-1:0] buf_v [N];
  logic [W-1:0] left_v [N];
  logic [W-1:0] right_v [N];
  logic         seen [N+1];                   // an earlier element is active
  logic [W-1:0] drv [N+1];                    // OR of selected memories so far
  logic [W-1:0] cell_bus;

  assign seen[0] = 1'b0;
  assign drv[0]  = '0;

  for (genvar k = 0; k < N; k++) begin : g_cell
    if (k == 0) begin : g_l0
      assign left_v[k] = '0;
    end else begin : g_l
      assign left_v[k] = buf_v[k-1];
    end
    if (k == N-1) begin : g_rn
      assign right_v[k] = '0;
    end else begin : g_r
      assign right_v[k] = buf_v[k+1];
    end

    fmem_cell #(.W(W), .ONE(ONE)) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .cmd       (cmd),
      .bus_in    (bus),
      .p2p_in    (p2p_in[k]),
      .left_buf  (left_v[k]),
      .right_buf (right_v[k]),
      .mem_q     (mem_out[k]),
      .buf_q     (buf_v[k]),
      .active    (active_out[k])
    );

    // State chain: the first active element drives the bus.
    assign seen[k+1] = seen[k] | active_out[k];
    assign drv[k+1]  = drv[k] | ((active_out[k] && !seen[k]) ? mem_out[k] : '0);
  end

  assign cell_bus  = drv[N];
  assign bus_valid = seen[N];
  assign bus       = bus_src ? cell_bus : ext_bus;
endmodule
