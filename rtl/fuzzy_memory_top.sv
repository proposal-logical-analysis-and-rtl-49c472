// fuzzy_memory_top: the fuzzy memory elements side by side.
//
// Four independent parts share only the clock and reset:
//   * Fuzzy flip-flops, 4-bit codes (ONE = 15), 5-bit (ONE = 16) under the
//     algebraic system: one D fuzzy flip-flop, and per operation system a
//     minterm and a maxterm T fuzzy flip-flop (sharing one T input) and a
//     set-type and a reset-type SR fuzzy flip-flop (sharing S and R).
//     Ports indexed [k] belong to operation system k (0 logical,
//     1 algebraic, 2 bounded, 3 drastic, as op_sys_e); the 4-bit instances
//     use bits [3:0] and drive bit 4 of their outputs low, so those output
//     bits are constant by design.
//   * One max-min type and one bounded type fuzzy memory element (8-bit
//     codes, ONE = 128).
//   * An inference engine: an N-element membership memory (fmem_array)
//     with the Mamdani sequencer (mamdani_seq). While the sequencer is idle
//     the array obeys host_cmd, host_bus_src and host_bus, so a host can load,
//     combine and read membership functions directly; while it is busy the
//     sequencer commands the array. The peer-to-peer lanes p2p_in are always
//     the host's: during inference it must present the vector named by
//     p2p_sel / other_idx.
// Timing: everything is synchronous to the rising edge of clk with an
// asynchronous active-low reset; see the parts for their latencies.
module fuzzy_memory_top
  import fuzzy_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // D fuzzy flip-flop
  input  logic [FF_W-1:0]       dff_d,
  output logic [FF_W-1:0]       dff_q,
  // T fuzzy flip-flops, minterm and maxterm form per operation system,
  // both driven by the same T input
  input  logic [FF_ALG_W-1:0]   tff_t [4],
  output logic [FF_ALG_W-1:0]   tff_q [4],
  output logic [FF_ALG_W-1:0]   tff_max_q [4],
  // SR fuzzy flip-flops, set and reset type per operation system
  input  logic [FF_ALG_W-1:0]   srff_s [4],
  input  logic [FF_ALG_W-1:0]   srff_r [4],
  output logic [FF_ALG_W-1:0]   srff_set_q [4],
  output logic [FF_ALG_W-1:0]   srff_rst_q [4],
  // max-min and bounded fuzzy memory elements
  input  logic [FMEM_W-1:0]     fmm_i,
  input  logic [1:0]            fmm_c,
  output logic [FMEM_W-1:0]     fmm_q,
  input  logic [FMEM_W-1:0]     fmb_i,
  input  logic [2:0]            fmb_c,
  output logic [FMEM_W-1:0]     fmb_q,
  // membership memory and inference engine
  input  cell_cmd_t             host_cmd,
  input  logic                  host_bus_src,
  input  logic [FMEM_W-1:0]     host_bus,
  input  logic [FMEM_W-1:0]     p2p_in [N],
  output logic [FMEM_W-1:0]     mem_out [N],
  output logic                  active_out [N],
  output logic [FMEM_W-1:0]     bus,
  output logic                  bus_valid,
  input  logic                  inf_start,
  input  logic [7:0]            inf_n_other,
  output logic [1:0]            inf_p2p_sel,
  output logic [7:0]            inf_other_idx,
  output logic                  inf_busy,
  output logic                  inf_done,
  output logic [FMEM_W-1:0]     inf_match_degree
);
  // ---------------- fuzzy flip-flops ----------------
  d_fff #(.W(FF_W)) u_dff (.clk, .rst_n, .d(dff_d), .q(dff_q));

  for (genvar k = 0; k < 4; k++) begin : g_ops
    localparam op_sys_e     OPS = op_sys_e'(k);
    localparam int unsigned W   = (OPS == OPS_ALGEBRAIC) ? FF_ALG_W : FF_W;
    localparam int unsigned ONE = (OPS == OPS_ALGEBRAIC) ? FF_ALG_ONE : FF_ONE;

    logic [W-1:0] tq, tmq, sq, rq;

    t_fff #(.OPSYS(OPS), .FORM(T_MINTERM), .W(W), .ONE(ONE)) u_tff (
      .clk, .rst_n, .t(tff_t[k][W-1:0]), .q(tq));
    t_fff #(.OPSYS(OPS), .FORM(T_MAXTERM), .W(W), .ONE(ONE)) u_tffm (
      .clk, .rst_n, .t(tff_t[k][W-1:0]), .q(tmq));
    sr_fff #(.OPSYS(OPS), .SRTYPE(SR_SET_TYPE), .W(W), .ONE(ONE)) u_srs (
      .clk, .rst_n, .s(srff_s[k][W-1:0]), .r(srff_r[k][W-1:0]), .q(sq));
    sr_fff #(.OPSYS(OPS), .SRTYPE(SR_RESET_TYPE), .W(W), .ONE(ONE)) u_srr (
      .clk, .rst_n, .s(srff_s[k][W-1:0]), .r(srff_r[k][W-1:0]), .q(rq));

    assign tff_q[k]      = FF_ALG_W'(tq);
    assign tff_max_q[k]  = FF_ALG_W'(tmq);
    assign srff_set_q[k] = FF_ALG_W'(sq);
    assign srff_rst_q[k] = FF_ALG_W'(rq);
  end

  // ---------------- fuzzy memory elements ----------------
  fmem_maxmin  u_fmm (.clk, .rst_n, .i(fmm_i), .c(fmm_c), .q(fmm_q));
  fmem_bounded u_fmb (.clk, .rst_n, .i(fmb_i), .c(fmb_c), .q(fmb_q));

  // ---------------- inference engine ----------------
  cell_cmd_t seq_cmd, arr_cmd;
  logic      seq_bus_src, arr_bus_src;

  mamdani_seq #(.N(N), .W(FMEM_W), .OW(8)) u_seq (
    .clk, .rst_n,
    .start        (inf_start),
    .n_other      (inf_n_other),
    .cmd          (seq_cmd),
    .bus_src      (seq_bus_src),
    .bus          (bus),
    .bus_valid    (bus_valid),
    .p2p_sel      (inf_p2p_sel),
    .other_idx    (inf_other_idx),
    .busy         (inf_busy),
    .done         (inf_done),
    .match_degree (inf_match_degree)
  );

  assign arr_cmd     = inf_busy ? seq_cmd     : host_cmd;
  assign arr_bus_src = inf_busy ? seq_bus_src : host_bus_src;

  fmem_array #(.N(N), .W(FMEM_W), .ONE(FMEM_ONE)) u_array (
    .clk, .rst_n,
    .cmd        (arr_cmd),
    .bus_src    (arr_bus_src),
    .ext_bus    (host_bus),
    .p2p_in     (p2p_in),
    .mem_out    (mem_out),
    .active_out (active_out),
    .bus        (bus),
    .bus_valid  (bus_valid)
  );
endmodule
