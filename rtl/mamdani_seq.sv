// mamdani_seq: controller that runs one Mamdani inference rule on a
// membership memory array (fmem_array).
//
// Sequence after a start pulse, one command per cycle unless noted:
//   LOAD   memory <= input membership              (peer-to-peer, p2p_sel = SRC_INPUT)
//   MATCH  memory <= memory min condition          (peer-to-peer, SRC_CONDITION)
//   COPY   buffer <= memory
//   SCANR  N-1 cycles: buffer <= buffer max left neighbour's buffer
//   SCANL  N-1 cycles: buffer <= buffer max right neighbour's buffer
//   MARK   state <= (memory == buffer): elements holding the maximum
//   BCAST  the first marked element drives the bus and every memory loads
//          it: all memories now hold the matching degree (captured in
//          match_degree)
//   CLIP   memory <= memory min consequent         (peer-to-peer, SRC_CONSEQUENT)
//   MERGE  n_other cycles: memory <= memory max output of other rule j
//          (peer-to-peer, SRC_OTHER, other_idx = j)
//   DONE   one cycle with done high; the array memories hold the output
//          membership function.
// The order of the steps (match by min, find and broadcast the matching
// degree, clip by min with the consequent, merge other rules by max, output)
// is the document's inference procedure; how the degree is found (scans,
// marking, first-marked on the bus) is this design's reading of its matching
// figure. The controller only issues commands: whoever drives the
// peer-to-peer lanes must present the vector named by p2p_sel and
// other_idx in the same cycle.
//
// Latency: start to done is 2*N + 5 + n_other cycles (done is high in the
// last of them); start is ignored while busy. N must be at least 2.
module mamdani_seq
  import fuzzy_pkg::*;
#(
  parameter int unsigned N   = 128,
  parameter int unsigned W   = FMEM_W,
  parameter int unsigned OW  = 8          // width of the other-rule count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [OW-1:0] n_other,          // other rules' outputs to merge
  // to the array
  output cell_cmd_t     cmd,
  output logic          bus_src,
  // bus value seen by the array, for capturing the matching degree
  input  logic [W-1:0]  bus,
  input  logic          bus_valid,
  // which vector the peer-to-peer lanes must carry
  output logic [1:0]    p2p_sel,
  output logic [OW-1:0] other_idx,
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  match_degree
);
  localparam logic [1:0] SRC_INPUT      = 2'd0;
  localparam logic [1:0] SRC_CONDITION  = 2'd1;
  localparam logic [1:0] SRC_CONSEQUENT = 2'd2;
  localparam logic [1:0] SRC_OTHER      = 2'd3;
  localparam int unsigned CW = $clog2(N);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_MATCH, S_COPY, S_SCANR, S_SCANL,
    S_MARK, S_BCAST, S_CLIP, S_MERGE, S_DONE
  } state_e;

  state_e        state;
  logic [CW-1:0] step;        // counts scan cycles
  logic [OW-1:0] n_other_q;

  localparam logic [CW-1:0] LAST_STEP = CW'(N - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      step         <= '0;
      other_idx    <= '0;
      n_other_q    <= '0;
      match_degree <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state     <= S_LOAD;
          n_other_q <= n_other;
        end
        S_LOAD:  state <= S_MATCH;
        S_MATCH: state <= S_COPY;
        S_COPY: begin
          state <= S_SCANR;
          step  <= '0;
        end
        S_SCANR: begin
          if (step == LAST_STEP) begin
            state <= S_SCANL;
            step  <= '0;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_SCANL: begin
          if (step == LAST_STEP) begin
            state <= S_MARK;
            step  <= '0;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_MARK:  state <= S_BCAST;
        S_BCAST: begin
          state        <= S_CLIP;
          match_degree <= bus;
        end
        S_CLIP: begin
          other_idx <= '0;
          state     <= (n_other_q == '0) ? S_DONE : S_MERGE;
        end
        S_MERGE: begin
          if (other_idx == n_other_q - 1'b1) state <= S_DONE;
          else                               other_idx <= other_idx + 1'b1;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cmd     = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
    bus_src = 1'b0;
    p2p_sel = SRC_INPUT;
    unique case (state)
      S_LOAD:  cmd = '{ctrl: CTRL_OPERATION, is: IS_P2P,   op: OP_LOAD};
      S_MATCH: begin
        cmd     = '{ctrl: CTRL_OPERATION, is: IS_P2P, op: OP_MIN};
        p2p_sel = SRC_CONDITION;
      end
      S_COPY:  cmd = '{ctrl: CTRL_OPERATION, is: IS_BUS,   op: OP_COPY};
      S_SCANR: cmd = '{ctrl: CTRL_OPERATION, is: IS_LEFT,  op: OP_SCAN};
      S_SCANL: cmd = '{ctrl: CTRL_OPERATION, is: IS_RIGHT, op: OP_SCAN};
      S_MARK:  cmd = '{ctrl: CTRL_OPERATION, is: IS_BUS,   op: OP_MARK};
      S_BCAST: begin
        cmd     = '{ctrl: CTRL_OPERATION, is: IS_BUS, op: OP_LOAD};
        bus_src = 1'b1;
      end
      S_CLIP: begin
        cmd     = '{ctrl: CTRL_OPERATION, is: IS_P2P, op: OP_MIN};
        p2p_sel = SRC_CONSEQUENT;
      end
      S_MERGE: begin
        cmd     = '{ctrl: CTRL_OPERATION, is: IS_P2P, op: OP_MAX};
        p2p_sel = SRC_OTHER;
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // At the broadcast some element must hold the maximum.
  a_bcast_valid: assert property (@(posedge clk)
      (state == S_BCAST) |-> bus_valid);
  initial begin
    if (N < 2) $error("mamdani_seq needs N >= 2");
  end
endmodule
