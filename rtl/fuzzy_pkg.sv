// fuzzy_pkg: types and constants shared by the fuzzy flip-flops, the fuzzy
// memory elements and the membership-memory array.
//
// A fuzzy truth value in [0,1] is carried as an unsigned integer code, with
// 0 meaning 0 and a per-block constant ONE meaning 1. The flip-flops use a
// 4-bit code with ONE = 15, except under the algebraic operation system,
// which uses 5 bits with ONE = 16 so that products reduce to a shift. The
// memory elements use 8 bits with ONE = 128, so codes above 128 can appear
// only inside a computation. These codings follow the document; the enum
// encodings below are this design's own.
package fuzzy_pkg;

  // Fuzzy logical operation system (negation, t-norm, s-norm):
  //   OPS_LOGICAL   (1-x, min, max)
  //   OPS_ALGEBRAIC (1-x, a*b, a+b-a*b)
  //   OPS_BOUNDED   (1-x, max(0,a+b-1), min(1,a+b))
  //   OPS_DRASTIC   (1-x, drastic product, drastic sum)
  typedef enum logic [1:0] {
    OPS_LOGICAL   = 2'd0,
    OPS_ALGEBRAIC = 2'd1,
    OPS_BOUNDED   = 2'd2,
    OPS_DRASTIC   = 2'd3
  } op_sys_e;

  // Logical form of the T fuzzy flip-flop.
  typedef enum logic {
    T_MINTERM = 1'b0,   // (T t Qn) s (Tn t Q)
    T_MAXTERM = 1'b1    // (T s Q) t (Tn s Qn)
  } t_form_e;

  // Which output an SR fuzzy flip-flop gives for S = R = 1.
  typedef enum logic {
    SR_SET_TYPE   = 1'b0,  // S s (Rn t Q)
    SR_RESET_TYPE = 1'b1   // Rn t (S s Q)
  } sr_type_e;

  // Control value C of the fuzzy memory elements. 0..3 exist in both
  // types; 4..6 only in the bounded type.
  typedef enum logic [2:0] {
    FM_HOLD  = 3'd0,   // Q <= Q
    FM_LOAD  = 3'd1,   // Q <= I
    FM_MIN   = 3'd2,   // Q <= Q min I
    FM_MAX   = 3'd3,   // Q <= Q max I
    FM_NEG   = 3'd4,   // Q <= 1 - Q
    FM_BPROD = 3'd5,   // Q <= max(0, Q + I - 1)
    FM_BSUM  = 3'd6    // Q <= min(1, Q + I)
  } fmem_ctl_e;

  // Code widths and the code of 1.
  localparam int unsigned FF_W        = 4;
  localparam int unsigned FF_ONE      = 15;
  localparam int unsigned FF_ALG_W    = 5;
  localparam int unsigned FF_ALG_ONE  = 16;
  localparam int unsigned FMEM_W      = 8;
  localparam int unsigned FMEM_ONE    = 128;

  // ---- Modified (array) fuzzy memory element ----
  // Ctrl: whether the element changes this cycle.
  typedef enum logic {
    CTRL_HOLD      = 1'b0,
    CTRL_OPERATION = 1'b1
  } cell_ctrl_e;

  // IS: input select, the operand source of an operation.
  typedef enum logic [1:0] {
    IS_BUS   = 2'd0,   // broadcast data bus
    IS_P2P   = 2'd1,   // peer-to-peer path (own data lane)
    IS_LEFT  = 2'd2,   // buffer of the left neighbour
    IS_RIGHT = 2'd3    // buffer of the right neighbour
  } cell_is_e;

  // Op: what an operation does.
  typedef enum logic [2:0] {
    OP_LOAD = 3'd0,    // memory <= operand
    OP_MIN  = 3'd1,    // memory <= memory min operand
    OP_MAX  = 3'd2,    // memory <= memory max operand
    OP_COPY = 3'd3,    // buffer <= memory
    OP_SCAN = 3'd4,    // buffer <= buffer max operand
    OP_MARK = 3'd5     // state  <= active if memory == buffer
  } cell_op_e;

  // Control word broadcast to every element of an array.
  typedef struct packed {
    cell_ctrl_e ctrl;
    cell_is_e   is;
    cell_op_e   op;
  } cell_cmd_t;

endpackage
