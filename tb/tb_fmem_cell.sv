// tb_fmem_cell: drives one modified fuzzy memory element with random
// command words (Ctrl, IS, Op) and random operands on the bus, the
// peer-to-peer lane and both neighbour buffers, and compares memory, buffer
// and state every cycle with a model. Every operation and every operand
// source must be used, and marking must both set and clear the state.
module tb_fmem_cell;
  import fuzzy_pkg::*;
  int checks = 0;
  int failures = 0;
  int op_seen [6] = '{default: 0};
  int is_seen [4] = '{default: 0};
  int marked = 0, unmarked = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  cell_cmd_t cmd;
  logic [7:0] bus_in, p2p_in, left_buf, right_buf, mem_q, buf_q;
  logic active;
  int e_mem = 0, e_buf = 0;
  bit e_act = 0;
  int operand, cmp;

  always #5 clk = ~clk;

  fmem_cell dut (.clk(clk), .rst_n(rst_n), .cmd(cmd), .bus_in(bus_in), .p2p_in(p2p_in),
                 .left_buf(left_buf), .right_buf(right_buf), .mem_q(mem_q), .buf_q(buf_q),
                 .active(active));

  initial begin
    cmd = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
    bus_in = '0; p2p_in = '0; left_buf = '0; right_buf = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      cmd.ctrl = ($urandom_range(0, 4) == 0) ? CTRL_HOLD : CTRL_OPERATION;
      cmd.is   = cell_is_e'($urandom_range(0, 3));
      cmd.op   = cell_op_e'($urandom_range(0, 5));
      // small value range so that equality (marking) happens often
      bus_in    = 8'($urandom_range(0, 8) * 16);
      p2p_in    = 8'($urandom_range(0, 8) * 16);
      left_buf  = 8'($urandom_range(0, 8) * 16);
      right_buf = 8'($urandom_range(0, 8) * 16);
      @(posedge clk);
      case (cmd.is)
        IS_BUS:   operand = int'(bus_in);
        IS_P2P:   operand = int'(p2p_in);
        IS_LEFT:  operand = int'(left_buf);
        default:  operand = int'(right_buf);
      endcase
      if (cmd.ctrl == CTRL_OPERATION) begin
        op_seen[cmd.op]++;
        is_seen[cmd.is]++;
        case (cmd.op)
          OP_LOAD: e_mem = operand;
          OP_MIN:  e_mem = (operand < e_mem) ? operand : e_mem;
          OP_MAX:  e_mem = (operand > e_mem) ? operand : e_mem;
          OP_COPY: e_buf = e_mem;
          OP_SCAN: e_buf = (operand > e_buf) ? operand : e_buf;
          OP_MARK: begin
            e_act = (e_mem == e_buf);
            if (e_act) marked++; else unmarked++;
          end
          default: ;
        endcase
      end
      #1;
      checks += 3;
      if (int'(mem_q) != e_mem) failures++;
      if (int'(buf_q) != e_buf) failures++;
      if (active != e_act) failures++;
      if (failures > 0 && failures < 5)
        $display("FAIL n=%0d op=%0d is=%0d mem=%0d/%0d buf=%0d/%0d act=%0d/%0d",
                 n, cmd.op, cmd.is, mem_q, e_mem, buf_q, e_buf, active, e_act);
    end
    for (int k = 0; k < 6; k++) begin checks++; if (op_seen[k] == 0) failures++; end
    for (int k = 0; k < 4; k++) begin checks++; if (is_seen[k] == 0) failures++; end
    checks += 2;
    if (marked == 0) failures++;
    if (unmarked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
