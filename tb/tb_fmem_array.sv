// tb_fmem_array: an 8-element membership memory under random command words,
// random bus source and random data, compared every cycle with a model of
// all memories, buffers and states, of the neighbour links (0 beyond the
// ends) and of the state chain (the first active element drives the bus).
// Interleaved directed runs perform the full maximum search (copy, N-1
// right scans, N-1 left scans, mark, broadcast) and check that every
// element ends up holding the largest grade.
module tb_fmem_array;
  import fuzzy_pkg::*;
  localparam int N = 8;
  int checks = 0;
  int failures = 0;
  int searches = 0, multi_active = 0, none_active = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  cell_cmd_t cmd;
  logic bus_src;
  logic [7:0] ext_bus, bus;
  logic [7:0] p2p_in [N];
  logic [7:0] mem_out [N];
  logic active_out [N];
  logic bus_valid;

  int m_mem [N], m_buf [N];
  bit m_act [N];

  always #5 clk = ~clk;

  fmem_array #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .cmd(cmd), .bus_src(bus_src),
    .ext_bus(ext_bus), .p2p_in(p2p_in), .mem_out(mem_out), .active_out(active_out),
    .bus(bus), .bus_valid(bus_valid));

  function automatic int model_bus(output bit valid);
    valid = 0;
    for (int k = 0; k < N; k++) if (m_act[k]) begin valid = 1; return m_mem[k]; end
    return 0;
  endfunction

  // apply the command present now to the model (called at the clock edge)
  task automatic model_step();
    int nb [N];
    int b, opd, cnt;
    bit v;
    b = bus_src ? model_bus(v) : int'(ext_bus);
    for (int k = 0; k < N; k++) nb[k] = m_buf[k];
    cnt = 0;
    for (int k = 0; k < N; k++) cnt += m_act[k];
    if (cnt > 1) multi_active++;
    if (cnt == 0) none_active++;
    if (cmd.ctrl != CTRL_OPERATION) return;
    for (int k = 0; k < N; k++) begin
      case (cmd.is)
        IS_BUS:   opd = b;
        IS_P2P:   opd = int'(p2p_in[k]);
        IS_LEFT:  opd = (k == 0) ? 0 : nb[k-1];
        default:  opd = (k == N-1) ? 0 : nb[k+1];
      endcase
      case (cmd.op)
        OP_LOAD: m_mem[k] = opd;
        OP_MIN:  if (opd < m_mem[k]) m_mem[k] = opd;
        OP_MAX:  if (opd > m_mem[k]) m_mem[k] = opd;
        OP_COPY: m_buf[k] = m_mem[k];
        OP_SCAN: if (opd > m_buf[k]) m_buf[k] = opd;
        OP_MARK: m_act[k] = (m_mem[k] == m_buf[k]);
        default: ;
      endcase
    end
  endtask

  task automatic compare();
    bit v;
    int b;
    b = bus_src ? model_bus(v) : int'(ext_bus);
    if (!bus_src) void'(model_bus(v));
    for (int k = 0; k < N; k++) begin
      checks += 2;
      if (int'(mem_out[k]) != m_mem[k]) failures++;
      if (active_out[k] != m_act[k]) failures++;
    end
    checks += 2;
    if (int'(bus) != b) failures++;
    if (bus_valid != v) failures++;
  endtask

  task automatic issue(input cell_ctrl_e c, input cell_is_e is, input cell_op_e op, input logic src,
                       input bit new_data);
    @(negedge clk);
    if (new_data) begin
      ext_bus = 8'($urandom_range(0, 8) * 16);
      for (int k = 0; k < N; k++) p2p_in[k] = 8'($urandom_range(0, 8) * 16);
    end
    cmd = '{ctrl: c, is: is, op: op};
    bus_src = src;
    #1 compare();
    @(posedge clk);
    model_step();
  endtask

  task automatic full_search();
    int mx;
    issue(CTRL_OPERATION, IS_P2P, OP_LOAD, 1'b0, 1'b1);
    issue(CTRL_OPERATION, IS_BUS, OP_COPY, 1'b0, 1'b0);
    repeat (N-1) issue(CTRL_OPERATION, IS_LEFT,  OP_SCAN, 1'b0, 1'b0);
    repeat (N-1) issue(CTRL_OPERATION, IS_RIGHT, OP_SCAN, 1'b0, 1'b0);
    issue(CTRL_OPERATION, IS_BUS, OP_MARK, 1'b0, 1'b0);
    issue(CTRL_OPERATION, IS_BUS, OP_LOAD, 1'b1, 1'b0);
    @(negedge clk);
    mx = 0;
    for (int k = 0; k < N; k++) if (m_buf[k] > mx) mx = m_buf[k];
    for (int k = 0; k < N; k++) begin
      checks++;
      if (int'(mem_out[k]) != mx) failures++;
    end
    searches++;
  endtask

  initial begin
    cmd = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
    bus_src = 1'b0; ext_bus = '0;
    for (int k = 0; k < N; k++) begin p2p_in[k] = '0; m_mem[k] = 0; m_buf[k] = 0; m_act[k] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 20; round++) begin
      full_search();
      for (int n = 0; n < 150; n++) begin
        issue(($urandom_range(0, 5) == 0) ? CTRL_HOLD : CTRL_OPERATION,
              cell_is_e'($urandom_range(0, 3)), cell_op_e'($urandom_range(0, 5)),
              1'($urandom_range(0, 1)), 1'b1);
      end
    end
    checks += 3;
    if (searches == 0) failures++;
    if (multi_active == 0) failures++;
    if (none_active == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
