// tb_mamdani_seq: runs the Mamdani sequencer on an 8-element membership
// memory for a series of random rules. The testbench plays the host: it
// presents on the peer-to-peer lanes whichever vector the sequencer asks
// for (input, condition, consequent, or the j-th other rule's output). For
// each inference it checks, against values computed here:
//   matching degree = max over k of min(input[k], condition[k])
//   output[k]       = max(min(degree, consequent[k]), other_0[k], ...)
//   latency         = 2*N + 5 + n_other cycles from start to done
// Inferences use 0 to 3 other rules; some use all-zero matching (no
// overlap) and some have several points at the maximum.
module tb_mamdani_seq;
  import fuzzy_pkg::*;
  localparam int N = 8;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic start;
  logic [7:0] n_other, other_idx;
  cell_cmd_t cmd;
  logic bus_src, bus_valid, busy, done;
  logic [7:0] bus, match_degree;
  logic [1:0] p2p_sel;
  logic [7:0] p2p_in [N];
  logic [7:0] mem_out [N];
  logic active_out [N];

  int in_mf [N], cond_mf [N], cons_mf [N];
  int oth [4][N];

  always #5 clk = ~clk;

  mamdani_seq #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .n_other(n_other),
    .cmd(cmd), .bus_src(bus_src), .bus(bus), .bus_valid(bus_valid), .p2p_sel(p2p_sel),
    .other_idx(other_idx), .busy(busy), .done(done), .match_degree(match_degree));

  fmem_array #(.N(N)) u_arr (.clk(clk), .rst_n(rst_n), .cmd(cmd), .bus_src(bus_src),
    .ext_bus(8'd0), .p2p_in(p2p_in), .mem_out(mem_out), .active_out(active_out),
    .bus(bus), .bus_valid(bus_valid));

  // host side of the peer-to-peer lanes
  always_comb begin
    for (int k = 0; k < N; k++) begin
      case (p2p_sel)
        2'd0: p2p_in[k] = 8'(in_mf[k]);
        2'd1: p2p_in[k] = 8'(cond_mf[k]);
        2'd2: p2p_in[k] = 8'(cons_mf[k]);
        default: p2p_in[k] = 8'(oth[other_idx[1:0]][k]);
      endcase
    end
  end

  function automatic int rnd_grade(int mode);
    if (mode == 1) return 16 * $urandom_range(0, 2);    // coarse: ties likely
    return $urandom_range(0, 128);
  endfunction

  initial begin
    int deg, exp_o, cycles, no;
    start = 1'b0; n_other = '0;
    for (int k = 0; k < N; k++) begin
      in_mf[k] = 0; cond_mf[k] = 0; cons_mf[k] = 0;
      for (int j = 0; j < 4; j++) oth[j][k] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      no = run % 4;
      for (int k = 0; k < N; k++) begin
        in_mf[k]   = rnd_grade(run % 3);
        cond_mf[k] = (run % 7 == 5) ? ((k < N/2) ? 0 : rnd_grade(0)) : rnd_grade(run % 3);
        if (run % 7 == 5) in_mf[k] = (k < N/2) ? rnd_grade(0) : 0;  // disjoint supports
        cons_mf[k] = rnd_grade(0);
        for (int j = 0; j < 4; j++) oth[j][k] = rnd_grade(0) / 2;
      end
      deg = 0;
      for (int k = 0; k < N; k++) begin
        int m;
        m = (in_mf[k] < cond_mf[k]) ? in_mf[k] : cond_mf[k];
        if (m > deg) deg = m;
      end
      @(negedge clk);
      start = 1'b1;
      n_other = 8'(no);
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done && cycles < 1000) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (cycles != 2 * N + 5 + no) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cycles, 2 * N + 5 + no);
      end
      if (int'(match_degree) != deg) begin
        failures++;
        $display("FAIL degree %0d expected %0d", match_degree, deg);
      end
      for (int k = 0; k < N; k++) begin
        exp_o = (deg < cons_mf[k]) ? deg : cons_mf[k];
        for (int j = 0; j < no; j++) if (oth[j][k] > exp_o) exp_o = oth[j][k];
        checks++;
        if (int'(mem_out[k]) != exp_o) begin
          failures++;
          if (failures < 10) $display("FAIL out[%0d]=%0d expected %0d", k, mem_out[k], exp_o);
        end
      end
      @(negedge clk);
      checks++;
      if (busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
