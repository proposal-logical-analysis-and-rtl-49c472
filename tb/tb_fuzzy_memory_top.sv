// tb_fuzzy_memory_top: end-to-end test of the whole design at its default
// size (128-element membership memory), with no parameter overridden.
//
//   1. Fuzzy flip-flops: random and binary stimulus on the D flip-flop, the
//      eight T flip-flops (minterm and maxterm) and the eight SR
//      flip-flops, every output compared with reference models each cycle.
//      Counts binary toggles and holds (T), cycles where the two T forms
//      disagree, set / reset / hold / S=R=1 (SR).
//   2. Fuzzy memory elements: random inputs and every control value on the
//      max-min and bounded elements, compared with models.
//   3. Host mode: the host loads a membership function through the
//      peer-to-peer lanes, combines it with a value on the bus and with two
//      more functions (max, then min through the peer-to-peer lanes with
//      hold cycles around it), and reads the memories back.
//   4. Inference: several Mamdani rules run by the sequencer, each checked
//      for matching degree, output membership and latency 2*N + 5 + n_other.
//      Meanwhile the host holds a command that would clear the array, which
//      must be ignored while the sequencer is busy.
// Each mechanism (scans in both directions, marking, several elements at
// the maximum, broadcast from an element, clipping, merging, host command
// ignored while busy) is counted, and one that never happened is a failure.
`include "tb_fuzzy_ref.svh"
module tb_fuzzy_memory_top;
  import fuzzy_pkg::*;
  localparam int N = 128;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic [3:0] dff_d, dff_q;
  logic [4:0] tff_t [4], tff_q [4], tff_max_q [4];
  logic [4:0] srff_s [4], srff_r [4], srff_set_q [4], srff_rst_q [4];
  logic [7:0] fmm_i, fmm_q, fmb_i, fmb_q;
  logic [1:0] fmm_c;
  logic [2:0] fmb_c;
  cell_cmd_t  host_cmd;
  logic       host_bus_src;
  logic [7:0] host_bus;
  logic [7:0] p2p_in [N];
  logic [7:0] mem_out [N];
  logic       active_out [N];
  logic [7:0] bus;
  logic       bus_valid;
  logic       inf_start, inf_busy, inf_done;
  logic [7:0] inf_n_other, inf_other_idx, inf_match_degree;
  logic [1:0] inf_p2p_sel;

  always #5 clk = ~clk;

  fuzzy_memory_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_t_forms_differ = 0, n_t_toggle = 0, n_t_hold = 0, n_sr_set = 0, n_sr_reset = 0, n_sr_hold = 0, n_sr_both = 0;
  int n_fmm [4] = '{default: 0};
  int n_fmb [8] = '{default: 0};
  int n_scan_r = 0, n_scan_l = 0, n_mark = 0, n_tie = 0, n_bcast = 0, n_clip = 0, n_merge = 0;
  int n_host_ignored = 0, n_host_ops = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.arr_cmd.ctrl == CTRL_OPERATION) begin
        if (dut.arr_cmd.op == OP_SCAN && dut.arr_cmd.is == IS_LEFT)  n_scan_r++;
        if (dut.arr_cmd.op == OP_SCAN && dut.arr_cmd.is == IS_RIGHT) n_scan_l++;
        if (dut.arr_cmd.op == OP_MARK) n_mark++;
        if (dut.arr_bus_src && dut.arr_cmd.op == OP_LOAD) begin
          int cnt;
          n_bcast++;
          cnt = 0;
          for (int k = 0; k < N; k++) cnt += active_out[k];
          if (cnt > 1) n_tie++;
        end
      end
      if (inf_busy && inf_p2p_sel == 2'd2 && dut.arr_cmd.op == OP_MIN) n_clip++;
      if (inf_busy && inf_p2p_sel == 2'd3) n_merge++;
      if (inf_busy && host_cmd.ctrl == CTRL_OPERATION) n_host_ignored++;
      if (!inf_busy && host_cmd.ctrl == CTRL_OPERATION) n_host_ops++;
    end
  end

  // ---------------- phase 1: fuzzy flip-flops ----------------
  function automatic int t_next(int ops, int t, int q, int one);
    return ref_sn(ops, ref_tn(ops, t, one - q, one), ref_tn(ops, one - t, q, one), one);
  endfunction
  function automatic int tm_next(int ops, int t, int q, int one);
    return ref_tn(ops, ref_sn(ops, t, q, one), ref_sn(ops, one - t, one - q, one), one);
  endfunction
  function automatic int sr_next(int ops, int typ, int s, int r, int q, int one);
    if (typ == 0) return ref_sn(ops, s, ref_tn(ops, one - r, q, one), one);
    return ref_tn(ops, one - r, ref_sn(ops, s, q, one), one);
  endfunction

  task automatic phase_ff();
    int e_d, e_t [4], e_m [4], e_s [4], e_r [4], one;
    e_d = 0;
    for (int o = 0; o < 4; o++) begin e_t[o] = 0; e_m[o] = 0; e_s[o] = 0; e_r[o] = 0; end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      dff_d = 4'($urandom_range(0, 15));
      for (int o = 0; o < 4; o++) begin
        one = (o == 1) ? 16 : 15;
        case ($urandom_range(0, 5))
          0: tff_t[o] = 5'(0);
          1: tff_t[o] = 5'(one);
          default: tff_t[o] = 5'($urandom_range(0, one));
        endcase
        case ($urandom_range(0, 7))
          0: begin srff_s[o] = 5'(one); srff_r[o] = 5'(0);   end
          1: begin srff_s[o] = 5'(0);   srff_r[o] = 5'(one); end
          2: begin srff_s[o] = 5'(0);   srff_r[o] = 5'(0);   end
          3: begin srff_s[o] = 5'(one); srff_r[o] = 5'(one); end
          default: begin
            srff_s[o] = 5'($urandom_range(0, one));
            srff_r[o] = 5'($urandom_range(0, one));
          end
        endcase
      end
      @(posedge clk);
      e_d = int'(dff_d);
      for (int o = 0; o < 4; o++) begin
        one = (o == 1) ? 16 : 15;
        if (int'(tff_t[o]) == one) n_t_toggle++;
        if (int'(tff_t[o]) == 0)   n_t_hold++;
        if (int'(srff_s[o]) == one && srff_r[o] == 0) n_sr_set++;
        if (srff_s[o] == 0 && int'(srff_r[o]) == one) n_sr_reset++;
        if (srff_s[o] == 0 && srff_r[o] == 0) n_sr_hold++;
        if (int'(srff_s[o]) == one && int'(srff_r[o]) == one) n_sr_both++;
        e_t[o] = t_next(o, int'(tff_t[o]), e_t[o], one);
        e_m[o] = tm_next(o, int'(tff_t[o]), e_m[o], one);
        e_s[o] = sr_next(o, 0, int'(srff_s[o]), int'(srff_r[o]), e_s[o], one);
        e_r[o] = sr_next(o, 1, int'(srff_s[o]), int'(srff_r[o]), e_r[o], one);
      end
      #1;
      checks++;
      if (int'(dff_q) != e_d) failures++;
      for (int o = 0; o < 4; o++) begin
        checks += 4;
        if (int'(tff_q[o]) != e_t[o])      begin failures++; $display("FAIL T ops=%0d", o); end
        if (int'(tff_max_q[o]) != e_m[o])  begin failures++; $display("FAIL T maxterm ops=%0d", o); end
        if (tff_max_q[o] != tff_q[o]) n_t_forms_differ++;
        if (int'(srff_set_q[o]) != e_s[o]) begin failures++; $display("FAIL SR set ops=%0d", o); end
        if (int'(srff_rst_q[o]) != e_r[o]) begin failures++; $display("FAIL SR reset ops=%0d", o); end
      end
    end
  endtask

  // ---------------- phase 2: fuzzy memory elements ----------------
  task automatic phase_fmem();
    int em, eb;
    em = 0; eb = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      fmm_i = 8'($urandom_range(0, 128));
      fmb_i = ($urandom_range(0, 5) == 0) ? 8'd128 : 8'($urandom_range(0, 128));
      fmm_c = 2'($urandom_range(0, 3));
      fmb_c = 3'($urandom_range(0, 7));
      @(posedge clk);
      n_fmm[fmm_c]++;
      n_fmb[fmb_c]++;
      case (fmm_c)
        2'd1: em = int'(fmm_i);
        2'd2: em = (int'(fmm_i) < em) ? int'(fmm_i) : em;
        2'd3: em = (int'(fmm_i) > em) ? int'(fmm_i) : em;
        default: ;
      endcase
      case (fmb_c)
        3'd1: eb = int'(fmb_i);
        3'd2: eb = (int'(fmb_i) < eb) ? int'(fmb_i) : eb;
        3'd3: eb = (int'(fmb_i) > eb) ? int'(fmb_i) : eb;
        3'd4: eb = 128 - eb;
        3'd5: eb = (eb + int'(fmb_i) > 128) ? eb + int'(fmb_i) - 128 : 0;
        3'd6: eb = (eb + int'(fmb_i) < 128) ? eb + int'(fmb_i) : 128;
        default: ;
      endcase
      #1;
      checks += 2;
      if (int'(fmm_q) != em) begin failures++; $display("FAIL fmem maxmin"); end
      if (int'(fmb_q) != eb) begin failures++; $display("FAIL fmem bounded"); end
    end
    fmm_c = '0;
    fmb_c = '0;
  endtask

  // ---------------- phase 3: host mode ----------------
  task automatic phase_host();
    int a [N], b [N], c [N], e;
    for (int k = 0; k < N; k++) begin
      a[k] = $urandom_range(0, 128);
      b[k] = $urandom_range(0, 128);
      c[k] = $urandom_range(0, 128);
    end
    @(negedge clk);
    for (int k = 0; k < N; k++) p2p_in[k] = 8'(a[k]);
    host_cmd = '{ctrl: CTRL_OPERATION, is: IS_P2P, op: OP_LOAD};
    @(negedge clk);
    host_cmd = '{ctrl: CTRL_OPERATION, is: IS_BUS, op: OP_MIN};
    host_bus = 8'd100;
    @(negedge clk);
    for (int k = 0; k < N; k++) p2p_in[k] = 8'(b[k]);
    host_cmd = '{ctrl: CTRL_OPERATION, is: IS_P2P, op: OP_MAX};
    // hold, select the peer-to-peer path, operate with min, hold again
    @(negedge clk);
    host_cmd = '{ctrl: CTRL_HOLD, is: IS_P2P, op: OP_MIN};
    for (int k = 0; k < N; k++) p2p_in[k] = 8'(c[k]);
    @(negedge clk);
    host_cmd.ctrl = CTRL_OPERATION;
    @(negedge clk);
    host_cmd = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      e = (a[k] < 100) ? a[k] : 100;
      if (b[k] > e) e = b[k];
      if (c[k] < e) e = c[k];
      checks++;
      if (int'(mem_out[k]) != e) failures++;
    end
  endtask

  // ---------------- phase 4: inference ----------------
  int in_mf [N], cond_mf [N], cons_mf [N];
  int oth [3][N];

  always_comb begin
    if (inf_busy) begin
      for (int k = 0; k < N; k++) begin
        case (inf_p2p_sel)
          2'd0: p2p_in[k] = 8'(in_mf[k]);
          2'd1: p2p_in[k] = 8'(cond_mf[k]);
          2'd2: p2p_in[k] = 8'(cons_mf[k]);
          default: p2p_in[k] = 8'(oth[(inf_other_idx < 3) ? inf_other_idx : 0][k]);
        endcase
      end
    end
  end

  // Triangular membership function centred at c with half-width w.
  function automatic int tri_mf(int k, int c, int w);
    int d;
    d = (k > c) ? k - c : c - k;
    return (d >= w) ? 0 : 128 - (128 * d) / w;
  endfunction

  task automatic phase_infer();
    int deg, e, cycles;
    for (int run = 0; run < 4; run++) begin
      int no;
      no = run % 3;
      for (int k = 0; k < N; k++) begin
        in_mf[k]   = tri_mf(k, 30 + 20 * run, 25);
        // run 1 uses a flat-topped condition so that several points tie
        cond_mf[k] = (run == 1) ? ((k >= 40 && k < 70) ? 64 : 0) : tri_mf(k, 50 + 10 * run, 30);
        cons_mf[k] = tri_mf(k, 64, 40 + 5 * run);
        for (int j = 0; j < 3; j++) oth[j][k] = tri_mf(k, 20 + 40 * j, 15) / 2;
      end
      deg = 0;
      for (int k = 0; k < N; k++) begin
        e = (in_mf[k] < cond_mf[k]) ? in_mf[k] : cond_mf[k];
        if (e > deg) deg = e;
      end
      @(negedge clk);
      // a host command that would wipe the array if it leaked through
      host_cmd = '{ctrl: CTRL_OPERATION, is: IS_BUS, op: OP_LOAD};
      host_bus = 8'd0;
      host_bus_src = 1'b0;
      inf_start = 1'b1;
      inf_n_other = 8'(no);
      @(negedge clk);
      inf_start = 1'b0;
      cycles = 1;
      while (!inf_done && cycles < 2000) begin
        @(negedge clk);
        cycles++;
      end
      host_cmd = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
      checks += 2;
      if (cycles != 2 * N + 5 + no) begin
        failures++;
        $display("FAIL latency %0d expected %0d", cycles, 2 * N + 5 + no);
      end
      if (int'(inf_match_degree) != deg) begin
        failures++;
        $display("FAIL degree %0d expected %0d", inf_match_degree, deg);
      end
      for (int k = 0; k < N; k++) begin
        e = (deg < cons_mf[k]) ? deg : cons_mf[k];
        for (int j = 0; j < no; j++) if (oth[j][k] > e) e = oth[j][k];
        checks++;
        if (int'(mem_out[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL out[%0d]=%0d expected %0d", k, mem_out[k], e);
        end
      end
      @(negedge clk);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    dff_d = '0; fmm_i = '0; fmb_i = '0; fmm_c = '0; fmb_c = '0;
    for (int o = 0; o < 4; o++) begin tff_t[o] = '0; srff_s[o] = '0; srff_r[o] = '0; end
    host_cmd = '{ctrl: CTRL_HOLD, is: IS_BUS, op: OP_LOAD};
    host_bus_src = 1'b0; host_bus = '0;
    inf_start = 1'b0; inf_n_other = '0;
    for (int k = 0; k < N; k++) p2p_in[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    phase_ff();
    phase_fmem();
    phase_host();
    phase_infer();
    need("T binary toggle", n_t_toggle);
    need("T hold", n_t_hold);
    need("T minterm and maxterm differ", n_t_forms_differ);
    need("SR set", n_sr_set);
    need("SR reset", n_sr_reset);
    need("SR hold", n_sr_hold);
    need("SR S=R=1", n_sr_both);
    for (int c = 0; c < 4; c++) need($sformatf("max-min FMEM C=%0d", c), n_fmm[c]);
    for (int c = 0; c < 7; c++) need($sformatf("bounded FMEM C=%0d", c), n_fmb[c]);
    need("host operation", n_host_ops);
    need("scan to the right", n_scan_r);
    need("scan to the left", n_scan_l);
    need("mark maximum", n_mark);
    need("broadcast from element", n_bcast);
    need("several elements at maximum", n_tie);
    need("clip by consequent", n_clip);
    need("merge other rule", n_merge);
    need("host command ignored (busy)", n_host_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
