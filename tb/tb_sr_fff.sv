// tb_sr_fff: checks the SR fuzzy flip-flop, set type and reset type under
// all four operation systems, against reference models. The bounded
// references use the closed case lists of the document's proof
// (S+Q-R, 1 or S for the set type; S+Q-R, 0 or 1-R for the reset type);
// the others use the defining formulas with reference operators. Both
// types of one operation system get the same random S, R stream, with
// binary set / reset / hold / S=R=1 cycles mixed in so that the binary
// behaviour and the set-type/reset-type difference at S=R=1 are exercised.
// A separate pair at ONE = 10 replays the document's numerical example
// S = 0.5, R = 0.9, Q = 0.9, which must give 0.5 (set type) and 0.1
// (reset type).
`include "tb_fuzzy_ref.svh"
module tb_sr_fff;
  import fuzzy_pkg::*;
  int checks = 0;
  int failures = 0;
  int binary_sr11 = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit   run = 1'b0;

  always #5 clk = ~clk;

  function automatic int ref_next(int ops, int typ, int s, int r, int q, int one);
    if (ops == 2) begin
      if (typ == 0) begin
        if (q - r <= 0)     return s;
        if (q - r >= one - s) return one;
        return s + q - r;
      end else begin
        if (s + q >= one) return one - r;
        if (s + q <= r)   return 0;
        return s + q - r;
      end
    end
    if (typ == 0) return ref_sn(ops, s, ref_tn(ops, one - r, q, one), one);
    return ref_tn(ops, one - r, ref_sn(ops, s, q, one), one);
  endfunction

  for (genvar o = 0; o < 4; o++) begin : g_o
    localparam int W   = (o == 1) ? 5 : 4;
    localparam int ONE = (o == 1) ? 16 : 15;
    logic [W-1:0] s, r, q_set, q_rst;
    int exp_set, exp_rst;

    sr_fff #(.OPSYS(op_sys_e'(o)), .SRTYPE(SR_SET_TYPE), .W(W), .ONE(ONE)) dut_set (
      .clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q_set));
    sr_fff #(.OPSYS(op_sys_e'(o)), .SRTYPE(SR_RESET_TYPE), .W(W), .ONE(ONE)) dut_rst (
      .clk(clk), .rst_n(rst_n), .s(s), .r(r), .q(q_rst));

    initial begin
      s = '0; r = '0; exp_set = 0; exp_rst = 0;
    end

    always @(negedge clk) begin
      if (run) begin
        case ($urandom_range(0, 7))
          0: begin s <= W'(ONE); r <= '0;      end
          1: begin s <= '0;      r <= W'(ONE); end
          2: begin s <= '0;      r <= '0;      end
          3: begin s <= W'(ONE); r <= W'(ONE); end
          default: begin
            s <= W'($urandom_range(0, ONE));
            r <= W'($urandom_range(0, ONE));
          end
        endcase
      end
    end

    always @(posedge clk) begin
      if (run) begin
        if (int'(s) == ONE && int'(r) == ONE) binary_sr11++;
        exp_set = ref_next(o, 0, int'(s), int'(r), exp_set, ONE);
        exp_rst = ref_next(o, 1, int'(s), int'(r), exp_rst, ONE);
        #1;
        checks += 2;
        if (int'(q_set) != exp_set) begin
          failures++;
          if (failures < 10) $display("FAIL set ops=%0d s=%0d r=%0d q=%0d exp=%0d", o, s, r, q_set, exp_set);
        end
        if (int'(q_rst) != exp_rst) begin
          failures++;
          if (failures < 10) $display("FAIL reset ops=%0d s=%0d r=%0d q=%0d exp=%0d", o, s, r, q_rst, exp_rst);
        end
        // binary S = R = 1: set type gives 1, reset type gives 0
        if (int'(s) == ONE && int'(r) == ONE) begin
          checks += 2;
          if (int'(q_set) != ONE) failures++;
          if (int'(q_rst) != 0)   failures++;
        end
      end
    end
  end

  // Worked example at ONE = 10 under max-min.
  logic [3:0] ex_s = '0, ex_r = '0, ex_qs, ex_qr;
  sr_fff #(.OPSYS(OPS_LOGICAL), .SRTYPE(SR_SET_TYPE),   .W(4), .ONE(10)) ex_set (
    .clk(clk), .rst_n(rst_n), .s(ex_s), .r(ex_r), .q(ex_qs));
  sr_fff #(.OPSYS(OPS_LOGICAL), .SRTYPE(SR_RESET_TYPE), .W(4), .ONE(10)) ex_rst (
    .clk(clk), .rst_n(rst_n), .s(ex_s), .r(ex_r), .q(ex_qr));

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // bring both to Q = 0.9
    ex_s = 4'd9; ex_r = 4'd0;
    @(posedge clk); #1;
    checks += 2;
    if (ex_qs != 4'd9) failures++;
    if (ex_qr != 4'd9) failures++;
    @(negedge clk);
    ex_s = 4'd5; ex_r = 4'd9;
    @(posedge clk); #1;
    checks += 2;
    if (ex_qs != 4'd5) begin failures++; $display("FAIL example set q=%0d", ex_qs); end
    if (ex_qr != 4'd1) begin failures++; $display("FAIL example reset q=%0d", ex_qr); end
    @(negedge clk);
    ex_s = 4'd0; ex_r = 4'd0;
    run = 1'b1;
    repeat (2000) @(posedge clk);
    @(negedge clk);
    run = 1'b0;
    checks++;
    if (binary_sr11 == 0) failures++;
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
