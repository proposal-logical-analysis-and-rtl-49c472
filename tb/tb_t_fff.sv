// tb_t_fff: checks the T fuzzy flip-flop in all eight configurations (four
// operation systems times minterm / maxterm form) against reference models
// run alongside. The bounded and drastic references use the closed forms
// of the document's analysis (|T - Q| and T+Q or 2-T-Q for bounded;
// case lists for drastic); max-min and algebraic use the defining formula
// with reference operators. Each configuration gets its own random T
// stream, with the codes 0 and 1 forced regularly so that binary toggling
// and holding are exercised. Under max-min the minterm and maxterm
// flip-flops get the same input and must agree in every cycle.
`include "tb_fuzzy_ref.svh"
module tb_t_fff;
  import fuzzy_pkg::*;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit   run = 1'b0;

  always #5 clk = ~clk;

  function automatic int ref_next(int ops, int form, int t, int q, int one);
    if (form == 0) begin
      case (ops)
        2: return (t >= q) ? t - q : q - t;
        3: begin
          if (t == 0)   return q;
          if (q == 0)   return t;
          if (t == one) return one - q;
          if (q == one) return one - t;
          return 0;
        end
        default: return ref_sn(ops, ref_tn(ops, t, one - q, one), ref_tn(ops, one - t, q, one), one);
      endcase
    end else begin
      case (ops)
        2: return (t + q <= one) ? t + q : 2 * one - t - q;
        3: begin
          if (t == 0)   return q;
          if (q == 0)   return t;
          if (t == one) return one - q;
          if (q == one) return one - t;
          return one;
        end
        default: return ref_tn(ops, ref_sn(ops, t, q, one), ref_sn(ops, one - t, one - q, one), one);
      endcase
    end
  endfunction

  logic [3:0] t_shared;   // common input of the two max-min flip-flops
  logic [3:0] q_log_min, q_log_max;

  for (genvar v = 0; v < 8; v++) begin : g_v
    localparam int OPS  = v % 4;
    localparam int FORM = v / 4;
    localparam int W    = (OPS == 1) ? 5 : 4;
    localparam int ONE  = (OPS == 1) ? 16 : 15;

    logic [W-1:0] t, q;
    int exp_q;

    t_fff #(.OPSYS(op_sys_e'(OPS)), .FORM(t_form_e'(FORM)), .W(W), .ONE(ONE)) dut (
      .clk(clk), .rst_n(rst_n), .t(t), .q(q));

    initial begin
      t = '0;
      exp_q = 0;
    end

    always @(negedge clk) begin
      if (run) begin
        if (OPS == 0) t <= W'(t_shared);
        else begin
          case ($urandom_range(0, 5))
            0:       t <= '0;
            1:       t <= W'(ONE);
            default: t <= W'($urandom_range(0, ONE));
          endcase
        end
      end
    end

    always @(posedge clk) begin
      if (run) begin
        exp_q = ref_next(OPS, FORM, int'(t), exp_q, ONE);
        #1;
        checks++;
        if (int'(q) != exp_q) begin
          failures++;
          if (failures < 10)
            $display("FAIL ops=%0d form=%0d t=%0d q=%0d exp=%0d", OPS, FORM, t, q, exp_q);
        end
      end
    end
  end

  assign q_log_min = g_v[0].q;
  assign q_log_max = g_v[4].q;

  always @(negedge clk) begin
    if (run) begin
      case ($urandom_range(0, 5))
        0:       t_shared <= 4'd0;
        1:       t_shared <= 4'd15;
        default: t_shared <= 4'($urandom_range(0, 15));
      endcase
    end
  end

  initial begin
    t_shared = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    repeat (2000) begin
      @(posedge clk);
      #2;
      checks++;
      if (q_log_min != q_log_max) failures++;
    end
    run = 1'b0;
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
