// tb_fmem_maxmin: drives the max-min fuzzy memory element with random
// fuzzy inputs (0..128, i.e. [0,1] in 8-bit code) and random controls and
// compares Q every cycle with a model of the four state transitions
// (hold, load, min, max). Each control value must occur.
module tb_fmem_maxmin;
  int checks = 0;
  int failures = 0;
  int seen [4] = '{default: 0};
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] i, q;
  logic [1:0] c;
  int exp_q = 0;

  always #5 clk = ~clk;

  fmem_maxmin dut (.clk(clk), .rst_n(rst_n), .i(i), .c(c), .q(q));

  initial begin
    i = '0; c = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      i = 8'($urandom_range(0, 128));
      c = 2'($urandom_range(0, 3));
      @(posedge clk);
      seen[c]++;
      case (c)
        2'd0: ;
        2'd1: exp_q = int'(i);
        2'd2: exp_q = (int'(i) < exp_q) ? int'(i) : exp_q;
        2'd3: exp_q = (int'(i) > exp_q) ? int'(i) : exp_q;
      endcase
      #1;
      checks++;
      if (int'(q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d i=%0d q=%0d exp=%0d", c, i, q, exp_q);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
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
