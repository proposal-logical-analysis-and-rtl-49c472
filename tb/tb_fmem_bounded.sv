// tb_fmem_bounded: drives the bounded fuzzy memory element with random
// fuzzy inputs (0..128) and random controls 0..7 and compares Q every
// cycle with a model of the seven state transitions (hold, load, min, max,
// negation 1-Q, bounded product max(0,Q+I-1), bounded sum min(1,Q+I));
// control 7 must hold. Q must never exceed 1 (code 128).
module tb_fmem_bounded;
  int checks = 0;
  int failures = 0;
  int seen [8] = '{default: 0};
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] i, q;
  logic [2:0] c;
  int exp_q = 0;

  always #5 clk = ~clk;

  fmem_bounded dut (.clk(clk), .rst_n(rst_n), .i(i), .c(c), .q(q));

  initial begin
    i = '0; c = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      i = ($urandom_range(0, 7) == 0) ? 8'd128 : 8'($urandom_range(0, 128));
      c = 3'($urandom_range(0, 7));
      @(posedge clk);
      seen[c]++;
      case (c)
        3'd1: exp_q = int'(i);
        3'd2: exp_q = (int'(i) < exp_q) ? int'(i) : exp_q;
        3'd3: exp_q = (int'(i) > exp_q) ? int'(i) : exp_q;
        3'd4: exp_q = 128 - exp_q;
        3'd5: exp_q = (exp_q + int'(i) - 128 > 0) ? exp_q + int'(i) - 128 : 0;
        3'd6: exp_q = (exp_q + int'(i) < 128) ? exp_q + int'(i) : 128;
        default: ;
      endcase
      #1;
      checks += 2;
      if (int'(q) > 128) failures++;
      if (int'(q) != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL c=%0d i=%0d q=%0d exp=%0d", c, i, q, exp_q);
      end
    end
    for (int k = 0; k < 8; k++) begin
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
