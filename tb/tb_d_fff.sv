// tb_d_fff: the D fuzzy flip-flop must show at Q the code D had at the
// previous rising clock edge, for every 4-bit code. Random and directed
// codes are applied for a few hundred cycles after reset.
module tb_d_fff;
  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] d, q, d_prev;

  always #5 clk = ~clk;

  d_fff #(.W(4)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != 4'd0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      d = (n < 16) ? 4'(n) : 4'($urandom_range(0, 15));
      d_prev = d;
      @(posedge clk);
      #1;
      checks++;
      if (q != d_prev) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%0d expected %0d", n, q, d_prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
