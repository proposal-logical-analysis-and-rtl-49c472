// tb_fuzzy_snorm: exhaustive check of the fuzzy s-norm under all four
// operation systems, at the 4-bit coding (ONE = 15), the 5-bit algebraic
// coding (ONE = 16) and, for max-min and bounded, the 8-bit coding
// (ONE = 128). Expected values are written out from the definitions: max,
// a + b - floor(a*b/ONE), min(ONE, a+b) and the drastic sum. Also checks
// that 0 is the identity and 1 absorbs, and that no result exceeds 1.
module tb_fuzzy_snorm;
  import fuzzy_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [4:0] a5, b5;
  logic [7:0] a8, b8;
  logic [3:0] y_log, y_bdd, y_dra;
  logic [4:0] y_alg;
  logic [7:0] y_log8, y_bdd8;

  fuzzy_snorm #(.OPSYS(OPS_LOGICAL),   .W(4), .ONE(15))  u_log  (.a(a4), .b(b4), .y(y_log));
  fuzzy_snorm #(.OPSYS(OPS_ALGEBRAIC), .W(5), .ONE(16))  u_alg  (.a(a5), .b(b5), .y(y_alg));
  fuzzy_snorm #(.OPSYS(OPS_BOUNDED),   .W(4), .ONE(15))  u_bdd  (.a(a4), .b(b4), .y(y_bdd));
  fuzzy_snorm #(.OPSYS(OPS_DRASTIC),   .W(4), .ONE(15))  u_dra  (.a(a4), .b(b4), .y(y_dra));
  fuzzy_snorm #(.OPSYS(OPS_LOGICAL),   .W(8), .ONE(128)) u_log8 (.a(a8), .b(b8), .y(y_log8));
  fuzzy_snorm #(.OPSYS(OPS_BOUNDED),   .W(8), .ONE(128)) u_bdd8 (.a(a8), .b(b8), .y(y_bdd8));

  task automatic check(input string what, input int got, input int exp, input int x, input int y);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, x, y, got, exp);
    end
  endtask

  function automatic int drastic_s(int x, int y, int one);
    if (x == 0) return y;
    if (y == 0) return x;
    return one;
  endfunction

  initial begin
    for (int x = 0; x <= 15; x++) begin
      for (int y = 0; y <= 15; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        check("logical", int'(y_log), (x >= y) ? x : y, x, y);
        check("bounded", int'(y_bdd), (x + y < 15) ? x + y : 15, x, y);
        check("drastic", int'(y_dra), drastic_s(x, y, 15), x, y);
      end
    end
    for (int x = 0; x <= 16; x++) begin
      for (int y = 0; y <= 16; y++) begin
        a5 = 5'(x); b5 = 5'(y);
        #1;
        check("algebraic", int'(y_alg), x + y - (x * y) / 16, x, y);
        checks++;
        if (int'(y_alg) > 16) failures++;
        if (y == 0)  check("alg identity", int'(y_alg), x, x, y);
        if (y == 16) check("alg absorb",   int'(y_alg), 16, x, y);
      end
    end
    for (int x = 0; x <= 128; x++) begin
      for (int y = 0; y <= 128; y += 3) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        check("logical8", int'(y_log8), (x >= y) ? x : y, x, y);
        check("bounded8", int'(y_bdd8), (x + y < 128) ? x + y : 128, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
