// tb_sr_fff_bits: the set-type SR fuzzy flip-flop across quantization
// widths. The circuit area and delay of this flip-flop are usually compared
// over data-bus widths from 1 to 16 bits; this testbench builds it at
// W = 1, 2, 4, 6, 8, 10, 12, 14 and 16 bits under all four operation systems
// (36 instances side by side) and checks every instance every cycle against
// a 64-bit integer model of Q+ = S s (~R t Q).
//
// Coding per width (this testbench's choice, extending the 4-bit coding):
// ONE = 2^W - 1 (all ones) for the logical, bounded and drastic systems,
// and ONE = 2^(W-1) (top bit alone) for the algebraic system, so that its
// product scales by a shift, as the 5-bit algebraic coding does.
//
// Stimulus: each instance gets its own random S, R stream with binary set,
// reset, hold and S = R = 1 cycles mixed in. Inputs change on the falling
// edge; results are compared just after the rising edge.
module tb_sr_fff_bits;
  import fuzzy_pkg::*;
  localparam int NW = 9;
  localparam int WIDTHS [NW] = '{1, 2, 4, 6, 8, 10, 12, 14, 16};
  localparam int NCFG = NW * 4;
  localparam int CYCLES = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bit   run = 1'b0;
  int   chk_a  [NCFG];
  int   fail_a [NCFG];
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  function automatic longint tn(int ops, longint a, longint b, longint one);
    case (ops)
      0: return (a < b) ? a : b;
      1: return (a * b) / one;
      2: return (a + b > one) ? a + b - one : 0;
      default: return (a == one) ? b : ((b == one) ? a : 0);
    endcase
  endfunction
  function automatic longint sn(int ops, longint a, longint b, longint one);
    case (ops)
      0: return (a > b) ? a : b;
      1: return a + b - (a * b) / one;
      2: return (a + b < one) ? a + b : one;
      default: return (a == 0) ? b : ((b == 0) ? a : one);
    endcase
  endfunction

  for (genvar wi = 0; wi < NW; wi++) begin : g_w
    for (genvar o = 0; o < 4; o++) begin : g_o
      localparam int W   = WIDTHS[wi];
      localparam int ONE = (o == 1) ? (1 << (W - 1)) : ((1 << W) - 1);
      localparam int IDX = wi * 4 + o;
      logic [W-1:0] s, r, q;
      longint       model;

      sr_fff #(.OPSYS(op_sys_e'(o)), .SRTYPE(SR_SET_TYPE), .W(W), .ONE(ONE)) u_dut (
        .clk, .rst_n, .s, .r, .q
      );

      function automatic logic [W-1:0] pick();
        case ($urandom_range(0, 7))
          0: return W'(ONE);
          1: return '0;
          default: return W'($urandom_range(0, ONE));
        endcase
      endfunction

      initial begin
        s = '0;
        r = '0;
        model = 0;
        chk_a[IDX] = 0;
        fail_a[IDX] = 0;
      end

      always @(negedge clk) begin
        if (run) begin
          s <= pick();
          r <= pick();
        end
      end

      always @(posedge clk) begin
        if (run) begin
          model = sn(o, longint'(s), tn(o, longint'(ONE) - longint'(r), model, ONE), ONE);
          #1;
          chk_a[IDX]++;
          if (longint'(q) != model) begin
            fail_a[IDX]++;
            if (fail_a[IDX] < 3)
              $display("FAIL W=%0d ops=%0d q=%0d expected %0d", W, o, q, model);
          end
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    run = 1'b1;
    repeat (CYCLES) @(posedge clk);
    @(negedge clk);
    run = 1'b0;
    #2;
    for (int k = 0; k < NCFG; k++) begin
      checks += chk_a[k];
      failures += fail_a[k];
      if (chk_a[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
