// d_fff: D fuzzy flip-flop, Q(t+1) = D(t).
//
// The fuzzy value is a W-bit code (0 = false, ONE = true), and the flip-flop
// is simply W binary D flip-flops in parallel: one clock of delay, no logic
// between input and register, and the same behaviour under every fuzzy
// operation system. That structure and the 4-bit default follow the
// document. The asynchronous active-low reset to 0 is this design's addition
// so that the output is defined before the first clock.
//
// Timing: d is sampled at the rising edge of clk; q shows it right after.
module d_fff
  import fuzzy_pkg::*;
#(
  parameter int unsigned W = FF_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule
