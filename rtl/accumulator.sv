// accumulator: digital integrator of the tuning loop. Every reference cycle
// it subtracts corr shifted left by gain_shift (the loop gain is set by bit
// shifting) and saturates at the ends of its range, so its DC gain is
// unlimited but it cannot wrap. A positive corr means the cycle holding the
// reference edge is longer than the others, i.e. the ring runs fast, so the
// tuning word is lowered. tune is the top TUNE_W bits of the accumulator.
// Width (24 bits), sign convention, saturation and the mid-scale reset value
// are this design's choices; the published design gives only "accumulator" and
// "gain adjusted by bit shifting".
// Timing: one update per rising clk; tune follows combinationally.
module accumulator
  import mdll_pkg::*;
#(
  parameter int unsigned        ACC_W_P  = ACC_W,
  parameter logic [ACC_W_P-1:0] ACC_INIT = ACC_W_P'(1) << (ACC_W_P - 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  corr_t              corr,
  input  logic [SHIFT_W-1:0] gain_shift,
  output logic [ACC_W_P-1:0] acc,
  output tune_t              tune
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SUM_W = ACC_W_P + CORR_W + (1 << SHIFT_W) + 1;

  logic signed [SUM_W-1:0] step, sum;

  always_comb begin
    step = SUM_W'(corr) <<< gain_shift;           // sign-extended, then shifted
    sum  = $signed({{(SUM_W - ACC_W_P){1'b0}}, acc}) - step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               acc <= ACC_INIT;
    else if (sum < 0)                         acc <= '0;
    else if (sum > $signed(SUM_W'({ACC_W_P{1'b1}}))) acc <= '1;
    else                                      acc <= sum[ACC_W_P-1:0];
  end

  assign tune = acc[ACC_W_P-1 -: TUNE_W];
endmodule
