// correlator: digital correlated double sampling. The TDC result of the
// window that just ended is read on every rising Enable (start of the next
// window, so the TDC register is settled). With half = 0 the sample is the
// first of a pair (the T+delta window) and is stored; with half = 1 it is the
// second (the T window) and corr = first - second, a quantised estimate of
// delta in TDC steps. Any offset common to both windows cancels.
// Timing: corr changes on the rising Enable that brings the second sample
// and holds for two Enable periods. Reset clears both registers.
// Start-up blanking (this design's own choice): the first BLANK_PAIRS pair
// slots after reset give corr = 0. The first window after reset lasts from
// reset to the first reference edge, up to a whole reference period, and
// would otherwise enter the accumulator as a huge false delta; with slow
// references (N = 128) that one sample throws the loop far enough that the
// reference edge arrives before Sel and the ring loses lock. Two slots are
// needed because clk_div2 resets to 1, so the first slot falls on the very
// first Enable edge and the second holds the start-up window.
module correlator
  import mdll_pkg::*;
#(
  parameter int unsigned BLANK_PAIRS = 2
)(
  input  logic  clk,     // Enable
  input  logic  rst_n,
  input  logic  half,    // pair phase from clk_div2 (value before the edge)
  input  tdc_t  tdc,
  output corr_t corr
);
  timeunit 1ps;
  timeprecision 1fs;

  tdc_t first;
  logic [1:0] warm;   // pair slots seen since reset, saturating at BLANK_PAIRS

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first <= '0;
      corr  <= '0;
      warm  <= '0;
    end else if (!half) begin
      first <= tdc;
    end else if (32'(warm) < BLANK_PAIRS) begin
      corr <= '0;
      warm <= warm + 1'b1;
    end else begin
      corr <= $signed({1'b0, first}) - $signed({1'b0, tdc});
    end
  end
endmodule
