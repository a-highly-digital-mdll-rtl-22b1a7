// mdll_divider: divide-by-N counter of the MDLL core, clocked by Outbuf_n
// (the inverted third ring stage). It produces two raw squares: div_raw at
// the reference rate (f_out/N) and div2x_raw at twice that rate. Both rise on
// the same clock edge once per N cycles (counter wrap), and div2x_raw rises a
// second time half way through, so that the edge generator can open one TDC
// measurement window on the cycle that contains the reference edge (T+delta)
// and one on an ordinary cycle (T).
//
// N = 2**n_log2 is a run-time setting (N = 32 gives 1.6 GHz from 50 MHz;
// 16/64/128 go with the 100/25/12.5 MHz references). Restricting N to powers
// of two, the counter encoding and the reset state are this design's choices.
// Timing: outputs change one clock after the counter edge; async active-low
// reset to count 0 (both outputs high, so they rise together when the
// retiming flops leave reset).
module mdll_divider
  import mdll_pkg::*;
#(
  parameter int unsigned NLOG2_MAX_P = NLOG2_MAX
) (
  input  logic               clk,        // Outbuf_n
  input  logic               rst_n,
  input  logic [NLOG2_W-1:0] n_log2,     // 2..NLOG2_MAX_P
  output logic               div_raw,
  output logic               div2x_raw
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [NLOG2_MAX_P-1:0] cnt, mask;
  logic [NLOG2_W-1:0]     l;

  // clamp the setting to the supported range
  always_comb begin
    l = n_log2;
    if (l < 2)                           l = 2;
    if (l > NLOG2_W'(NLOG2_MAX_P))       l = NLOG2_W'(NLOG2_MAX_P);
    mask = NLOG2_MAX_P'((1 << l) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= (cnt + 1'b1) & mask;
  end

  assign div_raw   = ~cnt[l-1];
  assign div2x_raw = ~cnt[l-2];
endmodule
