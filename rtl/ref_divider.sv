// ref_divider: on-chip divider of the off-chip 100 MHz reference, giving
// 100, 50, 25 or 12.5 MHz as selected. A 3-bit ripple-free binary counter is
// clocked by the 100 MHz input; the output is the input itself or one of the
// counter bits (50 % duty). The selection is a static setting; changing it
// while running may produce one short pulse. Counter structure and reset are
// this design's choices; the set of frequencies follows the prototype.
module ref_divider
  import mdll_pkg::*;
(
  input  logic     clk_100m,
  input  logic     rst_n,
  input  ref_sel_e ref_sel,
  output logic     ref_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [2:0] cnt;

  always_ff @(posedge clk_100m or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_comb begin
    unique case (ref_sel)
      REF_100M: ref_o = clk_100m;
      REF_50M:  ref_o = cnt[0];
      REF_25M:  ref_o = cnt[1];
      REF_12M5: ref_o = cnt[2];
      default:  ref_o = cnt[0];
    endcase
  end
endmodule
