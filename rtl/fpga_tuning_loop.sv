// fpga_tuning_loop: the digital part of the MDLL tuning loop that the
// prototype places in an FPGA: divide-by-2 of Enable, correlator,
// accumulator and first-order sigma-delta modulator. The correlator is
// clocked by Enable; the accumulator and the modulator by Enable/2, i.e. once
// per reference cycle. dac_code is the 16-bit DAC input: 8 modulated MSBs
// and 8 zero LSBs, as in the prototype.
// Timing: a TDC pair is turned into corr on the Enable edge after the second
// window, added into the accumulator on the next rising Enable/2 and reaches
// dac_code one Enable/2 period later.
module fpga_tuning_loop
  import mdll_pkg::*;
(
  input  logic               enable,      // GRO Enable (window strobe)
  input  logic               rst_n,
  input  tdc_t               tdc,
  input  logic [SHIFT_W-1:0] gain_shift,
  output corr_t              corr,
  output tune_t              tune,
  output logic [DAC_W-1:0]   dac_code,
  output logic               clk_ref      // Enable / 2
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [ACC_W-1:0] acc;
  logic [SD_W-1:0]  sd_code;

  clk_div2 u_div2 (.clk(enable), .rst_n(rst_n), .q(clk_ref));

  correlator u_corr (
    .clk(enable), .rst_n(rst_n), .half(clk_ref), .tdc(tdc), .corr(corr)
  );

  accumulator u_acc (
    .clk(clk_ref), .rst_n(rst_n), .corr(corr), .gain_shift(gain_shift),
    .acc(acc), .tune(tune)
  );

  sigma_delta u_sd (.clk(clk_ref), .rst_n(rst_n), .word(tune), .code(sd_code));

  assign dac_code = {sd_code, {(DAC_W - SD_W){1'b0}}};
endmodule
