// tb_fpga_tuning_loop: drives Enable pulses; before each rising Enable the
// TDC port holds the result of the previous window (random values around a
// 1.6 GHz period, with the T+delta window first after reset). A reference
// model of the pair phase, correlator (first - second), saturating
// accumulator (acc -= corr << shift) and first-order sigma-delta is stepped
// on the same edges and compared after every edge: corr, tune and the full
// DAC code (8 modulated MSBs, zero LSBs). The divided clock must run at half
// the Enable rate. The loop gain setting is changed half way. The first two
// pair slots after reset are start-up slots with corr = 0.
module tb_fpga_tuning_loop;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;
  int checks = 0, failures = 0;
  logic enable = 0, rst_n = 1, clk_ref;
  tdc_t tdc = '0;
  logic [SHIFT_W-1:0] gain_shift = 4'd6;
  corr_t corr;
  tune_t tune;
  logic [DAC_W-1:0] dac_code;
  int ref_edges = 0;

  fpga_tuning_loop dut (.enable(enable), .rst_n(rst_n), .tdc(tdc), .gain_shift(gain_shift),
                        .corr(corr), .tune(tune), .dac_code(dac_code), .clk_ref(clk_ref));

  always @(posedge clk_ref) ref_edges++;

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial #1 rst_n = 0;

  initial begin
    longint acc_m, sum;
    int first_m, corr_m, res_m, code_m, tune_m, delta, slots;
    logic half_m;
    #100 rst_n = 1;
    acc_m = 64'h800000; half_m = 1; first_m = 0; corr_m = 0; res_m = 0; code_m = 128; slots = 0;
    delta = 3;
    for (int j = 0; j < 4000; j++) begin
      if (j == 2000) gain_shift = 4'd11;
      if (j % 400 == 0) delta = $urandom_range(0, 8) - 4;
      // result of window j-1: odd j -> T+delta window, even j -> T window
      tdc = tdc_t'((j % 2 == 1) ? 14 + delta + $urandom_range(0, 1) : 13 + $urandom_range(0, 1));
      #4000 enable = 1;
      // model
      if (half_m) begin
        corr_m = (slots < 2) ? 0 : first_m - int'(tdc);
        slots++;
      end
      else        first_m = int'(tdc);
      half_m = ~half_m;
      if (half_m) begin      // rising Enable/2: accumulator and modulator
        tune_m = int'(acc_m >> 8);
        sum    = longint'(tune_m) + res_m;
        res_m  = int'(sum & 255);
        code_m = (sum > 65535) ? 255 : int'(sum >> 8);
        acc_m  = acc_m - (longint'(corr_m) <<< gain_shift);
        if (acc_m < 0) acc_m = 0;
        if (acc_m > 64'hFFFFFF) acc_m = 64'hFFFFFF;
      end
      #10;
      checks += 3;
      if (int'(corr) != corr_m) begin failures++; $display("FAIL j=%0d corr %0d exp %0d", j, corr, corr_m); end
      if (longint'(tune) != (acc_m >> 8)) begin failures++; $display("FAIL j=%0d tune %h exp %h", j, tune, acc_m >> 8); end
      if (dac_code != 16'(code_m << 8)) begin failures++; $display("FAIL j=%0d dac %h exp %h", j, dac_code, code_m << 8); end
      #690 enable = 0;
    end
    checks++;
    if (ref_edges != 2000) begin failures++; $display("FAIL clk_ref edges %0d", ref_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
