// tb_correlator: feeds random TDC samples, one per rising clk, with half
// alternating 0,1 (as clk_div2 supplies it). On the edges with half = 1 corr
// must become (previous sample) - (current sample); on the others it holds.
// The first two half = 1 edges after reset are start-up slots and give 0.
module tb_correlator;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, half = 0;
  tdc_t tdc = '0;
  corr_t corr;
  int first, exp_c = 0, slots = 0;

  correlator dut (.clk(clk), .rst_n(rst_n), .half(half), .tdc(tdc), .corr(corr));

  initial #1 rst_n = 0;

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #100 rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      tdc  = tdc_t'($urandom_range(0, 1023));
      half = k[0];
      #500 clk = 1; #10;
      if (!half) first = int'(tdc);
      else begin
        exp_c = (slots < 2) ? 0 : first - int'(tdc);
        slots++;
      end
      checks++;
      if (int'(corr) != exp_c) begin
        failures++; $display("FAIL k=%0d corr %0d exp %0d", k, corr, exp_c);
      end
      #500 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
