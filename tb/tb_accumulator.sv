// tb_accumulator: random corr and gain_shift; an integer model of
// acc -= corr << shift with saturation at 0 and 2^24-1 is compared with the
// block every clock, including runs that pin the accumulator at both ends.
module tb_accumulator;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;
  int checks = 0, failures = 0, sat_lo = 0, sat_hi = 0;
  logic clk = 0, rst_n = 1;
  corr_t corr = '0;
  logic [SHIFT_W-1:0] sh = '0;
  logic [ACC_W-1:0] acc;
  tune_t tune;
  longint m;

  accumulator dut (.clk(clk), .rst_n(rst_n), .corr(corr), .gain_shift(sh),
                   .acc(acc), .tune(tune));

  initial #1 rst_n = 0;

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #100;
    checks++; if (acc != 24'h800000) begin failures++; $display("FAIL reset"); end
    m = 64'h800000;
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      int c;
      if (k < 1000)      c = $urandom_range(0, 40) - 20;
      else if (k < 1500) c = $urandom_range(0, 500);           // drive down
      else if (k < 2000) c = -int'($urandom_range(0, 500));    // drive up
      else               c = $urandom_range(0, 2046) - 1023;
      corr = corr_t'(c);
      sh = SHIFT_W'($urandom_range(0, 15));
      #500 clk = 1;
      m = m - (longint'(c) <<< sh);
      if (m < 0) begin m = 0; sat_lo++; end
      if (m > 64'hFFFFFF) begin m = 64'hFFFFFF; sat_hi++; end
      #10;
      checks += 2;
      if (longint'(acc) != m) begin failures++; $display("FAIL k=%0d acc %h exp %h", k, acc, m); end
      if (tune != acc[23:8]) begin failures++; $display("FAIL tune"); end
      #490 clk = 0;
    end
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin failures++; $display("FAIL saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
