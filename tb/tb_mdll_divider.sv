// tb_mdll_divider: for every divide ratio N = 4..128 resets the divider and
// counts clock cycles between rising edges of div_raw (must be N, high for
// N/2) and of div2x_raw (must be N/2), and checks that every rising div_raw
// coincides with a rising div2x_raw.
module tb_mdll_divider;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  logic [NLOG2_W-1:0] n_log2;
  logic div_raw, div2x_raw;

  mdll_divider dut (.clk(clk), .rst_n(rst_n), .n_log2(n_log2),
                    .div_raw(div_raw), .div2x_raw(div2x_raw));

  always #312.5 clk = ~clk;

  initial #1 rst_n = 0;

  initial begin
    #5000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int l = 2; l <= 7; l++) begin
      int n, cyc, last_d, last_x, high;
      logic pd, px;
      n = 1 << l; cyc = 0; last_d = -1; last_x = -1; high = 0;
      n_log2 = NLOG2_W'(l);
      rst_n = 0; repeat (3) @(posedge clk); #10 rst_n = 1;
      pd = div_raw; px = div2x_raw;
      repeat (6*n) begin
        @(posedge clk); #10; cyc++;
        if (div_raw) high++;
        if (div_raw && !pd) begin
          checks++;
          if (!(div2x_raw && !px)) begin failures++; $display("FAIL align N=%0d", n); end
          if (last_d >= 0) begin
            checks++;
            if (cyc - last_d != n) begin failures++; $display("FAIL div period N=%0d got %0d", n, cyc-last_d); end
          end
          last_d = cyc;
        end
        if (div2x_raw && !px) begin
          if (last_x >= 0) begin
            checks++;
            if (cyc - last_x != n/2) begin failures++; $display("FAIL div2x period N=%0d got %0d", n, cyc-last_x); end
          end
          last_x = cyc;
        end
        pd = div_raw; px = div2x_raw;
      end
      checks++;
      if (high != 3*n) begin failures++; $display("FAIL duty N=%0d high=%0d", n, high); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
