// tb_ref_divider: measures the period and high time of ref_o for each
// setting with a 100 MHz input: 10, 20, 40 and 80 ns, 50 % duty.
module tb_ref_divider;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, ref_o;
  ref_sel_e rs;

  ref_divider dut (.clk_100m(clk), .rst_n(rst_n), .ref_sel(rs), .ref_o(ref_o));

  always #5000 clk = ~clk;

  initial #1 rst_n = 0;

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, t1, t2;
    for (int s = 0; s < 4; s++) begin
      rs = ref_sel_e'(s);
      rst_n = 0; #20000; rst_n = 1;
      repeat (2) @(posedge ref_o);
      repeat (4) begin
        t0 = $realtime; @(negedge ref_o); t1 = $realtime; @(posedge ref_o); t2 = $realtime;
        checks += 2;
        if (t2 - t0 != 10000.0 * (1 << s)) begin failures++; $display("FAIL period sel=%0d %0t", s, t2-t0); end
        if (t1 - t0 != 5000.0 * (1 << s))  begin failures++; $display("FAIL high sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
