// tb_clk_div2: q starts at 1 after reset and toggles on every rising clk.
module tb_clk_div2;
  timeunit 1ps;
  timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, q, exp_q;

  clk_div2 dut (.clk(clk), .rst_n(rst_n), .q(q));

  initial #1 rst_n = 0;

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #100; checks++; if (q !== 1'b1) begin failures++; $display("FAIL reset value"); end
    exp_q = 1'b1;
    rst_n = 1;
    repeat (100) begin
      #($urandom_range(300, 9000)) clk = 1; exp_q = ~exp_q; #1;
      checks++; if (q !== exp_q) begin failures++; $display("FAIL toggle"); end
      #($urandom_range(300, 9000)) clk = 0; #1;
      checks++; if (q !== exp_q) begin failures++; $display("FAIL falling edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
