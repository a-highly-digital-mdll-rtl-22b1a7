// tb_dac16: random codes; vout must equal 1.2 V * code / 65536.
module tb_dac16;
  timeunit 1ps;
  timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [15:0] code = '0;
  real vout, e;

  dac16 dut (.code(code), .vout(vout));

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      code = (k == 0) ? 16'h0000 : (k == 1) ? 16'hFFFF : 16'($urandom);
      #100;
      e = vout - 1.2 * real'(code) / 65536.0;
      checks++;
      if (e > 1.0e-12 || e < -1.0e-12) begin failures++; $display("FAIL code %h vout %f", code, vout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
