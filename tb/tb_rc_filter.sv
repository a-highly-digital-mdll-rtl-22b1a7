// tb_rc_filter: steps the input and compares the output with the analytic
// first-order response v(t) = vin + (v0 - vin) exp(-t/tau), tau = 1/(2 pi 3 MHz),
// at several times; checks the start value and the final value.
module tb_rc_filter;
  timeunit 1ps;
  timeprecision 1fs;
  localparam real TAU = 1.0e12 / (2.0 * 3.14159265358979 * 3.0e6);
  int checks = 0, failures = 0;
  real vin = 0.6, vout, exp_v, e;

  rc_filter dut (.vin(vin), .vout(vout));

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    #1000;
    checks++; if (vout != 0.6) begin failures++; $display("FAIL start %f", vout); end
    vin = 1.0;
    for (int k = 1; k <= 20; k++) begin
      #(TAU / 4.0);
      exp_v = 1.0 + (0.6 - 1.0) * $exp(-real'(k) * (TAU / 4.0) / TAU);
      e = vout - exp_v;
      checks++;
      if (e > 0.004 || e < -0.004) begin failures++; $display("FAIL k=%0d vout %f exp %f", k, vout, exp_v); end
    end
    vin = 0.2;
    #(10.0 * TAU);
    checks++; if (vout - 0.2 > 1.0e-3 || 0.2 - vout > 1.0e-3) begin failures++; $display("FAIL final %f", vout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
