// tb_ring_osc_mux: (1) with sel low, measures the Outbuf_n period for several
// fine and coarse voltages and compares it with 1/f from the tuning law;
// (2) with the testbench acting as select logic (sel = out1 while armed),
// checks that the rising reference edge reaches Out1 (falling) after three
// stage delays (two buffer cells and the first stage), and that the ring
// then continues with its normal period.
module tb_ring_osc_mux;
  timeunit 1ps;
  timeprecision 1fs;
  int checks = 0, failures = 0;
  logic refin = 0, sel, armed = 0;
  real tune_f = 0.6, tune_c = 0.6;
  logic mux, out1, out1_n, out3, outbuf_n, out_o;

  ring_osc_mux dut (.refin(refin), .sel(sel), .tune_f(tune_f), .tune_c(tune_c),
                    .mux(mux), .out1(out1), .out1_n(out1_n), .out3(out3),
                    .outbuf_n(outbuf_n), .out_o(out_o));

  assign sel = out1 & armed;
  always @(negedge out1) armed = 0;

  function automatic real f_of(real vf, real vc);
    return 1.6e9 + 200.0e6 * (vf - 0.6) + 1.0e9 * (vc - 0.6);
  endfunction

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime t0, t1, tr, exp_p, td;
    real r;
    #5000;
    for (int k = 0; k < 6; k++) begin
      tune_f = 0.1 + 0.2 * real'(k);
      tune_c = (k == 5) ? 0.65 : 0.6;
      repeat (3) @(posedge outbuf_n);
      t0 = $realtime;
      repeat (10) @(posedge outbuf_n);
      t1 = $realtime;
      exp_p = 1.0e12 / f_of(tune_f, tune_c);
      r = (t1 - t0) / 10.0 - exp_p;
      checks++;
      if (r > 0.01 || r < -0.01) begin failures++; $display("FAIL period %f exp %f", (t1-t0)/10.0, exp_p); end
      checks++; if (out_o != outbuf_n) begin failures++; $display("FAIL out_o"); end
    end
    // reference injection: ring running at 1.6 GHz
    tune_f = 0.6; tune_c = 0.6;
    td = 1.0e12 / (10.0 * 1.6e9);
    for (int k = 0; k < 5; k++) begin
      @(negedge out1); #(td); armed = 1;     // Sel will rise with the next Out1 rise
      @(posedge sel);
      #(3.0 * td + 10.0 * k);                // reference rises late by a varying amount
      refin = 1; tr = $realtime;
      @(negedge out1);
      r = ($realtime - tr) - 3.0 * td;
      checks++;
      if (r > 0.01 || r < -0.01) begin failures++; $display("FAIL injection delay %f", $realtime - tr); end
      // the next cycle is an ordinary period
      @(posedge outbuf_n); t0 = $realtime; @(posedge outbuf_n);
      r = ($realtime - t0) - 10.0 * td;
      checks++;
      if (r > 0.01 || r < -0.01) begin failures++; $display("FAIL period after injection %f", $realtime - t0); end
      #3000 refin = 0; #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
