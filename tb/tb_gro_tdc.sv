// tb_gro_tdc: the GRO TDC measuring windows from Ref to In (both rising).
//  1. Random widths: every result is floor or ceil of width/45 ps, and the
//     sum of all results equals floor(sum of widths / 45 ps): the
//     quantisation error of each sample is q[k]-q[k-1] (first-order shaping).
//  2. Constant width 625.0 ps (a 1.6 GHz period, 13.89 stage delays): the
//     results must scramble between 13 and 14 and average to 13.89.
//  3. The measurement test of the prototype, scaled: the window is modulated
//     by a 780 kHz sine (sample rate 50 MHz); the running error sum of the
//     output against the true width stays within one count.
module tb_gro_tdc;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TD = 45.0;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic rst_n = 1, ref_i = 0, in_i = 0, enable;
  logic [9:0] out;

  gro_tdc dut (.rst_n(rst_n), .ref_i(ref_i), .in_i(in_i), .enable(enable), .out(out));

  initial #1 rst_n = 0;

  initial begin
    #500000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  real total, sum_out;

  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction

  task automatic window(input realtime w, output int res);
    ref_i = 1; #(w); in_i = 1; #100;
    res = int'(out);
    ref_i = 0; #500; in_i = 0; #(19400.0 - w);
  endtask

  initial begin
    int r, n13, n14, lo, hi;
    realtime w;
    real err;
    #1000 rst_n = 1; #1000;
    // 1. random widths
    total = 0; sum_out = 0;
    for (int k = 0; k < 300; k++) begin
      w = 200.0 + real'($urandom_range(0, 1500000)) / 100.0;
      window(w, r);
      total += w; sum_out += r;
      checks++;
      if (r != int'($floor(w / TD)) && r != int'($ceil(w / TD))) begin
        failures++; $display("FAIL sample %0d width %f got %0d", k, w, r);
      end
    end
    checks++;
    if (sum_out != $floor(total / TD)) begin
      failures++; $display("FAIL sum %f exp %f", sum_out, $floor(total / TD));
    end
    // 2. scrambling at a constant width
    n13 = 0; n14 = 0; sum_out = 0;
    for (int k = 0; k < 900; k++) begin
      window(625.0, r);
      if (r == 13) n13++; else if (r == 14) n14++;
      sum_out += r;
    end
    checks += 2;
    if (n13 + n14 != 900 || n13 == 0 || n14 == 0) begin
      failures++; $display("FAIL scrambling n13=%0d n14=%0d", n13, n14);
    end
    if (absr(sum_out / 900.0 - 625.0 / TD) > 2.0 / 900.0) begin
      failures++; $display("FAIL mean %f", sum_out / 900.0);
    end
    // 3. sine-modulated window
    err = 0; lo = 1000; hi = 0;
    for (int k = 0; k < 640; k++) begin
      w = 5000.0 + 3000.0 * $sin(2.0 * PI * 780.0e3 * real'(k) / 50.0e6);
      window(w, r);
      err += real'(r) - w / TD;
      if (r < lo) lo = r;
      if (r > hi) hi = r;
      checks++;
      if (absr(err) > 1.0 + 1.0e-6) begin failures++; $display("FAIL running error %f at %0d", err, k); end
    end
    checks++;
    if (lo > 50 || hi < 170) begin failures++; $display("FAIL modulation range %0d..%0d", lo, hi); end
    $display("INFO scrambling: 13 x%0d, 14 x%0d", n13, n14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
