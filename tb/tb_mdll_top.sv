// tb_mdll_top: the whole clock multiplier in closed loop, with the top at its
// default parameters. The coarse voltage is set so that the free ring runs
// about 2 % fast; the loop must pull the fine voltage down until the period
// holding the reference edge equals the others. delta is measured directly
// as (window holding a Sel pulse) - (next window) on the en/dis pair.
//  phase A: 50 MHz reference, N = 32, acquisition gain (shift 12)
//  phase B: same, tracking gain (shift 8, about 8 kHz loop bandwidth):
//           loop-gain change by bit shift
//  phase C: 25 MHz reference, N = 64 (reference-divider / N mode switch),
//           then 12.5 MHz with N = 128 and 100 MHz with N = 16; the
//           100 MHz case uses one more bit of shift because the loop gain
//           per reference cycle scales with N
//  phase D: mode = 0: select logic off, ring free-running
// Checks: |mean delta| at lock, Vtune near the analytic lock voltage, N
// output cycles per reference cycle, no Sel with mode = 0. Each mechanism
// (edge injection, ring stall, early reference edge, sigma-delta dither,
// gain change, reference-mode change, free-run) is counted and must occur.
module tb_mdll_top;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;
  int checks = 0, failures = 0;
  logic clk_100m = 0, rst_n = 1, mode = 1;
  ref_sel_e ref_sel = REF_50M;
  logic [NLOG2_W-1:0] n_log2 = 3'd5;
  logic [SHIFT_W-1:0] gain_shift = 4'd12;
  real tune_c = 0.63, vtune;
  logic clk_out, ref_o, sel, enable;
  tdc_t tdc;
  corr_t corr;
  tune_t tune;
  logic [DAC_W-1:0] dac_code;

  mdll_top dut (.clk_100m(clk_100m), .rst_n(rst_n), .mode(mode), .ref_sel(ref_sel),
                .n_log2(n_log2), .gain_shift(gain_shift), .tune_c(tune_c),
                .clk_out(clk_out), .ref_o(ref_o), .sel(sel), .enable(enable),
                .tdc(tdc), .corr(corr), .tune(tune), .dac_code(dac_code), .vtune(vtune));

  always #5000 clk_100m = ~clk_100m;

  // mechanism counters
  int n_inject = 0, n_stall = 0, n_early = 0, n_dither = 0, n_gain = 0, n_refmode = 0, n_freerun = 0;
  int out_edges = 0, ref_edges = 0;
  always @(posedge sel) n_inject++;
  always @(posedge clk_out) out_edges++;
  always @(posedge ref_o) ref_edges++;
  always @(dac_code) n_dither++;

  // delta measurement on the Enable windows
  realtime t_rise, w_prev;
  logic sel_in_win = 0, prev_had_sel = 0;
  real delta_sum = 0.0;
  int  delta_n = 0;
  logic measuring = 0;
  always @(posedge sel) sel_in_win = 1;
  always @(posedge enable) begin t_rise = $realtime; sel_in_win = 0; end
  always @(negedge enable) begin
    real w, d;
    w = $realtime - t_rise;
    if (prev_had_sel && !sel_in_win) begin
      d = w_prev - w;
      if (d > 50.0) n_stall++;
      if (d < 0.0)  n_early++;
      if (measuring) begin delta_sum += d; delta_n++; end
    end
    prev_had_sel = sel_in_win;
    w_prev = w;
  end

  initial begin
    #400000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction

  task automatic restart(input ref_sel_e rs, input int nl);
    rst_n = 0; ref_sel = rs; n_log2 = NLOG2_W'(nl);
    #100000;
    @(posedge clk_100m); #100 rst_n = 1;
  endtask

  task automatic measure(input int cycles, input real tol_ps, input string what);
    real m, v_lock;
    int o0, r0, n;
    n = 1 << int'(n_log2);
    o0 = out_edges; r0 = ref_edges;
    delta_sum = 0.0; delta_n = 0; measuring = 1;
    repeat (cycles) @(posedge ref_o);
    measuring = 0;
    m = delta_sum / real'(delta_n);
    // lock: f = N*fref = 1.6 GHz  ->  0.6 + (1.6e9 - F(tune_c)) / 200 MHz/V
    v_lock = 0.6 + (1.6e9 - (1.6e9 + 1.0e9 * (tune_c - 0.6))) / 200.0e6;
    checks += 3;
    if (absr(m) > tol_ps) begin failures++; $display("FAIL %s: mean delta %f ps", what, m); end
    if (absr(vtune - v_lock) > 0.005) begin failures++; $display("FAIL %s: vtune %f exp %f", what, vtune, v_lock); end
    if (out_edges - o0 < n * (ref_edges - r0) - 1 || out_edges - o0 > n * (ref_edges - r0) + 1) begin
      failures++; $display("FAIL %s: %0d output cycles for %0d reference cycles", what, out_edges - o0, ref_edges - r0);
    end
    $display("INFO %s: mean delta %0.3f ps over %0d cycles, vtune %0.4f V (lock %0.4f)", what, m, delta_n, vtune, v_lock);
  endtask

  initial begin
    int s0;
    // A: acquisition
    restart(REF_50M, 5);
    repeat (500) @(posedge ref_o);
    measure(300, 3.0, "A 50MHz shift12");
    // B: tracking gain
    gain_shift = 4'd8; n_gain++;
    repeat (500) @(posedge ref_o);
    measure(1500, 1.0, "B 50MHz shift8");
    // C: 25 MHz reference, N = 64
    gain_shift = 4'd12;
    restart(REF_25M, 6); n_refmode++;
    repeat (400) @(posedge ref_o);
    measure(300, 3.0, "C 25MHz N64");
    restart(REF_12M5, 7); n_refmode++;
    repeat (400) @(posedge ref_o);
    measure(300, 3.0, "C 12.5MHz N128");
    gain_shift = 4'd13;
    restart(REF_100M, 4); n_refmode++;
    repeat (400) @(posedge ref_o);
    measure(300, 3.0, "C 100MHz N16");
    // D: free-running ring
    mode = 0; n_freerun++;
    repeat (5) @(posedge ref_o);
    s0 = n_inject;
    repeat (20) @(posedge ref_o);
    checks++;
    if (n_inject != s0) begin failures++; $display("FAIL Sel pulses with mode = 0"); end
    // every mechanism must have happened
    checks += 7;
    if (n_inject  == 0) begin failures++; $display("FAIL no reference injection"); end
    if (n_stall   == 0) begin failures++; $display("FAIL no ring stall"); end
    if (n_early   == 0) begin failures++; $display("FAIL no early reference edge"); end
    if (n_dither  == 0) begin failures++; $display("FAIL no sigma-delta activity"); end
    if (n_gain    == 0) begin failures++; $display("FAIL no gain change"); end
    if (n_refmode == 0) begin failures++; $display("FAIL no reference mode change"); end
    if (n_freerun == 0) begin failures++; $display("FAIL no free-run"); end
    $display("INFO inject=%0d stall=%0d early=%0d dac_changes=%0d", n_inject, n_stall, n_early, n_dither);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
