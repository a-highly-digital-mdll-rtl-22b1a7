// tb_mdll_core: the MDLL core in open loop (fixed tuning voltages). For each
// case the testbench releases reset just after a 100 MHz edge, waits for the
// phase to settle and then measures the en->dis windows. With the ring period
// T = 1/f from the tuning law and delta = Tref - N*T, every window that holds
// a Sel pulse must last T+delta and every other one T (to 1 fs), Sel must
// pulse once per reference period, and clk_out must give N cycles per
// reference period. Cases cover a fast ring (the ring stalls waiting for the
// reference), a slow ring (reference edge early), 25 MHz with N = 64, and
// mode = 0 (select logic off: no Sel, all windows T).
module tb_mdll_core;
  timeunit 1ps;
  timeprecision 1fs;
  import mdll_pkg::*;
  int checks = 0, failures = 0;
  logic clk_100m = 0, rst_n = 1, mode = 1;
  ref_sel_e ref_sel = REF_50M;
  logic [NLOG2_W-1:0] n_log2 = 3'd5;
  real tune_f = 0.6, tune_c = 0.6;
  logic ref_o, clk_out, sel, div, en, dis;
  int sel_pulses = 0, out_edges = 0, ref_edges = 0;
  logic sel_seen = 0;
  realtime t_en;

  mdll_core dut (.clk_100m(clk_100m), .rst_n(rst_n), .mode(mode), .ref_sel(ref_sel),
                 .n_log2(n_log2), .tune_f(tune_f), .tune_c(tune_c), .ref_o(ref_o),
                 .clk_out(clk_out), .sel(sel), .div(div), .en(en), .dis(dis));

  always #5000 clk_100m = ~clk_100m;
  always @(posedge sel) begin sel_pulses++; sel_seen = 1; end
  always @(posedge clk_out) out_edges++;
  always @(posedge ref_o) ref_edges++;

  initial begin
    #200000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction

  task automatic run_case(input real vf, input real vc, input ref_sel_e rs,
                          input int nl, input logic md);
    real f, t, tref, delta, w;
    int n, s0, o0, r0, nw1, nw2;
    f = 1.6e9 + 200.0e6 * (vf - 0.6) + 1.0e9 * (vc - 0.6);
    // stage delays are rounded to the 1 fs time precision
    t = 10.0 * $floor(1.0e12 / (10.0 * f) * 1000.0 + 0.5) / 1000.0;
    n = 1 << nl;
    tref = 10000.0 * real'(1 << int'(rs));
    delta = tref - real'(n) * t;
    rst_n = 0; tune_f = vf; tune_c = vc; ref_sel = rs; n_log2 = NLOG2_W'(nl); mode = md;
    #20000;
    @(posedge clk_100m); #100 rst_n = 1;
    repeat (4) @(posedge ref_o);
    s0 = sel_pulses; o0 = out_edges; r0 = ref_edges; nw1 = 0; nw2 = 0;
    repeat (40) begin
      @(posedge en); t_en = $realtime; sel_seen = 0;
      @(posedge dis); w = $realtime - t_en;
      checks++;
      if (md && sel_seen) begin
        nw1++;
        if (absr(w - (t + delta)) > 0.001) begin failures++; $display("FAIL T+delta window %f exp %f", w, t + delta); end
      end else begin
        nw2++;
        if (absr(w - t) > 0.001) begin failures++; $display("FAIL T window %f exp %f", w, t); end
      end
    end
    checks += 2;
    if (md) begin
      if (nw1 != 20 || nw2 != 20) begin failures++; $display("FAIL window mix %0d/%0d", nw1, nw2); end
      if (sel_pulses - s0 < ref_edges - r0 - 1 || sel_pulses - s0 > ref_edges - r0 + 1) begin
        failures++; $display("FAIL sel pulses %0d ref %0d", sel_pulses - s0, ref_edges - r0);
      end
      if (absr(real'(out_edges - o0) - real'(n * (ref_edges - r0))) > real'(n)) begin
        failures++; $display("FAIL out cycles %0d for %0d ref", out_edges - o0, ref_edges - r0);
      end
    end else begin
      if (nw2 != 40) begin failures++; $display("FAIL free-run windows"); end
      if (sel_pulses != s0) begin failures++; $display("FAIL sel with mode=0"); end
    end
    $display("INFO case vf=%0.2f N=%0d delta=%0.2f ps: ok so far failures=%0d", vf, n, delta, failures);
  endtask

  initial begin
    run_case(0.9, 0.6, REF_50M, 5, 1'b1);    // fast ring: long stall
    run_case(0.65, 0.6, REF_50M, 5, 1'b1);   // slightly fast
    run_case(0.58, 0.6, REF_50M, 5, 1'b1);   // slightly slow: early reference
    run_case(0.62, 0.6, REF_25M, 6, 1'b1);   // 25 MHz reference, N = 64
    run_case(0.62, 0.6, REF_12M5, 7, 1'b1);  // 12.5 MHz reference, N = 128
    run_case(0.6, 0.6, REF_50M, 5, 1'b0);    // select logic disabled
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
