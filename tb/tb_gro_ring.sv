// tb_gro_ring: applies enable windows of random width and counts the phase
// transitions the ring makes. Because the ring keeps its partial progress
// while disabled, after any number of windows the total number of
// transitions must equal floor(total enabled time / stage delay); each
// window alone gives floor or ceil of its own width. No transition may occur
// while enable is low, and the phases must always form a valid ring state
// (at most one stage out of step).
module tb_gro_ring;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real TD = 45.0;
  int checks = 0, failures = 0;
  logic enable = 0;
  logic [14:0] phase, prev;
  int trans = 0, trans_off = 0;

  gro_ring dut (.enable(enable), .phase(phase));

  always @(phase) begin
    trans += $countones(phase ^ prev);
    if (!enable) trans_off++;
    prev = phase;
  end

  initial begin
    #100000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    realtime total = 0.0, w;
    int n_before, n, mism;
    prev = phase;
    #1000;
    trans = 0; trans_off = 0;
    for (int k = 0; k < 400; k++) begin
      w = 200.0 + real'($urandom_range(0, 300000)) / 100.0;   // 200 ps .. 3.2 ns
      n_before = trans;
      enable = 1; #(w); enable = 0;
      total += w;
      #2000;
      n = trans - n_before;
      checks++;
      if (n != int'($floor(w / TD)) && n != int'($ceil(w / TD))) begin
        failures++; $display("FAIL window %0d: %0d transitions for %f ps", k, n, w);
      end
      checks++;
      if (trans != int'($floor(total / TD))) begin
        failures++; $display("FAIL total %0d exp %0d", trans, int'($floor(total / TD)));
      end
      // ring state: count stages equal to their predecessor (inverter ring)
      mism = 0;
      for (int i = 0; i < 15; i++) if (phase[i] == phase[(i + 14) % 15]) mism++;
      checks++;
      if (mism != 1) begin failures++; $display("FAIL ring state %b", phase); end
    end
    checks++;
    if (trans_off != 0) begin failures++; $display("FAIL %0d transitions while disabled", trans_off); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
