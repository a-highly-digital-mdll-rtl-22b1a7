// ring_osc_mux: behavioural model of the multiplexed ring oscillator (an
// analog circuit; not synthesizable).
//
// A 2:1 multiplexer feeds five delay stages; the fifth stage's output (Out)
// returns to mux input 0, and the reference, buffered by two delay cells
// identical to the ring stages, enters at input 1. With sel low the ring
// free-runs at f = 1/(10*td); while sel is high the next reference edge
// replaces a ring edge, resetting the ring phase once per reference cycle.
// Out1 (first stage) goes to the select logic; Out3 (third stage) drives two
// inverters: outbuf_n (divider and edge generator) and out_o (output buffer).
// Polarity: the first stage inverts and the rest do not (the differential
// pair crossing), so Out1 rises one td after the mux falls and Out3 follows
// Out1 after two more td.
//
// Stage delay from the tuning voltages (own model; the published design gives only
// that the fine port has a small gain and the coarse port is set by hand):
//   f = F_CENTER_HZ + KVF_HZ_PER_V*(tune_f - V_MID) + KVC_HZ_PER_V*(tune_c - V_MID)
// evaluated at every edge. Each stage passes an edge after td; a pulse
// shorter than td is stretched rather than swallowed.
module ring_osc_mux #(
  parameter int unsigned STAGES       = 5,
  parameter real         F_CENTER_HZ  = 1.6e9,
  parameter real         KVF_HZ_PER_V = 200.0e6,
  parameter real         KVC_HZ_PER_V = 1.0e9,
  parameter real         V_MID        = 0.6
) (
  input  logic refin,     // reference (after single-ended-to-differential)
  input  logic sel,       // 1 = pass the reference
  input  real  tune_f,    // fine tuning voltage (Vtune from the loop)
  input  real  tune_c,    // coarse tuning voltage (set by hand)
  output logic mux,
  output logic out1,
  output logic out1_n,
  output logic out3,
  output logic outbuf_n,  // to divider and enable logic
  output logic out_o      // to the output buffer
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [STAGES-1:0] s = '0;   // stage outputs; s[STAGES-1] is Out
  logic [1:0]        r = '0;   // reference buffer cells

  function automatic realtime stage_delay(real vf, real vc);
    real f;
    f = F_CENTER_HZ + KVF_HZ_PER_V * (vf - V_MID) + KVC_HZ_PER_V * (vc - V_MID);
    if (f < 0.2e9) f = 0.2e9;
    if (f > 6.0e9) f = 6.0e9;
    return 1.0e12 / (2.0 * STAGES * f);   // in ps
  endfunction

  always_comb mux = sel ? r[1] : s[STAGES-1];

  // first stage (inverting)
  always begin : st0
    logic v;
    if (s[0] == ~mux) @(mux);
    v = ~mux;
    #(stage_delay(tune_f, tune_c));
    s[0] = v;
  end

  for (genvar i = 1; i < STAGES; i++) begin : g_st
    always begin : st
      logic v;
      if (s[i] == s[i-1]) @(s[i-1]);
      v = s[i-1];
      #(stage_delay(tune_f, tune_c));
      s[i] = v;
    end
  end

  // reference buffer: two cells matched to the ring stages
  always begin : rb0
    logic v;
    if (r[0] == refin) @(refin);
    v = refin;
    #(stage_delay(tune_f, tune_c));
    r[0] = v;
  end

  always begin : rb1
    logic v;
    if (r[1] == r[0]) @(r[0]);
    v = r[0];
    #(stage_delay(tune_f, tune_c));
    r[1] = v;
  end

  assign out1     = s[0];
  assign out1_n   = ~s[0];
  assign out3     = s[2];
  assign outbuf_n = ~s[2];
  assign out_o    = ~s[2];
endmodule
