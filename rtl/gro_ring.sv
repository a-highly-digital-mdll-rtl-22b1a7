// gro_ring: behavioural model of the 15-stage gated ring oscillator of the
// GRO TDC (an analog circuit; not synthesizable).
//
// While enable is high one transition travels round the ring of inverters,
// toggling stage k, then k+1, ... every td_ps. When enable falls the ring
// freezes and remembers how far the pending transition had progressed; the
// next enable window resumes from exactly that point. This "hold the state"
// behaviour is what scrambles the TDC quantisation error.
//
// Model limits (own choices): the stage delay is a constant parameter
// (45 ps, the measured raw resolution at 1.2 V); the dead-zone effect of
// imperfect state hold seen on silicon is not modelled; an enable low time
// shorter than the remaining stage delay is not supported.
module gro_ring
  import mdll_pkg::*;
#(
  parameter int unsigned STAGES = GRO_STAGES,
  parameter real         TD_PS  = 45.0
) (
  input  logic              enable,
  output logic [STAGES-1:0] phase
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime rem;       // time still needed for the pending transition
  realtime t_fall = -1.0;  // time of the last falling enable
  realtime t_start;
  int unsigned k;     // stage whose transition is pending

  always @(negedge enable) t_fall = $realtime;

  initial begin
    // consistent ring state: stages alternate, stage 0 is the one to switch
    for (int i = 0; i < STAGES; i++) phase[i] = logic'(i % 2);
    k      = 0;
    rem    = TD_PS;
    forever begin
      if (!enable) @(posedge enable);
      t_start = $realtime;
      #(rem);
      if (t_fall >= t_start) begin
        // gated off while waiting: keep the progress made
        rem = rem - (t_fall - t_start);
        if (rem < 0.0) rem = 0.0;
      end else begin
        phase[k] = ~phase[k];
        k   = (k + 1) % STAGES;
        rem = TD_PS;
      end
    end
  end
endmodule
