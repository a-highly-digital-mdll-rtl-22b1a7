// gro_tdc_logic: the digital half of the gated-ring-oscillator (GRO) TDC.
//
// An SR latch forms Enable: a high Ref sets it and a high In clears it
// (In wins), so with the MDLL's en/dis pair Enable is high from rising en to
// rising dis. While Enable is high the gated ring runs; every transition of
// every ring phase is counted (one rising-edge and one falling-edge counter
// per phase, so one count per inverter delay). The sum of all counters is
// the measurement. Rising In loads the sum into the output register and,
// while In is high, holds the counters at zero. The ring itself keeps its
// phase while gated off, so the part of a stage delay left over at the end of
// one window is carried into the next: the quantisation error is scrambled
// and first-order shaped (error[k] = q[k] - q[k-1]).
//
// The latch, counters, adder and register follow the published block
// diagram; using one up-counter per edge polarity and the counter width
// (the full output width, wrapping) are this design's choices.
// The Enable latch is the one intended latch bit in this module: Enable must
// be a level set and cleared by two independent edges, with no clock.
// Timing: out is valid from rising In until the next rising In.
module gro_tdc_logic
  import mdll_pkg::*;
#(
  parameter int unsigned STAGES = GRO_STAGES,
  parameter int unsigned OUT_W  = TDC_W
) (
  input  logic              rst_n,
  input  logic              ref_i,   // set input (en from the MDLL core)
  input  logic              in_i,    // reset input (dis from the MDLL core)
  input  logic [STAGES-1:0] phase,   // gated ring phases
  output logic              enable,  // gates the ring
  output logic [OUT_W-1:0]  out
);
  timeunit 1ps;
  timeprecision 1fs;

  // SR latch, reset dominant
  always_latch begin
    if (!rst_n || in_i) enable = 1'b0;
    else if (ref_i)     enable = 1'b1;
  end

  logic clr;
  assign clr = in_i | ~rst_n;

  // running sum along the ring: psum[i+1] = psum[i] + counts of phase i
  logic [OUT_W-1:0] psum [STAGES+1];
  assign psum[0] = '0;

  for (genvar i = 0; i < STAGES; i++) begin : g_cnt
    logic [OUT_W-1:0] cnt_r, cnt_f;   // rising / falling edges of phase i
    always_ff @(posedge phase[i] or posedge clr) begin
      if (clr) cnt_r <= '0;
      else     cnt_r <= cnt_r + 1'b1;
    end
    always_ff @(negedge phase[i] or posedge clr) begin
      if (clr) cnt_f <= '0;
      else     cnt_f <= cnt_f + 1'b1;
    end
    assign psum[i+1] = psum[i] + cnt_r + cnt_f;
  end

  logic [OUT_W-1:0] count;
  assign count = psum[STAGES];

  always_ff @(posedge in_i or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= count;
  end
endmodule
