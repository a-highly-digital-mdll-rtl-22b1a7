// gro_tdc: the GRO time-to-digital converter chip: a behavioural 15-stage
// gated ring (gro_ring) plus its synthesizable counting logic
// (gro_tdc_logic). It measures the time from rising ref_i to rising in_i in
// units of one gated-inverter delay; the 10-bit result appears on out at
// rising in_i. Because the ring holds its phase between windows, the sum of
// K consecutive results equals the total enabled time in stage delays to
// within one count (first-order noise shaping of the quantisation error).
// Behavioural because of the ring model; structure follows the published design.
module gro_tdc
  import mdll_pkg::*;
#(
  parameter int unsigned STAGES = GRO_STAGES,
  parameter int unsigned OUT_W  = TDC_W,
  parameter real         TD_PS  = 45.0
) (
  input  logic             rst_n,
  input  logic             ref_i,
  input  logic             in_i,
  output logic             enable,
  output logic [OUT_W-1:0] out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [STAGES-1:0] phase;

  gro_ring #(.STAGES(STAGES), .TD_PS(TD_PS)) u_ring (
    .enable (enable),
    .phase  (phase)
  );

  gro_tdc_logic #(.STAGES(STAGES), .OUT_W(OUT_W)) u_logic (
    .rst_n  (rst_n),
    .ref_i  (ref_i),
    .in_i   (in_i),
    .phase  (phase),
    .enable (enable),
    .out    (out)
  );
endmodule
