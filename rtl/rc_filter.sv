// rc_filter: behavioural model of the passive first-order RC low-pass that
// turns the DAC output into Vtune (analog; not synthesizable). Pole at 3 MHz
// as in the prototype. The output is advanced every STEP_PS with the exact
// exponential step response for a constant input over that step:
//   vout += (vin - vout) * (1 - exp(-STEP/tau)),  tau = 1/(2*pi*POLE_HZ).
// The update runs on a free-running internal tick of period STEP_PS. The
// starting voltage is a parameter (own choice: mid supply).
module rc_filter #(
  parameter real POLE_HZ = 3.0e6,
  parameter real STEP_PS = 50.0,
  parameter real V_INIT  = 0.6
) (
  input  real vin,
  output real vout
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real PI    = 3.14159265358979;
  localparam real TAU   = 1.0e12 / (2.0 * PI * POLE_HZ);   // ps
  localparam real ALPHA = 1.0 - $exp(-STEP_PS / TAU);

  logic tick = 1'b0;
  real  v = V_INIT;

  always #(STEP_PS / 2.0) tick = ~tick;

  always @(posedge tick) v = v + (vin - v) * ALPHA;

  assign vout = v;
endmodule
