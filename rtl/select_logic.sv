// select_logic: drives the multiplexer select Sel of the multiplexed ring
// oscillator so that every Nth ring edge is replaced by a reference edge.
//
// Function (as in the published circuit): once Div rises, Sel goes high with
// the next rising Out1 and falls with the following falling Out1; the arming
// flip-flop is then cleared, ready for the next Div edge. Sel is therefore
// the AND of Out1 and the arming bit, which places the Sel edges in the middle
// of ring transitions. Holding mode low keeps the arming bit cleared and the
// oscillator free running.
//
// Implementation choice: the original clears its DFF with a short pulse
// (Out1_n AND Sel) whose width is a gate delay. Such a self-timed pulse has
// no width in zero-delay RTL, so here the arming bit is the XOR of two
// toggle flops: set_t is loaded on rising Div, clr_t copies set_t on
// rising Out1_n (falling Out1). The behaviour seen at Sel is the same.
//
// Interface: all inputs are asynchronous clocks/levels; sel and sel_n are
// combinational from out1 and the arming state.
module select_logic (
  input  logic out1,    // first ring stage output
  input  logic out1_n,  // its complement
  input  logic div,     // retimed divider output
  input  logic mode,    // 1 = select logic enabled, 0 = held in reset
  output logic sel,
  output logic sel_n
);
  timeunit 1ps;
  timeprecision 1fs;

  logic set_t, clr_t, armed;

  assign armed = set_t ^ clr_t;

  // Rising Div arms: armed becomes 1 (D input of the DFFR is tied high).
  always_ff @(posedge div or negedge mode) begin
    if (!mode) set_t <= 1'b0;
    else       set_t <= ~clr_t;
  end

  // Falling Out1 after a Sel pulse disarms (no effect when not armed).
  always_ff @(posedge out1_n or negedge mode) begin
    if (!mode) clr_t <= 1'b0;
    else       clr_t <= set_t;
  end

  // NAND followed by an inverter
  assign sel_n = ~(out1 & armed);
  assign sel   = ~sel_n;
endmodule
