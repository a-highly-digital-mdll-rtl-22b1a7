// clk_div2: divide-by-2 of the GRO Enable signal. Its output toggles on
// every rising Enable, so it marks which sample of a (T+delta, T) pair is
// arriving and, at half the Enable rate (the reference rate), clocks the
// accumulator and the sigma-delta modulator.
// Reset value 1 (own choice): with the edge generator starting on a T+delta
// window, the correlator then stores the T+delta sample and subtracts the T
// sample, and the rising output edge falls between two correlator updates.
module clk_div2 (
  input  logic clk,    // Enable from the GRO TDC
  input  logic rst_n,
  output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b1;
    else        q <= ~q;
  end
endmodule
