// edge_generator: the core of the Enable logic. Div and Div2x from the
// divider are retimed by Outbuf_n. Div passes two flops (the first relaxes
// the select-logic timing, the second delays it by one output cycle so that
// it rises together with en). Div2x passes one metastability flop and the en
// flop; dis is en delayed by one more Outbuf_n cycle. The time between a
// rising en and the next rising dis is therefore one output period, and
// because Div rises together with en, every other window spans the cycle in
// which the reference edge was inserted (T+delta), the others an ordinary
// cycle (T). en and dis drive the Ref and In inputs of the GRO TDC.
//
// All flops are clocked by the rising edge of Outbuf_n; async active-low
// reset clears them (own choice, the reset is not described).
module edge_generator (
  input  logic clk,        // Outbuf_n
  input  logic rst_n,
  input  logic div_raw,
  input  logic div2x_raw,
  output logic div,        // to the select logic
  output logic div2x,      // retimed Div2x
  output logic en,         // start of the measured period
  output logic dis         // end of the measured period
);
  timeunit 1ps;
  timeprecision 1fs;

  logic div_d1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_d1 <= 1'b0;
      div    <= 1'b0;
      div2x  <= 1'b0;
      en     <= 1'b0;
      dis    <= 1'b0;
    end else begin
      div_d1 <= div_raw;
      div    <= div_d1;
      div2x  <= div2x_raw;
      en     <= div2x;
      dis    <= en;
    end
  end
endmodule
