// mdll_core: the MDLL core chip. The reference (100 MHz divided on chip to
// 100/50/25/12.5 MHz) is injected into a five-stage multiplexed ring
// oscillator every N output cycles. The divide-by-N counter, clocked by
// Outbuf_n, feeds the edge generator, which retimes Div for the select logic
// and produces en/dis, whose spacing is one output period: alternately the
// period that contains the reference edge (T+delta) and an ordinary one (T).
// en/dis go to the GRO TDC; the fine tuning voltage comes back from the
// tuning loop and the coarse one is set by hand.
// Structural; contains the behavioural ring model, so not synthesizable as a
// whole. mode = 0 disables the select logic (free-running ring).
module mdll_core
  import mdll_pkg::*;
(
  input  logic               clk_100m,  // off-chip reference
  input  logic               rst_n,
  input  logic               mode,
  input  ref_sel_e           ref_sel,
  input  logic [NLOG2_W-1:0] n_log2,
  input  real                tune_f,
  input  real                tune_c,
  output logic               ref_o,     // divided reference
  output logic               clk_out,   // multiplied clock (to output buffer)
  output logic               sel,
  output logic               div,
  output logic               en,
  output logic               dis
);
  timeunit 1ps;
  timeprecision 1fs;

  logic mux, out1, out1_n, out3, outbuf_n, sel_n;
  logic div_raw, div2x_raw, div2x;

  ref_divider u_refdiv (
    .clk_100m(clk_100m), .rst_n(rst_n), .ref_sel(ref_sel), .ref_o(ref_o)
  );

  ring_osc_mux u_ring (
    .refin(ref_o), .sel(sel), .tune_f(tune_f), .tune_c(tune_c),
    .mux(mux), .out1(out1), .out1_n(out1_n), .out3(out3),
    .outbuf_n(outbuf_n), .out_o(clk_out)
  );

  select_logic u_sel (
    .out1(out1), .out1_n(out1_n), .div(div), .mode(mode & rst_n),
    .sel(sel), .sel_n(sel_n)
  );

  mdll_divider u_div (
    .clk(outbuf_n), .rst_n(rst_n), .n_log2(n_log2),
    .div_raw(div_raw), .div2x_raw(div2x_raw)
  );

  edge_generator u_edge (
    .clk(outbuf_n), .rst_n(rst_n), .div_raw(div_raw), .div2x_raw(div2x_raw),
    .div(div), .div2x(div2x), .en(en), .dis(dis)
  );
endmodule
