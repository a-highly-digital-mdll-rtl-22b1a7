// mdll_top: the complete clock multiplier as one closed loop.
//
//   100 MHz -> mdll_core (ring, select logic, /N, edge generator)
//           -> en/dis -> gro_tdc (Enable window, 10-bit period measurement)
//           -> fpga_tuning_loop (correlator, accumulator, sigma-delta)
//           -> dac16 -> rc_filter -> Vtune (fine tuning port of the ring)
//
// The loop drives the difference delta between the period holding the
// reference edge and an ordinary period to zero, which removes the
// deterministic jitter of the multiplied clock. Settings that came from a PC
// in the prototype (mode, reference divide, N, loop gain, coarse tuning
// voltage) are plain inputs. Contains behavioural models of the analog parts.
module mdll_top
  import mdll_pkg::*;
(
  input  logic               clk_100m,
  input  logic               rst_n,
  input  logic               mode,
  input  ref_sel_e           ref_sel,
  input  logic [NLOG2_W-1:0] n_log2,
  input  logic [SHIFT_W-1:0] gain_shift,
  input  real                tune_c,
  output logic               clk_out,
  output logic               ref_o,
  output logic               sel,
  output logic               enable,
  output tdc_t               tdc,
  output corr_t              corr,
  output tune_t              tune,
  output logic [DAC_W-1:0]   dac_code,
  output real                vtune
);
  timeunit 1ps;
  timeprecision 1fs;

  logic div, en, dis, clk_ref;
  real  vdac;

  mdll_core u_core (
    .clk_100m(clk_100m), .rst_n(rst_n), .mode(mode), .ref_sel(ref_sel),
    .n_log2(n_log2), .tune_f(vtune), .tune_c(tune_c),
    .ref_o(ref_o), .clk_out(clk_out), .sel(sel), .div(div), .en(en), .dis(dis)
  );

  gro_tdc u_gro (
    .rst_n(rst_n), .ref_i(en), .in_i(dis), .enable(enable), .out(tdc)
  );

  fpga_tuning_loop u_fpga (
    .enable(enable), .rst_n(rst_n), .tdc(tdc), .gain_shift(gain_shift),
    .corr(corr), .tune(tune), .dac_code(dac_code), .clk_ref(clk_ref)
  );

  dac16 u_dac (.code(dac_code), .vout(vdac));

  rc_filter u_rc (.vin(vdac), .vout(vtune));
endmodule
