// mdll_pkg: widths and types shared by the MDLL clock multiplier.
//
// The GRO time-to-digital converter has a 10-bit output and 15 gated stages;
// the DAC is 16 bits wide of which the 8 MSBs are driven by a first-order
// sigma-delta modulator. Those numbers follow the published prototype. The
// accumulator width is this design's own choice.
package mdll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // GRO TDC
  localparam int unsigned TDC_W      = 10;  // output range of the GRO TDC
  localparam int unsigned GRO_STAGES = 15;  // gated inverter stages

  // Correlator output: difference of two TDC samples, one sign bit more
  localparam int unsigned CORR_W = TDC_W + 1;

  // Tuning path
  localparam int unsigned ACC_W   = 24;  // accumulator width (own choice)
  localparam int unsigned TUNE_W  = 16;  // tuning word = DAC width
  localparam int unsigned DAC_W   = 16;  // commercial DAC resolution
  localparam int unsigned SD_W    = 8;   // DAC MSBs driven by the modulator
  localparam int unsigned SHIFT_W = 4;   // loop-gain shift setting

  // Divide ratio is 2**n_log2; 1.6 GHz / 50 MHz needs n_log2 = 5
  localparam int unsigned NLOG2_W   = 3;
  localparam int unsigned NLOG2_MAX = 7;  // N up to 128 (12.5 MHz reference)

  typedef logic        [TDC_W-1:0]  tdc_t;
  typedef logic signed [CORR_W-1:0] corr_t;
  typedef logic        [TUNE_W-1:0] tune_t;

  // Reference divider setting (100 MHz source divided on the core IC)
  typedef enum logic [1:0] {
    REF_100M  = 2'd0,
    REF_50M   = 2'd1,
    REF_25M   = 2'd2,
    REF_12M5  = 2'd3
  } ref_sel_e;
endpackage
