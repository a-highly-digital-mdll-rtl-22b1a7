// sigma_delta: first-order sigma-delta modulator reducing the 16-bit tuning
// word to the 8 MSBs that drive the DAC (the 8 DAC LSBs are left at zero).
// Each clock the 8 low bits of (word + residue) are kept as the new residue
// and the upper bits are the output, so the output's long-run average equals
// word / 256 and the truncation error is first-order shaped. At the top of
// the range the output saturates. Runs at the reference rate. The error-
// feedback structure is this design's choice; the published design gives the order
// and the 8-of-16-bit use.
// Timing: registered output, one update per rising clk; reset to the
// mid-scale code so the tuning voltage starts mid-range.
module sigma_delta
  import mdll_pkg::*;
#(
  parameter int unsigned IN_W  = TUNE_W,
  parameter int unsigned OUT_W = SD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  word,
  output logic [OUT_W-1:0] code
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned LSB_W = IN_W - OUT_W;

  logic [LSB_W-1:0] residue;
  logic [IN_W:0]    sum;

  assign sum = {1'b0, word} + {{(OUT_W + 1){1'b0}}, residue};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      residue <= '0;
      code    <= OUT_W'(1) << (OUT_W - 1);
    end else begin
      residue <= sum[LSB_W-1:0];
      code    <= sum[IN_W] ? '1 : sum[IN_W-1 -: OUT_W];
    end
  end
endmodule
