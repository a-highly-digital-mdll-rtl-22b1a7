// dac16: behavioural model of the commercial 16-bit voltage DAC (analog; not
// synthesizable). The output is code/2**16 of the reference voltage and
// follows the code immediately; the code is held in the registered output
// of the sigma-delta modulator, which is clocked at the reference rate like
// the DAC in the prototype. Full-scale voltage (1.2 V, the core supply) is an
// own choice.
module dac16 #(
  parameter int unsigned BITS = 16,
  parameter real         VREF = 1.2
) (
  input  logic [BITS-1:0] code,
  output real             vout
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb vout = VREF * real'(code) / (2.0 ** BITS);
endmodule
