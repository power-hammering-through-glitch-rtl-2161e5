// lut6 -- K-input look-up table (K = 6 by default, an FPGA LUT6).
//
// The output is the bit of the configuration word init selected by the input
// value a. It is purely combinational and re-evaluated on every change of any
// input, so if the inputs change one after another the output may change once
// per input change: with an XOR configuration and inputs that arrive in
// staggered order, every arrival flips the output. That is the glitch
// amplification the attack relies on.
//
// Interface: init (2**K bits; bit i is the output for a == i, the usual FPGA
// convention), a (K inputs), y.
// The configuration is an input port here so that the hammering strength can
// be changed at run time; on an FPGA it is part of the configuration memory.
module lut6 #(
  parameter int unsigned K = 6
) (
  input  logic [2**K-1:0] init,
  input  logic [K-1:0]    a,
  output logic            y
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb y = init[a];
endmodule
