// routing_wire -- behavioural model of one FPGA routing segment.
//
// Behavioural model, not synthesizable logic: on the device this is a piece of
// programmable interconnect whose latency is set by the chosen route. The
// model passes every change of its input to its output after DELAY_PS
// picoseconds (a non-blocking assignment with an intra-assignment delay).
// It is meant for inputs that change at most once per DELAY_PS, which holds
// wherever it is used here: it carries the toggle signal, which changes once
// per clock cycle, into the glitch generator's delay chain.
//
// Interface: a (driver), y (far end). Timing: y(t) = a(t - DELAY_PS) for
// inputs whose changes are at least DELAY_PS apart.
// The 200 ps default is the step of the generator's delay chain; any other
// hop latency is a setting of the instantiating block.
module routing_wire #(
  parameter int unsigned DELAY_PS = 200
) (
  input  logic a,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  initial y = 1'b0;

  always @(a) y <= #(DELAY_PS * 1ps) a;
endmodule
