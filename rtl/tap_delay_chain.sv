// tap_delay_chain -- behavioural model of the routing delay chain of a glitch
// generator.
//
// Behavioural model: on the device the chain is routing whose hops are picked
// for their latency so that the copies of the toggle signal reach the LUT
// inputs in equal steps (about 200 ps apart in the attack). Tap 0 is the input
// itself; tap i is the input after i hops of TAP_DELAY_PS each. Each hop is a
// routing_wire, a transport delay, so one edge on din becomes TAPS edges
// spread over (TAPS-1)*TAP_DELAY_PS.
//
// Interface: din, taps[TAPS-1:0]. Timing: taps[i](t) = din(t - i*TAP_DELAY_PS).
// The tap count and step follow the attack; that tap 0 is undelayed is this
// design's choice (only the differences between taps matter).
module tap_delay_chain #(
  parameter int unsigned TAPS         = 6,
  parameter int unsigned TAP_DELAY_PS = 200
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);
  timeunit 1ns;
  timeprecision 1ps;

  assign taps[0] = din;

  for (genvar i = 1; i < TAPS; i++) begin : g_hop
    routing_wire #(.DELAY_PS(TAP_DELAY_PS)) u_hop (
      .a(taps[i-1]),
      .y(taps[i])
    );
  end
endmodule
