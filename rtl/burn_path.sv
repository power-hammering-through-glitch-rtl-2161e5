// burn_path -- one long, deep power-burning path.
//
// The glitching output of a generator is carried through SEGMENTS stages in
// series; each stage is a routing segment (a wire in this RTL) ending in a
// transparent anchoring latch whose output drives the next segment. With the latches open every pulse travels the whole length of the
// path, so every segment switches as often as the generator output: the power
// is burned in the switched capacitance of the many segments, not in the
// generator. A deep chain is used instead of a high-fanout net so that no
// single net looks suspicious in timing or fanout reports.
//
// Interface: din (glitching signal), anchor_en (gate of all latches, 1 =
// transparent), dout (end of the path).
// Timing: while anchor_en = 1, dout follows din with no clock; the routing
// latency of the segments is not modelled (it would only shift the pulse
// train in time). With anchor_en = 0 every latch holds.
// Long paths anchored by latches follow the attack. Putting one latch after
// every segment and the 1337-segment default (the attack's latch count spread
// over its 47 paths) are this design's choices.
module burn_path #(
  parameter int unsigned SEGMENTS = 1337
) (
  input  logic din,
  input  logic anchor_en,
  output logic dout
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SEGMENTS:0] node;   // node[i]: segment i, node[SEGMENTS]: end of path

  assign node[0] = din;

  for (genvar i = 0; i < SEGMENTS; i++) begin : g_stage
    anchor_latch u_anchor (
      .g(anchor_en),
      .d(node[i]),
      .q(node[i+1])
    );
  end

  assign dout = node[SEGMENTS];
endmodule
