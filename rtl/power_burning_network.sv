// power_burning_network -- the routing that turns glitches into power.
//
// One burn_path per glitch generator: N_GEN independent long, deep paths,
// each of SEGMENTS latch-anchored routing segments, all gated by one common
// anchor enable. The generators are few and small; nearly all of the dynamic
// power is drawn here, in proportion to the number of segments times the
// transitions per clock the generators produce.
//
// Interface: glitch_in[N_GEN] (generator outputs), anchor_en, path_end[N_GEN]
// (last latch of each path, brought out so that the paths have a visible
// sink). Timing: path_end[g] follows glitch_in[g] while anchor_en = 1
// (routing latency is not modelled) and holds while anchor_en = 0.
// That each generator drives exactly one path is this design's choice; the
// attack only states that long deep paths anchored with latches are used.
module power_burning_network #(
  parameter int unsigned N_GEN        = 47,
  parameter int unsigned SEGMENTS     = 1337
) (
  input  logic [N_GEN-1:0] glitch_in,
  input  logic             anchor_en,
  output logic [N_GEN-1:0] path_end
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar g = 0; g < N_GEN; g++) begin : g_path
    burn_path #(
      .SEGMENTS    (SEGMENTS)
    ) u_path (
      .din      (glitch_in[g]),
      .anchor_en(anchor_en),
      .dout     (path_end[g])
    );
  end
endmodule
