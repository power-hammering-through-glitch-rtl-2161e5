// power_hammer_top -- glitch-amplification power hammer.
//
// N_GEN glitch generators run from one clock. Each is a toggle flip-flop
// whose output reaches the LUT_K inputs of a LUT through a delay chain with
// TAP_DELAY_PS steps; the LUT configuration, decoded from lut_mode, selects
// the hammering strength for all generators at once:
//   LUT_STATIC  constant output, no switching           0 transitions/cycle
//   LUT_ROUTE   route-through of the toggle signal      1 transition/cycle
//   LUT_XORk    XOR of k staggered copies               k transitions/cycle
// Each generator output drives one long burn path of SEGMENTS routing
// segments anchored by transparent latches, where the power is burned. With
// XOR6 at 200 MHz each generator output switches at 1.2 G transitions/s
// (a 600 MHz square-wave equivalent) without any oscillator or combinational
// loop in the design.
//
// Interface: clk (200 MHz in the attack), rst_n (active-low synchronous reset
// of the toggle flip-flops), hammer_en (toggle enable, the attach point of any
// trigger logic), lut_mode (glitch_pkg::lut_mode_e), anchor_en (1 = latches
// transparent), glitch_out[N_GEN], path_end[N_GEN].
// Timing: a new mode takes effect at once on the LUT outputs; transitions of
// one clock cycle end (LUT_K-1)*TAP_DELAY_PS after the edge and reach
// path_end at the same instant (burn-path latency is not modelled).
// Generator count, LUT size, tap step and modes follow the attack; the path
// length is derived, and the run-time mode
// input replaces the bitstream edit used on the device.
module power_hammer_top #(
  parameter int unsigned N_GEN        = glitch_pkg::NUM_GENERATORS,
  parameter int unsigned LUT_K        = glitch_pkg::LUT_INPUTS,
  parameter int unsigned TAP_DELAY_PS = glitch_pkg::TAP_DELAY_PS,
  parameter int unsigned SEGMENTS     = glitch_pkg::PATH_SEGMENTS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  hammer_en,
  input  glitch_pkg::lut_mode_e lut_mode,
  input  logic                  anchor_en,
  output logic [N_GEN-1:0]      glitch_out,
  output logic [N_GEN-1:0]      path_end
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [63:0]         init6;
  logic [2**LUT_K-1:0] lut_init;

  // The package decodes a mode to a LUT6 INIT; a smaller LUT uses its low part.
  always_comb init6 = glitch_pkg::lut_init(lut_mode);
  always_comb lut_init = init6[2**LUT_K-1:0];

  for (genvar g = 0; g < N_GEN; g++) begin : g_gen
    glitch_generator #(
      .LUT_K       (LUT_K),
      .TAP_DELAY_PS(TAP_DELAY_PS)
    ) u_gen (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (hammer_en),
      .lut_init(lut_init),
      .glitch  (glitch_out[g]),
      .toggle_q()
    );
  end

  power_burning_network #(
    .N_GEN       (N_GEN),
    .SEGMENTS    (SEGMENTS)
  ) u_burn (
    .glitch_in(glitch_out),
    .anchor_en(anchor_en),
    .path_end (path_end)
  );

  initial begin
    assert (LUT_K <= 6) else $error("LUT_K above 6 is not supported by the mode decoder");
  end
endmodule
