// glitch_generator -- turns one toggle per clock into up to K transitions per
// clock.
//
// A toggle flip-flop changes once per clock cycle (activity 1/2). Its output
// is sent down a delay chain whose K taps reach the K inputs of a LUT at
// staggered times TAP_DELAY_PS apart. When the LUT is configured as an XOR of
// k of its inputs, each staggered arrival flips the output, so one toggle
// becomes k output transitions per cycle (activity k/2): three times the clock
// frequency for an XOR6 at 200 MHz with 200 ps steps. The output is a train of
// narrow pulses that does not violate any timing check, because the path from
// the flip-flop to the LUT is acyclic and short. In route-through mode the
// LUT passes input 0 (one transition per cycle); in static mode the output is
// constant.
//
// Interface: clk, rst_n, en (toggle enable), lut_init (2**K-bit LUT
// configuration), glitch (LUT output), toggle_q (flip-flop output).
// Timing: all transitions of one cycle happen within (K-1)*TAP_DELAY_PS after
// the clock edge, which must be shorter than the clock period.
// Circuit note: lint reports toggle_q as used both synchronously and
// asynchronously (SYNCASYNCNET). The asynchronous use is the delay-chain
// model, which waits on every change of toggle_q to reproduce routing
// latency; in hardware that is a plain wire, so the warning stands.
// Structure, tap step and LUT size follow the attack; the undelayed tap 0 and
// the run-time LUT configuration are this design's choices.
module glitch_generator #(
  parameter int unsigned LUT_K        = 6,
  parameter int unsigned TAP_DELAY_PS = 200
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2**LUT_K-1:0] lut_init,
  output logic                glitch,
  output logic                toggle_q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [LUT_K-1:0] taps;

  t_flipflop u_tff (
    .clk  (clk),
    .rst_n(rst_n),
    .t    (en),
    .q    (toggle_q)
  );

  tap_delay_chain #(
    .TAPS        (LUT_K),
    .TAP_DELAY_PS(TAP_DELAY_PS)
  ) u_chain (
    .din (toggle_q),
    .taps(taps)
  );

  lut6 #(.K(LUT_K)) u_lut (
    .init(lut_init),
    .a   (taps),
    .y   (glitch)
  );
endmodule
