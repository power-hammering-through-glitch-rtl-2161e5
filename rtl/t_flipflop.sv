// t_flipflop -- toggle flip-flop that drives a glitch generator.
//
// On every rising clock edge with t = 1 the output inverts, so a free-running
// toggle flip-flop makes exactly one transition per clock cycle: a square wave
// at half the clock frequency, activity factor 1/2. This is the largest
// activity a flip-flop output can have, and it is the raw material the delay
// chain and XOR LUT of the glitch generator multiply. The toggle enable is
// where trigger logic would attach.
//
// Interface: clk, rst_n (active-low, synchronous, clears q; the reset is this
// design's choice), t (toggle enable), q.
// Timing: q changes only on rising clk edges, one cycle after t is sampled.
module t_flipflop (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= 1'b0;
    else if (t)  q <= ~q;
  end
endmodule
