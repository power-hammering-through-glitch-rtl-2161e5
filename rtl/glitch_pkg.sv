// glitch_pkg -- shared types, constants and the LUT configuration function of
// the glitch-amplification power hammer.
//
// A glitch generator's strength is set only by the configuration (INIT value)
// of its 6-input LUT. The mode enumeration below is encoded so that its
// numeric value equals the number of LUT inputs that take part in the
// function, which is also the number of output transitions the LUT makes per
// clock cycle when its inputs are the staggered copies of one toggle signal:
//   LUT_STATIC  0  output constant 0, no glitching        (activity 0)
//   LUT_ROUTE   1  output follows input 0 (route-through)  (activity 0.5)
//   LUT_XORk    k  output is the XOR of inputs 0..k-1      (activity k/2)
// The seven modes are the seven configurations measured in the attack; the
// numbers of generators, LUT inputs and the 200 ps tap step are the attack's
// own, the mode encoding and the INIT convention are this design's choices.
package glitch_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    LUT_STATIC = 3'd0,
    LUT_ROUTE  = 3'd1,
    LUT_XOR2   = 3'd2,
    LUT_XOR3   = 3'd3,
    LUT_XOR4   = 3'd4,
    LUT_XOR5   = 3'd5,
    LUT_XOR6   = 3'd6
  } lut_mode_e;

  localparam int unsigned LUT_INPUTS      = 6;     // LUT6
  localparam int unsigned NUM_GENERATORS  = 47;    // one row of the device
  localparam int unsigned TAP_DELAY_PS    = 200;   // latency step between LUT inputs
  localparam int unsigned CLK_PERIOD_PS   = 5000;  // 200 MHz attack clock
  localparam int unsigned PATH_SEGMENTS   = 1337;  // latches per burn path

  // INIT value of a LUT6 for a mode: bit a holds the output for input value a.
  // Mode value 7 is unused and decodes like LUT_STATIC.
  function automatic logic [63:0] lut_init(input logic [2:0] mode);
    logic [63:0] init;
    logic [5:0]  mask;
    mask = 6'((7'd1 << mode) - 7'd1);  // inputs 0..mode-1 take part
    if (mode == 3'd7) mask = '0;
    for (int a = 0; a < 64; a++) begin
      init[a] = ^(6'(a) & mask);
    end
    return init;
  endfunction
endpackage
