// anchor_latch -- transparent latch that anchors a power-burning routing path.
//
// A routing path needs a sink or the implementation tools remove it; the
// attack ends its long paths in latches that are held transparent, so that
// every glitch on the path reaches and passes the latch and the whole path
// keeps switching. While g = 1 the output follows d with no clock; while
// g = 0 it holds the last value. Using a latch as the sink follows the
// attack; the gate being a separate input is this design's choice.
//
// Interface: g (gate, 1 = transparent), d, q.
// Circuit notes: the latch is intended; it is the element this block models.
// When a long chain of these latches shares one gate, lint may report that
// no latch was inferred (NOLATCH) after flattening the chain; synthesis still
// maps every stage to a latch (one $dlatch per stage).
module anchor_latch (
  input  logic g,
  input  logic d,
  output logic q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (g) q = d;
  end
endmodule
