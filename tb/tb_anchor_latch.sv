// tb_anchor_latch -- self-checking test of the anchoring latch.
// With the gate open q must follow d at once, pulses included; with the gate
// closed q must keep the value d had when the gate closed.
module tb_anchor_latch;
  timeunit 1ns;
  timeprecision 1ps;

  logic g, d, q;
  logic held;
  int checks = 0, failures = 0;

  anchor_latch dut (.g(g), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    g = 1'b1; d = 1'b0;
    #1;
    for (int i = 0; i < 500; i++) begin
      logic ng, nd;
      ng = ($urandom_range(0, 2) != 0);
      nd = 1'($urandom);
      if (g && !ng) held = d;          // value captured on closing
      g = ng;
      #1ps;
      d = nd;
      #1ps;
      if (g) check(q == d, "transparent");
      else   check(q == held, "holds while closed");
      if (g) held = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
