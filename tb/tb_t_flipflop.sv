// tb_t_flipflop -- self-checking test of the toggle flip-flop.
// Drives a random toggle enable for 400 cycles after a reset and compares q
// every cycle with a reference toggle state kept in the testbench; also checks
// that a free-running flip-flop makes exactly one transition per clock cycle
// (activity factor 1/2).
module tb_t_flipflop;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0;
  logic rst_n, t, q;
  logic ref_q;
  int checks = 0, failures = 0;
  int edges = 0;

  t_flipflop dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q));

  always #2.5 clk = ~clk;
  always @(q) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; t = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(q == 1'b0, "reset clears q");
    ref_q = 1'b0;
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      t = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (t) ref_q = ~ref_q;
      #1 check(q == ref_q, "q follows toggle reference");
    end
    // free-running: one transition per cycle
    t = 1'b1;
    @(posedge clk); #1;
    edges = 0;
    repeat (100) @(posedge clk);
    #1 check(edges == 100, "one transition per clock cycle");
    // reset while toggling
    rst_n = 1'b0;
    @(posedge clk); #1 check(q == 1'b0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
