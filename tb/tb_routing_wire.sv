// tb_routing_wire -- self-checking test of the routing-segment delay model.
// Sends a random bit sequence, one bit per 250 ps (longer than the delay, as
// in every use of the model), into a 200 ps segment and checks that the far
// end shows each bit DELAY later, and that a single 200 ps pulse arrives
// neither early nor late.
module tb_routing_wire;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned D = 200;
  logic a, y;
  int checks = 0, failures = 0;
  logic [0:99] sent;

  routing_wire #(.DELAY_PS(D)) dut (.a(a), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // every 50 ps a new random value; the far end must repeat the sequence
  initial begin
    a = 1'b0;
    #1;
    for (int i = 0; i < 100; i++) sent[i] = 1'($urandom);
    for (int i = 0; i < 100; i++) begin
      a = sent[i];
      #250ps;
    end
  end

  initial begin
    #1;
    #(D * 1ps - 10ps);
    for (int i = 0; i < 100; i++) begin
      // 10 ps before bit i is due the previous bit must still be there
      check(y == (i == 0 ? 1'b0 : sent[i-1]), "far end not early");
      #35ps;
      check(y == sent[i], "far end repeats input after DELAY");
      #215ps;
    end
    // a single 30 ps pulse survives
    a = 1'b0; #1;
    a = 1'b1; #200ps; a = 1'b0;
    check(y == 1'b0, "pulse not early");
    #10ps;
    check(y == 1'b1, "pulse arrives after DELAY");
    #200ps;
    check(y == 1'b0, "pulse ends after DELAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
