// tb_burn_path -- self-checking test of one power-burning path.
// With the anchors open, every change of din (a random pulse train with
// sub-nanosecond pulses) must reach dout, so dout counts exactly as many
// transitions as din. With the anchors closed, dout must hold the value it
// had when they closed, however din moves. Runs at the default length.
module tb_burn_path;
  timeunit 1ns;
  timeprecision 1ps;

  logic din, anchor_en, dout;
  int checks = 0, failures = 0;
  int in_edges = 0, out_edges = 0;

  burn_path dut (.din(din), .anchor_en(anchor_en), .dout(dout));

  always @(din)  in_edges++;
  always @(dout) out_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic held;
    anchor_en = 1'b1; din = 1'b0;
    #1;
    in_edges = 0; out_edges = 0;
    for (int i = 0; i < 300; i++) begin
      din = ~din;
      #(1ps * $urandom_range(50, 400));
      check(dout == din, "open path passes value");
    end
    check(in_edges == 300 && out_edges == 300, "every transition reaches the end");
    anchor_en = 1'b0;
    held = dout;
    out_edges = 0;
    for (int i = 0; i < 100; i++) begin
      din = 1'($urandom);
      #200ps;
      check(dout == held, "closed path holds");
    end
    check(out_edges == 0, "no transitions while closed");
    anchor_en = 1'b1;
    #1ps;
    check(dout == din, "reopened path follows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
