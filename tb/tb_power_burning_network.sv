// tb_power_burning_network -- self-checking test of the set of burn paths.
// Eight short paths get independent random inputs; each path end must equal
// its own input while the anchors are open (a wrong pairing of inputs and
// paths shows up), and all must hold while the anchors are closed.
module tb_power_burning_network;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;
  localparam int unsigned S = 16;
  logic [N-1:0] glitch_in, path_end, held;
  logic anchor_en;
  int checks = 0, failures = 0;

  power_burning_network #(.N_GEN(N), .SEGMENTS(S)) dut (
    .glitch_in(glitch_in), .anchor_en(anchor_en), .path_end(path_end));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t in=%b end=%b", what, $time, glitch_in, path_end);
    end
  endtask

  initial begin
    anchor_en = 1'b1; glitch_in = '0;
    #1;
    for (int i = 0; i < 400; i++) begin
      glitch_in = N'($urandom);
      #100ps;
      check(path_end == glitch_in, "each path end follows its own input");
    end
    anchor_en = 1'b0;
    held = path_end;
    for (int i = 0; i < 100; i++) begin
      glitch_in = N'($urandom);
      #100ps;
      check(path_end == held, "closed anchors hold");
    end
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
