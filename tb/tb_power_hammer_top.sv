// tb_power_hammer_top -- end-to-end test of the power hammer at 200 MHz.
// A reduced array (4 generators, 32-segment paths) is reset and then taken
// through every LUT mode with the toggle enabled and the anchors open; the
// transitions of every generator output and every path end are counted per
// clock cycle and must equal the mode's k (0 static, 1 route-through, k for
// XORk), i.e. activity factor k/2. It then exercises the other mechanisms:
// closing the anchors (path ends freeze while the generators keep glitching),
// disabling the toggle (everything stops, as a trigger would do) and a reset
// in the middle of hammering. Each mechanism is counted and must occur.
module tb_power_hammer_top;
  timeunit 1ns;
  timeprecision 1ps;
  import glitch_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned S = 32;
  localparam int unsigned CYCLES = 12;

  logic clk = 1'b0;
  logic rst_n, hammer_en, anchor_en;
  lut_mode_e lut_mode;
  logic [N-1:0] glitch_out, path_end, g_prev, p_prev;
  int checks = 0, failures = 0;
  int g_edges = 0, p_edges = 0;
  int seen_mode[7];
  int seen_anchor_closed = 0, seen_trigger_off = 0, seen_reset = 0;

  power_hammer_top #(.N_GEN(N), .SEGMENTS(S)) dut (
    .clk(clk), .rst_n(rst_n), .hammer_en(hammer_en), .lut_mode(lut_mode),
    .anchor_en(anchor_en), .glitch_out(glitch_out), .path_end(path_end));

  always #(CLK_PERIOD_PS * 1ps / 2) clk = ~clk;

  initial begin g_prev = '0; p_prev = '0; end
  always @(glitch_out) begin
    g_edges += $countones(glitch_out ^ g_prev);
    g_prev = glitch_out;
  end
  always @(path_end) begin
    p_edges += $countones(path_end ^ p_prev);
    p_prev = path_end;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Count transitions over CYCLES whole cycles, sampled at falling edges
  // (all transitions of a cycle end 1 ns after the rising edge).
  task automatic measure(output int g, output int p);
    @(negedge clk);
    g_edges = 0; p_edges = 0;
    repeat (CYCLES) @(negedge clk);
    g = g_edges; p = p_edges;
  endtask

  initial begin
    int g, p;
    rst_n = 1'b0; hammer_en = 1'b1; anchor_en = 1'b1; lut_mode = LUT_STATIC;
    repeat (3) @(posedge clk);
    #1 check(dut.g_gen[0].u_gen.toggle_q == 1'b0, "reset clears the toggle flip-flops");
    rst_n = 1'b1;
    for (int m = 0; m < 7; m++) begin
      lut_mode = lut_mode_e'(m);
      @(negedge clk);
      measure(g, p);
      check(g == m * N * CYCLES, $sformatf("mode %0d: generator transitions %0d", m, g));
      check(p == m * N * CYCLES, $sformatf("mode %0d: path-end transitions %0d", m, p));
      if (g == m * N * CYCLES && p == g) seen_mode[m]++;
    end
    // anchors closed while hammering with XOR6
    lut_mode = LUT_XOR6;
    anchor_en = 1'b0;
    measure(g, p);
    check(g == 6 * N * CYCLES, "generators keep glitching with anchors closed");
    check(p == 0, "path ends frozen with anchors closed");
    if (g > 0 && p == 0) seen_anchor_closed++;
    anchor_en = 1'b1;
    // toggle disabled (trigger inactive)
    hammer_en = 1'b0;
    measure(g, p);
    check(g == 0 && p == 0, "no activity with the toggle disabled");
    if (g == 0 && p == 0) seen_trigger_off++;
    hammer_en = 1'b1;
    // reset in the middle of hammering, then resume
    @(posedge clk);
    rst_n = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 check(dut.g_gen[N-1].u_gen.toggle_q == 1'b0, "reset during hammering");
    measure(g, p);
    check(g == 0, "no activity while held in reset");
    rst_n = 1'b1;
    measure(g, p);
    check(g == 6 * N * CYCLES && p == g, "hammering resumes after reset");
    if (g == 6 * N * CYCLES) seen_reset++;

    for (int m = 0; m < 7; m++)
      check(seen_mode[m] > 0, $sformatf("mode %0d exercised", m));
    check(seen_anchor_closed > 0, "anchor close exercised");
    check(seen_trigger_off > 0, "toggle disable exercised");
    check(seen_reset > 0, "reset exercised");
    $display("modes ok: %p, anchor closed %0d, toggle off %0d, reset %0d",
             seen_mode, seen_anchor_closed, seen_trigger_off, seen_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
