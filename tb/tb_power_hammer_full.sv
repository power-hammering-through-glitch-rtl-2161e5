// tb_power_hammer_full -- the power hammer at its full size: 47 generators,
// each driving a 1337-latch burn path (62,839 anchoring latches), clocked at
// 200 MHz. After a reset it hammers in route-through mode and then in XOR6
// mode, the strongest configuration, and counts the transitions of all 47
// generator outputs and all 47 path ends per cycle: 47 per cycle for
// route-through (activity 0.5) and 6*47 = 282 per cycle for XOR6 (activity 3,
// each output switching like a 600 MHz clock). It also checks the timing of
// the last glitch of a cycle (5*200 ps after the clock edge).
module tb_power_hammer_full;
  timeunit 1ns;
  timeprecision 1ps;
  import glitch_pkg::*;

  localparam int unsigned N = NUM_GENERATORS;
  localparam int unsigned CYCLES = 20;

  logic clk = 1'b0;
  logic rst_n, hammer_en, anchor_en;
  lut_mode_e lut_mode;
  logic [N-1:0] glitch_out, path_end, g_prev, p_prev;
  int checks = 0, failures = 0;
  int g_edges = 0, p_edges = 0;
  realtime clk_t = 0, last_t = 0;

  power_hammer_top dut (
    .clk(clk), .rst_n(rst_n), .hammer_en(hammer_en), .lut_mode(lut_mode),
    .anchor_en(anchor_en), .glitch_out(glitch_out), .path_end(path_end));

  always #(CLK_PERIOD_PS * 1ps / 2) clk = ~clk;
  always @(posedge clk) clk_t = $realtime;

  initial begin g_prev = '0; p_prev = '0; end
  always @(glitch_out) begin
    g_edges += $countones(glitch_out ^ g_prev);
    g_prev = glitch_out;
    last_t = $realtime;
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

  initial begin
    rst_n = 1'b0; hammer_en = 1'b1; anchor_en = 1'b1; lut_mode = LUT_STATIC;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (glitch_out[g]) check(glitch_out[g] == 1'b0, "static output after reset");
    foreach (path_end[g])   check(path_end[g] == 1'b0, "path end after reset");
    for (int m = 1; m < 7; m += 5) begin        // route-through, then XOR6
      lut_mode = lut_mode_e'(m);
      @(negedge clk);
      for (int c = 0; c < CYCLES; c++) begin
        @(negedge clk);
        g_edges = 0; p_edges = 0;
        @(negedge clk);
        check(g_edges == m * N, $sformatf("mode %0d: %0d generator transitions in a cycle", m, g_edges));
        check(p_edges == m * N, $sformatf("mode %0d: %0d path-end transitions in a cycle", m, p_edges));
        check(last_t - clk_t > (m - 1) * 0.2ns - 0.01ns && last_t - clk_t < (m - 1) * 0.2ns + 0.01ns,
              "last transition (k-1)*200 ps after the clock edge");
      end
    end
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
