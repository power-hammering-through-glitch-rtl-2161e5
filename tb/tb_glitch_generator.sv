// tb_glitch_generator -- self-checking test of one glitch generator at 200 MHz.
// For each of the seven LUT modes the generator runs for 20 clock cycles and
// the transitions of its output are counted per cycle. Expected, from the
// mode alone: 0 (static), 1 (route-through, activity 0.5) and k per cycle for
// XORk (activity k/2). It also checks that the last transition of a cycle
// comes (k-1)*200 ps after the clock edge and that nothing moves with the
// toggle enable low.
module tb_glitch_generator;
  timeunit 1ns;
  timeprecision 1ps;
  import glitch_pkg::*;

  localparam realtime PERIOD = CLK_PERIOD_PS * 1ps;   // 200 MHz
  logic clk = 1'b0;
  logic rst_n, en;
  logic [63:0] init;
  logic glitch, toggle_q;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime last_edge_t = 0, clk_t = 0;

  glitch_generator dut (.clk(clk), .rst_n(rst_n), .en(en), .lut_init(init),
                        .glitch(glitch), .toggle_q(toggle_q));

  always #(PERIOD / 2) clk = ~clk;
  always @(posedge clk) clk_t = $realtime;
  always @(glitch) begin
    edges++;
    last_edge_t = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; init = lut_init(3'd0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1; en = 1'b1;
    for (int m = 0; m < 7; m++) begin
      init = lut_init(3'(m));
      repeat (2) @(posedge clk);       // let the mode change settle
      @(negedge clk);
      for (int c = 0; c < 20; c++) begin
        edges = 0;
        @(negedge clk);
        check(edges == m, $sformatf("mode %0d: %0d transitions per cycle", m, edges));
        if (m > 0)
          check(last_edge_t - clk_t > (m - 1) * 0.2ns - 0.01ns &&
                last_edge_t - clk_t < (m - 1) * 0.2ns + 0.01ns,
                $sformatf("mode %0d: last transition at (k-1)*200 ps", m));
      end
    end
    // XOR6 with the toggle disabled: nothing moves
    en = 1'b0;
    @(negedge clk);
    edges = 0;
    repeat (10) @(negedge clk);
    check(edges == 0, "no glitches without toggling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
