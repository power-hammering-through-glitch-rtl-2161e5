// tb_lut6 -- self-checking test of the look-up table and of the mode decoder.
// Part 1: random configurations and inputs; y must equal bit a of init,
// extracted here with a shift. Part 2: for every mode of glitch_pkg, the
// decoded INIT must give constant 0 (STATIC), input 0 (ROUTE) or the parity of
// inputs 0..k-1 (XORk), computed here with $countones. Part 3: the toggle
// probability of each configuration, counted over all n*2^n single-input
// changes of the n used inputs, must be 1 for route-through and XOR modes.
module tb_lut6;
  timeunit 1ns;
  timeprecision 1ps;
  import glitch_pkg::*;

  logic [63:0] init;
  logic [5:0]  a;
  logic        y;
  int checks = 0, failures = 0;

  lut6 dut (.init(init), .a(a), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t (init=%h a=%0d y=%0b)", what, $time, init, a, y);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      init = {$urandom, $urandom};
      a    = 6'($urandom);
      #1 check(y == 1'((init >> a) & 64'd1), "y = init[a]");
    end
    for (int m = 0; m < 7; m++) begin
      int toggles;
      init = lut_init(3'(m));
      for (int v = 0; v < 64; v++) begin
        logic exp_y;
        a = 6'(v);
        if (m == 0) exp_y = 1'b0;
        else        exp_y = 1'($countones(v & ((1 << m) - 1)) % 2);
        #1 check(y == exp_y, $sformatf("mode %0d output", m));
      end
      // toggle probability over the m used inputs
      toggles = 0;
      for (int v = 0; v < (1 << m); v++) begin
        for (int b = 0; b < m; b++) begin
          logic y0;
          a = 6'(v); #1 y0 = y;
          a = 6'(v ^ (1 << b)); #1;
          if (y != y0) toggles++;
        end
      end
      if (m > 0) check(toggles == m * (1 << m), $sformatf("mode %0d toggles on every input change", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
