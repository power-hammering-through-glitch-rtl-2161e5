// tb_tap_delay_chain -- self-checking test of the six-tap delay chain.
// After each edge on din, tap i must still hold the old value 10 ps before
// i*200 ps and the new value 10 ps after it.
module tb_tap_delay_chain;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TAPS = 6;
  localparam int unsigned STEP = 200;
  logic din;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  tap_delay_chain #(.TAPS(TAPS), .TAP_DELAY_PS(STEP)) dut (.din(din), .taps(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t taps=%b", what, $time, taps);
    end
  endtask

  initial begin
    din = 1'b0;
    #5;
    for (int e = 0; e < 20; e++) begin
      logic nv;
      nv = ~din;
      din = nv;
      for (int i = 0; i < TAPS; i++) begin
        // now: edge time + i*STEP - 10 ps
        if (i == 0) begin
          #1ps;
          check(taps[0] == nv, "tap 0 follows din");
          #(STEP * 1ps - 11ps);
        end else begin
          check(taps[i] == ~nv, $sformatf("tap %0d not early", i));
          #20ps;
          check(taps[i] == nv, $sformatf("tap %0d after %0d ps", i, i * STEP));
          #(STEP * 1ps - 20ps);
        end
      end
      #(3ns);
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
