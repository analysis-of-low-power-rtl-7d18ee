// Testbench for pulsed_latch: the latch must follow d while clk_pulse is high
// and hold the last value while it is low, whatever d does then.
// Random data; every check compares q with the value the testbench expects.
module tb_pulsed_latch;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_pulse = 1'b0;
  logic d = 1'b0;
  logic q;
  logic held;
  int   checks = 0;
  int   failures = 0;

  pulsed_latch dut (.clk_pulse(clk_pulse), .d(d), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b at %0t", what, q, exp, $time);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      // Transparent phase: q tracks d.
      clk_pulse = 1'b1;
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom);
        #1;
        check(d, "transparent");
      end
      held = d;
      // Opaque phase: q keeps the value present when the pulse fell.
      clk_pulse = 1'b0;
      #1;
      check(held, "closing");
      for (int k = 0; k < 3; k++) begin
        d = ~d;
        #1;
        check(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
