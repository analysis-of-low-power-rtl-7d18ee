// Testbench for the pulsed clock generator model (K = 4).
//
// For every rising clock edge it records when each of the K+1 pulse lines
// rises and falls, relative to the edge, and checks: one pulse per line per
// clock cycle; the order clk_pulse_t, clk_pulse[K], ..., clk_pulse[1]; each
// pulse T_PULSE wide and starting T_GAP after the previous one ended (times
// computed here from the two parameters); and no two pulses high at once.
module tb_pulsed_clock_generator;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned K       = 4;
  localparam realtime     T_PULSE = 0.2;
  localparam realtime     T_GAP   = 0.1;
  localparam realtime     PERIOD  = 10.0;
  localparam int          CYCLES  = 50;

  logic       clk = 1'b0;
  logic [K:1] clk_pulse;
  logic       clk_pulse_t;

  // Index 0 is the T line, index i the line clk_pulse[i].
  realtime edge_t;
  realtime rise_t [0:K];
  realtime fall_t [0:K];
  int      rises  [0:K];
  int      overlaps = 0;
  int      checks = 0;
  int      failures = 0;

  pulsed_clock_generator #(.K(K), .T_PULSE(T_PULSE), .T_GAP(T_GAP)) dut (
    .clk(clk), .clk_pulse(clk_pulse), .clk_pulse_t(clk_pulse_t)
  );

  always #(PERIOD/2) clk = ~clk;

  always @(posedge clk) edge_t = $realtime;

  always @(posedge clk_pulse_t) begin rise_t[0] = $realtime - edge_t; rises[0]++; end
  always @(negedge clk_pulse_t) fall_t[0] = $realtime - edge_t;
  for (genvar i = 1; i <= K; i++) begin : g_mon
    always @(posedge clk_pulse[i]) begin rise_t[i] = $realtime - edge_t; rises[i]++; end
    always @(negedge clk_pulse[i]) fall_t[i] = $realtime - edge_t;
  end

  always @(clk_pulse or clk_pulse_t) begin
    if ($countones({clk_pulse, clk_pulse_t}) > 1) overlaps++;
  end

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    for (int i = 0; i <= K; i++) rises[i] = 0;
    for (int c = 1; c <= CYCLES; c++) begin
      @(negedge clk);   // the whole sequence is over by then
      for (int s = 0; s <= K; s++) begin
        // Slot s carries line T for s = 0, line K+1-s otherwise.
        automatic int line = (s == 0) ? 0 : K + 1 - s;
        automatic realtime start = T_GAP + s * (T_GAP + T_PULSE);
        expect_true(rises[line] == c, $sformatf("line %0d pulse count %0d in cycle %0d", line, rises[line], c));
        expect_true(near(rise_t[line], start), $sformatf("line %0d starts at %f, expected %f", line, rise_t[line], start));
        expect_true(near(fall_t[line] - rise_t[line], T_PULSE), $sformatf("line %0d width %f", line, fall_t[line] - rise_t[line]));
      end
      expect_true(overlaps == 0, "pulses overlap");
      expect_true(clk_pulse == '0 && clk_pulse_t == 1'b0, "a pulse is still high at the falling clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(PERIOD * (CYCLES + 10));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
