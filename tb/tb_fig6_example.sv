// Runs the published example configuration: two 4-bit sub shift registers
// (N = 8, K = 4, latches Q1..Q8, T1, T2) on the five pulses CLK_pulse<1:4>
// and CLK_pulse<T>.
//
// The input alternates 0,1,0,1,... so that every latch changes on every
// shift. For each shift the testbench records when each latch changed,
// relative to the rising clock edge, and checks that the changes happen in
// the order of the pulse sequence and inside the right pulse:
//   (1) T1, T2 on CLK_pulse<T>;  (2) Q4, Q8 on <4>;  (3) Q3, Q7 on <3>;
//   (4) Q2, Q6 on <2>;           (5) Q1, Q5 on <1>.
// It also checks the contents after every shift: Q1 = IN<0>, Q2 = IN<-1>,
// ..., Q4 = IN<-3>, T1 = Q5 = IN<-4>, ..., Q8 = IN<-7>, T2 = IN<-8>, where
// IN<0> is the bit taken at this edge and IN<-n> the one n edges earlier.
module tb_fig6_example;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N       = 8;
  localparam int unsigned K       = 4;
  localparam int unsigned M       = N / K;
  localparam realtime     T_PULSE = 0.2;
  localparam realtime     T_GAP   = 0.1;
  localparam realtime     PERIOD  = 10.0;
  localparam int          CYCLES  = 40;

  logic       clk = 1'b0;
  logic       sin = 1'b0;
  logic [N:1] q;
  logic [M:1] t;
  logic       sout;

  realtime    edge_t = 0.0;
  realtime    q_chg [1:N];
  realtime    t_chg [1:M];
  logic [N+M:0] hist = '0;   // hist[n] = IN<-n> after the current edge
  int         edges = 0;
  int         checks = 0;
  int         failures = 0;

  pulsed_latch_shift_register #(.N(N), .K(K), .T_PULSE(T_PULSE), .T_GAP(T_GAP)) dut (
    .clk(clk), .sin(sin), .q(q), .t(t), .sout(sout)
  );

  always #(PERIOD/2) clk = ~clk;

  always @(posedge clk) begin
    edge_t = $realtime;
    hist   = {hist[N+M-1:0], sin};
    edges++;
  end

  for (genvar i = 1; i <= N; i++) begin : g_q
    always @(q[i]) q_chg[i] = $realtime - edge_t;
  end
  for (genvar j = 1; j <= M; j++) begin : g_t
    always @(t[j]) t_chg[j] = $realtime - edge_t;
  end

  // Start of pulse slot s (0 = CLK_pulse<T>, s = K+1-i for CLK_pulse<i>).
  function automatic realtime slot_start(int s);
    return T_GAP + s * (T_GAP + T_PULSE);
  endfunction

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
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      if (edges > N + M + 1) begin
        // Contents, as labelled in the published waveforms.
        for (int i = 1; i <= N; i++) begin
          expect_true(q[i] === hist[i - 1], $sformatf("Q%0d = IN<-%0d>", i, i - 1));
        end
        expect_true(sout === hist[N - 1], "serial output = Q8");
        for (int j = 1; j <= M; j++)
          expect_true(t[j] === hist[j * K], $sformatf("T%0d = IN<-%0d>", j, j * K));
        // Timing: every latch changed at the start of its own pulse.
        for (int j = 1; j <= M; j++)
          expect_true(near(t_chg[j], slot_start(0)), $sformatf("T%0d changed at %f", j, t_chg[j]));
        for (int i = 1; i <= N; i++) begin
          automatic int pos = (i - 1) % K + 1;     // CLK_pulse<pos> clocks Qi
          expect_true(near(q_chg[i], slot_start(K + 1 - pos)),
                      $sformatf("Q%0d changed at %f", i, q_chg[i]));
        end
        // The hand-over: Q5 changed after T1 and in the same pulse as Q1.
        expect_true(t_chg[1] < q_chg[K] && q_chg[K] < q_chg[1] && near(q_chg[K + 1], q_chg[1]),
                    "order T1, Q4, ..., Q1 = Q5");
      end
      sin = ~sin;
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
