// End-to-end testbench for pulsed_latch_shift_register at its default size
// (N = 256 bits, K = 4, so 64 sub shift registers and 5 pulse lines).
//
// A 10 ns clock drives the register; the serial input changes at the falling
// edge, well after each pulse sequence. A flip-flop reference shift register,
// written here independently, takes sin at every rising edge. Once the
// register has been filled, every cycle checks the whole parallel output,
// the serial output and every temporary latch (t[j] must equal the bit that
// just left Q_jK, which is also the new q[jK+1]).
// It also counts the mechanisms of the design and fails if one never
// happened: complete pulse sequences, and hand-overs where a temporary
// latch passes a changed bit into the next sub shift register. Finally it
// checks the sizing helpers of the package against hand-worked numbers.
module tb_pulsed_latch_shift_register;
  timeunit 1ns;
  timeprecision 1ps;
  import pulsed_sr_pkg::*;

  localparam int unsigned N      = DEFAULT_N;
  localparam int unsigned K      = DEFAULT_K;
  localparam int unsigned M      = N / K;
  localparam realtime     PERIOD = 10.0;
  localparam int          CYCLES = 4 * N;

  logic       clk = 1'b0;
  logic       sin = 1'b0;
  logic [N:1] q;
  logic [M:1] t;
  logic       sout;

  logic [N:1] ref_q = '0;
  logic       ref_out = 1'b0;    // bit that left ref_q[N] at the last edge
  int         edges = 0;
  int         sequences = 0;
  int         handovers = 0;
  logic [M:1] prev_t;
  int         checks = 0;
  int         failures = 0;

  pulsed_latch_shift_register dut (
    .clk(clk), .sin(sin), .q(q), .t(t), .sout(sout)
  );

  always #(PERIOD/2) clk = ~clk;

  // Reference: an ordinary flip-flop shift register.
  always @(posedge clk) begin
    ref_out = ref_q[N];
    ref_q   = {ref_q[N-1:1], sin};
    edges++;
  end

  // Mechanism counters.
  always @(negedge dut.clk_pulse[1]) sequences++;

  task automatic expect_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    prev_t = '0;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      // Checks start once every latch, T_M included, holds shifted-in data.
      if (edges > N + 1) begin
        expect_true(q === ref_q, $sformatf("parallel output cycle %0d", c));
        expect_true(sout === ref_q[N], "serial output");
        for (int j = 1; j < M; j++)
          expect_true(t[j] === ref_q[j*K + 1], $sformatf("temporary latch %0d", j));
        expect_true(t[M] === ref_out, "last temporary latch");
        for (int j = 1; j < M; j++)
          if (t[j] !== prev_t[j] && q[j*K + 1] === t[j]) handovers++;
      end
      prev_t = t;
      // New input for the next edge: random, with runs of equal bits.
      sin = (c % 7 == 0) ? sin : 1'($urandom);
    end
    // Every rising edge produced one complete pulse sequence.
    expect_true(sequences == edges, $sformatf("%0d sequences for %0d edges", sequences, edges));
    expect_true(sequences > 0, "no pulse sequence happened");
    expect_true(handovers > 0, "no hand-over between sub shift registers happened");
    // Sizing helpers, worked by hand.
    expect_true(num_latches(256, 4) == 320, "num_latches(256,4)");
    expect_true(num_pulses(4) == 5, "num_pulses(4)");
    expect_true(cost_x100(256, 4, 1600) == 40000, "cost(256,4,alpha=16)");
    expect_true(best_k(256, 1600) == 4, "best_k(256, alpha=16)");
    expect_true(best_k(256, 100) == 16, "best_k(256, alpha=1)");
    $display("pulse sequences=%0d hand-overs=%0d", sequences, handovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #(PERIOD * (CYCLES + 20));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
