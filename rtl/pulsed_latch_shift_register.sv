// N-bit serial-in, parallel-out shift register built from pulsed latches.
//
// A plain chain of latches on one pulsed clock does not shift: while the
// pulse is high every latch is transparent and new data races through
// several stages. This design splits the N bits into M = N/K sub shift
// registers of K data latches and one temporary latch each, and clocks them
// with K+1 non-overlapping pulses that arrive in reverse order of the data
// flow (clk_pulse_t, then clk_pulse[K] down to clk_pulse[1]). Within a sub
// shift register each latch is therefore written only after its successor
// has taken the old value; between sub shift registers the temporary latch
// T_j keeps the bit leaving Q_(jK) until the first latch of the next sub
// shift register copies it on clk_pulse[1]. All sub shift registers share
// the same K+1 pulse lines, so the number of pulses does not grow with N.
// Cost: N + M latches and K+1 pulse lines instead of N flip-flops.
//
// Interface: clk (system clock), sin (serial input, must be steady from the
// rising edge of clk until the end of the pulse sequence), q[N:1] (parallel
// output, q[1] newest bit), t[M:1] (temporary latches, t[j] equals q[jK+1]
// after a shift), sout (= q[N], serial output).
// Timing: one shift per rising clk edge; outputs settle within
// (K+1)*(T_GAP+T_PULSE) of that edge. The architecture follows the published
// design; N = 256, the pulse timing and the parallel/serial outputs are this
// design's own choices (K = 4 is the published example word length).
module pulsed_latch_shift_register #(
  parameter int unsigned N       = pulsed_sr_pkg::DEFAULT_N,
  parameter int unsigned K       = pulsed_sr_pkg::DEFAULT_K,
  parameter realtime     T_PULSE = 0.2,
  parameter realtime     T_GAP   = 0.1,
  localparam int unsigned M      = N / K
) (
  input  logic       clk,
  input  logic       sin,
  output logic [N:1] q,
  output logic [M:1] t,
  output logic       sout
);
  timeunit 1ns;
  timeprecision 1ps;

  if (K == 0 || N % K != 0) begin : g_bad_size
    $error("pulsed_latch_shift_register: K must divide N");
  end

  logic [K:1] clk_pulse;
  logic       clk_pulse_t;

  pulsed_clock_generator #(
    .K       (K),
    .T_PULSE (T_PULSE),
    .T_GAP   (T_GAP)
  ) u_pcg (
    .clk         (clk),
    .clk_pulse   (clk_pulse),
    .clk_pulse_t (clk_pulse_t)
  );

  for (genvar j = 1; j <= M; j++) begin : g_sub
    sub_shift_register #(.K(K)) u_sub (
      .clk_pulse   (clk_pulse),
      .clk_pulse_t (clk_pulse_t),
      .d_in        (j == 1 ? sin : t[j == 1 ? 1 : j - 1]),
      .q           (q[j*K : (j-1)*K + 1]),
      .t           (t[j])
    );
  end

  assign sout = q[N];
endmodule
