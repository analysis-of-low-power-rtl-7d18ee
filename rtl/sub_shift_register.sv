// Sub shift register: K data latches followed by one temporary storage latch.
//
// Latch i (1..K) stores data bit Qi and is clocked by clk_pulse[i]; the
// temporary latch stores T and is clocked by clk_pulse_t. Latch 1 takes d_in,
// which is the chip input for the first sub shift register and the T latch of
// the previous one otherwise. The pulses are delivered in the order
// clk_pulse_t, clk_pulse[K], ..., clk_pulse[1], never two at once, so each
// latch is opened only after the latch it feeds has closed on the old value:
// one rising CLK edge moves every bit one place along, with no race through
// transparent latches. After a shift, t holds the bit that left Q_K; the next
// sub shift register copies it into its first latch during its clk_pulse[1],
// the last pulse of the sequence.
//
// Interface: clk_pulse[K:1], clk_pulse_t (from the shared pulsed clock
// generator), d_in (serial input), q[K:1] (data latches, q[1] nearest the
// input), t (temporary latch, the serial output towards the next stage).
// Structure and pulse order follow the published schematic and waveforms;
// the word length K is a parameter, 4 in the published example.
module sub_shift_register #(
  parameter int unsigned K = pulsed_sr_pkg::DEFAULT_K
) (
  input  logic [K:1] clk_pulse,
  input  logic       clk_pulse_t,
  input  logic       d_in,
  output logic [K:1] q,
  output logic       t
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar i = 1; i <= K; i++) begin : g_bit
    pulsed_latch u_latch (
      .clk_pulse (clk_pulse[i]),
      .d         (i == 1 ? d_in : q[i == 1 ? 1 : i - 1]),
      .q         (q[i])
    );
  end

  pulsed_latch u_temp (
    .clk_pulse (clk_pulse_t),
    .d         (q[K]),
    .q         (t)
  );
endmodule
