// Pulsed clock generator -- behavioural model (delays, not synthesizable).
//
// The real part is a chain of delay cells and pulse-shaping gates; its
// transistor-level design is not part of this RTL. This model reproduces its
// function at the same ports: on every rising edge of clk it emits K+1 short
// pulses, one on each output, one after another and never overlapping:
//     clk_pulse_t, clk_pulse[K], clk_pulse[K-1], ..., clk_pulse[1].
// Each pulse starts T_GAP after the previous one ended (the first one T_GAP
// after the clock edge) and lasts T_PULSE, so a whole sequence takes
// (K+1)*(T_GAP+T_PULSE). The clock period must be longer than that; a rising
// edge that arrives while a sequence is still running is reported as an error
// and is not served.
//
// Interface: clk (system clock), clk_pulse[K:1] and clk_pulse_t (pulsed
// clocks for the data latches and the temporary latches of every sub shift
// register). The order of the pulses and the fact that they follow the rising
// clock edge come from the published waveforms; T_PULSE and T_GAP (in ns) are
// this model's own values, since no widths or delays are published.
module pulsed_clock_generator #(
  parameter int unsigned K       = pulsed_sr_pkg::DEFAULT_K,
  parameter realtime     T_PULSE = 0.2,
  parameter realtime     T_GAP   = 0.1
) (
  input  logic       clk,
  output logic [K:1] clk_pulse,
  output logic       clk_pulse_t
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [K:1] pulse_r   = '0;
  logic       pulse_t_r = 1'b0;
  logic       busy      = 1'b0;

  assign clk_pulse   = pulse_r;
  assign clk_pulse_t = pulse_t_r;

  // One sequence per rising clock edge.
  always @(posedge clk) begin
    busy <= 1'b1;
    #(T_GAP)   pulse_t_r <= 1'b1;
    #(T_PULSE) pulse_t_r <= 1'b0;
    for (int i = K; i >= 1; i--) begin
      #(T_GAP)   pulse_r[i] <= 1'b1;
      #(T_PULSE) pulse_r[i] <= 1'b0;
    end
    busy <= 1'b0;
  end

  // The model cannot start a new sequence before the previous one is over
  // (an edge arriving earlier is lost).
  always @(posedge clk) begin
    assert (!busy)
      else $error("pulsed_clock_generator: clock period shorter than the pulse sequence");
  end

  // Pulses never overlap.
  always_comb begin
    assert ($countones({pulse_r, pulse_t_r}) <= 1)
      else $error("pulsed_clock_generator: overlapping pulses");
  end
endmodule
