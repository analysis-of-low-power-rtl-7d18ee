// Pulsed latch: the storage element of the shift register.
//
// A level-sensitive D latch that is transparent while clk_pulse is high and
// holds q while it is low. Driven by a pulse much shorter than the clock
// period it behaves like an edge-triggered flip-flop at roughly half the
// area and clock load of a master-slave pair, which is the point of the
// design. The latch is therefore intended: tools that report an inferred
// latch here are reporting the storage element itself, and a lint note that
// no latch was found in one instance stands for the same reason (the
// testbenches show that every instance holds its value between pulses).
//
// Interface: clk_pulse (pulsed clock), d (data), q (stored data).
// The published design names the element but gives no circuit for it; a
// positive-level D latch is this design's reading of it.
// Timing: q follows d during the pulse; d must be steady for the whole pulse,
// which the delayed, non-overlapping pulse scheme of the surrounding shift
// register guarantees. No reset: none is described, and a shift
// register is flushed by shifting in new data.
module pulsed_latch (
  input  logic clk_pulse,
  input  logic d,
  output logic q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (clk_pulse) q = d;
  end
endmodule
