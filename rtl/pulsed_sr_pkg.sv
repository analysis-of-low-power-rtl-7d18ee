// Shared constants and sizing helpers for the pulsed-latch shift register.
//
// The shift register of N bits is split into M = N/K sub shift registers of
// K data latches each. Every sub shift register adds one temporary storage
// latch, and the shared pulsed clock generator drives K+1 pulse lines
// (CLK_pulse<1..K> and CLK_pulse<T>). Counting a latch as one unit and one
// pulse line with its clock-pulse circuit as alpha units, the cost of a
// choice of K is
//     cost(K) = alpha * (K + 1) + N * (1 + 1/K)
// and the same expression holds for area (alpha_A) and for power (alpha_P).
// The continuous optimum is K = sqrt(N / alpha); in practice K must divide N,
// so best_k() searches the divisors of N for the smallest cost.
//
// alpha is passed in hundredths (alpha_x100) so that everything here stays
// integer and can be evaluated at elaboration time. The cost formula and the
// rule of picking a divisor of N near sqrt(N/alpha) follow the published
// method; the defaults N = 256 and the integer scaling are this design's own.
package pulsed_sr_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Word length of one sub shift register, as in the published example.
  localparam int unsigned DEFAULT_K = 4;
  // Total length of the shift register (not fixed by the method).
  localparam int unsigned DEFAULT_N = 256;

  // Latches in an N-bit register made of K-bit sub shift registers.
  function automatic int unsigned num_latches(int unsigned n, int unsigned k);
    return n + n / k;
  endfunction

  // Pulse lines (and clock-pulse circuits) needed for word length K.
  function automatic int unsigned num_pulses(int unsigned k);
    return k + 1;
  endfunction

  // Normalised cost times 100: alpha*(K+1) + N*(1 + 1/K), with K dividing N.
  function automatic int unsigned cost_x100(int unsigned n, int unsigned k,
                                            int unsigned alpha_x100);
    return alpha_x100 * (k + 1) + 100 * num_latches(n, k);
  endfunction

  // Divisor of N with the smallest cost; ties go to the smaller K.
  function automatic int unsigned best_k(int unsigned n, int unsigned alpha_x100);
    int unsigned best = 1;
    for (int unsigned k = 2; k <= n; k++) begin
      if (n % k == 0 && cost_x100(n, k, alpha_x100) < cost_x100(n, best, alpha_x100))
        best = k;
    end
    return best;
  endfunction
endpackage
