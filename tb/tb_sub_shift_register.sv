// Testbench for sub_shift_register (K = 4, the published example).
//
// The testbench makes the K+1 pulses itself, in the published order
// (clk_pulse_t, then clk_pulse[K] down to clk_pulse[1], never overlapping),
// with d_in held steady through each sequence. After every single pulse it
// compares all latches with a reference that updates only the latch whose
// pulse just ended, so a latch that changes at the wrong time or takes a
// value already overwritten is caught. After a full sequence the register
// must have shifted by exactly one place.
module tb_sub_shift_register;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned K = 4;

  logic [K:1] clk_pulse = '0;
  logic       clk_pulse_t = 1'b0;
  logic       d_in = 1'b0;
  logic [K:1] q;
  logic       t;

  logic [K:1] ref_q;
  logic       ref_t;
  bit         known = 1'b0;   // reference valid once the register is flushed
  int         shifts = 0;
  int         checks = 0;
  int         failures = 0;

  sub_shift_register #(.K(K)) dut (
    .clk_pulse(clk_pulse), .clk_pulse_t(clk_pulse_t),
    .d_in(d_in), .q(q), .t(t)
  );

  task automatic compare(input string what);
    if (!known) return;
    checks++;
    if (q !== ref_q || t !== ref_t) begin
      failures++;
      $display("FAIL %s shift %0d: q=%b t=%b expected q=%b t=%b",
               what, shifts, q, t, ref_q, ref_t);
    end
  endtask

  // One shift: K+1 non-overlapping pulses, 0.2 ns wide with 0.1 ns gaps.
  task automatic shift_once(input logic din);
    d_in = din;
    #0.1 clk_pulse_t = 1'b1;
    #0.2 clk_pulse_t = 1'b0;
    ref_t = ref_q[K];
    compare("after pulse T");
    for (int i = K; i >= 1; i--) begin
      #0.1 clk_pulse[i] = 1'b1;
      #0.2 clk_pulse[i] = 1'b0;
      ref_q[i] = (i == 1) ? din : ref_q[i-1];
      compare($sformatf("after pulse %0d", i));
    end
    #1;
    shifts++;
  endtask

  initial begin
    // Flush: K+1 known bits fill the K data latches and the temporary latch.
    for (int n = 0; n <= K; n++) begin
      shift_once(1'($urandom));
    end
    ref_q = q;
    ref_t = t;
    known = 1'b1;
    // Self-consistency of the flush: the last bits entered are in order.
    for (int n = 0; n < 300; n++) begin
      shift_once(1'($urandom));
    end
    // Fixed patterns: a single 1 walking through, then a single 0.
    for (int n = 0; n < 2*(K+1); n++) shift_once(n == 0);
    for (int n = 0; n < 2*(K+1); n++) shift_once(n != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The data entered during the flush must appear in order: check once.
  logic [K+1:1] flush_bits;
  initial begin
    flush_bits = '0;
    for (int n = 0; n <= K; n++) begin
      @(negedge clk_pulse[1]);
      flush_bits = {flush_bits[K:1], d_in};
    end
    #0.5;
    checks++;
    if ({t, q} !== flush_bits) begin
      failures++;
      $display("FAIL flush: t,q=%b expected %b", {t, q}, flush_bits);
    end
  end

  // Watchdog.
  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
