# Pulsed-latch shift register

A shift register has no logic between its storage elements, so its speed is
set by the storage element alone, and area and power matter more than delay.
A latch opened by a short clock pulse (a *pulsed latch*) stores a bit at
roughly half the area and clock load of a master-slave flip-flop. The catch
is that a chain of latches opened by the same pulse does not shift: while
the pulse is high every latch is transparent, and a new bit can run through
several stages before the pulse ends.

This design makes a chain of pulsed latches shift correctly. It does not
add a delay element between stages. Instead it opens the latches one after
another, **downstream first**: each latch is opened only after the latch it
feeds has already closed on the old value. So that this needs only a few
pulse lines, the register is cut into short *sub shift registers* that all
share the same pulses. One extra *temporary latch* at the end of each sub
shift register carries the bit over to the next one.

## Structure

```
                 sub shift register #1                 sub shift register #2
 sin ─► [Q1]─►[Q2]─►[Q3]─►[Q4]─►[T1] ─► [Q5]─►[Q6]─►[Q7]─►[Q8]─►[T2] ─► ... #M
         ▲     ▲     ▲     ▲     ▲        ▲     ▲     ▲     ▲     ▲
         <1>   <2>   <3>   <4>   <T>      <1>   <2>   <3>   <4>   <T>
                          (pulse lines shared by all M sub shift registers)
clk ─► pulsed clock generator ─► clk_pulse[1..K], clk_pulse_t
```

* N data bits are split into M = N/K sub shift registers of K data latches.
  Each one also has a temporary latch T, so there are N + M latches in all.
* Data latch *i* of every sub shift register is clocked by `clk_pulse[i]`.
  Every temporary latch is clocked by `clk_pulse_t`.
* T_j drives the first data latch of sub shift register j+1. The last
  temporary latch, T_M, drives nothing. It is kept so that every sub shift
  register is the same, and it is brought out on `t[M]`.
* The pulse generator serves every sub shift register, so the number of
  pulse lines is K+1 whatever N is.

Defaults: N = 256, K = 4 (M = 64). That is 320 latches and 5 pulse lines,
where a flip-flop design would need 256 flip-flops.

## The pulse sequence

This is the part that makes the design work. After every rising edge of
`clk`, the generator sends K+1 pulses in this order. No two of them are
ever high at the same time.

```
clk          ‾‾‾|_____________________________________________
slot            (1)      (2)      (3)      (4)      (5)
clk_pulse_t   _|‾|______________________________________   T_j  <= Q_jK
clk_pulse[4]  ________|‾|_______________________________   Q4   <= Q3
clk_pulse[3]  _______________|‾|________________________   Q3   <= Q2
clk_pulse[2]  ______________________|‾|_________________   Q2   <= Q1
clk_pulse[1]  _____________________________|‾|__________   Q1   <= sin,
                                                           Q_jK+1 <= T_j
               |<->| T_GAP    |<->| T_PULSE
```

Take any latch. It is opened only after the latch it feeds has closed, so
the value it gives out is already stored one place further on. It is opened
before the latch that feeds it, so its input cannot change while it is open.
The bit that leaves Q4 is parked in T1 during slot (1). It is copied into Q5
in slot (5), together with the move from `sin` into Q1. After one sequence
every bit has moved exactly one place, the same result as a flip-flop shift
register clocked on the rising edge of `clk`.

A sequence takes (K+1)·(T_GAP+T_PULSE): 1.5 ns with the model's defaults.
From this follow two rules for whoever uses the register:

* The clock period must be longer than the sequence. The generator model
  reports an edge that comes too early.
* `sin` must stay steady from the rising edge of `clk` until `clk_pulse[1]`
  has ended. The testbenches change it on the falling edge.

The outputs are settled once the sequence is over. After a shift,
`q[1]` is the bit just taken in and `q[i]` is the bit taken i-1 edges earlier.
`t[j]` equals `q[jK+1]`, and `t[M]` holds the bit that has just left `q[N]`.

## Choosing K

K sets the balance between latches and pulse lines. Count a latch as 1 unit.
Count one pulse line with its pulse circuit as α units: α_A when measuring
area, α_P when measuring power. The cost is then

    cost(K) = α·(K+1) + N·(1 + 1/K)

This cost is lowest at K = √(N/α). K must divide N, so in practice K is the
divisor of N closest to that value. The package `pulsed_sr_pkg` provides
`num_latches`, `num_pulses`, `cost_x100` and `best_k`. They use integers,
with α given in hundredths, so they can be evaluated at elaboration time.
`best_k` searches the divisors of N for the lowest cost. Examples for
N = 256: α = 16 gives K = 4, and α = 1 gives K = 16. No value of α is
assumed anywhere; the K = 4 default is the word length of the published
example.

## Modules

| file | module | role |
|---|---|---|
| `rtl/pulsed_sr_pkg.sv` | package | default sizes and the sizing functions above |
| `rtl/pulsed_latch.sv` | `pulsed_latch` | D latch, transparent while `clk_pulse` is high |
| `rtl/sub_shift_register.sv` | `sub_shift_register #(K)` | K data latches and one temporary latch |
| `rtl/pulsed_clock_generator.sv` | `pulsed_clock_generator #(K, T_PULSE, T_GAP)` | **behavioural model**: K+1 delayed non-overlapping pulses per rising clock edge |
| `rtl/pulsed_latch_shift_register.sv` | `pulsed_latch_shift_register #(N, K, T_PULSE, T_GAP)` | top: the generator and M chained sub shift registers |

Top ports: `clk`, `sin` (serial in), `q[N:1]` (parallel out, `q[1]` the
newest bit), `t[M:1]` (temporary latches), `sout` (= `q[N]`). `T_PULSE` and
`T_GAP` are in ns.

## Implementation notes

* **The pulse generator is a timing circuit, not logic.** Its model is
  written with delays and simulates correctly. A synthesis tool that ignores
  delays reduces every pulse to a constant 0. The latches then never open,
  and the whole top optimises away. To build the design, replace
  `pulsed_clock_generator` with a custom or library pulse generator that
  has the same ports. It must meet the order and non-overlap rules above
  across process, voltage and temperature. The latch chain itself
  (`sub_shift_register`) synthesises to plain latch cells, 5 per sub shift
  register at K = 4.
* Latches are intended. Lint and synthesis tools will report them.
* Every latch is opened by a pulse that no other stage opens at the same
  time. Static timing analysis therefore needs per-pulse constraints: a
  single clock definition does not describe the design.
* There is no reset. Shift N+1 bits in to fill the register, `T_M` included.

## Choices made in this RTL

These points are not fixed by the published design; this is how the RTL
settles them:

* N = 256. Only the example word length, K = 4, is published.
* Pulse width 0.2 ns and gap 0.1 ns. No pulse widths or delays are
  published; only the order of the pulses and that they follow the rising
  clock edge.
* The latch has positive polarity. No latch circuit is given.
* The parallel outputs `q` and `t` and the serial output `sout` are this
  design's interface.
* The published waveform gives the labels for the second sub shift register
  in the following cycle as copies of the first register's. This RTL follows
  the connection the design states instead: T1 is copied into Q5 on every
  shift.
* The sizing rule is written as a search for the lowest-cost divisor of N.
  The published rule picks the divisor nearest √(N/α); the two give the same
  or an equally cheap choice.

## Simulation

All testbenches check themselves and end by printing
`TB_RESULT checks=<n> failures=<n>`. They need Verilator 5 with timing
support, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/pulsed_sr_pkg.sv tb/tb_pulsed_latch_shift_register.sv \
    --top-module tb_pulsed_latch_shift_register
./obj_dir/Vtb_pulsed_latch_shift_register
```

| testbench | what it checks |
|---|---|
| `tb_pulsed_latch` | transparency while the pulse is high; hold while it is low |
| `tb_sub_shift_register` | applies the pulses itself; compares every latch after every single pulse with a reference that updates only the latch just pulsed |
| `tb_pulsed_clock_generator` | pulse count, order, start times and widths on every clock cycle; no overlap |
| `tb_pulsed_latch_shift_register` | full default size (N = 256): 1024 cycles against a flip-flop reference, covering all of `q`, every `t[j]` and `sout`; counts pulse sequences and hand-overs between sub shift registers; checks the sizing functions |
| `tb_fig6_example` | the published example, two 4-bit sub shift registers: the contents after each shift and the exact time each latch changes, i.e. T1,T2 first, then Q4/Q8, Q3/Q7, Q2/Q6, and Q1/Q5 last |

If every latch is driven from one pulse line, which is the naive
pulsed-latch shift register, data runs through the transparent latches and
both shift-register testbenches fail. The full-size run takes well under a
second.
