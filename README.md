# A frequency locked loop that works on periods

This is a first-order frequency locked loop (FLL) in synthesizable
SystemVerilog. It does not compare phases. It measures time. Once per output
period it counts clock ticks over the last input period TI(k) and the last
output period TO(k), and it sets the next output period to a weighted sum of
the two:

    fc * TO(k+1) = f1 * TI(k) + f2 * TO(k),        with  f1 + f2 = fc

f1, f2 and fc are the rates of three clocks. TI is counted with f1, TO with
f2, and the next period is generated with fc. Under the condition
f1 + f2 = fc the loop is a stable first-order system with pole f2/fc:

    TO(k) = TI + (TO(0) - TI) * (f2/fc)^k

The output period therefore converges to the input period, whatever it
started from.

The loop locks frequency, not phase. The delay d between an input edge and
the next output edge also settles, but at a value set by where the loop
started:

    d_inf = (TO(0) - TI) / (f1/fc) + d(0)

The ratio f2/fc sets a trade-off:

- A small f2/fc locks in a few periods and follows a changing input closely.
  On a ramp the lag is slope / (f1/fc).
- A large f2/fc averages many input periods, so jitter on the input is
  strongly suppressed.

The ratio is a run-time input here, so the trade-off can be changed while the
loop runs.

## The three-interval trick

Measuring TI(k) and TO(k) side by side would take two counters running over
overlapping intervals. The hardware avoids that. Take the falling edges of
Sin and Sop as time marks and split time into adjacent intervals:

    Sin  _|‾|_____________________|‾|__________________
    Sop  _______|‾|_____________________|‾|____________
                 t(k)                    t(k+1)
          |<d(k)>|<------ T(k) ------>|<d(k+1)>|
          |<--------- TI(k) --------->|
                 |<--------- TO(k) ----------->|

- d(k) runs from a Sin edge to the next Sop edge.
- T(k) runs from that Sop edge to the next Sin edge.
- So TI(k) = d(k) + T(k) and TO(k) = T(k) + d(k+1).

With f1 + f2 = fc the loop equation becomes

    fc * TO(k+1) = f1 * d(k) + fc * T(k) + f2 * d(k+1)

The right-hand side is a single sweep over three consecutive intervals, each
counted at a different rate. Two up-counters are enough:

- **Counter 1** counts S1 ticks while d is high. It holds f1·d(k) when t(k)
  arrives.
- At t(k), **P1** loads the period generator with counter 2, which holds the
  finished sum for the period that now starts.
- **P2** then presets counter 2 with counter 1, i.e. with f1·d(k).
- **R** then clears counter 1, ready for the next d.
- During TO(k), counter 2 adds the Sc ticks while T is high and the S2 ticks
  while d is high. At t(k+1) it holds f1·d(k) + fc·T(k) + f2·d(k+1). That is
  the next period word N_b.

Every d is counted twice at the same time: by S1 into counter 1, for use one
period later, and by S2 into counter 2, for the current sum.

The **programmable period generator** (PPG) is a down counter on Sc. Its
borrow is the output pulse, and the output period is exactly N_b Sc periods.

## Blocks

| module (`rtl/`) | role |
|---|---|
| `fll_top` | the loop; wires the blocks below together |
| `clock_gen` | S1, S2, Sc as one-clock enables; f1 + f2 = fc tick for tick; f1/fc = `f1_ratio_i`/256 |
| `edge_diff` | two-flip-flop synchroniser plus falling-edge detector for Sin (stands in for an RC differentiator) |
| `interval_gen` | d and T flip-flops: a Sin edge sets d and clears T; a Sop edge clears d and sets T |
| `rcm` | recursive calculation module: counter 1, counter 2 and their clock gating; produces N_b |
| `ud_counter` | WIDTH-bit up/down counter with preset, clear, carry and borrow (used for counters 1 and 2 and the PPG) |
| `ppg` | programmable period generator: reloading down counter on Sc; its borrow is the end of the output period |
| `ctrl_pulse_gen` | P1, P2 and R after each end of period |
| `sign_gen` | two-state sign generator for d |
| `fll_pkg` | shared defaults and the `ticks_t` (Sc, S1, S2) and `ctrl_t` (P1, P2, R) structs |

## Clocking and cycle timing

Everything runs on one clock `clk`. The three loop clocks are enables:

- Sc ticks every `FC_DIV` clocks (default: every clock).
- A phase accumulator adds `f1_ratio_i` on each Sc tick.
- An Sc tick that makes the accumulator carry becomes an S1 tick. Every other
  Sc tick becomes an S2 tick.

S1 and S2 therefore never coincide, and they add up to Sc exactly. At
`f1_ratio_i = 128` (f1 = f2 = fc/2, the configuration of the eight-bit
prototype the design follows) S1 and S2 simply alternate.

Call p the clock in which the PPG borrows, i.e. the end of an output period.
The timing around p is as follows:

| clock | what happens |
|---|---|
| p | borrow = Sop edge; **P1**: the PPG is loaded with N_b = counter 2 + the tick counter 2 takes in this clock; d is cleared and T set at the end of the clock |
| p+1 | **P2**: counter 2 := counter 1 + the tick of this clock (T is high, so it is an Sc tick) |
| p+2 | **R**: counter 1 := the tick of this clock (0 unless a Sin edge arrived in p+1) |

A preset or clear in `ud_counter` keeps the count of the clock it happens in.
d is always low in clock p+1. Because of these two facts no tick is lost or
counted twice. The loop equation holds exactly, in whole ticks, for any
timing of the Sin edges. Words below `N_MIN` = 3 are raised to 3, so the
P1–P2–R sequence always fits into one output period.

Sin is asynchronous. Its falling edge reaches the loop `SYNC_STAGES` clocks
after the first clock edge that samples it low. That is a fixed offset, so it
does not change the periods.

Quantisation is one Sc tick per interval. S1 and S2 follow the ratio only on
average, so N_b can differ from the real-valued equation by about ±1 tick.

## Interface of `fll_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `sin_i` | in | 1 | input pulse train; high and low phases at least 2 clocks each |
| `f1_ratio_i` | in | RATIO_BITS | f1/fc = f1_ratio_i / 2^RATIO_BITS; may change at any time |
| `sop_o` | out | 1 | output pulse train: one clock high per output period (registered copy of the borrow) |
| `nb_o` | out | WIDTH | word of the running output period, in Sc ticks |
| `sign_o` | out | 1 | sign generator: 1 after two Sop edges with no Sin edge between (output ahead, d < 0); 0 after two Sin edges with no Sop edge between |
| `ovf_o` | out | 1 | sticky: a measuring counter wrapped (the input period is too long for WIDTH bits) |
| `tick_c_o`, `tick_1_o`, `tick_2_o` | out | 1 | the Sc, S1 and S2 enables, for observation |

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | width of the counters and of the PPG (the prototype's width) |
| `RATIO_BITS` | 8 | resolution of f1/fc |
| `FC_DIV` | 1 | clocks per Sc tick |
| `INIT_PERIOD` | 128 | first output period after reset, TO(0), in Sc ticks |
| `N_MIN` | 3 | smallest output period, in Sc ticks |
| `SYNC_STAGES` | 2 | synchroniser depth on Sin |

After reset both counters are 0, T is set and d is clear, as if an output
period had just begun. The first period lasts `INIT_PERIOD` Sc ticks. Until
the first Sin edge, the loop simply repeats its current period: with T high
for the whole period, N_b is the period itself. This "hold" behaviour also
bridges a missing input.

## Operating range: where the linear model holds

The equations above assume that every output period contains exactly one Sin
edge, i.e. 0 <= d < TI. The flip-flops cannot represent d outside this range:

- If the output runs ahead (d < 0), a whole output period passes with no Sin
  edge. Counter 2 then counts T for the whole period.
- If the input runs ahead (d >= TI), two Sin edges fall into one output
  period. d is then measured from the first of them.

The loop keeps running in either case, but it no longer follows the linear
model. It can settle into a two-period cycle whose two periods add up to two
input periods. In simulation this happened at f2/fc = 0.5 when the first
output period contained two Sin edges.

The sign generator flags exactly these situations, and `sign_o` shows them.
The design does not feed the sign back into the counters, because no
correction scheme is defined for it. A controller that wants to steer the
lock step by step can use `sign_o`, together with `nb_o` and
`f1_ratio_i`.

From d(k+1) = d(k) + TO(k) − TI(k), the cases that stay inside the range are:

- A step to a shorter input period adds (TO − TI)/(f1/fc) to d.
- A step to a longer one subtracts it. Starting close to the target period,
  or with a large f1/fc, keeps d in range.
- A ramp lowers d by slope/(f1/fc) on every step, so a ramp can be followed
  only for a limited number of steps.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block against a reference computed independently in the testbench:

- `tb_ud_counter`, `tb_clock_gen`, `tb_edge_diff`, `tb_interval_gen`,
  `tb_ctrl_pulse_gen`, `tb_sign_gen`, `tb_ppg`: random stimulus checked
  against an independent model.
- `tb_rcm`: plays the rest of the loop. At every end of period it checks N_b
  against the three-interval sum. Its long periods also make the counters
  wrap, which exercises `ovf_o`.
- `tb_fll_top`: end to end, at the default parameters. It uses
  `fll_monitor`, which rebuilds d and T from the pins alone. At every end of
  period the monitor checks that the new word equals
  f1·d(k) + fc·T(k) + f2·d(k+1) (counted from the tick pins) and that the
  period just ended lasted exactly its word. The test runs four phases
  without a reset in between:
  - f1 = f2 = fc/2 with a lock to 100 clocks; d settles at the value of the
    d_inf formula (56 clocks).
  - A switch to f1/fc = 230/256 and a step to 110 clocks; relock, and d again
    settles where the model puts it.
  - A slow loop with a long input period, which makes the sign generator go
    to 1.
  - A short input period, which makes it go back to 0.
- `tb_fll_workloads`: thirteen loops side by side on the locking, noise and
  tracking studies, with one time unit equal to 10 Sc periods. The step
  responses follow the closed-form TO(k) and d(k) within one tick. For
  f1/fc = 0.6, TI = 10, TO(0) = 12.4 and d(0) = 1, the steps are
  TO = 10.96, 10.38, 10.15, … and d = 3.4, 4.36, 4.74, …, with d_inf = 5.
  The test reproduces these within 0.2 t.u. For f1/fc = 0.3 and 0.7 with
  TO(0) = 12 it gives d_inf = 6.7 and 2.8 t.u. Results that lie outside the
  range above are printed, not checked:
  - Uniform input jitter of ±5 t.u. on a 10 t.u. period: the standard deviation of the output period
    is 1.6, 3.3 and 4.6 ticks for f2/fc = 0.95, 0.9 and 0.85, against
    29.2 ticks at the input. The linear model gives a ratio of
    sqrt((1 - p)/(1 + p)) for pole p, i.e. 4.7, 6.7 and 8.3 ticks. The
    jitter keeps pushing d out of range, and the hardware then suppresses
    more than the model, so these results are reported rather than checked
    against it. The comparison with the input is checked.
  - A ramp input at f1/fc = 0.9: followed with the predicted lag of
    3.3 ticks for five steps, then lost.

To run a testbench with Verilator (5.x):

    verilator --binary --timing --assert -y rtl -y tb rtl/fll_pkg.sv tb/tb_fll_top.sv \
              --top-module tb_fll_top -o sim
    ./obj_dir/sim

Replace `tb_fll_top` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and stops by itself. A watchdog ends a run
that hangs.

## Departures from the described hardware

- **Synchronous instead of three oscillators.** The prototype used three
  free-running clocks and edge-triggered CMOS counters. Here, one clock and
  enables replace them, and f1 + f2 = fc holds by construction. A different
  ratio f1/fc needs no new oscillator, only a new input word.
- **Control pulses.** The prototype made P1, P2 and R with monostables and RC
  differentiators, and they had to be very short. Here they are single clock
  cycles, and the counters keep the tick of the clock in which a preset or
  clear happens. The measurement is therefore exact rather than merely
  "short enough".
- **Coincident edges.** When Sin and Sop edges fall into the same clock, the
  Sin edge is treated as the earlier one: d(k+1) = 0 and a new T starts.
- **Period generator.** A reloading down counter with a minimum period of 3
  ticks and a programmable first period. The prototype's generator was built
  from the same counter parts, but its exact circuit is not given.
- **Sign generator.** Implemented as a two-state edge-order detector that is
  only brought out. How it should act on the counters is not specified.
- **Overflow.** Counters wrap as 8-bit counters do. This design adds the
  sticky `ovf_o` flag.
- **Resolution.** f1/fc is quantised to 1/256. The studied ratios
  0.05 … 0.95 are met within 0.002.
