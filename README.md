# Generalized direct PWM modulator for three-phase four-wire inverters

A three-phase four-wire voltage source inverter (VSI) gets its neutral
either from the mid-point of a split dc link (three-leg centre-split VSI)
or from a fourth leg (four-leg VSI), and it may have two levels or more.
Space vector modulation for these inverters uses a different set of vectors,
sectors and switching tables for every topology and level count. This
modulator avoids all of that. It uses *3-D direct PWM*. Each leg is
modulated on its own from its reference voltage:

* the integer part of the normalized reference picks the two adjacent
  levels the leg switches between during the period;
* the fractional part is the fraction of the period spent on the upper
  level.

This gives the same volt-second average as 3-D space vector modulation. One
parameter-free datapath therefore serves 2- to 5-level inverters of either
topology. The only difference for a four-leg inverter is a *shifting
voltage* added to every leg reference.

The RTL is SystemVerilog (IEEE 1800-2017). It runs in one clock domain and
has three blocks. The host interface (`data_buffer`) holds the references
and a control word. The direct PWM core (`direct_pwm_core`) turns them into
switch triggers. The dead-time controller (`deadtime_controller`) makes
complementary gate signals with a dead time in every transition. The
top-level module is `gpwm_top`.

## Number scale

Everything is integer arithmetic on one scale: **500 counts per inverter
level E**.

* The host writes leg references referred to the *bottom* of the dc bus, so
  they run from 0 to 500·(N−1). For a phase-to-neutral reference V and level
  voltage E, the host writes `INT(500·V/E) + 250·(N−1)`. The 250·(N−1) term
  is the neutral point, half-way up the bus.
* The carrier is a triangle 0 → 500 → 0 that takes 1000 carrier clocks. One
  carrier count is therefore one count of reference.
* For a 5-level inverter the references span 0..2000, which fits the 12-bit
  registers.

## From reference to switch triggers (the core idea)

An N-level leg has 2(N−1) switches. Odd-numbered switches S1, S3, …
S(2N−3) sit above the output point. Even-numbered switches S2, S4, …
S(2N−2) sit below it. Pair k (k = 1..N−1) is S(2k−1) and S(2k), and the two
switches of a pair are always complementary. At output level K, the odd
switch of pair k is on exactly when k ≤ K (this reproduces the usual
three-level switching table).

A leg reference V = 500·K + f (0 ≤ f < 500) means: level K for (500−f)/500
of the period and level K+1 for f/500. So:

| pair | odd switch S(2k−1) |
|------|--------------------|
| k ≤ K | on all period |
| k = K+1 | on for f/500 of the period |
| k > K+1 | off all period |

All three cases come from **one compare per pair** against the symmetric
carrier. The odd switch of pair k is on while

    carrier > T_k,   T_k = 500·k − V

A negative T_k gives a switch that is on all period. T_k ≥ 500 gives one that
is off all period. In between, the switch gets a pulse of f/500 of the
period, centred on the carrier peak. This is the symmetric-aligned pattern,
and each leg changes by only one level per period.

Example, three-level leg, V = 700 (1.4 levels):

* T_1 = −200, so S1 is on and S2 is off all period.
* T_2 = 300, so S3 is on while the carrier is above 300, which is 0.4 of the
  period. S4 is its complement.

`pw_generator` computes the 16 thresholds (4 legs × 4 pairs) once per
period. `pwm_comparator` does the compares. Pairs above N−1 are disabled and
their switches stay off.

Exact duty: the carrier visits 1000 states per period (0, 1..499, 500,
499..1). A threshold T in 1..499 therefore gives 999 − 2T carrier clocks of
"on", that is 2f − 1 for f = 500 − T. The error of one carrier clock is a
consequence of the strict "larger than" compare. A threshold of exactly 0
(the reference sits exactly on a level) counts as on for the whole period.
Without that rule, the strict compare would switch the pair off for the
single carrier state 0. With it, a constant reference of 0, E or 2E on a
three-level leg holds the textbook switching states (S1..S4 = 0101, 1001,
1010) with no switching at all.

## Four-leg mode: the shifting voltage

In a four-leg inverter each phase-to-neutral voltage is the difference
between a phase leg and the fourth leg f. Adding the same value to all four
leg references leaves those differences unchanged. The modulator picks the
value that centres the four references in the dc bus, so the all-legs-low
and all-legs-high zero states last equally long. In counts, with the
fourth-leg reference fixed at the neutral point 250·(N−1):

    Vmax, Vmin = max, min of (Vref_a, Vref_b, Vref_c, 250·(N−1))
    V_j = Vref_j + 250·(N−1) − floor((Vmax + Vmin)/2)      j = a, b, c, f

For N > 2 the shifted references are then split into integer and fraction
exactly as above. A multilevel four-leg inverter needs nothing extra. In
centre-split mode V_j = Vref_j, and the fourth leg is disabled.

## Carrier, timing and clock ratios

* The carrier clock is the input clock F divided by r_c = 2^(SPD+1), that is
  F/2 … F/256. It is produced as a clock-enable, not as a separate clock.
* The PWM frequency is **f = F / r_c / 1000**. With a 40 MHz clock and
  SPD = 2 the carrier clock period is 0.2 µs and f is 5 kHz.
* New references, Level and Mode are taken over when the carrier returns
  to 0. The thresholds are registered one clock later.
* The comparator samples two clocks after each carrier step, so a trigger
  changes 3 clocks after the step that causes it.
* The gate outputs add one more register stage.

Control bit 6 (Reset) = 0 holds the carrier at 0 and turns every gate off.
Setting it to 1 starts the carrier from 0.

## Dead time

The switch that turns off does so at once. Its partner turns on only after
**T_d = 40 · 2^(SDP+1) / F**, with the same ratio table as SPD. At 40 MHz,
SDP = 1 gives 4 µs. Each of the 16 pairs has its own counter, which restarts
at every trigger change. The dead time is therefore exact, not subject to
the phase of a free-running prescaler. A trigger pulse shorter than T_d is
swallowed: the pair returns to its previous state.

Because of the dead time, each switch's on-time is shortened by T_d for each
turn-on in the period. With a symmetric pattern that is one T_d per period
for a switching pair, and none for a pair that is on or off all period.

## Host interface

Writes are synchronous: `wr` is high for one clock with `addr` and `din`.
Reads are combinational, from `addr` to `dout`.

| addr | register |
|------|----------|
| 0 | reference of leg a (12 bit, 0..500·(N−1)) |
| 1 | reference of leg b |
| 2 | reference of leg c |
| 3 | control word |
| 4–7 | unused, read 0 |

Control word:

| bits | name | meaning |
|------|------|---------|
| 1:0 | Level | N − 2 (00 = 2-level … 11 = 5-level) |
| 4:2 | SPD | carrier clock F / 2^(SPD+1) |
| 5 | Mode | 0 three-leg centre-split, 1 four-leg |
| 6 | Reset | 0 holds the PWM core in reset, 1 runs |
| 7 | Handshaking | 0 references ready, 1 references being modified |
| 10:8 | SDP | dead-time clock F / 2^(SDP+1) |
| 11 | reserved | stored, no effect |

The references are double-buffered. Writes go to a host copy. The core
works from a second copy, which is refreshed at each period boundary only
while Handshaking is 0. To update, the host:

1. sets Handshaking to 1;
2. writes the three references;
3. clears Handshaking.

A period then never mixes old and new values. After reset the control word
is 0, so the core is stopped: write the configuration with Reset = 1 to
start.

## Gate outputs

`gate[j][n-1]` drives switch S_j,n:

* j = 0, 1, 2, 3 for legs a, b, c and the fourth leg f;
* n = 1..8, odd n above the output point.

Switches beyond 2(N−1), and the fourth leg in centre-split mode, stay off.
`carrier` and `carrier_down` show the carrier for observation.

## Departures and choices

The original modulator was a VHDL design on a Xilinx Spartan-3 (XC3S400)
clocked at 40 MHz. This RTL follows its block structure, its number scale,
its control-word layout and the algorithm above. The following are choices
of this implementation:

* **Register address map, write strobe and read port.** The original only
  has a 12-bit data bus and a 3-bit address bus.
* **Double buffering.** It is this implementation's reading of the
  Handshaking bit. Level and Mode are latched with the references.
* **Leg reference and threshold.** In centre-split mode the leg reference
  is the written reference itself (zero shifting voltage), and the compare
  threshold is 500·k − V in both modes. Together they give an on-time of
  exactly f/500 on the 0..500..0 carrier. The fixed-point formulas of the
  original admit other readings for these two points. This one is the one
  that agrees with the algorithm and with its worked example.
* **Threshold 0.** A threshold of exactly 0 means on for the whole period
  (see above), not off for one carrier state.
* **One clock domain.** Clock-enables replace the divided clocks. A
  registered compare two clocks after each carrier step replaces the
  original falling-edge compare.
* **Dead time.** It is counted per pair from the trigger edge. The original
  describes a prescaled counter running 0..40 but not how it gates the
  edges.
* **Safe states.** All gates are off while the core is in reset or for
  unused switches.
* **No clamping.** References outside 0..500·(N−1) are not clamped. The
  affected switches simply stay fully on or fully off.

Not included:

* the host processor that computes the references (a DSP in the original
  system, which also ran the active-power-filter current control);
* the power stage itself;
* the A/D converters.

## Size

Generic synthesis of `gpwm_top` (yosys, word-level cells) gives about 620
cells and 660 flip-flop bits, with no memories. Most of the flip-flops are
the 16 dead-time counters and the 16 registered thresholds.

## Files

`rtl/`:

* `gpwm_pkg.sv`: constants, the control-word struct, the address enum and
  the array types.
* `data_buffer.sv`
* `clk_divider.sv`: divide-by-n clock enable.
* `updown_counter.sv`: carrier.
* `pw_generator.sv`
* `pwm_comparator.sv`
* `direct_pwm_core.sv`
* `deadtime_controller.sv`
* `gpwm_top.sv`

`tb/` has one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_pw_generator` checks the thresholds against the direct-PWM equations
  written out independently, and checks volt-second balance. In four-leg
  mode it also checks that the phase-to-neutral differences are preserved
  and that the two zero states are balanced.
* `tb_direct_pwm_core` checks the period length and the high time of every
  trigger, for several Level / Mode / SPD settings.
* `tb_deadtime_controller` measures dead times and checks that short pulses
  are swallowed and that shoot-through never occurs.
* `tb_gpwm_top` drives the design over the host bus at its default
  parameters. It runs five configurations: 2-, 3- and 5-level centre-split
  and 2- and 3-level four-leg. It also runs a four-leg case with the fourth
  leg at 1.4 levels, and the 5 kHz / 4 µs timing. It measures the on-time of
  every gate over a period, and tests the handshake, the Reset bit and
  read-back. It also checks the three-level switching table with references
  exactly on the levels. It counts each mechanism and fails if one never
  happened.
* `tb_sine_workload` streams a new sample of unbalanced sinusoidal
  references every PWM period over the bus, using the handshake. One phase
  has third-harmonic injection. It does this for the same five inverter
  configurations. For every period and leg it checks the volt-second balance:
  the average output level must match the reference once the dead-time
  delays are added back. In four-leg mode it also checks the phase-to-neutral
  averages.

Two modules also carry concurrent assertions that fire in any simulation:
`updown_counter` checks that the carrier never passes 500, and
`deadtime_controller` checks that no pair ever has both switches on.

To run a testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal --top-module tb_gpwm_top \
        -y rtl -y tb +libext+.sv rtl/gpwm_pkg.sv tb/tb_gpwm_top.sv
    ./obj_dir/Vtb_gpwm_top

Replace `tb_gpwm_top` with any other testbench name. Each testbench finishes
in well under a second of wall time.
