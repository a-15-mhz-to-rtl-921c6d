# Split-control digital DLL: 12 clock phases from 15 MHz to 600 MHz

A delay-locked loop (DLL) passes its input clock through a chain of delay
cells and adjusts the delay of each cell until the whole chain delays the
clock by exactly one period. The taps of the chain are then equally spaced
copies of the clock. Here there are 12 cells, so a locked line gives 12 phases
30° apart. A pipelined or time-interleaved ADC needs such phases for its
sampling clocks.

The hard part is the range. Between 15 MHz and 600 MHz the required cell
delay changes 40 times. A single fine control word cannot cover that and
still make small steps. This design therefore splits the 10-bit delay control
into two loops:

* **Coarse loop (4 bits, M3..M0).** A binary search picks one of 16 current
  levels. It takes four steps, one per bit, and it is steered by a range
  detector rather than by the phase detector.
* **Fine loop (6 bits, L5..L0).** A bang-bang phase detector moves a 9-bit
  up/down counter. The top six bits of the counter drive a small shared
  current DAC. This loop stays on to track supply and temperature drift.

The digital part is synthesizable SystemVerilog. The analog part is the
delay line with its two current DACs. It is given as behavioural models so
that the closed loop can be simulated.

## Block map

```
            +------+    +-----------+   up/dn   +----------------+
P0 -------->|  PD  |--->| updn_logic|---------->|  updn_counter  |--C8..C3--> L5..L0
  |   P12-->|      |    +-----------+           |  9 bit, C2..C0 |               |
  |         +------+       ^  ^  ^ state        |  dropped       |           lsb_dac
  |                        |  |  |              +----------------+               | Ic
  |   +--------------------+--+--+-----+                                         v
  |   |         binary_search          |--M3..M0---------------------->  delay_line
  |   |  (state machine, see below)   |                                 12 cells, each
  |   +--------------------------------+                                 with an msb_dac
  |            ^ UNDER   ^ OVER                                              |
  |   +--------+---------+---------+                                         |
  +-->|    false_lock_detector     |<----------- P1..P9 ---------------------+
      +----------------------------+                                P1..P12 out
```

| File | Role | Kind |
|---|---|---|
| `rtl/dll_pkg.sv` | widths (12 phases, 4+6 bit code, 9-bit counter), state enum | package |
| `rtl/false_lock_detector.sv` | samples P1..P9 on P0, makes UNDER and OVER | RTL |
| `rtl/binary_search.sv` | coarse search, linear-search states, restart, fine-range carry | RTL |
| `rtl/phase_detector.sv` | one flip-flop: P12 sampled on the P0 edge | RTL |
| `rtl/updn_logic.sv` | picks what drives the counter | RTL |
| `rtl/updn_counter.sv` | 9-bit counter, starts at mid-range, L = count[8:3] | RTL |
| `rtl/msb_dac.sv`, `rtl/lsb_dac.sv` | current DACs | behavioural model |
| `rtl/delay_line.sv` | 12 current-starved cells as transport delays | behavioural model |
| `rtl/dll_top.sv` | the whole DLL | RTL + models |

All digital logic runs on the rising edge of the input clock P0. There is
one asynchronous active-low reset, `rst_n`, and it also restarts
acquisition.

## What the codes mean

A current-starved cell slows down as its current falls. The models use the
simplest law that matches the design's numbers. The frequency at which the
12-cell line spans exactly one period is proportional to the cell current:
`F = k * I`. Each cell's current is its own MSB DAC plus the shared LSB DAC:

    F(M, L) = 15 MHz + M * 39 MHz + L * 1.238 MHz
              (39 = (600 - 15) / 15,   1.238 = 2 * 39 / 63)

* The 16 MSB levels are spaced evenly from 15 MHz to 600 MHz.
* The whole LSB range (63 steps) covers **two** MSB steps. Neighbouring MSB
  codes therefore overlap, and DAC mismatch cannot leave a frequency gap.
* One LSB step is 1.24 MHz. At 600 MHz that moves the delay by about
  3.4 ps, which is the source of the loop's steady-state dither.

The currents are given in µA with k = 1 MHz/µA. Only the ratios matter to
the loop. The real k depends on the cell load and the supply, and the
design gives no value for it.

## The range detector: UNDER and OVER

A flip-flop phase detector is only correct while the total delay D lies
between T/2 and 3T/2, where T is the input period. Outside that window it can
lock to 2T or steer the wrong way. The range detector samples the taps at the
P0 rising edge. Tap n has delay nD/12, and with a 50% duty cycle it reads 1
when `frac(n*D/(12*T)) >= 0.5`. For duty cycle DC the threshold is 1 - DC.

* **UNDER** = none of P1..P9 is high. Not even the 9th tap has reached half
  a period, so the line is too short. At 50% duty cycle this means D < 2T/3.
* **OVER** = some tap Pn is 1 while P(n+1) is 0, for n in 1..7 (taps P1..P8).
  That pattern appears only once a tap has wrapped past a full period. With
  8 taps this means D ≥ 1.5T, which is the onset of harmonic locking.

The flags are combinational from registered samples, so they are valid one
clock after the edge they describe. `UNDER_TAPS` and `OVER_TAPS` select how
many taps are used. With `OVER_TAPS = 10`, OVER fires at D = 1.25T instead
(see *Departures*).

## The control state machine

```
RESET --in range--> LINEAR <-------------------------------+
  |                   |  ^                                 |
  | out of range      |  +-- in range -- BS1..BS4          |
  v                   |                   (any step)       |
 BS1 -> BS2 -> BS3 -> BS4 --still out of range--> LINEAR_NIR
  ^                   |                                    |
  +--UNDER or OVER----+          (exits when both flags clear)
```

* **RESET.** After `rst_n` rises, and after `STEP_CYCLES` clocks, the reset
  code M = 1000 is checked. If it is already in range (neither flag set),
  the machine goes straight to LINEAR.
* **BS1..BS4.** This is a successive approximation on M3, M2, M1, M0 in
  turn, starting from 1000. Each step waits `STEP_CYCLES` clocks; at 3 this
  covers delay-line settling, the detector sample and the registered flag.
  It then decides:
  * neither flag set: coarsely locked, go to LINEAR;
  * UNDER (line too fast, too much current): clear the bit under test;
  * OVER: keep the bit.

  After either decision the next lower bit is set. If BS4 still sees a flag,
  its bit is decided the same way and the machine enters LINEAR_NIR.
* **LINEAR.** The phase detector drives the counter. UNDER or OVER
  appearing here means the input frequency moved, and the search restarts
  at BS1 with M = 1000.
* **LINEAR_NIR** (linear search, not in range). The phase detector is
  ignored because it could steer toward a false lock. UNDER counts down and
  OVER counts up until both flags clear, and then LINEAR follows. This path
  is taken at the bottom of the range, for example at 15 MHz, where even
  M = 0 with L at mid-range is too fast.

While the machine is in RESET or BS1..BS4, `init` holds the counter at
mid-range (256, which gives L = 32).

## The fine loop

The phase detector samples P12 at each P0 rising edge. A 1 means P12 rose
first, so the line is too fast: count **down**, giving less current and more
delay. A 0 means count **up**. The counter moves one count per clock and
saturates at 0 and 511. Because only count[8:3] reaches the DAC, the code
changes only after eight net moves in one direction. The random up/down
decisions of a bang-bang detector sitting on the edge are therefore
filtered out. The loop latency is about three clocks, so the counter dithers
over a few counts, which is less than one LSB of L.

### Fine-range carry (an addition)

The detector's window (2T/3 to 1.5T) is much wider than the fine loop's
reach of ±39 MHz. At 600 MHz the window spans about 320 MHz. A coarse
result can therefore be in range while the fine loop cannot reach lock, and
the counter pins at one end. `binary_search` handles this case:

* When the counter is at 511 and asked to count up, M is raised by one and
  the counter is reloaded with mid-range.
* When the counter is at 0 and asked to count down, M is lowered by one in
  the same way.

Because of the two-step overlap, F(M+1, 32) lies within 0.6 MHz of
F(M, 63), so no frequency is skipped. Without the carry, the model locks
only when the first in-range coarse code happens to lie within two MSB
steps of the input frequency.

## Timing summary

| Event | Clocks of P0 |
|---|---|
| detector sample to UNDER/OVER visible | 1 |
| reset check | `STEP_CYCLES` (3) |
| coarse search | ≤ 4 × `STEP_CYCLES` (12) |
| fine loop, per counter step | 1 |
| fine loop, per LSB step | 8 |
| worst-case fine settling from mid-range | ~256, plus 256 per carry |

## Departures and open points

* **OVER taps.** The design's text says both "OVER when D > 5T/4" and "OVER
  from two consecutive phases of P1..P8". These disagree: P1..P8 gives 1.5T,
  and 1.25T needs P1..P10. The default follows the tap list (`OVER_TAPS = 8`).
  - Consequence: above roughly 55% duty cycle, a coarse code landing between
    (2 − DC)·T and 1.5T makes the phase detector push the wrong way. The loop
    then drifts into OVER and restarts, over and over. `tb_dll_duty` shows this at
    60% and 520 MHz, and shows that `OVER_TAPS = 10` locks there.
  - Likewise UNDER from P1..P9 clears at 2T/3, not the 3T/4 the design
    quotes.
* **Duty cycle below 25%.** UNDER then clears only above D = T, because
  (12/9)(1 − DC) > 1. The lock point is flagged as out of range and
  the loop cannot lock, so 20% duty cycle does not work. The range-detector
  curves for P1..P9 reach about 1.0T at 20% as well.
* **Clocks per search step.** The design says coarse acquisition takes
  four cycles. Here that is read as four search steps of `STEP_CYCLES` = 3
  clocks each, because the flags are only valid two clocks after a code
  change.
* **Fine-range carry**: added, as described above.
* **Not built:**
  - locking to the falling edge;
  - the adaptive LSB reference current for lower jitter at low frequency;
  - the second DLL and the output buffers and LVDS pads of the test chip.

  The LSB current can be scaled with `lsb_dac.I_UNIT_UA`.
* **Analog behaviour.** The models have no jitter, no intrinsic minimum
  delay and no DAC mismatch. Power, area and jitter figures cannot be
  checked with this RTL. Each cell delay is rounded to the 1 ps time
  precision.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_phase_detector` | output against the delay of P12 swept over 0.6T..1.4T |
| `tb_false_lock_detector` | UNDER/OVER against the tap equation for D/T from 0.3 to 1.9; switching points for duty cycles of 20% to 80% (OVER fixed at 1.5T, UNDER at (12/9)(1 − DC)T); random tap words against the rule; one-clock latency |
| `tb_updn_logic` | exhaustive truth table |
| `tb_updn_counter` | reference model under random traffic, saturation, L = count/8 |
| `tb_binary_search` | 60 input frequencies against a reference search: final state, final code, exact clock count, restart, NIR exit, carry and borrow |
| `tb_msb_dac`, `tb_lsb_dac`, `tb_delay_line` | transfer functions and tap delays |
| `tb_dll_top` | closed loop at default parameters, described below |
| `tb_dll_duty` | the OVER-tap comparison at 60% duty cycle |

`tb_dll_top` runs the closed loop at the default parameters:

* the frequencies 600, 500, 400, 300, 200, 150, 50 and 15 MHz, each after a
  reset;
* two frequency changes without a reset;
* duty cycles of 30%, 40%, 60% and 70%.

For each lock it checks:

* the code frequency is within 3 LSB of the input frequency;
* the P12 edge is aligned with P0;
* the 12 phases are equally spaced;
* the coarse search time.

It also requires that each mechanism occurred at least once:

* reset-time lock;
* lock during the search;
* a search ending out of range;
* UNDER/OVER-driven counting;
* restart on a frequency change;
* carry;
* counting both up and down;
* both flags.

It simulates about 0.4 ms in under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dll_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/dll_pkg.sv tb/tb_dll_top.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_dll_top` with its name. The
`--timing` option is required because the delay-line model and the
testbenches use delays.

## Changing it

* `dll_top #(.STEP_CYCLES(n))` sets the clocks per search step. Values below
  2 let the search act on stale flags.
* `UNDER_TAPS` and `OVER_TAPS` set the taps the range detector uses.
* The counter width (`updn_counter.CNT_BITS`) sets how many counts are
  dropped below the DAC code. More dropped bits give more filtering and a
  slower loop.
* The DAC currents are parameters of `msb_dac` and `lsb_dac`. The delay-line
  gain is `delay_line.K_MHZ_PER_UA`.
* The synthesizable part is everything except the three models. To put it
  on silicon, replace `delay_line` and the DACs with the real analog macros
  and keep the ports.
