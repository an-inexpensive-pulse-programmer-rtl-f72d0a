# Four-channel pulse programmer for transient NQR

This is a digital pulse programmer of the kind used for spin-echo and
free-induction-decay experiments in nuclear quadrupole resonance (NQR). It
produces a train of up to **four rectangular pulses**. Each pulse has its own
delay and width. The train repeats with a period **T**, a trigger pulse marks
each period for an oscilloscope or boxcar, and the whole sequence runs **N**
times (1..999) and then stops.

Every time is entered the way a lab instrument shows it: as a three-digit
decimal mantissa times a power of ten, `x * 10^y` seconds, with `x` = 000..999
and `y` = -6..+1. With the 1 MHz clock that covers 1 us to 9990 s in steps of
one clock. With the 2 MHz clock every time halves, down to 0.5 us. The timing
accuracy is that of the crystal, because every interval is an exact count of
clock periods.

The design is a synchronous SystemVerilog model of a discrete TTL instrument.
It follows the original's block structure and signal names: master counters,
T- and N-counters, tau- and t_w-counter units, the address counter and the
pulse flip-flop. The original's gated and rippled clocks are turned into
clock enables in one clock domain.

## How a time is counted: mantissa and time base

One exponent value selects one **time base**. The exponent `y` is stored as
the 3-bit code `k = y + 6` (0..7). A **master counter** (`master_counter`)
is a chain of seven decade stages that count the clock. Its tap `k` gives a
one-clock tick every `10^k` clocks, so at 1 MHz a tick lasts `10^y` s. A
multiplexer picks the tap from the code.

The tick drives a three-digit BCD counter. A comparator watches that counter
against the stored mantissa `x`. The interval ends on the tick that brings
the count to `x`, which is exactly `x * 10^k` clocks after the last clear.
A mantissa of 000 counts as 1000.

Two master counters exist:

| counter | taps used | what it times |
|---|---|---|
| master counter B | CT1 (code from Memory I), CT2 (code from Memory II) | tau-counter and t_w-counter |
| master counter A | CT (code from the T register); second multiplexer unused | T-counter |

## Memory map and the pulse sequence

Two 16-word memories (`data_memory`, each word three BCD digits plus the
exponent code) hold the program. Both are written together from the
keyboard:

| word | contents |
|---|---|
| 0, 2, 4, 6 | tau1..tau4: delay to the start of pulse i, measured from the start of pulse i-1 (tau1 from the start of the period) |
| 1, 3, 5, 7 | tw1..tw4: width of pulse i |
| 8 | T, the repetition period |
| 9 | N, the number of periods (mantissa only) |

During a run, **Memory I** is read at address `a` by the **tau-counter unit**,
and **Memory II** at address `a-1` by the **t_w-counter unit**. This offset
is the core trick of the design:

```
period start (PR or start): a = 0, counters cleared, output low
  tau-counter compares with Memory I[0] = tau1 ; t_w unit idle (output low)
C1 (tau1 reached):  output high, a = 2, master counter B and both counters cleared
  tau-counter compares with Memory I[2] = tau2
  t_w-counter compares with Memory II[1] = tw1 and runs only while output is high
C2 (tw1 reached):   output low (address unchanged)
C1 (tau2 reached):  output high, a = 4 ...      and so on up to tau4 / tw4
PR (T reached):     trigger, everything cleared, a = 0, N-counter counts down
```

So pulse i starts at `tau1 + ... + taui` after the period start and lasts
`twi`. The t_w-counter runs only while the output is high, and C2 never
moves the address. Pulse i's width is therefore always read from the word
just below the delay currently being counted.

The address counter (`address_counter`) makes the step of 2 with no adder.
It is a 4-bit binary counter whose most significant bit is wired as the
address's least significant bit: `address = {cnt[2:0], cnt[3]}`. One count
moves the address by 2. A 4-bit subtractor then gives Memory II's address
`a - 1`.

After tau4 the address reaches 8. Memory I then offers T to the
tau-comparator as a fifth delay. In normal use T is longer than the sum of
the delays, so PR comes first. To use fewer than four pulses, set the unused
delays longer than the rest of the period.

## Starting a run: the timing controller

`timing_controller` holds the operating mode and plays the start sequence.

* **Setup mode** (SS high, after reset): both memories take the keyboard
  address. The display outputs show Memory I's word. A press of the write
  switch writes the keyed datum into both memories.
* **Run mode** (SS low), entered with SW7. A press of SW8 then plays one
  step per clock:

| step | action |
|---|---|
| AL with QA high | address counter loaded with 9 |
| NL | N-counter loads N from Memory I |
| AL with QA low | address counter loaded with 8 |
| TLA + CLR | T register latches T (mantissa and exponent); address, counters and output flip-flop cleared |
| TLO | T-counter loaded from its register; the clock gate opens |

The period starts on the first clock after TLO. The T-counter (`t_counter`)
counts down on CT. On the tick that reaches zero it gives **PR** and reloads
itself from the register. PR clears master counters A and B, both counter
units, the address counter and the output flip-flop. It clocks the N-counter
(`n_counter`) and is the trigger output. The N-th PR also gives **PS**. PS
closes the gate and returns the instrument to setup mode. SW6 aborts a run
the same way.

## Keyboard entry and the exponent

`input_data` holds the keyboard registers. A key gives a BCD digit in
negative logic with a one-clock strobe. The panel switch that is on decides
where the digit goes:

| switch | effect of a key |
|---|---|
| SW1 | 4-bit address register |
| SW2 | shifts into the mantissa as the units digit; earlier digits move up, so the hundreds digit is keyed first |
| SW3 | exponent magnitude (three low bits) |
| SW4 | each press toggles the exponent sign |
| SW5 | clears mantissa, exponent and sign, keeps the address |

The register converts sign and magnitude to the code `y + 6`.

`exp_warning` raises `warning` for an exponent outside -6..+1. `exp_encoder`
turns a stored code back into sign and magnitude for the display.

## Clock

`clock_gen` is a **behavioural model** and cannot be synthesized. It models a
1 MHz crystal reference plus a phase-locked loop that doubles it to 2 MHz.
SW10 (`sw10_fast`) chooses between the two clocks. The model takes a change
of the switch over only in setup mode, so the clock cannot change during a
run. For an FPGA or ASIC, replace `clock_gen` with the target's clock source
and keep the rest.

## Timing of this implementation

* All intervals are exact clock counts: a pulse rises exactly
  `sum(tau)` clocks and falls `tw` clocks later, measured from the first
  clock of the period. Each rising or falling edge is delayed by the same one
  clock, because the output flip-flop is registered after the coincidence.
* The period is exactly `T` clocks. The trigger (PR) is high in the last
  clock of each period. It is combinational from registers of the same clock
  domain.
* The start sequence takes 5 clocks from the SW8 edge to the gate opening.
* A pulse still running at the period end is cut off by PR. A width longer
  than the following delay runs into the next pulse: the next C1 restarts
  the width count and the output stays high. A C1 that coincides with C2
  keeps the output high.

## Where this differs from the original instrument

* **One clock domain.** The original clocks its counters with gated clocks
  (CLK_A, CLK_B) and with the multiplexed taps ORed with the clock. Here
  every such signal is a clock enable. Its coincidence pulses have tens of
  nanoseconds of logic delay, which this model does not have.
* **Look-ahead comparison.** The comparators fire on the tick that reaches
  the preset (`count_next == x`). The interval is then exactly `x` ticks,
  with no off-by-one clock.
* **Choices made where the original gives no detail:**
  * the exponent code `y + 6`;
  * the entry direction of the mantissa shift register;
  * SW4 as a toggle;
  * the roles of SW6/SW7/SW8 (setup, run, start);
  * one clock per start step;
  * the AL load value `8 + QA`;
  * PR > C1 > C2 priority in the output flip-flop;
  * 000 meaning 1000;
  * an asynchronous active-low reset in place of a power-on RC.
* **Not built:**
  * the 7-segment LED display and its drivers: `disp_*`, `key_*`, `dis` and
    `warning` are the ports it would use;
  * the power MOSFET output stage that drives a transmitter grid gate: use
    `pulse_out`, with polarity set by `sw11_neg`;
  * the crystal oscillator itself: `ref_1mhz` is an input.

## Module list

| module | role |
|---|---|
| `pp_pkg` | digit, word and exponent-code types; sizes (3 digits, 7 decades, 16 words) |
| `pulse_programmer` | top level |
| `input_data` | keyboard registers and exponent conversion |
| `timing_controller` | mode latch, write strobe, start sequence, clock gate |
| `clock_gen` | behavioural 1/2 MHz clock source |
| `master_counter` | seven decades with two tap multiplexers |
| `counter_unit` | tau- or t_w-counter unit: memory, demultiplexer, counter, comparator |
| `data_memory` | 16 x 15-bit memory, asynchronous read |
| `bcd_counter`, `bcd_down_counter` | three-digit decade counters |
| `t_counter`, `n_counter` | period and repetition counters |
| `address_counter` | rotated binary counter, SS multiplexer, `a - 1` |
| `pulse_generator` | output flip-flop and polarity |
| `exp_warning`, `exp_encoder` | display accessories |

Parameters default to the instrument's sizes: `DIGITS = 3`, `DECADES = 7`,
`ADDR_W = 4` (in `pp_pkg`), with per-module overrides `N`, `NDEC` and `AW`.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The packages
must be read first. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/pp_pkg.sv tb/tb_pulse_programmer.sv --top-module tb_pulse_programmer
obj_dir/Vtb_pulse_programmer
```

`tb_pulse_programmer` runs the complete instrument at its default sizes. It
keys a four-pulse program with delays and widths on four different time
bases (10^0 to 10^2 clocks), T = 1 ms and N = 3. It reads every word back
through the display outputs and checks that a forbidden exponent raises the
warning. It then runs twice:

* 1 MHz clock, positive pulses;
* 2 MHz clock, negative pulses and N = 2.

Every pulse edge and trigger is checked to the nanosecond, and so is the
stop after N periods. It takes well under a second. The block testbenches
compare each module with independent integer models under random stimulus.
`tb_master_counter` uses 4 decades instead of 7 to keep the run short.

`tb_pp_workloads` runs the instrument at the edges of its specification,
again at default sizes. It takes about 15 s.

* One period of T = 1 x 10^1 s (10^7 clocks, the top tap of the master
  counter), with pulses on the 10^2..10^6 time bases.
* 999 periods on the 2 MHz clock with 0.5 us pulses: the shortest width and
  the largest repetition count.

The largest single setting, 999 x 10^7 clocks (9990 s), uses the same taps
and counters but is too long to simulate clock by clock.
