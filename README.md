# TTC emulator for TTCrx-based front-end electronics

Front-end boards of the ATLAS endcap muon trigger (the Thin Gap Chamber, TGC,
electronics) take their clock, trigger and control signals from a TTCrx
mezzanine. That mezzanine decodes the optical TTC network. A full TTC set-up
needs VME modules, an optical link and software. This design is the FPGA logic
of a small board that fits the footprint and pinout of the TTCrx test board and
makes the TTCrx output signals on its own. It creates Level-1 Accepts (L1A),
bunch and event numbers, broadcast commands and the delayed trigger-type
message, with the same timing relations a real TTCrx shows. The mother board
needs no change.

Everything runs in one clock domain: the 40.08 MHz LHC clock after the board's
deskew delay (Clock40Des1). Times below are counted in periods of that clock,
24.95 ns each.

## Signals on the pins

When the logic decides an L1A in clock *k*, the pins show:

| clock        | pins                                                          |
|--------------|---------------------------------------------------------------|
| k+1          | `L1Accept`=1, `BCnt`=BCID of the bunch, `BCntStr`=1           |
| k+2          | `BCnt`=EVID[11:0], `EvCntLStr`=1                              |
| k+3          | `BCnt`=EVID[23:12], `EvCntHStr`=1                             |
| k+1+176      | `Dout`=trigger type, `SubAddr`=00, `DoutStr`=1                 |
| k+2+176      | `Dout`=EVID[23:16], `SubAddr`=01, `DoutStr`=1                 |
| k+3+176      | `Dout`=EVID[15:8], `SubAddr`=10, `DoutStr`=1                  |
| k+4+176      | `Dout`=EVID[7:0], `SubAddr`=11, `DoutStr`=1                   |

176 clocks is 4.39 µs. That is the delay after which the TTCvi module of a
real system broadcasts the trigger type and the event/orbit counter. The TTCrx
then puts them on its Dout bus. Every pulse output is one clock (25 ns) long.
`BCnt`, `Dout` and `SubAddr` keep their last value between sequences.

Other pins:

* `BcntRes` and `EvCntRes` are the bunch- and event-counter resets. `Brcst[7:5]`
  is driven with its strobes `BrcstStr1` (for bits 5:2) and `BrcstStr2` (for
  bits 7:6). All of these come from Lemo inputs; see "Broadcasts".
* `TTCReady` rises one clock after reset is released.
* `SubAddr[7:2]`, `DQ[3:0]` and `Brcst[4:2]` are driven to 0.

## Level-1 Accept generation

`l1a_controller` picks the trigger source set by a jumper (`l1a_src_ext`).

**Internal source** (`l1a_internal_gen`). A 3-bit switch code (`l1a_mode`)
picks one of seven modes:

| code | mode    | rate    | how                                                      |
|------|---------|---------|----------------------------------------------------------|
| 0    | random  | 100 kHz | threshold 13 601 059 / 2^32 per filled bunch             |
| 1    | random  | 10 kHz  | 1 360 105 / 2^32                                         |
| 2    | random  | 1 kHz   | 136 010 / 2^32                                           |
| 3    | random  | 100 Hz  | 13 601 / 2^32                                            |
| 4    | random  | 1 Hz    | 136 / 2^32                                               |
| 5    | regular | 75 kHz  | every 534 clocks (75.06 kHz)                             |
| 6    | regular | 1 Hz    | every 40 080 000 clocks                                  |
| 7    | off     |         |                                                          |

Random mode makes a Poisson process. A xorshift32 generator gives a fresh
32-bit word every clock. In each filled bunch, a word below the mode's
threshold is a trigger. Each bunch is an independent trial with the same
probability, so the intervals are geometric, which is the discrete form of
exponential intervals. Only 2808 of the 3564 slots are filled, so the threshold is

    thr = rate * 2^32 * 3564 / (40.08e6 * 2808)

This keeps the mean rate at its nominal value. `ttc_emu_pkg::rnd_threshold`
computes the thresholds at elaboration. Regular mode counts clocks. The counter
restarts when the mode changes.

**External source** (`ext_pulse_shaper`). The rising edge of the Lemo input
clocks a catch flop, so even a pulse of a few ns is kept. The flag passes a
two-flop synchroniser, and once seen there it clears the catch flop. The
result is one 25 ns pulse for any input width, longer or shorter than a clock.
`L1Accept` follows the input edge by two clock edges plus the input's phase,
which is 50-75 ns. This matches the roughly 53 ns this path is known to take on
the real board. Two input edges less than about two clocks apart give one pulse.
The catch flop must power up clear, as FPGA flip-flops do after configuration.
A simulation should start with a reset edge.

**Coincidence with a bunch crossing.** An L1A is only valid in a bunch slot
that holds a bunch. This also applies to an external L1A. So a request from
either source is remembered (`pending`) and issued (`fire`) in the first clock
that meets all three conditions:

1. the bunch slot is filled (`bx` from `bx_generator`);
2. at least `DEAD_CLK` = 4 clocks have passed since the last L1A;
3. the Dout event queue is not full.

A request that arrives while another is waiting merges with it. So in the
abort gap an external trigger waits up to 119 slots, and then leaves at
bunch 0. The 4-clock dead time belongs to this design. It lets the 3-word BCnt
sequence and the 4-byte Dout sequence of one event finish before the next
event starts.

## Bunch structure

`bx_generator` counts bunch slots 0…3563 and wraps once per orbit. A constant
table, built at elaboration by `ttc_emu_pkg::lhc_fill_pattern`, marks the
filled slots. It follows the nominal LHC 25 ns scheme: 39 trains of 72 bunches
in 12 groups of 2,3,4,3,3,4,3,3,4,3,3,4 trains. Trains inside a group are 8
slots apart. Groups are 38 slots apart, or 39 after groups 3, 6 and 9. A
119-slot abort gap ends the orbit. The order of the 38- and 39-slot gaps is a
choice of this design. A `BcntRes` pulse restarts the count at slot 0 in the
clock after the pin pulse.

The bunch signal itself is not output. If an external clock of another
frequency is used, all timing scales with it, including rates, delays and the
orbit.

## Event numbers: one counter for two buses

In a real TTC system, the event number on `BCnt` comes from the TTCrx event
counter. The 24-bit event/orbit counter on `Dout` comes from the TTCvi. Here
`event_counter` feeds both buses. This is why `EvCntRes` also clears the number
sent on `Dout`. The first L1A after a reset is event 0. An L1A decided in the
same clock as the `EvCntRes` pin pulse still gets the old number.

## Delayed trigger-type message

`dout_sequencer` writes each L1A into a 64-entry queue (`sync_fifo`). An entry
holds the event number, the trigger type and a free-running time stamp. When
the oldest entry is `DELAY` = 176 clocks old, its four bytes go out in four
clocks. With the 4-clock dead time, at most ⌈180/4⌉ = 45 events can be waiting
at once. So the queue never fills at the default sizes. Its `full` output still
holds off the next L1A if a smaller queue or a shorter dead time is configured.

The trigger type comes in on the `trigger_type` input, meant to be set by board
switches. It is captured with each L1A.

## Broadcasts

`broadcast_emu` creates the broadcast outputs from four Lemo inputs. Each input
is shaped like the external L1A.

| Lemo input    | pins driven, one clock                                  |
|---------------|---------------------------------------------------------|
| `lemo_bcr`    | `BcntRes` (also restarts the bunch counter)             |
| `lemo_ecr`    | `EvCntRes` (also clears the event counter)              |
| `lemo_rst`    | `Brcst[5]`, `Brcst[7]`, `BrcstStr1`, `BrcstStr2`        |
| `lemo_brcst6` | `Brcst[6]`, `BrcstStr2`                                 |

`Brcst[5]` is the system reset and `Brcst[7]` is the reset of the detector
control system. They share one input because the board had room for only one
connector. A real TTCrx can time `Brcst[7:6]` with a second clock. Here all
`Brcst` bits use the same clock. A `Brcst` bit is high only in its strobe clock.

## Parts that are not logic

The board also carries parts that this RTL does not model. Their signals reach
the logic as ports.

* A 40.08 MHz quartz oscillator and an external clock input, chosen by a jumper.
* A variable delay on the clock. It shifts Clock40Des1 by up to 20 ns in 40
  steps. The delayed clock is the `clk` port.
* Jumpers and a DIP switch, which set `l1a_src_ext` and `l1a_mode`.
* A configuration PROM and a JTAG connector.

## How far this matches a real TTCrx, and its limits

The pin timing, the trigger modes, the 25 ns shaping of external pulses, the
shared event counter and the broadcast mapping follow the original emulator
board. The following points are this design's own choices or approximations:

* **Delay rounding.** The 4.4 µs Dout delay is rounded to 176 clocks
  (4.391 µs).
* **Regular-rate rounding.** The 75 kHz regular rate is 534 clocks, which gives
  75.06 kHz.
* **Held triggers.** A regular trigger tick that lands in an empty bunch, or
  inside the dead time, is sent in the next allowed bunch. Such ticks therefore
  jitter by up to 119 slots in the abort gap. Random triggers are only drawn in
  filled bunches.
* **Dead time.** The 4-clock dead time and the merging of close requests have
  no counterpart in a real TTC system. A real system can send L1As on
  consecutive bunches.
* **Filling scheme order.** The placement of the 38- and 39-slot gaps is an
  assumption. Only the totals (2808 bunches, 3564 slots, 119-slot abort gap)
  are the nominal LHC values.
* **Pins not emulated.** Clock40, Clock40Des2 and ClockL1A are not made. The
  same holds for the single- and double-error strobes, `Brcst[4:2]`, and the
  TTCrx I2C and JTAG access.
* **Reset inputs.** The system reset and the detector-control reset share one
  input and always come together.
* **Trigger type.** The trigger type is a static input. It does not come from a
  trigger processor.

Every block's testbench passes, and each one fails on a deliberately broken
copy of its block. The measured rates of the random modes agree with nominal
within statistical error: 1055 L1As in 10 ms at 100 kHz. The latency of the
external path is checked at 50–75 ns. No synthesis for a particular FPGA, and
no timing analysis, has been done.

## Module map and parameters

```
ttc_emulator_top
├── ext_pulse_shaper ×5   (L1A, BCR, ECR, RST, Brcst6 inputs)
├── broadcast_emu
├── bx_generator
├── l1a_internal_gen
├── l1a_controller
├── event_counter
├── bcnt_sequencer
└── dout_sequencer
    └── sync_fifo
ttc_emu_pkg                (constants, mode enum, threshold and pattern functions)
```

| parameter (top) | default    | meaning                                                   |
|-----------------|------------|-----------------------------------------------------------|
| `CLK_FREQ`      | 40 080 000 | clock frequency used to compute rates                     |
| `DOUT_DELAY`    | 176        | clocks from L1A decision to first Dout byte               |
| `DEAD_CLK`      | 4          | minimum clocks between L1As                               |
| `QUEUE_DEPTH`   | 64         | events waiting for Dout (power of two)                    |

Each of the four defaults is either a fixed LHC/TTC figure or a value this
design chose.

* Fixed LHC/TTC figures: the 40.08 MHz clock, the 4.4 µs delay, the 12-bit
  BCID, the 24-bit event number, the 8-bit trigger type and the seven modes.
* Choices of this design: the dead time, the queue, the random-number method,
  the mode encoding, the levels of the pins without a stated function, and the
  reset behaviour.

The reset is `Reset_b`. It is asserted asynchronously and released
synchronously, and every block then uses a synchronous active-high reset.

## Simulation

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl rtl/ttc_emu_pkg.sv \
    tb/tb_ttc_emulator_top.sv --top-module tb_ttc_emulator_top
./obj_dir/Vtb_ttc_emulator_top
```

Replace the testbench name to run another one. `tb_ttc_emulator_top` runs the
whole design at its default parameters, pin to pin, for about 1.04 s of
emulated time (about 42 million clocks, under a minute). It runs these phases:

1. 10 ms of 100 kHz random triggers;
2. 10 ms each of 10 kHz random and 75 kHz regular;
3. one full second of 1 Hz regular;
4. twenty 350 ns external L1As, checked for 50–75 ns latency;
5. an external L1A in the abort gap;
6. all four broadcast inputs.

The testbench has its own models of the LHC filling pattern, the event
numbering and the Dout timing. It checks every clock against them. It also
counts random, regular and external L1As, waits for a filled bunch, dead-time
waits, queued Dout events, broadcasts and mode changes, and fails if any of
them never happens.

The block testbenches check these points:

* the filling pattern as run lengths;
* the measured random rates, and the 1/e fraction of intervals longer than the
  mean;
* exact regular periods, including the 40 080 000-clock period;
* the controller against a clock-by-clock reference model;
* the 24-bit wrap of the event counter;
* the Dout queue filling at exactly 64 events.
