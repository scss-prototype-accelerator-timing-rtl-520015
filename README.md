# Trigger system for a C-band FEL test accelerator

A linear accelerator driven by 5712 MHz (C-band) RF needs every device to fire
at the same point of the RF wave on every shot. That includes the electron gun,
the beam deflector, the klystron modulators and the beam monitors. The
requirement is about one degree of 5712 MHz, which is well under a
picosecond. A shot must also start at the same point of the 60 Hz mains cycle,
so that the high-voltage modulators always see the same supply ripple.

This RTL generates triggers in three steps:

1. **Coarse and locked to the mains.** A master trigger unit (MTU) passes one
   edge of a 60 Hz clock every *N* edges. This gives an operation cycle of
   60 Hz down to 1 Hz. The MTU samples and re-times that edge on the 238 MHz
   reference clock.
2. **Programmable delay.** Each trigger delay unit (TDU) counts a 24-bit delay
   in 4.2 ns steps of 238 MHz, then drives an output pulse whose width is set
   by a 15-bit counter. A TDU has eight channels.
3. **Fine alignment to the RF.** Each delayed output passes a flip-flop on
   238 MHz and then a final flip-flop on 5712 MHz. Because 5712 MHz is exactly
   24 × 238 MHz from the same oscillator, every output edge lands on a C-band
   RF edge.

The top level `spa_timing_top` holds one MTU and nine TDUs, so it has 72
delayed outputs.

## Clocks and the two-stage re-timing

| clock      | period     | used for                                        |
|------------|------------|-------------------------------------------------|
| `clk_238`  | 4201.68 ps | all counting logic; first re-timing stage       |
| `clk_5712` | 175.07 ps  | final re-timing stage of every TDU output       |

This part of the design is the least obvious. The delay counters run on
238 MHz, but a trigger that leaves counting logic carries that logic's own
timing jitter. Suppose that jitter reached one 5712 MHz period (175 ps). A
flip-flop on 5712 MHz would then sometimes catch the edge one fast cycle
early or late, and the output would jump by 175 ps from shot to shot. So the
signal is first cleaned by a flip-flop on the 238 MHz clock itself. The
flip-flop's output then moves at a fixed time after each 238 MHz edge. The
5712 MHz flip-flop samples that clean signal.

The two clocks are phase-locked. Synchronisers are therefore neither needed
nor used between the stages. The only requirement is that a `clk_5712` rising
edge falls inside the valid window of the first stage's output. In the real
system the cable lengths set this phase. The testbenches place the fast edge
40 ps after each 238 MHz edge (`tb/tb_rf_clocks.sv`).

In the original hardware both stages are discrete SiGe flip-flops rated to
8 GHz. The MTU output uses one as well. Here they are ordinary `always_ff`
flip-flops. The sub-picosecond jitter of the real parts is an analog property
that a logic simulation cannot show.

## Module hierarchy

```
spa_timing_top
├── mtu                      master trigger unit
│   └── sync_2ff             60 Hz inputs into the 238 MHz domain
└── tdu  ×N_TDU (9)          trigger delay unit
    ├── tdu_delay_board      "FPGA board": trigger capture, inhibits, 8 channels
    │   ├── sync_2ff         master trigger and hardware inhibits
    │   └── tdu_channel ×8   24-bit delay + 15-bit width counters
    └── tdu_sync_board       238 MHz then 5712 MHz flip-flop per channel
timing_pkg                   sizes (8, 24, 15, 9, 6) and the channel state enum
```

## Master trigger unit (`mtu`)

The MTU has two 60 Hz inputs: `ac_line_60hz`, the mains, and `ext_60hz`, an
external 60 Hz clock. A two-flop synchroniser brings each into `clk_238`.
Rising edges are detected on each input separately, and `clk_sel` chooses
between the two edge streams. Selecting edges rather than levels means that
switching sources can never create a false edge.

A down-counter passes the first selected edge after reset or after `enable`
rises. After that it passes every `div_ratio`-th edge. A ratio of 0 acts as
1. A new ratio takes effect after the next trigger.

Each passed edge starts an 8-cycle pulse (`fpga_trig`). A final flip-flop
re-times that pulse to give `master_trig`. `fpga_trig` rises on the third
`clk_238` edge, counting the edge that first samples the 60 Hz input high.
`master_trig` rises one edge later. An input that is already high when reset
ends counts as a rising edge.

## Trigger delay unit (`tdu`, `tdu_delay_board`, `tdu_channel`, `tdu_sync_board`)

**Trigger capture.** The master trigger comes back from the distribution
chain with an arbitrary cable phase. A two-flop synchroniser and a
rising-edge detector turn it into a one-cycle strobe. If edge *c* is the
first to sample the trigger high, the channels sample the strobe on edge
*k = c + 2*.

**Channel timing.** A channel that samples the strobe on edge *k* with
settings `delay` = *d* and `width` = *w* behaves as follows:

- `ch_out`, on the delay-board side, is high from edge *k + d* through edge
  *k + d + w − 1*. A delay of 0 therefore raises the output right after the
  strobe edge.
- The longest delay is 2^24 − 1 cycles, which is 70.49 ms.
- The longest pulse is 2^15 − 1 cycles, which is 137.7 µs.
- A width of 0 produces no pulse, and the channel does not become busy.
- The channel is `busy` from edge *k* until edge *k + d + w*. A strobe that
  arrives while the channel is busy is ignored, and the count in progress
  continues. This matters at 60 Hz: a delay longer than 16.7 ms spans more
  than one trigger period, so such a channel fires only on every second (or
  later) trigger.

**After the sync board.** `out` rises at T(*k + d + 1*) plus the
238-to-5712 MHz phase. Here T(*n*) is the time of `clk_238` edge *n*. The
pulse keeps its exact width.

**Inhibit.** Each channel has a hardware inhibit line (`hw_inhibit`, active
high) and a software inhibit bit (`sw_inhibit`). The hardware line is
synchronised with a two-edge delay; the software bit acts at once. Either one
holds the output low while it is asserted. The counters keep running, so an
inhibit never shifts the timing of later pulses.

## Top level and what is outside it

Several parts are not RTL:

- **Distribution chain.** The LVDS trigger distribution units are a passive
  fan-out: four units connected in series. They sit between `master_trig`
  and the per-TDU inputs `tdu_trig_in[t]`. Loop `master_trig` back through
  whatever cable or buffer model suits you. `tb/tb_trigger_chain.sv` is a
  transport-delay model with 5 ns + 3 ns per unit.
- **Control registers.** In the original hardware, the MTU and TDU settings
  are registers on a VME bus. No register map is defined, so each setting is
  a plain input of the top: `mtu_*`, `delay`, `width`, `sw_inhibit`.
- **Analog parts.** The master oscillator and the RF amplifiers are not part
  of this design. Nor are the level converter (LVPECL to NIM/TTL/0–10 V), the
  temperature-controlled box of the sync board, or the deflector-timing
  feedback (a motorised delay line, a time-interval counter and PID
  software). Outputs here are single-ended logic signals; on the boards they
  are LVPECL.

All nine TDUs share one `clk_238`/`clk_5712` pair in this RTL. In the
original system each rack receives its own copy of the distributed RF.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N_TDU`   | 9  | top | number of trigger delay units |
| `N_CH`    | 8  | top, tdu, boards | channels per TDU |
| `DELAY_W` | 24 | top, tdu, delay board, channel | delay counter bits |
| `WIDTH_W` | 15 | top, tdu, delay board, channel | width counter bits |
| `DIV_W`   | 6  | top, mtu | divide-ratio bits (60 needs 6) |
| `PULSE_CYCLES` | 8 | mtu | master-trigger length in 238 MHz cycles |

These values are taken from the original system:

- nine TDUs, eight channels each;
- 24 and 15 counter bits;
- 238 and 5712 MHz clocks;
- a 1–60 Hz operation cycle.

These are this design's own choices:

- `DIV_W`;
- `PULSE_CYCLES`;
- all synchronisers;
- the exact latencies;
- ignoring a trigger while the channel is busy;
- gating the output on inhibit;
- reset behaviour: asynchronous, active-low `rst_n` everywhere.

## Verification

Each testbench checks its results against a reference model written in the
testbench, and prints `TB_RESULT checks=… failures=…`.

| testbench | what it shows |
|-----------|---------------|
| `tb_tdu_channel` | exact rise/fall edges for zero and random delays, zero width, retrigger while busy, inhibit inside a pulse, the longest pulse, and the full 2^24 − 1 delay (70.49 ms, also checked in time) |
| `tb_mtu` | trigger edges from a cycle model; spacing for ratios 1, 3, 60 and 0; source switch; disable and re-enable; 8-cycle width; alignment to `clk_238` |
| `tb_tdu_delay_board` | all eight channels every cycle, with random settings and with hardware inhibits toggled at random mid-pulse |
| `tb_tdu_sync_board` | first stage samples on 238 MHz; outputs change only on 5712 MHz edges and exactly one fast edge later |
| `tb_tdu` | rise and fall times of every output predicted to 1 fs from the trigger time |
| `tb_spa_timing_top` | whole system at default size (9 × 8 outputs) through the chain model. It predicts every output edge to 1 fs and counts each mechanism: both 60 Hz sources, ratio > 1, disabled interval, hardware and software inhibit, trigger ignored while busy, zero delay, long delay. A mechanism that never occurs counts as a failure. |
| `tb_workload_60hz` | MTU plus delay board at the real 16.667 ms mains period for 0.28 s of simulated time: 60 Hz and 20 Hz spacing; a 70.49 ms delay that skips the triggers arriving while it counts; a 21 ms delay used on every second trigger; the full 137.7 µs width |

Each block testbench has also been run against a copy of its module with one
deliberate error, for example an off-by-one in a counter, a lost inhibit, the
wrong clock on the final flip-flop, or swapped channels. Every one of those
copies failed.

To shorten runs, `tb_mtu` and `tb_spa_timing_top` use 60 Hz stand-ins with
periods of a few thousand 238 MHz cycles. The logic does not depend on the
absolute period. `tb_workload_60hz` covers the real rate.

Simulating one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/timing_pkg.sv \
    tb/tb_spa_timing_top.sv --top-module tb_spa_timing_top -o sim
./obj_dir/sim
```

Every other testbench is built the same way, with its own name in both
places. The testbenches need `timeprecision 1fs`, which every file declares,
because the 5712 MHz half-period is 87.535 ps. Run times: about 10 s for
`tb_tdu_channel`, under 1 min for `tb_workload_60hz`, a few seconds for the
rest. Simulating with the 5712 MHz clock running is slow, at about 0.3 ms of
simulated time per second. That is why the long-delay and real-rate runs
leave that clock out.

## Limits

- No jitter, drift or signal-level behaviour is modelled. Everything that
  makes the real hardware reach sub-picosecond stability is analog: the SiGe
  flip-flops, the LVPECL outputs, the temperature-controlled box and the
  cable phase.
- The control bus is not implemented. Settings are assumed static while a
  channel counts. The delay is loaded at the strobe and the width when the
  pulse starts, so changing a setting mid-count affects only the parts not yet
  loaded.
- The distribution chain is outside the design. Its delay only moves the
  238 MHz edge on which each TDU captures the trigger.
