# Column-parallel time-amplified, phase-revolved TDC for a 320 × 232 SPAD LiDAR

This is the digital and mixed-signal periphery of a direct time-of-flight
(D-ToF) depth sensor. It has 320 columns and 232 rows of single-photon
avalanche diodes (SPADs). Each column has its own time-to-digital converter
(TDC). The TDC resolves time to 1/16 of a 1 GHz clock period (62.5 ps) with
16 DLL phases and an 8-bit period counter. That gives a 12-bit code.

Two ideas sit on top of this plain flash-plus-counter TDC:

* **Time amplification.** An analog front end stretches the interval
  between the laser reference and the SPAD pulse by 4×, 8× or 16× before
  conversion. At 16× one code step is worth about 3.9 ps of time of flight.
* **Phase revolving (PR).** A multiplexer between the DLL and each TDC
  rotates which DLL phase reaches which latch cell, one step per frame.
  The DLL's fixed stage-to-stage skew then falls on a different code each
  frame. Over 16 frames the differential non-linearity (DNL) averages flat.
  This is *linearity-boost mode* (mode 1). In *data-compressive mode*
  (mode 2) only one latch is used and the 4 LSBs are dropped. The rotating
  phase shifts the coarse 1 ns grid by 1/16 period per frame. Averaging
  16 frames off chip therefore gets the fine resolution back, while only
  8 of the 12 bits are sent.

Everything that is logic is synthesizable SystemVerilog. The parts that are
analog in silicon are behavioural models with real-valued delays: the DLL,
the time amplifier and the SPAD/AQRC pixel. Those models are what let the
testbenches run the whole chain from photon to serial bit stream.

## One line of operation

The sensor scans the array one row ("line") at a time. 232 lines make a
frame. `apr_sequencer` runs each line through the states below
(`clk` cycles; the testbenches use 100 MHz):

| state | cycles | what happens |
|---|---|---|
| ARM | `ARM_CYCLES` (4) | row selected; every TDC and time amplifier held cleared (`tdc_arm` high) |
| SHOT | 1 | clear released; `laser_fire` pulses |
| CONV | `WINDOW_CYCLES` (32) | conversion window: the reference start and the SPAD pulses arrive and are converted |
| WAIT | ≥ 1 | stays here (`stall`) while the serializer is still sending the previous line |
| STORE | 1 | all 320 column results copied into the line buffer; serializer started |

A line is therefore converted while the previous line is being sent. After
the last line the frame index increments. Its 4 LSBs are the revolution
step `rot` for the next frame.

The pixel array is outside `lidar_top`. It gets `row_sel` (one-hot, driven
only during ARM/SHOT/CONV) and `col_timer` (recharge command per column). It
returns `col_out`, one line per column, which goes high when the selected
pixel avalanches. The column hold-time timer (`aqrc_col_timer`) sees that
edge through a 2-flop synchronizer. It keeps the pixel quenched for
`hold_cycles` cycles and then pulses `col_timer` for 2 cycles to recharge
it. So at most one avalanche per window reaches the TDC.

## The column converter (hardest part)

```
            ref_start (IN_N) ─┐                         ┌─ pr_tdc "N" ─ code_n ─┐
 col_out (IN_P) ─────────── time_amp ── OUT_N / OUT_P ──┤                       ├─ dcds = code_p - code_n
                                                        └─ pr_tdc "P" ─ code_p ─┘
 DLL P[15:0] ── phase_revolver(rot) ── D[15:0] ─────────── both TDCs
```

**Phases.** The DLL has 8 differential stages locked to half a 1 GHz
period. P0..P7 are the positive outputs and P8..P15 their complements. Each
phase is a 50 % duty copy of the clock, delayed by k·T/16.

**One TDC (`pr_tdc`).** It has three parts:

* `tdc_latch_bank`: 16 cells that freeze `D[15:0]` on the first rising
  edge of the event after the clear. Later edges are ignored (`hit`).
  In mode 2 only L0 is enabled; the others read 0.
* `tdc_ripple_counter`: an 8-bit ripple counter. Each stage is clocked by
  the previous stage's output. It counts rising edges of **D0, the revolved
  phase**, while armed and not yet hit, and then holds.
* `tdc_thermo_decoder`: the lower half D0..D7 is a thermometer code. If
  D0 = 1 it holds j+1 ones, otherwise 15−j ones, where j is the number of
  phase steps since the last D0 rising edge. The code is `{count, j}`, or
  `{count, 0000}` in mode 2.

The counter counts D0, not the raw clock. That keeps counter and latches
consistent for every rotation: the code is always the time since a D0 edge.
Rotating by `rot` therefore moves the time origin by `rot`·T/16, and it
moves which physical DLL stage bounds each fine code. The code origin is the
first D0 rising edge after the clear is released; that edge counts as one.

**DCDS.** Both TDCs of a column share the rotation and the arm timing. The
difference `code_p − code_n` (mod 4096) cancels the origin and the
rotation offset. What is left is the amplified interval in 62.5 ps steps.
`valid` is high when both events were seen. A column without an event is
stored as `0xFFF`.

**What revolving buys.** `tb_pr_linearity` shows it with a DLL whose stages
are off by up to ±20 ps. Code-density histograms of the fine code are taken
on a 1 ps event grid:

* With a fixed phase order, the bins reproduce the stage delays
  (max |DNL| 0.33 LSB).
* Cycling `rot` through 0..15 gives every bin exactly one of each stage
  (max |DNL| 0.000 LSB).

`tb_column_tdc` checks the mode-2 property. For a start at a fixed clock
phase, the coarse-only DCDS results summed over the 16 rotations equal
exactly 16 × the interval in phase steps. So their mean has full 62.5 ps
resolution.

A caveat that follows from the DCDS arithmetic: rotation moves no physical
edge in time. If the reference start sits at the same clock phase every
frame, the DCDS difference of one column sees the same boundaries in every
frame. The gain then comes from the start phase varying between shots. In
TCSPC (time-correlated single photon counting) this holds when the laser is
not locked to the 1 GHz clock. The single-TDC result above holds
regardless.

## Time amplifier model (`time_amp`)

This is a two-integrator model. IN_N starts V_intN on a large current.
When IN_P arrives, both nodes integrate on a small current. OUT_P fires
`T_FULL_NS` (200 ns) after IN_P. OUT_N fires G·(IN_P−IN_N) earlier, where
G = 4, 8 or 16 is the current ratio. If V_intN crosses its threshold
before IN_P arrives (G·Δ > T_FULL_NS), OUT_N fires at IN_N + T_FULL_NS/G and
the output saturates. Gain 1× bypasses the amplifier with a 0.5 ns delay.
The reset (`rst`) is the TDC clear. All output edges of a line must fall
inside the 8-bit counter range (256 ns), which `T_FULL_NS` = 200 ns
respects.

## Readout

`line_buffer` holds 320 × 12 bits and is loaded in one cycle at STORE.
`column_serializer` sends column 0 first, MSB first, one bit per `clk`, on
a single lane (`sdo`, `sval`, `sync` high on a line's first bit). Mode 1
sends 12 bits per column. Mode 2 sends the upper 8 bits, since the low 4
are zero. A line thus takes 3840 or 2560 cycles. This is longer than the
38-cycle conversion, so the sequencer normally stalls in WAIT; the
serializer sets the line rate. The LVDS pad driver is not included; `sdo`
is the bit stream it would carry.

## Files

| module | kind | role |
|---|---|---|
| `lidar_pkg` | package | sizes (320, 232, 16, 8+4), `tdc_mode_e`, `ta_gain_e` |
| `lidar_top` | RTL + models | the periphery; the pixel array, PLL and LVDS are outside |
| `apr_sequencer` | RTL | line/frame sequencing, laser trigger, stall, frame index |
| `row_selector` | RTL | one-hot row pointer |
| `aqrc_col_timer` | RTL | column hold-time timer |
| `column_tdc` | RTL | PR multiplexer and two TDCs in DCDS |
| `phase_revolver` | RTL | 16-way rotation |
| `pr_tdc` | RTL | latch bank, ripple counter, decoder |
| `tdc_latch_bank`, `tdc_ripple_counter`, `tdc_thermo_decoder` | RTL | TDC parts |
| `line_buffer`, `column_serializer` | RTL | readout |
| `dll_16phase` | behavioural | 16-phase DLL, locked, with optional skew (`SKEW_PS`) |
| `time_amp` | behavioural | time amplifier |
| `aqrc_pixel` | behavioural | SPAD with active quench/recharge; used by the testbenches |

Parameter defaults are the sensor's numbers where it gives them: 320
columns, 232 rows, 16 phases, 8-bit counter, 12-bit code, 1 GHz, gains
4/8/16. The following are this design's own choices: `ARM_CYCLES`,
`WINDOW_CYCLES`, `HOLD_W`, the 2-cycle recharge pulse, `FRAME_BITS`,
`T_FULL_NS`, the serial format, the no-event code and the system clock.

The TDC mixes clock domains by construction. Latch cells are clocked by
the event, counter stages by D0 and by each other, and everything else by
`clk`. The line buffer takes the TDC outputs directly at STORE, which is
safe because the window is over by then. Lint flags two signals that are used both
as flop data and as asynchronous controls. The sequencer state drives
`tdc_arm`, which is the TDCs' asynchronous clear. `col_out` feeds both
the hold-timer synchronizer and the time amplifier. Both uses are
intended.

## Simulating

With Verilator 5 (`--timing` is required by the behavioural models):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_lidar_top rtl/lidar_pkg.sv tb/tb_lidar_top.sv -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_<block>`: one per module, self-checking against values computed in
  the testbench.
* `tb_lidar_top`: 8 columns × 3 rows, 4 frames (16× mode 1, 8× mode 1,
  4× mode 2, 1× bypass). Random times of flight, some beyond the TA's
  linear range, some columns without photons, and a second photon in the
  hold time. It decodes the serial stream, checks every word (±1 LSB in
  mode 1, ±16 LSB in mode 2) and requires each mechanism to have occurred.
* `tb_pr_linearity`: the DNL experiment above.

`lidar_env` takes the array size as parameters. The same end-to-end check
runs at other sizes by changing `COLS`/`ROWS` and the width of `line_idx`
in `tb_lidar_top`. Use `FRAMES(1), ALL_MODES(0)` for a single mode-1 frame
at 16×. The largest run so far uses all 320 columns and 2 rows, with
`GATE_PLL(1)`. It passed all 973 checks and simulated 116 µs in about
one minute.

A complete 320 × 232 frame takes about 8.9 ms of sensor time. At that
speed it would need well over an hour of simulation, so no testbench
runs the default size. The cost comes from the readout: each line streams
3840 bits, one per `clk`, through a model with 640 TDCs. `GATE_PLL` stops
the 1 GHz clock outside the conversion windows. Without it, every counter
flop also sees 1 GHz edges during the whole readout.

## Throughput

At the sensor's headline rate of 24 depth images/s, each built from 100
frames, the array must deliver 2400 frames/s, i.e. 556,800 lines/s. That
is 1.8 µs per line. With one serial lane this design moves 3840 bits per
line in mode 1, which needs a 2.14 GHz bit clock; mode 2 needs 1.43 GHz.
At the 100 MHz used in the testbenches a line takes 38.4 µs, about 112
frames/s. Reaching the full rate needs a faster serializer clock or more
lanes. The lane count and bit rate are not specified for this sensor, so
the serializer is kept to one lane.

## Departures and own choices

* The rotation steps once per frame, taken from the frame index. Each
  pixel is converted once per frame, so this is also once per conversion
  of that pixel.
* The LSB is the nominal 62.5 ps of a 1 GHz / 16-phase DLL. The measured
  sensor quotes 61 ps intrinsic (3.81 ps at 16×).
* Fixed timing and formats chosen by this design:
  * arm and window lengths;
  * the code origin (first D0 edge);
  * the no-event code `0xFFF` (`0xFF0` as sent in mode 2);
  * the serial format and the single lane;
  * the 100 MHz system clock used in the tests.
* The time amplifier is an ideal linear-ramp model with a hard saturation.
  It has no jitter, offset or gain error. The DLL model is ideal apart
  from an optional fixed per-stage skew pattern.

## Not included

* SPAD array: photodiodes.
* PLL: its 1 GHz output is `ck_inp`/`ck_inn`.
* LVDS driver: an analog pad.
* Laser and optics.
* Off-chip histogramming / averaging: the testbenches do the averaging
  arithmetic.
