# Two-channel tapped-delay-line TDC for FPGA

This is a time-to-digital converter (TDC). It measures the time between a
rising edge on input `S1` and a rising edge on input `S2` with picosecond
resolution, using nothing but FPGA fabric and a 400 MHz clock. A clock
counter alone would resolve only 2.5 ns. The fractions of a clock period
are measured by letting each signal race down a chain of carry cells, 464
taps long with about 6 ps per tap, and reading how far it got when the next
clock edge arrived.

The RTL follows the TDC described in *High-Precision Time Measurement on
FPGA: An Optimized TDC Approach*. That design was built on a Kintex
UltraScale device for time-of-flight measurement in particle therapy.
The structure, the sizes and the way the code is encoded come from that
design. The sequencing, the interfaces, the widths and the behavioural model
of the delay line were chosen here. The section "How far to trust it" lists
the differences.

## Measuring one interval: T = T1 + T2 − T3

```
clk      _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
S1       ___|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
S2       _________________|‾‾‾‾‾‾‾‾‾‾‾
            |<T1>|<------ T2 ---->|
                              |<T3>|
            |<------- T ------>|
```

* **T1** is the time from S1 to the next rising clock edge. Delay line 1
  measures it.
* **T3** is the time from S2 to the rising edge after it. Delay line 2
  measures it.
* **T2** is the whole number of clock periods between those two edges. The
  coarse counter measures it as `N × 2500 ps`.

So `T = T1 + N·Tclk − T3`. The processing unit computes this in the fabric
and stores the result, signed and in picoseconds, in a result FIFO. Any
interval from 0 to 65,535 clock periods (about 164 µs) can be measured. A
slightly negative T, with S2 before S1 but caught by the same clock edge,
is also reported correctly.

## Data path of one channel

```
pin ─► input_capture ─► tapped_delay_line ─► hit_detect ─┐
       (2 set-on-edge    (464 taps, sampled   (first      │
        stages, held      by clk into a        non-empty  ├─► processing_unit ─► result_mem
        until cleared)    thermometer code)    sample)    │     (Eq. above,        (FIFO)
                                   └──► tdc_encoder ──────┘      1 multiplier)
                                        (bit counter + Map)
coarse_counter: started by the line-1 hit, stopped by the line-2 hit
```

| module | role |
|---|---|
| `tdc_top` | wires two channels, the counter, the processing unit and the FIFO |
| `input_capture` | turns the 2 ns detector pulse into a level held until cleared |
| `tapped_delay_line` | **behavioural model** of the carry chain and its observation flops |
| `hit_detect` | flags the clock edge that first sees the signal |
| `bit_counter` | pipelined, bubble-tolerant count of the ones in the code |
| `calib_map` | block-RAM table from ones count to picoseconds |
| `tdc_encoder` | `bit_counter` followed by `calib_map` |
| `coarse_counter` | counts whole clock periods from the S1 hit to the S2 hit |
| `processing_unit` | pairs hits, computes T, writes it, runs the dead time |
| `result_mem` | first-word-fall-through FIFO of results |
| `tdc_pkg` | shared constants, the model's tap delays and the controller's state type |

### Why the input is captured first

The detector pulses are 2 ns wide but the clock period is 2.5 ns. A bare
pulse would travel down the line as a short "wave" and could be gone from
the entry before the edge samples it. Each channel therefore starts with two
set-on-edge stages, as in the original layout, where a 1st and a 2nd
sampling point sit between the pin and the line entry. Each stage has D tied
high, is clocked by the stage before it, and has an asynchronous clear. The
line then sees a clean step that stays high until the processing unit
clears it. Each stage also has a power-up value of 0, the value an FPGA
flop has after configuration. In simulation, a clear that is already high
at time 0 gives no edge, so without it a random start value could stay.

### The delay line, and what the model does

In the FPGA the line is 58 `CARRY8` primitives (464 taps) placed by hand in
one column of one clock region. Every carry output has a flip-flop that
samples on the clock. It saturates after about 2.8 ns, a little more than
one clock period, so a signal arriving anywhere in a period is caught
before the line fills. Such a line cannot be written as portable RTL.
`tapped_delay_line` is therefore a simulation model. Tap `i` delays by
`2 + (37·i mod 9)` ps, from `tdc_pkg::model_tap_delay_ps`: 2 to 10 ps,
6 ps on average, 2784 ps in total. The uneven pattern stands in for the
uneven bin widths of a real carry chain. On each rising edge the taps are
copied into `therm`, where bit 0 is the entry tap.

Real samples contain **bubbles**: zeros behind the propagating front or ones
ahead of it, caused by setup and hold violations and clock skew. With
`BUBBLE_SPAN > 0` (default 4), the model swaps one filled tap just behind
the front with one empty tap just ahead of it on every sample that catches
the front. This keeps the number of ones the same. Looking for the last one
in the code would be wrong by up to 2·`BUBBLE_SPAN` taps, which is why the
encoder counts ones.

## Keeping the counter and the lines on the same clock edge

This is the subtle part of the design. T1, T2 and T3 only add up if the
counter starts on exactly the edge that gave delay line 1 its sample, and
stops on exactly the edge that gave delay line 2 its sample. If the counter
samples S1 through its own flip-flop, a signal close to a clock edge can be
seen by the line at edge *k* and by the counter at edge *k+1*. The result
is then off by a full 2.5 ns, in either direction. The original hardware
showed exactly this. It was fixed by placement: the counter flops were
co-located with the line entry cells and the trace lengths from the pins
were equalised.

This RTL removes the problem in logic. `hit_detect` looks at the first
`HIT_TAPS` = 8 sampled taps of the line itself (one carry block). It pulses
`hit` in the cycle of the first sample where any of them is filled after a
sample where all were empty. That pulse, and nothing else, starts the
counter (line 1) or stops it (line 2). The same pulse tags the sample for
the encoder. Line, counter and encoder therefore agree on the edge by
construction. If the signal arrives so close to an edge that no entry tap
has switched yet, both the count and the fine time move to the next edge
together, and T stays right.

## From code to picoseconds

`bit_counter` counts the ones of the 464-bit code in a pipeline:

* Groups of 6 bits (one LUT6 level) are counted and registered.
* The 78 group counts are then summed by a binary adder tree with one
  register per level.
* It takes one code per clock. The latency is 8 cycles at 464 taps
  (`1 + ceil(log2(groups))`).

`calib_map` turns the count `c` into time. Entry `c` should hold the delay
of taps `0…c−1` plus half the delay of tap `c`, which is the middle of the
bin. Those widths differ from tap to tap and from device to device. They
come from a calibration run, and the table is loaded through the top-level
write port (`map_we`, `map_ch`, `map_addr`, `map_wdata`). At power-up the
table holds the nominal linear map `(2c+1)·2800/(2·464)` ps. For each
accepted hit, `cal_valid1/cal_ones1` and `cal_valid2/cal_ones2` give the raw
count, so a code-density histogram can be collected for calibration. Each
Map is 512 × 16 bits (an 18 Kb block RAM), and the two together fill one
36 Kb tile.

The encoder's output `out_valid` is the hit tag delayed by 9 cycles (8 for
the bit counter, 1 for the Map read). Codes without a tag are encoded but
ignored.

## Pairing, dead time and corner cases

The `processing_unit` controller has five states:

* `PU_ARMED`: waiting for S1.
* `PU_RUN`: the counter is running and the unit is waiting for S2.
* `PU_WAIT`: waiting for both fine times and the count.
* `PU_CALC`: `N·2500` and `T1 − T3` are registered, then summed and
  written.
* `PU_CLEAR`: both input captures are held clear for `DEAD_CYCLES` = 3
  cycles so that the lines drain (2.8 ns) before the next pair.

Corner cases:

| case | what happens |
|---|---|
| S1 and S2 caught by the same edge | counter start and stop in one cycle, N = 0, T = T1 − T3 (may be negative) |
| S2 with no S1 pending | `s2_ignored` pulses, only line 2 is cleared, nothing written |
| S1 with no S2 | after 65,536 cycles the counter overflows, `meas_abort` pulses, nothing written |
| second S1 while running | not seen: capture 1 is still holding its level |
| result FIFO full | the result is dropped and `mem_drop` pulses |

**Timing.** `meas_done`, and the write into the FIFO, come 12 clock edges
after the edge that caught S2. The TDC is armed again 3 cycles later. A
pair therefore occupies the TDC for about `N + 15` cycles.

## Top-level interface (`tdc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 400 MHz sampling clock; synchronous active-high reset, which also clears the captures |
| `s1`, `s2` | in | buffered single-ended input pulses (asynchronous) |
| `map_we`, `map_ch`, `map_addr[8:0]`, `map_wdata[15:0]` | in | Map write; `map_ch` 0 = line 1, 1 = line 2 |
| `rd_en` | in | pop one result |
| `rd_data[31:0]` | out | oldest result, signed ps (valid while `rd_empty` is low) |
| `rd_empty`, `rd_full`, `rd_count[6:0]` | out | FIFO state |
| `meas_done`, `meas_abort`, `s2_ignored`, `mem_drop` | out | one-cycle status pulses |
| `armed`, `counting` | out | waiting for S1; coarse counter running |
| `cal_valid1/2`, `cal_ones1/2[8:0]` | out | raw ones count of each accepted hit |

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_TAPS` | 464 | original design: 58 CARRY8 × 8 |
| `CLK_PS` | 2500 | original design: 400 MHz |
| `CAPTURE_STAGES` | 2 | original layout: two sampling points |
| `DL_RANGE_PS` (Map) | 2800 | original design: line saturates at about 2.8 ns |
| `CNT_W` | 16 | chosen here |
| `MAP_W`, `TIME_W` | 16, 32 | chosen here |
| `MEM_DEPTH` | 64 | chosen here (distributed RAM) |
| `DEAD_CYCLES` | 3 | chosen here (≥ 2 needed to drain 2.8 ns) |
| `HIT_TAPS` | 8 | chosen here (one carry block) |
| `BUBBLE_SPAN` | 4 | model only |

## How far to trust it

* **Verified in simulation** by the end-to-end test at the default
  parameters. With a Map that matches the model line, every interval from
  150 ps to 4000 ps in 50 ps steps was applied at random clock phases,
  together with longer intervals of up to 250 ns. The error stayed within
  the quantisation of the two lines: 2 ps mean and 8 ps maximum absolute
  error in the sweep, with a 20 ps limit. This says the logic is right. It
  says nothing about real jitter or linearity. The original hardware reports
  about a 6 ps LSB and a 30 ps standard deviation.
* **Not portable as timing.** `tapped_delay_line` is behavioural. On an FPGA
  it must be replaced by hand-placed carry primitives, with a flop on each
  output, in a single column and clock region. The input path to the entry
  cell must be placed symmetrically for both channels. None of that is
  expressed in this RTL.
* **Departures from the original design:**
  * The counter's start and stop come from the lines' entry cells, not from
    the input signals through placed flops. The goal is the same: one edge
    for both.
  * The counter gives N = 0 when both signals are caught by the same edge.
    The original description speaks of stopping "at a subsequent edge", but
    its own measurements start at 150 ps.
  * The pairing rules, the overflow abort, the dead time, the FIFO form of
    the result memory and the Map write port are not specified by the
    original and were chosen here.
  * The calibration itself, measuring the tap widths with a pulse generator,
    is an off-line procedure. Only its interface (the raw counts out, the
    Map write in) is here.
* **Left out:** the LVDS input buffers, the external LVDS25→LVDS18
  converter, clock generation and all placement constraints.

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal rtl/tdc_pkg.sv tb/tdc_top_tb.sv \
    -y rtl -Irtl --top-module tdc_top_tb -o sim && ./obj_dir/sim
```

`tdc_sweep_tb` runs the characterisation workload the same way: 40 pairs
at every 50 ps step from 150 to 4000 ps, then 1000 pairs of 2200 ps. It
checks the mean and the median of each step to within 5 ps. It takes about
two minutes. In one run, the mean error averaged 0 ps with a worst step of
2 ps. The 2200 ps results spread over 2194 to 2206 ps.

`tdc_calib_tb` runs a calibration through the top-level ports, using
nothing but the RTL's outputs:

1. Both lines get their signal at times before a clock edge stepped from 5
   to 2495 ps in 10 ps steps. The raw count of every step is recorded.
2. Each Map entry is set to the mean time that produced its count, and
   counts that were never seen are interpolated.
3. The tables are written through the Map port.
4. 200 random pairs are measured, each within 25 ps.

In one run, every step gave its own count and the mean error was 3 ps.

Replace `tdc_top_tb` with any unit testbench:

* `input_capture_tb`
* `tapped_delay_line_tb`
* `hit_detect_tb`
* `bit_counter_tb`
* `calib_map_tb`
* `tdc_encoder_tb`
* `coarse_counter_tb`
* `processing_unit_tb`
* `result_mem_tb`

`--timing` is needed because the delay-line model and the testbenches use
delays. The end-to-end test takes well under a minute to build and run.
Verilator has only two signal states, so every register that is read is
reset or initialised.

The end-to-end test uses a timescale of `1ps/100fs`, and puts its clock
edges on half-picosecond times so that no tap switches exactly on an edge.
To model a different line, change `model_tap_delay_ps` in `tdc_pkg`. The
test derives its calibration table from the same function.
