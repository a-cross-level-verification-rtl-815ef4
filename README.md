# Timing-monitored FIR filter: Razor flip-flops and a counter-based delay sensor

Process variation, supply noise, temperature and ageing all show up in one
place in a digital block: the propagation delay of its critical paths. This
design embeds two kinds of on-chip delay monitors into a small FIR filter, so
that the filter itself reports (and, for one monitor, repairs) timing
failures:

* a **modified Razor flip-flop** sits on a critical-path endpoint. It flags
  data that arrives after the capturing clock edge but within the following
  half period, and can reload the late value into the flip-flop;
* a **counter-based delay sensor** measures, in periods of a fast auxiliary
  clock, how long after the launching clock edge a critical-path signal last
  changed, and compares that number with a design-time reference.

Two augmented versions of the same 4-tap filter are built, as the scheme
proposes: one with 64 Razor flip-flops, one with a single counter-monitored
path. `augmented_fir_top` places them side by side. In each version, the
block wraps the filter and its sensor and exports three things: the filter
outputs, the metric (the error flags, or the measured delay) and a
"metric OK" flag.

## Files

| file | content |
|---|---|
| `rtl/fir_pkg.sv` | filter sizes, coefficients, product and output arithmetic |
| `rtl/razor_ff.sv` | modified Razor flip-flop (one bit) |
| `rtl/cbm_ctrl.sv` | sensor controller: clock alignment, start, observability window, reference table, OK flag |
| `rtl/cbm_counter.sv` | high-frequency period counter |
| `rtl/cbm_capture.sv` | rising/falling transition capture and output multiplexer |
| `rtl/counter_delay_sensor.sv` | the three sensor parts together |
| `rtl/fir_razor.sv` | FIR filter with 64 Razor flip-flops |
| `rtl/fir_cbm.sv` | FIR filter with one counter-monitored product bit |
| `rtl/augmented_fir_top.sv` | both filters side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mutation_analysis` |

## The host filter

The filter is a direct-form FIR with 4 taps, 8-bit unsigned samples and 8-bit
unsigned coefficients `{141, 249, 249, 141}`. The pipeline:

1. `data_in` is registered into a 4-sample delay line (`taps[0]` newest).
2. Each tap feeds an 8×8 multiplier. These four multipliers are the critical
   paths. Their 16-bit products are registered: 4 × 16 = 64 flip-flops.
3. The four registered products are summed (18 bits). The 16 most
   significant bits are registered as `data_out`.

A sample applied before rising edge *k* reaches `data_out` after edge *k+2*.
All coefficients are odd and larger than 128, so every one of the 64 product
bits toggles for some input. Otherwise a monitor on a constant bit could
never see a fault. Tap count, widths and coefficients are this design's
choices. Only the 64 monitored endpoints and the 8-bit-in/16-bit-out pin
budget come from the published augmented filter.

## Modified Razor flip-flop (`razor_ff`)

```
 d ──┬──────────────►|0\
     │               |  |──► main FF (clk) ──┬──► q
     │   shadow ────►|1/                     │
     │   latch         ▲ restore = e & r     ├─ xor ──► e
     └──► (open while clk_dly is low) ───────┘
```

* The **main flip-flop** samples `d` on the rising edge of `clk`.
* The **shadow latch** is transparent while `clk_dly` is low. `clk_dly` is
  `clk` delayed by half a period plus a small skew. The latch therefore opens
  just after each rising edge of `clk` and closes just after its falling
  edge.
* `e = q ^ shadow`. If the data for edge *k* arrives after edge *k* but
  before the latch closes, the flip-flop holds the stale value and the latch
  holds the new one, so `e` goes high.
* **Correction**: when `e` and `r` are both high at the next rising edge, the
  multiplexer loads the shadow value instead of `d`. The late value then
  appears on `q` one cycle late. With `r` low, the error is only reported.
  There is one `r` per cell, so correction can be enabled bit by bit.

Things to know when using it:

* **Hold constraint.** Every path into a Razor cell must be slower than the
  latch's open window, about half a clock period. Otherwise the latch catches
  the *next* value and reports a false error. In silicon this is met by
  padding short paths. A zero-delay RTL simulation cannot meet it, because
  there the products change in the same time step as the launching edge. The
  testbenches therefore model the multiplier delay themselves: they `force`
  the 64 nets `fir_razor.prod_d` (the Razor D inputs) and update them 6 ns
  after each edge of a 10 ns clock. Without such a model, `e` fires whenever a
  product bit changes.
* **No pipeline stall.** A correction delivers the late value one cycle
  late, and the value that arrived normally in that cycle is dropped. Nothing
  upstream is held. Any stall or replay is left to the system around the
  filter.
* `e` is combinational. Sample it from the closing of the latch (just after
  the falling edge) until the next rising edge. While the latch is open, `e`
  follows `d`.
* `metric_ok` of `fir_razor` is the NOR of all 64 `e` flags.
* `clk_dly` comes from a delay element outside this RTL. The testbenches
  generate it.

## Counter-based delay sensor (`counter_delay_sensor`)

The sensor measures one path. That path starts at a rising edge of the main
clock and ends at a flip-flop input, `curr_cps`. Everything runs on `hf_clk`.

**Clocking assumptions.** `hf_clk` is `HF_RATIO` (10) times the main clock,
and its rising edges are aligned with the main clock's rising edges. `rst_n`
must be released on a rising edge of the main clock. The controller then finds
the main-clock edges by counting `hf_clk` edges, so it needs no main-clock
input.

**A measurement.**

1. `start_meas` is sampled on a main-clock edge. If it is high and the sensor
   is idle, a measurement starts: the counter and both capture registers
   clear, and `busy` rises.
2. Number the `hf_clk` edges after the start edge e = 1, 2, …. At edge e the
   counter holds e−1.
3. The **observability window** `obs_win` is open for edges
   `OBS_OPEN` … `OBS_CLOSE`, which is 1 … 14 by default. It spans the next
   main-clock edge. Start requests during a measurement are ignored.
4. In the window, a rising transition of `curr_cps` stores the counter in
   the rising register, and a falling one stores it in the falling register.
   A flag remembers which kind came last. `meas_val` shows the register of
   the last transition, so a path that glitches reports its final settling
   time.
5. A transition between edges e−1 and e therefore reads **e−1**: the delay
   rounded down to whole `hf_clk` periods. Readings run from 0 to 13 by
   default. 0 also means "no transition in the window". A change that happens
   together with the launching edge reads 0.
6. `out_ok = (meas_val <= lut_out)`. `lut_out` is the reference of the path
   chosen by `path_sel`, from a table fixed at design time. By default the
   table has one entry, 8 periods.

`meas_val` shows a capture one `hf_clk` cycle after the edge that sampled it.
It holds its value until the next measurement starts. Measurements can repeat
every two main-clock cycles with the defaults.

In `fir_cbm`, the monitored path is bit 15 of the tap-1 product. The net
`cps_d` feeds both that product-register bit and the sensor. The testbenches
force `cps_d` to give that bit a chosen delay.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `fir_pkg` | `TAPS`, `DATA_W`, `COEF_W`, `OUT_W` | 4, 8, 8, 16 | filter shape |
| `fir_pkg` | `COEFS` | {141, 249, 249, 141} | coefficients |
| `fir_cbm` | `CPS_TAP`, `CPS_BIT` | 1, 15 | monitored product bit |
| sensor | `CNT_W` | 10 | counter and reading width |
| sensor | `HF_RATIO` | 10 | `hf_clk` periods per main-clock period |
| sensor | `OBS_OPEN`, `OBS_CLOSE` | 1, 14 | window, in `hf_clk` edges after the start |
| sensor | `LUT_DEPTH`, `REF_LUT` | 1, {8} | reference table |

Taken from the published work: 64 Razor cells, one counter-monitored path, a
tolerance of 8 fast-clock periods, measurable delays up to 13 periods, and a
loop of 10 fast-clock periods per main-clock transaction (the basis for
`HF_RATIO`). Everything else in the table is this design's choice.

## Where this design departs from the published one

* The host filter's internals (taps, coefficients, which paths are monitored)
  are not published. The filter here is a stand-in of the same size class.
* The published sensor holds `curr_cps` in level-sensitive latches. Here an
  `hf_clk` flip-flop does that job, so the sensor is fully synchronous. The
  published drawing enables the counter with the observability window. Here
  the counter runs for the whole measurement, and the window gates the
  captures. With the default window (open from the first fast-clock edge to
  the end of the measurement) the two are the same. With a window that opens
  later, the reading is still a delay from the launching edge, which is
  what the sensor is meant to report.
* The reading is rounded down to whole periods (error under one period). The
  published sensor states an error of ± half a period.
* A delay shorter than one fast-clock period reads 0, so it cannot be told
  apart from "no transition". The fault analysis below therefore sets the
  counter's minimum-delay fault at the smallest delay the counter resolves,
  one period. It sets the delta-delay faults over the measurable range.
* The published filter sums its error flags into one OK output, but the
  gate is not specified. Here `metric_ok` is high when no error flag is set.

## Testbenches and what they show

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…`
line. Each has a watchdog.

| testbench | what it does |
|---|---|
| `tb_razor_ff` | random data with normal, minimum-late (0.2 ns after the edge) and maximum-late (5.2 ns) arrival and random `r`; checks `q` and `e` every cycle |
| `tb_cbm_counter`, `tb_cbm_ctrl`, `tb_cbm_capture` | each part against its own reference model: saturation, start refusal, window edges, capture and mux |
| `tb_counter_delay_sensor` | random transition times (with the edge, inside, beyond the window, several per measurement); reading = floor(delay / T_hf) of the last in-window transition |
| `tb_fir_razor`, `tb_fir_cbm` | whole filters with modelled path delays; checks `data_out` against a reference filter, including stale captures |
| `tb_augmented_fir_top` | both filters at once with default parameters; requires every mechanism (both kinds of late data, restore, error without restore, readings above and within the reference, transitions with the edge and beyond the window, stale capture) to occur |
| `tb_mutation_analysis` | one minimum- and one maximum-delay fault on each of the 64 Razor bits, and minimum, maximum and 13 delta-delay faults on the counter-monitored bit |

Results of `tb_mutation_analysis` with the defaults:

* Razor: 64 + 64 faults, all raise `e`, all change the output, and all are
  corrected (the late value reaches the register one cycle later).
* Counter: the maximum-delay fault (just before the next main-clock edge)
  reads 9, which is above the reference, so it is an error. The
  minimum-delay fault (10.3 ns) reads 1, so it is detected but is no error.
  The 13 delta-delay faults are spread evenly from 1 to 13 periods. All 13
  give a nonzero reading. The 4 that read above 8 periods (30.77 %) are
  errors. These are the detection and error rates the published analysis
  reports.

Run one with Verilator 5 (timing support needed):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_augmented_fir_top.sv --top-module tb_augmented_fir_top
./obj_dir/Vtb_augmented_fir_top
```

The testbenches reach into the design by hierarchical name
(`dut.u_fir_razor.prod_d`, `dut.u_fir_cbm.cps_d`) to apply the path delays.
If you rename those nets, update the testbenches too.

## Synthesis notes

All RTL is synthesizable. The shadow latch in `razor_ff` is an intended
latch: 64 per `fir_razor`, fewer after constant bits are optimised. It needs
the delayed clock and the hold padding described above, which a
physical-design flow must provide. A generic synthesis of
`augmented_fir_top` gives about 520 word-level cells and 253 flip-flop bits.
