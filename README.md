# Multi-frequency clocking with an FPGA carry-chain delay line

A synchronous circuit driven by one fixed clock draws its supply current in
sharp pulses at exactly that frequency, and the board radiates a tall,
narrow spectral peak. This design lowers that peak by making the clock hop
among a set of nearby frequencies, a discrete, all-digital form of
spread-spectrum clocking. The clock comes from a ring oscillator whose loop
contains a variable delay line built from the dedicated carry-chain
multiplexers of an FPGA (Xilinx CARRY4 blocks). Each multiplexer adds about
50 ps, so the cycle time can be stepped in 100 ps increments, far finer than
a delay line made of lookup tables and routing.

The main configuration uses eight CARRY4 blocks: 32 multiplexer steps and
therefore 32 clock frequencies. With the default delays, the fastest is
31.4 MHz (31.84 ns) and the slowest 28.6 MHz (34.94 ns). The
frequency-sweep rate is set by a run-time cycle threshold.

## The ring and its period

```
            +--------------------------------------------------------------+
            |                                                              |
 data_in -->+--> carry4_chain --cout--> enable_gate --> inverter_chain --> clk --> (BUFG) --+
            |   (8 x carry4)     |        (AND en)       (3 inverters)                      |
            |        ^ sin       |                                                          |
            |        |           +--> switch_counter --> freq_comparator --> sin_mux        |
            |        +------------------------------------------------ sin ---+            |
            +-----------------------------------------------------------------------------+
```

The loop is the carry chain, the AND gate, an odd number of inverters and the
global clock buffer (BUFG), which carries the clock back to the data input
of every CARRY4. An odd number of inversions makes the loop unstable: each
edge travels once around the loop and comes back inverted. The half period
is therefore one loop delay, and the period is

```
CCT_i = BCCT + i * 2 * D_MUXCY        i = 0 .. 4*N_CARRY4 - 1
```

Here `BCCT` is the period with the shortest carry path (one multiplexer) and
`D_MUXCY` is the delay of one carry multiplexer. Each extra multiplexer is
passed twice per period, once for the rising edge and once for the falling
edge, so one step adds 100 ps.

The defaults split the 15.92 ns loop delay (half of BCCT) as follows:

| element | delay |
|---|---|
| AND gate | 150 ps |
| 3 inverters | 3 × 4740 ps |
| BUFG | 1500 ps (testbench model) |
| one MUXCY | 50 ps |

Only the 50 ps and the 31.84 ns total are known values. The split is
arbitrary and affects nothing else. On a real device all these delays come
from placement and routing. In this RTL they are `#` delays on continuous
assignments: they act in simulation and synthesis ignores them.

## How the carry chain becomes a delay line

A CARRY4 holds four 2:1 multiplexers (MUXCY) stacked into a carry path.
Multiplexer *k* passes the shared data input `din` when its select `sin[k]`
is 1. When the select is 0 it passes the carry from the stage below. The
data input therefore enters the chain at the highest multiplexer whose
select is 1, then ripples through every multiplexer above it to `cout`.

Within one block:

| `sin[3:0]` | multiplexers passed |
|---|---|
| 1111 | 1 |
| 0111 | 2 |
| 0011 | 3 |
| 0001 | 4 |

Eight blocks in series give a 32-bit select. Frequency index *i* uses the
thermometer code `SIN = 32'hFFFF_FFFF >> i`, which routes the edge through
*i*+1 multiplexers.

The thermometer form matters. While `din` is steady, every multiplexer at or
below the entry point selects `din`, and every one above it passes `din` up.
All chain nodes therefore equal `din`. Changing from one thermometer code to
another between edges then cannot make `cout` glitch. A non-thermometer code
with the same highest bit would give the same delay, but it could leave
stale values in the lower stages.

The carry input of the lowest block is tied to 0. An all-zero select word
would therefore stop the ring, but the controller never produces one.

## Hopping control

Three small blocks choose the select word. They are clocked by rising edges
of the carry-chain output `cout`, which is the clock before the AND gate:

* `switch_counter` counts cycles at the current frequency. It is
  `m = ceil(log2(f_o / f_sw))` bits wide, where `f_o` is the operating
  frequency and `f_sw` the switching frequency. The default is
  31.4 MHz / 100 kHz, which gives 9 bits.
* `freq_comparator` raises `switch_now` when the cycle count reaches
  `sw_threshold`. That clears the counter and steps the registered frequency
  index `freq_sel`: 0, 1, …, 31, 0, … Each frequency is held for
  `max(sw_threshold, 1)` cycles.
* `sin_mux` is a 32-input, 32-bit multiplexer. It turns the index into the
  select word. Its inputs are the constant thermometer codes, generated in
  `mfc` from `mfc_pkg::sin_code`.

Timing works like this. A rising edge of `cout` updates the index. The new
select word must be stable before the next edge arrives at the chain's data
input, which happens after the AND gate, the inverters and the BUFG. This
gives the constraint

```
T_counter + T_comparator + T_mux  <  T_AND + T_inverter_chain + T_BUFG
```

The inverter chain is the adjustment that satisfies it. Under this
constraint, the whole period that follows an index change runs at the new
frequency. The testbenches check every period against `CCT_i` for the index
that was current when the period began.

`en` low forces the AND output to 0. The ring then stops with `clk` = 1 and
no further edges. `rst_n` is asynchronous, because a stopped ring delivers
no clock edges to a synchronous reset.

## Number of frequencies and the cost in speed

Hopping lengthens the average cycle. When all *n* frequencies are held for
equal times, the design gives

```
average CCT = BCCT + (n - 1) * D_MUXCY        overhead = (n - 1) * D_MUXCY / BCCT
```

| n | CARRY4 blocks | average CCT | overhead (this RTL, simulated) | overhead by the (n+1) formula | overhead as published |
|---|---|---|---|---|---|
| 8  | 2 | 32.19 ns | 1.10 % | 1.41 % | 1.38 % |
| 16 | 4 | 32.59 ns | 2.36 % | 2.67 % | 2.48 % |
| 24 | 6 | 32.99 ns | 3.61 % | 3.93 % | 3.41 % |
| 32 | 8 | 33.39 ns | 4.87 % | 5.18 % | 4.14 % |

The published analysis counts frequencies from 1 to *n* and so writes
`(n + 1) * D_MUXCY`. This design's index 0 is the base cycle itself, hence
`n - 1`. The published overhead figures match neither formula exactly. The
measured peak-emission reductions (5.6 dB for 8 frequencies up to 10.4 dB
for 32) come from a spectrum analyser on hardware and cannot be reproduced
in logic simulation.

Each smaller configuration is the same RTL with `N_CARRY4` set to 2, 4 or 6.
The default build always hops over all 32 frequencies.

## What is taken from the source and what is chosen here

Taken from the published design:

* the ring structure: carry chain, AND gate with enable, odd inverter
  chain, global clock buffer feeding all CARRY4 data inputs;
* the carry chain of eight CARRY4 blocks, each with four MUXCY and four
  XORCY;
* the per-block select patterns listed above;
* the counter/comparator/32×32-bit multiplexer control;
* the period formula, the counter-width formula and the timing constraint;
* the 50 ps multiplexer delay, the 31.84 ns base cycle and 31.4 MHz;
* three inverters, as drawn.

Chosen here:

* **Thermometer codes** for the full 32-bit select.
* **Ascending, wrapping hop order.** The source says only that a new
  frequency is chosen after the threshold.
* **Threshold counting:** a frequency is held for `max(threshold,1)` cycles.
  The frequency index register is placed in the comparator block.
* **Counter clock:** the counter runs on `cout`, the node the drawing
  connects it to.
* **Asynchronous reset.**
* **Switching frequency of 100 kHz.** No value is published.
* **Carry input of the lowest block tied to 0.**
* **XORCY outputs** computed as in the vendor primitive. The delay line does
  not use them.
* **Delays of the AND gate, inverters and BUFG.**

One published statement gives a CARRY4 delay of about 100 ps. The period
formula uses 50 ps per multiplexer. This design follows the formula.

The global clock buffer is a vendor clock-tree primitive with no logic
function of its own. It is not in the RTL: `mfc` brings out `clk` (to the
buffer) and `data_in` (from the buffer). The testbenches close the loop with
`tb/bufg_model.sv`, a 1500 ps delayed buffer. On an FPGA, a BUFG goes there.

## Using the RTL on an FPGA

Synthesis sees only the logic: a 4-to-1 multiplexer stack per block, an AND
gate and an inverter. Mapping the chain to real CARRY4 primitives, keeping
the three inverters as separate lookup tables, inserting the BUFG and
allowing the combinational loop all need vendor primitives or attributes and
constraints. These are deliberately left out of this portable source. Check
the timing constraint above after place and route.

## Files

| file | content |
|---|---|
| `rtl/mfc_pkg.sv` | shared constants (default delays, geometry), counter-width and select-code functions |
| `rtl/mfc.sv` | top: the complete MFC circuit except the clock buffer |
| `rtl/carry4_chain.sv` | variable delay line, `N_CARRY4` blocks in series |
| `rtl/carry4.sv` | one CARRY4: four MUXCY, four XORCY |
| `rtl/enable_gate.sv` | AND gate that starts/stops the ring |
| `rtl/inverter_chain.sv` | odd inverter chain |
| `rtl/switch_counter.sv` | cycle counter |
| `rtl/freq_comparator.sv` | threshold comparator and frequency index register |
| `rtl/sin_mux.sv` | 32×32-bit select-word multiplexer |
| `tb/bufg_model.sv` | delayed-buffer model of the global clock buffer |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_mfc_configs.sv` | the 8-, 16- and 24-frequency configurations side by side |

Top-level ports of `mfc`, with the defaults:

| port | dir | width | meaning |
|---|---|---|---|
| `en` | in | 1 | 1 runs the ring, 0 stops it (clk held at 1) |
| `rst_n` | in | 1 | asynchronous reset of counter and index |
| `sw_threshold` | in | 9 | cycles spent at each frequency |
| `data_in` | in | 1 | clock returning from the global clock buffer |
| `clk` | out | 1 | generated clock, to the global clock buffer |
| `cout` | out | 1 | carry-chain output (the controller's clock) |
| `freq_sel` | out | 5 | current frequency index, 0 = fastest |
| `sin` | out | 32 | current select word |

Parameters: `N_CARRY4` (8), `D_MUXCY_PS` (50), `T_AND_PS` (150), `N_INV`
(3, must be odd), `T_INV_PS` (4740), `F_O_KHZ` (31400), `F_SW_KHZ` (100) and
`CNT_W`, which defaults to the counter-width formula.

## Simulating

All files use `` `timescale 1ps/1ps ``, and the delays are in picoseconds.
Timing must be enabled, because the ring only oscillates through the `#`
delays. For example, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_mfc -y rtl -y tb +libext+.sv \
          rtl/mfc_pkg.sv tb/tb_mfc.sv
./obj_dir/Vtb_mfc
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

* **`tb_mfc`** runs the top at its default parameters:
  * two full sweeps of all 32 frequencies, every period compared with
    `CCT_i`, and the sweep average checked against `BCCT + 31 × 50 ps`;
  * a stop with `en` low, with no edges allowed for 1 µs;
  * a restart with a new threshold, and threshold 0;
  * at every edge on `data_in`, the select word has been stable for at least
    the AND and inverter delays, as the timing constraint requires.
  * It counts switches, wrap-arounds, frequencies measured, stops, restarts
    and threshold changes, and fails if any of them never happened.
* **`tb_mfc_configs`** does the same for 8, 16 and 24 frequencies and prints
  the average cycle and overhead of each.
* **The block testbenches** check:
  * every select pattern and the delay of each path through a CARRY4;
  * the delay of all 32 steps of the chain, plus random selects;
  * the inverter and AND delays and logic;
  * the counter against a reference model, including clear, wrap and
    asynchronous reset;
  * the comparator for thresholds 0, 1, 3, 7 and 300 over full wraps;
  * every multiplexer input.

All of these pass with Verilator 5. The simulations take well under a
second.
