# A variation-aware 8 × 16 LUT FPGA

Within a die, in deep-submicron CMOS, some transistors are a few percent slower than others. A fixed ASIC
has to meet its specification on the slowest part of every die. A reconfigurable chip does not:
after manufacture, each die can measure where it is fast and where it is slow, and the placement
of its critical paths can then follow that map. This RTL describes such a chip: a small LUT-based FPGA
(8 rows × 16 columns of logic blocks) whose fabric can be configured into ring oscillators, plus
on-chip counters that measure their frequencies. There is no dedicated sensor. The oscillators are
ordinary LUTs in a loop, and the only addition to the logic block is a divide-by-two stage.

The testbench `tb/fpga_top_tb.sv` runs the complete flow on one simulated die:

1. Measure a ring oscillator made of one CLB (logic block) at every site.
2. Measure one 16-CLB ring in each pair of columns.
3. Place a test circuit of eight buffer chains (11 to 13 CLBs between a launch and a capture
   flip-flop). Use the initial placement, then the best and the worst placement predicted by
   each set of measurements.
4. Find the fastest clock at which each placement still works.

## Architecture

```
            cfg_shift/din/update          meas_start/window/col
                    |                              |
             +----------------+            +---------------+
             |  config_chain  |            |   meas_ctrl   |  clr, gate, capture
             | shift + shadow |            +---------------+------------------+
             +----------------+                                               |
                    | tile_cfg_t per tile, pad enables                         |
   io_in/out/oe  +--------------------------------------------+   clb_o[r][meas_col]
   west pads 0-7 |  clb_array: 8 x 16 tiles (swm + clb)        |--> osc_counter x 8 --> cnt_value[r]
   east pads 8-15|  nearest-neighbour routing, per-site delay  |      (one per row)
                 +--------------------------------------------+
```

| Module | Role |
|---|---|
| `fpga_pkg` | Types (`src_e`, `clb_cfg_t`, `tile_cfg_t`), LUT constants and the within-die delay model `site_delay_ps()` |
| `fpga_top` | The chip: configuration chain, array, pad controls, eight row counters and the window timer |
| `clb_array` | 8 × 16 tiles. Each tile's north, east, south and west inputs are its neighbours' outputs; on the west and east edges they come from the pads. |
| `swm` | Switch matrix of one tile: one 8:1 multiplexer for each LUT input |
| `clb` | 4-input LUT, one flip-flop, output multiplexer and the divide-by-two elements |
| `clb_delay` | **Behavioural model** of the delay of one LUT or one routing hop. It is the stand-in for silicon. |
| `config_chain` | Serial configuration chain with a shadow register |
| `osc_counter` | Counts the edges of one CLB output during the window, clocked by that signal |
| `meas_ctrl` | Window timer: clear, gate, settle and capture |

## The tile: switch matrix and CLB

Each of the four LUT inputs selects one of eight sources (`src_e`):

| Code | Source | Routing hop |
|---|---|---|
| 0 `SRC_LUT` | the CLB's own delayed LUT output | none (local) |
| 1–4 `SRC_N/E/S/W` | a neighbour CLB, or the pad at the west/east edge (0 at the top/bottom edge) | yes |
| 5 `SRC_Q` | the CLB's own flip-flop | none (local) |
| 6, 7 | constant 0, 1 | yes (harmless) |

The CLB's output `o` is either the LUT output (after its delay) or the flip-flop (`ff_out`). In
normal use the flip-flop samples the LUT output on `fab_clk`.

The **divider** (`div_en = 1`) is two multiplexers on the flip-flop. The clock becomes the CLB's own
LUT output instead of `fab_clk`, and D becomes `~q`. So `q` toggles once per LUT-output period.
Configure the LUT as an inverter of its own output (`sel[0] = SRC_LUT`, `lut = 16'h5555`) and the CLB
is the smallest possible ring oscillator. Its period is two LUT delays, and `o = q` carries it
divided by two. This is what a single CLB can measure. The loop is local, so it sees the LUT delay
but no routing hop.

## Ring oscillators and how they start

Any closed loop with an odd number of inverting LUTs oscillates. Its period is twice the sum of the
hop and LUT delays around the loop. The testbench builds two kinds:

* **one-CLB rings**, as above, on all 128 sites at once;
* **two-column rings**: down column 2p and up column 2p+1, 16 CLBs. CLB (0, 2p) is the
  inverter and the other 15 are buffers. Each ring passes through exactly the sites (and hops)
  that a test path in the same column pair uses.

A ring longer than one stage can carry 1, 3, 5, … edges. If a configuration appears at random
moments, or on nodes that hold random values, several edges can circulate. The counter then reads a
harmonic, not the fundamental. Two features of the design prevent this:

* `config_chain` keeps the fabric's configuration in a shadow register. Shifting never
  disturbs the fabric; a one-cycle `cfg_update` applies the whole new image at once.
* A ring is therefore **armed**, then **released**. The first image holds the inverter LUT
  at constant 0 (`lut = 16'h0000`), so every node of the ring settles to 0. The second image
  makes it an inverter, and exactly one edge starts round the ring.

## Measuring a frequency

`meas_ctrl` runs one measurement when `meas_start` is seen while idle:

| Phase | Length |
|---|---|
| `clr` (clears the counters) | 2 cycles |
| `gate` | `meas_window` cycles |
| settle | `SETTLE` = 8 cycles |
| `capture` | 1 cycle |

After that `meas_done` goes high and stays high until the next start. From the clock edge that
samples `meas_start` to `meas_done` is 2 + window + 8 + 1 cycles of `clk`.

The column `meas_col` is latched at start. Each of the 8 row counters then watches CLB
(r, meas_col), so one measurement reads one whole column. A start while busy is ignored.

`osc_counter` is clocked by the measured signal itself, so a GHz ring is no problem for it. The
gate is synchronised into that clock domain by two flip-flops. This is why a count is exact only to
within ±2 edges, and why the measured signal must give a few edges during the settle phase. The
count saturates at 2^20 − 1.

Frequency is `count / (window × T_clk)`. For a one-CLB ring with its divider on, the LUT delay is
`window × T_clk / (4 × count)`.

## Configuration format

The configuration holds 3856 bits, shifted in with `cfg_shift` and bit 0 first. The previous image
comes out on `cfg_dout` while the new one goes in, so it can be read back.

* Tile (r, c) is the 30-bit `tile_cfg_t` at bit `(r*16 + c)*30`. Its fields, MSB first:
  * `sel[3..0]`: 3 bits each;
  * `lut[15:0]`: bit i is the output for LUT inputs = i, with input 0 the LSB;
  * `ff_out`;
  * `div_en`.
* Bits 3840–3855 are the pad output enables, pad 0 first.

Pad r (0–7) sits west of CLB (r, 0) and pad 8 + r east of CLB (r, 15). `io_out` always shows the
edge CLB's output. An enabled (output) pad feeds 0 into the fabric, and a disabled one feeds `io_in`.

`rst_n` clears the configuration, which stops every oscillator, as well as the measurement logic.
`fab_rst_n` clears the CLB flip-flops.

## The delay model (what stands in for silicon)

`clb_delay` is a continuous assignment with an inertial delay. It is the only behavioural part, and
synthesis reduces it to a wire. Every tile has one LUT delay and one routing-hop delay:

```
delay = nominal − s + (hash(seed, row, column, kind) mod (2s + 1)),   s = nominal × VAR_SPREAD_PM / 1000
```

The defaults are 250 ps nominal for a LUT, 100 ps for a hop and a spread of ±4 % (`VAR_SPREAD_PM` = 40).
`VAR_SEED` selects one die. These numbers are this design's own choices: ±4 % matches the size of
within-die variation the architecture targets, and the nominal values are plausible for 90 nm.
Anything measured in simulation is only as real as this model. The RTL's logic does not depend on
it: on silicon, the same configuration bits build the same rings.

Lint reports circular combinational logic through `clb_array`. Programmable routing can close loops,
and ring oscillators need them.

## The test circuit and variation-aware placement

Each of eight paths gets one column pair and runs along the same snake as the two-column ring:

* The **head** CLB is a toggle flip-flop (`SRC_Q` into an inverter LUT, registered).
* The path then has L = 11, 12 or 13 **buffer** CLBs.
* The **tail** CLB registers the arriving signal at position 14 of the snake, CLB (1, 2p+1).

The first `fab_clk` pulse launches an edge from every head, and the second pulse, T later, captures
at every tail. The circuit works at interval T when every path's delay is below T.

The testbench estimates each path's delay on each pair in two ways:

* **(a)** from the one-CLB rings (the sum of the LUT delays on the path);
* **(b)** from the pair's 16-CLB ring period, scaled to the path length.

It then searches all 8! assignments for the best placement (smallest worst path) and the worst.
On the default die (seed 1) it finds:

| Placement | Shortest working interval |
|---|---|
| initial (path i on pair i) | 4950 ps |
| best by (a) | 4886 ps |
| best by (b) | 4881 ps |
| worst by (a) and by (b) | 4950 ps |

That is a 1.3 % gain with (a) and 1.4 % with (b) on this die. Only this one die is simulated
end to end. To see how the gain and the yield spread over many dies, run the same testbench with
other `VAR_SEED` defaults; each run takes a few minutes. Several dies in one simulation are much
slower, because every ring edge re-evaluates the routing of every die. Estimate (b) includes the routing hops
that the one-CLB rings cannot see, which is why it predicts paths better. The gain depends on the die
and on the path lengths chosen; with ±4 % random per-site variation, averaging over 13 to 15 sites
shrinks the spread between column pairs.

## Where this design follows its source and where it fills in

These parts follow the architecture it implements:

* the 8 × 16 array of CLBs with switch matrices, and 16 pads;
* ring oscillators built only from ordinary CLBs, from one CLB up to the whole chip;
* a divide-by-two made by small additions to the CLB's flip-flop;
* embedded counters that count oscillations over a fixed time;
* the two measurement methods, one-CLB rings and 16-CLB two-column rings;
* the eight-path test circuit with 11 to 13 buffers between two flip-flops, clocked by two pulses.

These are this design's own choices:

* 4-input LUTs;
* the nearest-neighbour switch matrix with a local feedback bypass;
* the pad placement;
* the serial configuration chain and its shadow register;
* one counter per row watching a selectable column;
* the counter's structure and the window handshake;
* the two clocks;
* every delay value.

The placement search belongs to the off-chip software, so it lives only in the testbench.

## Simulating

Every file sets `timescale 1ps/1ps`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/fpga_pkg.sv tb/fpga_top_tb.sv --top fpga_top_tb
./obj_dir/Vfpga_top_tb
```

Replace `fpga_top_tb` with any other testbench in `tb/`: `clb_delay_tb`, `swm_tb`, `clb_tb`,
`clb_array_tb`, `config_chain_tb`, `osc_counter_tb` or `meas_ctrl_tb`.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. The full flow runs at the
default size and takes a few minutes, most of it simulating 128 GHz rings at once.

* To model a different die, change `VAR_SEED`.
* To model a different process spread, change `VAR_SPREAD_PM`, `LUT_NOM_PS` and `RT_NOM_PS`.
* To model a different array, change `ROWS` and `COLS`. The configuration length follows
  automatically: `ROWS·COLS·30 + 2·ROWS` bits.
