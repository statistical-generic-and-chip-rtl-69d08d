# Programmable-skew clock network for FPGAs

Process variation makes a fraction of fabricated FPGAs miss their timing
specification. Most of these chips miss it by only a few percent of the
clock period. One way to recover them is *useful skew*: if the flip-flop at
the end of a late path gets its clock edge a little later, the path gets
that much more time. The catch is that the skew must be set after the design
is placed, or even after the individual chip is measured. A normal FPGA
clock tree is fixed, so it cannot do this.

This RTL adds that ability with little change to a standard FPGA clock
tree:

* A **programmable delay element (PDE)** sits at the root of every local
  clock rib: 4 per row, 400 on a 100 x 100 array. Each PDE can add 0, 150,
  300 or 450 ps to its rib's clock. All flip-flops on one rib share that
  skew.
* **Configuration cells** hold each PDE's setting. Software picks the
  settings by solving a small integer linear program over the design's
  timing constraints, then loads them like any other configuration bits.
* **Eight ring oscillators**, one per grid of the die, have frequency
  counters. For chip-specific skew assignment the software reads the counts,
  estimates how slow or fast each region of this chip is, and re-solves the
  skews with those estimates.

The skew-assignment program and the delay-estimation step run in software.
They are not part of this RTL.

## Clock distribution

```
                      global spine
                           |
   row r  ---+-------------+-------------+-------------+
             |             |             |             |
           PDE r,0       PDE r,1       PDE r,2       PDE r,3
             |             |             |             |
          rib r,0       rib r,1       rib r,2       rib r,3     (local ribs)
         cols 0-24     cols 25-49    cols 50-74    cols 75-99
```

`tunable_clock_network` builds this tree for `N_ROWS` rows and
`PDES_PER_ROW` ribs per row. Its output `rib_clk[i]`, with
`i = row*PDES_PER_ROW + rib`, is the clock of one local rib. It follows
`clk_spine` by `sel[i]` delay blocks. Spine and rib wires have no modelled
delay. The split of a row's columns into four equal quarters is an
assumption. There is one clock domain.

Because a row has only four skews, the software treats the flip-flops on one
rib as a single *cluster* (at most 4n clusters on an n x n array). It writes
timing constraints only between clusters. Paths whose launch and capture
flip-flops share a rib cannot be helped. Paths that fail timing usually span
a long distance, so in practice this limit rarely matters.

## The programmable delay element

```
clk_in --+--[gate]--> block 1 --+--> block 2 --+--> block 3 --+
         |    ^                 |              |              |
         |  sel!=0              |              |              |
         +-----------tap0       tap1           tap2           tap3
                         \        |              |            /
                          '------ 4:1 multiplexer (sel) -----'--> clk_out
```

* A **delay block** (`delay_block`) is a chain of 20 inverters of about
  150 ps in total. It is modelled as 20 continuous assignments of 7.5 ps
  each, so pulses and edges travel through it as they would through the
  real chain.
* The **output multiplexer** (`pde_tap_mux`) selects tap `sel`. Tap 0 is the
  undelayed input, so `sel = 0` bypasses the PDE.
* In bypass the **gate** holds the chain input low. The delay blocks then do
  not toggle and use no clock power. Chips that need no skew can run this
  way.
* `sel` is static configuration. Changing it while the clock runs can put a
  glitch on the rib clock, as changing any routing bit would.

Only the multiplexer and the gate synthesise. The delay blocks are analog
cells, and their models exist so that skew can be simulated.

| setting | skew on the rib | delay blocks switching |
|---------|-----------------|------------------------|
| 0       | 0 ps (bypass)   | none (gated)           |
| 1       | 150 ps          | all three              |
| 2       | 300 ps          | all three              |
| 3       | 450 ps          | all three              |

### Why three blocks

Adding delay blocks recovers more failing chips, but the gain flattens
beyond three blocks while area and power keep growing. The top of the range
is 450 ps. That is 1.7 % of the slowest benchmark clock period considered
(26.4 ns) and 9 % of the fastest (4.9 ns). About 88 % of failing chips miss
the specification by no more than 5 %.
`tb_benchmark_skew_recovery` shows what this means at the benchmark periods.
A path that is 0.5 % or 1 % late is always recovered. At 2 % late, only
clma fails: it is 529 ps late, more than the 450 ps range. At 5 % late, only
the three circuits with periods under 9 ns are recovered.

### What a setting must satisfy

For a path from flip-flop *i* (rib skew s_i) to flip-flop *j* (rib skew
s_j), with delay between d_min and d_max:

* long path: `s_i + d_max <= s_j + T_clock - T_setup`
* short path: `s_i + d_min >= s_j + T_hold`

Delaying the capture rib helps the first rule and hurts the second. The
software guards both with a margin: a multiple of each delay's standard
deviation, plus a criticality-weighted margin R that it maximises. It also
limits each s to the four available levels. The end-to-end testbench shows
this on a real path through the network. The path has `T_clock` = 2000 ps,
d_max = 2100 ps, d_min = 400 ps, setup 50 ps and hold 30 ps:

| capture setting | result                                   |
|-----------------|------------------------------------------|
| 0               | setup fails on every cycle               |
| 1, 2            | every capture correct                    |
| 3               | hold fails (450 ps > 400 - 30 ps)        |

## Configuration cells

`skew_config_mem` stores one `SEL_W`-bit setting per PDE and drives all of
them in parallel. The write port is a choice of this implementation; the
architecture only calls the cells SRAM configuration bits. It works as
follows:

* `we`, `addr` and `wdata` write one PDE per rising clock edge, at address
  `row*PDES_PER_ROW + rib`.
* `rdata` reads the setting at `addr` back, combinationally.
* A synchronous reset puts every PDE in bypass.
* An assertion flags writes to addresses beyond the last PDE. The RTL ignores
  such writes.

## Ring-oscillator measurement

`ring_oscillator` is an enable NAND followed by 20 inverters of 7.5 ps each.
Its period is 2 x 21 x 7.5 ps = 315 ps (3.17 GHz) on a nominal die. The
length is an assumption. A slow region lengthens the period. Once the
software has the count it works out

    p = (T_measured - T_expected) / sigma_expected

for each grid. It uses p to adjust the delays of every element in that grid.

`ro_freq_counter` measures one oscillator. This is the part that takes the
most care, because it crosses between two unrelated clocks:

1. **CLEAR** (`SETTLE_CYCLES` reference cycles). The oscillator is enabled.
   A clear level, passed through a two-flop synchroniser *clocked by the
   oscillator*, resets the edge counter. The counter lives in the
   oscillator's clock domain.
2. **GATE** (`WINDOW_CYCLES` cycles). A gate level, passed through its own
   synchroniser, lets the counter count rising oscillator edges.
3. **HOLD** (`SETTLE_CYCLES` cycles). The gate closes. After the
   synchroniser latency the counter stops. The counter is now static, so the
   reference domain copies it into `count` without a handshake. `done`
   pulses and the oscillator is switched off.

The gate opens and closes through the same synchroniser latency. The result
is therefore `WINDOW_CYCLES * T_ref / T_ro` within one or two counts. With
the defaults (1024 cycles of a 100 MHz reference) that is about 32,500
counts, so 1 count is 0.003 %. The scheme requires the oscillator to be
faster than the reference clock. It also requires `SETTLE_CYCLES` reference
cycles to cover a few oscillator periods. The counter saturates rather than
wrapping. `busy` is high for `2*SETTLE_CYCLES + WINDOW_CYCLES` cycles. Then
`done` pulses for one cycle. A `start` while busy is ignored.

`ro_delay_monitor` puts one oscillator and one counter in each of the
`N_GRIDS` grids, and one `start` measures all of them at once. Its
`STAGE_DELAY_FS` parameter gives each grid's oscillator its own stage delay
in simulation, to model a die whose regions differ. It has no effect on
synthesis.

## Top level

`tunable_clock_top` joins the three parts:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_spine` | in | 1 | clock entering the global spine |
| `rib_clk` | out | N_ROWS*PDES_PER_ROW | clock of each local rib, index row*PDES_PER_ROW+rib |
| `cfg_clk` | in | 1 | clock for configuration and measurement |
| `cfg_rst_n` | in | 1 | synchronous active-low reset; all PDEs to bypass |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, clog2(N_RIBS), SEL_W | write one PDE setting |
| `cfg_rdata` | out | SEL_W | setting stored at `cfg_addr` |
| `meas_start` | in | 1 | measure all grids |
| `meas_busy`, `meas_done` | out | 1, 1 | measurement in progress / counts valid (one-cycle pulse) |
| `ro_count` | out | N_GRIDS x COUNT_W | edges counted per grid |

The logic fabric that the rib clocks drive is not part of this RTL. Every
rib clock is a port.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_ROWS` | 100 | rows of the logic array (100 x 100 4-LUTs) |
| `PDES_PER_ROW` | 4 | local ribs, and PDEs, per row |
| `N_BLOCKS` | 3 | delay blocks per PDE (setting width `SEL_W` = 2) |
| `N_INV` | 20 | inverters per delay block |
| `INV_DELAY_FS` | 7500 | inverter delay in fs (150 ps per block) |
| `N_GRIDS` | 8 | ring-oscillator grids |
| `RO_N_INV` | 20 | inverters in each oscillator besides the enable NAND (assumed) |
| `WINDOW_CYCLES` | 1024 | measurement window in reference cycles (assumed) |
| `COUNT_W` | 20 | counter width (assumed) |
| `SETTLE_CYCLES` | 4 | clear and hold phases (assumed) |

The numbers from the architecture are the array size, the PDE count, the
block count, the inverters per block, the delay per block and the grid
count. Everything marked assumed is this implementation's choice. So are
the four-tap multiplexer, the bypass gate, the configuration port and the
measurement circuit.

## Overheads

The published estimates for this scheme, not measured on this RTL, are:

* about 150 transistors per PDE;
* about 3.5 % area on a 100 x 100 array;
* about 5.6 % more clock-network power.

The bypass gate addresses the last figure: an unused PDE draws no switching
power in its delay chain.

## Simulating

Every file starts with `` `timescale 1ps/1fs ``. `rtl/skew_pkg.sv` must be
read first. Delays need Verilator's timing support. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/skew_pkg.sv tb/tb_tunable_clock_top.sv --top-module tb_tunable_clock_top
./obj_dir/Vtb_tunable_clock_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A
watchdog ends it with a failure if it hangs. All stimulus is generated in
the testbench, with no data files.

| testbench | what it checks |
|-----------|----------------|
| `tb_delay_block` | 150 ps (and 80 ps for a 10 x 8 ps block) on both edges; no inversion; a short pulse passes intact |
| `tb_pde_tap_mux` | all selects and inputs, 3- and 2-block versions, bypass gate |
| `tb_pde` | every setting gives sel x 150 ps; the chain is still in bypass and active otherwise |
| `tb_skew_config_mem` | reset to bypass; 2000 random writes against a reference array; write timing; read-back |
| `tb_tunable_clock_network` | 6 rows: every rib's skew under 8 rounds of random settings |
| `tb_ring_oscillator` | 315 ps and 198 ps periods; 50 % duty; stops when disabled |
| `tb_ro_freq_counter` | count within 2 of the expected value for five periods; busy length; single `done`; ignored restart; saturation; oscillator off when idle |
| `tb_ro_delay_monitor` | 8 grids with stage delays from 7.0 to 8.4 ps: each count and their order, twice |
| `tb_benchmark_skew_recovery` | the network at the specified clock periods of ten benchmark circuits (4.9 to 26.4 ns); paths 0.5, 1, 2 and 5 % late; the smallest recovering setting must be ceil(lateness / 150 ps), 32 of 40 cases recover |
| `tb_tunable_clock_top` | end to end: reset, programming and read-back of every PDE, every rib's skew, gated and active chains, the setup-fail / fixed / hold-fail path, a full measurement; it counts each mechanism and fails if any never happened |

### Sizes simulated

`tb_tunable_clock_top` runs at 8 rows (32 PDEs) with a 256-cycle window.
All other parameters are at their defaults. The 100-row default has 24,000
individually delayed inverter stages. Verilator turns them into a C++ model
that takes hours to compile, so the full size has not been simulated. The
network is a regular array of identical rows, and the row count changes
only the generate loop and the address width. Lint and elaboration run at
the full size.

## How far to trust it

* The skews are exact multiples of the nominal block delay. Process
  variation inside the PDEs, which the skew-assignment margin R exists to
  absorb, is not modelled. A variation study would override `INV_DELAY_FS`
  per instance.
* The bypass gate, the configuration port, the oscillator structure and the
  measurement circuit are design choices that are not taken from the
  architecture. They are the simplest circuits that do the job.
* The setup and hold checks in the end-to-end test use the testbench's own
  flip-flop model. No FPGA fabric is included.
