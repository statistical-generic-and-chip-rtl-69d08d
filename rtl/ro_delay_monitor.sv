`timescale 1ps/1fs
// ro_delay_monitor: the per-grid ring oscillators used for chip-specific
// delay prediction, with one frequency counter each.
//
// The die is divided into N_GRIDS grids (8) and each holds a ring oscillator.
// After fabrication their frequencies are measured; a slow grid shows a lower
// count. The skew-assignment software compares each count with the value its
// statistical timing model expects and derives a delay correction for all
// circuit elements in that grid. One start measures every grid at once (a
// choice of this implementation); done pulses when all counts are valid.
//
// STAGE_DELAY_FS gives the stage delay of each grid's behavioural oscillator,
// entry g for grid g; it exists so that a simulation can model a die whose
// grids differ in speed, and has no effect on synthesis.
//
// Timing: as ro_freq_counter; busy lasts 2*SETTLE_CYCLES + WINDOW_CYCLES
// cycles, then done pulses for one cycle, and count[g] is about
// WINDOW_CYCLES * T_clk / T_ro(g).
module ro_delay_monitor #(
  parameter int unsigned N_GRIDS       = skew_pkg::N_GRIDS,
  parameter int unsigned WINDOW_CYCLES = 1024,
  parameter int unsigned COUNT_W       = 20,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned RO_N_INV      = 20,
  parameter logic [N_GRIDS-1:0][31:0] STAGE_DELAY_FS =
      {N_GRIDS{32'(skew_pkg::INV_DELAY_FS)}}
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  output logic [N_GRIDS-1:0][COUNT_W-1:0]   count
);

  logic [N_GRIDS-1:0] ro_en, ro_clk, g_busy, g_done;

  for (genvar g = 0; g < N_GRIDS; g++) begin : g_grid
    ring_oscillator #(
      .N_INV          (RO_N_INV),
      .STAGE_DELAY_FS (STAGE_DELAY_FS[g])
    ) u_ro (
      .en  (ro_en[g]),
      .osc (ro_clk[g])
    );

    ro_freq_counter #(
      .WINDOW_CYCLES (WINDOW_CYCLES),
      .COUNT_W       (COUNT_W),
      .SETTLE_CYCLES (SETTLE_CYCLES)
    ) u_cnt (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (start),
      .ro_clk (ro_clk[g]),
      .ro_en  (ro_en[g]),
      .busy   (g_busy[g]),
      .done   (g_done[g]),
      .count  (count[g])
    );
  end

  // All counters run in lock step, so any one of them stands for all.
  assign busy = |g_busy;
  assign done = &g_done;

endmodule
