`timescale 1ps/1fs
// tunable_clock_top: FPGA clock network with programmable skew per local rib
// and on-die ring oscillators for chip-specific skew assignment.
//
// Process variation makes some fabricated chips miss their clock period by a
// few percent. Delaying the clock of the flip-flops that capture a late path
// (useful skew) recovers many of them. This block is the hardware that makes
// that possible:
//   * tunable_clock_network: the spine-and-ribs clock tree with one
//     programmable delay element (PDE) on each of the PDES_PER_ROW local ribs
//     of each of the N_ROWS rows; a PDE adds 0..N_BLOCKS delay blocks of
//     150 ps to its rib's clock.
//   * skew_config_mem: the configuration cells holding every PDE's tap,
//     written by the configuration port with the skews chosen by the
//     skew-assignment software (generic: once per design; chip-specific: per
//     failing chip).
//   * ro_delay_monitor: one ring oscillator per grid (N_GRIDS) with frequency
//     counters; the counts let the software predict the delays of a
//     particular chip before it assigns chip-specific skews.
// The logic fabric that the rib clocks drive is not part of this block: each
// rib clock is a port.
//
// Interface: configuration and measurement share cfg_clk and the synchronous
// reset cfg_rst_n (this implementation's choice). A write (cfg_we) stores
// cfg_wdata as the tap of PDE cfg_addr = row*PDES_PER_ROW + rib at the next
// rising cfg_clk; cfg_rdata reads the tap at cfg_addr back. meas_start starts
// one measurement of all grids; meas_done pulses when ro_count is valid,
// 2*SETTLE_CYCLES + WINDOW_CYCLES cycles later. rib_clk[i] follows clk_spine
// by tap(i) * N_INV * INV_DELAY_FS.
module tunable_clock_top #(
  parameter int unsigned N_ROWS        = skew_pkg::N_ROWS,
  parameter int unsigned PDES_PER_ROW  = skew_pkg::PDES_PER_ROW,
  parameter int unsigned N_BLOCKS      = skew_pkg::DELAY_BLOCKS,
  parameter int unsigned N_INV         = skew_pkg::INV_PER_BLOCK,
  parameter int unsigned INV_DELAY_FS  = skew_pkg::INV_DELAY_FS,
  parameter int unsigned N_GRIDS       = skew_pkg::N_GRIDS,
  parameter int unsigned RO_N_INV      = 20,
  parameter int unsigned WINDOW_CYCLES = 1024,
  parameter int unsigned COUNT_W       = 20,
  parameter int unsigned SETTLE_CYCLES = 4,
  localparam int unsigned SW           = $clog2(N_BLOCKS + 1),
  localparam int unsigned N_RIBS       = N_ROWS * PDES_PER_ROW,
  localparam int unsigned AW           = (N_RIBS > 1) ? $clog2(N_RIBS) : 1
) (
  // clock tree
  input  logic                            clk_spine,
  output logic [N_RIBS-1:0]               rib_clk,
  // configuration
  input  logic                            cfg_clk,
  input  logic                            cfg_rst_n,
  input  logic                            cfg_we,
  input  logic [AW-1:0]                   cfg_addr,
  input  logic [SW-1:0]                   cfg_wdata,
  output logic [SW-1:0]                   cfg_rdata,
  // ring-oscillator measurement
  input  logic                            meas_start,
  output logic                            meas_busy,
  output logic                            meas_done,
  output logic [N_GRIDS-1:0][COUNT_W-1:0] ro_count
);

  logic [N_RIBS-1:0][SW-1:0] pde_sel;

  skew_config_mem #(
    .N_PDES (N_RIBS),
    .SEL_W  (SW)
  ) u_cfg (
    .clk   (cfg_clk),
    .rst_n (cfg_rst_n),
    .we    (cfg_we),
    .addr  (cfg_addr),
    .wdata (cfg_wdata),
    .rdata (cfg_rdata),
    .sel   (pde_sel)
  );

  tunable_clock_network #(
    .N_ROWS       (N_ROWS),
    .PDES_PER_ROW (PDES_PER_ROW),
    .N_BLOCKS     (N_BLOCKS),
    .N_INV        (N_INV),
    .INV_DELAY_FS (INV_DELAY_FS)
  ) u_net (
    .clk_spine (clk_spine),
    .sel       (pde_sel),
    .rib_clk   (rib_clk)
  );

  ro_delay_monitor #(
    .N_GRIDS        (N_GRIDS),
    .WINDOW_CYCLES  (WINDOW_CYCLES),
    .COUNT_W        (COUNT_W),
    .SETTLE_CYCLES  (SETTLE_CYCLES),
    .RO_N_INV       (RO_N_INV),
    .STAGE_DELAY_FS ({N_GRIDS{32'(INV_DELAY_FS)}})
  ) u_mon (
    .clk   (cfg_clk),
    .rst_n (cfg_rst_n),
    .start (meas_start),
    .busy  (meas_busy),
    .done  (meas_done),
    .count (ro_count)
  );

endmodule
