`timescale 1ps/1fs
// skew_pkg: sizes and types shared by the tunable FPGA clock network.
//
// The clock of an FPGA is delivered on a global spine and fanned out to the
// rows on ribs. Every row has PDES_PER_ROW local ribs, and each local rib is
// driven through a programmable delay element (PDE). A PDE is a chain of
// DELAY_BLOCKS delay blocks, each a chain of INV_PER_BLOCK inverters of about
// 150 ps in total, and an output multiplexer that picks one tap of the chain.
// The tap is held in configuration SRAM cells. Eight ring oscillators, one per
// grid of the die, let the chip's local speed be measured after fabrication.
//
// The numbers below (100 rows, 4 PDEs per row, 3 delay blocks, 20 inverters,
// 150 ps per block, 8 grids) are those of the architecture; the encodings and
// the measurement window are choices of this implementation.
package skew_pkg;

  // FPGA array: N_ROWS x N_ROWS logic blocks (100 x 100 4-LUTs).
  parameter int unsigned N_ROWS        = 100;
  // Local ribs, and hence PDEs, per row.
  parameter int unsigned PDES_PER_ROW  = 4;
  // Delay blocks chained inside one PDE.
  parameter int unsigned DELAY_BLOCKS  = 3;
  // Inverters in one delay block.
  parameter int unsigned INV_PER_BLOCK = 20;
  // Nominal delay of one delay block, in femtoseconds (150 ps).
  parameter int unsigned BLOCK_DELAY_FS = 150_000;
  // Nominal delay of one inverter stage, in femtoseconds (7.5 ps).
  parameter int unsigned INV_DELAY_FS  = BLOCK_DELAY_FS / INV_PER_BLOCK;
  // Ring-oscillator grids on the die.
  parameter int unsigned N_GRIDS       = 8;

  // Skew levels a PDE offers: no block (bypass) up to all DELAY_BLOCKS.
  parameter int unsigned N_LEVELS = DELAY_BLOCKS + 1;
  parameter int unsigned SEL_W    = $clog2(N_LEVELS);
  // Number of PDEs on the die and the width of a PDE address.
  parameter int unsigned N_PDES   = N_ROWS * PDES_PER_ROW;
  parameter int unsigned ADDR_W   = $clog2(N_PDES);

  // Tap select of one PDE: 0 = bypass (delay chain gated off),
  // k = clock taken after k delay blocks.
  typedef logic [SEL_W-1:0] tap_sel_t;

endpackage
