`timescale 1ps/1fs
// pde: programmable delay element placed at the root of one local clock rib.
//
// The clock passes through a chain of N_BLOCKS delay blocks (3 by default,
// each a 20-inverter chain of about 150 ps) and an output multiplexer picks
// the undelayed clock or the output of any block, so the rib receives a skew
// of sel * 150 ps: 0, 150, 300 or 450 ps with the default sizes. The chain of
// blocks, the multiplexer and its configuration-cell control follow the
// architecture; the four-tap arrangement (the input counts as a tap) and the
// gating of the chain in bypass (sel = 0) are choices of this implementation.
//
// The delay blocks are behavioural models (see delay_block), so this module
// simulates real skews but synthesises to the multiplexer and gate only.
//
// Ports: clk_in  rib clock from the spine
//        sel     tap select from the configuration cells (static)
//        clk_out rib clock delayed by sel delay blocks
module pde #(
  parameter int unsigned N_BLOCKS     = skew_pkg::DELAY_BLOCKS,
  parameter int unsigned N_INV        = skew_pkg::INV_PER_BLOCK,
  parameter int unsigned INV_DELAY_FS = skew_pkg::INV_DELAY_FS,
  localparam int unsigned SW          = $clog2(N_BLOCKS + 1)
) (
  input  logic          clk_in,
  input  logic [SW-1:0] sel,
  output logic          clk_out
);

  // tap[0] is the gated chain input, tap[k] the output of block k.
  logic [N_BLOCKS:0] tap;

  pde_tap_mux #(.N_BLOCKS(N_BLOCKS)) u_mux (
    .clk_in   (clk_in),
    .sel      (sel),
    .tap      (tap[N_BLOCKS:1]),
    .chain_in (tap[0]),
    .clk_out  (clk_out)
  );

  for (genvar k = 0; k < N_BLOCKS; k++) begin : g_blk
    delay_block #(.N_INV(N_INV), .INV_DELAY_FS(INV_DELAY_FS)) u_blk (
      .clk_in  (tap[k]),
      .clk_out (tap[k+1])
    );
  end

endmodule
