`timescale 1ps/1fs
// pde_tap_mux: output multiplexer and input gate of a programmable delay
// element (PDE).
//
// A PDE delays the clock of one local rib by a programmable number of delay
// blocks. This module is its logic part: it picks one of N_BLOCKS+1 taps of
// the delay chain, tap 0 being the undelayed clock and tap k the output of the
// k-th delay block, as chosen by the configuration bits in `sel`. Picking a tap
// with a multiplexer driven by configuration SRAM follows the architecture.
// The gate is this implementation's way of realising a bypassed PDE without
// clock power: with sel = 0 the chain input `chain_in` is held low so the
// delay blocks do not toggle; for any other tap the clock enters the chain.
// A select above N_BLOCKS (only possible when N_BLOCKS+1 is not a power of
// two) picks the last tap.
//
// Purely combinational; `sel` is static configuration and is not meant to
// change while the clock runs.
module pde_tap_mux #(
  parameter int unsigned N_BLOCKS = skew_pkg::DELAY_BLOCKS,
  localparam int unsigned SW      = $clog2(N_BLOCKS + 1)
) (
  input  logic              clk_in,    // undelayed clock, tap 0
  input  logic [SW-1:0]     sel,       // tap select
  input  logic [N_BLOCKS:1] tap,       // outputs of delay blocks 1..N_BLOCKS
  output logic              chain_in,  // clock into the first delay block
  output logic              clk_out    // selected tap
);

  assign chain_in = clk_in & (sel != '0);

  always_comb begin
    clk_out = clk_in;
    if (int'(sel) >= int'(N_BLOCKS)) begin
      clk_out = tap[N_BLOCKS];
    end else begin
      for (int unsigned k = 1; k < N_BLOCKS; k++) begin
        if (int'(sel) == int'(k)) clk_out = tap[k];
      end
    end
  end

endmodule
