`timescale 1ps/1fs
// tunable_clock_network: spine-and-ribs clock distribution with a
// programmable delay element (PDE) on every local rib.
//
// The clock arrives on the global spine and is handed to each of N_ROWS rows.
// Inside a row it is split onto PDES_PER_ROW local ribs (4 by default); each
// rib is driven through its own PDE, so every row offers four independently
// programmable skews and all flip-flops on one rib share the same skew. This
// placement of the PDEs (on the local ribs, 4 per row, one clock domain)
// follows the architecture. Spine and rib wires are modelled without delay,
// and rib k is taken to serve the k-th quarter of the row's columns; both are
// choices of this implementation.
//
// Ports: clk_spine  clock on the global spine
//        sel        tap select of every PDE, index row*PDES_PER_ROW + rib
//        rib_clk    clock of every local rib, same index
// rib_clk[i] follows clk_spine by sel[i] delay blocks (sel[i] * 150 ps).
module tunable_clock_network #(
  parameter int unsigned N_ROWS       = skew_pkg::N_ROWS,
  parameter int unsigned PDES_PER_ROW = skew_pkg::PDES_PER_ROW,
  parameter int unsigned N_BLOCKS     = skew_pkg::DELAY_BLOCKS,
  parameter int unsigned N_INV        = skew_pkg::INV_PER_BLOCK,
  parameter int unsigned INV_DELAY_FS = skew_pkg::INV_DELAY_FS,
  localparam int unsigned SW          = $clog2(N_BLOCKS + 1),
  localparam int unsigned N_RIBS      = N_ROWS * PDES_PER_ROW
) (
  input  logic                      clk_spine,
  input  logic [N_RIBS-1:0][SW-1:0] sel,
  output logic [N_RIBS-1:0]         rib_clk
);

  for (genvar row = 0; row < N_ROWS; row++) begin : g_row
    // Clock delivered by the spine to this row.
    logic row_clk;
    assign row_clk = clk_spine;

    for (genvar rib = 0; rib < PDES_PER_ROW; rib++) begin : g_rib
      localparam int unsigned IDX = row * PDES_PER_ROW + rib;
      pde #(
        .N_BLOCKS     (N_BLOCKS),
        .N_INV        (N_INV),
        .INV_DELAY_FS (INV_DELAY_FS)
      ) u_pde (
        .clk_in  (row_clk),
        .sel     (sel[IDX]),
        .clk_out (rib_clk[IDX])
      );
    end
  end

endmodule
