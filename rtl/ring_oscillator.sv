`timescale 1ps/1fs
// ring_oscillator: behavioural model of the ring oscillator placed in each
// grid of the die to sense its local speed. It is an analog cell, not
// synthesizable logic; the model gives it a real oscillation period.
//
// The ring is one enable NAND followed by N_INV inverters (N_INV even, so the
// loop has an odd number of inversions). Every stage has the delay
// STAGE_DELAY_FS, so the period is 2 * (N_INV + 1) * STAGE_DELAY_FS:
// 315 ps (3.17 GHz) for the defaults. A slow grid is modelled by a larger
// STAGE_DELAY_FS. The ring length and the enable NAND are choices of this
// implementation; the architecture only asks for one oscillator per grid.
// With en low the NAND output is forced high and the ring stops with osc
// high; within (N_INV + 1) stage delays of en rising it starts to oscillate.
//
// The loop through the NAND is a combinational loop on purpose: it is what
// makes the circuit oscillate.
module ring_oscillator #(
  parameter int unsigned N_INV          = 20,
  parameter int unsigned STAGE_DELAY_FS = skew_pkg::INV_DELAY_FS
) (
  input  logic en,
  output logic osc
);

  logic [N_INV:0] stage;

  assign #(STAGE_DELAY_FS * 1fs) stage[0] = ~(en & stage[N_INV]);

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(STAGE_DELAY_FS * 1fs) stage[i+1] = ~stage[i];
  end

  assign osc = stage[N_INV];

endmodule
