`timescale 1ps/1fs
// delay_block: behavioural model of one delay block of a programmable delay
// element. This is an analog cell (a chain of sized inverters), not
// synthesizable logic; the model exists so that clock skews can be simulated.
//
// The block is a chain of N_INV inverters (20), each modelled as a
// continuous assignment with a delay of INV_DELAY_FS femtoseconds, giving
// N_INV * INV_DELAY_FS = 150 ps from clk_in to clk_out for the default values.
// N_INV must be even so that the block does not invert the clock. A slower or
// faster die is modelled by overriding INV_DELAY_FS. The 20-inverter,
// 150 ps block is the architecture's; giving every inverter the same delay
// is this model's simplification.
//
// Ports: clk_in  clock entering the block
//        clk_out the same clock, delayed by N_INV * INV_DELAY_FS
module delay_block #(
  parameter int unsigned N_INV        = skew_pkg::INV_PER_BLOCK,
  parameter int unsigned INV_DELAY_FS = skew_pkg::INV_DELAY_FS
) (
  input  logic clk_in,
  output logic clk_out
);

  logic [N_INV:0] stage;

  assign stage[0] = clk_in;

  for (genvar i = 0; i < N_INV; i++) begin : g_inv
    assign #(INV_DELAY_FS * 1fs) stage[i+1] = ~stage[i];
  end

  assign clk_out = stage[N_INV];

endmodule
