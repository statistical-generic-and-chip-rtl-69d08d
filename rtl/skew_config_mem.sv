`timescale 1ps/1fs
// skew_config_mem: configuration cells that hold the tap select of every
// programmable delay element (PDE) on the die.
//
// Each PDE's multiplexer is controlled by SRAM configuration cells; here they
// are one SEL_W-bit register per PDE, all of them driving the PDEs at once
// through `sel`. The skew-assignment software produces one skew level per
// flip-flop cluster (one cluster per local rib) and loads it here. How the
// cells are written is this implementation's choice: one PDE per clock through
// an address/data port (address = row * PDES_PER_ROW + rib), with a
// combinational read-back port at the same address. Reset sets every PDE to
// tap 0, i.e. bypassed.
//
// Timing: a write at a rising clk edge with we = 1 shows on sel and rdata
// right after that edge.
module skew_config_mem #(
  parameter int unsigned N_PDES = skew_pkg::N_PDES,
  parameter int unsigned SEL_W  = skew_pkg::SEL_W,
  localparam int unsigned AW    = (N_PDES > 1) ? $clog2(N_PDES) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,   // synchronous, active low
  input  logic                         we,
  input  logic [AW-1:0]                addr,
  input  logic [SEL_W-1:0]             wdata,
  output logic [SEL_W-1:0]             rdata,
  output logic [N_PDES-1:0][SEL_W-1:0] sel
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel <= '0;
    end else if (we && int'(addr) < int'(N_PDES)) begin
      sel[addr] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(addr) < int'(N_PDES)) rdata = sel[addr];
  end

  // A write must address an existing PDE.
  a_addr_in_range : assert property (@(posedge clk) disable iff (!rst_n)
                                     we |-> int'(addr) < int'(N_PDES))
    else $error("skew_config_mem: write to PDE %0d of %0d", addr, N_PDES);

endmodule
