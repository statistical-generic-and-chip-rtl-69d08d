`timescale 1ps/1fs
// tb_pde_tap_mux: exhaustive check of the PDE output multiplexer and bypass
// gate for three delay blocks (4 taps), plus a 2-block instance (3 taps)
// where select 3 must fall back to the last tap.
module tb_pde_tap_mux;

  int checks = 0, failures = 0;

  logic       clk_in;
  logic [1:0] sel;
  logic [3:1] tap;
  logic       chain_in, clk_out;
  logic [2:1] tap2;
  logic       chain_in2, clk_out2;

  pde_tap_mux dut (.clk_in, .sel, .tap, .chain_in, .clk_out);
  pde_tap_mux #(.N_BLOCKS(2)) dut2 (.clk_in, .sel, .tap(tap2),
                                    .chain_in(chain_in2), .clk_out(clk_out2));

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 16; v++) begin
        logic exp_out, exp_chain, exp_out2;
        sel    = 2'(s);
        clk_in = v[0];
        tap    = v[3:1];
        tap2   = v[2:1];
        #1;
        // reference model written from the tap definition
        case (s)
          0: exp_out = v[0];
          1: exp_out = v[1];
          2: exp_out = v[2];
          default: exp_out = v[3];
        endcase
        exp_chain = (s == 0) ? 1'b0 : v[0];
        exp_out2  = (s == 0) ? v[0] : (s == 1) ? v[1] : v[2];
        checks += 3;
        if (clk_out !== exp_out) begin
          failures++; $display("FAIL sel=%0d v=%b clk_out=%b exp %b", s, v[3:0], clk_out, exp_out);
        end
        if (chain_in !== exp_chain) begin
          failures++; $display("FAIL sel=%0d v=%b chain_in=%b exp %b", s, v[3:0], chain_in, exp_chain);
        end
        if (clk_out2 !== exp_out2 || chain_in2 !== exp_chain) begin
          failures++; $display("FAIL 2-block sel=%0d v=%b out=%b exp %b", s, v[3:0], clk_out2, exp_out2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
