`timescale 1ps/1fs
// tb_pde: for each tap select 0..3, runs a 1 GHz clock through a programmable
// delay element and checks that every output edge follows its input edge by
// sel * 150 ps, that the output is not inverted, and that in bypass
// (sel = 0) the delay chain does not toggle at all.
module tb_pde;

  int checks = 0, failures = 0;

  logic       clk_in = 1'b0;
  logic [1:0] sel = 2'd0;
  logic       clk_out;

  pde dut (.clk_in, .sel, .clk_out);

  // count activity on the chain input
  int chain_toggles = 0;
  always @(dut.tap[0]) chain_toggles++;

  realtime t_in[$];
  int edges_out = 0;

  always @(posedge clk_in) t_in.push_back($realtime);
  always @(posedge clk_out) begin
    realtime d, exp;
    edges_out++;
    exp = 150.0 * $itor(sel);
    checks++;
    if (t_in.size() == 0) begin
      failures++; $display("FAIL sel=%0d: output edge with no input edge", sel);
    end else begin
      d = $realtime - t_in.pop_front();
      if (d < exp - 0.01 || d > exp + 0.01) begin
        failures++; $display("FAIL sel=%0d: delay %0.3f ps, expected %0.3f", sel, d, exp);
      end
    end
  end

  initial begin
    #2000;
    for (int s = 0; s < 4; s++) begin
      int n_before;
      sel = 2'(s);
      #2000;                 // let the chain settle to the new select
      t_in.delete();
      n_before = edges_out;
      chain_toggles = 0;
      repeat (10) begin
        clk_in = 1'b1; #490;
        // 490 ps after the rising edge every tap has risen
        checks++;
        if (clk_out !== 1'b1) begin
          failures++; $display("FAIL sel=%0d: clock low late in the high phase", s);
        end
        #10; clk_in = 1'b0; #500;
      end
      #1000;
      checks++;
      if (edges_out - n_before != 10) begin
        failures++; $display("FAIL sel=%0d: %0d output edges, expected 10", s, edges_out - n_before);
      end
      checks++;
      if (s == 0 && chain_toggles != 0) begin
        failures++; $display("FAIL bypass: delay chain toggled %0d times", chain_toggles);
      end else if (s != 0 && chain_toggles != 20) begin
        failures++; $display("FAIL sel=%0d: chain toggled %0d times, expected 20", s, chain_toggles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
