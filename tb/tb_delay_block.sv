`timescale 1ps/1fs
// tb_delay_block: checks that a delay block passes the clock through
// uninverted, delayed by N_INV * INV_DELAY_FS, on rising and falling edges,
// for the default block (20 x 7.5 ps = 150 ps) and for a slower, shorter one
// (10 x 8 ps = 80 ps).
module tb_delay_block;

  int checks = 0, failures = 0;

  logic clk_in = 1'b0;
  logic out_a, out_b;

  delay_block u_a (.clk_in(clk_in), .clk_out(out_a));
  delay_block #(.N_INV(10), .INV_DELAY_FS(8000)) u_b (.clk_in(clk_in), .clk_out(out_b));

  realtime t_edge;
  realtime t_a, t_b;

  task automatic check_delay(input string what, input realtime got, input realtime exp);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: delay %0.3f ps, expected %0.3f ps", what, got, exp);
    end
  endtask

  task automatic edge_and_measure(input logic v);
    clk_in = v;
    t_edge = $realtime;
    fork
      begin wait (out_a === v); t_a = $realtime - t_edge; end
      begin wait (out_b === v); t_b = $realtime - t_edge; end
    join
    check_delay(v ? "default rise" : "default fall", t_a, 150.0);
    check_delay(v ? "short rise" : "short fall", t_b, 80.0);
  endtask

  initial begin
    #1000;  // let the chains settle from their initial state
    checks++;
    if (out_a !== 1'b0 || out_b !== 1'b0) begin
      failures++;
      $display("FAIL: settled outputs %b %b, expected 0 0", out_a, out_b);
    end
    for (int i = 0; i < 4; i++) begin
      edge_and_measure(1'b1);
      #500;
      // Mid-cycle level check: output equals input (block does not invert).
      checks++;
      if (out_a !== clk_in || out_b !== clk_in) begin
        failures++;
        $display("FAIL: output level differs from input level");
      end
      edge_and_measure(1'b0);
      #500;
    end
    // A pulse shorter than the block delay still appears, whole, at the output.
    clk_in = 1'b1; #50; clk_in = 1'b0;
    #90; checks++;      // 140 ps after the pulse began
    if (out_a !== 1'b0) begin failures++; $display("FAIL: pulse early"); end
    #35; checks++;      // 175 ps: inside the delayed pulse
    if (out_a !== 1'b1) begin failures++; $display("FAIL: 50 ps pulse missing at 175 ps"); end
    #50; checks++;      // 225 ps: pulse over
    if (out_a !== 1'b0) begin failures++; $display("FAIL: delayed pulse too long"); end
    #1000;
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
