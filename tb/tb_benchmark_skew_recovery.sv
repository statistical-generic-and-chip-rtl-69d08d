`timescale 1ps/1fs
// tb_benchmark_skew_recovery: runs the clock network at the specified clock
// periods of ten benchmark circuits (3-sigma guard-banded specifications:
// 4.9 ns to 26.4 ns) and asks, for a path that misses its period by 0.5 %,
// 1 %, 2 % and 5 %, which PDE setting on the capture rib recovers it.
//
// For each case the launch rib stays bypassed and the capture rib is swept
// through settings 0..3 while the spine clock runs at the benchmark period.
// A flip-flop model on the two rib clocks checks setup (50 ps) and hold
// (30 ps) on every cycle, with path delays d_max = T + violation - 50 ps and
// d_min = 1000 ps. The smallest setting with no failing capture must be
// ceil(violation / 150 ps), or none when that exceeds 3 (450 ps). The share
// of cases recovered is printed per benchmark.
module tb_benchmark_skew_recovery;

  localparam int unsigned ROWS = 2;
  localparam int unsigned RIBS = ROWS * 4;
  localparam int unsigned LAUNCH = 0, CAPTURE = RIBS - 1;
  localparam realtime T_SETUP = 50.0, T_HOLD = 30.0, D_MIN = 1000.0;

  int checks = 0, failures = 0;

  logic                 clk_spine = 1'b0;
  logic [RIBS-1:0][1:0] sel = '0;
  logic [RIBS-1:0]      rib_clk;

  tunable_clock_network #(.N_ROWS(ROWS)) dut (.clk_spine, .sel, .rib_clk);

  string   names [10] = '{"diffeq", "tseng", "s298", "frisc", "s15850", "elliptic",
                          "s38417", "bigkey", "clma", "dsip"};
  realtime tspec [10] = '{10878.3, 6824.36, 21756.5, 13848.5, 9969.61, 15712.5,
                          13039.6, 6877.99, 26442.1, 4901.54};
  realtime viol_pct [4] = '{0.5, 1.0, 2.0, 5.0};

  realtime d_max;
  realtime launch_t [$];
  int      good = 0, bad = 0;
  bit      on = 1'b0;

  always @(posedge rib_clk[LAUNCH]) if (on) launch_t.push_back($realtime);
  always @(posedge rib_clk[CAPTURE]) begin
    if (on && launch_t.size() >= 2) begin
      realtime tc;
      tc = $realtime;
      if (launch_t[launch_t.size() - 2] + d_max <= tc - T_SETUP &&
          launch_t[launch_t.size() - 1] + D_MIN >= tc + T_HOLD) good++;
      else bad++;
    end
  end

  // returns 1 when every capture in 6 cycles at period t is correct
  task automatic run_cycles(input realtime t, output bit pass);
    #1000;
    launch_t.delete();
    good = 0; bad = 0;
    on = 1'b1;
    repeat (6) begin
      clk_spine = 1'b1; #(t / 2);
      clk_spine = 1'b0; #(t / 2);
    end
    #1000;
    on = 1'b0;
    pass = (bad == 0 && good >= 4);
  endtask

  int total_rec = 0, total_cases = 0;

  initial begin
    #2000;
    for (int b = 0; b < 10; b++) begin
      int rec;
      rec = 0;
      for (int v = 0; v < 4; v++) begin
        realtime viol;
        int expect_tap, found;
        viol = tspec[b] * viol_pct[v] / 100.0;
        d_max = tspec[b] + viol - T_SETUP;
        expect_tap = int'($ceil(viol / 150.0));
        if (expect_tap > 3) expect_tap = -1;
        found = -1;
        for (int tap = 0; tap < 4 && found < 0; tap++) begin
          bit pass;
          sel[CAPTURE] = 2'(tap);
          run_cycles(tspec[b], pass);
          if (pass) found = tap;
        end
        checks++;
        if (found != expect_tap) begin
          failures++;
          $display("FAIL %s, %0.1f%% late (%0.1f ps): recovered by setting %0d, expected %0d",
                   names[b], viol_pct[v], viol, found, expect_tap);
        end
        if (found >= 0) rec++;
        sel[CAPTURE] = 2'd0;
      end
      $display("%-9s T=%8.2f ps: %0d of 4 violation levels recovered", names[b], tspec[b], rec);
      total_rec += rec;
      total_cases += 4;
    end
    // Every benchmark recovers the 0.5 % and 1 % cases; at 2 % all but clma
    // (529 ps late); at 5 % only those with T <= 9 ns (tseng, bigkey, dsip).
    checks++;
    if (total_rec != 10 + 10 + 9 + 3) begin
      failures++; $display("FAIL: %0d cases recovered in total, expected 32", total_rec);
    end
    $display("recovered %0d of %0d cases", total_rec, total_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
