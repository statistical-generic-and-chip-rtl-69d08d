`timescale 1ps/1fs
// tb_ring_oscillator: checks that the ring is stopped with osc high while
// disabled, and that when enabled its period is 2 * (N_INV + 1) * stage
// delay with a 50 % duty cycle: 315 ps for the default ring, and 2*11*9 =
// 198 ps for a 10-inverter ring with 9 ps stages.
module tb_ring_oscillator;

  int checks = 0, failures = 0;

  logic en = 1'b0;
  logic osc_a, osc_b;

  ring_oscillator u_a (.en, .osc(osc_a));
  ring_oscillator #(.N_INV(10), .STAGE_DELAY_FS(9000)) u_b (.en, .osc(osc_b));

  int      n_a = 0, n_b = 0;
  realtime first_a, last_a, first_b, last_b, rise_a, high_a;

  always @(posedge osc_a) begin
    if (n_a == 0) first_a = $realtime;
    last_a = $realtime; rise_a = $realtime; n_a++;
  end
  always @(negedge osc_a) high_a = $realtime - rise_a;
  always @(posedge osc_b) begin
    if (n_b == 0) first_b = $realtime;
    last_b = $realtime; n_b++;
  end

  task automatic check_period(input string what, input int n, input realtime t0, input realtime t1,
                              input realtime exp);
    realtime per;
    checks++;
    per = (n > 1) ? (t1 - t0) / (n - 1) : 0.0;
    if (per < exp - 0.01 || per > exp + 0.01) begin
      failures++; $display("FAIL %s: period %0.3f ps over %0d edges, expected %0.3f", what, per, n, exp);
    end
  endtask

  initial begin
    #2000;
    n_a = 0; n_b = 0;
    #5000;
    checks++;
    if (n_a != 0 || n_b != 0 || osc_a !== 1'b1 || osc_b !== 1'b1) begin
      failures++; $display("FAIL: disabled rings moved (%0d, %0d edges) or not high", n_a, n_b);
    end
    en = 1'b1;
    #(100 * 315);
    check_period("default ring", n_a, first_a, last_a, 315.0);
    check_period("short ring", n_b, first_b, last_b, 198.0);
    checks++;
    if (high_a < 157.49 || high_a > 157.51) begin
      failures++; $display("FAIL: high time %0.3f ps, expected 157.5", high_a);
    end
    checks++;
    if (n_a < 99 || n_a > 101) begin failures++; $display("FAIL: %0d edges in 100 periods", n_a); end
    // stop again
    en = 1'b0;
    #2000;
    n_a = 0; n_b = 0;
    #3000;
    checks++;
    if (n_a != 0 || n_b != 0) begin failures++; $display("FAIL: rings did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
