`timescale 1ps/1fs
// tb_ro_freq_counter: the oscillator is replaced by a clock generated here,
// running only while ro_en is high, with a period chosen per measurement.
// For several periods it checks that the count equals
// WINDOW_CYCLES * T_clk / T_ro within two edges, that busy lasts exactly
// 2*SETTLE_CYCLES + WINDOW_CYCLES cycles and done pulses once, right after, that the
// oscillator is enabled only during a measurement, that a start while busy
// is ignored, that each measurement starts again from zero, and that the
// counter saturates instead of wrapping.
module tb_ro_freq_counter;

  localparam int unsigned WINDOW = 64;
  localparam int unsigned SETTLE = 4;
  localparam int unsigned CW     = 16;
  localparam realtime     TCLK   = 10_000.0;   // 100 MHz reference clock

  int checks = 0, failures = 0;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          start = 1'b0;
  logic          ro_clk = 1'b0;
  logic          ro_en, busy, done;
  logic [CW-1:0] count;
  logic          ro_en8, busy8, done8;
  logic [7:0]    count8;

  ro_freq_counter #(.WINDOW_CYCLES(WINDOW), .COUNT_W(CW), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .start, .ro_clk, .ro_en, .busy, .done, .count);
  // 8-bit counter that must saturate at 255
  ro_freq_counter #(.WINDOW_CYCLES(WINDOW), .COUNT_W(8), .SETTLE_CYCLES(SETTLE)) dut8 (
    .clk, .rst_n, .start, .ro_clk, .ro_en(ro_en8), .busy(busy8), .done(done8), .count(count8));

  always #(TCLK / 2) clk = ~clk;

  // oscillator stand-in
  realtime t_ro = 315.0;
  initial forever begin
    if (ro_en) begin
      #(t_ro / 2) ro_clk = 1'b1;
      #(t_ro / 2) ro_clk = 1'b0;
    end else begin
      @(ro_en);
    end
  end

  int busy_cycles, done_cycles, en_outside;
  always @(negedge clk) begin
    if (busy) busy_cycles++;
    if (done) done_cycles++;
    if (ro_en && !busy) en_outside++;
  end

  task automatic measure(input realtime period, input bit extra_start);
    int exp;
    t_ro = period;
    busy_cycles = 0; done_cycles = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    if (extra_start) begin
      repeat (10) @(negedge clk);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
    end
    wait (done);
    @(negedge clk);
    @(negedge clk);
    exp = int'($floor(WINDOW * TCLK / period));
    checks++;
    if (int'(count) < exp - 2 || int'(count) > exp + 2) begin
      failures++; $display("FAIL T_ro=%0.1f ps: count %0d, expected %0d +-2", period, count, exp);
    end
    checks++;
    if (busy_cycles != 2 * SETTLE + WINDOW || done_cycles != 1) begin
      failures++; $display("FAIL T_ro=%0.1f ps: busy %0d cycles, done %0d times (expected %0d, 1)",
                           period, busy_cycles, done_cycles, 2 * SETTLE + WINDOW);
    end
    checks++;
    if (ro_en) begin failures++; $display("FAIL: oscillator left enabled"); end
    checks++;
    if (exp > 255 ? count8 != 8'hff : int'(count8) != int'(count)) begin
      failures++; $display("FAIL: 8-bit counter shows %0d for %0d", count8, count);
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    en_outside = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    measure(315.0, 1'b0);
    measure(330.0, 1'b1);
    measure(300.0, 1'b0);
    measure(2600.0, 1'b0);   // slow: only 246 edges, below the 8-bit limit
    measure(1000.0, 1'b0);
    checks++;
    if (en_outside != 0) begin failures++; $display("FAIL: ro_en high while idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
