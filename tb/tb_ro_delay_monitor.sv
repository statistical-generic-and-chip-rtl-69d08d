`timescale 1ps/1fs
// tb_ro_delay_monitor: a die whose 8 grids have different inverter delays
// (7.0 to 8.4 ps per stage). One measurement must give each grid the count
// WINDOW * T_clk / (2 * 21 * stage delay) within two edges, so slower grids
// read lower; a second measurement must repeat the counts.
module tb_ro_delay_monitor;

  localparam int unsigned G      = 8;
  localparam int unsigned WINDOW = 128;
  localparam int unsigned CW     = 16;
  localparam realtime     TCLK   = 10_000.0;
  localparam logic [G-1:0][31:0] DLY = {32'd8400, 32'd7000, 32'd8000, 32'd7200,
                                        32'd7600, 32'd7400, 32'd7800, 32'd7500};

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [G-1:0][CW-1:0] count;

  ro_delay_monitor #(.N_GRIDS(G), .WINDOW_CYCLES(WINDOW), .COUNT_W(CW),
                     .STAGE_DELAY_FS(DLY)) dut (.clk, .rst_n, .start, .busy, .done, .count);

  always #(TCLK / 2) clk = ~clk;

  int cycles;

  task automatic run_and_check(input int pass);
    cycles = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 2 * 4 + WINDOW) begin
      failures++; $display("FAIL pass %0d: done after %0d cycles", pass, cycles);
    end
    for (int g = 0; g < G; g++) begin
      int exp;
      exp = int'($floor(WINDOW * TCLK / (2.0 * 21.0 * real'(DLY[g]) / 1000.0)));
      checks++;
      if (int'(count[g]) < exp - 2 || int'(count[g]) > exp + 2) begin
        failures++; $display("FAIL pass %0d grid %0d: count %0d expected %0d", pass, g, count[g], exp);
      end
    end
    // slowest grid (8.4 ps, grid 7) lowest, fastest (7.0 ps, grid 6) highest
    for (int g = 0; g < G; g++) begin
      checks++;
      if (count[7] > count[g] || count[6] < count[g]) begin
        failures++; $display("FAIL pass %0d: grid order wrong at grid %0d", pass, g);
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_and_check(1);
    repeat (10) @(negedge clk);
    run_and_check(2);
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
