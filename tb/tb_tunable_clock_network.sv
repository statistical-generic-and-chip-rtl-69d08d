`timescale 1ps/1fs
// tb_tunable_clock_network: on a 6-row network (4 ribs per row, 3 blocks per
// PDE) gives every rib a random tap, runs the spine clock and checks that
// each rib's rising edges follow the spine by tap * 150 ps. Repeated with
// new random taps so that every rib sees several values.
module tb_tunable_clock_network;

  localparam int unsigned ROWS = 6;
  localparam int unsigned RIBS = ROWS * 4;

  int checks = 0, failures = 0;

  logic                  clk_spine = 1'b0;
  logic [RIBS-1:0][1:0]  sel;
  logic [RIBS-1:0]       rib_clk;

  tunable_clock_network #(.N_ROWS(ROWS)) dut (.clk_spine, .sel, .rib_clk);

  realtime t_spine;
  realtime t_rib [RIBS];
  int      level_seen [4];

  for (genvar i = 0; i < RIBS; i++) begin : g_mon
    always @(posedge rib_clk[i]) t_rib[i] = $realtime;
  end

  initial begin
    foreach (level_seen[l]) level_seen[l] = 0;
    sel = '0;
    #2000;
    for (int round = 0; round < 8; round++) begin
      for (int i = 0; i < RIBS; i++) sel[i] = 2'($urandom);
      #2000;
      repeat (3) begin
        foreach (t_rib[i]) t_rib[i] = -1.0;
        clk_spine = 1'b1;
        t_spine = $realtime;
        #800;
        for (int i = 0; i < RIBS; i++) begin
          realtime exp;
          exp = 150.0 * $itor(sel[i]);
          level_seen[sel[i]]++;
          checks++;
          if (t_rib[i] < 0.0 || (t_rib[i] - t_spine) < exp - 0.01 || (t_rib[i] - t_spine) > exp + 0.01) begin
            failures++;
            $display("FAIL row %0d rib %0d tap %0d: skew %0.3f ps, expected %0.3f",
                     i / 4, i % 4, sel[i], t_rib[i] - t_spine, exp);
          end
        end
        clk_spine = 1'b0;
        #800;
      end
    end
    for (int l = 0; l < 4; l++) begin
      checks++;
      if (level_seen[l] == 0) begin failures++; $display("FAIL: tap %0d never used", l); end
    end
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
