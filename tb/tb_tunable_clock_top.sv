`timescale 1ps/1fs
// tb_tunable_clock_top: end-to-end test of the tunable clock architecture
// with 8 rows of 4 ribs (default 100) and a 256-cycle oscillator window
// (default 1024); everything else is at its default: 3-block PDEs of 20
// inverters of 7.5 ps, 8 oscillator grids.
//
//  1. After reset every PDE reads back as bypassed (tap 0).
//  2. All 32 PDEs are written with a pattern covering all four taps and
//     read back through the configuration port.
//  3. The spine clock is run; every rib's rising edge must follow the spine
//     by tap * 150 ps. A bypassed PDE's delay chain must stay still and an
//     active one must toggle with the clock.
//  4. Useful skew: a flip-flop on rib 0 of row 0 launches into a path to a
//     flip-flop on rib 3 of the last row. The path's longest delay (2100 ps) exceeds
//     the 2000 ps clock period minus a 50 ps setup time; its shortest delay is
//     400 ps with a 30 ps hold time. With both PDEs bypassed the capture
//     misses setup on every cycle; delaying the capture rib by 1 or 2 blocks
//     fixes it (the long-path constraint), delaying it by 3 blocks breaks the
//     hold time (the short-path constraint).
//  5. One ring-oscillator measurement of all grids: each count must be
//     256 * 10 ns / 315 ps within two edges, after 264 busy cycles.
// Each of these mechanisms is counted and must occur at least once.
module tb_tunable_clock_top;

  import skew_pkg::*;

  localparam int unsigned ROWS   = 8;
  localparam int unsigned WINDOW = 256;
  localparam int unsigned RIBS = ROWS * PDES_PER_ROW;
  localparam int unsigned AW   = $clog2(RIBS);
  localparam realtime     TCFG = 10_000.0;   // 100 MHz configuration clock

  int checks = 0, failures = 0;

  logic                      clk_spine = 1'b0;
  logic [RIBS-1:0]           rib_clk;
  logic                      cfg_clk = 1'b0;
  logic                      cfg_rst_n = 1'b0;
  logic                      cfg_we = 1'b0;
  logic [AW-1:0]             cfg_addr = '0;
  logic [SEL_W-1:0]          cfg_wdata = '0;
  logic [SEL_W-1:0]          cfg_rdata;
  logic                      meas_start = 1'b0;
  logic                      meas_busy, meas_done;
  logic [N_GRIDS-1:0][19:0]  ro_count;

  tunable_clock_top #(.N_ROWS(ROWS), .WINDOW_CYCLES(WINDOW)) dut (
    .clk_spine, .rib_clk,
    .cfg_clk, .cfg_rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .meas_start, .meas_busy, .meas_done, .ro_count
  );

  always #(TCFG / 2) cfg_clk = ~cfg_clk;

  // ---------------- mechanism counters ----------------
  int n_reset_bypass = 0, n_writes = 0, n_readback = 0;
  int n_level [N_LEVELS];
  int n_chain_idle = 0, n_chain_active = 0;
  int n_setup_viol = 0, n_setup_fixed = 0, n_hold_viol = 0, n_meas = 0;

  function automatic logic [SEL_W-1:0] pattern(input int i);
    return SEL_W'((i + i / PDES_PER_ROW) % N_LEVELS);
  endfunction

  // reference copy of what was written
  logic [SEL_W-1:0] model [RIBS];

  task automatic cfg_write(input int a, input int v);
    @(negedge cfg_clk);
    cfg_we = 1'b1; cfg_addr = AW'(a); cfg_wdata = SEL_W'(v);
    @(negedge cfg_clk);
    cfg_we = 1'b0;
    model[a] = SEL_W'(v);
    n_writes++;
  endtask

  task automatic readback_all(input string when);
    for (int a = 0; a < RIBS; a++) begin
      @(negedge cfg_clk);
      cfg_addr = AW'(a);
      #1;
      checks++;
      n_readback++;
      if (cfg_rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: PDE %0d reads %0d, expected %0d", when, a, cfg_rdata, model[a]);
      end
    end
  endtask

  // ---------------- rib edge monitors ----------------
  realtime t_rib [RIBS];
  for (genvar i = 0; i < RIBS; i++) begin : g_mon
    always @(posedge rib_clk[i]) t_rib[i] = $realtime;
  end

  // chain activity of a bypassed PDE (row 4, rib 0) and an active one (row 4, rib 3)
  int idle_toggles = 0, active_toggles = 0;
  always @(dut.u_net.g_row[4].g_rib[0].u_pde.tap[0]) idle_toggles++;
  always @(dut.u_net.g_row[4].g_rib[3].u_pde.tap[0]) active_toggles++;

  task automatic spine_pulse_and_check();
    realtime t0;
    foreach (t_rib[i]) t_rib[i] = -1.0;
    clk_spine = 1'b1;
    t0 = $realtime;
    #1000;
    for (int i = 0; i < RIBS; i++) begin
      realtime exp;
      exp = 150.0 * $itor(model[i]);
      checks++;
      n_level[model[i]]++;
      if (t_rib[i] < 0.0 || t_rib[i] - t0 < exp - 0.01 || t_rib[i] - t0 > exp + 0.01) begin
        failures++;
        if (failures < 10) $display("FAIL rib %0d (row %0d) tap %0d: skew %0.3f ps, expected %0.3f",
                                    i, i / PDES_PER_ROW, model[i], t_rib[i] - t0, exp);
      end
    end
    clk_spine = 1'b0;
    #1000;
  endtask

  // ---------------- launch / capture model for the useful-skew scenario ----------------
  localparam int unsigned LAUNCH  = 0;          // row 0, rib 0
  localparam int unsigned CAPTURE = RIBS - 1;   // last row, rib 3
  localparam realtime T_CLOCK = 2000.0;
  localparam realtime D_MAX   = 2100.0;
  localparam realtime D_MIN   = 400.0;
  localparam realtime T_SETUP = 50.0;
  localparam realtime T_HOLD  = 30.0;

  realtime launch_t [$];
  int      capture_ok = 0, capture_bad = 0;
  bit      path_on = 1'b0;

  always @(posedge rib_clk[LAUNCH]) if (path_on) launch_t.push_back($realtime);
  always @(posedge rib_clk[CAPTURE]) begin
    if (path_on && launch_t.size() >= 2) begin
      // the data to capture left the launch flip-flop one period earlier;
      // the next launch edge is the one right before this capture edge
      realtime tc, t_prev, t_next;
      tc     = $realtime;
      t_prev = launch_t[launch_t.size() - 2];
      t_next = launch_t[launch_t.size() - 1];
      if (t_prev + D_MAX <= tc - T_SETUP && t_next + D_MIN >= tc + T_HOLD) capture_ok++;
      else capture_bad++;
    end
  end

  task automatic run_path(input int cap_tap, input int expect_kind);
    // expect_kind: 0 = all captures correct, 1 = setup violation, 2 = hold violation
    cfg_write(LAUNCH, 0);
    cfg_write(CAPTURE, cap_tap);
    #2000;
    launch_t.delete();
    capture_ok = 0; capture_bad = 0;
    path_on = 1'b1;
    repeat (12) begin
      clk_spine = 1'b1; #(T_CLOCK / 2);
      clk_spine = 1'b0; #(T_CLOCK / 2);
    end
    #1000;
    path_on = 1'b0;
    checks++;
    if (expect_kind == 0) begin
      if (capture_bad != 0 || capture_ok < 10) begin
        failures++; $display("FAIL capture tap %0d: %0d good, %0d bad captures", cap_tap, capture_ok, capture_bad);
      end else n_setup_fixed++;
    end else begin
      if (capture_ok != 0 || capture_bad < 10) begin
        failures++; $display("FAIL capture tap %0d: expected a violation, %0d good %0d bad", cap_tap, capture_ok, capture_bad);
      end else if (expect_kind == 1) n_setup_viol++;
      else n_hold_viol++;
    end
  endtask

  // ---------------- main sequence ----------------
  initial begin
    int busy_cycles;
    foreach (n_level[l]) n_level[l] = 0;
    foreach (model[a]) model[a] = '0;
    repeat (3) @(posedge cfg_clk);
    @(negedge cfg_clk) cfg_rst_n = 1'b1;

    // 1. reset state
    readback_all("after reset");
    n_reset_bypass++;

    // 2. program every PDE
    for (int a = 0; a < RIBS; a++) cfg_write(a, int'(pattern(a)));
    readback_all("after programming");

    // 3. skews on all ribs
    #3000;
    idle_toggles = 0; active_toggles = 0;
    repeat (4) spine_pulse_and_check();
    checks++;
    if (idle_toggles != 0) begin
      failures++; $display("FAIL: bypassed PDE chain toggled %0d times", idle_toggles);
    end else n_chain_idle++;
    checks++;
    if (active_toggles != 8) begin
      failures++; $display("FAIL: active PDE chain toggled %0d times, expected 8", active_toggles);
    end else n_chain_active++;

    // 4. useful skew on a failing path
    run_path(0, 1);
    run_path(1, 0);
    run_path(2, 0);
    run_path(3, 2);

    // 5. ring-oscillator measurement
    busy_cycles = 0;
    @(negedge cfg_clk) meas_start = 1'b1;
    @(negedge cfg_clk) meas_start = 1'b0;
    if (meas_busy) busy_cycles++;
    while (!meas_done) begin
      @(negedge cfg_clk);
      if (meas_busy) busy_cycles++;
    end
    checks++;
    if (busy_cycles != 2 * 4 + WINDOW) begin
      failures++; $display("FAIL: measurement busy %0d cycles, expected %0d", busy_cycles, 2 * 4 + WINDOW);
    end
    for (int g = 0; g < N_GRIDS; g++) begin
      int exp;
      exp = int'($floor(real'(WINDOW) * TCFG / 315.0));
      checks++;
      if (int'(ro_count[g]) < exp - 2 || int'(ro_count[g]) > exp + 2) begin
        failures++; $display("FAIL grid %0d: count %0d, expected %0d", g, ro_count[g], exp);
      end
    end
    n_meas++;

    // every mechanism must have happened
    begin
      int counts [12];
      string names [12];
      counts = '{n_reset_bypass, n_writes, n_readback, n_level[0], n_level[1], n_level[2], n_level[3],
                 n_chain_idle, n_chain_active, n_setup_viol + n_setup_fixed, n_hold_viol, n_meas};
      names  = '{"reset to bypass", "config write", "config read-back", "tap 0", "tap 1", "tap 2",
                 "tap 3", "gated chain", "active chain", "setup violation/fix", "hold violation",
                 "oscillator measurement"};
      for (int m = 0; m < 12; m++) begin
        $display("mechanism %-24s %0d", names[m], counts[m]);
        checks++;
        if (counts[m] == 0) begin failures++; $display("FAIL: mechanism %s never happened", names[m]); end
      end
      checks++;
      if (n_setup_viol == 0 || n_setup_fixed == 0) begin
        failures++; $display("FAIL: setup violation %0d, fixed %0d", n_setup_viol, n_setup_fixed);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
