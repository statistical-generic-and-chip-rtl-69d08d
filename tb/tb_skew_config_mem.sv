`timescale 1ps/1fs
// tb_skew_config_mem: checks reset to bypass, random writes against a
// reference array (every PDE's select output and the read-back port), that
// a cycle without write enable changes nothing, and the write timing (new
// value visible after the clock edge, not before).
module tb_skew_config_mem;

  localparam int unsigned N = 400;
  localparam int unsigned AW = $clog2(N);

  int checks = 0, failures = 0;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                we = 1'b0;
  logic [AW-1:0]       addr = '0;
  logic [1:0]          wdata = '0;
  logic [1:0]          rdata;
  logic [N-1:0][1:0]   sel;

  logic [1:0] model [N];

  skew_config_mem dut (.clk, .rst_n, .we, .addr, .wdata, .rdata, .sel);

  always #5000 clk = ~clk;

  task automatic compare_all(input string when);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sel[i] !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: sel[%0d]=%0d expected %0d", when, i, sel[i], model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = 2'd0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare_all("after reset");
    // random writes
    for (int n = 0; n < 2000; n++) begin
      int a;
      logic [1:0] d;
      a = $urandom_range(N - 1);
      d = 2'($urandom);
      we = ($urandom_range(3) != 0);
      addr = AW'(a);
      wdata = d;
      #1;
      // before the edge the old value is still stored
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL read-back addr %0d before write: %0d expected %0d", a, rdata, model[a]);
      end
      @(posedge clk);
      if (we) model[a] = d;
      #1;
      checks++;
      if (rdata !== model[a] || sel[a] !== model[a]) begin
        failures++; $display("FAIL addr %0d after edge: rdata %0d sel %0d expected %0d", a, rdata, sel[a], model[a]);
      end
      if (n % 250 == 0) compare_all("random writes");
    end
    we = 1'b0;
    compare_all("end");
    // reset clears everything again
    rst_n = 1'b0;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = 2'd0;
    compare_all("second reset");
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
