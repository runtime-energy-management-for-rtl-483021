// tb_rem_zone: with a 1000-cycle window, E_max of equation (1) is
// 1000 * (31411 + 2200) fJ = 33,611,000 fJ (mean per-class energy at 1.1 V
// with the 10 % overhead, plus leakage per cycle). With {85 %, 60 %} the hot
// limit is 28,569,350 fJ and the cold limit 20,166,600 fJ. Reports around
// both limits must give hot/DOWN, warm/none and cold/UP.
`timescale 1ns / 1ps
module tb_rem_zone;
  import rem_pkg::*;
  logic clk = 0, rst_n = 0, ev = 0, rv;
  energy_t e = 0;
  zone_e zone;
  dvfs_cmd_e cmd;
  int checks = 0, failures = 0;

  rem_zone #(.WINDOW(1000), .VH_PCT(85), .VL_PCT(60)) dut (
    .clk(clk), .rst_n(rst_n), .energy_valid_i(ev), .energy_i(e),
    .result_valid_o(rv), .zone_o(zone), .cmd_o(cmd));

  always #2 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(longint energy, zone_e z, dvfs_cmd_e c);
    @(negedge clk);
    e = energy_t'(energy); ev = 1;
    @(negedge clk);
    ev = 0;
    checks++;
    if (!rv || zone != z || cmd != c) begin
      failures++;
      $display("energy %0d: zone %0d cmd %0d, expected %0d %0d", energy, zone, cmd, z, c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    probe(40_000_000, ZONE_HOT,  DVFS_DOWN);
    probe(28_569_351, ZONE_HOT,  DVFS_DOWN);
    probe(28_569_350, ZONE_WARM, DVFS_NONE);
    probe(25_000_000, ZONE_WARM, DVFS_NONE);
    probe(20_166_600, ZONE_WARM, DVFS_NONE);
    probe(20_166_599, ZONE_COLD, DVFS_UP);
    probe(1_000,      ZONE_COLD, DVFS_UP);
    probe(0,          ZONE_COLD, DVFS_UP);
    @(negedge clk);
    checks++;
    if (rv) begin failures++; $display("valid without a report"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
