// tb_dvfs_ctrl: walks the DVFS protocol from vf-pair 1 down to 9 and back up,
// past both ends. Each step is checked against the protocol table written out
// here (supply and period of pairs 1..9), and each voltage step against the
// hold time: 100 ns rounded up to whole cycles of the present period
// (23 cycles at 4.5 ns, 19 cycles at 5.5 ns). A command issued during a hold
// must be ignored.
`timescale 1ns / 1ps
module tb_dvfs_ctrl;
  import rem_pkg::*;
  logic clk = 0, rst_n = 0, cmd_valid = 0;
  dvfs_cmd_e cmd = DVFS_NONE;
  vf_idx_t idx;
  vdd_e vdd;
  period_code_t per;
  logic hold, busy, vchg, fchg;
  int checks = 0, failures = 0;
  // Protocol table, pairs 1..9: supply (0: 1.1 V, 1: 1.0 V, 2: 0.9 V), period code (4.0 ns + 0.5 ns * code)
  int exp_vdd [10] = '{0, 0, 0, 1, 1, 1, 2, 2, 2, 2};
  int exp_per [10] = '{0, 0, 1, 1, 2, 3, 3, 4, 5, 6};
  int n_vchg = 0, n_fchg = 0;

  dvfs_ctrl dut (.clk(clk), .rst_n(rst_n), .cmd_valid_i(cmd_valid), .cmd_i(cmd), .vf_idx_o(idx),
                 .vdd_o(vdd), .period_o(per), .hold_o(hold), .busy_o(busy),
                 .vdd_change_o(vchg), .freq_change_o(fchg));

  always #2 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && vchg) n_vchg++;
    if (rst_n && fchg) n_fchg++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s (idx=%0d vdd=%0d per=%0d)", msg, idx, vdd, per);
    end
  endtask

  task automatic step(dvfs_cmd_e c, int from);
    int to, held;
    to = (c == DVFS_DOWN) ? ((from < 9) ? from + 1 : 9) : ((from > 1) ? from - 1 : 1);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    check(idx == vf_idx_t'(to), $sformatf("step from %0d to %0d", from, to));
    check(int'(vdd) == exp_vdd[to] && int'(per) == exp_per[to], $sformatf("table entry of pair %0d", to));
    held = 0;
    if (exp_vdd[to] != exp_vdd[from]) begin
      // try a command in the middle of the hold: must be ignored
      while (hold) begin
        if (held == 5) begin
          cmd = c; cmd_valid = 1;
        end else cmd_valid = 0;
        held++;
        @(negedge clk);
      end
      cmd_valid = 0;
      check(held == ((exp_per[from] == 1) ? 23 : 19), $sformatf("hold of %0d cycles at pair %0d", held, from));
      check(idx == vf_idx_t'(to), "command during hold ignored");
    end else begin
      check(!hold, "no hold for a frequency step");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(idx == 1 && vdd == VDD_1V1 && per == 0, "reset to pair 1");
    for (int i = 1; i <= 9; i++) step(DVFS_DOWN, i);
    for (int i = 9; i >= 1; i--) step(DVFS_UP, i);
    check(n_vchg == 4, $sformatf("four voltage steps (saw %0d)", n_vchg));
    check(n_fchg == 12, $sformatf("twelve period steps (saw %0d)", n_fchg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
