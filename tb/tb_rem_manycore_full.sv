// tb_rem_manycore_full: the many-core at its default size (6x6 mesh of four
// 3x3 clusters, 200,000-cycle sampling windows, zones {85 %, 60 %}) through
// two complete REM rounds. Every PE runs the rem_fw processor model with
// slave PEs at full load. At the end of each window each of the 32 slave PEs
// reports its energy to its LMP; the energy is in the hot zone, so each LMP
// answers DOWN: the first round steps every slave from vf-pair 1 to 2 (a
// period step), the second from 2 to 3 (a supply step, processor held).
// Early in the third window the test checks the reports, the decisions, the
// vf-pair of every slave, the cluster reports from the three other LMPs to
// the GMP and the energy balance of the hierarchy.
`timescale 1ns / 1ps
module tb_rem_manycore_full;
  import rem_pkg::*;
  localparam int MX = 6, MY = 6, CX = 3, CY = 3, WIN = 200_000, N = MX * MY;
  logic clk_nom = 0, rst_n = 0;
  logic [N-1:0] pclk;
  proc_req_t [N-1:0] req;
  proc_rsp_t [N-1:0] rsp;
  logic [N-1:0][10:0] mv;
  int checks = 0, failures = 0;

  int n_windows [N], n_mon_sent [N], n_mon_rx [N], n_ctrl_rx [N], n_hot [N], n_warm [N], n_cold [N];
  int n_fstep [N], n_vstep [N], n_hold [N], max_vf [N], n_clu_rx [N];
  longint clu_sent [N], clu_rx [N], mon_sent [N], pending [N];
  int n_sleep [N];

  rem_manycore dut (
    .clk_nom(clk_nom), .rst_n(rst_n), .pe_clk_o(pclk), .proc_req_i(req), .proc_rsp_o(rsp), .vdd_mv_o(mv));

  for (genvar n = 0; n < N; n++) begin : g_fw
    rem_fw #(.X(n % MX), .Y(n / MX), .CLUSTER_X(CX), .CLUSTER_Y(CY),
             .HEAVY(100), .LIGHT(100), .HEAVY_WINDOWS(100)) u_fw (
      .clk(pclk[n]), .rst_n(rst_n), .req_o(req[n]), .rsp_i(rsp[n]),
      .n_windows(n_windows[n]), .n_mon_sent(n_mon_sent[n]), .n_mon_rx(n_mon_rx[n]),
      .n_ctrl_rx(n_ctrl_rx[n]), .n_hot(n_hot[n]), .n_warm(n_warm[n]), .n_cold(n_cold[n]),
      .n_fstep(n_fstep[n]), .n_vstep(n_vstep[n]), .n_hold(n_hold[n]), .max_vf(max_vf[n]),
      .n_clu_rx(n_clu_rx[n]), .clu_sent_sum(clu_sent[n]), .clu_rx_sum(clu_rx[n]),
      .mon_sent_sum(mon_sent[n]), .pending_sum(pending[n]),
      .n_sleep(n_sleep[n]));
  end

  always #2 clk_nom = ~clk_nom;

  initial begin
    #1000000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    longint sent_all, gmp_view;
    int hot;
    #21 rst_n = 1;
    repeat (2 * WIN + WIN / 8) @(posedge clk_nom);
    hot = 0;
    for (int n = 0; n < N; n++) begin
      bit mgr;
      mgr = ((n % MX) % CX) == 0 && ((n / MX) % CY) == 0;
      hot += n_hot[n];
      check(n_windows[n] == 2, $sformatf("PE %0d saw %0d windows", n, n_windows[n]));
      if (mgr) begin
        check(n_mon_rx[n] == 16, $sformatf("LMP %0d got %0d reports", n, n_mon_rx[n]));
      end else begin
        check(n_ctrl_rx[n] == 2 && rsp[n].vf_idx == 3 && n_fstep[n] == 1 && n_vstep[n] == 1 && n_hold[n] > 0,
              $sformatf("slave %0d: %0d commands, vf-pair %0d", n, n_ctrl_rx[n], rsp[n].vf_idx));
      end
    end
    check(hot == 64, $sformatf("%0d hot decisions", hot));
    check(n_clu_rx[0] == 6, $sformatf("GMP got %0d cluster reports", n_clu_rx[0]));
    sent_all = 0;
    gmp_view = clu_rx[0];
    foreach (mon_sent[n]) sent_all += mon_sent[n];
    for (int n = 1; n < N; n++) gmp_view += pending[n];
    check(gmp_view == sent_all, $sformatf("energy hierarchy: %0d vs %0d", gmp_view, sent_all));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
