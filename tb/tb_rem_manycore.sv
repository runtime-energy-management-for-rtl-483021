// tb_rem_manycore: end-to-end run of the closed energy loop on a reduced
// many-core: a 4x2 mesh of two 2x2 clusters (GMP at (0,0), LMP at (2,0),
// six slave PEs), 2000-cycle sampling windows, light REM zones {85 %, 60 %}.
// Every PE runs the rem_fw processor model. Slave PEs run a full load for
// five windows, then 40 %. The full load must drive each slave into the hot
// zone and down to at least vf-pair 3 (a period step, then a supply step
// with a processor hold); the light load must bring cold-zone reports and
// UP steps back. Counted and required at least once: hot, warm and cold
// decisions, period and supply steps up and down, processor holds, router
// arbitration between packets competing for one output, a received packet
// waiting in the DMNI while the buffer is held, and cluster energy reports
// reaching the GMP, and, once the slaves' tasks end after ten windows,
// sleeps with the processor clock gated. The energy hierarchy must balance: what the GMP has
// summed plus what LMPs hold for the next report equals what all slaves sent.
`timescale 1ns / 1ps
module tb_rem_manycore;
  import rem_pkg::*;
  localparam int MX = 4, MY = 2, CX = 2, CY = 2, WIN = 2000, N = MX * MY;
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

  rem_manycore #(.MESH_X(MX), .MESH_Y(MY), .CLUSTER_X(CX), .CLUSTER_Y(CY), .WINDOW(WIN),
                 .VH_PCT(85), .VL_PCT(60), .PAGES(4), .PAGE_WORDS(1024)) dut (
    .clk_nom(clk_nom), .rst_n(rst_n), .pe_clk_o(pclk), .proc_req_i(req), .proc_rsp_o(rsp), .vdd_mv_o(mv));

  for (genvar n = 0; n < N; n++) begin : g_fw
    rem_fw #(.X(n % MX), .Y(n / MX), .CLUSTER_X(CX), .CLUSTER_Y(CY),
             .HEAVY(100), .LIGHT(40), .HEAVY_WINDOWS(5), .TASK_WINDOWS(10)) u_fw (
      .clk(pclk[n]), .rst_n(rst_n), .req_o(req[n]), .rsp_i(rsp[n]),
      .n_windows(n_windows[n]), .n_mon_sent(n_mon_sent[n]), .n_mon_rx(n_mon_rx[n]),
      .n_ctrl_rx(n_ctrl_rx[n]), .n_hot(n_hot[n]), .n_warm(n_warm[n]), .n_cold(n_cold[n]),
      .n_fstep(n_fstep[n]), .n_vstep(n_vstep[n]), .n_hold(n_hold[n]), .max_vf(max_vf[n]),
      .n_clu_rx(n_clu_rx[n]), .clu_sent_sum(clu_sent[n]), .clu_rx_sum(clu_rx[n]),
      .mon_sent_sum(mon_sent[n]), .pending_sum(pending[n]),
      .n_sleep(n_sleep[n]));
  end

  always #2 clk_nom = ~clk_nom;

  // router arbitration: more than one input asking for one output (LMP at (2,0))
  int n_arb = 0, n_rx_held = 0;
  always @(posedge clk_nom) begin
    for (int o = 0; o < N_PORTS; o++)
      if ($countones(dut.g_y[0].g_x[2].u_pe.u_router.req[o]) > 1) n_arb++;
    if (!dut.g_y[0].g_x[2].u_pe.u_dmni.rx_empty && dut.g_y[0].g_x[2].u_pe.u_dmni.recv_status != 0) n_rx_held++;
  end

  // clock gating: PE cycles of slave (1,0) in which its processor got no edge
  int n_pe1 = 0, n_proc1 = 0;
  always @(posedge dut.g_y[0].g_x[1].u_pe.clk_pe) n_pe1++;
  always @(posedge pclk[1]) n_proc1++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int total(int a [N]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    longint sent_all, gmp_view;
    #21 rst_n = 1;
    // run 12 windows, then look in the middle of the 13th
    repeat (12 * WIN + WIN / 2) @(posedge clk_nom);
    for (int n = 0; n < N; n++) begin
      bit mgr;
      mgr = ((n % MX) % CX) == 0 && ((n / MX) % CY) == 0;
      check(n_windows[n] == 12, $sformatf("PE %0d saw %0d windows", n, n_windows[n]));
      if (!mgr) begin
        check(n_mon_sent[n] == 12, $sformatf("PE %0d sent %0d reports", n, n_mon_sent[n]));
        check(max_vf[n] >= 3, $sformatf("PE %0d reached vf-pair %0d under full load", n, max_vf[n]));
        check(rsp[n].vf_idx < vf_idx_t'(max_vf[n]), $sformatf("PE %0d scaled back up under light load", n));
        check(n_ctrl_rx[n] == n_fstep[n] + n_vstep[n] || rsp[n].vf_idx == 1,
              $sformatf("PE %0d: %0d commands, %0d steps", n, n_ctrl_rx[n], n_fstep[n] + n_vstep[n]));
      end
    end
    check(n_mon_rx[0] == 3 * 12 && n_mon_rx[2] == 3 * 12, "each manager got 36 reports");
    check(n_clu_rx[0] == 12, $sformatf("GMP got %0d cluster reports", n_clu_rx[0]));
    sent_all = 0;
    foreach (mon_sent[n]) sent_all += mon_sent[n];
    gmp_view = clu_rx[0] + pending[2];
    check(gmp_view == sent_all, $sformatf("energy hierarchy: GMP %0d + pending vs slaves %0d", gmp_view, sent_all));
    // mechanisms
    $display("hot %0d warm %0d cold %0d  fsteps %0d vsteps %0d hold cycles %0d  arbitration %0d  rx held %0d  cluster reports %0d",
             total(n_hot), total(n_warm), total(n_cold), total(n_fstep), total(n_vstep), total(n_hold),
             n_arb, n_rx_held, n_clu_rx[0]);
    check(total(n_hot) > 0, "hot zone reached");
    check(total(n_warm) > 0, "warm zone reached");
    check(total(n_cold) > 0, "cold zone reached");
    check(total(n_fstep) > 0, "period steps");
    check(total(n_vstep) > 0, "supply steps");
    check(total(n_hold) > 0, "processor held for a supply step");
    check(n_arb > 0, "router arbitration between competing packets");
    check(n_rx_held > 0, "packet waiting while the receive buffer is held");
    $display("sleeps %0d, gated processor cycles on PE 1: %0d", total(n_sleep), n_pe1 - n_proc1);
    check(total(n_sleep) > 0, "idle slaves went to sleep");
    check(n_pe1 - n_proc1 > 1000, "processor clock gated while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
