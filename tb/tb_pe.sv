// tb_pe: one manager PE, driven by a processor model on its scaled clock.
//  - sends a packet to itself through the router's local port and checks it
//    arrives in the receive buffer, with the DMNI interrupt and length;
//  - retires a known instruction mix and reads the per-class counters;
//  - waits for sampling-window interrupts (window shortened to 400 nominal
//    cycles) and reads the window energy at full activity at vf-pairs 1 and 2:
//    the ratio must match a 4.0 -> 4.5 ns period change;
//  - issues DVFS DOWN twice: the first step changes only the clock period
//    (measured 4.5 ns), the second only the supply, with the processor held
//    for 23 cycles and the regulator reaching 1.0 V 100 ns later;
//  - gives the REM unit a hot, a warm and a cold energy;
//  - puts the processor to sleep: its clock must stop while the PE clock
//    runs on, and restart two PE cycles after the next window interrupt.
`timescale 1ns / 1ps
module tb_pe;
  import rem_pkg::*;
  localparam int WIN = 400;
  logic clk_nom = 0, rst_n = 0, pclk;
  logic  [3:0] lin_valid = '0, lin_credit, lout_valid, lout_credit = '0;
  flit_t [3:0] lin_data = '0, lout_data;
  proc_req_t req;
  proc_rsp_t rsp;
  logic [10:0] mv;
  int checks = 0, failures = 0;
  realtime t_hold = 0, t_mv = 0;
  always @(posedge rsp.hold) t_hold = $realtime;
  int n_pe = 0, n_proc = 0, pe_at_irq = 0;
  always @(posedge dut.clk_pe) n_pe++;
  always @(posedge pclk) n_proc++;
  always @(posedge rsp.irq) pe_at_irq = n_pe;

  pe #(.MY_X(0), .MY_Y(0), .IS_MANAGER(1'b1), .WINDOW(WIN), .PAGES(4), .PAGE_WORDS(256)) dut (
    .clk_nom(clk_nom), .rst_n(rst_n),
    .link_in_valid_i(lin_valid), .link_in_data_i(lin_data), .link_in_credit_o(lin_credit),
    .link_out_valid_o(lout_valid), .link_out_data_o(lout_data), .link_out_credit_i(lout_credit),
    .proc_clk_o(pclk), .proc_req_i(req), .proc_rsp_o(rsp), .vdd_mv_o(mv));

  always #2 clk_nom = ~clk_nom;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(int a, logic [31:0] d);
    @(negedge pclk);
    req.en = 1; req.we = 1; req.addr = paddr_t'(a); req.wdata = d;
    @(negedge pclk);
    req.en = 0; req.we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge pclk);
    req.en = 1; req.we = 0; req.addr = paddr_t'(a);
    @(negedge pclk);
    req.en = 0;
    d = rsp.rdata;
  endtask

  function automatic int mmr(logic [7:0] r);
    return 32'h8000 | int'(r);
  endfunction

  // run n cycles retiring one instruction per cycle, classes in turn
  task automatic run(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge pclk);
      req.retire = !rsp.hold;
      req.cls = instr_class_e'(i % 5);
    end
    @(negedge pclk) req.retire = 0;
  endtask

  task automatic wait_window(output longint e);
    logic [31:0] d, hi;
    do rd(mmr(MMR_TIMER), d); while (!d[0]);
    wr(mmr(MMR_TIMER), 0);
    rd(mmr(MMR_ENERGY), d);
    rd(mmr(MMR_ENERGY_HI), hi);
    e = {hi, d};
  endtask

  initial begin
    logic [31:0] d;
    longint e1, e2;
    realtime t0, t1;
    int held;
    req = '0;
    #20 rst_n = 1;

    rd(mmr(MMR_PE_ID), d);
    check(d == 0, "PE id (0,0)");

    // ---- loopback packet
    wr(16'h100, make_hdr(0, 0));
    wr(16'h101, 4);
    for (int k = 0; k < 4; k++) wr(16'h102 + k, 32'hC0DE_0000 + k);
    wr(mmr(MMR_RECV_ADDR), 16'h200);
    wr(mmr(MMR_SEND_ADDR), 16'h100);
    wr(mmr(MMR_SEND_LEN), 6);
    wr(mmr(MMR_SEND_START), 1);
    d = 0;
    for (int i = 0; i < 200 && !(rsp.irq && d != 0); i++) rd(mmr(MMR_RECV_STATUS), d);
    check(d == 6, $sformatf("loopback packet of 6 flits stored (status %0d)", d));
    for (int k = 0; k < 4; k++) begin
      rd(16'h202 + k, d);
      check(d == 32'hC0DE_0000 + k, "loopback payload");
    end
    wr(mmr(MMR_RECV_STATUS), 0);

    // ---- counters: 50 instructions, 10 of each class
    wr(mmr(MMR_COUNT_BASE), 0);
    run(50);
    for (int c = 0; c < 5; c++) begin
      rd(mmr(MMR_COUNT_BASE) + c, d);
      check(d == 10, $sformatf("class %0d count %0d", c, d));
    end

    // ---- window energy at full activity, vf-pair 1 then 2
    wait_window(e1);
    fork run(3 * WIN); join_none
    wait_window(e1);
    wait_window(e1);
    disable fork;
    // DVFS DOWN: period only
    wr(mmr(MMR_DVFS), DVFS_DOWN);
    rd(mmr(MMR_DVFS), d);
    check(d[3:0] == 2 && d[6:4] == 1 && d[9:8] == 0 && !rsp.hold, "vf-pair 2: 1.1 V, 4.5 ns, no hold");
    @(posedge pclk) t0 = $realtime;
    @(posedge pclk) t1 = $realtime;
    check(t1 - t0 > 4.499 && t1 - t0 < 4.501, $sformatf("scaled clock period %0.3f ns", t1 - t0));
    wait_window(e2);
    fork run(3 * WIN); join_none
    wait_window(e2);
    wait_window(e2);
    disable fork;
    // Full activity: dynamic 31411 fJ per cycle at 4 ns; the 4.5 ns window
    // has 8/9 of the cycles; leakage per nominal tick is unchanged.
    check(e2 < e1, "energy drops after the frequency step");
    begin
      real r, r_exp;
      r = real'(e2) / real'(e1);
      r_exp = (31411.0 * 8.0 / 9.0 + 2200.0) / (31411.0 + 2200.0);
      check(r > r_exp - 0.02 && r < r_exp + 0.02, $sformatf("energy ratio %0.3f, expected %0.3f", r, r_exp));
    end
    // DVFS DOWN: voltage only, processor held for ceil(100 / 4.5) = 23 cycles
    fork begin wait (mv == 1000); t_mv = $realtime; end join_none
    wr(mmr(MMR_DVFS), DVFS_DOWN);
    t0 = $realtime;
    held = 0;
    while (rsp.hold) begin @(negedge pclk); held++; end
    check(held >= 22 && held <= 23, $sformatf("held %0d cycles", held));
    rd(mmr(MMR_DVFS), d);
    check(d[3:0] == 3 && d[9:8] == 1 && d[6:4] == 1, "vf-pair 3: 1.0 V, 4.5 ns");
    wait (mv == 1000);
    #0.01;
    check(t_mv - t_hold > 99.9 && t_mv - t_hold < 100.1, $sformatf("regulator at 1.0 V %0.1f ns after the step", t_mv - t_hold));

    // ---- REM unit: E_max(400) = 400 * 33611 = 13,444,400 fJ
    wr(mmr(MMR_REM_ENERGY), 13_000_000); wr(mmr(MMR_REM_ENERGY_HI), 0);
    rd(mmr(MMR_REM_RESULT), d);
    check(d[8] && d[5:4] == ZONE_HOT && d[1:0] == DVFS_DOWN, "hot -> DOWN");
    wr(mmr(MMR_REM_ENERGY), 10_000_000); wr(mmr(MMR_REM_ENERGY_HI), 0);
    rd(mmr(MMR_REM_RESULT), d);
    check(d[8] && d[5:4] == ZONE_WARM && d[1:0] == DVFS_NONE, "warm -> none");
    wr(mmr(MMR_REM_ENERGY), 5_000_000); wr(mmr(MMR_REM_ENERGY_HI), 0);
    rd(mmr(MMR_REM_RESULT), d);
    check(d[8] && d[5:4] == ZONE_COLD && d[1:0] == DVFS_UP, "cold -> UP");

    // clock gating
    begin
      int pe0, proc0;
      wr(mmr(MMR_TIMER), 0);
      check(!rsp.irq, "no interrupt pending before sleep");
      pe0 = n_pe; proc0 = n_proc;
      wr(mmr(MMR_SLEEP), 1);
      @(negedge pclk);
      check(rsp.irq, "woken by an interrupt");
      check((n_pe - pe0) - (n_proc - proc0) > 20, "processor clock stopped while asleep");
      check(n_pe - pe_at_irq == 2, "wake two cycles after the interrupt");
      $display("asleep for %0d PE cycles, woke %0d after irq", (n_pe - pe0) - (n_proc - proc0), n_pe - pe_at_irq);
    end

    $display("e1 %0d e2 %0d", e1, e2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
