// rem_fw: behavioural processor with the REM firmware of one PE, for the
// system testbenches.
//
// It stands in for the PE's processor: it retires instructions at a set
// activity (a task load), and runs the interrupt-driven management code of
// the PE's role, using only the PE's memory-mapped registers and memory:
//  - Slave PE: at every sampling window it reads the window energy and sends
//    a monitoring packet {MON, x, y; energy; vf-pair} to its cluster's LMP.
//    A control packet {CTRL, command} from the LMP becomes a DVFS register
//    write (UP or DOWN).
//  - LMP: for each monitoring packet it adds the energy to the cluster sum,
//    runs the REM zone check and, for the hot or cold zone, sends the UP or
//    DOWN control packet back. At every window it sends the cluster energy
//    {CLU, x, y; energy} to the GMP.
//  - GMP (the LMP at mesh position (0,0)): also adds up the cluster energies.
// Activity is HEAVY % for the first HEAVY_WINDOWS windows of a slave PE and
// LIGHT % after them (one of two tasks ending), 30 % on managers. With
// TASK_WINDOWS > 0 a slave PE has no task left after that many windows: it
// retires nothing and, whenever no interrupt is pending, writes the sleep
// register so that its clock is gated until the next interrupt.
// Statistics are outputs for the testbench to check.
`timescale 1ns / 1ps
module rem_fw
  import rem_pkg::*;
#(
  parameter int unsigned X             = 0,
  parameter int unsigned Y             = 0,
  parameter int unsigned CLUSTER_X     = 3,
  parameter int unsigned CLUSTER_Y     = 3,
  parameter int unsigned HEAVY         = 100,
  parameter int unsigned LIGHT         = 40,
  parameter int unsigned HEAVY_WINDOWS = 5,
  parameter int unsigned TASK_WINDOWS  = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  output proc_req_t req_o,
  input  proc_rsp_t rsp_i,
  output int        n_windows,
  output int        n_mon_sent,
  output int        n_mon_rx,
  output int        n_ctrl_rx,
  output int        n_hot,
  output int        n_warm,
  output int        n_cold,
  output int        n_fstep,
  output int        n_vstep,
  output int        n_hold,
  output int        max_vf,
  output int        n_clu_rx,
  output longint    clu_sent_sum,
  output longint    clu_rx_sum,
  output longint    mon_sent_sum,
  output longint    pending_sum,
  output int        n_sleep
);

  localparam bit IS_MGR = (X % CLUSTER_X) == 0 && (Y % CLUSTER_Y) == 0;
  localparam bit IS_GMP = (X == 0) && (Y == 0);
  localparam bit CAN_IDLE = !IS_MGR && TASK_WINDOWS > 0;
  localparam int LX = X - X % CLUSTER_X;
  localparam int LY = Y - Y % CLUSTER_Y;
  localparam logic [7:0] T_MON = 8'h01, T_CTRL = 8'h02, T_CLU = 8'h03;

  proc_req_t bus;
  logic retire;
  instr_class_e cls;
  longint cluster_sum;
  assign pending_sum = cluster_sum;

  assign req_o = '{en: bus.en, we: bus.we, addr: bus.addr, wdata: bus.wdata, retire: retire, cls: cls};

  // ---------------------------------------------------------------- load
  initial begin
    retire = 0;
    cls = CLS_ARITH;
    forever begin
      @(negedge clk);
      retire = rst_n && !rsp_i.hold && !(CAN_IDLE && n_windows >= TASK_WINDOWS) &&
               (($urandom % 100) < (IS_MGR ? 30 : (n_windows < HEAVY_WINDOWS) ? HEAVY : LIGHT));
      cls = instr_class_e'($urandom % 5);
    end
  end

  // ---------------------------------------------------------------- DVFS steps
  vf_idx_t prev_vf;
  initial begin
    n_fstep = 0; n_vstep = 0; n_hold = 0; max_vf = 1;
    prev_vf = 1;
    forever begin
      @(posedge clk);
      if (rst_n) begin
        if (rsp_i.vf_idx != prev_vf) begin
          // pairs 2<->3 and 5<->6 change the supply, the others the period
          if ((rsp_i.vf_idx + prev_vf == 5) || (rsp_i.vf_idx + prev_vf == 11)) n_vstep++;
          else n_fstep++;
          if (int'(rsp_i.vf_idx) > max_vf) max_vf = int'(rsp_i.vf_idx);
          prev_vf = rsp_i.vf_idx;
        end
        if (rsp_i.hold) n_hold++;
      end
    end
  end

  // ---------------------------------------------------------------- bus
  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    bus.en = 1; bus.we = 1; bus.addr = paddr_t'(a); bus.wdata = d;
    @(negedge clk);
    bus.en = 0; bus.we = 0;
  endtask

  task automatic rd(int a, output logic [31:0] d);
    @(negedge clk);
    bus.en = 1; bus.we = 0; bus.addr = paddr_t'(a);
    @(negedge clk);
    bus.en = 0;
    d = rsp_i.rdata;
  endtask

  function automatic int mmr(logic [7:0] r);
    return 32'h8000 | int'(r);
  endfunction

  task automatic send(int tx, int ty, logic [31:0] p [$]);
    logic [31:0] d;
    do rd(mmr(MMR_SEND_START), d); while (d[0]);
    wr(16'h100, make_hdr(8'(tx), 8'(ty)));
    wr(16'h101, 32'(p.size()));
    foreach (p[k]) wr(16'h102 + k, p[k]);
    wr(mmr(MMR_SEND_ADDR), 16'h100);
    wr(mmr(MMR_SEND_LEN), 32'(p.size() + 2));
    wr(mmr(MMR_SEND_START), 1);
  endtask

  task automatic on_window();
    logic [31:0] lo, hi;
    n_windows++;
    if (!IS_MGR) begin
      rd(mmr(MMR_ENERGY), lo);
      rd(mmr(MMR_ENERGY_HI), hi);
      send(LX, LY, '{{T_MON, 8'(X), 8'(Y), 8'd0}, lo, hi, 32'(rsp_i.vf_idx)});
      n_mon_sent++;
      mon_sent_sum += {hi, lo};
    end else if (!IS_GMP) begin
      send(0, 0, '{{T_CLU, 8'(X), 8'(Y), 8'd0}, cluster_sum[31:0], cluster_sum[63:32]});
      clu_sent_sum += cluster_sum;
      cluster_sum = 0;
    end
  endtask

  task automatic on_packet();
    logic [31:0] w0, lo, hi, d;
    rd(16'h202, w0);
    unique case (w0[31:24])
      T_MON: begin
        rd(16'h203, lo);
        rd(16'h204, hi);
        n_mon_rx++;
        cluster_sum += {hi, lo};
        if (IS_GMP) clu_rx_sum += {hi, lo};
        wr(mmr(MMR_REM_ENERGY), lo);
        wr(mmr(MMR_REM_ENERGY_HI), hi);
        rd(mmr(MMR_REM_RESULT), d);
        unique case (zone_e'(d[5:4]))
          ZONE_HOT:  n_hot++;
          ZONE_COLD: n_cold++;
          default:   n_warm++;
        endcase
        if (dvfs_cmd_e'(d[1:0]) != DVFS_NONE)
          send(int'(w0[23:16]), int'(w0[15:8]), '{{T_CTRL, 22'd0, d[1:0]}});
      end
      T_CTRL: begin
        n_ctrl_rx++;
        wr(mmr(MMR_DVFS), {30'd0, w0[1:0]});
      end
      T_CLU: begin
        rd(16'h203, lo);
        rd(16'h204, hi);
        n_clu_rx++;
        clu_rx_sum += {hi, lo};
      end
      default: ;
    endcase
  endtask

  initial begin
    logic [31:0] d;
    bus = '0;
    n_windows = 0; n_mon_sent = 0; n_mon_rx = 0; n_ctrl_rx = 0;
    n_hot = 0; n_warm = 0; n_cold = 0; n_clu_rx = 0;
    clu_sent_sum = 0; clu_rx_sum = 0; mon_sent_sum = 0; cluster_sum = 0;
    n_sleep = 0;
    wait (rst_n);
    wr(mmr(MMR_RECV_ADDR), 16'h200);
    forever begin
      @(negedge clk);
      if (rsp_i.irq) begin
        rd(mmr(MMR_TIMER), d);
        if (d[0]) begin
          wr(mmr(MMR_TIMER), 0);
          on_window();
        end
        rd(mmr(MMR_RECV_STATUS), d);
        if (d != 0) begin
          on_packet();
          wr(mmr(MMR_RECV_STATUS), 0);
        end
      end else if (CAN_IDLE && n_windows >= TASK_WINDOWS) begin
        wr(mmr(MMR_SLEEP), 1);
        n_sleep++;
      end
    end
  end

endmodule
