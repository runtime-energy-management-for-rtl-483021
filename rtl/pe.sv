// pe: processing element with fine-grain DVFS support.
//
// One tile of the many-core. The router and the nominal halves of the DMNI
// run on the nominal 4 ns clock, so packets always cross the NoC at full
// speed. Everything the processor touches runs on the PE's own scaled clock,
// produced by clock_gen from the present vf-pair: the scratchpad memory, the
// scaled halves of the DMNI, the memory-mapped registers, the DVFS
// controller, the instruction counters, the energy estimator and, in manager
// PEs, the REM zone check. The voltage regulator model follows the supply
// level chosen by the DVFS controller.
//
// The processor itself is outside this module: it is clocked by proc_clk_o
// and talks through proc_req_i/proc_rsp_o. A word address with bit 15 set
// selects a register (rem_pkg MMR_*), otherwise the scratchpad; read data
// returns the cycle after the access. proc_rsp_o.irq is high while a received
// packet waits in memory or a sampling window has closed (cleared by writing
// MMR_TIMER). proc_rsp_o.hold is high while the supply voltage changes.
// Writing MMR_SLEEP gates proc_clk_o off until an interrupt is pending; the
// access the processor issues right after that write is still carried out,
// but the result of a read there is not kept for it.
//
// The sampling timer counts nominal cycles; its window toggle crosses into
// the scaled domain through a two-flop synchroniser and there closes the
// energy window.
//
// The split between nominal and scaled domains, the DMNI with bisynchronous
// FIFOs, the clock generator, the counters per instruction class, the
// nominal-clock sampling timer, clock gating of an idle processor and the
// DVFS system calls as register writes follow the design description. The
// register map, the synchroniser, the sleep register and the hardware energy
// and REM units are this design's choices.
//
// Tool notes: the regulator's actual level and settled flag, the controller's
// vdd/freq change strobes, the estimator's valid strobe and the timer's
// single-cycle tick are not needed inside the PE (the energy is charged at
// the requested level and the window reaches the scaled domain through the
// toggle output); Verilator lists them as unused or as an empty pin. rst_n
// also reaches the behavioural clock and regulator models and assertion
// disable conditions, which Verilator counts as a synchronous use
// (SYNCASYNCNET); every flop is reset asynchronously.
`timescale 1ns / 1ps
module pe
  import rem_pkg::*;
#(
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter bit          IS_MANAGER = 1'b0,
  parameter int unsigned WINDOW     = 200_000,
  parameter int unsigned VH_PCT     = 85,
  parameter int unsigned VL_PCT     = 60,
  parameter int unsigned PAGES      = 4,
  parameter int unsigned PAGE_WORDS = 4096,
  parameter int unsigned BUF_DEPTH  = 8,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic         clk_nom,
  input  logic         rst_n,
  // mesh links, index = PORT_EAST..PORT_SOUTH
  input  logic  [3:0]  link_in_valid_i,
  input  flit_t [3:0]  link_in_data_i,
  output logic  [3:0]  link_in_credit_o,
  output logic  [3:0]  link_out_valid_o,
  output flit_t [3:0]  link_out_data_o,
  input  logic  [3:0]  link_out_credit_i,
  // processor
  output logic         proc_clk_o,
  input  proc_req_t    proc_req_i,
  output proc_rsp_t    proc_rsp_o,
  // observation
  output logic [10:0]  vdd_mv_o
);

  localparam int unsigned MEM_AW = $clog2(PAGES * PAGE_WORDS);

  logic clk_pe, clk_proc;

  // ------------------------------------------------------------ clock gating
  // Writing MMR_SLEEP stops the processor clock until an interrupt is
  // pending. The clock generator reads sleep_q before each edge's update, so
  // the processor gets one more cycle after the write and wakes one cycle
  // after the interrupt rises. ran_q says whether the processor was clocked
  // at the start of the present cycle, i.e. whether its request is new; a
  // request left on the bus while it is stopped is ignored.
  logic      sleep_q, ran_q, irq;
  proc_req_t preq;

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      sleep_q <= 1'b0;
      ran_q   <= 1'b1;
    end else begin
      ran_q <= !sleep_q;
      if (irq)
        sleep_q <= 1'b0;
      else if (preq.en && preq.we && preq.addr[PADDR_W-1] && preq.addr[7:0] == MMR_SLEEP)
        sleep_q <= 1'b1;
    end
  end

  always_comb begin
    preq        = proc_req_i;
    preq.en     = proc_req_i.en && ran_q;
    preq.retire = proc_req_i.retire && ran_q;
  end

  // ------------------------------------------------------------ router
  logic  [N_PORTS-1:0] r_in_valid, r_in_credit, r_out_valid, r_out_credit;
  flit_t [N_PORTS-1:0] r_in_data, r_out_data;

  assign r_in_valid[3:0]   = link_in_valid_i;
  assign r_in_data[3:0]    = link_in_data_i;
  assign link_in_credit_o  = r_in_credit[3:0];
  assign link_out_valid_o  = r_out_valid[3:0];
  assign link_out_data_o   = r_out_data[3:0];
  assign r_out_credit[3:0] = link_out_credit_i;

  router #(.MY_X(MY_X), .MY_Y(MY_Y), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk          (clk_nom),
    .rst_n        (rst_n),
    .in_valid_i   (r_in_valid),
    .in_data_i    (r_in_data),
    .in_credit_o  (r_in_credit),
    .out_valid_o  (r_out_valid),
    .out_data_o   (r_out_data),
    .out_credit_i (r_out_credit)
  );

  // ------------------------------------------------------------ register decode
  logic       mmr_sel, mmr_we;
  logic [7:0] mmr_addr;

  assign mmr_sel  = preq.en && preq.addr[PADDR_W-1];
  assign mmr_we   = mmr_sel && preq.we;
  assign mmr_addr = preq.addr[7:0];

  // ------------------------------------------------------------ DMNI + memory
  logic              dm_en, dm_we;
  logic [MEM_AW-1:0] dm_addr;
  logic [31:0]       dm_wdata, dm_rdata, dmni_rdata, mem_rdata;
  logic              dmni_irq;

  dmni #(.MEM_AW(MEM_AW), .FIFO_DEPTH(FIFO_DEPTH)) u_dmni (
    .clk_nom          (clk_nom),
    .clk_pe           (clk_pe),
    .rst_n            (rst_n),
    .noc_in_valid_i   (r_out_valid[PORT_LOCAL]),
    .noc_in_data_i    (r_out_data[PORT_LOCAL]),
    .noc_in_credit_o  (r_out_credit[PORT_LOCAL]),
    .noc_out_valid_o  (r_in_valid[PORT_LOCAL]),
    .noc_out_data_o   (r_in_data[PORT_LOCAL]),
    .noc_out_credit_i (r_in_credit[PORT_LOCAL]),
    .mmr_we_i         (mmr_we),
    .mmr_addr_i       (mmr_addr),
    .mmr_wdata_i      (preq.wdata),
    .mmr_rdata_o      (dmni_rdata),
    .irq_o            (dmni_irq),
    .mem_en_o         (dm_en),
    .mem_we_o         (dm_we),
    .mem_addr_o       (dm_addr),
    .mem_wdata_o      (dm_wdata),
    .mem_rdata_i      (dm_rdata)
  );

  scratchpad #(.PAGES(PAGES), .PAGE_WORDS(PAGE_WORDS)) u_mem (
    .clk       (clk_pe),
    .a_en_i    (preq.en && !preq.addr[PADDR_W-1]),
    .a_we_i    (preq.we),
    .a_addr_i  (preq.addr[MEM_AW-1:0]),
    .a_wdata_i (preq.wdata),
    .a_rdata_o (mem_rdata),
    .b_en_i    (dm_en),
    .b_we_i    (dm_we),
    .b_addr_i  (dm_addr),
    .b_wdata_i (dm_wdata),
    .b_rdata_o (dm_rdata)
  );

  // ------------------------------------------------------------ DVFS
  vf_idx_t      vf_idx;
  vdd_e         vdd_sel, vdd_act;
  period_code_t period;
  logic         dvfs_hold, dvfs_busy, vdd_settled;
  logic         dvfs_vchg, dvfs_fchg;

  dvfs_ctrl u_dvfs (
    .clk           (clk_pe),
    .rst_n         (rst_n),
    .cmd_valid_i   (mmr_we && mmr_addr == MMR_DVFS),
    .cmd_i         (dvfs_cmd_e'(preq.wdata[1:0])),
    .vf_idx_o      (vf_idx),
    .vdd_o         (vdd_sel),
    .period_o      (period),
    .hold_o        (dvfs_hold),
    .busy_o        (dvfs_busy),
    .vdd_change_o  (dvfs_vchg),
    .freq_change_o (dvfs_fchg)
  );

  clock_gen u_clkgen (
    .clk_nom_i (clk_nom),
    .rst_n     (rst_n),
    .period_i    (period),
    .gate_en_i   (!sleep_q),
    .clk_o       (clk_pe),
    .clk_gated_o (clk_proc)
  );

  voltage_regulator u_vreg (
    .rst_n     (rst_n),
    .vdd_req_i (vdd_sel),
    .vdd_o     (vdd_act),
    .settled_o (vdd_settled),
    .vdd_mv_o  (vdd_mv_o)
  );

  // ------------------------------------------------------------ monitoring
  logic tick_tgl;
  logic [2:0] tick_sync;
  logic window, timer_pending;

  sampling_timer #(.WINDOW(WINDOW)) u_timer (
    .clk_nom       (clk_nom),
    .rst_n         (rst_n),
    .tick_o        (),
    .tick_toggle_o (tick_tgl)
  );

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) tick_sync <= '0;
    else        tick_sync <= {tick_sync[1:0], tick_tgl};
  end
  assign window = tick_sync[2] ^ tick_sync[1];

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n)                                   timer_pending <= 1'b0;
    else if (window)                              timer_pending <= 1'b1;
    else if (mmr_we && mmr_addr == MMR_TIMER)     timer_pending <= 1'b0;
  end

  logic [N_CLASSES-1:0][31:0] counts;
  instr_counters #(.NCLS(N_CLASSES), .CNT_W(32)) u_cnt (
    .clk      (clk_pe),
    .rst_n    (rst_n),
    .retire_i (preq.retire),
    .class_i  (preq.cls),
    .clear_i  (mmr_we && mmr_addr == MMR_COUNT_BASE),
    .count_o  (counts)
  );

  energy_t energy;
  logic    energy_valid;
  energy_estimator u_energy (
    .clk      (clk_pe),
    .rst_n    (rst_n),
    .retire_i (preq.retire),
    .class_i  (preq.cls),
    .vdd_i    (vdd_sel),
    .period_i (period),
    .window_i (window),
    .energy_o (energy),
    .valid_o  (energy_valid)
  );

  // ------------------------------------------------------------ REM (managers)
  logic [31:0] rem_result;
  if (IS_MANAGER) begin : g_rem
    logic [31:0] e_lo;
    logic        rv, rvalid;
    zone_e       zone;
    dvfs_cmd_e   cmd;

    always_ff @(posedge clk_pe or negedge rst_n) begin
      if (!rst_n)                                   e_lo <= '0;
      else if (mmr_we && mmr_addr == MMR_REM_ENERGY) e_lo <= preq.wdata;
    end

    rem_zone #(.WINDOW(WINDOW), .VH_PCT(VH_PCT), .VL_PCT(VL_PCT)) u_rem (
      .clk            (clk_pe),
      .rst_n          (rst_n),
      .energy_valid_i (mmr_we && mmr_addr == MMR_REM_ENERGY_HI),
      .energy_i       ({preq.wdata[ENERGY_W-33:0], e_lo}),
      .result_valid_o (rv),
      .zone_o         (zone),
      .cmd_o          (cmd)
    );

    always_ff @(posedge clk_pe or negedge rst_n) begin
      if (!rst_n)                                      rvalid <= 1'b0;
      else if (mmr_we && mmr_addr == MMR_REM_ENERGY_HI) rvalid <= 1'b0;
      else if (rv)                                     rvalid <= 1'b1;
    end
    assign rem_result = {23'd0, rvalid, 2'd0, zone, 2'd0, cmd};
  end else begin : g_no_rem
    assign rem_result = '0;
  end

  // ------------------------------------------------------------ register read
  logic [31:0] mmr_rdata, mmr_q;
  logic        mmr_rd_q;

  always_comb begin
    mmr_rdata = dmni_rdata;
    unique case (mmr_addr)
      MMR_DVFS:       mmr_rdata = {19'd0, dvfs_busy, 2'd0, vdd_sel, 1'b0, period, vf_idx};
      MMR_TIMER:      mmr_rdata = {31'd0, timer_pending};
      MMR_ENERGY:     mmr_rdata = energy[31:0];
      MMR_ENERGY_HI:  mmr_rdata = 32'(energy[ENERGY_W-1:32]);
      MMR_REM_RESULT: mmr_rdata = rem_result;
      MMR_PE_ID:      mmr_rdata = {16'd0, 8'(MY_X), 8'(MY_Y)};
      default:
        if (mmr_addr >= MMR_COUNT_BASE && mmr_addr < MMR_COUNT_BASE + 8'(N_CLASSES))
          mmr_rdata = counts[mmr_addr - MMR_COUNT_BASE];
    endcase
  end

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      mmr_q    <= '0;
      mmr_rd_q <= 1'b0;
    end else begin
      mmr_rd_q <= mmr_sel;
      if (mmr_sel) mmr_q <= mmr_rdata;
    end
  end

  assign irq               = dmni_irq || timer_pending;
  assign proc_clk_o        = clk_proc;
  assign proc_rsp_o.rdata  = mmr_rd_q ? mmr_q : mem_rdata;
  assign proc_rsp_o.irq    = irq;
  assign proc_rsp_o.hold   = dvfs_hold;
  assign proc_rsp_o.vf_idx = vf_idx;

endmodule
