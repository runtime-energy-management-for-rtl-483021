// rem_pkg: types and constants shared by the runtime energy management (REM)
// many-core.
//
// It holds the DVFS protocol table (nine voltage/frequency pairs, three supply
// levels and seven clock periods from 4.0 ns to 7.0 ns in 0.5 ns steps), the
// NoC flit format, the PE memory map seen by the processor, and the helper
// functions that derive hold times and the REM energy budget from those tables.
//
// The vf-pair table, the three voltages, the 4 ns nominal period, the 100 ns
// voltage scaling latency and the 10 % regulator overhead follow the design
// description. The flit width, header layout, memory map and the per-class
// energy numbers are this design's own choices.
`timescale 1ns / 1ps
package rem_pkg;

  // ---------------------------------------------------------------- NoC
  localparam int unsigned FLIT_W = 32;
  typedef logic [FLIT_W-1:0] flit_t;

  // Router port order.
  typedef enum logic [2:0] {
    PORT_EAST  = 3'd0,
    PORT_WEST  = 3'd1,
    PORT_NORTH = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_LOCAL = 3'd4
  } port_e;
  localparam int unsigned N_PORTS = 5;

  // A packet is: header flit (target x in [15:8], target y in [7:0]),
  // size flit (number of payload flits that follow), payload flits.
  function automatic logic [7:0] hdr_x(flit_t f);
    return f[15:8];
  endfunction
  function automatic logic [7:0] hdr_y(flit_t f);
    return f[7:0];
  endfunction
  function automatic flit_t make_hdr(logic [7:0] x, logic [7:0] y);
    return {16'h0, x, y};
  endfunction

  // ---------------------------------------------------------------- DVFS
  typedef enum logic [1:0] {
    VDD_1V1 = 2'd0,
    VDD_1V0 = 2'd1,
    VDD_0V9 = 2'd2
  } vdd_e;

  // Clock period code: period = 4.0 ns + 0.5 ns * code, code 0..6.
  typedef logic [2:0] period_code_t;
  localparam int unsigned NOMINAL_PERIOD_PS = 4000;
  localparam int unsigned PERIOD_STEP_PS    = 500;

  typedef struct packed {
    vdd_e         vdd;
    period_code_t period;
  } vf_pair_t;

  localparam int unsigned N_VF_PAIRS = 9;
  typedef logic [3:0] vf_idx_t;  // 1..9 as numbered in the protocol

  // vf-pair n (1..9). Ascending n scales down, descending n scales up;
  // neighbours differ in the voltage or in the period, never in both.
  function automatic vf_pair_t vf_table(vf_idx_t n);
    unique case (n)
      4'd1:    return '{VDD_1V1, 3'd0};  // 1.1 V, 4.0 ns
      4'd2:    return '{VDD_1V1, 3'd1};  // 1.1 V, 4.5 ns
      4'd3:    return '{VDD_1V0, 3'd1};  // 1.0 V, 4.5 ns
      4'd4:    return '{VDD_1V0, 3'd2};  // 1.0 V, 5.0 ns
      4'd5:    return '{VDD_1V0, 3'd3};  // 1.0 V, 5.5 ns
      4'd6:    return '{VDD_0V9, 3'd3};  // 0.9 V, 5.5 ns
      4'd7:    return '{VDD_0V9, 3'd4};  // 0.9 V, 6.0 ns
      4'd8:    return '{VDD_0V9, 3'd5};  // 0.9 V, 6.5 ns
      default: return '{VDD_0V9, 3'd6};  // 9: 0.9 V, 7.0 ns
    endcase
  endfunction

  function automatic int unsigned period_ps(period_code_t c);
    return NOMINAL_PERIOD_PS + PERIOD_STEP_PS * int'(c);
  endfunction

  // Scaled clock cycles the processor is held for a voltage change of
  // latency_ps at clock period code c (rounded up).
  function automatic int unsigned hold_cycles(int unsigned latency_ps, period_code_t c);
    return (latency_ps + period_ps(c) - 1) / period_ps(c);
  endfunction

  typedef enum logic [1:0] {
    DVFS_NONE = 2'd0,
    DVFS_UP   = 2'd1,
    DVFS_DOWN = 2'd2
  } dvfs_cmd_e;

  typedef enum logic [1:0] {
    ZONE_COLD = 2'd0,
    ZONE_WARM = 2'd1,
    ZONE_HOT  = 2'd2
  } zone_e;

  // ---------------------------------------------------------------- energy
  // Instruction classes (one counter each).
  localparam int unsigned N_CLASSES = 5;
  typedef enum logic [2:0] {
    CLS_ARITH  = 3'd0,
    CLS_LOGIC  = 3'd1,
    CLS_LOAD   = 3'd2,
    CLS_STORE  = 3'd3,
    CLS_BRANCH = 3'd4
  } instr_class_e;

  localparam int unsigned ENERGY_W = 40;
  typedef logic [ENERGY_W-1:0] energy_t;

  // Energy per instruction of each class at 1.1 V, in femtojoules. The lower
  // voltages scale it by V^2 (x 100/121 and x 81/121).
  function automatic int unsigned e_class_fj(instr_class_e c, vdd_e v);
    int unsigned e11;
    unique case (c)
      CLS_ARITH:  e11 = 24200;
      CLS_LOGIC:  e11 = 21780;
      CLS_LOAD:   e11 = 36300;
      CLS_STORE:  e11 = 33880;
      default:    e11 = 26620;  // branch
    endcase
    unique case (v)
      VDD_1V1: return e11;
      VDD_1V0: return e11 * 100 / 121;
      default: return e11 * 81 / 121;
    endcase
  endfunction

  // Leakage energy per nominal clock tick (4 ns), in femtojoules.
  function automatic int unsigned e_leak_fj(vdd_e v);
    unique case (v)
      VDD_1V1: return 2200;
      VDD_1V0: return 1600;
      default: return 1100;
    endcase
  endfunction

  // Per-instruction energy with the 10 % on-chip regulator overhead added.
  function automatic int unsigned e_class_dvfs_fj(instr_class_e c, vdd_e v);
    return e_class_fj(c, v) + e_class_fj(c, v) / 10;
  endfunction

  // Equation (1): E_max = n_cycles * (mean(E_class) + E_leak), at nominal vf-pair.
  function automatic energy_t e_max_fj(int unsigned n_cycles);
    energy_t sum;
    sum = '0;
    for (int i = 0; i < N_CLASSES; i++)
      sum += energy_t'(e_class_dvfs_fj(instr_class_e'(i), VDD_1V1));
    return energy_t'(n_cycles) * (sum / energy_t'(N_CLASSES) + energy_t'(e_leak_fj(VDD_1V1)));
  endfunction

  // ---------------------------------------------------------------- memory map
  // Processor word addresses. Bit 15 set selects the memory-mapped registers.
  localparam int unsigned PADDR_W = 16;
  typedef logic [PADDR_W-1:0] paddr_t;
  localparam logic [7:0] MMR_SEND_ADDR   = 8'h00;  // W: memory address of packet to send
  localparam logic [7:0] MMR_SEND_LEN    = 8'h01;  // W: packet length in flits
  localparam logic [7:0] MMR_SEND_START  = 8'h02;  // W: start;  R: send busy
  localparam logic [7:0] MMR_RECV_ADDR   = 8'h03;  // W: receive buffer address
  localparam logic [7:0] MMR_RECV_STATUS = 8'h04;  // R: length of stored packet (0: none); W: release
  localparam logic [7:0] MMR_DVFS        = 8'h08;  // W: 1 = UP, 2 = DOWN;  R: {busy, vdd, period, vf index}
  localparam logic [7:0] MMR_TIMER       = 8'h09;  // R: window pending;  W: clear
  localparam logic [7:0] MMR_ENERGY      = 8'h0A;  // R: energy of last window (fJ, low 32 bits)
  localparam logic [7:0] MMR_ENERGY_HI   = 8'h0B;  // R: energy of last window, high bits
  localparam logic [7:0] MMR_REM_ENERGY  = 8'h0C;  // W: SP energy (low 32 bits) for the zone check
  localparam logic [7:0] MMR_REM_ENERGY_HI = 8'h0D;  // W: high bits, starts the check
  localparam logic [7:0] MMR_REM_RESULT  = 8'h0E;  // R: {valid, zone, command}
  localparam logic [7:0] MMR_SLEEP       = 8'h0F;  // W: stop the processor clock until irq
  localparam logic [7:0] MMR_COUNT_BASE  = 8'h10;  // R: instruction counter of class i at 0x10 + i
  localparam logic [7:0] MMR_PE_ID       = 8'h1F;  // R: {x, y} of this PE

  // Processor-side bundle of one PE (scaled clock domain).
  typedef struct packed {
    logic         en;       // memory or register access
    logic         we;
    paddr_t       addr;     // word address
    logic [31:0]  wdata;
    logic         retire;   // an instruction retired this cycle
    instr_class_e cls;      // its class
  } proc_req_t;

  typedef struct packed {
    logic [31:0]  rdata;    // read data, the cycle after the access
    logic         irq;      // DMNI packet stored or sampling window closed
    logic         hold;     // processor must stall (voltage change)
    vf_idx_t      vf_idx;   // present vf-pair
  } proc_rsp_t;

endpackage
