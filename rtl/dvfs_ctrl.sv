// dvfs_ctrl: voltage/frequency pair register and DVFS protocol.
//
// The processor issues UP or DOWN (the MemWrite(DVFS,UP/DOWN) system calls)
// through cmd_valid_i/cmd_i. The controller moves one step along the nine
// vf-pairs of the protocol table (rem_pkg::vf_table): DOWN goes from pair n
// to n+1, UP from n to n-1, saturating at pairs 1 and 9. Neighbouring pairs
// differ only in the clock period or only in the supply voltage. A period
// change takes effect in the clock generator at once. A voltage change is
// requested from the regulator and the processor is held (hold_o) for the
// regulator latency, rounded up to whole scaled clock cycles of the current
// period; commands arriving while held are ignored (busy_o is readable).
//
// Interface: vdd_o and period_o drive the regulator and clock generator,
// vf_idx_o is the current pair number 1..9. Reset starts at pair 1
// (1.1 V, 4.0 ns), the nominal pair.
//
// From the design description: the table, the one-step protocol, the start
// at the nominal pair and the 100 ns hold on a voltage change. Ignoring
// commands while held and saturating at the ends are this design's choices.
//
// Tool note: rst_n is also the disable condition of the a_one_knob
// assertion; Verilator reports that simulation-only use as synchronous
// (SYNCASYNCNET). The flops are reset asynchronously.
`timescale 1ns / 1ps
module dvfs_ctrl
  import rem_pkg::*;
#(
  parameter int unsigned VS_LATENCY_PS = 100_000
) (
  input  logic         clk,          // scaled processor clock
  input  logic         rst_n,
  input  logic         cmd_valid_i,
  input  dvfs_cmd_e    cmd_i,
  output vf_idx_t      vf_idx_o,
  output vdd_e         vdd_o,
  output period_code_t period_o,
  output logic         hold_o,
  output logic         busy_o,
  output logic         vdd_change_o,  // one cycle: a voltage step began
  output logic         freq_change_o  // one cycle: a period step began
);

  vf_idx_t     idx_q, idx_d;
  logic [7:0]  hold_cnt;
  vf_pair_t    cur, nxt;

  assign cur = vf_table(idx_q);
  assign nxt = vf_table(idx_d);

  always_comb begin
    idx_d = idx_q;
    if (cmd_valid_i && hold_cnt == '0) begin
      if (cmd_i == DVFS_DOWN && idx_q < vf_idx_t'(N_VF_PAIRS)) idx_d = idx_q + 1'b1;
      else if (cmd_i == DVFS_UP && idx_q > vf_idx_t'(1))       idx_d = idx_q - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q         <= vf_idx_t'(1);
      hold_cnt      <= '0;
      vdd_change_o  <= 1'b0;
      freq_change_o <= 1'b0;
    end else begin
      idx_q         <= idx_d;
      vdd_change_o  <= 1'b0;
      freq_change_o <= 1'b0;
      if (idx_d != idx_q) begin
        if (nxt.vdd != cur.vdd) begin
          hold_cnt     <= 8'(hold_cycles(VS_LATENCY_PS, cur.period));
          vdd_change_o <= 1'b1;
        end else begin
          freq_change_o <= 1'b1;
        end
      end else if (hold_cnt != '0) begin
        hold_cnt <= hold_cnt - 1'b1;
      end
    end
  end

  assign vf_idx_o = idx_q;
  assign vdd_o    = cur.vdd;
  assign period_o = cur.period;
  assign hold_o   = (hold_cnt != '0);
  assign busy_o   = hold_o;

  // The protocol never changes voltage and period in one step.
  property p_one_knob;
    @(posedge clk) disable iff (!rst_n)
      (idx_d != idx_q) |-> ((nxt.vdd == cur.vdd) != (nxt.period == cur.period));
  endproperty
  a_one_knob: assert property (p_one_knob);

endmodule
