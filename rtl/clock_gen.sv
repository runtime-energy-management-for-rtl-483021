// clock_gen: behavioural model of the PE clock generator.
//
// This is a behavioural model (not synthesizable): the real part is a
// mixed-signal clock source that produces the processor's scaled clock from
// the nominal 4 ns clock. The model outputs a 50 % duty-cycle clock with
// period 4.0 ns + 0.5 ns * period_i, i.e. 4.0 ns to 7.0 ns. It samples
// period_i at every rising edge of its own output, so a new period starts
// cleanly at a cycle boundary and no short pulse is produced. It starts at
// the first rising edge of the nominal clock, in phase with it, and runs at
// the nominal 4 ns period while rst_n is low, so that the flip-flops of the
// scaled domain see their reset.
//
// clk_gated_o is the same clock with whole cycles removed: gate_en_i is
// sampled together with period_i at the start of each cycle, and a cycle
// that starts with gate_en_i low has no pulse on clk_gated_o. The value read
// is the one before that edge's flip-flop updates, so an enable computed by a
// flop on clk_o takes effect one cycle after it changes. It feeds the
// processor, whose clock is gated while it has nothing to run; the memory and
// the DMNI stay on clk_o so that a packet can still arrive and wake it.
// During reset the gated clock runs.
//
// The period range and its 0.5 ns step, and clock gating of an idle
// processor, follow the design description; the sampling at the rising edge,
// whole-cycle gating and the start-up alignment are this model's choices.
//
// Tool note: the half-period delay is computed at run time from the period
// code, so Verilator cannot prove it non-zero (ZERODLY); it is never below
// 2000 ps. This is a simulation model and is not meant for synthesis.
`timescale 1ps / 1ps
module clock_gen
  import rem_pkg::*;
(
  input  logic         clk_nom_i,
  input  logic         rst_n,
  input  period_code_t period_i,
  input  logic         gate_en_i,
  output logic         clk_o,
  output logic         clk_gated_o
);

  int unsigned half_ps;

  initial begin
    clk_o       = 1'b0;
    clk_gated_o = 1'b0;
  end

  always begin
    clk_o       = 1'b0;
    clk_gated_o = 1'b0;
    @(posedge clk_nom_i);
    forever begin
      half_ps     = rst_n ? period_ps(period_i) / 2 : NOMINAL_PERIOD_PS / 2;
      clk_gated_o = gate_en_i || !rst_n;
      clk_o       = 1'b1;
      #(half_ps);
      clk_o       = 1'b0;
      clk_gated_o = 1'b0;
      #(half_ps);
    end
  end

endmodule
