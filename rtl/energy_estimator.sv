// energy_estimator: energy of the PE over each sampling window.
//
// Each retired instruction adds the energy of its class at the present supply
// voltage, raised by 10 % for the on-chip regulator overhead
// (rem_pkg::e_class_dvfs_fj). Each scaled clock cycle, held or not, adds the
// leakage of that cycle: the leakage per nominal 4 ns tick at the present
// voltage, stretched by the present period. When window_i pulses (end of a
// sampling window, already in this clock domain) the sum is copied to
// energy_o, valid_o pulses for one cycle, and the sum restarts with the
// energy of that same cycle.
//
// Timing: energy_o is updated the cycle after window_i. Everything runs on the
// scaled processor clock, in femtojoules.
//
// The per-class energies, the per-voltage characterisation, the leakage term
// and the 10 % overhead follow the design description, where this sum is
// computed by operating system code from the instruction counters. Doing it
// in hardware per instruction, and the energy numbers themselves, are this
// design's choices.
`timescale 1ns / 1ps
module energy_estimator
  import rem_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         retire_i,
  input  instr_class_e class_i,
  input  vdd_e         vdd_i,
  input  period_code_t period_i,
  input  logic         window_i,
  output energy_t      energy_o,
  output logic         valid_o
);

  energy_t acc, step;

  always_comb begin
    step = energy_t'(e_leak_fj(vdd_i)) * energy_t'(period_ps(period_i)) / energy_t'(NOMINAL_PERIOD_PS);
    if (retire_i)
      step = step + energy_t'(e_class_dvfs_fj(class_i, vdd_i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      energy_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= window_i;
      if (window_i) begin
        energy_o <= acc;
        acc      <= step;
      end else begin
        acc <= acc + step;
      end
    end
  end

endmodule
