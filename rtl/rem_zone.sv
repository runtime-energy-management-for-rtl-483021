// rem_zone: the REM decision of a manager PE for one slave PE report.
//
// The energy budget E_max of a sampling window (equation (1): window cycles
// times the mean per-class energy plus the leakage per cycle, at the nominal
// vf-pair) is a constant of the design. A reported window energy E is in the
// hot zone when E > VH_PCT % of E_max, in the cold zone when E < VL_PCT % of
// E_max, and warm otherwise. Hot answers DOWN (scale the vf-pair down one
// step), cold answers UP, warm answers nothing.
//
// Interface: energy_valid_i/energy_i deliver one report; one cycle later
// result_valid_o pulses with zone_o and cmd_o, which hold until the next
// report. Runs on the manager PE's scaled clock.
//
// The zones, the {85 %, 60 %} default ("light REM") and the UP/DOWN answers
// follow the design description, where this runs as manager software; the
// hardware form is this design's choice.
`timescale 1ns / 1ps
module rem_zone
  import rem_pkg::*;
#(
  parameter int unsigned WINDOW = 200_000,
  parameter int unsigned VH_PCT = 85,
  parameter int unsigned VL_PCT = 60
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      energy_valid_i,
  input  energy_t   energy_i,
  output logic      result_valid_o,
  output zone_e     zone_o,
  output dvfs_cmd_e cmd_o
);

  localparam int unsigned CW = ENERGY_W + 8;
  localparam logic [CW-1:0] E_MAX = CW'(e_max_fj(WINDOW));
  localparam logic [CW-1:0] HOT_LIM  = E_MAX * CW'(VH_PCT);
  localparam logic [CW-1:0] COLD_LIM = E_MAX * CW'(VL_PCT);

  logic [CW-1:0] e100;
  zone_e         zone_d;

  assign e100 = CW'(energy_i) * CW'(100);

  always_comb begin
    if (e100 > HOT_LIM)       zone_d = ZONE_HOT;
    else if (e100 < COLD_LIM) zone_d = ZONE_COLD;
    else                      zone_d = ZONE_WARM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_valid_o <= 1'b0;
      zone_o         <= ZONE_WARM;
      cmd_o          <= DVFS_NONE;
    end else begin
      result_valid_o <= energy_valid_i;
      if (energy_valid_i) begin
        zone_o <= zone_d;
        unique case (zone_d)
          ZONE_HOT:  cmd_o <= DVFS_DOWN;
          ZONE_COLD: cmd_o <= DVFS_UP;
          default:   cmd_o <= DVFS_NONE;
        endcase
      end
    end
  end

endmodule
