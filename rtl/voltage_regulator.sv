// voltage_regulator: behavioural model of the per-PE on-chip voltage
// regulator.
//
// This is a behavioural model (not synthesizable): the real part is an analog
// regulator. It follows the requested supply level vdd_req_i with a fixed
// latency of LATENCY_PS (100 ns) for any step up or down. During the
// transition settled_o is low and vdd_o still shows the old level; vdd_mv_o
// gives the level in millivolts (1100, 1000 or 900). A new request while a
// transition is in flight is taken up after that transition ends.
//
// The three supply levels and the 100 ns latency follow the design
// description; the port set is this model's choice.
//
// Tool note: this is a timing model built on delays; synthesis turns its
// delayed assignments into latches. It is not meant for synthesis.
`timescale 1ps / 1ps
module voltage_regulator
  import rem_pkg::*;
#(
  parameter int unsigned LATENCY_PS = 100_000
) (
  input  logic        rst_n,
  input  vdd_e        vdd_req_i,
  output vdd_e        vdd_o,
  output logic        settled_o,
  output logic [10:0] vdd_mv_o
);

  initial begin
    vdd_o     = VDD_1V1;
    settled_o = 1'b1;
  end

  always begin
    @(vdd_req_i or rst_n);
    if (!rst_n) begin
      vdd_o     = VDD_1V1;
      settled_o = 1'b1;
    end else if (vdd_req_i != vdd_o) begin
      settled_o = 1'b0;
      #(LATENCY_PS);
      vdd_o     = vdd_req_i;
      settled_o = 1'b1;
    end
  end

  always_comb begin
    unique case (vdd_o)
      VDD_1V1: vdd_mv_o = 11'd1100;
      VDD_1V0: vdd_mv_o = 11'd1000;
      default: vdd_mv_o = 11'd900;
    endcase
  end

endmodule
