// instr_counters: one event counter per instruction class.
//
// The processor reports each retired instruction with retire_i and its class.
// The matching counter increments; the operating system reads the counts
// through count_o (memory mapped) to estimate the energy of the sampling
// window. clear_i, raised at the end of each window, restarts all counters;
// an instruction retiring in the same cycle is counted into the new window.
//
// Timing: counts are visible the cycle after retire_i. All logic runs on the
// scaled processor clock. One counter per class follows the design
// description; five classes and 32-bit counters are this design's choice.
`timescale 1ns / 1ps
module instr_counters
  import rem_pkg::*;
#(
  parameter int unsigned NCLS  = N_CLASSES,
  parameter int unsigned CNT_W = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        retire_i,
  input  logic [$clog2(NCLS)-1:0]     class_i,
  input  logic                        clear_i,
  output logic [NCLS-1:0][CNT_W-1:0]  count_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_o <= '0;
    end else begin
      for (int i = 0; i < NCLS; i++) begin
        if (clear_i)
          count_o[i] <= (retire_i && int'(class_i) == i) ? CNT_W'(1) : '0;
        else if (retire_i && int'(class_i) == i && count_o[i] != '1)
          count_o[i] <= count_o[i] + 1'b1;
      end
    end
  end

endmodule
