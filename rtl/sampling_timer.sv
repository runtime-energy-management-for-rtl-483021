// sampling_timer: sampling-window counter on the nominal clock.
//
// A free-running counter, clocked by the fixed nominal (NoC) clock, reaches
// WINDOW - 1 every WINDOW nominal cycles. At that point it raises tick_o for
// one cycle and flips tick_toggle_o. The toggle crosses to the scaled
// processor clock domain, where an edge of it becomes the processor's
// monitoring interrupt. Since every PE counts nominal cycles, all PEs close
// their windows together whatever their scaled frequency.
//
// Following the design description: the counter runs on the nominal clock
// and defines the window in clock cycles. The 200,000-cycle default is the
// window length named as the lower bound for low timing overhead. The
// toggle-style output is this design's choice.
`timescale 1ns / 1ps
module sampling_timer #(
  parameter int unsigned WINDOW = 200_000
) (
  input  logic clk_nom,
  input  logic rst_n,
  output logic tick_o,
  output logic tick_toggle_o
);

  localparam int unsigned W = (WINDOW > 1) ? $clog2(WINDOW) : 1;
  logic [W-1:0] cnt;

  always_ff @(posedge clk_nom or negedge rst_n) begin
    if (!rst_n) begin
      cnt           <= '0;
      tick_o        <= 1'b0;
      tick_toggle_o <= 1'b0;
    end else begin
      tick_o <= 1'b0;
      if (cnt == W'(WINDOW - 1)) begin
        cnt           <= '0;
        tick_o        <= 1'b1;
        tick_toggle_o <= ~tick_toggle_o;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
