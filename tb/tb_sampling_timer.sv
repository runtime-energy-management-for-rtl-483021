// tb_sampling_timer: checks that the window tick comes every WINDOW nominal
// cycles (first one WINDOW cycles after reset) and that the toggle output
// flips with every tick.
`timescale 1ns / 1ps
module tb_sampling_timer;
  localparam int W = 37;
  logic clk = 0, rst_n = 0, tick, tgl, tgl_prev;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, ticks = 0;

  sampling_timer #(.WINDOW(W)) dut (.clk_nom(clk), .rst_n(rst_n), .tick_o(tick), .tick_toggle_o(tgl));

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    tgl_prev = tgl;
    while (ticks < 20) begin
      @(posedge clk);
      cyc++;
      #1;
      if (tick) begin
        ticks++;
        checks++;
        if (cyc - last != W) begin
          failures++;
          $display("tick %0d after %0d cycles, expected %0d", ticks, cyc - last, W);
        end
        last = cyc;
      end
      checks++;
      if ((tgl != tgl_prev) != tick) begin
        failures++;
        $display("toggle mismatch at cycle %0d", cyc);
      end
      tgl_prev = tgl;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
