// tb_clock_gen: sets each of the seven period codes in turn and measures the
// generated clock: the period must be 4.0 ns + 0.5 ns * code (4.0 ns to
// 7.0 ns), the duty cycle 50 %, and the clock must run at 4 ns in reset.
// Then it gates the second output through an enable flop and counts its
// pulses: none while disabled, restart one cycle after the enable returns.
`timescale 1ns / 1ps
module tb_clock_gen;
  import rem_pkg::*;
  logic clk_nom = 0, rst_n = 0, clk, clk_g;
  logic en_d = 1'b1, en_q = 1'b1;
  int   n_g = 0, n0;
  period_code_t code = 0;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall, t_rise2;

  clock_gen dut (.clk_nom_i(clk_nom), .rst_n(rst_n), .period_i(code), .gate_en_i(en_q),
                 .clk_o(clk), .clk_gated_o(clk_g));

  // the enable comes from a flop on the generated clock, as in the PE
  always @(posedge clk) en_q <= en_d;
  always @(posedge clk_g) begin
    n_g++;
    checks++;
    if (!clk) begin
      failures++;
      $display("gated pulse while the clock is low at %0t", $time);
    end
  end

  always #2 clk_nom = ~clk_nom;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // in reset the clock runs at the nominal period whatever the code
    code = 3'd6;
    #10 @(posedge clk) t_rise = $realtime;
    @(posedge clk) t_rise2 = $realtime;
    checks++;
    if (t_rise2 - t_rise < 3.999 || t_rise2 - t_rise > 4.001) begin
      failures++;
      $display("period in reset %0.3f ns", t_rise2 - t_rise);
    end
    rst_n = 1;
    for (int c = 0; c <= 6; c++) begin
      code = period_code_t'(c);
      // let the new code take effect, then measure one full cycle
      repeat (2) @(posedge clk);
      t_rise = $realtime;
      @(negedge clk) t_fall = $realtime;
      @(posedge clk) t_rise2 = $realtime;
      checks += 2;
      if (t_rise2 - t_rise < 4.0 + 0.5 * c - 0.001 || t_rise2 - t_rise > 4.0 + 0.5 * c + 0.001) begin
        failures++;
        $display("code %0d: period %0.3f ns", c, t_rise2 - t_rise);
      end
      if ((t_fall - t_rise) * 2.0 < (t_rise2 - t_rise) - 0.002 || (t_fall - t_rise) * 2.0 > (t_rise2 - t_rise) + 0.002) begin
        failures++;
        $display("code %0d: high time %0.3f ns", c, t_fall - t_rise);
      end
    end
    // clock gating: the cycle in which the enable flop falls still has its
    // pulse, the following ones have none; after the flop rises again the
    // first pulse comes one cycle later
    @(negedge clk) en_d = 1'b0;
    @(posedge clk) #1 n0 = n_g;
    repeat (10) @(posedge clk);
    #1 checks++;
    if (n_g != n0) begin
      failures++;
      $display("gated clock gave %0d pulses while disabled", n_g - n0);
    end
    @(negedge clk) en_d = 1'b1;
    @(posedge clk) #1 checks++;
    if (n_g != n0) begin
      failures++;
      $display("gated clock restarted too early");
    end
    @(posedge clk) #1 checks++;
    if (n_g != n0 + 1) begin
      failures++;
      $display("gated clock did not restart");
    end
    repeat (5) @(posedge clk);
    #1 checks++;
    if (n_g != n0 + 6) begin
      failures++;
      $display("gated clock lost pulses while enabled: %0d", n_g - n0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
