// tb_energy_estimator: runs windows of random instruction streams at several
// vf-pairs and compares the reported window energy with a reference sum
// built here from the characterisation numbers (per-class energy at 1.1 V in
// fJ, scaled by V^2, plus 10 % regulator overhead; leakage 2200/1600/1100 fJ
// per 4 ns tick at 1.1/1.0/0.9 V, stretched by the clock period).
`timescale 1ns / 1ps
module tb_energy_estimator;
  import rem_pkg::*;
  logic clk = 0, rst_n = 0, retire = 0, window = 0, valid;
  instr_class_e cls = CLS_ARITH;
  vdd_e vdd = VDD_1V1;
  period_code_t per = 0;
  energy_t energy;
  int checks = 0, failures = 0;
  longint e11 [5] = '{24200, 21780, 36300, 33880, 26620};
  longint leak [3] = '{2200, 1600, 1100};
  longint num [3] = '{121, 100, 81};
  longint acc;

  energy_estimator dut (.clk(clk), .rst_n(rst_n), .retire_i(retire), .class_i(cls), .vdd_i(vdd),
                        .period_i(per), .window_i(window), .energy_o(energy), .valid_o(valid));

  always #2 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint cyc_energy(bit r, int c, int v, int p);
    longint e, d;
    e = leak[v] * (4000 + 500 * p) / 4000;
    if (r) begin
      d = e11[c] * num[v] / 121;
      e += d + d / 10;
    end
    return e;
  endfunction

  initial begin
    int vs [4] = '{0, 0, 1, 2};
    int ps [4] = '{0, 1, 1, 3};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // first window closes immediately to align the reference
    window = 1;
    @(negedge clk) window = 0;
    acc = cyc_energy(0, 0, 0, 0);  // the closing cycle belongs to the new window
    for (int w = 0; w < 8; w++) begin
      vdd = vdd_e'(vs[w % 4]);
      per = period_code_t'(ps[w % 4]);
      for (int i = 0; i < 300; i++) begin
        retire = ($urandom % 3) != 0;
        cls = instr_class_e'($urandom % 5);
        acc += cyc_energy(retire, int'(cls), vs[w % 4], ps[w % 4]);
        @(negedge clk);
      end
      retire = 0;
      window = 1;
      acc += cyc_energy(0, 0, vs[w % 4], ps[w % 4]);  // the closing cycle opens the next window
      @(negedge clk);
      window = 0;
      checks += 2;
      if (!valid) begin failures++; $display("no valid pulse"); end
      // energy_o holds the previous window; the closing-cycle energy is in the new one
      if (energy != energy_t'(acc - cyc_energy(0, 0, vs[w % 4], ps[w % 4]))) begin
        failures++;
        $display("window %0d: energy %0d expected %0d", w, energy, acc - cyc_energy(0, 0, vs[w % 4], ps[w % 4]));
      end
      acc = cyc_energy(0, 0, vs[w % 4], ps[w % 4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
