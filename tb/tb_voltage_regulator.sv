// tb_voltage_regulator: steps the requested supply 1.1 -> 1.0 -> 0.9 -> 1.0
// -> 1.1 V and checks that the output keeps the old level for 100 ns, then
// takes the new one, with settled_o low in between.
`timescale 1ns / 1ps
module tb_voltage_regulator;
  import rem_pkg::*;
  logic rst_n = 0, settled;
  vdd_e req = VDD_1V1, vdd;
  logic [10:0] mv;
  int checks = 0, failures = 0;
  vdd_e seq [4] = '{VDD_1V0, VDD_0V9, VDD_1V0, VDD_1V1};
  int   smv [4] = '{1000, 900, 1000, 1100};

  voltage_regulator dut (.rst_n(rst_n), .vdd_req_i(req), .vdd_o(vdd), .settled_o(settled), .vdd_mv_o(mv));

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s at %0t", msg, $realtime); end
  endtask

  initial begin
    #10 rst_n = 1;
    #10 check(vdd == VDD_1V1 && mv == 1100 && settled, "starts at 1.1 V");
    for (int i = 0; i < 4; i++) begin
      vdd_e old_v;
      old_v = vdd;
      req = seq[i];
      #1    check(!settled && vdd == old_v, "old level right after request");
      #98   check(!settled && vdd == old_v, "old level at 99 ns");
      #2    check(settled && vdd == seq[i] && int'(mv) == smv[i], "new level at 101 ns");
      #50;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
