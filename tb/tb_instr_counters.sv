// tb_instr_counters: random instruction retirements of random classes, with
// an occasional clear, checked every cycle against a reference count kept in
// the testbench.
`timescale 1ns / 1ps
module tb_instr_counters;
  localparam int NCLS = 5;
  logic clk = 0, rst_n = 0, retire = 0, clear = 0;
  logic [2:0] cls = 0;
  logic [NCLS-1:0][31:0] count;
  int unsigned ref_cnt [NCLS];
  int checks = 0, failures = 0;

  instr_counters #(.NCLS(NCLS), .CNT_W(32)) dut (
    .clk(clk), .rst_n(rst_n), .retire_i(retire), .class_i(cls), .clear_i(clear), .count_o(count));

  always #2 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_cnt[i]) ref_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      retire = ($urandom % 4) != 0;
      cls    = 3'($urandom % NCLS);
      clear  = ($urandom % 300) == 0;
      @(posedge clk);
      for (int i = 0; i < NCLS; i++) begin
        if (clear) ref_cnt[i] = (retire && cls == 3'(i)) ? 1 : 0;
        else if (retire && cls == 3'(i)) ref_cnt[i]++;
      end
      #1;
      for (int i = 0; i < NCLS; i++) begin
        checks++;
        if (count[i] != ref_cnt[i]) begin
          failures++;
          if (failures < 10) $display("count[%0d]=%0d expected %0d", i, count[i], ref_cnt[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
