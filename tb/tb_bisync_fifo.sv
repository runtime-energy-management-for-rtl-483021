// tb_bisync_fifo: streams 2000 random words from a 4.0 ns write clock to a
// 5.5 ns read clock and 2000 more from 7.0 ns to 4.0 ns, with random write and
// read enables. Every word must arrive once and in order, full_o must come up
// when the writer runs ahead, and empty_o when the reader does.
`timescale 1ns / 1ps
module tb_bisync_fifo;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  realtime wper = 4.0, rper = 5.5;
  logic [31:0] sb [$];
  int n_full = 0, n_empty = 0, sent = 0, got = 0;
  int wbias = 2, rbias = 2;

  bisync_fifo #(.WIDTH(32), .DEPTH(8)) dut (
    .wr_clk(wclk), .wr_rst_n(rst_n), .wr_en_i(wr_en), .wr_data_i(wdata), .full_o(full),
    .rd_clk(rclk), .rd_rst_n(rst_n), .rd_en_i(rd_en), .rd_data_o(rdata), .empty_o(empty));

  always #(wper / 2) wclk = ~wclk;
  always #(rper / 2) rclk = ~rclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    if (rst_n) begin
      if (wr_en && !full) begin
        sb.push_back(wdata);
        sent++;
      end
      if (full) n_full++;
      wr_en <= (sent < 4000) && (($urandom % 4) < wbias + 1);
      wdata <= $urandom;
    end
  end

  // reader
  always @(posedge rclk) begin
    if (rst_n) begin
      if (rd_en && !empty) begin
        checks++;
        if (sb.size() == 0 || rdata != sb[0]) begin
          failures++;
          if (failures < 10) $display("read %h, expected %h", rdata, sb.size() ? sb[0] : 0);
        end
        if (sb.size()) void'(sb.pop_front());
        got++;
      end
      if (empty) n_empty++;
      rd_en <= ($urandom % 4) < rbias + 1;
    end
  end

  initial begin
    #20 rst_n = 1;
    wait (got >= 2000);
    wper = 7.0; rper = 4.0;
    wait (got >= 4000);
    checks += 2;
    if (n_full == 0)  begin failures++; $display("full never seen"); end
    if (n_empty == 0) begin failures++; $display("empty never seen"); end
    $display("words %0d, full cycles %0d, empty cycles %0d", got, n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
