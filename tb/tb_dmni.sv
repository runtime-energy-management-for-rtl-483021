// tb_dmni: the DMNI between a 4 ns NoC clock and a 5.5 ns PE clock, with a
// memory model on its memory port.
// Send: three packets laid out in memory are sent with MMR_SEND_ADDR/LEN/
// START while the NoC side gives credit at random; the flits must come out in
// order and complete. Receive: three packets are offered from the NoC side;
// each must land at the receive buffer address, be announced by irq_o and
// MMR_RECV_STATUS with its length, and the next one must wait until the
// buffer is released. Sending and receiving overlap, so the memory access
// arbiter has to serve both.
`timescale 1ns / 1ps
module tb_dmni;
  import rem_pkg::*;
  localparam int AW = 10;
  logic clk_nom = 0, clk_pe = 0, rst_n = 0;
  logic in_valid = 0, in_credit, out_valid, out_credit = 0;
  flit_t in_data = 0, out_data;
  logic mmr_we = 0, irq;
  logic [7:0] mmr_addr = 0;
  logic [31:0] mmr_wdata = 0, mmr_rdata;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] mem [1 << AW];
  int checks = 0, failures = 0;
  int n_conflict = 0;

  dmni #(.MEM_AW(AW), .FIFO_DEPTH(8)) dut (
    .clk_nom(clk_nom), .clk_pe(clk_pe), .rst_n(rst_n),
    .noc_in_valid_i(in_valid), .noc_in_data_i(in_data), .noc_in_credit_o(in_credit),
    .noc_out_valid_o(out_valid), .noc_out_data_o(out_data), .noc_out_credit_i(out_credit),
    .mmr_we_i(mmr_we), .mmr_addr_i(mmr_addr), .mmr_wdata_i(mmr_wdata), .mmr_rdata_o(mmr_rdata),
    .irq_o(irq), .mem_en_o(mem_en), .mem_we_o(mem_we), .mem_addr_o(mem_addr),
    .mem_wdata_o(mem_wdata), .mem_rdata_i(mem_rdata));

  always #2.0  clk_nom = ~clk_nom;
  always #2.75 clk_pe  = ~clk_pe;

  always @(posedge clk_pe) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      mem_rdata <= mem[mem_addr];
    end
    if (dut.send_req && dut.recv_req) n_conflict++;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic mmr_write(logic [7:0] a, logic [31:0] d);
    @(negedge clk_pe);
    mmr_we = 1; mmr_addr = a; mmr_wdata = d;
    @(negedge clk_pe);
    mmr_we = 0;
  endtask

  task automatic mmr_read(logic [7:0] a, output logic [31:0] d);
    @(negedge clk_pe);
    mmr_addr = a;
    #0.1 d = mmr_rdata;
  endtask

  // ---------------------------------------------------------------- send
  flit_t tx_exp [$];
  int tx_got = 0;
  always @(negedge clk_nom) begin
    if (rst_n) begin
      if (out_valid && out_credit) begin
        checks++;
        if (tx_exp.size() == 0 || out_data != tx_exp[0]) begin
          failures++;
          $display("sent flit %h, expected %h", out_data, tx_exp.size() ? tx_exp[0] : 0);
        end
        if (tx_exp.size()) void'(tx_exp.pop_front());
        tx_got++;
      end
    end
  end
  always @(posedge clk_nom) #0.1 out_credit = ($urandom % 3) != 0;

  // ---------------------------------------------------------------- receive
  flit_t rx_pkts [3][$];
  task automatic noc_send(flit_t p [$]);
    int n = 0;
    while (n < p.size()) begin
      @(negedge clk_nom);
      in_valid = 1; in_data = p[n];
      if (in_credit) n++;
      @(posedge clk_nom);
    end
    @(negedge clk_nom) in_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    int base [3] = '{16, 100, 300};
    int len  [3] = '{6, 2, 20};
    for (int i = 0; i < (1 << AW); i++) mem[i] = 0;
    // packets to send, laid out in memory
    for (int p = 0; p < 3; p++) begin
      mem[base[p]]     = make_hdr(8'(p), 8'(p + 1));
      mem[base[p] + 1] = len[p] - 2;
      for (int k = 2; k < len[p]; k++) mem[base[p] + k] = $urandom;
    end
    // packets to receive
    for (int p = 0; p < 3; p++) begin
      rx_pkts[p].push_back(make_hdr(0, 0));
      rx_pkts[p].push_back(flit_t'(3 + 4 * p));
      for (int k = 0; k < 3 + 4 * p; k++) rx_pkts[p].push_back($urandom);
    end
    #20 rst_n = 1;
    mmr_write(MMR_RECV_ADDR, 512);
    fork
      // sender: three packets, one after the other
      for (int p = 0; p < 3; p++) begin
        for (int k = 0; k < len[p]; k++) tx_exp.push_back(mem[base[p] + k]);
        mmr_write(MMR_SEND_ADDR, base[p]);
        mmr_write(MMR_SEND_LEN, len[p]);
        mmr_write(MMR_SEND_START, 1);
        do mmr_read(MMR_SEND_START, d); while (d[0]);
      end
      // NoC side offers three packets back to back
      for (int p = 0; p < 3; p++) noc_send(rx_pkts[p]);
      // processor side of the receiver
      for (int p = 0; p < 3; p++) begin
        wait (irq);
        mmr_read(MMR_RECV_STATUS, d);
        check(d == 32'(rx_pkts[p].size()), $sformatf("packet %0d length %0d", p, d));
        for (int k = 0; k < rx_pkts[p].size(); k++)
          check(mem[512 + k] == rx_pkts[p][k], $sformatf("packet %0d flit %0d in memory", p, k));
        // the next packet must not be written while this one is held
        repeat (20) @(posedge clk_pe);
        check(irq && mem[512] == rx_pkts[p][0], "buffer held until release");
        mmr_write(MMR_RECV_STATUS, 0);
        check(!irq, "irq cleared by release");
      end
    join
    wait (tx_exp.size() == 0);
    repeat (10) @(posedge clk_nom);
    check(tx_got == 28, $sformatf("all 28 flits sent (%0d)", tx_got));
    check(n_conflict > 0, "send and receive competed for memory");
    $display("memory conflicts %0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
