// tb_scratchpad: writes random words through both ports, reads them back
// through the other port and checks the one-cycle read latency and that port
// B wins a same-address write collision.
`timescale 1ns / 1ps
module tb_scratchpad;
  localparam int PAGES = 4, PW = 64, AW = $clog2(PAGES * PW);
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wd = 0, b_wd = 0, a_rd, b_rd;
  logic [31:0] model [PAGES * PW];
  int checks = 0, failures = 0;

  scratchpad #(.PAGES(PAGES), .PAGE_WORDS(PW)) dut (
    .clk(clk), .a_en_i(a_en), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wd), .a_rdata_o(a_rd),
    .b_en_i(b_en), .b_we_i(b_we), .b_addr_i(b_addr), .b_wdata_i(b_wd), .b_rdata_o(b_rd));

  always #2 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill: A writes even words, B odd words
    for (int i = 0; i < PAGES * PW; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wd = $urandom; model[i] = a_wd;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wd = $urandom; model[i + 1] = b_wd;
    end
    // collision on word 5
    @(negedge clk);
    a_addr = 5; a_wd = 32'hAAAA_AAAA; b_addr = 5; b_wd = 32'hBBBB_BBBB; model[5] = b_wd;
    // read back crosswise, random order
    @(negedge clk);
    a_we = 0; b_we = 0;
    for (int k = 0; k < 400; k++) begin
      int ia, ib;
      ia = $urandom % (PAGES * PW);
      ib = $urandom % (PAGES * PW);
      a_addr = AW'(ia); b_addr = AW'(ib);
      @(negedge clk);
      checks += 2;
      if (a_rd != model[ia]) begin failures++; $display("A[%0d]=%h exp %h", ia, a_rd, model[ia]); end
      if (b_rd != model[ib]) begin failures++; $display("B[%0d]=%h exp %h", ib, b_rd, model[ib]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
