// scratchpad: private memory of a PE.
//
// A dual-port word memory of PAGES pages of PAGE_WORDS 32-bit words. Page 0
// holds the kernel, the other pages one task each. Port A belongs to the
// processor, port B to the DMNI; both run on the PE's scaled clock, read
// synchronously (data the cycle after the address) and write on the clock
// edge. If both ports write one word in the same cycle, port B wins.
//
// A private paged memory with a kernel page and three task pages follows the
// design description; the page size, word width and port behaviour are this
// design's choices.
`timescale 1ns / 1ps
module scratchpad #(
  parameter int unsigned PAGES      = 4,
  parameter int unsigned PAGE_WORDS = 4096,
  localparam int unsigned WORDS     = PAGES * PAGE_WORDS,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic          clk,
  // port A (processor)
  input  logic          a_en_i,
  input  logic          a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [31:0]   a_wdata_i,
  output logic [31:0]   a_rdata_o,
  // port B (DMNI)
  input  logic          b_en_i,
  input  logic          b_we_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [31:0]   b_wdata_i,
  output logic [31:0]   b_rdata_o
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en_i) begin
      if (a_we_i && !(b_en_i && b_we_i && b_addr_i == a_addr_i)) mem[a_addr_i] <= a_wdata_i;
      a_rdata_o <= mem[a_addr_i];
    end
    if (b_en_i) begin
      if (b_we_i) mem[b_addr_i] <= b_wdata_i;
      b_rdata_o <= mem[b_addr_i];
    end
  end

endmodule
