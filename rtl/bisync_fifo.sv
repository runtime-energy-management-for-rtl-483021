// bisync_fifo: bisynchronous (dual-clock) FIFO.
//
// Carries flits between the nominal NoC clock and a PE's scaled clock in
// either direction. Write and read pointers are binary counters one bit wider
// than the address, passed to the other clock domain in Gray code through
// SYNC-stage synchronisers. full_o is computed in the write domain, empty_o in
// the read domain; both are conservative while a pointer is crossing, so the
// FIFO never overflows or underflows.
//
// Interface: write with wr_en_i when !full_o; rd_data_o shows the oldest entry
// whenever !empty_o (first-word fall-through) and rd_en_i removes it.
// Latency: a written word becomes visible to the reader SYNC + 1 read-clock
// edges later.
//
// That the DMNI uses such a FIFO in each direction follows the design
// description; the Gray-pointer structure, the depth of 8 and the two
// synchroniser stages are this design's choices.
`timescale 1ns / 1ps
module bisync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8,   // power of two
  parameter int unsigned SYNC  = 2
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  output logic             full_o,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             empty_o
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_sync [SYNC];
  logic [AW:0] wgray_sync [SYNC];

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ------------------------------------------------------------ write side
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wr_en_i && !full_o) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en_i && !full_o) mem[wbin[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      for (int i = 0; i < SYNC; i++) rgray_sync[i] <= '0;
    end else begin
      rgray_sync[0] <= rgray;
      for (int i = 1; i < SYNC; i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  // Full: the synchronised read pointer equals the write pointer with the two
  // top Gray bits inverted.
  assign full_o = (wgray == {~rgray_sync[SYNC-1][AW:AW-1], rgray_sync[SYNC-1][AW-2:0]});

  // ------------------------------------------------------------ read side
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else if (rd_en_i && !empty_o) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
    end
  end

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      for (int i = 0; i < SYNC; i++) wgray_sync[i] <= '0;
    end else begin
      wgray_sync[0] <= wgray;
      for (int i = 1; i < SYNC; i++) wgray_sync[i] <= wgray_sync[i-1];
    end
  end

  assign empty_o   = (rgray == wgray_sync[SYNC-1]);
  assign rd_data_o = mem[rbin[AW-1:0]];

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("bisync_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
