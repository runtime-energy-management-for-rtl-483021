// dmni: direct memory network interface of a PE with DVFS support.
//
// The DMNI moves packets between the PE memory and the NoC without the
// processor. It straddles the PE's two clock domains:
//
//   Receive  nominal half: flits from the router are written into a
//            bisynchronous FIFO; credit to the router is "FIFO not full".
//            scaled half: flits are taken from the FIFO and written to the
//            receive buffer in memory (address set in MMR_RECV_ADDR). After
//            the last flit of a packet (header, size, payload) the packet
//            length is shown in MMR_RECV_STATUS and irq_o rises; the next
//            packet stays in the FIFO (and backs up into the NoC) until the
//            processor writes MMR_RECV_STATUS to release the buffer.
//   Send     scaled half: after MMR_SEND_START the engine reads MMR_SEND_LEN
//            words from MMR_SEND_ADDR on and pushes them into a second
//            bisynchronous FIFO, two cycles per word.
//            nominal half: the FIFO head is offered to the router and popped
//            whenever the router gives credit.
//   MMR      the memory-mapped registers above, written and read by the
//            processor (mmr_* port, scaled clock; reads are combinational).
//   Memory access arbiter: the send reader and the receive writer share the
//            DMNI memory port; a round-robin arbiter alternates between them
//            when both ask in the same cycle.
//
// Following the design description: the Send and Receive modules each split
// into a nominal and a scaled half around a bisynchronous FIFO, the MMR and
// the memory access arbiter. Register layout, interrupt rule, FIFO depth and
// the packet format are this design's choices.
//
// Tool note: only the low 16 bits of a register write are used (addresses and
// lengths). rst_n is also the disable condition of the a_one_user assertion,
// which Verilator reports as a synchronous use (SYNCASYNCNET); the flops are
// reset asynchronously.
`timescale 1ns / 1ps
module dmni
  import rem_pkg::*;
#(
  parameter int unsigned MEM_AW     = 14,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk_nom,     // nominal NoC clock
  input  logic              clk_pe,      // scaled PE clock
  input  logic              rst_n,
  // NoC side (nominal clock), to and from the router's local port
  input  logic              noc_in_valid_i,
  input  flit_t             noc_in_data_i,
  output logic              noc_in_credit_o,
  output logic              noc_out_valid_o,
  output flit_t             noc_out_data_o,
  input  logic              noc_out_credit_i,
  // MMR port (scaled clock)
  input  logic              mmr_we_i,
  input  logic [7:0]        mmr_addr_i,
  input  logic [31:0]       mmr_wdata_i,
  output logic [31:0]       mmr_rdata_o,
  output logic              irq_o,
  // memory port (scaled clock, synchronous read)
  output logic              mem_en_o,
  output logic              mem_we_o,
  output logic [MEM_AW-1:0] mem_addr_o,
  output logic [31:0]       mem_wdata_o,
  input  logic [31:0]       mem_rdata_i
);

  // ------------------------------------------------------------ FIFOs
  logic  rx_full, rx_empty, rx_pop;
  flit_t rx_head;
  logic  tx_full, tx_empty, tx_push;
  flit_t tx_data;

  bisync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .wr_clk    (clk_nom),
    .wr_rst_n  (rst_n),
    .wr_en_i   (noc_in_valid_i),
    .wr_data_i (noc_in_data_i),
    .full_o    (rx_full),
    .rd_clk    (clk_pe),
    .rd_rst_n  (rst_n),
    .rd_en_i   (rx_pop),
    .rd_data_o (rx_head),
    .empty_o   (rx_empty)
  );
  assign noc_in_credit_o = !rx_full;

  bisync_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .wr_clk    (clk_pe),
    .wr_rst_n  (rst_n),
    .wr_en_i   (tx_push),
    .wr_data_i (tx_data),
    .full_o    (tx_full),
    .rd_clk    (clk_nom),
    .rd_rst_n  (rst_n),
    .rd_en_i   (noc_out_credit_i),
    .rd_data_o (noc_out_data_o),
    .empty_o   (tx_empty)
  );
  assign noc_out_valid_o = !tx_empty;

  // ------------------------------------------------------------ MMR
  logic [MEM_AW-1:0] send_addr, recv_addr;
  logic [15:0]       send_len;
  logic              send_busy;
  logic [15:0]       recv_status;   // length of stored packet, 0 = none
  logic              send_start, recv_release;

  assign send_start   = mmr_we_i && mmr_addr_i == MMR_SEND_START && !send_busy;
  assign recv_release = mmr_we_i && mmr_addr_i == MMR_RECV_STATUS;

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      send_addr <= '0;
      send_len  <= '0;
      recv_addr <= '0;
    end else if (mmr_we_i) begin
      unique case (mmr_addr_i)
        MMR_SEND_ADDR: send_addr <= mmr_wdata_i[MEM_AW-1:0];
        MMR_SEND_LEN:  send_len  <= mmr_wdata_i[15:0];
        MMR_RECV_ADDR: recv_addr <= mmr_wdata_i[MEM_AW-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (mmr_addr_i)
      MMR_SEND_ADDR:   mmr_rdata_o = 32'(send_addr);
      MMR_SEND_LEN:    mmr_rdata_o = 32'(send_len);
      MMR_SEND_START:  mmr_rdata_o = 32'(send_busy);
      MMR_RECV_ADDR:   mmr_rdata_o = 32'(recv_addr);
      MMR_RECV_STATUS: mmr_rdata_o = 32'(recv_status);
      default:         mmr_rdata_o = '0;
    endcase
  end

  assign irq_o = (recv_status != '0);

  // ------------------------------------------------------------ arbiter
  logic send_req, recv_req, send_gnt, recv_gnt, last_recv;

  always_comb begin
    send_gnt = 1'b0;
    recv_gnt = 1'b0;
    if (send_req && recv_req) begin
      if (last_recv) send_gnt = 1'b1;
      else           recv_gnt = 1'b1;
    end else begin
      send_gnt = send_req;
      recv_gnt = recv_req;
    end
  end

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n)                    last_recv <= 1'b0;
    else if (send_gnt || recv_gnt) last_recv <= recv_gnt;
  end

  // ------------------------------------------------------------ send (scaled half)
  logic [15:0]       send_cnt;
  logic [MEM_AW-1:0] send_ptr;
  logic              send_wait;   // read issued, data arrives this cycle

  assign send_req = send_busy && !send_wait && send_cnt != '0 && !tx_full;
  assign tx_push  = send_wait;
  assign tx_data  = mem_rdata_i;

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      send_busy <= 1'b0;
      send_cnt  <= '0;
      send_ptr  <= '0;
      send_wait <= 1'b0;
    end else begin
      send_wait <= send_gnt;
      if (send_start) begin
        send_busy <= (send_len != '0);
        send_cnt  <= send_len;
        send_ptr  <= send_addr;
      end else begin
        if (send_gnt) begin
          send_cnt <= send_cnt - 1'b1;
          send_ptr <= send_ptr + 1'b1;
        end
        if (send_wait && send_cnt == '0) send_busy <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ receive (scaled half)
  typedef enum logic [1:0] {RX_HDR, RX_SIZE, RX_PAYLOAD} rx_phase_e;
  rx_phase_e         rx_phase;
  logic [15:0]       rx_remain, rx_count;

  assign recv_req = !rx_empty && recv_status == '0;
  assign rx_pop   = recv_gnt;

  always_ff @(posedge clk_pe or negedge rst_n) begin
    if (!rst_n) begin
      rx_phase    <= RX_HDR;
      rx_remain   <= '0;
      rx_count    <= '0;
      recv_status <= '0;
    end else begin
      if (recv_release) recv_status <= '0;
      if (recv_gnt) begin
        rx_count <= rx_count + 1'b1;
        unique case (rx_phase)
          RX_HDR:  rx_phase <= RX_SIZE;
          RX_SIZE: begin
            rx_remain <= rx_head[15:0];
            if (rx_head[15:0] == '0) begin
              rx_phase    <= RX_HDR;
              rx_count    <= '0;
              recv_status <= 16'd2;
            end else begin
              rx_phase <= RX_PAYLOAD;
            end
          end
          default: begin
            rx_remain <= rx_remain - 1'b1;
            if (rx_remain == 16'd1) begin
              rx_phase    <= RX_HDR;
              rx_count    <= '0;
              recv_status <= rx_count + 1'b1;
            end
          end
        endcase
      end
    end
  end

  // ------------------------------------------------------------ memory port
  always_comb begin
    mem_en_o    = send_gnt || recv_gnt;
    mem_we_o    = recv_gnt;
    mem_addr_o  = recv_gnt ? recv_addr + MEM_AW'(rx_count) : send_ptr;
    mem_wdata_o = rx_head;
  end

  a_one_user: assert property (@(posedge clk_pe) disable iff (!rst_n) !(send_gnt && recv_gnt));

endmodule
