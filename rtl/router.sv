// router: five-port wormhole router of the 2D-mesh NoC.
//
// Each input port (east, west, north, south, local) has a FIFO buffer of
// BUF_DEPTH flits. When a packet's header flit reaches the head of a buffer,
// XY routing picks the output: first along x until the column matches, then
// along y, then the local port. Each output has a round-robin arbiter that
// grants one requesting input at a time; the grant then holds for the whole
// packet (header, size flit, and as many payload flits as the size flit
// says) and is released after the last flit.
//
// Flow control is credit based: credit_o of an input is high while its buffer
// has room, and a flit moves on a link in every cycle where the sender's
// valid and the receiver's credit are both high. A granted packet moves one
// flit per cycle. The minimum latency through the router is two cycles for
// the header (buffer write, then arbitration) and one cycle per further flit.
//
// Input buffering, credit-based flow control, round-robin arbitration and XY
// routing follow the design description. The packet format (header then size
// flit), the buffer depth of 8 and the timing are this design's choices.
// North is +y and east is +x.
//
// Tool note: rst_n is the asynchronous reset of every flop and also the
// disable condition of the a_owner assertion; Verilator reports that second,
// simulation-only use as a synchronous one (SYNCASYNCNET). It is not a
// circuit path.
`timescale 1ns / 1ps
module router
  import rem_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic  [N_PORTS-1:0]   in_valid_i,
  input  flit_t [N_PORTS-1:0]   in_data_i,
  output logic  [N_PORTS-1:0]   in_credit_o,
  output logic  [N_PORTS-1:0]   out_valid_o,
  output flit_t [N_PORTS-1:0]   out_data_o,
  input  logic  [N_PORTS-1:0]   out_credit_i
);

  localparam int unsigned BW = $clog2(BUF_DEPTH);
  typedef logic [$clog2(N_PORTS)-1:0] pidx_t;
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_PAYLOAD} phase_e;

  // ------------------------------------------------------------ input buffers
  flit_t buf_q [N_PORTS][BUF_DEPTH];
  logic [BW:0] wp [N_PORTS];
  logic [BW:0] rp [N_PORTS];
  logic [N_PORTS-1:0] empty, full, pop;
  flit_t [N_PORTS-1:0] head;

  for (genvar i = 0; i < N_PORTS; i++) begin : g_in
    assign empty[i]       = (wp[i] == rp[i]);
    assign full[i]        = (wp[i][BW-1:0] == rp[i][BW-1:0]) && (wp[i][BW] != rp[i][BW]);
    assign in_credit_o[i] = !full[i];
    assign head[i]        = buf_q[i][rp[i][BW-1:0]];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp[i] <= '0;
        rp[i] <= '0;
      end else begin
        if (in_valid_i[i] && !full[i]) wp[i] <= wp[i] + 1'b1;
        if (pop[i]) rp[i] <= rp[i] + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (in_valid_i[i] && !full[i]) buf_q[i][wp[i][BW-1:0]] <= in_data_i[i];
    end
  end

  // ------------------------------------------------------------ XY routing
  function automatic pidx_t xy_route(flit_t hdr);
    if (int'(hdr_x(hdr)) > MY_X)      return pidx_t'(PORT_EAST);
    else if (int'(hdr_x(hdr)) != MY_X) return pidx_t'(PORT_WEST);
    else if (int'(hdr_y(hdr)) > MY_Y) return pidx_t'(PORT_NORTH);
    else if (int'(hdr_y(hdr)) != MY_Y) return pidx_t'(PORT_SOUTH);
    else                              return pidx_t'(PORT_LOCAL);
  endfunction

  // ------------------------------------------------------------ per input
  logic   [N_PORTS-1:0] active;           // input owns an output
  pidx_t                in_out [N_PORTS]; // output owned by the input
  phase_e               phase  [N_PORTS];
  logic   [FLIT_W-1:0]  remain [N_PORTS];
  logic   [N_PORTS-1:0][N_PORTS-1:0] req; // req[o][i]

  always_comb begin
    req = '0;
    for (int i = 0; i < N_PORTS; i++)
      if (!active[i] && !empty[i]) req[xy_route(head[i])][i] = 1'b1;
  end

  // ------------------------------------------------------------ per output
  logic  [N_PORTS-1:0] busy;               // output granted to some input
  pidx_t               owner [N_PORTS];
  pidx_t               rr    [N_PORTS];    // round-robin pointer
  logic  [N_PORTS-1:0] grant_v;
  pidx_t               grant [N_PORTS];
  logic  [N_PORTS-1:0] fire;               // flit leaves output o this cycle
  logic  [N_PORTS-1:0] last;               // and it is the packet's last flit

  always_comb begin
    pidx_t c;
    c = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      grant_v[o] = 1'b0;
      grant[o]   = '0;
      if (!busy[o]) begin
        for (int k = 0; k < N_PORTS; k++) begin
          c = pidx_t'((int'(rr[o]) + k) % N_PORTS);
          if (!grant_v[o] && req[o][c]) begin
            grant_v[o] = 1'b1;
            grant[o]   = c;
          end
        end
      end
    end
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < N_PORTS; o++) begin
      out_valid_o[o] = busy[o] && !empty[owner[o]];
      out_data_o[o]  = head[owner[o]];
      fire[o]        = out_valid_o[o] && out_credit_i[o];
      last[o]        = 1'b0;
      if (fire[o]) begin
        pop[owner[o]] = 1'b1;
        unique case (phase[owner[o]])
          PH_SIZE:    last[o] = (head[owner[o]] == '0);
          PH_PAYLOAD: last[o] = (remain[owner[o]] == FLIT_W'(1));
          default:    last[o] = 1'b0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= '0;
      active <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        owner[p]  <= '0;
        rr[p]     <= '0;
        in_out[p] <= '0;
        phase[p]  <= PH_HDR;
        remain[p] <= '0;
      end
    end else begin
      for (int o = 0; o < N_PORTS; o++) begin
        if (grant_v[o]) begin
          busy[o]             <= 1'b1;
          owner[o]            <= grant[o];
          rr[o]               <= pidx_t'((int'(grant[o]) + 1) % N_PORTS);
          active[grant[o]]    <= 1'b1;
          in_out[grant[o]]    <= pidx_t'(o);
          phase[grant[o]]     <= PH_HDR;
        end
        if (fire[o]) begin
          unique case (phase[owner[o]])
            PH_HDR:  phase[owner[o]] <= PH_SIZE;
            PH_SIZE: begin
              phase[owner[o]]  <= PH_PAYLOAD;
              remain[owner[o]] <= head[owner[o]];
            end
            default: remain[owner[o]] <= remain[owner[o]] - 1'b1;
          endcase
          if (last[o]) begin
            busy[o]          <= 1'b0;
            active[owner[o]] <= 1'b0;
            phase[owner[o]]  <= PH_HDR;
          end
        end
      end
    end
  end

  // A granted output only ever carries flits of its owner.
  for (genvar o = 0; o < N_PORTS; o++) begin : g_chk
    a_owner: assert property (@(posedge clk) disable iff (!rst_n)
                              busy[o] |-> (active[owner[o]] && in_out[owner[o]] == pidx_t'(o)));
  end

endmodule
