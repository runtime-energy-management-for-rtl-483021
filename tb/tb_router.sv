// tb_router: a router placed at (1,1) of a 3x3 mesh receives random packets
// on all five inputs, addressed to random tiles, while its outputs give
// credit at random. Each packet must leave through the port XY routing
// chooses (x first, then y, then local), whole, uninterleaved and in order
// per input/output pair. A first lone packet checks the two-cycle header
// latency and one flit per cycle after it.
`timescale 1ns / 1ps
module tb_router;
  import rem_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 0;
  logic  [NP-1:0] in_valid = '0, in_credit, out_valid, out_credit = '1;
  flit_t [NP-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  router #(.MY_X(1), .MY_Y(1), .BUF_DEPTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .in_data_i(in_data), .in_credit_o(in_credit),
    .out_valid_o(out_valid), .out_data_o(out_data), .out_credit_i(out_credit));

  always #2 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int xy(int tx, int ty);
    if (tx > 1) return 0;       // east
    if (tx < 1) return 1;       // west
    if (ty > 1) return 2;       // north
    if (ty < 1) return 3;       // south
    return 4;                   // local
  endfunction

  // expected packets: queue per (output, input); payload word 0 = {input, seq}
  typedef flit_t pkt_t [$];
  pkt_t exp_q [NP][NP][$];
  int sent = 0, recvd = 0;
  bit lone_done = 0;

  // sources
  for (genvar i = 0; i < NP; i++) begin : g_src
    initial begin
      flit_t pkt [$];
      int n;
      wait (rst_n);
      wait (lone_done);
      for (int p = 0; p < 40; p++) begin
        int tx, ty, len;
        tx = $urandom % 3; ty = $urandom % 3; len = 1 + $urandom % 6;
        pkt = {};
        pkt.push_back(make_hdr(8'(tx), 8'(ty)));
        pkt.push_back(flit_t'(len));
        pkt.push_back({8'(i), 24'(p)});
        for (int k = 1; k < len; k++) pkt.push_back($urandom);
        exp_q[xy(tx, ty)][i].push_back(pkt);
        sent++;
        n = 0;
        while (n < pkt.size()) begin
          @(negedge clk);
          if (($urandom % 4) != 0) begin
            bit ok;
            in_valid[i] = 1; in_data[i] = pkt[n];
            ok = in_credit[i];  // credit is stable between edges
            @(posedge clk);
            if (ok) n++;
          end else in_valid[i] = 0;
        end
        @(negedge clk) in_valid[i] = 0;
      end
    end
  end

  // sinks
  for (genvar o = 0; o < NP; o++) begin : g_sink
    initial begin
      flit_t got [$];
      int rem, src;
      got = {};
      forever begin
        bit take;
        flit_t d;
        @(negedge clk);
        take = out_valid[o] && out_credit[o];
        d = out_data[o];
        @(posedge clk);
        if (take) begin
          got.push_back(d);
          if (got.size() == 2) rem = int'(got[1]);
          if (got.size() >= 2 && got.size() == rem + 2) begin
            recvd++;
            src = (rem > 0) ? int'(got[2][31:24]) : 0;
            checks++;
            if (src >= NP || exp_q[o][src].size() == 0) begin
              failures++;
              $display("unexpected packet at output %0d", o);
            end else begin
              pkt_t e;
              e = exp_q[o][src].pop_front();
              if (e != got) begin
                failures++;
                $display("packet mismatch at output %0d from input %0d", o, src);
              end
            end
            got = {};
          end
        end
        #0.1 if (lone_done) out_credit[o] = ($urandom % 3) != 0;
      end
    end
  end

  int cyc = 0;
  int fire_cyc [$];
  always @(posedge clk) cyc++;
  always @(negedge clk)
    if (!lone_done && out_valid[4] && out_credit[4]) fire_cyc.push_back(cyc + 1);

  initial begin
    int c0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone packet west -> local, 3 payload flits, one flit per cycle
    exp_q[4][1].push_back('{make_hdr(1, 1), 3, {8'd1, 24'hFFFFFF}, 7, 9});
    in_valid[1] = 1;
    for (int k = 0; k < 5; k++) begin
      in_data[1] = (k == 0) ? make_hdr(1, 1) : (k == 1) ? 3 : (k == 2) ? {8'd1, 24'hFFFFFF} : (k == 3) ? 7 : 9;
      @(posedge clk);
      #0.1 if (k == 0) c0 = cyc;
      @(negedge clk);
    end
    in_valid[1] = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (fire_cyc.size() != 5 || fire_cyc[0] != c0 + 2 || fire_cyc[4] != c0 + 6) begin
      failures++;
      $display("lone packet: %0d flits, header %0d cycles after entry, last %0d",
               fire_cyc.size(), fire_cyc.size() ? fire_cyc[0] - c0 : -1, fire_cyc.size() ? fire_cyc[$] - c0 : -1);
    end
    lone_done = 1;
    wait (recvd == sent + 1 && sent == NP * 40);
    repeat (5) @(posedge clk);
    for (int o = 0; o < NP; o++) for (int i = 0; i < NP; i++) begin
      checks++;
      if (exp_q[o][i].size() != 0) begin failures++; $display("%0d packets lost %0d->%0d", exp_q[o][i].size(), i, o); end
    end
    $display("packets %0d", recvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
