// rem_manycore: NoC-based many-core with runtime energy management.
//
// MESH_X x MESH_Y processing elements (pe) on a 2D mesh, split into clusters
// of CLUSTER_X x CLUSTER_Y PEs. The PE at position (0,0) of every cluster is
// that cluster's Local Manager PE (LMP); the LMP of cluster (0,0), the PE at
// mesh position (0,0), also serves as the Global Manager PE (GMP). The other
// PEs are Slave PEs (SPs). Manager PEs carry the REM zone unit; every PE
// carries the monitoring and DVFS hardware and its own scaled clock.
//
// The energy loop works through packets: every sampling window each SP's
// processor reads its window energy and sends it to its LMP; the LMP checks
// the zone and answers with an UP or DOWN control packet, which the SP turns
// into a DVFS register write. The roles are set by the software of each PE;
// this module only places the REM unit in the manager positions.
//
// Interface: the processors are outside the design. PE number n = y * MESH_X
// + x gets its clock on pe_clk_o[n] and its bus on proc_req_i[n] /
// proc_rsp_o[n]. Mesh-edge links are tied off (no flits in, no credit out).
//
// The 6x6 mesh of four 3x3 clusters, the LMP at cluster position (0,0) and
// the GMP in cluster (0,0) follow the design description's reference
// instance; the tie-off of edge links is this design's choice.
//
// Tool note: rst_n reaches the behavioural clock and regulator models and the
// assertions inside each PE, which Verilator counts as a synchronous use
// (SYNCASYNCNET); every flop is reset asynchronously.
`timescale 1ns / 1ps
module rem_manycore
  import rem_pkg::*;
#(
  parameter int unsigned MESH_X     = 6,
  parameter int unsigned MESH_Y     = 6,
  parameter int unsigned CLUSTER_X  = 3,
  parameter int unsigned CLUSTER_Y  = 3,
  parameter int unsigned WINDOW     = 200_000,
  parameter int unsigned VH_PCT     = 85,
  parameter int unsigned VL_PCT     = 60,
  parameter int unsigned PAGES      = 4,
  parameter int unsigned PAGE_WORDS = 4096,
  localparam int unsigned N_PE      = MESH_X * MESH_Y
) (
  input  logic                    clk_nom,
  input  logic                    rst_n,
  output logic      [N_PE-1:0]    pe_clk_o,
  input  proc_req_t [N_PE-1:0]    proc_req_i,
  output proc_rsp_t [N_PE-1:0]    proc_rsp_o,
  output logic [N_PE-1:0][10:0]   vdd_mv_o
);

  // Link arrays indexed [pe][direction], directions in router port order
  localparam logic [1:0] D_E = 2'(PORT_EAST);
  localparam logic [1:0] D_W = 2'(PORT_WEST);
  localparam logic [1:0] D_N = 2'(PORT_NORTH);
  localparam logic [1:0] D_S = 2'(PORT_SOUTH);
  logic  [N_PE-1:0][3:0] in_valid, in_credit, out_valid, out_credit;
  flit_t [N_PE-1:0][3:0] in_data, out_data;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // East link: from the east neighbour's west output
      if (x + 1 < MESH_X) begin : g_e
        assign in_valid[N][D_E]   = out_valid[N+1][D_W];
        assign in_data[N][D_E]    = out_data[N+1][D_W];
        assign out_credit[N][D_E] = in_credit[N+1][D_W];
      end else begin : g_e_edge
        assign in_valid[N][D_E]   = 1'b0;
        assign in_data[N][D_E]    = '0;
        assign out_credit[N][D_E] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign in_valid[N][D_W]   = out_valid[N-1][D_E];
        assign in_data[N][D_W]    = out_data[N-1][D_E];
        assign out_credit[N][D_W] = in_credit[N-1][D_E];
      end else begin : g_w_edge
        assign in_valid[N][D_W]   = 1'b0;
        assign in_data[N][D_W]    = '0;
        assign out_credit[N][D_W] = 1'b0;
      end
      if (y + 1 < MESH_Y) begin : g_n
        assign in_valid[N][D_N]   = out_valid[N+MESH_X][D_S];
        assign in_data[N][D_N]    = out_data[N+MESH_X][D_S];
        assign out_credit[N][D_N] = in_credit[N+MESH_X][D_S];
      end else begin : g_n_edge
        assign in_valid[N][D_N]   = 1'b0;
        assign in_data[N][D_N]    = '0;
        assign out_credit[N][D_N] = 1'b0;
      end
      if (y > 0) begin : g_s
        assign in_valid[N][D_S]   = out_valid[N-MESH_X][D_N];
        assign in_data[N][D_S]    = out_data[N-MESH_X][D_N];
        assign out_credit[N][D_S] = in_credit[N-MESH_X][D_N];
      end else begin : g_s_edge
        assign in_valid[N][D_S]   = 1'b0;
        assign in_data[N][D_S]    = '0;
        assign out_credit[N][D_S] = 1'b0;
      end

      pe #(
        .MY_X       (x),
        .MY_Y       (y),
        .IS_MANAGER ((x % CLUSTER_X) == 0 && (y % CLUSTER_Y) == 0),
        .WINDOW     (WINDOW),
        .VH_PCT     (VH_PCT),
        .VL_PCT     (VL_PCT),
        .PAGES      (PAGES),
        .PAGE_WORDS (PAGE_WORDS)
      ) u_pe (
        .clk_nom           (clk_nom),
        .rst_n             (rst_n),
        .link_in_valid_i   (in_valid[N]),
        .link_in_data_i    (in_data[N]),
        .link_in_credit_o  (in_credit[N]),
        .link_out_valid_o  (out_valid[N]),
        .link_out_data_o   (out_data[N]),
        .link_out_credit_i (out_credit[N]),
        .proc_clk_o        (pe_clk_o[N]),
        .proc_req_i        (proc_req_i[N]),
        .proc_rsp_o        (proc_rsp_o[N]),
        .vdd_mv_o          (vdd_mv_o[N])
      );
    end
  end

endmodule
