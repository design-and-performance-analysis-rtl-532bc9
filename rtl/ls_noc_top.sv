// Label-switched mesh network on chip for streaming data (top level).
// COLS x ROWS routers (8 x 8 by default) form a 2-D mesh. Every router has a network
// adapter on its Local port, which bit-transition-encodes outgoing payloads, labels them
// with their destination node id, and strips and decodes arriving ones. Neighbouring
// routers are joined in both directions by asynchronous LEDR links (ledr_tx/ledr_rx):
// each node (router + adapter) runs on its own clock node_clk[n], and flits cross
// between nodes with a delay-insensitive two-phase handshake through synchronizers. A
// single NoC manager on clk sets up pipes on request, writes the routing tables of all
// routers over a shared configuration bus and re-routes every pipe after a link fault.
// Each clock domain has its own reset synchronizer.
// Mesh, five-port routers, network adapters, bit-transition coding, LEDR links,
// asynchronous node clocks and the manager follow the published design; the
// configuration bus treated as quasi-static across clock domains and the tied-off mesh
// edges are this design's choices.
// Interface: per-node core ports src_*/snk_* (node id = y*COLS + x, synchronous to
// node_clk[id]), manager ports req_*/rsp_*/fault_* (synchronous to clk), statistics.
// Timing: with all clocks equal, a packet takes 4 + 6h cycles from src_valid to
// snk_valid over h hops on an idle network (2 in a router, about 4 on a link), plus the
// 2-cycle reset synchronizer release after reset.
module ls_noc_top #(
  parameter int COLS       = 8,
  parameter int ROWS       = 8,
  parameter int DATA_W     = 16,
  parameter int FIFO_DEPTH = 4,
  parameter int LINK_CAP   = 10,
  parameter int CAP_W      = 8,
  parameter int PS_DEPTH   = 16,
  localparam int NODES     = COLS * ROWS,
  localparam int LBL_W     = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int FLIT_W    = LBL_W + DATA_W
) (
  input  logic                               clk,        // NoC manager and table writes
  input  logic [NODES-1:0]                   node_clk,   // router + adapter of each node
  input  logic                               rst_n,
  input  logic                               fi,
  input  logic                               hi,
  // core ports of every node
  input  logic [NODES-1:0]                   src_valid,
  output logic [NODES-1:0]                   src_ready,
  input  logic [NODES-1:0][LBL_W-1:0]        src_dst,
  input  logic [NODES-1:0][DATA_W-1:0]       src_data,
  output logic [NODES-1:0]                   snk_valid,
  input  logic [NODES-1:0]                   snk_ready,
  output logic [NODES-1:0][DATA_W-1:0]       snk_data,
  // NoC manager
  input  logic                               req_valid,
  output logic                               req_ready,
  input  logic [LBL_W-1:0]                   req_src,
  input  logic [LBL_W-1:0]                   req_dst,
  input  logic [CAP_W-1:0]                   req_cap,
  output logic                               rsp_valid,
  output logic                               rsp_ok,
  input  logic                               fault_valid,
  output logic                               fault_ready,
  input  logic [LBL_W-1:0]                   fault_node,
  input  logic [1:0]                         fault_dir,
  output logic                               mgr_busy,
  // statistics
  output logic [15:0]                        alt_cnt,
  output logic [15:0]                        reroute_cnt,
  output logic [15:0]                        fail_cnt,
  output logic [NODES-1:0][15:0]             tx_cnt,
  output logic [NODES-1:0][15:0]             rx_cnt,
  output logic [NODES-1:0][15:0]             drop_cnt
);
  import noc_pkg::*;

  logic                 mgr_rst_n;
  logic [NODES-1:0]     node_rst_n;
  logic                 cfg_we, cfg_clear;
  logic [LBL_W-1:0]     cfg_node, cfg_label;
  port_e                cfg_port;

  // Router port signals, [node][port].
  logic [NODES-1:0][NPORTS-1:0]             r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  logic [NODES-1:0][NPORTS-1:0][FLIT_W-1:0] r_in_flit, r_out_flit;

  // LEDR link wires, indexed by sending node and its direction (N, E, S, W).
  logic [NODES-1:0][3:0][FLIT_W-1:0] link_d, link_p;
  logic [NODES-1:0][3:0]             link_ack;

  rst_sync u_mgr_rst (.clk, .rst_n, .rst_n_out(mgr_rst_n));

  noc_manager #(
    .COLS(COLS), .ROWS(ROWS), .LINK_CAP(LINK_CAP), .CAP_W(CAP_W), .PS_DEPTH(PS_DEPTH)
  ) u_mgr (
    .clk, .rst_n(mgr_rst_n),
    .req_valid, .req_ready, .req_src, .req_dst, .req_cap, .rsp_valid, .rsp_ok,
    .fault_valid, .fault_ready, .fault_node, .fault_dir(dir_e'(fault_dir)),
    .cfg_we, .cfg_node, .cfg_label, .cfg_port, .cfg_clear,
    .busy(mgr_busy), .alt_cnt, .reroute_cnt, .fail_cnt
  );

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int X = n % COLS;
    localparam int Y = n / COLS;

    rst_sync u_rst (.clk(node_clk[n]), .rst_n, .rst_n_out(node_rst_n[n]));

    ls_router #(
      .COLS(COLS), .ROWS(ROWS), .NODE_ID(n), .DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_router (
      .clk(node_clk[n]), .rst_n(node_rst_n[n]), .cfg_clk(clk), .cfg_rst_n(mgr_rst_n),
      .in_valid(r_in_valid[n]), .in_ready(r_in_ready[n]), .in_flit(r_in_flit[n]),
      .out_valid(r_out_valid[n]), .out_ready(r_out_ready[n]), .out_flit(r_out_flit[n]),
      .cfg_we, .cfg_node, .cfg_label, .cfg_port, .cfg_clear,
      .drop_cnt(drop_cnt[n])
    );

    network_adapter #(.NODES(NODES), .DATA_W(DATA_W)) u_na (
      .clk(node_clk[n]), .rst_n(node_rst_n[n]), .fi, .hi,
      .src_valid(src_valid[n]), .src_ready(src_ready[n]), .src_dst(src_dst[n]), .src_data(src_data[n]),
      .snk_valid(snk_valid[n]), .snk_ready(snk_ready[n]), .snk_data(snk_data[n]),
      .rt_in_valid(r_in_valid[n][PORT_L]), .rt_in_ready(r_in_ready[n][PORT_L]),
      .rt_in_flit(r_in_flit[n][PORT_L]),
      .rt_out_valid(r_out_valid[n][PORT_L]), .rt_out_ready(r_out_ready[n][PORT_L]),
      .rt_out_flit(r_out_flit[n][PORT_L]),
      .tx_cnt(tx_cnt[n]), .rx_cnt(rx_cnt[n])
    );

    // d: 0 = N, 1 = E, 2 = S, 3 = W; router port d+1.
    for (genvar d = 0; d < 4; d++) begin : g_dir
      localparam bit HAS_NB = (d == 0) ? (Y > 0) :
                              (d == 1) ? (X < COLS - 1) :
                              (d == 2) ? (Y < ROWS - 1) : (X > 0);
      localparam int NB     = (d == 0) ? n - COLS : (d == 1) ? n + 1 :
                              (d == 2) ? n + COLS : n - 1;
      localparam int OPP    = (d + 2) % 4;
      if (HAS_NB) begin : g_link
        ledr_tx #(.WIDTH(FLIT_W)) u_tx (
          .clk(node_clk[n]), .rst_n(node_rst_n[n]),
          .in_valid(r_out_valid[n][d+1]), .in_ready(r_out_ready[n][d+1]),
          .in_flit(r_out_flit[n][d+1]),
          .rail_d(link_d[n][d]), .rail_p(link_p[n][d]), .ack(link_ack[n][d])
        );
        ledr_rx #(.WIDTH(FLIT_W)) u_rx (
          .clk(node_clk[n]), .rst_n(node_rst_n[n]),
          .rail_d(link_d[NB][OPP]), .rail_p(link_p[NB][OPP]), .ack(link_ack[NB][OPP]),
          .out_valid(r_in_valid[n][d+1]), .out_ready(r_in_ready[n][d+1]),
          .out_flit(r_in_flit[n][d+1])
        );
      end else begin : g_edge
        assign r_out_ready[n][d+1] = 1'b1;
        assign r_in_valid[n][d+1]  = 1'b0;
        assign r_in_flit[n][d+1]   = '0;
        assign link_d[n][d]        = '0;
        assign link_p[n][d]        = '0;
        assign link_ack[n][d]      = 1'b0;
      end
    end
  end
endmodule
