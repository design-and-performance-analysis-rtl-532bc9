// Label-switched router with five ports: Local, North, East, South, West.
// Every input port has a FIFO. The label in the head flit of each FIFO selects an output:
// the Local port when the label is this router's own id, otherwise the port stored for
// that label in the routing table. A flit whose label has no table entry is dropped and
// counted in drop_cnt. Each output port has a round-robin arbiter over the inputs that
// want it and a register that holds the winning flit until the next stage takes it. A
// flit therefore crosses FIFO head -> crossbar -> output register in one cycle.
// Five ports, input FIFOs, arbiter, crossbar and label routing follow the document; the
// drop rule, the handshake and the output register form are this design's.
// Interface: in_*/out_* port arrays indexed by noc_pkg::port_e, routing table
// configuration bus cfg_* with its own clock cfg_clk (the NoC manager's clock). The
// table changes only while the manager sets up pipes, so the router reads it as
// quasi-static configuration even when cfg_clk and clk are unrelated. Timing: a flit written into an empty FIFO leaves the output
// register two cycles later if the output is free.
module ls_router #(
  parameter int COLS       = 8,
  parameter int ROWS       = 8,
  parameter int NODE_ID    = 0,
  parameter int DATA_W     = 16,
  parameter int FIFO_DEPTH = 4,
  localparam int NODES     = COLS * ROWS,
  localparam int LBL_W     = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int FLIT_W    = LBL_W + DATA_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   cfg_clk,
  input  logic                                   cfg_rst_n,
  input  logic [noc_pkg::NPORTS-1:0]             in_valid,
  output logic [noc_pkg::NPORTS-1:0]             in_ready,
  input  logic [noc_pkg::NPORTS-1:0][FLIT_W-1:0] in_flit,
  output logic [noc_pkg::NPORTS-1:0]             out_valid,
  input  logic [noc_pkg::NPORTS-1:0]             out_ready,
  output logic [noc_pkg::NPORTS-1:0][FLIT_W-1:0] out_flit,
  input  logic                                   cfg_we,
  input  logic [LBL_W-1:0]                       cfg_node,
  input  logic [LBL_W-1:0]                       cfg_label,
  input  noc_pkg::port_e                         cfg_port,
  input  logic                                   cfg_clear,
  output logic [15:0]                            drop_cnt
);
  import noc_pkg::*;

  logic [NPORTS-1:0]             head_valid, pop;
  logic [NPORTS-1:0][FLIT_W-1:0] head_flit;
  logic [NPORTS-1:0][LBL_W-1:0]  head_label;
  logic [NPORTS-1:0]             tbl_valid;
  port_e [NPORTS-1:0]            tbl_port;
  port_e [NPORTS-1:0]            want;
  logic [NPORTS-1:0]             drop;
  logic [NPORTS-1:0][NPORTS-1:0] req;   // req[o][i]
  logic [NPORTS-1:0][NPORTS-1:0] gnt;   // gnt[o][i]
  logic [NPORTS-1:0]             out_free;
  logic [NPORTS-1:0][FLIT_W-1:0] xbar_out;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    input_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_ready(in_ready[i]), .in_data(in_flit[i]),
      .out_valid(head_valid[i]), .out_ready(pop[i]), .out_data(head_flit[i])
    );
    assign head_label[i] = head_flit[i][FLIT_W-1 -: LBL_W];
  end

  route_table #(.NODES(NODES), .NODE_ID(NODE_ID), .NRD(NPORTS)) u_table (
    .clk(cfg_clk), .rst_n(cfg_rst_n),
    .cfg_we, .cfg_node, .cfg_label, .cfg_port, .cfg_clear,
    .rd_label(head_label), .rd_valid(tbl_valid), .rd_port(tbl_port)
  );

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      if (head_label[i] == LBL_W'(NODE_ID)) begin
        want[i] = PORT_L;
        drop[i] = 1'b0;
      end else begin
        want[i] = tbl_port[i];
        drop[i] = head_valid[i] && !tbl_valid[i];
      end
    end
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i] = head_valid[i] && !drop[i] && (want[i] == port_e'(o));
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign out_free[o] = !out_valid[o] || out_ready[o];
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n, .req(req[o]), .en(out_free[o]), .gnt(gnt[o])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
        out_flit[o]  <= '0;
      end else if (|gnt[o]) begin
        out_valid[o] <= 1'b1;
        out_flit[o]  <= xbar_out[o];
      end else if (out_ready[o]) begin
        out_valid[o] <= 1'b0;
      end
    end
  end

  crossbar #(.N(NPORTS), .WIDTH(FLIT_W)) u_xbar (
    .in_flit(head_flit), .sel(gnt), .out_flit(xbar_out)
  );

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      pop[i] = drop[i];
      for (int o = 0; o < NPORTS; o++) pop[i] |= gnt[o][i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drop_cnt <= '0;
    else drop_cnt <= drop_cnt + 16'($countones(drop));
  end
endmodule
