// Label routing table of one router.
// One entry per label (a label is a destination node id): a valid bit and the output port
// that leads one hop closer to that destination. The NoC manager writes entries over a
// configuration bus shared by all routers; an entry is taken when cfg_node equals this
// router's NODE_ID. cfg_clear invalidates every entry (used when the manager re-routes
// after a link fault). The table and its writer follow the document; indexing by
// destination label and the bus format are this design's choices.
// Interface: cfg_we/cfg_node/cfg_label/cfg_port/cfg_clear (write), rd_label[NRD] ->
// rd_valid[NRD], rd_port[NRD] (NRD combinational read ports, one per input FIFO).
// Timing: a write is visible to the read ports in the cycle after cfg_we.
module route_table #(
  parameter int NODES   = 64,
  parameter int NODE_ID = 0,
  parameter int NRD     = 5,
  localparam int LBL_W  = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [LBL_W-1:0]           cfg_node,
  input  logic [LBL_W-1:0]           cfg_label,
  input  noc_pkg::port_e             cfg_port,
  input  logic                       cfg_clear,
  input  logic [NRD-1:0][LBL_W-1:0]  rd_label,
  output logic [NRD-1:0]             rd_valid,
  output noc_pkg::port_e [NRD-1:0]   rd_port
);
  import noc_pkg::*;

  logic  [NODES-1:0] valid;
  port_e             port [NODES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (cfg_clear) begin
      valid <= '0;
    end else if (cfg_we && cfg_node == LBL_W'(NODE_ID)) begin
      valid[cfg_label] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_node == LBL_W'(NODE_ID)) port[cfg_label] <= cfg_port;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_valid[r] = valid[rd_label[r]];
      rd_port[r]  = port[rd_label[r]];
    end
  end
endmodule
