// Network adapter between an IP core and the Local port of its router.
// Send side: the core offers a 16-bit payload and a destination node; the adapter
// bit-transition-encodes the payload, puts the destination id in front as the label and
// holds the flit in a register until the router accepts it. Receive side: the label is
// removed from the arriving flit, the payload is decoded and held for the core. tx_cnt
// and rx_cnt count packets sent and received, from which a delivery ratio follows.
// Encode-before-send, decode-after-receive and label removal follow the document; the
// registers, handshakes and the counters' width are this design's.
// Interface: src_* (core to network), snk_* (network to core), rt_* (router Local port),
// fi/hi (code flags, equal in all adapters). Timing: one register stage each way.
module network_adapter #(
  parameter int NODES  = 64,
  parameter int DATA_W = 16,
  localparam int LBL_W  = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int FLIT_W = LBL_W + DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fi,
  input  logic              hi,
  input  logic              src_valid,
  output logic              src_ready,
  input  logic [LBL_W-1:0]  src_dst,
  input  logic [DATA_W-1:0] src_data,
  output logic              snk_valid,
  input  logic              snk_ready,
  output logic [DATA_W-1:0] snk_data,
  output logic              rt_in_valid,
  input  logic              rt_in_ready,
  output logic [FLIT_W-1:0] rt_in_flit,
  input  logic              rt_out_valid,
  output logic              rt_out_ready,
  input  logic [FLIT_W-1:0] rt_out_flit,
  output logic [15:0]       tx_cnt,
  output logic [15:0]       rx_cnt
);
  logic [DATA_W-1:0] enc, dec;

  bted_encoder #(.DATA_W(DATA_W)) u_enc (.fi, .hi, .data_in(src_data), .data_out(enc));
  bted_decoder #(.DATA_W(DATA_W)) u_dec (.fi, .hi, .data_in(rt_out_flit[DATA_W-1:0]), .data_out(dec));

  assign src_ready    = !rt_in_valid || rt_in_ready;
  assign rt_out_ready = !snk_valid || snk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rt_in_valid <= 1'b0;
      rt_in_flit  <= '0;
      snk_valid   <= 1'b0;
      snk_data    <= '0;
      tx_cnt      <= '0;
      rx_cnt      <= '0;
    end else begin
      if (src_valid && src_ready) begin
        rt_in_valid <= 1'b1;
        rt_in_flit  <= {src_dst, enc};
        tx_cnt      <= tx_cnt + 1'b1;
      end else if (rt_in_ready) begin
        rt_in_valid <= 1'b0;
      end
      if (rt_out_valid && rt_out_ready) begin
        snk_valid <= 1'b1;
        snk_data  <= dec;
        rx_cnt    <= rx_cnt + 1'b1;
      end else if (snk_ready) begin
        snk_valid <= 1'b0;
      end
    end
  end
endmodule
