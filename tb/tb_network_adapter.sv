// Self-checking testbench of network_adapter (64-node configuration).
// Packets from the core must appear at the router side as {destination, encoded payload}
// with the encoding computed by a reference formula; the router side is looped back, so
// the core must receive the original payloads in order. Random back-pressure on both
// ends; the packet counters must match.
module tb_network_adapter;
  localparam int NODES = 64, DW = 16, LW = 6, FW = LW + DW;
  logic clk = 0, rst_n = 0, fi = 1, hi = 0;
  logic src_valid = 0, src_ready, snk_valid, snk_ready = 0;
  logic [LW-1:0] src_dst = '0;
  logic [DW-1:0] src_data = '0, snk_data;
  logic rt_in_valid, rt_in_ready, rt_out_valid, rt_out_ready;
  logic [FW-1:0] rt_in_flit, rt_out_flit;
  logic [15:0] tx_cnt, rx_cnt;
  logic [FW-1:0] qf[$];
  logic [DW-1:0] qd[$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  network_adapter #(.NODES(NODES), .DATA_W(DW)) dut (.*);

  // loop back: the router Local output returns what the Local input accepted
  logic lb_valid = 0;
  logic [FW-1:0] lb_flit;
  assign rt_in_ready  = !lb_valid || rt_out_ready;
  assign rt_out_valid = lb_valid;
  assign rt_out_flit  = lb_flit;
  always @(posedge clk) begin
    if (rt_in_valid && rt_in_ready) begin lb_valid <= 1; lb_flit <= rt_in_flit; end
    else if (rt_out_ready) lb_valid <= 0;
  end

  function automatic logic [DW-1:0] ref_enc(logic [DW-1:0] d);
    logic [DW-1:0] odd_bits;
    odd_bits = {(DW/2){2'b10}};
    return d ^ (d << 1) ^ ({DW{fi}} & odd_bits) ^ ({DW{fi ^ hi}} & ~odd_bits);
  endfunction

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && rt_in_valid && rt_in_ready) begin
      checks++;
      if (qf.size() == 0 || rt_in_flit != qf[0]) begin failures++; $display("FAIL flit %h", rt_in_flit); end
      if (qf.size()) void'(qf.pop_front());
    end
    if (rst_n && snk_valid && snk_ready) begin
      checks++;
      if (qd.size() == 0 || snk_data != qd[0]) begin failures++; $display("FAIL data %h", snk_data); end
      if (qd.size()) void'(qd.pop_front());
      got++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k == 1009) begin fi = 0; hi = 1; end
      if (k >= 1000 && k < 1010) begin src_valid = 0; snk_ready = 1; continue; end
      src_valid = ($urandom % 2);
      src_dst   = LW'($urandom);
      src_data  = DW'($urandom);
      snk_ready = ($urandom % 3) != 0;
      @(posedge clk);
      if (src_valid && src_ready) begin
        qf.push_back({src_dst, ref_enc(src_data)});
        qd.push_back(src_data);
        sent++;
      end
    end
    @(negedge clk);
    src_valid = 0; snk_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (got != sent || tx_cnt != 16'(sent) || rx_cnt != 16'(sent)) begin
      failures++; $display("FAIL counts sent %0d got %0d tx %0d rx %0d", sent, got, tx_cnt, rx_cnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
