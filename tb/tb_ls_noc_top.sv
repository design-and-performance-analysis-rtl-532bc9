// End-to-end testbench of ls_noc_top at its default size (8 x 8 mesh, 16-bit payload).
// Pipes are set up through the NoC manager, then several sources stream packets with
// random payloads while some sinks apply random back-pressure. Every packet must reach
// its destination core intact and in order per source (packet delivery ratio 100 %).
// Each mechanism of the design is made to happen and counted: XY pipe set-up, the
// alternative (Y) link when capacity runs out, a pipe refused for lack of capacity,
// source = destination delivery, two sources contending for one destination, a packet
// with no route being dropped, sink back-pressure, BTED-encoded flits on the links, and a
// link fault followed by re-routing with traffic continuing on the new path.
module tb_ls_noc_top;
  localparam int COLS = 8, ROWS = 8, NODES = 64, LW = 6, DW = 16;
  logic clk = 0, rst_n = 1, fi = 1, hi = 1;
  logic [NODES-1:0] node_clk;
  assign node_clk = {NODES{clk}};   // one clock everywhere; see tb_noc_gals for separate clocks
  logic [NODES-1:0] src_valid = '0, src_ready, snk_valid, snk_ready = '1;
  logic [NODES-1:0][LW-1:0] src_dst = '0;
  logic [NODES-1:0][DW-1:0] src_data = '0, snk_data;
  logic req_valid = 0, req_ready, rsp_valid, rsp_ok;
  logic [LW-1:0] req_src = '0, req_dst = '0;
  logic [7:0] req_cap = '0;
  logic fault_valid = 0, fault_ready, mgr_busy;
  logic [LW-1:0] fault_node = '0;
  logic [1:0] fault_dir = '0;
  logic [15:0] alt_cnt, reroute_cnt, fail_cnt;
  logic [NODES-1:0][15:0] tx_cnt, rx_cnt, drop_cnt;

  ls_noc_top dut (.*);

  int checks = 0, failures = 0;
  int n_contention = 0, n_backpressure = 0, n_encoded = 0, n_local = 0, n_delivered = 0;
  int n_sent = 0;
  longint cycle = 0;
  logic [DW-1:0] expq [NODES][NODES][$];   // [src][dst]
  longint        sendt [NODES][NODES][$];
  longint        lat_sum = 0, lat_max = 0;

  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset fires
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic [DW-1:0] src_data_q0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.g_node[6].u_router.req[0]) > 1) n_contention++;
    if (dut.r_in_valid[0][0] && dut.r_in_ready[0][0] &&
        dut.r_in_flit[0][0][DW-1:0] != src_data_q0) n_encoded++;
  end
  always @(posedge clk) if (src_valid[0] && src_ready[0]) src_data_q0 <= src_data[0];

  // sinks: match against the queue of any source sending to this node
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NODES; d++) begin
      if (snk_valid[d] && snk_ready[d]) begin
        bit found;
        found = 0;
        checks++;
        for (int s = 0; s < NODES && !found; s++) begin
          if (expq[s][d].size() > 0 && expq[s][d][0] == snk_data[d]) begin
            longint l;
            found = 1;
            void'(expq[s][d].pop_front());
            l = cycle - sendt[s][d].pop_front();
            lat_sum += l;
            if (l > lat_max) lat_max = l;
            if (s == d) n_local++;
          end
        end
        if (!found) begin failures++; $display("FAIL node %0d got unexpected %h", d, snk_data[d]); end
        n_delivered++;
      end
    end
  end

  task automatic pipe(int s, int d, int c, bit exp_ok);
    @(negedge clk);
    req_valid = 1; req_src = LW'(s); req_dst = LW'(d); req_cap = 8'(c);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_ok != exp_ok) begin failures++; $display("FAIL pipe %0d->%0d ok=%b", s, d, rsp_ok); end
  endtask

  // one source streams n packets to d
  task automatic stream(int s, int d, int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      src_valid[s] = 1; src_dst[s] = LW'(d); src_data[s] = DW'($urandom);
      @(posedge clk);
      while (!src_ready[s]) begin n_backpressure++; @(posedge clk); end
      expq[s][d].push_back(src_data[s]);
      sendt[s][d].push_back(cycle);
      n_sent++;
      #1 src_valid[s] = 0;
    end
  endtask

  task automatic drain(int max_cycles);
    int q;
    for (int t = 0; t < max_cycles; t++) begin
      @(posedge clk);
      q = 0;
      for (int s = 0; s < NODES; s++) for (int d = 0; d < NODES; d++) q += expq[s][d].size();
      if (q == 0) break;
    end
  endtask

  // random back-pressure at node 6 during the streaming phases
  bit bp_on = 0;
  always @(negedge clk) snk_ready[6] <= bp_on ? ($urandom % 3 == 0) : 1'b1;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);   // reset synchronizers release two edges later
    // pipes
    pipe(0, 6, 3, 1);       // row 0, X only
    pipe(14, 6, 3, 1);      // second source to node 6
    pipe(1, 15, 4, 1);
    pipe(63, 0, 5, 1);
    pipe(0, 63, 8, 1);      // link 0->1 has 7 left: alternative South
    pipe(0, 63, 8, 0);      // neither 0->1 (7) nor 0->8 (2) has 8: refused
    pipe(5, 5, 1, 1);       // source = destination
    checks++;
    if (alt_cnt == 0 || fail_cnt != 1) begin
      failures++; $display("FAIL alt_cnt %0d fail_cnt %0d", alt_cnt, fail_cnt);
    end
    // single-packet latency 0 -> 6 (6 hops) through an idle network
    stream(0, 6, 1);
    drain(500);
    $display("latency 0->6 (6 hops): %0d cycles", lat_max);
    checks++;
    if (lat_max > 6 * 10 + 12) begin failures++; $display("FAIL latency %0d", lat_max); end
    // streaming with contention and back-pressure
    bp_on = 1;
    fork
      stream(0, 6, 60);
      stream(14, 6, 60);
      stream(1, 15, 60);
      stream(63, 0, 60);
      stream(5, 5, 20);
    join
    drain(20000);
    bp_on = 0;
    // a packet to a node no pipe leads to: dropped at node 0
    begin
      int drops_before;
      drops_before = drop_cnt[0];
      @(negedge clk);
      src_valid[0] = 1; src_dst[0] = LW'(40); src_data[0] = 16'hBEEF;
      @(posedge clk);
      #1 src_valid[0] = 0;
      repeat (20) @(posedge clk);
      checks++;
      if (drop_cnt[0] != 16'(drops_before + 1)) begin failures++; $display("FAIL no drop"); end
    end
    // link fault on 2 -> 3 (East of node 2), used by pipe 0 -> 6
    @(negedge clk);
    fault_valid = 1; fault_node = LW'(2); fault_dir = 2'd1;
    while (!fault_ready) @(negedge clk);
    @(negedge clk);
    fault_valid = 0;
    while (mgr_busy) @(negedge clk);
    checks++;
    if (reroute_cnt != 1) begin failures++; $display("FAIL reroute_cnt %0d", reroute_cnt); end
    checks++;
    if (!dut.g_node[2].u_router.u_table.valid[6] ||
        !(dut.g_node[2].u_router.u_table.port[6] inside {noc_pkg::PORT_S, noc_pkg::PORT_N})) begin
      failures++; $display("FAIL node 2 does not detour label 6 around the broken link");
    end
    fork
      stream(0, 6, 40);
      stream(14, 6, 40);
      stream(63, 0, 40);
    join
    drain(20000);
    // totals
    for (int n = 0; n < NODES; n++) if (tx_cnt[n] != 0 || rx_cnt[n] != 0 || drop_cnt[n] != 0)
      $display("node %0d tx %0d rx %0d drop %0d", n, tx_cnt[n], rx_cnt[n], drop_cnt[n]);
    for (int s = 0; s < NODES; s++) for (int d = 0; d < NODES; d++) begin
      if (expq[s][d].size() != 0) begin
        checks++; failures++; $display("FAIL %0d packets %0d->%0d lost", expq[s][d].size(), s, d);
      end
    end
    checks++;
    if (n_delivered != n_sent) begin failures++; $display("FAIL delivered %0d of %0d", n_delivered, n_sent); end
    $display("PDR %0d/%0d, mean latency %0d cycles, max %0d", n_delivered, n_sent,
             lat_sum / (n_delivered > 0 ? n_delivered : 1), lat_max);
    $display("mechanisms: contention=%0d backpressure=%0d encoded=%0d local=%0d alt=%0d refused=%0d drops=%0d reroutes=%0d",
             n_contention, n_backpressure, n_encoded, n_local, alt_cnt, fail_cnt, drop_cnt[0], reroute_cnt);
    checks++; if (n_contention == 0)   begin failures++; $display("FAIL no contention"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (n_encoded == 0)      begin failures++; $display("FAIL no encoded flit seen"); end
    checks++; if (n_local == 0)        begin failures++; $display("FAIL no local delivery"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
