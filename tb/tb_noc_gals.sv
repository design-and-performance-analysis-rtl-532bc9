// Multi-clock testbench of ls_noc_top: a 4 x 4 mesh where every node runs on its own
// clock (half periods between 5.0 and 8.0 ns, none equal to the manager's 5 ns) so every
// link joins two unrelated clock domains. Eight pipes are set up, eight sources stream
// packets on their own clocks and the sinks apply random back-pressure on theirs. Every
// packet must arrive once, intact and in order.
module tb_noc_gals;
  localparam int COLS = 4, ROWS = 4, NODES = 16, LW = 4, DW = 16, K = 40;
  logic clk = 0, rst_n = 1, fi = 0, hi = 1;
  bit   nclk [NODES];
  logic [NODES-1:0] node_clk;
  logic [NODES-1:0] src_valid, src_ready, snk_valid, snk_ready;
  logic [NODES-1:0][LW-1:0] src_dst;
  logic [NODES-1:0][DW-1:0] src_data, snk_data;
  logic req_valid = 0, req_ready, rsp_valid, rsp_ok;
  logic [LW-1:0] req_src = '0, req_dst = '0;
  logic [7:0] req_cap = 8'd2;
  logic fault_valid = 0, fault_ready, mgr_busy;
  logic [LW-1:0] fault_node = '0;
  logic [1:0] fault_dir = '0;
  logic [15:0] alt_cnt, reroute_cnt, fail_cnt;
  logic [NODES-1:0][15:0] tx_cnt, rx_cnt, drop_cnt;

  ls_noc_top #(.COLS(COLS), .ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0, delivered = 0;
  bit go = 0;
  logic [DW-1:0] expq [NODES][$];      // by destination; each destination has one source
  // destination of each node's stream, -1 for none
  localparam int DST [NODES] = '{15, -1, -1, 12, -1, 10, 9, -1, -1, 6, 5, -1, 3, -1, -1, 0};

  always #5 clk = !clk;
  initial #1 rst_n = 0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired, delivered %0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam real HP = 5.0 + 0.3 * ((n * 7) % 11) + 0.05;
    logic          v = 0, r = 1;
    logic [DW-1:0] dat = '0;
    assign node_clk[n]  = nclk[n];
    assign src_valid[n] = v;
    assign src_dst[n]   = (DST[n] < 0) ? '0 : LW'(DST[n]);
    assign src_data[n]  = dat;
    assign snk_ready[n] = r;

    always #(HP) nclk[n] = !nclk[n];

    always @(negedge nclk[n]) r <= ($urandom % 4) != 0;

    always @(posedge nclk[n]) begin
      if (rst_n && snk_valid[n] && snk_ready[n]) begin
        checks++;
        delivered++;
        if (expq[n].size() == 0 || expq[n][0] != snk_data[n]) begin
          failures++; $display("FAIL node %0d got %h", n, snk_data[n]);
        end
        if (expq[n].size() > 0) void'(expq[n].pop_front());
      end
    end

    if (DST[n] >= 0) begin : g_src
      initial begin
        wait (go);
        for (int k = 0; k < K; k++) begin
          @(negedge nclk[n]);
          v   = 1;
          dat = DW'($urandom);
          @(posedge nclk[n]);
          while (!src_ready[n]) @(posedge nclk[n]);
          expq[DST[n]].push_back(dat);
          @(negedge nclk[n]);
          v = 0;
          repeat ($urandom % 3) @(negedge nclk[n]);
        end
      end
    end
  end

  task automatic pipe(int s, int d);
    @(negedge clk);
    req_valid = 1; req_src = LW'(s); req_dst = LW'(d);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (!rsp_ok) begin failures++; $display("FAIL pipe %0d->%0d", s, d); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (6) @(posedge clk);
    for (int n = 0; n < NODES; n++) if (DST[n] >= 0) pipe(n, DST[n]);
    go = 1;
    wait (delivered == 8 * K);
    repeat (100) @(posedge clk);
    for (int n = 0; n < NODES; n++) begin
      checks++;
      if (expq[n].size() != 0) begin failures++; $display("FAIL %0d packets for node %0d lost", expq[n].size(), n); end
      if (DST[n] >= 0) begin
        checks++;
        if (tx_cnt[n] != 16'(K) || rx_cnt[DST[n]] != 16'(K)) begin
          failures++; $display("FAIL counters node %0d", n);
        end
      end
    end
    $display("delivered %0d packets across %0d clock domains", delivered, NODES + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
