// Self-checking testbench of noc_manager on a 4x4 mesh with a 4-entry pipe stack.
// The configuration bus is captured into a model of all routing tables; after each pipe
// the path is followed through that model and must reach the destination in the minimal
// number of hops. Covered: X-first routing, the Y alternative when the X link lacks
// capacity, a failing pipe, a source = destination pipe, a full pipe stack, and a link
// fault after which every pipe is re-routed around the broken link. The setup time of a
// pipe is checked to be 2 x hops + 2 cycles.
module tb_noc_manager;
  import noc_pkg::*;
  localparam int COLS = 4, ROWS = 4, N = 16, LW = 4, CW = 8;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, rsp_valid, rsp_ok;
  logic [LW-1:0] req_src = '0, req_dst = '0;
  logic [CW-1:0] req_cap = '0;
  logic fault_valid = 0, fault_ready;
  logic [LW-1:0] fault_node = '0;
  dir_e fault_dir = DIR_N;
  logic cfg_we, cfg_clear, busy;
  logic [LW-1:0] cfg_node, cfg_label;
  port_e cfg_port;
  logic [15:0] alt_cnt, reroute_cnt, fail_cnt;
  int checks = 0, failures = 0;
  bit    m_valid [N][N];
  port_e m_port  [N][N];

  noc_manager #(.COLS(COLS), .ROWS(ROWS), .LINK_CAP(10), .CAP_W(CW), .PS_DEPTH(4)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (cfg_clear) foreach (m_valid[a, b]) m_valid[a][b] = 0;
    else if (cfg_we) begin m_valid[cfg_node][cfg_label] = 1; m_port[cfg_node][cfg_label] = cfg_port; end
  end

  // Follow the model tables; returns hops or -1. Sets used_bad if link (bn, bp) is used.
  function automatic int follow(int s, int d, int bn, port_e bp, output bit used_bad);
    int n = s, hops = 0;
    used_bad = 0;
    while (n != d) begin
      if (!m_valid[n][d] || hops > 2 * N) return -1;
      if (n == bn && m_port[n][d] == bp) used_bad = 1;
      case (m_port[n][d])
        PORT_N: n -= COLS;
        PORT_S: n += COLS;
        PORT_E: n += 1;
        PORT_W: n -= 1;
        default: return -1;
      endcase
      hops++;
    end
    return hops;
  endfunction

  function automatic int mdist(int s, int d);
    int dx = s % COLS - d % COLS, dy = s / COLS - d / COLS;
    return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
  endfunction

  task automatic pipe(int s, int d, int c, bit exp_ok);
    int cycles = 0;
    bit bad;
    @(negedge clk);
    req_valid = 1; req_src = LW'(s); req_dst = LW'(d); req_cap = CW'(c);
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!rsp_valid) begin @(negedge clk); cycles++; end
    checks++;
    if (rsp_ok != exp_ok) begin failures++; $display("FAIL pipe %0d->%0d ok=%b", s, d, rsp_ok); end
    if (exp_ok && s != d) begin
      checks++;
      if (cycles + 1 != 2 * mdist(s, d) + 2) begin
        failures++; $display("FAIL pipe %0d->%0d took %0d cycles", s, d, cycles + 1);
      end
    end
    @(negedge clk);
    if (exp_ok) begin
      checks++;
      if (follow(s, d, -1, PORT_L, bad) != mdist(s, d)) begin
        failures++; $display("FAIL path %0d->%0d not minimal/complete", s, d);
      end
    end
  endtask

  initial begin
    bit bad;
    int h;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pipe(0, 15, 6, 1);          // X first: 0-1-2-3-7-11-15
    checks++;
    if (m_port[0][15] != PORT_E) begin failures++; $display("FAIL first hop not East"); end
    pipe(0, 15, 6, 1);          // 0->1 has only 4 left: alternative South
    checks++;
    if (alt_cnt == 0 || m_port[0][15] != PORT_S) begin failures++; $display("FAIL alternative not taken"); end
    pipe(0, 3, 6, 0);           // only productive link 0->1 has 4 left: fails
    checks++;
    if (fail_cnt != 1) begin failures++; $display("FAIL fail_cnt %0d", fail_cnt); end
    pipe(5, 5, 3, 1);           // source = destination
    pipe(12, 3, 2, 1);
    pipe(3, 12, 2, 1);
    pipe(6, 9, 1, 0);           // stack of 4 is full
    // fault on link 13 -> 14 (East of 13), used by pipe 12->3? (12-13-14-15-11-7-3)
    @(negedge clk);
    fault_valid = 1; fault_node = 4'd13; fault_dir = DIR_E;
    while (!fault_ready) @(negedge clk);
    @(negedge clk);
    fault_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
    checks++;
    if (reroute_cnt != 1) begin failures++; $display("FAIL no re-route"); end
    for (int k = 0; k < 3; k++) begin
      int s, d;
      s = (k == 0) ? 0 : (k == 1) ? 12 : 3;
      d = (k == 0) ? 15 : (k == 1) ? 3 : 12;
      h = follow(s, d, 13, PORT_E, bad);
      checks++;
      if (h != mdist(s, d) || bad) begin
        failures++; $display("FAIL after fault %0d->%0d hops %0d bad %b", s, d, h, bad);
      end
    end
    $display("alt_cnt=%0d fail_cnt=%0d reroute_cnt=%0d", alt_cnt, fail_cnt, reroute_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
