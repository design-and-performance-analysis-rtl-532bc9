// Self-checking testbench of ls_router: the centre router (id 4) of a 3x3 mesh.
// The routing table is written over the configuration bus, then random flits enter all
// five inputs under random output back-pressure. Each flit must leave on the port its
// label selects (own id -> Local, table entry otherwise), in order per input/output pair;
// flits with an unconfigured label must be dropped and counted. Also checked: the
// two-cycle latency through an idle router and that output contention occurred.
module tb_ls_router;
  import noc_pkg::*;
  localparam int COLS = 3, ROWS = 3, ID = 4, DW = 16, LW = 4, FW = LW + DW;
  logic clk = 0, rst_n = 0;
  logic cfg_clk, cfg_rst_n;
  assign cfg_clk = clk;
  assign cfg_rst_n = rst_n;
  logic [NPORTS-1:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  logic [NPORTS-1:0][FW-1:0] in_flit = '0, out_flit;
  logic cfg_we = 0, cfg_clear = 0;
  logic [LW-1:0] cfg_node = '0, cfg_label = '0;
  port_e cfg_port = PORT_L;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0, contention = 0, sent_drop = 0;
  port_e route [9];
  bit    routed [9];
  logic [FW-1:0] q [NPORTS][NPORTS][$];

  ls_router #(.COLS(COLS), .ROWS(ROWS), .NODE_ID(ID), .DATA_W(DW), .FIFO_DEPTH(4)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(int label, port_e p);
    @(negedge clk);
    cfg_we = 1; cfg_node = LW'(ID); cfg_label = LW'(label); cfg_port = p;
    routed[label] = 1; route[label] = p;
    @(negedge clk);
    cfg_we = 0;
  endtask

  always @(posedge clk) begin
    for (int o = 0; o < NPORTS; o++) if ($countones(dut.req[o]) > 1) contention++;
  end

  // output scoreboard: the input index is carried in data bits [2:0]
  always @(posedge clk) begin
    if (rst_n) for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int i;
        i = int'(out_flit[o][2:0]);
        checks++;
        if (i >= NPORTS || q[i][o].size() == 0 || q[i][o][0] != out_flit[o]) begin
          failures++; $display("FAIL port %0d got %h", o, out_flit[o]);
        end else void'(q[i][o].pop_front());
      end
    end
  end

  initial begin
    foreach (routed[i]) routed[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg(1, PORT_N); cfg(7, PORT_S); cfg(5, PORT_E); cfg(3, PORT_W);
    cfg(0, PORT_W); cfg(8, PORT_E); cfg(6, PORT_S);
    // latency through an idle router: West input to East output
    @(negedge clk);
    in_valid[PORT_W] = 1; in_flit[PORT_W] = {4'd5, 16'h11B4 & ~16'h7 | 16'(PORT_W)};
    q[PORT_W][PORT_E].push_back(in_flit[PORT_W]);
    @(negedge clk);
    in_valid = '0;
    @(negedge clk);
    checks++;
    if (!(out_valid[PORT_E] && out_flit[PORT_E] == {4'd5, 16'h11B4 & ~16'h7 | 16'(PORT_W)})) begin
      failures++; $display("FAIL latency: not at East output 2 cycles after entry");
    end
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      out_ready = NPORTS'($urandom) | NPORTS'($urandom);
      for (int i = 0; i < NPORTS; i++) begin
        in_valid[i] = ($urandom % 3) != 0;
        in_flit[i]  = {LW'($urandom % 9), 13'($urandom), 3'(i)};
      end
      @(posedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          int lbl;
          lbl = int'(in_flit[i][FW-1 -: LW]);
          if (lbl == ID) q[i][PORT_L].push_back(in_flit[i]);
          else if (routed[lbl]) q[i][route[lbl]].push_back(in_flit[i]);
          else sent_drop++;
        end
      end
    end
    @(negedge clk);
    in_valid = '0; out_ready = '1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NPORTS; i++) for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (q[i][o].size() != 0) begin failures++; $display("FAIL %0d flits lost %0d->%0d", q[i][o].size(), i, o); end
    end
    checks++;
    if (drop_cnt != 16'(sent_drop) || sent_drop == 0) begin
      failures++; $display("FAIL drop count %0d exp %0d", drop_cnt, sent_drop);
    end
    checks++;
    if (contention == 0) begin failures++; $display("FAIL no output contention happened"); end
    $display("contention cycles %0d, dropped %0d", contention, sent_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
