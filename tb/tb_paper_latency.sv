// Latency workload testbench: single packets through idle networks.
// On a 3 x 3 mesh a pipe is set up from R00 to each of R03, R04, R05 and R06 and one
// packet is timed on each; on the default 8 x 8 mesh the same is done from node 1 to
// node 15. Every packet must arrive intact. On an idle network the latency must grow by
// the same number of cycles for every extra hop (one router plus one LEDR link), so all
// measurements must fit latency = L0 + hops * LH with LH taken from the first two.
module tb_paper_latency;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  always #5 clk = !clk;
  initial #1 rst_n = 0;   // a falling edge, so every asynchronous reset fires
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 3 x 3 ----------------
  localparam int N3 = 9, L3 = 4;
  logic [N3-1:0] s3_valid = '0, s3_ready, k3_valid, k3_ready = '1;
  logic [N3-1:0][L3-1:0] s3_dst = '0;
  logic [N3-1:0][15:0] s3_data = '0, k3_data;
  logic r3_valid = 0, r3_ready, p3_valid, p3_ok, f3_ready, b3;
  logic [L3-1:0] r3_src = '0, r3_dst = '0;
  logic [15:0] a3, rr3, fc3;
  logic [N3-1:0][15:0] tx3, rx3, dr3;

  ls_noc_top #(.COLS(3), .ROWS(3)) u3 (
    .clk, .node_clk({N3{clk}}), .rst_n, .fi(1'b1), .hi(1'b1),
    .src_valid(s3_valid), .src_ready(s3_ready), .src_dst(s3_dst), .src_data(s3_data),
    .snk_valid(k3_valid), .snk_ready(k3_ready), .snk_data(k3_data),
    .req_valid(r3_valid), .req_ready(r3_ready), .req_src(r3_src), .req_dst(r3_dst), .req_cap(8'd2),
    .rsp_valid(p3_valid), .rsp_ok(p3_ok), .fault_valid(1'b0), .fault_ready(f3_ready),
    .fault_node('0), .fault_dir(2'd0), .mgr_busy(b3), .alt_cnt(a3), .reroute_cnt(rr3),
    .fail_cnt(fc3), .tx_cnt(tx3), .rx_cnt(rx3), .drop_cnt(dr3)
  );

  // ---------------- 8 x 8 ----------------
  localparam int N8 = 64, L8 = 6;
  logic [N8-1:0] s8_valid = '0, s8_ready, k8_valid, k8_ready = '1;
  logic [N8-1:0][L8-1:0] s8_dst = '0;
  logic [N8-1:0][15:0] s8_data = '0, k8_data;
  logic r8_valid = 0, r8_ready, p8_valid, p8_ok, f8_ready, b8;
  logic [L8-1:0] r8_src = '0, r8_dst = '0;
  logic [15:0] a8, rr8, fc8;
  logic [N8-1:0][15:0] tx8, rx8, dr8;

  ls_noc_top u8 (
    .clk, .node_clk({N8{clk}}), .rst_n, .fi(1'b0), .hi(1'b1),
    .src_valid(s8_valid), .src_ready(s8_ready), .src_dst(s8_dst), .src_data(s8_data),
    .snk_valid(k8_valid), .snk_ready(k8_ready), .snk_data(k8_data),
    .req_valid(r8_valid), .req_ready(r8_ready), .req_src(r8_src), .req_dst(r8_dst), .req_cap(8'd2),
    .rsp_valid(p8_valid), .rsp_ok(p8_ok), .fault_valid(1'b0), .fault_ready(f8_ready),
    .fault_node('0), .fault_dir(2'd0), .mgr_busy(b8), .alt_cnt(a8), .reroute_cnt(rr8),
    .fail_cnt(fc8), .tx_cnt(tx8), .rx_cnt(rx8), .drop_cnt(dr8)
  );

  task automatic run3(int d, output longint lat);
    longint t0;
    @(negedge clk);
    r3_valid = 1; r3_src = '0; r3_dst = L3'(d);
    @(negedge clk);
    r3_valid = 0;
    while (!p3_valid) @(negedge clk);
    checks++;
    if (!p3_ok) begin failures++; $display("FAIL pipe R00->R%02d", d); end
    repeat (3) @(negedge clk);
    s3_valid[0] = 1; s3_dst[0] = L3'(d); s3_data[0] = 16'h11B4;
    @(posedge clk);
    t0 = cycle;
    #1 s3_valid[0] = 0;
    while (!k3_valid[d]) @(posedge clk);
    lat = cycle - t0;
    checks++;
    if (k3_data[d] != 16'h11B4) begin failures++; $display("FAIL data at R%02d: %h", d, k3_data[d]); end
  endtask

  function automatic int hops3(int d);
    return d % 3 + d / 3;
  endfunction

  initial begin
    longint lat [4];
    longint l0, lh, l8;
    int dst [4] = '{3, 4, 5, 6};
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);   // reset synchronizers release two edges later
    for (int k = 0; k < 4; k++) begin
      run3(dst[k], lat[k]);
      $display("3x3 R00 -> R%02d (%0d hops): %0d cycles", dst[k], hops3(dst[k]), lat[k]);
    end
    // R03 is 1 hop, R04 is 2 hops
    lh = lat[1] - lat[0];
    l0 = lat[0] - lh;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (lat[k] != l0 + hops3(dst[k]) * lh) begin
        failures++; $display("FAIL R%02d latency %0d, model %0d", dst[k], lat[k], l0 + hops3(dst[k]) * lh);
      end
    end
    // 8 x 8: node 1 -> node 15, (1,0) -> (7,1): 7 hops
    begin
      longint t0;
      @(negedge clk);
      r8_valid = 1; r8_src = 6'd1; r8_dst = 6'd15;
      @(negedge clk);
      r8_valid = 0;
      while (!p8_valid) @(negedge clk);
      checks++;
      if (!p8_ok) begin failures++; $display("FAIL pipe 1->15"); end
      repeat (3) @(negedge clk);
      s8_valid[1] = 1; s8_dst[1] = 6'd15; s8_data[1] = 16'hECC0;
      @(posedge clk);
      t0 = cycle;
      #1 s8_valid[1] = 0;
      while (!k8_valid[15]) @(posedge clk);
      l8 = cycle - t0;
      checks++;
      if (k8_data[15] != 16'hECC0) begin failures++; $display("FAIL data at 15: %h", k8_data[15]); end
      $display("8x8 1 -> 15 (7 hops): %0d cycles", l8);
      checks++;
      if (l8 != l0 + 7 * lh) begin failures++; $display("FAIL 8x8 latency %0d, model %0d", l8, l0 + 7 * lh); end
    end
    $display("per hop %0d cycles, fixed part %0d cycles", lh, l0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
