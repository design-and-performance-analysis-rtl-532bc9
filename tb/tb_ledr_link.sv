// Self-checking testbench of the asynchronous LEDR link (ledr_tx + ledr_rx).
// The transmitter and the receiver run on unrelated clocks (10 ns and 7.3 ns). Random
// flits are sent with random back-pressure at the receiver; every flit must arrive once,
// in order and intact. A monitor checks the LEDR rule that exactly one of the two wires
// of every bit changes per flit, and the throughput is checked against a bound of one
// flit per 16 transmitter cycles.
module tb_ledr_link;
  localparam int W = 22, NFLITS = 400;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, ack;
  logic [W-1:0] in_flit = '0, out_flit, rail_d, rail_p;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, received = 0;
  longint t_start, t_end;

  ledr_tx #(.WIDTH(W)) u_tx (.clk(clk_a), .rst_n, .in_valid, .in_ready, .in_flit, .rail_d, .rail_p, .ack);
  ledr_rx #(.WIDTH(W)) u_rx (.clk(clk_b), .rst_n, .rail_d, .rail_p, .ack, .out_valid, .out_ready, .out_flit);

  always #5 clk_a = !clk_a;
  always #3.65 clk_b = !clk_b;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LEDR rule: between consecutive rail states exactly one wire per bit has changed.
  logic [W-1:0] prev_d = '0, prev_p = '0;
  always @(rail_d or rail_p) begin
    #0.1;
    if (rst_n && ((rail_d ^ prev_d) ^ (rail_p ^ prev_p)) != '1) begin
      failures++; $display("FAIL LEDR rule d %h->%h p %h->%h", prev_d, rail_d, prev_p, rail_p);
    end else if (rst_n) checks++;
    prev_d = rail_d; prev_p = rail_p;
  end

  initial begin
    repeat (4) @(posedge clk_a);
    rst_n = 1;
    t_start = $time;
    for (int k = 0; k < NFLITS; k++) begin
      @(negedge clk_a);
      in_valid = 1;
      in_flit  = W'($urandom);
      do @(posedge clk_a); while (!in_ready);
      q.push_back(in_flit);
      #1 in_valid = 0;
    end
  end

  always @(negedge clk_b) out_ready <= (received < NFLITS / 2) ? 1'b1 : ($urandom % 3 == 0);

  always @(posedge clk_b) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_flit != q[0]) begin
        failures++; $display("FAIL got %h exp %h", out_flit, (q.size() ? q[0] : '0));
      end
      if (q.size()) void'(q.pop_front());
      received++;
      if (received == NFLITS / 2) begin
        t_end = $time;
        checks++;
        if ((t_end - t_start) > longint'(NFLITS / 2) * 16 * 10) begin
          failures++; $display("FAIL throughput: %0d ns for %0d flits", t_end - t_start, NFLITS / 2);
        end
      end
      if (received == NFLITS) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
