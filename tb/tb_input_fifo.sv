// Self-checking testbench of input_fifo: random valid/ready on both sides, data order
// checked against a queue; also checks that a flit is readable one cycle after its write.
module tb_input_fifo;
  localparam int W = 22, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  input_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: write into empty FIFO, head valid on the next cycle
    @(negedge clk);
    in_valid = 1; in_data = 22'h2A5A5;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!(out_valid && out_data == 22'h2A5A5)) begin
      failures++; $display("FAIL fall-through latency");
    end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 100) < ((k / 500) % 2 ? 80 : 40);
      in_data  = W'($urandom);
      out_ready = ($urandom % 100) < ((k / 500) % 2 ? 40 : 80);
      @(posedge clk);
      if (in_valid && in_ready) q.push_back(in_data);
      if (!in_ready) fulls++;
      if (out_valid && out_ready) begin
        checks++;
        if (q.size() == 0 || out_data != q[0]) begin
          failures++; $display("FAIL order: got %h", out_data);
        end
        if (q.size() > 0) void'(q.pop_front());
      end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL full never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
