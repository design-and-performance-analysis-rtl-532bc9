// Self-checking testbench of fifo_ctrl: random push/pop against a counter/pointer model.
module tb_fifo_ctrl;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [1:0] wr_ptr, rd_ptr;
  logic full, empty;
  logic [2:0] count;
  int checks = 0, failures = 0;
  int m_cnt = 0, m_wr = 0, m_rd = 0;

  fifo_ctrl #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      checks++;
      if (count != 3'(m_cnt) || wr_ptr != 2'(m_wr) || rd_ptr != 2'(m_rd) ||
          full != (m_cnt == DEPTH) || empty != (m_cnt == 0)) begin
        failures++;
        $display("FAIL k=%0d count %0d/%0d wr %0d/%0d rd %0d/%0d", k, count, m_cnt, wr_ptr, m_wr, rd_ptr, m_rd);
      end
      push = ($urandom % 100) < ((k / 200) % 2 ? 70 : 35);
      pop  = ($urandom % 100) < ((k / 200) % 2 ? 35 : 70);
      if (push && m_cnt < DEPTH) m_wr = (m_wr + 1) % DEPTH;
      if (pop && m_cnt > 0)      m_rd = (m_rd + 1) % DEPTH;
      m_cnt += int'(push && m_cnt < DEPTH) - int'(pop && m_cnt > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
