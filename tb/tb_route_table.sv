// Self-checking testbench of route_table: writes addressed to this and to other nodes,
// five simultaneous random reads against a model, and a clear.
module tb_route_table;
  import noc_pkg::*;
  localparam int NODES = 64, ID = 9, LW = 6, NRD = 5;
  logic clk = 0, rst_n = 0, cfg_we = 0, cfg_clear = 0;
  logic [LW-1:0] cfg_node = '0, cfg_label = '0;
  port_e cfg_port = PORT_L;
  logic [NRD-1:0][LW-1:0] rd_label = '0;
  logic [NRD-1:0] rd_valid;
  port_e [NRD-1:0] rd_port;
  int checks = 0, failures = 0;
  bit m_valid [NODES];
  port_e m_port [NODES];

  route_table #(.NODES(NODES), .NODE_ID(ID), .NRD(NRD)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int r = 0; r < NRD; r++) rd_label[r] = LW'($urandom);
    #1;
    for (int r = 0; r < NRD; r++) begin
      checks++;
      if (rd_valid[r] != m_valid[rd_label[r]] || (m_valid[rd_label[r]] && rd_port[r] != m_port[rd_label[r]])) begin
        failures++; $display("FAIL label %0d valid %b port %0d", rd_label[r], rd_valid[r], rd_port[r]);
      end
    end
  endtask

  initial begin
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int k = 0; k < 600; k++) begin
        @(negedge clk);
        check_reads();
        cfg_we    = ($urandom % 2);
        cfg_node  = ($urandom % 3 == 0) ? LW'($urandom) : LW'(ID);
        cfg_label = LW'($urandom);
        cfg_port  = port_e'($urandom % 5);
        @(posedge clk);
        if (cfg_we && cfg_node == LW'(ID)) begin
          m_valid[cfg_label] = 1; m_port[cfg_label] = cfg_port;
        end
      end
      @(negedge clk);
      cfg_we = 0; cfg_clear = 1;
      @(posedge clk);
      foreach (m_valid[i]) m_valid[i] = 0;
      @(negedge clk);
      cfg_clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
