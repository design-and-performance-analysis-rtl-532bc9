// Self-checking testbench of rr_arbiter: each grant must go to the first requester at or
// after a model pointer that moves past every winner; with en low there is no grant.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0] req = '0, gnt;
  int checks = 0, failures = 0, ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

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
    for (int k = 0; k < 1500; k++) begin
      logic [N-1:0] exp;
      @(negedge clk);
      req = N'($urandom);
      en  = ($urandom % 4) != 0;
      #1;
      exp = '0;
      if (en) begin
        for (int j = 0; j < N; j++) begin
          if (exp == '0 && req[(ptr + j) % N]) exp[(ptr + j) % N] = 1'b1;
        end
      end
      checks++;
      if (gnt != exp) begin
        failures++; $display("FAIL req=%b en=%b ptr=%0d gnt=%b exp=%b", req, en, ptr, gnt, exp);
      end
      for (int j = 0; j < N; j++) if (exp[j]) ptr = (j + 1) % N;
    end
    // fairness: all inputs requesting, N grants cover all inputs
    begin
      logic [N-1:0] seen = '0;
      for (int k = 0; k < N; k++) begin
        @(negedge clk); req = '1; en = 1; #1; seen |= gnt;
      end
      checks++;
      if (seen != '1) begin failures++; $display("FAIL not fair: %b", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
