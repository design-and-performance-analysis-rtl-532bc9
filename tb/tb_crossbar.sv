// Self-checking testbench of crossbar: random flits and random one-hot selects
// (including none) per output.
module tb_crossbar;
  localparam int N = 5, W = 22;
  logic [N-1:0][W-1:0] in_flit, out_flit;
  logic [N-1:0][N-1:0] sel;
  int checks = 0, failures = 0;

  crossbar #(.N(N), .WIDTH(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      int pick [N];
      for (int i = 0; i < N; i++) in_flit[i] = W'($urandom);
      for (int o = 0; o < N; o++) begin
        pick[o] = int'($urandom % (N + 1)) - 1;   // -1: no input
        sel[o]  = (pick[o] < 0) ? '0 : N'(1 << pick[o]);
      end
      #1;
      for (int o = 0; o < N; o++) begin
        checks++;
        if (out_flit[o] != ((pick[o] < 0) ? '0 : in_flit[pick[o]])) begin
          failures++; $display("FAIL out %0d pick %0d got %h", o, pick[o], out_flit[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
