// Round-robin arbiter for one router output port.
// Among the requesting inputs it grants the first one at or after the priority pointer;
// after a grant the pointer moves to the input just after the winner, so every waiting
// input is served within N grants. No grant is issued while en is low (output busy).
// The document names an arbiter per router; the round-robin policy is this design's.
// Interface: req[N], en -> gnt[N] (one-hot or zero). Timing: grant is combinational in
// the same cycle as the request; the pointer updates at the clock edge of a grant.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         en,
  output logic [N-1:0] gnt
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    gnt = '0;
    win = '0;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      int idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any = 1'b1;
        win = IW'(idx);
      end
    end
    if (en && any) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (en && any) ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_granted_requested: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);
endmodule
