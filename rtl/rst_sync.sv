// Reset synchronizer for one clock domain.
// The reset output is asserted asynchronously with rst_n and released two clock edges
// after rst_n rises, so every flip-flop of the domain leaves reset on the same edge.
// Used once per router clock domain of the mesh; a standard circuit, not taken from the
// published design.
// Interface: clk, rst_n -> rst_n_out. Timing: 2-cycle release latency.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_n_out
);
  logic s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      s1        <= 1'b1;
      rst_n_out <= s1;
    end
  end
endmodule
