// N x N crossbar switch of a router.
// Output o carries the flit of the input whose bit is set in sel[o] (AND-OR multiplexer);
// with no bit set the output is all zeros. The switch is named by the document; the
// one-hot AND-OR form is this design's.
// Interface: in_flit[N], sel[N][N] (sel[o][i]: input i to output o) -> out_flit[N].
// Timing: purely combinational.
module crossbar #(
  parameter int N     = 5,
  parameter int WIDTH = 22
) (
  input  logic [N-1:0][WIDTH-1:0] in_flit,
  input  logic [N-1:0][N-1:0]     sel,
  output logic [N-1:0][WIDTH-1:0] out_flit
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < N; i++) begin
        out_flit[o] |= in_flit[i] & {WIDTH{sel[o][i]}};
      end
    end
  end
endmodule
