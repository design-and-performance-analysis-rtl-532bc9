// Bit transition encoder (BTED, encode side).
// Every payload bit is replaced by the XOR of itself, the bit below it and an invert
// mask: e[i] = d[i] ^ d[i-1] ^ FI for odd i, e[i] = d[i] ^ d[i-1] ^ FI ^ HI for even i.
// An alternating word such as 16'hAAAA, which toggles on every wire from one bit to the
// next, becomes a run of equal bits. The equations are the document's; counting i from
// the LSB and taking d[-1] = 0 are this design's choices.
// Interface: fi, hi, data_in -> data_out. Timing: purely combinational.
module bted_encoder #(
  parameter int DATA_W = 16
) (
  input  logic              fi,
  input  logic              hi,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);
  import noc_pkg::*;

  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) begin
      data_out[i] = data_in[i] ^ ((i == 0) ? 1'b0 : data_in[i-1]) ^ bted_mask(i, fi, hi);
    end
  end
endmodule
