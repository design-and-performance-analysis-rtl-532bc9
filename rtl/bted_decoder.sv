// Bit transition decoder (BTED, decode side).
// Inverts bted_encoder: d[i] = e[i] ^ mask[i] ^ d[i-1], with mask[i] = FI for odd i and
// FI ^ HI for even i and d[-1] = 0. The previous bit in the recurrence is the previously
// DECODED bit, so the decoder is a prefix XOR that returns exactly the transmitted
// payload; the mask rule follows the document, the recurrence form is this design's.
// Interface: fi, hi (must equal the encoder's), data_in -> data_out.
// Timing: purely combinational (a ripple of DATA_W XOR gates).
module bted_decoder #(
  parameter int DATA_W = 16
) (
  input  logic              fi,
  input  logic              hi,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);
  import noc_pkg::*;

  always_comb begin
    logic prev;
    prev = 1'b0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      data_out[i] = data_in[i] ^ bted_mask(i, fi, hi) ^ prev;
      prev        = data_out[i];
    end
  end
endmodule
