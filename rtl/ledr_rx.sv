// Receive half of the asynchronous LEDR link (see ledr_tx).
// Both wires of every bit pass a 2-flop synchronizer into this clock domain. A flit is
// complete when rail_d XOR rail_p equals the expected phase on every bit; since only one
// wire per bit changes per flit, a bit that shows the new phase already shows its new
// value, so the per-bit synchronizers cannot tear a flit. The complete flit is copied
// into a holding register, the expected phase flips and the acknowledge toggles, which
// frees the transmitter while the flit waits here for the router.
// The LEDR code is named by the document; completion detection, synchronizers and the
// holding register are this design's.
// Interface: rail_d/rail_p/ack (link side), out_valid/out_ready/out_flit (local side).
// Timing: a flit appears 3 cycles after its last wire settles; one flit per handshake.
module ledr_rx #(
  parameter int WIDTH = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] rail_d,
  input  logic [WIDTH-1:0] rail_p,
  output logic             ack,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_flit
);
  logic [WIDTH-1:0] d_s1, d_s2, p_s1, p_s2;
  logic             exp_phase;
  logic             complete;

  assign complete = ((d_s2 ^ p_s2) == {WIDTH{exp_phase}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_s1 <= '0;
      d_s2 <= '0;
      p_s1 <= '0;
      p_s2 <= '0;
    end else begin
      d_s1 <= rail_d;
      d_s2 <= d_s1;
      p_s1 <= rail_p;
      p_s2 <= p_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exp_phase <= 1'b1;
      ack       <= 1'b0;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (complete && (!out_valid || out_ready)) begin
        out_flit  <= d_s2;
        out_valid <= 1'b1;
        exp_phase <= !exp_phase;
        ack       <= exp_phase;
      end
    end
  end
endmodule
