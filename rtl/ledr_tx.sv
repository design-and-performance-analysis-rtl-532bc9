// Transmit half of an asynchronous router-to-router link using level-encoded dual-rail
// (LEDR) signalling.
// Each flit bit travels on two wires: rail_d carries the bit value, rail_p carries the
// value XOR the token phase. The phase alternates from one flit to the next, so exactly
// one of the two wires of every bit changes per flit and the receiver can tell a complete
// flit from a half-changed one without any shared clock. The receiver answers with a
// 2-phase acknowledge (a toggle), brought into this clock domain by a 2-flop synchronizer.
// LEDR itself is named by the document; the circuit and the handshake are this design's.
// Interface: in_valid/in_ready/in_flit (local side), rail_d/rail_p/ack (link side).
// Timing: a flit is accepted when the link is idle; the link is idle again 2-3 cycles
// after the acknowledge toggles. The first flit after reset uses phase 1.
module ledr_tx #(
  parameter int WIDTH = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_flit,
  output logic [WIDTH-1:0] rail_d,
  output logic [WIDTH-1:0] rail_p,
  input  logic             ack
);
  logic phase;      // phase of the last token sent
  logic busy;
  logic ack_s1, ack_s2;

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_s1 <= 1'b0;
      ack_s2 <= 1'b0;
    end else begin
      ack_s1 <= ack;
      ack_s2 <= ack_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= 1'b0;
      busy   <= 1'b0;
      rail_d <= '0;
      rail_p <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        rail_d <= in_flit;
        rail_p <= in_flit ^ {WIDTH{!phase}};
        phase  <= !phase;
        busy   <= 1'b1;
      end
    end else if (ack_s2 == phase) begin
      busy <= 1'b0;
    end
  end
endmodule
