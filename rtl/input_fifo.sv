// Input buffer of one router port: a register array addressed by the FIFO control block.
// A flit waits here while other flits are ahead of it or while the output arbiter has not
// granted it. The head flit is visible at out_data as long as out_valid is high
// (first-word fall-through). Buffering at the inputs follows the document; the
// valid/ready handshake and the depth are this design's choices.
// Interface: in_valid/in_ready/in_data (write side), out_valid/out_ready/out_data (read).
// Timing: a pushed flit is readable the cycle after it is written; one push and one pop
// per cycle.
module input_fifo #(
  parameter int WIDTH = 22,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  fifo_ctrl #(.DEPTH(DEPTH)) u_fcb (
    .clk, .rst_n,
    .push(in_valid), .pop(out_ready),
    .wr_ptr, .rd_ptr, .full, .empty, .count
  );

  assign in_ready  = !full;
  assign out_valid = !empty;
  assign out_data  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (in_valid && !full) mem[wr_ptr] <= in_data;
  end
endmodule
