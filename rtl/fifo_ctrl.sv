// FIFO control block (FCB) of one router input port.
// Keeps the read and write pointers of a circular buffer plus an occupancy counter and
// derives full and empty from it. A push while full or a pop while empty is ignored; a
// simultaneous push and pop keeps the count. The block itself is named by the document;
// pointer/counter arithmetic, depth and reset are this design's choices.
// Interface: push, pop -> wr_ptr, rd_ptr, full, empty, count.
// Timing: pointers and count update on the rising clock edge; flags are combinational
// from the count. Asynchronous active-low reset empties the FIFO.
module fifo_ctrl #(
  parameter int DEPTH = 4,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop,
  output logic [AW-1:0] wr_ptr,
  output logic [AW-1:0] rd_ptr,
  output logic          full,
  output logic          empty,
  output logic [CW-1:0] count
);
  logic do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
