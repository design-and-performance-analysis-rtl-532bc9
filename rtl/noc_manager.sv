// NoC manager: sets up label-switched pipes and keeps them alive across link faults.
// It keeps the flow graph of the mesh as the available capacity A of every directed link
// (LINK_CAP when free, 0 when broken or off the mesh) and a pipe stack of the pipes it
// has set up (source, destination, required capacity c). For a pipe request it walks
// from the source towards the destination, one hop per cycle, recording the hops:
//  - it first tries the productive link in the dimension of the previous hop (X for the
//    first hop, so an undisturbed pipe follows XY routing) and takes it if A >= c;
//  - else the productive link in the other dimension (the alternative link);
//  - if the destination is in the same row or column and that straight link is blocked,
//    a detour hop across it (at most MAX_DETOUR per pipe);
//  - the reverse of the previous hop is never taken, and a walk longer than MAXH fails.
// When the walk arrives, every recorded hop is committed, one per cycle and from the
// destination end backwards: c is subtracted from the link and the routing table entry
// "label = destination -> port" is written in that node. Writing backwards means the
// entries written so far always form a complete path, so flits already in flight never
// meet a half-written route. A failed walk therefore leaves no entries and reserves nothing. Because
// every commit writes a whole simple path to the destination, following table entries
// from any node can never loop, even where pipes to the same destination overwrite
// each other's entries. A pipe with source = destination needs no table entry.
// When a bad link is reported its capacity becomes 0 for good, all routing tables are
// cleared, all capacities are restored and every pipe in the stack is walked again, so
// pipes that used the broken link are re-routed around it; a pipe that no longer fits
// is removed from the stack.
// Flow graph with link capacities, the capacity test, the search for an alternative
// link, the pipe stack and the three fault steps follow the document; the walk order,
// the detour rule, the commit phase and the bus format are this design's choices.
// Interface: req_* (pipe request) -> rsp_* (one-cycle result); fault_* (taken when
// fault_valid and fault_ready, priority over requests); cfg_* routing table bus
// (registered); busy and status counters. Timing: a pipe of h hops takes 2h+2 cycles
// from acceptance to rsp_valid; a re-route takes about 2h+2 cycles per stored pipe.
module noc_manager #(
  parameter int COLS     = 8,
  parameter int ROWS     = 8,
  parameter int LINK_CAP = 10,
  parameter int CAP_W    = 8,
  parameter int PS_DEPTH = 16,
  parameter int MAX_DETOUR = 2,
  localparam int NODES   = COLS * ROWS,
  localparam int LBL_W   = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int PS_W    = (PS_DEPTH > 1) ? $clog2(PS_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [LBL_W-1:0]  req_src,
  input  logic [LBL_W-1:0]  req_dst,
  input  logic [CAP_W-1:0]  req_cap,
  output logic              rsp_valid,
  output logic              rsp_ok,
  input  logic              fault_valid,
  output logic              fault_ready,
  input  logic [LBL_W-1:0]  fault_node,
  input  noc_pkg::dir_e     fault_dir,
  output logic              cfg_we,
  output logic [LBL_W-1:0]  cfg_node,
  output logic [LBL_W-1:0]  cfg_label,
  output noc_pkg::port_e    cfg_port,
  output logic              cfg_clear,
  output logic              busy,
  output logic [15:0]       alt_cnt,
  output logic [15:0]       reroute_cnt,
  output logic [15:0]       fail_cnt
);
  import noc_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_NEXT, S_WALK, S_COMMIT} state_e;

  typedef struct packed {
    logic [LBL_W-1:0] src;
    logic [LBL_W-1:0] dst;
    logic [CAP_W-1:0] cap;
  } pipe_t;

  state_e            state;
  logic [CAP_W-1:0]  cap    [NODES][4];
  logic [3:0]        faulty [NODES];
  logic [PS_DEPTH-1:0] ps_valid;
  pipe_t             ps     [PS_DEPTH];
  logic [PS_W-1:0]   idx;
  logic [LBL_W-1:0]  cur;
  logic              rerouting;
  // Hops of the path being walked, written to the tables only once it is complete.
  localparam int MAXH = COLS + ROWS - 2 + 2 * MAX_DETOUR;
  localparam int HW   = $clog2(MAXH + 1);
  logic [LBL_W-1:0]  hop_node [MAXH];
  dir_e              hop_dir  [MAXH];
  logic [HW-1:0]     nhops, cidx;

  // Free slot of the pipe stack.
  logic            free_found;
  logic [PS_W-1:0] free_idx;
  // Next valid pipe at or after idx.
  logic            next_found;
  logic [PS_W-1:0] next_idx;

  always_comb begin
    free_found = 1'b0;
    free_idx   = '0;
    next_found = 1'b0;
    next_idx   = '0;
    for (int k = 0; k < PS_DEPTH; k++) begin
      if (!free_found && !ps_valid[k]) begin
        free_found = 1'b1;
        free_idx   = PS_W'(k);
      end
      if (!next_found && ps_valid[k] && k >= int'(idx)) begin
        next_found = 1'b1;
        next_idx   = PS_W'(k);
      end
    end
  end

  // One step of the walk from node cur towards the destination of pipe idx.
  int   cx, cy, tx, ty;
  dir_e first_dir, alt_dir, xdir, ydir, det_dir;
  dir_e last_dir;    // previous hop of the walk; its reverse is never taken
  logic has_last;
  logic [1:0] ndet;  // detours taken by the pipe being walked
  logic det_ok;
  dir_e take_dir;
  logic yfirst;      // continue in the dimension of the last hop
  logic has_x, has_y, arrived;
  logic first_ok, alt_ok;

  function automatic logic usable(dir_e d);
    return (cap[cur][d] >= ps[idx].cap) && !(has_last && d == dir_e'(last_dir ^ 2'd2))
           && (nhops != HW'(MAXH));
  endfunction

  always_comb begin
    cx = int'(cur) % COLS;
    cy = int'(cur) / COLS;
    tx = int'(ps[idx].dst) % COLS;
    ty = int'(ps[idx].dst) / COLS;
    has_x   = (cx != tx);
    has_y   = (cy != ty);
    arrived = !has_x && !has_y;
    xdir = (tx > cx) ? DIR_E : DIR_W;
    ydir = (ty > cy) ? DIR_S : DIR_N;
    if (has_x && has_y) begin
      first_dir = yfirst ? ydir : xdir;
      alt_dir   = yfirst ? xdir : ydir;
    end else begin
      first_dir = has_x ? xdir : ydir;
      alt_dir   = first_dir;
    end
    first_ok = !arrived && usable(first_dir);
    alt_ok   = has_x && has_y && usable(alt_dir);
    // Detour: one hop across the remaining direction when the straight link is blocked.
    det_dir = has_x ? DIR_S : DIR_E;
    det_ok  = 1'b0;
    if (!first_ok && !alt_ok && (has_x != has_y) && ndet < 2'(MAX_DETOUR)) begin
      if (usable(has_x ? DIR_S : DIR_E)) begin
        det_dir = has_x ? DIR_S : DIR_E;
        det_ok  = 1'b1;
      end else if (usable(has_x ? DIR_N : DIR_W)) begin
        det_dir = has_x ? DIR_N : DIR_W;
        det_ok  = 1'b1;
      end
    end
    take_dir = first_ok ? first_dir : alt_ok ? alt_dir : det_dir;
  end

  function automatic logic [LBL_W-1:0] neighbour(logic [LBL_W-1:0] n, dir_e d);
    case (d)
      DIR_N:   return n - LBL_W'(COLS);
      DIR_S:   return n + LBL_W'(COLS);
      DIR_E:   return n + 1'b1;
      default: return n - 1'b1;
    endcase
  endfunction

  // A link leaving the mesh never has capacity.
  function automatic logic on_mesh(int n, int d);
    case (d)
      0:       return (n / COLS) > 0;
      1:       return (n % COLS) < COLS - 1;
      2:       return (n / COLS) < ROWS - 1;
      default: return (n % COLS) > 0;
    endcase
  endfunction

  assign req_ready = (state == S_IDLE) && !fault_valid;
  assign busy      = (state != S_IDLE);
  assign fault_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ps_valid    <= '0;
      idx         <= '0;
      cur         <= '0;
      rerouting   <= 1'b0;
      yfirst      <= 1'b0;
      nhops       <= '0;
      cidx        <= '0;
      has_last    <= 1'b0;
      last_dir    <= DIR_N;
      ndet        <= '0;
      rsp_valid   <= 1'b0;
      rsp_ok      <= 1'b0;
      cfg_we      <= 1'b0;
      cfg_node    <= '0;
      cfg_label   <= '0;
      cfg_port    <= PORT_L;
      cfg_clear   <= 1'b0;
      alt_cnt     <= '0;
      reroute_cnt <= '0;
      fail_cnt    <= '0;
      for (int n = 0; n < NODES; n++) begin
        faulty[n] <= '0;
        for (int d = 0; d < 4; d++) cap[n][d] <= on_mesh(n, d) ? CAP_W'(LINK_CAP) : '0;
      end
    end else begin
      rsp_valid <= 1'b0;
      cfg_we    <= 1'b0;
      cfg_clear <= 1'b0;
      case (state)
        S_IDLE: begin
          if (fault_valid) begin
            faulty[fault_node][fault_dir] <= 1'b1;
            state <= S_CLEAR;
          end else if (req_valid) begin
            if (req_src == req_dst) begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b1;
            end else if (!free_found) begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b0;
              fail_cnt  <= fail_cnt + 1'b1;
            end else begin
              ps_valid[free_idx] <= 1'b1;
              ps[free_idx]       <= '{src: req_src, dst: req_dst, cap: req_cap};
              idx                <= free_idx;
              cur                <= req_src;
              yfirst             <= 1'b0;
              has_last <= 1'b0;
              ndet     <= '0;
              nhops              <= '0;
              state              <= S_WALK;
            end
          end
        end
        S_CLEAR: begin
          cfg_clear <= 1'b1;
          for (int n = 0; n < NODES; n++)
            for (int d = 0; d < 4; d++)
              cap[n][d] <= (on_mesh(n, d) && !faulty[n][d]) ? CAP_W'(LINK_CAP) : '0;
          idx       <= '0;
          rerouting <= 1'b1;
          state     <= S_NEXT;
        end
        S_NEXT: begin
          if (next_found) begin
            idx   <= next_idx;
            cur    <= ps[next_idx].src;
            yfirst <= 1'b0;
            has_last <= 1'b0;
            ndet     <= '0;
            nhops  <= '0;
            state  <= S_WALK;
          end else begin
            rerouting   <= 1'b0;
            reroute_cnt <= reroute_cnt + 1'b1;
            state       <= S_IDLE;
          end
        end
        S_WALK: begin
          if (arrived) begin
            cidx  <= nhops - 1'b1;
            state <= S_COMMIT;
          end else if (!(first_ok || alt_ok || det_ok)) begin
            // no productive link has capacity: the pipe fails, nothing was reserved
            ps_valid[idx] <= 1'b0;
            fail_cnt      <= fail_cnt + 1'b1;
            if (rerouting) begin
              if (idx == PS_W'(PS_DEPTH - 1)) begin
                rerouting   <= 1'b0;
                reroute_cnt <= reroute_cnt + 1'b1;
                state       <= S_IDLE;
              end else begin
                idx   <= idx + 1'b1;
                state <= S_NEXT;
              end
            end else begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b0;
              state     <= S_IDLE;
            end
          end else begin
            hop_node[nhops] <= cur;
            hop_dir[nhops]  <= take_dir;
            nhops           <= nhops + 1'b1;
            cur             <= neighbour(cur, take_dir);
            yfirst          <= (take_dir == DIR_N) || (take_dir == DIR_S);
            last_dir        <= take_dir;
            has_last        <= 1'b1;
            if (!first_ok) alt_cnt <= alt_cnt + 1'b1;
            if (!first_ok && !alt_ok) ndet <= ndet + 1'b1;
          end
        end
        S_COMMIT: begin
          cfg_we    <= 1'b1;
          cfg_node  <= hop_node[cidx];
          cfg_label <= ps[idx].dst;
          cfg_port  <= dir2port(hop_dir[cidx]);
          cap[hop_node[cidx]][hop_dir[cidx]] <= cap[hop_node[cidx]][hop_dir[cidx]] - ps[idx].cap;
          cidx      <= cidx - 1'b1;
          if (cidx == '0) begin
            if (rerouting) begin
              if (idx == PS_W'(PS_DEPTH - 1)) begin
                rerouting   <= 1'b0;
                reroute_cnt <= reroute_cnt + 1'b1;
                state       <= S_IDLE;
              end else begin
                idx   <= idx + 1'b1;
                state <= S_NEXT;
              end
            end else begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b1;
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
