// Shared types and constants of the label-switched mesh NoC.
// Port numbering of every router: Local, North, East, South, West. Node ids are
// row-major, id = y*COLS + x, with x growing to the East and y growing to the South.
// A flit is one whole packet: the label (destination node id) in the most significant
// bits, followed by the bit-transition-encoded payload.
package noc_pkg;

  localparam int NPORTS = 5;
  localparam int PORTSEL_W = 3;

  typedef enum logic [PORTSEL_W-1:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  // Direction of a mesh link as seen from the node it leaves (fault reporting).
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  function automatic port_e dir2port(dir_e d);
    case (d)
      DIR_N:   return PORT_N;
      DIR_E:   return PORT_E;
      DIR_S:   return PORT_S;
      default: return PORT_W;
    endcase
  endfunction

  // Invert mask of the bit-transition code: FI on odd bit positions, FI^HI on even ones.
  function automatic logic bted_mask(int unsigned i, logic fi, logic hi);
    return (i % 2 == 1) ? fi : (fi ^ hi);
  endfunction

endpackage
