// mnoc_pkg: types and constants shared by the micro-network switch and the test chip.
//
// A flit is one 32-bit word, the width of the switch links (32 parallel lines). A packet
// is one header flit followed by LEN payload flits. The header layout is this design's own
// choice, since only the header's role is fixed: it carries the direction information
// (destination coordinates, routed X first, then Y) and the service class (GS or BE).
//
//   [31]    gs      1 = guaranteed service, 0 = best effort
//   [30:27] dst_x   destination column
//   [26:23] dst_y   destination row (north is +1)
//   [22:16] zero
//   [15:0]  len     number of payload flits that follow the header
package mnoc_pkg;

  localparam int unsigned FLIT_W = 32;
  localparam int unsigned NPORTS = 5;
  localparam int unsigned COORD_W = 4;
  localparam int unsigned LEN_W = 16;

  typedef logic [FLIT_W-1:0] flit_t;

  // Port numbering follows the order of Fig. 2 of the design description: N, E, W, S, Local.
  typedef enum logic [2:0] {
    P_NORTH = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  typedef struct packed {
    logic               gs;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [6:0]         rsvd;
    logic [LEN_W-1:0]   len;
  } header_t;

  // One queue entry: the flit plus the framing the input controller worked out for it.
  typedef struct packed {
    logic  head;
    logic  tail;
    port_e dest;
    flit_t flit;
  } qentry_t;

  function automatic flit_t make_header(logic gs, logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                        logic [LEN_W-1:0] len);
    header_t h;
    h.gs = gs;
    h.dst_x = x;
    h.dst_y = y;
    h.rsvd = '0;
    h.len = len;
    return flit_t'(h);
  endfunction

  // Dimension-order (XY) routing.
  function automatic port_e xy_route(logic [COORD_W-1:0] my_x, logic [COORD_W-1:0] my_y,
                                     logic [COORD_W-1:0] dst_x, logic [COORD_W-1:0] dst_y);
    if (dst_x > my_x) return P_EAST;
    if (dst_x < my_x) return P_WEST;
    if (dst_y > my_y) return P_NORTH;
    if (dst_y < my_y) return P_SOUTH;
    return P_LOCAL;
  endfunction

endpackage
