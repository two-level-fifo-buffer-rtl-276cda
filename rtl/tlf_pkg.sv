// tlf_pkg: shared types and constants of the two-level FIFO router buffer.
//
// A flit is FLIT_W = 64 bits wide, the flit size used for the 65 nm router
// implementation. The two most significant bits carry the flit type
// (head, body, tail, or a single-flit packet that is both head and tail);
// this placement, and the position of the destination coordinates in a head
// flit (x in bits [COORD_W-1:0], y in bits [2*COORD_W-1:COORD_W]), are this
// design's own choices. The five ports follow the order E, S, W, N, P of the
// mesh router example. Coordinates are 3 bits, enough for the 8 x 8 mesh
// the router was evaluated in.
package tlf_pkg;

  localparam int unsigned FLIT_W   = 64;
  localparam int unsigned N_PORTS  = 5;
  localparam int unsigned COORD_W  = 3;
  localparam int unsigned PORT_BITS = $clog2(N_PORTS);

  typedef enum logic [1:0] {
    FT_BODY   = 2'b00,
    FT_HEAD   = 2'b01,
    FT_TAIL   = 2'b10,
    FT_SINGLE = 2'b11
  } flit_type_e;

  typedef enum logic [PORT_BITS-1:0] {
    PORT_E = 3'd0,
    PORT_S = 3'd1,
    PORT_W = 3'd2,
    PORT_N = 3'd3,
    PORT_P = 3'd4
  } port_e;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic logic is_head(input flit_t f);
    return f[FLIT_W-2];
  endfunction

  function automatic logic is_tail(input flit_t f);
    return f[FLIT_W-1];
  endfunction

  // Dimension-ordered XY routing: correct x first (E for larger x, W for
  // smaller), then y (N for larger y, S for smaller), then eject at P.
  function automatic port_e xy_route(input logic [COORD_W-1:0] cur_x,
                                     input logic [COORD_W-1:0] cur_y,
                                     input logic [COORD_W-1:0] dst_x,
                                     input logic [COORD_W-1:0] dst_y);
    if (dst_x > cur_x)      return PORT_E;
    else if (dst_x < cur_x) return PORT_W;
    else if (dst_y > cur_y) return PORT_N;
    else if (dst_y < cur_y) return PORT_S;
    else                    return PORT_P;
  endfunction

endpackage
