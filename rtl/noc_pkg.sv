// noc_pkg: constants and types shared by the router blocks.
//
// A router has five ports, numbered in the order Inject/Eject (local core),
// North, South, East, West. Five ports follow the document; the port
// numbering follows the order its speculation example draws them in. The
// virtual channel count, the payload width and the mesh coordinate width are
// not given by the document and are this design's own choices (2 VCs per
// port, 8-bit payload, 2-bit coordinates for a mesh of up to 4x4 routers).
//
// A flit carries its packet's destination and a lookahead route: la_port is
// the output port the flit takes at the router it is entering, computed one
// router earlier (or by the source for the first router). head/tail mark the
// first and last flit of a packet; a single-flit packet has both set. vc is
// the virtual channel the flit travels on over the link it is crossing.
package noc_pkg;

  localparam int unsigned NUM_PORTS = 5;
  localparam int unsigned PORT_BITS = 3;
  localparam int unsigned NUM_VC    = 2;
  localparam int unsigned VC_W      = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;
  localparam int unsigned DATA_W    = 8;
  localparam int unsigned COORD_W   = 2;

  typedef enum logic [PORT_BITS-1:0] {
    PORT_LOCAL = 3'd0,   // Inject on the input side, Eject on the output side
    PORT_N     = 3'd1,
    PORT_S     = 3'd2,
    PORT_E     = 3'd3,
    PORT_W     = 3'd4
  } port_e;

  typedef struct packed {
    logic               head;
    logic               tail;
    logic [VC_W-1:0]    vc;
    port_e              la_port;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [DATA_W-1:0]  data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);

  // Dimension-order (X first, then Y) route at router (x, y). North is +y,
  // East is +x.
  function automatic port_e xy_route(input logic [COORD_W-1:0] x,
                                     input logic [COORD_W-1:0] y,
                                     input logic [COORD_W-1:0] dx,
                                     input logic [COORD_W-1:0] dy);
    if (dx > x)      return PORT_E;
    else if (dx < x) return PORT_W;
    else if (dy > y) return PORT_N;
    else if (dy < y) return PORT_S;
    else             return PORT_LOCAL;
  endfunction

endpackage
