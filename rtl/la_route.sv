// la_route: lookahead routing computation.
//
// A router reads the output port a flit needs from the flit itself
// (la_port), computed one hop earlier, and in parallel works out the port
// the flit will need at the next router, so that the next router can skip
// route computation. Given this router's mesh position (cur_x, cur_y), the
// port the flit leaves by, and the packet's destination, it steps to the
// neighbouring router (North +y, East +x) and applies dimension-order XY
// routing there. A flit that ejects here needs no next route (PORT_LOCAL).
// Purely combinational. The document only names the lookahead routing
// computation; the mesh and the XY routing function are this design's.
module la_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  port_e              out_port,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              next_port
);

  logic [COORD_W-1:0] nx, ny;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    unique case (out_port)
      PORT_N:  ny = cur_y + 1'b1;
      PORT_S:  ny = cur_y - 1'b1;
      PORT_E:  nx = cur_x + 1'b1;
      PORT_W:  nx = cur_x - 1'b1;
      default: ;
    endcase
    if (out_port == PORT_LOCAL) next_port = PORT_LOCAL;
    else                        next_port = xy_route(nx, ny, dst_x, dst_y);
  end

endmodule
