// tb_la_route: exhaustive check over every router position, output port and
// destination of a 4x4 mesh against a separately written reference: step to
// the neighbour behind the output port, then route X first, then Y.
module tb_la_route;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port, next_port;

  la_route dut (.*);

  function automatic port_e ref_port(int x, int y, port_e o, int dx, int dy);
    int nx = x, ny = y;
    if (o == PORT_LOCAL) return PORT_LOCAL;
    if (o == PORT_N) ny++;
    if (o == PORT_S) ny--;
    if (o == PORT_E) nx++;
    if (o == PORT_W) nx--;
    nx = nx & 3; ny = ny & 3;
    if (dx > nx) return PORT_E;
    if (dx < nx) return PORT_W;
    if (dy > ny) return PORT_N;
    if (dy < ny) return PORT_S;
    return PORT_LOCAL;
  endfunction

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int o = 0; o < NUM_PORTS; o++)
          for (int dx = 0; dx < 4; dx++)
            for (int dy = 0; dy < 4; dy++) begin
              cur_x = COORD_W'(x); cur_y = COORD_W'(y);
              out_port = port_e'(o);
              dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
              #1;
              checks++;
              if (next_port != ref_port(x, y, port_e'(o), dx, dy)) begin
                failures++;
                $display("ERROR: (%0d,%0d) out %0d dst (%0d,%0d): got %0d", x, y, o, dx, dy, next_port);
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
