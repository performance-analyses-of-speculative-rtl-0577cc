// router_traffic: traffic source and scoreboard for one five-port router.
//
// Source: on every input port, with probability RATE percent per cycle, a
// random virtual channel is picked and, if the router does not report it
// full, the next flit of that channel's current packet is sent (or a new
// packet of 1..MAX_LEN flits is started, up to PKTS packets per port).
// Destinations are random over a 4x4 mesh; the head's lookahead route is the
// XY route at this router. Flits of different channels interleave freely.
// The payload names the sending port, channel and a running count, so every
// delivered flit can be traced to its source.
//
// Scoreboard: each delivered flit must be the oldest undelivered flit of its
// source channel, leave by the port XY routing gives, carry the next router's
// XY route, and, per output virtual channel, belong to the packet that
// channel's last head opened. done rises when every packet was sent and
// every flit delivered. Inputs are driven and outputs sampled on the falling
// clock edge.
module router_traffic
  import noc_pkg::*;
#(
  parameter int unsigned PKTS     = 20,
  parameter int unsigned RATE     = 50,
  parameter int unsigned MAX_LEN  = 3,
  parameter int unsigned ROUTER_X = 1,
  parameter int unsigned ROUTER_Y = 1
) (
  input  logic              clk,
  input  logic              rst,
  output logic              in_valid  [NUM_PORTS],
  output flit_t             in_flit   [NUM_PORTS],
  input  logic [NUM_VC-1:0] in_vc_full[NUM_PORTS],
  input  logic              out_valid [NUM_PORTS],
  input  flit_t             out_flit  [NUM_PORTS],
  output int                checks,
  output int                failures,
  output int                delivered,
  output int                full_seen,
  output logic              done
);

  typedef struct {
    flit_t f;
    port_e port;
  } exp_t;

  localparam int unsigned NSRC = NUM_PORTS * NUM_VC;

  exp_t exp_q [NSRC][$];
  int   rem   [NSRC];
  int   ctr   [NSRC];
  logic [COORD_W-1:0] pdx [NSRC];
  logic [COORD_W-1:0] pdy [NSRC];
  int   sent_pkts [NUM_PORTS];
  int   open_src  [NUM_PORTS][NUM_VC];

  // Reference XY route, written out independently of the design.
  function automatic port_e ref_xy(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? PORT_E : PORT_W;
    if (dy != y) return (dy > y) ? PORT_N : PORT_S;
    return PORT_LOCAL;
  endfunction

  function automatic port_e ref_next(port_e here, int dx, int dy);
    int nx = ROUTER_X, ny = ROUTER_Y;
    case (here)
      PORT_N: ny = ny + 1;
      PORT_S: ny = ny - 1;
      PORT_E: nx = nx + 1;
      PORT_W: nx = nx - 1;
      default: return PORT_LOCAL;
    endcase
    return ref_xy(nx, ny, dx, dy);
  endfunction

  initial begin
    checks = 0; failures = 0; delivered = 0; full_seen = 0; done = 1'b0;
    for (int s = 0; s < NSRC; s++) begin rem[s] = 0; ctr[s] = 0; pdx[s] = '0; pdy[s] = '0; end
    for (int p = 0; p < NUM_PORTS; p++) begin
      sent_pkts[p] = 0; in_valid[p] = 1'b0; in_flit[p] = '0;
      for (int v = 0; v < NUM_VC; v++) open_src[p][v] = -1;
    end
  end

  always @(negedge clk) begin
    if (!rst) begin
      // ---- scoreboard
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (out_valid[o]) begin
          flit_t f;
          int    s;
          f = out_flit[o];
          s = int'(f.data[7:5]) * NUM_VC + int'(f.data[4]);
          checks++;
          delivered++;
          if (s >= NSRC || exp_q[s].size() == 0) begin
            failures++;
            $display("ERROR: unexpected flit %h on output %0d", f, o);
          end else begin
            exp_t e;
            e = exp_q[s].pop_front();
            if (e.port != port_e'(o) || e.f.data != f.data || e.f.head != f.head ||
                e.f.tail != f.tail || e.f.dst_x != f.dst_x || e.f.dst_y != f.dst_y ||
                (f.head && e.f.la_port != f.la_port)) begin
              failures++;
              $display("ERROR: output %0d got %h, expected %h on port %0d", o, f, e.f, e.port);
            end
            checks++;
            if (f.head) begin
              if (open_src[o][f.vc] != -1) begin
                failures++;
                $display("ERROR: head on busy output channel %0d.%0d", o, f.vc);
              end
              open_src[o][f.vc] = s;
            end else if (open_src[o][f.vc] != s) begin
              failures++;
              $display("ERROR: flit on output channel %0d.%0d from wrong packet", o, f.vc);
            end
            if (f.tail) open_src[o][f.vc] = -1;
          end
        end
      end
      // ---- source
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_valid[p] = 1'b0;
        if (($urandom % 100) < RATE) begin
          int v, s;
          v = int'($urandom % NUM_VC);
          s = p * NUM_VC + v;
          if (in_vc_full[p][v]) begin
            full_seen++;
          end else if (rem[s] > 0 || sent_pkts[p] < PKTS) begin
            flit_t f;
            exp_t  e;
            f = '0;
            if (rem[s] == 0) begin
              rem[s] = 1 + int'($urandom % MAX_LEN);
              pdx[s] = COORD_W'($urandom);
              pdy[s] = COORD_W'($urandom);
              f.head = 1'b1;
              sent_pkts[p]++;
            end
            f.tail    = (rem[s] == 1);
            f.vc      = VC_W'(v);
            f.dst_x   = pdx[s];
            f.dst_y   = pdy[s];
            f.la_port = ref_xy(ROUTER_X, ROUTER_Y, int'(pdx[s]), int'(pdy[s]));
            f.data    = {3'(p), 1'(v), 4'(ctr[s])};
            ctr[s]++;
            rem[s]--;
            e.f       = f;
            e.port    = f.la_port;
            e.f.la_port = ref_next(f.la_port, int'(pdx[s]), int'(pdy[s]));
            exp_q[s].push_back(e);
            in_valid[p] = 1'b1;
            in_flit[p]  = f;
          end
        end
      end
      // ---- completion
      begin
        logic all_done;
        all_done = 1'b1;
        for (int p = 0; p < NUM_PORTS; p++) if (sent_pkts[p] < PKTS) all_done = 1'b0;
        for (int s = 0; s < NSRC; s++) if (rem[s] != 0 || exp_q[s].size() != 0) all_done = 1'b0;
        done = all_done;
      end
    end
  end

endmodule
