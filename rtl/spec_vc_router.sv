// spec_vc_router: five-port speculative virtual channel router with a plain
// crossbar.
//
// The router's main idea is to overlap the two allocations a head flit
// needs: in the same cycle it asks the vc_allocator for a virtual channel of
// its output port and asks the crossbar's arbiters for the output port
// itself. If both succeed the flit crosses at once; if it wins the channel
// but loses the switch it keeps the channel and retries the switch in the
// next cycle; if it wins the switch but no channel the grant is wasted.
// Flits that cannot go wait in the input buffers, so nothing is lost even
// though the crossbar itself has no storage.
//
// Blocks: five input_port (one FIFO per virtual channel, lookahead routing),
// one vc_allocator, one crossbar with an xbar_arbiter per output.
// Ports are numbered Inject/Eject, N, S, E, W. For each input port:
// in_valid/in_flit, with in_vc_full back to the sender (one bit per virtual
// channel, which must not be written while full). For each output port:
// out_valid/out_flit, one cycle after the flit wins the switch; the flit
// carries its output virtual channel and the next router's lookahead route.
// The next router is assumed always to accept (no credits): an output
// virtual channel is released when its packet's tail flit leaves.
// Latency of a head flit from in_valid to out_valid: 3 cycles with no
// contention (buffer write, decode/route, allocation + traversal); a body
// flit: 2. ROUTER_X/ROUTER_Y place the router in the mesh. rst is
// synchronous and active high.
module spec_vc_router
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned ROUTER_X  = 1,
  parameter int unsigned ROUTER_Y  = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid  [NUM_PORTS],
  input  flit_t             in_flit   [NUM_PORTS],
  output logic [NUM_VC-1:0] in_vc_full[NUM_PORTS],
  output logic              out_valid [NUM_PORTS],
  output flit_t             out_flit  [NUM_PORTS]
);

  localparam int unsigned NREQ = NUM_PORTS * NUM_VC;

  logic            va_req   [NREQ];
  port_e           va_port  [NREQ];
  logic            va_gnt   [NREQ];
  logic [VC_W-1:0] va_vc    [NREQ];
  logic            port_free[NUM_PORTS];
  logic            rel_valid[NUM_PORTS];
  logic [VC_W-1:0] rel_vc   [NUM_PORTS];

  logic            sa_req   [NUM_PORTS];
  port_e           sa_dest  [NUM_PORTS];
  logic            sa_valid [NUM_PORTS];
  flit_t           sa_flit  [NUM_PORTS];
  logic            sa_gnt   [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic            p_va_req [NUM_VC];
    port_e           p_va_port[NUM_VC];
    logic            p_va_gnt [NUM_VC];
    logic [VC_W-1:0] p_va_vc  [NUM_VC];

    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assign va_req [p*NUM_VC+v] = p_va_req[v];
      assign va_port[p*NUM_VC+v] = p_va_port[v];
      assign p_va_gnt[v]         = va_gnt[p*NUM_VC+v];
      assign p_va_vc[v]          = va_vc[p*NUM_VC+v];
    end

    input_port #(.SPECULATIVE(1'b1), .BUF_DEPTH(BUF_DEPTH)) u_in (
      .clk, .rst,
      .cur_x      (COORD_W'(ROUTER_X)),
      .cur_y      (COORD_W'(ROUTER_Y)),
      .in_valid   (in_valid[p]),
      .in_flit    (in_flit[p]),
      .in_vc_full (in_vc_full[p]),
      .va_req     (p_va_req),
      .va_port    (p_va_port),
      .va_gnt     (p_va_gnt),
      .va_vc      (p_va_vc),
      .port_free  (port_free),
      .sa_req     (sa_req[p]),
      .sa_dest    (sa_dest[p]),
      .sa_valid   (sa_valid[p]),
      .sa_flit    (sa_flit[p]),
      .sa_gnt     (sa_gnt[p])
    );

    assign rel_valid[p] = out_valid[p] && out_flit[p].tail;
    assign rel_vc[p]    = out_flit[p].vc;
  end

  vc_allocator u_va (
    .clk, .rst,
    .va_req, .va_port, .va_gnt, .va_vc,
    .rel_valid, .rel_vc, .port_free
  );

  crossbar u_xbar (
    .clk, .rst,
    .in_flit  (sa_flit),
    .in_dest  (sa_dest),
    .in_req   (sa_req),
    .in_valid (sa_valid),
    .in_gnt   (sa_gnt),
    .out_flit,
    .out_valid
  );

endmodule
