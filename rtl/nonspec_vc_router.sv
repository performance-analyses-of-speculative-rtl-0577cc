// nonspec_vc_router: five-port non-speculative virtual channel router with
// the contention-free crossbar.
//
// This is the router the document compares with the speculative one. The
// allocations run one after the other: a head flit first wins a virtual
// channel of its output port (vc_allocator), and only then may its flits
// leave the input buffer. A flit that may leave is written into the FIFO in
// front of its crossbar input (contention_free_crossbar) whenever that FIFO
// has room; switch allocation then happens at the crossbar, where the FIFO
// heads compete through the xbar_arbiter of each output, and a loser simply
// waits in its FIFO. The extra buffering costs latency and area but the
// crossbar can never drop a flit.
//
// Ports and flit format are those of spec_vc_router. Latency of a head flit
// from in_valid to out_valid with no contention: 5 cycles (buffer write,
// decode/route, channel allocation, write into the crossbar FIFO, switch
// arbitration + traversal); a body flit: 3. An output virtual channel is
// released when its tail flit leaves the crossbar, so that no flit of the
// old packet is still queued when the channel is handed out again. rst is
// synchronous and active high.
module nonspec_vc_router
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH       = 4,
  parameter int unsigned XBAR_FIFO_DEPTH = 4,
  parameter int unsigned ROUTER_X        = 1,
  parameter int unsigned ROUTER_Y        = 1
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
  logic            xb_wr    [NUM_PORTS];
  logic            xb_full  [NUM_PORTS];

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

    input_port #(.SPECULATIVE(1'b0), .BUF_DEPTH(BUF_DEPTH)) u_in (
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

    // Room in the crossbar FIFO is the switch grant seen by the input port.
    assign sa_gnt[p] = !xb_full[p];
    assign xb_wr[p]  = sa_req[p] && sa_valid[p] && !xb_full[p];

    assign rel_valid[p] = out_valid[p] && out_flit[p].tail;
    assign rel_vc[p]    = out_flit[p].vc;
  end

  vc_allocator u_va (
    .clk, .rst,
    .va_req, .va_port, .va_gnt, .va_vc,
    .rel_valid, .rel_vc, .port_free
  );

  contention_free_crossbar #(.FIFO_DEPTH(XBAR_FIFO_DEPTH)) u_cfx (
    .clk, .rst,
    .in_flit  (sa_flit),
    .in_dest  (sa_dest),
    .in_wr    (xb_wr),
    .in_full  (xb_full),
    .out_flit,
    .out_valid
  );

endmodule
