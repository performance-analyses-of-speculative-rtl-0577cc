// input_port: one buffered input port of a virtual channel router.
//
// Flits arrive on in_valid/in_flit and are written into the FIFO of the
// virtual channel named by in_flit.vc; in_vc_full tells the sender which
// channels have no room (a flit sent to a full channel is dropped, and an
// assertion flags it). Each virtual channel steps through three states:
//
//   VC_IDLE    a head flit reaches the front of the FIFO: decoding and
//              routing take one cycle. The output port is the flit's
//              lookahead route la_port; la_route works out the port the
//              packet will need at the next router. -> VC_WAIT_VA
//   VC_WAIT_VA the channel requests an output virtual channel from the
//              allocator (va_req/va_port, answered by va_gnt/va_vc in the
//              same cycle). -> VC_ACTIVE once granted
//   VC_ACTIVE  the packet owns an output virtual channel; its flits request
//              the switch until the tail leaves. -> VC_IDLE
//
// Switch allocation: of the channels that may use the switch, one is chosen
// in round-robin order and presented as sa_req/sa_dest/sa_flit; sa_gnt from
// the crossbar (or, in the non-speculative router, room in the crossbar's
// FIFO) lets the flit go, and it is removed from its FIFO in that cycle.
// The outgoing flit carries the output virtual channel in vc and the next
// router's route in la_port.
//
// SPECULATIVE = 1: a channel in VC_WAIT_VA also requests the switch, in the
// same cycle as it requests a virtual channel, provided its output port has
// a free channel. sa_valid says whether the flit may really go: only if the
// channel owns, or is being granted in this cycle, an output virtual
// channel. A switch grant without a channel is a failed speculation and the
// flit retries; a channel grant without the switch leaves the channel in
// VC_ACTIVE to retry the switch alone. SPECULATIVE = 0: only VC_ACTIVE
// channels request the switch, so allocation is serial.
//
// Head-flit timing (speculative): written in cycle t, routed in t+1,
// allocated and sent through the switch in t+2. Non-speculative: one cycle
// more. The three-state channel and the one-cycle routing stage follow the
// document's flow chart (decoding and routing, then the two allocations,
// then crossbar traversal); buffer depth, round-robin channel choice and
// the free-channel condition on speculative requests are this design's.
module input_port
  import noc_pkg::*;
#(
  parameter bit          SPECULATIVE = 1'b1,
  parameter int unsigned BUF_DEPTH   = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  // link from the upstream router or core
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic [NUM_VC-1:0]  in_vc_full,
  // virtual channel allocation
  output logic               va_req   [NUM_VC],
  output port_e              va_port  [NUM_VC],
  input  logic               va_gnt   [NUM_VC],
  input  logic [VC_W-1:0]    va_vc    [NUM_VC],
  input  logic               port_free[NUM_PORTS],
  // switch allocation and traversal
  output logic               sa_req,
  output port_e              sa_dest,
  output logic               sa_valid,
  output flit_t              sa_flit,
  input  logic               sa_gnt
);

  typedef enum logic [1:0] {VC_IDLE, VC_WAIT_VA, VC_ACTIVE} vc_state_e;

  vc_state_e       state_q   [NUM_VC];
  port_e           out_port_q[NUM_VC];
  port_e           next_la_q [NUM_VC];
  logic [VC_W-1:0] out_vc_q  [NUM_VC];

  flit_t           front     [NUM_VC];
  logic            empty     [NUM_VC];
  logic            full      [NUM_VC];
  logic            rd        [NUM_VC];
  port_e           la_next   [NUM_VC];
  logic            eligible  [NUM_VC];

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst,
      .wr_req (in_valid && (int'(in_flit.vc) == v)),
      .din    (in_flit),
      .rd_req (rd[v]),
      .dout   (front[v]),
      .empty  (empty[v]),
      .full   (full[v])
    );
    assign in_vc_full[v] = full[v];

    la_route u_route (
      .cur_x, .cur_y,
      .out_port  (front[v].la_port),
      .dst_x     (front[v].dst_x),
      .dst_y     (front[v].dst_y),
      .next_port (la_next[v])
    );

    assign va_req[v]  = (state_q[v] == VC_WAIT_VA);
    assign va_port[v] = out_port_q[v];

    always_comb begin
      eligible[v] = 1'b0;
      if (!empty[v]) begin
        if (state_q[v] == VC_ACTIVE) eligible[v] = 1'b1;
        else if (SPECULATIVE && state_q[v] == VC_WAIT_VA)
          eligible[v] = port_free[out_port_q[v]];
      end
    end

    a_no_overflow: assert property (@(posedge clk) disable iff (rst)
      !(in_valid && int'(in_flit.vc) == v && full[v]));
    a_head_first: assert property (@(posedge clk) disable iff (rst)
      (state_q[v] == VC_IDLE && !empty[v]) |-> front[v].head);
  end

  // Round-robin choice of the channel that uses the switch.
  logic [VC_W-1:0] rr_q;
  logic [VC_W-1:0] sel;
  logic            any_eligible;

  always_comb begin
    sel          = rr_q;
    any_eligible = 1'b0;
    for (int k = NUM_VC - 1; k >= 0; k--) begin
      logic [VC_W-1:0] v;
      v = VC_W'((int'(rr_q) + k) % NUM_VC);
      if (eligible[v]) begin
        sel          = v;
        any_eligible = 1'b1;
      end
    end
  end

  assign sa_req   = any_eligible;
  assign sa_dest  = out_port_q[sel];
  assign sa_valid = any_eligible &&
                    (state_q[sel] == VC_ACTIVE || va_gnt[sel]);

  logic            move;
  logic [VC_W-1:0] sel_out_vc;

  assign move       = sa_req && sa_valid && sa_gnt;
  assign sel_out_vc = (state_q[sel] == VC_ACTIVE) ? out_vc_q[sel] : va_vc[sel];

  always_comb begin
    sa_flit         = front[sel];
    sa_flit.vc      = sel_out_vc;
    sa_flit.la_port = next_la_q[sel];
  end

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) rd[v] = move && (int'(sel) == v);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rr_q <= '0;
      for (int v = 0; v < NUM_VC; v++) begin
        state_q[v]    <= VC_IDLE;
        out_port_q[v] <= PORT_LOCAL;
        next_la_q[v]  <= PORT_LOCAL;
        out_vc_q[v]   <= '0;
      end
    end else begin
      if (move) rr_q <= VC_W'((int'(sel) + 1) % NUM_VC);
      for (int v = 0; v < NUM_VC; v++) begin
        unique case (state_q[v])
          VC_IDLE: begin
            if (!empty[v]) begin
              out_port_q[v] <= front[v].la_port;
              next_la_q[v]  <= la_next[v];
              state_q[v]    <= VC_WAIT_VA;
            end
          end
          VC_WAIT_VA: begin
            if (va_gnt[v]) begin
              out_vc_q[v] <= va_vc[v];
              state_q[v]  <= VC_ACTIVE;
            end
          end
          default: ;
        endcase
        if (rd[v] && front[v].tail) state_q[v] <= VC_IDLE;
      end
    end
  end

endmodule
