// vc_allocator: virtual channel allocation for one router.
//
// Each output port has NUM_VC virtual channels on the link behind it. A
// requester is one input virtual channel (NUM_PORTS*NUM_VC of them, numbered
// port*NUM_VC + vc) holding a head flit; it names the output port it needs.
// In every cycle each output port hands its free virtual channels, lowest
// numbered first, to its requesters in priority order, lower requester index
// first, so several packets can win channels of one output in the same
// cycle (in the document's example both packets win allocation, one of them
// then losing switch allocation). va_gnt/va_vc answer in the same cycle; the
// channel is marked busy from the next cycle. A channel is freed when the
// tail flit of its packet leaves the router (rel_valid/rel_vc per output
// port) and can be granted again from the next cycle. port_free tells the
// input ports which outputs have a free channel at all.
//
// The fixed priority follows the document's "the packet which has higher
// priority"; the order itself, and the absence of credits from the next
// router (a channel is free once its tail has left), are this design's
// choices. rst is synchronous, active high, and frees every channel.
module vc_allocator
  import noc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            va_req    [NUM_PORTS*NUM_VC],
  input  port_e           va_port   [NUM_PORTS*NUM_VC],
  output logic            va_gnt    [NUM_PORTS*NUM_VC],
  output logic [VC_W-1:0] va_vc     [NUM_PORTS*NUM_VC],
  input  logic            rel_valid [NUM_PORTS],
  input  logic [VC_W-1:0] rel_vc    [NUM_PORTS],
  output logic            port_free [NUM_PORTS]
);

  localparam int unsigned NREQ = NUM_PORTS * NUM_VC;

  logic [NUM_VC-1:0] busy_q [NUM_PORTS];
  logic [NUM_VC-1:0] taken  [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) taken[o] = busy_q[o];
    for (int r = 0; r < NREQ; r++) begin
      va_gnt[r] = 1'b0;
      va_vc[r]  = '0;
      if (va_req[r]) begin
        for (int v = NUM_VC - 1; v >= 0; v--) begin
          if (!taken[va_port[r]][v]) begin
            va_gnt[r] = 1'b1;
            va_vc[r]  = VC_W'(v);
          end
        end
        if (va_gnt[r]) taken[va_port[r]][va_vc[r]] = 1'b1;
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) port_free[o] = !(&busy_q[o]);
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (rst) begin
        busy_q[o] <= '0;
      end else begin
        busy_q[o] <= taken[o];
        if (rel_valid[o]) busy_q[o][rel_vc[o]] <= 1'b0;
      end
    end
  end

  // Only a channel that was handed out can be released.
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    a_release_busy: assert property (@(posedge clk) disable iff (rst)
      rel_valid[o] |-> busy_q[o][rel_vc[o]]);
  end

endmodule
