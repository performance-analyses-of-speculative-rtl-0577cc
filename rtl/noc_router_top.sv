// noc_router_top: the two virtual channel routers side by side.
//
// The design consists of two five-port virtual channel routers built from
// the same input ports, allocator and arbiters, and meant to be compared:
//   s_*  spec_vc_router     - speculative allocation, plain crossbar
//   n_*  nonspec_vc_router  - serial allocation, contention-free crossbar
// Each has its own flit inputs (valid, flit, per-virtual-channel full back to
// the sender) and outputs (valid, flit) on ports Inject/Eject, N, S, E, W,
// and both share the clock and the synchronous, active-high reset. Fed the
// same traffic they deliver the same flits; the speculative router does it
// two cycles sooner per head flit and with less buffering. See the two
// routers for timing.
module noc_router_top
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH       = 4,
  parameter int unsigned XBAR_FIFO_DEPTH = 4,
  parameter int unsigned ROUTER_X        = 1,
  parameter int unsigned ROUTER_Y        = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              s_in_valid  [NUM_PORTS],
  input  flit_t             s_in_flit   [NUM_PORTS],
  output logic [NUM_VC-1:0] s_in_vc_full[NUM_PORTS],
  output logic              s_out_valid [NUM_PORTS],
  output flit_t             s_out_flit  [NUM_PORTS],
  input  logic              n_in_valid  [NUM_PORTS],
  input  flit_t             n_in_flit   [NUM_PORTS],
  output logic [NUM_VC-1:0] n_in_vc_full[NUM_PORTS],
  output logic              n_out_valid [NUM_PORTS],
  output flit_t             n_out_flit  [NUM_PORTS]
);

  spec_vc_router #(
    .BUF_DEPTH (BUF_DEPTH),
    .ROUTER_X  (ROUTER_X),
    .ROUTER_Y  (ROUTER_Y)
  ) u_spec (
    .clk, .rst,
    .in_valid   (s_in_valid),
    .in_flit    (s_in_flit),
    .in_vc_full (s_in_vc_full),
    .out_valid  (s_out_valid),
    .out_flit   (s_out_flit)
  );

  nonspec_vc_router #(
    .BUF_DEPTH       (BUF_DEPTH),
    .XBAR_FIFO_DEPTH (XBAR_FIFO_DEPTH),
    .ROUTER_X        (ROUTER_X),
    .ROUTER_Y        (ROUTER_Y)
  ) u_nonspec (
    .clk, .rst,
    .in_valid   (n_in_valid),
    .in_flit    (n_in_flit),
    .in_vc_full (n_in_vc_full),
    .out_valid  (n_out_valid),
    .out_flit   (n_out_flit)
  );

endmodule
