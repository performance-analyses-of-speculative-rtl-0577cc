// crossbar: the 5x5 crossbar switch with its output arbiters.
//
// Every input presents three things, as the document describes: the data
// (a flit), the destination (the output port it wants) and a request. For
// each output port one xbar_arbiter chooses among the inputs that request
// it; that choice is the switch allocation. in_gnt tells each input, in the
// same cycle, whether it won its output.
//
// in_valid qualifies the data separately from the request: a speculative
// input may request and win an output before it knows it owns a virtual
// channel, and then sends nothing (the grant is wasted). A flit crosses when
// its input is granted and valid; the outputs are registered, so it appears
// on out_flit/out_valid one cycle after the grant. A plain crossbar has no
// storage of its own: an input that loses must keep its flit and request
// again. Registered outputs and the separate valid are this design's
// choices; rst is synchronous and active high.
module crossbar
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  flit_t in_flit  [NUM_PORTS],
  input  port_e in_dest  [NUM_PORTS],
  input  logic  in_req   [NUM_PORTS],
  input  logic  in_valid [NUM_PORTS],
  output logic  in_gnt   [NUM_PORTS],
  output flit_t out_flit [NUM_PORTS],
  output logic  out_valid[NUM_PORTS]
);

  logic [NUM_PORTS-1:0] req_o [NUM_PORTS];  // [output][input]
  logic [NUM_PORTS-1:0] gnt_o [NUM_PORTS];  // [output][input]

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++)
      for (int i = 0; i < NUM_PORTS; i++)
        req_o[o][i] = in_req[i] && (int'(in_dest[i]) == o);
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_arb
    xbar_arbiter u_arb (.clk, .rst, .req(req_o[o]), .gnt(gnt_o[o]));
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_gnt[i] = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (gnt_o[o][i]) in_gnt[i] = 1'b1;
    end
  end

  flit_t sel_flit  [NUM_PORTS];
  logic  sel_valid [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      sel_flit[o]  = '0;
      sel_valid[o] = 1'b0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (gnt_o[o][i]) begin
          sel_flit[o]  = in_flit[i];
          sel_valid[o] = in_valid[i];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (rst) begin
        out_valid[o] <= 1'b0;
        out_flit[o]  <= '0;
      end else begin
        out_valid[o] <= sel_valid[o];
        out_flit[o]  <= sel_flit[o];
      end
    end
  end

endmodule
