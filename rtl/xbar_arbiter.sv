// xbar_arbiter: the arbiter of one crossbar output port.
//
// Five request lines, one per crossbar input, and five one-hot grant lines.
// The arbiter is a state machine with the states the document's arbiter FSM
// prints: IDLE and G1..G5, where Gk means input k owns the output. A state
// Gk is kept for as long as request k stays high (the "State=Gk" loops), so a
// packet whose flits follow one another keeps the output. When the owner
// drops its request, the output passes to the lowest-numbered input that is
// requesting (the conditions printed on the arrows into G2 and G5 test the
// lower-numbered requests for 0), or back to IDLE when nobody requests.
//
// The grant is the state being entered: it is given in the same cycle as the
// request (a combinational path from req to gnt), and the state register
// takes it on the rising edge. Holding the grant while the request lasts and
// lowest-index priority are this design's reading of the FSM figure; rst is
// synchronous, active high, and returns the arbiter to IDLE.
module xbar_arbiter
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_PORTS-1:0] req,
  output logic [NUM_PORTS-1:0] gnt
);

  typedef enum logic [2:0] {IDLE, G1, G2, G3, G4, G5} arb_state_e;

  arb_state_e state_q, state_d;

  function automatic arb_state_e grant_state(input int unsigned k);
    unique case (k)
      0:       return G1;
      1:       return G2;
      2:       return G3;
      3:       return G4;
      default: return G5;
    endcase
  endfunction

  // Index of the input that owns the output in state s (s != IDLE).
  function automatic int unsigned owner(input arb_state_e s);
    return int'(s) - 1;
  endfunction

  always_comb begin
    state_d = IDLE;
    if (state_q != IDLE && req[owner(state_q)]) begin
      state_d = state_q;
    end else begin
      for (int k = NUM_PORTS - 1; k >= 0; k--) begin
        if (req[k]) state_d = grant_state(k);
      end
    end
  end

  always_comb begin
    gnt = '0;
    if (state_d != IDLE) gnt[owner(state_d)] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) state_q <= IDLE;
    else     state_q <= state_d;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_granted_requests: assert property (@(posedge clk) disable iff (rst) (gnt & ~req) == '0);

endmodule
