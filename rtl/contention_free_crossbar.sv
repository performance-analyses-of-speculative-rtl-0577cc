// contention_free_crossbar: a crossbar with a FIFO in front of every input.
//
// The document's contention-free crossbar routes all data through memory:
// each input writes its flit, with its destination, into its own FIFO
// (FIFO 1..5), the request of that crossbar input is the FIFO's empty flag
// inverted (INV 1..5), and the crossbar's arbiters pick one requester per
// output. A grant reads the winning FIFO; a flit that loses stays in its
// FIFO and requests again in the next cycle, so no flit is lost when two
// inputs want the same output.
//
// Interface: in_wr writes {in_dest, in_flit} into input i's FIFO unless
// in_full[i] is high (the writer must watch in_full). A flit written in cycle
// t can win arbitration in cycle t+1 and then appears on out_flit/out_valid
// in cycle t+2. FIFO depth is a parameter; the document gives none.
module contention_free_crossbar
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  flit_t in_flit  [NUM_PORTS],
  input  port_e in_dest  [NUM_PORTS],
  input  logic  in_wr    [NUM_PORTS],
  output logic  in_full  [NUM_PORTS],
  output flit_t out_flit [NUM_PORTS],
  output logic  out_valid[NUM_PORTS]
);

  typedef struct packed {
    port_e dest;
    flit_t flit;
  } entry_t;

  entry_t q_head  [NUM_PORTS];
  logic   q_empty [NUM_PORTS];
  logic   x_req   [NUM_PORTS];
  logic   x_gnt   [NUM_PORTS];
  flit_t  x_flit  [NUM_PORTS];
  port_e  x_dest  [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    entry_t wr_entry;
    logic   full_i;
    assign wr_entry = '{dest: in_dest[i], flit: in_flit[i]};

    fifo #(.WIDTH($bits(entry_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .wr_req (in_wr[i]),
      .din    (wr_entry),
      .rd_req (x_gnt[i]),
      .dout   (q_head[i]),
      .empty  (q_empty[i]),
      .full   (full_i)
    );

    assign in_full[i] = full_i;
    assign x_req[i]   = !q_empty[i];   // INV i
    assign x_flit[i]  = q_head[i].flit;
    assign x_dest[i]  = q_head[i].dest;
  end

  crossbar u_xbar (
    .clk, .rst,
    .in_flit  (x_flit),
    .in_dest  (x_dest),
    .in_req   (x_req),
    .in_valid (x_req),
    .in_gnt   (x_gnt),
    .out_flit,
    .out_valid
  );

endmodule
