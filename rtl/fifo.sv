// fifo: a first-in first-out buffer built, as the document draws it, from a
// FIFO control unit (fifo_ctrl) and a memory unit (fifo_mem).
//
// wr_req with din stores a word if the FIFO is not full. dout always shows
// the oldest word (show-ahead); rd_req removes it if the FIFO is not empty.
// A word written in one cycle is on dout, with empty low, from the next
// cycle. rst is synchronous and active high. Width and depth are parameters;
// the document gives neither.
module fifo #(
  parameter int unsigned WIDTH = noc_pkg::FLIT_W,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_req,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_req,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;

  fifo_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst, .wr_req, .rd_req,
    .wr_en, .rd_en, .wr_addr, .rd_addr, .empty, .full
  );

  fifo_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_mem (
    .clk, .wr_en, .wr_addr, .wr_data(din), .rd_addr, .rd_data(dout)
  );

  // rd_en is the accepted read; the memory needs no read strobe.
  logic unused_rd_en;
  assign unused_rd_en = rd_en;

endmodule
