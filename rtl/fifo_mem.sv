// fifo_mem: the memory unit of a FIFO.
//
// DEPTH words of WIDTH bits. A word is written on the rising clock edge when
// wr_en is high; the word at rd_addr is always visible on rd_data without a
// clock (a distributed-RAM style read port), so the oldest entry of the FIFO
// is presented as soon as it is written. The document names the memory unit
// but not its read timing; the asynchronous read is this design's choice.
// The storage is not reset: the control unit never lets an unwritten word
// be read.
module fifo_mem #(
  parameter int unsigned WIDTH = noc_pkg::FLIT_W,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];

endmodule
