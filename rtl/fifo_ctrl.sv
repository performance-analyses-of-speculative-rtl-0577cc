// fifo_ctrl: the control unit of a FIFO.
//
// It takes a write request and a read request and produces the write and
// read enables, the write and read addresses of the memory unit, and the
// empty and full flags, which is the interface the document gives for its
// FIFO control unit. A write request is accepted only when the FIFO is not
// full, a read request only when it is not empty; both may be accepted in
// the same cycle. The addresses are circular pointers over DEPTH words and
// an occupancy counter tells empty from full, so DEPTH need not be a power
// of two. Flags and pointers change on the rising clock edge; rst is
// synchronous and active high and empties the FIFO. The pointer/counter
// scheme and the reset style are this design's choices.
module fifo_ctrl #(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_req,
  input  logic          rd_req,
  output logic          wr_en,
  output logic          rd_en,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,
  output logic          empty,
  output logic          full
);

  logic [AW:0] count_q;

  assign empty = (count_q == '0);
  assign full  = (count_q == (AW+1)'(DEPTH));
  assign wr_en = wr_req && !full;
  assign rd_en = rd_req && !empty;

  function automatic logic [AW-1:0] next_addr(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr <= '0;
      rd_addr <= '0;
      count_q <= '0;
    end else begin
      if (wr_en) wr_addr <= next_addr(wr_addr);
      if (rd_en) rd_addr <= next_addr(rd_addr);
      unique case ({wr_en, rd_en})
        2'b10:   count_q <= count_q + 1'b1;
        2'b01:   count_q <= count_q - 1'b1;
        default: count_q <= count_q;
      endcase
    end
  end

endmodule
