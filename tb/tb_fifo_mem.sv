// tb_fifo_mem: writes random words to random addresses, keeps a copy, and
// checks the asynchronous read port at random addresses, including that a
// word written on one edge is readable right after it and that a cycle with
// wr_en low writes nothing.
module tb_fifo_mem;
  localparam int unsigned WIDTH = 18, DEPTH = 4, AW = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             wr_en = 1'b0;
  logic [AW-1:0]    wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;

  fifo_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] model [DEPTH];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first so the model is defined
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = WIDTH'($urandom); model[a] = wr_data;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en   = $urandom % 2;
      wr_addr = AW'($urandom);
      wr_data = WIDTH'($urandom);
      if (wr_en) model[wr_addr] = wr_data;
      @(posedge clk); #1;
      rd_addr = AW'($urandom);
      #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        $display("ERROR: addr %0d read %h expected %h", rd_addr, rd_data, model[rd_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
