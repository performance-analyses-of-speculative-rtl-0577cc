// tb_fifo: random pushes and pops against a queue model. Checks the data
// order, the flags, that a full FIFO refuses a write and an empty one a
// read, and that a written word is at the output one cycle after the write.
module tb_fifo;
  localparam int unsigned WIDTH = 12, DEPTH = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             wr_req = 1'b0, rd_req = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic             empty, full;

  fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  logic [WIDTH-1:0] q[$];
  int n_full = 0, n_empty_rd = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_req = ($urandom % 100) < ((i % 100) < 50 ? 80 : 20);
      rd_req = ($urandom % 100) < ((i % 100) < 50 ? 20 : 80);
      din    = WIDTH'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() != 0) check(dout == q[0], $sformatf("dout %h expected %h", dout, q[0]));
      if (full && wr_req) n_full++;
      if (empty && rd_req) n_empty_rd++;
      @(posedge clk);
      begin
        bit do_rd, do_wr;
        do_rd = rd_req && q.size() != 0;
        do_wr = wr_req && q.size() != DEPTH;
        if (do_rd) void'(q.pop_front());
        if (do_wr) q.push_back(din);
      end
    end
    check(n_full > 0 && n_empty_rd > 0, "full and empty cases not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
