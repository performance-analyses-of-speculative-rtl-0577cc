// tb_fifo_ctrl: random write/read requests against a counting model.
// Checks the enables (a request is refused only when full / empty), the
// flags and both addresses, which must step circularly over DEPTH words.
module tb_fifo_ctrl;
  localparam int unsigned DEPTH = 5;   // not a power of two on purpose
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_req = 1'b0, rd_req = 1'b0;
  logic wr_en, rd_en, empty, full;
  logic [AW-1:0] wr_addr, rd_addr;

  fifo_ctrl #(.DEPTH(DEPTH)) dut (.*);

  int m_count = 0, m_wa = 0, m_ra = 0;

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
      // bias towards filling in the first half, emptying in the second
      wr_req = ($urandom % 100) < ((i % 200) < 100 ? 75 : 25);
      rd_req = ($urandom % 100) < ((i % 200) < 100 ? 25 : 75);
      #1;
      check(empty == (m_count == 0), "empty flag");
      check(full == (m_count == DEPTH), "full flag");
      check(wr_en == (wr_req && m_count != DEPTH), "write enable");
      check(rd_en == (rd_req && m_count != 0), "read enable");
      check(int'(wr_addr) == m_wa && int'(rd_addr) == m_ra, "addresses");
      @(posedge clk);
      if (wr_req && m_count != DEPTH) begin m_wa = (m_wa + 1) % DEPTH; end
      if (rd_req && m_count != 0)     begin m_ra = (m_ra + 1) % DEPTH; end
      m_count = m_count + ((wr_req && m_count != DEPTH) ? 1 : 0)
                        - ((rd_req && m_count != 0) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
