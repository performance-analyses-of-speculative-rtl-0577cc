// tb_xbar_arbiter: random request patterns against a model of the arbiter:
// the owner keeps the grant while it requests; otherwise the lowest-numbered
// requester gets it; no request means no grant. Also checks the grant comes
// in the same cycle as the request, and that a held grant blocks a
// lower-numbered newcomer.
module tb_xbar_arbiter;
  import noc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_PORTS-1:0] req = '0, gnt;
  xbar_arbiter dut (.*);

  int owner = -1;      // model state: -1 is IDLE
  int holds = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // directed: input 3 owns, input 0 arrives, input 3 keeps the grant
    req = 5'b01000; #1;
    checks++; if (gnt != 5'b01000) begin failures++; $display("ERROR: first grant %b", gnt); end
    @(negedge clk) req = 5'b01001; #1;
    checks++; if (gnt != 5'b01000) begin failures++; $display("ERROR: grant not held %b", gnt); end
    @(negedge clk) req = 5'b00001; #1;
    checks++; if (gnt != 5'b00001) begin failures++; $display("ERROR: grant not passed %b", gnt); end
    @(negedge clk) req = 5'b00000; #1;
    checks++; if (gnt != 5'b00000) begin failures++; $display("ERROR: grant with no request %b", gnt); end
    @(posedge clk);
    owner = -1;
    for (int i = 0; i < 2000; i++) begin
      logic [NUM_PORTS-1:0] exp;
      @(negedge clk);
      req = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
      if (owner >= 0 && req[owner]) begin
        holds++;
      end else begin
        owner = -1;
        for (int k = 0; k < NUM_PORTS; k++) if (owner < 0 && req[k]) owner = k;
      end
      exp = (owner >= 0) ? NUM_PORTS'(1) << owner : '0;
      #1;
      checks++;
      if (gnt != exp) begin
        failures++;
        $display("ERROR: req %b gnt %b expected %b", req, gnt, exp);
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
