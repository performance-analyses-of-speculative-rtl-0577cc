// tb_vc_allocator: random channel requests from all ten input channels and
// random releases of busy output channels, against a model that hands each
// output's free channels, lowest first, to the requesters in index order.
// Checks grants, granted channel numbers and the per-port free flags, and
// that several requesters of one output can be served in one cycle.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int unsigned NREQ = NUM_PORTS * NUM_VC;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            va_req   [NREQ];
  port_e           va_port  [NREQ];
  logic            va_gnt   [NREQ];
  logic [VC_W-1:0] va_vc    [NREQ];
  logic            rel_valid[NUM_PORTS];
  logic [VC_W-1:0] rel_vc   [NUM_PORTS];
  logic            port_free[NUM_PORTS];

  vc_allocator dut (.*);

  bit busy [NUM_PORTS][NUM_VC];
  int multi = 0, blocked = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NREQ; r++) begin va_req[r] = 0; va_port[r] = PORT_LOCAL; end
    for (int o = 0; o < NUM_PORTS; o++) begin
      rel_valid[o] = 0; rel_vc[o] = '0;
      for (int v = 0; v < NUM_VC; v++) busy[o][v] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      bit taken [NUM_PORTS][NUM_VC];
      int per_port [NUM_PORTS];
      @(negedge clk);
      for (int r = 0; r < NREQ; r++) begin
        va_req[r]  = ($urandom % 100) < 30;
        va_port[r] = port_e'($urandom % NUM_PORTS);
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        int v;
        v = int'($urandom % NUM_VC);
        rel_valid[o] = busy[o][v] && (($urandom % 100) < 40);
        rel_vc[o]    = VC_W'(v);
        per_port[o]  = 0;
      end
      taken = busy;
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        bit all_busy;
        all_busy = 1;
        for (int v = 0; v < NUM_VC; v++) if (!busy[o][v]) all_busy = 0;
        checks++;
        if (port_free[o] != !all_busy) begin failures++; $display("ERROR: port_free[%0d]", o); end
      end
      for (int r = 0; r < NREQ; r++) begin
        int got;
        got = -1;
        if (va_req[r]) begin
          for (int v = 0; v < NUM_VC; v++)
            if (got < 0 && !taken[va_port[r]][v]) got = v;
          if (got >= 0) begin taken[va_port[r]][got] = 1; per_port[va_port[r]]++; end
          else blocked++;
        end
        checks++;
        if (va_gnt[r] != (got >= 0) || (got >= 0 && int'(va_vc[r]) != got)) begin
          failures++;
          $display("ERROR: cycle %0d requester %0d gnt %0d vc %0d, expected %0d", c, r, va_gnt[r], va_vc[r], got);
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) if (per_port[o] > 1) multi++;
      @(posedge clk);
      busy = taken;
      for (int o = 0; o < NUM_PORTS; o++) if (rel_valid[o]) busy[o][rel_vc[o]] = 0;
    end
    checks++;
    if (multi == 0 || blocked == 0) begin failures++; $display("ERROR: cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
