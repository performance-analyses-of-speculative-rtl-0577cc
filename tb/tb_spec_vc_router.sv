// tb_spec_vc_router: self-checking testbench of spec_vc_router.
//
// Directed part: (1) a single-flit packet from Inject to East must appear
// 3 cycles after it is offered; (2) the two flits of a two-flit packet
// leave on consecutive cycles; (3) the document's speculation example:
// packets B (North input) and A (South input) both want East in the same
// cycle; both win a virtual channel of East in the same cycle, B wins the
// switch and A follows one cycle later on the other channel.
// Random part: router_traffic offers random multi-flit packets on all ports
// and virtual channels and checks every delivered flit.
module tb_spec_vc_router;
  import noc_pkg::*;

  localparam int unsigned LAT = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic              in_valid  [NUM_PORTS];
  flit_t             in_flit   [NUM_PORTS];
  logic [NUM_VC-1:0] in_vc_full[NUM_PORTS];
  logic              out_valid [NUM_PORTS];
  flit_t             out_flit  [NUM_PORTS];

  logic              d_valid [NUM_PORTS];
  flit_t             d_flit  [NUM_PORTS];
  logic              h_valid [NUM_PORTS];
  flit_t             h_flit  [NUM_PORTS];
  logic              use_h = 1'b0;

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = use_h ? h_valid[p] : d_valid[p];
      in_flit[p]  = use_h ? h_flit[p]  : d_flit[p];
    end
  end

  spec_vc_router dut (.clk, .rst, .in_valid, .in_flit, .in_vc_full, .out_valid, .out_flit);

  int h_checks, h_failures, h_delivered, h_full;
  logic h_done;
  router_traffic #(.PKTS(30), .RATE(60)) u_traffic (
    .clk, .rst(rst || !use_h),
    .in_valid(h_valid), .in_flit(h_flit), .in_vc_full,
    .out_valid, .out_flit,
    .checks(h_checks), .failures(h_failures), .delivered(h_delivered),
    .full_seen(h_full), .done(h_done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  function automatic flit_t mk(logic head, logic tail, logic [VC_W-1:0] vc, port_e la,
                               int dx, int dy, logic [7:0] data);
    flit_t f;
    f = '0;
    f.head = head; f.tail = tail; f.vc = vc; f.la_port = la;
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.data = data;
    return f;
  endfunction

  // Wait for a valid flit on output o; returns the cycles waited.
  task automatic wait_out(input int o, input int limit, output int waited, output flit_t f);
    waited = 0;
    f = '0;
    while (waited < limit) begin
      @(posedge clk); #1;
      waited++;
      if (out_valid[o]) begin
        f = out_flit[o];
        return;
      end
    end
    waited = -1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int    w;
    flit_t f;
    for (int p = 0; p < NUM_PORTS; p++) begin d_valid[p] = 1'b0; d_flit[p] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (2) @(negedge clk);

    // (1) single-flit packet Inject -> East, destination (2,1) is the east neighbour
    d_valid[0] = 1'b1;
    d_flit[0]  = mk(1, 1, 0, PORT_E, 2, 1, 8'hA5);
    @(negedge clk) d_valid[0] = 1'b0;
    wait_out(int'(PORT_E), 20, w, f);
    // one clock edge (the buffer write) has passed before wait_out starts
    check(w + 1 == LAT, $sformatf("head latency %0d, expected %0d", w + 1, LAT));
    check(f.data == 8'hA5 && f.la_port == PORT_LOCAL && f.head && f.tail,
          $sformatf("flit on East %h", f));
    repeat (4) @(negedge clk);

    // (2) two-flit packet Inject -> North (1,3): flits on consecutive cycles
    d_valid[0] = 1'b1;
    d_flit[0]  = mk(1, 0, 1, PORT_N, 1, 3, 8'h11);
    @(negedge clk) d_flit[0] = mk(0, 1, 1, PORT_N, 1, 3, 8'h12);
    @(negedge clk) d_valid[0] = 1'b0;
    wait_out(int'(PORT_N), 20, w, f);
    check(w + 2 == LAT && f.data == 8'h11 && f.head && f.la_port == PORT_N,
          $sformatf("head of 2-flit packet after %0d: %h", w, f));
    @(posedge clk); #1;
    check(out_valid[PORT_N] && out_flit[PORT_N].data == 8'h12 && out_flit[PORT_N].tail &&
          out_flit[PORT_N].vc == f.vc, "tail of 2-flit packet not on the next cycle");
    repeat (4) @(negedge clk);

    // (3) packets B (North input) and A (South input) both to East
    d_valid[1] = 1'b1; d_flit[1] = mk(1, 1, 0, PORT_E, 3, 1, 8'h0B);
    d_valid[2] = 1'b1; d_flit[2] = mk(1, 1, 0, PORT_E, 3, 1, 8'h0A);
    @(negedge clk) begin d_valid[1] = 1'b0; d_valid[2] = 1'b0; end
    begin
      flit_t fb;
      wait_out(int'(PORT_E), 20, w, fb);
      check(w + 1 == LAT && fb.data == 8'h0B, $sformatf("B after %0d: %h", w, fb));
      check(fb.la_port == PORT_E, "B next route should be East");
      @(posedge clk); #1;
      check(out_valid[PORT_E] && out_flit[PORT_E].data == 8'h0A, "A not one cycle after B");
      check(out_flit[PORT_E].vc != fb.vc, "A and B on the same output channel");
    end
    repeat (6) @(negedge clk);

    // (4) random traffic
    use_h = 1'b1;
    wait (h_done);
    repeat (5) @(negedge clk);
    checks   += h_checks;
    failures += h_failures;
    check(h_delivered > 100, $sformatf("only %0d flits delivered", h_delivered));
    $display("random traffic: %0d flits delivered, full seen %0d times, cycle %0d",
             h_delivered, h_full, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
