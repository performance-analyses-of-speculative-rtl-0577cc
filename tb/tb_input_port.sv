// tb_input_port: directed test of one input port, with the allocator and
// the switch played by the testbench. Two instances share the allocation
// and switch signals: one speculative, one not.
//  (1) a three-flit packet: one routing cycle with no request; then the
//      speculative port requests a channel and the switch together while
//      the non-speculative one requests only the channel; no switch request
//      when the output has no free channel; a switch grant without a channel
//      moves nothing; a channel grant without the switch is kept and the
//      switch is retried alone; then the three flits leave on consecutive
//      grants, carrying the granted channel and the next router's route.
//  (2) a single-flit packet that wins channel and switch in one cycle
//      leaves on the third clock edge after it was offered.
//  (3) the channel buffer reports full after BUF_DEPTH flits.
module tb_input_port;
  import noc_pkg::*;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              in_valid = 0, n_in_valid = 0;
  flit_t             in_flit = '0;
  logic [NUM_VC-1:0] in_vc_full, n_in_vc_full;
  logic              va_req [NUM_VC], n_va_req [NUM_VC];
  port_e             va_port[NUM_VC], n_va_port[NUM_VC];
  logic              va_gnt [NUM_VC];
  logic [VC_W-1:0]   va_vc  [NUM_VC];
  logic              port_free[NUM_PORTS];
  logic              sa_req, sa_valid, n_sa_req, n_sa_valid;
  port_e             sa_dest, n_sa_dest;
  flit_t             sa_flit, n_sa_flit;
  logic              sa_gnt = 0;

  input_port #(.SPECULATIVE(1'b1), .BUF_DEPTH(DEPTH)) dut (
    .clk, .rst, .cur_x(2'd1), .cur_y(2'd1),
    .in_valid, .in_flit, .in_vc_full,
    .va_req, .va_port, .va_gnt, .va_vc, .port_free,
    .sa_req, .sa_dest, .sa_valid, .sa_flit, .sa_gnt
  );

  input_port #(.SPECULATIVE(1'b0), .BUF_DEPTH(DEPTH)) dut_n (
    .clk, .rst, .cur_x(2'd1), .cur_y(2'd1),
    .in_valid(n_in_valid), .in_flit, .in_vc_full(n_in_vc_full),
    .va_req(n_va_req), .va_port(n_va_port), .va_gnt, .va_vc, .port_free,
    .sa_req(n_sa_req), .sa_dest(n_sa_dest), .sa_valid(n_sa_valid), .sa_flit(n_sa_flit), .sa_gnt
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  function automatic flit_t mk(logic head, logic tail, logic [VC_W-1:0] vc, port_e la,
                               int dx, int dy, logic [7:0] data);
    flit_t f;
    f = '0;
    f.head = head; f.tail = tail; f.vc = vc; f.la_port = la;
    f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy); f.data = data;
    return f;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NUM_VC; v++) begin va_gnt[v] = 0; va_vc[v] = '0; end
    for (int p = 0; p < NUM_PORTS; p++) port_free[p] = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // (1) three-flit packet on channel 0, East, destination (3,1)
    in_valid = 1; n_in_valid = 1; in_flit = mk(1, 0, 0, PORT_E, 3, 1, 8'h31);
    @(negedge clk) in_flit = mk(0, 0, 0, PORT_E, 3, 1, 8'h32);
    #1;
    check(!va_req[0] && !sa_req && !n_va_req[0] && !n_sa_req, "request during the routing cycle");
    @(negedge clk) in_flit = mk(0, 1, 0, PORT_E, 3, 1, 8'h33);
    #1;
    check(va_req[0] && va_port[0] == PORT_E, "speculative port: no channel request");
    check(sa_req && sa_dest == PORT_E && !sa_valid, "speculative port: switch request");
    check(n_va_req[0] && n_va_port[0] == PORT_E && !n_sa_req, "non-speculative port requests switch early");
    port_free[PORT_E] = 0; #1;
    check(!sa_req, "switch requested with no free channel");
    port_free[PORT_E] = 1;
    sa_gnt = 1; #1;       // switch won, no channel
    check(!sa_valid, "flit valid without a channel");
    @(negedge clk) in_valid = 0; n_in_valid = 0;
    sa_gnt = 0; va_gnt[0] = 1; va_vc[0] = 1; #1;   // channel won, switch lost
    check(sa_req && sa_valid && sa_flit.data == 8'h31, "head lost by a failed speculation");
    @(negedge clk) va_gnt[0] = 0; #1;
    check(!va_req[0] && sa_req && sa_valid, "channel not kept for the switch retry");
    check(n_sa_req && n_sa_valid, "non-speculative port: switch after channel");
    check(sa_flit.vc == 1 && sa_flit.la_port == PORT_E && sa_flit.head, "head flit rewrite");
    sa_gnt = 1;
    for (int k = 0; k < 3; k++) begin
      if (k > 0) begin
        @(negedge clk); #1;
        check(sa_req && sa_valid && sa_flit.vc == 1 && sa_flit.data == 8'(8'h31 + k),
              $sformatf("flit %0d of packet: %h", k, sa_flit));
        check(n_sa_flit.data == 8'(8'h31 + k), "non-speculative flit order");
      end
    end
    @(negedge clk); sa_gnt = 0; #1;
    check(!sa_req && !va_req[0] && !n_sa_req, "requests after the tail left");

    // (2) single-flit packet on channel 1: channel and switch in one cycle
    in_valid = 1; in_flit = mk(1, 1, 1, PORT_S, 1, 0, 8'h55);
    @(negedge clk) in_valid = 0;       // edge 1 wrote it
    @(negedge clk);                     // edge 2 routed it
    va_gnt[1] = 1; va_vc[1] = 0; sa_gnt = 1; #1;
    check(sa_req && sa_valid && sa_dest == PORT_S && sa_flit.vc == 0 &&
          sa_flit.la_port == PORT_LOCAL && sa_flit.data == 8'h55, "same-cycle allocation");
    @(negedge clk) begin va_gnt[1] = 0; sa_gnt = 0; end   // edge 3 sent it
    #1;
    check(!sa_req && !va_req[1], "single-flit packet still present");

    // (3) buffer full
    for (int k = 0; k < DEPTH; k++) begin
      check(!in_vc_full[0], "full too early");
      in_valid = 1; in_flit = mk(k == 0, 0, 0, PORT_N, 1, 3, 8'(k));
      @(negedge clk);
    end
    in_valid = 0; #1;
    check(in_vc_full[0] && !in_vc_full[1], "full flag after DEPTH flits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
