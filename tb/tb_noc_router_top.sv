// tb_noc_router_top: end-to-end test of both routers at their default sizes.
//
// Each router gets its own router_traffic source and scoreboard (random
// multi-flit packets on every port and virtual channel, every delivered flit
// checked for order, route, lookahead route and output-channel integrity).
// The load is high enough that every mechanism of the two routers happens;
// each is counted by watching the routers' internal handshakes, and one that
// never happens counts as a failure:
//   speculative router:  allocation and switch won in the same cycle;
//                        channel won but switch lost (retry the switch);
//                        switch won but no channel (failed speculation);
//                        no free output channel; switch lost to another input
//   non-speculative:     channel allocation; no free output channel;
//                        flit held in a crossbar FIFO after losing the output;
//                        crossbar FIFO full
//   both:                input buffer full towards the sender
module tb_noc_router_top;
  import noc_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              s_in_valid  [NUM_PORTS];
  flit_t             s_in_flit   [NUM_PORTS];
  logic [NUM_VC-1:0] s_in_vc_full[NUM_PORTS];
  logic              s_out_valid [NUM_PORTS];
  flit_t             s_out_flit  [NUM_PORTS];
  logic              n_in_valid  [NUM_PORTS];
  flit_t             n_in_flit   [NUM_PORTS];
  logic [NUM_VC-1:0] n_in_vc_full[NUM_PORTS];
  logic              n_out_valid [NUM_PORTS];
  flit_t             n_out_flit  [NUM_PORTS];

  noc_router_top dut (.*);

  int   s_checks, s_failures, s_delivered, s_full;
  int   n_checks, n_failures, n_delivered, n_full;
  logic s_done, n_done;

  router_traffic #(.PKTS(60), .RATE(70)) u_s_traffic (
    .clk, .rst, .in_valid(s_in_valid), .in_flit(s_in_flit), .in_vc_full(s_in_vc_full),
    .out_valid(s_out_valid), .out_flit(s_out_flit),
    .checks(s_checks), .failures(s_failures), .delivered(s_delivered),
    .full_seen(s_full), .done(s_done)
  );

  router_traffic #(.PKTS(60), .RATE(70)) u_n_traffic (
    .clk, .rst, .in_valid(n_in_valid), .in_flit(n_in_flit), .in_vc_full(n_in_vc_full),
    .out_valid(n_out_valid), .out_flit(n_out_flit),
    .checks(n_checks), .failures(n_failures), .delivered(n_delivered),
    .full_seen(n_full), .done(n_done)
  );

  // ---- probes of internal handshakes
  logic s_spec_ok [NUM_PORTS];   // channel and switch in the same cycle
  logic s_sa_lost [NUM_PORTS];   // switch requested, not granted
  logic s_spec_bad[NUM_PORTS];   // switch granted, no channel
  logic s_va_retry[NUM_PORTS][NUM_VC];  // channel won, switch not
  logic s_va_block[NUM_PORTS][NUM_VC];  // channel requested, none free
  logic n_va_gnt  [NUM_PORTS][NUM_VC];
  logic n_va_block[NUM_PORTS][NUM_VC];
  logic n_cf_hold [NUM_PORTS];
  logic n_cf_full [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_probe
    assign s_spec_ok[p]  = dut.u_spec.g_port[p].u_in.move &&
                           dut.u_spec.g_port[p].u_in.va_gnt[dut.u_spec.g_port[p].u_in.sel];
    assign s_sa_lost[p]  = dut.u_spec.g_port[p].u_in.sa_req && !dut.u_spec.g_port[p].u_in.sa_gnt;
    assign s_spec_bad[p] = dut.u_spec.g_port[p].u_in.sa_req && dut.u_spec.g_port[p].u_in.sa_gnt &&
                           !dut.u_spec.g_port[p].u_in.sa_valid;
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assign s_va_retry[p][v] = dut.u_spec.g_port[p].u_in.va_gnt[v] &&
                                !(dut.u_spec.g_port[p].u_in.move &&
                                  int'(dut.u_spec.g_port[p].u_in.sel) == v);
      assign s_va_block[p][v] = dut.u_spec.g_port[p].u_in.va_req[v] &&
                                !dut.u_spec.g_port[p].u_in.va_gnt[v];
      assign n_va_gnt[p][v]   = dut.u_nonspec.g_port[p].u_in.va_gnt[v];
      assign n_va_block[p][v] = dut.u_nonspec.g_port[p].u_in.va_req[v] &&
                                !dut.u_nonspec.g_port[p].u_in.va_gnt[v];
    end
    assign n_cf_hold[p] = dut.u_nonspec.u_cfx.x_req[p] && !dut.u_nonspec.u_cfx.x_gnt[p];
    assign n_cf_full[p] = dut.u_nonspec.xb_full[p] && dut.u_nonspec.sa_req[p];
  end

  int c_spec_ok, c_sa_lost, c_spec_bad, c_va_retry, c_va_block;
  int c_n_va, c_n_va_block, c_cf_hold, c_cf_full;
  initial begin
    c_spec_ok = 0; c_sa_lost = 0; c_spec_bad = 0; c_va_retry = 0; c_va_block = 0;
    c_n_va = 0; c_n_va_block = 0; c_cf_hold = 0; c_cf_full = 0;
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (s_spec_ok[p])  c_spec_ok++;
        if (s_sa_lost[p])  c_sa_lost++;
        if (s_spec_bad[p]) c_spec_bad++;
        if (n_cf_hold[p])  c_cf_hold++;
        if (n_cf_full[p])  c_cf_full++;
        for (int v = 0; v < NUM_VC; v++) begin
          if (s_va_retry[p][v]) c_va_retry++;
          if (s_va_block[p][v]) c_va_block++;
          if (n_va_gnt[p][v])   c_n_va++;
          if (n_va_block[p][v]) c_n_va_block++;
        end
      end
    end
  end

  task automatic seen(input int count, input string what);
    checks++;
    $display("  %-48s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("ERROR: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (s_done && n_done);
    repeat (5) @(negedge clk);
    checks   += s_checks + n_checks;
    failures += s_failures + n_failures;
    $display("speculative router: %0d flits delivered", s_delivered);
    seen(c_spec_ok,  "channel and switch won in one cycle");
    seen(c_va_retry, "channel won, switch lost, switch retried");
    seen(c_spec_bad, "switch won without a channel (failed speculation)");
    seen(c_va_block, "no free output channel");
    seen(c_sa_lost,  "switch lost to another input");
    seen(s_full,     "input buffer full");
    $display("non-speculative router: %0d flits delivered", n_delivered);
    seen(c_n_va,       "channel allocation");
    seen(c_n_va_block, "no free output channel");
    seen(c_cf_hold,    "flit held in crossbar FIFO");
    seen(c_cf_full,    "crossbar FIFO full");
    seen(n_full,       "input buffer full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
