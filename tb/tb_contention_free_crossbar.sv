// tb_contention_free_crossbar: (1) one flit appears at its output two clock
// edges after it is written; (2) two inputs writing to the same output in
// the same cycle both get through, one cycle apart, nothing lost;
// (3) random traffic that respects in_full: every flit must arrive, once,
// at the output it named, and flits from one input to one output keep their
// order. Flits carry a unique tag in their payload and coordinates.
module tb_contention_free_crossbar;
  import noc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit [NUM_PORTS];
  port_e in_dest [NUM_PORTS];
  logic  in_wr   [NUM_PORTS];
  logic  in_full [NUM_PORTS];
  flit_t out_flit[NUM_PORTS];
  logic  out_valid[NUM_PORTS];

  contention_free_crossbar #(.FIFO_DEPTH(4)) dut (.*);

  flit_t pending [NUM_PORTS][NUM_PORTS][$];   // [input][output]
  int    sent = 0, got = 0, full_seen = 0;
  int    tag = 0;
  bit    random_on = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("ERROR: %s", what); end
  endtask

  function automatic flit_t mk_tag(int t);
    flit_t f = '0;
    f.data = 8'(t);
    f.dst_x = COORD_W'(t >> 8);
    f.dst_y = COORD_W'(t >> 10);
    f.head = 1'b1; f.tail = 1'b1;
    return f;
  endfunction

  // scoreboard: every output flit must be the oldest one from some input
  always @(negedge clk) begin
    if (!rst) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (out_valid[o]) begin
          bit found;
          found = 0;
          for (int i = 0; i < NUM_PORTS; i++)
            if (!found && pending[i][o].size() != 0 && pending[i][o][0] == out_flit[o]) begin
              void'(pending[i][o].pop_front());
              found = 1;
            end
          checks++;
          got++;
          if (!found) begin failures++; $display("ERROR: output %0d flit %h not expected", o, out_flit[o]); end
        end
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int i, port_e d);
    in_wr[i] = 1'b1; in_dest[i] = d; in_flit[i] = mk_tag(tag++);
    pending[i][int'(d)].push_back(in_flit[i]);
    sent++;
  endtask

  initial begin
    int w;
    for (int i = 0; i < NUM_PORTS; i++) begin in_flit[i] = '0; in_dest[i] = PORT_LOCAL; in_wr[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // (1) latency
    put(2, PORT_W);
    @(negedge clk) in_wr[2] = 0;
    w = 1;
    while (!out_valid[PORT_W] && w < 10) begin @(posedge clk); #1; w++; end
    check(w == 2, $sformatf("latency %0d edges, expected 2", w));
    repeat (3) @(negedge clk);
    // (2) two inputs to one output in one cycle
    put(1, PORT_E); put(3, PORT_E);
    @(negedge clk) begin in_wr[1] = 0; in_wr[3] = 0; end
    @(posedge clk); #1;
    check(out_valid[PORT_E] && out_flit[PORT_E].data == 8'(tag - 2), "first of two to East");
    @(posedge clk); #1;
    check(out_valid[PORT_E] && out_flit[PORT_E].data == 8'(tag - 1), "second of two to East");
    repeat (3) @(negedge clk);
    // (3) random traffic, heavy towards output 0 to fill the FIFOs
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_wr[i] = 0;
        if (($urandom % 100) < 60) begin
          if (in_full[i]) full_seen++;
          else put(i, port_e'(($urandom % 2) ? 0 : $urandom % NUM_PORTS));
        end
      end
    end
    @(negedge clk) for (int i = 0; i < NUM_PORTS; i++) in_wr[i] = 0;
    repeat (100) @(negedge clk);
    check(got == sent, $sformatf("sent %0d, delivered %0d", sent, got));
    check(full_seen > 0, "FIFO never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
