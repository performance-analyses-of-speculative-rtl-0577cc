// tb_crossbar: random requests, destinations, valids and flits on all five
// inputs. A model of one arbiter per output (owner keeps the output while it
// requests it, else the lowest-numbered requester wins) predicts the
// same-cycle input grants and, one cycle later, each output's flit and
// valid (valid only when the winning input marked its flit valid).
module tb_crossbar;
  import noc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit [NUM_PORTS];
  port_e in_dest [NUM_PORTS];
  logic  in_req  [NUM_PORTS];
  logic  in_valid[NUM_PORTS];
  logic  in_gnt  [NUM_PORTS];
  flit_t out_flit[NUM_PORTS];
  logic  out_valid[NUM_PORTS];

  crossbar dut (.*);

  int    owner [NUM_PORTS];
  flit_t e_flit [NUM_PORTS];
  logic  e_valid[NUM_PORTS];
  int    contended = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_flit[i] = '0; in_dest[i] = PORT_LOCAL; in_req[i] = 0; in_valid[i] = 0;
      owner[i] = -1; e_valid[i] = 0; e_flit[i] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // outputs registered at the last edge
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_valid[o] != e_valid[o] || (e_valid[o] && out_flit[o] != e_flit[o])) begin
          failures++;
          $display("ERROR: cycle %0d output %0d valid %0d flit %h, expected %0d %h",
                   c, o, out_valid[o], out_flit[o], e_valid[o], e_flit[o]);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_req[i]   = ($urandom % 100) < 60;
        in_valid[i] = ($urandom % 100) < 80;
        in_dest[i]  = port_e'($urandom % NUM_PORTS);
        in_flit[i]  = flit_t'($urandom);
      end
      // model
      for (int o = 0; o < NUM_PORTS; o++) begin
        int n;
        n = 0;
        for (int i = 0; i < NUM_PORTS; i++) if (in_req[i] && int'(in_dest[i]) == o) n++;
        if (n > 1) contended++;
        if (!(owner[o] >= 0 && in_req[owner[o]] && int'(in_dest[owner[o]]) == o)) begin
          owner[o] = -1;
          for (int i = 0; i < NUM_PORTS; i++)
            if (owner[o] < 0 && in_req[i] && int'(in_dest[i]) == o) owner[o] = i;
        end
        e_valid[o] = (owner[o] >= 0) && in_valid[owner[o]];
        e_flit[o]  = (owner[o] >= 0) ? in_flit[owner[o]] : '0;
      end
      #1;
      for (int i = 0; i < NUM_PORTS; i++) begin
        checks++;
        if (in_gnt[i] != (owner[int'(in_dest[i])] == i)) begin
          failures++;
          $display("ERROR: cycle %0d input %0d grant %0d", c, i, in_gnt[i]);
        end
      end
    end
    checks++;
    if (contended == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
