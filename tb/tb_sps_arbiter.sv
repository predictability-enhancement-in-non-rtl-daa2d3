// Self-checking testbench of the priority arbiter (sps_arbiter).
// Random requests and connections are applied each cycle. A reference model
// in the testbench keeps its own round-robin pointers and works out, per
// output port, the most urgent waiting requester (ties: first in rotation
// order), whether it is granted (only if no input holds that output), and
// the contender report. A directed sequence checks that among equal
// priorities the grants rotate.
module tb_sps_arbiter;
  import sps_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  req_valid  [NPORTS];
  port_e req_port   [NPORTS];
  prio_t req_prio   [NPORTS];
  logic  conn_valid [NPORTS];
  port_e conn_port  [NPORTS];
  logic  grant      [NPORTS];
  logic  cont_valid [NPORTS];
  prio_t cont_prio  [NPORTS];
  int    checks = 0, failures = 0;
  int    rr [NPORTS];

  sps_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: returns winner input of output o, -1 if none.
  function automatic int ref_best(int o, output int bp);
    int best = -1;
    bp = 0;
    for (int k = 0; k < NPORTS; k++) begin
      int i = (rr[o] + k) % NPORTS;
      if (req_valid[i] && int'(req_port[i]) == o)
        if (best < 0 || int'(req_prio[i]) < bp) begin
          best = i;
          bp = int'(req_prio[i]);
        end
    end
    return best;
  endfunction

  task automatic check_outputs();
    logic exp_grant [NPORTS];
    for (int i = 0; i < NPORTS; i++) exp_grant[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      int bp, b;
      logic busy;
      b = ref_best(o, bp);
      busy = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (conn_valid[i] && int'(conn_port[i]) == o) busy = 1'b1;
      checks++;
      if (cont_valid[o] !== (b >= 0) || (b >= 0 && int'(cont_prio[o]) != bp)) begin
        failures++;
        $display("FAIL contender of output %0d: got %0d/%0d want %0d/%0d",
                 o, cont_valid[o], cont_prio[o], b >= 0, bp);
      end
      if (b >= 0 && !busy) exp_grant[b] = 1'b1;
    end
    for (int i = 0; i < NPORTS; i++) begin
      checks++;
      if (grant[i] !== exp_grant[i]) begin
        failures++;
        $display("FAIL grant of input %0d: got %0d want %0d", i, grant[i], exp_grant[i]);
      end
    end
  endtask

  task automatic ref_update();
    for (int o = 0; o < NPORTS; o++) begin
      int bp, b;
      logic busy;
      b = ref_best(o, bp);
      busy = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (conn_valid[i] && int'(conn_port[i]) == o) busy = 1'b1;
      if (b >= 0 && !busy) rr[o] = (b + 1) % NPORTS;
    end
  endtask

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      req_valid[i] = 1'b0; req_port[i] = P_EAST; req_prio[i] = '0;
      conn_valid[i] = 1'b0; conn_port[i] = P_EAST; rr[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Directed: all five inputs want the local port with equal priority;
    // grants must rotate 0,1,2,3,4,0.
    for (int t = 0; t < 6; t++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        req_valid[i] = 1'b1; req_port[i] = P_LOCAL; req_prio[i] = 4'd3;
      end
      #1;
      checks++;
      if (grant[t % NPORTS] !== 1'b1) begin
        failures++;
        $display("FAIL rotation step %0d", t);
      end
      check_outputs();
      @(posedge clk);
      ref_update();
    end
    // Directed: urgent request wins over earlier-in-rotation ones.
    @(negedge clk);
    req_prio[3] = 4'd0;
    #1;
    checks++;
    if (grant[3] !== 1'b1) begin failures++; $display("FAIL urgent request not granted"); end
    @(posedge clk);
    ref_update();
    // Random.
    for (int t = 0; t < 5000; t++) begin
      int perm [NPORTS];
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < NPORTS; i++) begin
        req_valid[i]  = $urandom_range(0, 1);
        req_port[i]   = port_e'($urandom_range(0, NPORTS - 1));
        req_prio[i]   = prio_t'($urandom_range(0, 3));
        conn_valid[i] = !req_valid[i] && ($urandom_range(0, 2) == 0);
        conn_port[i]  = port_e'(perm[i]);
      end
      #1;
      check_outputs();
      @(posedge clk);
      ref_update();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
