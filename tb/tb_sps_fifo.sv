// Self-checking testbench of the input buffer (sps_fifo).
// Random writes and reads are checked against a queue model: every flit
// comes out in order, in_ready drops exactly when DEPTH flits are held,
// and a full buffer accepts again in the cycle after a read.
module tb_sps_fifo;
  import sps_pkg::*;

  localparam int DEPTH = 2;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, out_pop = 1'b0;
  flit_t in_flit = '0;
  logic  in_ready, out_valid;
  flit_t out_flit;
  int    checks = 0, failures = 0;
  flit_t model[$];
  int    cycle = 0;

  sps_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 4000; cycle++) begin
      @(negedge clk);
      // check outputs against the model before this cycle's edge
      check(in_ready == (model.size() < DEPTH), "in_ready");
      check(out_valid == (model.size() > 0), "out_valid");
      if (model.size() > 0) check(out_flit == model[0], "out_flit order");
      in_valid = ($urandom_range(0, 3) != 0);
      in_flit  = flit_t'($urandom);
      out_pop  = (cycle < 3000) ? ($urandom_range(0, 2) == 0) : 1'b1;
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update at the clock edge, from the values driven before it
  always @(posedge clk) if (rst_n) begin
    logic pu, po;
    pu = in_valid && (model.size() < DEPTH);
    po = out_pop && (model.size() > 0);
    if (po) void'(model.pop_front());
    if (pu) model.push_back(in_flit);
  end

endmodule
