// Self-checking testbench of the crossbar (sps_crossbar).
// Random one-to-one input/output assignments are applied; each output must
// carry its owner's valid and flit (or be idle) and each input must see the
// ready of the output it holds (or low without a connection).
module tb_sps_crossbar;
  import sps_pkg::*;

  logic  conn_valid [NPORTS];
  port_e conn_port  [NPORTS];
  logic  tx_valid   [NPORTS];
  flit_t tx_flit    [NPORTS];
  logic  tx_ready   [NPORTS];
  logic  out_valid  [NPORTS];
  flit_t out_flit   [NPORTS];
  logic  out_ready  [NPORTS];
  int    checks = 0, failures = 0;

  sps_crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [NPORTS];
      int owner [NPORTS];
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      for (int o = 0; o < NPORTS; o++) owner[o] = -1;
      for (int i = 0; i < NPORTS; i++) begin
        conn_valid[i] = ($urandom_range(0, 3) != 0);
        conn_port[i]  = port_e'(perm[i]);
        tx_valid[i]   = $urandom_range(0, 1);
        tx_flit[i]    = flit_t'($urandom);
        out_ready[i]  = $urandom_range(0, 1);
        if (conn_valid[i]) owner[perm[i]] = i;
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (owner[o] < 0) begin
          if (out_valid[o] !== 1'b0) begin
            failures++; $display("FAIL idle output %0d valid", o);
          end
        end else if (out_valid[o] !== tx_valid[owner[o]] ||
                     (tx_valid[owner[o]] && out_flit[o] !== tx_flit[owner[o]])) begin
          failures++; $display("FAIL output %0d from input %0d", o, owner[o]);
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        checks++;
        if (tx_ready[i] !== (conn_valid[i] && out_ready[perm[i]])) begin
          failures++; $display("FAIL ready of input %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
