// End-to-end testbench of the 4x4 SPS mesh (sps_noc) at its default size.
//
// Every node runs one periodic traffic flow, as in the evaluation the
// design was made for: a start time, a period, a packet length, a priority
// (the 16 flows have the 16 priority levels, 0 most urgent) and a fixed
// destination. Every payload flit names its source node and a sequence
// number. At every local output the testbench checks that the flits of each
// source come in order, that each piece of a packet starts with a header of
// the packet's priority and destination whose length is the number of flits
// still due, and that each piece ends with a tail flit. The reference
// delivery order and the headers are worked out by the testbench from the
// packets it sent, not from the network.
//
// The same traffic is run five times:
//   on      splitting on, PD 0, RF 1
//   off     splitting off: plain non-preemptive priority network, no split
//   pd15    PD 15: no priority difference exceeds it, so no split
//   rf127   RF 127: no packet is long enough, so no split
//   bp      splitting on with random back pressure at the local outputs
// The testbench counts splits, back-pressure stalls at the local outputs,
// cycles an input port waits for a busy output port, multi-piece packets,
// and requires each of these to happen. It also requires the mean latency
// of the four most urgent flows to be lower with splitting than without,
// and prints per-priority latency.
//
// Offered load is reported with an estimate of the average link load:
// sum over flows of (packet flits x hops / period) divided by the number of
// mesh links.
module tb_sps_noc;
  import sps_pkg::*;

  localparam int W = 4, H = 4, NN = W * H;
  localparam int PKTS_PER_FLOW = 24;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cfg_sps_en;
  prio_t cfg_pd;
  len_t  cfg_rf;
  logic  loc_in_valid  [NN];
  flit_t loc_in_flit   [NN];
  logic  loc_in_ready  [NN];
  logic  loc_out_valid [NN];
  flit_t loc_out_flit  [NN];
  logic  loc_out_ready [NN];
  logic  split_evt     [NN];

  int    checks = 0, failures = 0;
  int    cyc = 0;

  sps_noc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // Stop early once the network is clearly broken: many failures, or
  // flits still due but nothing delivered for 5000 cycles.
  int last_delivery = 0;
  int flits_due = 0;
  always @(posedge clk) begin
    if (failures > 50 || (cyc - last_delivery > 5000 && flits_due > 0)) begin
      if (failures <= 50) begin
        failures++;
        $display("FAIL cycle %0d: no flit delivered for 5000 cycles", cyc);
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- flows ----------------
  typedef struct {
    int     dst;
    prio_t  prio;
    int     len;
    int     period;
    int     start;
  } flow_t;
  flow_t flows [NN];

  typedef struct {
    int     src;
    prio_t  prio;
    int     len;
    int     first_seq;
    int     t_gen;
  } pkt_t;
  pkt_t  pkt_of_seq [NN][int];
  int    seq_ctr [NN];
  flit_t src_q [NN][$];
  flit_t exp_q [NN][NN][$];   // [src][dst]
  int    exp_seq [NN][NN][$]; // full sequence number of each expected flit

  always @(negedge clk)
    for (int n = 0; n < NN; n++) begin
      loc_in_valid[n] = (src_q[n].size() > 0);
      loc_in_flit[n]  = (src_q[n].size() > 0) ? src_q[n][0] : '0;
    end
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NN; n++)
      if (loc_in_valid[n] && loc_in_ready[n]) void'(src_q[n].pop_front());

  task automatic gen_pkt(int n);
    pkt_t pk;
    flow_t fl;
    fl = flows[n];
    pk.src = n; pk.prio = fl.prio; pk.len = fl.len;
    pk.first_seq = seq_ctr[n]; pk.t_gen = cyc;
    src_q[n].push_back(make_header(fl.prio, coord_t'(fl.dst % W), coord_t'(fl.dst / W),
                                   len_t'(fl.len)));
    for (int k = 0; k < fl.len; k++) begin
      flit_t f;
      int s;
      s = seq_ctr[n] % 2048;
      f = {(k == fl.len - 1), 4'(n), 11'(s)};
      pkt_of_seq[n][seq_ctr[n]] = pk;
      src_q[n].push_back(f);
      exp_q[n][fl.dst].push_back({1'b0, f[DATA_W-1:0]});
      exp_seq[n][fl.dst].push_back(seq_ctr[n]);
      seq_ctr[n]++;
      flits_due++;
    end
  endtask

  // ---------------- sinks ----------------
  bit    rand_bp;
  bit    expect_hdr [NN];
  flit_t pend_hdr   [NN];
  bit    first_of_piece [NN];
  int    n_split, n_stall, n_wait, n_multi, n_pkts_done;
  real   lat_sum [16];
  int    lat_n   [16];
  int    lat_max [16];
  int    pieces_of [NN][int];   // pieces seen per packet (key first_seq)

  always @(negedge clk)
    for (int n = 0; n < NN; n++)
      loc_out_ready[n] = rand_bp ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (split_evt[n]) n_split++;
      if (loc_out_valid[n] && !loc_out_ready[n]) n_stall++;
      if (loc_out_valid[n] && loc_out_ready[n]) begin
        flit_t f;
        f = loc_out_flit[n];
        last_delivery = cyc;
        if (expect_hdr[n]) begin
          header_t h;
          h = header_t'(f);
          checks++;
          if (is_tail(f) || int'(h.dst_x) != n % W || int'(h.dst_y) != n / W) begin
            failures++;
            $display("FAIL cycle %0d: node %0d bad header %h", cyc, n, f);
          end
          pend_hdr[n] = f;
          expect_hdr[n] = 1'b0;
          first_of_piece[n] = 1'b1;
        end else begin
          int s, src;
          pkt_t pk;
          src = int'(f[14:11]);
          s   = -1;
          checks++;
          if (exp_q[src][n].size() == 0 || exp_q[src][n][0] != {1'b0, f[DATA_W-1:0]}) begin
            failures++;
            $display("FAIL cycle %0d: node %0d got %h out of order", cyc, n, f);
          end else begin
            void'(exp_q[src][n].pop_front());
            s = exp_seq[src][n].pop_front();
            flits_due--;
          end
          if (s >= 0) pk = pkt_of_seq[src][s];
          if (s >= 0 && first_of_piece[n]) begin
            header_t h;
            int due;
            h = header_t'(pend_hdr[n]);
            due = pk.len - (s - pk.first_seq);
            checks++;
            if (h.prio != pk.prio || int'(h.len) != due) begin
              failures++;
              $display("FAIL cycle %0d: node %0d header %h, packet prio %0d due %0d",
                       cyc, n, pend_hdr[n], pk.prio, due);
            end
            if (pieces_of[src].exists(pk.first_seq)) pieces_of[src][pk.first_seq]++;
            else pieces_of[src][pk.first_seq] = 1;
          end
          first_of_piece[n] = 1'b0;
          if (is_tail(f)) expect_hdr[n] = 1'b1;
          if (s >= 0 && is_tail(f)) begin
            if (s + 1 == pk.first_seq + pk.len) begin
              int l;
              l = cyc - pk.t_gen;
              lat_sum[pk.prio] += l;
              lat_n[pk.prio]++;
              if (l > lat_max[pk.prio]) lat_max[pk.prio] = l;
              if (pieces_of[src][pk.first_seq] > 1) n_multi++;
              pieces_of[src].delete(pk.first_seq);
              pkt_of_seq[src].delete(s);
              n_pkts_done++;
            end
          end
        end
      end
    end
    for (int n = 0; n < NN; n++) n_wait += node_wait[n];
  end

  // input ports of each router that request a busy output this cycle
  int node_wait [NN];
  for (genvar y = 0; y < H; y++) begin : g_wy
    for (genvar x = 0; x < W; x++) begin : g_wx
      always_comb begin
        node_wait[y * W + x] = 0;
        for (int i = 0; i < NPORTS; i++)
          if (dut.g_y[y].g_x[x].u_router.req_valid[i] &&
              !dut.g_y[y].g_x[x].u_router.grant[i]) node_wait[y * W + x]++;
      end
    end
  end

  // ---------------- one run ----------------
  task automatic run(string name, bit en, int pd, int rf, bit bp,
                     output int splits, output real urgent_mean);
    int t0, g, sp0, pk0, mu0, st0, wt0;
    bit busy;
    int gen_end;
    cfg_sps_en = en; cfg_pd = prio_t'(pd); cfg_rf = len_t'(rf); rand_bp = bp;
    for (int p = 0; p < 16; p++) begin lat_sum[p] = 0; lat_n[p] = 0; lat_max[p] = 0; end
    sp0 = n_split; pk0 = n_pkts_done; mu0 = n_multi; st0 = n_stall; wt0 = n_wait;
    t0 = cyc;
    last_delivery = cyc;
    gen_end = 0;
    for (int n = 0; n < NN; n++)
      if (flows[n].start + flows[n].period * PKTS_PER_FLOW > gen_end)
        gen_end = flows[n].start + flows[n].period * PKTS_PER_FLOW;
    g = 0;
    @(negedge clk);
    t0 = cyc;
    do begin
      for (int n = 0; n < NN; n++) begin
        int t;
        t = cyc - t0 - flows[n].start;
        if (t >= 0 && t % flows[n].period == 0 && t / flows[n].period < PKTS_PER_FLOW)
          gen_pkt(n);
      end
      busy = (cyc - t0) < gen_end;
      if (flits_due > 0) busy = 1'b1;
      g++;
      @(negedge clk);
    end while (busy && g < 300000);
    repeat (10) @(posedge clk);
    check(n_pkts_done - pk0 == NN * PKTS_PER_FLOW,
          $sformatf("%s: %0d packets delivered, %0d sent", name, n_pkts_done - pk0,
                    NN * PKTS_PER_FLOW));
    splits = n_split - sp0;
    urgent_mean = 0;
    for (int p = 0; p < 4; p++) urgent_mean += lat_sum[p] / ((lat_n[p] > 0) ? lat_n[p] : 1);
    urgent_mean /= 4.0;
    $display("run %-6s: %0d cycles, splits %0d, split packets %0d, stalls %0d, waits %0d, mean latency prio 0-3 %0.1f",
             name, cyc - t0, splits, n_multi - mu0, n_stall - st0, n_wait - wt0, urgent_mean);
    $write("   latency mean/max per priority:");
    for (int p = 0; p < 16; p++)
      $write(" %0d:%0.0f/%0d", p, lat_sum[p] / ((lat_n[p] > 0) ? lat_n[p] : 1), lat_max[p]);
    $write("\n");
  endtask

  function automatic int hops(int s, int d);
    int dx, dy;
    dx = (s % W) - (d % W);
    dy = (s / W) - (d / W);
    return ((dx < 0) ? -dx : dx) + ((dy < 0) ? -dy : dy);
  endfunction

  initial begin
    int sp_on, sp_off, sp_pd, sp_rf, sp_bp;
    real u_on, u_off, u_x, v;
    int perm [16];
    cfg_sps_en = 1'b1; cfg_pd = '0; cfg_rf = 7'd1; rand_bp = 1'b0;
    n_split = 0; n_stall = 0; n_wait = 0; n_multi = 0; n_pkts_done = 0;
    for (int n = 0; n < NN; n++) begin
      expect_hdr[n] = 1'b1; first_of_piece[n] = 1'b0; pend_hdr[n] = '0; seq_ctr[n] = 0;
      loc_in_valid[n] = 1'b0; loc_in_flit[n] = '0; loc_out_ready[n] = 1'b1;
    end
    // flows: unique priorities, random destinations, lengths and periods
    for (int p = 0; p < 16; p++) perm[p] = p;
    perm.shuffle();
    v = 0;
    for (int n = 0; n < NN; n++) begin
      int d;
      do d = $urandom_range(0, NN - 1); while (d == n);
      flows[n].dst    = d;
      flows[n].prio   = prio_t'(perm[n]);
      flows[n].len    = $urandom_range(8, 32);
      flows[n].period = $urandom_range(60, 120);
      flows[n].start  = $urandom_range(0, 50);
      v += real'((flows[n].len + 1) * hops(n, d)) / flows[n].period;
    end
    v /= real'(2 * (W - 1) * H + 2 * W * (H - 1));
    $display("estimated average link load V = %0.2f", v);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run("on",    1'b1, 0, 1,   1'b0, sp_on,  u_on);
    run("off",   1'b0, 0, 1,   1'b0, sp_off, u_off);
    run("pd15",  1'b1, 15, 1,  1'b0, sp_pd,  u_x);
    run("rf127", 1'b1, 0, 127, 1'b0, sp_rf,  u_x);
    run("bp",    1'b1, 0, 1,   1'b1, sp_bp,  u_x);

    check(sp_on > 0, "splits happen with splitting on");
    check(sp_bp > 0, "splits happen under back pressure");
    check(sp_off == 0, "no split with splitting off");
    check(sp_pd == 0, "no split when PD is never exceeded");
    check(sp_rf == 0, "no split when RF is never met");
    check(n_multi > 0, "packets arrive in several pieces");
    check(n_stall > 0, "back-pressure stalls happen");
    check(n_wait > 0, "input ports wait for busy output ports");
    check(u_on < u_off, $sformatf("urgent flows faster with splitting (%0.1f vs %0.1f)",
                                  u_on, u_off));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
