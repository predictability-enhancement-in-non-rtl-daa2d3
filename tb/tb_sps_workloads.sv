// Workload testbench of the 4x4 SPS mesh (sps_noc at its default size):
// the traffic experiments the design was evaluated with, each run once with
// splitting on and once with it off, on the same flows.
//
//   random1..3   three random flow mappings at average link load V = 0.8
//   payload      one mapping at V = 0.7, 0.9, 1.3 reached by longer packets
//   header       the same mapping at V = 0.7, 0.9, 1.3 reached by shorter
//                periods (more headers)
//   rf           16-flit packets, V = 0.8, RF = 1, 12 (3/4), 8 (1/2), off
//   pd           the same flows, PD = 0, 2, 4, off
//
// Each node runs one periodic flow with its own priority (0..15, each level
// once), destination, packet length, period and start time. Flows are drawn
// from a fixed linear congruential sequence, so every run is repeatable.
// Load is set with V = sum over flows of (C / P) / L, where C is a flow's
// no-load latency (measured here by sending one packet of that flow alone),
// P its period and L the 48 one-way links between routers of the mesh.
// Packet lengths, periods and the number of packets per flow are this
// testbench's own choices.
//
// Every run is checked flit by flit as in the end-to-end testbench (order
// per source, header priority/destination/length of every piece, tail
// flits, all packets delivered). Splits must happen with splitting on and
// never with it off, and over the three random mappings the four most
// urgent flows must be faster on average with splitting than without.
// Per-priority mean and maximum latency are printed for every run.
module tb_sps_workloads;
  import sps_pkg::*;

  localparam int W = 4, H = 4, NN = W * H;
  localparam int PKTS_PER_FLOW = 64;
  localparam int NLINKS = 2 * (W - 1) * H + 2 * W * (H - 1);

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
    repeat (6000000) @(posedge clk);
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


  // ---------------- flow setup ----------------
  int unsigned lcg;
  function automatic int rnd(int lo, int hi);
    lcg = lcg * 32'd1103515245 + 32'd12345;
    return lo + int'((lcg >> 8) % (hi - lo + 1));
  endfunction

  int base_len [NN];
  int base_per [NN];
  int noload   [NN];

  task automatic make_flows(int seed, int fixed_len);
    int perm [16];
    lcg = seed;
    for (int p = 0; p < 16; p++) perm[p] = p;
    for (int p = 15; p > 0; p--) begin
      int j, t;
      j = rnd(0, p);
      t = perm[p]; perm[p] = perm[j]; perm[j] = t;
    end
    for (int n = 0; n < NN; n++) begin
      int d;
      do d = rnd(0, NN - 1); while (d == n);
      flows[n].dst    = d;
      flows[n].prio   = prio_t'(perm[n]);
      flows[n].len    = (fixed_len > 0) ? fixed_len : rnd(8, 32);
      flows[n].period = rnd(100, 200);
      flows[n].start  = rnd(0, 50);
      base_len[n] = flows[n].len;
      base_per[n] = flows[n].period;
    end
  endtask

  // No-load latency of every flow: one packet alone in the network.
  task automatic measure_noload();
    cfg_sps_en = 1'b0; rand_bp = 1'b0;
    for (int n = 0; n < NN; n++) begin
      int t0;
      repeat (5) @(negedge clk);
      t0 = cyc;
      gen_pkt(n);
      while (flits_due > 0) @(negedge clk);
      noload[n] = cyc - t0;
      n_pkts_done--;
    end
  endtask

  function automatic real load_v();
    real v = 0;
    for (int n = 0; n < NN; n++)
      v += real'(noload[n] - base_len[n] + flows[n].len) / flows[n].period;
    return v / NLINKS;
  endfunction

  // Scale periods (more headers) to reach load v.
  task automatic set_load_by_period(real v);
    real v0, f;
    for (int n = 0; n < NN; n++) begin
      flows[n].len = base_len[n];
      flows[n].period = base_per[n];
    end
    v0 = load_v();
    f = v0 / v;
    for (int n = 0; n < NN; n++) begin
      flows[n].period = int'(base_per[n] * f);
      if (flows[n].period < 1) flows[n].period = 1;
    end
  endtask

  // Scale packet lengths (more payload) to reach load v; periods fixed.
  task automatic set_load_by_length(real v);
    real a, b, f;
    a = 0; b = 0;
    for (int n = 0; n < NN; n++) begin
      flows[n].period = base_per[n];
      a += real'(noload[n] - base_len[n]) / base_per[n];
      b += real'(base_len[n]) / base_per[n];
    end
    f = (v * NLINKS - a) / b;
    for (int n = 0; n < NN; n++) begin
      flows[n].len = int'(base_len[n] * f);
      if (flows[n].len < 2) flows[n].len = 2;
      if (flows[n].len > 127) flows[n].len = 127;
    end
  endtask

  int n_runs_on, n_runs_split;
  task automatic pair(string name, int pd, int rf, output real u_on, output real u_off);
    int sp_on, sp_off;
    $display("== %s: V = %0.2f", name, load_v());
    run({name, "/on"}, 1'b1, pd, rf, 1'b0, sp_on, u_on);
    run({name, "/off"}, 1'b0, pd, rf, 1'b0, sp_off, u_off);
    n_runs_on++;
    if (sp_on > 0) n_runs_split++;
    check(sp_off == 0, {name, ": no split with splitting off"});
  endtask

  initial begin
    real u_on, u_off, sum_on, sum_off, dummy;
    int sp;
    cfg_sps_en = 1'b1; cfg_pd = '0; cfg_rf = 7'd1; rand_bp = 1'b0;
    n_split = 0; n_stall = 0; n_wait = 0; n_multi = 0; n_pkts_done = 0;
    n_runs_on = 0; n_runs_split = 0;
    for (int n = 0; n < NN; n++) begin
      expect_hdr[n] = 1'b1; first_of_piece[n] = 1'b0; pend_hdr[n] = '0; seq_ctr[n] = 0;
      loc_in_valid[n] = 1'b0; loc_in_flit[n] = '0; loc_out_ready[n] = 1'b1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // random traffic, three mappings, V = 0.8
    sum_on = 0; sum_off = 0;
    for (int m = 0; m < 3; m++) begin
      make_flows(1000 + 77 * m, 0);
      measure_noload();
      set_load_by_period(0.8);
      pair($sformatf("random%0d", m + 1), 0, 1, u_on, u_off);
      sum_on += u_on; sum_off += u_off;
    end
    check(sum_on < sum_off, $sformatf("random: urgent flows faster with splitting (%0.1f vs %0.1f)",
                                      sum_on / 3, sum_off / 3));

    // load through payload length and through header count
    make_flows(4242, 0);
    measure_noload();
    set_load_by_period(0.6);
    for (int n = 0; n < NN; n++) base_per[n] = flows[n].period;
    set_load_by_length(0.7); pair("payload V0.7", 0, 1, u_on, u_off);
    set_load_by_length(0.9); pair("payload V0.9", 0, 1, u_on, u_off);
    set_load_by_length(1.3); pair("payload V1.3", 0, 1, u_on, u_off);
    set_load_by_period(0.7); pair("header V0.7", 0, 1, u_on, u_off);
    set_load_by_period(0.9); pair("header V0.9", 0, 1, u_on, u_off);
    set_load_by_period(1.3); pair("header V1.3", 0, 1, u_on, u_off);

    // RF and PD sweeps on 16-flit packets
    make_flows(777, 16);
    measure_noload();
    set_load_by_period(0.8);
    $display("== rf/pd sweeps: V = %0.2f", load_v());
    run("rf 1",  1'b1, 0, 1,  1'b0, sp, dummy);  check(sp > 0, "rf 1: splits");
    run("rf 12", 1'b1, 0, 12, 1'b0, sp, dummy);
    run("rf 8",  1'b1, 0, 8,  1'b0, sp, dummy);
    run("pd 0",  1'b1, 0, 1,  1'b0, sp, dummy);  check(sp > 0, "pd 0: splits");
    run("pd 2",  1'b1, 2, 1,  1'b0, sp, dummy);
    run("pd 4",  1'b1, 4, 1,  1'b0, sp, dummy);
    run("off",   1'b0, 0, 1,  1'b0, sp, dummy);  check(sp == 0, "off: no split");

    check(n_runs_split == n_runs_on,
          $sformatf("splits in %0d of %0d runs with splitting on", n_runs_split, n_runs_on));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
