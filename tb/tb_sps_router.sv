// Self-checking testbench of one SPS router (sps_router) at mesh position
// (1,1).
//
// Part A, directed: a long low-priority packet from the west input heads
// east; a short urgent packet from the north input also heads east a few
// cycles later. With splitting on, the urgent packet must leave before the
// low-priority one has finished, which must arrive as two pieces with the
// second header's length equal to the flits still due. With splitting off
// the urgent packet waits for the whole low-priority packet. The urgent
// packet's header must leave no later than 4 cycles after the split tail.
//
// Part B, random: all five inputs send packets of random length, priority
// and destination while all outputs apply random back pressure. Every
// payload flit names its input port and a sequence number. The testbench
// works out the output port of every packet with its own XY rule and checks
// at each output that flits from each input come in order, that every piece
// starts with a header whose priority and destination belong to the packet
// and whose length is the number of flits still due, and that every piece
// ends with a tail flit. Splits, stalls by back pressure and waiting for a
// busy output are counted and must each occur.
module tb_sps_router;
  import sps_pkg::*;

  localparam int MX = 1, MY = 1;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  cfg_sps_en;
  prio_t cfg_pd;
  len_t  cfg_rf;
  logic  in_valid  [NPORTS];
  flit_t in_flit   [NPORTS];
  logic  in_ready  [NPORTS];
  logic  out_valid [NPORTS];
  flit_t out_flit  [NPORTS];
  logic  out_ready [NPORTS];
  logic  split_evt [NPORTS];

  int    checks = 0, failures = 0;
  int    cyc = 0;

  sps_router #(.X(MX), .Y(MY)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sources ----------------
  flit_t src_q [NPORTS][$];
  always @(negedge clk) begin
    for (int i = 0; i < NPORTS; i++) begin
      in_valid[i] = (src_q[i].size() > 0);
      in_flit[i]  = (src_q[i].size() > 0) ? src_q[i][0] : '0;
    end
  end
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i] && in_ready[i]) void'(src_q[i].pop_front());

  // ---------------- packet records ----------------
  // payload data = {input[2:0], seq[11:0]}
  typedef struct {
    prio_t  prio;
    coord_t dx, dy;
    int     len;
    int     first_seq;
  } pkt_t;
  pkt_t  pkt_of_seq [NPORTS][int];
  int    seq_ctr [NPORTS];
  flit_t exp_q [NPORTS][NPORTS][$];   // [input][output]

  function automatic port_e ref_route(int dx, int dy);
    if (dx != MX) return (dx > MX) ? P_EAST : P_WEST;
    if (dy != MY) return (dy > MY) ? P_NORTH : P_SOUTH;
    return P_LOCAL;
  endfunction

  task automatic queue_pkt(int i, prio_t p, int dx, int dy, int len);
    pkt_t pk;
    port_e o;
    pk.prio = p; pk.dx = coord_t'(dx); pk.dy = coord_t'(dy); pk.len = len;
    pk.first_seq = seq_ctr[i];
    o = ref_route(dx, dy);
    src_q[i].push_back(make_header(p, coord_t'(dx), coord_t'(dy), len_t'(len)));
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = {(k == len - 1), 3'(i), 12'(seq_ctr[i])};
      pkt_of_seq[i][seq_ctr[i]] = pk;
      src_q[i].push_back(f);
      exp_q[i][int'(o)].push_back({1'b0, f[DATA_W-1:0]});
      seq_ctr[i]++;
    end
  endtask

  // ---------------- sinks ----------------
  bit    rand_bp;
  bit    expect_hdr [NPORTS];
  flit_t pend_hdr   [NPORTS];
  bit    first_of_piece [NPORTS];
  int    n_flits_out, n_stall, n_wait, n_split;
  int    log_cyc [NPORTS][$];   // output flit cycles, part A
  flit_t log_flit [NPORTS][$];

  always @(negedge clk)
    for (int o = 0; o < NPORTS; o++)
      out_ready[o] = rand_bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NPORTS; o++) begin
      if (out_valid[o] && !out_ready[o]) n_stall++;
      if (split_evt[o]) n_split++;
      if (out_valid[o] && out_ready[o]) begin
        flit_t f;
        f = out_flit[o];
        n_flits_out++;
        log_cyc[o].push_back(cyc);
        log_flit[o].push_back(f);
        if (expect_hdr[o]) begin
          checks++;
          if (is_tail(f)) begin
            failures++;
            $display("FAIL cycle %0d: output %0d piece starts with a tail flit", cyc, o);
          end
          pend_hdr[o] = f;
          expect_hdr[o] = 1'b0;
          first_of_piece[o] = 1'b1;
        end else begin
          int i, seq;
          i   = int'(f[14:12]);
          seq = int'(f[11:0]);
          checks++;
          if (exp_q[i][o].size() == 0 || exp_q[i][o][0] != {1'b0, f[DATA_W-1:0]}) begin
            failures++;
            $display("FAIL cycle %0d: output %0d got %h from input %0d out of order",
                     cyc, o, f, i);
          end else begin
            void'(exp_q[i][o].pop_front());
          end
          if (first_of_piece[o] && pkt_of_seq[i].exists(seq)) begin
            pkt_t pk;
            header_t h;
            int due;
            pk = pkt_of_seq[i][seq];
            h = header_t'(pend_hdr[o]);
            due = pk.len - (seq - pk.first_seq);
            checks++;
            if (h.prio != pk.prio || h.dst_x != pk.dx || h.dst_y != pk.dy ||
                int'(h.len) != due) begin
              failures++;
              $display("FAIL cycle %0d: output %0d header %h, packet prio %0d len due %0d",
                       cyc, o, pend_hdr[o], pk.prio, due);
            end
          end
          first_of_piece[o] = 1'b0;
          if (is_tail(f)) expect_hdr[o] = 1'b1;
        end
      end
    end
    for (int i = 0; i < NPORTS; i++)
      if (dut.req_valid[i] && !dut.grant[i]) n_wait++;
  end

  task automatic drain(int max_cycles);
    int g = 0;
    bit busy;
    do begin
      @(posedge clk);
      g++;
      busy = 1'b0;
      for (int i = 0; i < NPORTS; i++) begin
        if (src_q[i].size() > 0) busy = 1'b1;
        for (int o = 0; o < NPORTS; o++) if (exp_q[i][o].size() > 0) busy = 1'b1;
      end
    end while (busy && g < max_cycles);
    check(!busy, "all flits delivered");
    repeat (5) @(posedge clk);
  endtask

  task automatic clear_logs();
    for (int o = 0; o < NPORTS; o++) begin
      log_cyc[o].delete();
      log_flit[o].delete();
    end
  endtask

  // Part A helper: returns cycle of urgent header at east, and of the
  // low-priority packet's final tail.
  task automatic part_a(bit en, output int hi_hdr, output int lo_end,
                        output int pieces, output int split_tail);
    int t0;
    clear_logs();
    t0 = cyc;
    cfg_sps_en = en;
    queue_pkt(int'(P_WEST), 4'd12, 3, 1, 20);
    repeat (8) @(posedge clk);
    queue_pkt(int'(P_NORTH), 4'd1, 2, 1, 3);
    drain(2000);
    hi_hdr = -1; lo_end = -1; pieces = 0; split_tail = -1;
    for (int k = 0; k < log_cyc[P_EAST].size(); k++) log_cyc[P_EAST][k] -= t0;
    for (int k = 0; k < log_flit[P_EAST].size(); k++) begin
      flit_t f;
      f = log_flit[P_EAST][k];
      if (f == make_header(4'd1, 2'd2, 2'd1, 7'd3)) hi_hdr = log_cyc[P_EAST][k];
      if (is_tail(f) && f[14:12] == 3'(P_WEST)) begin
        pieces++;
        lo_end = log_cyc[P_EAST][k];
        if (split_tail < 0) split_tail = log_cyc[P_EAST][k];
      end
    end
  endtask

  initial begin
    int hi_on, lo_on, pc_on, st_on, hi_off, lo_off, pc_off, st_off;
    int sp0;
    cfg_sps_en = 1'b1; cfg_pd = '0; cfg_rf = 7'd1;
    rand_bp = 1'b0;
    n_flits_out = 0; n_stall = 0; n_wait = 0; n_split = 0;
    for (int o = 0; o < NPORTS; o++) begin
      expect_hdr[o] = 1'b1; first_of_piece[o] = 1'b0; pend_hdr[o] = '0;
      seq_ctr[o] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- Part A ----
    sp0 = n_split;
    part_a(1'b1, hi_on, lo_on, pc_on, st_on);
    check(n_split - sp0 == 1, $sformatf("A/on: %0d splits, 1 expected", n_split - sp0));
    check(pc_on == 2, $sformatf("A/on: low packet in %0d pieces, 2 expected", pc_on));
    check(hi_on > 0 && hi_on < lo_on, "A/on: urgent packet leaves before the low one ends");
    check(hi_on > st_on && hi_on - st_on <= 4,
          $sformatf("A/on: urgent header %0d cycles after the split tail", hi_on - st_on));
    sp0 = n_split;
    part_a(1'b0, hi_off, lo_off, pc_off, st_off);
    check(n_split == sp0, "A/off: no split");
    check(pc_off == 1, "A/off: low packet in one piece");
    check(hi_off > lo_off, "A/off: urgent packet waits for the low one");
    check(hi_on < hi_off, "A: urgent packet earlier with splitting");
    $display("part A: urgent header at %0d (on) / %0d (off) cycles in its run",
             hi_on, hi_off);

    // ---- Part B ----
    rand_bp = 1'b1;
    for (int r = 0; r < 2; r++) begin
      cfg_sps_en = (r == 0);
      for (int n = 0; n < 300; n++) begin
        int i;
        i = $urandom_range(0, NPORTS - 1);
        if (src_q[i].size() < 40)
          queue_pkt(i, prio_t'($urandom_range(0, 15)), $urandom_range(0, 3),
                    $urandom_range(0, 3), $urandom_range(1, 12));
        if (n % 10 == 9) repeat ($urandom_range(0, 12)) @(posedge clk);
      end
      drain(50000);
    end
    check(n_split > 5, $sformatf("splits happened: %0d", n_split));
    check(n_stall > 0, $sformatf("back-pressure stalls happened: %0d", n_stall));
    check(n_wait > 0, $sformatf("waits for a busy output happened: %0d", n_wait));
    $display("flits out %0d, splits %0d, stalls %0d, waits %0d",
             n_flits_out, n_split, n_stall, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
