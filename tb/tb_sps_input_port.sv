// Self-checking testbench of the router input port (sps_input_port).
//
// A source process feeds flits into the port, a stand-in arbiter grants
// its requests and a sink takes the flits it sends, with random back
// pressure in some scenarios. Each scenario compares the sent flit
// sequence with one worked out by hand from the splitting rules:
//   1 plain packet, with the cycle counts from header in to header out
//     (3 cycles) and to the tail (3 + length)
//   2 split: a contender 7 levels more urgent appears after two payload
//     flits (PD 3, RF 2, 6 flits left); the third flit goes out as tail, the port asks
//     again and resumes with a new header of length 5
//   3 PD margin not met: no split
//   4 RF margin not met: no split
//   5 splitting disabled: no split
//   6 packet that an upstream router has already split: two pieces pass
//     through unchanged
//   7 split under random back pressure and random grant delay
// The port sits at (1,1); packets go to (3,2), so they must ask for east.
module tb_sps_input_port;
  import sps_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      cfg_sps_en;
  prio_t     cfg_pd;
  len_t      cfg_rf;
  logic      in_valid;
  flit_t     in_flit;
  logic      in_ready;
  logic      req_valid;
  port_e     req_port;
  prio_t     req_prio;
  logic      grant;
  logic      cont_valid;
  prio_t     cont_prio;
  logic      conn_valid;
  port_e     conn_port;
  logic      tx_valid;
  flit_t     tx_flit;
  logic      tx_ready;
  ip_state_e state_o;
  len_t      flits_left_o;
  logic      split_evt;

  int        checks = 0, failures = 0;
  int        cyc = 0;
  flit_t     src_q[$];
  flit_t     out_q[$];
  int        out_cyc[$];
  int        in_hdr_cyc;
  int        splits;
  bit        rand_bp, rand_grant;
  bit        cont_auto;   // raise the contender after N flits out
  int        cont_after;

  sps_input_port dut (
    .clk, .rst_n,
    .my_x(coord_t'(1)), .my_y(coord_t'(1)),
    .cfg_sps_en, .cfg_pd, .cfg_rf,
    .in_valid, .in_flit, .in_ready,
    .req_valid, .req_port, .req_prio, .grant,
    .cont_valid, .cont_prio,
    .conn_valid, .conn_port,
    .tx_valid, .tx_flit, .tx_ready,
    .state_o, .flits_left_o, .split_evt
  );

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source: drive from src_q, record when the first flit enters.
  always @(negedge clk) begin
    in_valid = (src_q.size() > 0);
    in_flit  = (src_q.size() > 0) ? src_q[0] : '0;
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (in_hdr_cyc < 0)
      in_hdr_cyc = cyc;
    void'(src_q.pop_front());
  end

  // Sink and stand-in arbiter.
  always @(negedge clk) begin
    tx_ready = rand_bp ? ($urandom_range(0, 2) != 0) : 1'b1;
    grant    = req_valid && !cont_valid && (rand_grant ? ($urandom_range(0, 3) == 0) : 1'b1);
    if (cont_auto && out_q.size() >= cont_after && conn_valid) begin
      cont_valid = 1'b1;
    end
    if (cont_valid && !conn_valid && state_o == S_ARB) begin
      // the contender takes the output while the port waits
      cont_auto  = 1'b0;
      cont_valid = 1'b0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      out_q.push_back(tx_flit);
      out_cyc.push_back(cyc);
      checks++;
      if (!conn_valid || conn_port != P_EAST) begin
        failures++;
        $display("FAIL cycle %0d: flit sent without the east connection", cyc);
      end
    end
    if (split_evt) splits++;
    if (req_valid) begin
      checks++;
      if (req_port != P_EAST) begin
        failures++;
        $display("FAIL cycle %0d: requested port %s", cyc, req_port.name());
      end
    end
  end

  function automatic flit_t pay(int n, bit tail);
    return {tail, DATA_W'(16'h100 + n)};
  endfunction

  // Queue a packet: header plus len payload flits numbered from base.
  task automatic send_pkt(prio_t p, int len, int base);
    src_q.push_back(make_header(p, coord_t'(3), coord_t'(2), len_t'(len)));
    for (int i = 0; i < len; i++) src_q.push_back(pay(base + i, i == len - 1));
  endtask

  task automatic wait_done(int n_expected);
    int guard = 0;
    while ((out_q.size() < n_expected || conn_valid || src_q.size() > 0) && guard < 5000) begin
      @(posedge clk);
      guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  task automatic start(string name, bit en, int pd, int rf, bit bp, bit rg);
    @(negedge clk);
    out_q.delete();
    out_cyc.delete();
    in_hdr_cyc = -1;
    splits = 0;
    cfg_sps_en = en;
    cfg_pd = prio_t'(pd);
    cfg_rf = len_t'(rf);
    rand_bp = bp;
    rand_grant = rg;
    $display("scenario: %s", name);
  endtask

  task automatic expect_seq(flit_t exp[$], int exp_splits, string name);
    check(out_q.size() == exp.size(),
          $sformatf("%s: %0d flits sent, %0d expected", name, out_q.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < out_q.size(); i++)
      check(out_q[i] == exp[i],
            $sformatf("%s: flit %0d is %h, expected %h", name, i, out_q[i], exp[i]));
    check(splits == exp_splits,
          $sformatf("%s: %0d splits, %0d expected", name, splits, exp_splits));
  endtask

  initial begin
    flit_t exp[$];
    cfg_sps_en = 1'b1; cfg_pd = '0; cfg_rf = '0;
    cont_valid = 1'b0; cont_prio = '0; cont_auto = 1'b0; cont_after = 0;
    rand_bp = 1'b0; rand_grant = 1'b0;
    in_valid = 1'b0; in_flit = '0; tx_ready = 1'b1; grant = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: plain packet, timing
    start("plain", 1'b1, 0, 1, 1'b0, 1'b0);
    send_pkt(4'd5, 4, 0);
    wait_done(5);
    exp = {make_header(4'd5, 2'd3, 2'd2, 7'd4), pay(0,0), pay(1,0), pay(2,0), pay(3,1)};
    expect_seq(exp, 0, "plain");
    check(out_cyc.size() == 5 && out_cyc[0] - in_hdr_cyc == 3,
          "plain: header out 3 cycles after it came in");
    check(out_cyc.size() == 5 && out_cyc[4] - in_hdr_cyc == 3 + 4,
          "plain: tail out 3+length cycles after the header came in");
    check(state_o == S_ARB_REQ && !conn_valid, "plain: idle and released afterwards");

    // 2: split
    start("split", 1'b1, 3, 2, 1'b0, 1'b0);
    cont_prio = 4'd2; cont_after = 3; cont_auto = 1'b1;
    send_pkt(4'd9, 8, 0);
    wait_done(11);
    exp = {make_header(4'd9, 2'd3, 2'd2, 7'd8), pay(0,0), pay(1,0), pay(2,1),
           make_header(4'd9, 2'd3, 2'd2, 7'd5), pay(3,0), pay(4,0), pay(5,0),
           pay(6,0), pay(7,1)};
    expect_seq(exp, 1, "split");

    // 3: priority difference 7-... = 2 not above PD 3
    start("pd not met", 1'b1, 3, 1, 1'b0, 1'b0);
    cont_prio = 4'd7; cont_after = 2; cont_auto = 1'b1;
    send_pkt(4'd9, 6, 20);
    wait_done(7);
    cont_valid = 1'b0; cont_auto = 1'b0;
    exp = {make_header(4'd9, 2'd3, 2'd2, 7'd6), pay(20,0), pay(21,0), pay(22,0),
           pay(23,0), pay(24,0), pay(25,1)};
    expect_seq(exp, 0, "pd not met");

    // 4: 6 flits, contender after the header and 1 flit: 5 left, RF 6 is
    // not met
    start("rf not met", 1'b1, 0, 6, 1'b0, 1'b0);
    cont_prio = 4'd0; cont_after = 2; cont_auto = 1'b1;
    send_pkt(4'd9, 6, 30);
    wait_done(7);
    cont_valid = 1'b0; cont_auto = 1'b0;
    exp = {make_header(4'd9, 2'd3, 2'd2, 7'd6), pay(30,0), pay(31,0), pay(32,0),
           pay(33,0), pay(34,0), pay(35,1)};
    expect_seq(exp, 0, "rf not met");

    // 5: splitting disabled
    start("disabled", 1'b0, 0, 1, 1'b0, 1'b0);
    cont_prio = 4'd0; cont_after = 2; cont_auto = 1'b1;
    send_pkt(4'd9, 5, 40);
    wait_done(6);
    cont_valid = 1'b0; cont_auto = 1'b0;
    exp = {make_header(4'd9, 2'd3, 2'd2, 7'd5), pay(40,0), pay(41,0), pay(42,0),
           pay(43,0), pay(44,1)};
    expect_seq(exp, 0, "disabled");

    // 6: packet split upstream: header len 6, two flits (second tail), then
    // header len 4 and the rest
    start("split upstream", 1'b1, 0, 1, 1'b0, 1'b0);
    src_q.push_back(make_header(4'd6, 2'd3, 2'd2, 7'd6));
    src_q.push_back(pay(50,0));
    src_q.push_back(pay(51,1));
    src_q.push_back(make_header(4'd6, 2'd3, 2'd2, 7'd4));
    for (int i = 2; i < 6; i++) src_q.push_back(pay(50 + i, i == 5));
    wait_done(8);
    exp = {make_header(4'd6, 2'd3, 2'd2, 7'd6), pay(50,0), pay(51,1),
           make_header(4'd6, 2'd3, 2'd2, 7'd4), pay(52,0), pay(53,0), pay(54,0), pay(55,1)};
    expect_seq(exp, 0, "split upstream");

    // 7: split under random back pressure and grant delay
    start("split with back pressure", 1'b1, 0, 1, 1'b1, 1'b1);
    cont_prio = 4'd1; cont_after = 4; cont_auto = 1'b1;
    send_pkt(4'd2, 7, 60);
    wait_done(9);
    exp = {make_header(4'd2, 2'd3, 2'd2, 7'd7), pay(60,0), pay(61,0), pay(62,0),
           pay(63,1), make_header(4'd2, 2'd3, 2'd2, 7'd3), pay(64,0), pay(65,0), pay(66,1)};
    expect_seq(exp, 1, "split with back pressure");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
