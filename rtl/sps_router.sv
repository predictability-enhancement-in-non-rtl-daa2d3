// Five-port wormhole router with selective packet splitting (SPS).
//
// Ports 0..4 are east, west, north, south and local. Each input port has
// its own buffer, XY routing and connection registers (sps_input_port); a
// central priority arbiter (sps_arbiter) hands free output ports to the
// most urgent requester, and a crossbar (sps_crossbar) carries the flits.
// Output ports have no buffers: a flit goes straight onto the link to the
// next router's input buffer. When a more urgent packet waits for an output
// port held by a less urgent one, the holder may end its packet early with
// a tail flit and queue for the port again (see sps_input_port); this gives
// the urgent packet the link almost as if the other one had been preempted,
// without per-priority buffers.
//
// The router's position in the mesh is set by the parameters X and Y.
// The configuration inputs are shared by all input ports:
//   cfg_sps_en  enables splitting (off: plain non-preemptive priority router)
//   cfg_pd      priority difference margin (PD)
//   cfg_rf      remaining flit margin (RF)
// Links use a valid/ready handshake: a flit moves in a cycle where valid and
// ready are both high. ready comes from the receiving buffer's fill level
// only. split_evt pulses for one cycle on an input port that has just sent
// a split tail flit.
//
// The port set, XY routing, wormhole switching, priority in the header and
// the input port registers follow the design description, which bases the
// router on the Hermes NoC router. The handshake, the port numbering and
// the runtime configuration inputs are this design's own choices.
module sps_router
  import sps_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0,
  parameter int BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_sps_en,
  input  prio_t cfg_pd,
  input  len_t  cfg_rf,
  input  logic  in_valid  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  in_ready  [NPORTS],
  output logic  out_valid [NPORTS],
  output flit_t out_flit  [NPORTS],
  input  logic  out_ready [NPORTS],
  output logic  split_evt [NPORTS]
);

  logic      req_valid  [NPORTS];
  port_e     req_port   [NPORTS];
  prio_t     req_prio   [NPORTS];
  logic      grant      [NPORTS];
  logic      cont_valid [NPORTS];
  prio_t     cont_prio  [NPORTS];
  logic      conn_valid [NPORTS];
  port_e     conn_port  [NPORTS];
  logic      tx_valid   [NPORTS];
  flit_t     tx_flit    [NPORTS];
  logic      tx_ready   [NPORTS];
  ip_state_e ip_state   [NPORTS];
  len_t      ip_left    [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    sps_input_port #(.BUF_DEPTH(BUF_DEPTH)) u_ip (
      .clk, .rst_n,
      .my_x        (coord_t'(X)),
      .my_y        (coord_t'(Y)),
      .cfg_sps_en, .cfg_pd, .cfg_rf,
      .in_valid    (in_valid[i]),
      .in_flit     (in_flit[i]),
      .in_ready    (in_ready[i]),
      .req_valid   (req_valid[i]),
      .req_port    (req_port[i]),
      .req_prio    (req_prio[i]),
      .grant       (grant[i]),
      .cont_valid  (cont_valid[conn_port[i]]),
      .cont_prio   (cont_prio[conn_port[i]]),
      .conn_valid  (conn_valid[i]),
      .conn_port   (conn_port[i]),
      .tx_valid    (tx_valid[i]),
      .tx_flit     (tx_flit[i]),
      .tx_ready    (tx_ready[i]),
      .state_o     (ip_state[i]),
      .flits_left_o(ip_left[i]),
      .split_evt   (split_evt[i])
    );
  end

  sps_arbiter u_arb (
    .clk, .rst_n,
    .req_valid, .req_port, .req_prio,
    .conn_valid, .conn_port,
    .grant, .cont_valid, .cont_prio
  );

  sps_crossbar u_xbar (
    .conn_valid, .conn_port,
    .tx_valid, .tx_flit, .tx_ready,
    .out_valid, .out_flit, .out_ready
  );

  // An input port holds a connection exactly in the transfer, close and
  // split states.
  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      a_conn_state: assert (!rst_n || conn_valid[i] ==
                            (ip_state[i] inside {S_DATA, S_CLOSE, S_SPLIT}))
        else $error("input port %0d: connection register out of step", i);
  end

  // While transferring, at least one payload flit is always still due.
  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      a_flits_due: assert (!rst_n || ip_state[i] != S_DATA || ip_left[i] != '0)
        else $error("input port %0d: transfer with no flits left", i);
  end

  // Only one input port may hold a given output port.
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < NPORTS; i++)
        if (conn_valid[i] && conn_port[i] == port_e'(o)) n++;
      a_one_owner: assert (!rst_n || n <= 1)
        else $error("output port %0d held by %0d input ports", o, n);
    end
  end

endmodule
