// W x H mesh network-on-chip of SPS routers (top level).
//
// Router (x, y) sits at column x and row y; its east port connects to the
// west port of router (x+1, y) and its north port to the south port of
// router (x, y+1). Mesh-edge ports are left unconnected inside: they never
// receive flits and always accept, which XY routing never uses for packets
// with a destination inside the mesh. The local port of every router is
// brought out as a flattened array indexed by node = y*W + x, for a traffic
// source/sink or a processing element to attach to.
//
// Local link, per node, valid/ready handshake (a flit moves when both high):
//   loc_in_*   flits into the network (header, payload..., tail in MSB)
//   loc_out_*  flits delivered at the node
// A packet may be delivered in several pieces when routers split it; each
// piece has its own header whose length field is the number of payload
// flits still to come, and ends with a tail flit. Pieces of one packet
// arrive in order.
// cfg_* is shared by all routers; split_evt pulses per node when any input
// port of that router splits a packet.
//
// The 4x4 default size is the network the design description evaluates; the
// mesh wiring and edge handling are this design's own.
module sps_noc
  import sps_pkg::*;
#(
  parameter int W = 4,
  parameter int H = 4,
  parameter int BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_sps_en,
  input  prio_t cfg_pd,
  input  len_t  cfg_rf,
  input  logic  loc_in_valid  [W*H],
  input  flit_t loc_in_flit   [W*H],
  output logic  loc_in_ready  [W*H],
  output logic  loc_out_valid [W*H],
  output flit_t loc_out_flit  [W*H],
  input  logic  loc_out_ready [W*H],
  output logic  split_evt     [W*H]
);

  // Per-router port bundles.
  logic  r_in_valid  [W*H][NPORTS];
  flit_t r_in_flit   [W*H][NPORTS];
  logic  r_in_ready  [W*H][NPORTS];
  logic  r_out_valid [W*H][NPORTS];
  flit_t r_out_flit  [W*H][NPORTS];
  logic  r_out_ready [W*H][NPORTS];
  logic  r_split     [W*H][NPORTS];

  for (genvar y = 0; y < H; y++) begin : g_y
    for (genvar x = 0; x < W; x++) begin : g_x
      localparam int N = y * W + x;

      sps_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst_n,
        .cfg_sps_en, .cfg_pd, .cfg_rf,
        .in_valid  (r_in_valid[N]),
        .in_flit   (r_in_flit[N]),
        .in_ready  (r_in_ready[N]),
        .out_valid (r_out_valid[N]),
        .out_flit  (r_out_flit[N]),
        .out_ready (r_out_ready[N]),
        .split_evt (r_split[N])
      );

      // East input / east output-ready: from the router to the east.
      if (x < W - 1) begin : g_e
        assign r_in_valid[N][P_EAST]  = r_out_valid[N+1][P_WEST];
        assign r_in_flit[N][P_EAST]   = r_out_flit[N+1][P_WEST];
        assign r_out_ready[N][P_EAST] = r_in_ready[N+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_valid[N][P_EAST]  = 1'b0;
        assign r_in_flit[N][P_EAST]   = '0;
        assign r_out_ready[N][P_EAST] = 1'b1;
      end
      if (x > 0) begin : g_w
        assign r_in_valid[N][P_WEST]  = r_out_valid[N-1][P_EAST];
        assign r_in_flit[N][P_WEST]   = r_out_flit[N-1][P_EAST];
        assign r_out_ready[N][P_WEST] = r_in_ready[N-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_valid[N][P_WEST]  = 1'b0;
        assign r_in_flit[N][P_WEST]   = '0;
        assign r_out_ready[N][P_WEST] = 1'b1;
      end
      if (y < H - 1) begin : g_n
        assign r_in_valid[N][P_NORTH]  = r_out_valid[N+W][P_SOUTH];
        assign r_in_flit[N][P_NORTH]   = r_out_flit[N+W][P_SOUTH];
        assign r_out_ready[N][P_NORTH] = r_in_ready[N+W][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_valid[N][P_NORTH]  = 1'b0;
        assign r_in_flit[N][P_NORTH]   = '0;
        assign r_out_ready[N][P_NORTH] = 1'b1;
      end
      if (y > 0) begin : g_s
        assign r_in_valid[N][P_SOUTH]  = r_out_valid[N-W][P_NORTH];
        assign r_in_flit[N][P_SOUTH]   = r_out_flit[N-W][P_NORTH];
        assign r_out_ready[N][P_SOUTH] = r_in_ready[N-W][P_NORTH];
      end else begin : g_s_edge
        assign r_in_valid[N][P_SOUTH]  = 1'b0;
        assign r_in_flit[N][P_SOUTH]   = '0;
        assign r_out_ready[N][P_SOUTH] = 1'b1;
      end

      assign r_in_valid[N][P_LOCAL]  = loc_in_valid[N];
      assign r_in_flit[N][P_LOCAL]   = loc_in_flit[N];
      assign loc_in_ready[N]         = r_in_ready[N][P_LOCAL];
      assign loc_out_valid[N]        = r_out_valid[N][P_LOCAL];
      assign loc_out_flit[N]         = r_out_flit[N][P_LOCAL];
      assign r_out_ready[N][P_LOCAL] = loc_out_ready[N];

      assign split_evt[N] = r_split[N][P_EAST] | r_split[N][P_WEST] |
                            r_split[N][P_NORTH] | r_split[N][P_SOUTH] |
                            r_split[N][P_LOCAL];
    end
  end

endmodule
