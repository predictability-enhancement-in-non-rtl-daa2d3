// Crossbar switch of a router.
//
// Each input port that holds a connection (conn_valid, conn_port) drives
// the output link it is connected to; the arbiter makes sure no two input
// ports hold the same output port. The downstream ready signal of an output
// link is routed back to the input port that owns it. An output port with
// no connection drives out_valid low. Purely combinational.
// The design description names the connection between input and allocated
// output port; the multiplexer structure is this design's own.
module sps_crossbar
  import sps_pkg::*;
(
  input  logic  conn_valid [NPORTS],
  input  port_e conn_port  [NPORTS],
  input  logic  tx_valid   [NPORTS],
  input  flit_t tx_flit    [NPORTS],
  output logic  tx_ready   [NPORTS],
  output logic  out_valid  [NPORTS],
  output flit_t out_flit   [NPORTS],
  input  logic  out_ready  [NPORTS]
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      out_valid[o] = 1'b0;
      out_flit[o]  = '0;
      for (int i = 0; i < NPORTS; i++) begin
        if (conn_valid[i] && conn_port[i] == port_e'(o)) begin
          out_valid[o] = tx_valid[i];
          out_flit[o]  = tx_flit[i];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++)
      tx_ready[i] = conn_valid[i] && out_ready[conn_port[i]];
  end

endmodule
