// Priority arbitration unit of a router.
//
// Every input port presents its 'port request' and 'priority' registers
// (req_*) and its connection ('out port' register, conn_*). An output port
// is busy while some input port holds a connection to it. Each cycle, for
// every free output port, the arbiter grants the requesting input port with
// the highest priority (lowest priority value); several output ports can be
// granted in the same cycle. Equal priorities are served round-robin, with
// one rotating pointer per output port that moves past the input just
// granted.
//
// For packet splitting the arbiter also reports, per output port, whether
// some input port is waiting for it and the best priority among the waiting
// ones (cont_valid, cont_prio). The input port holding that output compares
// this with its own priority.
//
// Priority arbitration between competing packets follows the design
// description; the round-robin tie-break is this design's own choice.
// grant, cont_valid and cont_prio are combinational from the request and
// connection inputs; only the round-robin pointers are registers.
module sps_arbiter
  import sps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid  [NPORTS],
  input  port_e req_port   [NPORTS],
  input  prio_t req_prio   [NPORTS],
  input  logic  conn_valid [NPORTS],
  input  port_e conn_port  [NPORTS],
  output logic  grant      [NPORTS],
  output logic  cont_valid [NPORTS],
  output prio_t cont_prio  [NPORTS]
);

  logic [PORT_W-1:0] rr_ptr  [NPORTS];
  logic [PORT_W-1:0] best_in [NPORTS];
  logic              busy    [NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      busy[o] = 1'b0;
      for (int i = 0; i < NPORTS; i++)
        if (conn_valid[i] && conn_port[i] == port_e'(o)) busy[o] = 1'b1;
    end
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      cont_valid[o] = 1'b0;
      cont_prio[o]  = '0;
      best_in[o]    = '0;
      for (int k = 0; k < NPORTS; k++) begin
        logic [PORT_W-1:0] idx;
        idx = PORT_W'((int'(rr_ptr[o]) + k) % NPORTS);
        if (req_valid[idx] && req_port[idx] == port_e'(o)) begin
          if (!cont_valid[o] || req_prio[idx] < cont_prio[o]) begin
            cont_valid[o] = 1'b1;
            cont_prio[o]  = req_prio[idx];
            best_in[o]    = idx;
          end
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      grant[i] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        if (cont_valid[o] && !busy[o] && best_in[o] == PORT_W'(i)) grant[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORTS; o++) rr_ptr[o] <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++)
        if (cont_valid[o] && !busy[o])
          rr_ptr[o] <= (best_in[o] == PORT_W'(NPORTS - 1)) ? '0 : best_in[o] + 1'b1;
    end
  end

endmodule
