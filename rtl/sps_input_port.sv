// Router input port with selective packet splitting.
//
// The port buffers incoming flits (sps_fifo), decodes a header at the head
// of the buffer with XY routing into its 'port request' and 'priority'
// registers, requests the output port from the arbiter, and after the grant
// sends the packet through the crossbar while counting the payload flits
// still to send in 'flits left'. The 'out port' register (conn_valid,
// conn_port) holds the connection; clearing it releases the output port.
//
// The five states follow the port operation of the design description:
//   S_ARB_REQ  wait for a header, load port request, priority, flits left
//   S_ARB      request the output port until the arbiter grants it
//   S_DATA     send the header, then payload flits
//   S_CLOSE    last flit sent: release the output port
//   S_SPLIT    send one payload flit marked as tail, release the output
//              port and request it again for the rest of the packet
// While in S_DATA the port watches the best contender the arbiter reports
// for its output port. It goes to S_SPLIT when splitting is enabled and
//   * the contender's priority is higher than its own by more than cfg_pd
//     (priority values: 0 is the most urgent), and
//   * at least cfg_rf payload flits are left to send (and at least two, so
//     that something remains after the tail flit).
// After a split, the port sends a freshly built header (same priority and
// destination, length = flits left) when it wins the output port again.
// A flit that arrives already marked as tail (an upstream router split the
// packet, or it is the real end) always ends the connection; the next
// header then comes from the buffer.
//
// The split conditions, the tail marker, the rebuilt header and the five
// states are the described design. The exact comparisons (strictly more
// than cfg_pd; at least cfg_rf and at least two flits left), the one-flit
// header, the idle link cycle spent entering S_SPLIT
// and the one-cycle S_CLOSE are this design's own choices.
//
// Timing: header in buffer at cycle t is decoded at t, requested from t+1,
// granted combinationally, header flit sent from t+2 at the earliest; one
// payload flit per cycle while the downstream buffer accepts.
module sps_input_port
  import sps_pkg::*;
#(
  parameter int BUF_DEPTH = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  coord_t    my_x,
  input  coord_t    my_y,
  // configuration
  input  logic      cfg_sps_en,
  input  prio_t     cfg_pd,
  input  len_t      cfg_rf,
  // link from the upstream router / local source
  input  logic      in_valid,
  input  flit_t     in_flit,
  output logic      in_ready,
  // arbitration request ('port request' and 'priority' registers)
  output logic      req_valid,
  output port_e     req_port,
  output prio_t     req_prio,
  input  logic      grant,
  // best waiting contender for the output port this port holds
  input  logic      cont_valid,
  input  prio_t     cont_prio,
  // connection ('out port' register)
  output logic      conn_valid,
  output port_e     conn_port,
  // flit towards the crossbar
  output logic      tx_valid,
  output flit_t     tx_flit,
  input  logic      tx_ready,
  // observation
  output ip_state_e state_o,
  output len_t      flits_left_o,
  output logic      split_evt
);

  ip_state_e state, state_n;
  prio_t     prio_q;
  coord_t    dst_x_q, dst_y_q;
  port_e     port_req_q, route_port;
  len_t      flits_left_q;
  logic      hdr_pending_q;
  logic      conn_valid_q;
  port_e     conn_port_q;

  logic      buf_valid, buf_pop;
  flit_t     buf_flit;
  header_t   head_hdr;
  logic      fire, in_tail, out_tail;
  logic      split_cond;

  sps_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_flit, .in_ready,
    .out_valid(buf_valid), .out_flit(buf_flit), .out_pop(buf_pop)
  );

  assign head_hdr = header_t'(buf_flit);

  sps_xy_route u_route (
    .my_x, .my_y,
    .dst_x(head_hdr.dst_x), .dst_y(head_hdr.dst_y),
    .port(route_port)
  );

  assign in_tail = is_tail(buf_flit);

  // Split decision: higher-priority contender beyond the PD margin and at
  // least RF flits left to send. At least two must be left, so that one
  // goes out as the tail and something remains for the second piece.
  always_comb begin
    split_cond = 1'b0;
    if (cfg_sps_en && cont_valid && !hdr_pending_q && (prio_q > cont_prio) &&
        !(buf_valid && in_tail)) begin
      if (((prio_q - cont_prio) > cfg_pd) && (flits_left_q >= cfg_rf) &&
          (flits_left_q >= len_t'(2)))
        split_cond = 1'b1;
    end
  end

  // Flit output towards the crossbar.
  always_comb begin
    tx_valid = 1'b0;
    tx_flit  = buf_flit;
    out_tail = 1'b0;
    if (state == S_DATA && hdr_pending_q) begin
      tx_valid = 1'b1;
      tx_flit  = make_header(prio_q, dst_x_q, dst_y_q, flits_left_q);
    end else if ((state == S_DATA && !split_cond) || state == S_SPLIT) begin
      tx_valid = buf_valid;
      out_tail = in_tail || (flits_left_q == len_t'(1)) || (state == S_SPLIT);
      tx_flit  = {out_tail, buf_flit[DATA_W-1:0]};
    end
  end

  assign fire    = tx_valid && tx_ready;
  assign buf_pop = (state == S_ARB_REQ && buf_valid) || (fire && !hdr_pending_q);

  always_comb begin
    state_n = state;
    case (state)
      S_ARB_REQ: if (buf_valid) state_n = S_ARB;
      S_ARB:     if (grant) state_n = S_DATA;
      S_DATA: begin
        if (!hdr_pending_q) begin
          if (split_cond)         state_n = S_SPLIT;
          else if (fire && out_tail) state_n = S_CLOSE;
        end
      end
      S_CLOSE:   state_n = S_ARB_REQ;
      S_SPLIT: begin
        if (fire) state_n = (in_tail || flits_left_q == len_t'(1)) ? S_ARB_REQ : S_ARB;
      end
      default:   state_n = S_ARB_REQ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_ARB_REQ;
      prio_q        <= '0;
      dst_x_q       <= '0;
      dst_y_q       <= '0;
      port_req_q    <= P_LOCAL;
      flits_left_q  <= '0;
      hdr_pending_q <= 1'b0;
      conn_valid_q  <= 1'b0;
      conn_port_q   <= P_LOCAL;
    end else begin
      state <= state_n;
      case (state)
        S_ARB_REQ: if (buf_valid) begin
          prio_q       <= head_hdr.prio;
          dst_x_q      <= head_hdr.dst_x;
          dst_y_q      <= head_hdr.dst_y;
          flits_left_q <= head_hdr.len;
          port_req_q   <= route_port;
        end
        S_ARB: if (grant) begin
          conn_valid_q  <= 1'b1;
          conn_port_q   <= port_req_q;
          hdr_pending_q <= 1'b1;
        end
        S_DATA: if (fire) begin
          if (hdr_pending_q) hdr_pending_q <= 1'b0;
          else               flits_left_q  <= flits_left_q - 1'b1;
        end
        S_CLOSE: conn_valid_q <= 1'b0;
        S_SPLIT: if (fire) begin
          flits_left_q <= flits_left_q - 1'b1;
          conn_valid_q <= 1'b0;
        end
        default: ;
      endcase
    end
  end

  assign req_valid    = (state == S_ARB);
  assign req_port     = port_req_q;
  assign req_prio     = prio_q;
  assign conn_valid   = conn_valid_q;
  assign conn_port    = conn_port_q;
  assign state_o      = state;
  assign flits_left_o = flits_left_q;
  assign split_evt    = (state == S_SPLIT) && fire && !in_tail;

endmodule
