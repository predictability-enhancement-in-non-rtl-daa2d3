// Shared types and constants of the selective-packet-splitting (SPS) NoC.
//
// A flit is FLIT_W bits wide. Its most significant bit marks the last flit
// of a packet (the tail flit); this holds for every flit, header and payload
// alike. A packet is one header flit followed by one or more payload flits.
// The header carries the packet priority, the XY destination and the number
// of payload flits still to come. The tail marker in the MSB and the priority
// in the header follow the design description; the flit width, the field
// order and the length field are this design's own choices.
//
//   header:  [FLIT_W-1] tail=0 | prio | dst_x | dst_y | len
//   payload: [FLIT_W-1] tail   | data (FLIT_W-1 bits)
//
// Priority 0 is the most urgent level; a larger number is a lower priority.
// The five router ports are numbered as in the Hermes router family.
package sps_pkg;

  parameter int FLIT_W  = 16;  // flit width incl. tail bit
  parameter int PRIO_W  = 4;   // 16 priority levels
  parameter int COORD_W = 2;   // mesh coordinates up to 4x4
  parameter int LEN_W   = FLIT_W - 1 - PRIO_W - 2 * COORD_W;  // payload count
  parameter int DATA_W  = FLIT_W - 1;
  parameter int NPORTS  = 5;
  parameter int PORT_W  = 3;

  typedef logic [FLIT_W-1:0]  flit_t;
  typedef logic [PRIO_W-1:0]  prio_t;
  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [LEN_W-1:0]   len_t;
  typedef logic [DATA_W-1:0]  data_t;

  typedef enum logic [PORT_W-1:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;

  // Input port states, numbered after the five stages of the port's
  // operation: arbitration request, arbitration, data transfer, close
  // connection and split (send tail, close, request again).
  typedef enum logic [2:0] {
    S_ARB_REQ = 3'd1,
    S_ARB     = 3'd2,
    S_DATA    = 3'd3,
    S_CLOSE   = 3'd4,
    S_SPLIT   = 3'd5
  } ip_state_e;

  typedef struct packed {
    logic   tail;
    prio_t  prio;
    coord_t dst_x;
    coord_t dst_y;
    len_t   len;
  } header_t;

  function automatic flit_t make_header(prio_t prio, coord_t dx, coord_t dy, len_t len);
    header_t h;
    h.tail  = 1'b0;
    h.prio  = prio;
    h.dst_x = dx;
    h.dst_y = dy;
    h.len   = len;
    return flit_t'(h);
  endfunction

  function automatic logic is_tail(flit_t f);
    return f[FLIT_W-1];
  endfunction

endpackage
