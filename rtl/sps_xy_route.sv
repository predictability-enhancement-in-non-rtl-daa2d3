// XY routing function of a router input port.
//
// Dimension-ordered routing as the design description prescribes: a packet
// first travels along X until its column matches, then along Y, and leaves
// through the local port at its destination. East is +X and north is +Y
// (this orientation is this design's own choice). The unit is purely
// combinational: the destination from the header and the router's own
// coordinates in, the requested output port out.
module sps_xy_route
  import sps_pkg::*;
(
  input  coord_t my_x,
  input  coord_t my_y,
  input  coord_t dst_x,
  input  coord_t dst_y,
  output port_e  port
);

  always_comb begin
    if (dst_x > my_x)       port = P_EAST;
    else if (dst_x < my_x)  port = P_WEST;
    else if (dst_y > my_y)  port = P_NORTH;
    else if (dst_y < my_y)  port = P_SOUTH;
    else                    port = P_LOCAL;
  end

endmodule
