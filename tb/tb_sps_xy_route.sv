// Self-checking testbench of the XY routing unit (sps_xy_route).
// Every router position and destination of a 4x4 mesh is tried; the
// expected port is worked out from the X-then-Y rule with explicit
// distance arithmetic.
module tb_sps_xy_route;
  import sps_pkg::*;

  coord_t my_x, my_y, dst_x, dst_y;
  port_e  port;
  int     checks = 0, failures = 0;

  sps_xy_route dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++) begin
            port_e exp;
            int dx, dy;
            my_x = coord_t'(a); my_y = coord_t'(b);
            dst_x = coord_t'(c); dst_y = coord_t'(d);
            dx = c - a; dy = d - b;
            if (dx != 0)      exp = (dx > 0) ? P_EAST : P_WEST;
            else if (dy != 0) exp = (dy > 0) ? P_NORTH : P_SOUTH;
            else              exp = P_LOCAL;
            #1;
            checks++;
            if (port !== exp) begin
              failures++;
              $display("FAIL at (%0d,%0d) to (%0d,%0d): got %s want %s",
                       a, b, c, d, port.name(), exp.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
