// tb_xy_route: exhaustive test of the XY routing decision.
//
// For every current node and every destination of an 8x8 mesh the expected
// output port is derived from the coordinate differences (x first, then y,
// local when both match) and compared with the block.
module tb_xy_route;
  import noc_pkg::*;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  int checks = 0, failures = 0;

  xy_route dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            port_e exp;
            int ddx, ddy;
            cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
            dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
            #1;
            ddx = dx - cx;
            ddy = dy - cy;
            if (ddx > 0)      exp = PORT_EAST;
            else if (ddx < 0) exp = PORT_WEST;
            else if (ddy > 0) exp = PORT_NORTH;
            else if (ddy < 0) exp = PORT_SOUTH;
            else              exp = PORT_LOCAL;
            checks++;
            if (out_port != exp) begin
              failures++;
              $display("FAIL (%0d,%0d)->(%0d,%0d): got %0d expected %0d",
                       cx, cy, dx, dy, out_port, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
