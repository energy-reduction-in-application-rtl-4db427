// xy_route: XY (dimension-order) routing decision for a header flit.
//
// Given the coordinates of the current node and of the packet's destination,
// the packet first travels along x until the column matches, then along y,
// and is handed to the local processor at the destination. Purely
// combinational. The XY algorithm is the one the network uses; the direction
// names (north = larger y, east = larger x) are this design's convention.
module xy_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);
  always_comb begin
    if (dst_x > cur_x)      out_port = PORT_EAST;
    else if (dst_x < cur_x) out_port = PORT_WEST;
    else if (dst_y > cur_y) out_port = PORT_NORTH;
    else if (dst_y < cur_y) out_port = PORT_SOUTH;
    else                    out_port = PORT_LOCAL;
  end
endmodule
