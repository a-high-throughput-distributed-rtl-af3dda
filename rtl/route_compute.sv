// route_compute: the RC stage. Dimension-ordered X-Y routing on a 2D mesh:
// a packet first moves along X until its column matches, then along Y, and
// leaves through the local port at its destination. Purely combinational;
// the input port registers the result. X-Y routing is the published choice;
// the direction convention (x grows to the east, y grows to the north) is
// this design's.
module route_compute
  import dsb_pkg::*;
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
