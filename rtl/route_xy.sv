// route_xy: routing unit, stage 1 of the router pipeline.
//
// Dimension-order X-Y routing on the 2D mesh: a packet first travels along
// x until its column matches, then along y, and leaves on the local port at
// its destination. Purely combinational. The routing algorithm is the one
// of the document's system setup; the port numbering is from noc_pkg.
module route_xy
  import noc_pkg::*;
#(
  parameter int MY_X = 0,
  parameter int MY_Y = 0
) (
  input  logic [COORD_W-1:0] dest_x,
  input  logic [COORD_W-1:0] dest_y,
  output port_e              out_port
);
  always_comb begin
    if (int'(dest_x) > MY_X)      out_port = PORT_EAST;
    else if (int'(dest_x) < MY_X) out_port = PORT_WEST;
    else if (int'(dest_y) > MY_Y) out_port = PORT_NORTH;
    else if (int'(dest_y) < MY_Y) out_port = PORT_SOUTH;
    else                          out_port = PORT_LOCAL;
  end
endmodule
