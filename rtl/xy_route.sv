// xy_route: dimension-ordered (XY) route computation for one packet.
//
// The destination coordinates (Dx,Dy) are compared with the router's own
// coordinates (Cx,Cy). The packet first travels horizontally until it is in
// the destination column (East if Dx > Cx, West if Dx < Cx), then vertically
// (South if Dy < Cy, North if Dy > Cy); when both match it leaves through the
// Local port to the attached core. This comparison order and the use of the
// low coordinate bits ([3:2] = x, [1:0] = y) follow the described router.
// Purely combinational: the decision is valid in the same cycle.
module xy_route
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] dest,   // destination coordinates from the packet
  input  logic [COORD_W-1:0] here,   // this router's coordinate register
  output port_e              port    // output port to take
);

  logic [AXIS_W-1:0] dx, dy, cx, cy;

  always_comb begin
    dx = coord_x(dest);
    dy = coord_y(dest);
    cx = coord_x(here);
    cy = coord_y(here);
    if (dx > cx)      port = PORT_E;
    else if (dx < cx) port = PORT_W;
    else if (dy < cy) port = PORT_S;
    else if (dy > cy) port = PORT_N;
    else              port = PORT_L;
  end

endmodule
