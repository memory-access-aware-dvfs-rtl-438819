// route_compute: X-Y dimension-order routing.
//
// Given the coordinates of the current router and of the destination in the
// head flit, returns the output port: first along x (east for a larger x,
// west for a smaller one), then along y (north for a larger y, south for a
// smaller one), and the local port once both match. X-Y routing is the
// routing of the document's platform; the port numbering is this design's
// own (see noc_pkg). Purely combinational.
module route_compute
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [PORT_W-1:0]  out_port
);
  always_comb begin
    if (dst_x > cur_x)      out_port = PORT_W'(P_EAST);
    else if (dst_x < cur_x) out_port = PORT_W'(P_WEST);
    else if (dst_y > cur_y) out_port = PORT_W'(P_NORTH);
    else if (dst_y < cur_y) out_port = PORT_W'(P_SOUTH);
    else                    out_port = PORT_W'(P_LOCAL);
  end
endmodule
