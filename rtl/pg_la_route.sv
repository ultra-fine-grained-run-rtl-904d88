// pg_la_route: look-ahead routing unit.
//
// With look-ahead routing a head flit arrives already knowing its output
// port at this router (computed by the previous router); this router in
// turn computes the port the head will take at the next router and writes
// it into the header. For look-ahead wakeup the unit also computes the port
// at the router two hops ahead, so that the domains there can be woken
// before the packet arrives. Routing is dimension order (X, then Y), which
// matches the path drawn for the 4x4 mesh; heads injected at the local port
// carry no look-ahead port, so their port here is computed directly.
//
// Interface: current coordinates, the input port and the head flit's data.
// Outputs: out_port (here), next_port (at the neighbour out of out_port),
// next2_port (at the router after that). A port of P_LOCAL means the packet
// leaves the network there; later ports are then P_LOCAL as well.
// Purely combinational.
module pg_la_route
  import pg_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [PORT_W-1:0]  in_port,
  input  flit_data_t         hdr,
  output logic [PORT_W-1:0]  out_port,
  output logic [PORT_W-1:0]  next_port,
  output logic [PORT_W-1:0]  next2_port
);

  function automatic logic [2*COORD_W-1:0] step(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                                logic [PORT_W-1:0] p);
    logic [COORD_W-1:0] nx, ny;
    nx = x;
    ny = y;
    case (p)
      P_NORTH: ny = y - 1'b1;
      P_EAST:  nx = x + 1'b1;
      P_SOUTH: ny = y + 1'b1;
      P_WEST:  nx = x - 1'b1;
      default: ;
    endcase
    return {ny, nx};
  endfunction

  logic [COORD_W-1:0] dx, dy, n1x, n1y, n2x, n2y;

  always_comb begin
    dx = hdr_dst_x(hdr);
    dy = hdr_dst_y(hdr);
    out_port = (in_port == P_LOCAL) ? xy_route(cur_x, cur_y, dx, dy) : hdr_la_port(hdr);
    {n1y, n1x} = step(cur_x, cur_y, out_port);
    next_port  = (out_port == P_LOCAL) ? P_LOCAL : xy_route(n1x, n1y, dx, dy);
    {n2y, n2x} = step(n1x, n1y, next_port);
    next2_port = (next_port == P_LOCAL) ? P_LOCAL : xy_route(n2x, n2y, dx, dy);
  end

endmodule
