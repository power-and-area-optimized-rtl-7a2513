// routing_logic: picks the output port for the flit at a FIFO head.
//
// Dimension-order (XY) routing on a 2D mesh: the flit first travels along
// x until its column matches, then along y, and leaves on Local when both
// match. East is +x, West is -x, North is +y, South is -y. The result is
// one-hot over the ports E, W, N, S, L (fra_pkg index order).
// Purely combinational; the router's own coordinates are parameters.
// The description says only that the routing logic reads the destination
// address in the head packet and selects the output port; XY routing and the
// direction convention are this design's choice.
module routing_logic
  import fra_pkg::*;
#(
  parameter logic [COORD_W-1:0] MY_X = COORD_W'(1),
  parameter logic [COORD_W-1:0] MY_Y = COORD_W'(1)
) (
  input  flit_t             head,
  output logic [NPORTS-1:0] route  // one-hot, index = port_e
);
  always_comb begin
    route = '0;
    if (head.dst_x > MY_X)      route[PORT_E] = 1'b1;
    else if (head.dst_x < MY_X) route[PORT_W] = 1'b1;
    else if (head.dst_y > MY_Y) route[PORT_N] = 1'b1;
    else if (head.dst_y < MY_Y) route[PORT_S] = 1'b1;
    else                        route[PORT_L] = 1'b1;
  end
endmodule
