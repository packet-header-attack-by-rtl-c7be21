// xy_route: the routing unit. Dimension-ordered XY routing on a K x K mesh:
// a packet first travels along X (East/West) until its column matches the
// destination, then along Y (North/South), and is ejected to the local port
// at the destination. Tile ids are y*K + x with tile 0 at the south-west
// corner, so North increases y. Purely combinational; the input port
// registers the result as the OP field of its control buffer.
module xy_route
  import noc_pkg::*;
#(
  parameter int K = 4
) (
  input  logic [NODE_W-1:0] cur_id,
  input  logic [NODE_W-1:0] did,
  output port_e             op
);
  int unsigned cx, cy, dx, dy;

  always_comb begin
    cx = int'(cur_id) % K;
    cy = int'(cur_id) / K;
    dx = int'(did) % K;
    dy = int'(did) / K;
    if (dx > cx)      op = P_EAST;
    else if (dx < cx) op = P_WEST;
    else if (dy > cy) op = P_NORTH;
    else if (dy < cy) op = P_SOUTH;
    else              op = P_LOCAL;
  end
endmodule
