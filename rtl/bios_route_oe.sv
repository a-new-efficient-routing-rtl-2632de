// bios_route_oe: minimal odd-even route function and its deterministic form (DOE).
//
// For a head flit at router (cur_x, cur_y) this computes the set of output
// directions that the minimal odd-even turn model allows, following Chiu's
// route function: east-north and east-south turns are never taken in an even
// column, and north-west and south-west turns are never taken in an odd
// column. A packet still in its source column may leave it north or south at
// any parity, and an eastbound packet whose destination column is even must
// make its last north/south move before it reaches that column. At most one
// horizontal and one vertical direction can be candidates.
//
// doe_port is the deterministic routing mode used by the BIOS router when no
// neighbour is congested: it takes the odd-even candidate set and removes the
// choice. Where both a horizontal and a vertical move are allowed it takes the
// horizontal one (X first, as XY routing does); this tie rule is this design's
// choice. Because the DOE path is always one of the odd-even paths, mixing the
// two modes in one network keeps the odd-even deadlock freedom.
// Purely combinational.
module bios_route_oe
  import bios_pkg::*;
(
  input  logic [COORD_W-1:0] cur_x,
  input  logic [COORD_W-1:0] cur_y,
  input  logic [COORD_W-1:0] src_x,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [NPORT-1:0]   cand,      // one bit per port_e value
  output port_e              doe_port
);

  port_e vdir;
  logic  east, west, y_diff, x_last;

  always_comb begin
    cand   = '0;
    vdir   = (dst_y > cur_y) ? P_NORTH : P_SOUTH;
    y_diff = (dst_y != cur_y);
    east   = (dst_x > cur_x);
    west   = (dst_x < cur_x);
    x_last = (dst_x == cur_x + COORD_W'(1));
    if (!east && !west) begin
      if (y_diff) cand[vdir]    = 1'b1;
      else        cand[P_LOCAL] = 1'b1;
    end else if (east) begin
      if (!y_diff) begin
        cand[P_EAST] = 1'b1;
      end else begin
        if (cur_x[0] || (cur_x == src_x)) cand[vdir]   = 1'b1;
        if (dst_x[0] || !x_last)          cand[P_EAST] = 1'b1;
      end
    end else begin
      cand[P_WEST] = 1'b1;
      if (!cur_x[0] && y_diff) cand[vdir] = 1'b1;
    end
  end

  always_comb begin
    if (cand[P_EAST])      doe_port = P_EAST;
    else if (cand[P_WEST]) doe_port = P_WEST;
    else if (cand[vdir])   doe_port = vdir;
    else                   doe_port = P_LOCAL;
  end

endmodule
