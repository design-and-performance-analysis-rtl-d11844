// xy_route: label generation by deterministic XY routing.
//
// Compares the destination address of a packet with the router's own position.
// The column is corrected first (East for a larger x, West for a smaller one);
// only when the column matches is the row corrected (North for a larger y, South
// for a smaller one); a packet at its destination is labelled Local. dst_valid
// is low when the destination lies outside a ROWS x COLS mesh, which can only
// happen when a dimension is not a power of two. Deterministic XY routing and the
// 8x8 default follow the document; East = +x, North = +y and treating the output
// port as the packet's label are this design's choices.
//
// Purely combinational. With the 8x8 default dst_valid is constant one.
module xy_route
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  addr_t              dst,
  output port_e              label,
  output logic               dst_valid
);

  always_comb begin
    dst_valid = (32'(dst.x) < COLS) && (32'(dst.y) < ROWS);
    if      (dst.x > my_x) label = P_EAST;
    else if (dst.x < my_x) label = P_WEST;
    else if (dst.y > my_y) label = P_NORTH;
    else if (dst.y < my_y) label = P_SOUTH;
    else                   label = P_LOCAL;
  end

endmodule
