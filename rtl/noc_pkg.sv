// noc_pkg: shared types and constants of the 2D-mesh label-switched NoC.
//
// A packet is a single 22-bit flit: a 6-bit destination address {x[2:0], y[2:0]}
// in the upper bits and a 16-bit message in the lower bits. The packet size and
// the 16-bit message follow the document; the split of the 6 address bits into a
// 3-bit column and a 3-bit row, and the bit order, are this design's choice.
// Router ports are numbered in the order Local, East, West, North, South.
package noc_pkg;

  localparam int unsigned MSG_W   = 16;
  localparam int unsigned COORD_W = 3;
  localparam int unsigned ADDR_W  = 2 * COORD_W;
  localparam int unsigned PKT_W   = ADDR_W + MSG_W;   // 22
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned PORT_W  = 3;
  // Bandwidth budget ceiling of every NoC manager and the width of its count.
  localparam int unsigned BW_MAX  = 10;
  localparam int unsigned BW_W    = $clog2(BW_MAX + 1);

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,   // +x
    P_WEST  = 3'd2,   // -x
    P_NORTH = 3'd3,   // +y
    P_SOUTH = 3'd4    // -y
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } addr_t;

  typedef struct packed {
    addr_t            dst;
    logic [MSG_W-1:0] msg;
  } packet_t;

endpackage
