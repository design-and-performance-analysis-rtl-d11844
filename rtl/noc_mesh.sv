// noc_mesh: ROWS x COLS two-dimensional mesh network on chip (8x8 by default).
//
// Node n = y*COLS + x holds one ls_router and one network_interface to its
// processing element. A router's East output drives the West input of the
// router at x+1, its North output the South input of the router at y+1, and
// the reverse links likewise, each with its own valid/ready handshake. Router
// ports on the edge of the mesh are tied off: their inputs never see a packet
// and their outputs are always ready, which deterministic XY routing never uses
// anyway. A processing element sends by raising pe_tx_valid with a destination
// and a 16-bit message and receives on pe_rx_valid/pe_rx_msg. Per node it also
// reports, for each router port, a full input queue (port_full), output
// bandwidth available from the NoC manager (port_avail) with its remaining
// budget (port_bw), a completed output transfer (port_sent) and a discarded
// packet with an impossible destination (drop_invalid). drop_invalid is constant
// zero in the default 8x8 mesh, where every address is a node.
//
// Timing: two cycles per router passed, so a packet crossing h links arrives
// 2*(h+1) cycles after it is accepted, when nothing blocks it.
// The 8x8 mesh of 5-port routers with a network interface on the local port
// follows the document; the edge tie-offs are this design's choice.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8,
  localparam int unsigned N   = ROWS * COLS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic  [N-1:0]              pe_tx_valid,
  input  addr_t [N-1:0]              pe_tx_dst,
  input  logic  [N-1:0][MSG_W-1:0]   pe_tx_msg,
  output logic  [N-1:0]              pe_tx_ready,
  output logic  [N-1:0]              pe_rx_valid,
  output addr_t [N-1:0]              pe_rx_dst,
  output logic  [N-1:0][MSG_W-1:0]   pe_rx_msg,
  input  logic  [N-1:0]              pe_rx_ready,
  output logic  [N-1:0][NPORTS-1:0]  port_full,
  output logic  [N-1:0][NPORTS-1:0]  port_avail,
  output logic  [N-1:0][NPORTS-1:0][BW_W-1:0] port_bw,
  output logic  [N-1:0][NPORTS-1:0]  drop_invalid,
  output logic  [N-1:0][NPORTS-1:0]  port_sent
);

  // Link signals seen from each router.
  logic    [N-1:0][NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  packet_t [N-1:0][NPORTS-1:0] r_in_data, r_out_data;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned n = y * COLS + x;

      ls_router #(.ROWS(ROWS), .COLS(COLS)) u_router (
        .clk          (clk),
        .rst_n        (rst_n),
        .my_x         (COORD_W'(x)),
        .my_y         (COORD_W'(y)),
        .in_valid     (r_in_valid[n]),
        .in_data      (r_in_data[n]),
        .in_ready     (r_in_ready[n]),
        .out_valid    (r_out_valid[n]),
        .out_data     (r_out_data[n]),
        .out_ready    (r_out_ready[n]),
        .port_full    (port_full[n]),
        .port_avail   (port_avail[n]),
        .port_bw      (port_bw[n]),
        .drop_invalid (drop_invalid[n]),
        .sent         (port_sent[n])
      );

      network_interface u_ni (
        .pe_tx_valid  (pe_tx_valid[n]),
        .pe_tx_dst    (pe_tx_dst[n]),
        .pe_tx_msg    (pe_tx_msg[n]),
        .pe_tx_ready  (pe_tx_ready[n]),
        .pe_rx_valid  (pe_rx_valid[n]),
        .pe_rx_dst    (pe_rx_dst[n]),
        .pe_rx_msg    (pe_rx_msg[n]),
        .pe_rx_ready  (pe_rx_ready[n]),
        .rt_in_valid  (r_in_valid[n][P_LOCAL]),
        .rt_in_data   (r_in_data[n][P_LOCAL]),
        .rt_in_ready  (r_in_ready[n][P_LOCAL]),
        .rt_out_valid (r_out_valid[n][P_LOCAL]),
        .rt_out_data  (r_out_data[n][P_LOCAL]),
        .rt_out_ready (r_out_ready[n][P_LOCAL])
      );

      // East link: to/from (x+1, y)
      if (x < COLS - 1) begin : g_east
        assign r_in_valid[n][P_EAST]  = r_out_valid[n+1][P_WEST];
        assign r_in_data[n][P_EAST]   = r_out_data[n+1][P_WEST];
        assign r_out_ready[n][P_EAST] = r_in_ready[n+1][P_WEST];
      end else begin : g_east_edge
        assign r_in_valid[n][P_EAST]  = 1'b0;
        assign r_in_data[n][P_EAST]   = '0;
        assign r_out_ready[n][P_EAST] = 1'b1;
      end

      // West link: to/from (x-1, y)
      if (x > 0) begin : g_west
        assign r_in_valid[n][P_WEST]  = r_out_valid[n-1][P_EAST];
        assign r_in_data[n][P_WEST]   = r_out_data[n-1][P_EAST];
        assign r_out_ready[n][P_WEST] = r_in_ready[n-1][P_EAST];
      end else begin : g_west_edge
        assign r_in_valid[n][P_WEST]  = 1'b0;
        assign r_in_data[n][P_WEST]   = '0;
        assign r_out_ready[n][P_WEST] = 1'b1;
      end

      // North link: to/from (x, y+1)
      if (y < ROWS - 1) begin : g_north
        assign r_in_valid[n][P_NORTH]  = r_out_valid[n+COLS][P_SOUTH];
        assign r_in_data[n][P_NORTH]   = r_out_data[n+COLS][P_SOUTH];
        assign r_out_ready[n][P_NORTH] = r_in_ready[n+COLS][P_SOUTH];
      end else begin : g_north_edge
        assign r_in_valid[n][P_NORTH]  = 1'b0;
        assign r_in_data[n][P_NORTH]   = '0;
        assign r_out_ready[n][P_NORTH] = 1'b1;
      end

      // South link: to/from (x, y-1)
      if (y > 0) begin : g_south
        assign r_in_valid[n][P_SOUTH]  = r_out_valid[n-COLS][P_NORTH];
        assign r_in_data[n][P_SOUTH]   = r_out_data[n-COLS][P_NORTH];
        assign r_out_ready[n][P_SOUTH] = r_in_ready[n-COLS][P_NORTH];
      end else begin : g_south_edge
        assign r_in_valid[n][P_SOUTH]  = 1'b0;
        assign r_in_data[n][P_SOUTH]   = '0;
        assign r_out_ready[n][P_SOUTH] = 1'b1;
      end
    end
  end

endmodule
