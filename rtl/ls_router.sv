// ls_router: five-port label-switched router of the 2D mesh.
//
// Ports are Local, East, West, North and South (noc_pkg::port_e). Each input
// link has a valid/ready handshake and feeds a packet_fifo; ready is simply
// "queue not full", so a congested port pushes back on its upstream neighbour.
// The head packet of every queue is labelled with its output port by xy_route.
// A head whose destination lies outside the mesh is discarded and reported on
// drop_invalid. Valid heads request their output from rr_arbiter, which grants
// at most one input per output, and only for an output whose register is free
// (empty or being emptied this cycle) and whose noc_manager reports bandwidth
// left. The crossbar then copies the granted packets into the output registers,
// the granted queues pop, and each output toggles its packet-counter LSB, which
// its noc_manager watches. An output register holds its packet, with out_valid
// high, until out_ready is seen.
//
// Timing: a packet accepted on an input at clock edge t is granted in the next
// cycle and shows on out_valid after edge t+2, i.e. two cycles per hop when
// nothing blocks. Up to five packets (one per output) move per cycle.
// The block structure (queue, label generation, arbiter, crossbar, a NoC manager
// per port) follows the document; the handshake, the registered outputs and the
// dropping of invalid packets are this design's choices.
//
// Status: port_full (input queue full), port_avail and port_bw (NoC manager
// availability and remaining budget of each output), drop_invalid (a head with
// an impossible destination was discarded) and sent (an output transfer
// completed). In an 8x8 mesh every 3-bit coordinate is valid, so drop_invalid
// is constant zero there; it matters for meshes whose sides are not powers of
// two.
module ls_router
  import noc_pkg::*;
#(
  parameter int unsigned ROWS        = 8,
  parameter int unsigned COLS        = 8,
  parameter int unsigned FIFO_DEPTH  = 4,
  parameter int unsigned SLOT_CYCLES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [COORD_W-1:0]      my_x,
  input  logic [COORD_W-1:0]      my_y,
  // input links
  input  logic    [NPORTS-1:0]    in_valid,
  input  packet_t [NPORTS-1:0]    in_data,
  output logic    [NPORTS-1:0]    in_ready,
  // output links
  output logic    [NPORTS-1:0]    out_valid,
  output packet_t [NPORTS-1:0]    out_data,
  input  logic    [NPORTS-1:0]    out_ready,
  // status
  output logic    [NPORTS-1:0]    port_full,
  output logic    [NPORTS-1:0]    port_avail,
  output logic    [NPORTS-1:0][BW_W-1:0] port_bw,
  output logic    [NPORTS-1:0]    drop_invalid,
  output logic    [NPORTS-1:0]    sent
);

  packet_t [NPORTS-1:0]        head;
  logic    [NPORTS-1:0]        q_empty, q_full, q_pop;
  port_e   [NPORTS-1:0]        label;
  logic    [NPORTS-1:0]        dst_ok;
  logic    [NPORTS-1:0]        req, grant;
  logic    [NPORTS-1:0]        out_free;
  logic    [NPORTS-1:0][2:0]   xsel;
  logic    [NPORTS-1:0]        xen;
  logic    [NPORTS-1:0][PKT_W-1:0] xin, xout;
  logic    [NPORTS-1:0]        pkt_lsb;

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    packet_fifo #(.W(PKT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (in_valid[p] && !q_full[p]),
      .din   (in_data[p]),
      .pop   (q_pop[p]),
      .dout  (head[p]),
      .full  (q_full[p]),
      .empty (q_empty[p])
    );

    xy_route #(.ROWS(ROWS), .COLS(COLS)) u_route (
      .my_x      (my_x),
      .my_y      (my_y),
      .dst       (head[p].dst),
      .label     (label[p]),
      .dst_valid (dst_ok[p])
    );

    noc_manager #(.SLOT_CYCLES(SLOT_CYCLES), .BW_MAX(BW_MAX)) u_mgr (
      .clk     (clk),
      .rst_n   (rst_n),
      .pkt_lsb (pkt_lsb[p]),
      .avail   (port_avail[p]),
      .bw      (port_bw[p])
    );

    assign req[p]          = !q_empty[p] && dst_ok[p];
    assign drop_invalid[p] = !q_empty[p] && !dst_ok[p];
    assign q_pop[p]        = grant[p] || drop_invalid[p];
    assign xin[p]          = head[p];
    assign out_free[p]     = (!out_valid[p] || out_ready[p]) && port_avail[p];
  end

  assign in_ready  = ~q_full;
  assign port_full = q_full;
  assign sent      = out_valid & out_ready;

  rr_arbiter #(.NPORTS(NPORTS)) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (req),
    .label    (label),
    .out_free (out_free),
    .sel      (xsel),
    .en       (xen),
    .grant    (grant)
  );

  crossbar #(.NPORTS(NPORTS), .W(PKT_W)) u_xbar (
    .din  (xin),
    .sel  (xsel),
    .en   (xen),
    .dout (xout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_data  <= '0;
      pkt_lsb   <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (xen[o]) begin
          out_valid[o] <= 1'b1;
          out_data[o]  <= packet_t'(xout[o]);
          pkt_lsb[o]   <= ~pkt_lsb[o];
        end else if (out_ready[o]) begin
          out_valid[o] <= 1'b0;
        end
      end
    end
  end

  // An offered packet stays put until it is taken.
  for (genvar p = 0; p < NPORTS; p++) begin : g_chk
    a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid[p] && !out_ready[p]) |=> (out_valid[p] && $stable(out_data[p])));
  end

endmodule
