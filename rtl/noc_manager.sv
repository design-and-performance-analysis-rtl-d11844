// noc_manager: bandwidth monitor of one router output port.
//
// The port's output stage keeps a packet counter whose least significant bit
// toggles once per packet sent. The manager registers that bit and detects an
// edge (either direction) between the registered and the current value: one
// edge is one packet. It keeps a bandwidth budget that is charged PKT_COST (2)
// per packet and refilled by SLOT_INC (5) at the end of every slot of
// SLOT_CYCLES cycles, saturating at BW_MAX and never going below zero. The port
// is available only while the budget, less any packet seen but not yet charged,
// is greater than THRESH (2). This throttles a port to about SLOT_INC/PKT_COST
// packets per slot, reserving the rest of the link for other traffic.
// The edge detection on the LSB, the factors 5 and 2 and the threshold of 2 follow
// the document; the slot length, the ceiling, the reset value (a full budget)
// and the reading of the two factors as refill and charge are this design's.
//
// Timing: avail is combinational from registers only; the budget is updated at
// the clock edge after the edge is seen.
module noc_manager #(
  parameter int unsigned SLOT_INC    = 5,
  parameter int unsigned PKT_COST    = 2,
  parameter int unsigned THRESH      = 2,
  parameter int unsigned SLOT_CYCLES = 8,
  parameter int unsigned BW_MAX      = 10,
  localparam int unsigned BW_W       = $clog2(BW_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pkt_lsb,
  output logic            avail,
  output logic [BW_W-1:0] bw
);

  localparam int unsigned SC_W = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1;

  logic            lsb_q;
  logic            pkt_edge;
  logic            slot_end;
  logic [SC_W-1:0] slot_cnt;
  int              bw_after_pkt;
  int              bw_next;

  assign pkt_edge = pkt_lsb ^ lsb_q;
  assign slot_end = (32'(slot_cnt) == SLOT_CYCLES - 1);

  always_comb begin
    bw_after_pkt = int'(bw) - (pkt_edge ? int'(PKT_COST) : 0);
    if (bw_after_pkt < 0) bw_after_pkt = 0;
    avail   = bw_after_pkt > int'(THRESH);
    bw_next = bw_after_pkt + (slot_end ? int'(SLOT_INC) : 0);
    if (bw_next > int'(BW_MAX)) bw_next = int'(BW_MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lsb_q    <= pkt_lsb;
      slot_cnt <= '0;
      bw       <= BW_W'(BW_MAX);
    end else begin
      lsb_q    <= pkt_lsb;
      slot_cnt <= slot_end ? '0 : slot_cnt + 1'b1;
      bw       <= BW_W'(bw_next);
    end
  end

endmodule
