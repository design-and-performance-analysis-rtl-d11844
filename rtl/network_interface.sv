// network_interface: connects a processing element to the Local port of its
// router.
//
// Sending: the element offers a destination address and a 16-bit message; the
// interface codes the message with msg_codec and places it under the address to
// form the 22-bit packet, passing the valid/ready handshake straight through.
// Receiving: a packet arriving from the router's Local output has its message
// decoded by a second msg_codec and is handed to the element together with the
// destination it carried. Links between routers therefore carry only coded
// messages. The packet format (6 address bits, 16 message bits) and the coding
// follow the document; the handshake and coding only the message, not the
// header that routers must read, are this design's choices.
//
// Purely combinational: no added latency in either direction. Handshakes and
// addresses are plain wires; only the message bits pass through logic.
module network_interface
  import noc_pkg::*;
(
  // processing element side
  input  logic             pe_tx_valid,
  input  addr_t            pe_tx_dst,
  input  logic [MSG_W-1:0] pe_tx_msg,
  output logic             pe_tx_ready,
  output logic             pe_rx_valid,
  output addr_t            pe_rx_dst,
  output logic [MSG_W-1:0] pe_rx_msg,
  input  logic             pe_rx_ready,
  // router Local port side
  output logic             rt_in_valid,
  output packet_t          rt_in_data,
  input  logic             rt_in_ready,
  input  logic             rt_out_valid,
  input  packet_t          rt_out_data,
  output logic             rt_out_ready
);

  logic [MSG_W-1:0] enc_msg, dec_msg;

  msg_codec #(.W(MSG_W)) u_enc (.din(pe_tx_msg),       .dout(enc_msg));
  msg_codec #(.W(MSG_W)) u_dec (.din(rt_out_data.msg), .dout(dec_msg));

  assign rt_in_valid    = pe_tx_valid;
  assign rt_in_data.dst = pe_tx_dst;
  assign rt_in_data.msg = enc_msg;
  assign pe_tx_ready    = rt_in_ready;

  assign pe_rx_valid  = rt_out_valid;
  assign pe_rx_dst    = rt_out_data.dst;
  assign pe_rx_msg    = dec_msg;
  assign rt_out_ready = pe_rx_ready;

endmodule
