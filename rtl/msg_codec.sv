// msg_codec: transition-reducing coder for the 16-bit message of a packet.
//
// Every even-numbered bit is XORed with b1 and every odd-numbered bit with b1^b2.
// With the default b1 = 0, b2 = 1 the odd bits are inverted, which turns a
// message that alternates 1010... into a run of equal bits and so cuts the
// number of toggles on a link. Because the operation is an XOR with a fixed mask,
// applying it twice restores the message: the same module encodes at the sender
// and decodes at the receiver. The coding rule and b1 = 0, b2 = 1 follow the
// document; making the coder purely combinational is this design's choice.
//
// Interface: din (W bits) -> dout (W bits), no clock, zero latency. With
// b1 = 0 the even bits are wired straight through; only the odd bits cost an
// inverter.
module msg_codec #(
  parameter int unsigned W  = 16,
  parameter bit          B1 = 1'b0,
  parameter bit          B2 = 1'b1
) (
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (i % 2 == 0) dout[i] = din[i] ^ B1;
      else            dout[i] = din[i] ^ B1 ^ B2;
    end
  end

endmodule
