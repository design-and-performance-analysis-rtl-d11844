// tb_msg_codec: checks the transition-reducing coder.
// 1. The worked 10-bit example: x = 1110010101 (x[0] rightmost) must code to
//    z with z[0..9] = 1,1,1,1,1,1,0,0,1,0 and the number of bit-to-bit
//    transitions must drop from 6 to 3.
// 2. 16-bit messages: the coder must equal "invert the odd bits" (mask 16'hAAAA
//    for b1 = 0, b2 = 1), and coding twice must give the message back.
module tb_msg_codec;
  int checks = 0, failures = 0;

  logic [9:0]  ex_in, ex_out;
  logic [15:0] m_in, m_enc, m_dec;

  msg_codec #(.W(10)) u_ex  (.din(ex_in), .dout(ex_out));
  msg_codec           u_enc (.din(m_in),  .dout(m_enc));
  msg_codec           u_dec (.din(m_enc), .dout(m_dec));

  function automatic int transitions(logic [15:0] v, int w);
    int t = 0;
    for (int i = 1; i < w; i++) if (v[i] != v[i-1]) t++;
    return t;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ex_in = 10'b1110010101;
    m_in  = '0;
    #1;
    check(ex_out == 10'b0100111111, $sformatf("example coded to %b", ex_out));
    check(transitions(16'(ex_in), 10) == 6, "example input has 6 transitions");
    check(transitions(16'(ex_out), 10) == 3, "example output has 3 transitions");
    for (int k = 0; k < 200; k++) begin
      m_in = 16'($urandom);
      if (k == 0) m_in = 16'h5555;
      #1;
      check(m_enc == (m_in ^ 16'hAAAA), $sformatf("encode %h -> %h", m_in, m_enc));
      check(m_dec == m_in, $sformatf("decode round trip %h -> %h", m_in, m_dec));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
