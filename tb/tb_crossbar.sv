// tb_crossbar: random selects and enables against a multiplexer model.
// An enabled output must carry the selected input, a disabled output or one
// whose select names no port must be zero. Also repeats the 16-bit stand-alone
// case: input data 046c, 10e1, 0925, 155b, 1ed8 switched straight through.
module tb_crossbar;
  int checks = 0, failures = 0;

  logic [4:0][21:0] din, dout;
  logic [4:0][2:0]  sel;
  logic [4:0]       en;
  logic [4:0][15:0] d16, o16;

  crossbar                 dut   (.din(din), .sel(sel), .en(en), .dout(dout));
  crossbar #(.W(16))       dut16 (.din(d16), .sel(sel), .en(en), .dout(o16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d16 = {16'h1ed8, 16'h155b, 16'h0925, 16'h10e1, 16'h046c};
    din = '0;
    for (int o = 0; o < 5; o++) sel[o] = 3'(o);
    en = 5'b11111;
    #1;
    for (int o = 0; o < 5; o++) begin
      checks++;
      if (o16[o] != d16[o]) begin failures++; $display("FAIL straight %0d", o); end
    end
    for (int k = 0; k < 2000; k++) begin
      for (int i = 0; i < 5; i++) begin
        din[i] = 22'($urandom);
        sel[i] = 3'($urandom % 6);
      end
      en = 5'($urandom);
      #1;
      for (int o = 0; o < 5; o++) begin
        logic [21:0] exp_v;
        exp_v = (en[o] && sel[o] < 5) ? din[sel[o]] : '0;
        checks++;
        if (dout[o] != exp_v) begin
          failures++;
          $display("FAIL out %0d sel %0d en %b: %h vs %h", o, sel[o], en[o], dout[o], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
