// tb_packet_fifo: random push/pop traffic against a queue model.
// Checks the head value, the full and empty flags on every cycle, that a
// depth-4 queue reports full after exactly four pushes, and that a push and a pop
// in the same cycle keep the count.
module tb_packet_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [21:0] din = '0, dout;
  logic full, empty;
  logic [21:0] model[$];

  packet_fifo #(.W(22), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // fill
    for (int k = 0; k < 4; k++) begin
      check(!full, "not full while filling");
      push <= 1; din <= 22'(k + 100);
      @(posedge clk); model.push_back(22'(k + 100));
      push <= 0;
      #1;
    end
    check(full, "full after 4 pushes");
    check(dout == 22'd100, "head is first pushed");
    // random traffic
    for (int c = 0; c < 2000; c++) begin
      logic p, q;
      #1;
      check(full == (model.size() == 4), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(dout == model[0], $sformatf("head %h vs %h", dout, model[0]));
      p = ($urandom % 2 == 1) && !full;
      q = ($urandom % 2 == 1) && !empty;
      push <= p; pop <= q; din <= 22'($urandom);
      @(posedge clk);
      if (q) void'(model.pop_front());
      if (p) model.push_back(din);
    end
    push <= 0; pop <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
