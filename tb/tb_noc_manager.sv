// tb_noc_manager: bandwidth budget of one port against a cycle model.
// A sender toggles the packet LSB whenever the manager says the port is
// available (and, in a second phase, only at random). A model of the rules --
// charge 2 per packet edge, refill 5 at the end of each 8-cycle slot, ceiling
// 10, available while the budget less an uncharged packet is above 2 -- is
// checked against avail and bw every cycle. Under full demand the port must
// settle at 5 packets per 2 slots (2.5 per slot).
module tb_noc_manager;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic pkt_lsb = 0, avail;
  logic [3:0] bw;

  noc_manager dut (.*);

  always #5 clk = ~clk;

  int m_bw = 10, m_slot = 0, blocked = 0;
  bit m_q = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles, bit greedy, output int sent);
    sent = 0;
    for (int c = 0; c < cycles; c++) begin
      int after;
      bit m_avail, edge_now, decide;
      @(negedge clk);
      edge_now = (pkt_lsb != m_q);
      after = m_bw - (edge_now ? 2 : 0);
      if (after < 0) after = 0;
      m_avail = after > 2;
      check(avail == m_avail, $sformatf("avail %b expected %b (bw %0d)", avail, m_avail, m_bw));
      check(int'(bw) == m_bw, $sformatf("bw %0d expected %0d", bw, m_bw));
      if (!m_avail) blocked++;
      decide = avail && (greedy || ($urandom % 3 == 0));
      @(posedge clk);
      // model update at this edge, then the sender's register toggles
      m_q = pkt_lsb;
      m_bw = after + ((m_slot == 7) ? 5 : 0);
      if (m_bw > 10) m_bw = 10;
      m_slot = (m_slot + 1) % 8;
      if (decide) begin
        pkt_lsb <= ~pkt_lsb;
        sent++;
      end
    end
  endtask

  initial begin
    int s;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(160, 1'b1, s);     // greedy, reaches steady state
    run(160, 1'b1, s);     // 20 slots
    check(s >= 49 && s <= 51, $sformatf("steady rate %0d packets in 20 slots, expected 50", s));
    run(400, 1'b0, s);
    check(blocked > 0, "port was throttled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
