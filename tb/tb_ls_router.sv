// tb_ls_router: one router at (3,3) of a 6x6 mesh driven on all five ports.
// Each input port sends a stream of packets with random destinations (some of
// them outside the 6x6 mesh); the message carries the input port and a sequence
// number. The expected output port of each packet is worked out here with the
// XY rule; every packet must leave on that port, unchanged, and in order with
// the other packets of the same input/output pair. Invalid packets must be
// dropped and reported. Outputs are randomly not ready, so queues fill up and
// push back (port_full) and the NoC managers throttle ports (port_avail low).
// A first phase on an idle router checks the two-cycle latency.
module tb_ls_router;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  int n_full = 0, n_throttle = 0, n_drop = 0, n_invalid_sent = 0, n_recv = 0;

  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid = '0, in_ready, out_valid, out_ready = '1;
  packet_t [4:0] in_data = '0, out_data;
  logic [4:0] port_full, port_avail, drop_invalid, sent;
  logic [4:0][BW_W-1:0] port_bw;
  int n_sent_strobe = 0;

  ls_router #(.ROWS(6), .COLS(6)) dut (
    .clk, .rst_n, .my_x(3'd3), .my_y(3'd3),
    .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .port_full, .port_avail, .port_bw, .drop_invalid, .sent);

  always #5 clk = ~clk;

  packet_t expq[5][5][$];   // [input][output]
  packet_t srcq[5][$];

  function automatic int ref_port(addr_t d);
    if (d.x != 3) return (d.x > 3) ? 1 : 2;
    if (d.y != 3) return (d.y > 3) ? 3 : 4;
    return 0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- latency on an idle router: West input to East output
    @(negedge clk);
    in_valid[P_WEST] = 1; in_data[P_WEST] = '{dst: '{x: 3'd5, y: 3'd1}, msg: 16'h1234};
    @(posedge clk);
    @(negedge clk);
    in_valid = '0;
    lat = 1;
    while (!out_valid[P_EAST] && lat < 10) begin @(negedge clk); lat++; end
    check(lat == 2, $sformatf("hop latency %0d cycles, expected 2", lat));
    check(out_data[P_EAST] == packet_t'({3'd5, 3'd1, 16'h1234}), "latency packet data");
    @(negedge clk);
    // ---- random traffic on all ports
    for (int p = 0; p < 5; p++)
      for (int s = 0; s < 300; s++) begin
        packet_t pk;
        pk.dst.x = 3'($urandom % 8);
        pk.dst.y = 3'($urandom % 8);
        if ($urandom % 8 != 0) begin pk.dst.x = 3'($urandom % 6); pk.dst.y = 3'($urandom % 6); end
        pk.msg = {3'(p), 13'(s)};
        srcq[p].push_back(pk);
      end
    for (int c = 0; c < 6000; c++) begin
      out_ready = (c < 2500) ? 5'($urandom) : 5'b11111;
      for (int p = 0; p < 5; p++) begin
        in_valid[p] = (srcq[p].size() > 0) && ($urandom % 4 != 0);
        if (srcq[p].size() > 0) in_data[p] = srcq[p][0];
      end
      #1;
      n_full     += $countones(port_full);
      n_throttle += $countones(~port_avail);
      n_drop     += $countones(drop_invalid);
      n_sent_strobe += $countones(sent);
      for (int o = 0; o < 5; o++) begin
        check(int'(port_bw[o]) <= BW_MAX, "budget within ceiling");
        check(!port_avail[o] || port_bw[o] > 2, "a port is never available with a budget of 2 or less");
      end
      for (int o = 0; o < 5; o++)
        if (out_valid[o] && out_ready[o]) begin
          int ip;
          ip = int'(out_data[o].msg[15:13]);
          n_recv++;
          if (ip > 4 || expq[ip][o].size() == 0) check(0, $sformatf("unexpected packet %h on port %0d", out_data[o], o));
          else check(out_data[o] == expq[ip][o].pop_front(), $sformatf("order/data on port %0d", o));
        end
      for (int p = 0; p < 5; p++)
        if (in_valid[p] && in_ready[p]) begin
          packet_t pk;
          pk = srcq[p].pop_front();
          if (pk.dst.x < 6 && pk.dst.y < 6) expq[p][ref_port(pk.dst)].push_back(pk);
          else n_invalid_sent++;
        end
      @(negedge clk);
    end
    for (int p = 0; p < 5; p++) begin
      check(srcq[p].size() == 0, $sformatf("input %0d not drained", p));
      for (int o = 0; o < 5; o++) check(expq[p][o].size() == 0, $sformatf("packets %0d->%0d missing", p, o));
    end
    check(n_drop == n_invalid_sent && n_drop > 0, $sformatf("dropped %0d of %0d invalid", n_drop, n_invalid_sent));
    check(n_sent_strobe == n_recv, $sformatf("sent strobes %0d vs received %0d", n_sent_strobe, n_recv));
    check(n_full > 0, "an input queue filled up");
    check(n_throttle > 0, "a NoC manager throttled a port");
    $display("received %0d, dropped %0d, full-cycles %0d, throttled port-cycles %0d",
             n_recv, n_drop, n_full, n_throttle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
