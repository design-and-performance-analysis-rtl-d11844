// tb_noc_mesh: end-to-end test of the 3x3 mesh at reduced size.
// Every node sends 120 packets to random destinations through its network
// interface; each message carries the source node and a sequence number, and one
// in eight is the alternating pattern 5555. A scoreboard keyed by destination and
// message checks that every packet reaches the node it names, with its message
// decoded, and nothing else arrives. Receivers are randomly not ready, so
// packets back up into the mesh. Counted mechanisms, each of which must occur:
// a full input queue pushing back, a port throttled by its NoC manager, two
// inputs competing for one output, a receiver holding the mesh off, a packet
// that turns from X to Y, message coding on injection, and a packet with a destination outside
// the mesh being dropped. A first
// phase on the idle mesh checks the latency of two cycles per router from
// corner (0,0) to corner (2,2).
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int R = 3, C = 3, N = R * C, NPKT = 120;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic  [N-1:0]              pe_tx_valid = '0, pe_tx_ready, pe_rx_valid, pe_rx_ready = '1;
  addr_t [N-1:0]              pe_tx_dst = '0, pe_rx_dst;
  logic  [N-1:0][MSG_W-1:0]   pe_tx_msg = '0, pe_rx_msg;
  logic  [N-1:0][NPORTS-1:0]  port_full, port_avail, drop_invalid, port_sent;
  logic  [N-1:0][NPORTS-1:0][BW_W-1:0] port_bw;

  noc_mesh #(.ROWS(3), .COLS(3)) dut (.*);

  always #5 clk = ~clk;

  // arbitration conflicts: an input that wanted an output which another input got
  int conflict_cnt[N];
  for (genvar y = 0; y < R; y++) begin : g_my
    for (genvar x = 0; x < C; x++) begin : g_mx
      initial conflict_cnt[y*C+x] = 0;
      always @(negedge clk) begin
        for (int i = 0; i < NPORTS; i++)
          if (dut.g_row[y].g_col[x].u_router.req[i] && !dut.g_row[y].g_col[x].u_router.grant[i] &&
              dut.g_row[y].g_col[x].u_router.xen[dut.g_row[y].g_col[x].u_router.label[i]])
            conflict_cnt[y*C+x]++;
      end
    end
  end

  typedef struct packed { addr_t dst; logic [15:0] msg; } item_t;
  item_t srcq[N][$];
  int    expect_cnt[item_t];
  int    n_full = 0, n_throttle = 0, n_hold = 0, n_turn = 0, n_coded = 0, n_drop = 0;
  int    n_recv = 0, n_invalid_sent = 0, n_sent = 0, n_local_sent = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, conflicts;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // ---- latency across the idle mesh, corner to corner
    @(negedge clk);
    pe_tx_valid[0] = 1;
    pe_tx_dst[0]   = '{x: 3'(C-1), y: 3'(R-1)};
    pe_tx_msg[0]   = 16'hbeef;
    #1 check(pe_tx_ready[0], "idle mesh accepts");
    @(negedge clk);
    pe_tx_valid[0] = 0;
    lat = 1;
    while (!pe_rx_valid[N-1] && lat < 200) begin @(negedge clk); lat++; end
    check(lat == 2 * (R - 1 + C - 1 + 1), $sformatf("corner-to-corner latency %0d, expected %0d",
          lat, 2 * (R - 1 + C - 1 + 1)));
    check(pe_rx_msg[N-1] == 16'hbeef && pe_rx_dst[N-1] == '{x: 3'(C-1), y: 3'(R-1)}, "latency packet");
    @(negedge clk);
    // ---- random traffic
    for (int n = 0; n < N; n++)
      for (int s = 0; s < NPKT; s++) begin
        item_t it;
        it.dst.x = 3'($urandom % C);
        it.dst.y = 3'($urandom % R);
        if ($urandom % 16 == 0) it.dst.x = 3'(C + $urandom % (8 - C));
        it.msg = ($urandom % 8 == 0) ? 16'h5555 : {6'(n), 10'(s)};
        srcq[n].push_back(it);
      end
    for (int c = 0; c < 6000; c++) begin
      for (int n = 0; n < N; n++) begin
        pe_rx_ready[n] = (c < 6000 / 3) ? ($urandom % 3 == 0) : 1'b1;
        pe_tx_valid[n] = (srcq[n].size() > 0) && ($urandom % 2 == 0);
        if (srcq[n].size() > 0) begin
          pe_tx_dst[n] = srcq[n][0].dst;
          pe_tx_msg[n] = srcq[n][0].msg;
        end
      end
      #1;
      for (int n = 0; n < N; n++) begin
        n_full     += $countones(port_full[n]);
        n_throttle += $countones(~port_avail[n]);
        n_drop     += $countones(drop_invalid[n]);
        if (pe_rx_valid[n] && !pe_rx_ready[n]) n_hold++;
        if (port_sent[n][P_LOCAL]) n_local_sent++;
        if (pe_tx_valid[n]) begin
          check(dut.r_in_data[n][P_LOCAL].msg == (pe_tx_msg[n] ^ 16'haaaa), "message coded on injection");
          n_coded++;
        end
        if (pe_rx_valid[n] && pe_rx_ready[n]) begin
          item_t got;
          got.dst = pe_rx_dst[n];
          got.msg = pe_rx_msg[n];
          n_recv++;
          check(32'(got.dst.x) == n % C && 32'(got.dst.y) == n / C,
                $sformatf("packet for (%0d,%0d) delivered at node %0d", got.dst.x, got.dst.y, n));
          if (expect_cnt.exists(got) && expect_cnt[got] > 0) begin
            expect_cnt[got]--;
            checks++;
          end else check(0, $sformatf("unexpected packet %h at node %0d", got, n));
        end
        if (pe_tx_valid[n] && pe_tx_ready[n]) begin
          item_t it;
          it = srcq[n].pop_front();
          n_sent++;
          if (32'(it.dst.x) < C && 32'(it.dst.y) < R) begin
            if (expect_cnt.exists(it)) expect_cnt[it]++; else expect_cnt[it] = 1;
            if (32'(it.dst.x) != n % C && 32'(it.dst.y) != n / C) n_turn++;
          end else n_invalid_sent++;
        end
      end
      @(negedge clk);
    end
    for (int n = 0; n < N; n++) check(srcq[n].size() == 0, $sformatf("node %0d still has packets to send", n));
    foreach (expect_cnt[k]) check(expect_cnt[k] == 0, $sformatf("packet %h never arrived", k));
    conflicts = 0;
    for (int n = 0; n < N; n++) conflicts += conflict_cnt[n];
    $display("sent %0d received %0d dropped %0d | full %0d throttled %0d conflicts %0d held %0d turns %0d coded %0d",
             n_sent, n_recv, n_drop, n_full, n_throttle, conflicts, n_hold, n_turn, n_coded);
    check(n_local_sent == n_recv, $sformatf("local sent strobes %0d vs deliveries %0d", n_local_sent, n_recv));
    check(n_full > 0, "input queue back-pressure happened");
    check(n_throttle > 0, "NoC manager throttling happened");
    check(conflicts > 0, "arbitration conflict happened");
    check(n_hold > 0, "receiver back-pressure happened");
    check(n_turn > 0, "an XY turn happened");
    check(n_coded > 0, "message coding happened");
    check(n_drop == n_invalid_sent && n_drop > 0, $sformatf("dropped %0d of %0d invalid", n_drop, n_invalid_sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
