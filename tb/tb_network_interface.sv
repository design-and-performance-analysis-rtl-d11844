// tb_network_interface: packet building and message coding at the local port.
// The packet sent into the router must carry the destination unchanged and the
// message with its odd bits inverted; a packet coming out of the router must be
// handed over with the message restored; ready/valid pass straight through.
module tb_network_interface;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic pe_tx_valid, pe_tx_ready, pe_rx_valid, pe_rx_ready;
  addr_t pe_tx_dst, pe_rx_dst;
  logic [15:0] pe_tx_msg, pe_rx_msg;
  logic rt_in_valid, rt_in_ready, rt_out_valid, rt_out_ready;
  packet_t rt_in_data, rt_out_data;

  network_interface dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 500; k++) begin
      pe_tx_valid = 1'($urandom); pe_tx_dst = addr_t'($urandom); pe_tx_msg = 16'($urandom);
      rt_in_ready = 1'($urandom); rt_out_valid = 1'($urandom);
      rt_out_data = packet_t'($urandom); pe_rx_ready = 1'($urandom);
      #1;
      check(rt_in_valid == pe_tx_valid && pe_tx_ready == rt_in_ready, "tx handshake");
      check(rt_in_data.dst == pe_tx_dst, "tx header");
      check(rt_in_data.msg == (pe_tx_msg ^ 16'hAAAA), "tx coding");
      check(pe_rx_valid == rt_out_valid && rt_out_ready == pe_rx_ready, "rx handshake");
      check(pe_rx_dst == rt_out_data.dst, "rx header");
      check(pe_rx_msg == (rt_out_data.msg ^ 16'hAAAA), "rx decoding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
