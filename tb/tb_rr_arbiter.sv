// tb_rr_arbiter: random requests against an independent round-robin model.
// Every cycle the model picks, for each free output, the first requesting input
// at or after its own pointer; sel, en and grant must match it exactly. The
// pointer moves one past the winner. Also counts cycles in which two or more
// inputs competed for the same output, so that the round-robin order is
// actually exercised.
module tb_rr_arbiter;
  import noc_pkg::*;
  int checks = 0, failures = 0, conflicts = 0;

  logic clk = 0, rst_n = 0;
  logic [4:0] req = '0, out_free = '0, en, grant;
  port_e [4:0] label;
  logic [4:0][2:0] sel;
  int mptr[5];

  rr_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5; i++) begin label[i] = P_LOCAL; mptr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        req[i]   = ($urandom % 4) != 0;
        label[i] = port_e'($urandom % 5);
        out_free[i] = ($urandom % 4) != 0;
      end
      #1;
      for (int o = 0; o < 5; o++) begin
        int win, ncand;
        win = -1; ncand = 0;
        for (int k = 0; k < 5; k++) begin
          int i;
          i = (mptr[o] + k) % 5;
          if (req[i] && int'(label[i]) == o) begin
            ncand++;
            if (win < 0 && out_free[o]) win = i;
          end
        end
        if (ncand > 1 && out_free[o]) conflicts++;
        checks++;
        if (en[o] != (win >= 0) || (win >= 0 && int'(sel[o]) != win)) begin
          failures++;
          $display("FAIL out %0d: en %b sel %0d, expected win %0d", o, en[o], sel[o], win);
        end
        if (win >= 0) begin
          checks++;
          if (!grant[win]) begin failures++; $display("FAIL grant %0d missing", win); end
          mptr[o] = (win + 1) % 5;
        end
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL: no competing requests seen"); end
    $display("competing requests: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
