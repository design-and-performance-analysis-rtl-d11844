// rr_arbiter: switch allocator of the router.
//
// Every input port presents a request (its queue holds a valid head packet) and
// the label of that packet, i.e. the output port it wants. For each output port
// the arbiter looks at the inputs whose label names it and, if the output can
// take a packet this cycle (out_free), grants one of them in round-robin order:
// the search starts one past the input granted last time on that output. The
// result drives the crossbar directly: sel[o] is the granted input and en[o]
// says output o is being written. Since an input asks for one output only, an
// input is granted at most once per cycle; grant[i] tells the queue to pop.
// That the arbiter turns labels and port validity into crossbar select lines
// follows the document; the round-robin policy is this design's choice.
//
// Timing: sel/en/grant are combinational from the inputs; the round-robin
// pointers advance at the clock edge after a grant.
module rr_arbiter
  import noc_pkg::port_e;
#(
  parameter int unsigned NPORTS = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPORTS-1:0]       req,
  input  port_e [NPORTS-1:0]      label,
  input  logic [NPORTS-1:0]       out_free,
  output logic [NPORTS-1:0][2:0]  sel,
  output logic [NPORTS-1:0]       en,
  output logic [NPORTS-1:0]       grant
);

  logic [NPORTS-1:0][2:0] ptr;

  int unsigned i;

  always_comb begin
    i     = 0;
    sel   = '0;
    en    = '0;
    grant = '0;
    for (int o = 0; o < NPORTS; o++) begin
      if (out_free[o]) begin
        for (int k = 0; k < NPORTS; k++) begin
          i = 32'(ptr[o]) + k;
          if (i >= NPORTS) i = i - NPORTS;
          if (!en[o] && req[i] && (32'(label[i]) == o)) begin
            en[o]    = 1'b1;
            sel[o]   = 3'(i);
            grant[i] = 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (en[o]) ptr[o] <= (32'(sel[o]) == NPORTS-1) ? 3'd0 : sel[o] + 3'd1;
      end
    end
  end

  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
