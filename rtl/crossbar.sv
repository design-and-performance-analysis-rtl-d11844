// crossbar: five-by-five switch built from one multiplexer per output port.
//
// Output o carries din[sel[o]] while en[o] is set and zero otherwise (also for a
// select value that names no port). Each output has its own 3-bit select line so
// that disjoint input/output pairs are connected at the same time. One MUX per
// port, the 5-bit enable bus and the 3-bit selects follow the document; giving
// every MUX its own select and the zero output of an idle MUX are this design's
// choices. Purely combinational.
module crossbar #(
  parameter int unsigned NPORTS = 5,
  parameter int unsigned W      = 22
) (
  input  logic [NPORTS-1:0][W-1:0] din,
  input  logic [NPORTS-1:0][2:0]   sel,
  input  logic [NPORTS-1:0]        en,
  output logic [NPORTS-1:0][W-1:0] dout
);

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      dout[o] = '0;
      if (en[o]) begin
        for (int i = 0; i < NPORTS; i++) begin
          if (32'(sel[o]) == i) dout[o] = din[i];
        end
      end
    end
  end

endmodule
