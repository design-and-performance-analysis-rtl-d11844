// tb_xy_route: exhaustive check of XY label generation.
// For an 8x8 mesh every router position and every destination is compared with
// the rule "first move along x, then along y". A 3x3 instance checks that
// destinations outside the mesh are flagged invalid.
module tb_xy_route;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic [2:0] mx, my;
  addr_t dst;
  port_e lab, lab3;
  logic ok, ok3;

  xy_route                        dut  (.my_x(mx), .my_y(my), .dst(dst), .label(lab),  .dst_valid(ok));
  xy_route #(.ROWS(3), .COLS(3))  dut3 (.my_x(mx), .my_y(my), .dst(dst), .label(lab3), .dst_valid(ok3));

  function automatic port_e ref_route(int x, int y, int dx, int dy);
    if (dx != x) return (dx > x) ? P_EAST : P_WEST;
    if (dy != y) return (dy > y) ? P_NORTH : P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            mx = 3'(x); my = 3'(y); dst.x = 3'(dx); dst.y = 3'(dy);
            #1;
            checks++;
            if (lab != ref_route(x, y, dx, dy) || !ok) begin
              failures++;
              $display("FAIL at (%0d,%0d) to (%0d,%0d): %s", x, y, dx, dy, lab.name());
            end
            if (x < 3 && y < 3) begin
              checks++;
              if (ok3 != (dx < 3 && dy < 3)) begin
                failures++;
                $display("FAIL 3x3 validity to (%0d,%0d)", dx, dy);
              end
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
