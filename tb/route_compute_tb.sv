// route_compute_tb: exhaustive check of X-Y routing for every current and
// destination coordinate of a 16x16 mesh: X is resolved first (east if the
// destination column is larger), then Y (north if the row is larger), and a
// packet at its destination goes to the local port.
module route_compute_tb;
  import dsb_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e out_port;
  int checks = 0, failures = 0;

  route_compute dut (.*);

  initial begin
    for (int cx = 0; cx < 16; cx++)
      for (int cy = 0; cy < 16; cy += 3)
        for (int dx = 0; dx < 16; dx++)
          for (int dy = 0; dy < 16; dy++) begin
            port_e exp;
            cur_x = 4'(cx); cur_y = 4'(cy); dst_x = 4'(dx); dst_y = 4'(dy);
            #1;
            if (dx != cx) exp = (dx > cx) ? PORT_EAST : PORT_WEST;
            else if (dy != cy) exp = (dy > cy) ? PORT_NORTH : PORT_SOUTH;
            else exp = PORT_LOCAL;
            checks++;
            if (out_port != exp) begin
              failures++;
              if (failures < 10) $display("FAIL: (%0d,%0d)->(%0d,%0d) gave %0d", cx, cy, dx, dy, out_port);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
