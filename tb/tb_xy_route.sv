// tb_xy_route: exhaustive check of the XY route decision.
//
// Every (router, destination) pair of a 4x4 coordinate space is applied and
// the port is compared with a reference derived from the mesh geometry: the
// packet must move along x first (East when the destination column is
// larger, West when smaller), then along y (North when the destination row
// is larger, South when smaller), and leave through Local only at its own
// router. The module is combinational, so the result is checked after a
// settle delay.
module tb_xy_route;
  import noc_pkg::*;

  logic [COORD_W-1:0] dest, here;
  port_e              port;
  int checks = 0, failures = 0;

  xy_route dut (.dest(dest), .here(here), .port(port));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e exp;
    for (int cx = 0; cx < 4; cx++)
      for (int cy = 0; cy < 4; cy++)
        for (int dx = 0; dx < 4; dx++)
          for (int dy = 0; dy < 4; dy++) begin
            here = COORD_W'((cx << 2) | cy);
            dest = COORD_W'((dx << 2) | dy);
            // reference: the step that reduces the x distance first
            if (dx != cx)      exp = (dx - cx > 0) ? PORT_E : PORT_W;
            else if (dy != cy) exp = (dy - cy > 0) ? PORT_N : PORT_S;
            else               exp = PORT_L;
            #1;
            checks++;
            if (port !== exp) begin
              failures++;
              $display("FAIL here=(%0d,%0d) dest=(%0d,%0d) got %s exp %s",
                       cx, cy, dx, dy, port.name(), exp.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
