// tb_pb_xy_route: exhaustive check of the XY routing decision unit.
// Every pair of current and destination tiles of an 8 x 8 coordinate space is
// applied; the expected port comes from the signed coordinate differences
// (x first, then y, local when both are zero).
module tb_pb_xy_route;
  import pb_pkg::*;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  port_e              out_port;
  int checks = 0, failures = 0;

  pb_xy_route dut (.cur_x, .cur_y, .dst_x, .dst_y, .out_port);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            port_e exp;
            int ddx, ddy;
            cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
            dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
            ddx = dx - cx;
            ddy = dy - cy;
            if (ddx != 0)      exp = (ddx > 0) ? P_EAST : P_WEST;
            else if (ddy != 0) exp = (ddy > 0) ? P_NORTH : P_SOUTH;
            else               exp = P_LOCAL;
            #1;
            checks++;
            if (out_port !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL cur=(%0d,%0d) dst=(%0d,%0d) got %s exp %s",
                         cx, cy, dx, dy, out_port.name(), exp.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
