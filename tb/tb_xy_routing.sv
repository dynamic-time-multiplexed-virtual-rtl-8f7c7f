// tb_xy_routing: every current/destination pair in an 8x8 grid against the
// XY rule written out here (X first, then Y; North = +Y).
module tb_xy_routing;
  import dtmvc_pkg::*;
  logic [COORD_W-1:0] cur_x, cur_y, dest_x, dest_y;
  logic [NUM_PORTS-1:0] port_req;
  int checks = 0, failures = 0;

  xy_routing dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            logic [4:0] exp;
            cur_x = cx; cur_y = cy; dest_x = dx; dest_y = dy;
            #1;
            if (dx > cx)      exp = 5'b00001;
            else if (dx < cx) exp = 5'b00010;
            else if (dy > cy) exp = 5'b00100;
            else if (dy < cy) exp = 5'b01000;
            else              exp = 5'b10000;
            checks++;
            if (port_req !== exp) begin
              failures++;
              $display("FAIL cur (%0d,%0d) dest (%0d,%0d) got %b exp %b", cx, cy, dx, dy, port_req, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
