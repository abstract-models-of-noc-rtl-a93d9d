// tb_xy_routing: exhaustive check of the XY routing decision. For every router
// position and every target address in an 8x8 range the chosen port must be
// East when the target lies to the east, West when to the west, and, once the
// x coordinates agree, North, South or Local by the y coordinate.
`timescale 1ns/1ps
module tb_xy_routing;
  import hermes_pkg::*;
  logic [7:0] my_x, my_y;
  logic [15:0] header;
  port_e out_port;

  xy_routing #(.FLIT_WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e exp;
    for (int mx = 0; mx < 8; mx++)
      for (int my = 0; my < 8; my++)
        for (int tx = 0; tx < 8; tx++)
          for (int ty = 0; ty < 8; ty++) begin
            my_x = 8'(mx); my_y = 8'(my);
            header = {8'(ty), 8'(tx)};
            #1;
            if (tx > mx)      exp = EAST;
            else if (tx < mx) exp = WEST;
            else if (ty > my) exp = NORTH;
            else if (ty < my) exp = SOUTH;
            else              exp = LOCAL;
            checks++;
            if (out_port != exp) begin
              failures++;
              if (failures < 10) $display("FAIL at (%0d,%0d) to (%0d,%0d): %s", mx, my, tx, ty, out_port.name());
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
