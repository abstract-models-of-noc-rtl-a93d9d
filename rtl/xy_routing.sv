// xy_routing: the XY routing decision of a HERMES router.
//
// The header flit holds the target router address, y in the upper half and x
// in the lower half. A packet first travels along the x dimension until its x
// coordinate matches, then along y, and is delivered to the Local port at the
// target router. East is taken as growing x and North as growing y, which is
// this design's convention. Purely combinational.
module xy_routing
  import hermes_pkg::*;
#(
  parameter int unsigned FLIT_WIDTH = 16
) (
  input  logic [FLIT_WIDTH/2-1:0] my_x,
  input  logic [FLIT_WIDTH/2-1:0] my_y,
  input  logic [FLIT_WIDTH-1:0]   header,
  output port_e                   out_port
);
  localparam int unsigned HW = FLIT_WIDTH / 2;

  logic [HW-1:0] tgt_x, tgt_y;
  assign tgt_x = header[HW-1:0];
  assign tgt_y = header[FLIT_WIDTH-1:HW];

  always_comb begin
    if      (tgt_x > my_x) out_port = EAST;
    else if (tgt_x < my_x) out_port = WEST;
    else if (tgt_y > my_y) out_port = NORTH;
    else if (tgt_y < my_y) out_port = SOUTH;
    else                   out_port = LOCAL;
  end

endmodule
