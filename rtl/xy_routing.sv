// xy_routing: dimension-ordered (XY) route computation.
//
// A packet first travels along X until its column matches, then along Y,
// then leaves on the local port.  Output is a one-hot port request in the
// order East, West, North, South, Local (bit index = dtmvc_pkg::port_e).
// North is +Y.  Purely combinational.  XY routing is what the design
// description specifies; the port numbering and direction of Y are this
// implementation's choice.
module xy_routing
  import dtmvc_pkg::*;
(
  input  logic [COORD_W-1:0]   cur_x,
  input  logic [COORD_W-1:0]   cur_y,
  input  logic [COORD_W-1:0]   dest_x,
  input  logic [COORD_W-1:0]   dest_y,
  output logic [NUM_PORTS-1:0] port_req
);
  always_comb begin
    port_req = '0;
    if (dest_x > cur_x)      port_req[P_EAST]  = 1'b1;
    else if (dest_x < cur_x) port_req[P_WEST]  = 1'b1;
    else if (dest_y > cur_y) port_req[P_NORTH] = 1'b1;
    else if (dest_y < cur_y) port_req[P_SOUTH] = 1'b1;
    else                     port_req[P_LOCAL] = 1'b1;
  end
endmodule
