// dtmvc_noc: uniform 2-D mesh of dtmvc_router instances.
//
// Router (x, y) sits at index y*MESH_X + x.  Neighbouring routers are joined
// East<->West and North<->South (North = +y), each link with its per-VC
// feedback lines running the other way.  Ports on the mesh edge receive no
// traffic and see no stop; XY routing never sends a packet there.  The
// local port of every router, and its performance-setting controls
// (monitor write, late-packet report), are brought out as arrays indexed by
// router.  The mesh size (3x3) is this implementation's choice.
module dtmvc_noc
  import dtmvc_pkg::*;
#(
  parameter int MESH_X       = 3,
  parameter int MESH_Y       = 3,
  parameter int DEPTH        = 8,
  parameter int FRAME_CYCLES = 20,
  parameter int RESET_PS     = 3
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  link_t [MESH_X*MESH_Y-1:0]              local_in,
  output logic  [MESH_X*MESH_Y-1:0][NUM_VC-1:0]  local_stop_out,
  output link_t [MESH_X*MESH_Y-1:0]              local_out,
  input  logic  [MESH_X*MESH_Y-1:0][NUM_VC-1:0]  local_stop_in,
  input  logic  [MESH_X*MESH_Y-1:0]              ps_wr,
  input  logic  [MESH_X*MESH_Y-1:0][PS_W-1:0]    ps_wr_val,
  input  logic  [MESH_X*MESH_Y-1:0]              late_vc0,
  output logic  [MESH_X*MESH_Y-1:0][PS_W-1:0]    ps,
  output logic  [MESH_X*MESH_Y-1:0]              frame_start
);
  localparam int N = MESH_X * MESH_Y;

  link_t [N-1:0][NUM_PORTS-1:0]             lin, lout;
  logic  [N-1:0][NUM_PORTS-1:0][NUM_VC-1:0] sin, sout;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int I = y * MESH_X + x;

      dtmvc_router #(.DEPTH(DEPTH), .FRAME_CYCLES(FRAME_CYCLES), .RESET_PS(RESET_PS)) u_r (
        .clk, .rst_n,
        .cur_x(COORD_W'(x)), .cur_y(COORD_W'(y)),
        .link_in(lin[I]), .stop_out(sout[I]),
        .link_out(lout[I]), .stop_in(sin[I]),
        .ps_wr(ps_wr[I]), .ps_wr_val(ps_wr_val[I]), .late_vc0(late_vc0[I]),
        .ps(ps[I]), .frame_start(frame_start[I])
      );

      // east side
      if (x < MESH_X - 1) begin : g_e
        assign lin[I][P_EAST] = lout[I+1][P_WEST];
        assign sin[I][P_EAST] = sout[I+1][P_WEST];
      end else begin : g_ee
        assign lin[I][P_EAST] = '0;
        assign sin[I][P_EAST] = '0;
      end
      // west side
      if (x > 0) begin : g_w
        assign lin[I][P_WEST] = lout[I-1][P_EAST];
        assign sin[I][P_WEST] = sout[I-1][P_EAST];
      end else begin : g_we
        assign lin[I][P_WEST] = '0;
        assign sin[I][P_WEST] = '0;
      end
      // north side (+y)
      if (y < MESH_Y - 1) begin : g_n
        assign lin[I][P_NORTH] = lout[I+MESH_X][P_SOUTH];
        assign sin[I][P_NORTH] = sout[I+MESH_X][P_SOUTH];
      end else begin : g_ne
        assign lin[I][P_NORTH] = '0;
        assign sin[I][P_NORTH] = '0;
      end
      // south side
      if (y > 0) begin : g_s
        assign lin[I][P_SOUTH] = lout[I-MESH_X][P_NORTH];
        assign sin[I][P_SOUTH] = sout[I-MESH_X][P_NORTH];
      end else begin : g_se
        assign lin[I][P_SOUTH] = '0;
        assign sin[I][P_SOUTH] = '0;
      end
      // local port
      assign lin[I][P_LOCAL]   = local_in[I];
      assign sin[I][P_LOCAL]   = local_stop_in[I];
      assign local_out[I]      = lout[I][P_LOCAL];
      assign local_stop_out[I] = sout[I][P_LOCAL];
    end
  end
endmodule
