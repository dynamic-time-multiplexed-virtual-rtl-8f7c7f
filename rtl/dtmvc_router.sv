// dtmvc_router: five-port mesh router with dynamic time-multiplexed virtual
// channels.
//
// Ports are East, West, North, South and Local (dtmvc_pkg::port_e).  Each
// input port buffers NUM_VC virtual channels, routes headers XY and holds a
// connection per VC (wormhole switching).  conn_arbiter opens connections;
// one output_port per direction moves one flit per cycle, choosing between
// the virtual channels by the priorities the slot table gives for the
// current part of the time frame.  dtmvc_control owns the frame counter,
// the performance setting (PS0..PS3) and the slot table; one instance
// serves all ports.
// Links: link_in/link_out carry {valid, vc, flit}; stop_out/stop_in are the
// per-VC feedback lines (high = receiver buffer full, do not send).  A flit
// leaves on link_out in the same cycle it is taken from the input buffer,
// so a header needs three cycles from arrival to departure (buffer, port
// request, grant) and body flits follow one per cycle.
module dtmvc_router
  import dtmvc_pkg::*;
#(
  parameter int DEPTH        = 8,
  parameter int FRAME_CYCLES = 20,
  parameter int ENTRIES      = 8,
  parameter int RESET_PS     = 3
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [COORD_W-1:0]                cur_x,
  input  logic [COORD_W-1:0]                cur_y,
  input  link_t [NUM_PORTS-1:0]             link_in,
  output logic  [NUM_PORTS-1:0][NUM_VC-1:0] stop_out,
  output link_t [NUM_PORTS-1:0]             link_out,
  input  logic  [NUM_PORTS-1:0][NUM_VC-1:0] stop_in,
  input  logic                              ps_wr,
  input  logic  [PS_W-1:0]                  ps_wr_val,
  input  logic                              late_vc0,
  output logic  [PS_W-1:0]                  ps,
  output logic                              frame_start
);
  logic [NUM_VC-1:0][VC_W-1:0]                   vc_prio;
  logic [$clog2(ENTRIES)-1:0]                    slot_idx;

  logic [NUM_PORTS-1:0][NUM_VC-1:0]              req_valid, conn_set;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] port_req, out_port, conn_port;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][VC_W-1:0]    req_prio;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][FLITS_W-1:0] req_len, conn_flits;

  logic [NUM_PORTS-1:0]                          sel_valid, sel_accept;
  logic [NUM_PORTS-1:0][VC_W-1:0]                sel_vc, sel_prio;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]           sel_port;
  logic [NUM_PORTS-1:0][FLIT_W-1:0]              sel_flit;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]           acc;   // [output][input]

  dtmvc_control #(.FRAME_CYCLES(FRAME_CYCLES), .ENTRIES(ENTRIES), .RESET_PS(RESET_PS)) u_ctrl (
    .clk, .rst_n, .ps_wr, .ps_wr_val, .late_vc0,
    .ps, .frame_start, .slot_idx, .vc_prio
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    input_port #(.DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .cur_x, .cur_y,
      .link_in(link_in[p]), .stop_out(stop_out[p]),
      .vc_prio, .ds_stop(stop_in),
      .req_valid(req_valid[p]), .port_req(port_req[p]), .req_prio(req_prio[p]),
      .req_len(req_len[p]), .out_port(out_port[p]),
      .conn_set(conn_set[p]), .conn_port(conn_port[p]), .conn_flits(conn_flits[p]),
      .sel_valid(sel_valid[p]), .sel_vc(sel_vc[p]), .sel_port(sel_port[p]),
      .sel_prio(sel_prio[p]), .sel_flit(sel_flit[p]), .sel_accept(sel_accept[p])
    );
  end

  conn_arbiter u_arb (
    .clk, .rst_n, .req_valid, .port_req, .req_len, .out_port,
    .conn_set, .conn_port, .conn_flits
  );

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    output_port #(.PORT(o)) u_out (
      .in_valid(sel_valid), .in_port(sel_port), .in_vc(sel_vc),
      .in_prio(sel_prio), .in_flit(sel_flit),
      .accept(acc[o]), .link_out(link_out[o])
    );
  end

  always_comb begin
    sel_accept = '0;
    for (int o = 0; o < NUM_PORTS; o++) sel_accept |= acc[o];
  end
endmodule
