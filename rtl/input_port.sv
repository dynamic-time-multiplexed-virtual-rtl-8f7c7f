// input_port: buffered router input with one set of VC infrastructure per
// virtual channel and the control register.
//
// input_control steers link flits into NUM_VC input_vc_channel instances and
// returns their feedback (stop) lines to the upstream router.  Every cycle
// the control register (sel_vc) designates the active virtual channel: of
// the channels that hold an open connection, have a flit waiting and whose
// downstream buffer on the chosen output is not stopped, it picks the one
// with the best current priority from the slot table (vc_prio, 0 = highest).
// When every higher-priority channel is idle a lower one gets the slot, so
// bandwidth is never left unused; the description names this as the aim of
// the full scheme.  The selected flit is offered to its output port
// (sel_valid/sel_port/sel_flit); sel_accept pops it the same cycle.
// The request/grant side of each channel is exported to the arbiter.
module input_port
  import dtmvc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [COORD_W-1:0]                     cur_x,
  input  logic [COORD_W-1:0]                     cur_y,
  // link from the upstream router
  input  link_t                                  link_in,
  output logic [NUM_VC-1:0]                      stop_out,
  // control logic
  input  logic [NUM_VC-1:0][VC_W-1:0]            vc_prio,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]       ds_stop,
  // arbiter
  output logic [NUM_VC-1:0]                      req_valid,
  output logic [NUM_VC-1:0][NUM_PORTS-1:0]       port_req,
  output logic [NUM_VC-1:0][VC_W-1:0]            req_prio,
  output logic [NUM_VC-1:0][FLITS_W-1:0]         req_len,
  output logic [NUM_VC-1:0][NUM_PORTS-1:0]       out_port,
  input  logic [NUM_VC-1:0]                      conn_set,
  input  logic [NUM_VC-1:0][NUM_PORTS-1:0]       conn_port,
  input  logic [NUM_VC-1:0][FLITS_W-1:0]         conn_flits,
  // selected flit towards the output ports
  output logic                                   sel_valid,
  output logic [VC_W-1:0]                        sel_vc,
  output logic [NUM_PORTS-1:0]                   sel_port,
  output logic [VC_W-1:0]                        sel_prio,
  output logic [FLIT_W-1:0]                      sel_flit,
  input  logic                                   sel_accept
);
  logic [NUM_VC-1:0]             wr_en, vc_full, flit_avail, ready, send;
  logic [FLIT_W-1:0]             wr_data;
  logic [NUM_VC-1:0][FLIT_W-1:0] head_flit;
  logic [NUM_VC-1:0][FLITS_W-1:0] flits_left;

  input_control u_ictrl (
    .link_in, .vc_full, .wr_en, .wr_data, .stop(stop_out)
  );

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    input_vc_channel #(.DEPTH(DEPTH)) u_vc (
      .clk, .rst_n, .cur_x, .cur_y,
      .wr_en(wr_en[v]), .wr_data, .full(vc_full[v]),
      .req_valid(req_valid[v]), .port_req(port_req[v]), .prio(req_prio[v]),
      .req_len(req_len[v]),
      .conn_set(conn_set[v]), .conn_port(conn_port[v]), .conn_flits(conn_flits[v]),
      .out_port(out_port[v]), .flits_left(flits_left[v]),
      .flit_avail(flit_avail[v]), .head_flit(head_flit[v]),
      .send(send[v])
    );

    // downstream feedback line of this VC on the output it is connected to
    logic blocked;
    always_comb begin
      blocked = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++)
        if (out_port[v][o] && ds_stop[o][v]) blocked = 1'b1;
    end
    assign ready[v] = flit_avail[v] && !blocked;
    assign send[v]  = sel_accept && sel_valid && (sel_vc == VC_W'(v));
  end

  // control register: best-priority ready VC
  always_comb begin
    sel_valid = 1'b0;
    sel_vc    = '0;
    sel_prio  = '0;
    for (int v = 0; v < NUM_VC; v++) begin
      if (ready[v] && (!sel_valid || vc_prio[v] < sel_prio)) begin
        sel_valid = 1'b1;
        sel_vc    = VC_W'(v);
        sel_prio  = vc_prio[v];
      end
    end
  end

  assign sel_port = out_port[sel_vc];
  assign sel_flit = head_flit[sel_vc];
endmodule
