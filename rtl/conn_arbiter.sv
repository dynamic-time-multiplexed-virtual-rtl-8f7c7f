// conn_arbiter: connection set-up for all input virtual channels of a router.
//
// Each output port offers one wormhole lane per virtual channel.  An input
// VC whose 'port request' register names output o asks for lane (o, v) of
// its own VC v.  A lane is free when no input VC has it in its 'out port'
// register.  Among the inputs asking for the same free lane, a round-robin
// pointer per lane picks one (all of them share the same service level, so
// priority cannot separate them).  The grant sets that input VC's 'out port'
// (the requested port) and 'flits left' (the requested length) in the same
// clock.  Contention between different VCs on an output is resolved later,
// flit by flit, with the slot-table priorities (output_port).  The
// round-robin tie-break is this implementation's choice.
module conn_arbiter
  import dtmvc_pkg::*;
(
  input  logic                                          clk,
  input  logic                                          rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]              req_valid,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] port_req,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][FLITS_W-1:0] req_len,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] out_port,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0]              conn_set,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] conn_port,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0][FLITS_W-1:0] conn_flits
);
  localparam int PW = $clog2(NUM_PORTS);

  // last granted input port per lane
  logic [NUM_PORTS-1:0][NUM_VC-1:0][PW-1:0] rr_q;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]         lane_busy;
  logic [NUM_PORTS-1:0][NUM_VC-1:0]         lane_gnt;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][PW-1:0] lane_win;

  always_comb begin
    int p;
    p         = 0;
    conn_set  = '0;
    lane_busy = '0;
    lane_gnt  = '0;
    lane_win  = '0;
    for (int q = 0; q < NUM_PORTS; q++)
      for (int v = 0; v < NUM_VC; v++)
        for (int o = 0; o < NUM_PORTS; o++)
          if (out_port[q][v][o]) lane_busy[o][v] = 1'b1;

    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NUM_VC; v++)
        if (!lane_busy[o][v])
          for (int k = 1; k <= NUM_PORTS; k++) begin
            p = (int'(rr_q[o][v]) + k) % NUM_PORTS;
            if (!lane_gnt[o][v] && req_valid[p][v] && port_req[p][v][o]) begin
              lane_gnt[o][v] = 1'b1;
              lane_win[o][v] = PW'(p);
              conn_set[p][v] = 1'b1;
            end
          end
  end

  assign conn_port  = port_req;
  assign conn_flits = req_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_q <= '0;
    else
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++)
          if (lane_gnt[o][v]) rr_q[o][v] <= lane_win[o][v];
  end
endmodule
