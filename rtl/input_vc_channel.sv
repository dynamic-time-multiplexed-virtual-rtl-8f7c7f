// input_vc_channel: one virtual channel of a buffered input port.
//
// Holds the VC's flit buffer and the four registers of the described input
// port: 'port request', 'priority', 'out port' and 'flits left'.  Life of a
// packet:
//   1. idle: when a header flit reaches the head of the buffer, the XY router
//      result is latched into 'port request' (one-hot) and the header's
//      priority field into 'priority'; req_len holds header+payload flits.
//   2. requesting: req_valid is high until the arbiter answers with conn_set,
//      which loads 'out port' (conn_port) and 'flits left' (conn_flits) and
//      clears 'port request'.
//   3. connected: flit_avail is high while a flit waits; each `send` pops one
//      flit and decrements 'flits left'; when it reaches zero 'out port' is
//      reset to zero, closing the connection.
// Timing: a header at the buffer head is requested one cycle later; the first
// flit can leave the cycle after the grant.  The header layout and the use of
// a length field for 'flits left' are this implementation's choices.
module input_vc_channel
  import dtmvc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [COORD_W-1:0]   cur_x,
  input  logic [COORD_W-1:0]   cur_y,
  // from input control
  input  logic                 wr_en,
  input  logic [FLIT_W-1:0]    wr_data,
  output logic                 full,
  // to / from the arbiter
  output logic                 req_valid,
  output logic [NUM_PORTS-1:0] port_req,
  output logic [VC_W-1:0]      prio,
  output logic [FLITS_W-1:0]   req_len,
  input  logic                 conn_set,
  input  logic [NUM_PORTS-1:0] conn_port,
  input  logic [FLITS_W-1:0]   conn_flits,
  // datapath
  output logic [NUM_PORTS-1:0] out_port,
  output logic [FLITS_W-1:0]   flits_left,
  output logic                 flit_avail,
  output logic [FLIT_W-1:0]    head_flit,
  input  logic                 send
);
  logic    empty;
  header_t hdr;
  logic [NUM_PORTS-1:0] route;

  vc_buffer #(.DEPTH(DEPTH), .WIDTH(FLIT_W)) u_buf (
    .clk, .rst_n,
    .wr_en, .wr_data,
    .rd_en(send), .rd_data(head_flit),
    .full, .empty
  );

  assign hdr = header_t'(head_flit);

  xy_routing u_xy (
    .cur_x, .cur_y, .dest_x(hdr.dest_x), .dest_y(hdr.dest_y), .port_req(route)
  );

  wire idle = (port_req == '0) && (out_port == '0);

  assign req_valid  = (port_req != '0);
  assign flit_avail = (out_port != '0) && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_req   <= '0;
      prio       <= '0;
      req_len    <= '0;
      out_port   <= '0;
      flits_left <= '0;
    end else begin
      if (idle && !empty) begin
        port_req <= route;
        prio     <= hdr.prio;
        req_len  <= FLITS_W'(hdr.len) + 1'b1;
      end
      if (conn_set) begin
        port_req   <= '0;
        out_port   <= conn_port;
        flits_left <= conn_flits;
      end else if (send) begin
        flits_left <= flits_left - 1'b1;
        if (flits_left == FLITS_W'(1)) out_port <= '0;
      end
    end
  end

  a_grant_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    conn_set |-> req_valid);
  a_send_only_when_connected: assert property (@(posedge clk) disable iff (!rst_n)
    send |-> flit_avail);
endmodule
