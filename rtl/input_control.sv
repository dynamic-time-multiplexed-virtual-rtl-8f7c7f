// input_control: front of an input port.
//
// Decodes the VC number that travels with each flit on the link and raises
// the write enable of that virtual channel's buffer; the flit itself is
// broadcast to all buffers.  It also drives the feedback lines, one per
// service level, back to the sending router: a line is high while the
// matching buffer has no free space, telling the sender to stop that VC.
// Combinational.  Carrying the VC number on the link and using "buffer full"
// as the stop condition are this implementation's choices.
module input_control
  import dtmvc_pkg::*;
(
  input  link_t              link_in,
  input  logic [NUM_VC-1:0]  vc_full,
  output logic [NUM_VC-1:0]  wr_en,
  output logic [FLIT_W-1:0]  wr_data,
  output logic [NUM_VC-1:0]  stop
);
  always_comb begin
    wr_en = '0;
    if (link_in.valid) wr_en[link_in.vc] = 1'b1;
  end
  assign wr_data = link_in.flit;
  assign stop    = vc_full;
endmodule
