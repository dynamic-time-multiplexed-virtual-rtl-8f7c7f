// output_port: crossbar column and flit-level arbitration for one output.
//
// Every input port offers at most one flit per cycle (the flit of its active
// VC, with the VC's current slot-table priority).  Of the offers aimed at
// this output, the one with the best priority (lowest value) is driven onto
// the outgoing link together with its VC number, and that input is told
// (accept) that its flit has gone.  Because each VC owns its own lane, the
// offers for one output always belong to different VCs, so priorities never
// tie; ties would fall to the lowest input index.  This per-cycle choice is
// what interleaves the virtual channels in time: the slot table changes
// the order from one part of the frame to the next.  Combinational.
module output_port
  import dtmvc_pkg::*;
#(
  parameter int unsigned PORT = 0
) (
  input  logic [NUM_PORTS-1:0]                  in_valid,
  input  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]   in_port,
  input  logic [NUM_PORTS-1:0][VC_W-1:0]        in_vc,
  input  logic [NUM_PORTS-1:0][VC_W-1:0]        in_prio,
  input  logic [NUM_PORTS-1:0][FLIT_W-1:0]      in_flit,
  output logic [NUM_PORTS-1:0]                  accept,
  output link_t                                 link_out
);
  logic              found;
  logic [VC_W-1:0]   best;
  logic [$clog2(NUM_PORTS)-1:0] win;

  always_comb begin
    found = 1'b0;
    best  = '0;
    win   = '0;
    for (int p = 0; p < NUM_PORTS; p++)
      if (in_valid[p] && in_port[p][PORT] && (!found || in_prio[p] < best)) begin
        found = 1'b1;
        best  = in_prio[p];
        win   = ($clog2(NUM_PORTS))'(p);
      end
    accept = '0;
    if (found) accept[win] = 1'b1;
    link_out.valid = found;
    link_out.vc    = in_vc[win];
    link_out.flit  = in_flit[win];
  end
endmodule
