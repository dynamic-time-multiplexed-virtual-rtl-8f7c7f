// dtmvc_control: control logic of a router: time-frame counter, performance
// setting and slot table.
//
// The counter runs through a recurring frame of FRAME_CYCLES clocks (20 in
// the described example).  The slot-table row is count*ENTRIES/FRAME_CYCLES,
// so with 8 rows and 20 cycles each quarter of the frame lasts 5 cycles.
// The performance setting (PS0 = VC0 always first, PS3 = equal shares) can
// be written by a central monitor (ps_wr/ps_wr_val) or lowered by one step
// toward PS0 when a late VC0 packet is reported (late_vc0).  A requested
// change is held as `ps_next` and applied at the next frame start, when the
// slot table is rewritten; frame_start marks cycle 0 of each frame.  The
// update rules, the frame-boundary timing and the reset setting (PS3) are
// this implementation's choices.
module dtmvc_control
  import dtmvc_pkg::*;
#(
  parameter int FRAME_CYCLES = 20,
  parameter int ENTRIES      = 8,
  parameter int RESET_PS     = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ps_wr,
  input  logic [PS_W-1:0]             ps_wr_val,
  input  logic                        late_vc0,
  output logic [PS_W-1:0]             ps,
  output logic                        frame_start,
  output logic [$clog2(ENTRIES)-1:0]  slot_idx,
  output logic [NUM_VC-1:0][VC_W-1:0] vc_prio
);
  localparam int CW = $clog2(FRAME_CYCLES);
  localparam int IW = $clog2(ENTRIES) + 1;

  logic [CW-1:0]   cnt;
  logic [PS_W-1:0] ps_next;
  logic            last;

  assign last        = (cnt == CW'(FRAME_CYCLES - 1));
  assign frame_start = (cnt == '0);
  assign slot_idx    = $clog2(ENTRIES)'(((CW+IW)'(cnt) * (CW+IW)'(ENTRIES)) / (CW+IW)'(FRAME_CYCLES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ps      <= PS_W'(RESET_PS);
      ps_next <= PS_W'(RESET_PS);
    end else begin
      cnt <= last ? '0 : cnt + 1'b1;
      if (ps_wr)                      ps_next <= ps_wr_val;
      else if (late_vc0 && ps_next != '0) ps_next <= ps_next - 1'b1;
      if (last) ps <= ps_next;
    end
  end

  // rewrite the table together with the setting at the end of the frame
  slot_table #(.ENTRIES(ENTRIES), .RESET_PS(RESET_PS)) u_table (
    .clk, .rst_n,
    .load(last), .ps(ps_next),
    .rd_idx(slot_idx), .rd_prio(vc_prio)
  );
endmodule
