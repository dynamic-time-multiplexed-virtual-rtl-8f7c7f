// vc_buffer: flit FIFO of one virtual channel of an input port.
//
// Each virtual channel owns a separate buffer so that a blocked packet on one
// channel does not hold up the others.  Circular buffer of DEPTH entries with
// read and write pointers and an occupancy count.  rd_data shows the head
// flit combinationally (first-word fall-through); a write is lost if full,
// which the sender prevents by obeying the feedback line (full).  Depth and
// width are this implementation's choices.
module vc_buffer #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             full,
  output logic             empty
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      cnt;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign full    = (cnt == (PW+1)'(DEPTH));
  assign empty   = (cnt == '0);
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_wr) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
