// slot_table: priority assignments of the virtual channels over one time
// frame.
//
// ENTRIES rows, each holding a priority per VC (0 = highest).  The time-frame
// counter selects the row (rd_idx, combinational read).  When `load` is high
// the whole table is rewritten in one clock for performance setting `ps`:
// row r is led by VC dtmvc_pkg::lead_vc(ps, r) and the other VCs follow in
// rotating order.  The PS3 contents equal the published example table
// (equal quarters, VC0..VC3 leading in turn); PS0 keeps VC0 first in every
// row.  The PS2 and PS1 contents are interpolations chosen here: VC0 leads
// 4 and 5 of the 8 rows.  After reset the table holds the RESET_PS contents.
module slot_table
  import dtmvc_pkg::*;
#(
  parameter int ENTRIES  = 8,
  parameter int RESET_PS = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic [PS_W-1:0]              ps,
  input  logic [$clog2(ENTRIES)-1:0]   rd_idx,
  output logic [NUM_VC-1:0][VC_W-1:0]  rd_prio
);
  typedef logic [NUM_VC-1:0][VC_W-1:0] row_t;
  typedef row_t [ENTRIES-1:0]         tab_t;

  // contents for every setting, worked out at elaboration
  function automatic tab_t gen_table(input int unsigned setting);
    tab_t t;
    for (int r = 0; r < ENTRIES; r++)
      for (int v = 0; v < NUM_VC; v++)
        t[r][v] = rot_prio(v, lead_vc(setting, r, ENTRIES));
    return t;
  endfunction

  localparam tab_t TAB_PS0 = gen_table(0);
  localparam tab_t TAB_PS1 = gen_table(1);
  localparam tab_t TAB_PS2 = gen_table(2);
  localparam tab_t TAB_PS3 = gen_table(3);
  localparam tab_t TAB_RST = gen_table(RESET_PS);

  tab_t table_q;
  tab_t table_d;

  always_comb begin
    unique case (ps)
      2'd0:    table_d = TAB_PS0;
      2'd1:    table_d = TAB_PS1;
      2'd2:    table_d = TAB_PS2;
      default: table_d = TAB_PS3;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    table_q <= TAB_RST;
    else if (load) table_q <= table_d;
  end

  assign rd_prio = table_q[rd_idx];
endmodule
