// tb_slot_table: reads every row after reset and after loading each
// performance setting, against tables written out by hand.  PS3 is the
// published example table; PS2/PS1 are this design's interpolation; PS0
// keeps VC0 first.
module tb_slot_table;
  import dtmvc_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [PS_W-1:0] ps = 0;
  logic [2:0] rd_idx = 0;
  logic [NUM_VC-1:0][VC_W-1:0] rd_prio;
  int checks = 0, failures = 0;

  slot_table #(.ENTRIES(8), .RESET_PS(3)) dut (.*);

  always #5 clk = ~clk;

  // priority of VC0..VC3 in a row led by VC n
  int row_for_lead[4][4] = '{'{0,1,2,3}, '{3,0,1,2}, '{2,3,0,1}, '{1,2,3,0}};
  int lead_tab[4][8] = '{
    '{0,0,0,0,0,0,0,0},   // PS0
    '{0,0,0,0,0,1,2,3},   // PS1
    '{0,0,0,0,1,1,2,3},   // PS2
    '{0,0,1,1,2,2,3,3}};  // PS3

  task automatic check_table(input int s);
    for (int r = 0; r < 8; r++) begin
      rd_idx = 3'(r);
      #1;
      for (int v = 0; v < 4; v++) begin
        checks++;
        if (int'(rd_prio[v]) != row_for_lead[lead_tab[s][r]][v]) begin
          failures++;
          $display("FAIL PS%0d row %0d VC%0d prio %0d exp %0d", s, r, v, rd_prio[v],
                   row_for_lead[lead_tab[s][r]][v]);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_table(3);
    foreach (lead_tab[s]) begin
      automatic int sel = (s + 2) % 4;   // visit 2,3,0,1
      @(negedge clk); ps = PS_W'(sel); load = 1;
      @(negedge clk); load = 0; ps = PS_W'(sel + 1);   // ps change without load: no effect
      check_table(sel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
