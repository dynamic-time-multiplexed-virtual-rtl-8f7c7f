// tb_dtmvc_control: frame counter and setting changes.
// Checks: a frame lasts 20 cycles; at PS3 each VC leads one 5-cycle quarter
// in order VC0..VC3; row index sequence; a late-VC0 report lowers the
// setting by one at the next frame start (not earlier); the monitor can set
// any setting; the setting saturates at PS0, where VC0 leads all 20 cycles.
module tb_dtmvc_control;
  import dtmvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ps_wr = 0, late_vc0 = 0;
  logic [PS_W-1:0] ps_wr_val = 0, ps;
  logic frame_start;
  logic [2:0] slot_idx;
  logic [NUM_VC-1:0][VC_W-1:0] vc_prio;
  int checks = 0, failures = 0;

  dtmvc_control #(.FRAME_CYCLES(20), .ENTRIES(8), .RESET_PS(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int leader();
    for (int v = 0; v < NUM_VC; v++) if (vc_prio[v] == 0) return v;
    return -1;
  endfunction

  // run one frame from frame_start, return cycles each VC led
  task automatic run_frame(output int led[4]);
    led = '{0,0,0,0};
    check(frame_start, "frame starts");
    for (int c = 0; c < 20; c++) begin
      if (c > 0) check(!frame_start, "no early frame start");
      led[leader()]++;
      @(negedge clk);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int led[4];
    int idx_exp[20] = '{0,0,0,1,1,2,2,2,3,3,4,4,4,5,5,6,6,6,7,7};
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check(ps == 3, "reset PS3");
    // PS3: quarters of 5 cycles, VC0..VC3 in turn
    for (int c = 0; c < 20; c++) begin
      check(slot_idx == 3'(idx_exp[c]), $sformatf("slot idx c%0d = %0d", c, slot_idx));
      check(leader() == c / 5, $sformatf("PS3 leader c%0d = %0d", c, leader()));
      @(negedge clk);
    end
    // late VC0 packet in the middle of a frame
    repeat (7) @(negedge clk);
    late_vc0 = 1; @(negedge clk); late_vc0 = 0;
    check(ps == 3, "setting held until frame end");
    repeat (3) @(negedge clk);
    check(ps == 3, "setting still held until frame end");
    while (!frame_start) @(negedge clk);
    check(ps == 2, "late packet lowers to PS2");
    run_frame(led);
    check(led[0] == 10 && led[1] == 5 && led[2] == 3 && led[3] == 2,
          $sformatf("PS2 shares %0d %0d %0d %0d", led[0], led[1], led[2], led[3]));
    // two more late reports -> PS0, a third saturates
    for (int k = 0; k < 3; k++) begin late_vc0 = 1; @(negedge clk); late_vc0 = 0; end
    while (!frame_start) @(negedge clk);
    check(ps == 0, "saturates at PS0");
    run_frame(led);
    check(led[0] == 20, "PS0: VC0 leads whole frame");
    // monitor sets PS1
    ps_wr = 1; ps_wr_val = 1; @(negedge clk); ps_wr = 0;
    while (!frame_start) @(negedge clk);
    check(ps == 1, "monitor write");
    run_frame(led);
    check(led[0] == 13 && led[1] == 2 && led[2] == 3 && led[3] == 2,
          $sformatf("PS1 shares %0d %0d %0d %0d", led[0], led[1], led[2], led[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
