// tb_dtmvc_router: one router at (1,1) with four saturating sources, as in
// the performance example: VC0 enters from North, VC1 from West, VC2 from
// South and VC3 from Local, all heading for (3,1), i.e. out of East.
// A scoreboard on the East link checks every flit (order and contents per
// VC, no interleaving inside a VC).  Phases and what they check:
//   A  PS3 after reset: every VC gets about a quarter of the link and the
//      VC on the link is the slot leader in most cycles
//   B  one late-VC0 report: setting drops to PS2 at the next frame start
//      and VC0's share rises to about half
//   C  monitor writes PS0: VC0 takes the link, VC1..VC3 starve
//   D  East feedback line of VC0 held high: no VC0 flit leaves, VC1 takes
//      over (lower priority VC uses the idle slot)
//   then the monitor restores PS3
//   E  a second VC0 source (Local) competes with North for the same lane:
//      both get packets through, whole packets at a time
module tb_dtmvc_router;
  import dtmvc_pkg::*;
  localparam int LEN = 7;   // payload flits per packet
  logic clk = 0, rst_n = 0;
  link_t [NUM_PORTS-1:0] link_in, link_out;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] stop_out, stop_in;
  logic ps_wr = 0, late_vc0 = 0, frame_start;
  logic [PS_W-1:0] ps_wr_val = 0, ps;
  int checks = 0, failures = 0;

  dtmvc_router dut (
    .clk, .rst_n, .cur_x(4'd1), .cur_y(4'd1),
    .link_in, .stop_out, .link_out, .stop_in,
    .ps_wr, .ps_wr_val, .late_vc0, .ps, .frame_start
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- sources ----------------
  int src_vc[NUM_PORTS] = '{0, 1, 0, 2, 3};     // E unused, W=1, N=0, S=2, L=3
  bit src_on[NUM_PORTS] = '{0, 1, 1, 1, 1};
  int src_seq[NUM_PORTS], src_idx[NUM_PORTS];

  function automatic logic [FLIT_W-1:0] src_flit(int p);
    header_t h;
    if (src_idx[p] == 0) begin
      h = header_t'(make_header(4'd3, 4'd1, VC_W'(src_vc[p]), LEN_W'(LEN)));
      h.rsvd = {3'(p), 11'(src_seq[p])};
      return h;
    end
    return {4'(p), 4'(src_vc[p]), 8'(src_seq[p]), 16'(src_idx[p])};
  endfunction

  always @(negedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      link_in[p] <= '0;
      if (rst_n && (src_on[p] || src_idx[p] != 0) && !stop_out[p][src_vc[p]]) begin
        link_in[p] <= '{valid: 1'b1, vc: VC_W'(src_vc[p]), flit: src_flit(p)};
        if (src_idx[p] == LEN) begin src_idx[p] = 0; src_seq[p]++; end
        else src_idx[p]++;
      end
    end
  end

  // ---------------- East sink / scoreboard ----------------
  int cur_src[NUM_VC], cur_seq[NUM_VC], cur_idx[NUM_VC];
  bit in_pkt[NUM_VC];
  int exp_seq[NUM_PORTS][NUM_VC];
  bit seen[NUM_PORTS][NUM_VC];
  int cnt[NUM_VC];           // flits per VC in the current measurement window
  int lead_match, valid_cycles, pkts_done[NUM_PORTS], stop_viol;

  always @(posedge clk) if (rst_n) begin
    link_t l;
    l = link_out[P_EAST];
    for (int p = 0; p < NUM_PORTS; p++)
      if (p != P_EAST && link_out[p].valid) begin
        failures++; $display("FAIL flit left on port %0d", p);
      end
    if (l.valid) begin
      automatic int v = l.vc;
      valid_cycles++;
      cnt[v]++;
      if (dut.vc_prio[v] == 0) lead_match++;
      if (stop_in[P_EAST][v]) stop_viol++;
      checks++;
      if (!in_pkt[v]) begin
        header_t h;
        h = header_t'(l.flit);
        cur_src[v] = int'(h.rsvd[13:11]);
        cur_seq[v] = int'(h.rsvd[10:0]);
        if (h.dest_x != 3 || h.dest_y != 1 || h.prio != VC_W'(v) || h.len != LEN
            || (seen[cur_src[v]][v] && cur_seq[v] != exp_seq[cur_src[v]][v])) begin
          failures++; $display("FAIL header on VC%0d: %h", v, l.flit);
        end
        seen[cur_src[v]][v] = 1;
        exp_seq[cur_src[v]][v] = cur_seq[v];
        in_pkt[v] = 1; cur_idx[v] = 1;
      end else begin
        if (l.flit != {4'(cur_src[v]), 4'(v), 8'(cur_seq[v]), 16'(cur_idx[v])}) begin
          failures++; $display("FAIL body on VC%0d: %h", v, l.flit);
        end
        if (cur_idx[v] == LEN) begin
          in_pkt[v] = 0; exp_seq[cur_src[v]][v]++; pkts_done[cur_src[v]]++;
        end
        cur_idx[v]++;
      end
    end
  end

  task automatic window(input int cycles);
    cnt = '{0, 0, 0, 0}; lead_match = 0; valid_cycles = 0;
    repeat (cycles) @(posedge clk);
    #1;
    $display("window: VC0 %0d VC1 %0d VC2 %0d VC3 %0d (leader match %0d/%0d) PS%0d",
             cnt[0], cnt[1], cnt[2], cnt[3], lead_match, valid_cycles, ps);
  endtask

  task automatic to_frame_start();
    @(negedge clk);
    while (!frame_start) @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pkts_north;
    stop_in = '0;
    link_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check(ps == 3, "reset setting PS3");
    // A: PS3
    repeat (60) @(negedge clk);
    to_frame_start();
    window(200);
    for (int v = 0; v < NUM_VC; v++)
      check(cnt[v] >= 40 && cnt[v] <= 60, $sformatf("PS3 share of VC%0d = %0d/200", v, cnt[v]));
    check(lead_match * 10 >= valid_cycles * 8, "PS3 link follows the slot leader");
    check(valid_cycles >= 190, "PS3 link busy");
    // B: late VC0 packet -> PS2
    @(negedge clk); late_vc0 = 1; @(negedge clk); late_vc0 = 0;
    check(ps == 3, "setting not changed mid-frame");
    to_frame_start();
    check(ps == 2, "PS2 after late report");
    repeat (20) @(negedge clk);
    window(200);
    check(cnt[0] >= 70 && cnt[0] <= 100, $sformatf("PS2 VC0 share %0d/200", cnt[0]));
    check(cnt[1] > cnt[2] && cnt[2] > 0 && cnt[3] > 0, "PS2: VC1 more than VC2, all move");
    // C: monitor sets PS0
    @(negedge clk); ps_wr = 1; ps_wr_val = 0; @(negedge clk); ps_wr = 0;
    to_frame_start();
    check(ps == 0, "PS0 by monitor");
    repeat (20) @(negedge clk);
    window(200);
    // VC0 sends 8-flit packets and needs two cycles between packets to
    // request and open the next connection; only those cycles are left
    check(cnt[0] >= 150, $sformatf("PS0: VC0 owns the link (%0d)", cnt[0]));
    check(cnt[2] + cnt[3] == 0 && cnt[1] <= 200 - cnt[0], "PS0: VC2, VC3 starve, VC1 only in gaps");
    // D: VC0 stopped downstream
    @(negedge clk); stop_in[P_EAST][0] = 1'b1;
    @(negedge clk);
    window(60);
    check(cnt[0] == 0 && stop_viol == 0, "no VC0 flit while its feedback line is high");
    check(cnt[1] >= 40, "VC1 uses the slot VC0 cannot");
    @(negedge clk); stop_in[P_EAST][0] = 1'b0;
    // back to PS3 so that every source drains
    @(negedge clk); ps_wr = 1; ps_wr_val = 3; @(negedge clk); ps_wr = 0;
    to_frame_start();
    check(ps == 3, "PS3 by monitor");
    // E: Local switches to VC0, competing with North for lane (East, VC0)
    @(negedge clk); src_on[P_LOCAL] = 0;
    while (src_idx[P_LOCAL] != 0) @(negedge clk);
    src_vc[P_LOCAL] = 0; src_on[P_LOCAL] = 1;
    pkts_north = pkts_done[P_NORTH];
    pkts_done[P_LOCAL] = 0;
    window(300);
    check(pkts_done[P_LOCAL] >= 5 && pkts_done[P_NORTH] - pkts_north >= 5,
          $sformatf("lane shared: north %0d local %0d", pkts_done[P_NORTH] - pkts_north, pkts_done[P_LOCAL]));
    check(stop_viol == 0, "no flit against a stop line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
