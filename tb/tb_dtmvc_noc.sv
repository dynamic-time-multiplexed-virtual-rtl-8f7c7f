// tb_dtmvc_noc: end-to-end test of the 3x3 mesh at its default parameters.
// Every local port injects packets of random length and service level to
// random destinations, several VCs interleaved on its link, obeying the
// feedback lines.  Every local output is a sink that raises its stop lines
// at random and checks each flit against a scoreboard of packets sent
// (whole packets per VC, payload intact, per-source order per VC).  A VC0
// packet that takes longer than LATE_LIMIT cycles is reported late to the
// router that received it; that lowers its setting.  Half way, a central
// monitor write returns every router to PS3.
// Counted mechanisms (each must happen): VC preemption on a link,
// feedback-line stops at the sources and sinks, late-packet setting
// changes, monitor setting changes, every performance setting in use.
module tb_dtmvc_noc;
  import dtmvc_pkg::*;
  localparam int MX = 3, MY = 3, N = MX * MY;
  localparam int PKTS = 30;          // packets per source
  localparam int LATE_LIMIT = 60;

  logic clk = 0, rst_n = 0;
  link_t [N-1:0] local_in, local_out;
  logic  [N-1:0][NUM_VC-1:0] local_stop_out, local_stop_in;
  logic  [N-1:0] ps_wr, late_vc0, frame_start;
  logic  [N-1:0][PS_W-1:0] ps_wr_val, ps;
  int checks = 0, failures = 0;

  dtmvc_noc dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s", msg);
  endtask

  // -------- sources --------
  typedef struct { int dst; int vc; int len; int seq; int t0; } pkt_t;
  pkt_t pend[N][NUM_VC][$];         // packets still to inject per source VC
  int   idx[N][NUM_VC];             // flit index within the current packet
  int   sent_pkts, rcvd_pkts, total_pkts;
  int   start_t[N][NUM_VC][int];    // injection time per (src,vc,seq)
  int   cyc;

  function automatic logic [FLIT_W-1:0] flit_of(int s, pkt_t p, int i);
    header_t h;
    if (i == 0) begin
      h = header_t'(make_header(COORD_W'(p.dst % MX), COORD_W'(p.dst / MX), VC_W'(p.vc), LEN_W'(p.len)));
      h.rsvd = {4'(s), 10'(p.seq)};
      return h;
    end
    return {4'(s), 4'(p.vc), 8'(p.seq), 16'(i)};
  endfunction

  int src_stops, sink_stops, preempts, late_changes, mon_changes;
  bit ps_used[NUM_PS];

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      automatic int cand[$];
      local_in[s] <= '0;
      for (int v = 0; v < NUM_VC; v++)
        if (pend[s][v].size() > 0) begin
          if (local_stop_out[s][v]) src_stops++;
          else cand.push_back(v);
        end
      // prefer finishing a started packet half of the time
      if (cand.size() > 0 && $urandom_range(0, 4) != 0) begin
        automatic int v = cand[$urandom_range(0, cand.size() - 1)];
        automatic pkt_t p = pend[s][v][0];
        if (idx[s][v] == 0) start_t[s][v][p.seq] = cyc;
        local_in[s] <= '{valid: 1'b1, vc: VC_W'(v), flit: flit_of(s, p, idx[s][v])};
        if (idx[s][v] == p.len) begin
          idx[s][v] = 0; void'(pend[s][v].pop_front()); sent_pkts++;
        end else idx[s][v]++;
      end
    end
    // sinks: random stop lines
    for (int d = 0; d < N; d++)
      for (int v = 0; v < NUM_VC; v++)
        local_stop_in[d][v] <= ($urandom_range(0, 9) == 0);
  end

  // -------- sinks / scoreboard --------
  int  cur_src[N][NUM_VC], cur_seq[N][NUM_VC], cur_idx[N][NUM_VC], cur_len[N][NUM_VC];
  bit  in_pkt[N][NUM_VC];
  int  last_vc[N];
  int  last_seq[N][N][NUM_VC];     // [dst][src][vc] last sequence number seen + 1
  int  expect_len[N][NUM_VC][int]; // [src][vc][seq] -> length
  int  expect_dst[N][NUM_VC][int];

  always @(posedge clk) if (rst_n) begin
    late_vc0 <= '0;
    for (int d = 0; d < N; d++) begin
      if (local_stop_in[d] != 0) sink_stops++;
      if (local_out[d].valid) begin
        automatic int v = local_out[d].vc;
        automatic logic [FLIT_W-1:0] f = local_out[d].flit;
        checks++;
        if (local_stop_in[d][v]) fail($sformatf("flit to sink %0d VC%0d against stop line", d, v));
        if (last_vc[d] >= 0 && last_vc[d] != v && in_pkt[d][last_vc[d]]) preempts++;
        last_vc[d] = v;
        if (!in_pkt[d][v]) begin
          automatic header_t h = header_t'(f);
          automatic int s = int'(h.rsvd[13:10]), q = int'(h.rsvd[9:0]);
          if (s >= N || h.prio != VC_W'(v) || int'(h.dest_x) != d % MX || int'(h.dest_y) != d / MX
              || !expect_len[s][v].exists(q) || expect_dst[s][v][q] != d
              || int'(h.len) != expect_len[s][v][q] || q < last_seq[d][s][v])
            fail($sformatf("bad header at %0d VC%0d: %h", d, v, f));
          else begin
            cur_src[d][v] = s; cur_seq[d][v] = q; cur_len[d][v] = h.len; cur_idx[d][v] = 1;
            last_seq[d][s][v] = q + 1;   // same source and VC: in order
            in_pkt[d][v] = (h.len != 0);
            if (h.len == 0) begin
              rcvd_pkts++;
              expect_len[s][v].delete(q);
            end
          end
        end else begin
          automatic int s = cur_src[d][v], q = cur_seq[d][v];
          if (f != {4'(s), 4'(v), 8'(q), 16'(cur_idx[d][v])})
            fail($sformatf("bad body at %0d VC%0d: %h", d, v, f));
          if (cur_idx[d][v] == cur_len[d][v]) begin
            in_pkt[d][v] = 0;
            rcvd_pkts++;
            expect_len[s][v].delete(q);
            if (v == 0 && cyc - start_t[s][0][q] > LATE_LIMIT) late_vc0[d] <= 1'b1;
          end
          cur_idx[d][v]++;
        end
      end
    end
  end

  // count setting changes
  logic [N-1:0][PS_W-1:0] ps_q;
  bit monitor_phase;
  always @(posedge clk) begin
    cyc++;
    if (rst_n)
      for (int r = 0; r < N; r++) begin
        ps_used[ps[r]] = 1;
        if (ps[r] != ps_q[r]) begin
          if (monitor_phase) mon_changes++; else late_changes++;
        end
      end
    ps_q <= ps;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired: sent %0d received %0d of %0d", sent_pkts, rcvd_pkts, total_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    local_in = '0; local_stop_in = '0; ps_wr = '0; ps_wr_val = '0; late_vc0 = '0;
    for (int d = 0; d < N; d++) last_vc[d] = -1;
    for (int s = 0; s < N; s++)
      for (int k = 0; k < PKTS; k++) begin
        automatic pkt_t p;
        p.dst = $urandom_range(0, N - 1);
        p.vc  = $urandom_range(0, NUM_VC - 1);
        p.len = $urandom_range(0, 14);
        p.seq = 0;
        foreach (pend[s][p.vc][j]) p.seq++;
        p.t0  = 0;
        pend[s][p.vc].push_back(p);
        expect_len[s][p.vc][p.seq] = p.len;
        expect_dst[s][p.vc][p.seq] = p.dst;
        total_pkts++;
      end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // first half: late VC0 packets lower the settings
    while (sent_pkts < total_pkts / 2) @(negedge clk);
    // central monitor returns every router to PS3
    monitor_phase = 1;
    ps_wr = '1; ps_wr_val = '1; @(negedge clk); ps_wr = '0;
    repeat (25) @(negedge clk);
    monitor_phase = 0;
    for (int r = 0; r < N; r++) if (ps[r] != 3) fail("monitor write not applied");
    checks++;
    while (rcvd_pkts < total_pkts) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int s = 0; s < N; s++)
      for (int v = 0; v < NUM_VC; v++) begin
        checks++;
        if (expect_len[s][v].num() != 0) fail($sformatf("src %0d VC%0d: %0d packets lost", s, v, expect_len[s][v].num()));
      end
    $display("packets %0d, cycles %0d; preemptions %0d, source stops %0d, sink stops %0d, late-packet changes %0d, monitor changes %0d, settings used %0d%0d%0d%0d",
             total_pkts, cyc, preempts, src_stops, sink_stops, late_changes, mon_changes,
             ps_used[0], ps_used[1], ps_used[2], ps_used[3]);
    checks += 6;
    if (preempts == 0)     fail("no VC preemption");
    if (src_stops == 0)    fail("no source stop");
    if (sink_stops == 0)   fail("no sink stop");
    if (late_changes == 0) fail("no late-packet setting change");
    if (mon_changes == 0)  fail("no monitor setting change");
    if (!(ps_used[0] && ps_used[1] && ps_used[2] && ps_used[3])) fail("not every setting used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
