// tb_latency_workload: latency of four competing service levels at each
// performance setting.  Three routers R1 (1,1) -> R2 (2,1) -> R3 (3,1) in a
// row.  Saturating sources feed R1: VC0 on its North input, VC1 on West,
// VC2 on South and VC3 on Local, all addressed to R3's local port.  Packets
// are 100 flits (header + 99 payload) and each source starts its next
// packet as soon as the previous one has left (zero generation period).
// Latency = cycle the tail reaches R3's local output minus the cycle the
// source began offering the header.  For each setting PS0..PS3 the routers
// are reset, a monitor write selects the setting, and the flows run for
// RUN cycles.  Checks (shape of the expected result, not exact numbers):
//   PS0: VC0 fastest, VC2 and VC3 starve (no packet delivered)
//   PS1: VC0 well below VC1..VC3, VC3 slowest
//   PS2: VC0 < VC1 <= VC2 <= VC3 (mean latency)
//   PS3: the four mean latencies within 15% of each other
//   VC0 latency grows from PS0 to PS3
module tb_latency_workload;
  import dtmvc_pkg::*;
  localparam int LEN = 99;
  localparam int RUN = 6000;
  logic clk = 0, rst_n = 0;
  link_t [2:0][NUM_PORTS-1:0] lin, lout;
  logic  [2:0][NUM_PORTS-1:0][NUM_VC-1:0] sin, sout;
  logic ps_wr = 0;
  logic [PS_W-1:0] ps_wr_val = 0;
  logic [2:0][PS_W-1:0] ps;
  logic [2:0] fs;
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 3; r++) begin : g_r
    dtmvc_router u_r (
      .clk, .rst_n, .cur_x(COORD_W'(r + 1)), .cur_y(4'd1),
      .link_in(lin[r]), .stop_out(sout[r]), .link_out(lout[r]), .stop_in(sin[r]),
      .ps_wr, .ps_wr_val, .late_vc0(1'b0), .ps(ps[r]), .frame_start(fs[r])
    );
  end

  // chain wiring; R3's local output is an always-ready sink
  localparam int SRC_PORT[4] = '{P_NORTH, P_WEST, P_SOUTH, P_LOCAL};
  always_comb begin
    for (int r = 0; r < 3; r++) begin
      sin[r] = '0;
      if (r > 0) begin
        lin[r][P_WEST] = lout[r-1][P_EAST];
        sin[r-1][P_EAST] = sout[r][P_WEST];
      end
    end
  end

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++; $display("FAIL %s", msg);
  endtask

  // sources
  int idx[4], t_start[4], seq[4];
  int cyc;
  bit run_on;
  always @(negedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) lin[0][p] <= '0;
    for (int r = 1; r < 3; r++)
      for (int p = 0; p < NUM_PORTS; p++) if (p != P_WEST) lin[r][p] <= '0;
    if (rst_n && run_on)
      for (int v = 0; v < 4; v++)
        if (!sout[0][SRC_PORT[v]][v]) begin
          automatic logic [FLIT_W-1:0] f;
          if (idx[v] == 0) f = make_header(4'd3, 4'd1, VC_W'(v), LEN_W'(LEN));
          else             f = {4'(v), 12'(seq[v]), 16'(idx[v])};
          lin[0][SRC_PORT[v]] <= '{valid: 1'b1, vc: VC_W'(v), flit: f};
          if (idx[v] == LEN) begin idx[v] = 0; seq[v]++; t_start[v] = cyc + 1; end
          else idx[v]++;
        end
  end

  // sink at R3 local
  int rx_idx[4], rx_seq[4], npk[4];
  longint lat_sum[4];
  int lat_max[4];
  always @(posedge clk) begin
    cyc++;
    if (rst_n && lout[2][P_LOCAL].valid) begin
      automatic int v = lout[2][P_LOCAL].vc;
      automatic logic [FLIT_W-1:0] f = lout[2][P_LOCAL].flit;
      checks++;
      if (rx_idx[v] == 0) begin
        if (f != make_header(4'd3, 4'd1, VC_W'(v), LEN_W'(LEN))) fail($sformatf("header VC%0d", v));
      end else if (f != {4'(v), 12'(rx_seq[v]), 16'(rx_idx[v])}) fail($sformatf("body VC%0d", v));
      if (rx_idx[v] == LEN) begin
        // the source stamped the start of this packet when the previous
        // tail left it; packet k started at starts[v][k]
        automatic int lat = cyc - starts[v][rx_seq[v]];
        rx_idx[v] = 0; rx_seq[v]++; npk[v]++;
        lat_sum[v] += lat;
        if (lat > lat_max[v]) lat_max[v] = lat;
      end else rx_idx[v]++;
    end
  end

  // start time of each packet per VC
  int starts[4][int];
  always @(posedge clk)
    for (int v = 0; v < 4; v++) if (!starts[v].exists(seq[v])) starts[v][seq[v]] = t_start[v];

  real mean[4][4];
  int  cnt[4][4];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      rst_n = 0; run_on = 0;
      for (int v = 0; v < 4; v++) begin
        idx[v] = 0; seq[v] = 0; rx_idx[v] = 0; rx_seq[v] = 0; npk[v] = 0;
        lat_sum[v] = 0; lat_max[v] = 0; starts[v].delete();
      end
      repeat (3) @(negedge clk);
      rst_n = 1;
      ps_wr = 1; ps_wr_val = PS_W'(s); @(negedge clk); ps_wr = 0;
      while (ps[0] != PS_W'(s) || !fs[0]) @(negedge clk);
      for (int v = 0; v < 4; v++) begin t_start[v] = cyc; starts[v][0] = cyc; end
      run_on = 1;
      repeat (RUN) @(negedge clk);
      run_on = 0;
      for (int v = 0; v < 4; v++) begin
        cnt[s][v]  = npk[v];
        mean[s][v] = npk[v] ? real'(lat_sum[v]) / npk[v] : -1.0;
      end
      $display("PS%0d  packets %0d %0d %0d %0d  mean latency %0.0f %0.0f %0.0f %0.0f  max %0d %0d %0d %0d",
               s, npk[0], npk[1], npk[2], npk[3], mean[s][0], mean[s][1], mean[s][2], mean[s][3],
               lat_max[0], lat_max[1], lat_max[2], lat_max[3]);
    end
    checks += 8;
    if (!(cnt[0][0] > 0 && cnt[0][2] == 0 && cnt[0][3] == 0)) fail("PS0: VC2/VC3 should starve");
    // PS1: VC1..VC3 each lead one row; rows last 3 or 2 cycles (20 cycles
    // over 8 rows), so only VC0 < the rest and VC3 slowest are expected
    if (!(cnt[1][3] > 0 && mean[1][0] * 3 < mean[1][1] && mean[1][0] * 3 < mean[1][2]
          && mean[1][2] < mean[1][3] && mean[1][1] < mean[1][3]))
      fail("PS1 latency order");
    if (!(cnt[2][3] > 0 && mean[2][0] < mean[2][1] && mean[2][1] <= mean[2][2] && mean[2][2] <= mean[2][3]))
      fail("PS2 latency order");
    for (int v = 1; v < 4; v++)
      if (mean[3][v] > mean[3][0] * 1.15 || mean[3][v] < mean[3][0] * 0.85) fail("PS3 not equal");
    if (!(mean[0][0] < mean[1][0] && mean[1][0] < mean[2][0] && mean[2][0] < mean[3][0]))
      fail("VC0 latency should grow from PS0 to PS3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
