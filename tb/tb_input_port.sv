// tb_input_port: input port of the router at (1,1), with the test acting as
// upstream sender, arbiter and output ports.  Three packets per VC arrive
// interleaved on the link, obeying the feedback lines.  The slot-table
// priorities rotate through the published PS3 rows and the downstream
// stop lines toggle at random.  Each cycle the control register must name
// the best-priority VC that (by this model) holds a connection, has a flit
// buffered and is not stopped downstream; the offered flit and port must be
// that VC's next flit and XY direction.
module tb_input_port;
  import dtmvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 1, cur_y = 1;
  link_t link_in;
  logic [NUM_VC-1:0] stop_out, req_valid, conn_set;
  logic [NUM_VC-1:0][VC_W-1:0] vc_prio, req_prio;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] ds_stop;
  logic [NUM_VC-1:0][NUM_PORTS-1:0] port_req, out_port, conn_port;
  logic [NUM_VC-1:0][FLITS_W-1:0] req_len, conn_flits;
  logic sel_valid, sel_accept;
  logic [VC_W-1:0] sel_vc, sel_prio;
  logic [NUM_PORTS-1:0] sel_port;
  logic [FLIT_W-1:0] sel_flit;
  int checks = 0, failures = 0;

  input_port #(.DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // per-VC packet streams: VC0 -> East (3,1), VC1 -> North (1,3),
  // VC2 -> West (0,1), VC3 -> Local (1,1)
  logic [FLIT_W-1:0] flits[NUM_VC][$];
  int pkt_ends[NUM_VC][$];
  int wr[NUM_VC], sent[NUM_VC];
  bit conn[NUM_VC];
  logic [NUM_PORTS-1:0] dir[NUM_VC];
  int rows[4][4] = '{'{0,1,2,3}, '{3,0,1,2}, '{2,3,0,1}, '{1,2,3,0}};

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dx[4] = '{3, 1, 0, 1};
    int dy[4] = '{1, 3, 1, 1};
    int total = 0, cyc = 0, preempt = 0, stopped = 0;
    int last_vc = -1;
    dir = '{5'b00001, 5'b00100, 5'b00010, 5'b10000};
    for (int v = 0; v < NUM_VC; v++) begin
      for (int k = 0; k < 3; k++) begin
        automatic int len = $urandom_range(1, 9);
        flits[v].push_back(make_header(COORD_W'(dx[v]), COORD_W'(dy[v]), VC_W'(v), LEN_W'(len)));
        for (int i = 0; i < len; i++) flits[v].push_back({4'(v), 4'(k), 24'(i)});
        pkt_ends[v].push_back(flits[v].size());
      end
      total += flits[v].size();
      wr[v] = 0; sent[v] = 0; conn[v] = 0;
    end
    link_in = '0; conn_set = '0; conn_port = '0; conn_flits = '0;
    ds_stop = '0; vc_prio = '0; sel_accept = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    while ((sent[0] + sent[1] + sent[2] + sent[3]) < total && cyc < 3000) begin
      int best;
      automatic int cand[$];
      // new inputs for this cycle
      for (int v = 0; v < NUM_VC; v++) vc_prio[v] = VC_W'(rows[(cyc / 10) % 4][v]);
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++) ds_stop[o][v] = ($urandom_range(0, 4) == 0);
      link_in = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (wr[v] < flits[v].size() && !stop_out[v]) cand.push_back(v);
      if (cand.size() > 0 && $urandom_range(0, 3) != 0) begin
        automatic int v = cand[$urandom_range(0, cand.size() - 1)];
        link_in = '{valid: 1'b1, vc: VC_W'(v), flit: flits[v][wr[v]]};
      end
      conn_set = '0;
      for (int v = 0; v < NUM_VC; v++)
        if (req_valid[v]) begin
          check(port_req[v] == dir[v] && req_prio[v] == VC_W'(v), $sformatf("VC%0d request", v));
          check(!conn[v], "request while connected");
          conn_set[v] = 1'b1; conn_port[v] = port_req[v]; conn_flits[v] = req_len[v];
          check(int'(req_len[v]) == pkt_ends[v][0] - sent[v], "request length");
        end
      sel_accept = ($urandom_range(0, 4) != 0);
      #1;
      // model of the control register
      best = -1;
      for (int v = 0; v < NUM_VC; v++) begin
        automatic bit blocked = 0;
        for (int o = 0; o < NUM_PORTS; o++) if (dir[v][o] && ds_stop[o][v]) blocked = 1;
        if (conn[v] && wr[v] > sent[v] && !blocked)
          if (best < 0 || vc_prio[v] < vc_prio[best]) best = v;
      end
      if (best < 0) check(!sel_valid, "idle control register");
      else begin
        check(sel_valid && int'(sel_vc) == best,
              $sformatf("cycle %0d control register %0d/%0d exp %0d", cyc, sel_valid, sel_vc, best));
        check(sel_flit == flits[best][sent[best]] && sel_port == dir[best], "offered flit");
        if (sel_accept) begin
          if (last_vc >= 0 && last_vc != best && sent[last_vc] != pkt_ends[last_vc][0] && conn[last_vc])
            preempt++;
          last_vc = best;
          sent[best]++;
          if (sent[best] == pkt_ends[best][0]) begin
            conn[best] = 0;
            void'(pkt_ends[best].pop_front());
          end
        end
      end
      for (int v = 0; v < NUM_VC; v++) if (ds_stop[o_of(dir[v])][v] && conn[v]) stopped++;
      if (link_in.valid) wr[link_in.vc]++;
      for (int v = 0; v < NUM_VC; v++) if (conn_set[v]) conn[v] = 1;
      @(negedge clk);
      cyc++;
    end
    check(sent[0] + sent[1] + sent[2] + sent[3] == total, "all flits delivered");
    check(preempt > 0, "a VC was interrupted by a higher-priority one");
    check(stopped > 0, "downstream stop seen");
    $display("flits %0d cycles %0d preemptions %0d", total, cyc, preempt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int o_of(input logic [NUM_PORTS-1:0] oh);
    for (int o = 0; o < NUM_PORTS; o++) if (oh[o]) return o;
    return 0;
  endfunction
endmodule
