// tb_conn_arbiter: directed cases for connection set-up.
//  - a single request gets its lane, with 'out port' and 'flits left' values
//  - a lane held by an open connection is not granted again
//  - several inputs asking for the same lane are served round-robin
//  - requests for different VCs of the same output are granted together
//  - 500 random request/connection patterns against a lane model
module tb_conn_arbiter;
  import dtmvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NUM_PORTS-1:0][NUM_VC-1:0] req_valid, conn_set;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][NUM_PORTS-1:0] port_req, out_port, conn_port;
  logic [NUM_PORTS-1:0][NUM_VC-1:0][FLITS_W-1:0] req_len, conn_flits;
  int checks = 0, failures = 0;

  conn_arbiter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic clear();
    req_valid = '0; port_req = '0; req_len = '0; out_port = '0;
  endtask

  task automatic ask(input int p, input int v, input int o, input int len);
    req_valid[p][v] = 1'b1;
    port_req[p][v]  = NUM_PORTS'(1) << o;
    req_len[p][v]   = FLITS_W'(len);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[$];
    clear();
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // single request
    ask(1, 2, P_EAST, 17); #1;
    check(conn_set == (1 << (1*NUM_VC + 2)), "single grant");
    check(conn_port[1][2] == 5'b00001 && conn_flits[1][2] == 17, "grant values");
    // lane busy
    out_port[3][2] = 5'b00001; #1;
    check(conn_set == '0, "busy lane refused");
    // same output, other VC, is a different lane
    ask(0, 1, P_EAST, 5); #1;
    check(conn_set == (1 << (0*NUM_VC + 1)), "other VC lane granted while VC2 lane busy");
    // round robin: inputs 0,2,4 all want lane (North, VC0)
    clear(); @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      clear();
      ask(0, 0, P_NORTH, 3); ask(2, 0, P_NORTH, 3); ask(4, 0, P_NORTH, 3);
      #1;
      check($countones(conn_set) == 1, "one grant per lane");
      for (int p = 0; p < NUM_PORTS; p++) if (conn_set[p][0]) order.push_back(p);
      @(negedge clk);
    end
    check(order.size() == 6, "grant each round");
    if (order.size() == 6)
      check(order[0] != order[1] && order[1] != order[2] && order[0] != order[2]
            && order[3] == order[0] && order[4] == order[1] && order[5] == order[2],
            "round-robin order");
    // four VCs to the same output together
    clear();
    ask(0, 0, P_EAST, 1); ask(1, 1, P_EAST, 1); ask(2, 2, P_EAST, 1); ask(4, 3, P_EAST, 1);
    #1;
    check(conn_set[0][0] && conn_set[1][1] && conn_set[2][2] && conn_set[4][3]
          && $countones(conn_set) == 4, "four lanes of one output");
    // random requests and open connections against a reference model:
    // a grant only for a free lane, at most one per lane, every free lane
    // with a requester granted, grant values equal to the request
    for (int n = 0; n < 500; n++) begin
      automatic logic [NUM_PORTS-1:0][NUM_VC-1:0] busy = '0;
      clear();
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          automatic int o = $urandom_range(0, NUM_PORTS - 1);
          automatic int r = $urandom_range(0, 3);
          if (r == 0) begin out_port[p][v] = NUM_PORTS'(1) << o; busy[o][v] = 1'b1; end
          else if (r == 1) ask(p, v, o, $urandom_range(1, 200));
        end
      #1;
      for (int o = 0; o < NUM_PORTS; o++)
        for (int v = 0; v < NUM_VC; v++) begin
          automatic int want = 0, got = 0;
          for (int p = 0; p < NUM_PORTS; p++)
            if (req_valid[p][v] && port_req[p][v][o]) begin
              want++;
              if (conn_set[p][v]) got++;
            end
          check(got == ((busy[o][v] || want == 0) ? 0 : 1),
                $sformatf("lane (%0d,%0d): busy %0d requests %0d grants %0d", o, v, busy[o][v], want, got));
        end
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VC; v++)
          if (conn_set[p][v])
            check(req_valid[p][v] && conn_port[p][v] == port_req[p][v] && conn_flits[p][v] == req_len[p][v],
                  "grant values follow the request");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
