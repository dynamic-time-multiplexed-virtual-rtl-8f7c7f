// tb_input_vc_channel: router at (2,2).  Sends packets of random length and
// destination through one VC.  Checks per packet: the port request appears
// one cycle after the header reaches the buffer, with the XY direction, the
// header priority and length+1; after the grant the flits come out in order,
// 'flits left' counts down and 'out port' drops to zero after the tail.
module tb_input_vc_channel;
  import dtmvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] cur_x = 2, cur_y = 2;
  logic wr_en = 0, full, req_valid, conn_set = 0, flit_avail, send = 0;
  logic [FLIT_W-1:0] wr_data = 0, head_flit;
  logic [NUM_PORTS-1:0] port_req, conn_port = 0, out_port;
  logic [VC_W-1:0] prio;
  logic [FLITS_W-1:0] req_len, conn_flits = 0, flits_left;
  int checks = 0, failures = 0;

  input_vc_channel #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [FLIT_W-1:0] pkt[$];
  // writer: pushes the queued flits whenever there is space
  always @(negedge clk) begin
    wr_en <= 1'b0;
    if (rst_n && pkt.size() > 0 && !full) begin
      wr_en   <= 1'b1;
      wr_data <= pkt.pop_front();
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    check(!req_valid && out_port == 0 && !flit_avail, "reset state");
    for (int n = 0; n < 30; n++) begin
      automatic int dx = $urandom_range(0, 4), dy = $urandom_range(0, 4);
      automatic int len = $urandom_range(0, 12), pr = $urandom_range(0, 3);
      automatic logic [FLIT_W-1:0] exp[$];
      logic [4:0] dir;
      int wait_c;
      exp.push_back(make_header(COORD_W'(dx), COORD_W'(dy), VC_W'(pr), LEN_W'(len)));
      for (int i = 0; i < len; i++) exp.push_back({8'(n), 24'(i)});
      foreach (exp[i]) pkt.push_back(exp[i]);
      if (dx > 2) dir = 5'b00001; else if (dx < 2) dir = 5'b00010;
      else if (dy > 2) dir = 5'b00100; else if (dy < 2) dir = 5'b01000; else dir = 5'b10000;
      wait_c = 0;
      while (!req_valid && wait_c < 50) begin @(negedge clk); wait_c++; end
      check(req_valid, "request raised");
      check(port_req == dir && prio == VC_W'(pr) && req_len == FLITS_W'(len + 1),
            $sformatf("request regs %b/%0d/%0d exp %b/%0d/%0d", port_req, prio, req_len, dir, pr, len+1));
      check(out_port == 0 && !flit_avail, "no flit before grant");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      conn_set = req_valid; conn_port = port_req; conn_flits = req_len;
      @(negedge clk); conn_set = 0;
      check(!req_valid && out_port == dir && flits_left == FLITS_W'(len + 1), "grant loaded");
      for (int i = 0; i < len + 1; i++) begin
        wait_c = 0;
        while (!flit_avail && wait_c < 50) begin @(negedge clk); wait_c++; end
        check(flit_avail && head_flit == exp[i], $sformatf("flit %0d of packet %0d got %h exp %h av %b", i, n, head_flit, exp[i], flit_avail));
        check(flits_left == FLITS_W'(len + 1 - i), "flits left");
        send = flit_avail; @(negedge clk); send = 0;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      check(out_port == 0 && !flit_avail, "connection closed after tail");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
