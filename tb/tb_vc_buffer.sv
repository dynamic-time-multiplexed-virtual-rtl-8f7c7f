// tb_vc_buffer: random pushes and pops against a queue model; checks the
// head flit, full and empty flags, and that a full buffer refuses data.
module tb_vc_buffer;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [31:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  vc_buffer #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "reset flags");
    for (int i = 0; i < 2000; i++) begin
      // bias phases: fill, drain, mixed
      automatic int mode = (i / 200) % 3;
      wr_en   = !full  && ($urandom_range(0, 3) < (mode == 0 ? 3 : (mode == 1 ? 1 : 2)));
      rd_en   = !empty && ($urandom_range(0, 3) < (mode == 1 ? 3 : (mode == 0 ? 1 : 2)));
      wr_data = $urandom;
      if (rd_en) begin
        check(q.size() > 0 && rd_data == q[0], $sformatf("head %h exp %h", rd_data, q.size() ? q[0] : 0));
        void'(q.pop_front());
      end
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
      check(full == (q.size() == DEPTH), "full flag");
      check(empty == (q.size() == 0), "empty flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
