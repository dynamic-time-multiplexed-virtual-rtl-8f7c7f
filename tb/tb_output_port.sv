// tb_output_port: random flit offers from five inputs to output port 2
// (North).  The expected winner is the offer aimed at this port with the
// lowest priority value; checks link valid/vc/flit and the accept vector.
module tb_output_port;
  import dtmvc_pkg::*;
  localparam int PORT = 2;
  logic [NUM_PORTS-1:0] in_valid, accept;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] in_port;
  logic [NUM_PORTS-1:0][VC_W-1:0] in_vc, in_prio;
  logic [NUM_PORTS-1:0][FLIT_W-1:0] in_flit;
  link_t link_out;
  int checks = 0, failures = 0;

  output_port #(.PORT(PORT)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int prios[4];
      int win, bestp;
      // distinct priorities, as the router guarantees per output
      prios = '{0, 1, 2, 3};
      prios.shuffle();
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_valid[p] = ($urandom_range(0, 2) != 0);
        in_port[p]  = NUM_PORTS'(1) << $urandom_range(0, NUM_PORTS - 1);
        if ($urandom_range(0, 1)) in_port[p] = NUM_PORTS'(1) << PORT;
        in_vc[p]    = VC_W'($urandom);
        in_prio[p]  = VC_W'(prios[p % 4]);
        in_flit[p]  = $urandom;
      end
      // the fifth input must not tie with input 0 when both target us
      if (in_port[4][PORT] && in_port[0][PORT]) in_valid[4] = 1'b0;
      #1;
      win = -1; bestp = 99;
      for (int p = 0; p < NUM_PORTS; p++)
        if (in_valid[p] && in_port[p][PORT] && int'(in_prio[p]) < bestp) begin
          bestp = in_prio[p]; win = p;
        end
      checks++;
      if (win < 0) begin
        if (link_out.valid || accept != 0) begin failures++; $display("FAIL idle"); end
      end else if (!link_out.valid || link_out.flit != in_flit[win] || link_out.vc != in_vc[win]
                   || accept != (NUM_PORTS'(1) << win)) begin
        failures++;
        $display("FAIL win %0d accept %b", win, accept);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
