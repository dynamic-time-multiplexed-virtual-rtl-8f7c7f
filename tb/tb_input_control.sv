// tb_input_control: random link words and buffer-full flags; checks that
// exactly the addressed VC buffer is written and that the feedback lines
// follow the full flags.
module tb_input_control;
  import dtmvc_pkg::*;
  link_t link_in;
  logic [NUM_VC-1:0] vc_full, wr_en, stop;
  logic [FLIT_W-1:0] wr_data;
  int checks = 0, failures = 0;

  input_control dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [NUM_VC-1:0] exp;
      link_in.valid = ($urandom_range(0, 3) != 0);
      link_in.vc    = VC_W'($urandom_range(0, NUM_VC - 1));
      link_in.flit  = $urandom;
      vc_full       = NUM_VC'($urandom);
      #1;
      exp = link_in.valid ? (NUM_VC'(1) << link_in.vc) : '0;
      checks += 3;
      if (wr_en !== exp)          begin failures++; $display("FAIL wr_en %b exp %b", wr_en, exp); end
      if (wr_data !== link_in.flit) begin failures++; $display("FAIL data"); end
      if (stop !== vc_full)       begin failures++; $display("FAIL stop %b full %b", stop, vc_full); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
