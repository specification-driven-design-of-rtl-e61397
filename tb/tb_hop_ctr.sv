// tb_hop_ctr: random counter events against a reference value. Checks cdo
// and cdo_valid in every tick, including wrap-around at both ends.
module tb_hop_ctr;
  import hop_pkg::*;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  ctr_cmd_t cmd = CTR_NOP;
  logic [W-1:0] cdi = '0, cdo;
  logic cdo_valid;
  int checks = 0, failures = 0;
  int ref_cs = 0;
  int wraps = 0;

  hop_ctr #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(cdo == 0, "reset value");
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom_range(9);
      cmd = (r == 0) ? CTR_LOAD : (r < 3) ? CTR_NOP : (r < 6) ? CTR_UP : CTR_DOWN;
      cdi = W'($urandom);
      #1;
      check(cdo_valid == (cmd != CTR_LOAD), "cdo_valid");
      if (cmd != CTR_LOAD) check(int'(cdo) == ref_cs, "cdo");
      unique case (cmd)
        CTR_LOAD: ref_cs = int'(cdi);
        CTR_UP:   begin if (ref_cs == 2**W-1) wraps++; ref_cs = (ref_cs + 1) % (2**W); end
        CTR_DOWN: begin if (ref_cs == 0) wraps++; ref_cs = (ref_cs + 2**W - 1) % (2**W); end
        default: ;
      endcase
      @(negedge clk);
    end
    check(wraps > 0, "wrap covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
