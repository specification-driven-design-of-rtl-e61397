// tb_ppl_tristate_cell: all four input combinations of the tristate cell.
module tb_ppl_tristate_cell;
  import hop_pkg::*;
  logic ctl, in_i;
  hop_bit_t out_o;
  int checks = 0, failures = 0;

  ppl_tristate_cell dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hop_bit_t exp [4] = '{HB_Z, HB_Z, HB_F, HB_T};  // index {ctl,in}
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 4; i++) begin
        {ctl, in_i} = 2'(i);
        #1;
        checks++;
        if (out_o != exp[i]) begin
          failures++; $display("FAIL ctl=%b in=%b out=%s", ctl, in_i, out_o.name());
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
