// tb_ppl_dff_row: loads random words into the row (phi high, then low), then
// checks the stored word on q and on the column wires with ctl high, and
// that every column is Z with ctl low. Also checks that a word offered while
// phi stays low is not taken.
module tb_ppl_dff_row;
  import hop_pkg::*;
  localparam int W = 8;
  logic clk = 0, phi = 1, ctl = 0;
  logic [W-1:0] d = '0, q;
  hop_bit_t col_o [W];
  int checks = 0, failures = 0;

  ppl_dff_row #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_cols(logic [W-1:0] word);
    ctl = 1; #1;
    for (int i = 0; i < W; i++) check(col_o[i] == (word[i] ? HB_T : HB_F), "driven column");
    ctl = 0; #1;
    for (int i = 0; i < W; i++) check(col_o[i] == HB_Z, "released column");
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [W-1:0] word;
      word = W'($urandom);
      phi = 1; d = word; @(negedge clk);
      phi = 0; d = ~word; @(negedge clk);
      check(q == word, "q after load");
      check_cols(word);
      // d changes while phi stays low: nothing is taken
      d = W'($urandom); @(negedge clk);
      check(q == word, "q held while phi low");
      check_cols(word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
