// tb_rbc_wb_array: checks that reset clears every row, then random row writes
// and combinational row reads against a reference matrix.
module tb_rbc_wb_array;
  localparam int NL = 16, NF = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] raddr = '0, waddr = '0;
  logic [NF-1:0] rrow, wrow = '0;
  int checks = 0, failures = 0;
  logic [NF-1:0] model [NL];

  rbc_wb_array #(.NLINES(NL), .NFRAMES(NF)) dut (.*);
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
    rst_n = 1;
    for (int i = 0; i < NL; i++) begin
      raddr = 4'(i); #1; check(rrow == '0, "cleared by reset"); model[i] = '0;
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); waddr = 4'($urandom); wrow = NF'($urandom);
      raddr = 4'($urandom);
      #1; check(rrow == model[raddr], "row read");
      @(negedge clk);
      if (we) model[waddr] = wrow;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
