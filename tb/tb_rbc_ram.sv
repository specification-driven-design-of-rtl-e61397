// tb_rbc_ram: random reads and writes against a reference array, with one
// cycle read latency, read data held between reads, and old data returned
// when the same address is read and written in one cycle.
module tb_rbc_ram;
  localparam int AW = 5, DW = 16;
  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [DW-1:0] rdata, wdata = '0;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] exp_q;
  int n_same = 0;

  rbc_ram #(.AW(AW), .DW(DW)) dut (.*);
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
    for (int a = 0; a < 2**AW; a++) begin
      we = 1; waddr = AW'(a); wdata = DW'($urandom); model[a] = wdata; @(negedge clk);
    end
    we = 0; re = 1; raddr = 0; @(negedge clk); exp_q = model[0];
    for (int n = 0; n < 3000; n++) begin
      check(rdata == exp_q, "rdata");
      re = 1'($urandom); we = 1'($urandom);
      raddr = AW'($urandom); waddr = ($urandom_range(3) == 0) ? raddr : AW'($urandom);
      wdata = DW'($urandom);
      if (re && we && raddr == waddr) n_same++;
      if (re) exp_q = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
    end
    check(n_same > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
