// tb_hop_mem: random nop/read/write traffic against a reference array.
// Checks that a read's word appears on dout exactly one tick after the read
// (dout_valid=1 only then), that a write in the tick after a read does not
// disturb the word being delivered, and that addresses at or above DEPTH are
// flagged. DEPTH is set below 2**ADDR_W so the error flag can occur.
module tb_hop_mem;
  import hop_pkg::*;
  localparam int AW = 8, DW = 8, DEPTH = 200;
  logic clk = 0, rst_n = 0;
  mem_cmd_t cmd = MEM_NOP;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] din = '0, dout;
  logic dout_valid, addr_err;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [DEPTH];
  logic exp_valid = 0;
  logic [DW-1:0] exp_dout;
  int n_rd_after_rd = 0, n_wr_after_rd = 0, n_err = 0;

  hop_mem #(.ADDR_W(AW), .DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the memory so the model knows every word
    for (int a = 0; a < DEPTH; a++) begin
      cmd = MEM_WRITE; addr = AW'(a); din = DW'($urandom); model[a] = din;
      @(negedge clk);
    end
    cmd = MEM_NOP;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      mem_cmd_t prev;
      int sel;
      // outputs of the tick that just ended
      check(dout_valid == exp_valid, "dout_valid");
      if (exp_valid) check(dout == exp_dout, "dout");
      prev = cmd;
      sel = $urandom_range(2);
      cmd = (sel == 0) ? MEM_NOP : (sel == 1) ? MEM_READ : MEM_WRITE;
      addr = ($urandom_range(19) == 0) ? AW'($urandom_range(255, DEPTH)) : AW'($urandom_range(DEPTH-1));
      din  = DW'($urandom);
      #1;
      check(addr_err == (cmd != MEM_NOP && addr >= DEPTH), "addr_err");
      if (addr_err) n_err++;
      if (prev == MEM_READ && cmd == MEM_READ)  n_rd_after_rd++;
      if (prev == MEM_READ && cmd == MEM_WRITE) n_wr_after_rd++;
      exp_valid = (cmd == MEM_READ);
      if (cmd == MEM_READ) exp_dout = (addr < DEPTH) ? model[addr] : '0;
      if (cmd == MEM_WRITE && addr < DEPTH) model[addr] = din;
      @(negedge clk);
    end
    check(n_rd_after_rd > 0 && n_wr_after_rd > 0 && n_err > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
