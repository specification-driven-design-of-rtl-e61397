// tb_hop_stack: runs the designer's stack tester (reset with pointer 0, push 1,
// push 2, pop, top: the result must be 1), then random reset/push/pop/top/nop
// sequences against a reference stack. Every operation is timed exactly: cdi
// one tick after RESET, din two ticks after PUSH, dout two ticks after TOP,
// and ready must come back after 2 ticks (RESET, POP) or 3 ticks (PUSH, TOP).
module tb_hop_stack;
  import hop_pkg::*;
  localparam int AW = 4, DW = 8;
  logic clk = 0, rst_n = 0;
  stack_cmd_t cmd = STK_NOP;
  logic [AW-1:0] cdi = '0;
  logic [DW-1:0] din = '0, dout;
  logic dout_valid, ready;
  int checks = 0, failures = 0;
  int sp = 0;
  logic [DW-1:0] model [int];
  int n_tops = 0, n_wrap = 0;

  hop_stack #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // t = tick in which the event is offered; each @(negedge) ends a tick.
  task automatic op(stack_cmd_t e, int v, output logic [DW-1:0] res);
    int busy;
    check(ready, "ready when offering");
    cmd = e; cdi = AW'($urandom); din = DW'($urandom);
    @(negedge clk);
    cmd = STK_NOP;
    if (e == STK_RESET) cdi = AW'(v);
    #1; check(!ready || e == STK_NOP, "busy at t+1");
    @(negedge clk);
    busy = 0;
    if (e == STK_PUSH || e == STK_TOP) begin
      busy = 1;
      if (e == STK_PUSH) din = DW'(v);
      #1;
      check(!ready, "busy at t+2");
      check(dout_valid == (e == STK_TOP), "dout_valid at t+2");
      res = dout;
      @(negedge clk);
    end
    #1;
    check(ready, "ready again");
    check(!dout_valid, "dout_valid dropped");
    unique case (e)
      STK_RESET: sp = v;
      STK_PUSH:  begin if (sp == 2**AW-1) n_wrap++; sp = (sp + 1) % (2**AW); model[sp] = DW'(v); end
      STK_POP:   sp = (sp + 2**AW - 1) % (2**AW);
      default: ;
    endcase
  endtask

  initial begin
    #300000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [DW-1:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // the designer's tester
    op(STK_RESET, 0, r);
    op(STK_PUSH, 1, r);
    op(STK_PUSH, 2, r);
    op(STK_POP, 0, r);
    op(STK_TOP, 0, r);
    check(r == 1, "tester result");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      int k;
      k = $urandom_range(9);
      if (k == 0) op(STK_RESET, $urandom_range(2**AW-1), r);
      else if (k < 4) op(STK_PUSH, $urandom_range(255), r);
      else if (k < 6) op(STK_POP, 0, r);
      else if (k < 8) begin
        if (model.exists(sp)) begin
          op(STK_TOP, 0, r);
          check(r == model[sp], "top value");
          n_tops++;
        end
      end else op(STK_NOP, 0, r);
    end
    check(n_tops > 100 && n_wrap > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
