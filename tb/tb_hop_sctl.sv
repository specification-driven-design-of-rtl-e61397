// tb_hop_sctl: offers each stack event and checks the event sequence sent to
// the memory and the counter tick by tick, the ready signal, and that an
// event offered while busy is ignored.
module tb_hop_sctl;
  import hop_pkg::*;
  logic clk = 0, rst_n = 0;
  stack_cmd_t cmd = STK_NOP;
  mem_cmd_t mem_cmd;
  ctr_cmd_t ctr_cmd;
  logic ready;
  int checks = 0, failures = 0;

  hop_sctl dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Offer event e in one tick, then check the following ticks against the
  // expected (memory, counter) events; while busy a random event is offered.
  task automatic run(stack_cmd_t e, mem_cmd_t m[$], ctr_cmd_t c[$]);
    check(ready, "ready before event");
    cmd = e; #1;
    check(mem_cmd == MEM_NOP && ctr_cmd == CTR_NOP, "nops in event tick");
    @(negedge clk);
    for (int i = 0; i < m.size(); i++) begin
      cmd = stack_cmd_t'($urandom_range(4));
      #1;
      check(!ready, "busy");
      check(mem_cmd == m[i], $sformatf("mem event %0d of %s", i, e.name()));
      check(ctr_cmd == c[i], $sformatf("ctr event %0d of %s", i, e.name()));
      @(negedge clk);
    end
    cmd = STK_NOP; #1;
    check(ready && mem_cmd == MEM_NOP && ctr_cmd == CTR_NOP, "back to top state");
    @(negedge clk);
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      run(STK_RESET, '{MEM_NOP},            '{CTR_LOAD});
      run(STK_PUSH,  '{MEM_NOP, MEM_WRITE}, '{CTR_UP, CTR_NOP});
      run(STK_POP,   '{MEM_NOP},            '{CTR_DOWN});
      run(STK_TOP,   '{MEM_READ, MEM_NOP},  '{CTR_NOP, CTR_NOP});
      run(STK_NOP,   '{},                   '{});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
