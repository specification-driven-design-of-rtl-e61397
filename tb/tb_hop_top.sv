// tb_hop_top: end-to-end run of all four designs at their default sizes.
//
//  - Stack: the designer's tester (reset to 0, push 1, push 2, pop, top must
//    give 1), a burst of events offered while the stack is busy (ignored),
//    and a deeper push/top/pop sequence.
//  - Lattice bus: no driver (Z), one driver, agreeing and conflicting drivers.
//  - PPL row: load a word, drive it onto the columns, release the columns.
//  - Rollback memory: write, mark, read from the current and from older
//    frames, rollback, advance with archiving, reads served by the archive,
//    refused mark/rollback/advance, and wrap-around of the circular frame
//    buffer; reads that hit and miss the MRV cache, cached versions dropped
//    by rollback and advance, and eviction of the least recently used line.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_hop_top;
  import hop_pkg::*;
  import rbc_pkg::*;
  logic clk = 0, rst_n = 0;
  stack_cmd_t stk_cmd = STK_NOP;
  logic [7:0] stk_cdi = '0, stk_din = '0, stk_dout;
  logic stk_dout_valid, stk_ready;
  hop_bit_t bus_assert [2];
  hop_bit_t bus_value;
  logic ppl_phi = 1, ppl_ctl = 0;
  logic [7:0] ppl_d = '0, ppl_q;
  hop_bit_t ppl_col [8];
  logic rbc_op_valid = 0;
  rbc_op_t rbc_op = RBC_NOP;
  logic [7:0] rbc_line = '0;
  logic [2:0] rbc_k = '0;
  logic [31:0] rbc_wdata = '0, rbc_rdata;
  logic rbc_ready, rbc_rvalid, rbc_err, rbc_hit;
  logic [2:0] rbc_cmf, rbc_omf;

  int checks = 0, failures = 0;
  typedef enum int {M_STK_TESTER, M_STK_BUSY_IGNORED, M_STK_PIPE_READ, M_BUS_Z, M_BUS_DRIVE,
                    M_BUS_CONFLICT, M_PPL_LOAD, M_PPL_DRIVE, M_PPL_RELEASE, M_RBC_WRITE,
                    M_RBC_READ_FRAME, M_RBC_READ_ARCHIVE, M_RBC_MARK, M_RBC_ROLLBACK,
                    M_RBC_ADVANCE, M_RBC_ERR_MARK, M_RBC_ERR_ROLLBACK, M_RBC_ERR_ADVANCE,
                    M_RBC_WRAP, M_RBC_HIT, M_RBC_MISS, M_RBC_STALE_DROPPED, M_RBC_EVICT,
                    M_COUNT} mech_t;
  int mech [M_COUNT];

  hop_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- stack
  task automatic stk(stack_cmd_t e, int v, output logic [7:0] res);
    check(stk_ready, "stack ready");
    stk_cmd = e; @(negedge clk);
    // offer a conflicting event while busy: it must be ignored
    stk_cmd = (e == STK_NOP) ? STK_NOP : STK_PUSH;
    if (e == STK_RESET) stk_cdi = 8'(v);
    if (e != STK_NOP) mech[M_STK_BUSY_IGNORED]++;
    @(negedge clk);
    stk_cmd = STK_NOP;
    if (e == STK_PUSH || e == STK_TOP) begin
      if (e == STK_PUSH) stk_din = 8'(v);
      #1;
      check(stk_dout_valid == (e == STK_TOP), "stack dout_valid");
      if (e == STK_TOP) mech[M_STK_PIPE_READ]++;
      res = stk_dout;
      @(negedge clk);
    end
    #1; check(stk_ready, "stack ready after sequence");
  endtask

  // ---------------------------------------------------- rollback memory
  task automatic rbc(rbc_op_t o, int l, int kk, logic [31:0] d, bit exp_err,
                     output logic [31:0] res);
    int n;
    check(rbc_ready, "rbc ready");
    rbc_op_valid = 1; rbc_op = o; rbc_line = 8'(l); rbc_k = 3'(kk); rbc_wdata = d;
    @(negedge clk);
    rbc_op_valid = 0;
    check(rbc_err == exp_err, $sformatf("rbc err after %s", o.name()));
    n = 0;
    while (!rbc_ready && n < 2000) begin
      if (rbc_rvalid) res = rbc_rdata;
      @(negedge clk); n++;
    end
    if (o == RBC_READ)     check(n == (rbc_hit ? 1 : 2), "read latency");
    if ((o == RBC_ROLLBACK || o == RBC_ADVANCE) && exp_err) check(n == 9, "refusal clean-up length");
    if (o == RBC_ROLLBACK && !exp_err) check(n == 256, "rollback sweep length");
    if (o == RBC_ADVANCE && !exp_err)  check(n == 512, "advance sweep length");
  endtask

  // exp_hit: 1 must hit the cache, 0 must miss
  task automatic rbc_read(int l, logic [31:0] exp, mech_t m, bit exp_hit);
    logic [31:0] r;
    rbc(RBC_READ, l, 0, '0, 0, r);
    check(r == exp, $sformatf("rbc read line %0d: %h expected %h", l, r, exp));
    check(rbc_hit == exp_hit, $sformatf("rbc read line %0d cache %s expected", l, exp_hit ? "hit" : "miss"));
    mech[m]++;
    mech[rbc_hit ? M_RBC_HIT : M_RBC_MISS]++;
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] r;
    logic [31:0] w;
    bus_assert = '{HB_Z, HB_Z};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // stack: the designer's tester
    stk(STK_RESET, 0, r); stk(STK_PUSH, 1, r); stk(STK_PUSH, 2, r);
    stk(STK_POP, 0, r); stk(STK_TOP, 0, r);
    check(r == 1, "stack tester result");
    if (r == 1) mech[M_STK_TESTER]++;
    for (int i = 0; i < 10; i++) stk(STK_PUSH, 10 + i, r);
    for (int i = 9; i >= 0; i--) begin
      stk(STK_TOP, 0, r); check(r == 8'(10 + i), "stack deep top"); stk(STK_POP, 0, r);
    end
    stk(STK_TOP, 0, r); check(r == 1, "stack bottom element");

    // lattice bus
    #1; check(bus_value == HB_Z, "bus undriven"); mech[M_BUS_Z]++;
    bus_assert = '{HB_T, HB_Z}; #1; check(bus_value == HB_T, "bus one driver"); mech[M_BUS_DRIVE]++;
    bus_assert = '{HB_F, HB_F}; #1; check(bus_value == HB_F, "bus agreeing drivers");
    bus_assert = '{HB_T, HB_F}; #1; check(bus_value == HB_E, "bus conflict"); mech[M_BUS_CONFLICT]++;
    bus_assert = '{HB_Z, HB_U}; #1; check(bus_value == HB_U, "bus unknown");

    // PPL row
    @(negedge clk);
    ppl_phi = 1; ppl_d = 8'hA5; @(negedge clk);
    ppl_phi = 0; ppl_d = 8'h00; @(negedge clk);
    check(ppl_q == 8'hA5, $sformatf("ppl stored word %h", ppl_q)); mech[M_PPL_LOAD]++;
    ppl_ctl = 1; #1;
    for (int i = 0; i < 8; i++) check(ppl_col[i] == ((8'hA5 >> i) & 1 ? HB_T : HB_F), "ppl column driven");
    mech[M_PPL_DRIVE]++;
    ppl_ctl = 0; #1;
    for (int i = 0; i < 8; i++) check(ppl_col[i] == HB_Z, "ppl column released");
    mech[M_PPL_RELEASE]++;

    // rollback memory (waits for its initialisation)
    @(negedge clk);
    while (!rbc_ready) @(negedge clk);
    rbc(RBC_WRITE, 1, 0, 32'hA, 0, w); mech[M_RBC_WRITE]++;
    rbc(RBC_MARK, 0, 1, '0, 0, w); mech[M_RBC_MARK]++;
    rbc(RBC_WRITE, 1, 0, 32'hB, 0, w);
    rbc_read(1, 32'hB, M_RBC_READ_FRAME, 1);
    rbc_read(2, 32'h0, M_RBC_READ_ARCHIVE, 0);
    rbc(RBC_ROLLBACK, 0, 1, '0, 0, w); mech[M_RBC_ROLLBACK]++;
    check(rbc_cmf == 0, "cmf after rollback");
    rbc_read(1, 32'hA, M_RBC_READ_FRAME, 0); mech[M_RBC_STALE_DROPPED]++;
    rbc_read(2, 32'h0, M_RBC_READ_ARCHIVE, 1);
    rbc(RBC_ROLLBACK, 0, 1, '0, 1, w); mech[M_RBC_ERR_ROLLBACK]++;
    rbc(RBC_MARK, 0, 1, '0, 0, w);
    rbc(RBC_WRITE, 2, 0, 32'hC, 0, w);
    rbc(RBC_MARK, 0, 1, '0, 0, w);
    rbc(RBC_ADVANCE, 0, 2, '0, 0, w); mech[M_RBC_ADVANCE]++;
    check(rbc_omf == 2 && rbc_cmf == 2, "pointers after advance");
    rbc_read(1, 32'hA, M_RBC_READ_ARCHIVE, 0);
    rbc_read(2, 32'hC, M_RBC_READ_ARCHIVE, 0); mech[M_RBC_STALE_DROPPED]++;
    rbc_read(2, 32'hC, M_RBC_READ_ARCHIVE, 1);
    rbc(RBC_ADVANCE, 0, 1, '0, 1, w); mech[M_RBC_ERR_ADVANCE]++;
    rbc(RBC_MARK, 0, 7, '0, 0, w);
    check(rbc_cmf == 1, "cmf wrapped");
    if (rbc_cmf < rbc_omf) mech[M_RBC_WRAP]++;
    rbc(RBC_MARK, 0, 1, '0, 1, w); mech[M_RBC_ERR_MARK]++;
    rbc(RBC_WRITE, 1, 0, 32'hD, 0, w);
    rbc_read(1, 32'hD, M_RBC_READ_FRAME, 1);
    rbc(RBC_ROLLBACK, 0, 3, '0, 0, w);
    rbc_read(1, 32'hA, M_RBC_READ_ARCHIVE, 0); mech[M_RBC_STALE_DROPPED]++;
    rbc_read(2, 32'hC, M_RBC_READ_ARCHIVE, 1);
    // eight more lines push line 1 (least recently used) out of the cache
    for (int l = 10; l < 18; l++) rbc(RBC_WRITE, l, 0, 32'(l), 0, w);
    rbc_read(2, 32'hC, M_RBC_READ_ARCHIVE, 0);
    rbc_read(17, 32'd17, M_RBC_READ_FRAME, 1);
    rbc_read(1, 32'hA, M_RBC_READ_ARCHIVE, 0); mech[M_RBC_EVICT]++;

    for (int m = 0; m < M_COUNT; m++) begin
      mech_t mm;
      mm = mech_t'(m);
      $display("mechanism %-20s happened %0d times", mm.name(), mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mm.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
