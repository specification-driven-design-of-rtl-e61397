// tb_rbc_rm3: the rollback memory with its MRV cache, driven with random
// read/write/mark/rollback/advance traffic and compared with a reference model of the unbounded frame stack: frames are numbered without
// wrap-around, nothing is ever archived or freed, and a read looks back from
// the current frame all the way to the first one (unwritten lines read 0).
// The rollback memory must return the same word for every read, report the
// same refusals, and keep CMF/OMF equal to the reference modulo NFRAMES.
// Only four lines in sixteen fit the cache, so reads both hit and miss, and
// rollbacks and advances invalidate cached versions that reads must then
// fetch again. Timing: NLINES cycles of initialisation, read data one cycle
// after the accept on a hit and two on a miss, write and mark ready at once,
// rollback after NLINES cycles and advance after 2*NLINES cycles, and a
// refused rollback or advance after the NENTRIES+1 cycles of cache clean-up.
module tb_rbc_rm3;
  import rbc_pkg::*;
  localparam int NL = 16, NF = 4, DW = 16, LW = 4, FW = 2, NE = 4;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0;
  rbc_op_t op = RBC_NOP;
  logic [LW-1:0] line = '0;
  logic [FW-1:0] k = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic ready, rvalid, err;
  logic [FW-1:0] cmf, omf;
  logic hit;
  int n_hits = 0;
  int checks = 0, failures = 0;

  int r_cmf = 0, r_omf = 0;
  bit r_wb [int];
  logic [DW-1:0] r_data [int];
  int n_reads = 0, n_from_archive = 0, n_err_mark = 0, n_err_rb = 0, n_err_adv = 0;
  int n_rb = 0, n_adv = 0;

  rbc_rm3 #(.NLINES(NL), .NFRAMES(NF), .DW(DW), .NENTRIES(NE)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [DW-1:0] ref_read(int l, output int fr);
    for (int f = r_cmf; f >= 0; f--)
      if (r_wb.exists(f*NL + l) && r_wb[f*NL + l]) begin fr = f; return r_data[f*NL + l]; end
    fr = -1;
    return '0;
  endfunction

  task automatic wait_cycles(int n);
    for (int i = 0; i < n; i++) begin
      check(!ready, "busy");
      @(negedge clk);
    end
    check(ready, "ready after expected cycles");
  endtask

  task automatic do_op(rbc_op_t o, int l, int kk, logic [DW-1:0] d);
    bit exp_err;
    check(ready, "ready before op");
    op_valid = 1; op = o; line = LW'(l); k = FW'(kk); wdata = d;
    @(negedge clk);
    op_valid = 0; op = RBC_NOP;
    exp_err = 0;
    unique case (o)
      RBC_WRITE: begin
        r_wb[r_cmf*NL + l] = 1; r_data[r_cmf*NL + l] = d;
        check(!err && ready, "write");
      end
      RBC_READ: begin
        int fr; logic [DW-1:0] exp;
        exp = ref_read(l, fr);
        n_reads++;
        if (fr >= 0 && fr < r_omf) n_from_archive++;
        check(!ready, "read pending");
        if (hit) n_hits++;
        else begin
          check(!rvalid, "miss: no data after one cycle");
          @(negedge clk);
        end
        check(rvalid, hit ? "hit: rvalid one cycle after accept" : "miss: rvalid two cycles after accept");
        check(rdata == exp, $sformatf("read line %0d (%s)", l, hit ? "hit" : "miss"));
        @(negedge clk);
        check(ready && !rvalid, "read done");
      end
      RBC_MARK: begin
        exp_err = (r_cmf - r_omf + 1 + kk > NF);
        if (exp_err) n_err_mark++; else r_cmf += kk;
        check(ready, "mark ready");
      end
      RBC_ROLLBACK: begin
        exp_err = (kk > r_cmf - r_omf);
        if (exp_err) begin n_err_rb++; wait_cycles(NE+1); end
        else begin
          for (int f = r_cmf - kk + 1; f <= r_cmf; f++)
            for (int i = 0; i < NL; i++) r_wb[f*NL + i] = 0;
          r_cmf -= kk;
          if (kk > 0) begin n_rb++; wait_cycles(NL); end
        end
      end
      RBC_ADVANCE: begin
        exp_err = (kk > r_cmf - r_omf);
        if (exp_err) begin n_err_adv++; wait_cycles(NE+1); end
        else begin
          r_omf += kk;
          if (kk > 0) begin n_adv++; wait_cycles(2*NL); end
        end
      end
      default: ;
    endcase
    if (o == RBC_MARK || o == RBC_ROLLBACK || o == RBC_ADVANCE)
      ; // err is checked right after the accept below
    check(int'(cmf) == r_cmf % NF && int'(omf) == r_omf % NF, "CMF/OMF");
  endtask

  // err is a one-cycle pulse right after the accepting edge.
  int err_seen = 0;
  always @(posedge clk) if (err) err_seen++;

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_errs;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!ready, "initialising");
    repeat (NL - 1) @(negedge clk);
    check(!ready, "still initialising");
    @(negedge clk);
    check(ready, "ready after initialisation");
    // every line reads 0 before any write
    for (int l = 0; l < NL; l++) do_op(RBC_READ, l, 0, '0);
    for (int n = 0; n < 4000; n++) begin
      int s;
      s = $urandom_range(99);
      if (s < 35)      do_op(RBC_WRITE, $urandom_range(NL-1), 0, DW'($urandom));
      else if (s < 70) do_op(RBC_READ, $urandom_range(NL-1), 0, '0);
      else if (s < 84) do_op(RBC_MARK, 0, ($urandom_range(4) == 0) ? $urandom_range(NF-1) : 1, '0);
      else if (s < 92) do_op(RBC_ROLLBACK, 0, $urandom_range(NF-1), '0);
      else             do_op(RBC_ADVANCE, 0, $urandom_range(NF-1), '0);
    end
    exp_errs = n_err_mark + n_err_rb + n_err_adv;
    check(err_seen == exp_errs, $sformatf("refusals %0d, expected %0d", err_seen, exp_errs));
    check(n_from_archive > 20 && n_err_mark > 0 && n_err_rb > 0 && n_err_adv > 0 &&
          n_rb > 0 && n_adv > 0 && r_cmf > 4*NF && n_hits > 100 && n_reads - n_hits > 100, "coverage");
    $display("reads %0d (hits %0d, archive %0d), rollbacks %0d, advances %0d, refusals %0d/%0d/%0d, frames used %0d",
             n_reads, n_hits, n_from_archive, n_rb, n_adv, n_err_mark, n_err_rb, n_err_adv, r_cmf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
