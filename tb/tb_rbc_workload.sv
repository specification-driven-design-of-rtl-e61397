// tb_rbc_workload: a long random run of the RM3 rollback memory at its
// default sizes (256 lines, 8 frames, 32-bit words, 8 cache entries),
// compared operation by operation with a reference model of the unbounded
// frame stack, in the way the chip's detailed model is meant to be validated
// against its specification.
//
// The reference keeps, for every line, the list of its versions in frame
// order. A write replaces the newest version if it belongs to the current
// frame and appends one otherwise; a read returns the newest version (0 if
// the line was never written); a rollback drops the versions of the
// abandoned frames; an advance changes no read, so the reference only trims
// versions that are hidden behind a newer one at or below the oldest frame.
// Every read result, every refusal and both frame pointers are checked.
// The operation mix favours reads and writes over the sweeping rollback and
// advance, as a simulation that rolls back now and then would. Four accesses
// in five go to a hot set of eight lines that moves every 1000 operations,
// so the cache sees the locality a real data segment has.
module tb_rbc_workload;
  import rbc_pkg::*;
  localparam int NL = 256, NF = 8;
  localparam int NOPS = 1000000;
  logic clk = 0, rst_n = 0;
  logic op_valid = 0;
  rbc_op_t op = RBC_NOP;
  logic [7:0] line = '0;
  logic [2:0] k = '0;
  logic [31:0] wdata = '0, rdata;
  logic ready, rvalid, err, hit;
  logic [2:0] cmf, omf;
  int checks = 0, failures = 0;

  typedef struct { int frame; logic [31:0] data; } version_t;
  version_t hist [NL][$];
  int r_cmf = 0, r_omf = 0;
  int hot_base = 0;
  longint n_reads = 0, n_hits = 0, n_rb = 0, n_adv = 0, n_refused = 0;

  rbc_rm3 dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic issue(rbc_op_t o, int l, int kk, logic [31:0] d);
    while (!ready) @(negedge clk);
    op_valid = 1; op = o; line = 8'(l); k = 3'(kk); wdata = d;
    @(negedge clk);
    op_valid = 0; op = RBC_NOP;
  endtask

  initial begin
    #2000000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NOPS; n++) begin
      int s, l, kk;
      bit exp_err;
      s = $urandom_range(999);
      if (n % 1000 == 0) hot_base = $urandom_range(NL - 1);
      l = ($urandom_range(4) != 0) ? (hot_base + $urandom_range(7)) % NL : $urandom_range(NL - 1);
      kk = $urandom_range(1, NF - 1);
      exp_err = 0;
      if (s < 450) begin
        logic [31:0] d;
        d = $urandom;
        issue(RBC_WRITE, l, 0, d);
        if (hist[l].size() > 0 && hist[l][$].frame == r_cmf) hist[l][$].data = d;
        else hist[l].push_back('{frame: r_cmf, data: d});
      end else if (s < 900) begin
        logic [31:0] exp;
        exp = (hist[l].size() > 0) ? hist[l][$].data : '0;
        issue(RBC_READ, l, 0, '0);
        while (!rvalid) @(negedge clk);
        n_reads++;
        if (hit) n_hits++;
        check(rdata == exp, $sformatf("read line %0d: %h expected %h", l, rdata, exp));
      end else if (s < 970) begin
        exp_err = (r_cmf - r_omf + 1 + kk > NF);
        issue(RBC_MARK, 0, kk, '0);
        if (!exp_err) r_cmf += kk;
      end else if (s < 985) begin
        exp_err = (kk > r_cmf - r_omf);
        issue(RBC_ROLLBACK, 0, kk, '0);
        if (!exp_err) begin
          n_rb++;
          r_cmf -= kk;
          for (int i = 0; i < NL; i++)
            while (hist[i].size() > 0 && hist[i][$].frame > r_cmf) void'(hist[i].pop_back());
        end
      end else begin
        exp_err = (kk > r_cmf - r_omf);
        issue(RBC_ADVANCE, 0, kk, '0);
        if (!exp_err) begin
          n_adv++;
          r_omf += kk;
          for (int i = 0; i < NL; i++)
            while (hist[i].size() > 1 && hist[i][1].frame <= r_omf) void'(hist[i].pop_front());
        end
      end
      if (s >= 900) begin
        check(err == exp_err, "refusal");
        if (exp_err) n_refused++;
      end
      check(int'(cmf) == r_cmf % NF && int'(omf) == r_omf % NF, "CMF/OMF");
    end
    check(n_rb > 1000 && n_adv > 1000 && n_hits > n_reads / 4 && n_refused > 1000, "coverage");
    $display("operations %0d: reads %0d (cache hits %0d), rollbacks %0d, advances %0d, refusals %0d, frames used %0d",
             NOPS, n_reads, n_hits, n_rb, n_adv, n_refused, r_cmf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
