// tb_rbc_cache: random lookups, entry writes and invalidations of the MRV
// cache against a reference array of entries. Every cycle the lookup result
// (hit, hit_idx, hit_data), the invalidation mask for random CMF/OMF values
// and the free-entry answer are compared with the reference; entry writes
// keep each line in at most one entry, as the controller does.
module tb_rbc_cache;
  localparam int N = 4, LW = 4, FW = 3, DW = 16, NF = 8;
  logic clk = 0, rst_n = 0;
  logic [LW-1:0] lk_line = '0, wline = '0;
  logic hit, we = 0, warch = 0, inv = 0, free_valid;
  logic [1:0] hit_idx, widx = '0, free_idx;
  logic [DW-1:0] hit_data, wdata = '0;
  logic [FW-1:0] wframe = '0, cmf = '0, omf = '0;
  logic [N-1:0] inv_mask;
  int checks = 0, failures = 0;
  int n_hits = 0, n_inv = 0, n_arch_kept = 0, n_full = 0;

  bit            r_valid [N];
  int            r_line  [N];
  logic [DW-1:0] r_data  [N];
  int            r_frame [N];
  bit            r_arch  [N];

  rbc_cache #(.N(N), .LW(LW), .FW(FW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // frame f is live when it lies in the circular range omf..cmf
  function automatic bit live(int f, int c, int o);
    return ((f - o + NF) % NF) <= ((c - o + NF) % NF);
  endfunction

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int s, ehit, efree;
      bit exp_mask [N];
      // drive this cycle's inputs
      lk_line = LW'($urandom_range(2**LW - 1));
      cmf = FW'($urandom); omf = FW'($urandom);
      s = $urandom_range(9);
      we = 0; inv = 0;
      if (s < 5) begin
        we = 1; wline = LW'($urandom_range(2**LW - 1));
        wdata = DW'($urandom); wframe = FW'($urandom); warch = ($urandom_range(3) == 0);
        widx = 2'($urandom_range(N-1));
        // a line already cached is rewritten in its own entry
        foreach (r_valid[i]) if (r_valid[i] && r_line[i] == int'(wline)) widx = 2'(i);
      end else if (s < 7) inv = 1;
      #1;
      // combinational answers
      ehit = -1; efree = -1;
      foreach (r_valid[i]) begin
        if (r_valid[i] && r_line[i] == int'(lk_line)) ehit = i;
        if (!r_valid[i] && efree < 0) efree = i;
        exp_mask[i] = r_valid[i] && !r_arch[i] && !live(r_frame[i], int'(cmf), int'(omf));
        check(inv_mask[i] == exp_mask[i], $sformatf("inv_mask[%0d]", i));
      end
      check(hit == (ehit >= 0), "hit");
      if (ehit >= 0) begin
        n_hits++;
        check(int'(hit_idx) == ehit && hit_data == r_data[ehit], "hit entry and data");
      end
      check(free_valid == (efree >= 0), "free_valid");
      if (efree >= 0) check(int'(free_idx) == efree, "free_idx"); else n_full++;
      // the clock edge
      @(negedge clk);
      if (inv)
        foreach (r_valid[i]) begin
          if (exp_mask[i]) begin r_valid[i] = 0; n_inv++; end
          else if (r_valid[i] && r_arch[i] && !live(r_frame[i], int'(cmf), int'(omf))) n_arch_kept++;
        end
      if (we) begin
        r_valid[widx] = 1; r_line[widx] = int'(wline); r_data[widx] = wdata;
        r_frame[widx] = int'(wframe); r_arch[widx] = warch;
      end
    end
    // reset empties the cache
    rst_n = 0; #1;
    check(free_valid && free_idx == 0 && !hit && inv_mask == '0, "reset clears all entries");
    rst_n = 1;
    check(n_hits > 500 && n_inv > 100 && n_arch_kept > 20 && n_full > 100, "coverage");
    $display("hits %0d, invalidated %0d, archive entries kept %0d, full %0d", n_hits, n_inv, n_arch_kept, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
