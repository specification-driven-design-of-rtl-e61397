// tb_rbc_mrv_search: random written-bit rows, start frames and spans. The
// expected frame is found by stepping back from start one frame at a time.
module tb_rbc_mrv_search;
  localparam int NF = 8, FW = 3;
  logic [NF-1:0] row;
  logic [FW-1:0] start, frame;
  logic [FW:0] span;
  logic found;
  int checks = 0, failures = 0;
  int n_found = 0, n_wrap = 0;

  rbc_mrv_search #(.NFRAMES(NF)) dut (.*);

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      bit ef; int fr;
      row = NF'($urandom) & NF'($urandom);
      start = FW'($urandom); span = (FW+1)'($urandom_range(NF));
      ef = 0; fr = 0;
      for (int i = 0; i < span; i++) begin
        int f;
        f = (int'(start) - i + NF) % NF;
        if (!ef && row[f]) begin ef = 1; fr = f; if (i > int'(start)) n_wrap++; end
      end
      #1;
      checks++;
      if (found != ef || (ef && int'(frame) != fr)) begin
        failures++;
        $display("FAIL row=%b start=%0d span=%0d -> %b/%0d exp %b/%0d", row, start, span, found, frame, ef, fr);
      end
      if (ef) n_found++;
    end
    checks++;
    if (n_found < 100 || n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
