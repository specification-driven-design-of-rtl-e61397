// tb_ppl_dff_cell: random phi and d sequences. Expected behaviour, written as
// a plain master/slave model: while phi is high the master follows d and q
// shows the slave; while phi is low the slave takes the master and q shows
// it. qbar must always be the inverse of q.
module tb_ppl_dff_cell;
  logic clk = 0, phi = 1, d = 0, q, qbar;
  int checks = 0, failures = 0;
  logic m, s;
  int n_capture = 0;

  ppl_dff_cell dut (.*);
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
    // one load tick and one hold tick define the state
    phi = 1; d = 0; @(negedge clk); m = 0;
    phi = 0; @(negedge clk); s = m;
    for (int n = 0; n < 3000; n++) begin
      phi = 1'($urandom); d = 1'($urandom);
      #1;
      check(q == (phi ? s : m), "q");
      check(qbar == ~q, "qbar");
      @(negedge clk);
      if (phi) m = d;
      else begin
        if (s != m) n_capture++;
        s = m;
      end
    end
    check(n_capture > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
