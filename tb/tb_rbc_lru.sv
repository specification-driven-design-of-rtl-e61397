// tb_rbc_lru: random reset/reference/makelru sequences against a reference
// list kept in use order (front = most recently used). lru_idx must always
// name the last element of the list.
module tb_rbc_lru;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] lru_op = 0;
  logic [2:0] idx = 0, lru_idx;
  int checks = 0, failures = 0;
  int order [$];

  rbc_lru #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic void remove(int e);
    foreach (order[i]) if (order[i] == e) begin order.delete(i); return; end
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    order = {};
    for (int i = 0; i < N; i++) order.push_back(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int r;
      check(int'(lru_idx) == order[N-1], "lru_idx");
      r = $urandom_range(19);
      lru_op = (r == 0) ? 2'd1 : (r < 4) ? 2'd0 : (r < 14) ? 2'd2 : 2'd3;
      idx = 3'($urandom);
      @(negedge clk);
      unique case (lru_op)
        2'd1: begin order = {}; for (int i = 0; i < N; i++) order.push_back(i); end
        2'd2: begin remove(idx); order.push_front(idx); end
        2'd3: begin remove(idx); order.push_back(idx); end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
