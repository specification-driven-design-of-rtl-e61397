// tb_hop_bus: checks the bus against the lattice order Z < T,F,U < E. The
// expected value is computed from the order relation (the least element that
// is above every assertion), not from the lub function, for every combination
// of assertions of a three-driver bus.
module tb_hop_bus;
  import hop_pkg::*;
  localparam int N = 3;
  hop_bit_t assert_i [N];
  hop_bit_t bus_o;
  int checks = 0, failures = 0;

  hop_bus #(.N(N)) dut (.*);

  function automatic bit leq(hop_bit_t a, hop_bit_t b);
    return a == HB_Z || b == HB_E || a == b;
  endfunction

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hop_bit_t vals [5] = '{HB_Z, HB_F, HB_T, HB_U, HB_E};
    for (int a = 0; a < 5; a++)
      for (int b = 0; b < 5; b++)
        for (int c = 0; c < 5; c++) begin
          hop_bit_t exp;
          assert_i[0] = vals[a]; assert_i[1] = vals[b]; assert_i[2] = vals[c];
          // least upper bound by search over the lattice
          exp = HB_E;
          for (int v = 4; v >= 0; v--)
            if (leq(vals[a], vals[v]) && leq(vals[b], vals[v]) && leq(vals[c], vals[v])
                && leq(vals[v], exp))
              exp = vals[v];
          #1;
          checks++;
          if (bus_o != exp) begin
            failures++;
            $display("FAIL %s %s %s -> %s, expected %s", vals[a].name(), vals[b].name(),
                     vals[c].name(), bus_o.name(), exp.name());
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
