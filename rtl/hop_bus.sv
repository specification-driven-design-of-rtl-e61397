// hop_bus: a wire shared by N drivers, resolved on the HOP bit lattice.
//
// Every driver asserts a hop_bit_t value on assert_i (HB_Z when it does not
// drive). All readers see the least upper bound of all assertions: HB_Z if
// nobody drives, the common value if all drivers agree, and HB_E when two
// drivers disagree or any driver asserts HB_E. Purely combinational.
//
// The lattice and the lub rule come from the document's bus example; N=2
// matches its two producers.
module hop_bus
  import hop_pkg::*;
#(
  parameter int N = 2
) (
  input  hop_bit_t assert_i [N],
  output hop_bit_t bus_o
);

  always_comb begin
    bus_o = HB_Z;
    for (int i = 0; i < N; i++)
      bus_o = hop_lub(bus_o, assert_i[i]);
  end

endmodule
