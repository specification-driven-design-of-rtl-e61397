// ppl_tristate_cell: the '3' cell of the path-programmable-logic library, a
// tristate driver.
//
// When ctl is 1 the cell drives in_i onto its output (HB_T or HB_F); when ctl
// is 0 it does not drive and the output is HB_Z. The output is a value of the
// HOP bit lattice rather than a Verilog z, so that several cells on one
// column can be resolved with hop_bus in a two-state simulator.
// Combinational. The function is the document's; the lattice encoding of
// high impedance is this design's choice.
module ppl_tristate_cell
  import hop_pkg::*;
(
  input  logic     ctl,
  input  logic     in_i,
  output hop_bit_t out_o
);

  always_comb begin
    if (!ctl)     out_o = HB_Z;
    else if (in_i) out_o = HB_T;
    else          out_o = HB_F;
  end

endmodule
