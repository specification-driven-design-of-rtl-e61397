// ppl_dff_cell: the 'D' cell of the path-programmable-logic library, a
// master/slave D flip-flop on a single-phase clock phi.
//
// The cell holds two internal nodes, dps1 (master) and dps2 (slave), each
// storing an inverted value. Every tick (rising edge of clk) the cell looks
// at phi:
//   phi=1 (load): q = dps2, qbar = not dps2; the master takes not d.
//   phi=0 (hold): q = not dps1, qbar = dps1; the slave takes not dps1.
// So d is captured while phi is high and appears on q in the first tick with
// phi low; q stays stable while phi is high. Outputs are combinational from
// phi and the two nodes.
//
// This behaviour is the document's cell specification, read one protocol step
// per clock edge. The transistor-level circuit and the wires that only pass
// through the cell are not modelled. The cell has no reset, like the original;
// its state is defined after one load and one hold tick.
module ppl_dff_cell (
  input  logic clk,
  input  logic phi,
  input  logic d,
  output logic q,
  output logic qbar
);

  logic dps1, dps2;

  always_ff @(posedge clk) begin
    if (phi) dps1 <= ~d;
    else     dps2 <= ~dps1;
  end

  always_comb begin
    if (phi) begin
      q    = dps2;
      qbar = ~dps2;
    end else begin
      q    = ~dps1;
      qbar = dps1;
    end
  end

endmodule
