// ppl_dff_row: one row of D cells, each feeding a '3' cell, as tiled in the
// Rollback History Chip.
//
// Bit i is captured from d[i] by its D cell (single-phase clock phi shared by
// the row, see ppl_dff_cell for the timing). The Q output of the cell feeds
// the input of the tristate cell below it; all tristate cells share one ctl
// line. When ctl is 1 the row drives its stored word onto the column wires
// col_o (HB_T/HB_F per bit), otherwise every column is HB_Z, leaving the
// columns free for another row.
//
// WIDTH=8 is the number of cell pairs in the document's tiling excerpt; the
// connection of Q to the tristate input and of the tristate output to the
// column wire follow its schematic. The inverted output of each D cell is not
// used by this row and is left open.
module ppl_dff_row
  import hop_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             phi,
  input  logic [WIDTH-1:0] d,
  input  logic             ctl,
  output hop_bit_t         col_o [WIDTH],
  output logic [WIDTH-1:0] q
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ppl_dff_cell u_d (
      .clk, .phi, .d(d[i]), .q(q[i]), .qbar()
    );
    ppl_tristate_cell u_3 (
      .ctl, .in_i(q[i]), .out_o(col_o[i])
    );
  end

endmodule
