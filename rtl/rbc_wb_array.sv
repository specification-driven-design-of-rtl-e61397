// rbc_wb_array: the written-bits matrix of the rollback memory.
//
// Row i belongs to line i and holds one bit per mark frame; bit j is set when
// line i was written while frame j was the current frame. A cleared bit is a
// hole: the line's value for that frame is found in an older frame. The array
// reads one whole row combinationally (rrow) and writes one whole row at the
// rising edge (we/waddr/wrow), which lets the controller set or clear any
// group of bits of a line in one cycle. Reset clears every bit.
//
// The matrix organisation (lines by frames) is the document's; keeping it in
// flip-flops with a row-wide port is this design's choice.
module rbc_wb_array #(
  parameter int NLINES  = 256,
  parameter int NFRAMES = 8,
  localparam int LW = $clog2(NLINES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LW-1:0]      raddr,
  output logic [NFRAMES-1:0] rrow,
  input  logic               we,
  input  logic [LW-1:0]      waddr,
  input  logic [NFRAMES-1:0] wrow
);

  logic [NFRAMES-1:0] wb [NLINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLINES; i++) wb[i] <= '0;
    end else if (we) begin
      wb[waddr] <= wrow;
    end
  end

  assign rrow = wb[raddr];

endmodule
