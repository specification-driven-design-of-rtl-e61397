// rbc_mrv_search: find the most recent version (MRV) frame of one line.
//
// Given the written bits of a line (one per frame), the search looks at span
// frames going backward from frame start, wrapping around the circular frame
// buffer: start, start-1, ..., start-span+1 (modulo NFRAMES). found is 1 if
// any of them has its bit set, and frame is the first such frame, the newest
// one. span=0 finds nothing. Purely combinational: the whole backward scan is
// done in one cycle over the row, which is this design's choice; the document
// describes the search itself.
//
// NFRAMES must be a power of two, so frame numbers wrap naturally.
module rbc_mrv_search #(
  parameter int NFRAMES = 8,
  localparam int FW = $clog2(NFRAMES)
) (
  input  logic [NFRAMES-1:0] row,
  input  logic [FW-1:0]      start,
  input  logic [FW:0]        span,
  output logic               found,
  output logic [FW-1:0]      frame
);

  always_comb begin
    found = 1'b0;
    frame = start;
    // Walk from the oldest candidate to the newest so the newest set bit wins.
    for (int i = NFRAMES - 1; i >= 0; i--) begin
      logic [FW-1:0] f;
      f = start - FW'(i);
      if (i < int'(span) && row[f]) begin
        found = 1'b1;
        frame = f;
      end
    end
  end

  initial assert (NFRAMES == 2**FW) else $error("NFRAMES must be a power of two");

endmodule
