// rbc_cache: storage and lookup of the MRV cache (RBCache) in front of the
// rollback memory.
//
// Each of the N entries holds a valid bit, the line address (tag), the line's
// most recent version (data) and where that version lives: a mark frame
// number (frame) or the archive frame (arch=1). The lookup is fully
// associative and combinational: hit/hit_idx/hit_data for the line on
// lk_line. An entry is written at the rising edge when we=1.
//
// Invalidation: with inv=1, every valid entry that is not an archive entry
// and whose frame lies outside the live range OMF..CMF (given on cmf/omf,
// after the rollback or advance has moved them) is invalidated at the rising
// edge; inv_mask shows which entries that is, combinationally, so the
// controller can demote them in the LRU order. A cached archive version stays
// valid: rollback and advance never change it. free_idx names the lowest-numbered
// invalid entry (free_valid=1 if there is one).
//
// The document names the entry fields Inv., Line, Data and MRV, and requires
// that a hit always returns the MRV and that rollback and advance invalidate
// suitably; the invalidation rule is this design's reading. Its other fields
// (Abit, WB-Dirty, WB, Data-Dirty, WA) have no stated function and are absent.
module rbc_cache #(
  parameter int N       = 8,
  parameter int LW      = 8,
  parameter int FW      = 3,
  parameter int DW      = 32,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] lk_line,
  output logic          hit,
  output logic [IW-1:0] hit_idx,
  output logic [DW-1:0] hit_data,
  input  logic          we,
  input  logic [IW-1:0] widx,
  input  logic [LW-1:0] wline,
  input  logic [DW-1:0] wdata,
  input  logic [FW-1:0] wframe,
  input  logic          warch,
  input  logic          inv,
  input  logic [FW-1:0] cmf,
  input  logic [FW-1:0] omf,
  output logic [N-1:0]  inv_mask,
  output logic          free_valid,
  output logic [IW-1:0] free_idx
);

  typedef struct packed {
    logic          valid;
    logic [LW-1:0] line;
    logic [DW-1:0] data;
    logic [FW-1:0] frame;
    logic          arch;
  } entry_t;

  entry_t e [N];

  always_comb begin
    hit = 1'b0; hit_idx = '0; hit_data = '0;
    for (int i = 0; i < N; i++)
      if (e[i].valid && e[i].line == lk_line) begin
        hit = 1'b1; hit_idx = IW'(i); hit_data = e[i].data;
      end
  end

  always_comb begin
    logic [FW-1:0] live_span;
    live_span = cmf - omf;
    for (int i = 0; i < N; i++) begin
      logic [FW-1:0] off;
      off = e[i].frame - omf;
      inv_mask[i] = e[i].valid && !e[i].arch && (off > live_span);
    end
  end

  always_comb begin
    free_valid = 1'b0; free_idx = '0;
    for (int i = N - 1; i >= 0; i--)
      if (!e[i].valid) begin free_valid = 1'b1; free_idx = IW'(i); end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) e[i] <= '0;
    end else begin
      if (inv)
        for (int i = 0; i < N; i++) if (inv_mask[i]) e[i].valid <= 1'b0;
      if (we)
        e[widx] <= '{valid: 1'b1, line: wline, data: wdata, frame: wframe, arch: warch};
    end
  end

endmodule
