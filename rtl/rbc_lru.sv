// rbc_lru: least-recently-used order over the N entries of the MRV cache.
//
// Every entry has an age between 0 (most recently used) and N-1 (least
// recently used); the ages are always a permutation of 0..N-1. One operation
// per cycle, applied at the rising edge:
//   LRU_RESET     ages become 0, 1, ..., N-1 (entry N-1 is the LRU one)
//   LRU_REFERENCE entry idx becomes the most recently used; entries that were
//                 younger than it age by one
//   LRU_MAKELRU   entry idx becomes the least recently used; entries that
//                 were older than it get one step younger
// lru_idx names the current least recently used entry (combinational), the
// answer to the getlru query. rst_n has the effect of LRU_RESET.
//
// The four operations are the ones the document names for this unit; their
// exact meaning and the age-counter implementation are this design's reading.
module rbc_lru #(
  parameter int N = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    lru_op,   // 0 none, 1 reset, 2 reference, 3 makelru
  input  logic [IW-1:0] idx,
  output logic [IW-1:0] lru_idx
);

  localparam logic [1:0] OP_RESET = 2'd1, OP_REF = 2'd2, OP_MAKELRU = 2'd3;

  logic [IW-1:0] age [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) age[i] <= IW'(i);
    end else begin
      unique case (lru_op)
        OP_RESET:
          for (int i = 0; i < N; i++) age[i] <= IW'(i);
        OP_REF:
          for (int i = 0; i < N; i++) begin
            if (IW'(i) == idx)          age[i] <= '0;
            else if (age[i] < age[idx]) age[i] <= age[i] + 1'b1;
          end
        OP_MAKELRU:
          for (int i = 0; i < N; i++) begin
            if (IW'(i) == idx)          age[i] <= IW'(N - 1);
            else if (age[i] > age[idx]) age[i] <= age[i] - 1'b1;
          end
        default: ;
      endcase
    end
  end

  always_comb begin
    lru_idx = '0;
    for (int i = 0; i < N; i++)
      if (age[i] == IW'(N - 1)) lru_idx = IW'(i);
  end

endmodule
