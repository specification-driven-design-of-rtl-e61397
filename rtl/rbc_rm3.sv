// rbc_rm3: rollback memory with an MRV cache (refinement level RM3).
//
// A small fully associative cache (rbc_cache, NENTRIES entries, LRU
// replacement by rbc_lru) sits in front of the RM2 rollback memory
// (rbc_rm2). It holds, for recently used lines, the most recent version (MRV)
// together with the frame it lives in, so that a read that hits does not
// need the written-bit search and frame memory access. This controller plays
// the role of the cache management microcode:
//
//   READ hit   rdata/rvalid one cycle after the accept; the entry becomes
//              most recently used.
//   READ miss  the read goes to RM2; its result (two cycles after the accept)
//              is returned and filled into a free entry, or else into the
//              least recently used one, with the frame it came from.
//   WRITE      goes to RM2 (write-through); the line's entry, or a newly
//              allocated one, takes the word with frame CMF.
//   MARK       goes to RM2; the cache is unchanged (no MRV changes).
//   ROLLBACK,  go to RM2. In the next cycle every cached version whose frame
//   ADVANCE    is no longer between OMF and CMF is invalidated, then those
//              entries are made least recently used, one per cycle. Entries
//              holding an archive version stay valid. With k=0 nothing is
//              done; a refused one still costs the NENTRIES+1 clean-up cycles.
//
// The handshake, err pulse and refusal rules are those of rbc_rm2, and ready
// also waits for RM2. The cache, its LRU unit and the invalidation duty are
// the document's; the write-through, write-allocate policy, the sizes and the
// exact invalidation rule are this design's choices. NLINES must be at least
// NENTRIES + 2 so the LRU clean-up ends before RM2 finishes its sweep.
module rbc_rm3
  import rbc_pkg::*;
#(
  parameter int NLINES   = 256,
  parameter int NFRAMES  = 8,
  parameter int DW       = 32,
  parameter int NENTRIES = 8,
  localparam int LW = $clog2(NLINES),
  localparam int FW = $clog2(NFRAMES),
  localparam int IW = (NENTRIES > 1) ? $clog2(NENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          op_valid,
  input  rbc_op_t       op,
  input  logic [LW-1:0] line,
  input  logic [FW-1:0] k,
  input  logic [DW-1:0] wdata,
  output logic          ready,
  output logic [DW-1:0] rdata,
  output logic          rvalid,
  output logic          hit,
  output logic          err,
  output logic [FW-1:0] cmf,
  output logic [FW-1:0] omf
);

  typedef enum logic [2:0] {
    C_IDLE,
    C_HIT,    // cached word on rdata
    C_MISS,   // waiting for RM2's read result
    C_FIX,    // invalidate entries outside OMF..CMF
    C_DEMOTE  // make the invalidated entries least recently used
  } cstate_t;

  cstate_t       state;
  logic [LW-1:0] line_q;
  logic [IW-1:0] victim_q;
  logic [IW-1:0] idx_q;
  logic [NENTRIES-1:0] inv_q;
  logic [DW-1:0] hit_data_q;

  // RM2
  logic          m_valid, m_ready, m_rvalid, m_rarch;
  logic [DW-1:0] m_rdata;
  logic [FW-1:0] m_rframe;

  rbc_rm2 #(.NLINES(NLINES), .NFRAMES(NFRAMES), .DW(DW)) u_rm2 (
    .clk, .rst_n, .op_valid(m_valid), .op, .line, .k, .wdata,
    .ready(m_ready), .rdata(m_rdata), .rvalid(m_rvalid),
    .rframe(m_rframe), .rarch(m_rarch), .err, .cmf, .omf
  );

  // cache and LRU
  logic          c_hit, c_we, c_warch, c_inv, c_free_valid;
  logic [IW-1:0] c_hit_idx, c_widx, c_free_idx;
  logic [DW-1:0] c_hit_data, c_wdata;
  logic [LW-1:0] c_wline;
  logic [FW-1:0] c_wframe;
  logic [NENTRIES-1:0] c_inv_mask;
  logic [1:0]    l_op;
  logic [IW-1:0] l_idx, l_lru;

  rbc_cache #(.N(NENTRIES), .LW(LW), .FW(FW), .DW(DW)) u_cache (
    .clk, .rst_n, .lk_line(line), .hit(c_hit), .hit_idx(c_hit_idx), .hit_data(c_hit_data),
    .we(c_we), .widx(c_widx), .wline(c_wline), .wdata(c_wdata), .wframe(c_wframe), .warch(c_warch),
    .inv(c_inv), .cmf, .omf, .inv_mask(c_inv_mask),
    .free_valid(c_free_valid), .free_idx(c_free_idx)
  );

  localparam logic [1:0] LRU_NONE = 2'd0, LRU_REF = 2'd2, LRU_MAKELRU = 2'd3;

  rbc_lru #(.N(NENTRIES)) u_lru (
    .clk, .rst_n, .lru_op(l_op), .idx(l_idx), .lru_idx(l_lru)
  );

  logic          accept;
  logic [IW-1:0] victim;

  assign ready  = (state == C_IDLE) && m_ready;
  assign accept = op_valid && ready;
  assign victim = c_free_valid ? c_free_idx : l_lru;

  always_comb begin
    m_valid  = 1'b0;
    c_we     = 1'b0;
    c_widx   = victim;
    c_wline  = line;
    c_wdata  = wdata;
    c_wframe = cmf;
    c_warch  = 1'b0;
    c_inv    = 1'b0;
    l_op     = LRU_NONE;
    l_idx    = c_hit_idx;
    unique case (state)
      C_IDLE: if (accept) begin
        unique case (op)
          RBC_READ: begin
            m_valid = !c_hit;
            if (c_hit) l_op = LRU_REF;
          end
          RBC_WRITE: begin
            m_valid = 1'b1;
            c_we    = 1'b1;
            c_widx  = c_hit ? c_hit_idx : victim;
            l_op    = LRU_REF;
            l_idx   = c_widx;
          end
          RBC_MARK, RBC_ROLLBACK, RBC_ADVANCE: m_valid = 1'b1;
          default: ;
        endcase
      end
      C_MISS: if (m_rvalid) begin
        c_we     = 1'b1;
        c_widx   = victim_q;
        c_wline  = line_q;
        c_wdata  = m_rdata;
        c_wframe = m_rframe;
        c_warch  = m_rarch;
        l_op     = LRU_REF;
        l_idx    = victim_q;
      end
      C_FIX: c_inv = 1'b1;
      C_DEMOTE: begin
        l_op  = inv_q[idx_q] ? LRU_MAKELRU : LRU_NONE;
        l_idx = idx_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      line_q     <= '0;
      victim_q   <= '0;
      idx_q      <= '0;
      inv_q      <= '0;
      hit_data_q <= '0;
      hit        <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: if (accept) begin
          line_q   <= line;
          victim_q <= victim;
          if (op == RBC_READ) begin
            hit        <= c_hit;
            hit_data_q <= c_hit_data;
            state      <= c_hit ? C_HIT : C_MISS;
          end
          if ((op == RBC_ROLLBACK || op == RBC_ADVANCE) && k != '0) state <= C_FIX;
        end
        C_HIT:  state <= C_IDLE;
        C_MISS: if (m_rvalid) state <= C_IDLE;
        C_FIX: begin
          inv_q <= c_inv_mask;
          idx_q <= '0;
          state <= C_DEMOTE;
        end
        C_DEMOTE: begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == IW'(NENTRIES - 1)) state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign rvalid = (state == C_HIT) || (state == C_MISS && m_rvalid);
  assign rdata  = (state == C_HIT) ? hit_data_q : m_rdata;

  initial assert (NLINES >= NENTRIES + 2) else $error("rbc_rm3: NLINES too small for the LRU clean-up");

endmodule
