// rbc_rm2: version-controlled memory of the Roll Back Chip at refinement
// level RM2.
//
// A program reads and writes NLINES lines of a data segment. It can take
// snapshots (mark), return to an earlier snapshot (rollback) and discard old
// snapshots (advance). Snapshots are kept as mark frames in a circular buffer
// of NFRAMES frames. CMF is the current mark frame, the one written to; OMF is
// the oldest frame still kept. A write stores the word in frame CMF and sets
// the line's written bit for CMF. A read returns the newest version: the word
// of the first frame, going back from CMF to OMF, whose written bit is set, or
// the archive frame (Aframe) if none is. Operations:
//
//   READ(line)      3 cycles: accept, memory read, rdata with rvalid=1.
//                   rframe names the frame the word came from, or rarch=1
//                   if it came from Aframe.
//   WRITE(line,d)   1 cycle.
//   MARK(k)         1 cycle; CMF += k. Refused (err) if more than NFRAMES
//                   frames would be live.
//   ROLLBACK(k)     CMF -= k, then 1 cycle per line to clear the written bits
//                   of the k frames given up. Refused if CMF would pass OMF.
//   ADVANCE(k)      OMF += k, then 2 cycles per line: a line with no written
//                   bit in the new OMF frame gets its newest version among the
//                   freed frames copied to Aframe, and the freed frames'
//                   written bits are cleared. Refused if OMF would pass CMF.
//
// Handshake: an operation is taken when op_valid and ready are both 1; the
// requester holds op_valid and the operands until then. err pulses for one
// cycle when an operation is refused (the state is then unchanged). After
// reset, CMF=OMF=0, all written bits are clear and the module spends NLINES
// cycles clearing Aframe (ready=0), so unwritten lines read as 0.
//
// The data structure, the operations and the archiving rule are the
// document's. The cycle timing, the refusal of illegal operations, the eager
// clearing of written bits on rollback (the document later proposes a lazy
// scheme) and the zeroed archive are this design's choices. NFRAMES and NLINES
// must be powers of two.
module rbc_rm2
  import rbc_pkg::*;
#(
  parameter int NLINES  = 256,
  parameter int NFRAMES = 8,
  parameter int DW      = 32,
  localparam int LW = $clog2(NLINES),
  localparam int FW = $clog2(NFRAMES)
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
  output logic [FW-1:0] rframe,
  output logic          rarch,
  output logic          err,
  output logic [FW-1:0] cmf,
  output logic [FW-1:0] omf
);

  typedef enum logic [2:0] {
    S_INIT,      // clear Aframe after reset
    S_IDLE,      // accept an operation
    S_RD_MEM,    // read issued to frame memory or Aframe
    S_RD_OUT,    // rdata valid
    S_RB,        // rollback: clear written bits, one line per cycle
    S_AD_SCAN,   // advance: scan one line, start the copy
    S_AD_COPY    // advance: write the copied word into Aframe
  } state_t;

  state_t             state;
  logic [LW-1:0]      line_q;     // sweep counter
  logic [NFRAMES-1:0] mask_q;     // frames whose written bits are cleared
  logic [FW-1:0]      scan_start_q;
  logic [FW-1:0]      scan_k_q;
  logic               copy_q;
  logic               rd_frame_q; // read result comes from the frame memory
  logic [FW-1:0]      rd_mrv_q;   // frame the read result comes from
  logic [DW-1:0]      rd_word_q;

  logic               accept;
  logic [FW-1:0]      depth_used;       // CMF - OMF, live frames minus one
  logic [FW:0]        live;

  assign accept = op_valid && ready;
  assign depth_used   = cmf - omf;
  assign live   = {1'b0, depth_used} + 1'b1;
  assign ready  = (state == S_IDLE);

  // Bits base, base+1, ..., base+count-1 (modulo NFRAMES).
  function automatic logic [NFRAMES-1:0] frame_mask(logic [FW-1:0] base, logic [FW-1:0] count);
    logic [NFRAMES-1:0] m;
    m = '0;
    for (int i = 0; i < NFRAMES; i++)
      if (i < int'(count)) m[FW'(base + FW'(i))] = 1'b1;
    return m;
  endfunction

  // ---------------------------------------------------------------- storage
  logic [LW-1:0]      wb_addr;
  logic [NFRAMES-1:0] wb_row, wb_wrow;
  logic               wb_we;

  rbc_wb_array #(.NLINES(NLINES), .NFRAMES(NFRAMES)) u_wb (
    .clk, .rst_n, .raddr(wb_addr), .rrow(wb_row),
    .we(wb_we), .waddr(wb_addr), .wrow(wb_wrow)
  );

  logic [FW-1:0] srch_start;
  logic [FW:0]   srch_span;
  logic          srch_found;
  logic [FW-1:0] srch_frame;

  rbc_mrv_search #(.NFRAMES(NFRAMES)) u_mrv (
    .row(wb_row), .start(srch_start), .span(srch_span),
    .found(srch_found), .frame(srch_frame)
  );

  logic          fm_re, fm_we;
  logic [FW+LW-1:0] fm_raddr, fm_waddr;
  logic [DW-1:0] fm_rdata;

  rbc_ram #(.AW(FW+LW), .DW(DW)) u_frames (
    .clk, .re(fm_re), .raddr(fm_raddr), .rdata(fm_rdata),
    .we(fm_we), .waddr(fm_waddr), .wdata(wdata)
  );

  logic          af_re, af_we;
  logic [LW-1:0] af_waddr;
  logic [DW-1:0] af_rdata, af_wdata;

  rbc_ram #(.AW(LW), .DW(DW)) u_aframe (
    .clk, .re(af_re), .raddr(line), .rdata(af_rdata),
    .we(af_we), .waddr(af_waddr), .wdata(af_wdata)
  );

  // ------------------------------------------------------------- datapath
  always_comb begin
    wb_addr    = (state == S_IDLE) ? line : line_q;
    wb_we      = 1'b0;
    wb_wrow    = wb_row;
    srch_start = cmf;
    srch_span  = live;
    fm_re      = 1'b0;
    fm_raddr   = {srch_frame, wb_addr};
    fm_we      = 1'b0;
    fm_waddr   = {cmf, line};
    af_re      = 1'b0;
    af_we      = 1'b0;
    af_waddr   = line_q;
    af_wdata   = '0;
    unique case (state)
      S_INIT: af_we = 1'b1;
      S_IDLE: begin
        if (accept && op == RBC_WRITE) begin
          fm_we   = 1'b1;
          wb_we   = 1'b1;
          wb_wrow = wb_row | (NFRAMES'(1) << cmf);
        end
        if (accept && op == RBC_READ) begin
          fm_re = srch_found;
          af_re = !srch_found;
        end
      end
      S_RB: begin
        wb_we   = 1'b1;
        wb_wrow = wb_row & ~mask_q;
      end
      S_AD_SCAN: begin
        srch_start = scan_start_q;
        srch_span  = {1'b0, scan_k_q};
        fm_re      = 1'b1;
        wb_we      = 1'b1;
        wb_wrow    = wb_row & ~mask_q;
      end
      S_AD_COPY: begin
        af_we    = copy_q;
        af_wdata = fm_rdata;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      cmf          <= '0;
      omf          <= '0;
      line_q       <= '0;
      mask_q       <= '0;
      scan_start_q <= '0;
      scan_k_q     <= '0;
      copy_q       <= 1'b0;
      rd_frame_q   <= 1'b0;
      rd_mrv_q     <= '0;
      rd_word_q    <= '0;
      err          <= 1'b0;
    end else begin
      err <= 1'b0;
      unique case (state)
        S_INIT: begin
          line_q <= line_q + 1'b1;
          if (line_q == LW'(NLINES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (accept) begin
            unique case (op)
              RBC_READ: begin
                rd_frame_q <= srch_found;
                rd_mrv_q   <= srch_frame;
                state      <= S_RD_MEM;
              end
              RBC_MARK: begin
                if (int'(live) + int'(k) > NFRAMES) err <= 1'b1;
                else                                cmf <= cmf + k;
              end
              RBC_ROLLBACK: begin
                if (k > depth_used) err <= 1'b1;
                else if (k != '0) begin
                  cmf    <= cmf - k;
                  mask_q <= frame_mask(cmf - k + 1'b1, k);
                  line_q <= '0;
                  state  <= S_RB;
                end
              end
              RBC_ADVANCE: begin
                if (k > depth_used) err <= 1'b1;
                else if (k != '0) begin
                  omf          <= omf + k;
                  mask_q       <= frame_mask(omf, k);
                  scan_start_q <= omf + k - 1'b1;
                  scan_k_q     <= k;
                  line_q       <= '0;
                  state        <= S_AD_SCAN;
                end
              end
              default: ;
            endcase
          end
        end
        S_RD_MEM: begin
          rd_word_q <= rd_frame_q ? fm_rdata : af_rdata;
          state     <= S_RD_OUT;
        end
        S_RD_OUT: state <= S_IDLE;
        S_RB: begin
          line_q <= line_q + 1'b1;
          if (line_q == LW'(NLINES - 1)) state <= S_IDLE;
        end
        S_AD_SCAN: begin
          // A line already written in the new oldest frame needs no archive.
          copy_q <= srch_found && !wb_row[omf];
          state  <= S_AD_COPY;
        end
        S_AD_COPY: begin
          line_q <= line_q + 1'b1;
          state  <= (line_q == LW'(NLINES - 1)) ? S_IDLE : S_AD_SCAN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rdata  = rd_word_q;
  assign rvalid = (state == S_RD_OUT);
  assign rframe = rd_mrv_q;
  assign rarch  = !rd_frame_q;

  // Requester rule: an operation waiting for ready is held unchanged.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (op_valid && !ready) |=> (op_valid && $stable(op));
  endproperty
  a_hold: assert property (p_hold) else $error("rbc_rm2: request dropped before accept");

endmodule
