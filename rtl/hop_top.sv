// hop_top: the hardware examples of the HOP design flow, side by side.
//
// Four independent designs share only clock and reset:
//   stk_*  the stack built from a pipelined memory, an up/down counter and a
//          stack controller (hop_stack);
//   bus_*  a two-driver bus resolved on the HOP bit lattice (hop_bus);
//   ppl_*  a row of PPL D flip-flop cells driving tristate cells onto column
//          wires, as tiled in the Rollback History Chip (ppl_dff_row);
//   rbc_*  the version-controlled memory of the Roll Back Chip at level RM3:
//          the RM2 frame memory with its MRV cache (rbc_rm3).
// Each design keeps its own interface and timing; see the module files.
// The top only brings their ports out.
module hop_top
  import hop_pkg::*;
  import rbc_pkg::*;
#(
  parameter int STK_ADDR_W  = 8,
  parameter int STK_DATA_W  = 8,
  parameter int BUS_N       = 2,
  parameter int PPL_WIDTH   = 8,
  parameter int RBC_NLINES  = 256,
  parameter int RBC_NFRAMES = 8,
  parameter int RBC_DW      = 32,
  parameter int RBC_NENTRIES = 8,
  localparam int RBC_LW = $clog2(RBC_NLINES),
  localparam int RBC_FW = $clog2(RBC_NFRAMES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // stack
  input  stack_cmd_t            stk_cmd,
  input  logic [STK_ADDR_W-1:0] stk_cdi,
  input  logic [STK_DATA_W-1:0] stk_din,
  output logic [STK_DATA_W-1:0] stk_dout,
  output logic                  stk_dout_valid,
  output logic                  stk_ready,
  // lattice bus
  input  hop_bit_t              bus_assert [BUS_N],
  output hop_bit_t              bus_value,
  // PPL register row
  input  logic                  ppl_phi,
  input  logic [PPL_WIDTH-1:0]  ppl_d,
  input  logic                  ppl_ctl,
  output hop_bit_t              ppl_col [PPL_WIDTH],
  output logic [PPL_WIDTH-1:0]  ppl_q,
  // rollback memory
  input  logic                  rbc_op_valid,
  input  rbc_op_t               rbc_op,
  input  logic [RBC_LW-1:0]     rbc_line,
  input  logic [RBC_FW-1:0]     rbc_k,
  input  logic [RBC_DW-1:0]     rbc_wdata,
  output logic                  rbc_ready,
  output logic [RBC_DW-1:0]     rbc_rdata,
  output logic                  rbc_rvalid,
  output logic                  rbc_hit,
  output logic                  rbc_err,
  output logic [RBC_FW-1:0]     rbc_cmf,
  output logic [RBC_FW-1:0]     rbc_omf
);

  hop_stack #(.ADDR_W(STK_ADDR_W), .DATA_W(STK_DATA_W)) u_stack (
    .clk, .rst_n, .cmd(stk_cmd), .cdi(stk_cdi), .din(stk_din),
    .dout(stk_dout), .dout_valid(stk_dout_valid), .ready(stk_ready)
  );

  hop_bus #(.N(BUS_N)) u_bus (
    .assert_i(bus_assert), .bus_o(bus_value)
  );

  ppl_dff_row #(.WIDTH(PPL_WIDTH)) u_row (
    .clk, .phi(ppl_phi), .d(ppl_d), .ctl(ppl_ctl),
    .col_o(ppl_col), .q(ppl_q)
  );

  rbc_rm3 #(.NLINES(RBC_NLINES), .NFRAMES(RBC_NFRAMES), .DW(RBC_DW),
            .NENTRIES(RBC_NENTRIES)) u_rbc (
    .clk, .rst_n,
    .op_valid(rbc_op_valid), .op(rbc_op), .line(rbc_line), .k(rbc_k),
    .wdata(rbc_wdata),
    .ready(rbc_ready), .rdata(rbc_rdata), .rvalid(rbc_rvalid), .hit(rbc_hit),
    .err(rbc_err), .cmf(rbc_cmf), .omf(rbc_omf)
  );

endmodule
