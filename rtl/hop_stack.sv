// hop_stack: a stack built from the pipelined memory, the up/down counter and
// the stack controller.
//
// The counter output is the memory address; the controller drives the events
// of both. Seen from outside (one tick = one rising clock edge, t = tick in
// which the event is offered while ready=1):
//
//   RESET: cdi is sampled at t+1 and becomes the stack pointer.
//   PUSH : the pointer is incremented at t+1; din is sampled at t+2 and written
//          at the incremented pointer.
//   POP  : the pointer is decremented at t+1.
//   TOP  : the word at the pointer is read at t+1 and shown on dout with
//          dout_valid=1 during t+2. The stack state does not change.
//   NOP  : nothing happens.
//
// ready is 0 in the ticks after an event until the sequence ends; events
// offered then are ignored. The wiring and the protocol are the document's;
// widths are this design's choice, with bytes as the stacked items.
module hop_stack
  import hop_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  stack_cmd_t        cmd,
  input  logic [ADDR_W-1:0] cdi,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic              ready
);

  mem_cmd_t          mem_cmd;
  ctr_cmd_t          ctr_cmd;
  logic [ADDR_W-1:0] sp;
  logic              sp_valid;
  logic              addr_err;

  hop_sctl u_sctl (
    .clk, .rst_n, .cmd,
    .mem_cmd, .ctr_cmd, .ready
  );

  hop_ctr #(.W(ADDR_W)) u_ctr (
    .clk, .rst_n, .cmd(ctr_cmd), .cdi,
    .cdo(sp), .cdo_valid(sp_valid)
  );

  hop_mem #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .DEPTH(2**ADDR_W)) u_mem (
    .clk, .rst_n, .cmd(mem_cmd), .addr(sp), .din,
    .dout, .dout_valid, .addr_err
  );

  // The memory only ever uses the counter value in ticks where the counter
  // asserts it, and with DEPTH = 2**ADDR_W every address is in range.
  a_ptr_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(mem_cmd != MEM_NOP && !sp_valid))
    else $error("hop_stack: memory used the pointer during a load");
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) !addr_err)
    else $error("hop_stack: address out of range");

endmodule
