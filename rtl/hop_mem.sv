// hop_mem: pipelined memory with nop, read and write events.
//
// The memory has two control states. In MEM it accepts any event; a write
// updates location addr with din in that tick, a read captures the word at
// addr and moves to MEM1. In MEM1 the memory drives the captured word on dout
// (dout_valid=1) for one tick while it already accepts the next event, so a
// stream of reads delivers one word per tick with a latency of one tick. A
// write accepted in MEM1 goes back to MEM; the word on dout is the one read
// before that write. One tick is one rising edge of clk.
//
// The state machine follows the document's specification of the memory. The
// event encoding, the error flag for addresses at or above DEPTH (the write is
// dropped and a read returns 0) and the reset behaviour are this design's
// choices. Contents are not reset.
module hop_mem
  import hop_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 8,
  parameter int DEPTH  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_cmd_t          cmd,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              dout_valid,
  output logic              addr_err
);

  logic [DATA_W-1:0] ms [DEPTH];   // data path state
  logic              in_range;

  assign in_range = (int'(addr) < DEPTH);
  assign addr_err = (cmd != MEM_NOP) && !in_range;

  // Data path: write, and capture of the word to deliver in MEM1.
  always_ff @(posedge clk) begin
    if (cmd == MEM_WRITE && in_range)
      ms[addr] <= din;
    if (cmd == MEM_READ)
      dout <= in_range ? ms[addr] : '0;
  end

  // Control state: MEM (dout_valid=0) or MEM1 (dout_valid=1).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= (cmd == MEM_READ);
  end

endmodule
