// rbc_ram: synchronous memory with one read and one write port, used for the
// mark frame stack (one word per frame and line) and for the archive frame.
//
// A read issued with re=1 returns the word on rdata after the next rising
// edge, and rdata holds until the next read. A write with we=1 takes effect at
// the rising edge; a read of the same address in the same cycle returns the
// old word. Contents are not reset. Depth is 2**AW words of DW bits; both
// sizes are this design's choice.
module rbc_ram #(
  parameter int AW = 8,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
