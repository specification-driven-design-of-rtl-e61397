// hop_ctr: up/down counter used as the stack pointer.
//
// The counter state cs is asserted on cdo in every tick except a load tick,
// where cdo_valid drops to 0 (the document's counter makes no assertion then).
// Events: CTR_NOP keeps cs, CTR_LOAD takes cdi, CTR_UP and CTR_DOWN add or
// subtract one after the current value has been asserted, so the new value is
// visible from the next tick. Arithmetic wraps modulo 2**W. One tick is one
// rising edge of clk.
//
// The four events and their effect are the document's; the width, the wrap
// and the reset to 0 are this design's choices.
module hop_ctr
  import hop_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ctr_cmd_t     cmd,
  input  logic [W-1:0] cdi,
  output logic [W-1:0] cdo,
  output logic         cdo_valid
);

  logic [W-1:0] cs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cs <= '0;
    else begin
      unique case (cmd)
        CTR_LOAD: cs <= cdi;
        CTR_UP:   cs <= cs + 1'b1;
        CTR_DOWN: cs <= cs - 1'b1;
        default:  cs <= cs;
      endcase
    end
  end

  assign cdo       = cs;
  assign cdo_valid = (cmd != CTR_LOAD);

endmodule
