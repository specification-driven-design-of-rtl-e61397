// hop_sctl: stack controller.
//
// In its top state the controller accepts one external event per tick and
// answers it, in that same tick, with a memory nop and a counter nop. The
// following ticks run a fixed event sequence on the memory and the counter,
// during which ready is 0 and any external event is ignored:
//
//   RESET: tick 1 counter load (cdi is taken)
//   PUSH : tick 1 counter up, tick 2 memory write at the new pointer
//   POP  : tick 1 counter down
//   TOP  : tick 1 memory read at the pointer, tick 2 idle (memory drives dout)
//
// mem_cmd and ctr_cmd are decoded from the state alone (Moore outputs). The
// sequences are the document's; the state encoding, the ready output and the
// rule that events offered while busy are dropped are this design's choices.
module hop_sctl
  import hop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  stack_cmd_t cmd,
  output mem_cmd_t   mem_cmd,
  output ctr_cmd_t   ctr_cmd,
  output logic       ready
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_LOAD,
    S_UP,
    S_WRITE,
    S_DOWN,
    S_READ,
    S_WAIT
  } state_t;

  state_t state, state_d;

  always_comb begin
    state_d = S_IDLE;
    unique case (state)
      S_IDLE: begin
        unique case (cmd)
          STK_RESET: state_d = S_LOAD;
          STK_PUSH:  state_d = S_UP;
          STK_POP:   state_d = S_DOWN;
          STK_TOP:   state_d = S_READ;
          default:   state_d = S_IDLE;
        endcase
      end
      S_UP:    state_d = S_WRITE;
      S_READ:  state_d = S_WAIT;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_d;
  end

  always_comb begin
    mem_cmd = MEM_NOP;
    ctr_cmd = CTR_NOP;
    unique case (state)
      S_LOAD:  ctr_cmd = CTR_LOAD;
      S_UP:    ctr_cmd = CTR_UP;
      S_WRITE: mem_cmd = MEM_WRITE;
      S_DOWN:  ctr_cmd = CTR_DOWN;
      S_READ:  mem_cmd = MEM_READ;
      default: ;
    endcase
  end

  assign ready = (state == S_IDLE);

endmodule
