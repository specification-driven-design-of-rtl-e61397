// hop_pkg: types shared by the stack example and the PPL cells.
//
// hop_bit_t is the five-valued bit of the specification language: Z (nobody
// drives), the truth values T and F, U (unknown) and E (error). They form a
// strength lattice Z < {T, F, U} < E, where T, F and U are incomparable. When
// several drivers assert a value on one wire, the wire carries the least upper
// bound (lub) of the asserted values. hop_lub() computes that bound.
//
// The command enums encode the events of the stack submodules. The document
// leaves event encodings open; the binary encodings below are this design's
// choice and make the events of one module mutually exclusive by construction.
package hop_pkg;

  typedef enum logic [2:0] {
    HB_Z = 3'd0,
    HB_F = 3'd1,
    HB_T = 3'd2,
    HB_U = 3'd3,
    HB_E = 3'd4
  } hop_bit_t;

  // Least upper bound of two lattice values.
  function automatic hop_bit_t hop_lub(hop_bit_t a, hop_bit_t b);
    if (a == HB_Z) return b;
    if (b == HB_Z) return a;
    if (a == b)    return a;
    return HB_E;   // two different non-Z values, or anything with E
  endfunction

  // Memory events (Imnop, Iread, Iwrite).
  typedef enum logic [1:0] {
    MEM_NOP   = 2'd0,
    MEM_READ  = 2'd1,
    MEM_WRITE = 2'd2
  } mem_cmd_t;

  // Counter events (Icnop, Iload, Iup, Idown).
  typedef enum logic [1:0] {
    CTR_NOP  = 2'd0,
    CTR_LOAD = 2'd1,
    CTR_UP   = 2'd2,
    CTR_DOWN = 2'd3
  } ctr_cmd_t;

  // External stack events (Inop, Ireset, Ipush, Ipop, Itop).
  typedef enum logic [2:0] {
    STK_NOP   = 3'd0,
    STK_RESET = 3'd1,
    STK_PUSH  = 3'd2,
    STK_POP   = 3'd3,
    STK_TOP   = 3'd4
  } stack_cmd_t;

endpackage
