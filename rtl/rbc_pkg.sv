// rbc_pkg: operations of the rollback memory (Roll Back Chip, level RM2).
//
//   RBC_READ     return the most recent version of a line
//   RBC_WRITE    write a line in the current mark frame
//   RBC_MARK     take k new snapshots: the current mark frame moves up by k
//   RBC_ROLLBACK return to the state k mark frames back
//   RBC_ADVANCE  discard the k oldest mark frames, archiving what is still live
package rbc_pkg;

  typedef enum logic [2:0] {
    RBC_NOP      = 3'd0,
    RBC_READ     = 3'd1,
    RBC_WRITE    = 3'd2,
    RBC_MARK     = 3'd3,
    RBC_ROLLBACK = 3'd4,
    RBC_ADVANCE  = 3'd5
  } rbc_op_t;

endpackage
