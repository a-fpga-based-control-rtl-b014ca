// cfi_pkg: types and constants shared by the control-flow integrity monitor.
//
// The instrumented firmware talks to the monitor only through memory-mapped
// writes. The low address bits of each write carry an opcode that tells the
// monitor what the data word is; the data word carries a basic-block ID or
// one 16-bit half of a 32-bit register value. The opcode numbering below is
// a choice of this design; the set of operations follows the seven edge
// categories and two context categories of the protection scheme:
//
//   OP_SRC      source basic-block ID, sent before a protected transfer;
//               arms the edge timer.
//   OP_TGT      target basic-block ID, sent after the transfer; the pair
//               (source, target) must be in the edge table.
//   OP_TGT_RET  target ID at the return site of a multi-target backward edge;
//               checked against the edge table and against the ID popped
//               from the secure ID stack.
//   OP_RET_PUSH return-site ID, pushed on the secure ID stack at a call.
//   OP_CTX_LO / OP_CTX_PUSH   ISR entry: low half, then high half of one
//               register; the high half pushes the whole word on the secure
//               register stack.
//   OP_CHK_LO / OP_CHK_POP    ISR exit: same, in reverse register order; the
//               high half pops the register stack and compares.
//
// Any other opcode is an access the firmware is not allowed to make and is
// reported as a violation.
package cfi_pkg;

  localparam int unsigned OPC_W = 4;

  typedef enum logic [OPC_W-1:0] {
    OP_SRC      = 4'h0,
    OP_TGT      = 4'h1,
    OP_TGT_RET  = 4'h2,
    OP_RET_PUSH = 4'h3,
    OP_CTX_LO   = 4'h4,
    OP_CTX_PUSH = 4'h5,
    OP_CHK_LO   = 4'h6,
    OP_CHK_POP  = 4'h7
  } opcode_e;

  // Reason recorded with the first violation after reset.
  typedef enum logic [3:0] {
    VC_NONE         = 4'h0,
    VC_EDGE         = 4'h1,  // (source, target) pair not in the edge table
    VC_TIMEOUT      = 4'h2,  // target ID did not arrive in time
    VC_SEQUENCE     = 4'h3,  // target without source, or second source
    VC_RET_MISMATCH = 4'h4,  // return target differs from the pushed ID
    VC_CTX_MISMATCH = 4'h5,  // register changed across an ISR
    VC_OVERFLOW     = 4'h6,  // push on a full stack
    VC_UNDERFLOW    = 4'h7,  // pop on an empty stack
    VC_ILLEGAL      = 4'h8   // write with an undefined opcode
  } viol_cause_e;

endpackage
