// cfi_ctrl: control and check unit of the CFI monitor.
//
// It decodes each command written by the instrumented firmware (opcode and
// data word, see cfi_pkg), issues the matching lookup, push or pop on the
// edge table and on the two secure stacks, compares what comes back with
// what the firmware sent, and drives the interrupt line that stops the CPU.
// It contains the edge timer (cfi_timer).
//
// Operation, per opcode:
//   OP_SRC      store the source ID and start the timer. A second source
//               while one is pending is a sequence violation: a hijacked
//               branch could otherwise land on another source write and
//               restart the timer.
//   OP_TGT      needs a pending source; stop the timer and look up
//               (source, target) in the edge table; a miss is a violation.
//   OP_TGT_RET  as OP_TGT, and also pop the secure ID stack; the popped ID
//               must equal the target ID.
//   OP_RET_PUSH push the data word on the secure ID stack.
//   OP_CTX_LO / OP_CHK_LO   hold the low half of a register value.
//   OP_CTX_PUSH push {data, held low half} on the secure register stack.
//   OP_CHK_POP  pop the register stack; the entry must equal {data, low}.
//   other       illegal access to the monitor.
// Pushing on a full stack and popping an empty one are violations too, and
// so is the timer running out before the target ID arrives.
//
// The first violation after reset sets irq and records its cause; irq stays
// high until reset, since the published scheme treats a violation as a security
// fault that halts the CPU. The opcode set, the sequence rules, the stack
// error rules and the sticky interrupt are this design's reading of the
// published scheme, which describes the checks but not their encoding.
//
// Timing: a command accepted at clock edge k (cmd_valid high before it)
// reads the edge table or a stack at that same edge, is compared in the
// following cycle, and a violation it causes shows on irq after edge k+1.
// A missing target shows on irq after edge s+TIMEOUT+1 for a source
// accepted at edge s. A new command may come every cycle.
module cfi_ctrl
  import cfi_pkg::*;
#(
  parameter int unsigned ID_W    = 16,
  parameter int unsigned BUS_W   = 16,
  parameter int unsigned REG_W   = 32,
  parameter int unsigned TIMEOUT = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  // command from the bus interface
  input  logic             cmd_valid,
  input  logic [OPC_W-1:0] cmd_op,
  input  logic [BUS_W-1:0] cmd_data,
  // edge table
  output logic             et_lookup,
  output logic [ID_W-1:0]  et_src,
  output logic [ID_W-1:0]  et_tgt,
  input  logic             et_done,
  input  logic             et_hit,
  // secure ID stack
  output logic             ids_push,
  output logic             ids_pop,
  output logic [ID_W-1:0]  ids_wdata,
  input  logic [ID_W-1:0]  ids_rdata,
  input  logic             ids_overflow,
  input  logic             ids_underflow,
  // secure register stack
  output logic             rs_push,
  output logic             rs_pop,
  output logic [REG_W-1:0] rs_wdata,
  input  logic [REG_W-1:0] rs_rdata,
  input  logic             rs_overflow,
  input  logic             rs_underflow,
  // to the CPU
  output logic             irq,
  output viol_cause_e      cause,
  // status
  output logic             edge_pending
);

  initial begin
    assert (REG_W == 2 * BUS_W) else $error("cfi_ctrl: REG_W must be 2*BUS_W");
    assert (ID_W <= BUS_W)      else $error("cfi_ctrl: an ID must fit one bus word");
  end

  // ---------------------------------------------------------------- decode
  logic is_src, is_tgt, is_tgt_ret, is_ret_push;
  logic is_ctx_lo, is_ctx_push, is_chk_lo, is_chk_pop, is_illegal;

  always_comb begin
    is_src      = 1'b0;
    is_tgt      = 1'b0;
    is_tgt_ret  = 1'b0;
    is_ret_push = 1'b0;
    is_ctx_lo   = 1'b0;
    is_ctx_push = 1'b0;
    is_chk_lo   = 1'b0;
    is_chk_pop  = 1'b0;
    is_illegal  = 1'b0;
    if (cmd_valid) begin
      unique case (cmd_op)
        OP_SRC:      is_src      = 1'b1;
        OP_TGT:      is_tgt      = 1'b1;
        OP_TGT_RET:  is_tgt_ret  = 1'b1;
        OP_RET_PUSH: is_ret_push = 1'b1;
        OP_CTX_LO:   is_ctx_lo   = 1'b1;
        OP_CTX_PUSH: is_ctx_push = 1'b1;
        OP_CHK_LO:   is_chk_lo   = 1'b1;
        OP_CHK_POP:  is_chk_pop  = 1'b1;
        default:     is_illegal  = 1'b1;
      endcase
    end
  end

  // ---------------------------------------------------------- edge timer
  logic             tmr_start, tmr_stop, tmr_expired;
  logic [ID_W-1:0]  src_q;
  logic [ID_W-1:0]  id_in;

  assign id_in = cmd_data[ID_W-1:0];

  cfi_timer #(.TIMEOUT(TIMEOUT)) u_timer (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (tmr_start),
    .stop    (tmr_stop),
    .running (edge_pending),
    .expired (tmr_expired)
  );

  logic seq_err;

  always_comb begin
    tmr_start = is_src && !edge_pending;
    et_lookup = (is_tgt || is_tgt_ret) && edge_pending;
    tmr_stop  = et_lookup;
    seq_err   = (is_src && edge_pending) || ((is_tgt || is_tgt_ret) && !edge_pending);
    et_src    = src_q;
    et_tgt    = id_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         src_q <= '0;
    else if (tmr_start) src_q <= id_in;
  end

  // ------------------------------------------------------------- stacks
  logic [BUS_W-1:0] lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       lo_q <= '0;
    else if (is_ctx_lo || is_chk_lo)  lo_q <= cmd_data;
  end

  assign ids_push  = is_ret_push;
  assign ids_pop   = is_tgt_ret;
  assign ids_wdata = id_in;
  assign rs_push   = is_ctx_push;
  assign rs_pop    = is_chk_pop;
  assign rs_wdata  = {cmd_data, lo_q};

  // ------------------------------------------------ check stage (k+1)
  logic             chk_ret_q, chk_ctx_q, seq_q, ill_q;
  logic [ID_W-1:0]  exp_id_q;
  logic [REG_W-1:0] exp_ctx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chk_ret_q <= 1'b0;
      chk_ctx_q <= 1'b0;
      seq_q     <= 1'b0;
      ill_q     <= 1'b0;
      exp_id_q  <= '0;
      exp_ctx_q <= '0;
    end else begin
      chk_ret_q <= is_tgt_ret;
      chk_ctx_q <= is_chk_pop;
      seq_q     <= seq_err;
      ill_q     <= is_illegal;
      if (is_tgt_ret) exp_id_q  <= id_in;
      if (is_chk_pop) exp_ctx_q <= {cmd_data, lo_q};
    end
  end

  logic        v_edge, v_ret, v_ctx, v_ovf, v_unf;
  viol_cause_e v_cause;

  always_comb begin
    v_edge = et_done && !et_hit;
    v_ret  = chk_ret_q && !ids_underflow && (ids_rdata != exp_id_q);
    v_ctx  = chk_ctx_q && !rs_underflow  && (rs_rdata  != exp_ctx_q);
    v_ovf  = ids_overflow || rs_overflow;
    v_unf  = ids_underflow || rs_underflow;
    // fixed priority when several are found in the same cycle
    if      (v_edge)      v_cause = VC_EDGE;
    else if (v_ret)       v_cause = VC_RET_MISMATCH;
    else if (v_ctx)       v_cause = VC_CTX_MISMATCH;
    else if (seq_q)       v_cause = VC_SEQUENCE;
    else if (v_unf)       v_cause = VC_UNDERFLOW;
    else if (v_ovf)       v_cause = VC_OVERFLOW;
    else if (ill_q)       v_cause = VC_ILLEGAL;
    else if (tmr_expired) v_cause = VC_TIMEOUT;
    else                  v_cause = VC_NONE;
  end

  // ------------------------------------------------------ interrupt line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq   <= 1'b0;
      cause <= VC_NONE;
    end else if (!irq && v_cause != VC_NONE) begin
      irq   <= 1'b1;
      cause <= v_cause;
    end
  end

  // the interrupt, once raised, holds until reset
  a_irq_sticky: assert property (@(posedge clk) disable iff (!rst_n) irq |=> irq);

endmodule
