// tb_cfi_ctrl: self-checking test of the control and check unit.
//
// cfi_ctrl is connected to a real edge table (full size, example firmware
// edges) and to two small secure stacks (4 entries, so that overflow is
// reached), as in the monitor. A random, firmware-like command stream is
// applied: source/target pairs that are mostly legal, return-ID pushes and
// checked returns, ISR context saves and restores, and now and then a wrong
// ID, a late target, a corrupted register or an undefined opcode.
//
// The reference model is written at protocol level: it keeps the pending
// source, the two stacks as queues and the edge list, and for each command
// decides whether it is a violation and which. From the documented timing
// (a command accepted at edge k is flagged after edge k+1; a missing target
// after edge s+TIMEOUT+1 for a source accepted at edge s) it predicts the
// exact edge at which irq must rise and the cause it must report. irq is
// compared with that prediction after every edge. After the first violation
// the episode ends and the unit is reset. Each kind of check and violation
// is counted and must have happened at least once.
module tb_cfi_ctrl;
  import cfi_pkg::*;

  localparam int unsigned TIMEOUT = 8;
  localparam int unsigned SDEPTH  = 4;
  localparam int          NEVER   = 32'h7fffffff;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ----------------------------------------------------------------- DUT
  logic             cmd_valid;
  logic [3:0]       cmd_op;
  logic [15:0]      cmd_data;
  logic             et_lookup, et_done, et_hit;
  logic [15:0]      et_src, et_tgt;
  logic             ids_push, ids_pop, ids_overflow, ids_underflow;
  logic [15:0]      ids_wdata, ids_rdata;
  logic             rs_push, rs_pop, rs_overflow, rs_underflow;
  logic [31:0]      rs_wdata, rs_rdata;
  logic             irq, edge_pending;
  viol_cause_e      cause;
  logic [$clog2(SDEPTH):0] ids_depth, rs_depth;

  cfi_ctrl #(.TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_op, .cmd_data,
    .et_lookup, .et_src, .et_tgt, .et_done, .et_hit,
    .ids_push, .ids_pop, .ids_wdata, .ids_rdata, .ids_overflow, .ids_underflow,
    .rs_push, .rs_pop, .rs_wdata, .rs_rdata, .rs_overflow, .rs_underflow,
    .irq, .cause, .edge_pending
  );

  edge_table u_et (.clk, .rst_n, .lookup(et_lookup), .src(et_src), .tgt(et_tgt),
                   .done(et_done), .hit(et_hit));

  cfi_stack #(.WIDTH(16), .DEPTH(SDEPTH)) u_ids (
    .clk, .rst_n, .push(ids_push), .pop(ids_pop), .wdata(ids_wdata), .rdata(ids_rdata),
    .depth(ids_depth), .overflow(ids_overflow), .underflow(ids_underflow));

  cfi_stack #(.WIDTH(32), .DEPTH(SDEPTH)) u_rs (
    .clk, .rst_n, .push(rs_push), .pop(rs_pop), .wdata(rs_wdata), .rdata(rs_rdata),
    .depth(rs_depth), .overflow(rs_overflow), .underflow(rs_underflow));

  // ------------------------------------------------- example firmware CFG
  localparam int NE = 14;
  logic [15:0] e_src [NE] = '{16'h0011, 16'h0012, 16'h0012, 16'h0140, 16'h0150, 16'h0150,
                              16'h0016, 16'h0161, 16'h0018, 16'h0171, 16'h0171, 16'h0200,
                              16'hBEEF, 16'h7FFF};
  logic [15:0] e_tgt [NE] = '{16'h0120, 16'h0130, 16'h0131, 16'h0013, 16'h0014, 16'h0015,
                              16'h0160, 16'h0017, 16'h0170, 16'h0019, 16'h001A, 16'h0201,
                              16'h1234, 16'hFFFF};

  function automatic bit listed(logic [15:0] s, logic [15:0] t);
    for (int i = 0; i < NE; i++) if (e_src[i] == s && e_tgt[i] == t) return 1'b1;
    return 1'b0;
  endfunction

  // a target listed for source s, or a random ID if s has none
  function automatic logic [15:0] target_of(logic [15:0] s);
    int idx[$];
    for (int i = 0; i < NE; i++) if (e_src[i] == s) idx.push_back(i);
    if (idx.size() == 0) return 16'($urandom());
    return e_tgt[idx[$urandom_range(0, idx.size() - 1)]];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- reference model
  bit          m_pending;
  logic [15:0] m_src;
  int          m_src_edge;
  logic [15:0] m_ids[$];
  logic [31:0] m_rs[$];
  logic [15:0] m_lo;
  int          cmd_viol_edge;
  viol_cause_e cmd_viol_cause;
  int          tmo_edge;

  // coverage of mechanisms
  int n_cause[16];
  int n_edge_ok = 0, n_ret_ok = 0, n_ctx_ok = 0, n_ids_push = 0, n_rs_push = 0;
  int n_episodes = 0;

  function automatic int exp_first();
    return (cmd_viol_edge <= tmo_edge) ? cmd_viol_edge : tmo_edge;
  endfunction

  function automatic viol_cause_e exp_cause();
    return (cmd_viol_edge <= tmo_edge) ? cmd_viol_cause : VC_TIMEOUT;
  endfunction

  task automatic model_reset();
    m_pending = 1'b0;
    m_src = '0;
    m_src_edge = 0;
    m_ids.delete();
    m_rs.delete();
    m_lo = '0;
    cmd_viol_edge = NEVER;
    cmd_viol_cause = VC_NONE;
    tmo_edge = NEVER;
  endtask

  // Applies one command accepted at edge k to the model.
  task automatic model_cmd(input int k, input logic [3:0] op, input logic [15:0] d);
    bit v_edge, v_ret, v_ctx, v_seq, v_unf, v_ovf, v_ill;
    bit edge_chk, ret_chk, ctx_chk;
    viol_cause_e c;
    v_edge = 0; v_ret = 0; v_ctx = 0; v_seq = 0; v_unf = 0; v_ovf = 0; v_ill = 0;
    edge_chk = 0; ret_chk = 0; ctx_chk = 0;
    // has the pending source run out of time before this edge?
    if (m_pending && k > m_src_edge + int'(TIMEOUT)) m_pending = 1'b0;
    case (op)
      4'h0: begin
        if (m_pending) v_seq = 1;
        else begin
          m_pending = 1'b1; m_src = d; m_src_edge = k;
          tmo_edge = k + int'(TIMEOUT) + 1;
        end
      end
      4'h1, 4'h2: begin
        if (!m_pending) v_seq = 1;
        else begin
          m_pending = 1'b0;
          tmo_edge = NEVER;
          if (!listed(m_src, d)) v_edge = 1; else edge_chk = 1;
        end
        if (op == 4'h2) begin
          if (m_ids.size() == 0) v_unf = 1;
          else begin
            logic [15:0] top;
            top = m_ids.pop_back();
            if (top != d) v_ret = 1; else ret_chk = 1;
          end
        end
      end
      4'h3: begin
        if (m_ids.size() == int'(SDEPTH)) v_ovf = 1;
        else begin m_ids.push_back(d); n_ids_push++; end
      end
      4'h4, 4'h6: m_lo = d;
      4'h5: begin
        if (m_rs.size() == int'(SDEPTH)) v_ovf = 1;
        else begin m_rs.push_back({d, m_lo}); n_rs_push++; end
      end
      4'h7: begin
        if (m_rs.size() == 0) v_unf = 1;
        else begin
          logic [31:0] top;
          top = m_rs.pop_back();
          if (top != {d, m_lo}) v_ctx = 1; else ctx_chk = 1;
        end
      end
      default: v_ill = 1;
    endcase
    if      (v_edge) c = VC_EDGE;
    else if (v_ret)  c = VC_RET_MISMATCH;
    else if (v_ctx)  c = VC_CTX_MISMATCH;
    else if (v_seq)  c = VC_SEQUENCE;
    else if (v_unf)  c = VC_UNDERFLOW;
    else if (v_ovf)  c = VC_OVERFLOW;
    else if (v_ill)  c = VC_ILLEGAL;
    else             c = VC_NONE;
    if (c != VC_NONE && cmd_viol_edge == NEVER) begin
      cmd_viol_edge  = k + 1;
      cmd_viol_cause = c;
    end
    if (c == VC_NONE) begin
      if (edge_chk) n_edge_ok++;
      if (ret_chk)  n_ret_ok++;
      if (ctx_chk)  n_ctx_ok++;
    end
  endtask

  // ------------------------------------------------------ irq comparison
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    #2;
    if (rst_n) begin
      check(irq == (cyc >= exp_first()), $sformatf("irq at edge %0d (expected from %0d, cause %0d)",
                                                   cyc, exp_first(), exp_cause()));
      if (irq) check(cause == exp_cause(), $sformatf("violation cause %0d (expected %0d)", cause, exp_cause()));
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic send(input logic [3:0] op, input logic [15:0] d);
    cmd_valid = 1'b1;
    cmd_op    = op;
    cmd_data  = d;
    model_cmd(cyc + 1, op, d);   // accepted at the next edge
    @(posedge clk); #1;
    cmd_valid = 1'b0;
    cmd_op    = 4'($urandom());
    cmd_data  = 16'($urandom());
  endtask

  task automatic gap();
    int g;
    g = ($urandom_range(0, 19) == 0) ? $urandom_range(0, 2 * int'(TIMEOUT)) : $urandom_range(0, 2);
    repeat (g) begin @(posedge clk); #1; end
  endtask

  function automatic bit done_episode();
    return cmd_viol_edge != NEVER || (m_pending && cyc + 1 > m_src_edge + int'(TIMEOUT));
  endfunction

  task automatic episode();
    int n;
    rst_n = 1'b0;
    model_reset();
    repeat (2) begin @(posedge clk); #1; end
    rst_n = 1'b1;
    n = $urandom_range(5, 120);
    for (int i = 0; i < n && !done_episode(); i++) begin
      int r;
      logic [3:0]  op;
      logic [15:0] d;
      r = $urandom_range(0, 999);
      if (m_pending) begin
        // the firmware normally sends the target next
        if (r < 800) begin
          op = 4'h1; d = ($urandom_range(0, 19) == 0) ? 16'($urandom()) : target_of(m_src);
        end else if (r < 930) begin
          op = 4'h2;
          d  = (m_ids.size() > 0 && $urandom_range(0, 9) != 0) ? m_ids[$] : target_of(m_src);
        end else if (r < 990) begin
          op = 4'($urandom_range(3, 7)); d = 16'($urandom());
        end else begin
          op = 4'h0; d = e_src[$urandom_range(0, NE - 1)];
        end
      end else begin
        if (r < 300) begin
          op = 4'h0; d = e_src[$urandom_range(0, NE - 1)];
        end else if (r < 420) begin
          op = 4'h3; d = target_of(16'h0150);
        end else if (r < 560) begin
          op = 4'h4; d = 16'($urandom());
        end else if (r < 700) begin
          op = 4'h5; d = 16'($urandom());
        end else if (r < 840) begin
          op = 4'h6;
          d  = (m_rs.size() > 0 && $urandom_range(0, 19) != 0) ? m_rs[$][15:0] : 16'($urandom());
        end else if (r < 985) begin
          op = 4'h7;
          d  = (m_rs.size() > 0 && $urandom_range(0, 19) != 0) ? m_rs[$][31:16] : 16'($urandom());
        end else if (r < 993) begin
          op = 4'h1; d = 16'($urandom());
        end else begin
          op = 4'($urandom_range(8, 15)); d = 16'($urandom());
        end
      end
      // keep the low half consistent with the pop that follows, most of the time
      if (op == 4'h7 && m_rs.size() > 0 && $urandom_range(0, 19) != 0) begin
        send(4'h6, m_rs[$][15:0]);
        if (done_episode()) break;
        d = m_rs[$][31:16];
      end
      send(op, d);
      gap();
    end
    // let a pending timeout or a detected violation show, then look at it
    repeat (int'(TIMEOUT) + 4) begin @(posedge clk); #1; end
    if (exp_first() != NEVER) n_cause[exp_cause()]++;
    n_episodes++;
  endtask

  initial begin
    rst_n = 1'b0; cmd_valid = 1'b0; cmd_op = '0; cmd_data = '0;
    model_reset();
    repeat (3) @(posedge clk);
    #1;
    for (int e = 0; e < 1500; e++) episode();
    check(n_edge_ok > 0, "legal edges accepted");
    check(n_ret_ok > 0,  "returns matched on the ID stack");
    check(n_ctx_ok > 0,  "contexts restored intact");
    for (int c = int'(VC_EDGE); c <= int'(VC_ILLEGAL); c++)
      check(n_cause[c] > 0, $sformatf("violation cause %0d seen", c));
    $display("episodes=%0d edges_ok=%0d rets_ok=%0d ctx_ok=%0d id_pushes=%0d reg_pushes=%0d",
             n_episodes, n_edge_ok, n_ret_ok, n_ctx_ok, n_ids_push, n_rs_push);
    for (int c = int'(VC_EDGE); c <= int'(VC_ILLEGAL); c++)
      $display("  cause %0d: %0d", c, n_cause[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
