// tb_cfi_monitor: end-to-end test of the complete monitor at its default
// size (8192-entry edge table, two 1024-entry stacks, 16-bit bus).
//
// The testbench stands in for the instrumented CPU: every instrumentation
// point is a write cycle on the parallel bus (chip enable, address = opcode,
// data, write strobe). It first runs a legal program that uses all seven
// edge categories and nested interrupt service routines, and checks that
// the interrupt line stays low and both stacks end empty. Then it mounts one
// attack or fault per episode, each after a reset, and checks that irq
// rises at the exact cycle the design promises (three edges after the edge
// that first sees the offending write's strobe released, or TIMEOUT+1 edges
// after an unanswered source) and reports the right cause:
//   ROP-style return to a site not in the table        -> EDGE
//   branch hijacked to code without instrumentation    -> TIMEOUT
//   multi-target return to another legal site          -> RET_MISMATCH
//   register changed while an ISR ran                  -> CTX_MISMATCH
//   jump into the middle of instrumented code          -> SEQUENCE
//   call nesting deeper than the ID stack              -> OVERFLOW
//   ISR context deeper than the register stack         -> OVERFLOW
//   return with nothing on the ID stack                -> UNDERFLOW
//   firmware write to an undefined monitor address     -> ILLEGAL
// Every mechanism is counted and must have happened at least once.
module tb_cfi_monitor;
  import cfi_pkg::*;

  localparam int TIMEOUT = 32;       // the monitor's default
  localparam int IDS_DEPTH = 1024;   // the monitor's default
  localparam int RS_DEPTH  = 1024;   // the monitor's default

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ne_n, nwe_n;
  logic [3:0]  addr;
  logic [15:0] data;
  logic        irq, edge_pending;
  viol_cause_e cause;
  logic [10:0] ids_depth, rs_depth;

  cfi_monitor dut (.clk, .rst_n, .ne_n, .nwe_n, .addr, .data, .irq, .cause,
                   .edge_pending, .ids_depth, .rs_depth);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------------------------------------------------- CPU side
  int last_release;   // edge that first sampled nwe_n high after the last write
  int last_accept;    // edge at which the control unit accepted it

  task automatic tick(input int n = 1);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  task automatic cpu_write(input logic [3:0] op, input logic [15:0] d);
    ne_n = 1'b0; addr = op; data = d;
    tick();
    nwe_n = 1'b0;
    tick(2);
    nwe_n = 1'b1;
    last_release = cyc + 1;
    last_accept  = cyc + 3;
    tick();
    ne_n = 1'b1;
    tick();
  endtask

  // a register value split over two bus writes
  task automatic save_reg(input logic [31:0] v);
    cpu_write(OP_CTX_LO, v[15:0]);
    cpu_write(OP_CTX_PUSH, v[31:16]);
  endtask

  task automatic check_reg(input logic [31:0] v);
    cpu_write(OP_CHK_LO, v[15:0]);
    cpu_write(OP_CHK_POP, v[31:16]);
  endtask

  // protected transfer: source ID, the branch itself, target ID
  task automatic edge_xfer(input logic [15:0] s, input logic [15:0] t, input bit ret = 0);
    cpu_write(OP_SRC, s);
    tick(3);
    cpu_write(ret ? OP_TGT_RET : OP_TGT, t);
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_cause[16];
  int limit_edge;
  int n_edges_ok = 0, n_rets_ok = 0, n_ctx_ok = 0, n_nested_isr = 0;

  task automatic reset_dut();
    rst_n = 1'b0;
    tick(2);
    rst_n = 1'b1;
    tick();
    check(!irq && cause == VC_NONE && ids_depth == 0 && rs_depth == 0, "clean after reset");
  endtask

  // irq must be low until edge_no-1 and high from edge_no on, with cause c
  task automatic expect_irq_at(input int edge_no, input viol_cause_e c, input string what);
    check(cyc < edge_no, $sformatf("%s: irq edge still ahead", what));
    while (cyc < edge_no - 1) begin
      check(!irq, $sformatf("%s: irq not early", what));
      tick();
    end
    check(!irq, $sformatf("%s: irq low before edge %0d", what, edge_no));
    tick();
    check(irq, $sformatf("%s: irq raised after edge %0d", what, edge_no));
    check(cause == c, $sformatf("%s: cause %s (got %s)", what, c.name(), cause.name()));
    if (irq && cause == c) n_cause[c]++;
    tick(4);
    check(irq, $sformatf("%s: irq stays high", what));
  endtask

  // ISR with the eight registers stacked by the CPU on entry
  task automatic isr(input int depth, input bit corrupt);
    logic [31:0] regs [8];
    for (int i = 0; i < 8; i++) regs[i] = $urandom();
    for (int i = 0; i < 8; i++) save_reg(regs[i]);
    // an instrumented edge inside the handler
    edge_xfer(16'h0200, 16'h0201);
    if (!irq) n_edges_ok++;
    if (depth > 1) begin
      isr(depth - 1, 1'b0);
      n_nested_isr++;
    end
    if (corrupt) regs[5] ^= 32'h0000_0400;   // e.g. a changed link register
    for (int i = 7; i >= 0; i--) begin
      check_reg(regs[i]);
      if (corrupt && i == 5) return;
    end
    if (!irq) n_ctx_ok++;
  endtask

  initial begin
    rst_n = 1'b0; ne_n = 1'b1; nwe_n = 1'b1; addr = '0; data = '0;
    tick(3);
    reset_dut();

    // ---------------- legal program: all seven edge categories, nested ISRs
    edge_xfer(16'h0011, 16'h0120);                 // 1: forward, single target
    edge_xfer(16'h0012, 16'h0131);                 // 3: forward, multiple targets
    edge_xfer(16'h0012, 16'h0130);
    edge_xfer(16'h0140, 16'h0013);                 // 2: backward, single target
    n_edges_ok += 4;
    cpu_write(OP_RET_PUSH, 16'h0015);              // 4: secure call, push return site
    edge_xfer(16'h0150, 16'h0015, 1);              // 5: multi-target return
    n_edges_ok++; n_rets_ok++;
    cpu_write(OP_RET_PUSH, 16'h0017);              // 6: insecure call, single-target return
    edge_xfer(16'h0016, 16'h0160);
    isr(2, 1'b0);                                  // interrupt arrives inside the routine
    edge_xfer(16'h0161, 16'h0017, 1);
    n_edges_ok += 2; n_rets_ok++;
    for (int i = 0; i < 3; i++) cpu_write(OP_RET_PUSH, 16'h0019);  // nested calls (7)
    cpu_write(OP_RET_PUSH, 16'h001A);
    edge_xfer(16'h0018, 16'h0170);                 // 7: insecure call, multi-target return
    edge_xfer(16'h0171, 16'h001A, 1);
    n_edges_ok += 2; n_rets_ok++;
    for (int i = 0; i < 3; i++) begin
      edge_xfer(16'h0171, 16'h0019, 1);
      n_edges_ok++; n_rets_ok++;
    end
    tick(TIMEOUT + 5);
    check(!irq, "legal program raises no interrupt");
    check(ids_depth == 0 && rs_depth == 0, "stacks empty after legal program");
    check(!edge_pending, "no edge left pending");

    // ---------------- attacks and faults, one per episode
    reset_dut();
    cpu_write(OP_SRC, 16'h0140);
    tick(2);
    cpu_write(OP_TGT, 16'h0099);                   // return into a gadget
    expect_irq_at(last_release + 3, VC_EDGE, "ROP return");

    reset_dut();
    cpu_write(OP_SRC, 16'h0011);                   // branch goes to code with no write
    expect_irq_at(last_accept + TIMEOUT + 1, VC_TIMEOUT, "hijacked branch");

    reset_dut();
    limit_edge = 0;
    cpu_write(OP_SRC, 16'h0011);                   // target accepted exactly at the limit
    tick(TIMEOUT - 5);
    check(edge_pending, "edge still pending near the limit");
    limit_edge = last_accept + TIMEOUT;
    cpu_write(OP_TGT, 16'h0120);
    check(last_accept == limit_edge, "target accepted at the last allowed edge");
    tick(TIMEOUT);
    check(!irq, "target in time is accepted");
    if (!irq) n_edges_ok++;

    reset_dut();
    cpu_write(OP_RET_PUSH, 16'h0014);
    edge_xfer(16'h0150, 16'h0015, 1);              // legal edge, wrong caller
    expect_irq_at(last_release + 3, VC_RET_MISMATCH, "return to another caller");

    reset_dut();
    isr(1, 1'b1);
    expect_irq_at(last_release + 3, VC_CTX_MISMATCH, "context corrupted in ISR");

    reset_dut();
    cpu_write(OP_TGT, 16'h0120);                   // target without a source
    expect_irq_at(last_release + 3, VC_SEQUENCE, "jump into instrumented code");

    reset_dut();
    for (int i = 0; i < IDS_DEPTH; i++) cpu_write(OP_RET_PUSH, 16'(i));
    tick(2);
    check(!irq && ids_depth == 11'(IDS_DEPTH), "ID stack full without error");
    cpu_write(OP_RET_PUSH, 16'h0BAD);
    expect_irq_at(last_release + 3, VC_OVERFLOW, "ID stack overflow");

    reset_dut();
    for (int i = 0; i < RS_DEPTH; i++) save_reg(32'(i) * 32'h0001_0003);
    tick(2);
    check(!irq && rs_depth == 11'(RS_DEPTH), "register stack full without error");
    save_reg(32'hDEAD_BEEF);
    expect_irq_at(last_release + 3, VC_OVERFLOW, "register stack overflow");

    reset_dut();
    edge_xfer(16'h0150, 16'h0014, 1);              // nothing pushed
    expect_irq_at(last_release + 3, VC_UNDERFLOW, "return with empty ID stack");

    reset_dut();
    cpu_write(4'hC, 16'h1234);                     // undefined monitor address
    expect_irq_at(last_release + 3, VC_ILLEGAL, "illegal access");

    // ---------------- every mechanism must have happened
    check(n_edges_ok > 0,    "legal edges accepted");
    check(n_rets_ok > 0,     "returns matched");
    check(n_ctx_ok > 0,      "ISR contexts verified");
    check(n_nested_isr > 0,  "nested ISR");
    for (int c = int'(VC_EDGE); c <= int'(VC_ILLEGAL); c++) begin
      viol_cause_e vc;
      vc = viol_cause_e'(c);
      check(n_cause[c] > 0, $sformatf("violation %s detected", vc.name()));
    end
    $display("edges_ok=%0d returns_ok=%0d contexts_ok=%0d nested_isr=%0d",
             n_edges_ok, n_rets_ok, n_ctx_ok, n_nested_isr);
    for (int c = int'(VC_EDGE); c <= int'(VC_ILLEGAL); c++) begin
      viol_cause_e vc;
      vc = viol_cause_e'(c);
      $display("  %s: %0d", vc.name(), n_cause[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
