// tb_cfi_workload: long legal runs through the full-size monitor, shaped
// like the instrumented benchmark firmware the scheme was measured on.
//
// The monitor has its default sizes; only the edge list is this firmware's
// own (tb/tb_workload_edges.hex, same entry formula as the monitor's
// default file). Three traffic profiles are driven through the bus pins:
//   dense     - back-to-back indirect calls to seven short functions from
//               two call sites, with multi-target returns checked against
//               the ID stack (the bit-counting benchmark is dominated by
//               exactly this pattern), bus writes as fast as the receiver
//               allows;
//   sparse    - the same calls with long stretches of uninstrumented code
//               between them, as in the benchmarks with <1% overhead;
//   recursion - a recursive routine 1000 calls deep, close to the 1024
//               entries of the ID stack, then unwound.
// Interrupts arrive at random points outside protected transfers (the
// firmware masks them for the few instructions of a transfer), save eight
// registers, take an instrumented edge of their own and may nest three deep.
// A legal run must never raise irq, and the stack depths must follow a
// model kept here. At the end one hijacked call must still be caught at the
// exact cycle. Source-to-target times are drawn up to the timeout so that
// the timer is exercised near its limit.
module tb_cfi_workload;
  import cfi_pkg::*;

  localparam int TIMEOUT = 32;   // the monitor's default
  localparam int NF = 7;         // functions reachable through the pointer

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

  cfi_monitor #(.EDGE_INIT_FILE("tb/tb_workload_edges.hex")) dut (
    .clk, .rst_n, .ne_n, .nwe_n, .addr, .data, .irq, .cause,
    .edge_pending, .ids_depth, .rs_depth);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // irq must never rise during a legal run
  bit legal = 1'b0;
  int irq_cycles = 0;
  always @(posedge clk) if (legal && irq) irq_cycles++;

  // ---------------------------------------------------------- CPU side
  int last_release, last_accept;
  int n_writes = 0;
  bit fast = 1'b0;

  task automatic tick(input int n = 1);
    repeat (n) begin @(posedge clk); #1; end
  endtask

  // one bus write. Fast writes hold the strobe for one cycle and release it
  // for one; with fixed set the write takes a known time: the control unit
  // accepts it at the edge start+4 (fast) or start+6 (slow).
  task automatic cpu_write(input logic [3:0] op, input logic [15:0] d, input bit fixed = 0);
    ne_n = 1'b0; addr = op; data = d;
    if (!fast) tick(fixed ? 1 : $urandom_range(0, 2));
    nwe_n = 1'b0;
    tick(fast ? 1 : fixed ? 2 : $urandom_range(1, 3));
    nwe_n = 1'b1;
    last_release = cyc + 1;
    last_accept  = cyc + 3;
    n_writes++;
    tick();
    if (!fast) begin
      ne_n = 1'b1;
      if (!fixed) tick($urandom_range(0, 2));
    end
  endtask

  // protected transfer: the target must be accepted within TIMEOUT edges of
  // the source; the gap is drawn so that some land on the last allowed edge
  int n_xfer = 0, n_at_limit = 0;
  task automatic xfer(input logic [15:0] s, input logic [15:0] t, input bit ret);
    int gap, src_acc;
    cpu_write(OP_SRC, s);
    src_acc = last_accept;
    gap = $urandom_range(0, 3) == 0 ? TIMEOUT : $urandom_range(1, TIMEOUT - 8);
    while (cyc + (fast ? 4 : 6) < src_acc + gap) tick();
    cpu_write(ret ? OP_TGT_RET : OP_TGT, t, 1'b1);
    check(last_accept - src_acc <= TIMEOUT, "target within the timeout");
    if (last_accept - src_acc == TIMEOUT) n_at_limit++;
    n_xfer++;
  endtask

  // ------------------------------------------------------------ model state
  int model_ids = 0, model_rs = 0;
  int max_ids = 0, max_rs = 0;
  int n_calls = 0, n_isr = 0, n_nested = 0, n_rec_max = 0;
  int isr_level = 0;

  task automatic check_depths(input string what);
    tick(4);
    check(32'(ids_depth) == model_ids, $sformatf("%s: ID stack depth %0d/%0d", what, ids_depth, model_ids));
    check(32'(rs_depth) == model_rs, $sformatf("%s: register stack depth %0d/%0d", what, rs_depth, model_rs));
    check(!irq, $sformatf("%s: no interrupt", what));
  endtask

  task automatic isr();
    logic [31:0] regs [8];
    isr_level++;
    if (isr_level > 1) n_nested++;
    n_isr++;
    for (int i = 0; i < 8; i++) begin
      regs[i] = $urandom();
      cpu_write(OP_CTX_LO, regs[i][15:0]);
      cpu_write(OP_CTX_PUSH, regs[i][31:16]);
      model_rs++;
    end
    if (model_rs > max_rs) max_rs = model_rs;
    xfer(16'h0600, 16'h0601, 1'b0);
    if (isr_level < 3 && $urandom_range(0, 3) == 0) isr();
    for (int i = 7; i >= 0; i--) begin
      cpu_write(OP_CHK_LO, regs[i][15:0]);
      cpu_write(OP_CHK_POP, regs[i][31:16]);
      model_rs--;
    end
    isr_level--;
  endtask

  task automatic maybe_isr(input int one_in);
    if ($urandom_range(1, one_in) == 1) isr();
  endtask

  // call through a function pointer from call site k to function f
  task automatic pointer_call(input int k, input int f, input int body);
    logic [15:0] site, ret;
    site = (k != 0) ? 16'h0302 : 16'h0300;
    ret  = (k != 0) ? 16'h0303 : 16'h0301;
    cpu_write(OP_RET_PUSH, ret);
    model_ids++;
    if (model_ids > max_ids) max_ids = model_ids;
    xfer(site, 16'h0400 + 16'(f), 1'b0);
    if (body > 0) tick(body);
    maybe_isr(fast ? 50 : 8);
    xfer(16'h0500 + 16'(f), ret, 1'b1);
    model_ids--;
    n_calls++;
  endtask

  // recursive routine: each level pushes its return site and calls itself;
  // the outermost call returns to the top level, the others into the routine
  task automatic recursion(input int depth);
    for (int level = 0; level < depth; level++) begin
      cpu_write(OP_RET_PUSH, level == 0 ? 16'h0704 : 16'h0703);
      model_ids++;
      if (model_ids > max_ids) max_ids = model_ids;
      xfer(16'h0700, 16'h0701, 1'b0);
      if (level % 97 == 0) maybe_isr(2);
    end
    check_depths("recursion bottom");
    n_rec_max = depth;
    maybe_isr(1);
    for (int level = depth - 1; level >= 0; level--) begin
      xfer(16'h0702, level == 0 ? 16'h0704 : 16'h0703, 1'b1);
      model_ids--;
    end
  endtask

  int t0, c_dense, w_dense, c_sparse, w_sparse;

  initial begin
    rst_n = 1'b0; ne_n = 1'b1; nwe_n = 1'b1; addr = '0; data = '0;
    tick(3);
    rst_n = 1'b1;
    tick(2);
    check(!irq && ids_depth == 0 && rs_depth == 0, "clean after reset");
    legal = 1'b1;

    // ---------------- dense: short functions called through pointers
    fast = 1'b1;
    t0 = cyc; w_dense = n_writes;
    for (int i = 0; i < 3000; i++) begin
      pointer_call($urandom_range(0, 1), $urandom_range(0, NF - 1), $urandom_range(0, 3));
      if (i % 500 == 499) check_depths("dense");
    end
    c_dense = cyc - t0; w_dense = n_writes - w_dense;
    check_depths("dense end");

    // ---------------- sparse: long uninstrumented stretches between calls
    fast = 1'b0;
    t0 = cyc; w_sparse = n_writes;
    for (int i = 0; i < 400; i++) begin
      tick($urandom_range(50, 400));
      maybe_isr(6);
      pointer_call($urandom_range(0, 1), $urandom_range(0, NF - 1), $urandom_range(20, 200));
      if (i % 100 == 99) check_depths("sparse");
    end
    c_sparse = cyc - t0; w_sparse = n_writes - w_sparse;
    check_depths("sparse end");

    // ---------------- recursion close to the ID stack capacity
    recursion(1000);
    check_depths("recursion end");

    tick(TIMEOUT + 5);
    legal = 1'b0;
    check(irq_cycles == 0, $sformatf("legal runs raise no interrupt (%0d cycles high, cause %s)",
                                     irq_cycles, cause.name()));
    check(!edge_pending, "no edge left pending");

    // ---------------- a hijacked function pointer is still caught
    cpu_write(OP_RET_PUSH, 16'h0301);
    cpu_write(OP_SRC, 16'h0300);
    tick(4);
    cpu_write(OP_TGT, 16'h0400 + 16'(NF));          // not a function of this site
    while (cyc < last_release + 2) begin
      check(!irq, "hijack: irq not early");
      tick();
    end
    check(!irq, "hijack: irq low before its edge");
    tick();
    check(irq && cause == VC_EDGE, "hijacked pointer raises EDGE three edges after release");

    // ---------------- every mechanism must have happened
    check(n_calls >= 3400,     "pointer calls completed");
    check(n_isr > 50,          "interrupts taken");
    check(n_nested > 0,        "nested interrupts");
    check(n_at_limit > 0,      "targets at the timeout limit");
    check(n_rec_max == 1000,   "recursion depth reached");
    check(max_ids >= 1000,     "ID stack used near capacity");
    $display("dense : %0d writes in %0d cycles (%0d per 1000 cycles)",
             w_dense, c_dense, w_dense * 1000 / c_dense);
    $display("sparse: %0d writes in %0d cycles (%0d per 1000 cycles)",
             w_sparse, c_sparse, w_sparse * 1000 / c_sparse);
    $display("calls=%0d transfers=%0d at_limit=%0d isr=%0d nested=%0d max_ids=%0d max_rs=%0d",
             n_calls, n_xfer, n_at_limit, n_isr, n_nested, max_ids, max_rs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
