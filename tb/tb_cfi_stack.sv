// tb_cfi_stack: self-checking test of cfi_stack, the LIFO behind the secure
// ID stack and the secure register stack.
//
// Two instances are driven with the same random mix of pushes, pops and idle
// cycles: a 16-bit one shaped like the ID stack and a 32-bit one shaped like
// the register stack, both shallow so that full and empty are reached often.
// A queue in the testbench is the reference: every pop is checked one cycle
// later against the queue, depth is checked every cycle, and pushes on a
// full stack and pops on an empty one must pulse overflow / underflow and
// leave the contents untouched.
module tb_cfi_stack;

  localparam int unsigned DEPTH = 8;
  localparam int unsigned NOPS  = 4000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        push, pop;
  logic [15:0] wdata16;
  logic [31:0] wdata32;
  logic [15:0] rdata16;
  logic [31:0] rdata32;
  logic [$clog2(DEPTH):0] depth16, depth32;
  logic ovf16, unf16, ovf32, unf32;

  cfi_stack #(.WIDTH(16), .DEPTH(DEPTH)) dut_id (
    .clk, .rst_n, .push, .pop, .wdata(wdata16), .rdata(rdata16),
    .depth(depth16), .overflow(ovf16), .underflow(unf16)
  );

  cfi_stack #(.WIDTH(32), .DEPTH(DEPTH)) dut_reg (
    .clk, .rst_n, .push, .pop, .wdata(wdata32), .rdata(rdata32),
    .depth(depth32), .overflow(ovf32), .underflow(unf32)
  );

  logic [31:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // watchdog
  initial begin
    repeat (NOPS * 2 + 200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_ovf = 0, n_unf = 0, n_full = 0;

  initial begin
    bit          exp_ovf, exp_unf, exp_pop;
    logic [31:0] exp_val;
    rst_n = 1'b0; push = 1'b0; pop = 1'b0; wdata16 = '0; wdata32 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(depth16 == 0 && depth32 == 0, "empty after reset");
    for (int i = 0; i < int'(NOPS); i++) begin
      // bias toward pushes in the first half, pops in the second
      int r;
      r = $urandom_range(0, 99);
      push = 1'b0; pop = 1'b0;
      if (i < int'(NOPS) / 2) begin
        if (r < 55) push = 1'b1; else if (r < 90) pop = 1'b1;
      end else begin
        if (r < 35) push = 1'b1; else if (r < 90) pop = 1'b1;
      end
      wdata32 = $urandom();
      wdata16 = wdata32[15:0];
      exp_ovf = 1'b0; exp_unf = 1'b0; exp_pop = 1'b0; exp_val = '0;
      if (pop) begin
        if (model.size() == 0) exp_unf = 1'b1;
        else begin exp_pop = 1'b1; exp_val = model.pop_back(); end
      end else if (push) begin
        if (model.size() == int'(DEPTH)) exp_ovf = 1'b1;
        else model.push_back(wdata32);
      end
      @(posedge clk);
      #1;
      check(ovf16 == exp_ovf && ovf32 == exp_ovf, "overflow pulse");
      check(unf16 == exp_unf && unf32 == exp_unf, "underflow pulse");
      check(int'(depth16) == model.size() && int'(depth32) == model.size(), "depth");
      if (exp_pop) begin
        check(rdata32 == exp_val, "pop value (32-bit)");
        check(rdata16 == exp_val[15:0], "pop value (16-bit)");
      end
      if (exp_ovf) n_ovf++;
      if (exp_unf) n_unf++;
      if (model.size() == int'(DEPTH)) n_full++;
    end
    push = 1'b0; pop = 1'b0;
    check(n_ovf > 0, "overflow exercised");
    check(n_unf > 0, "underflow exercised");
    check(n_full > 0, "full reached");
    $display("overflows=%0d underflows=%0d full_cycles=%0d", n_ovf, n_unf, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
