// tb_cfi_bus_if: self-checking test of the parallel-bus write receiver.
//
// The testbench plays the CPU's external memory controller: each write
// drives chip enable, address and data, holds write enable low for a random
// number of cycles (at least one), then releases it. Some strobes are given
// with the chip not selected and must be ignored. Every real write must give
// exactly one command with the written opcode and data, and it must appear
// right after the second clock edge that sees write enable high again.
module tb_cfi_bus_if;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ne_n, nwe_n;
  logic [3:0]  addr;
  logic [15:0] data;
  logic        cmd_valid;
  logic [3:0]  cmd_op;
  logic [15:0] cmd_data;

  cfi_bus_if dut (.clk, .rst_n, .ne_n, .nwe_n, .addr, .data, .cmd_valid, .cmd_op, .cmd_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock-edge counter and the expected commands (edge number, op, data)
  int cyc = 0;
  typedef struct { int edge_no; logic [3:0] op; logic [15:0] d; } exp_t;
  exp_t exp_q[$];
  int n_cmd = 0;

  always @(posedge clk) begin
    cyc++;
    #2;
    if (rst_n) begin
      if (exp_q.size() > 0 && exp_q[0].edge_no == cyc) begin
        exp_t e;
        e = exp_q.pop_front();
        check(cmd_valid, "command issued on time");
        check(cmd_op == e.op && cmd_data == e.d, "command contents");
        n_cmd++;
      end else begin
        check(!cmd_valid, "no spurious command");
      end
    end
  end

  task automatic bus_write(input logic [3:0] a, input logic [15:0] d, input bit selected);
    int setup, len;
    setup = $urandom_range(0, 2);
    len   = $urandom_range(1, 4);
    ne_n  = !selected;
    addr  = a;
    data  = d;
    repeat (setup) begin @(posedge clk); #1; end
    nwe_n = 1'b0;
    repeat (len) begin @(posedge clk); #1; end
    nwe_n = 1'b1;
    // nwe_n high is first sampled at the next edge (cyc+1); command after cyc+2
    if (selected) exp_q.push_back('{edge_no: cyc + 2, op: a, d: d});
    @(posedge clk); #1;
    ne_n = 1'b1;
    addr = 4'($urandom());
    data = 16'($urandom());
    repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
  endtask

  initial begin
    rst_n = 1'b0; ne_n = 1'b1; nwe_n = 1'b1; addr = '0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      bus_write(4'($urandom()), 16'($urandom()), $urandom_range(0, 9) != 0);
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all writes delivered");
    $display("commands=%0d", n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
