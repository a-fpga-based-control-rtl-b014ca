// tb_edge_table: self-checking test of the edge-table ROM at full size
// (8192 entries, 16-bit IDs) with the example firmware's edge list.
//
// The testbench holds the list of consented (source, target) pairs itself
// and decides hit or miss by searching that list, so the expected answer
// does not depend on the table's hashing. It checks that every listed pair
// hits, that every pair at Hamming distance one from a listed pair misses
// (these land on the same or a nearby index and exercise the tag compare),
// and that random pairs miss unless listed. Lookups are issued back to back
// and the one-cycle latency (done one edge after lookup) is checked.
module tb_edge_table;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        lookup, done, hit;
  logic [15:0] src, tgt;

  edge_table dut (.clk, .rst_n, .lookup, .src, .tgt, .done, .hit);

  // the consented edges of the example firmware
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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A lookup sampled at one edge has its answer right after that edge; it
  // is checked 2 time units later. Inputs change 1 time unit after an edge,
  // so sampling them at the edge is safe.
  int n_hit = 0, n_miss = 0;

  always @(posedge clk) begin
    bit          cur_valid;
    logic [15:0] cur_src, cur_tgt;
    cur_valid = rst_n && lookup;
    cur_src   = src;
    cur_tgt   = tgt;
    #2;
    if (rst_n) begin
      check(done == cur_valid, "done one cycle after lookup");
      if (cur_valid) begin
        bit exp_hit;
        exp_hit = listed(cur_src, cur_tgt);
        if (hit != exp_hit)
          $display("  pair %h -> %h expected hit=%0d", cur_src, cur_tgt, exp_hit);
        check(hit == exp_hit, "hit/miss");
        if (exp_hit) n_hit++; else n_miss++;
      end
    end
  end

  task automatic issue(input logic [15:0] s, input logic [15:0] t);
    lookup = 1'b1;
    src    = s;
    tgt    = t;
    @(posedge clk);
    #1;
  endtask

  task automatic idle();
    lookup = 1'b0;
    @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; lookup = 1'b0; src = '0; tgt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // every listed edge
    for (int i = 0; i < NE; i++) issue(e_src[i], e_tgt[i]);
    idle();
    // every neighbour at Hamming distance one
    for (int i = 0; i < NE; i++) begin
      for (int b = 0; b < 16; b++) begin
        issue(e_src[i] ^ (16'h1 << b), e_tgt[i]);
        issue(e_src[i], e_tgt[i] ^ (16'h1 << b));
      end
      idle();
    end
    // random pairs, some with a listed source
    for (int k = 0; k < 3000; k++) begin
      logic [15:0] s;
      s = ($urandom_range(0, 1) == 0) ? e_src[$urandom_range(0, NE - 1)] : 16'($urandom());
      issue(s, 16'($urandom()));
      if ($urandom_range(0, 3) == 0) idle();
    end
    idle();
    idle();
    check(n_hit >= NE, "listed edges hit");
    $display("hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
