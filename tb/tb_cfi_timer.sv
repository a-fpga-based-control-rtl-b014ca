// tb_cfi_timer: self-checking test of the edge timeout timer.
//
// Each trial starts the timer and stops it after a random number of cycles
// d (or never). The expected behaviour is worked out from the timer's
// contract: with a start sampled at edge 0, a stop sampled at edge d <=
// TIMEOUT prevents the expiry, otherwise expired pulses for exactly one
// cycle after edge TIMEOUT. A restart while running is also checked: the
// count begins again from the restart.
module tb_cfi_timer;

  localparam int unsigned TIMEOUT = 12;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic start, stop, running, expired;

  cfi_timer #(.TIMEOUT(TIMEOUT)) dut (.clk, .rst_n, .start, .stop, .running, .expired);

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

  // Start at edge 0, optionally restart at edge r, stop at edge d (d = 0
  // means no stop). Checks expired and running after every edge.
  task automatic trial(input int d, input int r);
    int last_start, exp_edge, n_exp;
    last_start = 0;
    n_exp = 0;
    start = 1'b1; stop = 1'b0;
    @(posedge clk); #1;
    start = 1'b0;
    for (int e = 1; e <= int'(TIMEOUT) + 20; e++) begin
      bit stopped;
      start = (r != 0 && e == r);
      stop  = (d != 0 && e == d);
      @(posedge clk); #1;
      if (start && !stop) last_start = e;
      start = 1'b0; stop = 1'b0;
      stopped  = (d != 0 && d <= last_start + int'(TIMEOUT) && e >= d);
      exp_edge = last_start + int'(TIMEOUT);
      // expired after edge exp_edge unless stopped by then
      check(expired == (!stopped && e == exp_edge && !(d != 0 && d == exp_edge)),
            $sformatf("expired (d=%0d r=%0d e=%0d)", d, r, e));
      check(running == (e < exp_edge && !(d != 0 && e >= d)),
            $sformatf("running (d=%0d r=%0d e=%0d)", d, r, e));
      if (expired) n_exp++;
    end
    check(n_exp == ((d == 0 || d > last_start + int'(TIMEOUT)) ? 1 : 0), "expiry count");
  endtask

  int n_expired_trials = 0;

  initial begin
    rst_n = 1'b0; start = 1'b0; stop = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(!running && !expired, "idle after reset");
    trial(0, 0);                           // no stop: must expire
    trial(int'(TIMEOUT), 0);               // stop exactly at the limit: in time
    trial(int'(TIMEOUT) + 1, 0);           // one cycle late: expires
    trial(1, 0);
    trial(0, 5);                           // restart while running
    for (int k = 0; k < 60; k++) begin
      int d;
      d = $urandom_range(0, int'(TIMEOUT) + 4);
      trial(d, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
