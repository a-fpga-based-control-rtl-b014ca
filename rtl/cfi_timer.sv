// cfi_timer: watchdog for a protected control-flow transfer.
//
// When the monitor receives a source basic-block ID it starts this timer;
// the matching target ID must arrive before it runs out. A hijacked branch
// lands on code that carries no instrumentation, so no target ID ever comes
// and the timer catches it. The published scheme sets the limit to the
// time of one branch plus one monitor write, scaled by the CPU/FPGA clock
// ratio; the number of cycles is a parameter here because it depends on the
// CPU, the bus timing and the clock ratio.
//
// Interface and timing: start loads the counter with TIMEOUT; stop clears
// it (stop wins over start in the same cycle). expired is a one-cycle pulse
// raised TIMEOUT cycles after the start edge if no stop came in between,
// i.e. a stop is still in time when it is sampled at the TIMEOUT-th edge
// after start. running is high while the timer counts.
module cfi_timer #(
  parameter int unsigned TIMEOUT = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic running,
  output logic expired
);

  localparam int unsigned CW = $clog2(TIMEOUT + 1);

  logic [CW-1:0] count;

  assign running = (count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      expired <= 1'b0;
    end else begin
      expired <= 1'b0;
      if (stop) begin
        count <= '0;
      end else if (start) begin
        count <= CW'(TIMEOUT);
      end else if (running) begin
        count <= count - 1'b1;
        if (count == CW'(1)) expired <= 1'b1;
      end
    end
  end

endmodule
