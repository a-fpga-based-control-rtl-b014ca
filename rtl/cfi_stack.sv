// cfi_stack: hardware LIFO used for both secure stacks of the monitor.
//
// The monitor keeps two private stacks that the program cannot reach: the
// secure ID stack (return-site basic-block IDs, pushed at a call and popped
// at a multi-target return) and the secure register stack (register values
// saved at ISR entry and popped, in reverse order, at ISR exit). Both have
// the same behaviour, so one module serves both, sized by WIDTH and DEPTH
// (1024 entries each in the reference implementation).
//
// Storage is a single-port array written at the stack pointer and read one
// cycle after a pop, which maps onto one block RAM. Interface and timing:
//   push  : writes wdata at the top; ignored (and overflow pulsed) when full.
//   pop   : rdata holds the popped entry from the next clock edge on;
//           ignored (and underflow pulsed) when empty.
//   push and pop in the same cycle is not used by the monitor; pop wins.
//   depth is the number of entries held after the last clock edge.
// Full/empty reporting and the error pulses are this design's choice; the
// published scheme only requires the stacks to be dimensioned large enough.
module cfi_stack #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic                     pop,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata,
  output logic [$clog2(DEPTH):0]   depth,
  output logic                     overflow,
  output logic                     underflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      sp;          // number of entries held
  logic [AW-1:0]    top_addr;
  logic             empty, full;

  assign empty    = (sp == '0);
  assign full     = (sp == (AW+1)'(DEPTH));
  assign depth    = sp;
  assign top_addr = AW'(sp - 1'b1);

  // Block-RAM style storage: one write port at sp, registered read at sp-1.
  always_ff @(posedge clk) begin
    if (push && !pop && !full) mem[sp[AW-1:0]] <= wdata;
    if (pop && !empty)         rdata <= mem[top_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp        <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= 1'b0;
      underflow <= 1'b0;
      if (pop) begin
        if (empty) underflow <= 1'b1;
        else       sp <= sp - 1'b1;
      end else if (push) begin
        if (full)  overflow <= 1'b1;
        else       sp <= sp + 1'b1;
      end
    end
  end

endmodule
