// cfi_bus_if: receiver for the CPU's writes on the parallel CPU-FPGA bus.
//
// The monitor is mapped into the CPU's address space as an external memory
// device on a 16-bit parallel bus with active-low chip enable (ne_n) and
// write enable (nwe_n), as an SRAM-style external memory controller drives
// it. Every instrumentation point in the firmware is a plain store to this
// device: the low address bits select the opcode and the data bus carries
// the basic-block ID or one half of a register value. The monitor never
// answers reads, so there is no output data path.
//
// CPU and FPGA run from the same oscillator, so the bus pins are sampled
// with one register stage and no handshake (the published scheme states
// that no synchronisation is needed). Address and data are captured on
// every cycle in which both strobes are low; the command is issued on the
// first cycle in which nwe_n is seen high again, so it uses the last values
// sampled inside the strobe. The bus write must keep nwe_n low for at least one
// FPGA clock period with address and data stable.
//
// Interface and timing: cmd_valid is a one-cycle pulse that rises at the
// clock edge after the one that first samples nwe_n high; cmd_op and
// cmd_data are valid with it.
module cfi_bus_if #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned BUS_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // parallel bus, CPU side
  input  logic              ne_n,
  input  logic              nwe_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  data,
  // command to the control unit
  output logic              cmd_valid,
  output logic [ADDR_W-1:0] cmd_op,
  output logic [BUS_W-1:0]  cmd_data
);

  logic              ne_n_q, nwe_n_q;
  logic [ADDR_W-1:0] addr_q;
  logic [BUS_W-1:0]  data_q;
  logic              in_write;   // a write strobe has been seen and not yet closed

  // input sampling stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ne_n_q  <= 1'b1;
      nwe_n_q <= 1'b1;
      addr_q  <= '0;
      data_q  <= '0;
    end else begin
      ne_n_q  <= ne_n;
      nwe_n_q <= nwe_n;
      addr_q  <= addr;
      data_q  <= data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_write  <= 1'b0;
      cmd_valid <= 1'b0;
      cmd_op    <= '0;
      cmd_data  <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (!ne_n_q && !nwe_n_q) begin
        in_write <= 1'b1;
        cmd_op   <= addr_q;
        cmd_data <= data_q;
      end else if (in_write) begin
        in_write  <= 1'b0;
        cmd_valid <= 1'b1;
      end
    end
  end

endmodule
