// cfi_monitor: control-flow integrity monitor for a bare-metal CPU, built
// as the only circuit in an FPGA that sits on the CPU's external bus.
//
// The firmware is instrumented offline: at every insecure control-flow
// transfer, call and ISR boundary it performs plain stores to the monitor.
// The monitor checks each protected edge against the table of consented
// (source, target) basic-block pairs, each multi-target return against a
// private stack of return-site IDs, and each ISR's register context against
// a private stack of saved values. On any deviation it raises irq, which is
// wired to an interrupt input of the CPU and stops it with a security fault.
//
// Structure (the four parts and their connections follow the monitor block
// diagram): bus receiver cfi_bus_if -> control and check unit cfi_ctrl
// (with its timer) -> edge table (edge_table), secure ID stack and secure
// register stack (two cfi_stack instances). The bus receiver is this
// design's choice of CPU interface; the sizes are those of the reference
// implementation: 1024-entry stacks, 8192-entry edge table, 16-bit bus.
//
// Ports: clk, rst_n; the bus pins ne_n, nwe_n, addr (opcode, see cfi_pkg)
// and data; irq to the CPU; cause, the reason of the first violation. Two
// stack depths and edge_pending are status outputs for debug.
//
// Timing: a bus write whose nwe_n rising edge is first sampled at clock edge
// e reaches the control unit as a command at edge e+1, which accepts it at
// e+2; a violation it causes is on irq after edge e+3. A missing target ID
// is flagged on irq TIMEOUT+1 edges after its source command was accepted.
module cfi_monitor
  import cfi_pkg::*;
#(
  parameter int unsigned ID_W            = 16,
  parameter int unsigned BUS_W           = 16,
  parameter int unsigned REG_W           = 32,
  parameter int unsigned EDGE_DEPTH      = 8192,
  parameter int unsigned ID_STACK_DEPTH  = 1024,
  parameter int unsigned REG_STACK_DEPTH = 1024,
  parameter int unsigned TIMEOUT         = 32,
  parameter string       EDGE_INIT_FILE  = "rtl/cfi_edges.hex"
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // parallel bus from the CPU
  input  logic                             ne_n,
  input  logic                             nwe_n,
  input  logic [OPC_W-1:0]                 addr,
  input  logic [BUS_W-1:0]                 data,
  // interrupt line to the CPU
  output logic                             irq,
  output viol_cause_e                      cause,
  // status
  output logic                             edge_pending,
  output logic [$clog2(ID_STACK_DEPTH):0]  ids_depth,
  output logic [$clog2(REG_STACK_DEPTH):0] rs_depth
);

  logic             cmd_valid;
  logic [OPC_W-1:0] cmd_op;
  logic [BUS_W-1:0] cmd_data;

  cfi_bus_if #(.ADDR_W(OPC_W), .BUS_W(BUS_W)) u_bus (
    .clk, .rst_n,
    .ne_n, .nwe_n, .addr, .data,
    .cmd_valid, .cmd_op, .cmd_data
  );

  logic             et_lookup, et_done, et_hit;
  logic [ID_W-1:0]  et_src, et_tgt;
  logic             ids_push, ids_pop, ids_overflow, ids_underflow;
  logic [ID_W-1:0]  ids_wdata, ids_rdata;
  logic             rs_push, rs_pop, rs_overflow, rs_underflow;
  logic [REG_W-1:0] rs_wdata, rs_rdata;

  cfi_ctrl #(.ID_W(ID_W), .BUS_W(BUS_W), .REG_W(REG_W), .TIMEOUT(TIMEOUT)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_op, .cmd_data,
    .et_lookup, .et_src, .et_tgt, .et_done, .et_hit,
    .ids_push, .ids_pop, .ids_wdata, .ids_rdata, .ids_overflow, .ids_underflow,
    .rs_push, .rs_pop, .rs_wdata, .rs_rdata, .rs_overflow, .rs_underflow,
    .irq, .cause, .edge_pending
  );

  edge_table #(.ID_W(ID_W), .DEPTH(EDGE_DEPTH), .INIT_FILE(EDGE_INIT_FILE)) u_edges (
    .clk, .rst_n,
    .lookup (et_lookup),
    .src    (et_src),
    .tgt    (et_tgt),
    .done   (et_done),
    .hit    (et_hit)
  );

  cfi_stack #(.WIDTH(ID_W), .DEPTH(ID_STACK_DEPTH)) u_id_stack (
    .clk, .rst_n,
    .push      (ids_push),
    .pop       (ids_pop),
    .wdata     (ids_wdata),
    .rdata     (ids_rdata),
    .depth     (ids_depth),
    .overflow  (ids_overflow),
    .underflow (ids_underflow)
  );

  cfi_stack #(.WIDTH(REG_W), .DEPTH(REG_STACK_DEPTH)) u_reg_stack (
    .clk, .rst_n,
    .push      (rs_push),
    .pop       (rs_pop),
    .wdata     (rs_wdata),
    .rdata     (rs_rdata),
    .depth     (rs_depth),
    .overflow  (rs_overflow),
    .underflow (rs_underflow)
  );

endmodule
