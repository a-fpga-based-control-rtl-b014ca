# CFI monitor for bare-metal microcontrollers, in an FPGA beside the CPU

Code-reuse attacks (return-oriented and jump-oriented programming) take over a
program by corrupting a return address or a code pointer in data memory, so
that an indirect branch lands in the middle of existing code. Control-flow
integrity (CFI) stops this by checking, while the program runs, that every
such branch follows the program's control-flow graph.

This RTL is the hardware half of a CFI scheme for microcontrollers that run
firmware straight from flash, with no operating system. The CPU is not
changed. Instead, the firmware is instrumented offline with single store
instructions to an FPGA on the CPU's external bus, and the FPGA holds a
monitor that:

* checks each protected branch, reported as a *source* basic-block ID before
  the branch and a *target* ID after it, against a ROM of consented edges;
* keeps its own private stack of return-site IDs for returns that have
  several legal targets, and checks that a return goes back to its caller;
* keeps a private stack of register values saved when an interrupt service
  routine (ISR) starts, and checks that the ISR gives them back unchanged;
* raises an interrupt line to the CPU on the first deviation.

A hijacked branch almost never lands on an instrumentation point, so the
monitor also runs a short timer after each source ID: if the target ID does
not come in time, that too is an attack.

The scheme is the one published as *"A FPGA-based Control-Flow Integrity
Solution for Securing Bare-Metal Embedded Systems"*. Its reference
implementation ran on an STM32F4 (Cortex-M4, 180 MHz) with a Lattice MachXO2
FPGA (90 MHz) on a 16-bit parallel bus. The sizes used here are that
implementation's: an 8192-entry edge table and two 1024-entry stacks. The
instruction encoding, the hash, the bus receiver and the error rules are this
design's own. They are listed under [Design choices](#design-choices-and-departures).

```
            CPU bus                    cfi_monitor
 ne_n, nwe_n, addr, data  +-----------+   cmd   +------------------+ lookup +-------------+
 ------------------------>| cfi_bus_if|-------->|    cfi_ctrl      |<------>| edge_table  |
                          +-----------+         |  control & check |        | 8192 x 20 b |
                                                |  + cfi_timer     | push/  +-------------+
 irq, cause               <---------------------|                  | pop    +-------------+
                                                |                  |<------>| ID stack    |
                                                |                  |        | 1024 x 16 b |
                                                |                  |<------>+-------------+
                                                +------------------+        | reg stack   |
                                                                            | 1024 x 32 b |
                                                                            +-------------+
```

## How the firmware talks to the monitor

Every instrumentation point is a store to the monitor's address range. The
low four address bits are an **opcode** and the 16-bit data word is a
basic-block ID or one half of a 32-bit register value (`cfi_pkg`):

| opcode | name          | data                | what the monitor does |
|--------|---------------|---------------------|-----------------------|
| 0      | `OP_SRC`      | source BB ID        | remembers the source, starts the timer |
| 1      | `OP_TGT`      | target BB ID        | stops the timer, looks up (source, target) in the edge table |
| 2      | `OP_TGT_RET`  | target BB ID        | as `OP_TGT`, and pops the ID stack: popped ID must equal the target |
| 3      | `OP_RET_PUSH` | return-site BB ID   | pushes the ID on the secure ID stack |
| 4      | `OP_CTX_LO`   | register bits 15:0  | holds the low half |
| 5      | `OP_CTX_PUSH` | register bits 31:16 | pushes {high, low} on the secure register stack |
| 6      | `OP_CHK_LO`   | register bits 15:0  | holds the low half |
| 7      | `OP_CHK_POP`  | register bits 31:16 | pops the register stack: entry must equal {high, low} |
| 8-15   | (illegal)     | -                   | violation: firmware must never write here |

### Mapping the edge categories to writes

The offline analysis classifies an edge as *insecure* when its target is
computed, even in part, from data memory. Only insecure edges are checked.
There are seven kinds of protection point. They map onto the opcodes like this
(S = source block, T = target block, R = return site):

| # | situation | writes |
|---|-----------|--------|
| 1 | insecure forward edge, one target | `SRC S` ... branch ... `TGT T` |
| 2 | insecure backward edge (return), one target | `SRC S` ... return ... `TGT T` |
| 3 | insecure forward edge, several targets | same as 1, and every possible target starts with its own `TGT` |
| 4 | secure call to a routine whose return is insecure with several targets | `RET_PUSH R` before the call |
| 5 | insecure return with several targets | `SRC S` ... return ... `TGT_RET R` (edge-table check *and* stack check) |
| 6 | insecure call to a routine with a single-target insecure return | `RET_PUSH R`, `SRC S` ... call ... `TGT T`; the return is then as 5 |
| 7 | as 6, but the return has several targets | as 6, with every return site instrumented |

The edge table alone can only say that a target is *one of* the legal ones.
The ID stack pins a multi-target return to the one caller that actually made
the call.

### ISR context

The CPU hardware saves some registers automatically when it enters an ISR (on
Cortex-M: R0-R3, R12, LR, PC, xPSR). It cannot be known statically when an
ISR runs, so an attacker who corrupts that saved frame in memory would slip
past the static analysis. The first instructions of each ISR therefore write
those registers, and any others the ISR uses, to the monitor (`CTX_LO`,
`CTX_PUSH` per register). The last instructions before returning write the same
registers in reverse order (`CHK_LO`, `CHK_POP`). ISRs may nest; the register
stack is shared by all of them.

## What counts as a violation

`irq` rises on the first violation after reset and stays high until `rst_n`.
`cause` (`viol_cause_e`) tells which check failed:

| cause | meaning |
|-------|---------|
| `VC_EDGE` | (source, target) is not in the edge table |
| `VC_TIMEOUT` | no target ID within `TIMEOUT` cycles of the source ID |
| `VC_SEQUENCE` | a target ID with no source pending, or a second source while one is pending |
| `VC_RET_MISMATCH` | return target differs from the ID on top of the ID stack |
| `VC_CTX_MISMATCH` | a register differs from the value saved at ISR entry |
| `VC_OVERFLOW` | push on a full stack |
| `VC_UNDERFLOW` | pop on an empty stack |
| `VC_ILLEGAL` | write to an undefined opcode |

`VC_SEQUENCE` matters for security. Without it, a hijacked branch that lands
on some other `SRC` write would restart the timer and never be caught.

If several violations are found in the same cycle, one cause is reported, in
this order of priority: edge, return mismatch, context mismatch, sequence,
underflow, overflow, illegal, timeout.

## Timing

Everything runs on one clock. The CPU and the FPGA are fed from the same
oscillator, so the bus pins are sampled with a single register stage and no
synchroniser.

* `cfi_bus_if` captures address and data while `ne_n` and `nwe_n` are both
  low. When it first samples `nwe_n` high again (clock edge *e*), it issues a
  one-cycle command at edge *e+1*.
* `cfi_ctrl` accepts the command at *e+2*. At that same edge it reads the
  edge table or a stack, and it compares in the next cycle. A violation shows
  on `irq` after edge **e+3**.
* A source accepted at edge *s* must see its target accepted no later than
  edge *s+TIMEOUT*. Otherwise `irq` rises after edge **s+TIMEOUT+1**.
* A new command may be accepted every cycle. A real bus write takes several
  cycles.

`TIMEOUT` (default 32 monitor cycles) must cover one branch, the instructions
that set up the next store, and the external bus cycle, converted to monitor
clocks. At the reference clocks (CPU 180 MHz, monitor 90 MHz), 32 cycles is
64 CPU cycles. Tune it to the real CPU and bus timing. A shorter timeout
leaves an attacker less time to run code before the CPU is stopped.

## Edge table encoding

The table is a direct-mapped hash table in ROM, read in one cycle. With
16-bit IDs and 8192 entries (`IDX_W = 13`):

```
h     = src XOR rotate_left(tgt, 7)          16 bits
index = h[12:0]
entry = { valid, src[15:0], h[15:13] }       20 bits
hit   = entry.valid && entry[18:0] == { src, h[15:13] }
```

`index` and the stored tag together give back `src` and all of `h`, so `tgt`
too. A hit is therefore exact: no pair outside the list can match. Two
consented edges with the same index cannot both be stored. The offline tool
must pick basic-block IDs so that they do not collide; with at most a few
hundred edges per program in an 8192-slot table, that is easy.

The contents come from a `$readmemh` file (`EDGE_INIT_FILE`, default
`rtl/cfi_edges.hex`). Each line is `@index` followed by the 5-hex-digit entry.
Entries not listed are invalid. The file is opened relative to the directory
the simulator or synthesis tool runs in. The file shipped here holds the
14 edges of the example firmware used by the testbenches. A real firmware
gets its own file from the same formula. Check that your synthesis tool really loads the
file. Some open-source front ends skip `$readmemh` in an `initial` block
and leave an all-zero ROM, which then gets optimised away. That monitor
would flag every edge.

## Secure stacks

`cfi_stack` is a LIFO with one write port and a registered read. This is the
shape of one FPGA block RAM. `pop` delivers the top entry after the next
clock edge. A push on a full stack or a pop on an empty one is ignored and
pulses `overflow` / `underflow`, and the control unit turns these into
violations. The same module is used for both stacks: 16-bit return IDs and
32-bit register values, 1024 entries each.

## Parameters (`cfi_monitor`)

| parameter | default | notes |
|-----------|---------|-------|
| `ID_W` | 16 | basic-block ID width; must be at most `BUS_W` |
| `BUS_W` | 16 | data bus width of the reference board |
| `REG_W` | 32 | register width; must be `2*BUS_W` |
| `EDGE_DEPTH` | 8192 | edge-table entries, reference size |
| `ID_STACK_DEPTH` | 1024 | reference size |
| `REG_STACK_DEPTH` | 1024 | reference size |
| `TIMEOUT` | 32 | cycles from source to target, own estimate |
| `EDGE_INIT_FILE` | `"rtl/cfi_edges.hex"` | edge list of the firmware |

The memory needed at these sizes is 8192 × 20 + 1024 × 16 + 1024 × 32 bits,
which is 208 Kbit. That fits the 240 Kbit of block RAM in the reference FPGA.
The reference implementation reports 156 Kbit, so its table entries must have
been narrower than this design's exact 20-bit tag.

## Design choices and departures

The published scheme describes what the monitor checks, the three storage
structures, the timer and the sizes. The following were chosen here:

* **Command encoding**: the 4-bit opcode field, its numbering, and sending
  register values low half first.
* **Sequence rule** (`VC_SEQUENCE`), stack overflow/underflow as violations,
  illegal opcodes as violations, and the priority among simultaneous causes.
* **Sticky interrupt**: `irq` is cleared only by reset. The scheme says the
  CPU is stopped by a security fault, but not how the fault is cleared.
* **Hash and entry format** of the edge table (above), and resolving
  collisions offline.
* **Bus receiver**: an SRAM-style asynchronous write cycle (chip enable, write
  enable, address, data). The monitor is never read.
* **ID width** 16 bits, so that one bus write carries one ID.
* **`TIMEOUT`** value.

Known limitations:

* An interrupt that arrives between a `SRC` and its `TGT` does not pause the
  timer. An ISR that contains protected edges of its own would also cause a
  `VC_SEQUENCE` violation there. Firmware must keep a protected transfer
  free of interrupts (for example, by masking them for those few instructions)
  or keep such ISRs short and free of protected edges. The published scheme
  does not address this case.
* There is one pending source at a time, so protected transfers cannot nest.
* The register stack does not know where one ISR's frame ends. A frame
  restored with fewer or more registers than were saved is caught only when
  the values differ.

## Verification

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cfi_monitor` | whole monitor at default size, driven through the bus pins. A legal program uses all seven edge categories and nested ISRs and must not raise `irq`. Then each attack in its own episode: return into a gadget, hijacked branch (timeout), return to another legal caller, corrupted ISR context, jump into instrumented code, ID-stack and register-stack overflow at 1024 entries, underflow, illegal write. Each is checked for exact `irq` cycle and cause. A target accepted exactly at the last allowed edge must pass. |
| `tb_cfi_workload` | whole monitor at default size with its own edge list, long legal runs shaped like instrumented firmware: 3000 back-to-back calls through function pointers to short functions with multi-target returns, 400 calls separated by long uninstrumented stretches, and a recursion 1000 calls deep. Interrupts arrive between transfers and nest up to three deep. Many targets arrive on the last allowed timeout edge. No interrupt may be raised, stack depths must follow the model, and a final hijacked call must be caught. |
| `tb_cfi_ctrl` | control unit with the real table and 4-entry stacks. About 1500 random episodes are compared cycle by cycle against a protocol-level reference model; every cause must occur. |
| `tb_edge_table` | full-size ROM: all listed edges hit; every pair at Hamming distance one from a listed pair and 3000 random pairs miss unless listed; one-cycle latency. |
| `tb_cfi_stack` | 16- and 32-bit stacks against a queue model, including full and empty. |
| `tb_cfi_timer` | expiry exactly `TIMEOUT` edges after start, stop at the limit, restart. |
| `tb_cfi_bus_if` | random strobe lengths and setup times; unselected strobes are ignored; exact command timing. |

Run from the repository root, because the edge file path is relative:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cfi_pkg.sv \
          tb/tb_cfi_monitor.sv --top-module tb_cfi_monitor
./obj_dir/Vtb_cfi_monitor
```

Replace the testbench name to run any other. Every testbench finishes in
seconds.

## Files

* `rtl/cfi_pkg.sv`: opcodes and violation causes
* `rtl/cfi_monitor.sv`: top level
* `rtl/cfi_bus_if.sv`: parallel-bus write receiver
* `rtl/cfi_ctrl.sv`: control and check unit
* `rtl/cfi_timer.sv`: edge timeout
* `rtl/edge_table.sv`: hashed edge ROM
* `rtl/cfi_edges.hex`: edge list of the example firmware
* `rtl/cfi_stack.sv`: secure stack (used twice)
* `tb/`: the testbenches listed above, and `tb_workload_edges.hex`, the edge list of the workload testbench

Not included: the CPU, the offline analysis and instrumentation tool that
produces the instrumented binary and the edge list, and the secure boot
loader that programs both chips.
