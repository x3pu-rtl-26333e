# X3PU — a map / reduce / scan accelerator in SystemVerilog

The X3PU is an accelerator for the compute-heavy part of an application. A
host runs everything else. The idea is one controller driving a long row of
simple cells in lock-step (SIMD), plus two log-depth networks that turn the
row's values into a scalar (REDUCE) or into a new vector (SCAN). Matrix
products, filters and other dense kernels become short loops on this machine,
with one instruction issued per clock cycle to every cell.

This repository holds RTL for the whole accelerator as the published X3PU
architecture describes it:

- the controller;
- the distribution tree;
- the MAP of p cells, each with a local memory;
- the REDUCE and SCAN networks;
- the Data Transfer Engine that moves matrices between the host and the on-chip memories;
- the FIFOs in front of and behind that engine.

The architecture fixes the block structure, the parameters, the host
commands and the assembly mnemonics. It leaves the encoding, most widths and
the cycle-level behaviour open. Those parts are this implementation's own
choices, listed in "Where this RTL departs from or adds to the architecture"
below.

```
            program   DataIn                 DataOut
               |         |                      ^
               v         v                      |
        +-------------+  +----------+      +----------+
        | CONTROLLER  |<-| input    |      | Data     |
        | prog mem    |  | FIFO     |      | Output   |
        | data mem    |  +----+-----+      | FIFO     |
        | acc, caddr  |       v            +----^-----+
        +--+-------^--+  +-----------------------+-----+
           |       |     | Data Transfer Engine (DTE)  |
           |       |     +--+-----------------------+--+
           |       |        | rows (P words)        | controller words
           v       |        v                       +--> controller data mem
     DISTRIBUTE    |   +---------------------------+
     log-depth tree|   | MAP: P cells              |
     (P leaves) ------>| acc, addr, active, scan   |
                   |   | local memory per cell     |
                   |   +------------+--------------+
                   |    acc, active |        ^ scan result
                   |                v        |
                   +---- REDUCE tree    SCAN network
                  scalar (sum/min/max)  (prefix / rotation)
```

## Files

| file | block |
|---|---|
| `rtl/x3pu_pkg.sv` | instruction formats, opcodes, command codes |
| `rtl/x3pu.sv` | top level |
| `rtl/controller.sv` | controller: program and data memory, scalar accumulator machine, issue, waits, cycle counter, interrupt |
| `rtl/distribute_net.sv` | pipelined binary fan-out tree, controller to cells |
| `rtl/map_array.sv`, `rtl/map_cell.sv` | the MAP and one cell |
| `rtl/reduce_net.sv` | log-depth reduction tree (sum, min, max) |
| `rtl/scan_net.sv` | log-depth prefix / rotation network |
| `rtl/dte.sv` | Data Transfer Engine |
| `rtl/sync_fifo.sv` | FIFO: the DataIn buffer, the Data Output FIFO, the reduction-result queue |

## Parameters (top `x3pu`)

| parameter | default | meaning |
|---|---|---|
| `P` | 128 | number of cells (a power of two); 128 is the size of the FPGA prototype |
| `DW` | 16 | word width of cells, controller and data ports (up to 32) |
| `MEM_DEPTH` | 1024 | words of local memory per cell |
| `CMEM_DEPTH` | 1024 | words of controller data memory |
| `PROG_DEPTH` | 1024 | instruction pairs of program memory |
| `FIFO_DEPTH` | 16 | depth of the DataIn and DataOut FIFOs |

The word size, the local memory size and the cell count are the
architecture's own parameters. P = 128 matches its FPGA prototype; the
silicon versions used 1024 cells and 16-bit cells. The other sizes are this
implementation's choices. `MEM_DEPTH` = 1024 is large enough for the
architecture's blocked matrix-multiply program, whose highest row address is
655.

## The instruction pair

A program word is 64 bits: a controller instruction (upper 32 bits) and an
array instruction (lower 32 bits). Both halves run in the same cycle. Each
half is `opcode[31:27] mode[26:24] red[23:22] - imm[15:0]`. `red` is used
only in the array half. The immediate is sign-extended.

**Operand modes**

- `M_MEM`: operand is `mem[imm]`.
- `M_VAL`: operand is `imm`. This is the `v` prefix, as in `vload` and `vadd`.
- `M_REL`: operand is `mem[addr_reg + imm]`. This is the `r` prefix, as in `rload` and `rstore`.
- `M_CVAL` (array half only): the controller's accumulator is broadcast as the value.
- `M_CADDR` (array half only): the address is the controller's accumulator plus `imm`. This covers `caload` and `cstore`.

The controller resolves the last two modes before it issues the array
instruction, so cells see only `M_MEM`, `M_VAL` and `M_REL`.

**An array half reads the controller accumulator as it was at the start of
the cycle.** The controller half of the same pair may change the
accumulator, but the array half does not see that change. Because of this,
a pair such as `LOAD I | LOAD M_CADDR 0` loads a new value into the
controller and, in the same cycle, makes every cell load from the address
the controller held before.

**Controller operations**

| group | operations |
|---|---|
| arithmetic and memory | `LOAD`, `STORE`, `ADD`, `SUB`, `MULT`, `AND`, `OR`, `XOR` |
| address register | `ADDRLD`: address register ← acc |
| jumps and branches | `JMP`, `BRZ`, `BRNZ` |
| counting loops | `BRZDEC`: if acc = 0 jump, else decrement acc |
| | `BRNZDEC`: if acc ≠ 0, decrement acc and jump |
| reductions | `REDINS`: take the next reduction result |
| host synchronisation | `WAITMATW n`: wait for n matrices written by the DTE |
| | `RESREADY`: tell the DTE a result is ready |
| | `SETINT`: raise the interrupt |
| cycle counter | `START`, `STOP`, `CNTLOAD` |
| end of program | `HALT` |

**Array operations**

Most array operations act only in active cells:

- memory and arithmetic: `LOAD`, `STORE`, `ADD`, `SUB`, `MULT` (keeps the low DW bits), `AND`, `OR`, `XOR`;
- registers: `ADDRLD`, and `IXLOAD`, which loads the cell's own index;
- SCAN network: `SCANADD`, `SCANMIN`, `SCANMAX` and `ROTATE` send the accumulators into the network; `SCANLD` loads the cell's part of the result.

The activity operations act on every cell:

- `ACTIVATE`: every cell becomes active;
- `WHEREZ`: `active &= (acc == 0)`;
- `WHERENZ`: `active &= (acc != 0)`;
- `ELSEWHERE`: `active = !active`.

Any array instruction can also start a reduction (`red` = ADD, MIN or MAX).
The reduction uses the accumulators of the active cells as they stand when
the instruction reaches the cells, before the instruction executes.
Inactive cells take part with the identity of the function.

## Timing: three pipelines around one controller

This is the part to understand before writing programs or changing the RTL.
Let L = log2(P).

1. **Distribution.** An array instruction the controller issues in cycle t
   executes in every cell in cycle t + L + 1. The controller does not wait
   for it. Controller and cells are therefore L + 1 cycles apart, and the
   order of array instructions is always kept.
2. **REDUCE.** A reduction result reaches the controller L + 1 cycles after
   its instruction executes in the cells. That is 2(L + 1) cycles after the
   controller issued it: 16 cycles at P = 128. Results queue in a 32-deep
   FIFO in the controller. `REDINS` takes the oldest result and waits only
   when the queue is empty. A program can therefore keep a reduction in
   flight every cycle and take one result per cycle. This is the shape of the
   two-instruction inner loop (`redins` / `mult`) of the architecture's
   matrix-multiply kernel. A program must not leave more than 32 results
   unread; an assertion checks this.
3. **SCAN.** A scan result reaches the cells' scan registers L + 1 cycles
   after the scan instruction executes. The controller counts the scans in
   flight and holds back a `SCANLD` until they have all arrived.

**Host handshakes**

- `WAITMATW n` waits until n `SEND_MATRIX_ARRAY` commands have completed
  since the last `WAITMATW`, then consumes n of them.
- `RESREADY` is delayed by L + 1 cycles on its way to the DTE. As a result,
  a `GET_... wait=1` command reads only data that the array stores issued
  before `RESREADY` have already written. Without this delay, the last
  element of a result row can be read before it is stored.

While the controller waits, it holds its program counter and issues NOPs to
the array.

## Talking to the host

**Program port.** `prog_we` / `prog_addr` / `prog_data` write program
words. A `run` pulse starts execution at `run_addr`. `running` falls at
`HALT`.

**DataIn.** DataIn carries one DW-bit word per valid/ready transfer. Each
command is a command word (code in bits 3:0), then its parameters, then any
data:

| code | command | parameters | data |
|---|---|---|---|
| 0 | `SEND_MATRIX_ARRAY` | addr, lines, cols | lines × cols words |
| 1 | `GET_MATRIX_ARRAY` | addr, lines, cols, wait | – |
| 2 | `SEND_MATRIX_CTRL` | addr, lines, cols | lines × cols words |
| 3 | `GET_MATRIX_CTRL` | addr, lines, cols, wait | – |

**Array matrices.** Line l of an array matrix goes to word addr + l of
every cell; element j is in cell j.

**Controller matrices.** Line l of a controller matrix goes to controller
words addr + l·P + j.

**Padding and read-out.** Lines shorter than P are padded with zeros when
written. On a read, only `cols` words per line are returned, through the
Data Output FIFO to DataOut.

**Waiting for a result.** A GET with `wait` = 1 first waits for a result
marked ready by the controller.

**Interrupt and cycle counter.** `irq` is set by `SETINT` and cleared by
`irq_ack`. `cycle_count` shows the counter that `START` and `STOP` control.

**DTE throughput.** The DTE takes one DataIn word per cycle. Each array line
costs two extra cycles: one to clear the line buffer and one to write the
row. Each controller line takes P cycles, one for every word including the
padding.

## Where this RTL departs from or adds to the architecture

**Encodings and operations of this implementation**

- Instruction encoding, operand modes and command codes are this
  implementation's own.
- The meanings of the accumulator-machine operations are read from their
  names.
- The activity operations beyond "activate" are additions: where, elsewhere,
  and one level of activity only, with no nesting stack.

**Assembly mnemonics without a counterpart**

- The assembly mnemonics `getv`, `sendv`, `ioload`, `iostore`, `srload` and
  `riload` have no counterpart here.
- Data moves between host and array only through the DTE's row port.

**SCAN and REDUCE functions**

- SCAN provides prefix sum, prefix min, prefix max and rotation.
- The architecture speaks of "permutation" in general. A general
  permutation network is not built.
- REDUCE provides sum, min and max.
- Min and max compare unsigned values.

**Options not built**

- Floating-point cells, which the architecture lists as a configuration
  option, are not built. Cells are integer only.
- No neighbour-to-neighbour links are built between cells.

**Memory timing and write priority**

- Memories are read asynchronously, so one instruction per cycle runs
  without hazards. An FPGA or ASIC implementation with synchronous RAMs
  would need a pipeline stage and bypassing in the cell and the controller.
- When an array or controller store and a DTE write hit the same word in the
  same cycle, the store wins.

**Timing additions**

- The result queue for `REDINS` is an addition.
- The L + 1-cycle delay of `RESREADY` is an addition.

**Matrix-multiply cycle count**

- The architecture quotes 2p² + p·log2 p + 9p + 5 cycles for a p × p matrix
  multiplication with its hand-tuned kernel: 34,821 cycles at p = 128.
- The test program used here is simple and not tuned. It takes one
  reduction round trip per element: 15 instruction pairs plus 2(L + 1)
  cycles.
- For p = 128 that is 508,417 cycles.
- The hardware does allow the faster schedule, because it takes one
  reduction per cycle. That schedule was not written or measured.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against
values computed independently in the testbench and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random traffic against a queue model; flags and count |
| `tb_distribute_net` | every leaf gets every instruction after exactly L + 1 cycles |
| `tb_reduce_net` | sum/min/max with random masks; latency L + 1 |
| `tb_scan_net` | prefix sum/min/max and rotation; latency L + 1 |
| `tb_map_cell` | 4000 random instructions against a reference model of a cell |
| `tb_map_array` | row port, indices, where, scan register |
| `tb_controller` | loops, branches, ALU, relative addressing, operand resolution, queued reductions, the three waits, RESREADY, interrupt, cycle counter |
| `tb_dte` | all four commands, zero padding, shortened read-out, waiting GET, back-pressure |
| `tb_x3pu` | end to end at the default size (P = 128) |
| `tb_x3pu_matmul` | full 128 × 128 matrix product on 128 cells, defaults |
| `tb_x3pu_pool` | 2 × 2 sum pooling of a 64 × 128 image, defaults |

**`tb_x3pu`** runs end to end at the default size (P = 128). It performs an
8 × 8 matrix product through the REDUCE tree. It also exercises prefix sum,
rotation, where/elsewhere and max/sum reductions, and keeps three
reductions in flight before taking their results in order. It counts how often each
mechanism occurred:

- the waits of `REDINS`, `WAITMATW` and `SCANLD`;
- a waiting GET;
- DataIn and DataOut back-pressure;
- padding, inactive cells and taken branches.

It also checks that every `REDINS` right after a reduction waits exactly
2(L + 1) cycles.

**`tb_x3pu_matmul`** runs the full 128 × 128 matrix product on 128 cells
with all defaults. It checks all 16,384 results and the exact cycle count of
the program.

**`tb_x3pu_pool`** runs 2 × 2 sum pooling at the defaults. For each
output row the cells add two image rows. The SCAN network then rotates the
sums by one cell, and each cell adds its neighbour's sum. The testbench
checks every window and the exact cycle count: 897 cycles for a 64 × 128
image.

**Running a testbench.** Run, for example:

```
verilator --binary --timing --assert -Irtl rtl/x3pu_pkg.sv tb/tb_x3pu.sv --top-module tb_x3pu
./obj_dir/Vtb_x3pu
```

The package must come first; the other modules are found through `-Irtl`.
The full-size matrix product simulates in a few seconds.

**What is not covered.** The FFT, another kernel the architecture was
evaluated on, has no test here. Its data size and layout are not specified,
and the cells have no complex arithmetic. The pooling size used here is an
arbitrary choice, for the same reason.
Timing of a synthesised netlist was not examined.
