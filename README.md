# MIPS teaching package: three processors you can single-step from a host

Students usually meet the single-cycle, multicycle and pipelined MIPS
processors as datapath drawings. This design makes them real hardware you can
inspect. It contains the three classic versions of a reduced 32-bit MIPS.
Each version is wrapped in a small board system that a host computer drives
over a serial byte link. The host can:

- load programs, data and registers;
- set the program counter;
- run the processor for an exact number of clock cycles;
- read every storage element back;
- read hardware event counters: cycles, instructions per type, accesses to
  chosen memory addresses, and reads and writes of the registers t0..t7 and
  s0..s7.

The pipelined version can also switch its hazard-resolution hardware
(forwarding plus stalls) on and off. A student can watch the same program give
wrong results without it and right results with it.

All three systems share one clock. The top module, `mips_edu_top`, places
them side by side, and each has its own serial byte port.

```
               +----------------------------------------------------------+
 rx byte  ---> | serial_manager --host_req--> wrapper                     |
 tx byte  <--- |      |                        +- processor (1 of 3)      |
               |      | cm_request             +- instruction/data memory |
               |      v                        |  (one shared memory for  |
               | control_manager --run-------> |   the multicycle)        |
               |                 --reset-----> +- register file           |
               |                 --hazard_en-> +- event counters          |
               |                               +- error display -> led    |
               +----------------------------------------------------------+
                      mips_system  (instantiated 3x in mips_edu_top)
```

A UART core is not part of this design. Each system's port is the byte
interface such a core presents:

- `rx_data` with a one-cycle `rx_load` strobe for each received byte;
- `tx_data` with a one-cycle `tx_enout` strobe, sent while `tx_ready` is high.

## Instruction set

Fourteen instructions. All use the standard MIPS encodings except the two
shifts. `sll` and `srl` shift `rs` by exactly one bit into `rd`, and use
function codes 1 and 62.

| type | instructions (funct / opcode) |
|------|-------------------------------|
| R    | add 32, sub 34, and 36, or 37, nor 39, slt 42 (signed), sll 1, srl 62 |
| I    | addi 8, lw 35, sw 43, beq 4, bne 5 |
| J    | j 2 |

There is no halt instruction. Programs end in a jump to itself.

There is no overflow detection. Any other opcode, or an unknown R-type
function, is *illegal*. The processor flags it, and the system's
`error_display` latches the first illegal opcode onto the LEDs:

- `led[7]` lights for an error;
- `led[5:0]` shows the opcode;
- `led[6]` lights if more errors followed.

The ALU-control codes are the textbook's: and 0000, or 0001, add 0010, sub
0110, slt 0111, nor 1100. The two shifts add sll 0011 and srl 0100.

## The three processors

The three processors share these parts:

- `alu`, `alu_control`, `register_file` (32 x 32, `$0` reads as zero);
- `pc_register`, used by the single-cycle and pipelined versions;
- a common external interface: memories and the register file sit outside
  the processor, in the wrapper.

Memories read asynchronously and write on the rising edge. So an instruction
fetch or a load completes inside the cycle that issues it, as in the textbook
datapaths.

Every processor reports a per-cycle event record (`evt_t` in `mips_pkg`), and
the counters are fed from it. The record says:

- whether a cycle ran, and whether an instruction was fetched (and where);
- which data address was read or written;
- which registers were read or written;
- whether an instruction retired, and of which type.

### Single-cycle (`mips_unicycle`)

One instruction per cycle. `control_unit` decodes the opcode into RegDst,
ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branche, BranchNe, ALUOp and
Jump. The next PC is one of:

- PC+4;
- the branch target, when (Branche and Zero) or (BranchNe and not Zero);
- the jump target `{PC+4[31:28], target, 00}`.

### Multicycle (`mips_multicycle` + `mc_control`)

A single memory holds code and data: 1536 words by default. The datapath
has the instruction register, the memory data register, A, B and ALUOut, an
IorD address multiplexer, a four-way ALU-B multiplexer (B, 4, immediate,
immediate x4) and a three-way PC source. `mc_control` is a Moore machine.
Its 14 state codes are also exported as `step`:

| code | state   | action |
|------|---------|--------|
| 0    | Common0 | fetch into IR, PC += 4 |
| 1    | Common1 | read registers, ALUOut = branch target, decode |
| 2, 3 | RType0/1 | ALU operation, write rd |
| 4    | JMP0    | PC = jump target |
| 5    | BEQ0    | compare, PC = ALUOut if equal |
| 6    | BNEQ0   | compare, PC = ALUOut if not equal |
| 7, 8 | Addi0/1 | rs + immediate, write rt |
| 9, 10, 11 | LW0/1/2 | address, read memory, write rt |
| 12, 13 | SW0/1 | address, write memory |

So R-type, addi and sw take 4 cycles, lw takes 5, and beq, bne and j take 3.
An illegal opcode is detected in Common1, and the machine returns to
Common0.

### Pipelined (`mips_pipeline`)

Five stages, IF, ID, EX, MEM and WB, with the IF/ID, ID/EX, EX/MEM and MEM/WB
registers. Control is decoded in ID and travels in EX, M and WB groups. This
is the part of the design that needs the most care.

**Branches and jumps are resolved in ID.** The sign extension, the x4 shift,
the target adder and an equality comparator on the two register operands sit
in ID. The pipeline predicts not-taken. When a branch is taken, or for any
jump, the instruction fetched behind it is flushed from IF/ID. That costs one
bubble. The flush is always active, whatever the hazard mode.

**Hazard resolution mode (`hazard_en`).** When the mode is on:

- `forwarding_unit` feeds each ALU operand from EX/MEM when the instruction
  there writes the register and is not a load. Otherwise it feeds from MEM/WB
  when that instruction writes the register. Register `$0` is never
  forwarded.
- It feeds a `sw`'s store data from MEM/WB when the instruction just ahead was
  the `lw` that loaded it. So lw followed by sw needs no stall.
- It feeds the ID comparator from EX/MEM.
- `hazard_detection_unit` stalls one cycle on a load-use dependence: a `lw` in
  EX writes a register that the instruction in ID reads. The exception is a
  `sw` that only stores that register, which the MEM-stage forwarding covers.
- It stalls a `beq`/`bne` in ID while the instruction in EX will write one of
  its operands, or while a `lw` in MEM will. After an ALU instruction the
  branch therefore waits one cycle and then takes the value from EX/MEM.
  After a load it waits two cycles.
- On a stall, the PC and IF/ID hold and a bubble enters ID/EX.

When the mode is off, none of this happens. Dependent instructions read stale
registers. That is the point of the exercise, and a testbench checks it.

A register written in WB is visible to the ID read in the same cycle, through
a write-before-read bypass in the register-file read path.

The mode is off after power-up. The host turns it on with the HAZARD command.

The `status` outputs of the pipelined system show, in each cycle:

| bit | meaning |
|-----|---------|
| 7 | illegal |
| 6 | load-use stall |
| 5 | branch stall |
| 4 | flush |
| 3 | EX forward |
| 2 | lw->sw forward |
| 1 | ID forward |
| 0 | retire |

The other two versions use the same port for other flags:

- single-cycle: {illegal, data read, data write, register write, read port 1,
  read port 2, fetch, retire};
- multicycle: {illegal, memory read, memory write, state code[3:0], retire}.

## Host protocol (`serial_manager`)

A command is one byte, followed by its argument bytes, most significant byte
first. Reads answer with four bytes, most significant first. Unknown command
bytes are ignored.

| code | command  | arguments | effect |
|------|----------|-----------|--------|
| 0x01 | WR_IMEM  | addr[2], data[4] | write instruction memory (byte address) |
| 0x02 | RD_IMEM  | addr[2] | read instruction memory |
| 0x03 | WR_DMEM  | addr[2], data[4] | write data memory |
| 0x04 | RD_DMEM  | addr[2] | read data memory |
| 0x05 | WR_REG   | reg[2], data[4] | write a register |
| 0x06 | RD_REG   | reg[2] | read a register |
| 0x07 | SET_PC   | addr[2] | the next PC update loads this address |
| 0x08 | RD_PC    | none | answers {next PC[15:0], current PC[15:0]} |
| 0x09 | SET_CNT  | slot[2], addr[4] | set a monitored address (clears that monitor) |
| 0x0A | RESET    | none | reset the processor, registers and counters (memories are kept) |
| 0x0B | RUN      | n[1] | run n+1 clock cycles |
| 0x0C | RD_CNT   | counter[2] | read a counter |
| 0x0D | HAZARD   | on[1] | pipelined version: hazard resolution on (1) or off (0) |
| 0x0E | RD_TYPES | none | answers the fourteen instruction-type counters, 56 bytes, in counter order |

In the multicycle system, the IMEM and DMEM commands both reach the shared
memory.

The serial manager passes RUN, RESET and HAZARD to the `control_manager` as
a 10-bit request:

- `[1:0]` = 01 is RESET;
- `[1:0]` = 10 is RUN, and `[9:2]` holds the cycle count minus one (so
  request 0x006 runs two cycles);
- `[1:0]` = 11 sets the hazard mode from bit 2.

The control manager has three states:

- IDLE;
- RUN, which drives the processor enable for exactly the requested number of
  cycles;
- RESET, which pulses the system reset for one cycle. A RESET request ends a
  RUN early.

Host accesses are meant for a stopped processor.

### Counter map (`RD_CNT` / `SET_CNT`)

| address | counter |
|---------|---------|
| 0x00 | clock cycles run (16 bits) |
| 0x10 + t | retired instructions of type t |
| 0x20 + i | fetches from monitored instruction address i (0..3; single-cycle and pipelined only) |
| 0x30 + i | reads of monitored data address i (0..3, or 0..7 in the multicycle) |
| 0x38 + i | writes of monitored data address i |
| 0x40 + k | reads of register 8+k (k = 0..15: t0..t7, s0..s7) |
| 0x50 + k | writes of register 8+k |

The instruction types t are: add 0, sub 1, or 2, nor 3, and 4, slt 5, lw 6,
addi 7, beq 8, bne 9, srl 10, sll 11, j 12, sw 13.

- Counters are `CW` = 8 bits wide and saturate.
- Setting `CW` = 32 gives the wide-counter configuration.
- Monitored addresses are byte addresses, written with `SET_CNT` to slot
  0x20+i or 0x30+i.
- Each register-file read port in use counts one read.
- In the multicycle, the memory monitors also count instruction fetches,
  since fetches and data accesses share the memory.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `IMEM_WORDS` | 1024 | instruction memory, single-cycle and pipelined |
| `DMEM_WORDS` | 256 | data memory, single-cycle and pipelined |
| `MEM_WORDS` | 1536 | shared memory, multicycle |
| `CW` | 8 | event-counter width (32 for the wide variant) |
| `CLKW` | 16 | clock-counter width |
| `VERSION` | `V_UNICYCLE` | `wrapper` / `mips_system`: which processor |

## Measured behaviour

The reference workload is a bubble sort of seven words into descending order.
It has 21 program words, including a leading nop, and ends in a jump to
itself. The data set {17, 23, 40, 61, 52, 75, 33} makes the program execute
348 instructions: 6 passes and 16 swaps. By class that is:

- 149 R-type;
- 72 lw and 32 sw;
- 78 branches;
- 17 jumps.

For the multicycle, data lives at word 21 of the shared memory. t3 = 0x54
points at it, and the address step is in t6 = 4.

| version | cycles to the halt | cycles per instruction |
|---------|-------------------|-----|
| single-cycle | 348 | 1.00 |
| multicycle | 1369 | 3.93 |
| pipelined, hazard resolution on | 527 | 1.51 |

The pipelined figure breaks down as:

- 348 instructions;
- 4 cycles to fill the pipeline;
- 67 flush bubbles;
- 36 load-use stalls;
- 72 branch stalls.

The published measurements of the original design give 348, 1182 and 452
cycles. The single-cycle figure agrees exactly. The other two are discussed
below.

## Where this design departs from the original

- **One clock, asynchronous-read memories.** The original used synchronous
  block RAMs. It therefore needed a second clock at twice the processor rate,
  a control manager that staggered separate enables for the PC, the memories
  and the register file, and a register file written on the auxiliary edge.
  Here a single `run` enable and a same-cycle register bypass do the same
  work.
- **Multicycle cycle count.** With 4/5/4/3/3 cycles per R/lw/sw/branch/jump,
  the sort needs 1369 cycles. The original reports 1182, about 187 fewer.
  That is not consistent with a 3-cycle minimum per instruction and the same
  state sequences. The state sequences here follow the classic multicycle
  control.
- **Pipelined cycle count.** This design stalls a branch whose operand is
  produced by the instruction just ahead. The sort has 72 such cases, which
  accounts for most of the gap to the published 452.
- **Branch-operand hazards.** The original says only that its pipeline avoids
  every hazard. The stall and ID-forwarding rules for branches are this
  design's.
- **Command codes and byte layouts.** The original documents only RUN (0x0B
  plus a count byte). The other codes, the 2-byte addresses and the 4-byte
  data and answers are this design's. Every counter read answers 4 bytes,
  whatever `CW` is.
- **Instruction-type readout.** The original reads the type counters "in an
  iterative process" without giving the exchange. Here RD_TYPES walks the
  fourteen counters inside the serial manager and sends them back to back.
- **Address monitors.** The original speaks of monitored address ranges.
  Here each monitor watches one byte address.
- **Clock counter.** It counts the cycles the processor runs, not every
  board clock.
- **Instruction-type counters.** There are fourteen, one per instruction.
- **`status` port and the error layout.** The `status` outputs, the hazard
  code in the control-manager request and the LED layout are additions.
- **Counters saturate.** They do not wrap.
- **Not included.** The UART core, the FPGA clock manager, the Java host
  program and the assembler. The testbenches contain their own small
  assembler (`tb/tb_asm_pkg.sv`).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

- **Units.** These compare against reference values computed in the
  testbench: `tb_alu`, `tb_alu_control`, `tb_control_unit`,
  `tb_register_file`, `tb_dual_port_ram`, `tb_pc_register`,
  `tb_forwarding_unit`, `tb_hazard_detection_unit`, `tb_mc_control` (state
  sequences and cycles per class), `tb_event_counters` (a full reference
  model), `tb_error_display`, `tb_control_manager` (RUN 0x006 gives exactly
  2 cycles) and `tb_serial_manager`.
- **Processors.** `tb_mips_unicycle`, `tb_mips_multicycle` and
  `tb_mips_pipeline` run a program that uses every instruction, then the
  bubble sort. They check results, exact cycle counts and per-class counts
  against a reference model of the program. The pipelined testbench also
  checks stall, flush and forward counts, and the wrong result with hazard
  resolution off.
- **Systems.** `tb_wrapper` covers all three versions through the host port.
  `tb_mips_system` covers one complete system through serial bytes.
- **End to end.** `tb_mips_edu_top` drives all three systems at full size
  through their serial ports only. For each version it loads the sort, runs
  exactly one cycle less than the expected count, checks that the final jump
  has not retired, runs one more cycle and checks that it has. Then it reads
  back the sorted data and the counters, one at a time and as a RD_TYPES
  burst. It also covers SET_PC/RD_PC, RESET,
  illegal opcodes and the hazard-mode switch. It counts every mechanism:
  - load-use stall, branch stall, flush;
  - EX, lw->sw and ID forwards;
  - RUN, RESET and hazard-mode switches;
  - monitor settings and error displays.

  A mechanism that never happened counts as a failure.

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_pkg.sv tb/tb_asm_pkg.sv tb/tb_mips_edu_top.sv \
  --top-module tb_mips_edu_top -o sim
./obj_dir/sim
```

For other tests, replace the testbench file and top name. `mips_pkg.sv`, and
`tb_asm_pkg.sv` where a testbench imports it, must come first.

## Files

- `rtl/mips_pkg.sv`: encodings, types, host-command and counter maps.
- `rtl/mips_edu_top.sv`: the three systems side by side.
- `rtl/mips_system.sv`: serial manager + control manager + wrapper.
- `rtl/serial_manager.sv`, `rtl/control_manager.sv`, `rtl/wrapper.sv`.
- `rtl/mips_unicycle.sv`, `rtl/mips_multicycle.sv`, `rtl/mc_control.sv`,
  `rtl/mips_pipeline.sv`, `rtl/forwarding_unit.sv`,
  `rtl/hazard_detection_unit.sv`.
- `rtl/control_unit.sv`, `rtl/alu_control.sv`, `rtl/alu.sv`,
  `rtl/register_file.sv`, `rtl/pc_register.sv`, `rtl/dual_port_ram.sv`.
- `rtl/event_counters.sv`, `rtl/error_display.sv`.
- `tb/`: one testbench per module, plus `tb_asm_pkg.sv` (assembler, test
  programs, reference model).
