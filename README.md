# A cycle-faithful MicroBlaze local-memory system in SystemVerilog

This is a synthesizable model of a small Xilinx MicroBlaze system: one
MicroBlaze-compatible processor and its on-chip local memories. It is written
to match the clock-by-clock behaviour of the real five-stage core, not only
the instruction results. The model follows a thesis that builds the same
system in SystemC. It reproduces the behaviour visible on the memory buses:

- the instruction prefetch buffer;
- branches with and without delay slots;
- the one-cycle lag between a decode stall and a fetch stall;
- the extended "double stall" of chained loads;
- the fixed stall times of the floating point unit and the integer divider.

A program runs here with the same fetch and data-access timing on the bus as
on the original core. That makes the model usable as a signal-level reference
when you check a faster, transaction-level model against it.

## The system

```
                 instr_addr, ifetch (shared)          +-------------------+
          +----------------------------------------->| port A            |
          |      i_as[0] / instr[0], iready[0]        |  local_memory 0   |
          |  <------------------------------------->  |  0x0000 - 0x1FFF  |
 +--------+--+                                        | port B            |
 |  mb_core  |   data_addr, data_write, strobes,      +-------------------+
 |           |   byte_enable (shared)                 +-------------------+
 | prefetch  |------------------------------------->  | port A            |
 | buffer,   |   d_as[k] / data_read[k], dready[k]    |  local_memory 1   |
 | hazard    |  <------------------------------------>|  0x2000 - 0x3FFF  |
 | unit, ALU,|                                        | port B            |
 | FPU       |                                        +-------------------+
 +-----------+
```

There is no bus module and no separate bus-to-RAM controller. The processor
decodes addresses itself (`addr_decoder`) and drives one address strobe per
memory. Each memory checks its own address window. Address, write data,
read/write strobes and byte enables are shared on each side. Replies
(data and ready) come back on separate wires per memory. Port A of every
memory serves instruction fetches and port B serves data.

The defaults are two memories (`NUM_SLAVES = 2`) of 2048 words (8 KB) each:

- memory 0 holds the program and starts at address 0;
- memory 1 follows at 0x2000.

The window of memory k is `LOW_ADDRS[k]..HIGH_ADDRS[k]`. An address outside
every window raises no strobe. A load from such an address leaves its
destination register unchanged.

| Module            | Role |
|-------------------|------|
| `mb_system`       | top: core plus `NUM_SLAVES` memories |
| `mb_core`         | pipeline, fetch logic, register file, bus masters |
| `prefetch_buffer` | 4-entry FIFO of {address, instruction} |
| `hazard_unit`     | load-use, double and multi-cycle stalls, fetch hold |
| `addr_decoder`    | per-slave address windows to a slave index |
| `alu`             | integer instructions (add/sub/compare/logic/shift/multiply/divide) |
| `fpu`             | single-precision floating point instructions |
| `local_memory`    | dual-port, write-first block RAM with byte enables |
| `mb_pkg`          | opcodes, byte-enable codes, latencies, field helpers |

## Pipeline timing

A fetch requested in cycle *t* moves through the stages as follows:

| cycle | what happens |
|-------|--------------|
| t     | IF: `instr_addr`, `ifetch` and the owning memory's `i_as` are driven |
| t+1   | the memory replies (`iready`); the word and its address enter the prefetch buffer at the clock edge |
| t+2   | ID and EX together: the buffer head is decoded and, unless stalled, executed. ALU, FPU and link results are written to the register file at the end of this cycle |
| t+3   | MEM: a load or store is on the data bus for exactly one cycle (`d_as[k]`, `read_strobe`/`write_strobe`, `byte_enable`) |
| t+4   | WB: the memory replies (`dready[k]`) and the load result is written |

Execute results are usable by the very next instruction, because the register
file is written at the end of execute. A load result is usable by an
instruction that executes in the write-back cycle, through a bypass from the
memory reply. This leaves exactly one cycle in which a loaded value does not
exist yet. That is where the load-use stall comes from.

A short branch loop shows the cost of a taken branch. A loop that is only a
branch to itself takes 3 cycles per pass. A loop of seven single-cycle
instructions ending in a taken branch takes 9 cycles.

## Prefetch buffer and wrong-path words

Fetching runs ahead of execution while the buffer has room. The fetch in
flight is counted, so the buffer can never overflow (`PREFETCH_DEPTH` = 4,
i.e. 16 bytes). Every word is stored together with the address it came from.

The core keeps one register, `expect_pc`, with the address of the next
instruction that must execute. A head word whose address differs from
`expect_pc` lies on a path a taken branch has left. It is dropped in one
cycle without executing. A single comparison covers every case that the
real core handles with separate flags:

- **Taken branch without delay slot.** The branch executes in cycle *t+2*.
  By then the next two sequential words are already fetched or in flight.
  The buffer is flushed, the fetch in flight is squashed, and fetching
  restarts at the target. That costs two bubble cycles.
- **Branch to the third instruction after itself** (for example `bri 12`).
  The words at *x+4* and *x+8* are fetched and discarded. The target word
  *x+12* is then fetched again. A scheme that only looks at whether fetch
  addresses are consecutive would miss this case; an address compare
  handles it with no special logic.
- **Taken branch with delay slot.** The instruction after the branch runs.
  `expect_pc` first points to the delay slot, then to the target. Fetch
  moves to the target as soon as the delay-slot word has been requested.
  If it already has been, fetch moves at once.

An `imm` prefix keeps its upper 16 bits for the next executed instruction.

## Stalls

All stalls come from `hazard_unit`. A stall holds decode and execute.
Fetch is held **one cycle later** than decode and execute. This lag is a
property of the real core that the model keeps on purpose.

**Load-use stall (1 cycle).** The instruction in decode waits one cycle
when the instruction executed just before it is load-like and writes a
register that it reads. It reads a register in three ways:

- through `ra`;
- through `rb`, in register-register (type A) form only;
- as the data register of a store.

Load-like means a load, a multiply (`mul`, `muli` and the high-word forms)
or a barrel shift (`bs*`, `bs*i`). The real core does not forward the
results of multiplies and barrel shifts to the next instruction either.

**Load-use stall two instructions later (1 cycle).** Take a load, then one
unrelated instruction, then an instruction that reads the loaded register.
In this model the loaded value could reach that third instruction through
the write-back bypass. The real core still delays it by one cycle, so the
model does the same. The stall applies only when the instruction in between
executed in the very next cycle. The same register-reading rules and the
same load-like class apply as above.

**Double stall (2 cycles).** Take a load, then a load that depends on it,
then an instruction that depends on the second load. The second dependency
arises while the first stall is still recorded in a two-cycle history. The
unit then stretches the stall by a second cycle and also holds fetch in the
cycle between the two stalls. The outcome matches the real core: no
instruction is fetched for four cycles in a row.

**Multi-cycle stalls.** After the execute cycle of these instructions, a
counter holds decode and execute for a fixed number of cycles. Fetch goes on
until the buffer is full.

| instructions               | stall cycles |
|----------------------------|--------------|
| fadd, frsub, fmul, flt     | 4  |
| fint                       | 5  |
| fsqrt                      | 27 |
| fdiv                       | 28 |
| idiv, idivu                | 32 |
| fcmp                       | 0  |

The arithmetic units themselves are combinational. The counter alone
provides the timing, so the results equal those of an iterative unit.

## Local memory and the data bus

Each `local_memory` samples its strobes at the rising edge:

- An in-range access with the address strobe high gets a reply in the next
  cycle: `dout` with `dready` high for exactly one cycle.
- A write merges `wdbus` under the byte enables. The reply is the word as
  just written (write-first).
- The memory does not need its read strobe: a strobed access that is not a
  write is a read.

Addresses are byte addresses. The word index is `(addr - LOW_ADDR) >> 2`.

Byte lanes are big-endian. `1000` selects bits 31:24, the byte at offset 0.
For stores the core shifts the enables by the address offset:

- bytes: `1000 0100 0010 0001`;
- half words: `1100 0011`;
- words: `1111`.

Store data is replicated into all lanes. Loads pick the lane by offset and
zero-extend it (`lbu`, `lhu`).

If both ports write the same word in one cycle, the word takes both ports'
lanes, and port B wins where they overlap.

## Instruction set

**Integer.**

- `add`/`rsub` with carry and keep-carry variants, and their immediate forms
- `cmp`, `cmpu`
- `mul`, `mulh`, `mulhu`, `mulhsu`, `muli`
- `bsrl`/`bsra`/`bsll` and their immediate forms
- `idiv`, `idivu`: b / a; division by zero gives 0
- `or`, `and`, `xor`, `andn` and their immediate forms
- `pcmpbf`, `pcmpeq`, `pcmpne`
- `sra`, `src`, `srl`, `sext8`, `sext16`
- loads and stores of bytes, half words and words, in register and
  immediate forms
- `imm`

**Branches.**

- `br`/`bri` with the delay, absolute and link flags
- conditional branches `beq`..`bge`, with and without delay
- `rtsd`; `rtid`, `rtbd` and `rted` behave like `rtsd`

**Floating point** (IEEE single precision, round to nearest even).

- `fadd`, `frsub` (b - a), `fmul`, `fdiv` (b / a)
- `fcmp` with the conditions un/lt/eq/le/gt/ne/ge (b compared with a)
- `flt`
- `fint`, which truncates and saturates
- `fsqrt`

A NaN or denormal operand gives the quiet NaN `FFC00000`. So do the invalid
operations. Results below the normal range become zero.

The carry flag is the only part of the machine status register that exists.

## How far the model can be trusted, and where it departs

What was verified (all in simulation):

- **Whole programs against an instruction-level model.** Three programs run
  on the full-size system: the thesis' branching and stalling test, its test
  of every integer and floating point instruction, and an extra program for
  byte/half accesses, the second memory, `imm`, conditional and register
  branches, and stalls. Every store's address, data and byte enables match,
  in order, as do all 32 final registers. The expected values were computed
  by a separate instruction-level model of the same programs, not from
  this RTL.
- **Stall cycle counts.** Load-use stalls take 1 cycle, both right after
  the load and two instructions later. Double stalls take 2. The double stall leaves at least 4 fetch-free cycles. Multi-cycle
  stalls take 4, 5, 27, 28 and 32 cycles.
- **Units.** Every unit has its own randomized testbench with an
  independent reference. The FPU reference is double-precision arithmetic
  rounded to single precision, which is exact for these operations.

Deliberate departures and omissions:

- Special registers (`mfs`/`mts`), interrupts, exceptions, breaks, the
  fast-simplex links, caches, the debug interface and FPU status flags are
  not modelled.
- The real core restarts fetching after a floating point stall in an
  irregular way. The model does not copy that restart; it simply keeps
  fetching until the buffer is full. Fetch timing just after an FPU or
  divide stall may therefore differ from the real core by a cycle. The
  execution timing does not differ.
- A later instruction that writes the destination register of a load still
  in flight cancels that load's write-back. This keeps program order.
- The real processor is a Xilinx core and its memory controller is vendor
  IP. Both are replaced by the simplest logic with the same bus behaviour.
- Only one processor is built. The identity and priority scheme of a
  multi-processor system is not described in enough detail to build.
- The program image is a plain `$readmemh` file of 32-bit words. The
  vendor's memory-file format, with one hex token per byte and byte
  addresses, is not read directly.
- The load-use stall two instructions after a load is known only as an
  observed one-cycle delay. Which instruction classes it covers here, and
  that it needs the instruction in between to run without waiting, is this
  design's reading.
- Memory sizes and the address map are this design's choice. Nothing in the
  reference fixes them.

## Parameters

| Parameter | Default | Where | Meaning |
|-----------|---------|-------|---------|
| `NUM_SLAVES` | 2 | top, core, decoder | number of local memories |
| `LOW_ADDRS`, `HIGH_ADDRS` | {0x2000, 0x0000}, {0x3FFF, 0x1FFF} | top, core, decoder | inclusive window of each memory (index 0 is the rightmost element) |
| `MEM_WORDS` | 2048 | top, memory | words per memory |
| `MEM_PATH0`, `MEM_PATH1` | "" | top | `$readmemh` file for memory 0 / 1 (32-bit words, `@word` address records allowed) |
| `PREFETCH_DEPTH` | 4 | top, core, buffer | prefetch buffer entries |
| `RESET_PC` | 0 | core | first fetch address |

The latencies are constants in `mb_pkg` (`LAT_*`).

## Simulating

Everything runs with plain Verilator 5 from the repository root. The
testbenches read their program files by paths relative to that directory.

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/mb_pkg.sv tb/tb_mb_system.sv \
          --top-module tb_mb_system -o sim && ./obj_dir/sim
```

Replace `tb_mb_system` with any other testbench. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it runs |
|-----------|--------------|
| `tb_mb_system` | full-size system: the three programs (`tb/prog_*.hex`, expected stores and registers in `tb/exp_*.hex`), stall lengths, and a count of every mechanism (load-use stall, load-use stall two instructions later, double stall, fetch hold, flush, delay slot, branch to third instruction, dropped word, full buffer, second memory, narrow access, `imm`, multi-cycle stall); a mechanism that never occurs is a failure |
| `tb_workloads` | full-size system: three endless loops (self-branch; loads and stores; register arithmetic only) for a few thousand cycles, checking results at every pass and a constant pass length (3, 11 and 9 cycles) |
| `tb_local_memory` | random dual-port traffic against a reference array; program loading |
| `tb_prefetch_buffer` | random push/pop/flush against a queue |
| `tb_addr_decoder` | window edges, overlap priority, random addresses |
| `tb_hazard_unit` | hand-worked stall cases and random instruction streams against the stall rules |
| `tb_alu` | every integer instruction with random and corner operands; package helpers |
| `tb_fpu` | random operands against rounded real arithmetic; special values |

Expected-value files are `.hex` lists: a store count, then one line
"address data byte-enables" per store, then the 32 final register values.
The programs start with a four-word stub: set the stack pointer to 0xAD0,
call `main` at 0x1A8 with `brlid r15`, then branch to self at 0xC.

To run your own program, set `MEM_PATH0` to a `$readmemh` file of
instruction words. Alternatively, write the words into
`g_mem[0].u_mem.mem` while reset is held, as the testbenches do.
