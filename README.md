# TOT: a five-stage 32-bit machine with split caches over one DRAM

TOT is a small, complete computer. It has a five-stage in-order processor running a
32-bit instruction set loosely modelled on RV32I. Instructions and data share one DDR
DRAM, but the processor sees them through two separate direct-mapped caches: a modified
Harvard arrangement. A boot ROM receives programs over a UART line and stores them into
DRAM. A few memory-mapped registers connect the processor to the UART and to one global
setting, the cache bypass.

The RTL here covers everything between the processor clock and the user-interface side of
a DDR memory controller. The controller and the DRAM chip are not included. A behavioural
model of both is in `tb/mig_dram_model.sv`. The top module is `rtl/tot_top.sv`.

The hardest parts to follow are these:

- how the three kinds of stall and the Writeback-time flush interact (next section);
- how one DRAM request at a time crosses between two clock domains (see "The DRAM path");
- how a program arrives over the UART line (see "Booting over the UART").

## The pipeline and its stalls

```
  Fetch ──► Decode ──► Execute ──► Memory ──► Writeback
  (PC)     (inst reg)  (dInst reg) (memReq reg) (wbCommands reg)
    ▲          │  ▲                    │             │
    │       regfile  reg_conflict ◄─ rd_EX, rd_MEM, rd_WB
    └──────── jump / nextPC (also the flush) ◄──────┘
```

Each stage owns one register, which holds the instruction the stage is working on. Two
side pipes, `pc_pipe` and `exception_pipe`, carry each instruction's PC and exception
cause alongside it. They follow the same advance rules as the stages.

**Control transfer happens only in Writeback.** Execute works out `jump` and `nextPC`:

- JAL and taken branches jump to `pc + imm`;
- JALR jumps to `rs1 + imm`;
- JAL and JALR write `pc + 4` to `rd`.

The jump rides through Memory and takes effect when Writeback commits it. In that cycle
`jump` does two things: it loads Fetch's PC with `nextPC`, and it clears Decode, Execute
and Memory. There is no branch prediction. Fetch simply carries on with `pc + 4`, and a
taken branch or jump costs the four younger slots behind it. Exceptions use the same path.

**Data hazards stall; there is no forwarding.** `reg_conflict` compares the source
registers of the instruction in Decode with the destinations of the instructions in
Execute, Memory and Writeback. If any of them matches and that instruction will write,
`hazardStall` rises. Fetch and Decode hold, Decode sends a NOP bubble into Execute, and
the older instructions drain. Register 0 never conflicts. The register file has no
write-to-read bypass, so a dependent instruction waits until its producer has left
Writeback. Back-to-back dependent instructions cost three bubbles.

**A data-cache access stalls everything before Writeback.** While the data cache works,
`memStall` is high:

- Memory holds its instruction;
- Execute and Decode hold;
- Fetch holds its PC;
- Writeback receives empty commands.

**An instruction-cache miss does not stall the pipeline.** Fetch holds its PC and feeds
NOPs into Decode until the line arrives. Older instructions keep running.

| Event | Fetch PC | Decode | Execute | Memory | Writeback |
|---|---|---|---|---|---|
| `jump` from Writeback | loads `nextPC` | cleared | cleared | cleared | commits |
| `memStall` | holds | holds, sends NOP | holds | holds | gets nothing |
| `hazardStall` | holds | holds, sends NOP | runs | runs | runs |
| I-cache miss | holds | gets NOP | runs | runs | runs |
| HLT fetched | stops | gets NOP | runs | runs | runs |

A flush and a stall can arrive in the same cycle. In that case the flush wins.

**HLT** stops fetching. The PC stays where it is, and only a jump or a reset restarts it.
An older instruction that is still in flight can jump, for example a taken branch ahead
of a wrongly fetched HLT. That jump restarts fetching, so a speculated HLT does no harm.
The top-level output `halted` is high only when HLT has been fetched and the pipeline is
empty.

## Instruction set

Every instruction has the same fields:

| Bits | 31:26 | 25:21 | 20:16 | 15:0 |
|---|---|---|---|---|
| Field | opcode | val1 | val2 | val3 |

val1 and val2 are register numbers. val3 is a 16-bit immediate or offset, sign-extended,
or it holds a register number in bits 4:0. Register 0 always reads as zero.

| Opcode | Instruction | val1 | val2 | val3 | Effect |
|---|---|---|---|---|---|
| 0x00 | NOP | – | – | – | nothing |
| 0x01 | ST rs2 rs1 off | rs2 (data) | rs1 (base) | off | mem[rs1+off] = rs2 |
| 0x02 | LD rd rs1 off | rd | rs1 | off | rd = mem[rs1+off] |
| 0x03–0x0A | ADD SUB AND OR XOR SRL SRA SL rd rs1 rs2 | rd | rs1 | rs2 in [4:0] | rd = rs1 op rs2 |
| 0x0B | LUI rd imm | rd | 0 | imm | rd = imm << 16 |
| 0x0C–0x10 | ADDI SUBI SRLI SRAI SLI rd rs1 imm | rd | rs1 | imm | rd = rs1 op imm |
| 0x11 | JAL rd label | rd | 0 | label | rd = pc+4; pc = pc+label |
| 0x12 | JALR rd rs1 off | rd | rs1 | off | rd = pc+4; pc = rs1+off |
| 0x13 | BGE rs1 rs2 label | rs1 | rs2 | label | unsigned >= |
| 0x14 | BLT rs1 rs2 label | rs1 | rs2 | label | unsigned < |
| 0x15 | SBGE rs1 rs2 label | rs1 | rs2 | label | signed >= |
| 0x16 | SBLT rs1 rs2 label | rs1 | rs2 | label | signed < |
| 0x17 | BEQ rs1 rs2 label | rs1 | rs2 | label | equal |
| 0x3F | HLT | – | – | – | stop fetching |

Notes on the encoding:

- Labels and offsets are byte offsets.
- A taken branch goes to `pc + label`; otherwise execution continues at `pc + 4`.
- Shifts use the low five bits of the shift amount.
- Any other opcode raises the illegal-opcode exception.
- `tot_pkg::encode()` builds an instruction word. The testbenches use it as a small
  assembler.

## Memory map

| Address | What | Who can reach it |
|---|---|---|
| 0x0000_0000 – 0x00FF_FFFF | DRAM, through the caches | fetch, load, store |
| 0x0100_0000 | UART_data: last word received | load, store |
| 0x0100_0004 | UART_fresh: 1 when a new word arrived | load, store |
| 0x0100_0008 | cacheBypass: bit 0 on = stores go to DRAM | load, store |
| 0x0100_000C | cacheBypass_fresh | load, store |
| other 0x01xx_xxxx – 0x0FFF_FFFF | unmapped MMIO | illegal memory access |
| 0x1000_0000 and up | boot ROM (32 words, rest reads HLT) | fetch only |

MMIO registers come in pairs: a value and a "fresh" flag. When a device writes a value,
the paired flag goes to 1 in the same cycle. Software clears the flag once it has taken
the value. If the device and the processor write the same pair in one cycle, the device
wins, so no received word is lost.

Other cases:

- A load or store into the ROM region is an illegal memory access.
- A fetch from the MMIO region is an illegal memory access.
- MMIO loads and stores finish in one cycle and never stall.

## The two caches

Both caches are direct-mapped, with one 32-bit word per line.

**Instruction cache** (`inst_cache`)

- Size: 64 lines by default (`LINES`), so 6 index bits and 26 tag bits.
- Storage: asynchronously read (distributed) RAM, so a hit delivers the instruction in
  the same cycle the PC is presented.
- Refills: on a miss it latches the address and asks for one DRAM read. The line is
  written when the answer arrives, and the next lookup hits.
- It never writes to DRAM.

**Data cache** (`data_cache`)

- Address split: 2 offset bits, 9 index bits (512 lines) and 21 tag bits.
- Storage: a 53-bit line (data + tag) kept in block RAM with a registered read port. Valid
  and dirty flags are kept in two bit vectors.
- It is write-back.

The Memory stage holds `memReq` until `done` pulses. The controller does the following:

| Case | Action | Cost |
|---|---|---|
| load or store hit | read in the first cycle, answer in the second | 2 cycles |
| miss with a dirty victim | victim written to DRAM first, as its own request | one posted DRAM write |
| load miss | word read from DRAM, line filled clean | one DRAM read |
| store miss | new word installed dirty, no DRAM read (a line is one word) | no DRAM access |
| store with cacheBypass on | word written straight to DRAM; a line holding that address is invalidated | one posted DRAM write |

Loads always go through the cache, even with the bypass on. The bypass makes sure that
instructions written as data reach DRAM, where the instruction cache will read them. The
boot loader relies on this. The instruction cache is only invalidated at reset, so code
that overwrites instructions already cached must not expect the new ones to be fetched.

## The DRAM path

```
 data cache ─┐                       processor clock │ DRAM clock
 inst cache ─┼─► dram_req_handler ─► cdc_bridge (PtoD) ─► dram_interface ─► app_* (controller)
 prog port ──┘          ▲                                      │
                        └──────────── cdc_bridge (DtoP) ◄──────┘
```

**Request handler.** `dram_req_handler` accepts level requests from three requesters and
serves one at a time:

- When the data cache and the instruction cache ask in the same cycle, the data cache
  wins. Its misses stall the whole processor. An instruction miss only costs NOPs, and the
  older instructions still make progress meanwhile.
- Data-cache writes are posted. The cache is released in the cycle its write goes out, so
  a write-back or bypassed store stalls it for one cycle. The handler then takes no new
  request until DRAM has accepted the write, which keeps every later access behind it.
- While `prog_mode` is high, DRAM belongs to the programming port and the caches wait.
  Through that port an external agent can read and write DRAM words (`prog_req` held until
  `prog_done`).

**Clock crossing.** The controller's user interface runs on its own clock (`dram_clk`).
Each direction crosses through a `cdc_bridge`. The bridge keeps the request packet in a
holding register and flips a toggle flag. The flag passes through two synchroniser flops.
When the destination sees it change, it registers the packet, which has been stable for
several cycles by then. Only one request is ever in flight, so the bridge never needs to
hold more than one packet.

**Controller interface.** `dram_interface` turns each request into one 16-byte controller
access:

- Each 32-bit word occupies the first four bytes of its own 16-byte unit.
- The controller address (`app_addr`, 27 bits) is therefore the word index times eight.
  The controller counts 16-bit columns.
- Writes put the word in bits 31:0 and use `app_wdf_mask = 0xFFF0` (a mask bit of 1 means
  "do not write this byte").
- Reads take bits 31:0 of `app_rd_data`.
- A write is answered once the controller has accepted both the command and the data. A
  read is answered when `app_rd_data_valid` arrives.

A read therefore costs the controller's read latency (20 DRAM-clock cycles in the model)
plus a few cycles for each of the two bridge crossings.

## Exceptions

Three places raise an exception:

| Where | Cause | Code |
|---|---|---|
| Fetch | interrupt (`ext_irq`) | 4 |
| Fetch | fetch from MMIO space | 2 |
| Decode | illegal opcode | 1 |
| Memory | illegal memory access (ROM, unmapped MMIO) | 2 |

Codes 3 (privilege) and 5 (page fault) are defined but nothing raises them; there is no
user/kernel mode yet.

The cause travels with its instruction in `exception_pipe`. If one instruction collects
more than one cause, the earliest is kept. Writeback commits the exception instead of the
instruction:

- no register write;
- `epc` = the instruction's PC;
- `exc` = `HANDLER_BASE + 64 × cause`, the entry of a handler for that cause;
- a jump to `TRAP_ADDR`, which flushes the pipeline like any other jump.

The intended software is a trap routine at `TRAP_ADDR`. It saves the registers, jumps to
`exc`, restores the registers and resumes at `epc`. That routine is software and is not
part of this RTL. There are also no instructions yet to read `epc` and `exc`; the top
brings them out as ports.

An interrupt is a one-cycle pulse on `ext_irq`. Fetch latches it and attaches it to the
next slot it hands to Decode. The instruction at that PC is not executed; `epc` points to
it, so it runs when the program resumes there. The interrupt stays pending until
Writeback commits it, so a flush cannot lose it.

## Booting over the UART

`uart_byte_collector` receives 8N1 frames at `CLKS_PER_BIT` clocks per bit. The default of
25 gives 2,000,000 baud at 50 MHz. It works as follows:

- The line passes through two synchroniser flops.
- A falling edge starts a frame, and each bit is sampled in its middle.
- A frame whose stop bit is low is dropped.

`device_handler` packs four bytes into a word, first byte in bits 7:0, and writes it to
UART_data. That write sets UART_fresh.

With `init_pc = 0x1000_0000` the processor starts in the boot ROM. The loader, 25
instructions long, expects this stream of words from the host:

```
start_address
address_1  instruction_1
address_2  instruction_2
...
0xFFFF_FFFF
```

The loader does the following:

1. It sets cacheBypass to 1, so every store goes straight to DRAM.
2. It takes each word by polling UART_fresh, reading UART_data and writing 0 back to
   UART_fresh.
3. It stores each instruction at its address.
4. When it sees the 0xFFFF_FFFF end marker:
   - it writes 2 to UART_fresh, to tell the host the load is over;
   - it sets cacheBypass back to 0;
   - it sets the stack pointer r2 to 0x00FF_FFFC;
   - it jumps to the start address with JALR.

The loader uses registers r1 and r4–r8.

At 2 Mbaud a word takes about 20 µs on the line. That is roughly 1000 processor cycles,
so the polling loop has plenty of time between words.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `CLKS_PER_BIT` | 25 | UART bit time in processor clocks |
| `ICACHE_LINES` | 64 | instruction-cache lines |
| `DCACHE_INDEX` | 9 | data-cache index bits (512 lines) |
| `TRAP_ADDR` | 0x0000_0000 | where exceptions jump |
| `HANDLER_BASE` | 0x0000_0100 | handler address for cause 0; each cause adds 64 bytes |

Both reset inputs are synchronous and active high: `rst` for the processor clock and
`dram_rst` for the DRAM clock. `init_pc` is the reset PC:

- 4 for a program already in DRAM;
- 0x1000_0000 to boot over the UART.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

The whole machine is tested by `tb/tb_tot_top.sv`. It runs at default parameters, with a
50 MHz processor clock and an 81 MHz DRAM clock driving `mig_dram_model`. It covers:

- random programs checked against an instruction-level reference model;
- a loop with a call and a return;
- cache-bypass stores;
- all three exception sources;
- a full UART boot;
- the programming port.

It counts every mechanism, and a mechanism that never happens counts as a failure. The
mechanisms counted are:

- hazard stalls, memory stalls and instruction misses;
- data hits, write-backs, fills and bypassed stores;
- jumps, and cycles where both caches wait on DRAM;
- each exception type, halts, MMIO writes, UART words and programming-port accesses.

It finishes in a few seconds.

With plain Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_tot_top rtl/tot_pkg.sv tb/tb_tot_top.sv
./obj_dir/Vtb_tot_top
```

Replace `tb_tot_top` with any other `tb_*` name to run one block's test. The timescale
matters for the tests that use delays (the UART and clock-crossing tests).

## Where this RTL departs from, or adds to, the original description

The original description of TOT gives the architecture, the instruction list, the cache
geometry, the memory map boundaries, the UART protocol and the loader's behaviour. It does
not give the items below, which were decided here.

**Decided here**

- **Opcode numbers and operand placement**: the table above. Where a register sits inside
  val3 is also decided here.
- **MMIO register addresses**: 0x0100_0000 – 0x0100_000C. The device wins a same-cycle
  clash with the processor.
- **Trap and handler addresses**: `TRAP_ADDR`, `HANDLER_BASE`, the 64-byte handler
  spacing, and the cause codes.
- **Interrupt entry**: the `ext_irq` input, taken at Fetch.
- **Programming port**: the original block diagram shows only the signal names progReq
  and progMode. They are read here as a port that owns DRAM while progMode is high.
- **HLT**: what "stop the program" means in hardware, and the `halted` output.
- **Loader program and stack pointer**: the ROM program itself, the stack pointer value,
  and switching the bypass off before the jump. The original says the stack and global
  pointers are set, but gives no values. No global pointer is set here.
- **UART byte order**: the first byte received is the least significant byte of the word.
- **Register 0**: it reads as zero.
- **Clock crossing and DRAM word mapping**: the internal design of the bridge, and the
  address mapping to the controller.

**Different from the original**

- **Data-cache hit time.** The original calls the data cache's access signals
  combinational. Its block RAM has a registered read port, so here a hit takes two cycles.
- **Bundle widths.** The original gives 110 bits for the decoded instruction and 103 bits
  for the Execute-to-Memory request. Here the decoded instruction is 122 bits and the
  request is 106 bits. Both add a valid bit and a store flag that the original does not
  list. The original does not break its bit counts down, so the rest of the difference
  cannot be traced. The Memory-to-Writeback command is 71 bits, as in the original.

**Not built**

- The DDR controller and the DRAM chip. Only a behavioural model of them exists, for
  simulation.
- The host-side program that sends code over the UART.
- The UART transmit direction.
- Privilege checks and page faults. Their cause codes exist, but nothing raises them.
- The trap routine.
- Instructions to read `epc` and `exc`.

**Not checked against hardware**

- Timing at 50 MHz has not been checked; no FPGA build was made from this RTL.
- The DRAM behaviour has been checked only against the behavioural model.
