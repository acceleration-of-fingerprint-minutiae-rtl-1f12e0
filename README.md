# ρ-VEX: a 4-issue VLIW accelerator on a host bus

This is a small VLIW (very long instruction word) processor that sits next to
a host CPU as a loadable accelerator. The host copies a compiled kernel into
the accelerator's instruction memory and its input data into the data memory.
It then starts the accelerator and waits for an interrupt, and reads the
results back. The processor issues four operations per cycle and does no
dynamic scheduling at all. The compiler decides which operations run
together and keeps track of every latency. That keeps the hardware very
simple. The price is that the software has to know the pipeline exactly, and
that pipeline is described in detail below.

The processor follows the VEX instruction set architecture, a configurable
VLIW ISA descended from HP/ST Lx. The configuration built here is the one
that was chosen as best for a fingerprint minutiae-extraction kernel: four
issue slots and a single cluster. In that application a MicroBlaze host
offloads the directional DFT of 34×34-pixel image blocks.

## The machine at a glance

| Resource | Built |
|---|---|
| Issue width | 4 syllables (operations) per 128-bit instruction |
| ALUs | 4 × 32-bit, one per slot |
| Multipliers | 2 × 16×32-bit, in slots 1 and 3 |
| Load/store unit | 1, in slot 2 |
| Branch unit | 1, in slot 0 |
| General registers | 64 × 32 bit; `$r0` is always 0, `$r63` is the link register |
| Branch registers | 8 × 1 bit (`$b0`..`$b7`) |
| Instruction memory | 512 instructions = 8 kB |
| Data memory | 64 kB, 32-bit words with byte enables, big-endian |
| Pipeline | F, D, E0, E1, WB |

Slot assignment, bits 127..0 of an instruction:

```
 127        96 95         64 63         32 31          0
+-------------+-------------+-------------+-------------+
| syllable 3  | syllable 2  | syllable 1  | syllable 0  |
| ALU, MUL    | ALU, MEM    | ALU, MUL    | ALU, CTRL   |
+-------------+-------------+-------------+-------------+
```

A syllable whose unit is not in its slot is illegal: for example, a load in
slot 0 or a multiply in slot 2. It stops the processor with a trap.

## The pipeline, and what a compiler must respect

```
 F      fetch: PC -> instruction memory (synchronous read)
 D      decode: 4 syllable decoders, register read + forwarding,
        branch decision (branch unit)
 E0     4 ALUs, 2 multipliers, load/store address; data memory access issued
 E1     load data returns and is aligned / extended
 WB     results written to the general and branch register files
```

### Latency is 2 for everything

Results are forwarded from E1 and from WB into the decode stage. They reach
every source operand, the store data, the link register and the branch
condition. No result is forwarded out of E0. Take a result produced by
instruction *i*:

| Consumer | Sees the result? | Why |
|---|---|---|
| instruction *i+1* | no, it sees the old value | *i* is in E0 |
| instruction *i+2* | yes | forwarded from E1 |
| instruction *i+3* | yes | forwarded from WB |
| instruction *i+4* and later | yes | read from the register file |

This holds for ALU results, multiplies, loads, compares into branch
registers, and the return address written by `call`. Every operation
therefore has a latency of 2, which matches a VEX compiler configuration with
every `DEL` entry set to 2.

There is **no interlock**. A program that reads a result one instruction too
early silently gets the previous value. The VEX ISA permits this: for an
implementation that does not stall, such code has undefined behaviour. The
compiler must insert NOPs or independent work.

Within one instruction, all four syllables read their operands before any of
them writes. Two syllables of one instruction that write the same register
are a program error; the higher-numbered slot wins.

### Branches cost one cycle

The branch unit works in decode. A taken branch loads the new PC, and the one
instruction already fetched behind the branch becomes a bubble. That is the
single-cycle branch penalty. There is no delay slot. The other syllables of
the branching instruction itself still execute.

| Operation | Effect |
|---|---|
| `goto d` | PC ← PC_branch + 16·d |
| `igoto` | PC ← `$r63` |
| `call d` | PC ← PC_branch + 16·d and `$r63` ← PC_branch + 16 |
| `icall` | PC ← `$r63` and `$r63` ← PC_branch + 16 |
| `br $b, d` | branch if `$b` is 1 |
| `brf $b, d` | branch if `$b` is 0 |
| `return $rX = $rY, imm` | `$rX` ← `$rY` + imm (pops the stack frame), PC ← `$r63` |
| `stop` | ends the program: fetch stops, the pipeline drains, *done* rises |

A loop whose body is three instructions and ends in a taken branch costs 4
cycles per iteration. Straight-line code runs at one instruction per cycle.

### Traps

These conditions stop fetching and raise *trap*:

- an unknown opcode;
- an operation in a slot that lacks its unit;
- a load or store that is not naturally aligned (a word on a 4-byte boundary,
  a half-word on a 2-byte boundary).

For an illegal syllable, the whole instruction is dropped. For a misaligned
access, only the access and its load result are dropped. The other syllables
of that instruction complete, as do all earlier instructions, and then
*done* rises with *trap* set. A trap is not recoverable; the host resets the
processor.

## Instruction encoding

The VEX ISA fixes the operations, not their bit patterns. The encoding below
is this design's own, so binaries from the VEX tool chain do not run on it
unchanged. An assembler would have to emit this format. The testbench package
contains a small one, written as SystemVerilog functions.

```
[31:25] opcode
[24]    I: second operand is the 9-bit immediate instead of a register
[23:18] destination register
          store:                the register holding the data
          compare to $b / mtb:  bits [20:18] name the $b register
[17:12] source register 1 (load/store: base address)
[11:9]  branch-register source (slct, slctf, addcg carry-in, mfb)
[8:0]   signed immediate when I=1        [5:0] source register 2 when I=0
movl:     [17:0] zero-extended 18-bit constant
addcg:    carry out goes to $b[8:6]
control:  [23:21] branch register, [20:0] signed displacement in instructions
```

The operation set is the integer VEX set:

| Group | Opcodes | Operations |
|---|---|---|
| ALU | 0x01–0x1C | `add sub and andc or orc xor shl shr shru sh1add..sh4add min minu max maxu sxtb sxth zxtb zxth slct slctf addcg movl mtb mfb` |
| Compare/logic into a general register | 0x20–0x2D | `cmpeq ne ge geu gt gtu le leu lt ltu`, `andl nandl orl norl` (the condition is in opcode bits [3:0]) |
| Compare/logic into a branch register | 0x30–0x3D | the same operations |
| Multiply | 0x40–0x4A | `mpyll mpyllu mpylh mpylhu mpyhh mpyhhu mpyl mpylu mpyh mpyhu mpyhs` |
| Load | 0x50–0x54 | `ldw ldh ldhu ldb ldbu` |
| Store | 0x58–0x5A | `stw sth stb` |
| Control | 0x60–0x67 | `goto igoto call icall br brf return stop` |

Not built:

- the division step `divs`;
- prefetch;
- the inter-cluster copy operations, because there is only one cluster.

Shifts use the low five bits of the shift amount.

## Memory and byte order

The data is big-endian, as on the MicroBlaze host. Byte address 4k+0 is bits
31:24 of word k. Byte enable bit 3 stands for bits 31:24, on the core port,
on the host port, and on the bus. This lets the host copy its byte arrays
word by word without swapping.

The data memory has two synchronous ports. The core uses one port. The host
uses the other, so it can read and write at any time, even while the
processor runs.

The instruction memory is one 512 × 128-bit array. The host writes it as
32-bit words: word 4i+k is syllable k of instruction i.

The 64 kB data size is chosen so that a kernel can use the following layout:

| What | Address |
|---|---|
| input block | 0x9400 |
| results | 0x9300 |
| stack | grows down from 0xFF00 |

## Host interface (`rvex_plb_wrapper`)

The accelerator is a single-beat 32-bit slave on the host bus. It decodes a
256 kB window at `BASEADDR` (default 0xC000_0000) into four 64 kB ranges,
selected by address bits 17:16:

| Range | Offset | Register |
|---|---|---|
| 0: control | +0x0 | command, write only: bit 0 start, bit 1 stop, bit 2 reset |
| | +0x4 | interrupt enable, bit 0 (read/write) |
| 1: data memory | byte address | read/write, byte enables honoured on writes |
| 2: instruction memory | byte address | read/write, 32-bit words |
| 3: status | +0x0 | bit 0 running, bit 1 done, bit 2 trap |
| | +0x4 | cycles the processor has run since the last reset |
| | +0x8 | current PC |

**Bus handshake.** The master holds `plb_pavalid` with the address, the
read/write flag, the byte enables and the write data. In the next cycle the
slave answers with `sl_addrack` together with:

- `sl_wrdack` and `sl_wrcomp` for a write;
- `sl_rddack`, `sl_rdcomp` and the data on `sl_rddbus` for a read.

An address outside the window gets no answer. This is a subset of the PLB
v4.6 slave protocol. Bursts, 64/128-bit transfers and the arbiter are not
part of it.

**Run control.**

- *Reset* puts the core back to address 0 and clears *done*, *trap* and the
  cycle counter. Both memories keep their contents.
- *Start* runs the processor. A start while *done* is still set is ignored.
- *Stop* freezes every pipeline stage. A later *start* resumes exactly where
  it stopped, and the final cycle count is the same as for an undisturbed
  run.
- The interrupt output `ip2intc_irpt` is a level. It is high while *done* and
  the interrupt enable are both set, and a reset command clears it.

The host's sequence for one block of data:

1. stop, then reset
2. write the input into the data memory
3. start
4. wait for the interrupt
5. read the results

The program itself needs to be written only once.

## Module hierarchy

```
rvex_plb_wrapper        bus slave, register map, interrupt          (top)
└─ rvex_system          run control, cycle counter, memories
   ├─ i_mem             512 x 128, core read port + 32-bit host port
   ├─ d_mem             16384 x 32, two byte-enabled ports
   └─ rvex_core         the pipeline
      ├─ fetch          PC, fetch address, one-bubble redirect
      ├─ syllable_decoder x4   (SLOT = 0..3) field split, slot legality
      ├─ gr_file        64 x 32, 10 read / 4 write ports
      ├─ br_file        8 x 1, 4 read / 4 write ports
      ├─ branch_unit    in decode, slot 0
      ├─ alu x4         E0
      ├─ mul x2         E0, slots 1 and 3
      └─ lsu            address/lanes in E0, load alignment in E1
rvex_pkg                opcodes, decoded-syllable struct, constants
```

At its default sizes the top synthesizes to about 2.9k cells and 3k
flip-flops, plus 576 kbit of memory arrays. The general register file
accounts for 2k of the flip-flops.

## Verifying and simulating

Each module has a self-checking testbench in `tb/`. Each prints a
`TB_RESULT checks=N failures=M` line and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_alu`, `tb_mul` | every operation on corner and random operands, against an operation model |
| `tb_lsu` | addresses, byte lanes, misalignment for each width, load extension |
| `tb_branch_unit` | targets, conditions, link-register branches, stop |
| `tb_gr_file`, `tb_br_file` | random multi-port traffic against an array model, port priority, `$r0` |
| `tb_fetch` | a cycle model with random redirects, halts and freezes |
| `tb_syllable_decoder` | all 128 opcodes in all 4 slots: legality and fields |
| `tb_i_mem`, `tb_d_mem` | host/core ports, word order, byte enables, hold behaviour |
| `tb_rvex_core` | listed below |
| `tb_rvex_system` | the kernel through the host ports; start, stop/resume and reset while running; the cycle counter |
| `tb_rvex_plb_wrapper` | end to end at default sizes, listed below |
| `tb_dft_block` | the full direction-DFT of one block, described below |

`tb_rvex_core` covers:

- every operation executed in the pipeline;
- the forwarding distances 1 to 4 for ALU, load and branch-condition results;
- CPI 1 and the branch penalty;
- both trap kinds;
- the test kernel.

`tb_rvex_plb_wrapper` runs end to end at the default sizes, entirely over the
bus:

- the program is loaded;
- the kernel runs twice, the second time with a stop and resume;
- a byte-enable write;
- an unanswered access outside the window;
- both traps.

It counts each mechanism and fails if any of them never happened: forwarding,
taken branches, call and return, the host stall, both traps, the interrupt,
and byte writes.

The test kernel is a reduced version of the DFT kernel the accelerator was
built for. It takes a 34×34 byte block, forms the 24 row sums of the central
24×24 window, and then computes a cosine and a sine sum for 4 waves with
16-bit coefficients. It stores each wave's power (c≫12)² + (s≫12)². The
kernel has `_start`, `main` and a called kernel function with a stack frame,
and it is scheduled by hand for the 2-cycle latency. It is 42 instructions
long and runs in 3259 cycles. A reference model in the testbench package
checks its results.

`tb_dft_block` runs the whole job the accelerator exists for, at full size,
on `rvex_system` with its default memories. The job takes a 34×34 block at
0x9400 and 16 directions θ = d·π/16. For each direction, the kernel first sums
the 24 rows of a 24×24 window rotated by θ about the block centre. It then
computes the powers of 4 waves and stores them as a 4×16 word matrix at
0x9300 (word 16·wave + direction). The rotation comes from a table of 16 × 576
pixel addresses that the host writes at address 0. The coefficients are
round(256·cos(2πki/24)) and round(256·sin(2πki/24)) for k = 1..4. Both are
computed in the testbench.

The kernel is 48 hand-scheduled instructions and takes 70,355 cycles per
block. It runs two blocks and checks all 64 powers against a reference model.
The original kernel is compiled C that uses 64-bit arithmetic, so its cycle
counts are around 0.6 to 0.75 million on a 4-issue VEX simulator. They are
not comparable with this figure.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/rvex_pkg.sv tb/rvex_tb_pkg.sv tb/tb_rvex_plb_wrapper.sv \
  --top-module tb_rvex_plb_wrapper --Mdir obj -o sim && obj/sim
```

Replace the testbench name to run another one. Every testbench takes at most
a few seconds.

## Where this design departs from, or goes beyond, its source

The source describes the processor's organisation:

- issue width and slot units;
- register files;
- the five stages;
- forwarding into decode;
- the one-cycle branch penalty;
- the 8 kB instruction memory;
- traps on misaligned accesses;
- big-endian data;
- a bus wrapper with start, stop, reset, memory access and a completion
  interrupt.

Everything else is this implementation's own choice:

- the syllable encoding and opcode numbers;
- which forwarding paths exist. The source mentions forwarding from write
  back only, which alone would give a latency of 3. This design also forwards
  from E1, which gives latency 2 everywhere and agrees with the compiler
  configuration the source used;
- trap handling for illegal syllables;
- the data memory size (64 kB);
- the register map, window layout and bus handshake subset;
- the cycle counter;
- reset values (registers are cleared) and the start address 0.
- a single clock for everything. The original system also has a
  half-rate clock and a UART path into the data memory; their use is not
  described, and neither is built.

The host system around the accelerator is not built here: the MicroBlaze
CPU, the PLB bus with its arbiter, the interrupt controller, timer, UART and
DDR memory. They are vendor IP in the original platform. The wrapper's bus
and interrupt pins are the ports where they connect.

The source evaluated other issue widths (1, 2 and 8). Only the 4-issue
configuration it settled on is built. An 8-issue program cannot run on it.

There is no interlock. A program scheduled for longer latencies runs
correctly. A program scheduled for shorter ones does not, and the hardware
gives no warning.
