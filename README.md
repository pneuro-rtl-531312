# PNeuro: a clustered SIMD accelerator for neural networks

PNeuro runs the inner loops of convolutional and fully connected networks on
many small 8-bit processing elements (PEs) that work in lockstep. There are no
caches and no load/store instructions in the inner loop. Each PE reads its
operands straight out of the memory next to it. A set of address generators
computes the addresses, and a routing network reshapes the data on the way:
it can broadcast a coefficient to all PEs, slide pixels one PE sideways, or pad
with zeros.

A 3x3 convolution therefore reduces to nine multiply-accumulates per output
pixel, one instruction each. All 64 PEs produce one output pixel each in
parallel.

This repository holds synthesizable SystemVerilog for the accelerator IP in its
evaluated configuration:

| | |
|---|---|
| clusters | 2 |
| Neural Computing Blocks (NCBs) per cluster | 4 |
| PEs per NCB | 8 |
| PEs in all | 64 |
| data memory per cluster | 128 KB (4 NCBs x 4 banks x 1024 words x 8 bytes) |
| program memory per cluster | 4 KB (1024 x 32-bit instructions) |
| host interface | AXI4 slave, 32-bit data |

## Structure

```
pneuro_top                 AXI4 slave, global registers, barrier, daisy chain
├── pneuro_axi_slave       AXI4 bursts -> single 32-bit request/grant accesses
└── pneuro_cluster  x2     one SIMD machine
    ├── pneuro_cluster_ctrl    fetch / decode / issue, control instructions, host registers
    ├── pneuro_prog_mem        1024 x 32 instructions
    ├── pneuro_addr_gen  x3    operand A, operand B, store addresses
    └── pneuro_ncb       x4    Neural Computing Block
        ├── pneuro_ncb_memory      4 x pneuro_sram_bank (8 byte lanes, 1024 words)
        ├── pneuro_routing   x2    operand path A and B (8- and 32-bit lanes)
        ├── pneuro_guard           per-PE execute enable
        └── pneuro_pe        x8
            ├── pneuro_regfile     8 x 32 bit, byte / half / word access
            ├── pneuro_alu
            ├── pneuro_mul9        9 x 9 signed multiplier
            └── pneuro_sat_unit    ReLU, shift, clamp  (uses pneuro_msb_detect)
```

`pneuro_pkg` holds the sizes, the instruction formats and the configuration
structs.

### Lanes, banks and columns

Each bank word is 8 bytes wide, one byte per PE ("lane"). A memory operand
gives PE *i* of every NCB byte *i* of the addressed word in the named bank. A
store writes each enabled PE's byte back into its own lane.

A natural layout for images is one image column per PE and one image row per
bank word. The cluster then sees a 32-column slice, and both clusters together
see 64 columns.

Which bank holds what is up to the program. A common choice is:

- bank 0 for input pixels;
- bank 1 for coefficients;
- bank 2 for results;
- bank 3 for temporaries.

## How an instruction travels

The cluster controller fetches one 32-bit instruction per cycle. Control
instructions (bit 31 = 0) act inside the controller. Computation instructions
(bit 31 = 1) are broadcast to all NCBs of the cluster.

A computation instruction takes two cycles in the NCB.

1. **Issue cycle.** The banks named by memory operands are read.
   - Operand A uses the address of generator 0, operand B that of generator 1.
   - The instruction and the store address (generator 2) are registered.
   - Every generator that was used then steps by its modifier.
2. **Execute cycle.** The operands pass through the routing modules.
   - Each operand is either the bank lanes (memory operand) or each PE's own
     register value (neighbour operand).
   - The guard unit decides per PE whether to execute.
   - The PEs compute. Registers, accumulator, flags and stored bytes are
     written at the end of the cycle.

Consequences for the programmer:

- **Throughput.** One computation instruction is issued per cycle.
- **Branches.** Jumps and loop branches cost no cycles, because the program
  memory is read at the next-PC address.
- **Store-to-load distance.** A byte stored by one instruction can be read from
  memory by the second instruction after it, not the next one.
  - Register results have no such delay: they are visible to the next
    instruction.
- **Configuration changes.** ROUTE, SATCFG, PEEN and AGSEL change state at the
  end of their own cycle. So they apply to every computation instruction issued
  after them, and never to the one in execute.
- **Memory loads go through the routing module too.** A `MOV` from memory
  under a shift configuration loads shifted data. Set the path back to DIRECT
  before plain loads.

## Instruction formats

All instructions are 32 bits.

- Bit 31 selects compute (1) or control (0).
- Bits 30:25 hold a 6-bit opcode.

Beyond those two fields, the field layout, the opcode numbers and the
instruction set are this design's own. They are a working subset: 14 control
and 20 compute instructions. The full architecture has 28 and 40.

### Computation instructions

```
 31 | 30..25 | 24..22 | 21..20  19   18..14 | 13..12  11   10..6 | 5       4..0
  1 | opcode | guard  | A kind  sgn  field  | B kind  sgn  field | to_mem  field
```

**Source kind.**

| kind | operand | meaning of the field |
|---|---|---|
| 0 | register | width (2 bits) and index (3 bits) |
| 1 | memory | bank (bits 1:0) |
| 2 | neighbour | register spec as for kind 0; the value is this register of every PE, sent through the routing module of that operand's path |
| 3 | immediate | 5-bit value, sign-extended when `sgn` is set |

- The sign bit selects sign or zero extension of 8- and 16-bit operands.
- For MUL/MAC it also picks the signed or unsigned 9-bit form of the byte.

**Register widths.**

| width | index n selects |
|---|---|
| 8 bits | byte n of words 0-1 |
| 16 bits | half-word n of words 0-3 |
| 32 bits | word n |

**Destination.**

- `to_mem = 1`: the low byte of the result is stored to bank `field[1:0]` at
  generator 2's address.
- `to_mem = 0`: the result goes to register `field`.

**Opcodes.**

| op | name | effect | flags |
|---|---|---|---|
| 0 | NOP | nothing | |
| 1 | MOV | dst = A | z, n |
| 2-3 | ADD, SUB | dst = A + B, A - B | z, n |
| 4-6 | AND, OR, XOR | bitwise | z, n |
| 7-8 | MIN, MAX | signed | z, n |
| 9-10 | SHL, SHR | A shifted by B[4:0]; SHR is arithmetic | z, n |
| 11 | CMP | A - B, flags only | z, n |
| 12 | MUL | dst = A9 x B9 | |
| 13 | MAC | acc += A9 x B9 | |
| 14 | MACZ | acc = A9 x B9 | |
| 15-16 | ACCLD, ACCADD | acc = A, acc += A | |
| 17 | ACCST | dst = acc | |
| 18 | SAT | dst = saturate(acc) | |
| 19 | MSB | dst = MSB position of A | z, n |

**Guards.** The guard field (0-7) is one of:

- always;
- z, nz, n, nn;
- gt (not z and not n);
- le (z or n);
- never.

A guard tests the flags left by the PE's last flag-setting instruction. A PE
whose guard is false, or that PEEN has disabled, changes nothing and stores
nothing. This is how if-then-else runs in SIMD.

### Control instructions

The fields sit in bits 24:0.

| op | name | fields | effect |
|---|---|---|---|
| 0 | NOP | | |
| 1 | HALT | | stop; STATUS.done is set |
| 2 | JMP | [9:0] target | |
| 3 | LOOP | [24:23] counter, [15:0] n | load loop counter |
| 4 | DJNZ | [24:23] counter, [9:0] target | decrement; branch if not zero |
| 5 | AGSET | [24:23] generator, [22] set, [21:20] register, [15:0] value | write index / modifier / low / high bound |
| 6 | AGSEL | [24:23] generator, [22] set | switch the active register set |
| 7 | ROUTE | [24] path (0 A, 1 B), [23:21] mode, [20:18] amount, [17:16] edge fill | configure a routing module |
| 8 | SATCFG | [24] auto shift, [23] ReLU, [22] signed output, [20:16] shift | configure the saturation unit |
| 9 | PEEN | [24:22] NCB, [7:0] mask | enable / disable individual PEs |
| 10 | SIGNAL | [7:0] flags | set host-visible flags (may interrupt) |
| 11 | WAITH | [7:0] flags | stall until the host has set all these flags, then clear them |
| 12 | BARRIER | | in synchronized mode, stall until every cluster waits at a barrier |
| 13 | NEIGH | [1:0] | enable the link to the left / right cluster |

A program is built as an array of these words. `tb/pneuro_asm_pkg.sv` has one
encoder function per instruction, plus a complete 3x3-convolution program
generator that serves as a worked example.

## Routing and neighbour lanes

Each NCB has two routing modules, one per operand path. Each is configured by
ROUTE and carries the same mapping on an 8-bit and a 32-bit lane set.

| mode | PE i receives |
|---|---|
| DIRECT | lane i |
| MCAST | lane `amount` (broadcast, e.g. one coefficient to every PE) |
| SHL | lane i + amount |
| SHR | lane i - amount |
| ZERO / ONE | the constant 0 / 1 |

**Edges.** In the shift modes, lanes past the NCB edge come from one of:

- the adjacent NCB's source lanes (`edge fill` NEIGH);
- zero padding;
- one padding.

**Across clusters.**

- At the outer NCB of a cluster, "adjacent" means the neighbouring cluster.
  This is the daisy chain, and each cluster enables it with NEIGH.
- With the link off, or at the outer ends of the chain, the neighbour lanes
  read 0.
- The NCBs of a cluster (and, with links on, both clusters) thus form one wide
  row of PEs.

**What is exchanged.**

- For a memory operand, the source lanes are the bank data.
- For a neighbour operand, they are each PE's register value, 8 or 32 bits.
  This is how partial sums or pixels held in registers move between PEs
  without touching memory.

The 3x3 convolution keeps three image rows in byte registers. It reads the
left and right neighbours' pixels with SHR 1 / SHL 1 through path A. Path B
multicasts coefficient k from the coefficient bank.

## The processing element

- **Multiplier.** 9 x 9 bits signed. Each 8-bit operand is extended to 9 bits
  as signed or unsigned, so signed coefficients times unsigned pixels keep full
  precision. The product is sign-extended to 32 bits.
- **Accumulator.** 32 bits, with no overflow detection.
- **ALU.** Works on 32-bit sign- or zero-extended operands. Flags z and n come
  from the 32-bit result.
- **Saturation and linear rectifier unit.** Turns the accumulator into a byte
  in three steps:
  1. optional ReLU: negative becomes 0;
  2. right shift, arithmetic;
  3. clamp to [-128, 127] or [0, 255].

  In *auto shift* mode an MSB detector picks the shift: the smallest one that
  makes the value fit the output range, so a layer's outputs keep their top
  8 significant bits. Other non-linear functions (sigmoid, tanh) are meant to be
  built from instruction sequences with MSB, shifts and the register file.
  There is no unit of their own.

## Address generators

Each cluster has three generators. Each has two register sets of four
registers:

- index, which is the address;
- modifier;
- low bound;
- high bound.

**Stepping.** A generator steps whenever an instruction uses its address:

- generator 0 for a memory operand A;
- generator 1 for a memory operand B;
- generator 2 for a store.

**Wrap.** The bounds make the index circular. A step past the high bound
subtracts `hi - lo + 1`, and a step below the low bound adds it. A modifier
of 0 holds an address, for example to re-read one coefficient word.

**Two sets.** AGSEL switches sets in one instruction. The convolution example
uses this to reach the ninth coefficient, which sits in a second word.

Registers are 16 bits wide. Only the low 10 bits address a bank.

## Host view

### Address map

| address | contents |
|---|---|
| `c * 0x40000 + 0x00000` | program memory of cluster c (word per instruction) |
| `c * 0x40000 + 0x10000` | controller registers of cluster c |
| `c * 0x40000 + 0x20000` | data memory of cluster c |
| `0x80000` | MODE: bit 0 synchronized mode |
| `0x80004` | GSTART: write 1 to start all clusters in the same cycle |
| `0x80008` | IRQS: interrupt request per cluster |

**Data memory addressing.** Within the data window, the address bits are:

| bits | select |
|---|---|
| 16:15 | NCB |
| 14:13 | bank |
| 12:3 | word |
| 2 | lanes 0-3 or 4-7 |

Each byte of the 32-bit AXI word is one PE lane.

**Access rules.**

- A host access to a bank waits while the PEs are using that bank's port. The
  PEs always win, so results can be read while the program runs.
- The AXI slave handles one burst at a time, as single 32-bit beats. INCR and
  WRAP both count upward; FIXED repeats the address.

### Controller registers

These are word offsets inside the register window.

| offset | name | |
|---|---|---|
| 0 | CTRL | write bit 0: start at START_PC |
| 1 | START_PC | |
| 2 | STATUS | 0 running, 1 done, 2 waiting for host flags, 3 waiting at a barrier |
| 3 | HOST_SYNC | write: set flags that WAITH waits for |
| 4 | SIGNAL | flags set by SIGNAL; write 1 to clear |
| 5 | IRQ_EN | bits 7:0 SIGNAL flags, bit 8 HALT |
| 6 | CYCLES | cycles since start |
| 7 | ISSUED | computation instructions since start |
| 8 | STALLS | cycles stalled by WAITH or BARRIER |

### Running a layer

1. Load the programs into the program memories (AXI bursts are fine).
2. Load coefficients and input data into the data memories.
3. Start the clusters in one of two ways:
   - Independent mode: write each cluster's CTRL. The clusters can run
     different programs.
   - Synchronized mode: write MODE = 1, then GSTART. The clusters start in the
     same cycle with the same program.
4. Programs can meet at BARRIER instructions. No cluster leaves one until all
   have reached it.
5. Use WAITH to let the host stream in the next rows or parameters while a
   cluster waits. The host releases it through HOST_SYNC.
6. A program ends with SIGNAL and/or HALT. With IRQ_EN set, `irq` rises.
   Otherwise the host polls STATUS.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. They use `$urandom`
stimulus and compare against models written in the testbench.

| testbench | what it covers |
|---|---|
| tb_addr_gen | both sets, positive / negative modifiers, wrap at both bounds, write-over-step priority |
| tb_sram_bank, tb_ncb_memory | lane enables, read-during-write, bank conflicts, host priority and grant |
| tb_routing | all modes, amounts, edge fills, 8/32-bit lanes |
| tb_regfile | byte / half / word reads and writes against a model |
| tb_mul9 | all four sign combinations, corner values and random operands |
| tb_alu | each operation, flags |
| tb_msb_detect | positions for positive and negative values |
| tb_sat_unit | ReLU, manual and automatic shift, signed / unsigned clamp |
| tb_guard | every guard against random flags and masks |
| tb_pe | random instruction streams against a behavioural PE model |
| tb_ncb | convolution across NCB edges, padding, guards, PE disable, 32-bit exchange |
| tb_prog_mem | fetch and host ports |
| tb_cluster_ctrl | issue timing, loops, WAITH / BARRIER stalls, interrupts, registers |
| tb_cluster | a 3x3 convolution over 12 x 32 pixels; checks each output and the exact cycle count |
| tb_axi_slave | INCR / WRAP / FIXED bursts, strobes, back-pressure, RLAST |
| tb_pneuro_top | full size, see below |
| tb_cnn_layers | the other layer types of a small CNN on one cluster: 5x5 convolution, 3x3 max pooling with stride 3 (stride made with PEEN), a 64->32 fully connected layer and a 32->4 output layer; checks every output and each program's cycle count |

**The end-to-end test, `tb_pneuro_top`.** It runs at the default parameters.
Everything goes through the AXI port:

- the program is loaded into both clusters with bursts;
- synchronized mode is selected and GSTART starts both clusters;
- each cluster waits for its host flag, and the host releases the two at
  different times;
- the clusters meet at a barrier and open the daisy chain;
- they compute the 3x3 convolution of a 48x48 image on all 64 PEs, each PE
  holding one column;
- the host polls a busy bank meanwhile and is held off;
- completion is signalled by interrupt;
- all 46 x 48 output pixels are compared with the reference, including
  columns 31 and 32, which need data across the cluster boundary;
- the rate is checked as well: each of the 9 x 46 MAC instructions must
  execute in all 64 PEs in the same cycle, which is 64 MACs per cycle.

The test counts how often each mechanism occurred:

- host-flag stall;
- barrier wait;
- cross-cluster data;
- host access held off;
- interrupt;
- address-set switch;
- rectified outputs;
- auto-shifted outputs;
- outputs of a second run in independent mode. In that run, cluster 1 alone
  runs another layer from a different START_PC after closing its links, and
  cluster 0 stays halted.

It fails if any count is zero.

**Simulating with Verilator** (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/pneuro_pkg.sv tb/pneuro_asm_pkg.sv tb/tb_pneuro_top.sv \
    --top-module tb_pneuro_top -Mdir obj -o sim
./obj/sim
```

`-Wno-fatal` keeps lint warnings in the testbenches from stopping the build.
The other testbenches build the same way. Drop `tb/pneuro_asm_pkg.sv` for
blocks below the cluster. Verilator finds the RTL modules by file name in
`rtl/`.

**Synthesis size.** A coarse yosys synthesis of the whole IP gives about
24,000 word-level cells and 20,000 flip-flop bits. It also gives about
2.17 Mbit of memory: 2 x 128 KB data and 2 x 4 KB program.

## Decisions and departures

The architecture fixes these points, and this RTL follows them:

- the cluster / NCB / PE hierarchy and its sizes;
- four banks per NCB, with no dedicated coefficient memory;
- three address generators per cluster, each with two sets of index,
  modifier and two bounds;
- routing with padding, multicast, shifting and neighbour access on an 8-bit
  and a 32-bit path;
- a 9-bit multiplier with sign extension and a 32-bit accumulator;
- saturation with a linear rectifier and an automatic MSB detector;
- guards and per-PE disable;
- 32-bit instructions with the compute/control bit and a 6-bit opcode;
- the AXI4 host port;
- an interrupt;
- independent and synchronized cluster modes;
- the inter-NCB and inter-cluster daisy chain.

This design's own choices:

- **Instructions.** Field layout, opcode numbers and the instruction subset.
  The full set has 28 control and 40 compute instructions; this one has 14 and
  20.
- **Pipeline and hazards.** The two-stage pipeline and the store-to-load
  distance of two instructions.
- **Address generators.** Bound handling is circular wrap. Generators 0, 1 and
  2 are tied to operand A, operand B and the store.
- **Register file.** 8 x 32 bits, with the byte / half aliasing described above.
- **Saturation.** The rule for the automatic shift.
- **Host interface.** The address map, the register map, host arbitration
  (the PEs have priority), and the single-outstanding AXI slave.
- **Synchronization.** The synchronization instructions (WAITH, SIGNAL,
  BARRIER, NEIGH) and the barrier logic in the top.

Not built, because they sit outside the IP or are described only by their
role:

- the host processor;
- the optional DMA-based control subsystem;
- the local memory and the off-chip memory controller of the system.

Approximations of tanh, sigmoid and radial-basis functions are left to
instruction sequences. There is no LUT or polynomial unit.

The larger configuration projected for big networks has 64 KB per NCB and
16 KB of program memory. It is not built. `BANK_WORDS` = 2048 and
`PROG_WORDS` / `PROG_AW` = 4096 / 12 in `pneuro_pkg` size the memories for it.
The host data window would also need one more word-address bit, because bits
12:3 hold only 1024 words.
