# Cache Compute System: near-cache vector processing for memory-bound kernels

Simple loops like copy, add-two-arrays, dot product, sum, max or XOR-all do almost no arithmetic
per byte. On a normal processor most of their time goes into moving data up through the cache
into the core. The **Cache Compute System (CCS)** adds a wide vector compute unit (CU) next to an
ordinary cache. The CU works on whole cache lines at once. The processor writes a short
descriptor of the operation into a few memory-mapped registers and starts it. The CCS then
streams the operands line by line from the cache, or from memory on a miss, and computes the
result. It stores the result through the cache. The processor is free to do other work in the
meantime, and polls a readiness register when it needs the result.

This repository holds synthesizable SystemVerilog for the CCS and a system around it:

* 64 lanes of 32-bit integers, matching a 2048-bit cache line;
* 48 vector commands: arithmetic, shift, logic and move, as maps and as reductions;
* a direct-mapped cache of 16 lines × 2048 bits;
* a block-RAM main memory.

The processor is not included. The top module, `ccs_system`, brings out the processor's data
bus.

```
   processor bus (32-bit words)
          |
   +------+-------------------------------- ccs ---------------------------------+
   |  address decode: 0x8000_0000..+0x3c -> ccs_regs, everything else -> cache   |
   |                                                                             |
   |  ccs_regs --cfg/start--> ccs_ctrl --line port--> ccs_cache <-- CPU port     |
   |                  (mask gen, input buffer)             |                     |
   |                          |  ^                         |                     |
   |                          v  |                         |                     |
   |                        ccs_cu                         |                     |
   |      L0 (64 type-A) -> L1 (64 type-B) -> 6-level tree -> accumulator        |
   +-------------------------------------------------------|---------------------+
                                                           | one line-wide, half-duplex port
                                                     ccs_main_mem (64 KiB)
```

## Programming the unit

The CU registers sit in the processor's address space. The base is `CSR_BASE`, default
`0x8000_0000`. Offsets are in bytes:

| offset | register | used by |
|---|---|---|
| 0x00 | command id (0..47, table below) | all |
| 0x04 | operand length, in elements | vector commands |
| 0x08 | constant `k` | VCOP, COP |
| 0x0c | byte address of operand A | VOP2, VOP1, VCOP |
| 0x10 | byte address of operand B | VOP2 |
| 0x14 | byte address of the result | all |
| 0x18 | stride, in words | all |
| 0x1c | stride mask, bits 31:0 | all |
| 0x20 | stride mask, bits 63:32 | all |
| 0x24 | reserved, reads 0 | |
| 0x28 | start: writing bit 0 = 1 starts the command (ignored while busy) | |
| 0x2c | readiness, read-only: 1 = idle, the last command has finished | |

A command runs as follows:

1. Write the parameters.
2. Write 1 to `0x28`.
3. Do other work, using the cache freely.
4. Poll `0x2c` until it reads 1.

Software also computes the **stride mask**. Bit *i* is set when line position *i* lies a
multiple of the stride away from the operand's first element. For stride 1 the mask is all
ones. The registers reset to 0, and the mask resets to all ones.

The bus on `ccs_system` works like this. The requester raises `cpu_req` with `cpu_we`,
`cpu_addr` (a word-aligned byte address) and `cpu_wdata`. It holds them until `cpu_ack`, a
one-cycle pulse. Read data is valid in the same cycle as `cpu_ack`.

## The command set

Each command belongs to one of four classes:

* **VOP2:** two vectors `a`, `b`.
* **VCOP:** a vector and the constant `k`.
* **VOP1:** one vector.
* **COP:** the constant only.

A **map** writes `r[i]` for every selected element. A **reduction** writes a single word at
the result address.

| id | cmd | class | result | id | cmd | class | result |
|---|---|---|---|---|---|---|---|
| 0 | ADDVV | VOP2 | a+b | 24 | SLLVC | VCOP | a << k |
| 1 | SUBVV | VOP2 | a−b | 25 | SRLVC | VCOP | a >> k |
| 2 | MULVV | VOP2 | a·b | 26 | SLAVC | VCOP | sla(a,k) |
| 3 | SSDVV | VOP2 | Σ(a−b)² | 27 | SRAVC | VCOP | a >>> k |
| 4 | SADVV | VOP2 | Σ\|a−b\| | 28 | ROLVC | VCOP | rol(a,k) |
| 5 | IPVV | VOP2 | Σ a·b | 29 | RORVC | VCOP | ror(a,k) |
| 6 | ADDVC | VCOP | a+k | 30 | ANDVV | VOP2 | a & b |
| 7 | SUBVC | VCOP | a−k | 31 | NANDVV | VOP2 | ~(a & b) |
| 8 | MULVC | VCOP | a·k | 32 | ORVV | VOP2 | a \| b |
| 9 | LESSVC | VCOP | a<k ? 1:0 | 33 | NORVV | VOP2 | ~(a \| b) |
| 10 | GRTRVC | VCOP | a>k ? 1:0 | 34 | XORVV | VOP2 | a ^ b |
| 11 | EQUVC | VCOP | a==k ? 1:0 | 35 | XNORVV | VOP2 | ~(a ^ b) |
| 12 | COMP2 | VOP1 | −a | 36–41 | ANDVC … XNORVC | VCOP | as 30–35 with k |
| 13 | SQV | VOP1 | a² | 42 | NOTV | VOP1 | ~a |
| 14 | ABSV | VOP1 | \|a\| | 43 | ANDV | VOP1 | AND of all a |
| 15 | ADDV | VOP1 | Σ a | 44 | ORV | VOP1 | OR of all a |
| 16 | MAXV | VOP1 | max a | 45 | XORV | VOP1 | XOR of all a |
| 17 | MINV | VOP1 | min a | 46 | INITC | COP | k |
| 18–23 | SLLVV, SRLVV, SLAVV, SRAVV, ROLVV, RORVV | VOP2 | shift/rotate a by b | 47 | COPYV | VOP1 | a |

The rules for values and widths are:

* Values are 32-bit two's complement.
* Compares, MAX, MIN and ABS are signed.
* Products and sums wrap to 32 bits.
* Shift and rotate amounts use the low 5 bits.
* SLA shifts left and keeps the sign bit. SRA copies the sign bit in.

Identifiers 48–63 are invalid, and a start with one of them is ignored. `ccs_pkg::decode()`
maps each command to the operation of every CU level.

## The compute unit (`ccs_cu`)

This is the heart of the design. It is a binary structure of registered levels, one lane per
word of a cache line (N = 64).

| level | units | unit type | contents | role |
|---|---|---|---|---|
| L0 | N | A (`ccs_unit_a`) | adder/subtracter, shifter, logic unit | first map step: add, sub, negate, compare, shifts, rotates, logic, constant |
| L1 | N | B (`ccs_unit_b`) | adder/subtracter, 32×32 multiplier | second map step: multiply, square, absolute value, or pass |
| R1..R6 | N/2 … 1 | C (`ccs_unit_c`) | adder/comparator, AND/OR/XOR | reduction tree: sum, max, min, and, or, xor |
| ACC | 1 | C | as above | folds each line's tree result into an accumulator |

Only L1 has multipliers, and L0 alone has shifters. Commands that need two map steps use both
map levels. SSDVV is a subtraction in L0 and a square in L1. SADVV is a subtraction in L0 and an
absolute value in L1. The tree then sums the lanes. Plain maps leave L1 in pass mode and take
their result from L1's output register.

**Masks through the tree.** Each lane carries one bit of the *execution mask*. For a map, that
bit becomes the write mask of the result word, so unselected words in memory are left alone. In
the tree, every node gets two values and two mask bits:

* both bits set: it performs the level's operation;
* one bit set: it forwards that value unchanged;
* neither set: it outputs 0.

Its output mask bit is the OR of the two. Masked-out elements therefore drop out of sums, mins
and ANDs without any neutral-element tricks. The accumulator works the same way. Its own mask
bit is forced to 0 on the first line of a command, which clears it. A reduction in which no
element was selected writes 0.

**Timing.** Every level is registered, and a new line may enter on every cycle:

* A map result appears 2 cycles after its line enters.
* The result of a reduction appears log2(N)+3 = 9 cycles after its last line enters: L0, L1,
  six tree levels and the accumulator.

`in_first` clears the accumulator. `in_last` is raised only on the last line of a reduction,
so that map traffic never produces a reduction result.

## Operands, partitions and masks (`ccs_mask_gen`)

An operand is described by three values:

* a base address;
* a length `len`, in elements;
* a stride, in words.

It covers `span = (len−1)·stride + 1` words starting at its base. The controller cuts that
range into **partitions** of one cache line each. For each partition it builds two masks:

* The **boundary mask** keeps the words of the line that lie inside
  `[offset, offset+span)`, counted from the start of the operand's first line. It trims the
  first and last lines when the operand does not start or end on a line boundary.
* The **execution mask** is the boundary mask ANDed with the software stride mask. It selects
  the elements that are read, computed and written.

Because a mask is per line position, strides must be powers of two no longer than a line. All
vectors of one command must also have the **same word offset within their lines**, because
lane *i* of A meets lane *i* of B and lands in word *i* of the result line. The controller
takes the offset from operand A, or from the result for INITC. A reduction's single result word
may be anywhere.

## Controller and hardware loops (`ccs_ctrl`)

The controller runs the loop over partitions in hardware, so the operand length is not limited
by the unit's width. For each partition:

* **VOP2:** read the A line into the input buffer, then the B line.
* **VOP1, VCOP:** read only A. The constant is broadcast to every lane.
* **COP (INITC):** no read.

What follows depends on the kind of command:

* **Maps** issue the line to the CU, wait 2 cycles for the result, and write it back under the
  execution mask. Only then do they fetch the next partition. There is a single half-duplex
  line channel, so the write of one partition and the reads of the next cannot overlap.
* **Reductions** issue each partition as soon as its operands arrive and go straight on to the
  next fetch while the CU pipeline works. After the last partition they wait for the
  accumulated word and write it with a one-word mask.

The states are `IDLE → RD_A → [RD_B] → ISSUE → WAIT_MAP → WR_MAP → …` for maps and
`IDLE → (RD_A → [RD_B] → ISSUE)* → WAIT_RED → WR_RED` for reductions. `busy` drives the
readiness register. A length of 0 completes at once.

## The cache (`ccs_cache`)

The cache is direct-mapped with 16 lines of 2048 bits. Each line has a tag and one valid bit.
It has two client ports:

* **Processor port.** Word accesses, write-through, write-no-allocate. A read miss fetches and
  allocates the line. A write always goes to memory and also updates the word when its line is
  present.
* **CU port.** Whole lines with a word mask, neither read- nor write-allocate. A hit is served
  from the cache. A miss is forwarded from memory without being kept, so operand streams do not
  evict the processor's data. A write goes to memory and updates the line when it is present,
  so the processor never reads stale results from the cache.

One request is served at a time. When both ports wait, they take turns. A hit is acknowledged
one cycle after it is taken. Misses and writes add the memory's latency: `ccs_main_mem` takes
one cycle. Every port uses the same protocol: a request is held until a one-cycle
acknowledge. An assertion in the cache checks that rule.

## Measured cycle counts

These counts come from `ccs_system_tb`, at the default size. Each is taken from the write to
the start register until the poll that sees ready, so it includes up to 3 cycles of polling
granularity.

| command | elements | cycles |
|---|---|---|
| SUBVV, MULVV (map, operands in memory) | 64 | 18 |
| SSDVV, SADVV, IPVV (reduction) | 64 | 27 |
| ANDV, ORV, XORV | 64 | 21 |
| INITC | 64 | 12 |
| MULVC | 1024 | 183 |
| IPVV, SSDVV | 1024 | 162 |
| MAXV | 1024 | 99 |
| ADDVV (processor also using the cache) | 1024 | 263 |

`ccs_apps_tb` gives whole-kernel figures at the same size, including the bus writes that
program each command: the kNN distance phase takes 64 commands and 3072 cycles; the linear
regression sums take 5 commands and 222 cycles; and the 64 x 64 matrix product takes 4096
commands and 196608 cycles, or 48 cycles per product. One KMeans iteration on 178 samples
of 13 features with 3 centroids takes 534 commands and about 27200 cycles, or 51 cycles per
distance. The samples sit four to a line in 16-word slots, and each centroid is stored once
for each slot offset, so that both operands of every SSDVV have the same word offset. Operand
data is written beforehand and is not counted.

## Where this RTL goes beyond or departs from the source description

The architecture follows the published description:

* the CCS as a cache plus CU;
* the memory-mapped programming interface and its register order;
* the 48 commands and their classes;
* the unit types of each level;
* the mask-driven reduction tree with an accumulation level;
* boundary, stride and execution masks;
* hardware loops, with maps written back before the next fetch and reductions pipelined;
* the cache geometry and policies.

The following were not specified and are this design's own choices:

* the numeric command identifiers;
* the SLA semantics, the shift amounts taken modulo 32, and signed compares;
* the two mask registers at 0x1c and 0x20;
* the register base address and the bus handshake;
* the pipeline register after every CU level, and so the exact latencies;
* length counted in elements, with the span computed from the stride;
* the cache arbitration;
* a line-wide memory port with word masks;
* the size and latency of main memory (64 KiB, 1 cycle).

There are also some known limits:

* No checks are made for misaligned vectors or bad strides. Software must respect the
  alignment and stride rules above.
* Nothing stops the processor from writing an operand while a command is reading it.
* The memory channel is half-duplex, so a processor miss waits for the CU's current line
  transfer, and the reverse.

## Files

Everything is in `rtl/`, one module or package per file:

| file | contents |
|---|---|
| `ccs_pkg.sv` | element width, command enum, unit operation enums, register struct, `decode()` |
| `ccs_unit_a.sv`, `ccs_unit_b.sv`, `ccs_unit_c.sv` | the three unit types |
| `ccs_cu.sv` | the compute unit |
| `ccs_mask_gen.sv` | boundary and execution masks |
| `ccs_regs.sv` | programming registers |
| `ccs_ctrl.sv` | controller, hardware loops, input and result buffers |
| `ccs_cache.sv` | direct-mapped cache |
| `ccs_main_mem.sv` | main memory |
| `ccs.sv` | the CCS: registers + controller + CU + cache |
| `ccs_system.sv` | top: CCS + main memory |

The main parameters are:

* `N`: lanes, which is also the line length in words. Default 64.
* `LINES`: cache lines. Default 16.
* `MEM_LINES` / `DEPTH`: main-memory lines. Default 256.
* `CSR_BASE`: register base address.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The shared reference model is `tb/ccs_ref_pkg.sv`: an
element-by-element definition of each command and a whole-command executor on a memory image.

| testbench | what it checks |
|---|---|
| `ccs_unit_a_tb`, `ccs_unit_b_tb`, `ccs_unit_c_tb` | every operation; every mask case of the tree node |
| `ccs_cu_tb` | all 48 commands through the 64-lane CU, several masks; checks map latency 2 and reduction latency 9 with back-to-back lines |
| `ccs_mask_gen_tb` | masks for random operands, including a 60-element operand starting 4 words into its line |
| `ccs_regs_tb` | register read/write, readiness, start pulse, busy lock-out |
| `ccs_ctrl_tb` | controller + CU against a memory model with random latency: all commands, long operands, offsets, strides 1/2/4 |
| `ccs_cache_tb` | data and allocation policy of both ports, eviction, contention |
| `ccs_main_mem_tb` | masked line writes |
| `ccs_tb` | the CCS through the processor bus, against a memory model with random latency |
| `ccs_system_tb` | the whole system at default size, through the processor bus only: every command on 64 elements, six commands on 1024, misaligned and strided operands; counts cache hits and bypasses, cached-line updates, processor accesses while busy, busy polls |
| `ccs_apps_tb` | three application kernels on the whole system, each result compared with a direct computation: kNN distances (64 SSDVV, then the processor picks the 4 nearest and votes), linear regression of 64 points (four sums from ADDV, IPVV and SQV + ADDV), a 64 x 64 integer matrix product (4096 IPVV over rows of A and rows of the transposed B), and three KMeans iterations on 178 generated samples of 13 features with k = 3 (534 SSDVV per iteration; the processor reassigns samples and updates centroids) |

The end-to-end test, for example:

```
verilator --binary --timing --assert -y rtl rtl/ccs_pkg.sv tb/ccs_ref_pkg.sv \
          tb/ccs_system_tb.sv --top-module ccs_system_tb -Mdir obj_sys
obj_sys/Vccs_system_tb
```

It builds in about 30 s and runs in well under a second. For the other testbenches, replace the
testbench file and the top module name. Packages must come first on the command line, and
`-y rtl` finds the remaining modules.
