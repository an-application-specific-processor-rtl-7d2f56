# A microcoded double-precision coprocessor for Monte Carlo energy sums

Monte Carlo–Metropolis simulations of dipole lattices spend most of their
time on one operation. For each lattice site they sum an expression over the
site's neighbours in a cyclic three-dimensional grid. The arithmetic is plain
double-precision adds and multiplies. The difficulty is keeping a pipelined
adder and multiplier busy while the operands come from scattered neighbour
addresses.

This design splits that work between two small programmable engines per
accelerator:

* A **Math Unit** has a 9-stage adder/comparator and a 15-stage multiplier.
  It is driven by wide microwords and cannot address memory at all.
* A **Memory Manager** is an address generator for cyclic X×Y×Z matrices. It
  reads operands into the Math Unit's input queue and writes its results back.

Each engine expands 6-bit opcodes into microcode sequences. A **Control
Unit** runs a short program that issues one opcode to each engine in the same
cycle, counts loops and branches on comparison results. Two accelerators
share four 64-bit cache banks. A **Virtual Cache Manager** (VCM) in each
accelerator maps its virtual banks onto physical ones. The supervisor CPU
can then refill idle banks while the accelerators compute, and the banks are
swapped at the end of a step. Everything runs in one clock domain. The target
is 100 MHz on an FPGA.

```
 supervisor bus (32 bit) ──► sub_bus_if ──► control_unit ──IST──┬──────────────┐
        │  microcode / LUT / program loads                     ▼              ▼
        │                                          accelerator 1          accelerator 2
        │                                  ┌─ math_unit (ucode_seq + math_alu)
        │                                  ├─ mem_manager (own ucode_seq)
        │                                  └─ vcm ──► physical bank port
        └──── host port (16-bit address, 32-bit data) ──► cache_mem (4 × 8192 × 64 bit)
```

## The Math Unit and its latency-exposed microword

The Math Unit (`math_unit` = `ucode_seq` + `math_alu`) executes one 37-bit
microword per cycle. Stored words are 38 bits: the 37 control bits plus an
end-of-sequence flag. A microword can do all of the following at once:

| field (mc_pkg::alu_uop_t) | bits | meaning |
|---|---|---|
| `cmp` | 1 | the adder compares `a < b` instead of adding |
| `add_a`, `add_a_k` | 4+2 | adder operand A and its scale: 1, −2, −1, 2 |
| `add_b`, `add_b_k` | 4+2 | adder operand B and its scale: 1, −1, −0.5, 0.5 |
| `mul_a`, `mul_b`, `mul_k` | 4+4+2 | multiplier operands, product scale: 1, 2, 0.5, −1 |
| `fetch`, `fetch_idx` | 1+2 | pop the input queue into input register I*n* |
| `wa`, `wa_idx` | 1+2 | write the adder output into adder register A*n* |
| `wm`, `wm_idx` | 1+2 | write the multiplier output into multiplier register M*n* |
| `out`, `out_sel` | 1+4 | push a register into the arithmetic output queue |

The first field is the most significant. Operand codes are:

* 0–3: I0–I3
* 4–7: A0–A3
* 8–11: M0–M3
* 12 and 14: constant 0.0
* 13 and 15: constant 1.0

So "add only" is written as `x + 0.0` and "multiply only" as `x · 1.0`. The
scale factors are powers of two or a negation, so they are exponent and sign
edits and cost no time. The product scale is applied to multiplier operand A
when the microword issues. For powers of two this gives the same result as
scaling the product.

**The pipelines are not interlocked.** This is the one thing a microcode
writer must understand:

* The adder and multiplier advance only when a microword executes.
* The sum started by microword *i* is at the adder output during microword
  *i + 9*. That microword can store it with `wa`.
* A product started by microword *i* is available during microword *i + 15*.
* If no microword writes a result in that slot, the result is lost.
* A comparison travels the same way. Its flag enters the logical output queue
  when microword *i + 9* executes.
* Register reads in a microword see the values from before that microword's
  writes.

Sequences must therefore be scheduled by hand. The end-to-end test contains
a 62-word example. It computes, per site:

```
s = ((x+ + x−) + (y+ + y−)) + (z+ + z−)
e = (0.5·p)·s
flag = e < 0
```

This example does not overlap the arithmetic of consecutive sites. Only the
Memory Manager works ahead: it fetches the next site's operands into the
input queue while the Math Unit is still computing the current one.

The Math Unit stalls (nothing advances) only when:

* a microword fetches from an empty input queue,
* a microword outputs into a full arithmetic queue, or
* a comparison flag is due and the logical queue is full.

Latency counted in microwords, rather than in clock cycles, keeps a sequence
correct under stalls.

The floating-point units use IEEE-754 doubles with round to nearest even.
Subnormal inputs and results are flushed to zero. Overflow gives infinity,
and invalid operations give the default NaN. Each unit computes its result
combinationally and then shifts it down a 9- or 15-register pipeline. A
synthesis tool with register retiming is expected to spread the logic over
those stages.

## Microcode sequencers

`ucode_seq` is used four times: by the two Math Units (37-bit words) and by
the two Memory Managers (34-bit words). Its parts:

* An opcode queue of 6-bit opcodes.
* A 64-entry look-up table mapping each opcode to a 10-bit start address.
* A 10-bit microprogram counter.
* A 1024-word microcode RAM. Each word carries an end-of-sequence flag.

An opcode pushed into an empty sequencer produces its first microword two
cycles later. One microword follows per cycle until the flagged word. The
next opcode follows with no gap. Words wider than 32 bits are loaded from the
bus in two writes: the low half first, and the high half commits the word.

## The Memory Manager: cyclic lattice addressing

`mem_manager` sees the cache as two matrices of X×Y×Z sites with four 64-bit
words per site. Its 34-bit microword has two forms.

**R/W form.** Read into the Math Unit's input queue, or write from its
arithmetic queue, at this address:

```
addr = ((((mat·Z + z')·Y + y')·X + x')·4 + comp) mod 2^15
x' = (P[ptr].x + dx) mod X,   dx ∈ {−2, −1, 0, +1}   (likewise y', z')
```

* `P[0..3]` are four 6-bit {x, y, z} pointers.
* Offsets are relative to the pointer and wrap at the matrix edge. This is
  what makes the lattice cyclic.
* In the same cycle the word can load a new value into any pointer. The
  address uses the pointer's old value.

**Control form.** Either INIT {X, Y, Z}, which sets the matrix size, or GVC
with a 16-bit word:

| GVC bit | effect |
|---|---|
| [7:0] | new bank map: virtual bank *i* → physical bank `map[2i+1:2i]` |
| [8] | load that map into the VCM (a cache swap) |
| [9] | raise this accelerator's step-done flag to the supervisor |
| [10] | wait until the supervisor sets this accelerator's go flag, then consume it |

Flow control:

* A read is issued only when the Math Unit's input queue has room for it.
* A write waits for a result in the arithmetic queue.
* Cache requests are held until the bank arbiter grants them.
* Read data arrives one cycle after the grant.

## Caches, the VCM and the swap protocol

`cache_mem` holds four banks of 8192 × 64 bits, 2 Mbit in total. Each bank is
a single-port RAM with fixed priority per bank: accelerator 1, then
accelerator 2, then the host. Accesses to different banks proceed in
parallel.

* An accelerator address is 15 bits: virtual bank [14:13] and word [12:0].
  `vcm` replaces the virtual bank by the mapped physical bank.
* The host address is 16 bits of 32-bit half-words: bank [15:14], word
  [13:1], half [0].

A step proceeds as follows:

1. The accelerators work in their current banks.
2. The supervisor fills the banks they will use next.
3. Each Memory Manager's sweep ends with a GVC that sets bit 9, reporting
   step done.
4. Its next GVC sets bits 10 and 8. The Memory Manager waits for its go flag,
   and the new map takes effect when that GVC completes.
5. The supervisor sees both step-done flags, clears them and sets the go
   flags.
6. The accelerators carry on in the refilled banks. The supervisor collects
   the results from the banks they have left.

`vcm` counts map changes, and the counts can be read over the bus.

## Control Unit instruction set

Instructions are 32 bits, with the opcode in [31:28]. One instruction runs
per cycle, from a 256-word program RAM.

| op | name | fields | action |
|---|---|---|---|
| 0 | NOP | | |
| 1 | IST | [27:0] = {MM2, ALU2, MM1, ALU1}, each {valid, opcode[5:0]} | push opcodes into the selected sequencers in one cycle; waits while any selected queue is full |
| 2 | JMP | [7:0] target | |
| 3 | LDC | [25:24] counter, [15:0] value | load one of four loop counters |
| 4 | DJNZ | [25:24] counter, [7:0] target | decrement, jump if the result is not zero |
| 5 | JCMP | [24] ALU, [7:0] target | pop that ALU's comparison flag, jump if set; waits for a flag |
| 6 | WAIT | [3:0] unit mask | wait until the chosen units are idle |
| 7 | HALT | | stop, pulse `irq` |
| 8 | PCNT | [0] run, [1] clear | control the 32-bit cycle counter |

## Supervisor bus

`mc_accel_top` is a 32-bit memory-mapped slave with a 20-bit word address.
The region is selected by `bus_addr[19:16]`:

| region | contents |
|---|---|
| 0 | caches, `bus_addr[15:0]` = host cache address (read/write) |
| 1, 3, 5, 7 | microcode of ALU1, MM1, ALU2, MM2: `{word[9:0], half}` |
| 2, 4, 6, 8 | look-up tables of the same units, `[5:0]` |
| 9 | Control Unit program `[7:0]` |
| A | registers (below) |

Registers in region A:

* 0: write bit 0 to start; read {done, running}
* 1: cycle counter
* 2: write to set go flags [1:0]
* 3: step-done flags; a write clears the bits set in the data
* 4: {swaps of accelerator 2, swaps of accelerator 1}
* 5: run clock, the cycles the Control Unit has run since the last start

Bus timing:

* Reads return data one cycle later with `bus_rvalid`.
* A cache access holds `bus_wait` high until its bank is free.
* The bus master must keep the request steady while `bus_wait` is high.
* `irq` pulses when the program halts.

## Simulating

All files are plain SystemVerilog 2017. Each block has a self-checking
testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/mc_pkg.sv \
    tb/tb_mc_accel_top.sv --top-module tb_mc_accel_top
./obj_dir/Vtb_mc_accel_top +verilator+rand+reset+2
```

`tb_mc_accel_top` runs the whole design at its default sizes, using only the
bus. It exercises:

* both accelerators on 3×3×3 cyclic lattices
* a cache swap mid-run, with the host refilling the idle banks while the
  accelerators compute
* a host access that must wait for a busy bank
* Control Unit loops and comparison branches

It checks all 108 results against a reference model and counts each
mechanism: ALU stalls, Memory Manager stalls, IST waits, GVC waits, host
waits, comparisons, loop jumps and the interrupt. The run takes about 3400
cycles.

`tb_mc_lattice` shows how the latency is hidden. It runs the same
computation on a 5×5×5 lattice (125 dipoles) per accelerator, with two steps
and a swap, and checks all 500 results. Its Math Unit code is
software-pipelined and starts a new site every 16 microwords:

* One site's work is split into four 16-word stages:
  1. fetches and pair sums
  2. partial sum and 0.5·p
  3. final sum and product
  4. result and comparison
* Each opcode runs stage 1 of site *i*, stage 2 of site *i−1*, stage 3 of
  site *i−2* and stage 4 of site *i−3*.
* Prologue and epilogue variants leave out the stages that have no site.
* 0.5·p must survive across two opcodes. Even and odd sites therefore keep
  it in different multiplier registers, and every opcode has an even and an
  odd version.

The Memory Manager reads site *i* and writes the result of site *i−3*. Its
two pointers walk the reads and the writes. The Control Unit stays two
opcodes ahead and consumes the comparison flags in a loop. The run takes
4110 cycles for 250 sites per accelerator, or 16.4 cycles per site. The
Memory Manager alone would allow 8 cycles per site: 7 reads and 1 write.
The unrolled sweep uses 1000 of the 1024 microcode words, so 5×5×5 is the
largest cubic lattice a single sweep sequence covers.

## How far it can be trusted, and departures

What is fixed by the design's specification:

* two accelerators, four caches and a 32-bit bus
* 9- and 15-stage pipelines and three 4-register banks
* separate arithmetic and logical output queues, and the scale constants
* 6-bit opcodes, a 64-entry look-up table, a 10-bit microcode address and
  1024-word microcode RAMs
* a 37-bit ALU microword
* the five Memory Manager instructions, including pointer modification in
  parallel with a read or write
* the seven-bit IST fields
* 15-bit accelerator and 16-bit host cache addresses, and 64-bit cache data

Choices made here, where the specification is silent:

* All bit encodings: the ALU microword layout, the Memory Manager microword
  and GVC bits, and the Control Unit instructions.
* The sizes of queues (16), the program RAM (256) and each cache bank (8192
  words, from the 15-bit address).
* The comparison is `a < b`.
* The pipeline timing model described above, and the stall rules.
* Bus arbitration priorities and the whole bus map.
* Four words per site, two matrices per bank group, offsets −2..+1 and
  6-bit coordinates.

The specification gives two widths for the stored ALU word, 37 and 38 bits.
Here 37 bits of control plus the end flag make 38.

Departures and limits:

* There are two timers:
  * The bus interface's run clock measures whole runs.
  * The Control Unit's counter is started and stopped by PCNT instructions,
    to time parts of a program.
* Floating-point subnormals are flushed to zero.
* The FP units are one combinational step plus registers. Whether retiming
  reaches 100 MHz has not been checked.
* Not included: the supervisor CPU and its DMA, the board RAM and flash, and
  the Ethernet and serial links. The testbench acts as the supervisor.
* Lattice size has two limits:
  * Cache: a lattice of up to 10×10×10 sites fits in one bank (8000 words).
  * Microcode: with one unrolled sweep of 8 microwords per site, a single
    sequence covers at most 127 sites.
* Larger lattices, including the intended range up to 50×50×50, must be
  processed as a series of sub-sets.
  * Each sub-set runs the same sweep.
  * The supervisor streams the sub-sets through the swapped cache banks.
  * The supervisor also supplies boundary copies of neighbouring sites.
  * That supervisor software and its DMA are not part of this RTL. Only
    the two-step swap with whole small lattices is demonstrated.
