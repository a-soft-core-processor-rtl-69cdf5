# A MIPS soft core with a variable word size GF(2^m) reduction accelerator

Elliptic curve cryptography over binary fields GF(2^m) spends much of its time
in one step: reducing a product polynomial of degree up to 2m-2 back below
degree m, modulo an irreducible polynomial

    f(x) = x^m + x^a + x^b + x^c + 1        (a trinomial has only x^a)

Since x^m = x^a + x^b + x^c + 1, every bit at degree m+i can be replaced by
four bits at degrees i+a, i+b, i+c and i. On a machine with w-bit words this is
done a word at a time with shifts and XORs. The important fact is that **the
shift amounts are fixed by f and w**. There are only eight:

| term k | right shift       | left shift              |
|--------|-------------------|-------------------------|
| x^a    | (m-a) mod w       | w - ((m-a) mod w)       |
| x^b    | (m-b) mod w       | w - ((m-b) mod w)       |
| x^c    | (m-c) mod w       | w - ((m-c) mod w)       |
| 1      | m mod w           | w - (m mod w)           |

For f = x^283 + x^12 + x^7 + x^5 + 1 on 32-bit words these are 15/17, 20/12,
22/10 and 27/5. The number of instructions the reduction needs depends
strongly on w. It falls as w grows, because fewer words are involved. It also
drops sharply at particular word sizes, where shifts cancel or vanish. The
best word size is often not a power of two. The published measurements found
294 bits best for the polynomial above. With the program generator used here,
a word exactly m bits wide does even better (see the cycle table below).

This design puts that idea on an FPGA-style soft core. A 32-bit MIPS pipeline
runs the program. Next to it sits an accelerator whose word size `W` is a
synthesis parameter, chosen for the polynomial. The accelerator's shifter is
not a barrel shifter. It is a multiplexer of eight hard-wired shifts, so even a
300-bit datapath stays small and fast. The defaults build the 294-bit
accelerator for x^283 + x^12 + x^7 + x^5 + 1.

The architecture follows the paper "A Soft-Core Processor for Finite Field
Arithmetic with a Variable Word Size Accelerator". That paper describes the
structure and the rules; many details below are choices made for this RTL, and
the section [Where this RTL makes its own choices](#where-this-rtl-makes-its-own-choices)
lists them.

## Structure

```
            +---------------------------- mips_core -----------------------------+
  imem ---> | If | Id: decoder, regfile, branch | Ex: ALU | Ma: align | Wb       |
  (IfId_ir) +--------------------------------------------------------------------+
     |              | id_stall / ecc_hazard            | address    ^ 32-bit lane
     |              v                                  v            |
     |      +---------------------------- ecc_accel ---------------|------------+
     +----> | Id: ecc_decoder, ecc_regfile | Ex: ecc_alu | Ma: ld/st | Wb       |
            +--------------------------------------------------------------------+
                                                       |  W bits    ^ low W bits
                                                       v            |
                                        dmem: WD = max(2^ceil(log2 W), 32) bits wide
```

* **Two pipelines in lockstep.** The accelerator has the same five stages as
  the main core (If, Id, Ex, Ma, Wb). Both decode the same If/Id instruction
  word. Each ignores the other's instructions. They stall together.
* **Coupling at Id and Ma.** In Id both see the instruction. In Ma both use the
  single data memory. The main core computes every memory address, including
  those of accelerator loads and stores.
* **One wide data memory.** The data memory is `WD` bits wide, the smallest
  power of two that is at least `W` and at least 32. For W = 294, WD = 512.
  So an accelerator load or store moves a whole register in one cycle. The main
  core reaches a 32-bit lane of a line through the lane multiplexers in
  `ecc_soc`.

| module | role |
|---|---|
| `ecc_soc` | top: core, accelerator, memories, lane multiplexers, IO input and output |
| `mips_core` | five-stage MIPS pipeline, branch in Id with one delay slot |
| `mips_decoder`, `mips_regfile`, `mips_alu`, `branch_unit`, `load_align` | main-core stage blocks |
| `ecc_accel` | accelerator pipeline |
| `ecc_decoder`, `ecc_regfile`, `ecc_alu` | accelerator stage blocks |
| `imem`, `dmem` | block RAMs |
| `ecc_pkg` | encodings, control structs, `mem_width()` and `shift_amount()` |

## The accelerator instructions

The accelerator has 32 registers e0..e31 of `W` bits; e0 always reads zero. It
has five instructions. They use the MIPS coprocessor-2 opcode space:

| instruction | encoding | effect |
|---|---|---|
| `EXOR ed, es, et` | `010010 es et ed 00 000 000000` | ed = es ^ et |
| `ESLL ed, es, sel` | `010010 es 00000 ed 00 sel 000001` | ed = es << AMT[sel] |
| `ESRL ed, es, sel` | `010010 es 00000 ed 00 sel 000010` | ed = es >> AMT[sel] |
| `ELD et, off(rs)` | `110010 rs et off16` | et = low W bits of line at gpr[rs]+off |
| `EST et, off(rs)` | `111010 rs et off16` | line at gpr[rs]+off = et |

`AMT[0..3]` are the right-shift amounts of the table above, for x^a, x^b, x^c
and 1. `AMT[4..7]` are the left-shift amounts in the same order. Both
directions accept all eight amounts. The last steps of a reduction need this:
to clear the bits at and above x^m, one shifts right by `m mod w` and back left
by the same amount. `ecc_pkg::shift_amount()` computes the table at
elaboration.

For a trinomial, set `B = C = 0`. Selectors 1, 2, 5 and 6 then repeat the
"1" entries, and a program does not use them.

### Alignment of accelerator memory accesses

The effective address of `ELD`/`EST` must be a multiple of `WD/8` bytes
(64 bytes when W = 294). The hardware ignores the low address bits, and an
assertion in `ecc_soc` reports a misaligned access in simulation.

`ELD` takes the low `W` bits of the line. `EST` writes the lowest
`ceil(W/8)` bytes of the line. The bits between `W` and the next byte boundary
are written as zero. The rest of the line (`WD - 8*ceil(W/8)` bits, 208 bits
for W = 294) is never touched by the accelerator. The main core can still use
it through ordinary 32-bit loads and stores.

## How a reduction program looks

The accelerator only supplies XOR and the eight shifts. The program decides
how to use them. `tb/tb_asm_pkg.sv` holds a generator,
`reduction_program()`, that writes straight-line code for any (m, a, b, c, w):

1. `ELD` the `ceil((2m-1)/w)` words of g(x) into e1, e2, ...
2. For each word i lying wholly above x^m, from the top down, and for each
   term k: the word moves down by d = m - k bits. Word i - d/w gets
   `word >> (d mod w)` and the word below gets `word << (w - d mod w)`. The
   part that lands in word i itself is collected and kept for the next pass.
3. The word that contains x^m is split: `t = word >> (m mod w)`,
   `u = t << (m mod w)`. Then `word ^= u`, and u is folded as in step 2.
4. Each pass lowers the degree bound from D to D - m + a. Passes repeat until
   D < m.
5. `EST` the `ceil(m/w)` result words.

For the default configuration the whole reduction is two loads, 38
ALU instructions and one store. Sizes measured by `tb_workloads`, counted to
the final flag store and including two address set-up instructions:

| f(x) | W = 32 | W = 64 | W = 128 | W = 256 | W = m | W = 294 |
|---|---|---|---|---|---|---|
| x^283 + x^12 + x^7 + x^5 + 1 | 217 | 107 | 69 | 50 | 36 | 48 (54 in `tb_ecc_soc`, which adds an IO prologue) |
| x^241 + x^70 + 1 | 131 | - | 52 | 40 | 20 | - |
| x^163 + x^7 + x^6 + x^3 + 1 | 117 | - | 50 | - | 36 | 48 |

These are cycle counts of generated straight-line code, not of compiled C.
The cycles to the flag store equal the instructions before it, plus three
cycles of pipeline fill, plus one cycle per load-use stall. Split by kind, the x^283 program has 92 shifts, 91
XORs and 33 other instructions at W = 32, and 12, 14 and 9 at W = 283.

The same generator can also emit code for the main core alone (32-bit words,
MIPS `LW`/`SW`/`XOR`/`SLL`/`SRL`). That is the software baseline the
accelerator replaces. On the default build, `tb_speedup` reduces the same
inputs both ways: 217 cycles in software against 48 on the 294-bit
accelerator, a 4.5x gain in cycles. The published figure of up to 10.2x also
includes clock frequency and refers to compiled C code; it is not reproduced
here.

## Pipeline timing and hazards

* One instruction per cycle, accelerator loads and stores included.
* Branches and jumps resolve in Id, so there is exactly one delay slot, as the
  MIPS architecture defines.
* Main core: ALU results are bypassed from Ma and from Wb to the Ex operands,
  and from Ma to the branch comparator in Id. An instruction that uses the
  target of a load in Ex waits one cycle. A branch waits while its operand is
  still being computed in Ex or loaded in Ma.
* Accelerator: the same bypasses from Ma and Wb to Ex. An accelerator
  instruction that reads the register an `ELD` in Ex is loading waits one
  cycle (`ecc_hazard`). `mips_core` ORs this into `id_stall`, which holds If
  and Id of both pipelines and sends a bubble into both Ex stages.
* Data memory: the read address comes from Ex, and the data arrives in Ma
  (synchronous block RAM). Stores write in Ma. A load in Ex that reads the
  line a store in Ma is writing gets the new bytes (write-first), so memory
  ordering needs no interlock.
* Instruction memory: registered read; its output register is the If/Id
  instruction register, held while stalled.

## Using the top level

`ecc_soc` ports: `clk`, `rst_n` (asynchronous, active low), `io_in` (32 bits),
`io_out` (32 bits) with `io_out_valid`, and a program load port `prog_we`/`prog_addr`/`prog_wdata` (word addressed).
Load the program while `rst_n` is low. Execution starts at address 0.

* Addresses with bit 31 set are IO. Main-core loads there read `io_in`.
  Main-core stores there write the enabled bytes of the `io_out` register,
  and `io_out_valid` is high for the following cycle. Accelerator stores to
  IO addresses are dropped.
* Data memory: 16 KiB, so 256 lines of 512 bits at the defaults.
* Instruction memory: 4096 words.

| parameter | default | meaning |
|---|---|---|
| `W` | 294 | accelerator word size in bits |
| `M`, `A`, `B`, `C` | 283, 12, 7, 5 | f(x) = x^M + x^A + x^B + x^C + 1; B = C = 0 for a trinomial |
| `IMEM_WORDS` | 4096 | instruction memory words |
| `DMEM_BYTES` | 16384 | data memory bytes; line width derived from W |

To retarget the design, change `M`, `A`, `B`, `C` and pick `W`. The shift
constants, the register width and the memory line width all follow from these.
One build serves one polynomial. The C-library layer that wraps the
instructions for a compiler is not part of this RTL.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ecc_pkg.sv tb/tb_asm_pkg.sv tb/tb_ecc_soc.sv --top-module tb_ecc_soc
./obj_dir/Vtb_ecc_soc
```

Replace `tb_ecc_soc` with any other testbench name.

* `tb_ecc_soc`: the default build, end to end. It runs an IO read by the main
  core, a lane store, a word and a byte store to the IO output, and five random 565-bit reductions, each checked against
  a bit-serial reference. It also checks the exact cycle count (one per
  instruction plus one per load-use pair). It counts stalls, both accelerator
  bypasses, loads, stores, IO reads and writes, and taken branches, and checks that the
  shift selectors are used; each must occur.
* `tb_ecc_soc_random`: six random programs of about 500 instructions on the
  default build. They mix main-core ALU operations, byte/halfword/word loads
  and stores, and accelerator operations, loads and stores. The accelerator
  loads and stores take their addresses from a register written by the
  instruction just before. The test compares 48 memory lines against an
  instruction-level model of both register files.
* `tb_workloads`: the three polynomials at 13 word sizes. It checks that a
  word as wide as the field beats 32-bit words.
* `tb_mips_core`: a main-core program covering forwarding, load-use and branch
  stalls, delay slots, JAL/JR, and sub-word memory access. Then eight random
  programs of 300 dependent ALU, load and store instructions, checked against
  an instruction-level model.
* `tb_ecc_accel`: 3000 random accelerator instructions against an in-order
  reference model. It checks every `EST` value, that a stall happens exactly
  on load-use, and one instruction per cycle otherwise.
* `tb_speedup`: the software-against-accelerator comparison above, both
  results checked.
* One testbench per leaf block. `tb_ecc_alu` checks the 32-bit shift
  amounts 15/20/22/27 and 17/12/10/5 listed above.

## Where this RTL makes its own choices

The original paper gives the overall organisation: the MIPS main core, an
accelerator with the same pipeline attached at Id and Ma, 32 accelerator
registers with a zero register, an XOR-and-fixed-shift ALU, the memory width
formula, the alignment rule, one-cycle accelerator loads and stores, and
address computation in the main core. Everything else here is this design's
own:

* The instruction encoding of the accelerator and the shift-selector table
  order.
* The MIPS subset: no multiply/divide, no exceptions or interrupts, and
  ADD/SUB do not trap on overflow.
* Hazard handling: the bypass paths are read from the pipeline diagram; the
  stall rules are this design's.
* Memory sizes, the separate instruction memory and its load port, the IO
  address mapping, and write-first data memory.
* The zero-fill of the pad bits above `W` on `EST`.
* No instruction moves data between the general registers and the accelerator
  registers. The accelerator only loads, stores, XORs and shifts.

Maximum clock frequency and FPGA resource use depend on the target FPGA and its
tools, and were not reproduced. The published results report roughly
0.03 MHz lost per added bit of word size, and larger drops at 128 and 256 bits
where the lane multiplexers grow.
