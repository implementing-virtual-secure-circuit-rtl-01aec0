# A balanced processor for virtual secure circuits

Power-analysis attacks recover a secret key by correlating a device's
supply current with intermediate values of the cipher. Dual-rail
pre-charge (DRP) logic defeats this in hardware: every signal travels
on two wires, one carrying the value and one its complement. Both wires
are reset to 0 before each evaluation. Each evaluation therefore switches
exactly one wire of every pair, whatever the data.

This repository contains synthesizable SystemVerilog for a small 32-bit
processor that brings the same discipline to software. Two instructions
are added, **balanced AND** (`b_and`) and **balanced OR** (`b_or`). With
them, a program can keep every secret value as a direct/complement pair
inside one register. Every logic gate then costs two instructions: a
pre-charge, then an evaluation. Such a program is called a *virtual
secure circuit* (VSC). It behaves like a DRP circuit that has been
sequentialised through the register file. Apart from the two new
operations in the ALU, the processor is an ordinary load/store machine,
with its encoding taken from SPARC V8.

The idea and the two instructions come from the published VSC approach.
There, a Leon3 SPARC core on an FPGA was modified by giving the
`ANDN`/`ORN` opcodes the balanced functions. The core here is a new,
deliberately simple single-cycle implementation of that idea, not the
Leon3. The section "What is this design's own" lists every point where it
goes beyond what the approach specifies.

## Balanced words

Each 32-bit register or memory word holds a 16-bit value `v` and its
complement. The two are interleaved bit by bit:

```
word bit   31    30    29    28   ...    3     2     1     0
holds     v[15] ~v[15] v[14] ~v[14] ... v[1] ~v[1]  v[0] ~v[0]
```

So odd bits are *direct* and even bits are *complementary*
(`vsc_pkg::DIRECT_MASK = 32'hAAAA_AAAA`). A balanced word always has
exactly 16 ones. Placing each pair in adjacent bits keeps the two halves
of every gate physically close. The testbench package `vsc_asm_pkg`
provides `bal(v)`, `direct_of(w)` and `comp_of(w)` to convert between the
two forms.

Data can enter the machine already balanced, with the host writing
`bal(plaintext)` into data memory. Alternatively, the program builds the
balanced form itself with ordinary instructions. It spreads the 16 bits
to the even positions, giving `x`, and then forms
`(x << 1) | (x ^ 0x55555555)`. This step handles the plain value
unprotected, as any conversion at the boundary must.

## The two balanced instructions

By De Morgan's law, the complement of `a AND b` is `~a OR ~b`. A gate
that consumes and produces balanced words must therefore use AND on the
direct bits and OR on the complementary bits:

| instruction | direct bits (odd) | complementary bits (even) | opcode used |
|-------------|-------------------|---------------------------|-------------|
| `b_and rs1, rs2, rd` | `a & b` | `a \| b` | op=10, op3=0x05 (SPARC ANDN) |
| `b_or  rs1, rs2, rd` | `a \| b` | `a & b` | op=10, op3=0x06 (SPARC ORN) |

Several other instructions need no balanced version:

- **NOT** (`xnor rs1, %r0, rd`) maps a balanced word onto a balanced word,
  because inverting both halves swaps their roles.
- **Moves, loads and stores** leave values unchanged, so they are shared
  between regular and balanced code.
- **Shifts** are shared too, but only a shift by an even amount keeps
  pairs together. Bits shifted in at the edge form a `(0,0)` pair, which
  is not balanced.

XOR and XNOR are not usable in balanced code. Their evaluation is not
monotone: pre-charging the operands to zero does not force the output to
a fixed value. A balanced XOR is therefore built from NOT, `b_and` and
`b_or`:
`x ^ y = (~x & y) | (x & ~y)`.

Arithmetic (ADD/SUB) and branches have no balanced forms. Balanced code
uses them only for public values such as addresses and loop counters. For
the same reason, the balanced instructions have no condition-code-setting
variants.

## Pre-charge and evaluation

With both operands zero, `b_and` and `b_or` give all zeros, and NOT gives
all ones. Both are valid "pre-charged" states, so no extra hardware or
opcode is needed. `%r0` always reads zero, so each gate is written as a
pair of instructions:

```
b_and %r0, %r0, %r3     ; pre-charge: r3 <- 0, ALU inputs 0
b_and %r6, %r2, %r3     ; evaluate:   r3 <- balanced result
```

During the evaluation, each of the 16 pairs in the destination goes from
`(0,0)` to `(1,0)` or `(0,1)`. The Hamming weight of the result (16) and
its Hamming distance from the pre-charged value (16) are therefore
independent of the data. The end-to-end testbenches check exactly this
property on every evaluation they run.

Memory traffic can be pre-charged in the same way:

- **Load:** first load a word that is known to be zero into the
  destination register, then load the real word.
- **Store:** first store `%r0` to the target word, then store the value.

For example, a balanced XOR of `r1` and `r2` into `r1`:

```
xnor  %r0,%r0,%r6 ; xnor %r1,%r0,%r6      ! r6 = ~r1
xnor  %r0,%r0,%r7 ; xnor %r2,%r0,%r7      ! r7 = ~r2
b_and %r0,%r0,%r3 ; b_and %r6,%r2,%r3     ! r3 = ~r1 & r2
b_and %r0,%r0,%r4 ; b_and %r7,%r1,%r4     ! r4 = ~r2 & r1
b_or  %r0,%r0,%r1 ; b_or  %r3,%r4,%r1     ! r1 = r3 | r4
```

### Bitslicing

Balanced code is easiest to write in bitsliced form. Bit `k` of 16
independent instances of the computation is stored in one 16-bit plane.
Each gate of the algorithm's circuit then becomes one pre-charge and one
evaluation, acting on all 16 instances at once. Balanced AES, for
example, holds the 16 state bytes of one block as eight planes (plane
`k` = bit `k` of every byte). The direct half of each word carries the
block, and the complementary half carries its complement.

## The processor

```
            +----------------------- balanced_core -----------------------+
 imem  ---> | decode -> regfile -> operand mux -> balanced_alu -> result  | ---> regfile
 (fetch)    |                       (rs2/simm13/    |  (balanced_logic_unit) |
            |                        sethi)         v                      |
            |                                mem_interface  <-> dmem       |
            +--------------------------------------------------------------+
```

`vsc_top` combines `balanced_core`, `imem` (64 Ki words by default, load
port for the host) and `dmem` (4 Ki words, with a second port for the
host).

### Instructions (SPARC V8 encoding)

| format | instructions |
|--------|--------------|
| op=10 | `ADD SUB AND OR XOR XNOR SLL SRL SRA`; `b_and` (0x05), `b_or` (0x06); `ADDcc SUBcc ANDcc ORcc XORcc`. Operand 2 is `rs2` or the sign-extended `simm13`. |
| op=11 | `LD`, `LDUB` with a register or immediate offset; `ST`, `STB` with an immediate offset only. |
| op=00 | `SETHI`; `Bicc` with all 16 conditions, the delay slot and the annul bit; `UNIMP` (all-zero word) halts the core. |

Any other word halts the core and sets `illegal`. Memory is big-endian.
Word accesses ignore address bits [1:0].

### Timing and control

- **One instruction per cycle.** Both memories are read combinationally
  and the register file is written on the clock edge.
- **Start and halt.** After reset the core is idle. A one-cycle `start`
  pulse begins execution at address 0. When the core fetches `UNIMP`, it
  stops with `halted` high, one cycle after its last instruction. A
  straight-line program of N instructions keeps `busy` high for N+1
  cycles. Another `start` pulse runs the program again.
- **Branches.** As in SPARC, the core keeps a PC and a next-PC, and the
  instruction after a branch (the delay slot) also executes. With the
  annul bit set, the slot is skipped when the branch is not taken, and
  always for `BA`/`BN`. A skipped slot still takes one cycle.
- **Trace.** The `retire` output (`vsc_pkg::retire_t`) reports every
  executed instruction: its PC, its encoding and its register write. The
  testbenches check the balance property on this trace.
- **Host access.** The host can read and write data memory at any time.
  This allows a polling protocol: the host posts a request in a mailbox
  word, and the core serves it in a loop without halting.

## Files

| file | contents |
|------|----------|
| `rtl/vsc_pkg.sv` | word layout, opcodes, enums for ALU/logic ops and branch conditions, `icc_t`, `retire_t` |
| `rtl/balanced_logic_unit.sv` | AND/OR/XOR/XNOR and the two balanced operations |
| `rtl/balanced_alu.sv` | logic unit, adder/subtractor, shifter, condition codes |
| `rtl/regfile.sv` | 32 x 32 registers, 2 read ports, 1 write port, `%r0` = 0 |
| `rtl/mem_interface.sv` | load/store byte lanes and strobes |
| `rtl/balanced_core.sv` | decode, PC/next-PC, condition codes, datapath |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories |
| `rtl/vsc_top.sv` | the system |
| `tb/vsc_asm_pkg.sv` | instruction encoders and balanced-word helpers |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_vsc_subbytes.sv` | balanced AES AddRoundKey + SubBytes on the full-size system, and its no-pre-charge and direct-only variants |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vsc_pkg.sv tb/vsc_asm_pkg.sv tb/tb_vsc_top.sv --top-module tb_vsc_top
./obj_dir/Vtb_vsc_top
```

Replace `tb_vsc_top` with any other testbench name. Each one runs within
seconds.

- **`tb_balanced_logic_unit`, `tb_balanced_alu`:** random operands
  against references written bit by bit, including balanced inputs,
  pre-charge and condition codes.
- **`tb_regfile`, `tb_mem_interface`, `tb_imem`, `tb_dmem`:** shadow
  models of the storage blocks.
- **`tb_balanced_core`:** random programs covering every instruction and
  random forward branches of all conditions, with and without annul. The
  test also includes a counted loop. An instruction-level reference model
  in the testbench follows the same control flow. The test compares every
  register write, the final data memory and the cycle count.
- **`tb_vsc_top`:** runs at the default sizes. It covers:
  - a regular XOR and the same XOR as a balanced program;
  - a bitsliced balanced AND of two arrays of 3-bit elements;
  - random balanced netlists of up to 3000 gates;
  - a mailbox service loop.

  It checks results, cycle counts and the balance of every evaluation. It
  also counts each mechanism (pre-charges, `b_and`, `b_or`, NOT, moves,
  branches, annulled slots, restarts) and fails any that never occurred.
- **`tb_vsc_subbytes`:** compiles AddRoundKey and SubBytes for 16 AES
  bytes into balanced code, entirely with pre-charged loads, stores and
  gates. The S-box is computed as inversion in GF(2^8) (x^254, 11
  multiplications, reduction by x^8+x^4+x^3+x+1), followed by the affine
  map. The host supplies the plaintext as raw 16-bit planes. A
  151-instruction prologue of ordinary instructions balances them:
  - it spreads the bits to even positions with shift/or/and steps, using
    masks built by `sethi`/`or`;
  - it then forms `(x << 1) | (x ^ 0x55555555)`.

  The balanced part has 20,216 instructions and uses 333 data words. A
  whole run takes 20,368 cycles per 16 bytes. The result is compared with
  an S-box computed by searching for the inverse.

  The same netlist is also built in two weakened forms: without any
  pre-charge instruction (10,108 instructions), and on the direct half
  only, using the ordinary `and`/`xor` (13,128 instructions). All three
  are run on random inputs under a simple power model: the Hamming
  distance of the register or memory word each instruction changes.
  - Full balanced program: this count is identical for every input at
    every one of its instructions (prologue excluded).
  - No-pre-charge build: 9,303 instructions depend on the data.
  - Direct-only build: 12,620 instructions depend on the data.

  This reproduces in simulation why both ingredients are needed. It is a
  logical-level model only: it says nothing about the electrical
  imbalance a real chip has.

## What is this design's own

These follow the published approach:

- the interleaved direct/complement word;
- the definitions of `b_and` and `b_or`, and their use of the ANDN/ORN
  opcodes;
- pre-charge by operands of zero;
- the sharing of NOT, shifts and data movement;
- a 32-bit datapath with 16-bit halves;
- the three datapaths (computation, load, store).

These are choices made here:

- **Bit order.** Odd bits are direct and even bits complementary. The
  published figures only show that the two alternate.
- **Core.** A single-cycle core instead of the Leon3 pipeline. There are
  no register windows, caches, traps, `CALL` or `JMPL`. Stores take only
  an immediate offset, because the register file has two read ports.
- **Start/halt.** The `UNIMP`-halts / `start`-restarts convention, and
  the host ports, which stand in for the prototype's serial link and
  external memory.
- **Memory sizes.** 256 KiB of instruction memory holds the 150 kB
  balanced AES program reported for the prototype. 16 KiB of data memory
  is an arbitrary choice.
- **Reset.** Reset clears the registers and the condition codes. The
  memories are not reset.

## Limits

- **No physical balance guarantee.** The RTL makes the balance property
  hold at the level of logical values. Whether power is actually
  data-independent depends on the layout: the direct and complementary
  bits of a pair should see identical loads, and all toggling must happen
  in well-defined pre-charge and evaluate steps. Glitches in the ALU's
  operand multiplexers and early-propagation effects are not addressed.
  On the published FPGA prototype, without any special layout, balanced
  AES needed about 20 times more power measurements to break than the
  unprotected version. A dedicated DRP chip achieved a factor of about
  100.
- **Unprotected instructions.** Arithmetic and branches leak whatever
  they process, so balanced code must keep secrets out of them.
- **Performance.** Throughput and code size are those of the software.
  The reported balanced AES was about 6.5 times slower and 3.3 times
  larger than the unprotected bitsliced version.
