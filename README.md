# Variable-length VLIW DSP core with SIMD datapath

A programmable DSP core for wireless baseband work (the target kernels are
adaptive filtering, motion estimation and Viterbi decoding). It combines
three ideas:

* **Variable-length VLIW.** A program is a stream of 16-bit parcels. Each
  cycle the core issues one *packet*: between one and six instructions,
  each one or two parcels long, one per functional slot. Code that uses
  only one unit in a cycle pays for one parcel, not for a full-width
  instruction word.
* **Memory-to-memory SIMD through address registers.** The SIMD ALU
  instructions do not name data registers. They name *address registers*,
  read two 64-bit vectors (four 16-bit lanes) from data memory, and write
  the result vector back to memory, all in one cycle. The address
  generation unit moves the pointers in the same packet.
* **Splittable registers.** The multiply-accumulate side has eight 80-bit
  registers, each usable as two 40-bit accumulators or as four 16-bit
  registers, fed by two MAC units that can work in the same cycle.

The block structure (instruction queue, program memory, program sequencing
block, data generation block, computation block with ALU, two MACs,
permutation/rounding unit and splittable register file, data memory) and
the instruction set follow the published description of the core. That
description gives no bit encoding, no pipeline and few sizes; those parts
are this implementation's own and are marked as such below and in the
header comment of each file.

## Blocks

```
             +------------------+        +----------+
             | instr_queue      |<-------| prog_mem |
             | align, predecode |        +----------+
             +--+-----+-----+---+
   scalar slot  |     | AGU | ALU, MAC0, MAC1 slots      user slot -> ports
        +-------v-+ +-v---+ +-v--------------------------------+
        | psb     | | dgb | | comp_block                       |
        | PC, r0- | | a0- | |  simd_alu  mac_unit x2           |
        | r15,    | | a7  | |  perm_round_unit  split_regfile  |
        | HI/LO   | +--+--+ +--+--------------------------+----+
        +----+----+    | addresses  | 2 vector reads      | vector write
             |         +------------v---------------------v----+
             +--------------------->        data_mem           |
               scalar port          +--------------------------+
```

| Module | Role |
|---|---|
| `dsp_pkg` | opcodes, encoding, `instr_t`, slot and register-write types |
| `prog_mem` | program memory, 4096 parcels, reads a 12-parcel window at the PC |
| `instr_queue` | finds the packet at the PC, sorts its instructions into slots |
| `psb` | program sequencing: PC, branches, scalar registers, scalar ALU, multiplier, scalar load/store, run control |
| `dgb` | data generation: address registers a0..a7, `adda`, `addia`, `mova` |
| `comp_block` | local decoder of the ALU and MAC slots and their datapath |
| `simd_alu` | 80-bit ALU: four 20-bit lanes |
| `mac_unit` | 16x16 multiply, 40-bit accumulate (two instances) |
| `perm_round_unit` | lane permutation; accumulator saturation and rounding |
| `split_regfile` | c0..c7, 80 bits each, split into halves or lanes |
| `data_mem` | 64 KiB data memory with two vector read ports, a vector write port, a scalar port and a host port |
| `dsp_core` | top level |

## Packets and parcels

Every instruction starts with a header parcel; a long instruction adds one
extension parcel.

```
header     15  14  13......8  7....4  3....0
           E   X   opcode     A       B
extension  16-bit immediate or branch target
           or [3:0] = C (third register)
           or {0, C1[4:0], C2[4:0], C3[4:0]} for accumulator operands
```

* `E` = 1 marks the last instruction of the packet.
* `X` = 1 says an extension parcel follows. The instruction queue uses only
  `E` and `X` to find the packet's length, so it can step over extension
  parcels without decoding them.
* Accumulator operands are 5-bit specifiers `{register[2:0], sel[1:0]}`.
  For a 40-bit operand `sel[0]` picks the half (0 = low `cN.L`, 1 = high
  `cN.H`); for a 16-bit operand `sel` picks the lane 0..3.

Operand order follows the assembly notation of the core: sources first,
destination last. `add r1 r2 r3` writes r3; `addi r1 r2 -16` writes r2.

The instruction queue puts each instruction into a slot by its opcode:

| Slot | Opcodes | Instructions |
|---|---|---|
| scalar | 0x00-0x1A | nop end jump jal jr beq bne lb lh lw sb sh sw add sub addi mult mfhi mflo and or xor sll srl sra slt slti |
| AGU | 0x20-0x22 | adda addia mova |
| ALU | 0x28-0x34 | absv addv subv maxv minv andv orv xorv l32v l16v sr32v sr16v perm |
| MAC0, MAC1 | 0x36-0x37 | macv macuv (the first MAC instruction of a packet goes to MAC0, a second to MAC1) |
| user | 0x38-0x3F | reserved for user-defined instructions; brought out on `user_valid`/`user_instr` |

Short (one-parcel) forms: nop, end, jr, mult, mfhi, mflo, absv. All others
use an extension parcel. A packet with two instructions for one slot, a
third MAC instruction, an unassigned opcode (0x1B-0x1F, 0x23-0x27, 0x35)
or no `E` bit within six instructions is illegal: the core stops with
`halted` and `error` set.

`tb/dsp_asm_pkg.sv` contains a small assembler class that builds parcel
streams; the testbenches show its use.

## Timing: one packet per cycle

There is no pipeline. In one clock cycle the core reads the parcel window
at the PC, aligns the packet, reads the registers and data memory
(combinationally), computes, and at the rising edge writes registers,
memory and the new PC. Consequences:

* Every instruction of a packet sees the state from before the packet.
  `subv a0 a1 a2` together with `addia a0 a0 8` uses the old a0.
* The next packet sees all results; there are no hazards and no delay
  slots.
* A taken branch costs nothing. A three-packet loop takes three cycles
  per iteration.

This is what makes the cycle counts of the target kernels come out exactly
(see below), but it puts program memory, alignment, data memory read, ALU
or MAC, and write-back in one combinational path. The description's
target of 200 MHz in a 0.18 um process would need a pipelined version
with forwarding; that is not built.

## The computation block

**SIMD ALU instructions** (fields name address registers):

| Instruction | Effect, on four 16-bit lanes |
|---|---|
| `absv aA aB` | mem[aB] = abs(mem[aA]) |
| `addv/subv/maxv/minv/andv/orv/xorv aA aB aC` | mem[aC] = mem[aA] op mem[aB] |
| `perm aA pattern` | mem[aA] lane i = old lane pattern[2i+1:2i] |

Lanes are sign-extended into 20-bit lanes of the 80-bit ALU; the stored
result is the low 16 bits, so add and sub wrap around. max and min compare
signed values. A two-operand form such as `minv a2 a3` (keep the
smaller of two vectors in place) is written with the destination equal to
the second source, `minv a2 a3 a3`.

**Accumulator transfers** (through the permutation/rounding unit):

| Instruction | Effect |
|---|---|
| `l32v aA cN.h` | 40-bit half = sign-extended 32-bit mem[aA] |
| `l16v aA cN.k` | lane k = 16-bit mem[aA] (sign-extended to 20 bits) |
| `sr32v aA cN.h` | 32-bit mem[aA] = half saturated to 32 bits |
| `sr16v aA cN.h` | 16-bit mem[aA] = half rounded to nearest at bit 14, shifted right by 15, saturated to 16 bits |

The 15-bit shift makes `sr16v` return a Q15 result from a sum of Q15 x Q15
products; it is the parameter `RND_SHIFT`.

**MAC instructions**: `macv C1 C2 C3` (signed) and `macuv C1 C2 C3`
(unsigned) compute `C3 += C1 * C2` where C1 and C2 are 16-bit lanes and
C3 is a 40-bit half; the sum wraps modulo 2^40. With two MAC instructions
in one packet both MACs work; they may update the two halves of the same
register.

**Register layout.** Register cN is 80 bits: half L = bits 39:0, half H =
bits 79:40, lane k = bits 20k+19:20k. Lanes 0 and 1 are inside L, lanes 2
and 3 inside H. The 16-bit value of lane 0 is the low 16 bits of L, so a
value loaded with `l32v` into L can be used directly as a 16-bit MAC
operand (lane 0) while it is small enough. Three write ports (ALU-slot
loads, MAC0, MAC1) are merged; writes to the same bits in one cycle are
reported by an assertion.

## Addresses and data memory

Data addresses are 16-bit byte addresses, little-endian. The memory holds
32768 halfwords. Vector accesses read or write four consecutive halfwords
at any even address, so pointers may step by 2, 4 or 8 bytes. Scalar loads
and stores access bytes, halfwords or words (word accesses need an even
address). Ports per cycle: two vector reads, one vector write with lane
enables, one scalar read/write, one host read/write. If writes collide the
host port wins over the scalar port, which wins over the vector port.

## Program sequencing

Scalar registers r0..r15 are 32 bits; r0 reads as zero. `mult` writes the
64-bit signed product to HI/LO. Branch and jump targets are absolute parcel
addresses; `jal` writes the address of the next packet to r15 and `jr`
jumps to a register. A `start` pulse sets PC = 0 and starts issue; `end`
stops it after its packet and raises `halted`.

## Measured kernels

Three testbenches run complete kernel programs on the core at its default
sizes and check both the results and the cycle counts:

| Kernel | Program | Cycles |
|---|---|---|
| Mean absolute error, 64 pixels (`tb_dsp_core`) | loop of 3 packets: `subv`; `absv` + pointer step; `addv` into four lane sums + pointer step + `bne` | 48 for the loop: 0.75 cycles per pixel |
| Viterbi add-compare-select (`tb_viterbi_listing`) | 16-packet loop body, every packet with a SIMD `addv`/`subv`/`minv`, AGU pointer steps, and scalar loads, negation and halfword stores that build the next branch-metric vectors | one ALU operation per cycle, 16 cycles per body |
| Delayed LMS, 8 taps, 6 samples (`tb_dlms_program`) | per tap: `macv` y += x*w with `l16v` of the next x; `macv` w += x*err with `l32v` of the next w; `sr32v` of w. Per sample: store y, scalar error e = d - y, scale by a shift, store it | 3 cycles per tap, 5 + 3T + 10 per sample |

`tb_viterbi_listing` and `tb_dlms_program` compare against models written
in the testbench (an instruction-level model and an integer LMS model).

## How far it can be trusted, and what differs

Follows the core's description: the block partition, 16-bit basic
instructions grouped into variable-length packets, the instruction list,
80-bit registers split into 40-bit accumulators or 16-bit registers, two
40/16-bit MACs, an 80-bit SIMD ALU operating on memory data through
address registers, and the cycle counts of the three kernels.

This implementation's own choices: the whole encoding, register counts
(16 scalar, 8 address, 8 accumulator), 16-bit addresses, memory sizes,
single-cycle issue, the operand forms of `sra`/`slti` (shift amount and
immediate in the extension parcel), the lane layout in the 80-bit
registers, wrap-around arithmetic, the rounding position and saturation,
the permutation pattern encoding, the write-port priorities and the run
and load ports.

Not built: the "power-aware" instructions and configurable hardware
accelerators that the description names without defining (the
user-defined slot is brought out to ports instead), and any pipelining
for speed. No power, area or clock-rate figures are claimed.

## Simulating

All files are SystemVerilog-2017 and need no other sources. With
Verilator 5 (run from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/dsp_pkg.sv tb/dsp_asm_pkg.sv tb/tb_dsp_core.sv \
  --top-module tb_dsp_core -o sim
./obj_dir/sim
```

(`-Wno-fatal` keeps width warnings of the testbenches from stopping the
build.) Every testbench prints `TB_RESULT checks=N failures=M` and stops by
itself, with a watchdog. Unit testbenches exist for every module
(`tb/tb_<module>.sv`); `tb_dsp_core` is the end-to-end test, with the core
at its default parameters. It also counts how often each mechanism
happened (taken branches, dual-MAC packets, wide packets, long
instructions, saturation, user slot, SIMD ops, permutation, illegal
packet, halt) and fails if one never did.

To write a program, create a `dsp_asm_pkg::Asm` object, call `s()` for
short and `l()`, `r3()`, `cr()` for long instructions, `endp()` after each
packet, and load `code[]` through `pm_we`/`pm_waddr`/`pm_wdata`.
