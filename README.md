# Stored-program processors from one gate up

How few gates do you need to compute an arbitrary logic function? One. If you keep every
wire value of a circuit in a small memory, you can evaluate the circuit one gate at a time
on a single *programmable* gate. After each evaluation you write the result back to memory.
The list of "which gate, on which values, into which slot" is itself stored in a memory.
That gives a stored-program processor: to change the computation, change the memory contents.

This RTL builds that idea in two sizes:

* **`one_gate_proc`**: a processor whose only compute element is one two-input gate
  with a programmable truth table. Its data memory holds 1-bit values.
* **`word_proc`**: the same organisation with 8-bit words, an ALU in place of the
  gate, and a data-dependent branch so that programs can loop.

It also contains the small circuits the processors are built from, or that explain them:
a 2:1 mux, a programmable gate, a memory made of a decoder, registers and a read mux, and a
flip-flop made of two mux latches. `ese150_top` places all of them side by side.

## The one-gate processor

```
          +-----+    +------------------+
  +-----> | PC  |--->| instruction mem  |---- type | func | in0 | in1 | out
  | +1    +-----+    +------------------+
  |                         in0              in1
  |                  +-------------+  +-------------+
  |   writeback ---> | data mem L  |  | data mem R  |  <--- same write to both copies
  |   (out, value)   +-------------+  +-------------+
  |                         |a               |b
  |                     +----------------------+        inputs[0..7]
  |                     | gate: func(a, b)     |        input mux (sel = in0)
  |                     +----------------------+             |
  |                                 \____ mux: type==READ ___/
  |                                            |
  |                                          value ---> writeback (READ, GATE)
  |                                                 \--> output register [out] (WRITE)
```

Each clock cycle executes one whole instruction. The instruction memory is read at the PC.
Slot `in0` is read from one data-memory copy and slot `in1` from the other. The result is
committed at the clock edge, and the PC then moves to PC + 1. The memory is kept in two
copies, and every write goes to both of them. This gives two read ports for the price of a
duplicated 8-bit store.

### Instruction format (15 bits, `spp_pkg`)

| bits  | 14:13 | 12:9 | 8:6 | 5:3 | 2:0 |
|-------|-------|------|-----|-----|-----|
| field | type  | func | in0 | in1 | out |

| type      | effect |
|-----------|--------|
| 00 READ   | slot `out` ← external input `in0` |
| 01 GATE   | slot `out` ← func(slot `in0`, slot `in1`) |
| 11 or 10 WRITE | output register `out` ← func(slot `in0`, slot `in1`); no data-memory write |

`func` is the gate's truth table. Written left to right, its bits are the outputs for
(in1, in0) = 00, 01, 10, 11. The named codes are:
AND `0001`, OR `0111`, XOR `0110`, NONE `0000` (constant 0) and SEL0 `0101` (passes slot
`in0`). To send a slot to an output, use `WRITE SEL0 slot,0 → out`.

Both 10 and 11 decode as WRITE. The listed encoding names 11, while the reference program
image uses 10. Accepting both runs programs in either form, and costs nothing because the
one-gate processor has no fourth instruction type.

### Example program

The reference computation is `o1 = a&b | b&c | a&c` (majority) and `o2 = a^b^c`.
`preclass1_gates` builds it directly from gates. On the processor it takes 12 instructions:

```
00_0000_000_000_000  a  = input 0     -> slot 0
00_0000_001_000_001  b  = input 1     -> slot 1
00_0000_010_000_010  c  = input 2     -> slot 2
01_0001_000_001_011  t1 = a & b       -> slot 3
01_0001_001_010_100  t2 = b & c       -> slot 4
01_0111_011_100_011  t1 = t1 | t2
01_0001_000_010_100  t2 = a & c
01_0111_011_100_101  o1 = t1 | t2     -> slot 5
01_0110_000_001_011  t1 = a ^ b
01_0110_011_010_110  o2 = t1 ^ c      -> slot 6
11_0101_110_000_001  output 1 = o2
11_0101_101_000_000  output 0 = o1
```

After reset and `run` high, `out[1]` holds o2 after the 11th clock edge and `out[0]` holds o1
after the 12th. That is seven gate evaluations, at one per cycle, plus the I/O instructions.

## The word-wide processor

`word_proc` keeps the same datapath and instruction layout with these changes:

* Slots, inputs and outputs are `W` bits wide (default 8).
* The gate is replaced by `alu`.
* Type 10 becomes a branch.

| type       | effect |
|------------|--------|
| 00 READ    | slot `out` ← input `in0` |
| 01 ALU     | slot `out` ← ALU(func, slot `in0`, slot `in1`) |
| 10 BRANCH  | if bit 0 of slot `in0` is 1: PC ← PC + slot `in1` (two's complement); else PC + 1 |
| 11 WRITE   | output `out` ← ALU(func, slot `in0`, slot `in1`), e.g. `AND x,x` copies x |

ALU codes: ADD `0000`, SUB `0010`, INV `0001`, SLL `1110`, SLR `1100`, AND `1000`,
XOR `0110`, OR `0111`. Shifts move by one place with zero fill. Any other code gives 0.
Addition and subtraction wrap modulo 2^W. The branch target is computed relative to the
branch instruction's own address, modulo the PC range. With 16 instructions, an offset of
0xFE (−2) jumps back two instructions.

The branch tests only bit 0 of a slot, so a loop counter is most easily kept as a mask of
ones that is shifted right once per pass. The testbench multiplies x·n this way:

```
0  READ  s0 = in0 (x)          4  ADD   s4 = s4 + s0     <- loop
1  READ  s1 = in1 (2^n - 1)    5  SLR   s1 = s1 >> 1
2  READ  s3 = in3 (0xFE = -2)  6  BRANCH if s1[0]: pc += s3
3  SUB   s4 = s4 - s4 (0)      7  WRITE out0 = s4 & s4
```

The product appears after 4 + 3n + 1 cycles.

## Building blocks

| module | what it is |
|--------|------------|
| `mux2` | 2:1 multiplexer |
| `lut2` | programmable two-input gate: three `mux2` forming a tree over a 4-bit truth table |
| `prog_gate` | `lut2` whose truth table sits in four flip-flops, loaded with `cfg_we` |
| `write_decoder` | one-hot write enables, `w[k] = write & (wa == k)` |
| `reg_ram` | memory: `write_decoder` + registers + read mux; combinational read, write at the clock edge |
| `instr_mem` | instruction store with a write port for loading programs; combinational read |
| `pc_counter` | PC with its own +1 adder, an enable, and a load input for branches |
| `input_mux` | selects one of the 8 inputs |
| `output_load_ctrl` | 8 output registers; a decoder picks the one to load |
| `alu` | the word ALU above |
| `preclass1_gates` | the example function from fixed gates |
| `mux_dff` | rising-edge flip-flop from two mux latches; master transparent while clk is low, slave while it is high |
| `spp_pkg` | instruction struct, type and function codes, shared sizes |

`mux_dff` deliberately contains two latches. They are the subject of that circuit, so lint
reports latches for it. Nothing else in the design uses latches.

## Interface and timing (both processors)

* `rst_n` (asynchronous, active low) clears the PC, the data memory and the output
  registers. It does not clear the instruction memory.
* Programs are loaded with `prog_we`, `prog_addr` and `prog_data`, one word per clock edge.
* While `run` is high, one instruction executes per cycle. While it is low, everything
  holds. The PC wraps at the end of the 16-word instruction memory. There is no halt
  instruction, so lower `run` or fill the rest of memory with harmless instructions.
* Outputs are registered. They change at the clock edge that ends the WRITE instruction.

## Where this design makes its own choices

The lecture these circuits come from fixes the following: the one-gate organisation, the
15-bit instruction fields and their order, the gate codes, 8 slots, 8 inputs and 8 outputs,
the six ALU codes, the branch rule "if SRC1[0] = 1 go to PC + SRC2", and one instruction per
step. Everything below is this design's own choice:

* Register-based memories instead of latches. This lets a slot be read and written in the
  same cycle safely.
* The 16-word instruction memory (4-bit PC), the `run` input and the program-load port.
* Reset to 0.
* Accepting both WRITE codes in the one-gate processor.
* Truth-table bit order. The codes fix it only up to symmetry; SEL0 selecting `in0` decides it.
* The word processor's instruction layout. It reuses the one-gate fields, with BRANCH = 10.
  Only its ALU codes and branch rule come from the lecture.
* The XOR and OR ALU codes, one-place shifts, and 0 for unused ALU codes.
* The 8-bit default word. The lecture's ALU examples are 8-bit. Set `W` to 16 or 32 for its
  wider-word examples.

Not built: a transistor/capacitor DRAM cell (its logic function is that of `reg_ram`), and
the commercial processors (ARM7, AVR) that the lecture uses as comparisons.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv` that ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert rtl/spp_pkg.sv -y rtl \
          tb/tb_one_gate_proc.sv --top-module tb_one_gate_proc -Mdir obj
obj/Vtb_one_gate_proc
```

* `tb_one_gate_proc` runs the example program for all eight input values, with both WRITE
  codes and exact cycle counts. It then compares 40 random programs, cycle by cycle,
  against an instruction-level model.
* `tb_word_proc` runs the multiply loop for n = 1…8, with cycle counts, and 60 random
  programs with branches against a model.
* `tb_word_sizes` runs `word_proc` with 16- and 32-bit words. It checks a 16-bit add, a
  32-bit XOR and a 16-bit shift-and-add multiply that takes 104 cycles.
* `tb_ese150_top` runs everything in the top at default parameters. It compares the
  one-gate processor with the fixed-gate circuit and checks every ALU operation on the
  8-bit examples (0x18, 0x14 → ADD 0x2C, SUB 0x04, INV 0xE7, SLR 0x0C, XOR 0x0C). It also
  counts each mechanism: READ, GATE and both WRITE codes, each gate function, branch taken
  and not taken, all ALU operations, gate reprogramming and flip-flop capture. It fails if
  any of them never happened.

The testbenches use only two-state values and initialise everything they read.
