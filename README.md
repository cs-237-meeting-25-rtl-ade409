# TEPID: a single-cycle, word-addressed ARM-style processor

TEPID is a small teaching instruction set. It has 32-bit words and is a load/store
RISC machine with a distinctly ARM flavour:

* Every instruction is **conditionally executed**. Its top three bits name a test on the
  condition codes N, Z, C, V. An instruction whose test fails does nothing.
* Condition codes change only when an instruction asks for it: bit 28, the `s` suffix.
  `cmp` and `tst` always update them.
* There are 16 registers. **r15 is the program counter.** Any instruction that writes
  r15, whether an `add`, a `mov` or an `ldr`, is a branch.
* Memory is addressed in **32-bit words** (word 1 follows word 0), with 24-bit addresses.
* The immediate operand is a **9-bit constant scaled by 2^exponent** instead of a plain
  14-bit number. The second operand can instead be a register shifted by a constant.

This repository has a complete TEPID computer in synthesizable SystemVerilog. It is
built in the manner of the textbook single-cycle MIPS datapath: every instruction
finishes in one clock cycle. The only exception is a software interrupt that has to
wait for console input.

## Block diagram

```
                 +-------------------------- tepid_top ---------------------------+
  load_* ------->|  (mux while rst)                                               |
                 |      |                                                         |
                 |  +---v---------+  fetch   +--------------------------------+   |
                 |  |  tepid_mem  |<-------->|          tepid_core            |   |
                 |  |  2^24 x 32  |  data    |  decoder -> cond -> regfile    |   |
                 |  |             |<-------->|  operand2(shifter) -> alu      |   |
                 |  +-------------+          |  PC, NZCV register             |   |
                 |                           +---------------+----------------+   |
                 |                              swi_req/ack  |   halt             |
                 |                           +---------------v----------------+   |
  in_valid/data->|                           |        tepid_swi_unit          |-->| out_valid/data
  in_ready <-----|                           |  #2 read, #4 write, #0 halt    |-->| halted
                 +----------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/tepid_pkg.sv` | Encodings, enums (`cond_e`, `opcode_e`, `alu_op_e`, `shift_op_e`), `flags_t`, decoded-control struct `ctl_t` |
| `rtl/tepid_decoder.sv` | Instruction word to `ctl_t` |
| `rtl/tepid_cond.sv` | Condition test against N, Z, C, V |
| `rtl/tepid_operand2.sv` | Second operand: scaled immediate, shifted register, or memory displacement |
| `rtl/tepid_shifter.sv` | lsl / lsr / asr / ror barrel shifter |
| `rtl/tepid_alu.sv` | add, sub, and, orr, mov, mvn with N, Z, C, V |
| `rtl/tepid_regfile.sv` | r0..r14, three read and two write ports; r15 reads as the PC |
| `rtl/tepid_mem.sv` | Unified word memory with a fetch port and a data port |
| `rtl/tepid_swi_unit.sv` | Console and halt services for `swi` |
| `rtl/tepid_core.sv` | Single-cycle datapath, PC and condition-code register |
| `rtl/tepid_top.sv` | The computer: core, memory, swi unit, program-load port |

## Instruction encoding

The architecture fixes several things: the condition field and the `s` bit, the
register count, the 24-bit word address, the exponent/constant immediate, the field
sizes of the shifted-register operand and the instruction list. The remaining
encoding is this implementation's own, and all of it lives in `tepid_pkg.sv`:

```
 31  29 28 27    23 22  19 18  15 14 13                          0
+------+--+--------+------+------+--+------------------------------+
| cond |s | opcode |  rd  |  rn  |m |           operand 2          |
+------+--+--------+------+------+--+------------------------------+
m=0, ALU ops       : [13:9] exponent e, [8:0] constant k   -> k << e   (unsigned)
m=0, ldr/str/adr   : [13:0] signed word displacement
m=1, any           : [10:6] shift amount, [5:4] shift op, [3:0] rm
b, bl              : [22:0] signed offset; target = address of branch + 1 + offset
swi                : [13:0] service number
```

| cond | name | executes when | | opcode | instr. | | opcode | instr. |
|---|---|---|---|---|---|---|---|---|
| 000 | al | always | | 00000 | add | | 01000 | b |
| 001 | nv | never | | 00001 | sub | | 01001 | bl |
| 010 | eq | Z = 1 | | 00010 | and | | 01111 | swi |
| 011 | ne | Z = 0 | | 00011 | orr | | 10000 | ldr |
| 100 | lt | N ≠ V | | 00100 | mov | | 10001 | str |
| 101 | le | Z = 1 or N ≠ V | | 00101 | mvn | | 10010 | adr |
| 110 | ge | N = V | | 00110 | cmp | | | |
| 111 | gt | Z = 0 and N = V | | 00111 | tst | | | |

Shift ops are `00` lsl, `01` lsr, `10` asr and `11` ror (rotate right). Memory opcodes
start with `10` in bits 27..26. Opcodes not listed in the table do nothing.

## How one instruction executes

All of this happens in one cycle (`tepid_core.sv`):

1. **Fetch.** `imem_addr = PC`. The memory reads combinationally.
2. **Decode.** `tepid_decoder` produces `ctl`. `mov` and `mvn` ignore `rn`. `cmp` and
   `tst` force `set_flags` and write no register. The `s` bit counts only on the six
   ALU instructions.
3. **Condition.** `tepid_cond` compares `ctl.cond` with the NZCV register.
   `exec = pass & ~halt`. A failed condition changes nothing except `PC <= PC+1`.
4. **Operands.** The register file reads `rn`, `rm` and `rd` (the store data, or r0
   for `swi`). **A read of r15 returns PC+1**, the address of the next instruction.
   `tepid_operand2` forms operand 2.
5. **ALU.** For `ldr`/`str`/`adr` the ALU adds base and operand 2 to form the word
   address. Only the low 24 bits of that sum address memory.
6. **Commit** on the clock edge:
   * The result goes to `rd`. For `ldr` it is the loaded word, for `adr` the address.
     **If `rd` is r15, the value instead becomes the next PC** (its low 24 bits), so
     `ldr pc,[sp,#-1]` is a return and `add pc,pc,#1` skips an instruction.
   * `str` writes `rd` to memory.
   * `b` and `bl` jump to PC+1+offset. `bl` also writes PC+1 to r14.
   * NZCV is loaded from the ALU if the instruction executed and `set_flags` is set.
7. **swi.** The core raises `swi_req` with the number and r0 and holds everything
   (PC included) until `swi_ack`. With `swi_wr`, r0 is loaded from `swi_rdata`.

### Condition codes

N is bit 31 of the result and Z means the result is zero. For `add` and `sub`, C is
the carry out of bit 31 and V is two's-complement overflow. Subtraction is computed
as `a + ~b + 1`, so after `cmp` **C = 1 means no borrow** (the ARM convention). `and`,
`orr`, `mov` and `mvn` clear C and V when they update the codes. The carry convention
and the C/V behaviour of the logical operations are this implementation's choices.
C is recorded but no condition reads it.

## Software interrupts and the console

`tepid_swi_unit` answers in the same cycle as the request:

| swi | service | timing |
|---|---|---|
| #2 | r0 ← next word of the input stream | waits (core stalls) until `in_valid`; `in_ready` pulses when taken |
| #4 | output stream ← r0 | `out_valid` pulses for one cycle, always accepted |
| #0 | halt | `halted` goes high at the next edge and stays high until reset |
| other | none | completes immediately |

`halted` drives the core's `halt` input, which freezes all state. These service numbers
match the architecture's example programs. The handshake is this implementation's own.

## Reset and program loading

`rst` is synchronous. While `rst` is high, the core is held and the memory's data
port is taken over by the `load_we`/`load_addr`/`load_data` port of `tepid_top`, one
word per clock. When `rst` falls, execution starts at word 0. At that point all
registers, including the stack pointer r13, and the condition codes are zero. Stack
code that begins with `sub sp,sp,#1` therefore pushes to word 2^24−1, the top of
memory. Memory has no reset.

## Timing and size

* CPI is 1. A `swi #2` adds one cycle for every cycle it waits for input.
* The critical path is combinational. It runs from the memory fetch, through decode,
  the register read, the shifter, the ALU and the data memory read, to the register
  write.
* The memory is `logic [31:0] mem [2**ADDR_W]` with asynchronous reads. That suits
  simulation and FPGA distributed RAM, not an SRAM macro. Moving to a synchronous RAM
  would mean adding a pipeline stage or a multi-cycle fetch.
* `ADDR_W` (default 24) sets the memory size and the PC width. It is the only
  parameter of the top.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_tepid_cond` | all 8 conditions × 16 flag values against the condition table |
| `tb_tepid_shifter` | all ops and amounts on corner values, plus 2000 random cases, against a bit-by-bit model |
| `tb_tepid_operand2` | scaled immediates, signed displacements, shifted registers, against integer arithmetic |
| `tb_tepid_alu` | corner and random operands; result and NZCV against 64-bit arithmetic |
| `tb_tepid_regfile` | random two-port writes and three-port reads, r15 behaviour, reset |
| `tb_tepid_mem` | random read/write against a model, at 2^12 words |
| `tb_tepid_decoder` | every opcode with random fields and conditions |
| `tb_tepid_swi_unit` | each service, the input stall, the sticky halt |
| `tb_tepid_core` | the feature program and the gcd program on a testbench memory; stored results, console output, and **exact cycle counts** (one per instruction plus stall cycles) |
| `tb_tepid_top` | the whole computer at full size (2^24 words): feature program plus gcd for 24 input pairs; output, halt and cycle count checked; counts that every mechanism happened |

`tb_tepid_top` counts these mechanisms: condition-failed instructions, NZCV updates,
`bl`, `ldr` into pc, ALU write to pc, swi stalls, loads, stores, `adr`, shifted-register
operands and scaled immediates. It fails if any of them never happened.

`tb/tepid_asm_pkg.sv` is a small assembler of functions returning instruction words.
It holds the two test programs:

* **gcd** reads a and b, computes gcd(a,b) by recursive subtraction with a memory
  stack, prints the result and halts. Its pop is `add sp,sp,#1 ; ldr pc,[sp,#-1]`:
  the link register was stored at the old top of stack, one word below the restored
  `sp`.
* **features** uses every instruction, both operand forms, all shifts, each class of
  condition, and r15 as a source and as a destination.

The expected values come from independent models: Euclid's remainder algorithm for
gcd, and a closed-form count of the instructions the gcd program executes.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/tepid_pkg.sv tb/tb_tepid_top.sv --top-module tb_tepid_top -o sim
./obj_dir/sim
```

The full-size `tb_tepid_top` runs in a few seconds.

## Where this implementation goes beyond the architecture description

The architecture description leaves these points open. The implementation fills
each one with the simplest choice:

* The numeric opcodes, the operand-2 mode bit and its field positions, the `b`/`bl`
  offset format and the `swi` format (see the encoding section).
* The memory instructions use a **signed 14-bit displacement**, rather than the scaled
  immediate, when bit 14 is clear. With bit 14 set they take a shifted register, like
  the ALU instructions.
* Reading r15 gives PC+1. Branch offsets are relative to PC+1.
* The second-operand form "shift by a register" is mentioned as a possible third
  option but not described, so it is not built. Only the scaled immediate and the
  register shifted by a constant exist.
* The register file has no r15 storage; the PC lives in the core.
* Program and data share one memory. Reset clears all registers. The console/halt
  interface and the program-load port are this implementation's own.
* The ALU offers exactly add, sub, and, orr, mov, mvn (and cmp/tst through sub/and).
  Other ARM operations (adc, eor, multiply) are not part of this instruction subset.
