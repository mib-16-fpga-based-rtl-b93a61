# MIB-16: a small 16-bit teaching processor

MIB-16 is a deliberately simple 16-bit processor meant for teaching and as a
drop-in control core on an FPGA. Everything is a 16-bit word: the data bus,
the word address bus, the sixteen general purpose registers R0–R15, the
program counter and every instruction word. There are sixteen instructions,
one per 4-bit opcode: add, subtract, multiply and divide, each with a register
and a small-immediate ("quick") form; four logic operations; and load and
store, each with a 16-bit or a small displacement. A 3-bit condition code
register (V, N, Z) records the outcome of every arithmetic and logic
operation. There are no jumps or branches: a program runs straight through
memory.

The processor is multi-cycle. One internal result bus carries every value
that is stored anywhere: the ALU result, or the word arriving from memory.
A control state machine sequences fetch, decode, execute, memory access and
write-back over it, one step per clock.

This repository holds synthesizable SystemVerilog for the processor, its
external memory and a top level that joins them. It also has self-checking
testbenches for every block.

## Instruction words

Every instruction word has four 4-bit fields:

```
 15    12 11     8 7      4 3      0
+--------+--------+--------+--------+
| opcode |   r3   |   r1   | r2/i8  |
+--------+--------+--------+--------+
```

`r3` is the destination register, or for a store the register whose value
is written to memory. `r1` is the first source, or for loads and stores the
index register. `r2/i8` is the second source register or a 4-bit two's
complement immediate, sign-extended to 16 bits (range −8…+7). The field is
called *i8* in the instruction set's naming, but it is four bits wide.

| opcode | mnemonic | operation               | opcode | mnemonic | operation               |
|--------|----------|-------------------------|--------|----------|-------------------------|
| 0000   | Add      | r3 ← r1 + r2            | 1000   | Land     | r3 ← r1 & r2            |
| 0001   | Sub      | r3 ← r1 − r2            | 1001   | Lor      | r3 ← r1 \| r2           |
| 0010   | Mul      | r3 ← r1 × r2            | 1010   | Lxor     | r3 ← r1 ^ r2            |
| 0011   | Div      | r3 ← r1 / r2            | 1011   | Lmask    | r3 ← r1 & ~r2           |
| 0100   | Addq     | r3 ← r1 + i8            | 1100   | Ld       | r3 ← M[r1 + disp16]     |
| 0101   | Subq     | r3 ← r1 − i8            | 1101   | St       | M[r1 + disp16] ← r3     |
| 0110   | Mulq     | r3 ← r1 × i8            | 1110   | Ldq      | r3 ← M[r1 + i8]         |
| 0111   | Divq     | r3 ← r1 / i8            | 1111   | Stq      | M[r1 + i8] ← r3         |

`Ld` and `St` take two words. The `r2/i8` field of the first word is
ignored, and the next word holds the 16-bit displacement. Address arithmetic
wraps modulo 2^16.

Example: `0000 1000 0001 0010` (0x0812) is `Add R8, R1, R2`.

### Arithmetic details

All arithmetic is two's complement. The flags are written by the twelve
arithmetic and logic instructions only; loads and stores leave them alone.

* **Z**: the result is zero. **N**: bit 15 of the result is set.
* **V**, add/subtract: signed overflow.
* **V**, multiply: the signed product does not fit in 16 bits. The result
  is always the low 16 bits of the product.
* **Divide** is signed and truncates toward zero; the remainder is
  discarded. Dividing by zero gives 0 with V set. −32768 / −1 gives −32768
  with V set.
* Logic operations clear V.

The original design only handled products that fit in 16 bits and
divisions with no remainder. The V rules for multiply and divide, and the
truncating division, are this implementation's choices.

## Datapath

```
            +-------------- Op1_bus ----------------+
   PC ------+                                       |
   regs.Q1 -+                                    +--v--+
                                                 |     |
   regs.Q2 -------+                              | ALU |--> alu_cc --> CC (V N Z)
   sext(i8) ------+--- Op2_bus ----------------->|     |
   Disp ----------+                              +--+--+
                                                    |
   D_IN --------------------------------------+     |
                                              v     v
                                             R_bus (mux)
          +-----------+-----------+-----------+-----------+
          v           v           v           v           v
         IR        Address      Disp       Result      Data-out
      (op r3 r1 r2)  -> A_BUS              -> regs.D3   -> D_OUT
```

* **Register file** (`mib16_regfile`): read port 1 (address r1) drives
  Op1_bus. Read port 2 drives Op2_bus; its address is r2, or r3 for a
  store. Write port 3 writes the result register into r3.
* **ALU** (`mib16_alu`): combines Op1_bus and Op2_bus. Besides the
  instruction operations it has *pass1* and *pass2*, which route one operand
  unchanged onto R_bus, and *disable*, which drives zero.
* **Program counter** (`mib16_pc`): reaches the address register through
  the ALU (pass1). Its own incrementer steps it after each instruction word
  and each displacement word.
* **Holding registers** (`mib16_latch_reg`), all loaded from R_bus:
  * Address: drives A_BUS.
  * Disp: the 16-bit displacement of Ld/St.
  * Result: waits one cycle before write-back.
  * Data-out: drives D_OUT during a store.
* **Instruction register** (`mib16_ir`): holds the word and exposes its
  fields plus the sign-extended immediate.

The original drew these buses as shared lines with tri-state buffers. Here
each bus is a multiplexer, so nothing on chip is tri-stated.

## Instruction sequence and timing

The control unit (`mib16_control`) steps through these states:

| state | what happens |
|-------|--------------|
| FA  | PC → ALU pass1 → address register |
| IF  | read with FETCH=1; on READY: word → IR, PC + 1 |
| DEC | choose the path by opcode |
| DA  | PC → address register (Ld/St only) |
| DF  | read the displacement with FETCH=1; on READY: word → Disp, PC + 1 |
| EA  | r1 + Disp (Ld/St) or r1 + sext(i8) (Ldq/Stq) → address register |
| SD  | r3 → ALU pass2 → data-out register (stores only) |
| MEM | read or write with FETCH=0; on READY a load's word → result register |
| EX  | ALU operation → result register; flags → CC |
| WB  | result register → r3 |

| class | states | clocks |
|-------|--------|--------|
| arithmetic / logic | FA IF DEC EX WB | 4 + A |
| Ldq | FA IF DEC EA MEM WB | 4 + 2A |
| Stq | FA IF DEC EA SD MEM | 4 + 2A |
| Ld  | FA IF DEC DA DF EA MEM WB | 5 + 3A |
| St  | FA IF DEC DA DF EA SD MEM | 5 + 3A |

A is the number of clocks one memory transfer occupies. With the included
memory it is 2 + `WAIT_STATES`, so with zero wait states the three classes
take 6, 8 and 11 clocks: 120, 160 and 220 ns at 50 MHz.

The original ran at 50 MHz on a Spartan-3 board. Its reported times were
340 ns (arithmetic/logic), 440 ns (quick load/store) and 660 ns (load/store),
that is 17, 22 and 33 clocks. How those clocks were spent is not known.
No memory latency makes this design's sequence give all three (4 + A = 17
needs A = 13, which makes a quick load or store 30 clocks, not 22), so the
design does not try to match them. The relative
order is the same: quick forms fall between arithmetic and long forms.

## Memory bus

Processor pins (`mib16_core`):

| pin | dir | meaning |
|-----|-----|---------|
| CLK, RESET | in | clock; synchronous active-high reset (PC ← 0, all registers and flags ← 0) |
| CE | in | clock enable: while low the processor freezes |
| READY | in | the memory has finished the current transfer |
| D_IN[15:0] | in | read data |
| A_BUS[15:0] | out | word address |
| D_OUT[15:0] | out | write data |
| WE | out | 1 = write, 0 = read |
| FETCH | out | the read is an instruction or displacement word |
| RAM_EN | out | a transfer is requested (added; see below) |
| CC[2:0] | out | condition codes V, N, Z (added status output) |

A transfer works like this:

1. The processor raises RAM_EN, with A_BUS, WE, FETCH and, for a write,
   D_OUT already valid.
2. It holds all of them unchanged until it samples READY high on a rising
   clock edge.
3. On a read, D_IN must be valid in that same cycle.

The memory can take any number of wait cycles. The included memory makes
READY a one-clock pulse, and with no wait states this gives the two-clock
bus cycle T1 (request) / T2 (data and READY).

RAM_EN is an addition to the original pin list. Without a strobe a memory
cannot tell when a new transfer begins, for example two reads of the same
address in a row. CC is brought out because no instruction reads the flags
back. Without this output they would have no visible effect.

CE freezes state and registers, but a request already on the bus stays
there. If READY arrives while CE is low it is missed, and the transfer is
simply done again once CE returns. For a write this repeats the same write,
which is harmless.

## Memory and top level

`mib16_ram` is a 2^`ADDR_W` × 16 word memory, 64K words by default. It holds
program and data together; the original's board test used a 1K-word RAM,
which is `ADDR_W = 10`. The memory:

* is synchronous, with its read data registered;
* ignores FETCH;
* is not reset;
* asserts that the requester keeps a transfer stable until READY.

`mib16_system` is the top level: the processor wired to this memory, with
the bus and the flags brought out for observation. The processor has no
program-loading port. Fill the memory array before releasing reset, from a
testbench or an FPGA memory initialisation. Execution starts at address 0.

Parameters:

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `mib16_system`, `mib16_ram` | `ADDR_W` | 16 | memory address bits used |
| `mib16_system`, `mib16_ram` | `WAIT_STATES` | 0 | extra clocks per transfer |
| `mib16_pc` | `RESET_ADDR` | 0 | first instruction address |
| `mib16_regfile` | `WIDTH`, `NREGS` | 16, 16 | register width and count |

## Departures from the original and choices made here

* The 4-bit immediate named *i8* (as drawn in the instruction format).
* Bus multiplexers instead of tri-state buffers.
* The added RAM_EN and CC pins.
* CE taken as a clock enable. The original names the pin without
  describing it.
* Reset values. The original left registers uninitialised.
* The exact control states and the cycle counts that follow from them.
* The single-pulse READY memory.
* Multiply and divide producing results (with V) where the original had
  none.
* The displacement word is read with FETCH high, because it is part of the
  instruction.

Not included: the evaluation board's switches, LEDs and LCD. The original
used them for testing, but their function is not described.

## Verification

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. `tb/mib16_ref.sv` is an instruction-level
model written independently of the RTL. The processor-level tests use it to
predict registers, flags and memory.

| testbench | what it covers |
|-----------|----------------|
| `tb_mib16_alu` | every operation, overflow and divide corner cases, 4000 random vectors |
| `tb_mib16_regfile`, `tb_mib16_flags`, `tb_mib16_pc`, `tb_mib16_ir`, `tb_mib16_latch_reg` | register behaviour, reset, enables, PC wrap, field split and sign extension |
| `tb_mib16_control` | state sequence and full control word for every opcode, random wait cycles and CE stalls |
| `tb_mib16_ram` | read/write against a shadow copy; READY latency and pulse width; 0 and 2 wait states; 10-bit aliasing |
| `tb_mib16_core` | processor alone, 3 wait states; random program; per-instruction cycle counts; final memory and CC |
| `tb_mib16_system` | full-size system at default parameters |
| `tb_mib16_board` | system in the board configuration: 1K-word memory with aliasing upper address bits, 1 wait state; random program, per-instruction cycle counts, all 1024 words |

`tb_mib16_system` runs the following:

1. A prologue:
   * the ADD example (30 + 3 → R8, flags 000);
   * a zero result;
   * a divide by zero;
   * a negative result;
   * a multiply overflow;
   * quick store and load.
2. About 500 random instructions with CE dropped at random.
3. Checks on the run:
   * every unstalled instruction's clock count;
   * every write's address and data;
   * the FETCH/WE rules;
   * the final registers, CC, PC and all 64K memory words.
4. It fails if any of these never happened:
   * one of the sixteen opcodes;
   * V, N or Z being set;
   * a divide by zero or a multiply overflow;
   * a displacement fetch, a memory write or a CE stall.

## Simulating

With Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mib16_system rtl/mib16_pkg.sv tb/mib16_ref.sv \
    tb/tb_mib16_system.sv
./obj_dir/Vtb_mib16_system
```

Replace the top module and the last file to run another testbench.
`mib16_ref.sv` is needed only by the ALU, core and system tests. All files
are plain SystemVerilog-2017. The shared types (opcodes, ALU operations,
control word, states) live in `rtl/mib16_pkg.sv`.
