# A 4-bit accumulator CPU built from 74-series parts

This is a teaching CPU in the style of a TTL breadboard lab: a 4-bit
accumulator machine whose "instruction decoder" is the programmer. Each
instruction is two bytes, and the first byte is nothing more than the raw
control lines of the datapath: the select, mode and carry inputs of a
74181 ALU, the select line of the operand multiplexer and the RAM write
enable. The instruction set (load, store, add, subtract, and, or, invert,
shift, immediate forms and four jumps) exists only as a table of settings
of those lines.

The RTL models the datapath chip by chip (74181 ALU, 74157 selector, 7489
RAM, 74174 registers, 74569 counter, 74247 display decoders) and comes in
two versions:

* **Switch-programmed CPU** (`cpu4_switch`): the instruction is set on DIP
  switches and the clock is stepped by hand; ACC and PC are shown on two
  7-segment displays.
* **Stored-program CPU** (`cpu4_stored`): the same core runs a program
  held in a byte-wide RAM.

`cpu4_top` places both side by side, each with its own clock, reset and
pins.

## Datapath

```
             byte1.db ──┐
                        ├─ 74157 ── B ─┐
   7489 RAM[byte1.addr] ┘   (MUX)      │
        ▲                              ├─ 74181 ── F ──► ACC (74174) ──► display
        │ write (W)            ACC ─ A ┘     │ A=B                  │
        └───────────────────────────────────────────────────────────┘
                                             ▼
                        control glue ──► PC (74569): +1, or clear on jump ──► display
```

* ALU input **A is always ACC**; input **B is the selector output**, either
  the RAM word at the instruction's address or the 4-bit immediate DB.
  This is the only wiring on which the 74181 can form every instruction of
  the set: "ACC plus ACC" is the 74181's *A plus A*, and "ACC minus RAM" is
  its *A minus B* (there is no *B minus A*).
* On each executing clock edge ACC takes the ALU output F, unless the
  instruction is a jump. A STORE writes ACC into RAM at the same edge and
  sets the ALU to pass A, so ACC is unchanged.
* PC counts executed instructions. A taken jump clears it to 0, the only
  jump target this machine has.
* The 7489 RAM is written on the clock edge and read asynchronously. It
  is not reset.

## Instruction format

| byte 0 bit | 7   | 6 | 5  | 4 | 3..0    |
|------------|-----|---|----|---|---------|
| meaning    | MUX | W | Cn | M | S3..S0  |

| byte 1 bit | 7..4               | 3..0          |
|------------|--------------------|---------------|
| meaning    | DB (immediate)     | RAM address   |

* MUX = 1 routes DB to the ALU, MUX = 0 routes the RAM word.
* W = 1 writes ACC to RAM.
* Cn is the 74181 carry input. It is active low for active-high data, so
  Cn = 0 adds one.
* M = 1 selects the ALU's logic functions, M = 0 its arithmetic.

`cpu4_pkg::op_e` holds byte 0 for each mnemonic:

| mnemonic | byte 0    | ALU function used         | effect                      |
|----------|-----------|---------------------------|-----------------------------|
| NOP      | 0011_1111 | logic, F = A              | ACC unchanged               |
| INV      | 0011_0000 | logic, F = not A          | ACC ← not ACC               |
| SHIFT    | 0010_1100 | A plus A                  | ACC ← 2·ACC (shift left)    |
| LDI      | 1011_1010 | logic, F = B              | ACC ← DB                    |
| LOAD     | 0011_1010 | logic, F = B              | ACC ← RAM                   |
| STORE    | 0111_1111 | logic, F = A, W = 1       | RAM ← ACC                   |
| ADD      | 0010_1001 | A plus B                  | ACC ← ACC + RAM             |
| SUB      | 0000_0110 | A minus B (Cn = 0)        | ACC ← ACC − RAM             |
| AND      | 0011_1011 | logic, AB                 | ACC ← ACC & RAM             |
| OR       | 0011_1110 | logic, A + B              | ACC ← ACC \| RAM            |
| ADDI / SUBI / ANDI / ORI | as above with bit 7 set | | operand is DB          |
| JMPZ     | 1111_1100 | logic 1                   | PC ← 0                      |
| JIFZ     | 1111_0000 | logic, not A              | PC ← 0 if ACC = 0000        |
| JIFN     | 1111_1111 | logic, F = A              | PC ← 0 if ACC = 1111        |
| JIFP     | 1110_0110 | A minus B minus 1, DB = 1 | PC ← 0 if ACC = 0001        |

Arithmetic wraps modulo 16. There are no flags: the only condition the
machine can test is the ALU's A=B output.

`cpu4_pkg::instr(op, db, addr)` builds the 16-bit instruction word.

## Jumps: the subtle part

Byte 0 has no spare bit to mark a jump. This design therefore reserves
MUX = 1 with W = 1 for jumps. That pair would otherwise mean "write ACC to
RAM while routing DB to the ALU", which no instruction of the set needs.
During a jump (`ctrl_glue`):

* neither RAM nor ACC is written;
* PC is cleared when the 74181's **A=B output** is high. The name is
  historical: that output is high whenever F = 1111.

Each jump therefore picks an ALU function that yields 1111 exactly when
its condition holds:

* JMPZ uses *logic 1*, which is always 1111.
* JIFZ uses *not A*, which is 1111 iff ACC = 0.
* JIFN uses *A*, which is 1111 iff ACC = 1111.
* JIFP uses *A minus B minus 1* with DB = 0001. This is the 74181's
  comparator mode: it gives 1111 iff ACC = 0001.

A JIFP with any other DB value compares ACC against that value instead.

Without the ACC load inhibit, a jump would overwrite ACC with the ALU's
comparison result. `reg174` therefore has a load enable, which a 74174
lacks. In hardware it stands for a NAND-gated clock.

## Entering instructions: one or two switch sets

`cpu4_switch` has a parameter `SERIAL_BYTES`:

* `0` (default): two 8-switch sets, `dip0` = byte 0 and `dip1` = byte 1.
  Every clock executes one instruction and PC advances by one.
* `1`: one switch set carries both bytes in turn. The least significant
  bit of the program counter (`phase`) says which byte the switches hold:
  byte 0 when it is 0, byte 1 when it is 1. The first clock latches byte 0
  (`instr_fetch`, built from 74174 flip-flops). The second executes. The
  4-bit PC shown on the display counts whole instructions. The phase bit
  acts as the extra bit below it.

## Stored-program CPU

`cpu4_stored` replaces the switch with `prog_mem`, a 32-byte RAM. It
fetches the byte at address `{PC, phase}`, so instruction k lives at bytes
2k (byte 0) and 2k+1 (byte 1). Each instruction takes two clocks. To load a
program, hold `rst_n` low and write bytes through `load_we` /
`load_addr` / `load_data`. Then release `rst_n`; execution starts at
instruction 0. 32 bytes is 16 instructions, which is all a 4-bit PC can
reach.

## Displays

`dec247` is a 74247-style BCD to 7-segment decoder:

* Outputs are active low, ordered `{g,f,e,d,c,b,a}`.
* 6 and 9 have tails.
* Codes 10–14 show the family's fixed odd glyphs, and 15 is blank.

ACC and PC are 4-bit values, so both displays can show codes above 9.

## Files

`rtl/` holds one module or package per file:

| file | role |
|------|------|
| `cpu4_pkg.sv` | instruction byte structs, mnemonic encodings, `instr()` |
| `alu181.sv` | 74181 ALU (all 32 functions, carry, A=B, group P/G) |
| `mux157.sv` | 74157 quad 2-to-1 selector |
| `ram7489.sv` | 16 × 4 data RAM |
| `reg174.sv` | clearable D register with load enable |
| `ctr569.sv` | 74569 up/down counter (PC) |
| `dec247.sv` | 74247 7-segment decoder |
| `ctrl_glue.sv` | RAM write, ACC load and jump decode |
| `cpu4_core.sv` | the CPU: the parts above wired together |
| `instr_fetch.sv` | byte-serial fetch (phase bit and byte-0 latch) |
| `prog_mem.sv` | 32 × 8 program RAM |
| `cpu4_switch.sv` | switch-programmed CPU with displays |
| `cpu4_stored.sv` | stored-program CPU with displays |
| `cpu4_top.sv` | both CPUs side by side |

`tb/` holds one self-checking testbench per module, `<module>_tb.sv`.
`tb/cpu4_ref_pkg.sv` is an instruction-level reference model shared by
the CPU testbenches. It executes each mnemonic from its definition
("ACC plus RAM", "0 → PC if ACC = 0"), not from the control bits, so the
tests check the encodings as well as the datapath.

What the CPU-level tests cover:

* `cpu4_switch_tb` runs a short test program in both entry modes and checks
  the trace after every instruction:
  `LDI 6, STORE 7, LDI 3, LOAD 7, LDI 7, ADD 7` gives ACC = 13 at PC = 6.
  The program then continues `JIFN` (not taken), `ADDI 8` (ACC wraps to
  5), `JMPZ`, `LDI 0`, `JIFZ` (taken). The test also checks one clock per
  instruction in the default mode and two in the serial mode.
* `cpu4_stored_tb` runs the same program from program RAM, around its JMPZ
  loop three times.
* `cpu4_top_tb` is the end-to-end test at default parameters:
  * 2000 random instructions on the switch-programmed CPU;
  * a counting loop on the stored-program CPU that takes every
    conditional jump both ways;
  * a count of each mechanism (every instruction, taken and untaken jumps,
    add wrap, subtract borrow, store-then-load, two-clock fetch), failing
    if any never occurs.

## Simulating

With Verilator 5 (two-state simulation; the testbenches initialise
everything they read):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/cpu4_pkg.sv tb/cpu4_ref_pkg.sv tb/cpu4_top_tb.sv --top-module cpu4_top_tb
./obj_dir/Vcpu4_top_tb
```

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has
a watchdog. For a block testbench, substitute its file and top module. The
non-CPU testbenches do not need `cpu4_ref_pkg.sv`.

## Where this design makes its own choices

The description this CPU follows fixes:

* the parts;
* the instruction set and its register-transfer definitions;
* the two-byte format and its fields;
* the byte-by-PC-LSB entry scheme;
* one instruction per clock with two switch sets.

The following are this implementation's decisions:

* **Byte-0 bit order.** Two orders were given for the middle bits,
  `MUX, W, M, Cn` and `MUX, W, Cn, M`. The second is used.
* **ALU wiring.** A = ACC and B = selector, as explained above. One worked
  example of the original lab (byte 0 = `1010_0000`, DB = 8) was meant to
  load 8 into ACC. That only works with the operands the other way round.
  Here, that byte passes ACC through unchanged. With the reversed wiring,
  SHIFT and SUB could not be built.
* **MUX polarity and W.** MUX = 1 selects DB. W = 1 writes.
* **Jump encoding and conditions**, and the ACC load inhibit on jumps.
  The original lab left its jumps not working.
* **Timing of the parts.** RAM writes are edge-triggered rather than the
  7489's level-sensitive write. RAM data is true rather than the 7489's
  complemented outputs.
* **Parts of the chips left out.** The 74569's 3-state outputs and clocked
  carry are not modelled, nor is the 74247's ripple blanking.
* **Default entry mode.** The default is two switch sets, one clock per
  instruction. The single-switch, two-clock scheme is available as an
  option.
* **The stored-program version.** Program memory size (32 bytes), byte
  layout, load port, and reuse of the byte-serial fetch.
* **Reset.** Reset clears ACC, PC and the phase bit. Neither RAM is
  cleared.

The manual clock switch, the DIP switches with their pull resistors, the
LED displays and the power supply have no logic to model. They appear as
the top level's clock, switch inputs and segment outputs.
