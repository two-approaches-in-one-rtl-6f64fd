# Ims8NI — a minimal-area 8-bit microcontroller core

Ims8NI is a very small 8-bit controller core. It is meant to be embedded in a
larger chip, for example a consumer-electronics controller. It runs simple
control code: sampling sensors and buttons, and driving displays and
actuators. Every design decision aims at the smallest total silicon area,
counting the core and its program memory together:

* a Harvard accumulator machine with a single accumulator;
* no index register and no instruction register;
* a hidden 3-level return stack instead of a stack in data memory;
* a compact instruction set of 21 instructions, plus a Boolean processor for
  single-bit work, because bit tests and bit changes dominate control code;
* a fixed-logic (hard-wired) control unit;
* a two-edge timing scheme. The control unit and the ALU are purely
  combinational, and every instruction takes exactly one clock period.

This repository holds a synthesizable SystemVerilog model of the core, its
program ROM and data memory, and self-checking testbenches. The architecture
follows the published Ims8NI description: block diagram, instruction list,
memory maps and timing. The binary encoding, the flag rules, interrupt
details and a few widths are choices made here. They are listed in
[Where this model departs from or goes beyond the original](#where-this-model-departs-from-or-goes-beyond-the-original).

## One instruction per clock: the two-edge timing

Each instruction needs two events. The first event starts fetch, decode and
execute. The second event writes the result. Ims8NI uses both edges of a
single clock for these events:

```
          rising edge                      falling edge               rising edge
              |                                 |                          |
 clk   _______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__________________________/‾‾‾‾
              | PC, stack update                | ACC, PSW, RAM and        | next
              | ROM -> decode -> ALU settle     | peripheral write         | instruction
              |        (combinational)          |                          |
```

* **Rising edge**: the program counter and the return stack change (this
  happens in `pc_unit`, `hw_stack` and the small state in `control_unit`).
  The program ROM is read combinationally from the PC. The control lines,
  the data-memory address, the operand read and the ALU result all settle
  during the high half of the clock.
* **Falling edge**: the accumulator, the PSW and the data memory take their
  new values. A write to the peripheral window is also taken on this edge.

This scheme removes two registers:

* **No instruction register.** The PC only changes on the rising edge, so
  the ROM output is stable for the whole cycle. The instruction word drives
  the decoder directly.
* **No pipeline and no multi-cycle sequencer.** A taken skip is simply
  PC+2. A CALL pushes PC+1 and jumps in the same cycle. A table lookup
  (LDPC, then RET #imm) costs two cycles.

Consequences for anyone changing the design:

* Combinational paths run from the PC, through the ROM, the decoder, the
  data-memory read (or a peripheral's `per_rdata`) and the ALU, into the
  accumulator, all within the high half of the clock. Next-PC logic that
  depends on the data (SB skips) must settle before the rising edge.
* After the falling edge, the combinational logic re-evaluates with the
  values just written. Nothing is sampled again until the next rising edge,
  so this is harmless. Do not add logic that samples during the low half.
* Flip-flops on both edges are intentional. When porting to a single-edge
  flow, the negedge registers are `accumulator`, `psw_reg` and the RAM
  write in `data_mem`.

## Programmer's model

| Resource      | Size            | Notes |
|---------------|-----------------|-------|
| PC            | 10 bits         | 1K-word program space |
| ACC           | 8 bits          | the only data register |
| PSW           | 8 bits, at FFh  | bit 0 C, bit 1 Z, bit 2 N, bit 3 reads 0, bits 7:4 drive the `psw_out` pins |
| Return stack  | 3 × 10 bits     | not addressable; moved by CALL, RET, RET #imm and interrupt entry |
| Data space    | 256 × 8         | see the map below |

Program memory map (1K words):

| Address     | Use |
|-------------|-----|
| 000h        | reset vector, one word, normally a JMP |
| 001h        | interrupt vector, one word, normally a JMP |
| 002h–2FFh   | program code |
| 300h–3FFh   | tables or code; LDPC jumps within the current 256-word page |

Data memory map:

| Address     | Use |
|-------------|-----|
| 00h–3Fh     | RAM, bit-addressable by SETB/CLRB/SB |
| 40h–EFh     | RAM |
| F0h–FEh     | peripheral window (`per_*` ports); the boundary is parameter `PERIPH_BASE` |
| FFh         | PSW |

## Instruction set and encoding

Instructions are 13 bits wide. The instruction list has JMP and CALL with a
10-bit address, six direct-address operations with an 8-bit address, two
8-bit immediate operations, three bit operations and seven implied
operations. Together these need more than 4096 codes, so 12 bits is not
enough. 13 bits is the smallest word that holds them all.

| Bits 12..0                      | Instruction     | Operation | Flags |
|---------------------------------|-----------------|-----------|-------|
| `000 aaaaaaaaaa`                | JMP a10         | PC ← a10 | – |
| `001 aaaaaaaaaa`                | CALL a10        | push PC+1, PC ← a10 | – |
| `01 000 dddddddd`               | AND d           | ACC ← ACC & [d] | Z N |
| `01 001 dddddddd`               | OR d            | ACC ← ACC \| [d] | Z N |
| `01 010 dddddddd`               | XOR d           | ACC ← ACC ^ [d] | Z N |
| `01 011 dddddddd`               | ADD d           | ACC ← ACC + [d], no carry in | C Z N |
| `01 100 dddddddd`               | ST d            | [d] ← ACC | – (a store to FFh writes the PSW) |
| `01 101 dddddddd`               | LD d            | ACC ← [d] | Z N |
| `01 110 kkkkkkkk`               | LD #k           | ACC ← k | – |
| `01 111 kkkkkkkk`               | RET #k          | ACC ← k, PC ← pop | – |
| `10 00 bbbbbb nnn`              | SETB b.n        | bit n of byte b ← 1 | – |
| `10 01 bbbbbb nnn`              | CLRB b.n        | bit n of byte b ← 0 | – |
| `10 10 bbbbbb nnn`              | SB b.n          | skip the next instruction if the bit is set | – |
| `10 11 xxxxxxxxx`               | reserved        | executes as NOP | – |
| `11 xxxxxxxx 000`               | NOP             | | – |
| `11 xxxxxxxx 001`               | LDPC            | PC ← {PC[9:8], ACC} | – |
| `11 xxxxxxxx 010`               | RRC             | rotate {ACC, C} right | C Z N |
| `11 xxxxxxxx 011`               | RLC             | rotate {C, ACC} left | C Z N |
| `11 xxxxxxxx 100`               | SC              | skip if C | – |
| `11 xxxxxxxx 101`               | SZ              | skip if Z | – |
| `11 xxxxxxxx 110`               | RET             | PC ← pop; ends interrupt service | – |
| `11 xxxxxxxx 111`               | HCF             | halt until reset | – |

In the table, `b` is a 6-bit byte address (00h–3Fh), `n` is a bit number
and `[d]` is the data byte at address `d`. The ALU performs one arithmetic
operation (ADD) and five logical ones (AND, OR, XOR, RRC, RLC). There is no
subtract and no carry-in add. Subtraction is done in software: complement with XOR
against a byte that holds FFh, then ADD.

Table lookup idiom: place the table in a page as `RET #k` words, and call a
routine in that same page that offsets ACC and executes `LDPC`. The
`RET #k` at the target returns the table entry in ACC. `tb/tb_ims8ni.sv`
and `tb/tb_ims8ni_buttons.sv` both use this idiom.

## Stack, interrupts and halt

**Return stack** (`hw_stack`). This is a three-register shift stack. A push
moves every entry down one place, and a fourth nested push loses the oldest
entry. A pop moves every entry up one place, and a pop from an empty stack
returns 000h. The stack cannot report overflow to software. Programs must
stay within three levels, counting the level an interrupt uses.

**Interrupt** (`control_unit`). `int_req` is level-sensitive and is sampled
on every rising edge. A pending request is accepted between instructions.
It takes one clock cycle of its own, which replaces the instruction at the
PC:

* the PC of that instruction is pushed;
* the PC is loaded with 001h;
* nothing is written.

The interrupted instruction therefore runs after the handler returns. While
the handler runs, further requests wait. Service ends at the plain `RET`
that pops the interrupt's return address. The control unit recognises that
RET by comparing the stack depth with the depth recorded at entry, so the
handler may call subroutines. `RET #k` never ends service. The core saves
no context. The handler must save ACC itself (ST to RAM, then LD back before
RET). LD changes Z and N, so code that can be interrupted must not rely on
flags across instructions. A peripheral must drop `int_req` before the
handler's final RET, normally when the handler writes an acknowledge
register.

**HCF**. This instruction stops the core: the PC holds, nothing is written,
interrupts are ignored and the `hcf` output goes high. Only `reset` leaves
this state.

**Reset** is asynchronous and active high. It clears ACC, the PSW, the stack
and the interrupt and halt state, and sets PC = 000h. RAM is not cleared.

## Blocks and files

All RTL is in `rtl/`, one module or package per file. The shared types are
in `ims8ni_pkg`.

| File | Block | Role |
|------|-------|------|
| `ims8ni.sv`       | top       | wires the blocks of the diagram below; data-bus multiplexing and the PSW address decode |
| `ims8ni_pkg.sv`   | –         | widths, vectors, encoding enums, the `ctrl_t` control-line struct |
| `prog_rom.sv`     | program memory | 1K × 13 ROM with an asynchronous read; contents come from `INIT_FILE` (hex), and unset words are 0 |
| `ims8ni_demo.hex` | program image | default ROM contents: the button/display/actuator demo described below |
| `pc_unit.sv`      | program counter | next-PC select: +1, +2, jump, LDPC, pop, interrupt vector, hold |
| `hw_stack.sv`     | return stack | 3 × 10-bit shift stack; depth and overflow/underflow outputs |
| `control_unit.sv` | control | combinational decoder, plus halt, interrupt and in-service state |
| `alu.sv`          | ALU | AND, OR, XOR, ADD, RRC, RLC, pass; C, Z and N outputs |
| `accumulator.sv`  | ACC | falling-edge register; source is the ALU or the immediate field |
| `psw_reg.sv`      | PSW | falling-edge flags, byte access at FFh, `psw_out` |
| `bool_proc.sv`    | Boolean processor | set, clear or test one bit of the byte read; the result is written back on the falling edge |
| `data_mem.sv`     | data memory | 240-byte RAM plus the peripheral-window decode |

```
             +-----------+   10   +-----------+ <--> +-----------------+
             | prog_rom  |<-------| pc_unit   |      | hw_stack (3x10) |
             +-----------+        +-----------+      +-----------------+
                  | 13 instr          ^ ACC, a10, TOS
                  v                   |
   INT,RESET -> control_unit --ctrl_t--+--> alu, accumulator, psw_reg,
   HCF <-                              |    bool_proc, data_mem
                  | direct/bit address (8)
                  v
   data bus: data_mem (RAM | peripheral window) / PSW (FFh) / bool_proc
```

The top module `ims8ni` has these ports:

* `clk`, `reset`, `int_req`, `hcf`;
* the peripheral window: `per_sel`, `per_we`, `per_addr`, `per_wdata`,
  `per_rdata`;
* `psw_out[3:0]`;
* observation outputs `pc`, `acc` and `int_taken`.

A peripheral decodes `per_addr` while `per_sel` is high. It returns
`per_rdata` combinationally in the same cycle. It captures `per_wdata` on
the falling edge when `per_we` is high.

Parameters of `ims8ni`:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `INIT_FILE`   | `"rtl/ims8ni_demo.hex"` | program image for the ROM (`$readmemh`, one 13-bit word per line, `@addr` allowed; path relative to where the simulator or synthesis tool runs) |
| `PERIPH_BASE` | `'hF0` | first address of the peripheral window |

The core widths (10-bit PC, 8-bit data, 13-bit instruction, 3 stack levels)
are package constants in `ims8ni_pkg`.

## Verifying and simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_alu`, `tb_bool_proc`, `tb_accumulator`, `tb_psw_reg`, `tb_hw_stack`,
  `tb_pc_unit`, `tb_data_mem`, `tb_prog_rom` and `tb_control_unit` test the
  blocks against reference values computed in the testbench.
  `tb_control_unit` decodes all 8192 instruction words and checks the
  interrupt and halt state.
* `tb_ims8ni` tests the whole core at default parameters, in lockstep with
  an instruction-level reference model (`ims8ni_tb_pkg::iss`). After every
  falling edge it compares the PC, ACC, PSW and peripheral writes, and it
  compares all of RAM at the end of each program. It runs:
  * a directed program that forces skips on C, Z and a set bit, SETB/CLRB,
    rotations, PSW access, an LDPC table lookup, a stack overflow, and an
    interrupt with a nested call and an acknowledge, ending with HCF;
  * 40 random programs with random interrupt requests.

  It checks that the core takes one clock per instruction and per interrupt
  entry (48 instructions plus 1 entry take 49 clocks). It also fails if any
  of 19 counted mechanisms never occurred.
* `tb_ims8ni_fft` runs an 8-point FFT of real 8-bit samples. The program
  is straight-line code generated in the testbench and uses one constant
  multiply by 1/√2 built from shifts and adds. It takes 177 instructions,
  one clock each, which is 11.8 µs at 15 MHz. The results are checked
  bit-exactly against the same fixed-point formulas, and within 4 LSB of a
  floating-point DFT, for 24 input vectors. The sample range is limited to
  ±15 so that no 8-bit result overflows.
* `tb_ims8ni_buttons` runs an application program on the core at a 66 ns
  clock period. A timer interrupt samples a bouncing button port and
  debounces it by requiring two equal samples. The program counts presses
  and shows the count on a seven-segment display through a table. It also
  copies a button to an actuator bit in PSW[7:4]. The testbench checks the
  display and actuator after every press and release, and bounds the time
  from press to display (the worst case is about 10 µs with a 60-clock
  sampling period).

The demo image `rtl/ims8ni_demo.hex` is the program that
`tb_ims8ni_buttons` builds (62 words). The testbench compares the image with
its own assembly word by word before running it. Its memory use:

* 00h: debounced buttons;
* 01h: last sample;
* 02h: press count;
* 03h: current sample;
* 04h and 05h: constants 0Fh and 10h;
* 0Ah: saved ACC.

It uses the F0h button port, the F1h display latch and the F2h timer
acknowledge. The handler is at 080h and the seven-segment table at
310h–31Fh.

`ims8ni_tb_pkg` also holds small assembler functions (`LDI(k)`,
`CALL(a)`, `SB(b,n)`, …) for writing test programs.

To run one testbench with Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ims8ni_pkg.sv tb/ims8ni_tb_pkg.sv -y rtl -y tb \
    tb/tb_ims8ni.sv --top-module tb_ims8ni -o sim
./obj_dir/sim
```

For a block testbench, replace the testbench file and top name, for example
`tb/tb_alu.sv --top-module tb_alu`. Run everything from the repository
root, because the ROM images are read by paths relative to it:

* `tb/tb_prog_rom.hex` holds 64 words following
  word[i] = (i·2A7h + 113h) mod 2000h;
* `rtl/ims8ni_demo.hex` is the default program image.

`tb_ims8ni` and `tb_ims8ni_fft` load their programs by writing
`dut.u_rom.mem` hierarchically while reset is held. A real system instead
sets `INIT_FILE` on `ims8ni`.

## Where this model departs from or goes beyond the original

These points come from the original description:

* the block diagram;
* the 21-instruction list;
* the 1K-word program space and its vectors;
* the 256 × 8 data space with the PSW at FFh and bit-addressable cells
  00h–3Fh;
* the 3-level hidden stack;
* fixed-logic control;
* the timing with one rising and one falling edge, and one instruction per
  clock.

The following are this model's own choices:

* **13-bit instruction word and the whole encoding.** The original block
  diagram shows a 12-bit ROM output, which cannot hold the listed
  instruction set.
* **Bit-operation reach.** Bit operations reach bytes 00h–3Fh, the
  bit-addressable range of the memory map, through a 6-bit byte field. The
  instruction list describes a 5-bit field.
* **Edge assignment.** PC and stack change on the rising edge, and results
  are written on the falling edge.
* **Flags.** The PSW layout (C, Z, N, and four output bits) and the rule for
  which instructions change which flags. The rotations go through the carry.
* **LDPC.** It keeps PC[9:8] and loads the page offset from ACC.
* **Interrupts.** The entry cycle, level-sensitive INT, masking during
  service and the depth-based end of service. There is no interrupt enable
  bit.
* **Halt.** The behaviour of HCF and of stack overflow and underflow.
* **Peripherals.** The peripheral window at F0h–FEh and its bus timing.
* **Reset.** Reset values, with RAM left uninitialised.
* **Boolean processor.** It is built as a read-modify-write of the whole
  byte, and its test result goes to the control unit on a direct line.

Not modelled:

* the micro-programmed control alternative, which the original discards in
  favour of fixed logic;
* area, power and timing at the 2 µm process;
* the original's own program code. The original cites an 8-point FFT taking
  about 10 µs at 15 MHz, which is about 150 instructions. The FFT in
  `tb_ims8ni_fft` is this repository's own, and takes 177 instructions;
* the two-clock timing alternative with two rising (or two falling) edges,
  which the original rejects in favour of the one-clock scheme.

The default ROM image is a demonstration program only. Application code is
supplied through `INIT_FILE`.
