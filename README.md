# UTeMRISC01 — an 8-bit PIC-style microcontroller with single-cycle barrel shifts

UTeMRISC01 is a small 8-bit RISC soft core in the PIC family, extended in the
way an application-specific instruction-set processor (ASIP) is: one
application, a moving-average filter, is profiled, and the instruction set is
extended where the application spends its time. A moving average over
`M = 2^n` points ends with a division by `2^n`. A plain PIC can only divide by
rotating right through carry one place at a time, so each output point costs a
loop of `n` rotate steps. UTeMRISC01 adds a barrel shifter to the ALU and two
instructions that use it:

| mnemonic   | opcode | format `6 7 3`                     | effect                                  |
|------------|--------|------------------------------------|-----------------------------------------|
| `bsl f, n` | `0x24` | `100100 fffffff nnn`               | `f <- f << n` (zero fill), one clock    |
| `bsr f, n` | `0x25` | `100101 fffffff nnn`               | `f <- f >> n` (zero fill), one clock    |

`n` is 0..7. The result goes back to register `f`, and the STATUS flags are
left alone. A second change removes the PIC's register banks, so all 128 data
addresses can be reached from the 7-bit `f` field with no bank switching.

This repository holds synthesizable SystemVerilog for the core, a
self-checking testbench for every block, and a moving-average testbench that
runs the filter with and without the barrel shift and compares clock counts.

## Instruction set

Every instruction is one 16-bit word with a 6-bit opcode in bits `[15:10]`.
The operand formats are:

* `6 10`: a 10-bit field `k`. It is a program address for `goto`/`call`, or
  an 8-bit literal in `k[7:0]` for the literal operations.
* `6 7 3`: a 7-bit register address `f` in `[9:3]` and a 3-bit field in
  `[2:0]`. The 3-bit field is the bit number for the bit operations and the
  shift count for `bsl`/`bsr`. For byte operations, bit `[2]` is the
  destination bit `d`: 0 writes W, 1 writes `f`.
* `6 -10`: no operand.

| op   | mnem.  | op   | mnem.  | op   | mnem.  | op   | mnem.   |
|------|--------|------|--------|------|--------|------|---------|
| 00   | nop    | 0A   | movf   | 14   | retlw  | 1E   | mulw    |
| 01   | addwf  | 0B   | rlf    | 15   | call   | 1F   | clrwdt  |
| 02   | andwf  | 0C   | rrf    | 16   | goto   | 20   | sleep   |
| 03   | clrw   | 0D   | subwf  | 17   | movlw  | 21   | tris    |
| 04   | comf   | 0E   | xorwf  | 18   | iorlw  | 22   | option  |
| 05   | decf   | 0F   | bcf    | 19   | andlw  | 23   | sublw   |
| 06   | decfsz | 10   | bsf    | 1A   | xorlw  | 24   | **bsl** |
| 07   | incf   | 11   | btfsc  | 1B   | movwf  | 25   | **bsr** |
| 08   | incfsz | 12   | btfss  | 1C   | clrf   | 3F   | end     |
| 09   | iorwf  | 13   | (res.) | 1D   | swapfw |      |         |

Opcodes `0x14`–`0x25` and `0x3F` come from the core's published instruction
table. The assignment of `0x00`–`0x12` is this design's own choice. It fills
those slots with the remaining baseline-PIC byte and bit operations. Every
unassigned opcode executes as `nop`, and an assertion in the top level warns
when one is executed. The flag effects follow the PIC:

* `addwf`, `subwf` and `sublw` set C, DC and Z. C means "no borrow" for the
  subtractions.
* `rlf` and `rrf` set C.
* The logic operations, the increments and decrements, `movf`, `clrf`, `clrw`
  and `mulw` set Z.
* `decfsz` and `incfsz` set no flags.

The less familiar instructions behave as follows:

* `swapfw f`: W <- `f` with its nibbles swapped.
* `mulw f`: W <- low byte of W·`f`.
* `option`: OPTION <- W. OPTION is a plain output port of the core.
* `tris 5` / `tris 6`: TRISA / TRISB <- W.
* `clrwdt`: pulses the `wdt_clear` output for one clock.
* `sleep`: stops the core until `wake` goes high.
* `end`: stops the core until reset and raises `halted`. It marks the end of
  a program run.

## Data space (single bank)

| address | register | notes                                                  |
|---------|----------|--------------------------------------------------------|
| 0x00    | INDF     | indirect access through FSR; reads 0 if FSR = 0        |
| 0x02    | PCL      | reads low byte of the next address; writing jumps      |
| 0x03    | STATUS   | bit 0 C, bit 1 DC, bit 2 Z                             |
| 0x04    | FSR      | indirect pointer, 7 bits used                          |
| 0x05    | PORTA    | pins for input bits, latch for output bits             |
| 0x06    | PORTB    | as PORTA                                               |
| others  | RAM      | general purpose, 122 bytes, not reset                  |

The map, including 0x01 and 0x07 being ordinary RAM, is this design's choice,
modelled on the PIC.

Indirect access through FSR reaches the whole space in the same way, so there
are no bank bits anywhere. If an instruction both writes STATUS and changes a
flag, the flag wins, as on the PIC.

## Pipeline and timing

The core has two stages. This is the part to read before changing
`utemrisc01.sv`.

1. **Fetch.** `program_memory` is read synchronously at `pc_q`. The word
   appears in `ir` one clock later, together with `ex_pc`, its address, and
   the `ex_valid` flag.
2. **Execute.** In one clock, `instr_decoder` decodes `ir`. Register `f` is
   read from `register_file` (asynchronous read) or from a special register.
   `alu` computes the result, and W or `f` is written at the clock edge. A
   read-modify-write such as `bsr f,n` therefore takes one clock.

Instructions retire one per clock. Some instructions change the program flow:

* `goto`, `call`, `retlw` and any write to PCL load a new `pc_q`. They also
  clear `ex_valid`, which throws away the word fetched in the same clock.
  These instructions take two clocks.
* A taken skip (`decfsz`, `incfsz`, `btfsc`, `btfss`) clears `ex_valid`
  without redirecting, so it also costs two clocks.
* While the core sleeps or is halted, the fetch enable is low and all
  pipeline registers hold their values. On wake, the word after `sleep` is
  already in `ir` and executes in the next clock.

After reset is released, the first instruction executes in the second clock.
The `retire` output is high in every clock in which an instruction completes.

`call` pushes `ex_pc + 1` on `call_stack`, and `retlw k` pops it and loads W
with `k`. The stack holds 8 entries (`STACK_DEPTH`) and is circular, like the
PIC's. Assertions in the top level flag a call on a full stack and a return
on an empty one.

A write to PCL jumps to `{upper bits of ex_pc+1, result}`. This gives the
usual PIC table idiom: `addwf PCL,F` followed by a list of `retlw`. The
testbenches use it to hold the filter's input samples.

## The barrel shifter

`barrel_shifter` is a three-stage logarithmic shifter. Its stages shift by 1,
2 and 4 places, and each stage is enabled by one bit of the count. The
instruction is defined step by step: load `f`, shift one place `n` times,
store to `f`. The hardware gives the same result in one pass.

The fill is zero in both directions. The shift is therefore a true unsigned
division or multiplication by `2^n`, with the bits shifted out discarded. The
definition only says "shift", so the zero fill is this design's reading.
Because `bsr` and `bsl` leave C alone, a 16-bit value `hi:lo` is divided by
`2^n` (for `n` = 1..7) with four instructions:

```
bsr  lo, n        ; lo >>= n
bsl  hi, 8-n      ; bits of hi that move into lo
movf hi, W
iorwf lo, F       ; lo = (hi:lo) >> n, low byte
```

## Moving-average filter

`tb/utemrisc01_asm_pkg.sv` contains a small assembler and generates the
filter program, `y[i] = (1/M) · sum_{j=0}^{M-1} x[i+j]`. The program works as
follows:

1. It loads `N` samples into `X[]` from a `retlw` table.
2. For each output point it clears a 16-bit accumulator and adds
   `X[i..i+M-1]`. The carry goes into the high byte.
3. It divides the sum by `M = 2^L` and stores the result in `Y[i]`.

The program can be generated with either of two divisions:

* the four-instruction barrel-shift sequence shown above;
* the only option on a core without the extension, a loop of
  `bcf STATUS,C ; rrf hi ; rrf lo` run `L` times.

The clock count from reset release to the clock in which `end` executes is
exact. It is computed from the program text, and the testbenches check it:

```
cycles = 11 + 13·N + (N − M + 1) · (14 + 8·M + A)
A = 4          with bsr/bsl
A = 6·L + 1    with the rotate loop
```

Measured with N = 32 (N = 48 for M = 32):

| M  | barrel shift | rotate loop | saving |
|----|-------------:|------------:|-------:|
| 2  | 1481         | 1574        | 5.9 %  |
| 4  | 1877         | 2138        | 12.2 % |
| 8  | 2477         | 2852        | 13.1 % |
| 16 | 2909         | 3266        | 10.9 % |
| 32 | 5293         | 5752        | 8.0 %  |

The original work reports an average of about 19 % shorter execution time
against its predecessor core. It does not give its filter program, `N` or
`M`, so the figures above are not directly comparable. The saving depends on
how much of the loop the division takes: it grows with `L`, and it shrinks as
the summation loop over `M` points grows.

## Module hierarchy

```
utemrisc01            top: pipeline, W/STATUS/FSR/PCL/OPTION, sleep/end control
 ├─ program_memory    1024 × 16, synchronous fetch, load port
 ├─ instr_decoder     instruction word -> ctrl_t
 ├─ alu               8-bit ALU with C/DC/Z
 │   └─ barrel_shifter
 ├─ register_file     128 × 8, async read, sync write
 ├─ call_stack        8-entry circular return stack
 └─ io_port  ×2       PORTA, PORTB with direction registers
utemrisc01_pkg        opcodes, register map, ctrl_t, ALU op enum
```

The top-level ports are:

* `clk` and `rst` (synchronous, active high).
* The program load port `prog_we/prog_addr/prog_data`. Use it while `rst` is
  high.
* Each port's `*_in/*_out/*_oe` pins.
* `option_q`, `wdt_clear`, `wake`, `sleeping`, `halted` and `retire`.

After reset, W, STATUS and FSR are 0, OPTION is 0xFF, all port pins are
inputs and `pc` is 0. Data RAM is not reset.

## What is not here

* **Watchdog timer.** The instruction set has `clrwdt`, but no timeout,
  clock or reset behaviour is defined for a watchdog. The core only brings
  out `wdt_clear`.
* **TMR0 and the OPTION register's effects.** `option` loads a register
  that is visible on a port, but nothing inside the core uses it.
* **The original core's memory-address "algorithm"** for the single bank is
  not specified. Here the address is simply `f`, or FSR through INDF.
* **Clock frequency.** The original was measured on a Xilinx Virtex-6 board
  at 40–133 MHz, with a maximum of roughly 125 MHz for the extended core.
  RTL simulation says nothing about that.

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>`. With plain Verilator 5:

```
# one block
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/utemrisc01_pkg.sv tb/tb_alu.sv --top-module tb_alu -Mdir obj_alu
./obj_alu/Vtb_alu

# whole core (instruction test + filter), and the filter comparison
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/utemrisc01_pkg.sv tb/utemrisc01_asm_pkg.sv tb/tb_utemrisc01.sv \
    --top-module tb_utemrisc01 -Mdir obj_top
./obj_top/Vtb_utemrisc01
```

The tests are:

* `tb_barrel_shifter`: exhaustive, all inputs, counts and directions.
* `tb_alu`: randomized against a reference model.
* `tb_instr_decoder`: all 64 opcodes against a table of expected controls.
* `tb_register_file`, `tb_program_memory`, `tb_call_stack`, `tb_io_port`:
  randomized against shadow models.
* `tb_utemrisc01`: an instruction-exercise program with hand-computed
  results, including seven back-to-back `bsr` retiring in seven consecutive
  clocks, sleep/wake and ports. It then runs the filter with N = 32, M = 8 and
  checks every output and the exact clock count. It also counts how often
  each mechanism (shift, skip, branch, call/return, computed goto, indirect
  access, sleep/wake, port access, halt) happens, and fails if any never
  does.
* `tb_utemrisc01_mavg`: the comparison table above.

Each testbench has been checked against a deliberately broken copy of its
module, and each one fails on it.

To write programs, use the encoder functions in `utemrisc01_asm_pkg`
(`enc_f`, `enc_b`, `enc_k`, `enc_n`) and the `prog_c` class. Then load the
image through the load port, or pass a hex file to `program_memory`'s
`INIT_FILE` parameter.
