# PeANUt: a 16-bit accumulator computer

The PeANUt is a small teaching computer. Every calculation goes through one
register, the accumulator AC. An instruction names a single operand: an
immediate value, a memory cell, or a cell whose address is held in another
cell. The machine has 1024 words of 16-bit memory and a handful of
registers. The processor reaches memory only through an address register
(MAR) and a data register (MDR). A program talks to the outside world
through traps: trap 1 halts the machine and trap 3 prints a character.

This RTL builds the whole computer:

- a control unit that runs each instruction as a fixed sequence of register
  transfers, one per clock cycle;
- the datapath registers with the ALU and the address adder;
- the memory;
- an exception unit whose table says what each trap number does;
- an I/O unit that passes characters to the user;
- a loader that places a program image in memory and starts it.

The encodings, the register transfers of each instruction and the memory
size are the machine's own. The cycle timing, the handshakes, the condition
flags and the loader's record stream are choices made here. They are listed
under "Choices made here" below.

## Machine state

| register | width | role |
|---|---|---|
| AC  | 16 | accumulator: source and destination of every operation |
| CI  | 16 | current instruction |
| PC  | 10 | address of the next instruction |
| CC  | 4  | condition flags n, z, v, c of the last ALU result |
| XR  | 16 | index register (base for indexed mode) |
| SP  | 16 | stack pointer (base for stack mode) |
| MAR | 10 | memory address; the memory sees only this register |
| MDR | 16 | memory data, in both directions; also feeds the I/O unit |

Words are 16-bit two's complement. Addresses are 10 bits (cells 0 to 1023).
In program listings, addresses are usually written in octal with a leading
`a`: `a10` is cell 8 and `a35` is cell 29.

## Instruction words

```
 15  13 12  10 9                 0
+------+------+-------------------+
| mode |  op  |  operand          |   memory-reference group (mode 000..100)
+------+------+-------------------+
|   opcode    |  operand          |   six-bit opcodes (top bits 101, 110, 111)
+-------------+-------------------+
```

| mode | meaning | operand |
|---|---|---|
| 000 | immediate | the value itself, CI[9:0] sign-extended |
| 001 | direct    | mem[CI[9:0]] |
| 010 | indirect  | mem[mem[CI[9:0]][9:0]] |
| 011 | indexed   | mem[CI[9:0] + XR] |
| 100 | stack     | mem[CI[9:0] + SP] |

| op | instruction |
|---|---|
| 001 | load:  AC <- operand |
| 010 | store: operand cell <- AC (not in immediate mode) |
| 011 | add:   AC <- AC + operand |
| 100 | sub:   AC <- AC - operand |

| six-bit opcode | instruction |
|---|---|
| 101110 | and, direct: AC <- AC & mem[CI[9:0]] |
| 110101 | trap CI[9:0]: 1 = halt, 3 = put (print AC[7:0]) |

Any other word is undecodable. It stops the machine with cause "illegal".

For example, `001 011 0 000 000 010` is "add mem[a2]" and `010 100 0 000
001 000` is "sub mem[mem[a10]]".

## How an instruction runs

This is the core of the design: `peanut_control`, a state machine that
emits one `ctrl_t` word per cycle. `ctrl_t` (in `peanut_pkg`) names the
register transfers of that cycle. All registers load on the same clock edge,
so a transfer always reads the values from the start of the cycle. That is
why MAR <- MDR and MDR <- AC can share a cycle.

The memory read is synchronous. With Read, Enable, the word at MAR comes
out after the next clock edge, and MDR copies it one cycle later. A memory
operand therefore costs three cycles: load MAR, read, load MDR.

Every instruction begins with the same fetch:

| cycle | state | transfers |
|---|---|---|
| 1 | F_MAR  | MAR <- PC |
| 2 | F_RD   | Read, Enable |
| 3 | F_MDR  | MDR <- memory |
| 4 | F_CI   | CI <- MDR, PC <- PC + 1 |
| 5 | DECODE | depends on the instruction, see below |

From DECODE onwards:

| instruction | transfers after fetch | cycles in total |
|---|---|---|
| load/add/sub immediate | DECODE: AC <- ALU(AC, imm), CC <- flags | 5 |
| load/add/sub/and direct, indexed, stack | DECODE: MAR <- CI[9:0] (+XR/+SP); Read; MDR <- mem; EXEC: AC <- ALU(AC, MDR) | 8 |
| load/add/sub indirect | as direct, then MAR <- MDR[9:0]; Read; MDR <- mem; EXEC | 11 |
| store direct, indexed, stack | DECODE: MAR <- address and MDR <- AC; Write, Enable | 6 |
| store indirect | MAR <- CI; Read; MDR <- mem; MAR <- MDR[9:0] and MDR <- AC; Write | 9 |
| trap 3 (put) | DECODE: MDR <- AC; PUT: offer MDR[7:0] until the I/O unit takes it | 6 + wait |
| trap 1 (halt), undefined trap, illegal word | DECODE: report to the exception unit and stop | 5 |

The indirect path reuses the read states. A one-bit flag, `ind_pending`,
sends the first read back through MAR <- MDR[9:0] rather than to EXEC.

After a halt, PC points at the word after the halt instruction. AC, CC and
memory keep their final values until the next program starts.

## Traps and the exception unit

In DECODE, the control unit hands the trap number (CI[9:0]) to
`peanut_exception`. The unit looks it up in a small table (`TABLE_SIZE` = 8
entries):

- entry 1 is halt;
- entry 3 is put;
- every other entry, and every number of 8 or more, is undefined.

The action comes back in the same cycle. The exception unit also takes the
control unit's "illegal word" report. On halt, an undefined trap or an
illegal word, it records the cause and raises `stopped`:

| `stop_cause` | meaning |
|---|---|
| `STOP_HALT`    | trap 1 |
| `STOP_ILLEGAL` | undecodable word |
| `STOP_BADTRAP` | trap number with no table entry |

Only the first cause is kept. Starting the next program clears it.

## Loading a program

A program is defined by its starting state: the memory contents and the
start address, with every other register at zero. Written out, a program image
is a text file:

- one `START aX` line giving the first PC value;
- blocks of 16-bit words, each block starting at the address on its
  `AT aX` line.

`peanut_loader` takes that image as a stream of records, one per line of
the file, with comments and blank lines already removed. Each record is a
`rec_kind` plus a 16-bit `rec_value`:

| rec_kind | value | effect |
|---|---|---|
| `REC_START` | start address | remembered as the first PC value |
| `REC_AT`    | block address | next data word goes here |
| `REC_DATA`  | a word | written to memory at the current address, which then advances |
| `REC_END`   | unused | end of image: start the program if the image was clean |

One record is taken per cycle, with valid/ready handshaking. `rec_ready`
is low while a program runs.

The loader enforces the image rules:

- there is exactly one START;
- AT blocks come in ascending order and do not overlap data already
  placed;
- data comes only after an AT;
- nothing falls past cell 1023.

A record that breaks a rule is dropped and sets `load_error`. The program
is then not started. The error flag clears with the first record of the
next image.

On a clean `REC_END`, the loader pulses `go`. The control unit then:

- sets PC to the start address;
- clears CI, AC, CC, SP, XR, MAR and MDR;
- starts fetching.

Memory cells the image does not mention keep whatever they held.

## Character output

Trap 3 sends AC[7:0] through MDR to `peanut_io`. That unit has a
one-character output register with a valid/ready stream to the user
(`out_valid`, `out_data`, `out_ready`). It can take a new character in the
same cycle the old one leaves, so a user that is always ready never slows
the machine. A user that holds `out_ready` low stalls the processor in its
PUT state. `put_count` counts the characters delivered.

## Top-level ports (`peanut_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low |
| rec_valid, rec_kind, rec_value, rec_ready | in/out | 1, 2, 16, 1 | program image records |
| load_error | out | 1 | last image broke a rule and was not started |
| out_valid, out_data, out_ready | out/out/in | 1, 8, 1 | characters to the user |
| running | out | 1 | a program is executing |
| stopped, stop_cause | out | 1, 2 | the program ended, and why |
| pc, ac, cc, sp, xr | out | 10, 16, 4, 16, 16 | architectural state, for observation |
| instr_start | out | 1 | first cycle of each instruction fetch |
| put_count | out | 16 | characters delivered since reset |

## Files

| file | contents |
|---|---|
| `rtl/peanut_pkg.sv`         | widths, encodings, `ctrl_t`, `cc_t` and the enums for ALU ops, selects, trap actions, stop causes and record kinds |
| `rtl/peanut_top.sv`         | the computer: wiring of the blocks below |
| `rtl/peanut_control.sv`     | fetch/decode/execute state machine |
| `rtl/peanut_datapath.sv`    | CI, PC, CC, SP, XR, AC, MAR, MDR and their transfers |
| `rtl/peanut_alu.sv`         | pass, add, sub and and, with flags |
| `rtl/peanut_addr_adder.sv`  | MAR input: (PC, CI or MDR) + (0, XR or SP), modulo 1024 |
| `rtl/peanut_memory.sv`      | 1024 x 16 memory: processor port plus a loader write port |
| `rtl/peanut_exception.sv`   | trap table and stop recording |
| `rtl/peanut_io.sv`          | character output buffer |
| `rtl/peanut_loader.sv`      | image records to memory writes and a start pulse |
| `tb/tb_<module>.sv`         | a self-checking testbench for each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run one:

```
verilator --binary --timing -Wno-fatal --top-module tb_peanut_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/peanut_pkg.sv tb/tb_peanut_top.sv \
    --Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_peanut_top` with any other testbench name. Each one runs in
well under a second.

`tb_peanut_top` runs the whole computer at its default size and loads
these programs through the record port:

- addition in direct mode (4 + 5 into a3);
- addition in immediate mode (5 + 14 into a35);
- and in direct mode (0x001C & 0xAAAA = 0x0008 into a1);
- subtraction in indirect mode (20 - mem[mem[a10]] = 20 - 30 = -10 into
  a23);
- printing "HELLO\n" twice: once to a user that is always ready, once to
  one that withholds ready at random;
- an undecodable word;
- an undefined trap;
- an image with two START lines.

For each program it checks the result cells, the printed text, the stop
cause and the exact cycle count: 27, 21, 27, 27 and 71 cycles. It also
counts each mechanism and fails if one never happened: immediate,
memory and indirect operands, add, sub, and, store, put, output stall,
halt, illegal word, undefined trap and image error.

The unit testbenches check the following:

- ALU: against integer arithmetic.
- Address adder: against a modulo-1024 sum.
- Memory: against a model array, including port priority.
- Datapath: against a register model driven by random control words.
- Control unit: per-instruction cycle counts and transfers for every mode.
- Exception unit: all 1024 trap numbers.
- I/O unit: ordering under random stalls.
- Loader: every image rule.

## Choices made here

These points are not fixed by the machine's definition. They are this
implementation's choices, so check them before relying on the design:

- **Cycle timing.** One register transfer step per cycle and a one-cycle
  synchronous memory read give the cycle counts in the table above. The
  machine defines what each instruction transfers, not how long it takes.
- **Fetch.** MAR <- PC, read, MDR <- memory, CI <- MDR with PC <- PC + 1.
  The fetch transfers themselves are not spelled out for the machine.
- **Immediate operands** are CI[9:0] sign-extended, giving a range of
  -512..511. Zero extension would agree equally with every example, since
  all of them use small positive values.
- **Indexed and stack modes** are decoded with addresses CI[9:0] + XR and
  CI[9:0] + SP. No instruction that writes XR or SP is defined, so both
  registers stay zero after a program starts. In practice these modes then
  behave like direct mode, and the `sp` and `xr` outputs are constant.
- **Indirect store**, and all loads, adds and subs in indexed and stack
  mode, follow the pattern of the worked examples rather than a worked
  example of their own.
- **Condition flags.** CC holds n, z, v and c (c = no borrow for sub). Every
  load, add, sub and and writes it. Nothing in the instruction set reads
  it yet.
- **Only traps 1 and 3 are defined.** No input trap exists, so the I/O unit
  only outputs. The path from the I/O unit to the exception unit is not
  used.
- **Undecodable words and undefined traps stop the machine.** Store in
  immediate mode counts as undecodable.
- **Image format.** The loader's record stream stands in for the binary
  image file, whose layout is not defined. Converting the text file into
  records is left to software.
- **Memory.** Reset does not clear memory. The loader has its own write
  port, and a processor write to the same cell in the same cycle wins.
  `WORDS` can be made smaller than 1024; the memory then repeats within the
  10-bit address space.

## Lint notes

Verilator reports only unused bits:

- the upper bits of CI, MDR, XR and SP in the address adder;
- the upper MDR byte in the top;
- two `ctrl_t` fields that the datapath does not use, because they drive
  the memory;
- package constants that a given module does not use.

It also warns that `rst_n` is used both as an asynchronous reset and inside
an assertion's `disable iff`. This is intended.
