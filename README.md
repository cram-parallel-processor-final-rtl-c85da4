# C.RAM: a bit-serial SIMD processor in memory

C.RAM (computational RAM) puts a tiny processor beside every column of a
memory array. All processors get the same instruction at the same time
(SIMD), and each one works on the bits of its own column. A processing element
(PE) has only three one-bit registers and a one-bit ALU. Because the ALU can
compute any function of three bits, multi-bit arithmetic is done one bit at a
time ("bit-serial"). While one PE adds two 4-bit numbers, every other PE adds
its own pair in the same clocks.

This RTL is a small, FPGA-sized C.RAM:

* an array of `NUM_PE` PEs (default 2);
* a 256-row data memory with one bit per PE in each row;
* a 256 x 16-bit instruction ROM;
* a program-counter sequencer;
* a decoder ("controller") that turns each instruction word into a memory
  address or a broadcast opcode;
* board I/O: push-button single-stepping through a clock prescaler and a
  debouncer, two seven-segment digits, and an HD44780-style character LCD
  that shows each instruction as it issues.

## The truth-table ALU

The central trick is that the opcode *is* the ALU. Each PE has an 8-to-1
multiplexer. Its select lines are `{X, Y, M}`, where X and Y are the PE's
registers and M is the memory bit at the current read row. X is the most
significant select bit and M the least. The eight data inputs are the eight
bits of the broadcast opcode. So the opcode is the truth table of the
function to compute, and all 256 three-input Boolean functions are available:

| opcode | result          | use                     |
|--------|-----------------|-------------------------|
| `AA`   | M               | load a memory bit       |
| `55`   | !M              | load inverted           |
| `F0`   | X               | store X, shift X        |
| `CC`   | Y               | store Y, shift Y        |
| `A0`   | X & M           |                         |
| `96`   | X ^ Y ^ M       | full-adder sum          |
| `E8`   | majority(X,Y,M) | full-adder carry        |
| `00`/`FF` | 0 / 1        | clear / set             |

To build any other opcode, set bit `4*X + 2*Y + M` of the opcode to the
result you want for that input combination. These constants are in
`cram_pkg`.

## Instruction word

An instruction is 16 bits. Bit 15 tells the two kinds apart.

```
memory instruction   15 14 13..10  9   8   7........0
                      0  W  0000  RS  H   row address
operation            15 14.......7  6  5  4  3  2  1  0
                      1  opcode     WE SR SL MW EY EX BE
```

* **Memory instruction, W = 0:** sets the read row. The PEs see this row as M
  from then on.
* **Memory instruction, W = 1:** sets the write row for later memory writes.
* **H (halt) and RS (restart):** flags for the sequencer (see below). The
  decoder ignores bits 13 to 8 of a memory instruction otherwise.
* **Operation:** bits 14:7 are the opcode. Bits 6:0 are control bits, and
  each control bit says where the ALU result goes:

| bit | name | effect when set                                                     |
|-----|------|---------------------------------------------------------------------|
| 0   | BE   | close the bus tie: drive the result onto the wired-AND bus           |
| 1   | EX   | X <= result                                                          |
| 2   | EY   | Y <= result                                                          |
| 3   | MW   | write the result to the write row (only where WREG = 1)              |
| 4   | SL   | X <= result of the right-hand neighbour PE (data moves left)         |
| 5   | SR   | Y <= result of the left-hand neighbour PE (data moves right)         |
| 6   | WE   | WREG <= result                                                       |

The word `1101010100000010` (`D502`) is "X = M". `4008` sets write row 8.
`cram_pkg` provides the builders `mk_rd`, `mk_wr`, `mk_op` and `mk_halt`.

## One step through the machine

The design runs on a single clock. A *step* is one clock when free-running
(`step_mode = 0`), or one debounced button press (`step_mode = 1`). At most
one instruction issues per step:

1. The sequencer presents `rom[pc]` and, while it is running, issues it
   (`issue`). Then `pc` advances.
2. On that clock edge the controller registers the word. A memory
   instruction updates `rd_addr` or `wr_addr`, and these hold until the next
   such instruction. An operation loads the opcode and control bits and
   raises `cmd_valid` for exactly one step.
3. On the next step every PE evaluates `opcode[{X,Y,M}]`, where M is the bit
   at `rd_addr`. On that edge the enabled registers load, and the memory bit
   at `wr_addr` is written.

So an instruction takes effect one step after it issues, and instructions
complete in order at one per step. The four-bit addition program is 28
words, so it runs in 28 clocks.

**The one programming hazard:** a memory write lands on the same edge as the
register updates. If an operation writes to the row that is also the read
row, the *next* operation already sees the new bit. When an in-place update
needs the old bit again (for example a sum and then a carry from the same
M), write the first result to a scratch row and copy it afterwards. The
multiplication program in `tb_cram_workloads` shows how.

## Processing element and array

`cram_pe` holds X, Y and WREG, the write-enable register. WREG makes
execution conditional. Load it from the ALU (control bit WE), and memory
writes then happen only in PEs whose WREG is 1. The other PEs compute but do
not store. Reset sets X = Y = 0 and WREG = 1.

`cram_pe_array` chains the PEs. PE i's left neighbour is PE i-1. The ends of
the chain are the ports `shift_in_left`/`shift_in_right` and
`shift_out_left`/`shift_out_right`. A shift moves the neighbour's *ALU
result*, not its register. So "shift X left" is the opcode `F0` (result = X)
with SL set.

The broadcast bus is a wired AND. Each PE with its bus tie closed drives its
result. `bus_and` is 0 when any of those results is 0, which lets a program
test "is some PE's bit 0?". The bus is an output only; it does not feed back
into the PEs.

## Data memory

`cram_data_mem` stores `DEPTH` (256) rows of `NUM_PE` bits. Column i of the
array is PE i's private 256 x 1 RAM.

* **PE side:** one combinational read at `rd_addr` and per-column writes at
  `wr_addr`.
* **Host side:** reads and writes a whole row through `mem_addr`,
  `mem_wdata` and `mem_rdata`. Bit i of a row belongs to PE i. Use it to
  load operands and read results while the program is stopped.

The default contents (`rtl/cram_add4_data.hex`) hold two addition problems:

* PE0: 1111 + 1111
* PE1: 1010 + 0101

The operands are stored least significant bit first: B in rows 0-3, A in
rows 4-7. The sum goes to rows 8-11 and the carry to row 12.

## Sequencer and program control

`cram_sequencer` is a plain program counter over the ROM. A one-clock
`start` pulse clears it to 0 and sets it running. Two flag bits in memory
instructions steer it:

* **halt (bit 8):** the word is issued and the sequencer stops at that
  address. `running` falls and the host can then read results.
* **restart (bit 9):** the word is issued and the count goes back to 0, for
  looping programs.

Unwritten ROM words read as a halt. The ROM's `prog_we`/`prog_addr`/
`prog_data` port replaces words at run time. The default program
(`rtl/cram_add4_prog.hex`) is a ripple-carry four-bit add:

```
OP 00 EY                      carry = 0
for i in 0..3:
  RD i;   OP AA EX            X = B[i]
  RD 4+i; WR 8+i; OP 96 MW    S[i] = X^Y^A[i]
  OP E8 EY                    carry = maj(X, Y, A[i])
WR 12; OP CC MW               carry out
HALT
```

## Board interface

* **`clk_div`:** divides the 25 MHz clock by 25 and then by 10 six times.
  Its outputs are one-clock enable pulses (1 MHz ... 1 Hz), not divided
  clocks.
* **`debounce`:** samples the active-low button at 100 Hz into a 4-bit
  history. It reports "pressed" as soon as one sample is down, and
  "released" only after four samples up (about 40 ms). Bounce on release is
  therefore absorbed.
* **Step generation:** the top makes a one-clock step from the rising edge
  of the debounced signal.
* **Seven-segment digits** (`seg7_decoder`, active low, `{g..a}`):
  * `seg_xy` shows 2*X + Y of PE 0;
  * `seg_m` shows the M of PE 0.
* **LCD (`lcd_ctrl`):**
  * After power-up it waits 15 ms (`INIT_WAIT` = 0x5B8D8 clocks), then sends
    clear (0x01), function set (0x3C), display on (0x0C) and entry mode
    (0x06).
  * After each issued instruction it writes one line: the kind (`R`, `W`
    or `O`), a space and the word in hex. For example, `O D502` is an
    operation.
  * A line takes about 8 x 4100 clocks. In free-running mode most
    instructions are therefore skipped, and the line shows whichever
    instruction issued when the last line started. In push-button mode
    every instruction is shown.
* **`lcd_out`:** puts one `{RS, data}` word on the pins and pulses E high
  for two clocks. It then waits 0x0FFF clocks, or 0xFFFF clocks after a
  clear command.

## Where this design departs from the original

The original FPGA design was described in less detail than RTL needs. Where
it was silent or inconsistent, these choices were made:

* **Control bits last one step.** In the original, the enables stayed set
  until the next operation, and programs had to switch them off with an
  extra word. Here each operation executes exactly once.
* **One memory per PE.** It has separate read and write addresses. The
  original wiring split read and write into different memory blocks.
* **Single clock.**
  * The original clocked the whole processor from the debounced button.
  * It also needed a second, slower ROM clock.
  * Here the button produces a step enable, and a free-running mode is
    added.
* **Field order.** The control-bit positions follow the decoder's worked
  examples. A drawing of the format showed enable X at bit 0 and the two
  shift bits swapped.
* **ALU select order.** `{X, Y, M}` was derived from test cases: `AA` loads
  M and `A0` is X AND M. One further test case, `66` described as "x xor m",
  is Y xor M under this order.
* **Added for testing and use:** the halt/restart flags, the `start` input,
  and the host ports for the ROM and the data memory.
* **Not built:** an operation-complete handshake from the PEs. Every
  operation finishes in one step, so the controller never waits.
* **LCD start-up words.** Two sources in the original disagree. The panel
  driver's command table gives clear, 0x3C, 0x0C, 0x06, which is what
  `lcd_ctrl` sends. A separate list of start-up steps gives 0x30, 0x08,
  0x01, 0x06, 0x0F instead.
* **LCD contents.** The original panel driver stepped through fixed text
  screens. Here the panel shows the issued instruction, which is what the
  original's description asks for.
* **Programs are new.** The original reported its subtraction and
  multiplication as not working. The programs here are new, and they pass:
  the default ROM holds the add, and `tb_cram_workloads` holds the others.

## Simulating

All files are SystemVerilog-2017. `rtl/cram_pkg.sv` must be compiled first.
Run from the directory that holds `rtl/` and `tb/`, because the default
`.hex` paths are relative to it:

```
verilator --binary --timing --top-module tb_cram_top -y rtl -y tb +libext+.sv \
          rtl/cram_pkg.sv tb/tb_cram_top.sv
obj_dir/Vtb_cram_top
```

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`.

| testbench            | what it covers                                                       |
|----------------------|----------------------------------------------------------------------|
| `tb_cram_top_full`   | default parameters: preloaded add in 28 clocks, one button step, LCD line |
| `tb_cram_top`        | end to end: add (report's cases and random), host loading, shifts, conditional write, bus, restart loop, button stepping with LCD check, mode switch |
| `tb_cram_workloads`  | invert-to-Y, 4-bit subtraction, 4-bit multiplication on both PEs      |
| `tb_cram_array30`    | the default add program on a 30-PE array: every sum, 28 clocks per run |
| `tb_cram_alu` ... `tb_lcd_ctrl` | one per module, against reference models                   |

## Parameters

| module         | parameter                 | default        |
|----------------|---------------------------|----------------|
| `cram_top`     | `NUM_PE`                  | 2              |
| `cram_top`     | `PROG_FILE`, `DATA_FILE`  | the add program and data |
| `cram_top`     | `PRE_DIV`                 | 25             |
| `cram_top`     | `INIT_WAIT`               | 0x5B8D8        |
| `cram_top`     | `SHORT_DELAY`, `LONG_DELAY` | 0x0FFF, 0xFFFF |
| `cram_data_mem`, `cram_instr_rom` | `DEPTH` | 256            |

To enlarge the array, raise `NUM_PE`; a memory row widens with it. The
instruction format fixes addresses at 8 bits, so `DEPTH` above 256 would
also need a new format.
