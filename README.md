# Programmable memory BIST for commodity DDR3 DRAM

Testing a DDR3 die at its real speed normally needs an expensive high-speed
tester. This design moves the fast part of the test onto the DRAM die. A slow
tester (ATE) clocks the die at, say, 100 MHz. An on-die clock multiplier turns
that into an 8x (or 4x) internal clock. A small BIST then sends DDR3 commands,
addresses and data to the memory core at the internal rate, eight per external
clock.

The main idea is to split the work. The BIST has no loop counters, no
refresh timers and no test-algorithm sequencer of its own. It holds two small
tables:

* an **instruction buffer** of 31 unique instructions, each one DDR3 command
  plus one address operation and one data operation;
* a **sequence buffer** of 32 entries, each a list of up to four instruction
  pointers plus an optional link to another entry.

Within a chain of linked entries the BIST runs on its own at full speed. At
the end of an unlinked entry it takes its next starting point from a register
that the ATE reloads on every external clock. Loops, loop exits and refresh
interrupts are therefore decisions the ATE makes by choosing which sequence
number to present. The on-die hardware stays small, and the test program stays
as flexible as the tester program.

The RTL is SystemVerilog (IEEE 1800-2017). All of it is synthesizable except
the clock multiplier, which is a behavioural model of an analog DLL.

## Block structure

```
                 ext_clk domain                    int_clk domain (x4 / x8)
 ATE ─ test_start ─┐
     ─ seq_no ─────┼─ ext_capture ── seq_reg ──┐
     ─ ext_data ───┘               data_reg ─┐ │
     ─ prog_* ──── seq_buffer ◄─ seq_addr ───┼─┤ seq_ctrl ─ instr_ptr ─► instr_buffer
                   instr_buffer (write port) │ └──────────── issue ─────────┐ │ instr
                                             └──► instr_decoder ◄───────────┴─┘
     ─ ext_clk ──► clk_mult ─► int_clk           │ CMD_gen / addr_gen / data_gen
                                                 ▼
                                mem_cmd, mem_bank, mem_addr, mem_dataE, mem_dataO ─► DRAM core
                                fault_detect ◄── mem_rd_valid, mem_rdataE/O ◄─────── DRAM core
                                     └─► fault_valid / bank / row / col / mask ──► redundancy analysis
```

| Module | Role |
|---|---|
| `mbist_pkg` | word formats (`instr_t`, `seq_t`), command, address-function and data-function encodings |
| `mbist_top` | wires everything; DRAM core and redundancy analysis are outside, as ports |
| `clk_mult` | behavioural clock multiplier, x8 when `clk_sel8=1`, else x4 |
| `ext_capture` | sequence register, external data register, start register (external clock) |
| `seq_buffer` | 32 x 26-bit table, written by the ATE, read by `seq_ctrl` |
| `instr_buffer` | 31 x 14-bit table (#0..#30), pointer 31 reads as an idle instruction |
| `seq_ctrl` | walks the pointers, follows links, picks up the sequence register |
| `instr_decoder` | command/bank register plus `addr_gen` and `data_gen` |
| `addr_gen` | row/column address registers and their step registers |
| `data_gen` | data background register and the rising/falling-edge data outputs |
| `fault_detect` | compares read bursts with the expected data, reports failing cells |

## Word formats

Instruction word, 14 bits, MSB first:

| Bits | Field | Meaning |
|---|---|---|
| 13:10 | `cmd` | `{CKE, /RAS, /CAS, /WE}`: NOP `1111`, ACT `1011`, WRITE `1100`, READ `1101`, PRE `1010`, REF `1001`, MRS `1000` |
| 9:7 | `bank` | bank 0..7 |
| 6 | `side` | 0: the address function acts on x (row), 1: on y (column) |
| 5:3 | `addr_fn` | address function, below |
| 2:0 | `data_fn` | data function, below |

Sequence word, 26 bits, MSB first:

| Bits | Field | Meaning |
|---|---|---|
| 25 | `link` | 1: when this entry is done, continue with entry `seq_ptr` |
| 24:20 | `seq_ptr` | next sequence entry (0..31) |
| 19:15, 14:10, 9:5, 4:0 | `ibp[3..0]` | instruction pointers, executed left to right; 31 = end of list |

Address functions (`side` picks the pair):

| `addr_fn` | x side | y side |
|---|---|---|
| 0 INC | xaddr+1 | yaddr+1 |
| 1 DEC | xaddr-1 | yaddr-1 |
| 2 INCR | xaddr+xreg | yaddr+yreg |
| 3 DECR | xaddr-xreg | yaddr-yreg |
| 4 SETZ | xaddr=0 | yaddr=0 |
| 5 SETM | xaddr=all ones | yaddr=all ones |
| 6 SETREG | xreg=external data | yreg=external data |
| 7 HOLD | — | — |

Data functions (dataE goes with the rising clock edge, dataO with the falling
edge):

| `data_fn` | Effect |
|---|---|
| 0 LL | dataE=dreg, dataO=dreg |
| 1 LH | dataE=dreg, dataO=~dreg |
| 2 HL | dataE=~dreg, dataO=dreg |
| 3 HH | dataE=~dreg, dataO=~dreg |
| 4 INC | dreg+1 |
| 5 DEC | dreg-1 |
| 6 SETREG | dreg=external data |
| 7 HOLD | — |

dataE/dataO are registers. They keep their value under functions 4..7, so a
DDR3 burst of eight beats is written with four LL..HH instructions on four
consecutive clocks.

## How the sequence controller runs a program

This is the part that needs the most care when writing test programs.

* The controller presents one instruction pointer per internal clock. Entry
  *n* runs its pointers `ibp[3]`, `ibp[2]`, ... in order.
* An entry ends after its fourth pointer. It ends early when the next pointer
  is 31. The end marker costs no clock, so an entry `6, 6, E, -` takes two
  clocks.
* At the end of an entry:
  * `link = 1`: the next clock runs entry `seq_ptr`;
  * `link = 0`: the next clock runs the entry whose number is in the
    **sequence register** at that moment. Any other time, the sequence
    register is ignored.
* An entry whose first pointer is already 31 issues nothing for one clock and
  ends.

**Start and stop.** While idle, the controller waits for the captured
`test_start`. At the first internal edge after the external edge that captured
it, the controller loads the sequence register. The first instruction issues in
the clock that edge begins. At an unlinked end where the captured `test_start`
is low, the run stops and `test_end` rises, one internal edge later. It stays
high until the next start.

**What the ATE must work out.** The ATE knows the program, so it knows the
length in internal clocks of every chain (entry to entry until an unlinked end).
Number the internal edges from 0 at the start edge. The pick-ups happen at
`F0 = 0` and `F(k+1) = F(k) + length(chain k)`. Pick-up *k* sees the value that
the ATE presented at external edge `floor(F(k) / M)`, where M is 8 or 4. So the
ATE must present pick-up *k*'s sequence number at that external edge. Two
pick-ups must not fall in the same external period, so keep every chain at
least M clocks long. The external data register works the same way: a SETREG
instruction issued in internal cycle *n* takes the value captured at external
edge `floor((n+1) / M)`.

**Timing of the outputs.** An instruction issued in internal cycle *n* reaches
the DRAM core (`mem_cmd`, `mem_bank`, `mem_addr`, `mem_dataE/O`) in cycle *n+1*.
All these outputs are registered together. `mem_addr` carries xaddr for ACT and
yaddr for every other command. It is the value before the instruction's own
address function takes effect. The program itself places write data and
expected read data in the right cycles by putting the LL..HH instructions the
write or read latency after the WRITE or READ.

## Example: scan test with a checkerboard background

The end-to-end testbench loads this program. It writes a checkerboard: even
rows get the data background DB, odd rows ~DB, in bursts of 8 columns. Then it
reads the checkerboard back and compares. The whole write/read runs twice, the
second time with ~DB. Write latency and read latency are both 5 clocks.

Instructions (all bank 0):

| # | Instruction | # | Instruction |
|---|---|---|---|
| 1 | NOP, yreg=ext data | 9 | NOP, data LL |
| 2 | NOP, dreg=ext data | 10 | NOP, data HH |
| 3 | NOP, X=0 | 11 | PRE |
| 4 | NOP, Y=0 | 12 | NOP, X=X+1 |
| 5 | ACT | 13 | NOP, X=X+1, data LL |
| 6 | NOP | 14 | NOP, X=X+1, data HH |
| 7 | WRITE | 15 | NOP, Y=Y+yreg |
| 8 | READ | 16 | REF (refresh interrupt) |

Sequence entries (L = linked, U = unlinked, E = 31):

```
write: S0 L,S1: 1,6,6,6     S1 L,S2: 3,4,6,6     S2 L,S3: 2,6,6,6
       S3 L,S4: 5,6,6,6     S4 L,S5: 6,7,6,6     S5 L,S6: 6,6,9,9
       S6 L,S7: 9,9,6,6     S7 L,S8: 6,6,6,6     S8 L,S9: 11,12,6,6
       S9 L,S10: 6,5,6,6    S10 L,S11: 6,6,7,6   S11 L,S12: 6,6,6,10
       S12 L,S13: 10,10,10,6 S13 L,S14: 6,6,6,6  S14 L,S15: 6,11,12,6
       S15 U: 6,6,E         S16 L,S3: 3,15,E
read:  S17 L,S18: 3,4,E     S18 L,S19: 5,6,6,6   S19 L,S20: 6,8,6,6
       S20 L,S21: 6,11,13,9 S21 L,S22: 9,9,5,6   S22 L,S23: 6,6,6,8
       S23 L,S24: 6,6,6,11  S24 U: 14,10,10,10   S25 L,S18: 3,15,E
refresh: S26 L,S27: 16,6,6,6  S27 U: 6,6,6,6
```

The ATE presents SEQ0 once, with yreg = 8 on the data pins and then DB. The BIST
runs S0..S15 alone (62 clocks): it writes row 0 with DB and row 1 with ~DB. From
then on the ATE steers:

* SEQ3 writes the next row pair (a chain of 50 clocks);
* SEQ16 resets X and moves Y on by 8 columns before writing;
* SEQ17 starts the read pass;
* SEQ18 and SEQ25 play the same roles in the read pass;
* SEQ1 repeats everything with the data pins at ~DB;
* SEQ26 inserts a refresh between two row pairs.

Rows, columns and repetitions are counted only by the ATE. The same tables test
any region of the array.

## Second example: MATS+

`tb/tb_mbist_mats.sv` runs the march test MATS+, `{ any(w0); up(r0,w1);
down(r1,w0) }`. It works on the 32 highest rows of bank 1, one 8-column burst
per row, and uses 14 instructions and 19 sequence entries. It shows the
functions the scan test does not use:

* **Descending order.** SETREG loads `xreg` with R-1. SETM followed by DECR
  then finds the lowest tested row. SETM alone starts the descending element,
  and DEC steps it.
* **Read then write in one row activation.** In each row the program issues
  ACT, READ, WRITE and PRE. A single LL (or HH) instruction supplies the
  expected read data. A single HH (or LL) instruction supplies the write data.
  Between them dataE/dataO hold their value.

The ATE loops each element by presenting that element's first entry again.

## Read compare and fault records

`fault_detect` watches the command stream going to the core. It remembers the
open row of each bank and queues the bank, row and column of every READ, up to
4 in flight. The core raises `mem_rd_valid` with each pair of read beats.
`fault_detect` compares each pair with `mem_dataE/O`, which the program has
set to the expected values in that cycle. After `BURST_CYC` (4) valid clocks,
the oldest READ leaves the queue.

A mismatch produces a one-clock record:
* `fault_bank` and `fault_row`;
* `fault_col`, the column of the rising-edge beat (the falling-edge beat is
  `fault_col+1`);
* `fault_mask`, the failing bits as `{rising, falling}`.

A mismatch also sets the sticky `fail` flag and counts in `fault_count`.
`fail_clear` clears both. These records are meant for an on-die redundancy
analysis block, which is not part of this RTL.

## Clocking

`clk_mult` stands in for the DRAM's DLL, modified to multiply. It measures the
external period over two edges and then raises `clk_locked`. After each external
rising edge it emits M internal pulses of period T/M, starting 50 ps after the
external edge. The external-clock registers (`ext_capture`, the table write
ports) are therefore seen by the internal logic at the next internal edge. The
two clocks are phase related, so no synchronizers are used. In silicon the
crossing has to be timed as a same-source, multicycle path. Change `clk_sel8`
only while idle.

## Size

After coarse synthesis the two tables hold 1,266 bits: 32 x 26 for the
sequence buffer and 31 x 14 for the instruction buffer. The registers hold
about 410 flip-flop bits. Of these, 290 are in `fault_detect`, mostly its
READ queue and the open-row register of each bank. The sequence controller
needs only 9 state bits.

Mapped to NAND2 and inverters, with each flip-flop counted as 6 gate
equivalents, the logic comes to about 16.8 K gates. The two tables account for
12.4 K of these, `fault_detect` for 2.7 K and the decoder for 1.4 K. The clock
multiplier is not included. Treat this as an order of magnitude, not a
standard-cell area. The reference design is reported at about 15 K gates.

## Parameters

| Parameter | Default | Note |
|---|---|---|
| `XW` | 14 | row address bits (1 Gb x8 DDR3: 16K rows) |
| `YW` | 10 | column address bits (1K columns) |
| `DW` | 8 | data bits per clock edge (x8 device) |
| `BURST_CYC` | 4 | internal clocks per read burst (BL8) |
| table sizes | 31 / 32 | fixed by the 5-bit pointer fields, in `mbist_pkg` |

The external data bus is `max(XW, YW, DW)` bits wide. The table load port is
26 bits wide; instruction words use its low 14 bits.

## Loading the tables

While the BIST is idle, the ATE writes one word per external clock: set
`prog_we`, `prog_sel` (0 for the instruction buffer, 1 for the sequence
buffer), `prog_addr` and `prog_wdata`. The tables have no reset, so load
every entry the program can reach.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mbist_pkg.sv tb/tb_mbist_top.sv \
          --top-module tb_mbist_top -o sim && ./obj_dir/sim
```

`tb_mbist_top` runs the whole design with every parameter at its default. Its
parts are:

* a DDR3 core model, `tb/dram_core_model.sv`;
* an ATE model that computes the pick-up schedule as described above.

It runs the two-pass scan of 64 rows x 128 columns at x8, with one refresh
interrupt and one faulty cell, then a one-pass scan of 4 x 16 at x4. It
checks:

* the core commands in the first cycles;
* the internal clock count at `test_end`;
* every cell's contents;
* the ACT/WRITE/READ/PRE/REF counts;
* DRAM protocol errors (none allowed);
* the exact fault records.

`tb_mbist_mats` runs the MATS+ program the same way, also at the default
parameters. It has one faulty cell, which both read elements must report.

`tb_mbist_top` also counts links, pick-ups, early ends, full entries, periods in which the
sequence register was ignored, refreshes, faults and both clock ratios, and
each must occur. It finishes in well under a second.

## Where this RTL goes beyond or departs from the published design

Taken from the published design:
* the two tables, their sizes and their field layout;
* the address and data function tables;
* the link and pick-up rules;
* the x4/x8 clock;
* the example program.

Choices made here:
* **Field positions and encodings.** The first field of each word is placed at
  the MSB. The command field uses the standard DDR3 `{CKE,/RAS,/CAS,/WE}` truth
  table.
* **Widths.** 14-bit rows, 10-bit columns and 8-bit data (a 1 Gb x8 part). The
  original gives no widths.
* **Start/stop.** The `test_start` / `test_end` protocol, and the start
  register that aligns `test_start` with the first sequence number.
* **Table loading.** The `prog_*` port.
* **Address output.** xaddr for ACT and yaddr otherwise. It is sampled before
  the same instruction's update.
* **dataE/dataO.** Output registers that hold their value.
* **Read compare.** `fault_detect` as a whole: its comparison, READ queue,
  record format and `fail` flag. The original shows only a fault-collection
  path to redundancy analysis.
* **Example program fixes.** Two entries are changed so the example works.
  S14 carries a precharge before the row increment. S18..S23 link to the next
  entry in turn, which gives the read pass the same 5-clock latency as the
  write pass.

Not included:
* **A second instruction decoder.** The original reaches a 1.25 ns clock with
  two instruction decoders but does not describe them. This RTL has one
  decoder, which issues one instruction per internal clock.
* **Timing.** Whether the single-decoder path closes at 1.25 ns has not been
  analysed.
* **Redundancy analysis and the memory core.** These are separate designs.
  Their signals are top-level ports.
* **Refresh timers and loop counters.** These are left to the tester by
  design.
