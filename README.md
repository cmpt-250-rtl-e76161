# Controller, programmable logic and memory systems of a teaching CPU

This is synthesizable SystemVerilog for the hardware covered by a set of course notes on
computer organisation (weeks 10 and 11 of CMPT 250). The notes cover three topics, and each
one becomes a working design here:

1. **The controller of the uMIPS machine**, a small MIPS-like CPU. The controller is split
   into a *sequencer*, built from small state diagrams that run side by side, and a *control
   point enabler*. The enabler is a PLA that turns the current state and the datapath status
   into a micro-instruction address, plus a ROM that holds one 22-bit control word per
   address.
2. **Programmable logic devices**: a PLA, a PAL and a ROM built as a PLD. The notes' worked
   example (three functions of x, y, z) is built both as a PLA and as a PAL.
3. **Memory systems**: a flip-flop, a register and a register file. Then an asynchronous SRAM
   made synchronous by a clocked controller that uses a `cs / r / ack` handshake. Last, a
   DRAM controller that stages every access through a buffer register. This controller
   writes back the values that a read destroys, and it refreshes the array with a counter
   between requests.

The three topics do not connect to each other. The uMIPS datapath would link the controller
to a memory, but it belongs to an earlier part of the course and is not described here. So
the top module `cmpt250_top` places the designs side by side, each with its own ports.

## 1. The uMIPS controller

### What it controls

The datapath is outside this design. Only its interface is known: 22 control points that the
controller drives, and status lines that the controller reads. These are defined in
`rtl/umips_pkg.sv`:

| status (`status_t`) | meaning |
|---|---|
| `op[5:0]` | opcode field of the instruction register |
| `fn[5:0]` | function-select field |
| `altb`, `aeqb` | comparator outputs A < B and A == B |
| `f` | the F flag: 1 means "the next instruction must be fetched" |

The control word (`ctrl_t`, MSB first) is `lir cs rm spc s1 s0 lpc d la lb lalu kf f2 f1 f0
sin1 sin0 swa w jf sop1 sop0`. The notes give the names and say which steps assert them. They
do not say what each control point does inside the datapath. Two of the points, `s0` and
`sop0`, are never asserted. They are the low halves of the selects `s` and `sop`, and they
bring the count to the 22 control points that the notes give.

The F flag is the link between the fetch sequence and the instruction sequences. Here is how
the tests model the datapath. F is 1 after reset. Every step that asserts `jf` sets F, and
the fetch step `kf` clears it. An instruction's steps are qualified by F' (F = 0), and its
final step asserts `jf`. So each instruction hands control back to fetch when it finishes.

### The sequencer (`umips_sequencer`)

There are four two-state diagrams. Each one is a single flip-flop, and the decoded state
lines go out one-hot per diagram:

```
F1 --F--> F2 --> F1           fetch
A0 --a--> A1 --> A0           a = F'·op0·(fn != 42)     register-register ALU
L0 --b--> L1 --> L0           b = F'·op35               load word
S0 --c--> S1 --> S0           c = F'·op43               store word
```

The branch (`op4`) needs no state of its own. Its step depends only on F, the opcode and
`aeqb`.

**Departure from the notes:** the notes give a = F'·op0. They also end set-on-less-than
(`fn42`) in A0 by asserting `jf` there. If slt also went on to A1, the write of A1 would
happen in the same cycle as the next fetch, and two steps would be active at once. So slt
does not enter A1 here.

### The control point enabler (`umips_cpe`)

Each step of the notes is a product term over state lines and status lines. Each step has a
fixed control word:

| step | condition | control points | ROM word |
|---|---|---|---|
| fetch 1 | F1·F | lir cs rm spc s1 lpc d | 1 |
| fetch 2 | F2 | la lb lalu s1 kf | 2 |
| add | A0·F'·op0·fn32 | lalu s1 | 3 |
| sub | A0·F'·op0·fn34 | lalu s1 f0 | 4 |
| and | A0·F'·op0·fn36 | lalu s1 f2 f0 | 5 |
| or | A0·F'·op0·fn37 | lalu s1 f2 f1 | 6 |
| slt, less | A0·F'·op0·fn42·altb | sin1 sin0 swa w jf | 7 |
| slt, not less | A0·F'·op0·fn42·altb' | sin1 swa w jf | 8 |
| ALU write | A1 | w swa jf | 9 |
| load address | L0·F'·op35 | lalu s1 sop1 | 10 |
| load | L1 | cs rm w sin0 jf | 11 |
| store address | S0·F'·op43 | lalu s1 sop1 | 12 |
| store | S1 | cs jf | 13 |
| beq, taken | F'·op4·aeqb | jf lpc | 14 |
| beq, not taken | F'·op4·aeqb' | jf | 15 |

The enabler has two parts, and this two-level encoding is the core of the controller:

* A `pla` with 23 inputs (8 state lines and 15 status lines) and 15 product terms, one per
  row of the table. Its OR plane does not produce the control points directly. It produces
  the 4-bit binary *address* of the row: product k drives the bits that are 1 in k+1.
* A `pld_rom` with 16 words of 22 bits. Word k+1 holds step k's control word, and word 0 is
  all zeros (no step active).

Because the OR plane encodes the address, at most one product may be true at a time. The
sequencer guarantees this for every instruction sequence. `umips_controller` checks it with
an assertion on the product lines (`step`). The PLA masks and the ROM contents are computed
at elaboration time from the step table in `umips_pkg` (`step_term`, `step_action`). To
change the instruction set, edit those two functions.

The opcode and function numbers are read as decimal MIPS encodings: R-type 0, beq 4, lw 35,
sw 43, and add 32, sub 34, and 36, or 37, slt 42.

### Timing

The controller issues one step per clock. The control word is combinational from the
registered state and the status, and the datapath acts on it at the next rising edge.

| instruction | cycles | steps |
|---|---|---|
| add, sub, and, or | 4 | fetch 1, fetch 2, ALU op, ALU write |
| slt | 3 | fetch 1, fetch 2, slt |
| lw | 4 | fetch 1, fetch 2, load address, load |
| sw | 4 | fetch 1, fetch 2, store address, store |
| beq | 3 | fetch 1, fetch 2, branch |

## 2. Programmable logic

* `pla`: a programmable AND plane and a programmable OR plane. `AND_T[p][i]` keeps the true
  literal of input i on product p, and `AND_C[p][i]` keeps its complement. `OR_M[o][p]`
  connects product p to output o. A set bit is a connection that is kept (an "X" in a
  schematic). The default is a device with 3 inputs, 8 products and 4 outputs, as drawn in
  the notes, with every fuse intact. Then every product contains both x and x', so every
  output is 0.
* `pal`: the AND plane is programmable, and the OR plane is fixed. Output o is the OR of
  products `o*PROD_PER_OUT` up to `o*PROD_PER_OUT + PROD_PER_OUT - 1`. A function that
  needs more product terms than its group has does not fit.
* `pld_rom`: a fixed full decoder (one product per minterm) and a programmable OR plane. In
  other words, a function table. The default contents make each word m hold m with its
  parity bit on top.
* `pla_example`: the worked example f2 = xy + x'y'z' + y'z, f1 = z, f0 = xy + z. It uses four
  shared product terms. The top also programs a `pal` with three products per output with
  the same functions. f2 needs all three of its products.

All of them are combinational.

## 3. Storage components

* `flip_flop`: one bit with a clock enable and a synchronous reset.
* `register_unit`: a W-bit register with parallel in and out. `op` chooses the operation:
  0 hold, 1 load, 2 increment, 3 shift left (sin enters bit 0), 4 shift right (sin enters
  the MSB).
* `register_file`: 32 × 32 with one combinational read port and one clocked write port,
  each with its own control point (`re`, `we`). `rdata` is 0 while `re` is 0. A read of
  the register being written in the same cycle returns the old value.
* `sram`: a behavioural model of an asynchronous SRAM. The cells are latches, and there is
  no clock. It is selected by the active-low `cs_n`. `rw = 0` makes the addressed word
  transparent to `din`, and `rw = 1` drives it onto `dout`.

The output tri-state buffers that the notes mention as an option are left out. Buses here
are multiplexed, and the bidirectional data buses of the memories are split into separate
in and out ports.

## 4. The cs / r / ack handshake and the synchronous memory

The CPU side (`cpu_mem_port`) has two waiting states:

* **CPU1 (retrieval)** drives `addr`, `cs` and `r = 1` until `ack`, then loads MDR from the
  data bus.
* **CPU2 (storage)** drives `data`, `addr`, `cs` (with `r = 0`) until `ack`.

An idle state and a `start`/`we` request interface were added, so a test or a larger design
can start accesses. `done` pulses in the cycle in which `ack` is seen.

The memory side (`sync_mem_ctrl`) wraps the SRAM. It waits in MEM1 while `cs = 0`. When `cs`
is 1, it performs the access in that MEM1 cycle. On a read, the SRAM word is loaded into
the data register. On a write, the SRAM is enabled with the requester's address and data.
The controller then moves to MEM2, raises `ack` for that single cycle, and returns to MEM1.
The notes do not say in which state `ack` is raised; MEM2 is this design's choice. An
access that finds the controller waiting is acknowledged one clock edge after `cs` rises.
Through `cpu_mem_port`, start to `done` takes three cycles. One clock serves both sides,
although the scheme would allow the memory its own clock period.

## 5. The DRAM controller

DRAM cells lose their value when they are read, and they leak charge over time.
`dram_ctrl` handles both with one buffer register, DR, a request register, ROW, and a
refresh counter, CTR:

```
M0  cs = 0: DR <- M[CTR] -> M1            cs = 1: ROW <- addr -> M2
M1  M[CTR] <- DR, CTR <- CTR + 1 -> M0    (one refresh step)
M2  write: DR <- data                     read: DR <- M[ROW]
M3  M[ROW] <- DR, data <- DR, ack -> M4   (store the new value / restore the read one)
M4  DR <- M[CTR] -> M1
```

There are three consequences:

* **Reads restore themselves.** The destructive read of a request lands in DR and is
  written straight back in M3.
* **Refresh is never locked out.** After every request, M4 and M1 refresh one location
  before M0 looks at `cs` again. A stream of back-to-back requests still advances the
  refresh counter by one every 5 cycles. With no requests, the refresh sweep takes 2 cycles
  per location.
* **Latency.** A request that finds the controller in M0 is acknowledged two cycles later,
  in M3. In a back-to-back stream, each request takes 5 cycles, from M0 through M2, M3, M4
  and M1.

`rdata` is the requested word of DR, and it is valid while `ack` is 1. The requester must
hold `cs`, `rw`, `addr` and `wdata` until it sees `ack`.

### Row-wide refresh (`ROW_WORDS`)

Refreshing one word per step limits how large the array can be before some word decays.
With `ROW_WORDS > 1`, DR holds a whole row. Every array access, and so every refresh step,
covers the row. CTR counts rows, and a column select picks the requested word. A write
must now read the row first and replace one word in DR, because the rest of the row is
written back with it. That read-first step is this design's own completion of the idea.
`ROW_WORDS = 1` (the default) is exactly the chart above.

### Does refresh keep up?

The array has 256 words (this design's choice). Under back-to-back requests, the worst-case
sweep is 256 × 5 = 1280 cycles. The notes give retention times of 2 ms to 64 ms. At an
assumed 10 MHz clock, 2 ms is 20,000 cycles. So one word per row meets the retention time
for arrays up to about 4000 words, and rows of R words multiply that by R. The tests also
show the limit directly: with 16 words and a retention of 30 cycles, the word-by-word
controller loses data under load, and the 4-words-per-row controller does not.

### The array model (`dram_array`)

This is a behavioural model, not a circuit. It keeps, for each row, the cycle of its last
write and whether a read has discharged it. A row that was destroyed or has decayed reads
as 0, and `lost` pulses when such a row is read after it was once written. This lets a
test see a controller mistake directly. The split of the address into row and column
strobes is not modelled: the address is given in one part.

## 6. The top module

`cmpt250_top` has shared `clk` and `rst` inputs (synchronous, active high). Its port
groups, one per design, are:

* `umips_*`: the controller's status input, its control word output, its state lines and its
  micro-instruction address.
* `xyz`, `pla_f`, `pal_f`: the worked example as a PLA and as a PAL.
* `ff_*`, `reg_*`, `rf_*`: the flip-flop, the register and the register file.
* `sm_*`: the CPU side of the SRAM memory.
* `dm_*`: the CPU side of the DRAM memory, plus `dm_lost`.

Its parameters set the sizes: register width, register file shape, the SRAM and DRAM
address and data widths, `DM_ROW_WORDS` and `DM_RETENTION` (in cycles).

## 7. Simulating

Every testbench in `tb/` checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog. Run any of them with plain Verilator,
for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module cmpt250_top_tb rtl/umips_pkg.sv tb/cmpt250_top_tb.sv
./obj_dir/Vcmpt250_top_tb
```

`cmpt250_top_tb` runs the top at its default parameters, through all of these:

* 500 random uMIPS instructions, with every one of the 15 steps checked cycle by cycle.
* Both versions of the worked example.
* Random traffic to the flip-flop, the register and the register file.
* 856 SRAM accesses.
* About 3,000 DRAM accesses, including back-to-back requests and idle stretches longer than
  the retention time. Every word is read back at the end.

The testbench counts each of these mechanisms and fails if one never happened.

The other testbenches are per block. `dram_ctrl_tb` runs both DRAM organisations through
`dram_ctrl_check`. The uMIPS tests take their expected control words from
`tb/umips_ref.svh`, which lists each step's control points by name.

## 8. Departures and limits

* The uMIPS datapath is not included. Only its interface appears here.
* a = F'·op0 is narrowed to exclude slt (section 1).
* The notes count 14 status lines and 22 enabler inputs. The fields they name make 15
  status lines (6 + 6 + 3), so the PLA has 23 inputs.
* `s0` and `sop0` are inferred names for the two control points that the notes count but
  do not list.
* The sizes are this design's own: 8-bit register, 32 × 32 register file, 256 × 8 SRAM and
  256 × 16 DRAM. So are the DRAM retention in cycles and the 10 MHz clock behind it.
* Left out: tri-state outputs, bidirectional buses, separate memory and CPU clocks, and the
  DRAM row and column address strobes.
