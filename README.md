# On-chip BIST and diagnosis of an embedded FPGA core

An FPGA core embedded in a system-on-chip can test itself. No external tester is needed and
no test logic is dedicated to the job. The on-chip processor rewrites the FPGA configuration:
some programmable logic blocks (PLBs) become **test pattern generators (TPGs)**, the blocks
between them become **blocks under test (BUTs)**, and the rest become **output response
analyzers (ORAs)**. An ORA compares two BUTs that should behave identically. A mismatch
latches a failure. Afterwards the ORAs are turned into a shift register and read out. A
diagnosis step then works out which BUTs, RAMs or ORAs are faulty. The results give row and
column coordinates, which a later reconfiguration can use to avoid the faulty resources.

This repository models the FPGA side of such a system (sizes as in an Atmel AT94K-class
device) in synthesizable SystemVerilog:

- a 48 × 48 PLB array, together with the TPGs and comparison ORAs of logic BIST;
- 12 × 12 "free RAMs" of 32 × 4 bits, with the ORAs of RAM BIST;
- the processor's write port into the configuration memory;
- a hardware diagnosis engine that retrieves the ORA results and runs the
  MULTICELLO diagnosis on them.

The processor itself is not modelled. Its role (writing configurations, generating RAM test
patterns, sequencing the test) is played by the testbenches, and its signals are ports of the
top, `efpga_bist_top`.

## Logic BIST: sessions, routing schemes and the zigzag

This is the part that takes the most care to understand.

**Columns.** The arrangement is column-based. In the **west session** the PLB columns are used
as follows:

| columns | role |
|---|---|
| 0 | TPGs |
| 1, 3, 5, …, N−1 | BUTs (BUT *j* is in column 1+2*j*) |
| 2, 4, …, N−2 | ORAs (ORA *j* is in column 2+2*j*, between BUT *j* and BUT *j*+1) |

The **east session** is the same arrangement mirrored about the vertical axis: BUT *j* is in
column N−2−2*j* and ORA *j* in column N−3−2*j*. So every row has N/2 BUTs and N/2−1 ORAs, and
the two sessions together test every PLB.

**Two outputs, one of each per ORA.** A PLB has two local outputs. Its Y output reaches the
direct neighbours (same row or column). Its X output reaches the diagonal neighbours. An ORA can
take only one X and one Y from neighbouring BUTs. Rows are therefore grouped in pairs (r, r^1),
and each ORA compares a Y from its own row with an X from the other row of the pair:

| routing scheme | ORA(r, j) compares |
|---|---|
| 1 (`scheme = 0`) | Y of BUT(r, j) with X of BUT(r^1, j+1) |
| 2 (`scheme = 1`) | Y of BUT(r, j+1) with X of BUT(r^1, j) |

Both BUTs receive the same patterns and carry the same configuration. The X LUT and the Y LUT
are configured with the same function, so the two compared signals must agree. Across both
schemes, every X and every Y output of every BUT is observed. The one exception is an edge BUT,
which has a neighbour on one side only, so each of its outputs is seen in only one of the two
schemes.

**Test sequence.** One test session needs four BIST configurations, which exercise different
modes of the PLB. The ORA latches are not cleared between configurations, so results
accumulate. They are read out once, at the end of the session. A complete logic test is:

- both sessions (west and east);
- both routing schemes;
- four configurations each.

That is 16 configurations and four retrievals.

**Translation for diagnosis.** Following BUT → ORA → BUT links gives a chain that alternates
between the two rows of a pair. Translated row *t* of pair *k* therefore holds:

- BUT *j* from physical row 2*k* + (*t* xor *j*[0]);
- ORA *j* from the row of BUT *j* (scheme 1) or of BUT *j*+1 (scheme 2).

After this translation every BUT sits between the two ORAs that observe it. That straight row
is what MULTICELLO expects. `diag_engine` translates when it reads its result buffer, and
translates back when it reports physical coordinates.

**TPGs.** There are two 5-bit binary up-counters: TPG 0 drives the even rows and TPG 1 the odd
rows. Each ORA compares BUTs from both rows of a pair, so a faulty TPG would show up in every
ORA. One pass over all patterns takes 32 clocks. The pattern bits drive these BUT inputs:

| pattern bit | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| BUT input | X | Y | W | Z | set/reset |

**Rotation.** With `rotate = 1` the whole arrangement is turned by 90°, so rows and columns
exchange roles. Cells that one orientation leaves "unknown" near the edges are usually resolved
by the other orientation. The engine swaps the coordinates back in its reports.

For the RAMs, `diag_merge` combines the passes. It keeps one status per RAM over all RAM
diagnosis passes since `ram_map_clr`, using these rules:

- a RAM that any pass calls faulty is faulty;
- otherwise, a RAM that some pass did not report at all is good;
- otherwise it stays unknown.

So a RAM left unknown by the normal dual-port pass is settled by the rotated pass, or by a
single-port pass. `ram_resolved` goes high once no RAM is unknown. Logic passes are not merged
this way. Each logic session tests only half of the PLB columns, so a PLB missing from one
pass's reports is not known to be good. Combining the logic diagnoses is left to the processor.

## RAM BIST

There is one free RAM per 4 × 4 PLBs. All RAMs are tested in parallel, and the processor
itself acts as the TPG: it broadcasts address, data and write enable. There are three
configurations (`ram_mode`):

| mode | RAM behaviour | what the ORAs compare |
|---|---|---|
| `RAM_SP_SYNC` | synchronous single-port | each RAM's read data with the expected data `ram_exp` (four ORAs per RAM, one per bit) |
| `RAM_SP_ASYNC` | asynchronous single-port | the same, with read data available in the same cycle |
| `RAM_DP_SYNC` | synchronous dual-port | RAM (r, j) with RAM (r, j+1), four ORAs per neighbouring pair |

In the single-port modes the processor also supplies `ram_exp`. In the testbenches it runs:

- March LR with three data backgrounds (0000, 0101, 0011) in synchronous single-port mode;
- March Y in asynchronous single-port mode;
- in dual-port mode, a write-while-read test: write a background, read each word through the
  read port while writing the complement of the previous word, then read the complements.

`ram_cmp` tells the ORAs which cycles hold read data:

- synchronous modes: one clock after the read address;
- asynchronous mode: the same clock as the read address.

## Diagnosis (MULTICELLO)

The diagnosis works on one row of cells C1…Cn, with ORA O(j,j+1) between neighbours (1 = saw a
mismatch). It assumes that at most two consecutive cells have equivalent faults. Every cell
starts as *unknown*. Then each step is applied once, in order:

1. A cell between two passing ORAs is fault-free.
2. An unknown cell next to a passing ORA whose other side is fault-free is fault-free.
3. An unknown cell next to a failing ORA whose other side is fault-free is faulty.
4. A failing ORA between two fault-free cells is an **ORA inconsistency**: the fault lies in
   the ORA or in its routing.

Cells still unknown may be faulty. They typically sit at the row ends, which only one ORA
observes.

Example (ORAs O12…O67 of one row of 7 RAMs = `0 0 0 1 1 0`):

- step 1 marks R2 and R3 fault-free;
- step 2 marks R1 and R4 fault-free;
- step 3 marks R5 faulty;
- R6 and R7 stay unknown (they may be fault-free, or carry equivalent faults).

`multicello_row` is this procedure as combinational logic. `diag_engine` applies it in three
ways:

| diagnosis | cells | how a result is formed |
|---|---|---|
| logic | N/2 BUTs per translated row | as above, after the zigzag translation |
| dual-port RAM | R RAMs per row | MULTICELLO on each of the four data bits separately. A RAM is *faulty* if any bit is faulty, otherwise *unknown* if any bit is unknown. The report carries those bits. |
| single-port RAM | — | every failing ORA directly names a faulty RAM bit |

Each report (`report_t`) carries:

- a category: faulty, unknown or ORA inconsistency;
- the physical row and column;
- a 4-bit field with the RAM bits concerned.

Two neighbouring RAMs with equivalent faults pass the comparison between them. Each one still
fails the comparison with its other neighbour, so the pair is still found. It is missed only when
no fault-free neighbour is left to compare against, for example a whole row of RAMs with the same
fault.

A fault that only one ORA sees is reported as an ORA inconsistency, because the procedure
cannot tell it from a faulty ORA. An example is a corrupted Y output in a single scheme.

## Blocks

| module | what it is |
|---|---|
| `bist_pkg` | Shared types: configuration write record, PLB mode byte, RAM modes, cell status, report record, RAM fault-emulation record. |
| `cfg_decoder` | Processor write port. A 24-bit address {FPGAZ, FPGAY, FPGAX} and 8 data bits are registered and decoded into one-hot PLB row and column selects. Write-only. One write per clock. |
| `plb` | PLB model: two 3-input LUTs indexed by {W,X,Y}, a D flip-flop with synchronous set/reset and clock enable, X/Y local outputs and L global output. Configured by three bytes (FPGAZ 0: X LUT, 1: Y LUT, 2: mode). |
| `free_ram` | 32 × 4 RAM in three modes. Synchronous reads have one clock of latency and read before write; asynchronous reads are combinational. `flt` makes masked bits of one word read as a fixed value (fault emulation). |
| `tpg_counter` | 5-bit up-counter with clear and wrap pulse. |
| `ora` | Comparison ORA: latches `a != b` while `cmp` is high, holds it until `clr`, and shifts in `shift` mode. |
| `logic_bist_array` | N × N `plb`, two TPGs and N·(N/2−1) ORAs wired for session, scheme and rotation. The ORA chain leaves on `shift_out`, bit r·(N/2−1)+j first. |
| `ram_bist_array` | (N/4)² `free_ram`, single-port ORAs (bit ((r·R+c)·4+b)) and dual-port ORAs (bit ((r·(R−1)+j)·4+b)). |
| `multicello_row` | Combinational MULTICELLO for one row. |
| `diag_engine` | SHIFT → SCAN state machine with a result buffer. Reports are offered on a valid/ready stream, held until accepted (asserted). |
| `diag_merge` | R × R map of RAM status (faulty / good / unknown), merged over RAM diagnosis passes. |
| `efpga_bist_top` | Everything above, with the processor side as ports. |

**Timing of a diagnosis run.** After `diag_start` the engine moves through these phases:

1. It shifts for exactly as many clocks as the chain has bits.
2. It examines one cell or ORA per clock, and stalls while a report waits for `rpt_ready`.
3. It pulses `diag_done`.

At N = 48, a logic diagnosis takes 1,104 shift clocks plus 48 × 47 scan clocks, about 3,360
clocks in all. A session of four configurations, written by partial reconfiguration of only
the BUT columns at one byte per clock, takes about 14,000 clocks.

## Simulating

Each testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. For example,
the full-size end-to-end test:

    verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv \
        tb/tb_efpga_bist_top.sv --top-module tb_efpga_bist_top
    ./obj_dir/Vtb_efpga_bist_top

`tb_efpga_bist_top` runs the 48 × 48 / 12 × 12 design at its default parameters. It:

- runs all four logic sessions and schemes and one rotated session;
- runs the three RAM configurations and a rotated dual-port run;
- checks the merged RAM map: one unknown RAM after the normal dual-port pass, none after the
  rotated pass, and exactly the two faulty RAMs;
- injects defects: corrupted LUT entries written through the configuration port, and stuck
  RAM bits through `ram_flt`;
- checks every report;
- counts that every mechanism occurred.

It runs in a few seconds. `tb_efpga_bist_top_n24` runs the same test on a 24 × 24 / 6 × 6
array. The block testbenches use small arrays (N = 8, 16, 28). `tb_multicello_row` checks the
7 × 7 example worked out above, plus random invariants. `tb_diag_merge` compares the merged RAM map
with a reference model over random sequences of passes.

To change the size, set `N` on `efpga_bist_top`. N must be a multiple of 4, and at most 255
for the 8-bit coordinates.

## How far this follows the original method, and what is this design's own

These parts follow the method closely:

- the roles of TPG, BUT and ORA;
- the 5-bit counter TPG;
- comparison ORAs that latch until retrieval and shift out;
- west/east sessions by mirroring;
- two alternating routing schemes with one X and one Y per ORA, and zigzag row pairs;
- four configurations per session;
- the three RAM configurations, with processor-generated patterns and expected data;
- neighbour comparison in dual-port mode;
- MULTICELLO steps and their per-bit use for RAMs;
- the three report categories;
- rotation by 90°;
- the 24-bit FPGAX/FPGAY/FPGAZ configuration address;
- 32 × 4 RAMs, one per 4 × 4 PLBs, and N = 48.

These are this design's own choices:

- **Which neighbour feeds each ORA in each scheme.** This is the least certain part. It fixes
  the zigzag translation, and the diagnosis depends on it.
- **The PLB internals.** The multiplexer choices, LUT input sharing and the configuration byte
  layout are a simplification. The real PLB has more multiplexers and a gate on W that are not
  modelled.
- **Dedicated TPG and ORA instances.** TPGs and ORAs are separate modules standing at the PLB
  sites they would occupy. They are not PLBs configured into those functions. Likewise, session,
  scheme, rotation and shift mode are control inputs rather than reconfigurations.
- **Fixed routing.** The global routing (busses, programmable interconnect points, repeaters)
  is not modelled. The BIST routes are fixed wires, so routing faults can only appear as ORA
  inconsistencies.
- **RAM timing and ports.** The RAM read latency and write timing are chosen here, and the
  single-port bidirectional data bus is modelled as separate in and out buses.
- **Diagnosis in hardware.** In the original method a program on the processor does the
  diagnosis. Here it is a hardware engine, and the processor only reads the reports.
- **Test contents.** The four BIST configurations, the dual-port RAM test and the March
  backgrounds are the testbenches' choices.

Not built: the processor, its program and data memories, its peripherals, and the programmable
global routing. Combining the normal and rotated logic diagnoses into one final verdict is also
not built. Only the RAM diagnoses are merged in hardware.
