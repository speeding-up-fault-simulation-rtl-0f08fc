# Parallel stuck-at fault emulation for ISCAS-85 C17

This design does stuck-at fault simulation in hardware. A fault-free copy of
a combinational circuit (the CUT) runs beside faulty copies of it. Each
faulty copy has injection points that a scan chain switches on one fault at
a time. A fault is detected when the faulty copy's outputs differ from the
CUT's for the pattern being applied.

A single faulty copy with one chain over the whole fault list tests one
fault per clock. Here the fault list is split into **partitions**, and each
partition gets its own faulty copy and its own **chain segment**. All
segments shift in lockstep, so every clock tests one fault in each
partition. With two partitions a run takes about half the clocks.

The partitions are cut *across* the sensitization paths, not along them.
The input side of the circuit forms one part and the output side the other.
A pattern that sensitizes a path from an input to an output therefore
excites faults in both parts, and both faulty copies do useful work in the
same clock. A fanout stem always sits in the same part as all of its
branches.

The circuit under test is ISCAS-85 **C17**:

```
10 = NAND(1,3)    11 = NAND(3,6)    16 = NAND(2,11)
19 = NAND(11,7)   22 = NAND(10,16)  23 = NAND(16,19)
```

The whole system targets an FPGA with a 50 MHz clock. Results go to a host
computer over a UART.

## Fault list and partitions

Every line of C17 carries a stuck-at-0 and a stuck-at-1 fault. That is 5
inputs, 6 gate outputs and 6 fanout branches, so 17 lines and 34 faults.
The fault id is `2*line + stuck_value`.

| line | signal | line | signal | line | signal |
|---|---|---|---|---|---|
| 0 | input 1 | 6 | branch 3→11 | 12 | branch 16→22 |
| 1 | input 2 | 7 | gate 10 | 13 | branch 16→23 |
| 2 | input 3 (stem) | 8 | gate 11 (stem) | 14 | gate 19 |
| 3 | input 6 | 9 | branch 11→16 | 15 | output 22 |
| 4 | input 7 | 10 | branch 11→19 | 16 | output 23 |
| 5 | branch 3→10 | 11 | gate 16 (stem) | | |

| part | lines | fault ids | chain segment |
|---|---|---|---|
| 0 (input side) | 0–7 | 0–15 | 16 bits |
| 1 (output side) | 8–16 | 16–33 | 18 bits |

`fsim_pkg` holds this table (`PART_FIRST_LINE`) and derives everything else
from it: `part_base()`, `part_len()`, `MAX_CHAIN` = 18, and the FIFO depths.

## How a run proceeds

The controller `fsim_ctrl` repeats the following for each stored pattern:

1. **FETCH** (1 clock). It reads the pattern from the ROM and shifts a
   single `1` into every chain segment.
2. **RUN** (`MAX_CHAIN` = 18 clocks). It keeps shifting, so the token sits
   at position 0, 1, … 17. In each of these clocks:
   - faulty copy *p* has fault `part_base(p) + position` active;
   - `fsim_analysis` compares each copy's outputs with the CUT's;
   - a mismatch becomes a record `(rec_valid[p], rec_pos)` for the Result
     block.

   Positions past the end of a shorter segment (16 and 17 for part 0)
   activate nothing, and the controller masks their records.
3. After the last pattern comes one **DONE** clock. It flushes the chains
   and pulses `sim_done`.

A run therefore takes `NUM_PATTERNS × (1 + MAX_CHAIN)` clocks. With the 4
default patterns that is 76 clocks, or 1.52 µs at 50 MHz. The Timer counts
exactly these clocks. The same patterns on a single 34-bit chain would take
4 × 35 = 140 clocks, so the speed-up is 1.84.

The pattern ROM (`rtl/c17_patterns.hex`) holds `1E 0A 15 01`. Bit 0..4 are
inputs 1, 2, 3, 6 and 7. These four vectors detect all 34 faults. They were
chosen by a greedy cover over an exhaustive fault simulation of C17.

## Result and report

`fsim_result` keeps one "already detected" bit per fault of each part. Only
the first detection of a fault is pushed, as its 6-bit id, into the FIFO of
the faulty copy that found it. There is one FIFO per faulty copy, and its
depth is the segment length, so it cannot overflow.

After `sim_done` the block latches the cycle count and sends this byte
stream over the UART (8N1, 115200 baud, 434 clocks per bit):

```
<ids from FIFO 0> <ids from FIFO 1> FF <cycles[31:24]> <[23:16]> <[15:8]> <[7:0]>
```

`report_done` pulses once the stop bit of the last byte has been sent. A
`start` pulse is ignored while a run or a report is in progress. With the
default patterns the report is 16 ids from part 0, 18 from part 1, then
`FF 00 00 00 4C`.

## Modules

| module | role |
|---|---|
| `fsim_top` | system top: ROM → circuits → analysis → controller → result/UART, plus the timer |
| `fsim_pkg` | C17 sizes, line numbering, partition table, widths, report constants |
| `pattern_rom` | test vectors; registered read with enable |
| `fsim_circuits` | the CUT and one `c17_faulty` per part, sharing pattern and chain controls |
| `c17_cut` | fault-free C17 |
| `c17_faulty` | C17 with injection points for one part's faults (`(v & ~sa0) \| sa1`) and that part's chain |
| `fault_scan_chain` | one chain segment: shift register carrying a one-hot token |
| `fsim_analysis` | per faulty copy: any output differs from the CUT |
| `fsim_ctrl` | FETCH/RUN/DONE sequencer, record masking, timer control |
| `fsim_timer` | saturating cycle counter |
| `fsim_result` | detected-once filter, FIFO group, report sequencer, UART |
| `sync_fifo` | first-word-fall-through FIFO, any depth |
| `uart_tx` | 8N1 transmitter with a valid/ready byte interface |

Top ports:

- `clk`: the 50 MHz clock.
- `rst_n`: synchronous reset, active low.
- `start`: starts a run.
- Status outputs: `busy`, `sim_done`, `report_done`, `sim_cycles[31:0]`
  and `num_detected[7:0]`.
- `uart_tx`: the serial line.

Every module's header comment gives its timing.

## What is this design's own choice

The overall structure is the scheme this design implements:

- a CUT and faulty copies fed from a pattern ROM;
- a compare stage;
- a controller;
- a timer;
- one FIFO per faulty copy;
- a UART to the host;
- two partitions cut across the sensitization paths;
- a chain split into per-copy segments.

These details are choices made for this design and can be changed freely:

- The C17 netlist is the standard benchmark, and the two-part cut of C17
  was chosen here.
- The fault list is uncollapsed, with both stuck values on every line.
- The four test vectors.
- The one-clock FETCH per pattern and the ROM's read latency.
- The combinational compare.
- Storing each fault only once, and the report byte format.
- The UART frame and baud rate.
- The saturating timer.
- Synchronous active-low reset everywhere.

Not included:

- The on-chip clock manager. Feed `clk` directly.
- The host computer.
- Larger benchmarks such as C432. Their netlists and partitions would need
  a new `c17_cut` / `c17_faulty` pair and a new partition table.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M`. `tb/tb_c17_ref_pkg.sv` is an independent
table-driven C17 fault simulator that the testbenches use as a reference.
`tb/tb_uart_rx_model.sv` decodes the serial line.

`tb_fsim_top` runs the whole system at its default parameters, through two
complete runs and reports. It checks:

- the 77-clock run and the timer value of 76;
- every report byte, against the reference fault simulation;
- that all 34 faults are detected.

It also counts how often each mechanism happened:

- token insertions;
- clocks with detections in both copies;
- repeat detections that were filtered;
- positions past the short segment;
- start pulses ignored while busy.

It takes well under a second. Run it from the directory that holds `rtl/`
and `tb/`, because the ROM loads `rtl/c17_patterns.hex` by that relative
path:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/fsim_pkg.sv tb/tb_c17_ref_pkg.sv tb/tb_fsim_top.sv --top-module tb_fsim_top -o sim
./obj_dir/sim
```

Replace `tb_fsim_top` with any other testbench name to run it.

## Changing it

- **Other patterns:** edit `rtl/c17_patterns.hex` and `NUM_PATTERNS` in
  `fsim_top`.
- **Another partition of C17:** change `PART_FIRST_LINE` in `fsim_pkg`. The
  chain lengths, FIFO depths, record masking and `MAX_CHAIN` follow from it.
  Keep each fanout stem in the same part as its branches.
- **More parts:** raise `NUM_PARTS` and extend `PART_FIRST_LINE`. The
  circuit wrapper, analysis, controller and result block all loop over
  `NUM_PARTS`.
- **A different circuit:** write its fault-free and fault-injectable
  netlists in the style of `c17_cut` / `c17_faulty`, then update the sizes
  and line numbering in the package.
