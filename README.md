# Ordered access memory (OAM) and two OAM-based processors

A conventional RAM orders data by address: the writer must know where each
item goes, and a multi-port RAM conflicts when two ports hit the same address.
An ordered access memory drops addresses altogether. Every item enters with an
*index* — its (row, column) place in the output matrix — and the memory hands
the data back as complete output rows, already ordered. Input rows are stored
in arrival order; ordering happens on the way out, where every location
compares its own stored index with the row being formed. All input ports and
all output ports are served in the same clock, so the memory is multi-port
without conflicts and reorders data (transpose, shuffle, any permutation)
while storing it.

Example (4 inputs, 6 outputs, 12 items; index `rc` = row r, column c):

```
input rows      indices          output rows
21  7 10 14     02 01 04 12      17  7 21  6 10 12
42  6 11 12  *  13 03 15 05  ->   4 13 14 42 25 11
17  4 13 25     00 10 11 14
```

Three writes and two reads, instead of 12 + 12 addressed RAM accesses.

## Blocks

| module | role |
|---|---|
| `oam_pkg` | ALU operation codes, control-unit instruction format, width helper |
| `oam_memory_array` | P = IN_PORTS x IN_ROWS locations of (valid, index, data) |
| `oam_efd` | entering-fetching device: fills locations in arrival order; forms output rows by index comparison |
| `oam_core` | memory array + EFD, separate write/read strobes, input and output port counts may differ |
| `oam_ip` | IP-core pinout: `in_en`, `rw`, `set`, `in_row`, `in_col`, data, `out_en` |
| `oam_lane_alu` | parallel ALU / operating unit: pass, butterfly, negate, halve |
| `asp_control_unit` | program-driven control of the parallel processor |
| `asp_parallel` | processor of parallel structure: OAM + parallel ALU + control unit |
| `asp_pipeline` | processor of pipeline structure: chain of OAM -> operating unit stages |
| `oam_top` | IP core and both processors side by side |

## How ordering works (oam_efd)

*Entering.* A write strobe stores one input row (IN_PORTS items and their
indices) in the next free row of locations. No address comes from outside.

*Fetching.* A read strobe forms the next output row, in order 0, 1, 2, ...
(wrapping after OUT_ROWS). Each valid location whose index row equals the
current row drives its item onto the output column named by its index column;
columns are OR-combined, so indices must be unique within an array. A position
whose index was never written reads 0. The row appears one clock after the
strobe with `rd_valid`/`out_en`. Both sides move one full row per clock.

*Array life cycle* (a choice of this design): the first write after any read
starts a new array — all locations are invalidated and both row sequences
restart at 0. Writes into a full array are dropped and `full` is raised. A
read in the same cycle as a write sees the memory before that write.

## The IP core (oam_ip)

Defaults: 8 channels, 1024 rows, 32-bit data, row index 10 bits, column index
3 bits (8 x 32 + 8 x 10 + 8 x 3 + 5 control pins = 365 pins on the original
part). `rw` high writes, low reads, only while `in_en` is high. `set` resets
asynchronously on its rising edge. The bidirectional data bus of the original
pinout is split here into `io_data_in` and `io_data_out`; merge them in a pad
ring with `out_en` as output enable if needed. Storage is in flip-flops, as in
a register-based FPGA implementation.

## Processor of parallel structure (asp_parallel)

Input rows, intermediate rows and result rows all pass through the OAM; the
ALU works on whole rows, and the indices written with each ALU result row
reorder the array for the next step. This design's own choices:

* The memory is two `oam_core` banks used alternately, so a sweep writes its
  results while the source array is intact.
* Instructions (`cu_instr_t` plus one row/column index per lane) are loaded
  through `prog_*` while idle; `start` runs from address 0.
  `LOAD b` writes an input row (handshake `in_valid`/`in_ready`) into bank b;
  `PASS b` reads the next row of bank b, applies the ALU code and writes the
  result into the other bank one clock later; `STORE b` sends the next row of
  bank b to `out_data` (`out_valid` one clock later); `HALT` raises `done`.
* Stalls: an instruction waits one clock if it would read the bank that the
  pending PASS result is being written into, and a LOAD waits while any PASS
  result is pending (`hazard_stall`); a LOAD also waits for `in_valid`
  (`input_stall`).

## Processor of pipeline structure (asp_pipeline)

STAGES (default 3) stages, each an OAM followed by a combinational operating
unit; stage s+1's OAM is written from stage s's OU. Each stage has its own
read strobe `r[s]`, write strobe `w[s]`, ordering code `oc_row/oc_col[s]`
(indices of the row being written) and operation code `opc[s]`, all supplied
by an external control device. A row read with `r[s]` in cycle c must be
written with `w[s+1]` in cycle c+1. A stage can write a new array once it has
finished reading the previous one, so different arrays occupy different
stages at once. With the butterfly code in every OU and a perfect-shuffle
ordering code in stages 1 and 2, an 8-lane pipeline computes an 8-point
Walsh-Hadamard transform per row (lane 2j holds result j, lane 2j+1 result
j+4).

## What comes from the architecture and what is chosen here

Taken from the architecture: index = (output row, output column); locations
holding index and data; entering/fetching split; row-at-a-time access on
both sides; the IP-core pins and the 1024 x 8 x 32 configuration; the
structure of both processors. Chosen here: read order and wrap, new-array
rule, full handling, zero for missing items, one-clock read latency, the
split data bus, the ALU operations, the control unit's instruction set,
two-bank memory in the parallel processor, 3 pipeline stages, program depth 16.
The pipeline's control device is not built; its signals are ports.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/oam_pkg.sv \
  tb/tb_oam_core.sv --top-module tb_oam_core -Mdir obj && ./obj/Vtb_oam_core
```

`tb_oam_top` runs the whole design at the default size: a full 8192-item
permutation through the IP core, a 13-instruction program on the parallel
processor, and two 1024-row arrays (one a Walsh-Hadamard transform) through
the pipeline, with every mechanism (full-memory drop, new array, missing
item, hazard and input stalls, bank alternation, overlapping arrays) counted.

## Limits

* Fetching is a comparison in every location plus an OR over all locations;
  at 8192 locations this is large logic, and synthesis of the default size is
  slow. Timing closure at the original 444.6 MHz would need pipelining of the
  OR tree, which is not done here.
* Duplicate indices are not detected.
