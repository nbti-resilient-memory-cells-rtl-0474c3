# NAND-ring register file: storage cells with less than 50% NBTI stress

Negative bias temperature instability (NBTI) slowly raises the threshold
voltage of a PMOS transistor for as long as its gate sits at logic 0. An
ordinary SRAM or register-file bit cell is a pair of cross-coupled inverters,
so one of its two PMOS gates is always at 0. Even with perfect data balancing
(storing the data inverted half of the time), each PMOS is stressed 50% of the
time, and no scheme can push it lower.

This design replaces the inverter pair with a ring of **N NAND gates of N-1
inputs each**, where every gate's output feeds one input of every other gate.
The only stable states of such a ring have exactly one output low: the output of
the one gate whose inputs are all high. The PMOS transistors whose gates see
that low output are N-1 out of N(N-1), so a cell has 1/N of its PMOS gates
stressed at any time. If the stored states are rotated so that each gate output
is low equally often, every PMOS is stressed 1/N of the time: 33% for a 3-NAND
cell, 25% for a 4-NAND cell. N = 2 is the ordinary inverter pair.

A 4-NAND cell has four states and so stores two bits. It has four bitlines per
port. That is two bitlines per stored bit, the same as an inverter cell. The
cell costs more transistors, but the per-port pass gates and bitlines per bit do
not grow. The extra cost therefore shrinks, relative to the whole, as the port
count rises, which is why the idea targets highly-ported structures such as
register files.

The RTL here is a register file of 256 words of 32 bits with 9 ports (6 read and
3 write) made of 4-NAND cells. As an option, it can be built from pairs of
3-NAND cells instead.

## Block structure

```
nbti_rf (top)
 ├─ balance_ctrl            balancing state {ST2,ST1}, periodic re-encoding sweep
 ├─ nand4_encoder  x(WR+1)  data + state -> one-low bitline pattern (write ports, sweep)
 │    or nand3_pair_encoder when CELL_N = 3
 ├─ nand_cell_array         256 x 16 cells, wordline decoders, precharged bitlines
 │    └─ nand_cell x 4096   the NAND ring, its ports
 ├─ bitline_recover x RD    rebuilds the one bitline per cell that has no sense amplifier
 └─ nand4_decoder   x RD    bitlines + state -> data
      or nand3_pair_decoder when CELL_N = 3
nbti_rf_pkg                 shared types and constants
```

## The cell (`nand_cell`)

The cell is modelled at register-transfer level. Its N NAND outputs are held in
a register `q`, where `q[k-1]` is the output of NAND k. A combinational copy of
the ring (`ring[k] = NAND of all q[j], j != k`) and an assertion check on every
cycle that `q` is a fixed point of the ring. Being a fixed point is the same
as having exactly one bit low.

Every port has a wordline and N bitlines, and NAND k reaches bitline k through a
pass gate. The model splits ports into read ports and write ports:

* A **write** port with its wordline high replaces `q` with its bitline pattern
  at the rising clock edge. An assertion checks that the pattern has exactly one
  low line. If two write ports select the cell, port 0 wins.
* A **read** port with its wordline high outputs `rd_pull = ~q`: the one line
  the cell pulls low. The read is combinational.

## Encoding and the balancing state (`nand4_encoder`, `nand4_decoder`)

Each cell stores two data bits v = {B2,B1} as the position of its low output.
The position also depends on a 2-bit **balancing state** s = {ST2,ST1}:

| d = (v − s) mod 4 | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| low bitline | BL4 | BL3 | BL2 | BL1 |

For state 0 this gives v=0 → BL4, v=1 → BL3, v=2 → BL2, v=3 → BL1. For BL4
it reduces to `BL4 = (ST1 ^ B1) | (ST2 ^ B2)`. Each step of s moves every
value one line along, so over the four states each value is stored once on
every line. If the array spends equal time in each state, every NAND output is
low exactly 25% of the time, whatever the data.

The decoder reverses the mapping. It takes d from the position of the low line
(`d[0] = ~BL3 | ~BL1`, `d[1] = ~BL2 | ~BL1`) and returns v = (d + s) mod 4. It
also raises `bad` for a cell that does not show exactly one low line.

This mapping reproduces, row for row, the 16-entry state/value/bitline table
that defines the encoding.

## Rotating the state (`balance_ctrl`)

To hold each state for equal time, `balance_ctrl` counts `ROTATE_PERIOD`
(default 65536) cycles and then moves the whole array to state s+1. The move
works like the inverted-mode switch of conventional cells: each row is read,
decoded with the old state, re-encoded with the new one and written back. The
sweep handles one row per cycle through read port 0 and write port 0. It takes
`ROWS` cycles, during which `stall` is high: read data are invalid and external
writes are ignored. The state changes on the edge that ends the sweep.

A state lasts `ROTATE_PERIOD + ROWS` cycles, so over whole rotations every row
spends exactly the same time in each state. The testbench measures this on a
real cell.

## Reading with one sense amplifier fewer (`bitline_recover`)

A read port's N bitlines need single-ended sense amplifiers. A valid cell shows
exactly one low line, so one sense amplifier per cell can be dropped. If none
of the N-1 sensed lines is low, the missing one is low; otherwise it is high.
With `SKIP_SENSE = 1` (the default), BL4 is not sensed and is rebuilt this way.
With `SKIP_SENSE = 0`, all four lines are used directly.

## The array (`nand_cell_array`)

Each port has a wordline decoder (`en && addr == row`). Read bitlines are
precharged: a bitline reads 1 unless the selected cell pulls it low, so the
array ORs the pull-downs of a column and inverts the result. A disabled read
port reads all ones.

## 3-NAND option (`CELL_N = 3`)

A 3-NAND cell has three states, and a pair of them has nine, enough for three
bits. With `CELL_N = 3`:

* each 3-bit group v is split into the base-3 digits hi = v / 3 and lo = v % 3;
* each digit is shifted by the state s ∈ {0,1,2} modulo 3;
* each shifted digit d sets the low line of its cell to BL(d+1).

A 32-bit word needs 11 pairs (22 cells; one of the 33 stored bits is unused).
The state cycles through three values, which gives each NAND output a 1/3 low
time. Nothing published fixes this encoding; it is this design's own choice,
picked to reach the 1/N balance.

## Interface of `nbti_rf`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (all words become 0, state 0) |
| `rd_en`, `rd_addr` | in | RD_PORTS, RD_PORTS×8 | read request per port |
| `rd_data`, `rd_err` | out | RD_PORTS×32, RD_PORTS | data in the same cycle; `rd_err` = a cell showed no single low line |
| `wr_en`, `wr_addr`, `wr_data` | in | WR_PORTS, ×8, ×32 | write, stored at the rising edge |
| `stall` | out | 1 | state rotation in progress; ports ignored |
| `bal_state` | out | 2 | current balancing state |

Parameters: `ROWS` (256), `WIDTH` (32), `RD_PORTS` (6), `WR_PORTS` (3),
`ROTATE_PERIOD` (65536), `SKIP_SENSE` (1), `CELL_N` (4, or 3).

## What follows the original proposal, and what is this implementation's own

From the original proposal of the NAND-ring cell:
* the N-NAND ring cell with one bitline per NAND and port;
* the 1/N stress argument;
* two bits per 4-NAND cell and three bits per pair of 3-NAND cells;
* the four-state data-to-bitline mapping;
* the rebuild rule for an unsensed bitline;
* the size of the register file (256 × 32 bits, 1–16 ports, 9 in the worked
  examples).

Choices made here:
* the 6 read / 3 write split of the 9 ports;
* combinational reads and clocked writes;
* write priority by port number;
* the reset value;
* how the state is rotated: period, one row per cycle, stalling the ports;
* which bitline goes unsensed;
* the bit order within a word;
* the whole 3-NAND pair encoding.

Limits of the model:
* The cell is a register plus a check of the ring equations. Transistor
  behaviour, sense amplifiers, bitline precharge timing and the NBTI physics
  are not modelled.
* The 1/N result appears in simulation as the fraction of cycles each NAND
  output is low.
* The ports are stalled during a rotation sweep. A design that must never
  stall would need per-row state bits or a spare port, and that is not
  attempted.
* The delay, power and area overheads of the cells, estimated elsewhere
  with an analytical cache model, cannot be checked from RTL.

## Testbenches

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_nand_cell`: states, port behaviour, priority and the ring fixed point,
  for N = 4, 3 and 2 (the last one being the inverter pair).
* `tb_nand_cell_array`: random multi-port traffic against a model.
* `tb_nand4_encoder`, `tb_nand4_decoder`: against the 16-row table; each
  value lands on each line once per rotation.
* `tb_bitline_recover`: every valid pattern, for N = 4 and N = 3.
* `tb_balance_ctrl`: sweep timing and equal time per state.
* `tb_nand3_pair_codec`: the 3-NAND pair encoder and decoder.
* `tb_nbti_rf`: a 16×8 file with 3 read and 2 write ports and a short period.
  It runs a 4-NAND instance, an instance sensing all lines and a 3-NAND
  instance on random traffic. It checks that the mechanisms occur (stall,
  rotation, rebuilt low line, write conflict, read during write), and that a
  watched cell's outputs are each low exactly 1/4 (4-NAND) or 1/3 (3-NAND)
  of whole rotations.
* `tb_nbti_rf_ports` (with helper `rf_traffic_check`): port-count and cell-type
  sweep. It runs 1R1W and 10R6W 4-NAND files of 64 × 32 bits and a
  256 × 32 3-NAND file with 6R3W, all on random traffic.
* `tb_nbti_rf_full`: the default configuration. It fills all 256 words, runs
  random traffic on all nine ports through one complete rotation (about 66k
  cycles, 256 of them stalled), and reads everything back. It takes a few
  minutes.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/nbti_rf_pkg.sv tb/tb_nbti_rf.sv --top-module tb_nbti_rf -o sim
./obj_dir/sim
```
