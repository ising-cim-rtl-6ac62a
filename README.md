# Ising-CIM: an eDRAM macro that solves Ising problems in its own bitlines

Combinatorial optimisation problems such as max-cut can be written as an Ising
model: a grid of spins σ = ±1 with couplings J between neighbours, and the
energy

    H = - Σ J_ij σ_i σ_j

to be minimised. On a King's graph every spin has eight neighbours (the 3×3
square around it). The usual local rule sets each spin to the sign of its local
field:

    σ_i ← +1  if  Σ_j J_ij σ_j ≥ 0   (local H_σ = -Σ J σ ≤ 0)
    σ_i ← -1  otherwise

Random flips between sweeps (simulated annealing) keep the search from settling
in a local minimum.

This RTL describes a memory macro that does this work inside an ordinary
embedded-DRAM array. It has no adders and no XNOR gates next to the cells. Spins
stay in the bitcells. The products J·σ come from choosing which read wordlines
to drive. The sum is formed by charge sharing between bitline sampling
capacitors. The sign test is done by the existing sense amplifier. The same
array still works as plain memory: rows can be written and read one at a time.

The default configuration is one macro of 64 × 100 spins with 1-bit couplings
(J = ±1). Larger grids are split over a BR × BC array of such macros ("banks"),
each holding copies of its neighbours' edge spins; see *Ghost cells* below.

## How one spin is updated inside the array

### Storage

Every spin row `r` has a partner row `ROWS + r` that holds the complement ~σ.
A 3T1C gain cell has a separate read port. That port conducts when two things
are true: its read wordline (RWL) is driven and its storage node is high.

For a neighbour with coupling J, the controller drives two wordlines:

* the neighbour's spin row gets J;
* the neighbour's complement row gets ~J.

Only one of those two cells can conduct, and only when J == σ, which means
J·σ = +1. So the number of conducting ports on a bitline is the number of +1
products among the rows that are on. This is an XNOR done by the wordlines.

### Three read iterations

The eight neighbours lie in three columns: c-1, c and c+1. The controller reads
them in three cycles. In each cycle one sampling capacitor (SP bit) takes its
column's bitline voltage:

| iteration | row r-1 | row r | row r+1 | capacitor sampled |
|-----------|---------|-------|---------|-------------------|
| 1 | J0 | J3 | J5 | column c-1 |
| 2 | J1 | off | J6 | column c |
| 3 | J2 | J4 | J7 | column c+1 |

In each cycle the matching complement rows carry J̄. Row r is off in iteration 2
because the target is not its own neighbour. Neighbours are numbered 0 1 2 above
the target, 3 and 4 beside it, and 5 6 7 below it.

### Compare

Next, CS switches join the three capacitors. Their common voltage falls with
the number of +1 products. The sense amplifier of column c compares that voltage
with V_REF:

* at or below V_REF means Σ J σ ≥ 0, so the new spin is +1 (ties go to +1);
* above V_REF means the new spin is -1.

The sense amplifier keeps its result in its latch.

### Update (write after read)

The result must not overwrite the target's old value, because the old value is
still a neighbour of the spins that come next. So the result goes into a spare
("ping-pong") row instead:

1. That row is read with every sense amplifier except the one in column c.
2. All sense-amplifier outputs go back through the write driver (UPDATE).

Column c therefore receives the new spin, and every other column rewrites what
it held.

### Timing

Once the eight J values are present, one spin takes 5 cycles:

* 3 read iterations, with the bitline precharge in the first one;
* 1 charge-share and compare cycle;
* 1 update cycle.

The J values arrive two per `load_j` pulse, four pulses per spin.

## Sweeps, ping-pong rows and annealing

A sweep updates every spin from the same old state (a synchronous update). It
works row by row, left to right:

* New spins of row `r` go into ping-pong row `r mod 2`.
* When row `r` is finished, nothing needs the old row `r-1` any more. Ping-pong
  row `(r-1) mod 2` is then copied back over spin row `r-1` and its complement
  row, in one read-and-write cycle.
* The last row is copied back at the end of the sweep.

Physical rows: 64 spin rows, 64 complement rows and 2 ping-pong rows. Physical
columns: 100 spin columns plus one unused padding column on each side. The
padding gives edge spins a left and a right capacitor. In all that is
130 × 102 cells.

If `anneal_en` is set, an annealing pass follows the sweep. For each row:

1. The macro raises `an_req`.
2. The host shifts that row's random flip bits (AN) into the scan chain and
   pulses `an_valid`.
3. The row is read. Each bit whose AN bit is 1 takes the write driver's
   inverting path, the others take the straight path. The spin row and
   complement row are rewritten.

How many spins to flip, and how that number falls from sweep to sweep (the
cooling schedule), is left to the host. This keeps the annealing policy open to
change.

## The reference voltage and edge spins

V_REF comes from one more memory column. Its bitline is precharged, then a set
of reference wordlines (`REF_WL<5:0>`) is pulsed. Each pulsed wordline
discharges the bitline by one step per cycle.

The controller sets the reference to the number of neighbours the target
actually has:

| target | neighbours | reference setting |
|--------|------------|-------------------|
| interior | 8 | 4 wordlines for 2 cycles |
| edge | 5 | 5 wordlines for 1 cycle |
| corner | 3 | 3 wordlines for 1 cycle |

Neighbours outside the grid have both wordlines off, so they add no current. The
threshold therefore sits at H_σ = 0 for every spin.

## Ghost cells: one grid over several banks

A spin on the edge of a bank needs neighbours that live in the next bank. Each
bank therefore stores one extra row or column on every side that has a
neighbouring bank. These ghost cells hold a copy of that bank's edge spins. A
bank reads its ghosts like any other neighbour but never updates them. The owner
updates the real spins.

Bank `(bi, bj)` owns an `LR × LC` block of the global grid. It stores
`LR + GT + GB` rows and `LC + GL + GR` columns. `GT`, `GB`, `GL` and `GR` are 1
where a bank lies above, below, left or right. Only the owned window is swept.
With ghost columns, each row's ping-pong row is first loaded with the old row
(one read-and-write cycle). The copy-back then returns the ghost columns
unchanged.

All banks sweep at the same time, each with its own host port. When the slowest
bank has finished (annealing pass included), `ghost_sync` brings the copies up
to date through a parallel row port in each bank:

1. **Columns** (if `BC > 1`). For each owned row, all banks read the row. In the
   next cycle each bank writes it back with its left ghost bit taken from the
   left bank's last owned column, and its right ghost bit from the right bank's
   first owned column. Everything else in the row is rewritten as read.
2. **Rows** (if `BR > 1`). All banks read their first owned row, then their last.
   A bank with a bank above writes that bank's last row into its top ghost row.
   A bank with a bank below writes that bank's first row into its bottom ghost
   row. Rows travel whole, ghost columns included, so the diagonal (corner)
   ghosts are correct too.

The exchange costs `2·LR + 4` cycles per sweep, against about `11·LR·LC` for
the sweep itself. `done` rises when the exchange is complete. With one bank
(the default) the exchange is skipped, and `done` follows the bank's own `done`
by one cycle.

## 2-bit couplings: the nine-cell unit

With 2-bit couplings a spin no longer fits in two cells of two rows. It takes
nine cells stacked in one column:

| cells | content | read wordline |
|-------|---------|---------------|
| 3 | σ | always on (offset) |
| 2 | σ | J bit 1 |
| 1 | σ | J bit 0 |
| 2 | σ̄ | inverted J bit 1 |
| 1 | σ̄ | inverted J bit 0 |

With J = 2·Jb1 + Jb0 (0 to 3), an up-spin conducts through 3 + J cells and a
down-spin through 3 − J. The bitline therefore drops by (3 + J·σ)·VX. Each
neighbour has its own nine cells, so the eight neighbours take eight
computation cycles. Each cycle is sampled onto its own capacitor. The eight
capacitors are then shared, and the mean is compared with V_REF = VDD − 3·VX,
the level of Σ J·σ = 0. An absent neighbour is given J = 0, which draws exactly
the neutral three units.

Six conducting cells would pull a 300 mV-per-cell bitline below zero. The
wordlines are therefore underdriven in this mode, modelled as a 100 mV unit
drop.

`multibit_j_unit` implements this for one target. It holds the eight neighbour
segments, the eight capacitors with their sense amplifier, and a reference
column. It sits beside the banks in the top with its own `mbj_*` ports. The
banks themselves use 1-bit couplings only (see the last section).

## How far the analog parts can be trusted

The array, the capacitor/sense-amplifier bank and the reference column are
behavioural models. They are written in synthesizable SystemVerilog, but they
stand for custom analog circuits:

* **Bitline current** is the count of conducting read ports in a column.
* **Voltages** are integers in millivolts:
  * VDD = 1000 mV;
  * each conducting port pulls its bitline down 300 mV;
  * a reference step is 50 mV;
  * V_REF for an interior spin is therefore 600 mV;
  * a capacitor chain is compared through its sum, so every decision is exact.
* **Not modelled:** sense-amplifier offset, process/voltage/temperature
  spread, saturation of the RBL below 0 V, and eDRAM charge loss.

The real circuit is calibrated (V_REF, wordline underdrive) so that the sign
test is reliable. The model assumes that calibration succeeded. The model also
treats every read cycle as starting from a precharged bitline.

The digital parts are ordinary synthesizable RTL:

* the controller;
* the ghost-cell synchroniser;
* the wordline decoder;
* the J loader;
* the write driver;
* the scan chain;
* the refresh timer.

## Host interface

All signals are synchronous to `clk`. Reset (`rst_n`) is active low and
synchronous. `start`, `anneal_en`, `busy` and `done` are shared by all banks.
Every other host signal is a per-bank array, indexed `b = bi·BC + bj`. In the
default build there is one bank, so each array has one element.

Coordinates:

* `j_row`, `j_col` and `an_row` are global spin coordinates.
* `mem_addr` is the stored row within the bank. Stored row `s` is global row
  `bi·LR − GT + s`.
* Scan bit `t` is global column `bj·LC − GL + t`. The chain is `LC + GL + GR`
  bits long.
* The host writes the initial state into every stored cell, ghost copies
  included. After that the design keeps the copies equal.
* The host must not use `mem_req` while `busy` is high.

| signals | use |
|---------|-----|
| `mbj_seg_we`, `mbj_seg_idx`, `mbj_seg_spin`, `mbj_start`, `mbj_j`, `mbj_busy`, `mbj_done`, `mbj_spin`, `mbj_bl_mv` | The 2-bit J unit. Write the eight neighbour spins, then pulse `mbj_start` with `mbj_j` (J_k = `mbj_j[2k+1:2k]`) held stable. `mbj_done` comes 10 cycles later with the new spin in `mbj_spin`. |
| `mem_req`, `mem_we`, `mem_addr`, `mem_ack` | Normal memory access, one cycle, from idle. A write stores the scan chain contents into spin row `mem_addr` and ~data into its complement row. A read places the row in the read register. `scan_capture` then loads it into the scan chain, ready to shift out. |
| `scan_en`, `scan_in`, `scan_out` | Scan chain, one bit per stored column (100 bits in the default build). Shift the highest bit first. |
| `start`, `anneal_en`, `busy`, `done` | One sweep, with an optional annealing pass. |
| `j_req`, `j_row`, `j_col`, `load_j`, `j_in[1:0]` | The macro asks for the eight J bits of target (`j_row`, `j_col`). Give four `load_j` pulses carrying J1J0, J3J2, J5J4, J7J6. J bit 1 means +1, and absent neighbours may carry any value. |
| `an_req`, `an_row`, `an_valid` | Annealing bits for one row, delivered through the scan chain. |
| `precharge_b`, `rwl_en`, `cs_any`, `sa_fire`, `hsig_start`, `latch_result`, `hsig_done`, `update`, `refresh_busy`, `bank_busy` | Per-bank observation outputs for the phases of a computation. |
| `ghost_busy` | A ghost-exchange row access is taking place. |

The refresh controller asks for a row refresh every `REFRESH_INTERVAL` cycles
(default 1024). A refresh is a read and write-back of a spin row and its
complement, and it is served while the macro is idle. During a sweep every row
is rewritten anyway.

## Files

| file | contents |
|------|----------|
| `rtl/ising_cim_pkg.sv` | constants (neighbour count, voltage scale) and enums |
| `rtl/ising_cim_top.sv` | the top: BR × BC banks and the ghost-cell synchroniser |
| `rtl/ising_cim_macro.sv` | one bank: all per-bank blocks wired together |
| `rtl/multibit_j_unit.sv` | behavioural model of the 2-bit J computation for one target |
| `rtl/ghost_sync.sv` | starts the banks and exchanges ghost rows and columns after each sweep |
| `rtl/cim_controller.sv` | the sequencer: sweep, spin steps, copy-back, annealing, normal access, refresh |
| `rtl/wl_controller.sv` | row decoder that drives J / J̄ per iteration, or one row |
| `rtl/j_loader.sv` | collects the eight J bits from four Load_J pulses |
| `rtl/edram_cim_array.sv` | behavioural model of the 3T1C array |
| `rtl/cs_sa_bank.sv` | behavioural model of the sampling capacitors, CS switches and sense amplifiers |
| `rtl/vref_gen.sv` | behavioural model of the reference column |
| `rtl/write_io.sv` | write driver with the UPDATE and AN (inverting) paths, and the read register |
| `rtl/scan_chain.sv` | serial data path |
| `rtl/refresh_ctrl.sv` | refresh timer |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_ising_cim_macro.sv` | end-to-end test of one bank on a 5 × 7 grid |
| `tb/tb_ising_cim_top.sv` | end-to-end test of 2 × 2 banks (an 8 × 10 grid) |
| `tb/tb_ising_cim_full.sv` | end-to-end test at the default 64 × 100 size |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It
also has a watchdog. For example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
        rtl/ising_cim_pkg.sv tb/tb_ising_cim_full.sv \
        --top-module tb_ising_cim_full -o sim
    ./obj_dir/sim

### What the tests check

* **`tb_ising_cim_macro`** (one bank, 5 × 7 grid) runs a random symmetric ±1 problem through
  three sweeps, one of them with annealing. A host model answers the J and AN
  requests. After each sweep the bench reads the whole grid back through the
  scan chain. It compares the grid with its own reference model of the update
  rule and the flips. It also checks the 5-cycle spin latency. It counts and
  requires each mechanism at least once:
  * interior, edge and corner targets;
  * H = 0 ties;
  * annealing flips;
  * copy-backs;
  * refreshes;
  * normal reads and writes.
* **`tb_ising_cim_top`** runs 2 × 2 banks of 4 × 5 spins as one 8 × 10 grid.
  There is one host model per bank, and they work in parallel. After each of four
  sweeps (two with annealing) the bench reads every stored cell of every bank,
  ghosts included. It compares each cell with a reference model of the whole
  grid. The annealing bits also hit ghost columns, so the exchange must repair
  those copies. It counts:
  * targets whose neighbours lie in another bank;
  * ghost-column and ghost-row writes (it checks their number per sweep);
  * ties, flips, refreshes, reads and writes.
* **`tb_multibit_j_unit`** checks the cell table for each spin and J code
  (bitline at VDD − (3 + J·σ)·VX). It then runs 400 random targets against
  sign(Σ J·σ), with ties and absent neighbours. The top's end-to-end bench also
  runs the unit on 60 random targets.
* **`tb_ghost_sync`** tests the exchange alone against simple bank models on a
  2 × 3 bank grid: every ghost cell, the start and done timing, and the
  `2·LR + 4` cycle cost.
* **`tb_ising_cim_full`** uses the default size, a 64 × 100 max-cut problem. The
  bench computes a two-colour image and sets J = +1 between same-colour
  neighbours and -1 across a colour edge. The ground state is therefore the
  image or its inverse. The bench runs six sweeps with a falling flip rate and
  compares every sweep with the reference model. One run takes about 23 s of
  simulation. The energy fell from about 0 to -20236, against a ground state of
  -25110.
* **Sweep cost:** a sweep of 6400 spins takes 70 659 cycles with this bench's
  host. About 6400 × 11 of those cycles go to J loading and the spin steps. An
  annealing pass adds about 100 cycles per row, most of them to shift the bits
  in.

## Where this RTL departs from, or fills in, the source design

* **Ghost-column timing.** The source copies an updated edge-column spin to the
  neighbouring bank right after it is updated. Here columns are exchanged after
  the sweep, like rows. Every bank then computes the whole sweep from the same
  old state. The read-modify-write of each row is the same.
* **2-bit J.** Code 00 draws the neutral three units for either spin, so it
  counts as J·σ = 0 whatever σ is. Eight separate sampling capacitors, one per
  computation, are this design's choice.
* **Cycle count.** The source quotes 3 computation cycles and 1 update cycle per
  spin. Here a separate compare cycle makes it 3 + 1 + 1.
* **V_REF.** The source uses V_REF = VDD/2. Here it is 600 mV, because of the
  chosen unit discharge. Both are calibration results for their circuit.
* **Source of the J coefficients.** J is streamed in from outside for each
  target. The array is too small to also hold 8 J bits per spin.
* **Own choices.** These are not given by the source:
  * the number of ping-pong rows and the copy-back order;
  * the padding columns;
  * writing the complement row through a complementary write bitline;
  * how edge spins are handled;
  * the refresh interval;
  * all handshakes and the scan-chain details;
  * one host port per bank, and the order of the ghost exchange (columns, then rows).
* **Not built:**
  * A **2-bit J grid**. Only the single-target unit exists. The layout of the
    nine-cell segments across an array is not specified. Neither is how a
    controller would address the eight neighbour segments and write the result
    back. So there is no 2-bit sweep and no 2-bit bank.
  * The **wordline underdrive generator** and the **level shifters**. They are
    analog.
  * The **external host** (FPGA and mapping software). The testbenches play its
    role.
