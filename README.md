# Unified systolic multiplier for band and dense matrices

This is a systolic matrix-multiplication kernel in which one fixed grid of
multiply-add cells computes two kinds of product:

* **band × band** (BMMM): two band matrices of any number of rows, streamed
  through on the classic Kung–Leiserson hexagonal schedule;
* **dense × dense** (GMMM): N × N matrices, one line in and one result row
  out per clock cycle, with products streamed back to back.

The cells never change. The mode only changes the direction in which the
partial sums travel along the diagonals of the grid, plus the small
"peripheral" circuits that place operands on the grid's edges and collect
results from them. Around the kernel sit a reader that rebuilds operand lines
from 256-bit memory words and a writer that packs result rows back into
256-bit words.

Default size: N = `MAT_SIZE` = 16 with 8-bit operands. The grid is then
(2N−1) × (2N−1) = 31 × 31 = 961 cells, and accumulators are 32 bits wide.

## The cell and the grid

Each cell (`klpe`) has inputs A, B and C, and registered outputs A, B and
C' = C + A·B. A and B pass through unchanged. Cell (r, s), with row r and
column s both in 0 … 2N−2:

* takes A from its west neighbour, so A moves **east**;
* takes B from its north neighbour, so B moves **south**;
* takes C from a diagonal neighbour chosen by the mode:
  * **band mode:** from the south-east cell (r+1, s+1), so sums move north-west;
  * **generic mode:** from the north-west cell (r−1, s−1), so sums move south-east.

The operands of a product c(i,j) += a(i,k)·b(k,j) always meet in the same cell:

    r = i − k + N − 1        (A travels along grid row r: diagonal i−k of A)
    s = j − k + N − 1        (B travels along grid column s: diagonal j−k of B)

The term c(i,j) therefore runs along one grid diagonal (s − r = j − i) and
picks up its k terms one after another. The two modes use different
*schedules*, that is, different answers to "on which cycle does (i,j,k)
happen":

| mode    | cycle of (i,j,k)   | C moves    | cells busy     | line rate            |
|---------|--------------------|------------|----------------|----------------------|
| band    | i + j + k + const  | north-west | 1 cycle in 3   | one row every 3 cycles |
| generic | i + j − k + const  | south-east | every cycle    | one line per cycle   |

Both schedules advance every operand and every sum by one cell per cycle.
Only the sign of k differs. So one set of cells and one set of A/B wires
serves both, and only the C multiplexer in each cell changes. Where no
operand is present, the edges are fed zeros, so a sum that passes through an
unused slot collects nothing. This is what allows operations to follow each
other without a gap.

## Band mode (Kung–Leiserson)

**Row format.** A band row has 2N−1 elements and is centred on the main
diagonal. Element e of row i of A is a(i, i+e−(N−1)), and the same holds for
B. Elements outside the matrix are sent as zero. A C row has 4N−3 elements:
element e of row i is c(i, i+e−(2N−2)).

Any A with at most N diagonals on or above the main one, and at most N below
it, fits. The same holds for B. This covers the usual example of A with 3
upper and 2 lower diagonals (band width 4).

**Input dispatch (`bmmm_in_periph`).** One row of A and one row of B enter
together every third cycle. The grid needs a *column* of A on its west edge,
and a column of A spans several rows of A. So the peripheral puts each
element through a delay line whose length depends on its lane:

* A element e goes to west lane 2N−2−e after 2e cycles;
* B element s goes to north lane s after s+N−1 cycles.

These delay lines are the internal buffers that give the grid several rows
at once. With them, a(i,k) and b(k,j) arrive at cell (i−k+N−1, j−k+N−1) on
cycle i+j+k+3N−2, counted from the first row pair.

**Output collection (`bmmm_out_periph`).** A finished c(i,j) leaves the grid
at the north edge (column j−i) when j ≥ i, and at the west edge (row i−j)
when j < i. Delay lines of 2N−2−d cycles (north) and 2N−2+2|d| cycles (west)
line all 4N−3 elements of row i up on the same cycle.

**Timing.** Row i of C appears 6N−3 cycles after row pair i was accepted.
Operations may follow each other directly. The zero padding makes two
consecutive operations look like one block-diagonal matrix, so no terms
cross between them.

## Generic mode (rerouted diagonals)

An operation is N input lines. Line i carries **row i of A** and
**column i of B**, so B is stored transposed. Each line is taken in one
cycle.

**Input steering (`gmmm_in_periph`).** Element k of line i goes to lane
i−k+N−1, on the west edge for A and on the north edge for B. All other lanes
get zero. Which lanes are used shifts by one with every line: a rotating
multiplexer, then a register.

**Output steering and delay blocks (`gmmm_out_periph`).** The sum c(i,j) runs
south-east and is complete in cell (i+N−1, j+N−1). From there it keeps moving
to the edge:

* if j ≥ i, it leaves the east edge at row 2N−2−(j−i), on cycle T+i;
* if j < i, it leaves the south edge at column 2N−2−(i−j), on cycle T+j,
  which is i−j cycles early.

Delay blocks of 1 … N−1 cycles on south columns N−1 … 2N−3 hold these early
values back. Row i is then complete on cycle T+i. A multiplexer driven by
the row index gathers it, and a register presents it.

**Timing.** Row i of C appears 2N+1 cycles after line i. Lines and result
rows both move at one per cycle, so an N × N product takes N cycles of
throughput (16 cycles at N = 16). The grid works on up to three products
at once.

## Kernel control (`ummm_kernel`)

The grid, both sets of peripherals and a *tag pipeline* all move on one
enable. The tag pipeline is a shift register that carries, for each line
accepted, its valid bit, row index and last-row flag. It is tapped at the
cycle where the matching result row is gathered (tap 2N−1 in generic mode,
6N−5 in band mode), so the peripherals know when and which row to present.

* **Stall.** The enable drops when:
  * a result row is waiting and not taken, or
  * an operation has started and its next line is missing.

  Inside an operation the lines must stay in step, so the whole kernel
  freezes.
* **Bubble.** Between operations the kernel keeps running with zero lines, so
  the last results drain out without further input.
* **Band slots.** In band mode lines are accepted only on every third cycle.
  The cycles in between are bubbles.
* **Mode switch.** If `opmode` differs from the current mode at an operation
  boundary, the kernel stops taking lines. It then runs bubbles until every
  register of the data path has flushed (`6N−4 + 4(2N−1)` idle cycles and an
  empty output register), and only then switches the diagonal multiplexers.
  An assertion checks that the mode never changes otherwise.
* **Output register.** If a row is taken while the kernel is stalled for
  input, the output register is emptied without moving the grid.
* **Stall counter.** While the kernel has work, `stall_counter` counts busy
  cycles, stalled cycles and accepted lines. lines / cycles is the running
  rate, and stalls / cycles is the stalled share.

## Memory side

`chunk_reader` turns 256-bit memory words ("chunks") into lines. An operand
matrix is `n_vecs` vectors of `vec_len` elements, packed back to back with
element 0 in the lowest bits. A vector may straddle two chunks. The matrix
starts on a chunk boundary. The reader keeps a bit buffer and loads exactly
the chunks of one matrix. It hands out a vector whenever enough bits are
present, and after the last vector it drops the padding. `chunk_writer` does
the reverse: it packs rows of 32-bit results and sends a zero-padded final
chunk flagged `c_last`.

`ummm_system` (the top) connects:

* two readers, for A and B, whose vectors are handed over together;
* the kernel;
* one writer.

Vector lengths follow the mode:

| mode    | A, B line               | C row                    |
|---------|-------------------------|--------------------------|
| generic | N elements (8 bit)      | N elements (32 bit)      |
| band    | 2N−1 elements (8 bit)   | 4N−3 elements (32 bit)   |

**Rates of the whole system.** The writer sends one chunk per cycle. In
generic mode at N = 16, one result row is 16 × 32 = 512 bits, which is two
chunks. So end to end a product takes 32 cycles, and the kernel, which could
take 16, stalls half the time on output. The writer takes the first row of
the next product in the same cycle that the last chunk of the previous one
leaves, so streamed products cost 32 cycles each with no gap. In band mode a
C row is 61 × 32 bits, 7.6 chunks, so the writer again sets the pace. A
wider memory port or narrower results would raise both rates up to the
kernel's own.

### Top-level ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `opmode` | in | `opmode_e` | `OP_GMMM` (0) or `OP_BMMM` (1); hold for a whole operation |
| `mat_n` | in | 16 | rows of a band operation; hold for a whole operation |
| `cur_mode` | out | `opmode_e` | mode the grid is currently wired for |
| `a_valid/a_ready/a_data` | in/out/in | 1/1/256 | A chunks |
| `b_valid/b_ready/b_data` | in/out/in | 1/1/256 | B chunks (generic mode: B transposed) |
| `c_valid/c_ready/c_last/c_data` | out/in/out/out | 1/1/1/256 | C chunks |
| `cnt_clear` | in | 1 | clear the stall counter |
| `cnt_cycles/cnt_stalls/cnt_lines` | out | 32 each | stall counter |

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `MAT_SIZE` | 16 | N; the grid is (2N−1)² cells |
| `DATA_WIDTH` | 8 | operand width |
| `ACC_WIDTH` | 32 | accumulator and result width |
| `CHUNK_WIDTH` | 256 | memory word width |
| `N_WIDTH` | 16 | width of `mat_n` |

At the defaults the design has about 144,000 flip-flop bits. Most of them
are the 961 cells and the output delay lines of band mode.

## Where this design makes its own choices

The kernel follows a published architecture. The cell function, the
(2N−1)² grid, the Kung–Leiserson band array, the rerouting of the diagonal
paths by an opmode, the one-line-per-cycle dense rate, three cycles per band
line, the 256-bit chunks, the stall counter and the defaults N = 16 and
8-bit data all come from that source. The following are this design's own:

* **Generic-mode dataflow.** Sums move south-east and the delay blocks sit at
  the output. The source names the rerouting and the delay blocks but not
  their exact wiring; the dataflow here is derived from the cell and rate
  constraints.
* **Band row format.** The layout is fixed and centred on the main diagonal.
  Bands with more than N diagonals on one side are not accepted, even when
  their total width is at most 2N−1: for example, 1 upper and 2N−1 lower
  diagonals. A format that positions the band by its upper width would lift
  this limit, at the cost of a programmable offset between the A and B
  streams.
* **Generic-mode B order.** B is sent column by column.
* **Arithmetic.** Arithmetic is unsigned with 32-bit wrap-around
  accumulators.
* **Flow control and memory layout.** The valid/ready handshakes, the global
  stall enable, the bubble and drain rules, the tag pipeline, the memory
  layout and the reader/writer buffers are all this design's.
* **Reader and writer in RTL.** In the source, the reader and writer are
  high-level-synthesis code inside a wrapper. Here they are RTL, and the
  wrapper's host control (addressing, launch) is not included; its streams
  are the top's ports.
* **Stall counter scope.** The stall counter counts in both modes, not only
  in generic mode.

The source reports results for `MAT_SIZE` 4, 8, 16 and 32. Any of them is a
parameter setting. A smaller dense product also runs on the default build
when zero padded to 16 × 16.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and each has a cycle watchdog.

* `tb_klpe`, `tb_delay_line`, `tb_stall_counter` use random stimulus against
  an exact model.
* `tb_ummm_array` drives the bare grid edges in both modes. It checks every
  result on the edge and the cycle predicted above.
* The peripheral testbenches check lane mapping and delay lengths with random
  data, random enables and random take-while-stalled.
* `tb_chunk_reader`, `tb_chunk_writer` use random vector lengths and counts,
  random gaps and back-pressure, straddling vectors and padded chunks.
* `tb_ummm_kernel` (N = 4) runs generic and band products against a triple
  loop:
  * latency checks: exactly 2N+1 and 6N−3 cycles;
  * rate checks: 1 and 3 cycles per line;
  * a band example with 3 upper and 2 lower diagonals;
  * a random mix with gaps and back-pressure. Starvation stalls, output
    stalls, bubbles and mode switches must all happen, and the stall counter
    must match the stalls seen by the bench.
* `tb_ummm_system` (N = 8) runs 30 random operations end to end through
  memory chunks and compares every result chunk. Starvation stalls, output
  stalls, bubbles, mode switches, straddling vectors and padded chunks must
  all occur.
* `tb_ummm_workloads` runs the top at its default parameters on two full
  evaluation workloads, checking every chunk and the run time:
  * 1000 streamed 16 × 16 products: measured 32.04 cycles per product;
  * one 1000-row band product with 16 diagonals on each side: 7625 result
    chunks in 7894 cycles.
* `tb_ummm_system_full` runs the top at its default parameters (31 × 31
  grid): a 16 × 16 product, a 40-row band product and another 16 × 16
  product, with two mode switches.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/ummm_pkg.sv tb/tb_ummm_kernel.sv --top-module tb_ummm_kernel
    ./obj_dir/Vtb_ummm_kernel

The two full-size benches take up to a minute each to compile and about a second to run.

What has not been checked: timing closure, any synthesis result beyond
generic coarse synthesis, and products large enough to wrap the 32-bit
accumulators (the benches use 8-bit data, where no wrap can occur).

## Files

| file | contents |
|------|----------|
| `rtl/ummm_pkg.sv` | opmode type, band slot length, chunk width |
| `rtl/klpe.sv` | multiply-add cell |
| `rtl/delay_line.sv` | delay block |
| `rtl/ummm_array.sv` | the (2N−1)² grid with mode-switched diagonals |
| `rtl/gmmm_in_periph.sv`, `rtl/gmmm_out_periph.sv` | generic-mode steering and delay blocks |
| `rtl/bmmm_in_periph.sv`, `rtl/bmmm_out_periph.sv` | band-mode dispatch and collection |
| `rtl/stall_counter.sv` | running-rate counters |
| `rtl/ummm_kernel.sv` | kernel: grid, peripherals, control |
| `rtl/chunk_reader.sv`, `rtl/chunk_writer.sv` | 256-bit memory word ↔ line conversion |
| `rtl/ummm_system.sv` | top |
| `tb/tb_*.sv` | one testbench per module, plus `tb_ummm_system_full` and `tb_ummm_workloads` |
