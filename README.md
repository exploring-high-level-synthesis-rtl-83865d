# Streaming stencil accelerators: Laplace/Sobel on HBM, FHP lattice gas, D2Q9 lattice Boltzmann

A stencil computation updates every cell of a grid from a small neighbourhood
of cells, and repeats that for many time steps. On an FPGA the cost is almost
never the arithmetic. It is getting each cell from external memory once and
keeping its neighbours on chip until every cell that needs them has been
computed. This RTL is built around one answer to that problem:

* The grid **streams** through the device in a fixed order, one wide word per
  clock cycle. A word is a *tile* of cells.
* A **processing element (PE)** holds just enough of the stream to see the
  complete neighbourhood of one tile: two rows in FIFOs plus a few registers.
  It computes one time step of that tile per cycle.
* PEs are **chained**. PE *i* computes time step *t+i* from the output of PE
  *i-1*, so one pass through memory advances the simulation by `NPE` steps.
  This is temporal parallelism. The tile width is spatial parallelism.
  Memory traffic depends only on the tile width, not on the number of PEs.

Three designs share this structure and sit side by side in `stencil_top`:

| design | module | cells | per-cell update | default size |
|---|---|---|---|---|
| general stencil on HBM | `stencil_accel` | 32-bit integers | 4-point Laplace (Jacobi) or Sobel edge filter | 16384 x 16384, 64 cells per tile, 4 PEs, 4 memory channels |
| lattice gas (FHP) | `lgca_accel` | 7 bits per hexagonal site | collision + propagation | 2048 x 4096, 48 sites per word, 12 PEs |
| lattice Boltzmann (D2Q9, BGK) | `lbm_accel` | 9 distributions per site, Q8.24 fixed point | streaming + collision | 1024 x 2048, 2 sites per word, 10 PEs |

Only the stencil design has its memory side. It has AXI3 burst masters for
HBM pseudo-channels, and wide-word split and merge logic. The lattice gas and
Boltzmann designs are given from the stream inwards: grids enter and leave
through valid/ready ports.

## Stream order and the custom buffer (`stencil_window`)

This is the part to understand first. Every PE in all three designs uses it.

The grid has `COLS` columns. It is cut into **bands** of `PY` rows, and each
band into **tiles** of `PY` x `PX` cells. There are `WPR = ceil(COLS/PX)` tiles
per band. Tiles arrive band by band, left to right within a band. A tile
extending past the right edge of the grid is allowed. Its extra cells are
ignored on input and returned as zeros.

To compute tile *t* the PE needs a (PY+2) x (PX+2) **window**: the tile, the
row above it, the row below it, one column on each side, and the corners.
The row below lives in the next band, so tile *t* can only be finished after
tile *t + WPR* has arrived. The buffer holds exactly what spans that gap:

* **band FIFO**, `WPR` tiles deep. Each incoming tile is pushed. The tile at the
  head is the one directly above the incoming tile, one band back. That is the
  *centre* tile, the tile being finished.
* **up FIFO**, `WPR` rows of `PX` cells. It takes the bottom row of every
  centre tile and gives it back one band later as the row *above* the next
  band's centre tile.
* **registers**. Each cycle the buffer forms a column stack: the up row, the
  centre tile, and the top row of the incoming tile, which is the row below.
  The window register is filled from the previous stack (its `PX` middle
  columns), the last column of the stack before that (left neighbour column),
  and the first column of the current stack (right neighbour column).

A FIFO pops only when it is full, so on-chip storage is `(PY+1) * COLS` cells
plus O(PX*PY) registers. For PY = 1 that is two grid rows. This is why deep
PE chains are cheap: each extra time step costs two rows of memory.

**Timing.** The window produced by shift *k* belongs to tile *k - WPR - 1*.
After the last tile of a grid, a PE feeds itself `WPR + 1` zero tiles
(**flush**) so the tail of the grid comes out. The next grid can follow with
no reset. One grid of `T = WPR * ceil(ROWS/PY)` tiles takes `T + WPR + 1`
cycles through a PE at full rate.

**Edges.** Window positions outside the grid hold stale data: the previous
band's tail, or the next grid's head. The PE knows the global coordinates of
the tile it is finishing and masks those positions. Stencil PEs replace them
with zero (fixed zero boundary). The lattice PEs use them to apply
reflecting walls.

## The stencil PE and its computing units

`stencil_pe` wraps the buffer with a step counter and a valid/ready handshake
on both sides. Flow control is one rule. The window register advances when it
is empty or its output is being taken. It takes an input tile at the same
moment, except while flushing. The outputs are all-zero outside the grid.

The computing unit sits between the window and the output. It is purely
combinational, and `PX * PY` cells are produced per cycle:

* **`laplace_cu`**: `out = (N + S + W + E) / 4`. The division is an arithmetic
  shift, rounding toward minus infinity, on a sum two bits wider than the
  data. Adders are shared across the tile. The pair sum `left + below` of
  cell (r, c) is also the `above + right` pair of cell (r+1, c-1). Each cell
  then needs one pair plus one addition instead of three additions. With
  tiles more than one row high (`PY > 1`) this saves about a third of the
  adders. With `PY = 1` the count is the same as the plain form.
* **`sobel_cu`**: `|Gx| + |Gy|` of the 3x3 Sobel masks on unsigned pixels,
  saturated to the pixel range. The smoothed column sums `a + 2b + c` are
  formed once per window column. Each serves the two cells on either side.
  The smoothed row sums are shared in the same way between the cells above
  and below.

## The HBM stencil accelerator (`stencil_accel`)

```
 HBM ch 0..NCH-1     burst_reader x NCH  ->  data_distributor  ->  PE0 -> [ping/pong] -> PE1 -> ... -> PE(NPE-1)
   (AXI3)                                                                                               |
 HBM ch 0..NCH-1  <- burst_writer x NCH  <-  data_collector  <------------------------------------------+
```

**Memory layout.** The grid is stored in memory in stream order: tile after
tile, each tile row-major. A whole grid is therefore one contiguous address
range, and a pass is nothing but long bursts. The `NCH` channels work in
lock step as one wide memory of `NCH * MEM_W` bits. Channel *c* holds bits
`[c*MEM_W +: MEM_W]` of every wide word, at the same word address in every
channel. With the defaults, 4 x 512 = 2048 bits = 64 cells of 32 bits per
cycle. That equals one 64 x 1 tile, so the memory and the PEs run at the same
rate.

**Burst masters.** `burst_reader` issues read bursts of up to `BURST` (16)
beats, the AXI3 limit, from `base` upward. The last burst is shorter when
the length is not a multiple of 16. At most `MAX_OUT` bursts may be
outstanding. Data beats go straight to the stream, so stream back-pressure
becomes R-channel back-pressure. `burst_writer` issues a write address only
once it can supply the data. It drives `w_last` on the last beat of each
burst and counts B responses. Its `done` signal rises after the final
response. Both keep `done` high until the next `start`.

**Gather and scatter.** The reader outputs of all channels are joined into
one wide word. The join advances only when every channel has a beat and the
distributor is ready, so a slow channel stalls all of them. On the write
side a collector word is handed to all writers in the same cycle, once
every writer can accept its slice.

**`data_distributor` / `data_collector`** convert between the wide memory word
and the PE word when they differ, for example 2048-bit memory words and
512-bit PE words. The distributor hands out slices least significant first.
It accepts the next wide word in the same cycle as the last slice leaves.
The collector fills slots in the same order and emits when the last slot is
written. Both keep one word per cycle in steady state.

**PE links.** Consecutive PEs are joined by a **ping/pong FIFO pair**
(`pingpong_fifo`). Words are written alternately into the Ping and Pong FIFO
and read back in the same alternation, so order is preserved. Each FIFO sees
a new word only every other cycle.

**Running a pass.** Set `src_base` and `dst_base` per channel, as byte
addresses, and pulse `start`. The accelerator reads
`NBEATS = WPR * bands * PX*PY*DW / (NCH*MEM_W)` words per channel. It writes
the same number of words to `dst_base` and raises `done` after the last write
response. That is `NPE` time steps. For more steps, run again with the two
regions swapped. The grid must fill whole wide words; an assertion checks
this.

## Lattice gas (FHP) accelerator (`lgca_pkg`, `lgca_collision`, `lgca_pe`, `lgca_accel`)

**Site encoding.** A site of the hexagonal lattice holds up to seven particles.
There is one at rest (bit 0) and one for each of six directions (bits 1..6).
Bit 1 is up-left, then clockwise: 2 up-right, 3 right, 4 down-right,
5 down-left, 6 left. "Up" is +y. The hexagonal lattice is stored as a square
array in which odd rows sit half a site to the right. The neighbour offsets
(`nb_dx`, `nb_dy`) therefore depend on the row parity.

**Bit-sliced groups.** A stream word carries `G` neighbouring sites of one
row. The word is stored *plane by plane*: seven G-bit vectors, one per
direction. The collision rule is pure bit logic per site, so one wide word
runs `G` independent copies of it side by side. This is the
vectorisation that makes 48 sites per cycle cheap.

**Collision** (`fhp_collide`). Every rule keeps particle count and momentum:

| before | after |
|---|---|
| head-on pair {i, i+3} | {i+1, i+4} or {i-1, i+2}, chosen by the chirality bit |
| head-on pair + rest particle | same as above, rest particle kept |
| symmetric triple {i, i+2, i+4} | {i+1, i+3, i+5} |
| two particles at 120 degrees {i-1, i+1} | rest particle + {i} |
| rest particle + {i} | {i-1, i+1} |
| head-on pair + spectator {i, i-1, i+2} | {i, i+1, i-2} or rest + {i-1, i+1}, chosen by the chirality bit |
| mirror image {i, i+1, i-2} | {i, i-1, i+2} or rest + {i-1, i+1}, chosen by the chirality bit |

The chirality bit is a hash of (x, y, time step). Each PE computes it
locally, so results are reproducible and independent of how many PEs are
chained. PE *i* of the chain uses step `base_step + i`.

**PE.** A PE collides the incoming group. It puts the collided sites through
the custom buffer, with one-row tiles of `G` sites and 7-bit cells. It then
**propagates by pulling**: the particle arriving at a site along direction
*i* is read from the neighbour in the opposite direction. Neighbours across
a group boundary come from the window's side columns. The grid edge is a
**reflecting wall**. A particle whose source lies outside the grid is
replaced by the site's own particle heading the opposite way, so mass is
conserved exactly.

## Lattice Boltzmann accelerator (`lbm_cu`, `lbm_pe`, `lbm_accel`)

**Computing unit.** For one site, `lbm_cu` does all of the following:

* Pulls the nine distributions from its 3x3 neighbourhood. It uses
  bounce-back for sources outside the grid.
* Forms the density `rho` and the velocity `u = (sum f_i e_i) / rho`. This
  takes two dividers.
* Evaluates the second-order equilibrium
  `feq_i = w_i rho (1 + 3 e_i.u + 4.5 (e_i.u)^2 - 1.5 u.u)`.
* Relaxes: `f_i' = f_i + omega (feq_i - f_i)`, where `omega = 1/tau`.

Direction order: 0 rest, 1 +x, 2 +y, 3 -x, 4 -y, 5 (+1,+1), 6 (-1,+1),
7 (-1,-1), 8 (+1,-1). Weights are 4/9, 1/9 and 1/36. Numbers are FW-bit
signed fixed point with FRAC fraction bits (Q8.24). Products use 64 bits and
are truncated after each multiplication. The default `OMEGA` is 1/0.6.

**PE.** `NCU` sites of a row form one stream word. All `NCU` units read from
**one** shared buffer whose window is `NCU + 2` sites wide. Neighbouring
units therefore share registers instead of each unit having a 3x3 copy. With
2 units per PE the buffer cost per time step stays at two grid rows. Two
single-unit PEs would need four rows for the same throughput.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `ST_COLS`, `ST_ROWS` | 16384, 16384 | stencil grid |
| `ST_PX`, `ST_PY` | 64, 1 | tile width and height (cells per PE per cycle) |
| `ST_NPE` | 4 | chained stencil PEs (time steps per pass) |
| `ST_NCH`, `ST_MEM_W`, `ST_BURST` | 4, 512, 16 | memory channels, channel width, AXI3 burst length |
| `ST_DW`, `ST_KERNEL` | 32, `KERN_LAPLACE` | cell width, computing unit (`KERN_SOBEL` for the edge filter) |
| `LG_COLS`, `LG_ROWS`, `LG_G`, `LG_NPE` | 2048, 4096, 48, 12 | lattice gas grid, sites per word, PEs |
| `LB_COLS`, `LB_ROWS`, `LB_NCU`, `LB_NPE` | 1024, 2048, 2, 10 | Boltzmann grid, units per PE, PEs |
| `LB_FW`, `LB_FRAC`, `LB_OMEGA` | 32, 24, 27962027 | fixed-point width, fraction bits, 1/tau in that format |
| `PP_DEPTH` | 2 | depth of each Ping and Pong FIFO |

Rates at the defaults, one word per cycle:

* Laplace: 64 cells per cycle per PE. Each pass moves 2048 bits per cycle in
  each direction.
* Lattice gas: 48 sites x 12 steps per cycle.
* Boltzmann: 2 sites x 10 steps per cycle.

On-chip buffering per PE is two grid rows:

* Laplace: 2 x 16384 x 32 bit = 1 Mbit.
* Lattice gas: 2 x 2048 x 7 bit = 28 Kbit.
* Boltzmann: 2 x 1024 x 288 bit = 590 Kbit.

## How this departs from the published design

* **Number formats.** The original designs compute in single-precision
  floating point. Here the Laplace and Sobel units are integer: the Laplace
  divide-by-four is an arithmetic shift. The Boltzmann unit uses Q8.24 fixed
  point with 64-bit intermediates. `tau` (0.6) is this design's choice.
* **Collision table.** The original lattice gas design uses the full FHP-III
  rule set of 76 collision cases. Only the rule classes listed above are
  implemented. Any other state passes unchanged. Adding the remaining cases
  means only adding rows to `fhp_collide`; every PE and the chirality
  mechanism stay as they are.
* **Boundaries.** The stencil kernels use a fixed zero boundary. The lattice
  designs use reflecting (bounce-back) walls on all four sides. The original
  only says that a boundary check is made.
* **Memory for the lattice designs.** The lattice gas and Boltzmann
  accelerators originally read and wrote two DDR4 banks. Here they end at
  stream ports. `burst_reader` / `burst_writer` can be reused for that side.
* **Not built.** The 3D Himeno benchmark, because its stencil and plane
  buffer are not specified. The HBM stack, the DDR4 devices and the host/PCIe
  side are outside the RTL. Simulation uses a behavioural AXI3 memory model
  (`tb/hbm_axi_model.sv`) instead.
* **Own choices** throughout:
  * valid/ready handshakes;
  * reset behaviour (synchronous, active low);
  * the tile-order memory layout;
  * the channel-to-bit mapping;
  * the chirality hash;
  * the shared-sum formulations inside the computing units;
  * flushing between grids so PEs need no reset per grid.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
one compares against a reference computed inside the testbench and prints
`TB_RESULT checks=N failures=M`:

* **Stencil:** Jacobi steps with zero padding, and the Sobel formula, are
  computed directly from the grid.
* **Lattice gas:** the reference has its own rule list, written with
  direction arithmetic, and its own neighbour tables. It checks mass and
  momentum conservation over all 256 (state, chirality) inputs.
* **Boltzmann:** a double-precision BGK reference with a tolerance of a few
  1e-6.

The tests use the following:

* random input gaps and output back-pressure;
* random stalls on every AXI channel;
* grids whose width is not a multiple of the tile;
* partial last bursts;
* back-to-back grids and repeated passes.

Where a rate is defined, the cycle count is checked. A PE must deliver one
word per cycle with a latency of `WPR + 1` words, and a PE chain must deliver
a grid in `T` consecutive cycles.

`tb_stencil_top` runs all three accelerators at once at small sizes. The
stencil design runs on a 16 x 6 grid with 4 x 2 tiles, 2 PEs and 2 channels.
The lattice gas design runs on 10 x 5 with 3 PEs. The Boltzmann design runs
on 5 x 4 with 2 PEs. The test counts each of these mechanisms and fails if
any never occurs:

* memory stalls;
* partial bursts;
* second-channel traffic;
* Ping/Pong alternation in each design;
* PE flush;
* stream back-pressure;
* grid-edge cells;
* FHP collisions;
* bounce-back;
* partial groups;
* an accelerator restart.

The largest configuration simulated end to end is that one. No simulation
at the full default sizes is provided. A single Laplace pass at 16384 x 16384
is 4.2 million PE cycles through a 2048-bit data path. A trial run of the
whole top at its defaults used generated memory contents and references
computed only near edges and seeded regions. It had not finished after ten
minutes of simulation. At the full defaults
the whole top is also slow to synthesize: several minutes in yosys, mostly
for the twenty 64-bit fixed-point Boltzmann units and the 48-site lattice
gas groups.

To run a test with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --top-module tb_stencil_top -Irtl -y rtl -y tb \
    rtl/stencil_pkg.sv rtl/lgca_pkg.sv tb/tb_stencil_top.sv -o sim
./obj_dir/sim
```

Replace `tb_stencil_top` with any other `tb_<module>`. Testbenches set their
own small parameters. To change a size, edit the `localparam`s at the top of
the testbench. The reference models there follow automatically.

## Files

* `rtl/stencil_pkg.sv`: kernel enum, AXI3/HBM constants.
* `rtl/lgca_pkg.sv`: site type, directions, neighbour offsets, collision
  rules, chirality hash.
* `rtl/stencil_top.sv`: the three accelerators side by side.
* `rtl/stencil_accel.sv`, `burst_reader.sv`, `burst_writer.sv`,
  `data_distributor.sv`, `data_collector.sv`: the memory side of the stencil
  design.
* `rtl/stencil_pe.sv`, `stencil_window.sv`, `laplace_cu.sv`, `sobel_cu.sv`:
  the stencil PE.
* `rtl/sync_fifo.sv`, `pingpong_fifo.sv`: FIFOs for buffers and PE links.
* `rtl/lgca_collision.sv`, `lgca_pe.sv`, `lgca_accel.sv`: lattice gas.
* `rtl/lbm_cu.sv`, `lbm_pe.sv`, `lbm_accel.sv`: lattice Boltzmann.
* `tb/tb_*.sv`: one testbench per module.
* `tb/hbm_axi_model.sv`: behavioural AXI3 memory channel.
