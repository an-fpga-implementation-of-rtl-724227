# 3-D FDTD field compute engine

This is a hardware engine for the two curl updates of the finite-difference
time-domain (FDTD) method on a 3-D Yee grid, in single-precision floating
point. The field arrays live in DDR2 memory. A host program cuts the volume
into slabs along its longest axis (y). For each slab the engine:

1. reads all six field components (Ex, Ey, Ez, Hx, Hy, Hz) over six memory
   channels into six on-chip dual-port RAM banks;
2. streams the operands of every cell out of the banks into three pipelined
   update cores, one per component (x, y, z);
3. writes the three updated components back to DDR2 over three of the
   channels while the cores are still running.

One run updates either E (from H) or H (from E). A time step is an E pass
over all slabs followed by an H pass. The engine needs no more logic as
the volume grows: a bigger volume only means more slabs. The design follows
a published FPGA implementation (Virtex-4 FX60, 100 MHz core clock, PowerPC
host). The list under *Departures and open points* says where this RTL
differs from it.

## The update

For the E pass, with the coefficient pair (C1, C2) of each component:

```
Ex' = Ex + C1*(Hz[i,j+1,k] - Hz[i,j,k]) - C2*(Hy[i,j,k+1] - Hy[i,j,k])
Ey' = Ey + C3*(Hx[i,j,k+1] - Hx[i,j,k]) - C4*(Hz[i+1,j,k] - Hz[i,j,k])
Ez' = Ez + C5*(Hy[i+1,j,k] - Hy[i,j,k]) - C6*(Hx[i,j+1,k] - Hx[i,j,k])
```

The H pass uses the same three cores with the roles swapped and backward
differences:

```
Hx' = Hx + C1*(Ey[i,j,k] - Ey[i,j,k-1]) - C2*(Ez[i,j,k] - Ez[i,j-1,k])
Hy' = Hy + C3*(Ez[i,j,k] - Ez[i-1,j,k]) - C4*(Ex[i,j,k] - Ex[i,j,k-1])
Hz' = Hz + C5*(Ex[i,j,k] - Ex[i,j-1,k]) - C6*(Ey[i,j,k] - Ey[i-1,j,k])
```

Each core therefore computes `F + C1*(a-b) - C2*(c-d)` from five streamed
words (F, a, b, c, d) and two coefficients held in registers. The
coefficients are inputs of the engine (`coef[0..5]`). They are constant for
a run, so a run covers a region of uniform material. The host scales them
for E or H (for example dt/(eps*dy)), and may change them between slabs.

## Slabs, overlap and the boundary rule

A slab is `ipts x djpts x kpts` cells: the full x and z extent of the volume
and a few planes along y. Each field array is stored in memory as
32-bit words in the order `n = (j*kpts + k)*ipts + i`, so a slab is one
contiguous range of each array. The host gives the byte address of its
first word for each of the six arrays. One bank holds 16384 words (64 KB),
so a slab may hold at most 16384 cells.

The E update of a cell needs H at i+1, j+1 and k+1. The H update needs E
at i-1, j-1 and k-1. Neighbours outside the slab are not available, so the
engine applies a fixed rule:

* in the E pass, every cell on the last plane along i, j or k is **held**;
* in the H pass, every cell on the first plane along i, j or k is held.

A held cell has all three of its components written back unchanged. The
engine does this by reading the cell itself in place of the missing
neighbour, so both differences are zero.

Consecutive slabs overlap by one plane. The shared plane is the last plane
of slab b and the first plane of slab b+1. In the E pass it is held in slab
b and computed in slab b+1. In the H pass it is computed in slab b and held
in slab b+1. Either way, each plane is updated exactly once, by the slab
that has all of its neighbours. This is why the rule holds all three
components and not only those whose neighbour is missing: Ey on the last y
plane has all its neighbours, but computing it there would update that plane
twice. At the faces of the whole volume the same rule holds the
outermost E planes (far faces) and H planes (near faces). Any other
boundary condition (absorbing layers, sources, ports) is left to the host.

Example: a volume of 101 x 301 x 51 cells has 5151 cells per x-z plane.
Three planes (15,453 cells) fit in a slab, and with a one-plane overlap each
slab advances by two planes, giving 150 slabs per pass. The NPI beats are 8
bytes, so each slab's base address must be a multiple of 8. Here it is,
since the slab offset is an even number of planes. When a slab has an odd
cell count, the last beat is written with only its lower half enabled, so
the first word of the next slab is not touched.

## Data path

```
 DDR2 ==6 NPI channels== control_logic --6 x diff_fifo--> write_logic --> 6 x bram_bank
   ^     (200 MHz, 64 b)   (sequencer)    (64b@200 MHz ->   (sequential      (16384 x 32,
   |                                        32b@100 MHz)      fill)            2 ports)
   |                                                                              |
   |                                                                         read_logic
   |                                                                     (2 clocks / cell)
   |                                                                    /      |       \
   +==3 NPI channels== control_logic <-- output FIFOs <-- field_compute_core x3 (x, y, z)
         (write-back, 2 results per 64-bit beat)         (5 operand FIFOs, sub, mul, sub, add)
```

| module | role |
|---|---|
| `fdtd_compute_engine` | top level: wiring, clock-domain crossing of the phase, clock gates |
| `control_logic` | load / compute sequencer, all six memory channels, write-back packing, done/irq |
| `diff_fifo` | per channel: 64-bit words in at 200 MHz, 32-bit words out at 100 MHz, 32 deep |
| `async_fifo` | dual-clock FIFO with Gray-coded pointers (inside `diff_fifo` and the cores) |
| `write_logic` | moves the six FIFO streams into the banks at one word per bank per clock |
| `bram_bank` | 16384 x 32 true dual-port RAM, one-clock read latency |
| `read_logic` | walks the slab cell by cell and feeds the three cores |
| `field_compute_core` | operand FIFOs, `F + C1*(a-b) - C2*(c-d)` pipeline, dual-clock output FIFO |
| `fp32_add`, `fp32_mul` | binary32 adder/subtractor and multiplier, one register stage each |
| `sync_fifo` | single-clock first-word-fall-through FIFO (operand FIFOs) |
| `clock_gate` | enable latched on the falling edge, ANDed with the clock |
| `fdtd_pkg` | sizes, field and mode encodings, operand and geometry structs |

## The two-clock read schedule

This is the least obvious part of the design. Updating the three components
of one cell needs twelve different words:

* the three old values of the updated field;
* the three components of the other field at the cell (each is used by two
  equations);
* six neighbours of the other field (two per equation).

The six banks have twelve ports in all, which looks like enough for one
cell per clock. But the nine source words come from only three banks: each
source component is needed at the cell and at two different neighbours,
three words from a bank with two ports. The banks of the updated field have
ports to spare but nothing to read on them. The engine therefore takes two
clocks per cell:

| | port 0 of every bank | port 1 |
|---|---|---|
| clock A | cell n: target x old value, source x, y, z | source z at the j neighbour, source y at the k neighbour, source x at the j neighbour |
| clock B | cell n: target y, z old values, source x, y, z | source x at the k neighbour, source z at the i neighbour, source y at the i neighbour |

Core I (x) gets its five words from clock A. Cores II and III get theirs
from clock B. Core III also uses the source-x pair read in clock A, kept in
a register. So core I works while cores II and III wait, and then the two
of them work together. This matches the description of the original design.
In the H pass the banks and neighbour directions swap (source is E,
neighbours at -1), and the operand order inside each pair changes so that
every core still forms `a - b` with the correct sign.

Pushes into the cores are made only when every core's operand FIFO has at
least three free entries, so a write-back stall that backs up one core
stalls the scan (`room` in `read_logic`) and no word is lost. The
cell-by-cell scan uses counters (i, k, j) and the linear address n. The
neighbour addresses are n ± 1, n ± ipts and n ± ipts*kpts.

## Field compute core

Five 32-entry operand FIFOs feed the pipeline. An update starts when all
five have a word and the output FIFO is sure to have room for it, counting
the updates already in flight. The pipeline is:

1. two subtractors: `a-b`, `c-d`
2. two multipliers: `C1*(a-b)`, `C2*(c-d)`
3. one subtractor: the difference of the two products
4. one adder: plus the old value F, which is delayed alongside

Each step is one register stage. A word pushed in clock t is in the output
FIFO at clock t+6, counting one clock for the operand FIFO and one for the
output FIFO. The core accepts one update per clock, so it keeps up with
the read logic easily. The output FIFO is dual-clock: it is written at
100 MHz and read by the control logic at 200 MHz.

The arithmetic is IEEE-754 binary32 with round to nearest, ties to even.
Subnormal inputs and results are flushed to zero. An exact zero difference
is +0. Infinities propagate. Invalid operations and NaN inputs give the
quiet NaN 0x7FC00000. For normal numbers the results are bit-exact to
single-precision arithmetic done one operation at a time, in the order of
the pipeline (no fused multiply-add).

## Phases, clocks and clock gating

Two clocks are used: `clk_npi` (200 MHz) for the memory side and `clk_core`
(100 MHz) for the banks, write logic, read logic and cores. The control
logic runs one slab in three phases:

* **IDLE** – waits for `start`. All clocks run, so the gated logic clears its
  counters.
* **LOAD** – the six channels read their arrays in 8-beat bursts into the
  diff FIFOs. The write logic fills the banks. When all banks hold the slab,
  the write logic's `done` crosses back to the control logic, which moves
  to COMPUTE.
* **COMPUTE** – the read logic and cores run. The control logic pops the
  three output FIFOs, packs two results per 64-bit beat, and writes them
  back in bursts to the addresses they were loaded from. When the last
  beat is accepted, `done` is set and `irq` pulses.

The phase enters the core domain through two-flop synchronisers. As in the
original design, idle logic has its clock gated off:

| gated clock | off during | drives |
|---|---|---|
| `rl_clk` (from `clk_core`) | LOAD | read logic, cores (operand side) |
| `wl_clk` (from `clk_core`) | COMPUTE | write logic, read side of the diff FIFOs |
| `df_clk` (from `clk_npi`) | COMPUTE | write side of the diff FIFOs |

The banks stay on `clk_core`, because both phases use them. The control
logic stays on `clk_npi`, because it writes back during COMPUTE.

Each gate samples its enable on the falling edge and ANDs it with the
clock, so the gated clock has no glitches. An ASIC flow would put a library
clock-gating cell here; an FPGA flow would use a clock buffer with an
enable.

A new `start` is not taken until the core domain reports that it has seen
IDLE. This guarantees that the gated blocks have had a clock with their
enable low and reset their counters. A start that arrives earlier is
remembered.

## Memory channels

The published design uses the Xilinx multi-port memory controller's Native
Port Interface. This RTL uses a simplified version of it, one per channel
`c`:

| signal | dir | meaning |
|---|---|---|
| `npi_req_valid/ready[c]` | out/in | address handshake |
| `npi_req_rnw[c]` | out | 1 = read burst, 0 = write burst |
| `npi_req_addr[c]` | out | byte address, a multiple of 8 |
| `npi_req_beats[c]` | out | burst length in 64-bit beats (at most 8) |
| `npi_rd_empty/pop/data[c]` | in/out/in | read-data FIFO on the controller side |
| `npi_wr_push/data/be/full[c]` | out/out/out/in | write-data FIFO on the controller side; the data is pushed before the write request |

Each channel has one request in flight. In each beat, the lower-addressed
word is bits 31:0. A real controller port would need a thin adapter to
its own signal names and burst rules.

## Host interface

| port | meaning |
|---|---|
| `start` | one-clock pulse (`clk_npi`) |
| `mode` | 0: E pass, 1: H pass |
| `geom.ipts`, `geom.kpts`, `geom.djpts` | slab size in cells; the product must not exceed 16384 |
| `base_addr[0..5]` | byte addresses of the slab in the Ex, Ey, Ez, Hx, Hy, Hz arrays |
| `coef[0..5]` | C1..C6 (core x uses C1, C2; core y C3, C4; core z C5, C6) |
| `busy`, `done`, `irq` | phase not IDLE; slab finished (stays set until the next start); one-clock pulse |

`mode`, `geom`, `base_addr` and `coef` must stay stable from `start` until
`done`. In the original system these were registers on the processor bus,
with an interrupt controller in front of the CPU. Here they are plain
ports, so any bus wrapper can drive them.

## Performance and size

* Computation: 2 core clocks per cell, i.e. 20 ns per cell at 100 MHz.
* Loading: 6 x 4 bytes per cell over six channels. With the test memory
  model (6-clock read latency and random stalls) a 15,453-cell slab takes
  464 us in all, load plus compute with overlapped write-back. The compute
  part alone is 309 us.
* For the 101 x 301 x 51 volume: 300 slab runs per time step, 139 ms per
  step in simulation, or about 11 million cell updates per second for the
  engine alone.
* Coarse synthesis (yosys, generic cells): about 6,500 word-level cells,
  2,240 flip-flop bits, and 3.18 Mbit of memory (six 512 Kbit banks plus
  FIFOs).

## Departures and open points

* **Sign between the two curl terms.** The equations as published add both
  terms (`+ C2*(...)`), while the published drawing of the core subtracts
  them. The core here subtracts, which is the sign of the curl. With the
  other reading, pass `-C2`.
* **H update.** Only the E equations were published. The H pass is the
  standard staggered-grid counterpart with backward differences, on the
  same cores.
* **Computation rate.** The original timing estimate uses 1.5 ns per cell,
  which does not match its own "two clock cycles at 100 MHz". This design
  takes two clocks (20 ns) per cell, as the schedule above requires.
* **Boundary and overlap.** The original design leaves slab boundaries to the
  host software and says only that consecutive slabs overlap. The hold rule
  above is this design's own.
* **Coefficients** are per-run registers, not per-cell arrays, since a cell
  update reads only five words. Inhomogeneous media need one run per
  material region, or host-side handling.
* **Memory port** is the simplified NPI above. Burst length (8 beats), one
  request per channel, and the packing order are choices of this design.
* **Gated clocks.** The gating cell is a falling-edge enable latch and an
  AND gate. The diff FIFOs' memory-side write ports are the part of the
  "idle NPI channels" that is gated.
* **FIFO depth.** "32 deep" is read as 32 entries of the FIFO's input width
  (64 bits for the diff FIFOs). All FIFOs default to 32.
* **Arithmetic details** (rounding, flush to zero, NaN handling, one stage
  per operator) are not specified by the source and are this design's own.
* **Not included**: the PowerPC host, processor bus, UART, Ethernet MAC,
  interrupt controller, memory controller and DDR2, and all host software.
  The processor runs the rest of the FDTD program: excitation, ports and the
  other non-critical loops, which the original work also left in software.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Build and run one
with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
    rtl/fdtd_pkg.sv tb/fp_ref_pkg.sv tb/tb_fdtd_compute_engine.sv \
    --top-module tb_fdtd_compute_engine
./obj_dir/Vtb_fdtd_compute_engine
```

Replace the testbench file and top name for the others. `fp_ref_pkg` is
only needed by testbenches that import it.

| testbench | what it checks |
|---|---|
| `tb_fdtd_compute_engine` | whole engine at default sizes against a reference update: E and H passes, odd cell count, heavy write stalls, a full 16384-cell slab. It also checks the cycle count per cell and that every mechanism (phases, gated clocks, stalls, held cells, partial beats, multi-burst transfers, irq) happened |
| `tb_fdtd_blocked_volume` | the host loop on the 101 x 301 x 51 volume: two time steps on the first 9 planes (four overlapping slabs per pass), then one full time step (150 slabs per pass). All six arrays are compared bit for bit with a whole-volume reference after every pass. It takes about a minute |
| `tb_read_logic` | operand words and order for every cell in both modes, push schedule, stall on full cores |
| `tb_field_compute_core` | results, 6-clock latency, one update per clock, output back-pressure |
| `tb_control_logic` | load bursts, packing, byte enables, phase sequence, irq |
| `tb_write_logic`, `tb_diff_fifo`, `tb_async_fifo`, `tb_sync_fifo`, `tb_bram_bank`, `tb_clock_gate` | the building blocks, with random traffic |
| `tb_fp32_add`, `tb_fp32_mul` | random and corner-case operands against a reference |

`tb/npi_mem_model.sv` is a behavioural model of the memory controller with
six channels. It has a read latency, random request and write stalls
(percentages set by the testbench), and byte enables. `tb/fp_ref_pkg.sv`
computes the reference binary32 results by bit manipulation of doubles,
with the same rounding and flushing as the hardware. Variables are
initialised or reset everywhere, so the testbenches also pass with
Verilator's random initial values (`+verilator+rand+reset+2`).
