# Deep-pipelined 2-D FDTD accelerator

The finite-difference time-domain (FDTD) method advances electric and
magnetic fields on a grid, one time step after another. Each step reads and
writes the whole grid, so on CPUs and GPUs the speed is set by memory
bandwidth, not by arithmetic.

This design works the other way round. It parallelises across time steps,
not across cells. The grid streams out of external memory one cell per
clock cycle, in scan order. It passes through a chain of **D pipelined
computation modules (PCMs)**, and each PCM performs one complete time step
on the stream it receives. PCM 1 computes iteration 1 and hands its results
straight to PCM 2, which computes iteration 2 while PCM 1 is still working
further down the grid, and so on. Only PCM D writes back to memory. The
grid is therefore read and written once per D iterations, instead of once
per iteration.

A PCM can work on a stream because a stencil update needs only a window of
recent cells. Each PCM keeps that window in shift-register arrays. Every
cycle one cell is pushed in and the oldest one drops out, and the
processing elements (PEs) read any position of the window in parallel.

The defaults are a 1024 × 1024 grid, 44 PCMs and IEEE-754 single precision.

## The update being computed

The model is 2-D FDTD with the three field components Ez, Hx and Hy. Cell
(i, j) stores Ez(i,j), Hx(i,j+½) and Hy(i+½,j). Here i is the x index
(along a row) and j is the y index. One iteration computes:

```
Ez(i,j) ← Ez(i,j) − C1·(Hx(i,j+½) − Hx(i,j−½)) + C2·(Hy(i+½,j) − Hy(i−½,j))   (1)
Hx(i,j+½) ← Hx(i,j+½) − C3·(Ez(i,j+1) − Ez(i,j))                               (2)
Hy(i+½,j) ← Hy(i+½,j) − C4·(Ez(i+1,j) − Ez(i,j))                               (3)
```

Equations (2) and (3) use the **new** Ez of the same iteration. The
magnetic update therefore depends on electric results computed in the same
PCM, which is the central difficulty of streaming FDTD.

Each equation is evaluated left to right in single precision, one rounding
per operation. A cell costs 12 floating-point operations per iteration: 6
in (1) and 3 each in (2) and (3).

**Boundaries.** Some cells have a neighbour outside the grid. These are
left unchanged:

- Ez on all four outer edges;
- Hx in the top row (j = N−1);
- Hy in the right-most column (i = N−1).

If the edge Ez starts at zero, this is a perfectly conducting box.

**Coefficients.** C1..C4 are uniform over the grid, which models a
homogeneous medium. They are inputs to the accelerator and must stay fixed
during a run. Per-cell coefficients would need a fourth value carried with
every cell; that is not built.

## Inside a PCM: two windows on the stream

Cells arrive in scan order. Cell p = y·N + x, where x runs 0…N−1 along a
row and rows are taken bottom-up. Relative to cell p, the neighbours that
Eq. (1) needs arrived earlier:

- Hy(i−½) belongs to cell p−1;
- Hx(j−½) belongs to cell p−N.

The new Ez values that Eqs. (2) and (3) need come later:

- Ez(i+1) belongs to cell p+1;
- Ez(j+1) belongs to cell p+N.

`pcm.sv` solves this with two `shift_reg_array` instances:

| array | holds | taps (positions back from the newest value) |
|---|---|---|
| `src` | incoming cells of the previous iteration, N+6 deep | 0: cell p for the Ez PE · 1: Hy of p−1 · N: Hx of p−N · N+5: old Hx, Hy of the cell the H PEs update |
| `ezr` | new Ez values of this iteration, N+4 deep | 0: Ez of p+N · N−1: Ez of p+1 · N: Ez of p · N+3: Ez leaving with the new H |

The two arrays stay in step as follows:

1. The Ez PE (`pe_ez`, 4 pipeline stages) works on the newest cell. Its
   results enter `ezr`.
2. When the new Ez of cell p+N enters `ezr`, Ez of cell p+1 and Ez of
   cell p are already in the array, at taps N−1 and N.
3. At the same step, the old Hx and Hy of cell p sit at tap N+5 of `src`.
4. The Hx and Hy PEs (`pe_h`, 3 stages each) then update cell p.
5. Cell p leaves with its new Ez taken from tap N+3 of `ezr`, which lines
   it up with the H results.

From the step that pushes a cell into one PCM to the step that pushes it
into the next is `pcm_lat(N) = N + 9` steps (1033 for N = 1024).

Two counters give each stage the (x, y) of the cell it is working on. One
counts valid cells at the Ez PE, the other at the H PEs. Both wrap after
N·N cells. They supply the boundary decisions.

Each array is a circular buffer with one read port per tap, not a chain of
registers. On an FPGA this maps to block RAM, and it behaves exactly like
the shift register described above. Only the valid bits form a real
shift register, so that they can be reset.

An `active` input turns a PCM into a pure delay of the same length. The
pass controller uses this for a last pass shorter than D iterations.

## Streaming, stalls and flushing

Every register in the reader-to-writer path moves on a single signal:

```
adv = reader has an element  &&  writer FIFO has room
```

If a memory read is late, or the memory refuses writes long enough to fill
the writer FIFO, the whole chain of D PCMs stops for that cycle. All
distances in the shift-register arrays are counted in steps of `adv`, so a
stall never misaligns a stencil.

A cell leaves PCM D only after D·(N+9) further steps. After the N·N cells
of a pass, the reader therefore appends D·pcm_lat(N) **flush elements**
(45 452 by default). These are marked invalid, so the counters and the
writer ignore them. The reader keeps no more reads in flight than its
response FIFO can hold (16 entries), so it never drops a response.

## Passes and the two grid buffers

`pass_ctrl` runs ⌈max_iters / D⌉ passes. External memory holds two grid
buffers: A at cell address 0 and B at address N·N. The host loads the
initial grid into A.

- Pass 1 reads A and writes B. Pass 2 reads B and writes A, and so on.
- Each pass starts the reader and writer together. The next pass starts
  when the writer has stored the last cell.
- When fewer than D iterations remain, only the first `max_iters mod D`
  PCMs compute; the rest just pass the cells on. For example, 15360
  iterations on 44 PCMs take 349 full passes and one pass of 4.
- At the end `done` pulses and `result_base` gives the buffer that holds
  the final grid.
- `max_iters = 0` finishes immediately and leaves the grid in A.

## Floating point

`fp32_add` and `fp32_mul` are combinational IEEE-754 single-precision
units; the PEs put the pipeline registers around them.

- Rounding is to nearest, ties to even.
- Subnormal inputs are read as zero, and results below the smallest normal
  number become a signed zero. This is usual for FPGA floating-point cores.
- Infinities and NaNs behave as IEEE-754 requires. A NaN result is
  `7fc00000`.
- Exact cancellation gives +0.

The testbenches check every result bit for bit against a reference that
computes in double precision and rounds to single.

## Interface of `fdtd_accel`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `max_iters[31:0]`, `coef` (C1..C4, `coef_t`) | in | start a run; hold `coef` steady during it |
| `busy`, `done`, `result_base`, `passes_done` | out | run status; `done` is a one-cycle pulse |
| `mem_rd_req`, `mem_rd_addr` / `mem_rd_gnt` | out / in | read request, taken in the cycle `gnt` is high |
| `mem_rd_valid`, `mem_rd_data` | in | read data, in request order, any latency |
| `mem_wr_req`, `mem_wr_addr`, `mem_wr_data` / `mem_wr_gnt` | out / in | write request, taken when `gnt` is high |

Memory is addressed in cells. One memory word is one 96-bit `cell_t`
`{ez, hx, hy}`. The default `AW` is 21 bits, enough for the two buffers.
The board's DRAM, its controller and the host are outside this RTL. The
DRAM model used in simulation is `tb/dram_model.sv`; it is not
synthesizable.

## Sizes and performance

| parameter | default | meaning |
|---|---|---|
| `N` | 1024 | grid edge |
| `D` | 44 | PCMs, i.e. iterations per pass |
| `FIFO` | 16 | reader and writer FIFO depth |
| `AW` | 21 | memory address bits |

- **One pass** of the default configuration takes
  1 048 576 + 45 452 cycles, plus a few cycles of start-up, when memory
  keeps up. The full-size testbench measures 1 094 041 cycles for 44
  iterations.
- **A full run** of 15360 iterations on a 1024 × 1024 grid takes 350
  passes, about 383 M cycles. The published FPGA implementation of this
  architecture ran that workload in 1.69 s; at one cell per cycle this
  corresponds to a clock of about 227 MHz.
- **Arithmetic rate.** The chain does 44 × 12 = 528 floating-point
  operations per cycle. That is about 114 GFLOPS at 216 MHz, the rate
  reported for the published implementation.
- **On-chip storage** is about 132 kbit of shift-register array per PCM,
  or 5.8 Mbit for 44 PCMs.

## What is this design's own

The following follow the published architecture:

- the pipeline structure: a memory stream through D PCMs, with only the
  last one writing back;
- the two shift-register arrays per PCM and their parallel taps;
- the fully pipelined Ez, Hx and Hy PEs;
- the equations, the scan order and single precision;
- the pass loop of D iterations per trip through memory;
- the default sizes.

The following are choices made here, where no detail was available:

- the PE pipeline depths (4 and 3), which make the arrays N+6 and N+4
  deep; the architecture's own count of the data lifetime is N+3;
- the boundary condition and the uniform coefficients;
- the circular-buffer form of the arrays;
- the stall and flush scheme;
- the memory port protocol, the FIFOs, the two-buffer layout and the
  short last pass;
- rounding, subnormal and special-value handling.

A variant that feeds two parallel data streams through the PCM chains, for
boards with more memory bandwidth, is not built.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>`. Build and run
one with plain Verilator. The packages go first; `-y` finds the modules:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fdtd_pkg.sv tb/fp_ref_pkg.sv tb/fdtd_ref_pkg.sv \
    tb/tb_fdtd_accel.sv --top-module tb_fdtd_accel
./obj_dir/Vtb_fdtd_accel
```

| testbench | what it covers |
|---|---|
| `tb_fp32_add`, `tb_fp32_mul` | 60 000 random and directed operations each, bit-exact |
| `tb_sync_fifo` | FIFO against a software queue, including full and empty corner cases |
| `tb_shift_reg_array` | push/pop, all taps and valid bits under random shifting |
| `tb_pe_ez`, `tb_pe_h` | Eqs. (1)–(3), pass-through, latency, random stalls |
| `tb_pcm` | three whole 8 × 8 grids through one PCM: active, idle, active; checks latency |
| `tb_grid_reader`, `tb_grid_writer` | address order, flush count, back-pressure, random memory timing |
| `tb_pass_ctrl` | pass counts, short last pass, buffer alternation, result location |
| `tb_fdtd_accel` | end to end on an 8 × 8 grid with 3 PCMs; see below |
| `tb_fdtd_accel_full` | default size: one 44-iteration pass over 1024 × 1024 from a random field, compared cell by cell (about a minute) |
| `tb_fdtd_workload` | default size, 48 iterations from a point excitation: a full pass and a 4-iteration last pass, the two kinds of pass a 15360-iteration run consists of (about a minute) |

`tb_fdtd_accel` runs 7, 6 and 0 iterations against the software model. It
checks that each of the following happens at least once:

- a read stall;
- write back-pressure;
- a flush;
- a short pass;
- a buffer swap.

It also checks that the cycle count is one cell per cycle plus the flush.

`tb/fdtd_ref_pkg.sv` is a software model of one iteration. It is the
reference to change if you change the boundary condition.
