# A lockstep FPGA engine for Jacobi iterations of Laplace's equation

This RTL solves Laplace's equation, ∇²φ = 0, on a two-dimensional grid of double-precision
(IEEE-754 binary64) values. It uses the five-point stencil and Jacobi iteration. In every
timestep each interior cell becomes the average of its four orthogonal neighbours. The
boundary cells stay fixed. Timesteps repeat until the mean squared change per cell falls
below a tolerance.

Stencil codes do little arithmetic per byte they fetch. What limits them is how fast
neighbours can be brought to the arithmetic. The design keeps the whole grid in on-chip
block RAM and feeds one cell update per cycle to every processing element (PE). It does
this without a second pass over the data, a separate halo-exchange phase or a divider. The
architecture follows the hand-written HDL design described in *Investigating Performance
Losses in High-Level Synthesis for Stencil Computations* (Xilinx Artix-7, 8 PEs, 200 MHz).
That paper does not give every detail. Where this code had to choose, the choice is marked
as this implementation's own, both here and in the header comment of each file.

## The grid and the processing elements

The default grid has 128 rows and 256 columns. It is cut into `PES = 8` horizontal strips
of `ROWS = 16` by `COLS = 256` cells. Each strip belongs to one PE. Stacking the PEs
vertically means a strip has neighbours only above and below, so halos cross only the top
and bottom rows of a strip.

Each PE holds two copies of its strip, matrix 0 and matrix 1. In every timestep one copy is
the input and the other is the output, and the roles swap at the end of the timestep, so
nothing is ever copied. Both copies are loaded with the same starting values. The engine
never writes the grid boundary (the first and last grid row, and columns 0 and `COLS-1`),
so the boundary stays correct in both copies without a copy step.

`laplace_engine` sends one cell address per cycle, in row-major order, to all PEs at once.
Every PE therefore works on the same (row, column) of its own strip in the same cycle. The
halo exchange below depends on this lockstep.

```
laplace_engine
 ├─ pe[0..PES-1]
 │   ├─ bram_ctrl  mat 0 ─┐  (roles swap every timestep)
 │   ├─ bram_ctrl  mat 1 ─┘   each = two bram_bank (even / odd columns)
 │   ├─ avg_unit   ((a+b)+(c+d))/4, 29 cycles
 │   ├─ nbr_fifo   32 x 64-bit right-neighbour buffer
 │   └─ err_unit   (y-x)^2 -> fp64_acc
 ├─ fp64_add + fp64_mul   sum of PE errors, mean
 └─ host port             load / unload
```

## Four neighbours per cycle from two-port memories

A block RAM has two ports, and a cell needs four neighbours. Each strip is therefore split
by **column parity** into two banks (`bram_ctrl`). Cell (r, c) lives in bank `c[0]`, at word
`r*COLS/2 + c/2`. For a target cell x:

| neighbour | position  | bank              | port |
|-----------|-----------|-------------------|------|
| up (c)    | (r-1, c)  | same parity as x  | A    |
| down (d)  | (r+1, c)  | same parity as x  | B    |
| left (a)  | (r, c-1)  | other bank        | A    |
| right (b) | (r, c+1)  | other bank        | B    |

Each bank serves exactly two reads per cycle, so there are never any conflicts. The copy
used as the output takes one write per cycle on port A of the bank that matches the written
column's parity.

## One pass: where the old value comes from

The error needs the old value x next to the new value y, and x would be a fifth read. It is
not read. Cells go in row-major order, so the right neighbour b of the current cell is the
next cell's x. The PE pushes b into a 32-entry register FIFO (`nbr_fifo`). When the next
cell's average leaves the 29-cycle averaging pipeline, the FIFO head is that cell's old
value. Within a row, pushes skip the last column and pops skip the first column. That keeps
the FIFO aligned row by row and leaves it empty at the end of each timestep. It never holds
more than about 30 entries.

## Halos through the spare port

A cell on the top row of a strip has no local upper neighbour. A cell on the bottom row has
no local lower neighbour. In those cycles one BRAM port would sit idle. The controller
addresses rows modulo `ROWS`:

- On the top row, the "up" port reads the strip's own bottom row. The PE below needs exactly
  that value as the upper neighbour of its own top row, which it is processing in the same
  cycle.
- On the bottom row, the "down" port reads the strip's own top row, which is the lower halo
  of the PE above.

So `halo_to_below` and `halo_to_above` are just the wrapped reads. A PE uses
`halo_from_above` in place of its up value on row 0, and `halo_from_below` in place of its
down value on row `ROWS-1`. There is no separate exchange step and no copy of halo rows.
Each timestep reads only the input copies, and the output copies are written, so the halos
are always the current timestep's values.

## Averaging without a divider

`avg_unit` computes `y = ((a+b) + (c+d)) / 4`. The two inner sums are formed in parallel,
then added. The division by four subtracts 2 from the binary64 exponent field, so it needs
no divider and no multiplier. If the result would be subnormal, the significand is shifted
and rounded instead. The latency is 29 cycles: 14 for the first adders, 14 for the second
and 1 for the exponent step. The 29 comes from the reference design; the 14 + 14 + 1 split
is this implementation's choice. Each adder is a combinational `fp64_add` followed by a
register delay line (`pipe_delay`), which stands in for a pipelined vendor core of the same
latency. A synthesis tool with register retiming can spread the logic over those stages.

## Error, convergence and back-to-back timesteps

`err_unit` forms y − x (14 cycles), squares it (15 cycles) and accumulates the square in
`fp64_acc`. The accumulator is one combinational adder in a one-cycle loop, so it takes one
addend per cycle with a single rounding per addend. Boundary cells travel through the
pipeline like any other cell, but they are not written and they add +0. The subtractor and
multiplier latencies are this implementation's choice.

When every PE reports its timestep error (all in the same cycle), the engine works through
these steps:

1. It adds the PE errors in PE order, one per cycle.
2. It multiplies the total by the binary64 reciprocal of the number of updated cells,
   `(PES*ROWS-2)*(COLS-2)`, which gives the mean squared error.
3. It compares the result with `tolerance`. Both values are non-negative, so comparing their
   bit patterns is enough.

**Back-to-back timesteps.** The engine does not wait for this test. The next timestep starts
as soon as the last result of the current one has been written, which is 31 cycles after
its last address. The subtract, square, accumulate and sum run alongside the new timestep.
If the test then passes, the running timestep is aborted: `flush` clears every pipeline and
FIFO in the PEs. The returned grid is that timestep's input copy, which holds the output of
the timestep that converged. A timestep k+1 starts only once the test of timestep k−1 is
known, so at most one test is pending. At the default size this never delays anything.
Waiting for the writes to finish before the next start is this implementation's choice. It
guarantees that no bank ever needs a third access in a cycle.

Timing at the default size:

| quantity                         | cycles                       |
|----------------------------------|------------------------------|
| one timestep (start to start)    | ROWS·COLS + 31 = 4127        |
| read → averaged value written    | 1 + 29                       |
| last write → PE error ready      | 14 + 15 + 1                  |
| PE errors → test result          | PES (+ mean, same cycle)     |

At 200 MHz that is about 48,500 timesteps per second and 99.2 % PE utilisation. The
reference design reports just over 47,000 timesteps per second and 98 %.

Storage at the default size is 8 PEs × 2 copies × 4096 cells × 64 bits = 4 Mbit. In
7-series 18 Kb blocks that is 256 of the 270 blocks on an Artix-7 100T.

## Interface of `laplace_engine`

| port                   | dir | meaning |
|------------------------|-----|---------|
| `clk`, `rst`           | in  | clock; synchronous active-high reset |
| `start`                | in  | one-cycle pulse while idle: begin a solve from the current grid |
| `tolerance[63:0]`      | in  | binary64 MSE threshold (stop when MSE < tolerance) |
| `max_iters[31:0]`      | in  | timestep limit (0 is treated as 1) |
| `busy`, `done`         | out | solve running; one-cycle pulse at its end |
| `converged`            | out | the solve ended on the tolerance, not on `max_iters` |
| `iterations[31:0]`     | out | number of timesteps whose result is returned |
| `final_mse[63:0]`      | out | MSE of the last tested timestep |
| `host_en`, `host_we`   | in  | host access, only while idle |
| `host_pe`, `host_row`, `host_col` | in | cell address: grid row = `host_pe*ROWS + host_row` |
| `host_wdata[63:0]`     | in  | write: the value goes into both copies |
| `host_rdata[63:0]`     | out | read: the cell of the result copy, one cycle after `host_en` |

Typical use:

1. Write every grid cell through the host port.
2. Set `tolerance` and `max_iters`, then pulse `start`.
3. Wait for `done`.
4. Read the result back.

A later `start` continues from the returned grid. The host port, `max_iters` and the status
outputs are this implementation's additions. The reference design does not describe how
the grid enters or leaves the chip. The clock is an input: the reference design generates
it with a vendor clocking core, and that core is not part of this RTL.

## Floating point

`fp64_add` and `fp64_mul` are combinational IEEE-754 binary64 units. They round to nearest
even and support subnormals. NaN results use the single quiet NaN `0x7FF8…`. They replace
the vendor floating-point cores of the reference design, whose insides are not public. The
shared rounding and packing code is `round_pack` in `laplace_pkg`. Because every operation
is correctly rounded, and the order of operations is fixed (see above), the engine's results
match, bit for bit, a software model written with ordinary `double` arithmetic in the same
order.

## Files

| file | content |
|------|---------|
| `rtl/laplace_pkg.sv` | `fp64_t`, default sizes, latencies, `round_pack`, `lzc106` |
| `rtl/laplace_engine.sv` | top: PEs, lockstep address, matrix swap, convergence test, host port |
| `rtl/pe.sv` | one processing element |
| `rtl/bram_ctrl.sv`, `rtl/bram_bank.sv` | parity-banked matrix, dual-port bank |
| `rtl/avg_unit.sv` | averaging module |
| `rtl/nbr_fifo.sv` | right-neighbour FIFO |
| `rtl/err_unit.sv`, `rtl/fp64_acc.sv` | error module, accumulator |
| `rtl/fp64_add.sv`, `rtl/fp64_mul.sv` | binary64 adder and multiplier |
| `rtl/pipe_delay.sv` | latency/valid delay line |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/laplace_check.sv` | end-to-end sequence shared by `tb_laplace_engine` (3 PEs × 4 × 16) and `tb_laplace_full` (default size) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/laplace_pkg.sv tb/tb_laplace_engine.sv \
          --top-module tb_laplace_engine -Mdir obj_engine
./obj_engine/Vtb_laplace_engine
```

Replace the name to run `tb_pe`, `tb_bram_ctrl`, `tb_avg_unit`, `tb_err_unit`,
`tb_nbr_fifo`, `tb_fp64_acc`, `tb_fp64_add`, `tb_fp64_mul` or `tb_laplace_full`. The
full-size run (128 × 256 grid, about 200,000 cycles) takes under a minute including the
build. Every testbench compares against values computed independently with SystemVerilog
`real` arithmetic:

- `tb_fp64_add` and `tb_fp64_mul` each compare about 65,000 operand pairs bit for bit,
  including cancellation, subnormals, overflow and inf/NaN rules.
- `tb_avg_unit`, `tb_err_unit` and `tb_fp64_acc` check values and exact latencies (29; 30
  after the last cell; 1).
- `tb_bram_ctrl` checks all four neighbours of every cell, including the wrap-around halo
  reads.
- `tb_pe` runs a middle PE at full size for two timesteps with both halo directions. It
  checks every cell of both copies, the error sum, the halos it hands out and its timing.
- `laplace_check` runs a converging solve, then a solve stopped by `max_iters`, and reads
  every cell back after each. It checks the returned MSE, the iteration count and the
  4127-cycle timestep period. It also counts halo use, back-to-back overlap, the abort on
  convergence, the stop on `max_iters` and results returned from both copies. It fails if
  any of these never happened.

## How far to trust it, and where it departs

- The engine's arithmetic is verified bit-exact against a double-precision software model at
  both the reduced and the full size. The reference design likewise reports results
  bit-identical to its software model.
- Nothing here has been placed and routed. The combinational floating-point units with
  trailing delay lines model pipelined cores. Reaching 200 MHz on an FPGA needs retiming, or
  replacing each unit and its delay line with a pipelined core of the same latency.
- `fp64_acc` closes a full binary64 add in one cycle. That is the simplest one-per-cycle
  accumulator, but it will be the slowest path of the design. A vendor accumulator, or a
  multi-stage one with the same per-addend rounding, would replace it.
- These are this implementation's own choices: the 14/14/1 averaging split, the 14/15
  error-path latencies, the next timestep starting only after the current writes finish, at
  most one pending test, the mean over interior cells, the strict `<` test, `max_iters`, the
  host port, and flags for boundary skipping.
- The bottom-halo direction (a PE's top row serving the PE above) follows the reference
  design's figure. The top-halo direction is built the same way by symmetry.
