# DFPA: a processor grid for division-free Gaussian elimination

This is synthesizable SystemVerilog for the Division-Free Parallel Architecture (DFPA). It is
a two-dimensional grid of small, identical processor elements (PEs) that solves a linear
system `A x = b`. It reduces the augmented matrix `[A|b]` to diagonal form without a single
division. Each PE owns one matrix element. In every elimination step, all PEs replace their
element at the same time with a 2x2 determinant. The cost of a step therefore hardly depends
on how many elements the matrix has.

The default build is the 240-PE configuration: a system of 15 equations on a grid of
15 x 16 PEs (15 rows, plus one column for the right-hand side).

The architecture itself (grid, data movement, PE contents, unit widths) follows a published
FPGA design. The cycle-level schedule, the command set, the host interface and every width the
published description leaves open are this implementation's own. They are listed in
[Departures and choices](#departures-and-choices).

## The arithmetic: one-step division-free elimination

Write the augmented matrix as `a[i][j]`, with `n` rows and `n+1` columns. Column `n` holds `b`.
For each pivot `k = 0 .. n-1`, every element is updated from the previous values:

```
a'[i][j] = a[i][j]                                   if i == k   (the pivot row is kept)
a'[i][j] = a[k][k]*a[i][j] - a[i][k]*a[k][j]         otherwise
```

This is the determinant of the 2x2 matrix `| a_kk a_kj ; a_ik a_ij |`. After step `k`,
column `k` is zero everywhere except in row `k`. After all `n` steps the left `n x n` part is
diagonal, and `x_i = a[i][n] / a[i][i]`. The grid does not do that final division. The host
does it, or uses the scaled form `a[i][i] * x_i = a[i][n]` directly.

Nothing is divided, so integer inputs stay integers. But the values grow quickly: roughly, the
bit width doubles with every step. See [Number range](#number-range).

## How one elimination step moves through the grid

A PE at grid position (i, j) holds `a_ij`. To form its determinant it also needs three more
values:

* `a_kj`, the element of the pivot row in its own column;
* `a_ik`, the element of the pivot column in its own row;
* `a_kk`, the pivot.

Each PE is joined to its four neighbours by registered channels. A word moves one PE per clock.
All PEs obey one command that the master broadcasts each cycle, together with the pivot index
`k`. Each PE compares `k` with its own row and column number, which it keeps in its
identification register. From that it decides whether it is a source, forwards downwards or
upwards (or left or right), or does nothing. One step runs in three phases.

1. **Vertical distribution (row k along the columns).** On `VSEND`, every PE in row `k` puts its
   own `a_kj` on its north and south outputs. It also copies the value into its `a_kj`
   register. Then `ROWS-1` cycles of `VFWD` follow:
   * a PE below row `k` copies its north input to its south output;
   * a PE above row `k` copies its south input to its north output;
   * every PE outside row `k` stores the arriving word as `a_kj`.

   This is a wave travelling away from row `k` in both directions. Before the wave reaches a
   PE, that PE stores stale words. Once the wave has passed, the word stays in place, because
   the neighbour keeps driving the same value. `ROWS-1` hops are enough for the farthest row.
   Column `k` now holds `a_kk` in every row's `a_kj` register.
2. **Horizontal distribution (column k and the pivot along the rows).** On `HSEND`, every PE in
   column `k` sends the pair `{a_ik, a_kk}` east and west. The second word is the `a_kj` that
   the PE has just received. `COLS-1` cycles of `HFWD` then carry the pair to both ends of
   every row, in the same way. So the pivot first travels down or up its own column and then
   along every row.
3. **Computation.** On `COMPUTE`, each PE runs five one-clock steps:

   | step | multiplier                   | memory write                     |
   |------|------------------------------|----------------------------------|
   | MUL1 | load `a_kk`, `a_ij`          | -                                |
   | MUL2 | load `a_ik`, `a_kj`          | product 1 <- `a_kk*a_ij`         |
   | SUB  | -                            | product 2 <- `a_ik*a_kj`         |
   | ADD  | -                            | difference <- product1 - product2 |
   | WB   | -                            | `a_ij` <- difference (not in row k) |

   The master waits until every PE reports `done`, and then starts the next pivot.

Every PE computes the determinant, including those in columns already eliminated. There the
result is zero anyway. PEs in the pivot row compute it as well but do not write it back.

One step takes `ROWS + COLS + 7` clocks: 1 + (ROWS-1) vertical, 1 + (COLS-1) horizontal,
1 to start and 6 to compute and to see `done`. That is 38 clocks for the default grid.

## Inside a processor element

`dfpa_pe` contains one of each of the following units:

* `dfpa_mult`: a signed 32 x 32 -> 64 multiplier with registered operands. It is used twice per
  step.
* `dfpa_addsub`: a 64-bit adder-subtractor. Subtraction is done as `a + ~b + 1`.
* `dfpa_regfile`: eight 64-bit registers with two write ports. The second port lets
  `a_ik` and `a_kk` arrive in the same cycle.

  | reg | contents                 | reg | contents                     |
  |-----|--------------------------|-----|------------------------------|
  | 0   | `a_kk`                   | 4   | `a_kk * a_ij`                |
  | 1   | `a_kj`                   | 5   | `a_ik * a_kj`                |
  | 2   | `a_ik`                   | 6   | difference                   |
  | 3   | `a_ij`                   | 7   | PE id `{row, col}` (reset value) |

* `dfpa_serial_io`: a 64-bit shift register. Its serial input, shift enable and MSB output chain
  the PEs of a row into one long shift register for loading and unloading. It also has a
  parallel load and a parallel output, so the word can move to and from register 3.
* `dfpa_pe_control`: the five-step computation sequencer.

Registers and channel words are 64 bits wide, but a multiplier operand is the low 32 bits of a
register, sign-extended. The 64-bit difference is stored in full. The next step uses only its
low 32 bits.

## Master and host interface

`dfpa_master` is a state machine:

```
IDLE -> LOAD -> LATCH -> [VSEND -> VFWD -> HSEND -> HFWD -> COMPUTE -> WAIT] x ROWS
     -> CAPTURE -> UNLOAD -> DONE
```

It counts bits, words, hops and pivots with four instances of `dfpa_send_counter`, an 8-bit
counter with enable, clear and a terminal-count output.

Ports of `dfpa_top` (parameter `N`, default 15):

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`, `rst`   | in  | 1     | clock, synchronous active-high reset |
| `start`        | in  | 1     | pulse while idle to solve one system |
| `load_en`      | out | 1     | the host must drive the next bit of every row on `ser_in` this cycle |
| `ser_in`       | in  | N     | one bit-serial input per equation (row) |
| `unload_valid` | out | 1     | `ser_out` carries a result bit this cycle |
| `ser_out`      | out | N     | one bit-serial output per row |
| `busy`, `done` | out | 1     | solve in progress; one-cycle pulse at the end |
| `iter`         | out | 8     | current pivot index |

Bit order on the serial ports: for each row, the 64-bit two's-complement word of column `N` goes
first, then column `N-1`, and so on down to column 0, each word MSB first. That makes
`64*(N+1)` bits. Results come out in the same order. Drive `ser_in` between clock edges while
`load_en` is high. Sample `ser_out` while `unload_valid` is high.

Solve time, from the first `load_en` cycle to the `done` pulse inclusive:

```
cycles(N) = 2*64*(N+1)  +  N*(2N + 8)  +  3
```

| N  | PEs | load + unload | elimination | total  |
|----|-----|---------------|-------------|--------|
| 4  | 20  | 640           | 64          | 707    |
| 15 | 240 | 2048          | 570         | 2621   |
| 24 | 600 | 3200          | 1344        | 4547   |

With bit-serial input and output, the serial transfer dominates at these sizes. The elimination
itself grows as O(N^2) clocks: there are N steps, and the channel hops make each step O(N).

## Number range

The arithmetic is two's-complement integer. An entry that starts as a `b`-bit integer can reach
about `2^k * b` bits after `k` steps. With 32-bit operands, exact results are therefore
guaranteed only for small systems with small entries. In practice:

* up to 4 equations with single-digit entries, which the solving testbench uses;
* larger systems when the matrix is well scaled.

When a value exceeds 32 bits, the next step silently uses its low 32 bits. The grid does not
detect overflow. The testbenches model this wrap exactly, so their checks stay exact at any
size.

## Departures and choices

Followed from the published design:

* the n x (n+1) grid and the 240-PE size;
* neighbour channels in both directions;
* the vertical distribution of the pivot row and the horizontal distribution of the pivot
  column and the pivot;
* the PE as one multiplier, one adder-subtractor and an 8-register memory with the register
  roles above;
* the unit widths: 32-bit operands, 64-bit products, sum and registers;
* the 64-stage serial I/O register;
* the 8-bit counter of the data-sending controller.

This implementation's own choices:

* **No floating point.** The published design claims IEEE 754 single and double precision
  data, but it describes only integer units (a signed multiplier and an adder-subtractor).
  This RTL is integer only.
* **Grid size wording.** The published text calls the grid "n^2 processors". Its algorithm
  and its 240-PE size both mean n x (n+1), which is what is built.
* **Schedule.** The published per-step time is about 217 slow clocks, taken from separate
  module simulations. Here a step takes `2N+8` clocks with word-parallel neighbour links. The
  published channel and event tables are not available in enough detail to reproduce them
  cycle by cycle.
* **Host link.** Coefficients enter and results leave through the PEs' serial registers,
  chained along each row. This matches the published picture of coefficients entering each row
  from the left and moving rightwards, but the bit-serial format and the order are this
  design's choice.
* **Added functions.** The parallel load and parallel output of the serial register, the
  second write port of the memory, the programmable terminal count of the counter, and the
  synchronous reset values are additions.
* **Division on the host.** The final division `b'_i / a'_ii` is left to the host.
* **Pivot index width.** It is 8 bits, so `N` may be at most 255.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. With
Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dfpa_pkg.sv tb/tb_dfpa_top.sv \
          --top-module tb_dfpa_top -o sim && ./obj_dir/sim
```

Replace `tb_dfpa_top` with any other testbench:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_dfpa_top`          | The full 240-PE design at default parameters. Two random systems go in and out through the serial ports and are compared element by element with a reference elimination. It checks the 2621-cycle solve time and counts each mechanism: load, latch, vertical hops down and up, horizontal hops right and left, pivot-row hold, compute, wait, capture and unload. |
| `tb_dfpa_top_solve`    | N = 4. Twenty systems with known integer solutions: `x_i = b'_i / a'_ii` must be exact and the off-diagonal elements zero. |
| `tb_dfpa_array`        | A 3 x 4 grid driven command by command. The grid is compared after every pivot. |
| `tb_dfpa_master`       | A cycle-exact trace of the broadcast schedule for two grid latencies. |
| `tb_dfpa_pe`           | Every forwarding direction, and the determinant for 200 random operand sets (including 32-bit wrap), its latency, the pivot-row hold and serial unload. |
| the unit testbenches   | The adder-subtractor, multiplier, register file, serial register, counter and sequencer, each against its own reference. |

The full-size testbench builds in about a minute and runs in well under a second. The largest
grid simulated is N = 24 (600 PEs), with the same end-to-end test: it built in about four and a
half minutes and passed in 4547 cycles.

To change the system size, set `N` on `dfpa_top`. All other sizes follow from it.
