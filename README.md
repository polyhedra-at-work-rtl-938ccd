# Sherman-Morrison inverse-update engines for real-time circuit simulation

A real-time simulator of a power-electronic circuit solves `A x = b` at
every time step, where `A` is the nodal admittance matrix of the circuit.
It keeps `A^-1` and computes `x = A^-1 b`, a cheap matrix-vector product.
The expensive part is that `A` changes whenever a switch opens or closes:
a switch is modelled as a conductance that is tiny when open and large when
closed. A fresh O(N^3) inversion at each switch event is too slow.

Because one switch touches only four entries of `A`, the change is a rank-one
perturbation `u v^T`. The Sherman-Morrison formula then gives the new inverse
in O(N^2) work:

```
(A + u v^T)^-1 = A^-1 - sigma * (A^-1 u)(v^T A^-1),   sigma = 1 / (1 + v^T A^-1 u)
```

Several switches changing at once are handled by applying the update once
per switch.

This repository holds two hardware engines for that update, in
synthesizable SystemVerilog:

| engine | module | what it does | processors | latency |
|---|---|---|---|---|
| full | `sm_full` | any rank-one update `u v^T` of an N x N inverse | N + 1 | 8 + 2N cycles |
| optimised | `sm_opt` | update for one switch between nodes i and j, with the inverse held in registers | N^2 cells | 4 cycles, for any N |

`sm_top` places both side by side, sharing only the clock and the reset.
The default sizes are order 13 for the full engine and order 16 for the
optimised one.

## Where sigma comes from

`sigma` needs a division. In the intended system, the division is not done
in hardware. Each switch position gives only a limited set of values of
`d = v^T A^-1 u`, so the matching `1/(1+d)` values are computed in advance
and kept in a look-up table. That table depends on the circuit, so it is
not part of this RTL. Instead:

* both engines take `sigma` as an input port (`full_sigma`, `opt_sigma`);
* the full engine outputs `d` (`full_d`), the value that addresses such a table.

Driving `sigma` with 1.0 gives `A^-1 - (A^-1 u)(v^T A^-1)`. That is the
simplified update the engines are usually benchmarked with when the table is
left out. Driving it with the true `1/(1+d)` gives the exact new inverse. The
end-to-end testbench does this for a switching network (see *Verification*).

## Number format

Every value is a `W`-bit two's-complement word with `FRAC` fraction bits.
The defaults are `W = 32` and `FRAC = 0`, which is plain 32-bit integer
arithmetic. Each multiplier (`fxp_mul`) forms the full `2W`-bit product,
shifts it right arithmetically by `FRAC`, and keeps the low `W` bits. It
truncates and wraps: there is no rounding and no saturation.

For real circuit matrices, set `FRAC` to a value such as 16. The whole
design is parameterised for this, and the testbenches run it both ways. The
right format for long simulations (word width, fraction bits, or floating
point) is a numerical-accuracy question this RTL leaves open.

## The full engine (`sm_full`)

The engine computes the update as a chain of simple sub-results:

```
r    = B u            (B = A^-1)
l    = B^T v          (so l^T = v^T B)
d    = l . u
newB = B - sigma * r l^T
```

It has N row processors (`sm_full_pe`) and one dot-product processor
(`sm_dot_pe`). The engine sweeps the columns of `B` twice, one column per
cycle.

* **Phase 1.** Processor p accumulates `r_p += B[p][j] u_j` and
  `l_p += B[j][p] v_j`. Each processor runs two matrix-vector recurrences
  at once: its own row for `r`, and its own column for `l`.
* **Phase 2.** `l_j` is broadcast to all processors through one register.
  Processor p emits `newB[p][j] = B[p][j] - sigma * (r_p * l_j)`. In the
  same cycles the dot processor accumulates `l_j u_j` into `d`.

### Schedule

The whole schedule hangs off a single time counter in `sm_full_ctrl`. Every
enable and index is a window or an offset of that counter. Let `t = 0` be the
cycle after the edge that accepts `start`. For column `j`:

| t | event |
|---|---|
| `j` | phase 1 operands `B[p][j], u_j, B[j][p], v_j` presented |
| `j + 2` | phase 1 products leave the 2-stage multipliers and are accumulated |
| `N + 2 + j` | `l_j` loaded into the broadcast register |
| `N + 3 + j` | dot-processor operands `l_j, u_j` |
| `N + 5 + j` | `r_p * l_j` ready; dot product accumulated |
| `N + 7 + j` | `sigma * r_p * l_j` ready; `newB[:, j]` registered |
| `N + 8 + j` | `col_valid` high, `col_idx = j` |
| `2N + 8` | `done` high for one cycle |

All multipliers have two pipeline stages: operand registers and a product
register. Counted from the start edge, the latency is therefore `2N` for the
two sweeps plus 8 for the pipeline registers between and around them.

### Interface

* **`start`** samples `u`, `v` and `sigma`. A `start` while `busy` is
  ignored, and an assertion flags it in simulation.
* **`b`** is a parallel N x N input. It must stay unchanged from `start`
  until `done`, because it is read in both sweeps.
* **`newB`** is streamed out one column per cycle on `col`, qualified by
  `col_valid` and `col_idx`.
* **`d`** is valid from `done` until the next `start`.
* A new `start` may arrive in the same cycle as `done`, so operations can
  run back to back.

## The optimised engine (`sm_opt`)

For a switch with conductance change `dg` between nodes i and j, `A`
changes by `dg * (e_i - e_j)(e_i - e_j)^T`. The vectors `u` and `v` are zero
except at positions i and j. The two matrix-vector products then reduce to
selecting rows and columns:

```
l = A^-1 u   = u_i * column_i + u_j * column_j
r = v^T A^-1 = v_i * row_i    + v_j * row_j
A^-1 <- A^-1 - sigma * l r^T
```

The engine keeps `A^-1` in N^2 cells (`sm_opt_cell`). Each cell holds one
element, one multiplier and one subtractor. The whole matrix is updated in
the same cycle.

### Pipeline

Edges are counted from the edge that samples `start`:

| edge | stage |
|---|---|
| 0 | multiplexers pick columns i, j and rows i, j of the stored matrix; coefficients and `sigma` are sampled |
| 1 | `l` and `r` registered |
| 2 | `sigma * l` registered |
| 3 | `(sigma l_p) * r_q` registered in every cell |
| 4 | every cell subtracts its term; `done` is high in the next cycle |

The latency is 4 cycles whatever N is. The engine accepts one update at a
time, because stage 0 must see the result of the previous update. The
matrix is read at edge 0 and written at edge 4.

### Coefficients

The engine takes `u_i, u_j, v_i, v_j` as inputs, not a single `dg`. For a
switch, the usual form is `u = (d_i at i, -d_j at j)` and
`v = (-1 at i, +1 at j)`. For a pure conductance change `dg`, set
`d_i = d_j = -dg`. This gives `u v^T = dg (e_i - e_j)(e_i - e_j)^T`. Any
other rank-one update confined to rows and columns i and j works as well.
`i = j` is allowed.

### Interface

* **Loading the matrix.** `ld_en` writes `ld_data` into row `ld_row`, one
  row per cycle. The engine ignores loads while `busy` and flags them in
  simulation.
* **Starting an update.** `start` is ignored while `busy`, and also in a
  cycle where `ld_en` is high.
* **Reading the matrix.** `ainv` shows the whole stored matrix at all times.
  For example, a following matrix-vector stage can read it directly.

## How far this follows the source algorithm, and where it departs

The design follows:

* the update equations;
* the organisation of the two versions: N+1 processors versus N^2 cells,
  with the inverse held in registers;
* the `sigma = 1` default and the external sigma table;
* the latencies, 8 + 2N and 4 cycles.

The following are this design's own choices:

* the word format and multiplier arithmetic;
* the two-stage multipliers, and how the constant 8 of the full engine's
  latency splits into pipeline stages;
* all input and output: the held parallel `b`, the streamed `newB`, row
  loading and parallel read-out of the optimised engine. A systolic form
  of the full engine would feed `B` to processor p through a p-cycle delay
  line instead; here every processor picks its operand from the held `b`
  through a multiplexer, so no delay lines are needed;
* reset: asynchronous, active low, applied to control state, accumulators
  and stored matrix;
* ignoring `start` and load while busy.

The optimised engine departs from its source description in three points,
where the written description contradicts itself:

* The source gives `r = column_i + column_j` for `r = v^T A^-1`. With
  `v = (-1, +1)` at `(i, j)`, the algebra gives `-row_i + row_j`. The engine
  follows the algebra and uses rows with coefficients `v_i, v_j`.
* One statement of the update adds the correction term, while the
  Sherman-Morrison formula subtracts it. The engine subtracts, as the
  formula does.
* The written 5 x 5 perturbation pattern and the stated `u`, `v` disagree on
  which of `d_i`, `d_j` sits where. Because `u_i` and `u_j` are separate
  inputs, either reading can be applied.

Not included:

* the sigma look-up table, for the reasons above;
* the matrix-vector product `x = A^-1 b` of the simulator step itself;
* any host interface.

Results for FPGA resources (DSPs, LUTs, flip-flops) depend on the synthesis
tool and were not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. It compares against
values computed inside the testbench and checks the cycle counts where a
latency is specified.

| testbench | what it shows |
|---|---|
| `tb_sm_full_ctrl` | every enable and index of the full engine's schedule, cycle by cycle; `start` ignored while busy |
| `tb_sm_full_pe`, `tb_sm_dot_pe` | row and dot processors driven by hand, integer and 16-fraction-bit data |
| `tb_sm_full` | full engine at order 5: random updates, column order, `d`, latency 18, back-to-back operations, `FRAC` = 0 and 12 |
| `tb_sm_opt_cell`, `tb_sm_opt` | cell and optimised engine at order 6: load, chains of updates, switch form and general form, `i = j`, latency 4, inputs sampled only at `start` |
| `tb_sm_top` | both engines through the top level at order 6 (details below) |
| `tb_sm_table1` | full engine at orders 3, 7, 13 (latencies 14, 22, 34) and optimised engine at orders 10 and 16 (latency 4); smaller problems zero-padded inside the default-size engines |
| `tb_sm_top_full` | the top level at its default sizes (13 and 16): one full update and two optimised updates, every element checked |

`tb_sm_top` runs two workloads:

* **Cross-check of the two engines (integer data).** The same `B` and
  switch update go to both engines. Their results must agree with each other
  and with the model.
* **Switching network (16 fraction bits).** This is the use the engines are
  built for. The network has 6 nodes and two switches. The testbench loads
  `A^-1`. For each switch toggle, the full engine supplies `d`, the
  testbench forms `sigma = 1/(1+d)` (the sigma table's job), and the
  optimised engine updates the stored inverse. After six toggles in a row,
  the result still matches the floating-point inverse of the changed
  matrix to within 2e-3.

The testbench also counts each mechanism: back-to-back starts, `sigma`
other than 1, successive updates, agreement between the engines, and
`sigma` derived from `d`. It fails if any of them never happens.

## Simulating

The package `sm_pkg` must be read first. Everything else is found by
module name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_sm_top rtl/sm_pkg.sv tb/tb_sm_top.sv
./obj_dir/Vtb_sm_top
```

Replace `tb_sm_top` with any testbench name. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops itself; a watchdog ends a
testbench that hangs. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/sm_pkg.sv rtl/sm_top.sv`.
The remaining lint warnings are cosmetic:

* an unused `clk` in the combinational multiplier variant;
* unused high product bits;
* an unconnected debug output;
* the reset being used both in the flip-flops and in the assertions.

To change sizes, override `N_FULL`, `N_OPT`, `W` and `FRAC` on `sm_top`, or
`N`, `W` and `FRAC` on the engines. Resources grow as follows:

* **Full engine:** N processors, each with four multipliers, plus one.
  Resources grow linearly in N, but each processor selects from all of `b`
  through N-to-1 multiplexers.
* **Optimised engine:** N^2 multipliers and N^2 words of storage, plus
  5N multipliers for `l`, `r` and `sigma * l`.

## Files

```
rtl/sm_pkg.sv        word-format defaults and latency constants
rtl/fxp_mul.sv       fixed-point multiplier, 0, 1 or 2 pipeline stages
rtl/sm_full_ctrl.sv  time-counter controller of the full engine
rtl/sm_full_pe.sv    row processor of the full engine
rtl/sm_dot_pe.sv     dot-product processor (d = l . u)
rtl/sm_full.sv       full engine
rtl/sm_opt_cell.sv   storage-and-update cell of the optimised engine
rtl/sm_opt.sv        optimised engine
rtl/sm_top.sv        both engines side by side
tb/                  testbenches; tb_full_runner and tb_opt_runner are helpers
```
