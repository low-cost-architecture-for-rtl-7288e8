# Systolic structure-measure distance unit

Relaxation labelling matches the nodes of an input graph against the nodes of a
reference graph. Its support function needs, on every iteration, a *structural
distance* between two cliques. A clique is a central node plus the ring of its
external neighbours. That distance is an edit (Levenshtein) distance between the
two neighbour sequences. The reference clique's ring has no start point, so the
sequence is cyclic. The distance that counts is therefore the minimum over all
`m` rotations of the reference sequence:

    d_d = min over r = 0..m-1 of  d(input, reference rotated by r)

This RTL computes, for a stream of `k` input cliques, the edit distance of each
one against **all `m` rotations of one reference clique at once**. It uses
`m x m` small processing elements (PEs) and accepts **one row of substitution
costs per clock**. The substitution costs are computed outside the unit. They
are 3-bit values, 0..7. Insertion and deletion share one cost `C`, fixed when
the unit is built. Input cliques may be of any length and any number of them
may follow each other. The default build is one 7 x 7 block (49 PEs), which
matches a reference clique with 7 external nodes. `k` cliques of `n_1..n_k`
nodes take `m + sum(n_i)` clocks.

## The incremental recurrence

The edit-distance matrix `D` has one row `i` per input node and one column `j`
per reference node:

    D[i][0] = i*C,  D[0][j] = j*C
    D[i][j] = min(D[i-1][j] + C, D[i][j-1] + C, D[i-1][j-1] + Sub[i][j])

The absolute values grow with the input length. The hardware therefore never
stores them. It only carries the differences between neighbouring elements:

    ivc[i][j] = D[i][j] - D[i-1][j]     (vertical:   element minus the one above)
    ihc[i][j] = D[i][j] - D[i][j-1]     (horizontal: element minus the one left)

When both differences are measured from the diagonal element `D[i-1][j-1]`,
the recurrence becomes

    MIN       = min( min(ihc[i-1][j], ivc[i][j-1]) + C,  Sub[i][j] )   = D[i][j] - D[i-1][j-1]
    ivc[i][j] = MIN - ihc[i-1][j]
    ihc[i][j] = MIN - ivc[i][j-1]

Substitution costs are never negative. Under that condition both differences
always stay within `[-C, +C]` and `MIN` stays within `0..7`. So a 4-bit
two's-complement word holds every difference as long as `C <= 7`. An
elaboration check rejects a larger `C`, and an assertion checks the range at
run time. The boundary conditions become constants. The left input of column
1 is always `C`, and the "row 0" value of every column is `C`. The distance is
rebuilt from the last column:

    D[n][m] = m*C + sum over i of ivc[i][m]

## Processing element (`smd_pe`)

Each PE owns one matrix column. In each clock it receives three values:

- `ivc` from its left neighbour;
- its own `ihc` from the previous row, which it holds in a register;
- the substitution cost for the element it is computing.

It evaluates the three lines above in one combinational step: two compares,
one add of `C` and two subtractions, all 5 bits wide. It then registers three
outputs:

- the new `ivc`, which goes to the right-hand PE;
- the new `ihc`, which it keeps for the next row;
- the substitution cost and the row tag, which it passes on.

When the incoming row is tagged `init`, meaning the first row of a new input
clique, the PE uses `C` in place of the stored `ihc`. The next clique
therefore starts from a clean column without any flush.

## The wavefront (`smd_pe_array`)

A chain of `m` PEs computes a matrix one anti-diagonal per clock. PE `j`
handles row `t - j` in clock `t`. In that clock its left neighbour's registered
`ivc` is exactly the `ivc[i][j-1]` it needs. The row tag (`valid`, `init`)
moves down the chain with the same delay as the data. Rows of consecutive
cliques follow each other with no gap. `ivc` of the last PE leaves `m` clocks
after its row entered.

Used alone, such a chain needs its substitution costs skewed: PE `j` wants
column `j` of a row that entered `j` clocks earlier. The array takes one cost
per PE (`sub_in[j]`) and gives each one back a clock later (`sub_out[j]`). The
next level uses these ports to avoid skew buffers.

## All rotations with one row per clock (`smd_device`, `smd_core`)

This part takes the most care to follow.

The unit has `m` arrays. Array `r` matches the input against the reference
rotated by `r` places. PE `j` of array `r` therefore needs

    Sub[i][(j + r) mod m]       (0-based columns of the unrotated matrix)

for the row `i = t - j` it works on in clock `t`. One clock earlier, PE `j-1`
of array `r+1` worked on the same row. It needed
`Sub[i][(j-1 + r+1) mod m]`, which is the same value. So no array needs its own
copy of the matrix. Each PE registers the cost it used, and the cost moves
**diagonally**: from PE `j` of array `r` to PE `j+1` of array `(r-1) mod m`.
At the other end, PE 0 of array `r` takes column `r` of the current unrotated
row. The external interface is therefore one row of `m` three-bit costs per
clock, and every array sees its own rotation.

```
            PE 0 (input)   PE 1 takes, from the previous clock   PE 2 takes ...
array 0     Sub[i][0]      PE 0 of array 1                       PE 1 of array 1
array 1     Sub[i][1]      PE 0 of array 2                       PE 1 of array 2
  ...
array m-1   Sub[i][m-1]    PE 0 of array 0 (wraps around)        PE 1 of array 0
```

`smd_device` is one square block of this grid: `M` arrays of `M` PEs
(`M = 7`). Its four sides are ports:

- `sub_first`: the costs for PE 0 of each array;
- `sub_wrap_in` / `sub_wrap_out`: the diagonal costs that wrap from the first
  array of one block into the last array of the block above;
- `sub_last_out`: the costs leaving the last PE column;
- `ivc_left` / `ivc_out`: the left inputs and the results of each array;
- `tag_in` / `tag_out`: the row tag.

A single device closes its own loops. `smd_core` places `G x G` devices in a
grid for a reference of `m = G * M` nodes. Device `(a, p)` holds arrays
`a*M ..` and PEs `p*M ..`. Along a row of devices, `ivc` and the tag pass to
the right. The diagonal costs pass to the right-hand device at the last PE
column, and to the device below at the last array. At the bottom they wrap to
the top row. `G = 1` (one 7 x 7 device, 49 PEs) is the default. `G = 2` gives
the 14 x 14 arrangement (196 PEs) for 14-node references.

## Stream protocol and timing (`smd_top`)

`smd_top` combines `smd_core` with one `smd_accumulator` per rotation.

| signal | dir | meaning |
|---|---|---|
| `sub_row[m]` | in | row `i` of the `n x m` substitution matrix, columns in unrotated reference order, 3 bits each |
| `row_valid` | in | `sub_row` is a real row |
| `row_init` | in | first row of an input clique |
| `ivc[m]` | out | incremental value leaving each rotation array, 4-bit signed |
| `distance[m]` | out | edit distance to each rotation, `ACC_W` bits |
| `dist_valid` | out | `distance` belongs to a finished clique in this clock |

- Present one row per clock. Set `row_init` on the first row of every clique.
  Cliques may follow back to back.
- Idle clocks (`row_valid = 0`) are allowed only **between** cliques. An
  assertion requires that a valid row after an idle clock carries `init`.
- A row entering in clock `t` leaves the last PEs after the edge that ends
  clock `t + m - 1`. The accumulator adds it at the next edge.
- On an `init` row the accumulator loads `m*C + ivc`. On every other valid row
  it adds the sign-extended `ivc`.
- A clique of `n` rows whose first row enters in clock `s` is complete after
  the edge that ends clock `s + n + m - 1`, which is `m + n` clocks. It is
  shown in the following clock, when the next slot to reach the accumulators
  is idle or starts a new clique. In that clock `dist_valid = 1` and
  `distance[r]` holds it. The last clique of a burst therefore needs one
  trailing idle clock to be reported.
- A back-to-back burst of `k` cliques finishes in `m + sum(n_i)` clocks.

The rotation-invariant distance `d_d` is `min(distance[0..m-1])`. The unit
leaves it to the consumer, along with the substitution-cost computation.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `M_DEV` | 7 | top, core | arrays per device = PEs per array |
| `G` | 1 | top, core | devices per side; reference length `m = G * M_DEV` |
| `C_COST` | 4 | all | insertion = deletion cost, at most 7 |
| `ACC_W` | 16 | top, accumulator | accumulator width; must hold `(n + m) * C` |
| `SUB_W`, `INC_W` | 3, 4 | `smd_pkg` | cost and increment widths |

The unit matches a reference of exactly `m` nodes. A different reference length
needs a different build (`M_DEV`, `G`). `C` is a build-time constant too.

## Where this RTL makes its own choices

- **The `valid` bit.** The architecture has only the sequence-start signal and
  accumulates every clock. Here a `valid` bit travels with `init`, so idle
  clocks change nothing and the accumulator can detect the end of a clique
  (`dist_valid`). Without it, a stream would have to be gapless and the user
  would have to know when to sample the accumulator.
- **The accumulators are inside the top**, so it delivers distances. In the
  reference implementation they sit outside the programmable device, which
  delivers only the 4-bit `ivc` values; `ivc` is still a port here. The width
  `ACC_W = 16` is a choice: with `m = 7` it holds inputs of up to 16376 nodes
  at `C = 4`.
- **The encoding.** Increments are 4-bit two's complement. Reset is
  synchronous and active low, and clears every register.
- **The cascade wiring.** The division into square devices with side ports,
  and the way they connect, are this design's. The architecture only says that
  devices can be cascaded to match longer references.
- **Timing.** The design registers every PE output and has no other pipeline
  stages, so the clock period is one PE (5-bit compare/add/subtract) plus the
  wire to the next. The reference FPGA implementation ran at about 24 MHz.
  Nothing here was timed on a target technology.

## Verification

Every testbench checks against a direct model in `tb/smd_tb_pkg.sv`. The model
fills the absolute matrix `D` with the textbook recurrence, so it shares no
code or form with the incremental hardware. Stimuli are random cliques of 1 to
39 nodes with random costs 0..7. They run back to back, or separated by one or
two idle clocks.

| testbench | what it checks |
|---|---|
| `tb_smd_pe` | one PE as a column next to a random legal left column: every `ivc`, forwarded cost and tag, restart on `init` |
| `tb_smd_pe_array` | non-cyclic array with test-bench skewing: every increment at `m` clocks, distances, cost forwarding |
| `tb_smd_device` | one 7 x 7 device with its loops closed: every increment of every rotation, diagonal cost routing |
| `tb_smd_core` | 2 x 2 cascade of devices (`m = 14`): every increment of every rotation |
| `tb_smd_accumulator` | loading `m*C`, accumulation, one report per clique, idle clocks |
| `tb_smd_top` | full default build end to end: increments, distances of all 7 rotations, the `m + n` latency, and the rotation minimum. It counts clique starts, back-to-back changes, idle gaps, short, long and single-node inputs, increments at `+C` and `-C`, and best rotations other than 0, and fails if any of these never happens |
| `tb_smd_top_variants` | the top at `C = 1`, `C = 7`, and `G = 2` (14-node reference, 196 PEs) |

Each testbench prints `TB_RESULT checks=N failures=F` and has a watchdog. All
of them run in well under a second.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/smd_pkg.sv tb/smd_tb_pkg.sv tb/tb_smd_top.sv --top-module tb_smd_top
./obj_dir/Vtb_smd_top
```

Replace `tb_smd_top` with any other testbench. Lint the RTL with
`verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/smd_pkg.sv rtl/smd_top.sv`.
One warning is expected: the `sub_last_out` costs of the right-most devices
have nowhere to go. When `smd_accumulator` is linted on its own, `C_MAX` in the
package is also reported as unused.

## Files

- `rtl/smd_pkg.sv`: widths, the cost and increment types, the `{valid, init}` row tag
- `rtl/smd_pe.sv`: processing element
- `rtl/smd_pe_array.sv`: chain of PEs, one per reference column
- `rtl/smd_device.sv`: `M` rotation arrays with diagonal cost routing and cascade ports
- `rtl/smd_core.sv`: `G x G` grid of devices
- `rtl/smd_accumulator.sv`: per-rotation distance accumulator
- `rtl/smd_top.sv`: core plus accumulators
- `tb/`: the testbenches above, the reference model package and `smd_top_harness.sv`
