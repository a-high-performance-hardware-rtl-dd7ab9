# LESS matrix engine: constant-time RREF(G·Q) with canonical column order

LESS (Linear Equivalence Signature Scheme) is a code-based post-quantum
signature. Its security rests on the linear equivalence problem: given two
generator matrices G and G' = S·G·Q of linear codes over F_q, with S invertible
and Q monomial (a permutation matrix whose ones are replaced by non-zero
scalars), it is hard to recover Q. Key generation, signing and verification
all spend most of their time on one matrix operation:

    take a K x N generator G, multiply it by a monomial matrix Q,
    bring G·Q to reduced row echelon form (RREF),
    put the N-K non-pivot columns into a canonical (sorted) order.

The result is what the scheme hashes and transmits. This repository holds
synthesizable SystemVerilog for a hardware engine doing exactly that,
organised around whole-row operations: every cycle, an entire matrix row is
read, transformed and written back. Everything runs in constant time: the
number of cycles depends on N and K only, never on the matrix contents.

The default build is NIST security level 1 (n = 252, k = 126, q = 127,
parameter sets LESS-1b/1i/1s). Levels 3 (n = 400, k = 200) and 5 (n = 548,
k = 274) are obtained by overriding `N` and `K`; constants for all three are in
`less_pkg`.

## Data flow

```
 G rows ──► monomial_apply ──► rref_unit ─────────────────────► col_sort ──► sorted rows
 (K rows,    G[r][j]·=          ┌ rref_col_mem (N column RAMs,    reads the      (N-K elements
  N elems)   G[r][perm[j]]      │  row-address translation)       reduced matrix  per row)
             ·scale[j]          ├ rref_row_arith (N lanes,        back row by
                                │  4-stage pipeline)              row
                                └ rref_pivot_search (N detectors,
                                   priority encoder)
```

`less_core` is the top. Rows of G enter one per cycle. `use_monomial = 0`
bypasses the monomial step (RREF of G itself, as needed to put a freshly
sampled generator into systematic form). Output is a stream of K rows of the
sorted non-pivot part, plus `pivot_mask`, the sorted column index list
`col_idx` and two flags (`full_rank`, `sort_ok`) that drop when G·Q has rank
below K.

## The RREF unit

RREF is Gauss–Jordan elimination. For each row to reduce `rtr = 0 … K-1`:

1. **Pivot search.** Find the left-most column that has a non-zero entry in
   rows `rtr … K-1`, right of the previous pivot column, and a row `p` holding
   one.
2. **Row swap.** Exchange rows `rtr` and `p`.
3. **Rescale pivot row.** Multiply row `rtr` by the inverse of its pivot
   element, giving a leading 1.
4. **Reduce other rows.** For every other row r subtract `row_r[c] · pivot
   row`, clearing column c everywhere else.

A software implementation does about K²·N multiply-subtracts. Here steps 3
and 4 work on a whole row per cycle. That leaves about K row operations per
pass and about K² cycles in all.

### Column memory (`rref_col_mem`)

The matrix is held in N small RAMs, one per column, each K words deep.
Addressing all N RAMs with the same word reads or writes a whole row in one
cycle. The RAMs are simple dual port (one read port, one write port), so the
pipeline can read one row while writing back another.

Rows are addressed logically through a K-entry translation table (logical row
→ physical word). A row swap exchanges two table entries and moves no data.
It takes one cycle whether or not the rows differ, which keeps the swap free
of timing leaks. `init` resets the table to the identity at the start of
every run.

### Pivot search (`rref_pivot_search`)

For the row presented in a cycle, N parallel detectors flag the non-zero
elements inside the search area (columns ≥ `min_col`, rows ≥ `row_lo`). A
priority encoder picks the left-most flagged column. Over successive rows the
unit keeps the candidate with the smallest column. On a tie it keeps the row
seen first. This choice does not affect the result, because the RREF of a
matrix is unique. The area shrinks as elimination advances: `min_col` moves
past each pivot column, and `row_lo` moves past each finished row.

The search never gets its own pass over the matrix. The first search runs
while the matrix is loaded. Every later search runs on the reduced rows as
they leave the arithmetic pipeline during the reduce pass. So when a pass
ends, the next pivot is already known.

### Row arithmetic (`rref_row_arith`)

N identical lanes compute `a · f mod q`. The same lanes serve both row
operations:

| operation | a             | f                    | result           |
|-----------|---------------|----------------------|------------------|
| rescale   | row[c]        | inv(row[pcol])       | a·f              |
| reduce    | pivot_row[c]  | row[pcol] (0 if skip)| row[c] − a·f     |

Pipeline, one row accepted per cycle, latency 4:
S1 factor selection (N:1 mux of the pivot element, inverse look-up table
computed at elaboration as a^(q−2) mod q) → S2 products → S3 mod q → S4
modular subtraction. A rescale result is also latched into the pivot row
register, which the reduce operations of the pass read. While the rescale
result is on the output, it is forwarded to the multipliers. A reduce can
therefore enter three cycles after its rescale.

### Controller schedule and timing (`rref_unit`)

```
LOAD          K rows written, first pivot search runs on them
per pass rtr (cycle numbers relative to ITER):
  0           ITER: take pivot (p, c) from the search, swap rtr <-> p in the
              table, read row p (now row rtr)
  1 -> 5      rescale of that row in the pipeline; written back and latched
              as pivot row at cycle 5
  3 .. K+2    RED: read rows 0..K-1, one per cycle, into the pipeline
              (reduce). The first enters at cycle 4 and gets the new pivot
              row forwarded from the pipeline output. The slot of row rtr
              returns the pivot row itself.
  .. K+7      DRAIN: last write-back; the search for rtr+1 ends with it
  K+8         next ITER
```

A pass takes K + 8 cycles. From the last loaded row to `done` it takes
**K·(K+8) cycles**: 16,884 at level 1, 41,600 at level 3 and 77,268 at
level 5.

The slot of the pivot row in the reduce pass may be read from memory before
the rescaled row has been written back (when rtr < 3). That is why it returns
the pivot row register rather than the row it read.

Rank-deficient input needs no special case. If no pivot is found, all
remaining rows are already zero. The pass still runs: the rescale multiplies
by inv(0) = 0 and the reduce subtracts multiples of a zero row, so nothing
changes. `full_rank` drops and no pivot column is recorded. The cycle count
stays the same.

## Column sorting (`col_sort`)

In RREF the K pivot columns form an identity and carry no information. The
N−K other columns are put into ascending lexicographic order: compare element
by element from row 0 down, and the first differing element decides. For
example, the columns (0,1,3,0), (0,1,6,8), (1,0,0,0), (2,0,6,0) and (4,5,4,4)
are already in order. Equal columns keep their original order.

The matrix is not moved. The sorter keeps a list of N−K column indices and
reads the matrix back from the column memory one row per cycle:

- **COMPACT** (N cycles): collect the non-pivot column indices.
- **SORT** (N−K passes of K+2 cycles): odd–even transposition sort. Each pass
  compares neighbouring list entries. The rows stream top to bottom, and each
  compared pair records the outcome at the first row where its two columns
  differ. At the end of the pass, out-of-order pairs exchange their indices.
  N−K passes sort any input.
- **OUTPUT** (K cycles): stream the rows once more, each as its N−K
  elements in sorted column order.

Time from start to `done` is N + (N−K)·(K+2) + K + 2 cycles. This is about
as long as the reduction, and it does not depend on the data.

## Monomial transform (`monomial_apply`)

A monomial matrix has one non-zero per row and column. It is passed as two
vectors: `perm[j]`, the row of the non-zero in column j, and `scale[j]`, its
value. Then `(G·Q)[r][j] = G[r][perm[j]] · scale[j] mod q`. An N-way crossbar
and N multipliers apply this to one row per cycle, with a latency of 2
cycles.

## Performance at the three security levels

| level | N   | K   | RREF (cycles) | full operation (cycles) |
|-------|-----|-----|---------------|-------------------------|
| 1     | 252 | 126 | 16,884        | 33,394                  |
| 3     | 400 | 200 | 41,600        | 82,604                  |
| 5     | 548 | 274 | 77,268        | 153,718                 |

The full operation counts from the last generator row to `done`:
2 + K·(K+8) + N + (N−K)·(K+2) + K + 2. All figures were measured in
simulation. For reference, the FPGA implementation this architecture follows
reports its RREF at k² + 3k + 58 cycles (16,312, 40,658 and 75,956 for the
three levels), with clock rates of 200, 167 and
142 MHz for the three levels on an Artix-7.

## How far this follows the reference architecture, and where it departs

These parts follow the published architecture: the column-per-RAM memory
with row-address translation for constant-time swaps, the four RREF
operations on whole rows, the pivot search with parallel non-zero detectors
and a priority encoder over a shrinking area, the search overlapped with
loading and with reduction, the arithmetic lanes shared between rescale and
reduce with a pivot-row register, and a pipelined datapath producing one row
per cycle.

These are choices of this design:

- **Pass overhead.** Each pass costs K + 8 cycles. The published
  k² + 3k + 58 implies K + 3 per pass, which needs a deeper overlap between
  consecutive passes than the one used here. That overlap is not documented.
  The difference is 1.7% to 3.5% of the RREF time, depending on level.
- **Pipeline depth** of the row arithmetic (4 stages) and of the monomial
  unit (2 stages).
- **The column sorter.** Only its function (element-wise comparison of the
  non-pivot columns) is specified. The index-list transposition sorter is
  this design's own.
- **The monomial crossbar** and the (perm, scale) encoding of Q.
- **The handshakes.** The engine uses valid-only streams without
  backpressure, an asynchronous active-low reset, and the `full_rank` and
  `sort_ok` flags for rank-deficient inputs.

Not included:

- The hash function.
- The CSPRNG, including on-the-fly sampling of generator coefficients.
- The commitment seed tree.
- The key-generation, signing and verification sequencing around the engine.
- The transmission optimisations: information-set compression of monomials,
  and minimisation of the non-pivot columns before sorting.

The engine's ports are where these would connect.

## Files

| file | contents |
|------|----------|
| `rtl/less_pkg.sv` | level constants, `row_op_e`, `mod_inv` |
| `rtl/less_core.sv` | top: monomial → RREF → sort |
| `rtl/rref_unit.sv` | RREF controller and datapath assembly |
| `rtl/rref_col_mem.sv` | column RAMs and translation table |
| `rtl/rref_pivot_search.sv` | detectors and priority encoder |
| `rtl/rref_row_arith.sv` | shared rescale/reduce pipeline |
| `rtl/monomial_apply.sv` | G·Q row transform |
| `rtl/col_sort.sv` | non-pivot column sorter |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_less_core_full.sv` | one operation at the default (level 1) size |
| `tb/tb_less_core_levels.sv` | one operation each at levels 3 and 5 |
| `tb/rref_ref_pkg.sv` | software reference: Gauss–Jordan RREF, column compare |
| `tb/*_check.sv`, `tb/less_core_op.sv` | parameterised test drivers used by the testbenches |

## Verification

Every testbench is self-checking. Each one compares against a reference
written independently of the RTL and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

- **`tb_rref_unit`** checks full matrices against Gauss–Jordan elimination.
  It covers the 3 × 7 example over F_7, random 3 × 7 and 8 × 20 matrices,
  rank-deficient inputs, skipped pivot columns and row swaps. It also checks
  that the latency is exactly K·(K+8) for every input.
- **`tb_col_sort`** checks the sorter against a stable software sort,
  including exact ties and the worked 4 × 5 example.
- **`tb_monomial_apply`** checks the transform against a full matrix
  product, including the 4 × 5 example over F_7.
- **`tb_less_core`** runs 16 back-to-back operations at N = 16, K = 8. It
  counts each mechanism (monomial and bypass paths, row swaps, skipped
  columns, rank deficiency, sort exchanges) and fails if one never occurs.
- **`tb_less_core_full`** runs one operation at the default size, and
  **`tb_less_core_levels`** one operation each at levels 3 and 5. Every
  output element is compared. Each testbench takes seconds to a few minutes
  of simulation.

The RTL also carries a few concurrent assertions on interface rules. A run
or sort may start only when idle. Rows may arrive only while the RREF unit
is loading. The external read port may be used only when the unit is idle.
Compile with `--assert` to enable them.

Run any of them with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/less_pkg.sv tb/rref_ref_pkg.sv tb/tb_less_core.sv --top-module tb_less_core
./obj_dir/Vtb_less_core
```

Replace `tb_less_core` with any other `tb_*` module. Modules are found
through `-Irtl -Itb`, one per file.

## Changing it

- **Security level:** override `N` and `K` on `less_core`, for example
  `#(.N(less_pkg::N_L5), .K(less_pkg::K_L5))`.
- **Field:** `Q` sets the field. It must be prime, because the inverse uses
  Fermat's little theorem. The element width is clog2(Q).
- **Pipeline timing:** the cycle formulas above are checked by the
  testbenches. Change the expected values there when you retime a pipeline.
