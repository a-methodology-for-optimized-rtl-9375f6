# Linear-array matrix multiplier

This design computes C = A × B for a continuous stream of N × N integer
matrix pairs, N = 16 by default. It uses a linear array of N
multiply-accumulate processing elements (PEs). A product needs N³
multiply-accumulates, and N PEs each doing one per clock finish it in N²
cycles. The N² results also leave in N² cycles, one per clock. Matrix pairs
can therefore follow each other without a gap. Every multiplier is busy in
every cycle, and one product leaves the array every N² = 256 cycles.

The array follows the linear-array matrix multiplier that Baker and Prasanna
used as the worked example in *A Methodology for Optimized FPGA Design of
Signal Processing Kernels*. Their version was hand-written VHDL for a Virtex-II
and was optimised for the product of area and time. From that publication come:

- the architecture: a linear array of N multipliers with local memory in each
  element;
- the size: N = 16, optimised for 16 × 16 matrices;
- the rate: one result per cycle and 256 cycles per product for a continuous
  stream of matrices.

The publication does not describe the inside of the array. The dataflow,
element order, widths, handshake and reset below are this design's own. They
are written to reach exactly that rate with as little control as possible.

## Dataflow

The product is computed as N passes. Pass k adds the outer product of column k
of A and row k of B into C:

    C[i][j] += A[i][k] * B[k][j]     for all i, j

PE J owns column J of C. During pass k it holds B[k][J] and multiplies it with
each A[i][k] of column k as that element passes, adding the product into entry
i of its local accumulation memory. Two streams run through the array from left
to right, one PE per clock:

| stream | carries in pass k | tag | used by PE J |
|---|---|---|---|
| B | row k of B, B[k][0..N-1] | column c | stores B[k][J] when c == J |
| A | column k of A, A[0..N-1][k] | row i, first (k = 0), last (k = N-1) | one MAC into CBUF[i] |

```
 a_in, b_in ──► mm_feeder ──► PE 0 ──► PE 1 ──► ... ──► PE N-1 ──► (A stream end)
                (counters,     │        │                 │             │ start
                 A delay N)    └────────┴──── OBUF read ──┴──► mm_collector ──► out_data
```

Each PE contains:

- **BU / BM**: two B registers. BU captures the next B value while BM serves
  the current pass.
- **CBUF**: N accumulation words. The first pass writes the product into them
  instead of adding it, so no clearing cycle is needed.
- **OBUF**: N output words. The last pass writes the finished sums here. The
  collector reads them while CBUF already works on the next product. This
  duplicated memory is what lets products overlap.
- One multiplier and one adder. The accumulator is 2·DATA_W + log2 N bits wide
  (36 bits by default), so results are exact for any input.

## Timing

Timing is the subtle part of the design. There is no handshake inside the
array, so correctness rests on three timing relations. All of them follow from
the fixed delays. Time is counted in clocks from the first input of a pair.

**1. B must arrive before it is needed, but not too early.** B[k][J] enters at
kN + J and reaches PE J at kN + 2J + 1. The A stream is delayed by N extra
cycles in the feeder, so A[0][k] reaches PE J at kN + N + J + 1. In that cycle
the PE multiplies with BU directly and copies BU into BM for the remaining
N-1 rows of the pass. The next value, B[k+1][J], arrives at (k+1)N + 2J + 1.
That is never before the copy: for J = 0 it is the same clock edge, and the
copy reads the old BU. An A delay of exactly N satisfies both bounds:

- a shorter delay breaks the last PEs;
- a longer delay breaks PE 0.

**2. Results must be read before the next product overwrites them.** PE J
writes C[i][J] into OBUF at cycle N² + 1 + i + J. If the next pair follows
without a gap, that entry is overwritten at 2N² + 1 + i + J. The collector
starts reading when the last-pass element of row 0 leaves the last PE, at cycle
N² + N + 1. It reads in row-major order, C[i][j] at N² + N + 1 + iN + j, which
falls inside that window for every i and j.

**3. The input must be continuous within a pair.** Once a pair has started,
all N² elements must arrive in consecutive cycles. Idle cycles between pairs
are allowed and cost nothing but throughput. An assertion in `mm_feeder`
reports a gap inside a pair.

The resulting figures:

| quantity | value | N = 16 |
|---|---|---|
| input rate | 1 A + 1 B element per cycle | |
| cycles per product (throughput) | N² | 256 |
| first result after first input | N² + N + 2 | 274 |
| results | N² consecutive cycles, row-major | 256 |

## Interface (`mm_linear_array`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset (control state only) |
| `in_valid` | in | 1 | an A and a B element are present; high for N² consecutive cycles per pair |
| `a_in` | in | DATA_W | cycle t of a pair: A[t mod N][t div N] (A column-major) |
| `b_in` | in | DATA_W | cycle t of a pair: B[t div N][t mod N] (B row-major) |
| `out_valid` | out | 1 | `out_data` holds a result |
| `out_data` | out | ACC_W | C in row-major order |
| `out_last` | out | 1 | this is C[N-1][N-1] |

Elements are signed two's complement. There is no back-pressure: the consumer
must take one result per cycle while `out_valid` is high.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | matrix size and number of PEs (from the publication) |
| `DATA_W` | 16 | element width (this design's choice) |
| `ACC_W` | 2·DATA_W + clog2(N) = 36 | result width, exact (this design's choice) |

Defaults live in `mm_pkg`. N must be at least 2. It need not be a power of two.

## Files

| file | content |
|---|---|
| `rtl/mm_pkg.sv` | default sizes, width functions |
| `rtl/mm_feeder.sv` | input counters, tags, first/last flags, N-cycle A delay |
| `rtl/mm_pe.sv` | one processing element |
| `rtl/mm_collector.sv` | row-major read-out of the PEs' output buffers |
| `rtl/mm_linear_array.sv` | top: feeder, N PEs, collector |
| `tb/tb_mm_pe.sv`, `tb/tb_mm_feeder.sv`, `tb/tb_mm_collector.sv` | unit tests (N = 4) |
| `tb/tb_mm_linear_array.sv` | end-to-end test at the default size |
| `tb/tb_mm_n12.sv` | 12 × 12 products: zero-padded on the 16-PE array, and on a 12-PE array |

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops itself through a watchdog if
something hangs. For example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
    rtl/mm_pkg.sv tb/tb_mm_linear_array.sv --top-module tb_mm_linear_array
./obj_dir/Vtb_mm_linear_array
```

Use the same command with another testbench name for the others. The
end-to-end test runs the default configuration in well under a second. It
streams eight 16 × 16 pairs, made up of:

- random pairs and two full-scale pairs (all −32768; +32767 × −32768);
- pairs that follow back to back and pairs after idle gaps.

It checks:

- every result;
- `out_last`;
- the 274-cycle latency;
- that each product's results come in consecutive cycles.

It also counts how often each mechanism occurred and fails if one never did:

- read-out overlapping the next input;
- back-to-back pairs;
- pairs after a gap;
- full-scale values.

To change the size, override `N` or `DATA_W` on `mm_linear_array`. The
timing relations above hold for any N ≥ 2.

## How far to trust it, and where it departs from the source

- **Verified in simulation:** exact products at N = 16 and N = 12, and for
  N = 4 in the unit tests. Also the throughput of one product per N² cycles
  and the latency given above. Each testbench was also shown to fail against
  a deliberately broken copy of its module.
- **Not verified:** clock rate and FPGA area. The source reports 150 MHz and
  2083 Virtex-II slices for its 16 × 16 design. This RTL does the
  multiply-accumulate in one cycle, which at that clock would need pipelining
  the source does not describe. Adding a multiplier pipeline stage would only
  shift the timing relations above by a constant.
- **Memories** are plain arrays with asynchronous read (distributed-RAM
  style). The source tested several memory types but does not say which one it
  used.
- **Not built:**
  - The source notes that the architecture "can handle smaller divisors" of n,
    that is, running with fewer elements. How that works is not described, and
    this RTL always uses N PEs for N × N matrices. Smaller matrices can be
    zero-padded, as `tb_mm_n12` shows.
  - An energy-optimised variant is listed in the source's results with the
    same cycle count but no description.
  - The Handel-C and vendor designs the source compares against are
    baselines, not part of this design.
