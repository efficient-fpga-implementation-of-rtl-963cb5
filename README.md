# Floating-point PCA engine for large hyperspectral images

This is synthesizable SystemVerilog for a hardware Principal Component Analysis
(PCA) engine. The target is very large images: hundreds of thousands of pixels,
each with B = 224 spectral bands. From the B x B covariance matrix C of the
image the engine finds the principal components. It then projects every pixel
onto at most 24 of them. This takes 224 values per pixel down to at most 24 and
removes the redundancy between bands.

The engine makes four passes, all in IEEE single-precision floating point:

1. **SVD.** Decompose `C = U Σ Uᵀ` by Jacobi rotations.
2. **Sort.** Order the singular values from largest to smallest.
3. **Select.** Keep the first L components whose share of the total energy
   reaches 98 %, with `L <= LMAX = 24`.
4. **Project.** Compute `Y = X × E` for every pixel. X is the N x B pixel
   matrix and E is B x LMAX; the columns of E beyond L are zero.

The covariance matrix is an input. The engine does not compute it.

Two choices make the engine fast on large data. First, the pixels move into the
engine while the SVD runs, so the transfer costs no extra time. Second, the
bands of a pixel are split over 56 FIFOs. The projection can then read 56 bands
in one cycle, which gives one output value every 4 cycles and one pixel every
96 cycles.

## Data flow and clock domains

```
                 clk_d (fast, 400 MHz in the reference build)   |  clk_p (87 MHz)
                                                                 |
 s_* stream  +-----------------+  512-bit lines  +----------+   |   +------------------------------+
 ----------->| data_dispatcher |---------------->| cov_bram |---+-->| pca_block                    |
 (512 bit,   |                 |                 | (2 clks) |   |   |  svd_jacobi -> sort_select   |
  16 values) |                 |  band n -> FIFO +----------+   |   |        |          |          |
             |                 |  n mod 56       +----------+   |   |        v          v          |
             |                 |================>| 56 x     |===+==>|  projection_unit ----------- |---> y_* stream
             +-----------------+                 | async_   |   |   +------------------------------+
                    cov_ready -------------------| fifo     |---+--> (2-flop synchroniser)
                                                 +----------+   |
```

The memory controller, its PLL, the AXI interconnect and the DDR are not part
of this RTL. The top, `pca_top`, brings out in their place:

- an input stream, `s_valid`/`s_ready`/`s_data`, with 512-bit beats;
- an output stream, `y_valid`/`y_ready`/`y_data`;
- the two clocks, `clk_d` and `clk_p`, and one active-low reset for each.

Only three kinds of signal cross between the two clock domains:

- the band values, through the dual-clock FIFOs;
- the covariance matrix, through the BRAM, which has one port in each domain;
- the `cov_ready` level, through a two-flop synchroniser.

`n_pixels` is a setting that both domains read. It must stay stable from
`start` until `pca_done`.

### One operation, step by step

1. Pulse `start` for one `clk_d` cycle with `n_pixels` = N.
2. Send the stream. It carries the B·B covariance values first, 16 per beat, in
   row-major order. Because C is symmetric, column-major order works just as
   well. After the matrix come the N pixels: each pixel is B consecutive band
   values, 16 per beat, so 14 beats per pixel at B = 224.
3. The dispatcher writes each covariance beat as one BRAM line. After the last
   line it raises `cov_ready`. It then writes the 16 values of each pixel beat
   into 16 different FIFOs: band n goes to FIFO `n mod 56`. If any of those 16
   FIFOs is full, `s_ready` drops and the beat waits.
4. In the PCA domain, the rising edge of `cov_ready` starts the PCA block. The
   block runs the SVD, sorts and selects, and then copies E into the
   projection unit (`phase` = 1, 2, 3). All this time the FIFOs keep filling.
   When they are full, the dispatcher holds the stream off.
5. The projection (`phase` = 4) drains the FIFOs. For each pixel it sends LMAX
   values on `y_*`, component by component. `y_pixel` and `y_comp` give the
   indices of each value, and `y_last` marks the final value. Then `pca_done`
   pulses.

`num_pc` gives L, and `sorted` gives the LMAX largest singular values in
descending order.

## The SVD (`svd_jacobi`)

The SVD is the hardest part of the design to follow, and it takes most of the
run time. Because C is symmetric positive semi-definite, its singular values
are its eigenvalues, and its right singular vectors are the principal
components.

The block uses **cyclic one-sided (Hestenes) Jacobi**. It holds two B x B
working matrices, both stored by columns:

- A starts as C;
- V starts as the identity.

A sweep visits every column pair (p, q) with p < q. Each pair goes through
three stages.

1. **DOT** takes B/UNROLL cycles. It forms three sums:
   - `α = |a_p|²`
   - `β = |a_q|²`
   - `γ = a_p · a_q`, the off-diagonal term.

   Each cycle takes UNROLL rows (8 by default): 3·UNROLL multiplies, three
   adder trees, and one accumulate for each sum.
2. **ROT** takes up to 8 cycles, one floating-point step per cycle. The pair is
   skipped when `γ² <= EPS2·α·β`, meaning the columns are already orthogonal
   to within `sqrt(EPS2)` = 1e-6. Otherwise the block computes:
   - `ζ = (β−α)/(2γ)`
   - `t = sign(ζ)/(|ζ| + sqrt(1+ζ²))`
   - `c = 1/sqrt(1+t²)`
   - `s = c·t`
3. **UPD** takes B/UNROLL cycles. It replaces `a_p, a_q` by `c·a_p − s·a_q` and
   `s·a_p + c·a_q`, and updates the columns of V in the same way. Each cycle
   handles UNROLL rows.

Sweeps stop after a sweep that applies no rotation, or after `MAX_SWEEPS`
sweeps (16). Then `A·V` has orthogonal columns. A final pass computes
`σ_i = |a_i|`, and V holds the eigenvectors. `sweeps` reports how many sweeps
were used. In tests, random well-separated spectra converged in 6 to 9 sweeps.

One-sided Jacobi was chosen because every access is to whole columns. The
UNROLL lanes therefore read consecutive rows of one column, and no transposed
access is ever needed. The unroll factor of 8 on the pair loop matches the
reference implementation's best trade-off, which came from its measurements of
unroll factors 4 to 56. The reference built its SVD from a vendor HLS library
and did not publish its algorithm. The algorithm here, the convergence test and
the sweep limit are therefore this design's own.

Cycle cost at the defaults:

| Step | Cycles |
| --- | --- |
| Loading C from the BRAM | 3136, plus a few |
| One rotated pair | about 28 + 8 + 28 + 1 |
| One skipped pair | about 28 + 3 + 1 |
| One full sweep (24,976 pairs) | about 1.6 million |

The reference HLS SVD needs about 72 million cycles. In the full-size
testbench, one operation with 12 pixels takes about 11.3 million PCA-clock
cycles in all, nearly all of it in the SVD, which ran 9 sweeps.

The working matrices are plain arrays with several read and write ports per
cycle. In an FPGA they would map to distributed RAM or registers, or, with a
skewed bank layout, to block RAM. No such mapping has been done here.

## Sorting and selecting (`sort_select`)

The total energy `TE = Σσ_i` is summed over all B values, one per cycle. The
block then picks LMAX times the largest value not yet taken: each pick scans all
B values, one comparison per cycle, plus one cycle to record the pick. It keeps
a running sum S. L is the first count for which `100·S >= THETA·TE`; if no count
up to LMAX meets that, L = LMAX. Only the LMAX largest values are ever used, so
the block sorts only those. Latency is `B + LMAX·(B+1) + 1` cycles, which is
5,625 at the defaults.

## Projection (`projection_unit`)

The unit keeps E as LMAX columns of B values, plus two pixel buffers. It fills
one buffer from the FIFOs while it projects the pixel in the other. Each cycle
it pops all 56 FIFOs at once, so a pixel takes B/56 = 4 pops.

For component c, the unit does the following:

1. In each of B/56 = 4 cycles, it multiplies 56 bands by the matching entries
   of column c.
2. A single-cycle adder tree sums the 56 products.
3. It adds the four partial sums.

This gives one output value every 4 cycles (an initiation interval of 4), so
each pixel takes 24 × 4 = 96 cycles. 96·N is exactly the projection latency
the reference reports:

- 122,500 pixels: 11.76 M cycles;
- 314,368 pixels: 30.18 M cycles.

The datapath stops only in two cases: the next pixel has not fully arrived
from the FIFOs, or a finished value is still waiting at the output
(`y_valid && !y_ready`).

## Floating point (`fp32_pkg`)

All arithmetic is IEEE-754 binary32, written as combinational functions:

- `fp_add`, `fp_sub`, `fp_mul`, `fp_div`, `fp_sqrt`, `fp_lt`.

They round to nearest even, flush subnormals to zero and saturate to infinity
on overflow. NaN handling is left out, because the engine never divides by zero
or takes the square root of a negative number. The functions are not
pipelined: each call is one level of combinational logic, and the modules
register the results. A real FPGA build at 87 MHz would need these operators
pipelined, and the state machines stretched to match.

## Parameters (of `pca_top`, passed down)

| Parameter | Default | Meaning | Origin |
| --- | --- | --- | --- |
| `B` | 224 | spectral bands | reference data sets |
| `LANES` | 16 | values per 512-bit stream beat | 512-bit memory bus |
| `NFIFO` | 56 | band FIFOs = projection parallelism | reference design |
| `FIFO_DEPTH` | 32 | words per FIFO, a power of two | own choice |
| `LMAX` | 24 | maximum number of components | reference design |
| `UNROLL` | 8 | SVD lanes | reference design |
| `MAX_SWEEPS` | 16 | Jacobi sweep limit | own choice |
| `THETA` | 98.0 (fp32) | energy threshold in percent | reference design |
| `EPS2` | 1e-12 (fp32) | orthogonality tolerance squared | own choice |

The parameters must satisfy these rules:

- `B` is a multiple of `LANES`, `NFIFO` and `UNROLL`;
- `NFIFO >= LANES`;
- `FIFO_DEPTH` is a power of two, at least 4.

Initial assertions check these rules at elaboration.

## Where this design departs from the reference

- **HLS versus RTL.** The reference engine was produced by high-level
  synthesis. Its SVD was a vendor library routine, whose algorithm the
  reference does not describe. This RTL has the same structure and the same
  rates for the dispatcher, the FIFOs and the projection. Its SVD algorithm
  and all its latencies are its own.
- **Vendor parts.** The memory controller with its PLL, the AXI SmartConnect
  and the DDR are vendor parts. Streams and clock ports replace them, and the
  stream framing described above is this design's own.
- **Output format.** Each pixel gives LMAX output values, one 32-bit value per
  transfer, with the unused components set to zero. The reference does not
  define an output format.
- **Timing.** The floating-point operators are not pipelined, so the design
  will not meet the reference's clock rates as written. It is a functional
  model, synthesizable but not timing-closed.
- **Selection.** The energy sum runs over all B singular values.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
| --- | --- |
| `tb_fp32_pkg` | 24,000 random add/sub/mul/div/sqrt/compare results, each within 1 ulp of the double-precision result |
| `tb_async_fifo` | order, full and empty across a 2.5 ns / 11.5 ns clock pair |
| `tb_cov_bram` | dual-clock writes and reads |
| `tb_data_dispatcher` | default sizes: BRAM lines, per-FIFO band order, no writes to a full FIFO, stalls, `cov_ready` timing |
| `tb_svd_jacobi` | 16 bands: singular values and vectors of `C = Q·diag(λ)·Qᵀ`, with Q a Householder matrix, so the answers are known in closed form |
| `tb_sort_select` | default sizes: order, L with and without the cap, latency |
| `tb_projection_unit` | default sizes: every output value, the 4-cycle output spacing, FIFO starvation, output stalls |
| `tb_pca_block` | 16 bands: the phase sequence, the E-load length, L, singular values, all outputs |
| `tb_pca_top` | 32 bands, 8 FIFOs, LMAX = 6: two full operations through both clock domains |
| `tb_pca_full` | the top with every parameter at its default |

`tb_pca_top` counts six mechanisms and fails if any of them never happens:

- the input held off by full FIFOs;
- pixels accepted before the projection starts (transfer overlapping the SVD);
- the projection waiting on empty FIFOs;
- output stalls;
- L found below LMAX;
- L capped at LMAX.

Each end-to-end testbench builds its covariance matrix from a known
eigen-decomposition. It then checks the outputs against projections onto the
known eigenvectors, computed in double precision. Each component is checked up
to a sign, because an eigenvector's sign is arbitrary.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/fp32_pkg.sv tb/tb_fp_util_pkg.sv tb/tb_pca_top.sv --top-module tb_pca_top
./obj_dir/Vtb_pca_top
```

For a block testbench, replace the last file and `--top-module` with that
testbench. Variables start at random values (`+verilator+rand+reset+2` is
fine), and every register that is read is reset.

`tb_pca_full` runs the default configuration: B = 224, 56 FIFOs, LMAX = 24.
It runs one complete operation of 12 pixels, about 11.3 million PCA-clock
cycles, and takes about 2.5 minutes under Verilator.

## Files

- `rtl/fp32_pkg.sv`: the floating-point functions.
- `rtl/async_fifo.sv`, `rtl/cov_bram.sv`: the clock-domain crossing storage.
- `rtl/data_dispatcher.sv`: the stream to BRAM and FIFOs.
- `rtl/svd_jacobi.sv`, `rtl/sort_select.sv`, `rtl/projection_unit.sv`: the three
  stages.
- `rtl/pca_block.sv`: the sequencer of the three stages.
- `rtl/pca_top.sv`: the top.
- `tb/`: the testbenches, and `tb_fp_util_pkg.sv`, which holds the conversions
  between real numbers and fp32 bit patterns.
