# Hardware cores for an onboard low-thrust guidance solver

A spacecraft that plans its own low-thrust trajectory solves a convex
optimisation problem again and again. An interior-point solver (ECOS) runs on
an embedded ARM processor. Most of its run time goes into two sparse
linear-algebra routines:

- the numeric LDL^T factorisation of the KKT system (`kkt_factor`, whose
  work is done by `LDL_numeric2`);
- the sparse matrix-vector product `sparseMV`.

This RTL moves those two routines into programmable logic as accelerator
cores. The processor packs the arrays a routine needs into two streams: one of
32-bit integers and one of IEEE doubles. A DMA engine pushes the streams into
the core. The core computes and streams the results back, and the processor
unpacks them. Scalar arguments and start/done signalling go over a small
AXI4-Lite register bank.

There are three cores:

| core | routine | arithmetic | default buffers |
|---|---|---|---|
| `kkt_factor` | up-looking sparse LDL^T with dynamic regularisation | IEEE binary64 | 9886 integer and 4853 double words |
| `sparsemv_fp` | y = ±Ax or y ±= Ax, A in compressed-column form | IEEE binary64 | 805 integer and 877 double words |
| `sparsemv_fix` | the same product | two's-complement fixed point, with double↔fixed casts inside the core | 805 11-bit integer words, 877 input-type words, 76 output-type words |

The buffer sizes are exactly the stream lengths of the reduced 5-node
Earth–Mars problem. A 100-node problem needs about 20 times more memory, so it
does not fit in these cores (see "Sizes" below).

`guidance_accel_top` places the three cores side by side with all their ports
brought out. The processor, the AXI interconnect, the DMA engines and the
cycle timer are vendor blocks and are not part of this RTL. Their ends of each
connection are the top-level ports, prefixed `kkt_`, `smv_` and `smvx_`.

## Common shell of a core

Every core runs the same three steps:

1. **Load.** `axis_load` accepts one word per cycle on each input stream into
   a single-port RAM (`sp_ram`). TREADY is high for the whole load, and TLAST
   ends it. The two streams load in parallel. When both have ended, `ap_ready`
   pulses.
2. **Compute.** A sequential state machine works on the buffers in place.
3. **Unload.** `axis_unload` reads the result buffer and streams it out at one
   word per cycle. It uses the RAM's read register as the output register, so
   back-pressure holds TDATA stable without an extra FIFO. TLAST marks the
   last word, which the DMA's stream-to-memory channel needs to close the
   transfer. `ap_done` pulses after the last handshake.

`hls_ctrl_axil` is the control bank. Its layout is the usual one for
HLS-generated blocks:

| offset | register |
|---|---|
| 0x00 | CTRL: bit0 ap_start, bit1 ap_done (clears on read), bit2 ap_idle, bit3 ap_ready (clears on read), bit7 auto_restart |
| 0x04 | GIE: global interrupt enable |
| 0x08 | IER: bit0 done, bit1 ready |
| 0x0C | ISR: writing 1 toggles a bit |
| 0x10 + 4i | scalar argument i |

`kkt_factor` takes `eps` at 0x10 (low word) and 0x14 (high word), and `delta`
at 0x18 and 0x1C. Both sparseMV cores take `a` at 0x10 and `newVector` at
0x14, as signed 32-bit values.

## Stream layouts

The processor and the core must agree on how the arrays are packed. The cores
use the order of each routine's argument list.

`kkt_factor` (n = matrix size, nnz = Kjc[n], lnz = Ljc[n]):

    integer in : n | Kjc[n+1] | Kir[nnz] | Parent[n] | Sign[n] | Lnz[n] | Ljc[n+1] | Lir[lnz] | Pattern[n] | Flag[n]
    double in  : Kpr[nnz] | Lx[lnz] | D[n] | Y[n]
    integer out: the whole integer buffer, then nd (= n)
    double out : the whole double buffer (Lx and D now hold the factor)

That is 7n+3+nnz+lnz integer words and 2n+nnz+lnz double words. The 5-node
sizes (9886 and 4853) give n = 1006 and nnz+lnz = 2841.

`sparsemv_fp` and `sparsemv_fix` (A is m-by-n):

    integer in : n | m | nnz | Ap[n+1] | Ai[nnz]
    double in  : Ax[nnz] | x[n] | y[m]
    double out : y[m]

The 5-node sizes (805, 877 and 76) give m = 76 and n+nnz = 801.

## The factorisation datapath

K is the upper triangle of the permuted KKT matrix. Software has already done
the symbolic part: the elimination tree `Parent`, the column pointers `Ljc`
and the counts `Lnz` of L. The core builds L one row at a time (up-looking):

1. Scatter column k of K into the dense work vector Y. While doing so, walk up
   the elimination tree from each row index. Nodes not yet visited in this row
   are marked in `Flag` and collected in `Pattern`. The result is the non-zero
   pattern of row k of L, in an order where each node comes after the nodes
   it depends on.
2. For each i in the pattern:
   - take y_i out of Y and clear that entry;
   - subtract y_i·L(p,i) from Y at every row p of column i filled so far;
   - form l_ki = y_i / d_i and append it to column i;
   - accumulate d_k = a_kk − Σ l_ki·y_i.
3. Regularise: if Sign[k]·d_k ≤ eps, set d_k = Sign[k]·delta. This keeps the
   quasi-definite KKT matrix factorisable when a pivot gets too small or has
   the wrong sign.

Each state does at most one access to each buffer, so the machine is simple
and slow:

- additions and multiplications are single-cycle combinational units
  (`fp64_addsub`, `fp64_mul`);
- division is a radix-2 restoring divider (`fp64_div`) that takes 58 cycles.

At the 5-node size (n = 1006, nnz+lnz = 2841) one call takes about 105,000
cycles from ap_start to the last output word. About 20,000 of them go to
streaming, because the load and the unload each take about 9,900 cycles.

## The sparse product, in double and in fixed point

Both sparseMV cores work as follows:

- If newVector > 0, clear y.
- Then, for every column j and every stored entry p of it, add or subtract
  Ax[p]·x[j] into y[Ai[p]]: a > 0 adds, a ≤ 0 subtracts.
- Each stored entry takes 3 cycles and each column another 3.
- A 5-node-sized call takes about 3,650 cycles from start to the last output.

The fixed-point core casts every incoming double to the input type on arrival.
By default that type is 39 bits with 5 integer bits, about 5.8e-11 resolution.
The cast truncates toward minus infinity and wraps on overflow, which are the
usual defaults of HLS fixed-point types (`fp64_to_fix`).

- y lives in its own buffer in the output type: 78 bits with 10 integer bits.
- Each product is formed at its full 78-bit width and added there.
- y is converted back to a double on the way out (`fix_to_fp64`, round to
  nearest even).

The second, more precise configuration is `W_IN = 55, W_OUT = 110` (input
about 8.9e-16, output about 7.9e-31). It is a parameter override, not a
separate module.

Integers are kept in an 11-bit signed type (`W_INT`): the core stores the low
11 bits of each 32-bit stream word. That is enough for every index of the
5-node problem, which is at most 876. The floating-point cores keep the full
32-bit words.

## Floating-point units

`fp64_addsub`, `fp64_mul` and `fp64_div` are IEEE-754 binary64 units:

- round to nearest, ties to even;
- full handling of zeros, infinities and NaN;
- subnormal inputs and results are flushed to zero.

The flush is the one departure from strict IEEE behaviour. The values of the
guidance problem never come near the subnormal range.

## Where this RTL departs from the original design, or fills gaps

- The original system builds a separate hardware design for each core, each
  with the processor, a DMA and a timer. Here the three cores share one top,
  and the surrounding vendor blocks are left out.
- The original cores came from C++ through high-level synthesis. These
  hand-written cores are sequential, and their cycle counts are this RTL's
  own. In the original, a call costs far more cycles: about 326,000 for
  `kkt_factor` and 6,700 for sparseMV. Most of that cost is packing and
  moving the data on the processor side, which this RTL does not include.
- The original pseudo-code for sparseMV writes `y = Ax` in the subtract
  branch. The defining equation says `y −= Ax` (or `y = −Ax` when newVector is
  set). These cores follow the equation.
- These parts are this design's own choices:
  - the stream packing order;
  - the register placement of the scalar arguments;
  - ap_ready pulsing at the end of the load;
  - treating Sign = 0 as +1;
  - the rounding of the fixed→double cast;
  - the flushing of subnormals.
- `nd` (the routine's return value) is always n, because this core never
  gives up on a pivot.

## Sizes

| problem | needed (integer / double words in) | built | fits |
|---|---|---|---|
| kkt_factor, 5 nodes | 9886 / 4853 | 9886 / 4853 | yes |
| kkt_factor, 100 nodes | 197695 / 97662 | 9886 / 4853 | no |
| sparseMV, 5 nodes | 805 / 877, 76 out | 805 / 877, 76 | yes |
| sparseMV, 100 nodes | 18190 / 19592, 1406 out | 805 / 877, 76 | no |

The depths are parameters (`INT_DEPTH`, `DBL_DEPTH`, `Y_DEPTH`). With larger
buffers the same cores run the 100-node problem:

- `tb_kkt_factor_sizes` uses 197695/97662-word buffers (n = 20006,
  nnz+lnz = 57650). The factorisation takes about 2.1 M cycles.
- `tb_sparsemv_fp_sizes` and `tb_sparsemv_fix_sizes` use 18190/19592/1406
  buffers (m = 1406, n = 4000). Each product takes about 80,000 cycles.

The fixed-point core then also needs `W_INT = 16`, because the 11-bit integer
type stops at 1023.

## Files

- `rtl/accel_pkg.sv`: shared types, register offsets, double helpers.
- `rtl/guidance_accel_top.sv`: the three cores side by side.
- `rtl/kkt_factor.sv`, `rtl/sparsemv_fp.sv`, `rtl/sparsemv_fix.sv`: the cores.
- `rtl/hls_ctrl_axil.sv`, `rtl/axis_load.sv`, `rtl/axis_unload.sv`,
  `rtl/sp_ram.sv`: the shared shell.
- `rtl/fp64_addsub.sv`, `rtl/fp64_mul.sv`, `rtl/fp64_div.sv`,
  `rtl/fp64_to_fix.sv`, `rtl/fix_to_fp64.sv`: arithmetic.
- `tb/tb_*.sv`: one self-checking testbench per module, plus
  `tb/tb_axi_tasks.svh`, which holds the bus and stream driver tasks they
  share.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Build and run one with Verilator 5 from the repository root:

    verilator --binary --timing --assert -y rtl +libext+.sv -Irtl -Itb \
        rtl/accel_pkg.sv tb/tb_kkt_factor.sv --top-module tb_kkt_factor -Mdir obj -o sim
    ./obj/sim

What the testbenches check:

- **Arithmetic units** (`fp64_*`, `fp64_to_fix`, `fix_to_fp64`): tens of
  thousands of random and edge-case operands, compared bit for bit with
  Verilator's own double arithmetic.
- **Cores**:
  - Random sparse problems go in over the bus and stream tasks, with random
    input gaps and output back-pressure.
  - Every output word is compared with a reference computed in the
    testbench, and the one-word-per-cycle stream rate is checked.
  - `tb_kkt_factor` does the symbolic factorisation and a reference
    LDL_numeric2 in software. It includes pivots that trigger regularisation.
- **Top** (`tb_guidance_accel_top`): drives all three cores at their default,
  full 5-node buffer sizes.
  - The factorisation has n = 1006 and fills both buffers exactly.
  - Both sparse products run with m = 76, n = 200, nnz = 601, in all four
    add/clear modes.
  - It counts each mechanism and fails if any never happened: input gaps,
    output stalls, TLAST, regularisation, the done interrupt, clear and
    accumulate, add and subtract, and a fixed-point wrap.
  - It runs in under a second.
- **Second fixed-point configuration** (`tb_sparsemv_fix_wide`): the
  fixed-point core with 55/110-bit types, checked against a 110-bit model.
