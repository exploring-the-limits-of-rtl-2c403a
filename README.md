# Sparse TTM and MTTKRP processing elements for FPGA

Tucker and CP decomposition of a sparse tensor each spend most of their time in
one kernel: tensor-times-matrix (TTM) for Tucker, and the matricised tensor times
Khatri-Rao product (MTTKRP) for CP. Both are memory bound. Every nonzero of the
tensor pulls in a whole row of a dense matrix and does only one multiply-add per
matrix column with it. This RTL implements one specialised processing element
(PE) for each kernel. Each PE walks a tensor stored in the compressed sparse
fiber (CSF) format directly from global memory. The matrix columns are spread
across parallel single-precision multiply-accumulate lanes, one lane per column,
each the equivalent of one DSP block. Nothing is ever written back except the
finished output rows.

The structure follows the FPGA processing elements in the article "Exploring the
Limits of Cross-Platform Sparse Tensor Processing": the order of loads,
one DSP per column for TTM and two per column for MTTKRP, an optional on-chip
copy of the TTM matrix, and the 16-column configuration the article reports
FPGA resources for. The memory handshake, number format details, reset and
timing are this implementation's own choices. They are listed under
[Departures and own choices](#departures-and-own-choices).

## What is computed

For a third-order tensor `T` (modes i, j, k):

* **TTM** (`ttm_pe`): `O[i,j,:] = sum_k T[i,j,k] * M[k,:]`. The PE produces one
  output row of `COL_CNT` values for every stored fiber (i,j).
* **MTTKRP** (`mttkrp_pe`):
  `V[i,:] = sum_j A[j,:] .* ( sum_k T[i,j,k] * B[k,:] )`, where `.*` is the
  element-wise product. It produces one output row for every stored slice i. `A`
  is called matrix1, and the fiber coordinate j selects its row. `B` is called
  matrix2, and the nonzero coordinate k selects its row. The Khatri-Rao product
  is never formed. Each nonzero's contribution is accumulated directly.

Output rows are addressed by the fiber's (TTM) or slice's (MTTKRP) position in
CSF order, not by its coordinate. The host scatters them if it needs to.

## The CSF arrays as the PEs read them

Each array is a separate buffer in global memory, and each PE has a separate
read port for each one. Addresses count elements of that buffer, not bytes.

| buffer | TTM | MTTKRP | contents |
|---|---|---|---|
| `sptr` | – | SlcCnt+1 words | slice `s` owns fibers `sptr[s] .. sptr[s+1]-1` |
| `fptr` | FbrCnt+1 words | FbrCnt+1 words | fiber `f` owns nonzeros `fptr[f] .. fptr[f+1]-1` |
| `fidx` | – | FbrCnt words | 1-based row of matrix1 for fiber `f` |
| `kidx` | NnzCnt words | NnzCnt words | 1-based row of the matrix (TTM) or matrix2 (MTTKRP) |
| `val`  | NnzCnt words | NnzCnt words | nonzero value, IEEE-754 binary32 |
| `mat`, `mat1`, `mat2` | rows × 16 words | rows × 16 words | dense matrix, one row per beat (`COL_CNT`×32 bits) |
| `out`  | FbrCnt rows | SlcCnt rows | result, one row per beat |

The coordinates are 1-based, which is the convention of the FROSTT tensor files.
The PEs subtract one before addressing a matrix row. A pointer is read once and
then reused: the end of one fiber (or slice) is the start of the next. A
complete TTM therefore reads exactly FbrCnt+1 fiber pointers, and a complete
MTTKRP reads SlcCnt+1 slice pointers and FbrCnt+1 fiber pointers. The
arithmetic-intensity analysis of these PEs relies on the same counts.

## TTM processing element (`ttm_pe`)

The TTM PE processes one fiber at a time:

1. Load `fptr[f+1]`. The fiber's start is the previous fiber's end, and
   `fptr[0]` is loaded once at the beginning.
2. Clear the `COL_CNT` accumulator lanes.
3. For each nonzero of the fiber:
   1. Load `kidx[e]` and `val[e]`. The two loads go out on their own ports at
      the same time.
   2. Fetch matrix row `kidx[e]-1`.
   3. Broadcast `val[e]` to every lane. Lane `c` adds `val × row[c]` to its
      accumulator.
4. Store the `COL_CNT` accumulators as output row `f`.

**On-chip matrix (`MATRIX_ONCHIP = 1`, the default).** With the matrix in global
memory, every nonzero reloads a full row, even when the row was just used. With
this option set, `start` first copies `mat_rows` rows from `mat` into
`matrix_buffer`, a block RAM of `MAT_ROWS` × (`COL_CNT`×32) bits. After that,
rows come from the buffer, one per cycle. Global matrix traffic drops from
NnzCnt rows to `mat_rows` rows. The buffer's depth is the cost: at 16 columns,
32768 rows need 16.8 Mbit of RAM. An assertion flags a row index beyond
`mat_rows`. With `MATRIX_ONCHIP = 0` the buffer is not built and every nonzero
reads its row over the `mat` port.

Loads per complete TTM with the matrix in global memory, in 32-bit words:
`FbrCnt + 1 + NnzCnt × (ColCnt + 2)`. Stores: `FbrCnt × ColCnt` words. There
are `NnzCnt × ColCnt` multiply-adds, each counting as two operations. The
arithmetic intensity therefore lies between 1/12 (one fiber with one nonzero
and one column) and 1/2 flop/byte (a single long fiber with many columns).

## MTTKRP processing element (`mttkrp_pe`)

MTTKRP adds a slice level and a second set of lanes. Each column has two
accumulators:

* **inC** accumulates over the nonzeros of the current fiber:
  `inC[c] += val × matrix2[kidx-1][c]`.
* **inB** accumulates over the fibers of the current slice. When a fiber ends,
  the PE loads the fiber's matrix1 row and adds `inC[c] × matrix1[fidx-1][c]`
  to `inB[c]`. inC is cleared on the same clock edge that inB takes the
  product.

When the slice ends, the inB values are stored as output row `s`. There are
2 × `COL_CNT` lanes in total, which is 32 DSP-equivalents at the default 16
columns.

The PE walks the tensor in this order:

1. Load `sptr[0]` and `fptr[0]` once.
2. For each slice, load `sptr[s+1]`.
3. For each fiber of the slice, load `fptr[f+1]` and `fidx[f]` together.
4. For each nonzero of the fiber, load `kidx` and `val` together, then the
   matrix2 row.
5. At the end of each fiber, load the matrix1 row.

In 32-bit words, a complete MTTKRP loads
`SlcCnt + 2 + (ColCnt + 2) × (FbrCnt + NnzCnt)` and stores `SlcCnt × ColCnt`.

## Arithmetic

Values are IEEE-754 single precision. `fp32_mul` and `fp32_add` are
combinational and round to nearest even. They treat subnormal inputs as zero
and flush subnormal results to zero, as FPGA floating-point DSP blocks do. They
follow IEEE rules for infinities and NaN, and every NaN result is the quiet NaN
`0x7FC00000`.

`fp32_mac` rounds the product, then adds it to the accumulator and rounds again.
This is the non-fused multiply-add mode of a DSP. It accepts one accumulation per
clock. Each accumulator is a single register, so the summation order is exactly
the sequential order of the software kernels: nonzeros in CSF order within a
fiber, and fibers in order within a slice. The results are therefore
bit-reproducible. The testbenches check them bit-exactly.

## Memory ports and timing

Every read port has the same five signals:

* a request: `*_req_valid`, `*_req_ready`, `*_req_addr`;
* a response: `*_rsp_valid`, `*_rsp_data`.

The rules for the read ports:

* A request is taken when valid and ready are both high.
* Its single response arrives, in order, one or more cycles later.
* A response is always accepted.
* A PE keeps at most one load outstanding per port. `load_slot` implements
  this and asserts the rules.

The output port (`out_wr_*`) is valid/ready with address and data. A PE holds a
store until it is taken.

Control: pulse `start` with the sizes (`fbr_cnt` and `mat_rows` for TTM,
`slc_cnt` for MTTKRP) on the same clock edge, and hold the sizes until `done`.
`busy` is high from the cycle after `start` until `done`, a one-cycle pulse.
Reset is synchronous and active low. It idles both controllers and clears every
accumulator.

The PEs process one nonzero at a time. The loads for one nonzero do not overlap
the loads for the next. Each nonzero costs a few control cycles plus two
dependent memory round trips: index and value, then the matrix row. With the
on-chip matrix, the second round trip is a one-cycle block-RAM read. The PEs
reach the rate of one nonzero per cycle only with an overlapped load pipeline,
which this RTL does not have (see below).

## Top level (`sparse_tensor_fpga_top`)

The top instantiates both PEs side by side, with the prefixes `ttm_` and `mt_`
on their ports. They share only the clock and reset. Either one can run while
the other is idle or busy. The board memory system attaches to the brought-out
ports.

| parameter | default | meaning |
|---|---|---|
| `TTM_COL_CNT` | 16 | TTM matrix columns = TTM DSP lanes |
| `TTM_MATRIX_ONCHIP` | 1 | copy the TTM matrix into block RAM first |
| `TTM_MAT_ROWS` | 32768 | on-chip matrix depth in rows |
| `MT_COL_CNT` | 16 | MTTKRP matrix columns; 2 lanes per column |

The column count is fixed when the design is built, as the DSP count is in the
article. The article's load unit delivers up to 32 words per cycle. Here a row is always one beat of `COL_CNT` words. Above 32 columns the beat simply gets wider; it is not split into several beats.

At the defaults, the published FROSTT tensors vast-3D and nell-2 fit both PEs:

* Their TTM matrices have 2 and 28,818 rows, both within 32,768.
* All of their counts are below 2^32.

The TTM matrix of nell-1 (25.5 M rows) needs `TTM_MATRIX_ONCHIP = 0`.

## Departures and own choices

* **No overlap between nonzeros.** A high-level-synthesis build of the same loop
  nest would pipeline the loads of successive nonzeros. This RTL issues them one
  after another. Throughput is therefore well below one nonzero per cycle. The
  load counts and the arithmetic are unaffected.
* **One PE per kernel.** The PE is not replicated across the device.
* The depth of the on-chip matrix, 32768 rows, is estimated from the extra block
  RAM the on-chip variant uses at 16 columns. The article gives no depth.
* The on-chip matrix is the TTM default. The article also measures TTM with the
  matrix in global memory, available as `TTM_MATRIX_ONCHIP = 0`. MTTKRP always
  reads its matrices from global memory.
* The request/response handshake, the one-outstanding-load limit, reset, and the
  treatment of subnormals are all choices of this implementation.

Not included: the host side (SYCL runtime, the CPU and GPU kernels, the split
of work between devices) and the DRAM itself. The testbenches model the DRAM
with random stalls and latency.

## Verification

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | 20,000 random and directed cases each against a double-precision reference that is rounded back to single precision bit by bit (`tb/fp_ref_pkg.sv`) |
| `tb_fp32_mac` | runs of accumulations with idle cycles, clear and reset |
| `tb_matrix_buffer` | write, random-order read-back and overwrite |
| `tb_ttm_pe` | both matrix options (4 columns): random tensors and the two extreme shapes; bit-exact outputs; every load and store count against the formulas above |
| `tb_mttkrp_pe` | the same for MTTKRP, including the total-words formula |
| `tb_sparse_tensor_fpga_top` | the top at its default parameters, both PEs running together; the last TTM fills all 32768 rows of the on-chip matrix; counts that preload, row reuse, fiber and slice completions, fiber reductions, load stalls and store stalls each occurred |
| `tb_frostt_workloads` | the top at default parameters on scaled-down tensors shaped like the FROSTT datasets vast-3D and nell-2, with their real matrix dimensions (up to 28,818 rows on chip); bit-exact outputs and total-load formulas |

`tb_frostt_workloads` also reports what the PEs achieve on these shapes. The
memory model stalls requests at random and answers 1 to 4 cycles later.

| run | size (scaled) | cycles | rate | arithmetic intensity |
|---|---|---|---|---|
| TTM, vast-3D shape (2-row matrix, 1 nonzero per fiber) | 400 fibers | 7,105 | 17.8 cycles per nonzero | – |
| TTM, nell-2 shape (28,818-row matrix on chip, 228 nonzeros per fiber) | 8 fibers, 1,824 nonzeros | 206,725 | 113 cycles per nonzero, mostly the one-time matrix copy | – |
| MTTKRP, vast-3D shape (157 fibers per slice, 1 nonzero per fiber) | 3 slices | 5,909 | 6.3 cycles per fiber or nonzero | 0.44 flop/byte |
| MTTKRP, nell-2 shape (28 fibers per slice, 228 nonzeros per fiber) | 2 slices, 12,768 nonzeros | 171,920 | 13.4 cycles per fiber or nonzero | 0.44 flop/byte |

The MTTKRP intensities approach the 1/2 flop/byte bound for long fibers and
slices. The cycle counts show the cost of processing nonzeros one at a time,
described under [Departures and own choices](#departures-and-own-choices).

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sparse_pkg.sv tb/fp_ref_pkg.sv tb/tb_ttm_pe.sv --top-module tb_ttm_pe
./obj_dir/Vtb_ttm_pe
```

Replace `tb_ttm_pe` with any testbench name. The full-size top test simulates in
under a second after a build of about 20 seconds.

## Files

* `rtl/sparse_pkg.sv`: word types and constants.
* `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`, `rtl/fp32_mac.sv`: arithmetic.
* `rtl/load_slot.sv`: one outstanding load.
* `rtl/matrix_buffer.sv`: on-chip TTM matrix.
* `rtl/ttm_pe.sv`, `rtl/mttkrp_pe.sv`: the processing elements.
* `rtl/sparse_tensor_fpga_top.sv`: the top level.
* `tb/`: testbenches, the reference arithmetic package, and the behavioural
  global-memory models `gmem_rd_model` and `gmem_wr_model`.
