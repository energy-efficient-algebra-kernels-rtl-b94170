# Single-precision linear-algebra kernels for FPGAs: SPMV and GEMM

This RTL implements three floating-point kernels for FPGA accelerators in
high-performance computing. Each one is a hardware form of a kernel that is
normally written in OpenCL or HLS:

| Kernel | Target | What it computes | Main idea |
|---|---|---|---|
| Streaming SPMV | large card with HBM | y = A·x, A sparse | row blocks run on parallel dataflow units; x is kept on chip |
| Tiled GEMM | small embedded FPGA | C = A·B, dense | NB×NB tiles in local memory; SIMD-wide work-items |
| CSR SPMV | small embedded FPGA | y = A·x, A in CSR form | one work-item per row; work-groups shared out over replicated units |

All arithmetic is IEEE-754 binary32. Each kernel starts on a `start` pulse.
`done` is high while the kernel is idle. Each kernel reads and writes global
memory through simple word-addressed request/response ports. `nla_top` puts
the three kernels side by side. They share only the clock and reset.

The hardest part to follow is how the streaming SPMV hides the adder latency,
so it gets the most space below.

## Floating-point arithmetic (`fp32_pkg`, `fp32_mul`, `fp32_add`, `fp32_add_tree`)

`fp32_pkg` holds the combinational multiply and add functions:

- Rounding is round-to-nearest-even.
- Subnormal inputs count as zero, and results below the normal range flush
  to zero. This is a common FPGA simplification and this design's own choice.
- Infinities propagate, and overflow gives infinity.
- Every NaN comes out as the canonical quiet NaN `0x7fc00000`.

`fp32_mul` and `fp32_add` put the function in front of a `LAT`-stage delay
line (`pipe_delay`). Each accepts one operation per cycle, and every result
appears exactly `LAT` cycles later (default 4).

`fp32_add_tree` adds N values pairwise in log2(N) levels of adders.

The kernels fix their summation order, so every result is reproducible bit
for bit. The testbenches depend on this.

## Streaming SPMV for the HBM card

### Structure (`spmv_stream_kernel` → `spmv_cu` → `spmv_core`)

The host divides the matrix into NCU = 4 blocks of consecutive rows. Compute
unit u (`spmv_cu`) gets:

- its own `spmv_cfg_t` with the row count, column count, nonzero count and
  five base addresses;
- four read ports (row lengths, x, column indices, values);
- one write port for y.

In the intended system each port is an HBM channel. The row-length array
holds the length of each row, so it is the differences of a CSR row-pointer
array.

A unit works in two stages:

1. **Stage 1.** Two `mem_reader`s copy the unit's row lengths into
   `rows_size_local` (up to ROW_DEPTH = 10 000 words). At the same time they
   copy the **whole** vector x into `x_local` (up to X_DEPTH = 40 000 words).
2. **Stage 2.** Four processes run concurrently, linked by FIFO streams:
   - a column-index reader;
   - a value reader;
   - the compute stage `spmv_core`;
   - a `mem_writer` that drains the result FIFO to y.

   Stage 2 starts only after all of x is local, because any nonzero may need
   any element of x. The random-access gather x[col] therefore always hits
   on-chip RAM, never HBM.

### Hiding the adder latency: II = L (`spmv_core`)

An accumulator `acc += v·x` that depends on itself can take one element only
every ADD_LAT cycles. The core avoids this stall by working on **L elements
per loop iteration** and starting an iteration every L cycles (initiation
interval II = L = 4):

1. **Gather.** Over L cycles, take one (column, value) pair per cycle from the
   two streams and look up x[column] in `x_local`. If the row has fewer than
   L elements left, fill the remaining slots with zero products. An empty row
   still runs one all-zero iteration.
2. **Multiply.** L `fp32_mul`s work in parallel.
3. **Reduce.** `fp32_add_tree` adds the L products pairwise.
4. **Accumulate.** One adder adds the tree sum t_k to the row's accumulator.
   - Iterations of one row are at least L cycles apart, and ADD_LAT ≤ L is
     asserted. So the previous accumulator value is always ready in time.
   - When ADD_LAT = L, the value arrives in the same cycle it is needed, and
     a forwarding path feeds it straight back into the adder.
   - The first iteration of a row adds +0.

The result of row i is therefore `(((t_0 + 0) + t_1) + t_2) + ...`, where
`t_k = (p0 + p1) + (p2 + p3)`. The testbench reference (`ref_spmv_row` in
`tb/fp_ref_pkg.sv`) follows exactly this order.

**Timing.** A row costs 2 set-up cycles (the row-length read) plus
`L · max(1, ceil(len / L))` cycles, provided the streams do not run dry.
`tb_spmv_core` checks this count exactly. The core starts a row only if the
result FIFO has room for that row and every row still in flight. So the
arithmetic pipeline has no stall logic, and a slow y port only holds back the
next row.

### Capacity

For the 12 evaluated matrices (17 361 to 38 120 rows):

- The largest needs 38 120 / 4 = 9 530 rows per unit. This fits ROW_DEPTH.
- Its x needs 38 120 words. This fits X_DEPTH.
- Nonzero counts go up to 16.2 million. They are only streamed, and all
  counters and addresses are 32 bits.

## Tiled GEMM for the embedded FPGA (`gemm_tile_unit`, `gemm_dot_lane`)

C = A·B with row-major A (M×K), B (K×N) and C (M×N). M, N and K must be
multiples of NB = 8. There is one work-item per element of C, and
work-groups are NB×NB. For every NB×NB block of C, the unit loops over the K
tiles:

- **LOAD.** Read the A tile and the B tile into local registers. The two read
  ports run in parallel, with SIMD = 4 words per beat. A barrier waits for
  every word.
- **COMPUTE.** Run SIMD work-items per cycle, so NB·NB/SIMD = 16 cycles per
  tile pair.
  - Each work-item is one `gemm_dot_lane`. The lane forms the NB products of
    its row of A and column of B in parallel.
  - The lane adds the products to the work-item's running sum strictly in
    k order, through a chain of NB pipelined adders. Product k is delayed to
    meet the partial sum at adder k.
  - The sums stay in the unit between K tiles. A barrier waits for the last
    lane result.
- **STORE.** After the last K tile, write the NB·NB sums to C, SIMD words per
  beat.

The k-order summation reproduces the sequential `sum += a·b` loop bit for
bit. The smallest evaluated product (64×32 · 32×32) runs in the top-level
testbench. The largest (8k×4k · 4k×4k) needs 80 M words of memory, which is
well inside the 32-bit word address space. On chip the unit holds only one
tile of A, B and C.

**Timing.** The barriers keep the phases from overlapping: load, compute and
the drain of the adder chain run one after another. In simulation a tile pair
takes about 75 cycles in all:

- 16 compute cycles;
- about 20 load cycles;
- MUL_LAT + NB·ADD_LAT = 36 drain cycles.

## CSR SPMV for the embedded FPGA (`csr_spmv_kernel`, `csr_spmv_cu`, `csr_row_lane`)

This is the classic scalar CSR kernel: one work-item per row, with
work-groups of BS = 16 rows.

- **Distribution.** The kernel has NCU = 2 compute units. Work-group g goes
  to unit g mod NCU.
- **Row pointers.** For each work-group, a unit first copies the BS+1 row
  pointers it needs into local memory, UF = 2 words per beat (the unrolled
  copy loop). A barrier waits for the whole copy. The row-pointer array must
  be readable up to UF−1 words past its end.
- **Vector lanes.** Rows then run VC at a time, one per `csr_row_lane`, in
  lockstep:
  - the lanes start together on rows wi … wi+VC−1;
  - the next step starts when the slowest lane is done;
  - lanes past the end of the group get an empty row and write nothing, so
    VC need not divide BS.

  VC = 1 by default. Each lane has its own column, value and x read ports.
  The finished sums leave through the unit's single y port, one per cycle.
- **Inside a lane.** Column indices and values stream in from memory, and
  x[col] is fetched from memory for each nonzero. This is the irregular
  access that the HBM design avoids. y[i] is accumulated in j order from +0.
  The loop-carried add accepts a new product only when the previous sum
  returns. The returning sum is forwarded directly into the next add. Reads
  and multiplies run ahead through small FIFOs.

The result is the serial CSR sum, bit for bit, whatever BS, NCU, UF and VC
are. Even the largest evaluated matrix fits, because only BS+1 row pointers
are held on chip. The tuning space explored for this kernel (BS 2 to 64, 1 or
2 units, UF 2 to 8, VC 1 to 8) is reached through the parameters.

**Port layout.** The kernel flattens the per-lane ports as index
`unit*VC + lane`. The row-pointer and y ports are indexed by unit.

## Memory ports and stream plumbing

- **Read port.** `req_valid/req_ready/req_addr` carry word addresses.
  Responses come back in order on `resp_valid/resp_data`, after any latency
  and with no back-pressure.
  - `mem_reader` streams COUNT consecutive words into a `stream_fifo`.
  - It never has more requests outstanding than free FIFO entries, so a
    response always finds room.
- **Write port.** `wr_valid/wr_ready/wr_addr/wr_data`. `mem_writer` drains a
  stream to COUNT consecutive words.
- **`stream_fifo`** is a show-ahead FIFO with a count output.
- **`local_ram`** has one write port and one registered read port. A read of
  an address written in the same cycle returns the old word.

These protocols are this design's own choice. The original kernels reach
memory through the vendor's memory interfaces.

## Top level (`nla_top`)

Ports are grouped by prefix, and every port is a plain vector or packed
array:

- `hbm_*` is the streaming SPMV. Per-unit configuration structs and port
  arrays are indexed `[unit][port]`, in the port order of `spmv_pkg`.
- `gemm_*` is the tiled GEMM.
- `csr_*` is the CSR SPMV.

The parameters are:

| Parameter | Default | Meaning |
|---|---|---|
| `HBM_NCU` | 4 | streaming SPMV units |
| `HBM_L` | 4 | iteration width / II |
| `HBM_ROW_DEPTH` | 10 000 | local row-length memory per unit |
| `HBM_X_DEPTH` | 40 000 | local x memory per unit |
| `GEMM_NB` | 8 | GEMM tile size |
| `GEMM_SIMD` | 4 | GEMM vector width |
| `CSR_BS` | 16 | CSR work-group size |
| `CSR_NCU` | 2 | CSR compute units |
| `CSR_UF` | 2 | row-pointer copy unroll |
| `CSR_VC` | 1 | CSR vector lanes per unit |
| `FP_LAT` | 4 | latency of every FP unit |

Outside the design:

- the host processors;
- the HBM and DDR3 memories;
- the vendor shell.

The second GEMM design, a systolic array used on the HBM card, is taken from
other work and is not described in enough detail to build, so it is not
included.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The testbenches compute
expected values independently of the RTL:

- `fp_ref_pkg` uses double-precision reals rounded to binary32. This is
  exact for one multiply or add.
- Each kernel's reference follows that kernel's summation order, so every
  comparison is bit-exact.
- `gmem_model` is a behavioural memory with configurable latency. It can
  randomly drop ready.

| Testbench | Covers |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | ~17 000 random and special operands each; exact latency |
| `tb_stream_fifo`, `tb_local_ram`, `tb_mem_reader`, `tb_mem_writer` | plumbing under random stalls |
| `tb_spmv_core` | summation order, zero padding, empty rows, exact per-row cycle count, stream gaps, output back-pressure |
| `tb_spmv_cu` | stage 1 to stage 2 ordering (no column read before x is local), restart |
| `tb_spmv_stream_kernel` | several units with independent memories |
| `tb_gemm_tile_unit` | several block and K-tile counts; compute cycles = tiles · NB²/SIMD |
| `tb_csr_spmv_kernel` | work-group distribution, empty rows, partial last group, 3 lockstep lanes busy together |
| `tb_spmv_workload` | streaming SPMV at default size on 25 503-, 20 000- and 20 082-row matrices; compute cycles within 1 % of the II = 4 bound |
| `tb_gemm_workload` | GEMM 64×32·32×32, 128×64·64×64, 256×128·128×128 at default size; exact compute-phase cycles |
| `tb_nla_top` | all three kernels at the default parameters, concurrently (see below) |

`tb_nla_top` runs in a few seconds:

- GEMM 64×32·32×32;
- a 240-row matrix on the four streaming units, with stalling and
  fast memories;
- a 150-row matrix on the CSR kernel.

It also counts how often each mechanism occurs and fails if any never does.
The mechanisms are:

- zero padding;
- empty rows;
- a stream running dry;
- a row held back by a full result FIFO;
- accumulator forwarding;
- the stage switch;
- accumulation across K tiles;
- the tile barrier wait;
- work-groups on both CSR units;
- CSR add forwarding.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/fp32_pkg.sv rtl/spmv_pkg.sv tb/fp_ref_pkg.sv tb/tb_nla_top.sv \
  --top-module tb_nla_top
./obj_dir/Vtb_nla_top
```

Replace `tb_nla_top` with any other testbench name. Verilator finds the other
modules through `-I`.

## Known departures and limits

- **Subnormals.** Numbers below the normal range are flushed to zero.
- **NaN.** Every NaN result is the canonical quiet NaN; payloads are not
  kept.
- **Latencies.** The floating-point latencies (4) are this design's own
  choice. The streaming kernel only requires ADD_LAT ≤ L.
- **Streaming SPMV reduction.** The L products of an iteration are reduced
  pairwise. The exact order the original HLS tool uses is unknown, so
  results may differ in the last bit from a tool-generated kernel.
- **CSR vector lanes.** The CSR lanes run in lockstep, each with private
  memory ports. How an OpenCL compiler maps vectorised work-items onto
  hardware may differ, for example in how memory accesses are coalesced.
- **GEMM sizes.** GEMM sizes must be multiples of NB. The A, B and C tiles
  are held in registers.
- **Host work.** Each streaming unit's row block and its row-length array
  must be prepared by the host.
