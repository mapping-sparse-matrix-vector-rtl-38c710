# SSF: a streaming sparse matrix-vector multiply core (double precision)

This is synthesizable SystemVerilog for an FPGA-style core that computes
`y = A·x` for a sparse matrix `A` in double precision. It is built around one
problem. Floating point adders are deeply pipelined: here an addition takes
12 clocks. So a row's products cannot simply be summed into a single
accumulator, one per clock, without a read-after-write hazard. The core
handles this with the data flow itself, not with control logic:

* Each **processing element (PE)** takes one nonzero per clock. It
  multiplies it by `x[col]` and folds the products of a row into **12
  interleaved partial sums**, using one adder whose output is fed back to its
  own input.
* A shared **reduced summation circuit** adds the 12 partial sums and the
  row's previous value. It uses four adders in series and three short delay
  lines, takes one row every 8 clocks, and delivers the total exactly 55
  clocks later. Row address and write enable ride along in shift registers.

The design follows the published SSF ("SpMxV Solver for FPGAs")
architecture, in its double-precision configuration with 8 PEs. The
sections "What is taken from the source design and what is not" and
"Known limits" list where this RTL fills gaps or departs from it.

## Matrix layout: row-blocked CRS

The matrix is cut into **stripes** of at most 1000 rows. Each stripe is cut
into **sub-matrices** of at most 1000 columns. Sub-matrices that are all zero
are skipped. Within a sub-matrix the nonzeros are in CRS order: row by row,
each nonzero with its value and column index.

For sub-matrix `A_ij` only the matching 1000-entry piece `x_j` of the vector
is needed on chip. The core does not send the sub-matrix result `A_ij·x_j`
out. It adds it into an on-chip **result memory** that holds the running `y`
of the whole stripe. The stripe's `y` leaves the chip once, after the
stripe's last sub-matrix.

For example, with the CRS arrays

```
val: 2 -3 -1 6 1 9 5 8 6      col: 0 2 1 4 0 1 0 1 3      len: 2 2 1 1 3
```

row 0 is sent as two nonzeros (2 @ col 0, −3 @ col 2) followed by its row ID.

## The PE input stream

Every PE receives one signal bundle per clock: `valid`, `val`, `col` and
`bank` (`spmv_pkg::pe_in_t`):

```
clock     | r0  r0  r0  ID  r1  r1  z   z   r1  ID  -   -
valid     | 1   1   1   0   1   1   1   1   1   0   0   0
val       | v   v   v   0   v   v   0   0   v   0   0   0
col       | c   c   c   id  c   c   0   0   c   id  0   0
stall     |                     (high)
```

* While `valid` is high, `val`/`col` carry the nonzeros of one row.
* The first clock with `valid` low after a row carries the **row ID** on `col`.
  This is the row's index in the stripe, and so its address in the result
  memory. The PE detects it as the falling edge of `valid` and pushes the ID
  into FIFO2.
* When the PE raises `stall`, or when the next nonzero has not arrived,
  **zeros are inserted**. Inside a row, `valid` stays high on those clocks,
  so they become zero products of the row and cost nothing but time. Between
  rows, `valid` stays low.

The per-PE `row_streamer` makes this stream from a plain valid/ready
stream of nonzeros (`e_*` ports of the top).

## Inside a PE

```
col ──► x_bram (2 banks × 1000, 1-clock read) ──┐
val ──► 1-clock buffer ─────────────────────────┴─► fp64_mul (9) ─► acc_circuit (12) ─► FIFO1 (12 × 64 bit)
valid falling edge: col = row ID ────────────────────────────────────────────────────► FIFO2 (row IDs)
```

All control comes from delayed copies of `valid`: 1 clock for the x read,
`MUL_LAT` for the multiplier, and 12 inside the accumulator.

`stall` rises when FIFO1 has fewer than 14 free entries. A row needs at
least two clocks (one nonzero and its ID clock), so at most
`(1 + 9 + 12)/2 + 1` rows can still be in the pipeline, plus one more while
the stall reaches the feeder. FIFO1 therefore never overflows, and FIFO2
(same depth) never does either. Assertions check both.

### The accumulation circuit (`acc_circuit`)

The adder is `L = 12` clocks deep, and its output is connected back to its
`b` input. A product entering at clock `t` is added to the adder output
visible at clock `t`, which is the running sum of the products that entered
at `t−12`, `t−24`, and so on. A row of `n` products is therefore summed in 12
interleaved chains (positions `p`, `p+12`, `p+24`, …). A naive loop gets
three things wrong, and the circuit fixes each one:

1. **The result is 12 numbers, not one.** The last 12 adder outputs of the
   row are the final values of the 12 chains. A 12-register shift line keeps
   the latest outputs. Twelve clocks after the row's ID clock, all 12 are
   written to FIFO1 in one clock.
2. **The start of a row would be added to the end of the previous row.** The
   feedback is forced to zero while the row has had fewer than 12 products.
   A saturating position counter, reset by `valid` low, decides this.
3. **A row shorter than 12 leaves stale values.** The outputs from clocks
   that did not belong to the row are replaced by zeros when FIFO1 is
   written. The row length travels with the row-end flag to decide which
   ones.

Sum the 12 words of a FIFO1 entry and you have the row's dot product with
`x_j`.

## The reduced summation circuit (`summation_circuit`)

One circuit is shared by all PEs. For each row it must add 13 numbers: the
12 partial sums and the row's current value in the result memory. An adder
tree would need 12 adders. This circuit uses 4.

* On `load`, 16 registers take the 12 partial sums, the memory value
  (register 12) and three zeros. They then shift out **two per clock** into
  adder 1, so a row enters over 8 clocks and a new row can be loaded every
  8 clocks.
* Adder `k+1` adds adder `k`'s current output to the one from `2^(k−1)`
  clocks earlier, taken from a 1-, 2- or 4-register delay line (7 registers
  in all).

Clock 0 is the clock the first pair enters adder 1, one clock after `load`:

| stage    | inputs taken at clock | meaningful outputs at clock |
|----------|-----------------------|-----------------------------|
| adder 1  | 0, 1, …, 7 (pairs)    | 12 … 19                     |
| adder 2  | 13, 15, 17, 19        | 25, 27, 29, 31              |
| adder 3  | 27, 31                | 39, 43                      |
| adder 4  | 43                    | **55**                      |

Each adder adds every clock. Only the outputs listed belong to the row, and
they never pair values from different rows. No control logic is needed:
the row ID and a write enable enter two 56-deep shift registers at `load`,
and reach the result memory together with the total. In general, with
adder latency `L` and `NLEV` adders, the latency is
`NLEV·L + 2^(NLEV−1) − 1` and the circuit takes up to `2^NLEV − 1` partial
sums plus the memory value.

## The result controller (`result_controller`)

* **Issue.** When a PE has a finished row, the PE's FIFO1 and FIFO2 are
  both non-empty. The controller picks one such PE in round-robin order, at
  most once every 8 clocks, and pops both FIFOs. In the same clock it reads
  the result memory at the row ID. One clock later it loads the summation
  circuit.
* **Write-back.** The write is stream-through: 56 clocks after the load, the
  summation circuit's `wen`, `row` and total drive the result memory write
  port directly.
* **Hazard interlock.** Row `r` of the next sub-matrix may reach the
  controller, from another PE, before the previous sum of row `r` has been
  written back. If it read the memory then, it would read a stale value. The
  controller keeps one pending bit per result address, set at issue and
  cleared at write-back. It does not issue a row whose address is pending,
  and other PEs' rows go ahead meanwhile.
* **Readout and clear.** `rd_start` with `rd_count` waits until everything
  is drained. The controller then reads rows `0 … rd_count−1`, one per clock,
  onto `y_row/y_data/y_valid`. In the same clock it writes zero to the same
  address; the memory is read-first, so the read still returns the old
  value. After reset, the whole memory is cleared the same way, and `ready`
  stays low for 1000 clocks.

## Using the top (`spmv_top`)

| port | meaning |
|---|---|
| `e_valid[i] / e_ready[i]`, `e_val[i]`, `e_col[i]`, `e_bank[i]`, `e_last[i]`, `e_row[i]` | The nonzero stream of PE `i`. `e_col` is the column within the sub-matrix (< 1000). `e_bank` is the x bank holding that sub-matrix's `x_j`. `e_last` and `e_row` (row within the stripe, < 1000) mark a row's last nonzero. |
| `x_wr_en, x_wr_bank, x_wr_addr, x_wr_data` | Writes one `x` entry into a bank of every PE's x memory. |
| `rd_start, rd_count` → `y_valid, y_row, y_data` | Reads out and clears a finished stripe. |
| `ready` | High when the core is accumulating and can take `rd_start`. |

Operating a stripe:

1. Wait for `ready`.
2. Load `x_0` into bank 0.
3. Stream the rows of sub-matrix 0, naming bank 0.
4. Meanwhile load `x_1` into bank 1, and stream sub-matrix 1 with bank 1.
5. Continue alternating banks. A bank may be overwritten once every nonzero
   that reads it has been accepted (`e_ready`) and two more clocks have
   passed.

A row must go entirely to one PE. Otherwise rows may go to any PE, and the
same row of later sub-matrices may go to different PEs. Empty rows are not
sent. After the last nonzero of the stripe, pulse `rd_start`.

Throughput:

* A PE takes one nonzero per clock plus one clock per row.
* The summation circuit finishes one row every 8 clocks.
* With 8 PEs, the summation circuit limits throughput when rows average
  fewer than about 63 nonzeros. In the end-to-end test (1000 × 1000
  sub-matrices, about 10 nonzeros per row) the PEs spend most of the time
  stalled, and a stripe takes close to 8 clocks per row.

## Parameters

| name | default | where |
|---|---|---|
| `N_PE` / `NPE` | 8 | `spmv_pkg`, `spmv_top`, `result_controller` |
| `X_DEPTH` / `XDEPTH` | 1000 entries per bank (2 banks) | `spmv_pkg`, `x_bram`, `pe` |
| `RES_DEPTH` / `DEPTH` | 1000 rows per stripe | `spmv_pkg`, `result_bram`, `result_controller` |
| `COL_W` | 16 (2-byte index) | `spmv_pkg` |
| `ADD_LAT` / `L` | 12 | adder latency, partial sums per row |
| `MUL_LAT` / `MLAT` | 9 | multiplier latency (own choice) |
| `NLEV` | 4 | summation adders (latency 55) |
| `FIFO_DEPTH` | 32 | PE FIFOs (own choice) |
| `STALL_FREE` | 14 | free FIFO1 entries that raise stall |

`fp64_add` and `fp64_mul` wrap the combinational functions `fp_add` and
`fp_mul` in `spmv_pkg`:

* The operands are registered, computed in one block of logic, and delayed
  by `LAT−1` output registers, which a retiming synthesis can spread through
  the logic.
* Rounding is to nearest even.
* Subnormal inputs and outputs are flushed to zero.
* NaN results become the canonical quiet NaN.

## What is taken from the source design and what is not

Taken from it:

* The row-blocked CRS layout, and stripes accumulated on chip.
* The 8 PEs and the memory sizes of 1000.
* The 2-byte column index and 64-bit data.
* The PE datapath (x memory addressed by `col`, val buffer, multiplier,
  accumulator, FIFO1/FIFO2).
* The row-ID clock, and zero insertion on stall and on input waits.
* The stall rule: free space larger than half the adder-plus-multiplier
  pipeline.
* The feedback accumulator with 12 output registers and zero filling.
* The reduced summation circuit (4 adders, 1+2+4 buffers, 16 registers with
  3 zero pads, latency 55).
* The stream-through write-back with shifted row ID and write enable.
* Read-and-clear of the result memory per stripe.

This design's own choices, where the source is silent:

* The floating point units themselves. The source uses vendor cores. The
  multiplier latency of 9 is also chosen here.
* Two x banks per PE, so that the next `x_j` can be loaded during
  computation.
* The exact masking logic of the accumulator (position counter, length
  travelling with the row end).
* The FIFO depth of 32, the stall margin of 14, and first-word-fall-through
  FIFOs.
* The round-robin choice between PEs.
* The pending-bit interlock against result-memory hazards.
* The position of the memory value among the 16 summation registers.
* The memory-clear after reset.
* The valid/ready nonzero interface of the row streamers. The matrix
  manager that fetches the matrix from host memory and distributes rows to
  PEs is not part of this RTL. The top brings its streams out as ports.

Not built:

* The integer and single-precision variants.
* The mixed 32/64-bit integer variant.
* The adder-tree alternative to the summation circuit.
* Multiple summation circuits in parallel.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it shows |
|---|---|
| `tb_fp64_add`, `tb_fp64_mul` | Bit-exact against the simulator's IEEE double arithmetic for 4000 random pairs each (cancellation, wide exponent gaps, zeros, infinities), with the exact latency. |
| `tb_sync_fifo`, `tb_x_bram`, `tb_result_bram` | Model comparison, including full/empty, bank separation and read-first. |
| `tb_acc_circuit` | 400 rows, short and long, back to back. Each of the 12 partial sums equals its interleaved chain. Output exactly 12 clocks after the row end. |
| `tb_pe` | 600 rows through one PE with a slow consumer. Stall must occur. Row sums are exact. First-row latency is 1 + 9 + 12 + 1 clocks. |
| `tb_summation_circuit` | 500 rows of random doubles, bit-exact against the same pairwise order. Write enable exactly 56 clocks after load. Full rate of one row per 8 clocks. |
| `tb_result_controller` | Several sub-matrices with recurring rows: hazard waits must occur, pops are never closer than 8 clocks, y values are exact. A second stripe checks the clear. |
| `tb_row_streamer` | Row reconstruction from the stream. Zeros on stall and on input waits. Nothing accepted while stalled. |
| `tb_spmv_top` | The whole core at its default sizes. One 1000-row stripe of three 1000 × 1000 sub-matrices at about 1% density, with `x_2` loaded during computation, then a small stripe that forces hazards. All y values are compared exactly, using integer data. Stall, both kinds of zero insertion, short and long rows, both banks, overlapped x loading and hazard waits must all occur. The stripe time must be within 10% of the 8-clocks-per-row bound. |

`tb_spmv_workload` runs a whole 7320 × 7320 matrix with 324,784 nonzeros
(0.61% dense) at the default sizes. It is processed as a host would: 8
stripes, 8 column blocks each, a readout per stripe, and all 7320 y values
checked exactly. The sparsity pattern is random, so rows are spread evenly
over the column blocks. Each row piece has about 5.5 nonzeros, so row-ID
clocks are about 14% of the PE input clocks. A banded matrix of the same
size has far fewer, longer row pieces and a much smaller overhead. The run
takes about 430,000 clocks, a couple of seconds of simulation.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/spmv_pkg.sv tb/tb_spmv_top.sv --top-module tb_spmv_top -o sim
./obj_dir/sim
```

The full-size end-to-end test simulates about 30,000 clocks and finishes in
well under a second.

## Known limits

* The floating point units are written for clarity. Each does its whole
  computation between two registers and relies on retiming to reach the
  clock rates reported for vendor cores (around 165 MHz on the FPGA family
  the design was sized for). Timing closure has not been checked.
* Subnormals are flushed to zero. An infinite or NaN `x[0]` would poison the
  zero products inserted inside rows, because those read `x[0]` of the
  row's bank.
* Row IDs must be below 1000, and columns below 1000 (larger columns read as
  zero).
* Readout needs the core to be drained. The host must not send the next
  stripe until `ready` is high again.
