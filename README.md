# Reconfigurable H.264/AVC inverse transform

An H.264/AVC decoder has three inverse transforms. It needs the 4x4 integer transform for every
residual block. It needs the 4x4 Hadamard transform for the luma DC coefficients of Intra16x16
macroblocks. The High profiles (FRExt) add the 8x8 integer transform. All of them come after
inverse quantization (scaling). Building one datapath per transform wastes area. This design runs
all three on one datapath of two small 1-D pipelines that can be reconfigured. It keeps a steady
rate of **two samples per clock** in every mode.

The key idea: the 8-point inverse transform splits into an even half and an odd half. The even
half is the 4-point transform applied to c0, c2, c4, c6. The odd half is a second small network
on d1, d3, d5, d7. So the same two pipelines work in two ways:

| mode | top pipeline | bottom pipeline | sample mixer |
|---|---|---|---|
| 4x4 | 4-point transform of one line | 4-point transform of the next line | passes both through |
| Hadamard | same, with the `>>1` shifts off | same, with the `>>1` shifts off | passes both through |
| 8x8 | even half of one 8-point line | odd half of the same line | joins the halves |

The architecture follows a published description of a reconfigurable AVC inverse transform. That
description covers the scaling unit, the two pipelines, the sample mixer, the modes and the
rate. The control, the memory paging, the host interface, the data widths and the exact
clock-by-clock schedule were not specified. They are this design's own. Each is pointed out below.

## Data flow

```
            host (2 writes/clk)                     weight-scale writes
                  |                                         |
            +-----v------+   2/clk   +---------+   +--------v-----+
            | coef_buffer|---------->| iq_unit |-->|              |
            | 2 pages x64|---------->| iq_unit |-->|  itrans_1d   |  row pass
            +-----^------+           +---------+   | top | bottom |
                  | Hadamard results               |   mixer      |
                  | written back                   +------+-------+
                  |                                       | 2/clk, raster addresses
                  |                              +--------v---------+
                  |                              | transpose_buffer |  2 pages x 64
                  |                              +--------+---------+
                  |                                       | 2/clk, row/col bits exchanged
                  |                               +-------v------+
                  +-------------------------------|  itrans_1d   |  column pass
                                                  +-------+------+
                                                          | (x + 32) >> 6
                                                          v
                                              out_* : 2 residuals/clk + addresses
```

A **job** is one page of 64 coefficient slots:

| job | contents of the page | address of coefficient (row r, col c) | clocks to read |
|---|---|---|---|
| 4x4 | four 4x4 blocks | `blk*16 + r*4 + c` | 32 |
| 8x8 | one 8x8 block | `r*8 + c` | 32 |
| Hadamard | one 4x4 block of DC values | `r*4 + c` | 8 |

## The two pipelines

Both pipelines take one sample per clock and give one result per clock. A line is four samples on
four consecutive clocks. Each pipeline has three steps:

1. It collects the four samples in shift registers.
2. One adder/subtractor forms one first-stage sum per clock. It has a `>>1` multiplexer on each
   operand. The sums go into a small reorder memory.
3. A second adder/subtractor forms one output per clock into a register.

Each pipeline holds a double buffer between its steps, so lines can follow each other with no
gap. A line's first result appears 9 clocks after its first sample.

**Top pipeline** (`tr_top_pipe`): the standard 4-point butterfly.

```
e0 = d0 + d2        e1 = d0 - d2
e2 = (d1>>1) - d3   e3 = d1 + (d3>>1)     (Hadamard: no >>1)
x0 = e0 + e3   x1 = e1 + e2   x2 = e1 - e2   x3 = e0 - e3
```

Fed c0, c2, c4, c6 of an 8-point line, these same equations give the even values b0, b2, b4, b6.

**Bottom pipeline** (`tr_bottom_pipe`): in 4x4 and Hadamard mode it matches the top pipeline, with
its result on output B1. In 8x8 mode it takes d1, d3, d5, d7 and builds each odd value as a pair
sum plus or minus 1.5 times the fourth input:

```
a1 = (d5 - d3) - 1.5*d7     a3 = (d1 + d7) - 1.5*d3
a5 = (d7 - d1) + 1.5*d5     a7 = (d3 + d5) + 1.5*d1       1.5*y = y + (y>>1)
```

The shared first-stage adder forms the pair sum. An extra adder, used only in 8x8 mode, forms the
1.5 multiple. In the second stage, two adders read the reorder memories and drive **two** values
per clock:

| phase k | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| B1 | a7 | a5 | a3 | a1 |
| B2 | a1 | a3 | a5 | a7 |

The original description fixes the B1/B2 outputs and the "multiplication by 1.5". The order in
the table is this design's choice. It lets the mixer work without input multiplexers.

## The sample mixer

`sample_mixer` finishes the 8-point transform. In phase k the top pipeline supplies
A = b0, b2, b4, b6 and the bottom pipeline supplies the pair above. The mixer computes:

```
bo = B1 - (B2>>2)   in phases 0, 1     -> b7, -b5
bo = B1 + (B2>>2)   in phases 2, 3     -> b3,  b1
A' = A + bo, B' = A - bo               (phase 1: A' = A - bo, B' = A + bo)
```

So phase k yields x_k on A' and x_(7-k) on B'. A full 8-point line comes out in 4 clocks, two
samples per clock. In the 4-point modes, A' = A and B' = B1, with the same 3-clock latency. A
complete 1-D pass (`itrans_1d`: both pipelines and the mixer) has a latency of 12 clocks.

## Scaling (inverse quantization)

`iq_unit` computes, one coefficient per clock,

```
y = (f * W(i,j) * N(qp%6, i, j) * 2^(qp/6)) >>> QS        QS = 4 (4x4), 6 (8x8)
```

It uses three multipliers in a row. The variable shift is done as a multiplication by 2^(qp/6);
the constant `>>> QS` is only wiring. N comes from a ROM holding the standard's norm-adjust values
(3 classes for 4x4, 6 for 8x8). W comes from a weight-scale RAM holding one 4x4 and one 8x8
matrix. Until a matrix is written after reset, it reads as the flat value 16. The result
saturates to 20 bits. In Hadamard mode the unit passes the coefficient through unchanged, with
the same 5-clock latency.

**Departure from the standard:** the standard adds a rounding offset 2^(QS-qp/6-1) when qp/6 < QS.
This unit uses a plain arithmetic shift, as in the original description. For qp < 24 (4x4) or
qp < 36 (8x8), a scaled coefficient can be one unit lower than a conforming decoder's. If you need
bit-exact output, add the offset before `sh4` in `iq_unit.sv`.

## Transposition and page flow

Transposition needs no logic. The row pass writes each result at its raster address. The column
pass reads with the row and column fields of the address exchanged. All addresses of all passes
come from one function, `avc_itrans_pkg::pair_addr`. Each sample carries a small tag (mode, block,
line, pages, last-line flag), and the function works from that tag and the phase.

The control is this design's own:

- **Sequencer.** It accepts a job through a valid/ready handshake. It then reads the page two
  coefficients per clock. Each job gets the next of the two transposition pages.
- **Column-pass reader.** A 4x4 job's page is ready for the column pass once the first 4x4 block
  of row results is written. The remaining blocks arrive exactly as fast as the column pass reads
  them. An 8x8 or Hadamard page is ready only once all of it is written, because every column
  needs every row. The column pass starts in the clock after the page becomes ready.
- **Page reuse.** A transposition page is handed to a new job before the column pass has finished
  reading it, as long as at most 19 read clocks are left. A job accepted in clock L writes its
  first row results in clock L+19: 1 memory read, 5 scaling and 12 row-pass clocks. So no unread
  sample is ever overwritten. This rule lets 4x4 and 8x8 jobs run back to back with no wait
  states.
- **Exception.** A job accepted right after a short Hadamard job can find its transposition page
  still being filled, and waits for it.

Timing of a job accepted in clock L:

| clock | 4x4 job | 8x8 job |
|---|---|---|
| input page read, 2 coefficients per clock | L+1 ... L+32 | L+1 ... L+32 |
| row results written to the transposition page | L+19 ... L+50 | L+19 ... L+50 |
| column-pass reads | L+27 ... L+58 | L+51 ... L+82 |
| `out_valid`: 2 residuals per clock, 64 in all | L+41 ... L+72 | L+65 ... L+96 |

So the latency from the first coefficient read to the first residual is **40 clocks for 4x4 jobs**
and **64 clocks for 8x8 jobs**. The first 4x4 block of a job is completely out in clock L+48. The
original description states a result delay of 48 clocks without naming the transform.
For 8x8 this design waits for all 8 rows, which is simpler. It costs latency but not throughput.
If the column pass is still busy with the previous job, a job's results start right after that job's results, with no gap.

## Hadamard jobs

In a Hadamard job, the scaling is bypassed and both passes run without the `>>1` shifts. The
results do not go to `out_*`. They are written back over addresses 0..15 of the job's own input
page, saturated to 16 bits. `page_busy` for that page stays high until the write-back is complete.
`job_done` then pulses, and the host reads the results through `h_raddr`/`h_rdata`.

The DC scaling that H.264 applies after the luma Hadamard is left to the host, and so is placing
the DC values into their 4x4 blocks. Neither was described. The 2x2 and 2x4 chroma DC transforms
are not built either.

## Top-level interface (`avc_itrans_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `h_we`, `h_waddr`, `h_wdata` | in | 2, 2x7, 2x16 | two host writes per clock, address = {page, slot} |
| `h_raddr` / `h_rdata` | in / out | 7 / 16 | host read, data one clock later |
| `ws_we`, `ws_is8`, `ws_addr`, `ws_data` | in | 1, 1, 6, 8 | weight-scale write (`ws_addr` = row*4+col or row*8+col) |
| `start_valid` / `start_ready` | in / out | 1 | job handshake; hold `start_valid` until accepted |
| `start_page`, `start_mode`, `start_qp` | in | 1, 2, 6 | job page, `tmode_e` (0 = 4x4, 1 = Hadamard, 2 = 8x8), qp 0..51 |
| `out_valid`, `out_a`, `out_b` | out | 1, 14, 14 | two residual samples |
| `out_addr_a`, `out_addr_b` | out | 6, 6 | their slot addresses in the page layout above |
| `out_page`, `out_last` | out | 1, 1 | input page of the job; last pair of the job |
| `page_busy` | out | 2 | input pages the engine owns: do not write them |
| `job_done`, `job_done_page` | out | 1, 1 | a job has left the engine |

Typical use:

1. Fill a free page in 32 clocks (8 for a Hadamard job).
2. Raise `start_valid` with the page, mode and qp.
3. Fill the other page while the first job runs.

Jobs leave in the order they were started. Write the weight matrices only while no job is in
flight: a write changes the scaling of coefficients already in the pipeline.

Widths are set in `avc_itrans_pkg`: `COEF_W` = 16 for coefficients and `DW` = 20 for the datapath.
`RES_W` = 14 is the residual width at the top. With `DW` = 20, a row or column of 8x8 results stays
exact as long as the scaled coefficients stay within about 2^12 in magnitude.

## Verification

Each module has a self-checking testbench in `tb/`. Each one computes its expected values
independently: the standard's scaling formula and butterfly equations are written out directly in
the testbench. It ends with a `TB_RESULT checks=N failures=M` line.

- `tb_avc_itrans_top` runs 40 jobs end to end, with the default parameters. The jobs use all three
  modes in random order and random qp, first with flat weights and then with user matrices. The
  testbench checks:
  - every residual and every written-back Hadamard result;
  - the latency: 41 clocks from acceptance for 4x4 jobs, 65 for 8x8, unless the previous job's
    results are still streaming out;
  - that each job's output has no gaps;
  - that the engine inserts no wait states except right after a Hadamard job.

  It counts mode switches, Hadamard write-backs, user-weight jobs, left and right scaling shifts,
  early page reuse and back-to-back starts, and fails if any of them never happened.
- `tb_sdtv_macroblocks` runs whole macroblocks, checking every result. It covers 4:2:0
  Intra16x16 (one Hadamard job and six 4x4 jobs), 4:2:2 Intra16x16 (one Hadamard and eight 4x4
  jobs) and 4:2:0 with the 8x8 transform (four 8x8 jobs and two 4x4 jobs). It checks that each
  macroblock takes at most 333 clocks. That is the budget for 720x576 at 25 frames/s with a
  13.5 MHz clock. Including the host's fill and read-back time, the measured worst cases are
  260, 326 and 198 clocks.
- `tb_itrans_1d`, `tb_tr_top_pipe`, `tb_tr_bottom_pipe` and `tb_sample_mixer` check the 1-D
  arithmetic, the phases and the latencies of the parts.
- `tb_iq_unit` checks scaling in all modes, the flat and user weights, and saturation.
- `tb_coef_buffer` and `tb_transpose_buffer` check the memories and the transposed read order.

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/avc_itrans_pkg.sv tb/tb_avc_itrans_top.sv --top-module tb_avc_itrans_top
./obj_dir/Vtb_avc_itrans_top
```

## What to trust and what was not built

- The scaling ROM holds the norm-adjust values of the H.264/AVC standard. The 1-D equations are
  the standard's. The testbenches check the RTL against these equations, not against a reference
  decoder's output files.
- Not bit-exact with the standard for qp/6 < QS, because the rounding offset is missing (see
  *Scaling*).
- The input memory sits in front of the scaling units: coefficients are stored raw and scaled
  on their way into the row pass. The original description also has a sentence in which the
  scaling unit writes into a memory in front of the pipelines. Either order gives the same
  results.
- The memories are register arrays with several ports. They do not map directly onto FPGA block
  RAMs.
- Not built: an output buffer (the top brings out its write port), the luma DC scaling after the
  Hadamard transform, and the chroma DC transforms.
