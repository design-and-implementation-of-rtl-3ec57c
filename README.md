# Distributed video decoder (Wyner-Ziv decoder) in SystemVerilog

This is the decoder side of a distributed video codec for QCIF video (176x144).
Key frames are coded as intra frames. The frames between them are Wyner-Ziv
(WZ) frames, and the encoder sends only the following for each one:

- its block motion vectors;
- the accumulated LDPCA syndromes of the quantised transform-domain residue.

The decoder makes its own guess of the WZ frame from the two neighbouring key
frames; this guess is called the side information. The syndromes correct the
guess's bit planes until they match what the encoder coded. The design
targets 100 MHz.

The top is `rtl/dvc_decoder.sv`. It holds frame memories, a host load port
and a frame-sequential controller. The controller runs one processing engine
at a time, and that engine owns the memories while it runs.

## Decoding steps

| step | engine | what it does |
|------|--------|--------------|
| WVMF | `wvmf` | Smooths the encoder's block vectors with a SAD-weighted vector median over a 3x3 block window. |
| MCF | `motion_comp` | Compensates the previous key frame with +mv (forward). |
| MCB | `motion_comp` | Compensates the next key frame with -mv (backward; the same engine with `neg = 1`). |
| INTERP | `interpolation` | Side information pixel = (forward + backward + 1) >> 1. |
| MCK | `motion_comp` | Compensates the previous key frame with the encoder vectors, as the encoder did. |
| FQ | `transform_quant` (sel = 1) | For each 4x4 block: SI - MCK goes through the forward integer transform and quantisation. Levels are stored band by band. |
| LDPC | `soft_input`, `ldpca_decoder` | For each band, each bit plane (most significant first) and each codeword: soft input from the side-information bit, then LDPCA decoding with the stored syndromes. Decoded bits go to the WZ level buffer. |
| IQ | `transform_quant` (sel = 0), `reconstruction` | De-quantisation and inverse transform, then MCK + residue, clipped to 0..255, into the output frame. |

Each coefficient level is sent as 4 bit planes of the offset value
`u = level + 8`, so levels run from -8 to 7. A QCIF band holds 1584 4x4 blocks.
At the default code length of 396 that is 4 codewords per band and plane, and
256 codewords per frame.

## LDPCA decoder

`ldpca_decoder` recovers N = 66*G bits (396 by default) from two inputs:

- their LLRs, with a positive value meaning bit 1;
- the accumulated syndrome bits.

The code rate is k/66, with k from 2 to 66 (65 rates). Each of the G
accumulation groups of 66 check nodes uses k of its accumulated syndromes.

**One iteration per clock.** All variable and check nodes update in parallel
in a flooding min-sum schedule.

**Comparing tree** (`ldpca_comparing_tree`). One tree serves each group of 66
basic check nodes:

- Level 0 holds 66 `ldpca_basic_cn` cells. Each is a 3-input first/second
  minimum finder.
- Six further levels of `ldpca_stacking_cn` cells each merge two sorted
  (min1, min2) pairs.
- The rate decides how many merges are active at each level: 66 → 33 → 17 →
  9 → 5 → 3 → 2 segments. Inactive nodes pass their children's values through.
- Every basic check node gets the first and second minimum, and the parity, of
  the merged node it belongs to at the current rate. This lets all 65 rates
  share one datapath.

**De-accumulation** (`ldpca_deaccumulator`). Merged node j..k takes
`A_k ^ A_(j-1)`, or `A_k` when j = 0. The bits come straight from the
accumulated syndrome vector.

**Rate control.** The parity of the hard decisions is checked against all
merged syndromes before each iteration. A match ends decoding with success.
If MAX_ITER (40) iterations pass without a match:

- the rate rises by one;
- the messages restart from the LLRs;
- decoding goes on.

At 66/66 the decoder gives up and reports failure. In the top, the counter
`stat_rate_raised` counts rate rises and `stat_syn_bits` counts the syndrome
bits used.

**Parity-check matrix.** Each variable node has degree 3. Edge e of bit v goes
to check node (a_e*v + b_e) mod N, with a = {1, 7, 13} and b = {0, 1, 5}
(see `ldpca_pkg`). The merge order is balanced pairwise merging of
neighbouring check nodes.

**Timing.** Start takes 1 load cycle, then 1 cycle per iteration, plus 1 cycle
for each parity check that closes a rate. A word that is already correct
finishes 2 cycles after start.

## Side information creation

- **`wvmf`**: the control unit.
  - At the start of a block row it reads all nine window vectors. When the
    window slides right it shifts and reads only the three vectors of the new
    right column.
  - For each of the nine candidates it runs two datapaths at once:
    `wvmf_sad` adds |P_prev(+mv) - P_next(-mv)| over the 8x8 block, and
    `wvmf_distance` sums the x and y distances to the nine window vectors.
  - `wvmf_selector` keeps the candidate with the smallest SAD·Dx + SAD·Dy.
    On a tie, the earlier candidate wins.
  - Window positions outside the frame reuse the nearest edge block.
  - Cost: 597 + (9 or 3 loads) cycles per 8x8 block, about 237K cycles per
    QCIF frame.
- **`motion_comp`**: copies each 8x8 block from the reference frame at the
  block's vector. A vector pointing outside the frame takes the nearest frame
  pixel, and `neg` selects
  the negated vector. It takes BS²+2 cycles per block.
- **`interpolation`**: one pixel per cycle, NPIX+2 cycles per frame.

## Transform and quantisation

- **`transform_core`**: a direct 2-D 4x4 integer transform, forward or
  inverse (H.264 kernels). It does one block per cycle, with registered
  output.
- **`transform_quant`**: the coefficient multiplier and shifter around the
  core, with latency 2 cycles.
  - Forward: transform, then `(|y|·MF + f) >> qbits` with qbits = 15 + QP/6.
  - Inverse: `level·V << (QP/6)`, then the inverse transform, then
    `(x + 32) >> 6`.
  - MF and V are the H.264 tables.

## Soft input

`soft_input` has latency 1 and uses two lookup tables.

- **LUT1** maps (alpha index, bit plane) to the probability that the WZ bit
  differs from the side-information bit: `P = 0.5·exp(-alpha·2^(plane-1))`,
  scaled by 256, with alpha = 2^(i-5) for i = 0..7.
- **LUT2** turns P(1) into `LLR = round(4·ln(P1/P0))`, saturated to ±31
  (6 bits).

The alpha index is a per-frame input.

## Reconstruction

`reconstruction` stores the 16 de-quantised residues of a 4x4 block. It then
adds one compensated pixel per cycle and clips the result to 0..255.

## Memories and host interface

All frame buffers are `frame_mem` arrays with one write port and two
synchronous read ports (one-cycle latency). There are nine of them: previous
and next key frame, input and smoothed vectors, forward, backward, SI, MCK and
output frame. The top also holds these buffers:

- the SI coefficient levels, band-major (address = band·1584 + block);
- the decoded WZ levels;
- the syndrome words.

`host_mem` selects what a host write goes to:

| host_mem | contents |
|----------|----------|
| 0 | previous key frame pixels |
| 1 | next key frame pixels |
| 2 | encoder vectors; `{x, y}` of MVW = 6 bits each in the low bits, one per 8x8 block |
| 3 | 32-bit syndrome words |

Syndrome words follow these rules:

- Bit i of word j holds accumulated syndrome 32j+i.
- Each codeword takes 13 words.
- Codewords are ordered by band, then plane (most significant first), then
  codeword.

To decode a frame:

1. Set `qp`, `alpha_idx` and `rate_init`.
2. Pulse `start`.
3. Wait for `done`. `phase` shows the current step while it runs.
4. Read the frame through `out_rd_addr` / `out_rd_data`.

## Performance

The full-size test decodes a QCIF WZ frame in 676,830 cycles (6.8 ms at
100 MHz) across 256 codewords.

QCIF at 30 frames/s with GOP 2 means 15 WZ frames per second, which is
6.67M cycles per frame. In the worst case every codeword needs all rates:
256 · 65 · 41 ≈ 680K cycles. With side information added, the total stays
under 1.1M cycles.

## Departures from the original design and limitations

- **Not included: H.264 intra decoding of key frames.** Key frames are written
  in through the host port.
- **Not included: CAVLC decoding of entropy-coded bands.** Every band is
  channel coded.
- **Not included: skip mode.**
- **Not included: scan chains and I/O pads.**
- **External memory:** it is modelled as on-chip arrays with a simple host
  port, not as an external memory interface.
- **Own choices** for details the original design does not give:
  - the parity-check matrix and merge order;
  - LUT1/LUT2 contents and the LLR scale;
  - the quantisation tables (taken from H.264);
  - 8x8 integer-pel vectors in -31..31 (-32 cannot be negated);
  - 4 bit planes per band;
  - MAX_ITER = 40;
  - repeating the edge block for filter windows at the frame edge;
  - the tie rule in the filter.
- **Alpha is not estimated.** The Laplacian parameter comes in as an index and
  is not computed from the residue.
- **No CRC on decoded codewords.** Success means only that the syndrome check
  passed. With short codes, or a low starting rate where the side information
  is poor, a wrong word can pass. The end-to-end test saw this with a 66-bit
  code. At 132 and 396 bits with a starting rate of 40/66, it decoded
  correctly.
- **The comparing tree keeps duplicate edges.** When a variable node has two
  edges into the same merged check node, both stay in the minimum search. The
  parity check itself is exact.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Example with Verilator 5:

```
verilator --binary --timing -Mdir obj $(ls rtl/*pkg.sv) $(ls rtl/*.sv | grep -v pkg) \
  tb/tb_dvc_decoder.sv --top-module tb_dvc_decoder
./obj/Vtb_dvc_decoder
```

**`tb_dvc_decoder`** runs end to end at 88x24 with G = 2. The testbench plays
the encoder:

- It builds the frames and vectors, including outliers and vectors that point
  outside the frame.
- It transforms, quantises and LDPCA-encodes the residue.
- It loads everything through the host port.
- It checks the output frame pixel by pixel.

It also counts each mechanism and fails if one never occurs: each of the 8
steps, rate rises, vectors changed by smoothing, edge clamping in
compensation, and clipping in reconstruction.

**`tb_dvc_decoder_full`** repeats the same test at the default size
(176x144, 396-bit code).

Block testbenches cover:

- the check-node cells, exhaustively;
- the comparing tree at all 65 rates against a reference;
- the decoder's cycle counts for a clean word, a noisy word, rate rises and
  failure;
- WVMF against a software filter, with its cycle count;
- compensation in both directions with clamping;
- the transform and quantiser against reference arithmetic;
- the soft-input tables against the exp/ln formulas;
- clipping in reconstruction.
