# Fractal image encoder (pipelined, eight-way parallel)

Fractal image coding stores an image as a set of self-similarities. The image
is cut into small non-overlapping **range blocks**. For each range the encoder
looks for a **domain block** somewhere in the same image, twice as large, that
after three steps looks like the range:

1. shrinking by 2x2 averaging,
2. one of eight rotations or flips,
3. adding a grey-level offset K.

The code of a range is the domain's position, the transform number and the
quantized offset. A decoder rebuilds the image by applying all these maps
over and over, starting from any picture. The encoder also sends a coarse
5-bit average image, which the decoder can use as that starting picture.

The expensive part is the search, because every range is compared with every
domain under eight transforms. This RTL makes that search fast in three ways:

- the eight transforms are scored in parallel;
- overlapping domains share the pixels already fetched;
- fetching the next domain overlaps with scoring the current one.

The default configuration encodes a 64 x 64, 8-bit grey image from an external
memory. It uses 4 x 4 ranges and 8 x 8 domains on a lattice of spacing 4,
which gives 256 ranges and 225 domains per range.

The architecture follows a published VLSI design for fractal image coding:
its block structure, bus widths and error arithmetic. That description
leaves many details open, such as the sizes of the range, lattice and offset
step, and the sequencing. The choices made here are listed under
*Departures and own choices*.

## The matching error and why it splits in two

For a range r and a shrunk, transformed domain d (N = 16 pixels each), with
offset K the error is

    E = (1/N) * sum_i (r_i - d_i - K)^2

The offset that minimises E is `K_o = (sum r - sum d) / N`. Write
`T = sum r - sum d`. The pixel *sum* of a domain does not change when the
domain is rotated or flipped, so T and K_o are the same for all eight
transforms. Expanding the square gives

    N*E = Term1 + Term2
    Term1 = sum_i (r_i - d_i)^2          (depends on the transform)
    Term2 = K * (K*N - 2*T)              (same for all eight)

The hardware therefore works out `K` and `Term2` once per domain and runs eight
`Term1` accumulators side by side. Since Term2 is common, the transform with
the smallest Term1 is the best one. Only that Term1 is added to Term2 and
divided by N (a shift).

K is quantized before use. `K_o = T >>> 4`, then `K_d = K_o >>> log2(STEP_SIZE)`
and `K = K_d * STEP_SIZE`. Both shifts round toward minus infinity. The error
is evaluated with the coded K, not with K_o, so the identity above holds
exactly in integers. The reported E is `floor(sum (r-d-K)^2 / 16)`.

## Search rule

Domains are visited in raster order of the lattice. The search stops early if
one of them scores **E < thresh**. Its code is then sent with `matched = 1`,
and the encoder moves on to the next range. If no domain gets under the
threshold, the domain with the smallest E is sent after the whole lattice has
been searched (`matched = 0`; on a tie the earlier domain wins).

- `thresh = 0` makes every search exhaustive.
- `thresh = 2^20-1` accepts the first domain every time.

## Datapath

```
 external memory (8-bit pixels, 16-bit address, 1-cycle read)
      ^ addr                         | data
 addr_gen: Av-Addr | R-Addr | D-Addr -> Addr-Mux
      |                              |
      +-----------+------------------+-------------------+
      v           v                                      v
  init_avg    range_access (16 regs, sum r)    domain_avg_transform
  (5-bit avg)     | r_i            sum r        window 8x8 -> 2x2 avg -> stage 2
      |           |                  |          (sum d)       | 8 transforms T_t,i
      |           v                  v                        v
      |      term1_comp: 8 x (r_i - T_t,i)^2 accumulators    kd_comp -> term2_comp
      |           | Term1[0..7]                                    | K_d, Term2
      |           v                                                |
      |      min_term1 -> final_error (Min_Term1 + Term2) >> 4 <--+
      |           v
      |      tolerance_check (E < thresh? keep best) -> postcoder -> out_byte
      v
   avg_q
```

`control_unit` sequences the blocks.

| Module | Role |
|---|---|
| `addr_gen` | Three address counters and the multiplexer in front of the memory. Read tags are delayed one cycle so they arrive with the data. |
| `init_avg` | Adds up each 4x4 block, shifts right by 4 to get the average, then by 3 to get a 5-bit value. |
| `range_access` | Holds the range's 16 pixels and their sum. |
| `domain_avg_transform` | Domain window, 2x2 averaging, sum d and the eight transforms. |
| `kd_comp`, `term2_comp` | Compute T, K_d, K and Term2 (combinational). |
| `term1_comp` | Eight subtract / square / accumulate units, one pixel index per cycle. |
| `min_term1` | Registered compare tree that picks the smallest Term1 and its transform. |
| `final_error` | Registered; E = (Min_Term1 + Term2) >> 4. |
| `tolerance_check` | Applies the search rule and produces the mapping number (domain * 8 + transform). |
| `postcoder` | Packs the codes into bytes. |
| `control_unit` | The sequencer. |
| `fic_pkg` | Shared widths, the per-domain tag struct and the transform table. |

### Transform numbering

For output pixel (y, x) of a 4x4 block, each transform reads source pixel (sy, sx):

| t | transform | source |
|---|---|---|
| 0 | identity | (y, x) |
| 1 | rotate 90 | (3-x, y) |
| 2 | rotate 180 | (3-y, 3-x) |
| 3 | rotate 270 | (x, 3-y) |
| 4 | flip about horizontal axis | (3-y, x) |
| 5 | flip about vertical axis | (y, 3-x) |
| 6 | flip about main diagonal | (x, y) |
| 7 | flip about anti-diagonal | (3-x, 3-y) |

## Domain window and overlap reuse

Domains on a lattice row are 4 pixels apart and 8 pixels wide, so neighbours
share half their columns. Domain pixels are read one column at a time, top to
bottom. A column shift register collects each new column. When the column's
last pixel arrives, the whole 8x8 window shifts one column left and takes the
new column on the right.

- The first domain of a lattice row reads all 8 columns (64 reads).
- Every other domain reads only its 4 new columns (32 reads).

On `load`, the 2x2 averages of the window (16 four-input adders, shift by 2,
truncating) and their sum are copied into a **stage-2 register**. The
transforms are multiplexers on stage 2, indexed by the pixel number that the
Term1 units are processing. The window is therefore free again as soon as a
domain has been loaded.

## Pipeline and timing

Per domain, the control unit:

1. starts a fetch;
2. waits for the window to fill;
3. waits until the Term1 units are idle. A cycle spent waiting here is a
   **stall**, shown on the `stall` output;
4. pulses `load`.

`load` copies the window into stage 2 and starts a 16-cycle Term1 pass. The
next fetch starts immediately, so fetching and scoring overlap.

After the Term1 pass the results flow through three more stages, one cycle
each: `min_term1`, `final_error` and `tolerance_check`. A tag struct goes
along with them, holding the domain number, a last-domain flag, K_d and
Term2.

Because the search runs ahead of the error pipeline, one or two domains past
a match may already be in flight when the code appears. The code causes a
**flush**, which:

- stops the address generator and drops the read in flight;
- clears the window and stage-2 flags;
- aborts the Term1 pass;
- drops the partial results in the registered stages.

The encoder then starts the next range.

Cycle costs at the defaults:

| Step | Cycles |
|---|---|
| average pass | 4096 |
| range read | about 18 |
| domain, start of a lattice row | about 68 |
| domain, elsewhere | about 36 (fetch-bound: 32 reads against a 16-cycle Term1 pass) |

A fully exhaustive 64 x 64 encode takes 2.21 million cycles, which is 44 ms at
the intended 50 MHz. With lattice spacing 1, the 8-read fetch is quicker than
the Term1 pass, and the pipeline stalls on the Term1 units instead.

## Interfaces

`fic_top` has the following ports. A single clock is used, with an
asynchronous active-low reset `rst_n`.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `start` | in | 1 | Pulse to encode the image in memory. |
| `thresh` | in | 20 | Tolerance. A domain with E < thresh ends the search. |
| `mem_rd`, `mem_addr` | out | 1, 16 | Read request. The address is row * IMG_SIZE + column. |
| `mem_data` | in | 8 | The pixel requested in the previous cycle. |
| `avg_valid`, `avg_q` | out | 1, 5 | Quantized averages of the 4x4 blocks, raster order, sent first. |
| `code_valid`, `code_matched`, `code_mapping`, `code_kd`, `code_err` | out | 1, 1, 15, 10, 20 | One code per range, before packing. |
| `out_valid`, `out_byte` | out | 1, 8 | Packed code stream. |
| `stall` | out | 1 | The sequencer is waiting for the Term1 units. |
| `done` | out | 1 | The last byte has left. Stays high until the next `start`. |

**Code format.** Each range gives `MAP_BITS` bits of mapping number followed by
`KD_BITS` bits of two's-complement K_d, sent MSB first. At the defaults this is
8 + 3 = 11 bits plus 7 bits, 18 bits per range. The codes of one image are
packed back to back, and the last byte is padded with zeros. A 64 x 64 image
gives 576 bytes of codes and 256 averages. No entropy coding is done.

## Parameters (on `fic_top`)

| Parameter | Default | Notes |
|---|---|---|
| `IMG_SIZE` | 64 | Image side. Up to 256 fits the 16-bit address. |
| `R_SIZE` | 4 | Range side. Chosen so that Term1 fits in 20 bits (16 * 255^2 < 2^20). Larger ranges need `TERM1_W`, `ERR_W` and `TERM2_W` in `fic_pkg` widened. |
| `L_SPACING` | 4 | Domain lattice spacing. It must divide IMG_SIZE - 8 and be at most 8. |
| `STEP_SIZE` | 4 | Offset quantization step, a power of two. |
| `AV_SIZE` | 4 | Block size of the average image. |
| `AVQ_W` | 5 | Width of a quantized average. |

Internal widths are set in `fic_pkg`: pixel 8, sums 16, Term1 and E 20,
Term2 24 (signed), K_d 10.

After generic (coarse) synthesis at the defaults, the design has about 670
word-level cells and 1465 flip-flop bits. About half of the flip-flops are the
8x8 domain window and its column buffer, and the stage-2 register adds
another 128.

## Departures and own choices

- **Term2 scaling.** The original block diagram computes
  `I = K - 2T/N` and `K*I`, which is Term2/N, in 10 and 20 bits. This design
  uses the unscaled integer form `K*(K*N - 2T)` (15 and 24 bits) and divides
  the final sum by N. This is exact, whereas the scaled form drops the
  fraction of 2T/N.
- **Order of minimum and final error.** The minimum over the eight transforms
  is taken on Term1 before Term2 is added. This gives the same result as
  computing eight final errors first.
- **Unspecified sizes.** The following were not specified and were chosen
  here:
  - range size (inferred from the widths);
  - lattice spacing;
  - offset step;
  - average block size;
  - rounding (always truncation or floor);
  - memory latency;
  - visiting order;
  - code format;
  - handling of ties.
- **Control unit.** The sequencer is this design's own. The average pass is a
  separate sweep before the search.
- **Average stream.** The averages leave on their own port rather than inside
  the packed byte stream.
- **External memory.** The image memory is external. It is modelled only in
  the testbenches, as `tb/interleaved_memory.sv`: a single port with a
  one-cycle read.

## Verification

Every block has a self-checking testbench in `tb/tb_<module>.sv`. Each
testbench compares the block against values computed independently in the
testbench.

`tb/fic_ref_pkg.sv` is a software model of the whole encoder. It computes
each error directly as sum (r - d - K)^2, without the Term1/Term2 split, and
also generates the test images. Those images combine shading, a repeated
texture and a noisy quadrant.

- `tb_fic_top` encodes 16 x 16 images on two encoders, with lattice spacing
  4 and 1, and three thresholds each (median, 0, maximum). It checks every
  average, code and byte, and bounds the cycle count of the exhaustive run.
  It also fails unless each of these happened at least once:
  - a full fetch;
  - a partial fetch (overlap reuse);
  - a fetch during a Term1 pass;
  - a stall;
  - an early match;
  - an exhaustive fallback;
  - a flush of a fetch in flight.
- `tb_fic_top_full` encodes a 64 x 64 image with every parameter at its
  default, twice (median threshold, then exhaustive), and checks everything
  against the model. It runs in a few seconds.

- `tb_fic_workloads` encodes six 64 x 64 images of different character at
  one tolerance (12) and checks them all. The images are mixed, smooth, flat
  with edges, noise, rings and stripes. Encoding takes 0.55 to 2.21 million
  cycles (11 to 44 ms at 50 MHz). Smooth and piecewise-flat images finish
  fastest, because most of their ranges find a match early.

  A software decoder in the reference package rebuilds each image from its
  codes. It makes two passes, starting from the average image. The PSNR is
  12.7 dB for noise, 18 to 20 dB for the textured images, 28.6 dB for smooth
  shading and 32.7 dB for flat regions. The codes take 576 bytes, an 86%
  reduction from the 4096-byte image, or 82% with the averages included.

  Decoding more passes lowers the quality of smooth images. Two things cause
  this:
  - the maps have no contrast factor, so a pass does not shrink errors;
  - K is rounded down, so each pass adds a small negative bias.

  Rounding K to nearest would remove the bias.

To simulate with Verilator, list the package files first:

```
verilator --binary --timing --assert --top-module tb_fic_top_full \
  rtl/fic_pkg.sv tb/fic_ref_pkg.sv rtl/*.sv tb/interleaved_memory.sv \
  tb/tb_fic_top_full.sv
./obj_dir/Vtb_fic_top_full
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.
`tb_fic_top` also needs `tb/fic_harness.sv`. The testbenches for single
blocks need only `rtl/fic_pkg.sv`, the module under test and the testbench
itself.

Limits of the verification:

- The test images are synthetic, so the quality of the reconstructed image
  (PSNR) has not been measured.
- There is no decoder.
