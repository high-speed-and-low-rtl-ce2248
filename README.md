# Split-radix single-path delay-feedback FFT pipeline (SRSDF)

This is a streaming N-point complex FFT: one sample goes in and one frequency
bin comes out every clock. It computes the split-radix FFT, which has the
fewest nontrivial complex multiplications of the common power-of-two
algorithms (72 for 64 points, against 76 for radix-4 and 98 for radix-2). It
does this on a plain, regular chain of radix-2 delay-feedback stages.

Three ideas make this work:

1. **Tags instead of an L-shaped butterfly.** Split-radix mixes radix-2 and
   radix-4 steps, so as a dataflow graph it is irregular. Here every stage is
   a radix-2 butterfly. A 2-bit tag (`bf_mode`) travels with the data and
   tells the next stage which step of the algorithm the data is at.
2. **One multiplier for two links.** Data leaves each butterfly in
   *bit-inverse, bit-reverse* (BIBR) order. Under that order, two successive
   inter-stage links never need a twiddle multiplication in the same cycle.
   So one complex multiplier serves two links, and a 64-point pipeline needs
   only log4(N) - 1 = 2 of them.
3. **Delay balancing.** Each multiplier stops after its partial-product tree
   and hands on carry-save rows. The next butterfly does the final
   carry-propagate addition with its own adders, after one row of full
   adders. A multiplier stage and a butterfly stage then have about the same
   logic depth.

Default configuration: N = 64 points, 12-bit input parts, 12-bit twiddle
factors. Results are 18 bits per part. The pipeline has 63 words of feedback
memory and 2 shared multipliers.

## Pipeline structure

```
 in ─► BF_I ─►[reg]─► BF_II ─►[mul 0]─► BF_III ─►[mul 0]─► BF_III ─►[mul 1]─► BF_III ─►[mul 1]─► BF_III ─►[reg]─► out
 stage   0    link 0    1     link 1      2     link 2      3     link 3      4     link 4      5    link 5
 buffer 32              16                8                 4                 2                 1   words
```

* Stage k is a radix-2 butterfly (`bf_i`, `bf_ii`, `bf_iii`). It has a
  feedback buffer (`fb_memory`) of N/2^(k+1) words, N-1 words in all. Its
  word grows by one bit: L+k bits in, L+k+1 bits out.
* Link k joins stage k to stage k+1. Only links 1 to log2N-2 can carry data
  that needs a twiddle factor. Multiplier j (`shared_cmul` with its table
  `twiddle_rom`) serves link 2j+1 (its `pre` side) and link 2j+2 (its `nxt`
  side). Links 0 and log2N-1 get a plain register. Every stage therefore
  costs exactly two cycles: the butterfly register and the link register.
* `bf_counter` is the global control. The tags are the local control.

| Stage | Unit | Accepts tags | Input format |
|---|---|---|---|
| 0 | `bf_i` | st_normal | two's complement |
| 1 | `bf_ii` | st_normal, st_mulj | two's complement |
| 2 .. log2N-1 | `bf_iii` | st_normal, st_mulj, st_csa | carry-save rows |

## How a delay-feedback stage runs: two phases and BIBR order

Stage k pairs sample x[n] with x[n+D], where D = N/2^(k+1). It alternates
between two phases of D cycles each. Counter bit log2N-1-k selects the phase.

* **Bypass phase (`bf_bypass` = 1).** The incoming x[n] goes into the buffer.
  The stage outputs what the buffer returns: the sums it parked in the
  previous compute phase.
* **Compute phase (`bf_bypass` = 0).** x[n] returns from the buffer as
  x[n+D] arrives. The sum goes *into the buffer*. The difference goes *out
  at once*.

A conventional SDF stage sends the sum out first. Sending the difference
first is the BIBR schedule. Its effect on the output order: within a frame,
output position p holds frequency bin k = bitrev(~p). For example, for
N = 8 the bins come out as 7, 3, 5, 1, 6, 2, 4, 0. The order is changed so
that the multiplier can be shared (next sections). Results are not
reordered. `out_k` gives the bin of each result.

## Split-radix as tags: st_normal, st_mulj, st_csa

For a block of length Ls, the even-indexed outputs are a half-length DFT of
the sums x[n] + x[n+Ls/2]. The odd-indexed outputs come from the differences
m[n] = x[n] - x[n+Ls/2]. Split-radix splits the differences once more:

* A[4k+1] comes from (m[n] - j·m[n+Ls/4]) · W_Ls^n
* A[4k+3] comes from (m[n] + j·m[n+Ls/4]) · W_Ls^(3n)

In the pipeline this is one more radix-2 butterfly, with -j applied to the
second operand. The -j is free: (re, im)·(-j) = (im, -re). The twiddle
multiplication comes after that butterfly. The tag records which of these
steps a block of data is at:

| Tag | Code | Meaning | Sums leave as | Differences leave as |
|---|---|---|---|---|
| st_normal | 00 | ordinary block: x ± x' | st_normal | st_mulj |
| st_mulj | 01 | odd block: m ± (-j)m' | st_csa | st_csa |
| st_csa | 11 | twiddled block, arrives in carry-save form; treated as ordinary | st_normal | st_mulj |

In `srsdf_pkg::next_mode`, "sums" means bypass = 1 and "differences" means
bypass = 0. The sums of a block leave one phase after the block was
combined. Each butterfly therefore keeps the tag of the block it last
combined and uses it when the sums leave.

Twiddles are needed only on data tagged st_csa, that is, on the outputs of
an st_mulj butterfly. Stage 0 sees only st_normal data, so link 0 never
needs a twiddle. On link log2N-1 the twiddle is always W = 1. The twiddle is
also skipped whenever its exponent is 0 (`mul_mode` = 1). With these rules,
the multipliers perform exactly the split-radix number of nontrivial
multiplications per frame: 8, 26, 72, 186, 456, 2504, 5690 and 28218 for
N = 16, 32, 64, 128, 256, 1024, 2048 and 8192.
The testbenches measure and check this.

## Twiddle addressing

Data on link k leaves stage k when that stage's count is c = cnt - 1 - 2k
(mod N). Its position inside the block is n = c mod D_k, with
D_k = N/2^(k+1). The data belongs to a sub-transform of length 4·D_k:

* Compute-phase output (the difference, branch A[4k+3]) needs
  W_N^(3n·2^(k-1)).
* Bypass-phase output (the sum, branch A[4k+1]) needs W_N^(n·2^(k-1)).

`twiddle_rom` holds W_N^e for e = 0..N-1. Each value is M-bit two's
complement with M-1 fraction bits, rounded to nearest, with +1.0 clipped to
(2^(M-1)-1)/2^(M-1). The table is computed with `$cos`/`$sin` at
elaboration time. Each multiplier has its own table, which picks the link
that is tagged st_csa.

## Why the shared multiplier never collides

A link carries st_csa data for the 2·D_k cycles after a st_mulj block has
entered stage k. The next link's st_csa windows are half as long and are
offset by the difference-first order. Together these keep the two windows
apart once real data fills the pipeline.

Directly after reset the stages hold no data yet. In cycles 3 and 4 after
reset, N >= 256 shows an overlap on such meaningless words; the previous
link wins there. An assertion in `srsdf_fft` checks the no-collision rule
from the first valid result on. It has not fired at any simulated size
(N = 16 to 8192).

## Delay balancing: carry-save hand-over

`shared_cmul` computes both parts of x·W:

* Real part: x_re·W_re − x_im·W_im. Imaginary part: x_re·W_im + x_im·W_re.
* Each part is one merged array of partial products. Radix-4 (modified)
  Booth recoding of the twiddle gives M/2 rows per product. One more row per
  product holds the Booth negation bits. That makes M+2 rows in all.
* A Wallace tree of 3:2 rows reduces the array to a sum row and a carry row.
* The M-1 low bits of each row are dropped: the product is truncated, not
  rounded. The two rows are registered.

The butterfly after it (`bf_iii`) finishes the addition:

* **Bypass phase:** it adds the two rows into two's complement before
  parking the word.
* **Compute phase:** the parked word a and the rows (s, c) enter one row of
  full adders, and then the butterfly's adder.
* Subtraction uses a − s − c = a + ~s + ~c + 2. The two +1 terms go into the
  free LSB of the carry row and into the adder's carry-in.
* The -j of an st_mulj block is a swap of the rows plus a sign change. The
  same adder row absorbs it.

The rows are meaningful only modulo 2^(width). They are carried one bit
wider than the link data, which is the width of the next butterfly's
result. Every sum is formed at that width, which holds the true result, so
the wrap-around of the individual rows never shows.

When a link does not need a multiplication, the multiplier passes its word
through as (x, 0). So multiplied and bypassed data take the same cycle.

## Interface and timing (`srsdf_fft`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | global enable: sample present; the whole pipeline advances only in such cycles |
| `in_re`, `in_im` | in | L | input sample, two's complement |
| `out_valid` | out | 1 | a result is on `out_re`/`out_im` this cycle |
| `out_first` | out | 1 | first result of a frame (bin N-1) |
| `out_k` | out | log2N | frequency bin of the result, bitrev(~position) |
| `out_re`, `out_im` | out | L+log2N | result |

* **Framing.** Frames are N consecutive enabled samples. The first enabled
  sample after reset is x[0] of frame 0.
* **Stalling.** When `in_valid` is low, everything holds, including the
  counter. `out_valid` is `in_valid` gated by "pipeline full", so one result
  leaves per enabled cycle.
* **Latency.** The first result of a frame appears N − 1 + 2·log2N enabled
  cycles after its first sample: N + 2·log2N cycles if both of those cycles
  are counted. That is 75/76 cycles for N = 64. After that, a frame
  completes every N cycles.
* **Scaling and range.** There is no scaling: the result is the plain DFT
  sum. The word grows by one bit per stage. A twiddle rotation can raise one
  part by up to √2, so keep the complex input magnitude below 2^(L-1) to
  rule out overflow. Nothing checks this.
* **Accuracy.** Twiddle rounding and direct truncation of the product rows
  make results deviate from the exact DFT. The truncation always rounds
  down, so its bias adds up coherently in a few bins. The bound is about N/4
  LSB. Largest deviations observed: 15 LSB (of 18 bits) for N = 64, 255 LSB
  (of 22 bits) for N = 1024, and 2046 LSB (of 25 bits) for N = 8192.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `srsdf_fft` | `N` | 64 | transform length, a power of two, at least 8 |
| | `L` | 12 | input word length per part |
| | `M` | 12 | twiddle word length per part (even) |
| `fb_memory` | `DEPTH`, `WIDTH` | 32, 26 | words, bits per word |
| `bf_i/ii/iii` | `WIN` | 12/13/14 | input word length of the stage |
| `shared_cmul` | `WPRE`, `M` | 14, 12 | width of the `pre` link; the `nxt` link is one bit wider |
| `twiddle_rom` | `N`, `M`, `PRE`, `HAS_NXT` | 64, 12, 1, 1 | table size, word length, links served |
| `bf_counter` | `LOGN` | 6 | log2 N |

The number of shared multipliers is ceil((log2N − 2)/2). For odd log2N, the
last multiplier serves only one link.

## Departures and choices to know about

* **Output width.** One bit of growth per stage gives L + log2N = 18 bits for
  64 points. A 20-bit output for 64 points is also quoted for this
  architecture; it would need two guard bits beyond the growth used here.
* **Counter.** The per-stage bypass bit is bit log2N-1-k of a log2N-bit
  counter, so that the first stage changes phase every N/2 cycles. Because
  stage k runs 2k cycles behind stage 0, the bit is taken from count − 2k.
* **Own choices.** These were not specified and were chosen here:
  * the global enable and the asynchronous reset;
  * the circular-buffer form of the feedback memory (asynchronous read);
  * a full N-entry twiddle table per multiplier (no symmetry folding);
  * the Booth negation-bit rows;
  * the `out_k`/`out_first` labels.
* **Not included.**
  * An output reorder buffer. Results leave in BIBR order.
  * The radix-2² SDF pipeline that this architecture is usually compared
    against.
  * The three-multiplication complex multiplier variant; the
    four-multiplication form is used.
  * Booth-encoding x instead of W when x is narrower than the twiddle. This
    never happens here, because link data is always at least 14 bits wide.
* **Not checked.** Clock rate, area and power need a cell library and a
  physical flow; nothing here checks them.

## Files

`rtl/` (the design; `srsdf_fft` is the top):

| File | Content |
|---|---|
| `srsdf_pkg.sv` | `bf_mode_e` tag type, `next_mode` transition table, `bitrev` |
| `srsdf_fft.sv` | top: stages, links, multipliers, output labelling |
| `bf_i.sv`, `bf_ii.sv`, `bf_iii.sv` | the three butterfly types |
| `fb_memory.sv` | feedback delay buffer |
| `shared_cmul.sv` | shared Booth/Wallace complex multiplier with carry-save output |
| `twiddle_rom.sv` | twiddle table and `mul_mode` |
| `bf_counter.sv` | global counter and per-stage `bf_bypass` |

`tb/` (self-checking; each prints `TB_RESULT checks=… failures=…`):

| Testbench | Checks |
|---|---|
| `srsdf_fft_tb` | the default 64-point pipeline end to end: 8 frames against a double-precision DFT, bin order, latency, one result per cycle, 72 multiplications per frame, and that every mechanism occurs (st_mulj, st_csa, pre and nxt multiplication, trivial skip, bypass, stall) |
| `srsdf_fft_sizes_tb` | the same checks for N = 16, 32, 128, 256 and 1024 in parallel, through `srsdf_fft_run` |
| `srsdf_fft_ofdm_tb` | the same checks for N = 2048 and 8192 (5690 and 28218 multiplications per frame); compiling the 8192-point pipeline takes about a minute |
| `bf_i_tb`, `bf_ii_tb`, `bf_iii_tb` | each butterfly with its buffer, exact results and tags for random blocks and tags; carry-save input as random row pairs |
| `fb_memory_tb` | delay of exactly DEPTH enabled cycles, depths 5 and 1 |
| `shared_cmul_tb` | row sums against the integer product (exact, or one LSB low from truncation), bypass, trivial skip, extreme twiddles |
| `twiddle_rom_tb` | every count and both links of a 64-point table against computed twiddles and `mul_mode` |
| `bf_counter_tb` | count and every stage's `bf_bypass` with enable gaps |

## Simulating

With Verilator 5 (two-state simulation; `--binary` enables timing):

```
verilator --binary -Irtl -y rtl -y tb rtl/srsdf_pkg.sv tb/srsdf_fft_tb.sv \
          --top-module srsdf_fft_tb -Mdir obj_fft
./obj_fft/Vsrsdf_fft_tb
```

Replace `srsdf_fft_tb` with any testbench name above. Add `--assert` to
enable the tag and no-collision assertions. Each testbench finishes in well
under a second. To change the size, set `N`, `L` or `M` on `srsdf_fft`: all
widths, buffer depths, the number of multipliers and the twiddle tables
follow.
