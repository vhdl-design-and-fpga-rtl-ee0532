# Majority-logic turbo decoder for DSC product codes

This is a block turbo decoder for product codes built from Difference Set Codes
(DSC). Its default is the DSC(21,11) x DSC(21,11) product code with 5-bit soft
values. Each component decoder is a one-step majority-logic (threshold)
decoder. The decoding rules are simple enough that a whole 21-symbol code word
is decoded in one clock. The design aims for throughput and latency rather than
small area:

* the row decoder handles one row per clock;
* the column decoder handles one column per clock;
* two pairs of row/column interleavers link the two decoders.

One full iteration (rows, then columns) delivers the first decoded column
N + 2 = 23 clocks after the first row enters. With one iteration the decoder
accepts a new 441-symbol frame every 21 clocks. Iterations 2 and 3 reuse the
same hardware, so each extra iteration divides the frame rate by about the
number of iterations.

The RTL is parameterized. It also builds and is tested for the DSC(7,3)^2 and
DSC(73,45)^2 product codes, and for 3-, 4-, 6- and 7-bit soft values.

## The component code and its orthogonal equations

A DSC has length n = q^2 + q + 1 (q a power of two) and is defined by a perfect
difference set P = {p_0 .. p_q} modulo n. In such a set every nonzero residue is
the difference of exactly one pair of elements. Every cyclic shift of the
incidence vector of P is a parity check of the code.

Consider the J = q + 1 shifts that contain a given bit j. Any two of them share
only bit j, so together they cover each other bit exactly once. These are the J
*orthogonal equations* of bit j. Check i of bit j is the set
`{ (j - p_i + p_k) mod n : k = 0..q }`, and leaving out k = i removes j itself.

| code        | n  | k  | J | difference set                        |
|-------------|----|----|---|---------------------------------------|
| DSC(7,3)    | 7  | 3  | 3 | {0,1,3}                               |
| DSC(21,11)  | 21 | 11 | 5 | {0,1,4,14,16}                         |
| DSC(73,45)  | 73 | 45 | 9 | {0,1,3,7,15,31,36,54,63}              |

These sets are the standard ones. Their circulant check matrices have GF(2)
rank n - k, so each set gives the code dimension in the table. The sets live in
`rtl/turbo_pkg.sv`. Supporting another length means adding its set there.

## The SISO threshold decoder (`ml_siso`)

This block does most of the work, and it is the part to read first. It takes
three inputs for one code word:

* the channel values R (N x Q bits);
* the extrinsic values W from the previous half-iteration;
* a weight alpha.

All N symbols go through the steps below in parallel:

1. **Soft input.** `Rq = sat(R + floor(alpha * W))`. alpha is an unsigned 4-bit
   number with 3 fraction bits. This is the usual iterative update
   R(m+1) = R + alpha(m) W(m).
2. **Orthogonal equations.** For each bit j and each of its J equations:
   * B = XOR of the sign bits of the other J - 1 symbols (the parity of their
     hard decisions);
   * w = the minimum of their magnitudes.

   This is the min-sum form of the log-tanh reliability: the product of signs
   becomes the parity, and the reliability becomes the smallest magnitude.
3. **Extrinsic and decision.** `W_j = sum over equations of (1 - 2B) * w`,
   `LLR_j = Rq_j + W_j`, and the hard decision is 1 when `LLR_j < 0`.

Number format:

* Soft values are two's complement, Q bits wide, and kept in the symmetric
  range +-(2^(Q-1) - 1), so a magnitude fits in Q - 1 bits.
* **A positive value means bit 0** (BPSK maps 0 to +1). This is the only
  convention under which the (1 - 2B) weighting pushes a symbol towards the
  value its equations vote for.
* The full sum W_j needs Q + 4 bits for J = 5. It is used unsaturated for the
  decision and saturated to Q bits for the extrinsic output, so that the
  extrinsic values fit the same Q-bit interleavers as R.
* The channel scale 4Es/N0 is taken as 1. The quantizer in front of the decoder
  should absorb it.

Timing: everything above is one combinational stage in front of an output
register. A word presented in cycle t comes out in cycle t+1, and a new word can
enter every clock. R and a tag travel through the same register, so the channel
values stay aligned with the extrinsic values.

The combinational depth is the critical path. Per bit it is a (J-1)-input
minimum and an XOR per equation, followed by a J-input signed adder and the
saturation.

## The row/column interleaver (`rc_interleaver`)

Between the two decoders the N x N matrix must be transposed. Rows enter one per
clock. Once all N rows of a matrix are in, its columns leave one per clock: lane
j of column c carries element c of row j. The latency is exactly N clocks from
the first row in to the first column out.

Two register banks work in ping-pong. One bank fills row by row while the other
is read column by column. A matrix may start on any clock, even while the
previous one is still draining. The only rule is that the rows of a matrix
arrive on consecutive clocks, and an assertion catches a write into a bank that
is still being read. A tag is stored with each matrix and returned with its
columns.

With N = 7 and input lane i carrying 7i+1+t at clock t, output lane j gives
7k+1+j for column k, starting 7 clocks after the first row, one matrix after
another. The interleaver testbench runs this example.

## The iteration loop (`ml_turbo_decoder`, `iter_scheduler`)

```
            +--------------------------------------------------------------+
            |   R, W (rows)                                                |
 in_row --->+--> row SISO --> interleaver R --> column SISO --+--> out_hard (columns)
  (W = 0)       (s1)     \--> interleaver W -->   (s2)        |
                                                               +--> interleaver R --+
                                                               \--> interleaver W --+--> back to s1
```

The loop works as follows:

* The row SISO decodes each row of a frame. New frames start with W = 0.
* The channel values and the row extrinsic values are transposed together by
  two interleavers and go to the column SISO.
* After the column SISO, a frame's tag decides what happens next.
  * On its last pass, the column SISO's hard decisions leave as the output, one
    column per clock, with `out_first` marking column 0.
  * Otherwise R and the column extrinsic values are transposed back by the
    second interleaver pair and return to the row SISO input.

**Loop timing.** A frame returns to the row SISO input exactly
LOOP = 2N + 2 = 44 clocks after it left it: SISO, interleaver, SISO,
interleaver.

**The tag.** Each row carries a tag with the pass number and the index of the
frame's last pass. The tag selects alpha: half-iteration m uses `ALPHA[m]`.
The default table is 0, 0.25, 0.25, 0.5, 0.75, 0.875, 1, 1.

**Admission.** New and returning frames share the row SISO input. A frame of N
rows that makes P passes occupies that input during
[t + k*LOOP, t + k*LOOP + N) for k < P. `iter_scheduler` keeps one reservation
bit per future clock of that input:

* A first row is accepted (`in_ready`) only if all of the frame's windows are
  free. The windows are then reserved.
* After that, the source must send the other N - 1 rows on consecutive clocks;
  `in_ready` stays high for them.
* Returning frames never wait, because their windows were booked at admission.

**Resulting behaviour.**

* With one iteration, frames stream back to back.
* With mixed iteration counts, a later frame with fewer iterations can finish
  before an earlier one. Output frames are therefore not always in input order,
  but each one is contiguous and starts with `out_first`.
* The number of iterations is chosen per frame (`in_niter`, 1 to 3; 0 counts as
  1), up to `NITER_MAX`.

### Interface of the top

| port        | dir | width      | meaning |
|-------------|-----|------------|---------|
| `clk`, `rst_n` | in | 1       | clock; asynchronous active-low reset (control state only) |
| `in_valid`  | in  | 1          | a row of channel values is offered |
| `in_ready`  | out | 1          | the row is taken this clock |
| `in_niter`  | in  | 2          | iterations for the frame, read with its first row |
| `in_row`    | in  | N x Q signed | the row, positive = bit 0 |
| `out_valid` | out | 1          | a decoded column is present |
| `out_first` | out | 1          | it is column 0 of its frame |
| `out_hard`  | out | N          | decisions of that column, bit j = row j |

| iterations | first column out after row 0 in | clocks per frame under full load |
|------------|----------------------------------|----------------------------------|
| 1          | N + 2 = 23                       | 21                               |
| 2          | N + 2 + LOOP = 67                | 43 (frames enter in pairs, 86 clocks per pair) |
| 3          | N + 2 + 2 LOOP = 111             | 65 (130 clocks per pair)         |

These latencies equal 2 SISO + 1 interleaver, 4 SISO + 3 interleavers and
6 SISO + 5 interleavers. An exact division of the rate by the iteration count
would give 42 and 63 clocks per frame. The loop is 2N + 2 clocks rather than a
multiple of N, so the scheduler leaves short gaps, and the rate falls 2 to 3 %
short of that. A synthesized DSC(21,11)^2 decoder with 5-bit values
holds 4 x 2 x 441 x 5 bits of interleaver storage (about 17.6 kbit) plus about
630 flip-flops.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| all    | `N`       | 21      | code length: 7, 21 or 73 |
| all    | `Q`       | 5       | soft-value width |
| `ml_turbo_decoder`, `iter_scheduler` | `NITER_MAX` | 3 | most iterations per frame (at most 4) |
| `ml_turbo_decoder` | `ALPHA` | 0,2,2,4,6,7,8,8 (eighths) | alpha of half-iteration 0..7 |
| `ml_siso` | `ALPHA_W`, `ALPHA_FRAC` | 4, 3 | alpha format |
| `ml_siso`, `rc_interleaver` | `TAG_W` | 4 | side-band width |

## What is given and what was chosen

The following come from the published description of this decoder:

* the threshold decoding algorithm with the min-sum weight;
* the R + alpha W input;
* one word per clock with one clock of SISO latency;
* the row/column interleaver with N clocks of latency;
* the composition of two SISOs and four interleavers, reused across iterations;
* the code sizes and the 5-bit default.

The following are this design's own choices, and the places where it may differ
from the original implementation:

* **Sign convention.** A positive value means bit 0, and decision 1 means a
  negative LLR. The original text states "LLR > 0 gives decision 1", which
  contradicts its own (1 - 2B) weighting; the weighting was kept.
* **alpha.** Neither the values nor the number format were given.
* **Saturation.** The extrinsic values are saturated to Q bits, and all soft
  values use a symmetric range.
* **Interleaver structure.** Only the behaviour was given; the ping-pong
  register banks are this design's.
* **Iteration control.** The scheduler, the tags, run-time iteration counts and
  the valid/ready handshake are all this design's. With 2 or 3 iterations the
  frame rate is 2 to 3 % below an exact division by the iteration count (see
  the timing table).
* **Output order.** Decisions leave in column order. The row SISO's decisions
  are not brought out.
* **Reset.** Only control state and valid flags are reset; data registers are
  not.

The following are not part of the RTL: the information source, the
product-code encoder, BPSK modulation, the AWGN channel, the quantizer and the
bit-error counter. The testbenches model these. The RTL takes values that are
already quantized.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.

* `tb/tb_ml_siso.sv` runs `ml_siso` at N = 21/Q = 5, N = 7, N = 73 and
  N = 21/Q = 7 (through `tb/siso_harness.sv`). It uses random, clean, small and
  extreme inputs with random alpha and random valid gaps. Every output word is
  compared with a reference decoder written from the rules above, which
  independently verifies the difference sets. The one-clock latency is also
  checked.
* `tb/tb_rc_interleaver.sv` sends 40 random 21 x 21 matrices, back to back and
  with gaps. It checks every output column and its clock, and runs the 7 x 7
  ramp example.
* `tb/tb_iter_scheduler.sv` checks admission against an independent
  reservation map. The run includes refusals, back-to-back frames and every
  iteration count.
* `tb/tb_ml_turbo_decoder.sv` runs the whole decoder at its default parameters.
  * Frames are random product-code words. The code basis comes from Gaussian
    elimination of the check matrix, and each frame is built as
    C = G^T U G.
  * The words are sent as BPSK with added noise and requests for 1, 2 or
    3 iterations.
  * Every decoded column is compared, bit for bit and clock for clock, with a
    reference turbo decoder.
  * It also requires each of these events to occur at least once: back-to-back
    frames, stalls, 2-pass and 3-pass frames, out-of-order completion, and
    corrected errors.
  * On a typical run the channel has about 2 300 bit errors in 26 460 bits and
    the decoded output about 230.
* `tb/tb_turbo_code_sizes.sv` does the same through `tb/turbo_harness.sv` for
  DSC(7,3)^2, DSC(73,45)^2, and DSC(21,11)^2 at Q = 3, 4, 6 and 7.
* `tb/tb_turbo_throughput.sv` loads the default decoder fully with 1-, 2- and
  3-iteration frames. It checks each frame's latency (23, 67 and 111 clocks) and
  the admission interval (21, 43 and 65 clocks per frame).

The testbenches show that the RTL matches its reference decoder exactly. They
do not reproduce published bit-error-rate curves: those need a Gaussian channel
and far more frames.

To run one with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/turbo_pkg.sv \
    tb/tb_ml_turbo_decoder.sv --top-module tb_ml_turbo_decoder -o sim
./obj_dir/sim
```

Replace the testbench file and the top module name to run the others. Each
finishes in a few seconds.
