# Non-binary LDPC codec over GF(64) with truncated min-sum decoding

This RTL implements an encoder and an iterative decoder for a non-binary
low-density parity-check (LDPC) code over GF(64). Each code symbol is a
6-bit field element. The code is (2,4)-regular: 160 symbols (960 bits),
80 parity checks of degree 4, and every symbol sits in exactly two checks.
Rate is 1/2.

Non-binary codes correct more errors than binary LDPC codes at short block
lengths. The cost is decoding effort: an exact message would carry 64
likelihoods per symbol. The decoder therefore uses *truncated* messages.
A message holds only the `NM = 16` most likely symbols, as (LLR, symbol)
couples sorted by LLR. LLRs are non-negative distances from the most likely
symbol, which has LLR 0. Every processing unit below works on these short
sorted lists:

- building the list for a received symbol (LLR generator),
- adding two lists in the check node (elementary check node),
- merging two lists in the variable node.

Check nodes are processed one at a time. The four variable nodes of a check
form a group, and each check's new messages are used at once by the checks
that follow. This is the "group shuffled" (layered) schedule.

## Top level: `ldpc_codec_top`

```
 message ──► ldpc_encoder ──► codeword stream                     (transmit)

 samples ──► llr_gen ──► gsbp_decoder ──► decided symbols         (receive)
                          ├─ LLR memory, C2V memory, V2C registers
                          ├─ 4 × vn_unit (with vn_sorter)
                          ├─ 4 × msg_form (Form)  / 4 × msg_form (Form*)
                          └─ cnp (6 × ecn)
```

The modulator and the noisy channel sit between the two chains and are not
part of the RTL. The receive port takes one signed 6-bit sample per code
bit. A positive sample means bit 1. The first sample of a symbol is its most
significant bit. QPSK simply carries two such samples per channel use.

**Caution: the two chains do not implement the same code.** The encoder is a
polynomial-division encoder with generator coefficients `eps_i`. The decoder
uses an explicit sparse parity-check matrix `H`. Both are this design's own
choices (see "The code" below), and the all-zero word is the only codeword
they share. To build a working link, derive the encoder from the decoder's
`H`, or the other way round.

## The receive chain

### LLR generator (`llr_gen`, `llr_pe`)

Consider a symbol with bit samples `y_0..y_5`. The hard decision of bit `i`
is `sign(y_i)`. The LLR of a candidate symbol `x` is the sum of `|y_i|` over
the bits where `x` differs from the hard decision. The generator emits the
16 smallest of these 64 values, in order, without computing all 64.

It does this with a chain of six processing elements, one per bit. PE `c`
receives the sorted list `L(c-1)` of prefixes of length `c-1`, one couple per
cycle, and extends each prefix in two ways:

- **L0:** append the hard-decision bit. The LLR is unchanged.
- **L1:** append the other bit. The LLR grows by `|y_{c-1}|`.

L0 and L1 are each still sorted, so merging them only takes a two-input
minimum of their heads. Each list waits in a small FIFO, and a couple skips
its FIFO when the FIFO is empty. A PE therefore adds exactly one cycle of
latency, and all PEs stream at one couple per cycle.

Only `min(2^c, NM)` couples of a PE's output can ever matter, and this keeps
the FIFOs short. When L1 has supplied `j` couples, L0 holds `j` waiting
couples, and `j` is at most `NM/3` before they could no longer make the
output. So L0 needs `min(2^(c-1), NM/3)` entries and L1 needs
`min(2^(c-1), NM/2)`. A push into a full FIFO is dropped, and the dropped
couple is provably beyond the first `NM`.

Timing:

- `start_in` pulses with `y_0`, and `load_y` is high for the six samples.
- `start_out` pulses 6 cycles later (4 cycles for GF(16)) with the first
  couple. The other couples follow on consecutive cycles.
- A new symbol may start every `NM + 1` cycles (the rate used by the tests).

For example, in GF(16) with `NM = 10`, the samples −7, 8, 12, −3 give the
LLRs 0, 3, 7, 8, 10, 11, 12, 15, 15, 18.

### Decoder (`gsbp_decoder`)

**Storage:**

| Store | Size | Contents |
|-------|------|----------|
| LLR memory | 160 × 16 couples | Intrinsic lists, written straight from the generator's stream. |
| C2V memory | 320 × 16 couples, plus a valid bit per edge | Latest check-to-variable message of each edge. |
| V2C registers | 4 × 16 couples | Variable-to-check messages of the current group. |
| Decision memory | 160 symbols | Current hard decisions. |

**Processing one check `i`.** Each check has edges `k = 0..3`, to columns
`j_k` with entries `h_k`. The control unit runs four steps:

1. **VN.** Each `vn_unit` forms `V2C_k = intrinsic(j_k) + C2V(other edge of
   j_k)`. The variable nodes have degree 2, so the "other edge" is the
   single other check of `j_k`. Its C2V is the most recent one, possibly
   updated earlier in the same iteration. If that edge has no C2V yet, the
   intrinsic list passes through.
2. **CN.** `msg_form` multiplies the V2C symbols by `h_k` (Form). Then `cnp`
   computes, for every edge, the sum of the other three messages.
3. **Write-back.** `msg_form` divides the results by `h_k` (Form*), and
   they become the C2V messages of check `i`.
4. **Decision.** The `vn_unit`s run again on `V2C_k + new C2V_k`. The first
   (most reliable) symbol of each result becomes the decision for `j_k`.

After all 80 checks, the syndrome `H·x` is evaluated one check per cycle.
Decoding stops when the syndrome is zero or after `KMAX = 10` iterations.
`success` reports which of the two happened, and `iters` how many iterations
ran.

**Throughput.** The steps run one after another, with no overlap between
checks. One iteration costs about 8,700 cycles, and loading a frame about
2,720 cycles (160 symbols, 17 cycles each). The design does not reach a
rate of 2.44 Mbit/s at 100 MHz. That rate needs about 3,900 cycles per
iteration; this design manages about 1.1 Mbit/s of code bits at 10
iterations. Pipelining the VN of check `i+1` under the CN of check `i` is
the obvious next step. It needs a conflict check: the two checks must not
share a column.

### Check node (`cnp`, `ecn`)

An elementary check node (`ecn`) adds two sorted lists A and B:

- Each candidate is `(A[i].llr + B[j].llr, A[i].gf xor B[j].gf)`.
- The output is the `NM` smallest candidates with distinct symbols, in order.

**How `ecn` scans.** It keeps one pointer ("bubble") per row of A. Each cycle
it looks at the smallest of the bubble values. If that symbol is new, it
emits the candidate; if it was already emitted, it drops it. Either way,
that row's pointer advances. A run takes `NM` cycles plus one per dropped
duplicate.

**How `cnp` combines them.** For a check of degree `dc`, `cnp` uses three
rows of `dc − 2` ECNs:

- Forward: `F_k = F_{k-1} + A_k`.
- Backward: `B_k = B_{k+1} + A_k`.
- Merge: `E_k = F_{k-1} + B_{k+1}`.
- The end outputs are `E_0 = B_1` and `E_{dc-1} = F_{dc-2}`.

For `dc = 4` this is six ECNs. Each ECN starts as soon as its operands are
ready, so the forward and backward rows run in parallel. Truncation makes
the result depend on this combination order, and the testbench reproduces
the same order.

A tree arrangement of the same ECNs (pairs first, then pairs of pairs) would
shorten the critical chain for large `dc`; at `dc = 4` both need two ECN
stages per output, and this design uses the forward/backward form.

### Variable node (`vn_unit`, `vn_sorter`)

The unit adds an intrinsic list L and a C2V list V. It walks them in two
stages, producing one candidate per cycle:

- **Stage 1** visits every entry of L. If V holds the same symbol, it adds
  that LLR. Otherwise it adds the offset `Y_V`, which is the last (largest)
  LLR of V.
- **Stage 2** visits only the V entries whose symbol is absent from L. A
  priority encoder finds each next index. It adds the offset `Y_L`, the
  last LLR of L.

Candidates go into `vn_sorter`, a 16-entry insertion register. The sorter
keeps the 16 smallest in order, with equal LLRs in arrival order. The result
is then normalised so that it starts at LLR 0.

The run takes `2 + NM + max(1, u)` cycles, where `u` is the number of
unmatched V entries. The `OFFSET` parameter adds a constant to both offsets
(default 0).

## The transmit chain

### Encoder (`ldpc_encoder`)

The encoder is a systematic division register over GF(64), `K = 80` symbols
long:

- The feedback symbol is `fb = m + R_79`.
- It is multiplied by every coefficient `eps_i`, and `R_i ← R_{i-1} + eps_i·fb`.
- After 80 message symbols, the register holds the remainder of
  `m(x)·x^80` divided by `g(x) = x^80 + Σ eps_i x^i`. `m_0` is the highest
  power.
- The feedback is then forced to zero, and the 80 parity symbols shift out,
  `R_79` first.

The message symbols leave the output multiplexer as they enter. `out_parity`
marks the parity part, and `out_last` marks the final symbol.

The 80 multipliers are digit-serial (below), so each message symbol takes 5
cycles. A whole frame takes `80·5 + 80` cycles plus 1 cycle of latency.

### Karatsuba multiplier (`gf_mul_karatsuba`)

The multiplier computes `a·b mod F(x)` in GF(2^M). Operand `a` enters `D = 2`
bits per cycle, most significant digit first. Each digit `A_t` and the
operand `b` are split at bit `D/2`, and three small carry-less products are
formed:

- `C0 = A0·B0`
- `C1 = (A0+A1)(B0+B1)`
- `C2 = A1·B1`

Each product goes into its own accumulator, which is shifted by `D` bits
every cycle. At the end, the reconstruction forms
`C2·x^D + (C0+C1+C2)·x^(D/2) + C0`, and the result is reduced modulo
`F(x) = x^6 + x + 1`. The product is ready 3 cycles after `start`
(`done` then pulses).

## The code

All code definitions live in `gf_pkg`.

**Field.** GF(2^6) with primitive polynomial `x^6 + x + 1`. `gf_pkg` also
holds the multiply, inverse-table and saturating-add functions.

**Parity-check matrix.** Check `i` (0..79) has four edges:

- column `i`,
- column `80 + i`,
- column `(i + 7) mod 80`,
- column `80 + (i + 13) mod 80`.

Every column therefore appears in exactly two checks, and no two checks
share two columns (no 4-cycles). The non-zero entry of edge `e = 4i + k` is
`1 + ((37e + 11) mod 63)`. The matrix has full rank (80), so the code is
(960, 480) in bits.

**Encoder coefficients.** `eps_i = 1 + ((13i + 5) mod 63)`.

Because these are arbitrary choices, error-rate results measured with this
matrix will differ from those of any other (2,4)-regular GF(64) code.

## Departures and trust

What follows a clear source description:

- the LLR generator's structure, FIFO sizes and timing,
- the forward/backward/merge check node (a tree-shaped check node was also
  described; the two differ only in combination order),
- the two-stage variable node with matching and offsets,
- the division-register encoder,
- the three-multiplier Karatsuba structure,
- the memory organisation around one CN and four VNs,
- the code size and the 10 iterations.

What is this design's own choice:

- the parity-check matrix, the encoder coefficients and the field polynomial;
- `NM = 16`, 8-bit saturating LLRs and 6-bit samples;
- the offset value;
- normalising VN outputs;
- the ECN's scanning method, as a plain bubble scan rather than a FIFO-based
  bubble check;
- the insertion sorter in place of a staged FIFO merge sorter;
- the sequential per-check schedule, the decision step and the stop rule;
- reducing the Karatsuba product once at the end rather than inside the
  loop;
- all handshakes.

The biggest gap is throughput (see the decoder section). The second is that
the encoder and decoder codes differ.

Every module has a self-checking testbench with an independent reference
model:

- an exhaustive multiplier test,
- polynomial long division for the encoder,
- exhaustive symbol scoring for the LLR generator,
- brute-force list sums for the ECN,
- a software ECN composition for the CNP,
- symbol-by-symbol scoring for the VN,
- Gaussian elimination of `H` to produce codewords for the decoder.

The end-to-end test `tb_ldpc_codec_top` runs at full size. It encodes
frames, sends the encoder's zero codeword and random codewords of `H`
through a simulated AWGN channel (about 3–4 dB Eb/N0), and checks for exact
recovery. A high-noise frame must fail after 10 iterations with `success`
low. The test also checks that each mechanism occurs at least once:

- parity shift-out,
- L1 selection and full FIFOs in the LLR generator,
- VN pass-through and stage 2,
- ECN duplicate removal,
- early stop, the iteration limit, and multi-iteration decoding.

`tb_gsbp_iterations` measures the decoder over 24 frames at each of three
noise levels. It reports the average iteration count and the frame errors:

| Eb/N0 | Average iterations | Frame errors |
|-------|--------------------|--------------|
| 4.2 dB | 1.71 | 0 of 24 |
| 3.0 dB | 3.17 | 1 of 24 |
| 2.0 dB | 5.58 | 6 of 24, one of them an undetected error |

These numbers belong to this design's own parity-check matrix. Twenty-four
frames per level give only a rough estimate.

## Parameters

| Parameter | Default | Where | Meaning |
|-----------|---------|-------|---------|
| `GF_M` | 6 | `gf_pkg` | bits per symbol, GF(64) |
| `M_CHK` | 80 | `gf_pkg`, `gsbp_decoder` | checks; N = 2·M_CHK symbols |
| `NM` | 16 | `gf_pkg`, all message units | couples per message |
| `KMAX` | 10 | `gf_pkg`, `gsbp_decoder` | maximum iterations |
| `LLR_W`, `Y_W` | 8, 6 | `gf_pkg` | LLR and sample widths |
| `K` | 80 | `ldpc_encoder` | message symbols |
| `D` | 2 | `ldpc_encoder`, `gf_mul_karatsuba` | multiplier digit size (even) |
| `OFFSET` | 0 | `vn_unit`, `gsbp_decoder` | added to the missing-symbol offsets |

`llr_gen` and `llr_pe` take `M` and `NM` as their own parameters and work
for other field sizes. `tb_llr_gen` runs GF(16) with `NM = 10` as well as
GF(64) with `NM = 16`. The decoder's message type is fixed by `gf_pkg`.
Changing `M_CHK` needs `M_CHK > 13` (the column offsets 7 and 13 must stay
distinct).

## Simulating

All files are SystemVerilog-2017, and `gf_pkg.sv` must be compiled first. For
example, the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gf_pkg.sv tb/tb_ldpc_codec_top.sv \
          --top-module tb_ldpc_codec_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its
own. A watchdog ends a hung run with a failure. The full-size end-to-end run
simulates about 200,000 cycles and takes a few seconds.

## Files

- `rtl/gf_pkg.sv`: field arithmetic, sizes, message type, parity-check matrix
- `rtl/ldpc_codec_top.sv`: top level
- `rtl/ldpc_encoder.sv`, `rtl/gf_mul_karatsuba.sv`: transmit chain
- `rtl/llr_gen.sv`, `rtl/llr_pe.sv`: LLR generator
- `rtl/gsbp_decoder.sv`: decoder control, memories, syndrome
- `rtl/vn_unit.sv`, `rtl/vn_sorter.sv`: variable node
- `rtl/cnp.sv`, `rtl/ecn.sv`: check node
- `rtl/msg_form.sv`: Form / Form*
- `tb/tb_<module>.sv`: one self-checking testbench per module
- `tb/tb_gsbp_iterations.sv`: iteration and frame-error sweep over noise
