# Parallel triple-error-correcting BCH decoder with modified step-by-step decoding

This is a streaming decoder for the binary (1020, 990) BCH code, which
corrects up to three bit errors per codeword. The main configuration has 16
independent channels. Each channel takes 4 bits per clock, so the input bus is
64 bits wide. The decoder never stalls: one 64-bit word goes in and one
corrected 64-bit word comes out every clock.

Most BCH decoders solve a key equation (Berlekamp–Massey) for an error locator
polynomial and then search for its roots. This decoder does not. It uses
*step-by-step* decoding. For each bit position j it asks one question: would
flipping bit j lower the number of errors? For t = 3 that question reduces to
one equation in the bit position. All position-independent terms of that
equation are computed once per codeword by a small *sharing syndrome factor
calculator* (SSFC). The SSFC is shared by the four bit lanes of a channel and,
through time multiplexing, by all 16 channels. Per bit position, only constant
multipliers and XORs remain.

The architecture follows the paper "Low-Complexity Triple-Error-Correcting
Parallel BCH Decoder" (J. Yeon, S.-J. Yang, C. Kim, H. Lee). The section
"Where this RTL departs from the published architecture" lists what this
implementation chose on its own or does differently.

## The decoding rule

The code is the length-1023 primitive BCH code over GF(2^10), shortened to
n = 1020. It has 30 parity bits, three minimal polynomials of degree 10. The
received word is r(x) = r_0 + r_1 x + … + r_1019 x^1019. Only the odd
syndromes are needed, because S_2i = S_i^2 for binary codes:

    S1 = r(α),  S3 = r(α^3),  S5 = r(α^5)

**Shared factors.** The SSFC computes, once per codeword:

    C = S1^3 + S3
    B = S1^4 + S1·S3
    A = S5 + S1^2·S3
    R = S1^6 + S3^2 + S1^3·S3 + S1·S5      (= det of the 3×3 syndrome matrix)

**Per-position test.** For every position j the Chien search evaluates

    H_j = R + A·α^j + B·α^2j + C·α^3j

H_j is the determinant of the syndrome matrix after bit j is flipped. It is
zero exactly when the flipped word has at most two errors. Two cases are
needed:

* **C ≠ 0 (two or three errors).** Flipping an erroneous bit leaves one or two
  errors, so H_j = 0. Flipping a correct bit gives three or four errors. For
  four errors the determinant is the product of all pairwise sums of the error
  locators, so it cannot vanish. H_j is therefore zero exactly at the error
  positions.
* **C = 0 (zero or one error).** The determinant cannot tell these apart, so
  the coefficients are replaced by A = S1^2, B = S1, C = 0, R = 0. This gives
  H_j = S1·α^j·(S1 + α^j), which is zero only where α^j = S1, the single error.

The Chien search multiplexers choose between the two coefficient sets.

**Self-error detection.** With no error, S1 = S3 = 0 and every H_j is zero. In
that case no bit may be flipped. The error locator therefore needs to know
whether the codeword has any error at all. It finds out without extra
arithmetic. With one to three errors, at most three positions can have
H_j = 0. So if any of the first four H values of a codeword is non-zero, the
codeword is in error. The OR of the first four one-bit H values is captured
once, at the start of the search, as the *reference bit*. Each error bit is
then

    e_j = (H_j ≠ 0) XOR reference

With reference = 1, a zero H marks an error. With reference = 0 (no error),
every H is zero, so every e_j is zero.

Codewords with more than three errors are not detected. The decoder then flips
whatever bits the rule selects. No failure flag exists.

## Datapath

```
 in_data[63:0] ──┬──────────────────────── FIFO (272 words) ─────────────┐
                 │                                                       ▼
   ch k: bits [4k+3:4k]                                           XOR ─► out reg ─► out_data
                 ▼                                                       ▲
   16 × syndrome calculator (S1,S3,S5)                                    │ e (4 bits/channel)
                 │  all finish in the same cycle                         │
                 ▼                                                       │
   time multiplexer ─► shared SSFC ─► time demultiplexer ─► 16 × (Chien search ─► error locator)
       ▲                  (1 cycle)        ▲                        ▲
   controller #1      controller #2 ───────┘                   controller #3
   (framing)          (channel sequencing)                      (search window)
```

| Module | Role |
|---|---|
| `bch_pkg` | Code constants, GF(2^10) functions (`gf_mul`, `gf_sq`, `gf_cube`, `gf_alpha_pow`), the `syn_t` and `ssf_t` structs |
| `bch_syndrome_calc` | 4-parallel Horner evaluation of S1, S3, S5. Cleared by the first word, output for one cycle after the last |
| `bch_ssfc` | Shared factor calculator: 4 variable multipliers, squarers and one cube. Registered, with one cycle of latency |
| `bch_chien_search` | Case multiplexers and three coefficient registers with feedback constant multipliers. 3×P lane constant multipliers give P values of H per clock |
| `bch_error_locator` | OR-reduction of H, reference bit from the first four H, e = h XOR reference. Registered (one cycle for P ≥ 4) |
| `bch_cs_el` | One channel's Chien search plus error locator |
| `bch_time_mux` / `bch_time_demux` | Feed the channels' syndromes to the shared SSFC one per clock, and hand each channel its factors |
| `bch_sc_ctrl`, `bch_ssf_ctrl`, `bch_cs_ctrl` | The three controllers: codeword framing, SSFC channel sequencing, Chien search window |
| `bch_fifo` | Fixed-delay line (circular buffer) for the received words |
| `bch_mc_decoder` | Top level, parameters `CH` (16), `P` (4), `NCODE` (1020) |

### Constant multipliers of the Chien search

Each power i = 1, 2, 3 has one register. In search cycle c it holds
X_i·α^(−i·P·c). A multiplexer passes either the freshly loaded coefficient
(load cycle) or that register. The multiplexer output feeds two things:

* the feedback multiplier α^(−i·P);
* one constant multiplier per lane. Lane b uses α^(i·(NCODE−P+b)).

Lane b in cycle c therefore evaluates position j = NCODE − P·(c+1) + b. The
positions are visited from 1019 down to 0, in the order the bits arrive. The
multipliers are written as plain GF products by constants. The synthesis tool
is left to share common XOR terms between them.

## Interface and data format

* `in_valid`, `in_data[CH*P-1:0]`: channel k uses bits `[k*P +: P]`. All
  channels are framed together.
* A codeword is N/P = 255 consecutive valid words. It is sent highest degree
  first. In word w, bit b of a channel is r_j with j = 1020 − 4(w+1) + b, so
  bit 3 of word 0 is r_1019.
* Framing is implicit. After reset, every 255 valid words form one codeword.
  Gaps (in_valid low) are allowed only *between* codewords. An assertion flags
  a gap inside a codeword.
* `out_valid`, `out_data` carry the corrected words in the same format. A word
  leaves a fixed number of cycles after it entered.
* `rst_n` is an active-low asynchronous reset. It clears control state and
  valid flags. Datapath registers are cleared or loaded by the framing and need
  no reset.

## Schedule and latency

W = 255 words per codeword. Word 0 enters in cycle t0.

| Cycle | Event |
|---|---|
| t0 … t0+W−1 | words enter; syndromes accumulate |
| t0+W | all channels' syndromes valid; channel 0 enters the SSFC, the others are held in the time multiplexer |
| t0+W+1+k | channel k's factors leave the SSFC and are stored by the demultiplexer |
| t0+W+CH | all Chien searches load together; the search runs W cycles |
| +NREF | error bits registered (NREF = 1 for P ≥ 4) |
| t0+W+CH+NREF+1 | corrected word 0 leaves the output register |

The latency is W + CH + NREF + 1 cycles, which for the 4-parallel
configurations is W + CH + 2:

* 273 cycles for 16 channels;
* 258 cycles for a single channel (`CH = 1`), which matches the published
  single-channel figure.

The published 16-channel figure is 267 cycles. The paper does not describe the
SSFC schedule that achieves it. Here every channel waits for the last one, so
that one FIFO and one search window serve all channels. Throughput is one
CH·P-bit word per clock: 64 bits per clock, or 25.6 Gb/s at 400 MHz.

The single-channel decoder is the same RTL with `CH = 1`. The multiplexer and
demultiplexer then reduce to wires plus an unused register.

## Where this RTL departs from the published architecture

* **Field.** The paper's abstract names GF(2^12). Everything else in the paper
  (30 parity bits, the syndrome calculator, the 1020-bit length) fits GF(2^10),
  which is used here. The primitive polynomial x^10 + x^3 + 1 is this design's
  choice. Changing it means editing `PRIM_POLY` in `bch_pkg` and `TPOLY` in
  `tb/bch_tb_pkg.sv`.
* **Chien search coefficient placement.** The published block diagram draws
  the (0, S1^3+S3) multiplexer pair above the first-power multiplier column.
  The equations multiply S1^3+S3 by α^3j. The RTL follows the equations.
* **Constant multiplier count.** This design uses 3P lane multipliers plus 3
  feedback multipliers; the published count is 3P. In the published diagram
  the feedback multiplier doubles as the last lane's multiplier. Here the lane
  constants are offset to start at the top position, so the feedback constant
  α^(−i·P) is none of them and needs its own multiplier.
* **Constant multiplier sharing.** The published design shares subexpressions
  between constant multipliers with an iterative matching algorithm. Here this
  is left to logic synthesis.
* **Register on the R (reference) column** of the Chien search. This design
  adds it so the factors need only be valid in the load cycle. The published
  diagram shows none.
* **Reference bit flip-flop.** This design gives it a load enable (capture on
  the first search cycle, hold for the codeword).
* **Controllers, time multiplexer, time demultiplexer and FIFO** are only named
  in the published architecture. Their organisation here is the simplest that
  does the job: a word counter, a channel counter, a search-window counter,
  hold registers with a same-cycle bypass, and a circular-buffer delay line.
* **Latency 273 instead of 267** for 16 channels (see above).
* **Throughput.** The published 16-channel throughput, 102.4 Gb/s at 400 MHz,
  is four times what a 64-bit bus carries at that clock. This RTL has the
  64-bit bus of the published block diagram.
* **Clock rate and gate counts** (400 MHz, about 1,310 XOR-equivalent gates
  for one channel, 35,121 for 16 channels in 90 nm) cannot be checked from RTL
  simulation. No synthesis results are claimed here.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The
reference model `tb/bch_tb_pkg.sv` is independent of the RTL arithmetic. It
has the following parts:

* log/antilog-table GF arithmetic;
* the generator polynomial, built as the product of the minimal polynomials
  of α, α^3, α^5;
* a systematic encoder;
* bit-serial syndromes;
* the factor and H formulas.

| Testbench | What it shows |
|---|---|
| `tb_bch_mc_decoder` | Full 16-channel decoder at its defaults. 24 codewords per channel with 0 to 3 errors (including errors in the first and last word), back to back and with gaps. Output equals the transmitted codeword bit for bit, latency 273. Fails if any of these situations never occurred |
| `tb_bch_decoder_1ch` | Same checks with `CH = 1`, latency 258 |
| `tb_bch_parallel_factors` | Two-channel decoders at P = 2, 3, 5, 6, 10, 12 (the factors from 2 to 12 that divide 1020) and at P = 7 and 11 with zero-extended codewords (`NCODE` = 1022 and 1023): bit-exact output and latency |
| `tb_bch_syndrome_calc` | Syndromes of random words and corrupted codewords; zero output outside the valid cycle |
| `tb_bch_ssfc` | A, B, C, R, S1^2 against the reference for 400 syndrome sets |
| `tb_bch_chien_search` | Every lane value over full searches in both cases |
| `tb_bch_cs_el` | Error patterns of weight 0 to 3 recovered exactly from reference factors |
| `tb_bch_error_locator`, `tb_bch_fifo`, `tb_bch_time_mux`, `tb_bch_time_demux`, `tb_bch_*_ctrl` | Block behaviour at reduced sizes |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Mdir obj -y rtl -y tb \
    rtl/bch_pkg.sv tb/bch_tb_pkg.sv tb/tb_bch_mc_decoder.sv --top-module tb_bch_mc_decoder
./obj/Vtb_bch_mc_decoder
```

The full-size test builds in under a minute and runs in well under a second.

Not verified:

* behaviour with more than three errors;
* timing closure;
* anything beyond functional simulation.

## Changing the design

* `CH` may be any value from 1 up to the 255 cycles of a codeword. The
  channel sequencing must finish before the next syndromes arrive.
* `P` must divide `NCODE`. For 1020 that allows 2, 3, 4, 5, 6, 10, 12, … .
  The reference bit needs four H values. For P = 2 or 3 it therefore ORs all
  lanes of the first ⌈4/P⌉ search cycles. Those cycles are added to the error
  locator's delay and to the FIFO, and the reference is double-buffered so
  that codewords can still follow back to back. This extension for small P is
  this design's own; the published error locator is drawn for P ≥ 4.
* `NCODE` may be any shortened length up to 1023 that is a multiple of `P`.
  A P that does not divide 1020 can still carry the (1020, 990) code: build
  the decoder with `NCODE` set to the next multiple of P and send each
  codeword with that many leading zeros. The zeros keep it a codeword, and
  they come out unchanged. This works for P = 7 (1022) and P = 11 (1023). It
  does not work for P = 8 or 9, whose next multiples (1024 and 1026) are
  longer than the field allows.
* The field size is fixed by `M` and `PRIM_POLY` in `bch_pkg`. The
  syndrome/SSFC equations are specific to t = 3.
