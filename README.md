# Iterative-cell (fully combinational) cyclic encoder and decoder

A systematic cyclic code is normally encoded and decoded with a linear-feedback
shift register. The register divides the message polynomial by the generator
polynomial, one bit per clock. That is slow for a whole word, and it needs
clocked storage. This design removes the clock. Each clock step of the shift
register becomes one small combinational *cell*. The cells are chained so
that the register state of one step becomes the *carries* into the next cell.
A whole word goes into the chain at once, one bit per cell. The result comes
out of the last cell one propagation delay later: no flip-flops, no reset,
zero cycles of latency.

The default configuration is the Hamming (15,11) code with generator
g(D) = D^4 + D + 1: 11 message bits, 4 check bits, single-error correction.
The RTL is parameterised (`N` message bits, `R` check bits, generator `G`).
Encoding and error detection work for any systematic cyclic code. Single-error
correction works whenever every bit position gives a distinct syndrome: Hamming
codes and their shortened forms.

## Conventions

* Bit `j` of a word vector is the coefficient of D^j of its polynomial. The
  most significant bit is the first bit on the line, and goes into the first
  cell.
* A code word is `{msg, check}`: message in the top N bits, check bits in the
  low R bits.
* `G` holds the R low coefficients `{g_(R-1) … g_1, g_0}`; the D^R term is
  implicit. For D^4 + D + 1, `G = 4'b0011`.
* The shared defaults and the Hamming types (`hamming_msg_t`,
  `hamming_word_t`, `hamming_dec_t`) are in `rtl/cyclic_code_pkg.sv`.

## The cell (`cyclic_cell`)

A cell has R carries in (`y`), R carries out (`Y`) and one data bit `x`. With
the feedback f = x ⊕ y[R-1] it computes

    Y[k] = (g_k · f) ⊕ y[k-1]        k = 0 … R-1, with y[-1] = 0

This is exactly one step of the division register. For D^4 + D + 1 it reduces
to `Y0 = y3 ^ x`, `Y1 = y0 ^ Y0`, `Y2 = y1`, `Y3 = y2`: two XOR gates.

## Encoder (`parallel_encoder`)

N cells in a chain. The first cell's carries are zero, just as the register is
cleared before a word. Cell i receives message bit i. The carries leaving
cell N are the remainder D^R·x(D) mod g(D), which are the check bits.
`word = {msg, check}` is a multiple of g(D). Example: message `10100000000`
gives check bits `0110`.

## Decoder (`parallel_decoder`)

The decoder uses 2(N+R)−1 cells (29 for Hamming (15,11)) in two sections.

**Detecting section (`detecting_section`).** N+R cells identical to the
encoder's, fed with the whole received word w. The carries leaving the last
cell are the syndrome s = D^R·w(D) mod g(D). The syndrome is zero exactly when
w is a code word. `error_detected` is the OR of the syndrome bits.

**Correcting section (`correcting_section`).** This is the less obvious part.
In the serial decoder the syndrome register keeps running with its input held
at 0 while the stored word is shifted out. A gate complements the outgoing bit
when the register shows one fixed pattern. Unrolled in space:

* `correction_cell` is a `cyclic_cell` with `x = 0`. Each cell multiplies the
  syndrome by D modulo g(D). Next to it sits a `correcting_gate`, which
  compares the carries *entering* the cell with the pattern. On a match it
  XORs the received bit with 1.
* Position i (i = 1 is the first bit sent, word bit N+R−i) is therefore judged
  by the syndrome after i−1 zero-input shifts. That is the carry vector leaving
  cell N+R+i−1 of the whole 2(N+R)−1 chain.
* There are N+R−1 correction cells, for positions 1 … N+R−1. The last
  position needs no further shift, so it gets one stand-alone gate on the
  carries leaving the last cell.

Why one pattern serves every position: a single error at position i is the
error polynomial e(D) = D^(N+R−i). The detecting section gives
D^(R+N+R−i) mod g. After i−1 shifts this is D^(N+2R−1) mod g, whatever i is.
`correcting_section` computes the pattern at elaboration as exactly that
power. For a code whose length N+R is a multiple of the period of g(D),
D^(N+R) ≡ 1, so the pattern is D^(R−1). For the default code that is
`4'b1000`. If the syndrome is zero, no pattern ever matches and the word
passes unchanged. If it is non-zero and comes from one error, exactly one gate
fires. Two or more errors give a non-zero syndrome, so `error_detected` is
raised, but the word may be miscorrected. This is normal for a
single-error-correcting Hamming code.

Outputs: the corrected word `c`, its message part `msg`, `syndrome`,
`error_detected`, and `corrected` (some bit was complemented).

## Top (`cyclic_codec`)

The encoder (transmit side) and the decoder (receive side) sit side by side
with independent ports: `tx_msg → tx_check, tx_word` and
`rx_word → rx_corrected, rx_msg, rx_syndrome, rx_error, rx_fixed`. They are
the two ends of a link, so the top does not connect them internally.

## Timing

Everything is combinational. A result is valid one logic propagation delay
after the inputs settle, with no clock. Cells pass carries in a ripple, so the
delay grows linearly with the word length: about one XOR per cell on the
feedback path in the encoder and detecting section, and at most one XOR per
cell in the correcting section, plus an R-input compare and an XOR at each
output bit. To run the design at a clock rate, put registers around
`cyclic_codec`. No registers are included, because removing clocked storage is
the point of the method.

The method's speed claims come from transistor-level simulation of a
0.35 µm CMOS implementation:

* encoder: about 2 ns against about 16 ns for the serial register, and a
  speed-up of about 4 in the worst case;
* decoder: a speed-up of about 7 against a serial decoder clocked at 1 GHz.

Those figures depend on the process and cannot be reproduced from RTL.

## What is not included

* The serial shift-register encoder and decoder. They are only the baseline
  that the combinational circuits are compared with.
* The full-custom cell and decoder layout. It is physical design, not logic.

## Choices made by this design

* Bit ordering and port layout, as described under Conventions.
* Extra outputs: the decoder's `msg`, `error_detected` and `corrected`, and
  the `hit`/`flips` indications.
* The correcting gates look at the carries entering each correction cell. The
  gates are an R-bit equality compare plus an XOR, the simplest circuit that
  does the job.
* The cell equation uses y[R-1] (y3 for the default code) in the feedback,
  following the general transition rule. This is the only consistent reading,
  because a cell has only carries y0 … y3.

## Files

| file | content |
|---|---|
| `rtl/cyclic_code_pkg.sv` | default code constants and types |
| `rtl/cyclic_cell.sv` | iterative cell (one divider step) |
| `rtl/parallel_encoder.sv` | N-cell encoder |
| `rtl/detecting_section.sv` | N+R-cell syndrome computation |
| `rtl/correcting_gate.sv` | pattern compare and bit flip |
| `rtl/correction_cell.sv` | zero-input shift cell with its gate |
| `rtl/correcting_section.sv` | N+R−1 correction cells and the last gate |
| `rtl/parallel_decoder.sv` | detecting and correcting sections |
| `rtl/cyclic_codec.sv` | top: encoder and decoder side by side |
| `tb/cyclic_ref_pkg.sv` | reference GF(2) long division for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the design against polynomial long division over
GF(2). This is a different algorithm from the shift-register recurrence the
cells implement. Each testbench prints `TB_RESULT checks=… failures=…`.

* `tb_cyclic_cell`, `tb_correcting_gate`, `tb_correction_cell`: exhaustive
  over all inputs.
* `tb_parallel_encoder`: all 2048 messages, plus the `10100000000` example.
* `tb_detecting_section`: all 32768 received words. Exactly 2048 of them are
  accepted as code words.
* `tb_correcting_section`: every syndrome with random words.
* `tb_parallel_decoder`: all code words, clean and with every single error,
  plus random double errors. It also runs a (7,4) instance with
  g = D^3 + D + 1.
* `tb_cyclic_codec`: end to end at the default parameters. All messages pass
  through a channel that adds no error, every single error and every double
  error. The testbench counts clean words, detected errors, corrections at
  each of the 15 positions and flagged double errors, and fails if any of
  these never occurs.

To simulate with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cyclic_code_pkg.sv tb/cyclic_ref_pkg.sv tb/tb_cyclic_codec.sv \
        --top-module tb_cyclic_codec
    ./obj_dir/Vtb_cyclic_codec

To change the code, set `N`, `R` and `G` on `cyclic_codec`, for example
`#(.N(4), .R(3), .G(3'b011))` for Hamming (7,4). For single-error correction,
g(D) must divide D^(N+R) − 1 with no two error positions giving the same
syndrome: a Hamming code, or a shortened one.
