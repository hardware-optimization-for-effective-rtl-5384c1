# Golomb-Rice encoders with re-coded prefixes

A Golomb-Rice (GR) code compresses a non-negative integer N by dividing it by a
power of two M. The quotient q = N / M is sent in unary (q ones, then a zero).
The remainder r = N mod M follows in log2(M) plain binary bits. This is close to
optimal for geometrically distributed data, where small values dominate. For data
that is spread evenly it is poor: large values get long unary prefixes.

This RTL implements the plain GR encoder and three variants. Each variant keeps
the remainder and replaces some of the unary prefixes with short fixed codes.
The main configuration has 10-bit inputs and M = 128. So q runs from 0 to 7, the
remainder is always 7 bits, and a plain GR code word is 8 to 15 bits long.

## The four prefix codes

| q | plain GR (`SCHEME_GR`) | scheme 1, HSGRC | scheme 2, LPGRC | scheme 3, EBRGC |
|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 |
| 1 | 10 | 10 | 10 | 10 |
| 2 | 110 | 110 | **00** | **00** |
| 3 | 1110 | 1110 | **01** | **01** |
| 4 | 11110 | 11110 | **11** | **11** |
| 5 | 111110 | **00** | 111110 | **000** |
| 6 | 1111110 | **01** | 1111110 | **001** |
| 7 | 11111110 | **11** | 11111110 | **010** |

The full code word is `<prefix><7-bit remainder>`. Its possible lengths are:

* plain GR: 8 to 15 bits
* scheme 1: 8 to 12 bits
* scheme 2: 8, 9, 13, 14 and 15 bits
* scheme 3: 8, 9 and 10 bits

Scheme 1 shortens the longest prefixes, so it suits evenly spread data. Scheme 2
shortens the middle ones, so it suits data that falls off quickly. Scheme 3 does
both and is shortest overall.

Take every 10-bit value exactly once (1024 words). The totals are:

| code | bits | saved vs. plain GR |
|---|---|---|
| plain GR | 11776 | – |
| scheme 1 | 9856 | 1920 (16.30 %) |
| scheme 2 | 11008 | 768 (6.52 %) |
| scheme 3 | 9472 | 2304 (19.57 %) |

The testbenches reproduce these numbers exactly.

## Why the code word length travels with the word

The re-coded prefixes are **not prefix-free**. In scheme 1, `0` (q = 0) is a
prefix of `00` (q = 5), and `11` (q = 7) is a prefix of `110` (q = 2). A decoder
reading a bare bit stream could not tell where a word ends. The design solves
this by always carrying the word's length alongside the word:

* **Encoder output bank (`gr_vl_output`).** The encoder's output register is not
  one register as wide as the longest word. It has one register for each length
  the scheme can produce, each exactly that wide. Scheme 1 has five registers
  (8, 9, 10, 11 and 12 bits); scheme 3 has three (8, 9 and 10 bits).
* **Which register is loaded.** A word is written only into the register of its
  own length. The other registers keep their contents and do not toggle.
* **What the output shows.** The one-hot `sel_o` names the register that holds
  the current word, and `len_o` gives the same length as a number.
* **How the decoder uses the length.** With the length known, the decoder can
  split any word:
  * The last 7 bits are always the remainder.
  * The prefix length is `len - 7`.
  * If that prefix length belongs to a plain unary prefix, q is the number of
    ones before the first zero.
  * If it belongs to a re-coded prefix, two or three bits are looked up.
  * Scheme 1: 9-bit words carry `10/00/01/11` for q = 1/5/6/7.
  * Schemes 2 and 3: 9-bit words carry `10/00/01/11` for q = 1/2/3/4.
  * Scheme 3: 10-bit words carry `000/001/010` for q = 5/6/7.

A receiver therefore needs the length of each word, for example by storing each
word with its length or in a per-length buffer. This RTL does not pack the words
into a serial bit stream.

## Datapath

`gr_encoder` is a chain of five stages, all combinational except the last:

1. `gr_quot_rem` computes q = N / M and r = N mod M. For a power-of-two M this is
   only bit slicing. Any other M ≥ 2 gives a constant divider.
2. `gr_rem_code` codes the remainder. For a power-of-two M it is plain binary.
   For any other M it uses truncated binary: let x = ceil(log2 M) and
   U = 2^x − M. A remainder r < U is sent in x−1 bits; any other r is sent as
   r + U in x bits.
3. `gr_unary_code` looks up the prefix of the selected scheme (table above).
   Plain unary works for any q range. The three re-coded schemes exist only for
   q = 0..7, and elaboration stops with an error otherwise.
4. `gr_concat` forms `(prefix << r_len) | remainder` and adds the two lengths.
5. `gr_vl_output` is the per-length register bank described above.

`gr_decoder` inverts the code from word and length, and raises `err_o` for a
word that no input produces. `gr_top` places the four channels side by side:
`gr_`, `hs_`, `lp_` and `ebr_`, each with an encoder and a decoder. The channels
share only clock and reset; the schemes are alternatives and there is no mode
switch between them. `gr_pkg` holds the scheme enum and the elaboration-time
sizing functions.

Code words are right-aligned in every port. The first bit of a word (the first
prefix bit) is at index `len-1`, and bits above `len-1` are zero.

## Interface and timing

All blocks take `clk` and `rst_n`. The reset is asynchronous, active low, and
clears every register.

* **Encoder:** present `n_i` with `valid_i` high. One clock later `valid_o`,
  `word_o`, `len_o` and `sel_o` show the code word. It accepts one value per
  clock, with no back-pressure.
* **Decoder:** present `word_i` and `len_i` with `valid_i` high. One clock later
  `valid_o`, `n_o` and `err_o` show the result; `n_o` is 0 when `err_o` is set.
* **Widths at the defaults:** `gr_enc_word_o` is 15 bits, `hs` 12, `lp` 15 and
  `ebr` 10. `len` fields are 4 bits. `sel_o` is one bit wider than the word,
  with bit L meaning "the L-bit register holds the word".

| parameter | default | meaning |
|---|---|---|
| `IN_W` | 10 | input width |
| `M` | 128 | Golomb divisor |
| `SCHEME` | `SCHEME_GR` | prefix code (encoder and decoder) |

Changing `IN_W` or `M` is meaningful for the plain GR channel. The re-coded
channels accept only combinations that give q = 0..7 with a power-of-two M.
Code words are capped at 63 bits.

## What is specified and what is a design choice

**Taken from the published schemes:**

* the 10-bit / M = 128 configuration
* the four prefix tables
* the stage structure: quotient, remainder, remainder code, prefix code,
  concatenation, variable-length output
* the truncated-binary rule for a general M
* a separate output register for each code length (8..12 bits for scheme 1,
  8..10 bits for scheme 3)
* the length-directed decoding rule for scheme 1

**Choices made in this design:**

* one register stage, one word per clock, valid-only handshake
* asynchronous active-low reset
* right-aligned words with an explicit length port
* the error flag
* decoding schemes 2 and 3 by the same method as scheme 1
* a general-M divider for the plain GR channel

**Not implemented:**

* An intermediate variant that re-codes every prefix into 3 bits. It turns the
  code back into plain 10-bit binary and compresses nothing.
* Area, delay and power figures. They depend on a standard-cell library and are
  not reproduced here.

One inconsistency in the source material: the block diagram of scheme 1 labels
its output "8 to 15 bits". The scheme-1 table gives 8 to 12, and that is what is
built.

## Verification

Each block has a self-checking testbench in `tb/`. The expected values come from
`tb_gr_ref_pkg`, which keeps the prefix tables as bit strings and builds the
remainder by repeated subtraction.

| testbench | what it checks |
|---|---|
| `tb_gr_quot_rem` | every 10-bit input with M = 128 and M = 100 |
| `tb_gr_rem_code` | every remainder for M = 128, 100 and 5 |
| `tb_gr_unary_code` | all four tables, plus plain unary up to q = 12 |
| `tb_gr_concat` | random fields |
| `tb_gr_vl_output` | latency, the one-hot select, dropped lengths, and that a write leaves the other length registers unchanged |
| `tb_gr_encoder` | all 1024 values through each scheme, the bit totals above, a general-M channel (M = 100), and the M = 4 textbook example (values 0..16) |
| `tb_gr_decoder` | every code word of every scheme, plus malformed words that must be rejected |
| `tb_gr_top` | end to end at default parameters (below) |

`tb_gr_top` loops each encoder into its decoder and streams all 1024 values. It
checks every word, every decoded value, both one-clock latencies and the bit
totals. It also checks that every length register of every bank, every re-coded
prefix, and the decoder's error path were each exercised at least once.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_gr_top \
    rtl/gr_pkg.sv tb/tb_gr_ref_pkg.sv tb/tb_gr_top.sv -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`. All of them finish
in well under a second. `-Wno-fatal` keeps the testbenches' width warnings (from
passing narrow ports to 64-bit reference functions) from stopping the build.
