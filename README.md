# Improved Hamming code: encoder, decoder and a five-stage demonstration link

A Hamming code adds a few check bits to a data word so that the receiver can find and
repair one flipped bit. The classic arrangement scatters the check bits through the word
(at positions 1, 2, 4, 8, ...), so the sender has to interleave them with the data and the
receiver has to pull them out again. The *improved* Hamming code built here keeps the data
word exactly as it is and appends all check bits above it. Encoding is then "compute a few
XORs and concatenate", and decoding is "check, repair, take the low bits", whatever the
word length.

This RTL contains three related designs, side by side in `hamming_top`:

| prefix in `hamming_top` | design | data / code word | corrects | detects |
|---|---|---|---|---|
| `sys_` | five-stage link: transmitter, encoder, noise box, decoder, receiver (`ihc_system`) | 56-bit message as 8 × 7 bits, 11-bit words | 1 bit per word | — |
| `c16_` | improved code encoder/decoder pair (`ihc_encoder`, `ihc_decoder`) | 10 / 16 bits | 1 bit | 2 bits |
| `e13_` | classic Hamming SEC-DED pair (`ecc_enc`, `ecc_dec`) | 8 / 13 bits | 1 bit | 2 bits |

The designs follow the paper "Module Design Approach of Hamming Code Using Advanced Verilog
Concept of FPGA", which builds on B. Umashankar's improved Hamming code (2007); the
examples quoted below are the paper's. All of it is plain synthesizable SystemVerilog: a few hundred gates and flip-flops, no memories.

## The improved code

### Position parities

Number the data bits by *position* 1..D: data bit `d[k-1]` has position `k`. Check bit
`P[i]` is the even parity (XOR) of all data bits whose position number has bit `i` set.
For the default 10 data bits:

| check bit | data positions covered | data bits |
|---|---|---|
| P[0] | 1, 3, 5, 7, 9 | d0 d2 d4 d6 d8 |
| P[1] | 2, 3, 6, 7, 10 | d1 d2 d5 d6 d9 |
| P[2] | 4, 5, 6, 7 | d3 d4 d5 d6 |
| P[3] | 8, 9, 10 | d7 d8 d9 |

If the data bit at position `k` flips, exactly the check bits that spell `k` in binary
change. XOR the recomputed `P` with the received `P` and you get the syndrome `S`, which is
the position of the bad bit. `S = 0` means no data bit flipped. The number of position
parities is `clog2(D+1)`.

### Protecting the check bits

A flip in a check bit would also change `S`, and the decoder would then "repair" a data
bit that was fine. Two more bits prevent that:

* **group parity** `P_grp` makes `P[RP-1:0], P_grp` even. A flipped position parity
  therefore shows up as a failed group check. A flipped data bit leaves the group check
  intact.
* **overall parity** `P_all` (optional, parameter `EXTENDED`) makes the whole word even.
  One flip makes the whole word odd; two flips leave it even, so they can be detected.

Code word layout (`ihc_encoder`, default `DATA_W = 10`, `EXTENDED = 1`):

```
bit   15     14      13 12 11 10    9 ........ 0
      P_all  P_grp   P3 P2 P1 P0    d9 ....... d0
      (P5)   (P4)
```

Example: data `10'b1100110011` encodes to `16'b0000_1111_0011_0011` (P[3:0] = 0011,
P_grp = 0, P_all = 0).

### Checking and correcting

`ihc_parity_check` forms a status word with the same layout as the check bits:
`{S_all, S_grp, S[3:0]}`. Here `S` is the syndrome, `S_grp` is the parity of the received
`P[3:0], P_grp`, and `S_all` is the parity of all 16 received bits. The status is read like
this:

| S_all | S_grp | S | meaning | action |
|---|---|---|---|---|
| 0 | 0 | 0 | no error | — |
| 1 | 0 | 1..D | data bit at position S flipped | invert `d[S-1]`, `corrected` |
| 1 | 1 | one-hot or 0 | a position parity or P_grp flipped | data is fine, `corrected` |
| 1 | 0 | 0 | P_all flipped | data is fine, `corrected` |
| 0 | any non-zero status | | two bits flipped | `uncorrectable` |
| 1 | any other pattern | | three or more flips | `uncorrectable` |

Examples for the word above:
- Flipping bit 2 (data position 3) gives status `100011`.
- Flipping bit 9 (data position 10) gives `101010`.
- Flipping bit 8 (position 9) gives `101001`.

Without `EXTENDED` there is no `S_all` column. The code then corrects every single flip and
cannot recognise double flips: it may "correct" them wrongly. This is how the 11-bit link
code works: 7 data bits, P[2:0], P_grp.

## The five-stage link (`ihc_system`)

```
 datain[55:0]  +-------------+ 7b  +---------+ 11b +-----------+ 11b +---------+ 7b  +----------+ dataout[55:0]
 send -------->| transmitter |---->| encoder |---->| noise box |---->| decoder |---->| receiver |-----> receive
               |  (buffer)   | den |(parity  |     | (random   |     | (parity |     | (buffer) |
               +-------------+     |  gen.)  |     |  seq gen) |     |  check) |     +----------+
                                   +---------+     +-----------+     +---------+
```

* **Transmitter** (`hc_transmitter`): on `send` it captures the 56-bit message. It then
  sends one 7-bit word per clock, least significant first, with `den` high. `send` is
  ignored while `busy`.
* **Encoder** (`ihc_encoder`, `DATA_W = 7`, `EXTENDED = 0`): adds P[2:0] and P_grp and
  registers the 11-bit word.
* **Noise box** (`hc_noise_box`): stands in for a noisy channel. While `noise_en` is high it
  inverts exactly one bit of each word, at position `LFSR mod 11`. The LFSR
  (`hc_random_seq_gen`) is 16 bits with polynomial x^16+x^14+x^13+x^11+1 and steps once
  per word.
* **Decoder** (`ihc_decoder`): checks, repairs and drops the 4 check bits.
* **Receiver** (`hc_receiver`): shifts the eight words into its buffer and presents the
  message with a one-cycle `receive` pulse.

Every stage is one register deep, and a valid bit travels with each word. Counting rising
edges after the edge that samples `send`:

| edge | event |
|---|---|
| 1..8 | words 0..7 leave the transmitter |
| +1 | encoded |
| +2 | noised |
| +3 | decoded |
| 12 | `receive` rises with the full message |

A new message can be sent once `busy` has dropped. The link's status outputs (`word_*`)
report each decoded word as it enters the receiver.

## The classic (13,8) SEC-DED pair (`ecc_enc`, `ecc_dec`)

This is the textbook layout, kept for comparison with the improved code.
- The code word is numbered from 1.
- Data bits sit at the non-power-of-two positions: `d_i[0]` at 3, `d_i[1]` at 5, 6, 7, 9, 10, 11, 12.
- Check bit `p_o[j]` sits at position `2^j`.
- The number of check bits is the smallest `r` with `2^r >= D + r + 1`, which gives 4 for 8 data bits.
- `q_o = {cw[12:1], p0_o}`, where `p0_o` is the overall parity. Bit n of `q_o` is therefore position n.

Example: `d_i = 8'b10000010` gives `p_o = 4'b1001`, `p0_o = 0` and `q_o = 13'b1000100100010`.

`ecc_dec` registers the received word, its syndrome (the XOR of the positions of all set
bits) and its overall parity while `clkena_i` is high. The outputs come from those
registers one cycle later:
- `sb_err_o`: odd parity.
- `sb_fix_o`: odd parity with a syndrome of 1..12, so that position is inverted.
- `db_err_o`: even parity with a non-zero syndrome, or a syndrome past position 12.
- `syndrome_o = {syndrome, parity}`.

`rst_ni` is asynchronous and active low. The other modules use a synchronous, active-high
`rst`.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `ihc_encoder`, `ihc_decoder`, `ihc_parity_check` | `DATA_W` | 10 | any width ≥ 1 |
| | `EXTENDED` | 1 | adds `P_all` and double error detection |
| `ihc_system`, `hc_transmitter`, `hc_receiver` | `MSG_W`, `DATA_W` | 56, 7 | `MSG_W` must be a multiple of `DATA_W` |
| `hc_noise_box` | `CW_W`, `SEED` | 11, 16'hACE1 | `SEED` must be non-zero |
| `ecc_enc`, `ecc_dec` | `DATA_W` | 8 | check bit count is derived |

Widths that depend on these are computed in `ihc_pkg`.

## Where this RTL makes its own choices

The code construction and the example values above are reproduced exactly. The following
are choices of this implementation:

* **The 11-bit link code.** It is built from the improved-code rules (3 position parities
  plus group parity) to give 11 bits for 7 data bits. It has no overall parity bit, so the
  link corrects single flips but does not detect double flips.
* **Timing and handshakes.** All of these are this implementation's own: the valid bits,
  the register stages, word order, `busy`, `receive` as a pulse, and the reset styles.
* **Exact status equations.** The equations for `S_grp` and `S_all` were chosen so that the
  published example statuses come out as listed above.
* **`noise_en` and the LFSR.** The noise box's `noise_en`, `err_pos` and `err_flip`, and the
  LFSR type and polynomial, are own choices.
* **Clean words in `ecc_dec`.** Its corrected word `cw_fixed` is left unchanged for a clean
  input. The reference waveform instead shows the overall-parity bit inverted in that case.
  The data output is the same either way.
* **Error masks in `hamming_top`.** The `c16_err_mask` and `e13_err_mask` inputs are test
  access. They XOR into the code word between encoder and decoder.

## Files

`rtl/`:
- `ihc_pkg`: width functions.
- `ihc_parity_gen`: position parities.
- `ihc_encoder`.
- `ihc_parity_check`: status, correction and flags.
- `ihc_decoder`.
- `hc_transmitter`.
- `hc_random_seq_gen`.
- `hc_noise_box`.
- `hc_receiver`.
- `ihc_system`: the link.
- `ecc_enc`.
- `ecc_dec`.
- `hamming_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each compares the module
with an independent model written out by hand, and ends by printing
`TB_RESULT checks=N failures=M`. Coverage:

* **Exhaustive:** the encoders and parity generator for every data word.
* **Single flips:** every single flip of every 16-bit and 11-bit word.
* **Double flips:** a sweep of double flips.
* **Link latency:** the 12-cycle latency of the link.
* **End to end:** `tb_hamming_top` runs all three designs at their default sizes. It counts
  each mechanism and fails if one never happens:
  - link data-bit repair, link check-bit flip and clean link word;
  - 16-bit single correction and double detection;
  - 13-bit fix, parity-only error and double detection.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Irtl rtl/ihc_pkg.sv tb/tb_hamming_top.sv \
          --top-module tb_hamming_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_hamming_top` with any other `tb_<module>` to test one block. Every testbench
finishes in well under a second. For lint: `verilator --lint-only -Wall -Irtl
rtl/ihc_pkg.sv rtl/<module>.sv`. The remaining warnings are unused signals. Examples:
- the decoder does not use the parity checker's `err_detected`;
- the receiver never reads the lowest word of its shift buffer;
- the link leaves the noise box's debug outputs open.
