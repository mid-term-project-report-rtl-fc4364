# DVB-T / J.83 receiver core: multi-mode FEC decoder and 8K FFT processor

This is synthesizable SystemVerilog for two parts of a digital-TV baseband receiver:

- **A multi-mode forward-error-correction (FEC) decoder.** One datapath decodes
  all four cable annexes of ITU-T J.83 (A, B, C, D) and the outer and inner codes of
  terrestrial DVB-T. Every mode shares:
  - one Reed-Solomon (RS) decoder that works over GF(2^8) or GF(2^7);
  - one convolutional de-interleaver that handles any (I,J);
  - two descramblers;
  - a K=7 Viterbi decoder.
- **An 8192-point FFT processor** for the DVB-T 8K mode. It has these parts:
  - radix-8 butterflies;
  - an 8x8 matrix buffer in front of a single-port memory;
  - block floating point with one scale factor per 64-point block.

The two halves sit side by side in `dvbt_core_top`, each with its own ports and its own
reset. In a complete receiver they are joined by synchronisation, channel estimation,
equalisation and demapping. None of those are part of this code.

The design follows a mid-term research report on DVB-T baseband cores. Where the report
is silent, this code makes its own choices. Each choice is listed at the end of this
file and in the header comment of the file concerned.

## Modes of the FEC decoder

| `mode` | Standard | Inner stage | De-interleaver (I,J) | RS code | Output descrambler |
|---|---|---|---|---|---|
| 0 | J.83 annex A | – | (12,17) | (204,188), t=8, GF(2^8) | PRBS 1+x^14+x^15 |
| 1 | J.83 annex B | descrambler B (GF(2^7)) | `cfg_i`, `cfg_j` at run time | (128,122) extended, t=3, GF(2^7) | – |
| 2 | J.83 annex C | – | (12,17) | as annex A | as annex A |
| 3 | J.83 annex D | – | (52,4) | (207,187), t=10, GF(2^8) | 16-bit PRBS |
| 4 | DVB-T | Viterbi K=7, rates 1/2 … 7/8 | (12,17) | (204,188), t=8 | as annex A |

The chain order is fixed, and multiplexers pick the path for each mode:

```
 soft bits -> Viterbi -> byte packer --+
 7-bit symbols -> descrambler B -------+-> MUX -> de-interleaver -> RS decoder
 bytes --------------------------------+                                |
                            out <- MUX <- descrambler A/C/D <- parity strip
```

Interface and framing rules:

- **Packet output.** The decoder emits only the packet bytes: 188 bytes, or 187 in
  annex D, and 121 symbols in annex B. `out_sync` marks the first byte of each packet.
- **Status flags.** Three flags report what happened to each codeword:
  - `rs_fail` pulses for a codeword that could not be corrected;
  - `rs_skip` pulses for a codeword found error-free early (see below);
  - `overrun` means data arrived faster than the decoder can take it.
- **Framing.** Synchronisation is not part of this design. The first symbol after reset
  must be the first symbol of an RS codeword, and must belong to de-interleaver branch 0.
  In DVB-T the first decoded bit is the MSB of that byte.
- **Mode changes.** After changing `mode`, `rate` or the annex-B (I,J), reset the decoder.
- **Input rate.**
  - Byte modes: at most one symbol every 3 clock cycles.
  - DVB-T: at most one soft bit per cycle.

## The multi-field RS decoder

The RS decoder (`rs_decoder`) is the core of the FEC design. Its central idea is that a
finite-field multiplier splits into two steps:

1. a carry-less polynomial product, which is the same for every field;
2. a reduction modulo the primitive polynomial, which depends on the field.

`gf_mul_mm` builds both reductions and selects one:

- x^8+x^4+x^3+x^2+1 for GF(2^8);
- x^7+x^3+1 for GF(2^7).

Every unit of the decoder is built from this multiplier, so one datapath serves three
codes.

A codeword flows through the units like this:

1. **Syndromes** (`rs_syndrome`). There are 20 Horner cells. Each one computes
   S_j = r(α^j) as the symbols stream in.
   - GF(2^8) codes use the first root α^0 and 2t cells.
   - Annex B uses the first root α^1, and cells 1 to 6 switch to GF(2^7).
   - Those six cells need no second constant: α^1 … α^6 are the plain monomials x^1 … x^6
     in both fields.
2. **Early error-free detection.** If the first t syndromes are all zero, the
   codeword is taken as error-free. The key-equation solver and the Chien search are
   then skipped, and `rs_skip` pulses. This saves power in the common error-free case.
   It relies on a property of these codes: when the first t syndromes are zero, the
   codeword either has no errors or has more errors than the code can correct.
3. **Key-equation solver** (`rs_kes`). This is a decomposed, inversion-free
   Berlekamp–Massey algorithm:
   - it uses three field multipliers and handles one coefficient per cycle;
   - it runs 2t iterations to produce σ(x);
   - afterwards it computes Ω(x) = σ(x)S(x) mod x^2t as a separate, cheaper pass.

   It takes 2t(t+1) + t(t+1)/2 + 2 cycles: 32 for t=3, 182 for t=8 and 277 for t=10.
4. **Chien search** (`rs_chien`). This evaluates σ at every received position.
   - Shortened codes start at α^(2^m−n), so no time is spent on positions that were
     never sent.
   - A location cell tracks the locator value X of the current position.
   - The search also outputs the sum of σ's odd-degree terms, which equals X·σ'(X).
5. **Forney** (`rs_forney`). The error value is computed as:
   - Ω(X)/(X·σ'(X)) for first root α^0;
   - Ω(X)/σ'(X) for annex B.

   Ω is evaluated by its own set of cells, stepped in lockstep with the Chien search.
   The division uses an inverter built from a^(2^m−2).

The symbols wait in a ping-pong buffer: two 256-entry halves. While one codeword is being
corrected and output, the next one is written into the other half.

A codeword is flagged uncorrectable when the number of roots found differs from deg σ.

Annex-B codewords arrive as 128 symbols. The last one is the extension symbol of the
(128,122) code. It carries no data, and the 127-symbol cyclic part alone corrects 3
errors, so the decoder drops it on input.

## The universal convolutional de-interleaver

A (I,J) de-interleaver delays branch b by (I−1−b)·J symbols. Shift-register FIFOs would
need I(I−1)J/2 bytes of registers. `conv_deinterleaver` uses one single-port RAM
instead:

- Each branch owns a circular region of (I−1−b)·J bytes.
- A visit to a branch reads the oldest byte of its region and writes the new byte in
  the same place.
- One base address is accumulated as the commutator steps round the branches.
- Each branch has one pointer register.

The RAM holds no "don't-care" entries. A (12,17) configuration therefore needs
J·I(I−1)/2 = 1,122 bytes.

The default 65,032-byte memory holds the deepest annex-B case, (128,8), which needs
65,024 bytes.

The first I(I−1)J outputs after reset are the memory's initial contents.
`fec_decoder` drops them.

## Viterbi decoder

`viterbi_decoder` decodes the DVB-T inner code: K=7, generators 171 and 133 (octal).

**Input.** It takes one 3-bit soft bit per cycle: 0 is a strong "0" and 7 a strong "1".

**De-puncturing.** `vit_depuncture` re-inserts the punctured positions according to
`rate`:

| Rate | X | Y |
|---|---|---|
| 2/3 | 10 | 11 |
| 3/4 | 101 | 110 |
| 5/6 | 10101 | 11010 |
| 7/8 | 1000101 | 1111010 |

Inserted positions get a zero branch metric, so the rest of the datapath is the same
for every rate.

**Core.** Each trellis step updates all 64 states in one cycle:

- 12-bit path metrics use modulo arithmetic, so they never need to be rescaled.
- Survivors use register exchange with 48 steps of history.
- The decoded bit is read from the best state.

**Timing.** Output starts 48 trellis steps after the first input. The decoder starts in
state 0.

## Descramblers

`descrambler_acd` covers two sequences:

- **Annexes A/C and DVB-T.** PRBS 1+x^14+x^15, loaded with 100101010000000.
  - It is reloaded at every inverted sync byte (0xB8), which is then restored to 0x47.
  - Sync bytes themselves are not scrambled.
- **Annex D.** A 16-bit Galois LFSR with polynomial
  x^16+x^13+x^12+x^11+x^7+x^6+x^3+x+1, start value 0xF180, restarted at each codeword.

`descrambler_b` is the annex-B randomiser. It is a three-stage recurrence over GF(2^7):
c(n+3) = c(n+1) + α^3·c(n).

- It starts from 0x7F in all three stages.
- It restarts at every frame. Here a frame is 128 symbols, one extended codeword.

## FFT processor

`fft_processor` transforms 8192 = 8^4·2 complex points.

**Passes.** It runs four radix-8 decimation-in-frequency passes and one radix-2 pass.
In pass s the sub-transforms have length L = N/8^s. Butterfly j of a sub-transform:

- takes the points j + m·L/8, for m = 0 … 7;
- rotates its output k by W_L^(j·k);
- writes the result back to the locations it read.

**Memory and matrix buffer.**

- One memory row holds 8 complex samples of 2×11 bits. There are 1024 rows, 176 Kbit in
  total.
- A group of 8 rows (64 points) is read into an 8×8 matrix buffer.
- The 8 butterflies of that group are computed out of the buffer.
- The 8 rows are written back.

In the early passes the rows of a group are L/8 apart, and each butterfly takes one
column of the buffer. One memory access per row thus serves eight butterflies, and a
single-port memory is enough. `fft_bu8` computes the 8-point DFT in three radix-2 steps.
Only W8^1 and W8^3 need a real multiplication, by 1/√2.

**Block floating point.**

- Each row has an entry in a scale table: value = mantissa · 2^exp.
- When a group is fetched, its rows are aligned to the largest exponent in the group.
- When the group's 64 results are done, they are shifted right by the smallest amount
  that brings them back into 11 bits.
- The new exponent is then stored for all eight rows.

So every 64-point block has its own scale factor, and a block is rescaled when it is
next used. A loud block does not cost quiet blocks their precision, as a single global
exponent would. All scaling rounds to nearest, with halves away from zero, which avoids
a DC bias.

**Interface.**

- **Input.** The processor takes one sample per cycle while `in_ready` is high, in
  natural order.
- **Output.** Results come out in natural order, one per cycle, as
  `out_re/out_im · 2^out_exp`. They are read through a digit-reversed address.
- **Latency.** Loading takes 8,192 cycles. Computing and unloading take 24,833 cycles
  more.
- **Comparison.** The original chip needs 14,347 cycles at 20 MHz (717.35 µs). It
  overlaps memory and arithmetic in a way that is not described, so this design keeps a
  simple read–compute–write schedule.

**Accuracy.** On full-scale random 8K frames the measured signal-to-quantisation-noise
ratio is about 47 dB. On a tone it is about 53 dB.

## Files

| File | Content |
|---|---|
| `rtl/fec_pkg.sv` | modes, rates, puncturing masks, GF arithmetic functions |
| `rtl/gf_mul_mm.sv` | dual-field multiplier |
| `rtl/rs_syndrome.sv`, `rs_kes.sv`, `rs_chien.sv`, `rs_forney.sv`, `rs_decoder.sv` | RS decoder |
| `rtl/conv_deinterleaver.sv` | (I,J) de-interleaver |
| `rtl/vit_depuncture.sv`, `viterbi_decoder.sv` | inner decoder |
| `rtl/descrambler_acd.sv`, `descrambler_b.sv` | descramblers |
| `rtl/fec_decoder.sv` | FEC platform |
| `rtl/fft_bu8.sv`, `fft_processor.sv` | FFT |
| `rtl/dvbt_core_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_gf_model.sv`, `tb_fec_model.sv` | reference models: field arithmetic, RS encoder, interleaver, randomisers, convolutional encoder and puncturer |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. For example:

```
verilator --binary --timing --assert -j 4 -Wno-fatal --top-module tb_dvbt_core_top \
  -y rtl -y tb -Irtl -Itb rtl/fec_pkg.sv tb/tb_gf_model.sv tb/tb_fec_model.sv \
  tb/tb_dvbt_core_top.sv -o sim && obj_dir/sim
```

**Full-size end-to-end test.** `tb_dvbt_core_top` runs the top at its default sizes,
with an 8192-point FFT and the 65,032-byte de-interleaver memory. It takes about 30 s.

- FEC side: it runs every mode, every DVB-T rate, and annex B with (I,J) = (128,1).
  The de-interleaver's own testbench also runs the deepest annex-B setting, (128,8),
  which fills 65,024 of the 65,032 bytes.
- FFT side: it runs three 8K frames at the same time as the FEC tests.
- It counts these mechanisms, and a mechanism that never happens is a failure:
  - early detection;
  - corrected codewords;
  - uncorrectable codewords;
  - every mode;
  - every rate;
  - FFT frames;
  - block-floating-point scaling.

**Block tests.** The other testbenches check their module against independent models
written in the testbench:

- the GF tables, syndromes and the Berlekamp–Massey result;
- RS encode, inject errors and decode;
- bit-accurate interleaving and scrambling;
- a double-precision FFT and DFT.

## How far it follows the original design, and where it departs

**Follows the original design:**

- the split multiplier and the dual-field syndrome and Chien cells;
- early detection from the first t syndromes;
- a Berlekamp–Massey solver with three multipliers, and Ω computed after σ;
- the two Forney formulas;
- a de-interleaver in one RAM without don't-care storage;
- the order of the FEC chain and its multiplexers;
- a radix-8 8K FFT with a matrix prefetch buffer, a single-port memory and 64-point
  block floating point;
- the memory sizes (176 Kbit and 65,032 bytes).

**This design's own choices:**

- **De-interleaver addressing.** It uses a pointer per branch. The original shares
  column-address registers across J blocks of I(I+1)/2 bytes.
- **Ω evaluation.** Ω is evaluated by parallel cells rather than serially.
- **FFT decomposition.** The FFT uses decimation in frequency, where the original
  derivation is decimation in time. The butterfly and twiddle counts are the same.
- **FFT schedule.** The schedule does not overlap memory reads, arithmetic and writes,
  so a transform takes about 2.3 times the original chip's cycle count.
- **Unstated parameters.** These values were chosen here:
  - 11-bit FFT data, from 176 Kbit / (8192 × 2);
  - 12-bit twiddles;
  - a 48-step survivor length;
  - 3-bit soft input.
- **Annex-B extension symbol.** The 128th symbol of each annex-B codeword is
  dropped, not checked. The 127-symbol part has the same 3-error correction power.
- **Standard-defined details.** Scrambler start values, RS primitive polynomials,
  Viterbi generators and puncturing patterns come from the DVB and J.83 standards.

**Not included:**

- the annex-B trellis decoder and its frame synchronisation;
- frame and packet synchronisation in general;
- all of the receiver's synchronisation, frequency-correction and equalisation
  algorithms, which exist only as system simulations.
