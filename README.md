# 64-point four-parallel pipelined FFT for QPSK-OFDM

This is a streaming 64-point FFT that takes four samples per clock cycle and
computes one transform every 16 cycles. It is built for one kind of input:
symbols of QPSK-modulated OFDM. Every QPSK sample is one of four points,
(±0.707) + j(±0.707). So the first radix-2^2 stage has only a handful of
possible results. That stage therefore has no adders: each sum or difference
is picked by a multiplexer from the few values it can take. The rotation
that follows multiplies one of those few values by a twiddle factor. It uses
a table, shifts and two adders (a *complex constant multiplier*, CCM) instead
of a general complex multiplier. The later stages are an ordinary radix-2^2
feedforward FFT with four parallel lanes: shuffling buffers, radix-2^2
butterflies, and one set of general complex multipliers.

Around the FFT core the top level adds the front end of an OFDM transmitter:

```
bit pairs ──► qpsk_mapper ──► qpsk_sp_buffer ──► fft64_qpsk ──► X[k], 4 bins/cycle
  (1/cycle)   (QPSK symbol)   (64 symbols →       (stages below)    
                               4-parallel frame)
```

The rest of an OFDM chain is not part of this RTL: cyclic-prefix insertion,
the channel and the receiver. The mapper's fixed-point symbols are brought
out on the top's `sym` port for such logic.

## The FFT pipeline

```
          stage 1                         stage 2                                 stage 3
in_code ─► qpsk_r22_stage ─► CCM x3 ─► shuffle 8 ─► shuffle 4 ─► r22_butterfly ─► CM x3 ─► shuffle 2 ─► shuffle 1 ─► r22_butterfly ─► out
 (2 bits   (multiplexers)   (lane 0:   (lane bit 1) (lane bit 0)                 (lane 0:  (lane bit 1) (lane bit 0)
  /lane)                     level→word)                                          delay)
latency:   2                 1          8            4            2               2         2            1            2        = 24
```

| Unit | Module | What it contains |
|---|---|---|
| Stage 1 butterfly | `qpsk_r22_stage` | two substages of multiplexers on the 2-bit QPSK codes |
| Stage 1 rotators | `ccm_rotator` ×3 | table of 1.414·W64^e, shift/negate selection, two adders |
| Shuffling structures | `shuffle_stage` ×4 | delay lines of length L = 8, 4, 2, 1 and 2:1 switches |
| Stage 2 and 3 butterflies | `r22_butterfly` ×2 | 4-input, 4-output radix-2^2 butterfly, 16 real add/sub |
| Stage 2 rotators | `cm_rotator` ×3 | table of W16^e, four real multipliers, two adders |

The count matches the cost formula the architecture is built around. A
radix-2^2 FFT of N points needs 3(log4 N − 2) general multipliers plus 3 CCMs
(each weighed as 0.4 of a multiplier). That is 4.2 multiplier-equivalents
for N = 64. It needs 8(log4 N − 1) = 16 complex adders, because stage 1 has
none.

## Where each sample is: the index bookkeeping

This is the part to understand before you change anything. A sample's place
in the pipeline has two parts: its **lane** (2 bits, 0..3) and its **cycle t
within the 16-cycle frame** (4 bits). Write the input index as
n = n5 n4 n3 n2 n1 n0 and the output index as k = k5 … k0.

| Point in the pipeline | lane bits (1, 0) | cycle bits (3 … 0) | operation |
|---|---|---|---|
| input | n5, n4 | n3 n2 n1 n0 | lane l carries x[16l + t] |
| after stage-1 butterfly | k0, k1 | n3 n2 n1 n0 | rotate lane 2k0+k1 by W64^(t·(k0+2k1)) |
| after shuffle 8 | n3, k1 | k0 n2 n1 n0 | |
| after shuffle 4 | n3, n2 | k0 k1 n1 n0 | |
| after stage-2 butterfly | k2, k3 | k0 k1 n1 n0 | rotate by W16^(t[1:0]·(k2+2k3)) |
| after shuffle 2 | n1, k3 | k0 k1 k2 n0 | |
| after shuffle 1 | n1, n0 | k0 k1 k2 k3 | |
| output | k4, k5 | k0 k1 k2 k3 | 4t + lane = bit reversal of k |

Each radix-2^2 butterfly works only across lanes. Its first substage pairs
lanes 0/2 and 1/3, which is the upper lane bit. Its second substage pairs
lanes 0/1 and 2/3. The trivial −j factor is applied to lane 3 between the two
substages, as a swap of real and imaginary parts with one negation. Because
the first stage's pairs are already on the lanes at the input, stage 1 needs
no shuffling. Each shuffle then swaps one lane bit with one cycle bit. This
brings the next two index bits onto the lanes for the next butterfly. The
twiddle multipliers per lane are therefore 0, 2, 1, 3 for lanes 0..3
(`LANE_MULT` in `fft64_qpsk`). Lane 0 needs no rotator.

**Shuffle circuit.** Take the two lanes that differ in the exchanged lane bit:
upper A and lower B. B goes through a delay of L cycles. While bit log2(L) of
A's frame position is 1, a switch crosses the two paths. The upper path then
goes through a second delay of L. Both outputs have latency L, and each lane
pair holds 2L words. The four shuffles hold 60 complex words in total.

**Output order.** Spectra leave in bit-reversed order: X[k] is in cycle t on
lane l, where 4t + l = bitrev6(k). The `out_bin` port gives k for each lane,
so a consumer can reorder or index the output directly.

## Stage 1 with multiplexers

A QPSK component is coded as one bit: +0.707 → 0 and −0.707 → 1.

* **Substage 1.** The sum of two components is +1.414, 0 or −1.414. So is
  their difference. A 4-input multiplexer picks the value from the two code
  bits. The −j on lane 3 only rewires which bits feed which multiplexer.
* **Substage 2.** A sum or difference of two substage-1 results is 0, ±1.414
  or ±2.828. A multiplexer on the two substage-1 selections produces it.

The results are not turned into 16-bit words here. They leave as **levels**
m ∈ {−2, …, 2}, one 3-bit signed integer per component, meaning m × 1.414.
That is what makes the CCM cheap. For the product (mr + j·mi)·1.414·W, the
CCM reads the constant K = 1.414·W for the sample's position from a 16-entry
table. Each partial product mr·Kr is 0, ±K or ±2K: a selection and a one-bit
shift. Two adders combine the partial products, and the sum is rounded to
the data format. Lane 0 has no rotation, so a five-way multiplexer turns its
level into a data word.

## Number formats and accuracy

* Data: 16 bits per real component (the word length of the design), two's
  complement with 8 fraction bits. The range is ±128 with a step of 1/256.
* Nothing is scaled and nothing saturates. A QPSK sample has magnitude 1, so
  after s radix-2 steps no component exceeds 2^s. The final results are at
  most 64. The format always holds them.
* Twiddles: 16 bits with 14 fraction bits, computed at elaboration from
  `$cos`/`$sin` in `fft_pkg::twiddle`. The CCM table holds 2·0.707·W64^e and
  the CM table holds W16^e.
* Rounding: round half up, once in each rotator.
* KMOD is 0.707, the rounded value, not 1/√2. At 8 fraction bits both give
  the same word, 181.
* Measured error against a double-precision DFT of the same symbols: at most
  0.0135, about 3.5 LSB, over random and worst-case symbols. The testbenches
  allow 6 LSB.

The transform is the forward, unscaled DFT: X[k] = Σ x[n]·W64^(nk), with
W64 = e^(−j2π/64). An OFDM transmitter uses the inverse transform. Getting it
means conjugating the twiddles and using +j in the butterflies. That mode is
not built.

## Interfaces and timing

All blocks share a single clock `clk` and a synchronous, active-high `rst`.
Reset clears only valid flags and counters, not data registers. There is no
back-pressure.

* **`fft64_qpsk`**: `in_valid` and `in_code[4]` (2-bit codes, lane l =
  x[16l + t]); `out_valid`, `out_data[4]` (`cplx_t`) and `out_bin[4]`.
  * A frame is **16 consecutive valid cycles**. Every counter in the
    pipeline counts valid samples modulo 16 to know the frame position. An
    assertion flags an interrupted frame.
  * Frames may follow each other with no gap (one transform per 16 cycles:
    at 20 MHz that is 80 Msample/s) or with any gap.
  * Latency is 24 cycles from a frame's first input cycle to its first output
    cycle. `out_valid` stays high for the frame's 16 cycles.
* **`qpsk_ofdm_fft_top`**: `in_valid` and `in_bits[1:0]`, one pair per cycle.
  `in_bits[1]` sets the in-phase sign and `in_bits[0]` the quadrature sign
  (1 → +0.707, so 11 → (1 + j)·0.707).
  * `qpsk_sp_buffer` stores 64 codes in one of two banks while the other bank
    is read out. Input may pause at any time.
  * A symbol's spectrum starts 28 cycles after its 64th bit pair: 1 cycle in
    the mapper, 3 in the buffer and 24 in the FFT.
  * In the top, the FFT is busy 16 cycles out of every 64, because the input
    is serial. Used on its own, the FFT core accepts a full four-parallel
    stream.

## What follows the source architecture, and what is this design's own

Taken from the architecture:
* 64 points, four-parallel, radix-2^2 feedforward.
* A first stage of multiplexers for QPSK input.
* Three CCMs after stage 1 and three general complex multipliers after
  stage 2.
* Shuffling structures of buffers and multiplexers.
* 16-bit words and the ±0.707 constellation with its 0/1 coding.

Chosen here, because the architecture does not fix them:
* **Index mapping, stage order and buffer lengths.** The lane/cycle mapping
  in the table above, the stage order, and shuffle lengths 8, 4, 2, 1. These
  follow from the radix-2^k feedforward construction the architecture is
  based on.
* **Substage-2 multiplexers.** Their select inputs (the substage-1
  selections).
* **Value set.** The possible substage-2 values are taken as 0, ±1.414 and
  ±2.828 (4 × 0.707).
* **Number formats.** The binary point (8 fraction bits), the twiddle
  precision, the rounding, and the decision not to scale.
* **Pipeline registers.** Where they sit, and hence the latencies 24 and 28.
* **Interfaces.** The valid-only streaming interface and the reset.
* **Mapping and ordering.** The bit-to-symbol mapping beyond 11 → 1 + j. The
  input order x[16l + t] and the bit-reversed output order with `out_bin`.
* **No shuffle before stage 1.** The architecture gives every stage a
  shuffling structure. Here the serial-to-parallel buffer already delivers
  x[n], x[n+16], x[n+32], x[n+48] together, so stage 1 needs none.
* **Serial-to-parallel buffer.** Its whole structure (two banks, one symbol
  per cycle in).

Not built: cyclic-prefix insertion, the channel and the receiver, and an
inverse-transform mode. Area, power and maximum clock rate are not claimed
for this RTL.

## Files

`rtl/` holds one module or package per file:

* `fft_pkg.sv`: sizes, formats, types (`cplx_t`, `qpsk_code_t`, `level_t`),
  twiddle functions.
* `qpsk_mapper.sv`, `qpsk_sp_buffer.sv`: the front end.
* `qpsk_r22_stage.sv`, `ccm_rotator.sv`, `shuffle_stage.sv`,
  `r22_butterfly.sv`, `cm_rotator.sv`: the FFT units.
* `fft64_qpsk.sv`: the FFT core.
* `qpsk_ofdm_fft_top.sv`: the top level.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_fft64_qpsk` compares eight frames with a floating-point DFT. It checks
  the latency (24) and that back-to-back frames leave back to back.
* `tb_qpsk_ofdm_fft_top` runs the full design at its only size on six OFDM
  symbols. It also counts each mechanism: every first-stage level, the CCM
  shift path, every shuffle crossing, both buffer banks, and an input pause.
* The unit testbenches check against integer or floating-point models: all
  256 input combinations of the multiplexer stage, exact 4-point DFTs for
  the butterfly, and tagged samples for the shuffles.

Simulating with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fft_pkg.sv \
          tb/tb_qpsk_ofdm_fft_top.sv --top-module tb_qpsk_ofdm_fft_top
./obj_dir/Vtb_qpsk_ofdm_fft_top
```

Swap in any other testbench name. Each runs in well under a second.
