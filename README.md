# Flexible radix-4 dual-path turbo decoder (QPSK 1/2 and 8-PSK 2/3)

This is synthesizable SystemVerilog for a high-speed turbo decoder that serves two
transmission modes with one binary decoder:

* **half-rate QPSK**: an ordinary rate-1/2 turbo code (two 8-state RSC encoders,
  parity alternately punctured), one information bit per symbol;
* **two-thirds-rate 8-PSK** (turbo-coded pragmatic TCM): each 8-PSK symbol carries
  the turbo-coded bit pair (u1, c) plus one uncoded bit u2.

The 8-PSK mode needs no second decoder. A *coset symbol transformer* doubles the
phase of each received 8-PSK sample, which folds the two antipodal points that differ
only in u2 onto one QPSK point. The binary turbo decoder then decodes u1 as if QPSK
had been sent. u2 comes back afterwards: the decoded u1 is re-encoded, and the
re-encoded label together with the received phase sector decides u2.

Decoding speed comes from four techniques that are combined:

1. **radix-4**: two trellis steps per clock;
2. **dual-path processing**: the forward and backward recursions run at the same time;
3. **parallel mode**: both component decoders run in the same clocks;
4. **hard-decision-aided (HDA) early stop**: decoding stops once the two decoders agree.

A block of N = 212 information bits is decoded in 110 clocks per iteration, so 330
clocks for three iterations.

## Block flow

```
 in_x,in_y ──┬─► coset transformer ─┐
             │                      ├─► MUX ─► demux ─► RX RAM (DEC1, natural)
             │   (QPSK: bypass) ────┘                └► RX RAM (DEC2, via interleaver)
             └─► phase sector quantizer ─► phase RAM (3 bits / symbol)

   ┌──────────── iteration i (both at once) ─────────────┐
   │ DEC1: RX1 + ext2[i-1]  ─► ext1[i], bit LLRs, hd1    │
   │ DEC2: RX2 + ext1[i-1] (interleaved) ─► ext2[i], hd2 │
   └──────────── HDA: hd1 == hd2 or i == MAX_ITER ───────┘
                         │
   L1 + L2 ─► hard decision u1 ─► re-encoder ─► c ─┐
                                 phase sector ─────┴─► UCD ─► u2
   P/S output: {u2[2n+1], u1[2n+1], u2[2n], u1[2n]} per clock
```

The top module is `flex_turbo_decoder`. Its phases are:

* **Load**: N samples, one per clock.
* **Decode**: one to MAX_ITER iterations of K + 4 clocks each, with K = N/2 = 106 pairs.
* **Output**: K clocks, one pair of symbols per clock.

The decoder takes no new samples until a block has left.

## The component decoder: radix-4, dual path (`map_r4dp`)

The hardest part to follow is the component decoder. Each of DEC1 and DEC2 is one
instance of `map_r4dp`.

**Code and trellis.** Each component code is an 8-state RSC code with feedback
polynomial 1 + D + D³ (15 octal) and parity polynomial 1 + D + D² + D³ (17 octal).
The decoder merges two radix-2 steps into one radix-4 step:

* A step consumes the information pair (u1, u2). Pair value n = 2·u2 + u1.
* Each state has four incoming and four outgoing branches, one per pair value.
* A branch carries the 4-bit codeword {u1, p1, u2, p2}. The 16 codewords have the
  16 branch metrics `bm0000`…`bm1111`.
* `turbo_pkg::r4_next` and `r4_cw` give the next state and the codeword of every
  (state, pair) combination. All the arithmetic units are loops over them.

**Metrics (max-log).** All metrics are in the log domain, and sums of exponentials
are replaced by maxima:

* **Branch metric** (`r4_bmu`): bm = u1·I1 + p1·Q1 + u2·I2 + p2·Q2 + Ex[n]. A 0 bit
  adds nothing.
* **State metrics** (`r4_smu`): an add-compare-select over the four branches per
  state. The result is normalised so that the best state is 0.
* **Pair LLRs** (`r4_llru`): LLRn = max over states of α + bm + β, normalised so
  that the largest is 0.
* **Extrinsic output** (`ext_alu`): subtract the systematic part u1·I1 + u2·I2 and
  the a-priori Ex[n] from each pair LLR, then reference the result to n = 0. This
  gives four 9-bit values Ex0..Ex3 (Ex0 = 0), which fill a 36-bit word.
* **Bit LLRs** (also in `ext_alu`): L(u1) and L(u2), computed by a max over pair
  values, for the hard decisions.

**Dual-path schedule.** With H = K/2 = 53, clock t = 0…K−1 of a half-iteration runs
as follows:

| clocks | forward path (pair t) | backward path (pair K−1−t) |
|---|---|---|
| t < H | α_t is written to the forward state metric RAM (64 × 72), α advances | β_(t'+1) is written to the backward RAM at t'−H, β steps back |
| t ≥ H | LLR of pair t from the running α_t, bm_t and β_(t+1) read from the backward RAM | LLR of pair K−1−t from the running β, bm and α read from the forward RAM |

So the two recursions meet in the middle. From then on, every clock yields two pair
results:

* forward results for pairs H…K−1, in rising order;
* backward results for pairs H−1…0, in falling order.

Each half-iteration costs K clocks instead of 2K. A state metric word holds eight
9-bit metrics (72 bits). Each RAM holds half a block (53 of its 64 words).

**Pipeline.** All times count from the clock in which `start` is high:

* The decoder asks for pair addresses `kf = t` and `kb = K−1−t`.
* The caller answers one clock later, as a synchronous RAM does. With the answer
  it gives a tag: the address the result must be written to.
* The branch and state metrics are computed in that same clock.
* The LLR and extrinsic results come out one clock later, with the tag.
* `done` marks the last results, K + 2 clocks after `start`.

**Start values.** α starts in state 0. β starts in state 0 when `beta_term` is set,
which DEC1 uses. Otherwise all β states start equal, which DEC2 uses: the RSC2 trellis
is not terminated.

## Iterations, interleaving and the extrinsic exchange

**Pair interleaver.** The interleaver permutes the K pairs, not single bits, so that
both decoders keep the radix-4 pair structure and exchange four-valued pair
extrinsics. The permutation is pi(j) = (33·j + 5) mod 106 (parameters `ILV_P`,
`ILV_S`). `interleaver_addr` produces pi(t) and pi(K−1−t) incrementally in the same
clock, for the two paths.

**Puncturing (demux).** Symbol k carries the systematic value of bit k and one parity
value:

* an even symbol 2n carries the RSC1 parity of the first bit of pair n;
* an odd symbol 2n+1 carries the RSC2 parity of the second bit of interleaved pair n.

Punctured parities enter the decoders as 0. The two received-symbol RAMs (128 × 32:
I1, I2, Q1, Q2) are filled as follows:

* DEC1's RAM holds pair n at address n.
* DEC2's RAM holds the systematic values at address n and the RSC2 parity of step j
  at address pi(j), filled through lane write enables. DEC2 reads both through
  pi(t), so it sees its own trellis order.

**Parallel mode.** Both decoders start together in each iteration. Each takes as
a-priori input what the other produced in the previous iteration. In the first
iteration that input is zero.

The extrinsic words go into ping-pong pairs of 128 × 36 RAMs. Iteration i writes
bank i mod 2 and reads the other bank, so nothing is overwritten before it is read.
The addressing works as follows:

* DEC1 writes at the natural address n.
* DEC2 writes at pi(j), so its results are stored de-interleaved.
* DEC1 therefore reads DEC2's results in natural order.
* DEC2 reads DEC1's results through the interleaver.

Each RAM port writes in the bank being filled and reads in the other.

**Early stop.** Each decoder keeps a 212-bit hard-decision vector, updated as its
bit LLRs come out. After an iteration, `hda_early_stop` compares the two vectors.
Decoding stops when they agree, if `early_stop_en` is set, or when MAX_ITER
iterations have run.

**Final decision.** The bit LLRs of the last iteration of both decoders are kept in
two 128 × 18 buffers. The output stage adds them and slices the sum (a positive sum
gives 1).

## 8-PSK: coset transform and the uncoded bit

**Coset transform.** `coset_transformer` computes

    x' = √2·cos(2(φ + 5π/8)),   y' = √2·sin(2(φ + 5π/8))

from the phase φ of the received sample:

* φ is found by CORDIC vectoring as a 16-bit binary angle.
* The angle is doubled and 5π/4 is added.
* A CORDIC rotation produces the cosine and sine.
* A unit coordinate becomes ±32, so an ideal point lands on (±32, ±32).

The amplitude of the sample is discarded.

**8-PSK mapping.** With this transform, the 8-PSK points sit at phases m·π/4. The
mapping is m = f(u1, c) + 4·u2, with f(0,0)=0, f(1,0)=1, f(1,1)=2 and f(0,1)=3.
Under this mapping, point m folds onto the QPSK point (2u1−1, 2c−1), the decoder's
convention that a positive value means 1.

**Uncoded bit.** Three blocks recover u2:

* `psq` stores the 3-bit sector s = ⌊φ/(π/4)⌋ of every symbol.
* After decoding, `re_encoder` rebuilds c from the decoded u1. It runs RSC1 in
  natural order and RSC2 in interleaved order, with the same demux as above.
* `ucd` decides u2 = 0 when (s − f) mod 8 ∈ {6, 7, 0, 1}, that is, when the sector
  lies within 90° of point f. Otherwise it decides u2 = 1.

A wrong u1 decision can therefore also corrupt u2 of the same symbol.

## Fixed point

| quantity | bits | note |
|---|---|---|
| received I/Q (r_q) | 8 | signed |
| branch metrics (b_q) | 9 | saturating |
| state metrics (s_q) | 9 | normalised to max = 0, saturating at −256 |
| pair LLRs, extrinsics, bit LLRs (l_q) | 9 | saturating |

Intermediate sums use wider arithmetic before saturation.

## Timing and throughput

One iteration takes K + 4 = 110 clocks:

* 1 start clock;
* K + 2 clocks in the decoders;
* 1 clock for the stopping decision.

Three iterations take 330 clocks. The published FPGA figures are 446 clocks for three
iterations with the same techniques, an 18 ns clock period, and 26.4 Mbit/s. This
RTL needs fewer clocks; where the published implementation spends the extra clocks is
not stated. At 18 ns, 212 bits in 330 clocks would be 35.7 Mbit/s.
No FPGA timing has been run on this code. Its critical path is combinational and
long: a bm → ACS step in one clock, and an LLR → ALU step in one clock.

## Top-level interface (`flex_turbo_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| mode_8psk | in | 1 | 1: 8-PSK rate 2/3 with coset transform; 0: QPSK rate 1/2 |
| early_stop_en | in | 1 | enable the HDA stop |
| in_valid / in_ready | in / out | 1 | sample handshake; ready only while loading |
| in_x, in_y | in | 8 | received sample; QPSK nominal ±40 is fine, 8-PSK any amplitude |
| out_valid, out_last | out | 1 | a decoded pair; the last pair of the block |
| out_bits | out | 4 | {u2[2n+1], u1[2n+1], u2[2n], u1[2n]}; u2 = 0 in QPSK mode |
| iterations | out | 4 | iterations used on the last block |
| decode_cycles | out | 16 | clocks spent decoding the last block |
| busy | out | 1 | a block is in progress |

Parameters:

| parameter | default | meaning |
|---|---|---|
| N | 212 | block length in bits; N/2 must be even and at most 128 pairs with the 7-bit addresses that result |
| MAX_ITER | 3 | iteration limit; up to 15 |
| ILV_P, ILV_S | 33, 5 | interleaver rule |

The transmitter must end RSC1 in state 0 by choosing the last three information
bits, as the testbench model does.

## Design choices beyond the source

The following points were not specified by the source and are choices of this RTL.
They are the first things to revisit when matching another implementation:

* the interleaver permutation and its pair granularity;
* the puncturing pattern;
* termination of RSC1 only;
* max-log arithmetic in place of the exponential (MAP) form;
* metric normalisation;
* the extrinsic reference (Ex0 = 0);
* the 8-PSK bit mapping, the phase sectors and the u2 rule;
* the CORDIC implementation of the transform;
* the output word format;
* all handshakes and pipeline registers.

The RSC polynomials are given two ways round in the source. Here 15 (octal) is the
feedback polynomial and 17 (octal) the parity polynomial. The ALU is labelled
"LLR + ICH − EX" in the source; it is implemented as LLR − ICH − EX, the usual
extrinsic definition. No channel reliability factor (Lc) is applied, because max-log
decoding does not depend on a common scale.

Not part of this RTL:

* the transmitter, which exists only as a testbench model;
* the demodulator;
* the serial-mode and radix-2 reference decoders used for comparison;
* the FPGA board.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| tb_flex_turbo_decoder | End to end, default parameters. 11 random blocks, QPSK and 8-PSK, clean and noisy, with and without early stop. Checks every decoded u1 and u2, the iteration counts, and decode_cycles = iterations·110 ≤ 446. It also counts that channel errors were corrected, that early stops and iteration-limit stops both happened, and that both modes ran. |
| tb_workload_hda | 8-PSK, AWGN at Eb/N0 = 4, 5 and 6 dB, 30 blocks per point, early stop with an 8-iteration limit. Reports the average iterations and the BER. |
| tb_map_r4dp | One component decoder against a RAM model: result order, coverage, latency and tags; decisions from the channel alone, from a-priori values alone, and with β unterminated. |
| tb_r4_bmu, tb_r4_smu, tb_r4_llru, tb_ext_alu | The arithmetic units against reference formulas. The reference uses an independent shift-register model of the RSC code (`tb_rsc_pkg`). |
| tb_coset_transformer, tb_psq, tb_ucd | Against real-valued trigonometry and geometry. |
| tb_interleaver_addr, tb_re_encoder, tb_hda_early_stop, tb_tdp_ram | Sequences, permutation, re-encoded bits, stop rule, RAM contents and lanes. |
| tb_rx_demux, tb_sum_hd | Word layout, pair counting and flags of the demux over three blocks with idle clocks; the sum-and-slice rule on corner and random LLRs. |

Typical workload results (30 blocks per point, so the numbers are coarse):

| Eb/N0 | average iterations | u1 BER | u2 BER |
|---|---|---|---|
| 4 dB | 5.8 | 1.5e-2 | 5.4e-2 |
| 5 dB | 2.8 | 0 | 1.6e-4 |
| 6 dB | 1.8 | 0 | 0 |

These iteration counts are close to the published parallel-mode averages of 4.75,
2.67 and 2.01.

## Simulating

Verilator 5 is enough. Read the package first. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/turbo_pkg.sv tb/tb_rsc_pkg.sv rtl/*.sv tb/tb_flex_turbo_decoder.sv \
  --top-module tb_flex_turbo_decoder -Mdir obj && ./obj/Vtb_flex_turbo_decoder
```

(Verilator accepts the package being named twice; otherwise list the files of
`rtl/` one by one after `turbo_pkg.sv`.) Swap in any other testbench name the same
way. Everything runs in seconds.

## Files

`rtl/`:

* `turbo_pkg.sv`: widths, types and trellis functions
* `flex_turbo_decoder.sv`: top level
* `map_r4dp.sv`: component decoder
* `r4_bmu.sv`, `r4_smu.sv`, `r4_llru.sv`, `ext_alu.sv`: its arithmetic units
* `tdp_ram.sv`: the RAMs
* `interleaver_addr.sv`: interleaver addresses
* `hda_early_stop.sv`: stop rule
* `coset_transformer.sv`, `psq.sv`: 8-PSK input side
* `rx_demux.sv`: input selector and parity demux into per-pair RAM words
* `sum_hd.sv`: sum of both decoders' bit LLRs and hard decision
* `cordic_vec.sv`, `cordic_rot.sv`: CORDIC helpers
* `re_encoder.sv`, `ucd.sv`: 8-PSK output side

`tb/`: one testbench per module, the workload testbench and the reference package
`tb_rsc_pkg.sv`.
