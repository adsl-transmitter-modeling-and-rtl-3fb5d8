# ADSL (G.lite) DMT transmitter in SystemVerilog

This is the downstream half of an ADSL modem. It takes a stream of user
bytes and turns it into the sampled line signal: one real-valued DMT
(discrete multi-tone) symbol of 272 samples at a time. Each symbol carries
the data on up to 127 tones of a 256-point inverse FFT. The chain follows
the G.lite transmitter:

```
user bytes
   |
   v
framer + CRC-8 ---> scrambler ---> Reed-Solomon ---> convolutional ---> tone ordering +
(68 frames per      d(n)=D(n)^      encoder          interleaver        constellation encoder
 superframe)        d(n-18)^d(n-23) (+R bytes per S  (byte I delayed    (bit table, QAM,
                                     frames)          (D-1)*I)           sync symbol)
                                                                            |
                                                                            v
                                line samples <--- cyclic prefix <--- 256-point IFFT
                                (272 per symbol)   (+16 samples)      (Hermitian, real out)
```

Every stage is a valid/ready stream. Stalls therefore propagate in both
directions, and the sample consumer sets the pace. All framing parameters
can be programmed at run time: K bytes per frame, S frames per codeword, R
parity bytes, interleave depth D, the per-tone bit allocation and the tone
order. The reference setting used throughout is 127 tones × 8 bits, K = 126,
S = 4, R = 4, D = 2.

## Reference setting in numbers

| quantity | value |
|---|---|
| tones carrying data | 127 (tone 0, DC, is unused) |
| bits per data symbol | 127 × 8 = 1016 = 127 bytes |
| user bytes per frame K | 126 (plus R/S = 1 parity byte = 127 per symbol) |
| RS codeword | S·K + R = 4·126 + 4 = 508 bytes = 4 symbols |
| superframe | 68 data symbols + 1 sync symbol |
| samples per symbol | 256 (IFFT) + 16 (prefix) = 272 |
| clocks per symbol, no stalls | 1407 (measured), i.e. ≥ 5.7 MHz for 4059 symbols/s |

## Superframes and the CRC byte (`adsl_framer`, `adsl_crc8`)

User bytes are cut into data frames of K bytes, and 68 frames form a
superframe. The first byte of frame 0 is not user data. It carries the
8-bit CRC of all user bytes of the *previous* superframe, so the CRC of
superframe n travels in superframe n+1. The first superframe carries 0.
While the CRC slot is on the output the framer holds its input (`in_ready`
low), so the user stream simply pauses for one byte per superframe.

The CRC is crc(D) = M(D)·D⁸ mod (D⁸+D⁴+D³+D²+1). The hardware is the plain
bit-serial division register. Its eight bit steps are unrolled so that it
absorbs one byte per clock. The MSB of each byte is the earlier bit, a
convention shared by the CRC, the scrambler and the bit extraction for the
tones.

The 69th symbol of a superframe, the sync symbol, carries no bytes. It is
added later, by the constellation encoder.

## Scrambler and Reed-Solomon encoder (`adsl_scrambler`, `adsl_rs_encoder`)

The scrambler is self-synchronising: d(n) = D(n) ⊕ d(n−18) ⊕ d(n−23). It
keeps 23 bits of output history, starts from zero and processes a byte per
clock.

The RS encoder is systematic over GF(256), with field polynomial
x⁸+x⁴+x³+x²+1 and generator G(D) = Π(D + αⁱ) for i = 0..R−1. The
generators for R = 4, 8 and 16 are computed at elaboration, and `cfg_r`
selects one at run time (R = 0 disables the code). Message bytes pass
straight through while a 16-stage division register absorbs them. After
the K·S-th byte the input is held for R clocks while the parity c₀…c_{R−1}
is shifted out, c₀ first. The register is cleared after every codeword, so
R may change between codewords.

The reference codeword is 508 bytes, longer than the 255 symbols of a true
GF(256) RS code. The encoder still computes M(D)·D^R mod G(D) for it, as
the model this design follows does. Such a codeword has the remainder
property, but not the full error-correcting power of an RS code. For real
use, keep K·S + R ≤ 255.

## The interleaver (`adsl_interleaver`)

This is the least obvious block. The rule is simple: byte I of each
N-byte codeword leaves (D−1)·I byte periods after it arrives. The
implementation is one circular buffer of `DEPTH` bytes (8192) and a
free-running step counter t:

* at step t the arriving byte with index I is written to address
  t + (D−1)·I (mod DEPTH);
* the byte stored at address t is read out in the same step;
* a byte with zero delay (I = 0, or D = 1) bypasses the buffer.

Each step takes one byte in and gives one byte out. Byte (c, I) leaves at
step c·N + D·I, and these times are all distinct only if gcd(D, N) = 1.
Because D is a power of two, an **even** N would make two bytes compete for
one slot. The reference codeword (508 bytes, D = 2) is such a case. The
ADSL standard's remedy is used: for even N (and D > 1) a dummy byte is put
in front of every codeword. The codeword becomes odd, N' = N+1. The dummy
has index 0 and zero delay, so it enters and leaves in the same step and is
simply dropped. No flag needs to be stored, and the output stream contains
no dummies. In that step `in_ready` is low, and the step is reported on
`dummy_step`.

Slots that no byte has reached yet (the first (D−1)·(N'−1) outputs after
reset) read as zero. For that the buffer is cleared after reset, one
address per clock, so the block accepts nothing for DEPTH clocks
(8192 clocks at the default). The constraint is (D−1)·(N'−1) < DEPTH. The
reference setting needs 508 bytes of delay. The worst case the rules allow
with that codeword, D = 16, needs 7620.

## From bytes to tones (`adsl_const_encoder`)

Two tables describe a symbol:

* the **bit allocation table**, holding b = 0 or 2..`cfg_bmax` bits per
  tone, with `cfg_bmax` set from 8 to 15. Writes of 1 bit, or of more than
  `cfg_bmax`, are refused with a one-clock `tbl_err`;
* the **tone order table**, giving which tone is served at each of the 127
  positions (reset value 1, 2, …, 127). It must be a permutation: every tone
  must be served once per symbol, because the IFFT does not clear its
  memory. It can be written entry by entry. Alternatively, a pulse on
  `ord_build` derives it from the bit table. Tones are then ordered by
  increasing bit count, with ties broken by tone index, which is the ADSL
  standard's tone ordering. The build is a counting pass over the 16
  possible bit counts and takes 16 × 127 = 2032 clocks. During that time
  `ord_busy` is high and no tone is sent.

Incoming bytes feed a 24-bit bit queue. For each position the encoder takes
b bits; the first bit taken is v₀. It then emits the QAM point for the tone:

* even b: X = (v_{b−1} v_{b−3} … v₁ 1), Y = (v_{b−2} … v₀ 1), each read as a
  two's-complement number (the ADSL rule);
* odd b: X = (v_{b−1} … v₂ v₀ 1), Y = (v_{b−2} … v₁ 1). This rectangular grid
  is a simplification; the standard uses cross-shaped constellations.

Tones with b = 0 send (0, 0). Bits do not have to end on a byte boundary at
the end of a symbol: leftovers stay in the queue for the next symbol, so
loadings such as 127 × 4 = 508 bits per symbol work. After 68 data symbols
comes a sync symbol. It sends, on tones 1..127 in natural order, 4-QAM
points made from the pseudo-random sequence d(1..9) = 1,
d(n) = d(n−4) ⊕ d(n−9), restarted for each sync symbol. Nothing is sent
until `tx_en` is raised, which is the point at which the tables have been
loaded.

## IFFT and cyclic prefix (`adsl_ifft`, `adsl_cyclic_prefix`)

Tone k with point Z = X + jY is written at FFT bin k, and its conjugate at
bin 256−k. Bins 0 and 128 are zero, so the transform output is real: one
symbol of 256 samples, x(n) = Σₖ 2·(Xₖ cos 2πkn/256 − Yₖ sin 2πkn/256).

The engine is an in-place radix-2 decimation-in-time IFFT:

* bins are stored at bit-reversed addresses;
* 8 stages × 128 butterflies run at one butterfly per clock, in a
  two-read/two-write array of 256 complex 18-bit words;
* twiddles are Q1.14, computed with `$cos`/`$sin` at elaboration.

Points enter multiplied by 2⁸ and each stage halves its result with
rounding. The output is therefore the sum above at unit scale, and at most
±92 000 for 9-bit points, which fits in 18 bits. The error against the
exact sum stays below 5 LSB in all tests.

The cyclic prefix stage stores the 256 samples of a symbol. It then sends
samples 240..255 followed by 0..255, which gives 272 per symbol.
`out_sym_first`, `out_prefix` and `out_sym_last` mark the positions.

## Timing

* IFFT: one clock per tone to load, then 1024 clocks of butterflies, then
  256 clocks of output. The first sample appears exactly 1024 clocks after
  the last tone.
* Cyclic prefix: it starts sending the clock after the 256th sample arrives,
  and sends 272 samples in 272 clocks. Because it holds its own copy, it
  sends while the IFFT loads and computes the next symbol.
* Steady state: 1407 clocks per symbol, set by the single-buffered IFFT
  (127 + 1024 + 256). A real-time G.lite transmitter (69 symbols per 17 ms)
  therefore needs a clock of at least about 5.7 MHz.
* The stages overlap as a pipeline, so symbols leave at a steady rate. A
  schedule that ran the stages one after another on a single processor
  would instead produce bursts of symbols separated by silent periods.
* Start-up: after reset the interleaver's 8192-clock clearing comes first.
  The constellation encoder waits for `tx_en`.

## Top-level interface (`adsl_tx`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `tx_en` | in | start sending symbols (tables loaded) |
| `cfg_k[7:0]`, `cfg_s[4:0]`, `cfg_r[4:0]`, `cfg_d[4:0]` | in | K, S, R ∈ {0,4,8,16}, D ∈ {1,2,4,8,16}; stable while data flows |
| `cfg_bmax[3:0]` | in | largest bits per tone (8..15) |
| `tbl_we`, `tbl_tone[6:0]`, `tbl_bits[3:0]`, `tbl_err` | in/out | bit allocation table write and refusal |
| `ord_we`, `ord_pos[6:0]`, `ord_tone[6:0]` | in | tone order table write |
| `ord_build`, `ord_busy` | in/out | build the tone order from the bit table (2032 clocks) |
| `in_valid`, `in_ready`, `in_data[7:0]` | in/out/in | user bytes |
| `out_valid`, `out_ready`, `out_sample[17:0]` | out/in/out | line samples (signed) |
| `out_sym_first`, `out_prefix`, `out_sym_last` | out | symbol position of the sample |
| `ev_crc`, `ev_parity`, `ev_dummy`, `ev_sync` | out | one-clock events: CRC byte, parity byte, interleaver dummy step, sync tone |

An assertion in `adsl_tx` checks the configuration rules whenever user
data is offered: R ∈ {0,4,8,16}, S and D ∈ {1,2,4,8,16}, and R/S an
integer.

Parameters: `SF_FRAMES` (68 data symbols per superframe) and `IL_DEPTH`
(8192 interleaver bytes). The sum of the allocated bits should be
8·(K + R/S) for symbols to line up with frames. This is not checked; a
mismatch only shifts data across symbol boundaries.

## What is specified and what is chosen here

Taken from the G.lite transmitter description this design follows:

* the block chain;
* the CRC and scrambler polynomials;
* R ∈ {0,4,8,16} per S ∈ {1,2,4,8,16} frames;
* the interleaving rule and depths;
* 128 sub-channels with 2..15 bits and a programmable maximum of 8..15;
* the 256-point IFFT and the 16-sample prefix;
* 68 data frames plus a sync frame per superframe;
* the CRC in the first byte of frame 0 of the next superframe;
* the reference setting.

Choices of this design, made where the description is silent or defers
to the standard:

* **RS code**: the field polynomial and generator roots.
* **Constellations**: the even-b mapping, the simplified odd-b grid, and no
  per-tone gains.
* **Sync symbol**: its pattern.
* **Dummy byte**: the dummy byte for even codewords.
* **Bits and reset**: serial bit order, v₀ as the first bit, reset states,
  and the CRC of the first superframe being 0.
* **CRC coverage**: the CRC covers user bytes only.
* **Hardware structure**: all flow control, the IFFT architecture, word
  widths and scaling, the buffer sizes and `tx_en`.
* **Frames per CRC**: the superframe/CRC grouping uses 68 data frames.
  Dataflow schedules that group the CRC over 69 frames also exist for this
  transmitter; here the 69th symbol is the data-free sync symbol.

Not built:

* the initialization that computes the bit allocation from the channel
  (the tables are inputs instead);
* the receiver;
* a separate non-interleaved (fast) path;
* trellis coding;
* anything after the sample stream (DAC, line driver).

The worst-case loading of 16 bits on every tone cannot be configured,
because the bit table is limited to 15.

## Verification

Every block has a self-checking testbench in `tb/`. Each one drives random
data with random valid gaps and random back-pressure, and compares the
block against reference models in `tb/tb_adsl_ref_pkg.sv`. These models
are written independently of the RTL:

* CRC and RS parity by polynomial long division;
* GF(256) through log/antilog tables;
* the scrambler on bit arrays;
* the interleaver by scheduling every byte at its output time;
* the IFFT as a direct real sum.

| testbench | what it shows |
|---|---|
| `tb_adsl_crc8` | remainders of random messages, hold, clear priority |
| `tb_adsl_framer` | CRC slot placement and value over 6 short superframes, frame marks |
| `tb_adsl_scrambler` | 2000-byte stream vs. reference; descrambling restores the input |
| `tb_adsl_rs_encoder` | R = 0/4/8/16, zero syndromes at α⁰..α^{R−1}, parity phase exactly R clocks, the 504+4 reference codeword |
| `tb_adsl_interleaver` | odd/even N, D = 1..16, clearing time, dummy steps |
| `tb_adsl_const_encoder` | random allocation and order, odd and even b, refused writes, sync symbols, order built from the bit table |
| `tb_adsl_ifft` | five symbols incl. full-scale, ≤ 6 LSB error, 1024-clock latency |
| `tb_adsl_cyclic_prefix` | 240..255, 0..255 order, flags, 272-clock symbol |
| `tb_adsl_tx` | full chain at default parameters, reference setting, two whole superframes (138 symbols, 37 536 samples); counts CRC bytes, parity bytes, dummy steps, sync tones, prefix samples, stalls, a refused table write and the order build |
| `tb_adsl_tx_loads` | full chain at 4 bits/tone (non-byte-aligned symbols), 15 bits/tone with shuffled order, and a random 0/2..15 allocation with R = 8, D = 8 and the order built by `ord_build` |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
To run one with Verilator 5:

```
verilator --binary --timing --top-module tb_adsl_tx -y rtl -y tb +libext+.sv \
    rtl/adsl_pkg.sv tb/tb_adsl_ref_pkg.sv tb/tb_adsl_tx.sv
./obj_dir/Vtb_adsl_tx
```

Replace `tb_adsl_tx` with any other testbench name. The full-chain test
finishes in a few seconds.

## Files

* `rtl/adsl_pkg.sv`: shared constants and GF(256)/generator functions.
* `rtl/adsl_crc8.sv`, `rtl/adsl_framer.sv`, `rtl/adsl_scrambler.sv`,
  `rtl/adsl_rs_encoder.sv`, `rtl/adsl_interleaver.sv`,
  `rtl/adsl_const_encoder.sv`, `rtl/adsl_ifft.sv`,
  `rtl/adsl_cyclic_prefix.sv`: the stages.
* `rtl/adsl_tx.sv`: the top level.
* `tb/`: testbenches and `tb_adsl_ref_pkg.sv`.
