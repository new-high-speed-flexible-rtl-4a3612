# Turbo-block codec with both trellises terminated

This is synthesizable SystemVerilog for a turbo encoder and a soft-output Viterbi
(SOVA) turbo decoder. They work on independent blocks of up to 440 information
bits, one extended ATM cell. It follows the scheme of the paper *New High Speed
Flexible Turbo-Block-Decoding*, written for the MEDIAN 60 GHz wireless ATM LAN.

Every block must be decoded on its own. A turbo code runs the data through a
recursive convolutional encoder twice: once in natural order and once
interleaved. Tail bits can return the first pass to the zero state. The
interleaved pass normally ends in an unknown state, so the second component
decoder works on an open trellis. That costs coding gain and causes an error
floor.

In this scheme, the encoder and the interleaver are arranged so that **both passes
end in state 0**. Both SOVA decodings can then use a known start and end state.
The block length N can change from one block to the next, up to the size of the
interleaver.

The parameter defaults give the paper's main configuration:

| Parameter | Value |
|---|---|
| Code | RSC {13,15} |
| Memory | 3 (8 states) |
| Tail bits | 3 |
| Interleaver entries | 443 |
| Truncation path length | 28 |

## The termination trick

The component code is recursive systematic. Its feedback polynomial is
G1(D) = 1 + D² + D³ and its parity polynomial is G2(D) = 1 + D + D³ (octal 13
and 15). A recursive encoder that starts in state 0 ends in state 0 exactly when
the input polynomial is divisible by G1.

G1 divides 1 + D⁷, so D⁷ ≡ 1 modulo G1. This means a bit's effect on the final
state depends only on its position modulo 7. In the paper's terms, the *reset
polynomial* has grade 7. Three steps follow from this:

1. **Tail bits.** After the N data bits, the termination logic feeds
   3 tail bits. Each tail bit is `a(k-2) xor a(k-3)`, which makes the register
   input zero, so the first pass ends in state 0. The data and tail bits
   (L = N + 3 of them) together form a sequence that G1 divides.
2. **Interleaver rule.** Suppose the interleaver moves every bit only to a
   position with the same value modulo 7, that is pi(p) mod 7 = p mod 7. Then the
   interleaved sequence has the same remainder modulo G1, which is zero. The
   second pass therefore also ends in state 0, without any extra tail bits.
3. **Zero bits.** L need not be a multiple of 7. Between the passes the encoder
   is fed N0 = ⌈L/7⌉·7 − L zero bits. For N = 440, L = 443 and N0 = 5. During
   these bits the interleaver is not clocked and the encoder output is
   discarded. Nothing extra is sent, and N is not tied to a multiple of 7.

The rule in step 2 limits which interleavers can be used. A plain row/column
interleaver does **not** meet it. For L = 443, a 22-row × 21-column array is
written by rows and read by columns. Then 378 of the 443 bits change their
position modulo 7, and the second pass does not end in state 0.

Valid patterns shuffle positions only within each residue class modulo 7. The
testbenches build their patterns this way: `make_pattern` in
`tb/turbo_ref_pkg.sv` takes the positions t ≡ k (mod 7) of each class k and
permutes them at random. The pattern is not fixed in hardware. The host loads it
into both ends, so any pattern that meets the rule can be used, for example one
picked by a search over the code's weight distribution. The encoder reports on
`term_ok` whether both passes of the last block ended in state 0, which shows
when a pattern breaks the rule.

## Encoder (`turbo_encoder`)

One `rsc_encoder` is used for both passes. The pass is chosen by three switches:

| Phase | Encoder input | Interleaver buffer | Sent |
|---|---|---|---|
| DATA (N steps) | data bit | written | X, Y1 |
| TAIL (3 steps, S1) | tail bit from the state | written | X, Y1 |
| ZERO (N0 steps, S3) | 0 | stopped | nothing |
| INTL (L steps, S2) | buffer[pi(p)] | read | Y2 |

The transmitted stream is `X(0) [Y1(0)] X(1) [Y1(1)] … X(L-1) [Y1(L-1)]`
followed by `[Y2(0)] … [Y2(L-1)]`. A bracketed symbol is sent only if the
puncturing keeps it. `out_kind` labels each symbol as X, Y1 or Y2.

The systematic bits of the interleaved pass are never sent, since the decoder
rebuilds them from X.

Puncturing uses a periodic mask for each parity stream (`punct_cfg_t`):

| Mode | Period | Y1 mask | Y2 mask | Symbols for N = 440 |
|---|---|---|---|---|
| Rate 1/2 (default, `PUNCT_RATE_HALF`) | 2 | 01 | 10 | 886 |
| Rate 440/619 | 5 | phase 3 | phase 4 | 443 + 88 + 88 = 619 |
| Rate 1/3 | 1 | 1 | 1 | all |

Timing with the output always ready:

- each data or tail step takes 1 cycle, or 2 cycles if Y1 is kept;
- each zero bit takes 1 cycle;
- each interleaved step takes 1 cycle.

For N = 440 at rate 1/2, a block takes 1 + 443 + 222 + 5 + 443 = 1114 cycles
from `start` to `done`. Both streams use valid/ready handshakes. A new block
may start once `busy` is low.

In the data phase, X(t) and Y1(t) depend on the current information bit, so
`out_valid` follows `in_valid`. A source that drops its data bit while the sink
stalls also withdraws the pending symbol. Hold the input valid until it is taken
if the sink needs a symbol held once offered. An assertion checks that the
symbol is held in the other phases.

## Decoder (`turbo_decoder`)

The decoder has one SOVA unit, four small memories and a control FSM:

- **Input stage.** Incoming soft symbols are written to the X, Y1 and Y2
  buffers in the transmitted order. Each punctured parity position is filled with
  0, meaning no information. Soft values are 6-bit two's complement, with
  positive meaning a one.
- **Half-iterations.** Each iteration has two halves that use the same SOVA unit:
  - Half 1 steps t = 0…L−1 over X(t) and Y1(t).
  - Half 2 steps p = 0…L−1 over X(pi(p)) and Y2(p).

  Both halves start and end in state 0.
- **Extrinsic memory.** One memory E holds the extrinsic values in natural order.
  Half 1 reads and writes E(t). Half 2 reads and writes E(pi(p)), so it
  interleaves on reading and de-interleaves on writing.

  Each location is read when its step is fed. It is written when its output
  comes out, which is always later, so one memory is enough.

  The a-priori value is 0 during the first half of the first iteration.
- **Extrinsic value.** For each output, Le = LLR − X − La. Le is multiplied by
  the weighting factor `ext_weight`/8 (0…15/8) and saturated to 7 bits.
  `sat_count` counts how many values were clipped.
- **Decisions.** In the last half, the hard decisions are written de-interleaved
  into a bit buffer. The N information bits are then streamed out in order.
  `iterations` can be set from 1 to 7.

Timing, with L = N + 3:

- **Input:** one cycle per received symbol, plus one cycle per punctured Y2
  position.
- **Each half-iteration:** L + min(L, 28) + 3 cycles.
- **Output:** one cycle per bit.

The testbenches check these counts exactly.

For N = 440 at rate 1/2 with 2 iterations, a block takes:

| Stage | Cycles |
|---|---|
| Input | 665 + 443 |
| Decoding | 1 + 4 × 474 = 1897 |
| Output | 440 |
| **Total** | **about 3445** |

That is about 3445 cycles for 886 channel symbols. The paper's 30 Mbit/s of
channel data would need a clock of about 117 MHz. Input, decoding and output of
a block do not overlap. Double-buffering the input would hide the input time.

## SOVA unit (`sova_decoder`)

The SOVA unit decodes one trellis step per cycle and works by register exchange.

**Branch metrics.** A branch that carries systematic bit u and parity c adds
u′·a + c′·y to the path metric, where u′, c′ = ±1 and a = X + La. The 8 new
metrics are normalised each step by subtracting the new metric of state 0. The
spread between states is bounded, so 14 bits hold the metrics.

**Add-compare-select.** Each state keeps the better of its two incoming paths.
It also keeps Δ, the metric difference to the discarded path. Δ saturates at 511.

**Register exchange.** Each state holds the last U = 28 decided bits of its
survivor, plus a reliability for each bit. When a state takes over a survivor:

- the new bit gets reliability Δ;
- every older bit where the survivor and the discarded path differ gets
  min(reliability, Δ).

This is Hagenauer's update rule. It costs 8 × 28 path bits and 8 × 28 9-bit
reliabilities, with one comparator for each.

**Output.** A bit leaves the window 28 steps after it entered, read from the
state with the best metric. It gives the hard bit and a soft output of
±reliability/2. The halving puts the soft output back on the scale of the input
values. When the input ends, the last min(L, 28) bits are read from state 0, the
known end state. Output j appears exactly 28 cycles after input step j.

The output magnitude is an upper bound of the max-log-MAP value. With the window
covering the whole block, the decisions are maximum-likelihood. The testbench
checks both properties by exhaustive search on short blocks.

**Reliability width.** The reliabilities are 9 bits wide. The SOVA output must
be able to exceed the largest input value (X + La, up to ±95). If it cannot, the
extrinsic value Le = LLR − X − La changes sign on strongly received bits. With
7-bit reliabilities this broke noise-free decoding in the tests.

## Changing sizes and word lengths

The paper's FPGA decoder was made adaptable by rebuilding it. Here the same
settings are module parameters of `turbo_codec` and `turbo_decoder`:

| Parameter | Meaning | Default |
|---|---|---|
| `N_MAX` | largest block; the interleaver and buffers hold `N_MAX + 3` entries | 440 |
| `U` | truncation path length | 28 |
| `W_CH` | channel soft-value width | 6 |
| `W_EXT` | extrinsic-value width | 7 |
| `W_REL` | SOVA reliability width | 9 |

The SOVA input width and the path-metric width follow from these. Keep
2^(W_REL−1) above the largest |X + La| (see the reliability-width note above).
Block length, iteration count, weighting factor, puncturing and interleaver
pattern are set at run time.

## Top level (`turbo_codec`)

The top level places the encoder and the decoder side by side. It has one
pattern-load port (`pi_we`, `pi_waddr`, `pi_wdata`; entry p = pi(p)) that writes
both interleaver tables. Each side has its own start, configuration and streams,
so a channel model can sit between `enc_out_*` and `dec_in_*`. In the paper a
host PC controls the system and applies the channel distortion. In the
testbenches, the testbench code takes both roles.

Reset is asynchronous and active low. The interleaver table and the buffers are
RAM without reset. Load the pattern before the first block.

## Files

| File | Contents |
|---|---|
| `rtl/turbo_pkg.sv` | sizes, puncturing type, RSC next-state/parity/tail functions |
| `rtl/rsc_encoder.sv` | RSC {13,15} encoder with tail-bit logic |
| `rtl/interleaver_table.sv` | loadable permutation memory, two read ports |
| `rtl/soft_ram.sv` | soft-value memory, two asynchronous read ports |
| `rtl/turbo_encoder.sv` | pass sequencing, zero bits, puncturing |
| `rtl/sova_decoder.sv` | SOVA component decoder |
| `rtl/turbo_decoder.sv` | depuncturing, iteration control, extrinsic handling |
| `rtl/turbo_codec.sv` | top level |
| `tb/turbo_ref_pkg.sv` | reference encoder, pattern generator, noisy channel model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It runs
in well under a second, the full-size end-to-end test included. For example:

```sh
verilator --binary --timing -Wno-fatal --top-module tb_turbo_codec \
  -y rtl -y tb +libext+.sv rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/tb_turbo_codec.sv
./obj_dir/Vtb_turbo_codec
```

| Testbench | What it checks |
|---|---|
| `tb_rsc_encoder` | parity and state against a shift-register model; termination from any state; that 1 0⁶ 1 returns to state 0 and shorter gaps do not (grade 7) |
| `tb_interleaver_table` | load and random read-back on both ports |
| `tb_turbo_encoder` | 16 blocks of several lengths (1 to 440, with and without zero bits) and three puncturing patterns, symbol by symbol against the reference encoder; `term_ok`; exact cycle counts; back-pressure |
| `tb_sova_decoder` | ML decisions and the max-log bound by exhaustive search; exact output latency, flush and `done` timing; noise-free and noisy 443-step blocks |
| `tb_turbo_decoder` | decoding of reference-encoded blocks: noise-free exact, noisy with large error reduction; exact decoding cycle counts; one bit per cycle; weighting factor 0 |
| `tb_turbo_codec` | end to end at the default sizes (see below) |
| `tb_decoder_config` | the decoder rebuilt with 5/6/8-bit word lengths and U = 16, same checks as `tb_turbo_decoder` |
| `tb_median_workloads` | the rate-1/2 and rate-5/7 configurations with 1–3 iterations, error counts (see below) |

`tb_turbo_codec` encodes, passes the symbols through an AWGN-like channel and
decodes. It covers:

- N = 440, 116, 100 and 60;
- rate 1/2, 440/619 and 1/3;
- 1, 2 and 3 iterations;
- encoder stalls, decoder input gaps and extrinsic saturation;
- counts of each mechanism, each of which must occur.

At about 3.6 % channel errors, the rate-1/2 N = 440 block decodes without errors
after three iterations.

`tb_median_workloads` runs the two configurations the codec was evaluated in.
Each is run on twelve 440-bit blocks, decoding the same noisy data with 1, 2 and
3 iterations:

| Configuration | Hard-decision errors on the channel | After 1 iteration | After 2 | After 3 |
|---|---|---|---|---|
| Rate 1/2, 886 symbols per block | 585 (11 %) | 206 | 81 | 51 |
| Rate 440/619 | 193 (4 %) | 9 | 4 | 2 |

All counts are out of 5280 bits. The step from one to two iterations gains more
than the step from two to three, and the testbench checks this. Six-bit
quantisation and the lack of tuned extrinsic weighting make this stronger.

## What is this design's own choice

The paper fixes the code, the termination scheme, the block and interleaver
sizes, SOVA decoding, the truncation path length of 28, and the run-time
flexibility: block length, iterations, extrinsic weighting and interleaver
pattern. It does not give the following, which are choices made here:

- the decoder's hardware organisation: one time-shared SOVA unit, buffer layout,
  no overlap between blocks;
- the SOVA's register-exchange structure, metric form and normalisation;
- all word lengths:

  | Value | Width |
  |---|---|
  | Channel values | 6 bits |
  | Extrinsic values | 7 bits |
  | Reliabilities | 9 bits |
  | Path metrics | 14 bits |

- the puncturing patterns;
- the order of symbols in the stream;
- the handshakes and the reset.

The paper's MEDIAN measurements also had DQPSK-OFDM modulation, a host PC and
an FPGA board. None of these is part of this RTL. The "old" scheme that the paper
compares against, with only the second decoder terminated, is not implemented.

No pattern for the rate-5/7 or rate-1/2 modes has been tuned for coding gain,
and the bit-error-rate curves have not been reproduced. The tests show correct
function and clear error correction, not the paper's measured gains.
