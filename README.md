# A turbo decoder that mixes Max-Log-MAP and Log-MAP

A turbo decoder runs two soft-in/soft-out (SISO) decoders in turn. Each one
refines the other's opinion of every bit. Each SISO uses the *max\** operator,
ln(e^a + e^b), at every step of its recursions. There are two usual ways to
build that operator:

* **Log-MAP** computes it exactly, as max(a,b) + ln(1 + e^-|a-b|). That gives
  the best error rate, at a higher hardware cost.
* **Max-Log-MAP** drops the correction term and uses max(a,b). It is cheaper
  and faster, and somewhat worse.

This design puts one of each in a single decoder. The first SISO runs
Max-Log-MAP and the second runs Log-MAP. The aim is to land between the two
pure decoders in cost and latency. The decision is taken after the second
SISO, so the final LLRs come from the exact algorithm. The idea and the
overall structure come from A. T. Ali and D. A. Alneema, "Design and Analysis
Combining Two Algorithms in One Turbo Decoder" (IJIRCCE, vol. 8, no. 8, 2020).
Their design was produced with an HLS tool. All micro-architecture here
(schedule, memories, word lengths, interfaces) belongs to this RTL.

The decoder sits in a complete bit-error-rate (BER) test system. The system
generates random bits, turbo-encodes them, sends them over a BPSK/AWGN
channel, decodes them and counts the bit errors. All of it is synthesizable
SystemVerilog.

## The code being decoded

* **Constituent code:** a recursive systematic convolutional (RSC) code with a
  single memory element, G(D) = [1, 1/(1+D)]. The register `s` holds the last
  feedback bit. For input `u`, the parity is `p = u ^ s`, and `p` becomes the
  new `s`. The source fixes only the single memory element. With one register,
  the only recursive feedback is 1+D, and the feed-forward 1 was chosen here.
* **Turbo code:** rate 1/3. Each word carries the systematic bit, the parity of
  encoder 1 on natural order, and the parity of encoder 2 on interleaved order.
* **Interleaver:** a square block interleaver. The bits are written row by row
  into an R x R array and read column by column:
  `pi(i) = (i mod R)*R + i div R`. This is a transpose, so it is its own
  inverse. One address generator (`block_interleaver`) therefore serves as
  both interleaver and deinterleaver, and needs no divider. The default is
  R = 74 (5476-bit blocks). R = 4 (16-bit blocks) is the other size studied.
* **Zero termination:** after the block, each encoder takes one tail step whose
  input equals its register. That drives the register to 0. The tail step of
  each encoder gives a systematic bit and a parity bit; the parity is always 0
  for this code but is sent anyway. All four tail bits travel in one extra
  *tail word*.

Every stream in the design carries K data words and then one tail word, on
four lanes (`turbo_pkg`):

| word        | lane 0 | lane 1 | lane 2 | lane 3 |
|-------------|--------|--------|--------|--------|
| data k      | sys    | par1   | par2   | unused |
| tail (last) | sys1   | par1   | sys2   | par2   |

## The SISO decoder (`siso_decoder`)

This is the part that takes the most care to understand.

**Trellis and metrics.** There are two states. An LLR here is ln P(0)/P(1), so
a negative value means bit 1. The branch metric for input `u` from state `s`
(parity `p = u ^ s`, next state `p`) is

    gamma(s,u) = [u=0]*(La + Ls) + [p=0]*Lp

where La is the a-priori, Ls the systematic and Lp the parity LLR. The Lc/2
factor of the usual formula is already inside the channel LLRs. The constant
term cancels, so it is dropped. The recursions are

    A_{k+1}(s') = max*_{s->s'} ( A_k(s) + gamma )       forward
    B_k(s)      = max*_{s->s'} ( B_{k+1}(s') + gamma )  backward

The (La+Ls) term is common to every u=0 branch, so it comes out of the
a-posteriori LLR exactly. The extrinsic LLR then needs only two max\*:

    Le_k = max*(A0+Lp+B0', A1+B1') - max*(A0+B1', A1+Lp+B0')
    L_k  = La + Ls + Le_k

The primes mark metrics of step k+1. Both recursions start from (0, -inf),
because the encoder starts and, thanks to the tail, ends in state 0. After
each step the larger of the two metrics is subtracted from both, so they stay
small.

**Schedule.** The SISO decodes the whole block at once, with no sliding
window:

1. *Forward.* It accepts K+1 items (La, Ls, Lp), one per clock. Gaps are
   allowed (`in_valid`/`in_ready`). Item K is the tail step, with La = 0. Each
   item is stored together with its forward metrics A_k.
2. *Backward.* It then reads the store in reverse, one step per clock, after
   one clock of read latency. It updates B and emits `out_ext` and `out_llr`
   for indices K-1 down to 0. The tail step gives no output. `done` comes with
   index 0.

The last output appears K+2 clocks after the tail item. The store is one RAM
of K+1 entries: two 14-bit metrics plus the three input LLRs.

**The algorithm switch.** `ALGO` selects the `max_star` variant in all six
max\* units of the SISO. Nothing else changes. The Log-MAP correction comes
from a four-step comparison, because the metrics are in quarter units:
`round(4*ln(1+exp(-d/4)))` is 3 at d = 0, 2 for d < 4, 1 for d < 9 and 0 beyond.

## Turbo decoder schedule (`turbo_decoder`)

The two SISOs take turns; they never run at the same time. One iteration:

1. **SISO1 (Max-Log-MAP)** reads, in natural order k, `sys[k]`, `par1[k]` and
   the a-priori `LE21[k]`, then the tail of encoder 1. In the first iteration
   the a-priori is forced to 0. SISO1 writes its extrinsic to `LE12[k]`.
2. **SISO2 (Log-MAP)** reads, in interleaved order j, `sys[pi(j)]`,
   `LE12[pi(j)]` and `par2[j]`, then the tail of encoder 2. It writes its
   extrinsic to `LE21[pi(j)]`, which deinterleaves it on the way. In the last
   iteration its a-posteriori LLR goes to the hard decision maker, also at
   `pi(j)`.

The memories are `llr_ram` instances: systematic, parity (both parities in
one word), LE12 and LE21. Each has one write port and one synchronous read
port. Two `block_interleaver` generators supply the addresses. One counts up
for reads. The other counts down and follows SISO2's output; an assertion
checks that it stays in step. `hard_decision` stores the sign bits and then
streams the block out in natural order.

**Timing.** A half-iteration takes 2K+5 clocks: K+1 steps forward, K+1 steps
backward and a few clocks of hand-over. The first decoded bit leaves
**2·I·(2K+5)+1 clocks** after the tail word is accepted, where I is the number
of iterations. The K bits then follow on consecutive clocks. For K = 5476 and
six iterations that is 131 485 clocks, or 1.31 ms at a 10 ns clock. While
decoding, the decoder does not accept a new block (`in_ready` is low).

Parameters: `K`, `R` (K must equal R\*R), `SISO1_ALGO`, `SISO2_ALGO`. Setting
both algorithms the same gives the all-Log-MAP and all-Max-Log-MAP decoders.
They are useful as references, but they are not the design. `iterations` is
a 4-bit run-time input, latched with the tail word; 0 is taken as 1.

## Word lengths

The source gives none; these are choices made here.

| quantity                        | format                          |
|---------------------------------|---------------------------------|
| channel LLR                     | 8-bit signed, Q5.2              |
| extrinsic / a-posteriori LLR    | 10-bit signed, Q7.2, saturated  |
| state metric                    | 14-bit signed, Q.2, normalised  |
| internal sums                   | 16-bit                          |

No scaling factor is applied to the Max-Log-MAP extrinsic.

## BER test system (`ber_system`, the top)

    bit_source -> turbo_encoder -> bpsk_channel -> turbo_decoder -> ber_counter
        |                                                              ^
        +------------------- reference bit RAM ------------------------+

* `bit_source`: a PRBS-31 LFSR (x^31 + x^28 + 1), loaded from the `seed` input.
* `turbo_encoder`: collects K bits, then sends K data words and the tail word
  on consecutive clocks. Its two `rsc_encoder`s read the block memory in
  natural and interleaved order.
* `bpsk_channel`: sends bit 0 as +1 and bit 1 as -1, and adds `sigma*n`. Each
  lane has its own `awgn_gen`, so each lane gets independent noise. The
  received value is scaled by `llr_gain` = Lc = 2/sigma^2 and rounded to Q5.2.
  For rate 1/3, use sigma^2 = 1.5 / 10^(Eb/N0/10). `sigma` is Q2.8 and
  `llr_gain` is Q4.4. For example, at 1 dB: sigma = 279, llr_gain = 27.
* `awgn_gen`: two xorshift64 generators give twelve 10-bit uniform numbers per
  clock. Their centred sum has unit variance (Irwin–Hall, n = 12) and is close
  to Gaussian out to ±6 sigma.
* `ber_counter`: counts compared bits and mismatches. BER = `err_count` /
  `bit_count`.

A `start` pulse clears the counters and runs `num_blocks` blocks one after the
other. Each block takes K clocks to generate, then K+4 clocks of encoding and
transmission, then the decoding time, then K clocks of comparison. `done`
pulses at the end. At the default size with six iterations, one block takes
147 918 clocks.

## Verifying and simulating

Each module has a self-checking testbench in `tb/` that ends with
`TB_RESULT checks=N failures=M`. `tb/turbo_ref_pkg.sv` holds reference models
written from the code's definition, not from the RTL structure:

* a div/mod interleaver;
* the RSC recursion;
* a MAP decoder over an explicitly enumerated trellis, with unnormalised
  integer metrics and the Log-MAP correction computed in floating point;
* the iterative schedule.

The decoder and system tests compare against these models **bit for bit**:

* `siso_decoder_tb` checks every extrinsic and a-posteriori LLR of both
  algorithms, and the latency.
* `turbo_decoder_tb` checks every decoded bit of the mixed decoder and of the
  two single-algorithm variants. It covers 0, 1, 2 and 6 iterations, both with
  and without noise, and checks the latency formula.
* `ber_system_tb` (K = 16) uses `ber_ref_monitor`. The monitor watches the
  internal streams, re-decodes each block and predicts the exact error count.
  The test also counts blocks, tail words, SISO passes, channel errors,
  corrected bits and Log-MAP corrections, and fails if any of them never
  happened.
* `ber_system_full_tb` runs one full-size block with every parameter at its
  default. It checks the error count and the total clock count.
* `ber_sweep_tb` runs the error-rate grid described in the next section.

To simulate with Verilator, for example the full-size test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/turbo_pkg.sv tb/turbo_ref_pkg.sv tb/ber_system_full_tb.sv \
        --top-module ber_system_full_tb -o simv && ./obj_dir/simv

Use any other `tb/<name>_tb.sv` with `--top-module <name>_tb` in the same
way. Most runs take a few seconds at most; the sweep takes about ten.

## Measured error rates

`ber_sweep_tb` runs the grid the original evaluation used. It covers Eb/N0
from 0 to 3 dB in 0.5 dB steps, with 1, 2 and 6 iterations. The 16-bit blocks
run 200 blocks per point; the 5476-bit blocks, at the default build, run one
block per point. The published figures used 100 000 blocks per point, so the
numbers below carry much more statistical noise. The test checks every error
count exactly against the reference decoder. It also checks that the BER at
3 dB is below the BER at 0 dB, and that for 5476-bit blocks six iterations
beat one at 3 dB. It takes about 10 s. A typical run gives the values below,
as BER x 10^-3, with the published value in brackets:

| block | iter. | 0 dB          | 1 dB        | 2 dB        | 3 dB         |
|-------|-------|---------------|-------------|-------------|--------------|
| 16    | 1     | 92.5 (103.1)  | 67.8 (67.1) | 30.3 (38.6) | 14.1 (19.1)  |
| 16    | 6     | 83.8 (88.0)   | 47.5 (52.4) | 18.8 (26.8) | 9.1 (11.5)   |
| 5476  | 1     | 114.3 (107.8) | 66.7 (68.6) | 34.7 (37.2) | 11.9 (16.3)  |
| 5476  | 6     | 92.0 (94.5)   | 52.2 (50.7) | 13.1 (20.1) | 3.5 (5.9)    |

From 0 to 1.5 dB the measured values stay close to the published curves.
From 2 dB upwards they are mostly lower, at times by a third or more. The
runs here are short, so part of that gap is chance. The rest may come from
the unknown details of the original code and channel. The trends match the
published ones: the BER falls with Eb/N0, extra iterations help, and the
long block gains more from them.

## Where this design departs from, or adds to, the source

The source fixes the following:

* the structure: two SISOs, the extrinsic exchange through interleaver and
  deinterleaver, zero a-priori at the start, and the decision after SISO2;
* the split of algorithms: Max-Log-MAP in SISO1, Log-MAP in SISO2;
* the code: rate 1/3, an RSC with one memory element, zero termination and a
  square block interleaver;
* the sizes: 16 and 5476 bits;
* the iteration counts: 1, 2 and 6;
* the test chain of the BER system.

These are choices made in this RTL:

* the feed-forward polynomial;
* the LLR sign convention;
* every word length and the Log-MAP correction table;
* the whole-block (no window) SISO schedule with stored forward metrics;
* SISOs that run one after the other;
* the memory organisation;
* the stream formats (four lanes, one tail word) and handshakes;
* the PRBS and noise generators;
* the fixed-point channel scaling.

The source's latency and LUT/FF figures describe its HLS-generated FPGA
designs. This RTL does not try to reproduce them. In this RTL the three
variants take the same number of clocks, because the Log-MAP correction is a
small combinational lookup inside `max_star` and adds no pipeline stage
(it does lengthen the combinational path of the recursion). They
differ in cost only by those lookups, at most six per SISO. The mixed
decoder therefore saves area relative to an all-Log-MAP decoder, not time.

The comparison set-up that runs three decoders side by side is not in the top. The baseline decoders
are only available through the `SISO1_ALGO`/`SISO2_ALGO` parameters. The block
length is fixed at build time: a 16-bit decoder is built with `K = 16, R = 4`.
