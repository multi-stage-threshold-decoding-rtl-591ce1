# Multi-stage threshold decoder (MTD-DR) for self-orthogonal convolutional codes

Threshold decoding is about the cheapest way to decode a convolutional code. Each
information bit is checked by a handful of parity equations (its *checking
syndromes*). If more than half of them fail, the bit is flipped. With a
*self-orthogonal* code, no two information bits share more than one checking
syndrome, so one wrong bit cannot mask another. Run once, a threshold decoder is
weak. Run many times over the same block, with a *difference register* (DR) that
remembers which bits have already been flipped, it becomes a strong decoder: the
multi-stage threshold decoder with difference register, MTD-DR.

Why the DR helps: the distance between the received word and the current decoded
word is the number of 1s in the DR (information part) plus the number of 1s in
the syndrome register (parity part). A bit with J checking syndromes and one DR
bit is flipped only when most of those J+1 bits are 1. Flipping it turns them
into 0s, so the distance can only shrink. The soft rules apply the same argument
to the Euclidean distance.

This RTL implements a complete codec around that decoder:

* a rate-2/4 **type-2 self-orthogonal code**: two information streams, two parity
  streams, four generator polynomials, tail-biting;
* the **iterative decoder** with three decision rules: hard MTD-DR, soft (SMTD)
  and weighted bit flipping (WBF). A scheduler chains them into the *combined*
  decoders CMTD.NFB (WBF, then soft) and CMTD.Feed (WBF then soft, repeated as
  feedback rounds);
* an outer **single-parity-check code** on 50-bit sub-blocks, which repairs one
  bit per failed sub-block after the inner decoder.

## The code

Each codeword carries N = 2100 information bits: two streams X1, X2 of M = 1050
bits each. The parity streams are

    V1 = G11·X1 + G21·X2        V2 = G12·X1 + G22·X2        (mod 2)

with the polynomials of the short code (memory K ≈ 500, J = 5 taps each):

| polynomial | exponents |
|---|---|
| G11 | 0, 51, 198, 251, 465 |
| G12 | 23, 187, 247, 370, 371 |
| G21 | 40, 76, 176, 200, 259 |
| G22 | 161, 230, 281, 328, 483 |

The codeword is {X1, V1, X2, V2}: 4200 bits, rate 1/2. The encoder is tail-biting:
its shift register is closed into a ring of M positions. Parity bit i therefore
uses information bit (i − e) mod M for each exponent e, and information bit j
reaches syndrome bits (j + e) mod M. Information bit j of stream 1 is checked by
syndromes S1 at j+G11 and S2 at j+G12: 10 checking syndromes in all. Stream 2 uses
G21 and G22 in the same way. The hard threshold is T = ⌊(10+1)/2⌋ = 5.

Why two streams: with a single polynomial, the decoder tends to get stuck on
residual error patterns whose spacing copies the encoder's tap spacing. With two
streams, each information bit is checked through two polynomials with different
tap patterns, which breaks up those patterns.

## How the decoder works (`mtd_decoder`)

### Rotating registers instead of a chain of stages

The textbook MTD-DR is a chain of identical stages. Each stage has an information
register, a syndrome register, a DR and a threshold element, and the data shifts
from one stage into the next. This design keeps one such stage and reuses it for
every iteration. The whole block is kept in circular registers, one set per
stream:

| register | content | width |
|---|---|---|
| `xr1`, `xr2` | current decisions (start as hard decisions) | M bits |
| `dr1`, `dr2` | difference register: 1 where the decision differs from the received hard decision | M bits |
| `sr1`, `sr2` | syndromes (during loading: the hard-decision parity bits) | M bits |
| `ax1`, `ax2`, `av1`, `av2` | received magnitudes, information and parity | M × 5 bits |
| `w1`, `w2` | WBF weight of each syndrome | M × 5 bits |

Every register rotates by one position per clock, all in step. In cycle j of a
pass, information position j sits at index 0. Its checking syndromes then sit at
the fixed indices G11, G12 (stream 1) or G21, G22 (stream 2). The threshold
elements therefore read fixed wires, and the flip masks are constants. One pass
over the block takes exactly M cycles and leaves all registers back in their
original alignment.

### One decoding step

In one cycle:

1. The stream-1 threshold element computes the checksum of `xr1[0]` from its ten
   syndromes, their weights, `dr1[0]` and the bit's received magnitude.
2. If it flips, `xr1[0]`, `dr1[0]` and the ten syndromes are inverted. The
   syndromes are inverted combinationally, before step 3.
3. The stream-2 element decides `xr2[0]` on the updated syndromes, and its flip is
   applied the same way.
4. Everything rotates.

For the default code, the two bits of one position share no syndrome, so step 2
feeding step 3 changes nothing. It keeps the decoder exact for codes where they
do share one.

### Decision rules (`threshold_element`)

| rule | checksum L | flip when |
|---|---|---|
| hard (MTD-DR) | number of failed checking syndromes + DR bit | L > T (T = 5) |
| soft (SMTD) | Σ w_par·(1−2s) + w_d·(1−2d) | L < 0 |
| WBF | Σ w_wbf·(1−2s) + w_d·(1−2d) | L < 0 |

* `w_par` is the magnitude of the received parity sample belonging to each
  syndrome.
* `w_d` is the magnitude of the received information sample.
* `w_wbf` is the smallest magnitude among the 11 samples (10 information, 1
  parity) that form each syndrome. These weights are fixed per block and are
  computed in the set-up cycle by `wbf_weights`.
* A positive soft checksum means that keeping the bit gives the smaller
  Euclidean distance.

### Schedule and stopping (`mtd_controller`)

A block passes through four states: `ST_LOAD` (M input cycles), `ST_INIT` (one
cycle: syndromes from `syndrome_former`, WBF weights, DR cleared), `ST_DECODE`
(passes of M cycles) and `ST_OUTPUT` (M cycles).

The `sched` input (type `mtd_pkg::sched_t`) defines a feedback round: component A
runs for up to `iter_a` passes, then component B for up to `iter_b` passes, each
with its own rule. At most `rounds` rounds are run.

* A component stops early after a pass that flips nothing.
* Decoding ends when, within one round, both components stopped that way, or when
  the round limit is reached.
* The DR is kept across components and rounds.

`mtd_pkg` holds presets for the published settings:

| preset | A | B | rounds |
|---|---|---|---|
| `SCHED_HARD_MTD_DR` | hard, 30 | – | 1 |
| `SCHED_SMTD` / `SCHED_WBF` | soft / WBF, 30 | – | 1 |
| `SCHED_CMTD_NFB` | WBF, 30 | soft, 30 | 1 |
| `SCHED_CMTD_FEED` | WBF, 2 | soft, 2 | 10 |

### Output

In `ST_OUTPUT` the registers rotate once more without flipping. Each cycle gives
the decided bits of one position, plus their soft checksums, which the outer
decoder uses as reliabilities. `passes` and `flips` report what the block needed.

## The outer parity check (`parity_encoder`, `parity_decoder`)

Each information stream is cut into sub-blocks of 50 data bits followed by one
even-parity bit (51 stream positions). Since 1050 = 20·51 + 30, the last sub-block
of a stream is short: 29 data bits and a parity bit in position 1049. A codeword
thus carries 2 × 1029 = 2058 data bits, an overall rate of 0.49.

After inner decoding, each sub-block's parity is checked. If it fails, the bit with
the smallest checksum (the least reliable decision, parity bit included) is
inverted. The decoder delivers each sub-block's data bits, its data-bit count and
a "repaired" flag one cycle after the sub-block's last position.

## Top level (`mtd_codec_top`)

Transmit and receive sides stand side by side; they share only clock and reset.
The channel (BPSK, noise, sampling) is outside the design.

* **Transmit:** a 2-bit data word (bit 0 → stream 1, bit 1 → stream 2) enters
  with `tx_valid`/`tx_ready`. Two parity encoders run in lockstep (an assertion
  checks this). `socc_tx_encoder` collects the M positions of a block, computes
  both parity streams in one cycle and sends `{cw_x1, cw_v1, cw_x2, cw_v2}` one
  position per cycle under `cw_valid`/`cw_ready`.
* **Receive:** four signed 6-bit samples per position enter with
  `ch_valid`/`ch_ready`. Positive means bit 0. Magnitudes saturate at 31. The
  inner decoder stream appears on `dec_valid`, `dec_x1`, `dec_x2`. Data
  sub-blocks appear on `rx_valid`, `rx_data1`, `rx_data2`, `rx_len`, `rx_fixed`.
  The output has no back-pressure.

Timing of one receive block: M load cycles, 1 set-up cycle, passes × M decoding
cycles, then M output cycles. The latency from the last input sample to the first
output is 1 + passes·M cycles. For example, a block that needs 3 passes takes
1050 + 1 + 3150 + 1050 cycles.

Size: the decoder holds about 38k flip-flops, mostly the 5-bit magnitude and
weight registers; the transmit encoder holds 4·M. The logic is small. The syndrome
former is 2100 XOR trees of 11 inputs, used once per block. The WBF weights are
2100 minimum trees of 11 inputs.

## Files

| file | role |
|---|---|
| `rtl/mtd_pkg.sv` | code taps, sizes, decision-rule enum, schedule struct and presets, decoder states |
| `rtl/socc_encoder.sv` | combinational tail-biting parity generator |
| `rtl/syndrome_former.sv` | local re-encoder + received parity → syndromes |
| `rtl/wbf_weights.sv` | WBF syndrome weights |
| `rtl/threshold_element.sv` | checksum and flip decision, three rules |
| `rtl/mtd_controller.sv` | state machine, pass/round scheduling, early stop |
| `rtl/mtd_decoder.sv` | rotating register file, two threshold elements, flip masks |
| `rtl/socc_tx_encoder.sv` | transmit block buffer and serialiser |
| `rtl/parity_encoder.sv`, `rtl/parity_decoder.sv` | outer parity-check code |
| `rtl/mtd_codec_top.sv` | top level |
| `tb/tb_ref_pkg.sv` | reference encoder, channel model, bit-exact decoder model |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog if it hangs. All of them run at the default sizes.

* `tb_mtd_decoder` compares the decoder with `tb_ref_pkg::ref_decode`, an
  independent software model that uses modular indexing instead of rotation. For
  every block it checks the decisions, every output checksum, the pass count, the
  flip count and the latency. The blocks cover noise-free input, isolated errors
  and two noise levels, under all five schedules.
* `tb_mtd_controller` checks pass counts, the rule of each pass and the state
  timing against a loop model of the stopping rules.
* `tb_mtd_codec_top` runs six codewords end to end. The low-noise blocks must be
  error-free. The testbench also counts each mechanism (parity insertion, flips,
  early stop, pass limit, feedback rounds, WBF and soft passes, parity repairs)
  and fails if one never occurs. It runs in seconds.

What the simulations show at 8-unit signal amplitude: around 2 % raw errors,
every rule decodes cleanly in 2–3 passes. At a noise sigma of 5 (about 6 % raw
errors), hard MTD-DR and SMTD leave residual errors while WBF and both CMTDs
still decode cleanly. These are single-block observations, not BER curves.

Running a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mtd_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_mtd_codec_top.sv --top-module tb_mtd_codec_top -o sim
./obj_dir/sim
```

## Design choices and departures

* **One reused stage instead of a chain.** Throughput is one information
  position (two bits) per cycle per pass, so a block of P passes takes (P+2)·M+1
  cycles. A pipelined chain of P stages would reach the same throughput for every
  block, at P times the register cost. The decisions are the same either way.
* **Whole-block set-up.** Syndromes and WBF weights are computed in one cycle
  over the full block rather than serially. Tail-biting needs the whole block
  anyway.
* **Sample format.** Samples are 6 bits with saturated 5-bit magnitudes and a
  10-bit checksum (`YW` in the package; the other widths follow from it). These
  are this design's own choices.
* **Reliability for the parity check.** The soft checksum is recomputed for every
  bit after decoding ends, whatever rule decoded the block.
* **Outer code framing.** Even parity and the short last sub-block are this
  design's own choices.
* **Not built:** the single-polynomial (type-1) code and its decoders, and the
  decoder without a DR. These are comparison points, not part of this codec.
* **Long code.** Set `M = 20000` and the long polynomials (G11: 0, 408, 850, 8286,
  9850; G12: 2341, 3008, 4167, 4584, 5339; G21: 780, 2563, 4716, 9116, 9718; G22:
  4994, 6152, 6187, 6390, 6659) through the parameters of `mtd_codec_top`. The
  decoder builds with Verilator at this size. Simulation is very slow, because
  the whole-block syndrome and weight logic is re-evaluated over 20000 positions
  every cycle: one block did not finish in 8 minutes. This size is therefore not
  verified; the largest size simulated is the default (M = 1050). The reference
  package in `tb/` is fixed to the short code.
* `dec_flips` is a 16-bit counter and wraps on very long noisy runs. `dec_passes`
  (12 bits) covers every schedule the fields can express.

## Changing it

All modules take the code (`M`, `J`, `G11`…`G22`) as parameters, with defaults
from `mtd_pkg`. Every exponent must be smaller than `M`. Decision rules and
iteration limits are run-time inputs. To use another code, pass new tap arrays to
`mtd_codec_top`, and update the tap copies in `tb/tb_ref_pkg.sv` to match.
