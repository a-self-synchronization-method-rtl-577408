# SS-CSC link with self-synchronizing frame timing

A spread-spectrum link with constrained spreading codes (SS-CSC) sends
K + N bits per frame. K bits pick one of M = 2^K orthogonal spreading codes.
That code is then kept for a whole frame of L = N code periods ("sequences"),
and the N remaining bits set its polarity, one bit per sequence. The receiver
needs no pilot signal to find where frames begin. It takes the frame timing
from the received chips themselves, using a differential detector, a pattern
check and a pair of racing counters. This SystemVerilog implements the
transmitter, the frame synchronizer and the correlator receiver, following
the method published as *A Self-Synchronization Method for the SS-CSC
System*.

Default configuration: K = 3 (M = 8 chips per sequence), N = L = 3 (24 chips
per frame, 6 bits per frame), racing counter sizes m = 3 and n = 10.

## Frame format

Chip `p` of a frame (sequence `s = p / M`, chip `j = p % M`) is

    S[p] = d[s] * PN_i[j] * A[p]          (all values +1 / -1)

- `i` is the upper K bits of the word.
- `d[s]` is data bit `N-1-s` (most significant bit first).
- `PN_i` is a Walsh–Hadamard code: `PN_i[j] = (-1)^popcount(i & j)`.
- `A` is a scrambling code, one frame (L·M chips) long.

In the RTL a chip is one bit, with 0 meaning +1 and 1 meaning −1, so every
product above is an XOR.

## How frame timing is found

**Differential detection.** The synchronizer multiplies each received chip
by the chip M positions (one sequence) earlier. If both chips lie in the same
frame, they were spread by the same code at the same chip index, so `PN_i`
cancels:

    r[p] * r[p-M] = d[s] d[s-1] * A[p] A[p-M] = ±B[p]

`B(t) = A(t)·A(t−T)` is therefore a fixed, known pattern, whatever code and
data were sent. Only its sign can flip from sequence to sequence. The sign of
each product is taken as a hard chip and shifted into a register that holds
(L−1)·M chips, the last L−1 sequences.

**Pattern check.** At each frame sync pulse, L−1 majority circuits each
compare one sequence's worth (M chips) of the register with the matching part
of B. A majority circuit outputs +1 when the chips match B, or its
complement, in more than 3M/4 places (for M = 8: at most one chip off).
Otherwise it outputs −1. The decision circuit adds the L−1 votes and outputs
+1 when the sum is ≥ 0.

**The race.** Two counters run against each other:

- **C2** (n stages) counts every frame.
- **C1** (m stages, m < n) counts only the frames whose decision was +1.

| Counter that fills first | Meaning | What happens |
|---|---|---|
| C1 (`hold`) | The timing is confirmed | Both counters clear one chip later. |
| C2 (`renew`) | The timing is judged wrong | Both counters clear one chip later, and one chip clock of C4 is suppressed, so every later frame boundary moves one chip later. |

C4 counts chips within a sequence, and C3 counts sequences within a frame.
Repeated renewals walk the timing through all L·M offsets until the right one
wins the race.

The sizes m and n trade holding against recovery:

- A larger n makes false renewals under noise rarer.
- A larger n also makes each step of the search slower: at least n frames per
  chip of offset.

**Receiver timing.** C4 and C3 label every received chip with its position
in the frame, and they give the code and frame sync pulses that the data
receiver uses.

## Choice of A(t)

A(t) decides how well wrong offsets are rejected. At an offset of δ chips the
register holds B shifted by δ. So if B resembles its own shifts, some wrong
offsets pass the pattern check in almost every frame, and the synchronizer
stays there.

A is the first L·M bits of the 10-stage maximal LFSR
`a[k+10] = a[k+3] xor a[k]`, whose first ten bits are `A_SEED` (LSB first).
`A_SEED = 594` was chosen by trying all 1023 seeds for K = 3, L = 3 with
random data. With it, no wrong offset yields a +1 decision in more than about
13 % of frames. Seed 1, for comparison, has two offsets that pass about 77 %
of the time. C1 fills at such an offset in almost every race, so the
synchronizer can stay there for a very long time. For other K and L the
same seed is used; it has not been tuned for them.

## Receiver data path

For each labelled chip the receiver works as follows:

1. It removes A at the chip's frame position.
2. It correlates the chip with all M codes; each correlator integrates over
   one sequence and then dumps.
3. It adds |V| of each code over the L sequences of the frame.
4. It picks the code with the largest sum. That index gives the K bits; a tie
   goes to the lower index.
5. The signs of that code's L correlations give the N bits. The signs of all
   codes are stored for every sequence, because the code is known only at the
   frame end.

## Modules

| File | Function |
|---|---|
| `sscsc_pkg` | Defaults, `A_SEED`, Walsh chip, A and B tables (computed) |
| `sscsc_tx` | Transmitter: counters, `data_converter`, M × `walsh_png`, `code_selector`, `a_code_gen`, chip XOR |
| `frame_sync` | Synchronizer: `diff_detector`, `chip_shift_register`, (L−1) × `majority_circuit`, `decision_circuit`, `racing_counters` (C1/C2), 2 × `sync_counter` (C4, C3) |
| `sscsc_rx` | Receiver: A removal, M × (`correlator` → `abs_sum`), `code_decision`, `sign_detector`, `data_demodulator` |
| `sscsc_top` | Transmitter, synchronizer and receiver side by side; the channel lies outside |

### Top-level interface and timing

- **Transmitter.** `sscsc_top` sends one chip per clock with `tx_chip_en`.
  `tx_chip` and `tx_valid` are registered, one clock later. `src_take` pulses
  on the last chip of a frame, and `src_word` is latched then for the next
  frame; the first frame after reset carries word 0.
- **Receiver input.** The receiver takes one signed `SW`-bit (default 8)
  sample per chip with `rx_valid`. Chip timing is assumed known.
- **Receiver output.** `out_word` and `out_valid` come four clocks after the
  sample that the synchronizer counts as the end of a frame. Until the
  synchronizer has locked, these words are garbage.
- **Synchronizer status.** `frame_pulse` is the frame sync pulse (registered).
  `sync_dec` is the decision at the last frame pulse. `sync_hold` and
  `sync_renew` are the one-chip "C1 full" and "renewal" states. `sync_c1` and
  `sync_c2` are the counter values.
- **Reset.** Reset is synchronous and active high, and it clears all state.

### Parameters

| Parameter | Meaning |
|---|---|
| `K` | Number of code-select bits |
| `N` | Number of polarity bits; N ≥ 2 |
| `MSTG` | m, the size of C1 |
| `NSTG` | n, the size of C2; 1 ≤ m < n |
| `SW` | Sample width |

`A_SEED` is a package constant. Frames of up to 4096 chips are supported.

## Interpretations and own choices

The published method describes the structure. The following points are
either not given there or are read one way here.

- **Majority threshold.** The prose states the threshold as "at least 3M/4
  correct chips". The error-rate formula used for the published results
  accepts either polarity and fails a sequence with exactly M/4 or 3M/4
  errors. This design follows the formula.
  - Accepting either polarity is needed, because data bits flip the sign of
    whole sequences.
  - The inclusive threshold would let a wrong offset pass one majority
    circuit 29 % of the time instead of 7 % (M = 8).
- **Codes.** The codes are Walsh–Hadamard codes. A(t) comes from an LFSR and
  is tuned as described above. The source says only "orthogonal codes" and
  "a spreading code of period LT".
- **One sample per chip.** The chip integrators become a single sample, and
  the differential product is hard-limited by its sign. A product of exactly
  zero counts as +1.
- **C3 and C4.** They count 0 … MOD−1 and wrap on the enable that would reach
  MOD. This gives the same period as the counters in the published block
  diagram, which reach MOD and clear themselves one chip later.
- **Renewal.** A renewal holds C4 for one received chip. That chip is
  labelled like the one after it, so the first frame after each renewal is
  misaligned.
- **Decision timing.** The decision is taken combinationally on the register
  contents, including the chip that ends the frame.
- **Handshake and data layout.** The source handshake, the bit order in the
  word, all widths, reset behaviour and the receiver pipeline are this
  design's choices.
- **N = 0.** N = 0 (L = 1, plain M-ary spreading) is not supported, because
  the synchronizer needs at least two sequences per frame.
- **Channel.** The channel and the chip-timing recovery are outside the
  design.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares the module's outputs with a reference computed separately: for
example the Hadamard matrix built by recursive doubling, or A computed
directly from its recurrence. Each testbench prints
`TB_RESULT checks=… failures=…`.

The system-level benches:

- **`tb_frame_sync`** starts the synchronizer 5 chips off. It checks that it
  locks after exactly 5 renewals, and that it then decides +1 at every frame,
  holds every m frames and never renews again.
- **`tb_sscsc_rx`** runs the receiver with ideal labels and noisy samples.
  Every word must be recovered with a 3-clock latency, and every code and
  both polarities must occur.
- **`tb_sscsc_top`** runs the whole link at the default parameters.
  - The channel model drops the first 7 chips; later it inserts 3 noise
    chips.
  - The synchronizer must acquire twice, and 200 words are compared after
    each acquisition.
  - Each of these must occur: renewal, hold, a −1 decision and a +1
    decision.
- **`tb_sync_workloads`** (with its helper `sync_probe`) runs the counter and
  constraint-length settings of the published study: n = 5/10/15 with m = 3;
  m = 1/2/4 with n = 5; and L = 2/4/8. It checks that each renewal costs at
  least n frames, and that acquisition gets slower with larger n and larger
  L. Typical mean acquisition times with mild bounded noise:

  | Setting | Mean acquisition (frames) |
  |---|---|
  | n = 5 (m = 3, L = 3) | 54 |
  | n = 10 | 114 |
  | n = 15 | 210 |
  | L = 2 (m = 3, n = 10) | 63 |
  | L = 4 | 227 |
  | L = 8 | 196 (6 trials, large spread) |

  The noise here is bounded, not Gaussian, so these are not the published
  curves.
- **`tb_link_ebn0`** (with its helper `ebn0_probe`) runs the whole link over
  a Gaussian-noise channel at a given Eb/N0. The energy per bit is
  Eb = L·M·AMP² / (K+N), and the noise variance per chip is N0/2. Each run
  lasts 4000 frames and starts at a random offset, with m = 3, K = 3 and
  N = 3. It measures:
  - lose-lock time: the mean run of frames with the right timing;
  - recovery time: the frames with wrong timing per loss of lock;
  - the bit error rate of words received with the right timing;
  - the error rate including synchronization, with the wrong-timing frames
    counted at 1/2.

  | Setting | Lose-lock time (frames) | Recovery time (frames) | BER, right timing | BER incl. sync |
  |---|---|---|---|---|
  | n = 5, 1 dB | 6 | 115 | 4.2e-2 | 0.48 |
  | n = 5, 3 dB | 8.5 | 114 | 3.5e-3 | 0.47 |
  | n = 5, 5 dB | 19 | 114 | 0 of 3348 bits | 0.43 |
  | n = 5, 8 dB | 1933 | 115 (one loss) | 0 | 1.4e-2 |
  | n = 10, 8 dB | no loss in 3880 frames | — | 0 | 0 |
  | n = 15, 3 dB | 508 | 415 | 6.0e-3 | 0.23 |

  These agree in size with the published analysis and simulation:

  - For n = 5, the published lose-lock time is about 10 frames at 2 dB and
    100 at 6 dB.
  - Recovery settles near n·L·M frames, which is 120 for n = 5.
  - Recovery for n = 15 is about 480 frames.

  The bench checks the trends:
  - lose-lock time grows with Eb/N0 and with n;
  - recovery is slower for larger n;
  - the error rate including synchronization falls with Eb/N0;
  - with n = 10 at 8 dB lock holds.

  Lose-lock times of 10^8 frames and more, which the analysis predicts at
  high Eb/N0, cannot be simulated.

To run a bench with Verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        --top-module tb_sscsc_top rtl/sscsc_pkg.sv tb/tb_sscsc_top.sv
    ./obj_dir/Vtb_sscsc_top

Every bench finishes in seconds; `tb_link_ebn0` takes about 15 s.
