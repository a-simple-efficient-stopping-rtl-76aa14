# BHDA: a stopping unit for iterative turbo decoding

A turbo decoder improves its decisions by iterating between two soft-in
soft-out component decoders. Most code blocks are correct after a few
iterations. Running a fixed maximum costs power and latency for nothing. This
RTL implements a cheap rule for stopping early. It is known as BHDA:
*hard-decision aided stopping based on bit interleaved parity*.

The rule: take the hard decisions of one decoder output for the whole block,
fold them into a short parity signature, and stop when the signature of
iteration *i* equals that of iteration *i − 1*, for *i* ≥ 2. Other early-stop
rules compare every decision with the previous iteration, which takes N bits
of memory for an N-bit block. A signature takes only n bits. The BIP
signature is also cheaper to compute than a CRC signature:

| resource            | BHDA (this design) |
|---------------------|--------------------|
| modulo-2 adders     | 1 (one XOR gate)   |
| signature registers | n                  |
| history memory      | n bits             |
| comparator          | n-bit equality     |

None of these depends on the block length N. With the defaults (N = 640,
n = 16) the whole unit is about 50 flip-flops.

## The signature: bit interleaved parity

Number the hard decisions of a pass û₀ … û_(N−1). The BIP of length n is an
n-bit word, one parity bit per residue class:

    BIP[m] = XOR of û_k over all k with k mod n = m,   m = 0 … n−1

Each bit starts at 0 at the beginning of a pass. So BIP[0] is the parity of
û₀, û_n, û_2n, …, BIP[1] is the parity of û₁, û_(n+1), … and so on.

### One XOR and a ring of n flip-flops

`bip_generator` does not use n separate parity bits with a demultiplexer. It
keeps the n bits in a circular shift register with a single XOR:

    new stage n−1  =  stage 0  XOR  û_k      (the only adder)
    stage j        <= stage j+1              (j = 0 … n−2)

Every accepted decision rotates the ring by one place, so each stage passes
the XOR once every n decisions. The stage that starts at position e collects
the decisions with k mod n = e. After L decisions, that stage sits at
position (e − L) mod n, so the register reads

    bip[p] = BIP[(p + L) mod n]

This matters in two ways:

* If n divides N (for example 640 = 40 × 16), the register is in natural
  order at the end of every pass: `bip == BIP`.
* If n does not divide N, the word is rotated by N mod n. The rotation is
  the same on every pass, so the pass-to-pass comparison is unaffected. Only
  software that reads `bip` and expects natural order must undo the rotation.

Passes can follow each other with no idle cycle. On the first decision of a
pass (`first_bit`), the XOR takes 0 instead of the ring's output stage, and
the ring shifts in zeros. That clears the signature and takes in the first
decision in the same cycle.

### What a signature can miss

Two passes whose decisions differ in an even number of positions of the
*same* residue class have equal BIPs. The unit then stops even though the
decisions changed. This is the price of keeping n bits instead of N. A
single changed decision, or changes spread over different classes, always
changes the signature. The end-to-end testbench builds such an aliasing case
on purpose and checks that the unit stops on it. That is the expected
behaviour, not a fault.

## From soft outputs to a stop signal

```
             +---------------+   u_hat   +---------------+  bip  +-------------+
 llr ------->| hard_decision |---------->| bip_generator |------>| bip_history |--- match
 llr_valid ->|   (slicer)    | bit_valid |  XOR + ring   |       | n bits + == |      |
             +---------------+     |     +---------------+       +-------------+      |
                                   |        ^ first_bit               ^ hist_load     |
                                   v        |                         |               v
                                +------------------------------------------------------+
 frame_start ------------------>|                stop_controller                        |
                                |  decision count (0..N-1), pass count, stopping rule   |
                                +------------------------------------------------------+
                                   |            |             |              |
                               llr_accept    pass_end     iter, stop     stop_reason
```

* **hard_decision**: û = 1 when L(u) > 0, and 0 when L(u) ≤ 0. The LLR is
  taken as ln P(u=1)/P(u=0) in two's complement. The tie rule for L = 0 is
  a choice of this design.
* **bip_generator**: the ring described above.
* **bip_history**: n flip-flops hold the BIP of the previous pass, and an
  n-bit equality comparator produces `match` for the pass that has just
  ended. The history is loaded at the same edge at which the decision is
  taken, so the comparison always sees pass *i − 1*.
* **stop_controller**: counts accepted decisions. After N of them the pass
  ends: it loads the history, counts the pass (*i*) and applies the rule.
  - *i* ≥ 2 and `match`: stop, with reason `STOP_BIP_MATCH`.
  - otherwise, if *i* = `MAX_ITER`: stop, with reason `STOP_MAX_ITER`.
  - otherwise: keep going.

  Pass 1 never stops on a match. The history then holds the previous block's
  value, or the reset value.
* **bhda_stop_unit**: the top, wiring the four together.

### Which decoder output to watch

A turbo decoder has two hard-decision points: after decoder 1, and after
decoder 2 once its output is deinterleaved. Both are in natural bit order.
The unit compares successive *passes* of whichever LLR stream it is given.

* Feed it one of the two outputs, once per iteration, and *i* is the
  iteration number. This is the rule as stated above.
* Feed it both half-iteration outputs one after the other, and each half
  iteration is compared with the one before.

The stream must be in the same bit order on every pass, since BIP depends on
the order.

## Interface and timing

| port           | dir | width                | meaning |
|----------------|-----|----------------------|---------|
| `clk`, `rst_n` | in  | 1                    | clock; asynchronous active-low reset |
| `frame_start`  | in  | 1                    | one-cycle pulse before the first pass of a code block; clears counters, `stop` and `stop_reason` |
| `llr_valid`    | in  | 1                    | an LLR is offered this cycle (at most one per cycle; gaps allowed) |
| `llr`          | in  | `LLR_W`, signed      | soft output L(u_k) |
| `llr_accept`   | out | 1                    | the LLR is taken; low while `stop` is high and during `frame_start` |
| `pass_end`     | out | 1                    | high for one cycle after the N-th LLR of a pass; `bip` is final then |
| `iter`         | out | clog2(MAX_ITER+1)    | passes completed in this block |
| `stop`         | out | 1                    | stop decoding; held until the next `frame_start` |
| `stop_reason`  | out | `bhda_pkg::stop_reason_e` | `STOP_NONE`, `STOP_BIP_MATCH`, `STOP_MAX_ITER` |
| `bip`, `bip_prev` | out | `BIP_N`           | current signature register and stored previous one, for observation |

Timing: if the last LLR of a pass is offered in cycle *t*, then `pass_end`
is high in cycle *t+1*, and `iter`, `stop` and `stop_reason` show the
decision from cycle *t+2*.

A decoder that starts the next pass at once loses nothing. An LLR taken in
cycle *t+1* goes into the new signature. If the decision in cycle *t+2* is to
stop, `llr_accept` is low from then on.

A `frame_start` may come at any time, also in the middle of a pass. Any LLR
offered in the same cycle is dropped.

## Parameters

| parameter  | default | meaning |
|------------|---------|---------|
| `N`        | 640     | decisions per pass (message length). 640 is the block size at which this criterion was evaluated on the 3GPP turbo code. |
| `BIP_N`    | 16      | signature length n, at least 2. A longer signature aliases less and costs 2 flip-flops per bit. |
| `MAX_ITER` | 10      | iteration limit. |
| `LLR_W`    | 8       | width of the soft input. |

The defaults are in `bhda_pkg`.

## What follows the published criterion, and what is this design's own

These follow the criterion as published:

* the BIP definition;
* the stopping condition BIP(i) = BIP(i−1) for i ≥ 2;
* the hardware budget of one XOR, n registers, n memory bits and one n-bit
  comparator;
* the block size N = 640.

These are this design's own choices:

* **Signature length n = 16.** The criterion leaves n open.
* **The iteration limit.** The criterion has no limit of its own. A limit is
  needed so that a block that never converges still ends. 10 matches the
  highest average iteration count seen in the published results.
* **How the XOR and the ring are connected**, and the `first_bit` clearing
  that lets passes run back to back.
* **The LLR format and its sign convention.**
* **The handshake**, the two-cycle decision latency, refusing input after a
  stop, and the reset style.

Not included:

* The component decoders (MAP or SOVA), the interleaver and the
  deinterleaver of the turbo decoder. Their internals are not part of the
  criterion. The unit connects to them only through `llr`/`llr_valid` (a
  decoder output) and `stop` (to the iteration control).
* The criteria BHDA is usually compared against (cross entropy, sign change
  ratio, sign difference ratio, CRC-based HDA). Those are alternatives, not
  parts of this design.

## Published results the defaults are sized for

The criterion was evaluated on the 3GPP turbo code with 640-bit blocks:

* Over AWGN at 1 dB it needed on average 3.87 iterations.
* Over Rayleigh fading at 3 dB it needed on average 3.82.
* That is about 10 % fewer iterations than the sign-based criteria, with
  essentially the same bit error rate.
* At low Eb/No the averages approach 10 iterations.

The defaults hold these cases: N = 640, and a 4-bit iteration counter with a
limit of 10. The error rates themselves depend on the component decoders,
which are not part of this RTL.

`tb_bhda_workload` reproduces these operating points with the RTL stop unit
in control of a behavioural turbo decoder written in the testbench:

* two 8-state max-log-MAP decoders for the 3GPP constituent code
  (feedback 1+D²+D³, feedforward 1+D+D³);
* extrinsic information scaled by 0.75;
* a random 640-bit interleaver, not the 3GPP permutation;
* BPSK over AWGN at 1 dB, and over independent-per-symbol Rayleigh fading
  at 3 dB.

The unit watches the deinterleaved output of the second decoder, quantised
to 8 bits. With 500 blocks per channel it gives:

| channel        | avg. iterations (BHDA) | genie | BER after stop |
|----------------|------------------------|-------|----------------|
| AWGN 1 dB      | 4.25                   | 3.45  | 5.2e-4         |
| Rayleigh 3 dB  | 3.16                   | 2.18  | 6e-6           |

"Genie" is the first iteration whose decisions are all correct. For AWGN at
1 dB, the published figures are 3.87 iterations (BHDA) and 2.94 (genie), at a
BER of 1.6e-4.

These numbers differ from the published ones for known reasons:

* The decoder model here is simpler: max-log rather than full MAP, a random
  interleaver, and no trellis termination. That accounts for the somewhat
  higher counts.
* The fading model here is idealised, which makes fading easier than in the
  published results.

The testbench checks the unit cycle-exactly against the rule. It checks the
statistics only loosely: iterations saved, never below genie, and BER under
1e-2.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_hard_decision`   | all 256 values of an 8-bit LLR and all 16 of a 4-bit one, against the signed value |
| `tb_bip_generator`   | n = 16 and n = 5 side by side on random passes of random length, with gaps and back-to-back passes; after every edge the register must equal BIP rotated by the pass length, computed directly from the definition |
| `tb_bip_history`     | random loads and compare values (equal, one bit off, random) against a reference register |
| `tb_stop_controller` | N = 8, `MAX_ITER` = 4, with scheduled comparator results; every cycle checks `bit_accept`, `first_bit`, `hist_load`, `pass_end`, `iter` and `stop`; also the stop reason, the two-cycle latency, a first-pass match being ignored, input refused after stop, and a restart in mid-pass |
| `tb_bhda_stop_unit`  | end to end at the default sizes (see below) |
| `tb_bhda_workload`   | the unit stopping a simulated turbo decoder at the published operating points (see above) |

The end-to-end testbench uses a behavioural stand-in for the decoder. It
produces N = 640 LLRs per pass: the message plus a scenario-dependent set of
wrong decisions. The testbench computes each pass's BIP from the definition,
and from that the pass at which the unit must stop.

It covers four scenarios:

* blocks that converge, which stop on a match;
* blocks that never converge, which stop at the limit;
* a deliberately aliased pass, which stops at pass 2;
* a `frame_start` in the middle of pass 2.

It also covers:

* LLR gaps and back-to-back passes;
* zero-valued LLRs;
* LLRs refused after stop.

Each scenario and mechanism is counted, and a failure is reported if one
never occurs. At every pass end the testbench checks `bip` and `bip_prev`
against the reference. It checks the stop latency exactly.

## Simulating

Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/bhda_pkg.sv tb/tb_bhda_stop_unit.sv --top-module tb_bhda_stop_unit
    ./obj_dir/Vtb_bhda_stop_unit

Swap in any other `tb_*` name to run that testbench. All finish in well under
a second. Lint with:

    verilator --lint-only -Wall -Irtl rtl/bhda_pkg.sv rtl/bhda_stop_unit.sv

`-Wall` reports two kinds of warning that are expected:

* unused package constants, in files that use only some of them;
* a note that `rst_n` is used both as an asynchronous reset and in the
  `disable iff` of the controller's assertions.

The controller carries two concurrent assertions:

* a stopped block always has a reason;
* `iter` never exceeds `MAX_ITER`.
