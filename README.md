# Masked AES-128 with MAC tags and λ-detection

This is an AES-128 encryption core that resists side-channel analysis and fault attacks together.
Side channels are handled by masking: every intermediate value is held in `NS` Boolean shares
(`NS = 3`, second-order masking). Faults are handled by MAC tags: next to every data byte `x` the
core carries a tag `τ = α·x` in GF(2^8), where `α` is a secret tag key. A fault that changes data
but not its tag, or the other way round, breaks the relation. An ordinary masks-and-MACs
design checks the relation only once, on the ciphertext. This core also checks it *inside* the
S-box. That closes a hole the final check cannot cover: the **zero-value fault**.

## Why the final tag check is not enough

The S-box inverts its input in the tower field GF((2^4)^2). The byte `x` is mapped to a pair
`(a, b)` of GF(2^4) elements, and

    λ(a,b) = a·b + (a+b)^2·ν           (ν a fixed constant)
    (a,b)^-1 = (λ^-1·b, λ^-1·a)

If `x = 0` then `a = b = 0`. Whatever a fault does to `λ` or to `λ^-1`, the last multiplication
by `b` and `a` turns it back into zero. The tag of zero is zero too (`α·0 = 0`), so data and
tag both come out correct and the final check passes. A fault in the middle of the S-box is
therefore *ineffective exactly when the S-box input is zero*. Whether the core reports a fault
then tells an attacker whether a byte was zero. From that, statistical ineffective fault
attacks recover:

* a last-round key byte from a few hundred faulted encryptions, by ranking candidates `k` by how
  often `S^-1(c ⊕ k) = 0` among the accepted ciphertexts;
* a first-round key byte by sweeping one plaintext byte over 0..255 with a fault in round 1.
  Only `P = K` gives an accepted result.

`tb/tb_mm_aes_fault_campaign.sv` runs both attacks against the tag-check-only view of this core
and shows that they succeed there. It also shows that the complete core releases nothing.

## λ-detection

`λ` is the norm map of GF((2^4)^2) over GF(2^4), so it is multiplicative. Since the tag is
`τ = x·α`,

    λ(τ) = λ(x)·λ(α),   and likewise for λ^3 and λ^-1.

The data and tag paths of the S-box are separate circuits. A **λ detector** on a stage computes,
in shares, `err = λ_data·λ_α ⊕ λ_tag`. For an undisturbed byte this is zero. A fault in the data
path of that stage makes it non-zero, even when the S-box input is zero, because the check
looks at `λ` before the multiplication that would hide the fault. Detectors sit on stages 2, 3
and 4, the stages whose faults can be nullified. The three constants `λ(α)`, `λ(α)^3` and
`λ(α)^-1` are obtained once per encryption by sending `α` itself through the S-box (unmarked,
so the detectors ignore it).

Two rules keep the detection from leaking anything itself:

* **Nothing stops early.** Detector results are XOR-accumulated in one shared 4-bit register per
  stage, and read only after the last round. When or where a fault hit is never visible.
* **Nothing is unmasked.** After the last round the **match check** forms
  `e_i = α·c_i ⊕ τ_i` for the 16 ciphertext bytes. A shared **Kronecker delta** then reduces the
  128 bits of `e` and the 12 accumulator bits to one shared bit `δ`, which is 1 only if all of
  them are zero. Reducing to one bit matters. Suppose `e` itself were exposed and an attacker
  faulted `α` by `Δ`: then `e = Δ·c`, which reveals the ciphertext. The shared ciphertext is
  ANDed with `δ` share by share, so the output is either the correct ciphertext or zero.

## The S-box (`mm_sbox`, `mm_tower_inv`)

There is one six-stage pipeline per path, and it accepts one byte per cycle:

| stage | data path (and, identically, the tag path)                                    |
|-------|-------------------------------------------------------------------------------|
| 1     | `(a,b) = φ(x)`, linear, share by share                                        |
| 2     | `λ = a·b + (a+b)^2·ν`, one shared GF(2^4) multiplication → detector 2         |
| 3     | `λ^3 = λ·λ^2` → detector 3                                                    |
| 4     | `λ^14 = (λ^3)^4·λ^2 = λ^-1` (0 ↦ 0) → detector 4                              |
| 5     | `(c,d) = (λ^-1·b, λ^-1·a)`, two multiplications                               |
| 6     | data: `S(x) = L(φ^-1(c,d)) ⊕ 63`; tag: see below                              |

Field choices (`mm_pkg`):
* GF(2^4) uses `x^4+x+1`.
* The tower field is GF(2^4)[Y]/(Y^2+Y+ν) in the normal basis `{Y^16, Y}` with `ν = 8`. In that
  basis the norm and inverse take exactly the form above.
* `φ` sends the AES generator to the root `0x02` of the AES polynomial in the tower field. Column
  `i` of its bit matrix is that root to the power `i`.
* `L` is the linear part of the AES affine map.

**Tag path through the affine map.** `L` is GF(2)-linear but not GF(2^8)-linear, so it does not
commute with multiplication by `α`. Write `L(y) = Σ_k L_k·y^(2^k)`, with
`L_k = 05 09 f9 25 f4 01 b5 8f`. The tag path has inverted `τ` and holds `u = (αx)^-1`. With
`γ_k = L_k·α^(1+2^k)`:

    Σ_k γ_k·u^(2^k) ⊕ 63·α = α·L(x^-1) ⊕ 63·α = α·S(x)

The powers `u^(2^k)` are linear and are taken per share. Stage 6 of the tag path is eight shared
multiplications, by the `γ_k` that `mm_tag_keygen` derives from `α` during setup. `α` is never
inverted or unmasked.

**Masked multiplication (`mm_dom_mul`).** Each product is computed in the domain-oriented style.
Every share pair `(i, j)` forms `x_i·y_j`. The cross terms are blinded with one fresh random word
per unordered pair. All `NS²` terms are registered, then row-wise XORed. Latency is one cycle.
The same gadget serves GF(2) (AND), GF(2^4) and GF(2^8).

## Core organisation and timing (`mm_aes`)

A single S-box is shared by the state and the key schedule. A round feeds 16 state bytes, then
the rotated last key word (bytes 13, 14, 15, 12). Results return 6 cycles later. One more cycle
applies ShiftRows, MixColumns, the next round key and AddRoundKey to data and tags. MixColumns is
omitted in round 10. Linear steps act per share and act identically on tags, because they are
GF(2^8)-linear. The round constant enters the data on share 0 and the tag as `rcon·α` on every
share.

| phase | cycles | work                                                                    |
|-------|--------|-------------------------------------------------------------------------|
| IDLE  | 1      | `start` latches `pt`, `key`, `α`; detectors cleared                      |
| SETUP | 5      | tags of pt and key; `γ_k`; `α` through the S-box for the `λ(α)` powers  |
| ROUND | 10 × 27| 20 S-box operations, 6-cycle drain, 1 linear cycle                       |
| CHECK | 12     | match check (2), delta over 140 bits (8), output gating (1)              |

From the cycle `start` is sampled to the cycle with `done` high takes **288 cycles**. `done`
pulses for one cycle. `ct` then holds its value until the next encryption finishes.

### Interface

| port    | dir | width                 | meaning                                                     |
|---------|-----|-----------------------|-------------------------------------------------------------|
| `clk`, `rst_n` | in | 1             | clock; asynchronous active-low reset of the control         |
| `start` | in  | 1                     | begin an encryption (ignored while `busy`)                  |
| `pt`, `key` | in | `NS × 128`         | shares; the XOR of the `NS` words is the value              |
| `alpha` | in  | `NS × 8`              | tag key shares; the value must be non-zero                  |
| `rnd`   | in  | `rnd_width(NS)`       | fresh uniform random bits every cycle (2496 for `NS = 3`)   |
| `busy`, `done` | out | 1              | encryption running; result valid                            |
| `ct`    | out | `NS × 128`            | ciphertext shares, or shares of zero after a detected fault |

Byte `b` of a 128-bit value is bits `[127-8b -: 8]`, the FIPS-197 order. `pt`, `key` and
`alpha` are sampled only with `start`. `rnd` is split into fixed slices, one per consumer, in the
order listed in `mm_aes`: S-box data path, tag path, stage-6 tag multiplications, the three
detectors, the input tags, `γ_k`, the match check, the delta tree and the output gate. A new
`α` per encryption is recommended. With `α = 0` every tag is zero and no fault is detected.

## Files

| file | contents |
|------|----------|
| `rtl/mm_pkg.sv` | field arithmetic, `φ`, `φ^-1`, affine map constants, `rnd_width` |
| `rtl/mm_dom_mul.sv` | shared multiplier, GF(2)/GF(2^4)/GF(2^8) |
| `rtl/mm_tower_inv.sv` | stages 1–5 of one S-box path, with λ taps |
| `rtl/mm_sbox.sv` | data and tag paths plus stage 6 |
| `rtl/mm_tag_keygen.sv` | `γ_k` from `α` |
| `rtl/mm_lambda_detector.sv` | one stage's λ check and accumulator |
| `rtl/mm_match_check.sv` | `e_i = α·c_i ⊕ τ_i`, 16 bytes in parallel |
| `rtl/mm_delta.sv` | shared Kronecker delta, AND tree |
| `rtl/mm_aes.sv` | the core |
| `tb/mm_tb_pkg.sv` | independent reference models (plain AES, S-box by search, field multiply) |
| `tb/tb_*.sv` | self-checking testbenches, one per unit, plus the two below |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. Expected
values come from `tb/mm_tb_pkg.sv`. That package shares no code with the RTL: it finds inverses
by search and multiplies by shift-and-add.

* `tb_mm_aes` runs the full core at its default size. It checks:
  * the FIPS-197 vector and random encryptions with random sharings;
  * the 288-cycle latency;
  * a zero-value fault (output zero, although the match check saw nothing);
  * a fault on a non-zero byte;
  * a fault on a stored ciphertext tag, which only the match check sees;
  * clean runs after each faulty one.

  It counts each of these mechanisms and fails if one never happened.
* `tb_mm_aes_fault_campaign` injects single-cycle bit flips into stage 2, 3 or 4 of the data path.
  It reports detection ratios for zero-value and other faults, measured with the tag check alone
  and with the complete core. The tag check alone sees 0% of zero-value faults and 100% of the
  others. The complete core detects 100% of both. The testbench also runs the first-round
  chosen-plaintext sweep and a last-round key-ranking attack of at least 500 faulted
  encryptions. Both recover the key byte from the tag-check-only view, and the core releases no
  ciphertext.
* Unit testbenches:
  * `tb_mm_dom_mul`: all three fields.
  * `tb_mm_sbox`: all 256 inputs plus random ones, with bubbles. It checks data, tag, the 6-cycle
    latency and the λ homomorphism at every tap.
  * `tb_mm_tag_keygen`: the `γ_k` constants and the tag identity above.
  * `tb_mm_lambda_detector`: accumulation, valid gating and clear.
  * `tb_mm_match_check`.
  * `tb_mm_delta`: 140 bits, 8-cycle latency.

Simulation with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl rtl/mm_pkg.sv tb/mm_tb_pkg.sv \
        tb/tb_mm_aes.sv --top-module tb_mm_aes && ./obj_dir/Vtb_mm_aes

Swap the testbench name to run another one. Each takes seconds. `NS` may be changed at the top.
The random width follows from `rnd_width(NS)`.

Only functional behaviour is verified. Probing security, glitch robustness and side-channel
leakage cannot be judged from these simulations. The design has not been put through a
masking verifier or a leakage test.

## Departures and open points

These points come from the design's own choices, or from where the original description gives
no detail.

* **Masking gadget.** The reference design uses consolidated masking for its S-box. This core
  uses domain-oriented multiplication instead. Several multiplications take both operands from
  one sharing: `λ·λ^2`, `λ^12·λ^2` and `α·α^(2^k)`. Non-independent inputs like these weaken
  the formal guarantees of such gadgets. A production version should re-share one operand or
  use a different inversion chain.
* **Randomness and latency.**
  * The reference figures are 564 random bits per cycle and 244 cycles per encryption. This core
    needs 2496 bits per cycle and 288 cycles.
  * Every consumer has its own random slice, even those that are never active at the same time.
    Sharing slices between phases would reduce the width.
  * The datapath schedule (one S-box, 27 cycles per round) is this design's own.
  * The delta tree takes 8 cycles, against 5 in the reference. The detectors take 2, against 3.
* **Output gating** uses a shared AND with fresh randomness. The reference states that zeroing
  the output costs no extra randomness. That gadget is not described, so it is not reproduced.
* **Accumulation by XOR.** Two faults whose λ errors cancel exactly within one stage go
  unnoticed by that stage's detector. They are still subject to the match check.
* **Detectors on stages 2–4 only.** The scheme allows detectors on every stage. Stages 1, 5 and
  6 are covered by the match check, since faults there are never nullified.
* **Tag arithmetic is this design's own.** This covers how the tags follow the affine map (the
  `γ_k` constants) and the key schedule (`rcon·α`). It also covers how `λ(α)` is obtained.
* The core encrypts only. There is no decryption and no key-schedule precomputation.
