# NTRUEncrypt SVES core, constant-time, ees1499ep1

This is a hardware core for NTRUEncrypt with the SVES padding scheme of IEEE 1363.1, at the
256-bit security parameter set ees1499ep1 (N = 1499, q = 2048, p = 3). It does both encryption
and decryption on one datapath. The core is built for low latency, and its running time does not
depend on secret data. Two ideas shape it:

* **Ring multiplication in N parallel lanes.** One operand of every product (r, F) is sparse and
  ternary: it has 79 coefficients equal to +1, 79 equal to −1, and the rest zero. The product is
  therefore 158 rotate-and-add steps of the dense operand. All 1499 coefficients are updated in
  the same cycle, so a product takes about 160 cycles.
* **Hashing with fixed release points.** The random-looking parts of SVES come from SHA-256 in a
  counter mode:
  * the blinding polynomial r comes from the index generator (BPGM)
  * the mask comes from the mask generator (MGF).

  Both reject some hash output, so how much usable output they get varies. Here results are
  released only at fixed points: after a fixed number of hashes, a fixed number of results. That
  makes the timing independent of the data. In the rare case that too few were produced, the
  operation reports a failure and the caller repeats it with a new random seed b.

The long parts of an operation are the SHA-256 chains: about 1700 cycles each for BPGM and MGF.
Everything else takes a few hundred cycles.

## Operations

Encryption of message m (length octL ≤ 247 bytes) with public key h and 256 random bits b:

1. `sData = OID ‖ m ‖ b ‖ hTrunc`. hTrunc is the first 256 bits of h.
2. BPGM(sData) gives 158 distinct indices, which form r: the first 79 are +1 and the next 79
   are −1. The multiplier computes `R = r*h mod q`. Each index enters the multiplier as soon
   as it is released.
3. MGF(R mod 4) gives 1499 trits, the mask.
4. `Mbin = b ‖ octL ‖ m ‖ 0…` is 2240 bits. It is cut into 3-bit groups, and each group
   becomes 2 trits (B2T), giving Mtrin.
5. `m' = Mtrin + mask (mod 3)`. Check 1 requires at least 79 of each trit value in m'.
6. `e = R + m' (mod q)`.

Decryption of e with private key `f = 1 + 3F`:

1. `a = f*e`, computed as `e + 3·(F*e)`. Then `ci = a mod 3`, with a centred in [−1024, 1023].
   Check 1 is applied to ci.
2. `cR = e − ci`, then `mask = MGF(cR mod 4)`, then `cm' = ci − mask`. T2B turns cm' back into
   bits. A trit pair (−1, −1) has no 3-bit value and fails. Check 2 requires a length ≤ 247 and
   zero padding.
3. BPGM is run on the recovered b and message, and gives cr. Check 3 requires `cr*h = cR`. The
   message is released only if all three checks pass.

`fail_code` gives the reason for a failure:

| Code | Reason |
|---|---|
| 1 | a BPGM or MGF batch came up short |
| 2 | Check 1 |
| 3 | Check 2, or an invalid trit pair |
| 4 | Check 3 |

## The polynomial multiplier (`poly_mult`)

The stored operand sits in a serial-in/parallel-out register (SIPO). It is loaded two 11-bit
coefficients per cycle. Each step works as follows:

* The step gives an index b_i and a sign.
* A logarithmic barrel rotator turns the SIPO contents by b_i, giving `a_(j−b_i mod N)` for
  every lane j. The result is registered.
* Every lane adds the rotated coefficient to its 11-bit sum.
* For a −1 coefficient, the rotated word is inverted and a carry of 1 is added: a
  two's-complement subtraction in the same adder.

Steps enter at one per cycle and the pipeline is two stages deep. The product is ready two cycles
after the last index.

Two other step kinds exist for decryption:

* `step_x3` replaces the rotated operand with `2·sum`, so the sum triples.
* `step_first` starts a new product from zero.

So `f*e` takes 158 F-steps, one ×3 step and one `+e` step (index 0).

A parallel-in/serial-out register (PISO) sits beside the SIPO, and `swap` exchanges the two in
one cycle. Decryption uses it in this order:

1. The swap parks h in the PISO.
2. e is loaded and multiplied by F.
3. A second swap brings h back for `cr*h`.
4. e then waits in the PISO.

h is loaded once and stays in the core across any number of operations.

## BPGM and MGF (`bpgm_mgf`, `modified_sha2`, `bwc_1`, `bwc_2`)

Each hash is `SHA-256(sData ‖ C)`, where C is a 32-bit big-endian counter starting at 0. The
same sData prefix is hashed for every counter value. The first t full 512-bit blocks therefore
give the same chaining value every time, with t = 4 for a 247-byte message. `modified_sha2`
keeps a backup register for it:

* while the first hash runs, the chaining value after block t−1 is saved;
* every later hash starts from the saved value and processes only the last one or two blocks.

For the longest message (314 bytes of sData, six blocks per hash), this cuts BPGM from
60 blocks to 6 + 9·2 = 24. MGF hashes 375 bytes of R4, and goes from 77 blocks to 7 + 10·2 = 27.
The SHA-256 core does one round per cycle, and a block takes 65 cycles.

A data formatter assembles the hash input one byte per cycle into a 512-bit block buffer. It takes
bytes from:

* the message memory (or the recovered message when decrypting)
* b
* hTrunc
* R4, the multiplier output mod 4 at two bits per coefficient, coefficient 0 first.

Padding and the counter are added by the formatter. It fills the next block while SHA-256 works on
the current one.

**Index generation (`bwc_1`).** Digests are cut into 13-bit chunks, most significant bit first. A
chunk ≥ 7495 (= 2¹³ − 2¹³ mod 1499) is discarded, which keeps the indices uniform. Otherwise
`chunk mod 1499` is the index. A 64×32-bit bitmap remembers which indices have been seen, so
repeats are dropped. The bitmap is cleared in 64 cycles at the start. New indices go into a FIFO.

After digest k (k = 1…10), the controller releases indices until the cumulative count reaches:

| Digest k | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|---|
| Cumulative indices | 14 | 30 | 47 | 62 | 79 | 94 | 110 | 126 | 142 | 158 |

Each value is a lower bound that is met with probability ≥ 0.995 per step, and about 0.98 for the
whole run. If the FIFO is short, `rnd_error` is raised.

**Mask generation (`bwc_2`).** Digests are read as bytes. A byte ≥ 243 = 3⁵ is discarded. Any
other byte becomes five trits, most significant ternary digit first. After digests 3, 5, 7, 9 and
11, five 128-bit words of 64 trits each are released. That gives 25 words, or 1600 trits, of
which the first 1499 are used.

## Encodings

| Item | Encoding |
|---|---|
| Trits | 2 bits: 0, 1, and 2 meaning −1 |
| Mask words and R4 words | the first trit (or coefficient) in the top bits |
| B2T | 3-bit group v → (v div 3, v mod 3); the last group is padded with zeros |
| T2B | inverse of B2T; a pair worth 8 is invalid |
| hTrunc | coefficients 0…23 of h, 11 bits each, MSB first; the first 256 bits are used |
| OID | a parameter (`OID_DEF`), default 3 bytes `00 06 05`, a placeholder for the standard's value |

## Interface and timing (`ntru_sves`)

All ports are plain signals. There is one clock, and a reset that is asynchronous and active low.

**Loading the keys**
- h: while idle, each cycle with `pair_valid` shifts in one pair (even coefficient in bits
  [10:0]). Send 750 pairs for N = 1499; the last pair's odd half is ignored.
- Private key: the 158 positions of F's nonzero coefficients are written with
  `f_we/f_waddr/f_wdata`. Addresses 0–78 hold the +1 positions and addresses 79–157 the −1
  positions.

**Encryption**
- Write the message to `msg_*`, 32-bit words with the first byte in bits [31:24].
- Write b to `b_*` and set `octl`.
- Pulse `start_enc`.
- `done` comes with `fail` and `fail_code`. On success, `e_out` holds all 1499 coefficients.

**Decryption**
- Pulse `start_dec`, then send 750 pairs of e on the pair port. `pair_ready` is low in the cycle
  after `start_dec`, while h is being parked.
- On success, `cm_out` and `coctl_out` hold the message.

**Measured latencies** (clock cycles, 247-byte message, simulated)

| Step | This design | Published design |
|---|---|---|
| Encryption, total | 3611 | 3743 |
| ↳ BPGM and R = r*h | 1681 | 1732 |
| ↳ MGF | 1926 | 1999 |
| Decryption, total | 4526 | 4186 |
| ↳ e loading | 750 | 258 |
| ↳ f*e | 164 | 164 |

Shorter messages need fewer SHA blocks: a 1-byte message encrypts in 2766 cycles. The time
depends only on the message length, which is public, and never on the data or the keys.

## Departures from the published design

- **Host interface.** The published core sits behind a standard post-quantum-crypto hardware
  interface: 64-bit data-in and data-out buses and a 16-bit key bus, with their command protocol.
  That protocol is not reproduced here. Plain load ports and a parallel ciphertext output replace
  it, which is why e loading takes longer.
- **Multiplier pipeline.** The multiplier has two pipeline stages, where the original has five.
  The cycle counts of the multiplication are the same. The clock frequency will be lower.
- **Index reduction.** The mod-1499 reduction is written as an arithmetic modulo, not as an
  8192-entry table.
- **Failure handling.** Failures are reported with a code; the caller must retry with a new b.
- **Outside the core.** Key generation (f, F, h) is done outside the core, as in the original.
- **Parameter set.** The published core also supports ees1087ep1. All sizes here are parameters,
  but the defaults are ees1499ep1. For the smaller set, the BPGM release table (`BPGM_MIN`) would
  need values that have not been derived here.

## Files

| File | Contents |
|---|---|
| `rtl/ntru_pkg.sv` | parameters of ees1499ep1, trit helpers, BPGM release table |
| `rtl/ntru_sves.sv` | top level: controller, key and message memories, coefficient-wise units |
| `rtl/poly_mult.sv` | ring multiplier with SIPO/PISO |
| `rtl/bpgm_mgf.sv` | data formatter, hash sequencing, release controller |
| `rtl/modified_sha2.sv` | SHA-256 compression with chaining-value backup |
| `rtl/bwc_1.sv`, `rtl/bwc_2.sv` | digest-to-index and digest-to-trit converters |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO |
| `rtl/b2t.sv`, `rtl/t2b.sv`, `rtl/trit_addsub.sv`, `rtl/poly_addsub_q.sv`, `rtl/range_conv_modp.sv`, `rtl/check1.sv`, `rtl/check2.sv`, `rtl/check3.sv` | one-cycle coefficient-wise units |
| `tb/ntru_ref_pkg.sv` | software model: SHA-256, BPGM, MGF, ring multiplication and inversion |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ntru_sves_retry` for the failure path |

`tb_ntru_sves` runs at the default parameters and covers the following:

1. It generates a key pair.
2. It encrypts three messages and compares each ciphertext with the software model.
3. It decrypts each ciphertext again.
4. It checks that tampered ciphertexts are rejected by each of the three checks.
5. It counts the swaps, chaining-value restores, index batches and mask releases.
6. It checks that two encryptions of the same length take the same number of cycles.

`tb_ntru_sves_retry` builds the core with a release table whose first entry can never be met.
It checks the short-batch failure (code 1) and that the failure also comes at a fixed time.

## Simulating

With Verilator 5:

```
verilator --binary --timing --top-module tb_ntru_sves -y rtl -y tb +libext+.sv \
    rtl/ntru_pkg.sv tb/ntru_ref_pkg.sv tb/tb_ntru_sves.sv
./obj_dir/Vtb_ntru_sves
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. The full-size end-to-end
test simulates about 35,000 cycles and takes well under a minute. The other testbenches are
built the same way, with a different `--top-module` and file name.
