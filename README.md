# Masked AES-128 over GF(2²)

This is an AES-128 encryptor meant to resist first-order power analysis while staying small.
It rests on two ideas:

* **Boolean masking.** Every intermediate value `x` exists only as two shares, `x0 = x ^ m`
  and `x1 = m`, with `m` random. Neither share alone is correlated with `x`. The linear AES
  steps are applied to each share separately. The S-box is not linear and needs a dedicated
  masked circuit.
* **Arithmetic carried down to GF(2²).** Bytes are not processed in the AES field GF(2⁸).
  They are moved into an isomorphic tower field GF(((2²)²)²), so that the S-box inversion
  splits into small operations over GF(2⁴) and, at the bottom, GF(2²). In GF(2²),
  inversion is simply squaring, which is linear. That is what makes the masked S-box cheap.

The plaintext and key are masked and mapped into the tower field on entry. Ten masked rounds
run there, one per clock. The two ciphertext shares are mapped back and XORed together only
at the very end.

```
 plaintext ─(^ pt_mask)─► map M ─┐                              ┌─► M⁻¹ ─┐
                                 ├─► masked_aes_core ──► ct0/ct1┤        ├─ ^ ─► ciphertext
 key ──────(^ key_mask)─► map M ─┘   (round + key schedule,     └─► M⁻¹ ─┘
                                      2 shares, tower field)
```

## The tower field

| level  | definition                         | element                      |
|--------|------------------------------------|------------------------------|
| GF(2²) | GF(2)[w] / (w² + w + 1)            | `{b1,b0}` = b1·w + b0        |
| GF(2⁴) | GF(2²)[z] / (z² + z + φ), φ = w    | `{h,l}` = h·z + l (2+2 bits) |
| GF(2⁸) | GF(2⁴)[y] / (y² + y + λ), λ = w·z  | `{h,l}` = h·y + l (4+4 bits) |

GF(2²) multiplication: `c1 = a1b1 ^ a1b0 ^ a0b1`, `c0 = a1b1 ^ a0b0`. The upper two levels
multiply as `(ah·X + al)(bh·X + bl) = (ah·bh + ah·bl + al·bh)·X + (al·bl + c·ah·bh)`, with
`c = φ` or `λ`.

The map `M` from the AES field (polynomial x⁸+x⁴+x³+x+1) into the tower is linear. It sends
xⁱ to βⁱ, where β = `8'h41` is a root of the AES polynomial in the tower field. `M⁻¹` is its
inverse. Both are stored in `aes_gf_pkg` as eight row masks each: output bit r is the parity of
`ROW[r] & x`. Every other constant follows from `M`:

* The MixColumns factors are `T2 = M·02` (`8'h41`) and `T3 = M·03` (`8'h40`).
* The key-schedule round constant starts at `M·01 = 01` and is multiplied by `T2` each round.
* The S-box affine map `A·x + 63` becomes `q·x + r` in the tower, with `q = M·A·M⁻¹` and
  `r = M·63 = 8'h82`. Since `q` depends on the choice of `M`, it is computed for this `M` and
  stored as `Q_ROWS`.

Any other valid choice of φ, λ and β works. It changes only these tabulated rows.

## The masked S-box (`masked_sbox` = `masked_inv` + `masked_affine`)

This is the only non-linear part, and the only place where the two shares interact.

**Inversion in GF(2⁸).** For `x = xh·y + xl`:

```
d      = λ·xh² + xh·xl + xl²            (in GF(2⁴))
x⁻¹    = (xh·d⁻¹)·y + (xh + xl)·d⁻¹
```

GF(2⁴) inversion follows the same formula with φ, and it reduces to an inversion in GF(2²).
There the inverse is the square, `{b1, b1^b0}`. These formulas also send 0 to 0, as AES
requires, so no special case is needed.

**Masking the inversion.** Squaring, scaling by a constant and addition are linear over GF(2).
They are applied to each share on its own, and that includes the GF(2²) inversion. What remains
are six products: three in GF(2⁴) and three in GF(2²). Each uses a two-share multiplier with
one fresh random value `z`:

```
c0 = a0·b0 ^ (a0·b1 ^ z)
c1 = a1·b1 ^ (a1·b0 ^ z)          c0 ^ c1 = (a0 ^ a1)·(b0 ^ b1)
```

A cross term is always added to a fresh `z` before it meets a share, so the unmasked product is
never formed. Each S-box consumes 18 fresh bits: 3×4 for GF(2⁴) and 3×2 for GF(2²).

**Affine step.** `y0 = q·a0 ^ r` and `y1 = q·a1`. The constant goes into one share only.

The S-box is purely combinational. No register separates the multiplier stages, so glitches
can still leak in a real circuit. This design makes no claim of glitch robustness.

## Round and key schedule on shares

`masked_round` is combinational and performs one round:

* SubBytes uses 16 masked S-boxes in parallel.
* ShiftRows is a byte permutation, the same for both shares.
* MixColumns multiplies by `T2` and `T3` in the tower, on each share separately. It is skipped
  when `last` is set.
* AddRoundKey XORs each round-key share into the matching state share. This is the rule
  `(x1^r1) ^ (x2^r2) = (x1^x2) ^ (r1^r2)`.

`masked_key_expand` computes the next AES-128 round key from the current one. Both are kept as
two shares. SubWord uses four more masked S-boxes. The round constant enters the data share
only. The round keys are never unmasked.

`masked_aes_core` registers the state shares (2×128 bits), the round-key shares (2×128
bits), the round constant (8 bits), a 4-bit round counter, a one-bit FSM and `done`. In every round the next round key is expanded and used in the same cycle.

## Interface and timing (`masked_aes_gf4_top`)

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | rising-edge clock |
| `rst_n`      | in  | 1     | synchronous, active-low reset |
| `start`      | in  | 1     | take `plaintext`, `key`, `pt_mask`, `key_mask` this cycle |
| `plaintext`  | in  | 128   | FIPS-197 byte order, byte 0 in bits 127:120 |
| `key`        | in  | 128   | AES-128 key |
| `pt_mask`    | in  | 128   | random mask for the data |
| `key_mask`   | in  | 128   | random mask for the key |
| `rnd`        | in  | 360   | fresh random bits, every cycle: [287:0] state S-boxes, [359:288] key S-boxes |
| `busy`       | out | 1     | rounds in progress; `start` is ignored while high |
| `done`       | out | 1     | one-cycle pulse 11 rising edges after `start` was taken |
| `ciphertext` | out | 128   | valid from `done` until the next `start` |

The inputs are needed only in the `start` cycle. The next `start` may come in the cycle right
after `done`, which gives one block every 11 cycles. The masks and `rnd` must come from an
external random source. For protection they must be fresh and uniform. For correctness any
values work: all-zero masks and all-zero `rnd` give the same ciphertext.

Size after generic synthesis (word-level cells, before any FPGA mapping): about 13.7k cells and
526 flip-flops.

## Files

| file | content |
|------|---------|
| `rtl/aes_gf_pkg.sv` | types, tower-field functions, `M`, `M⁻¹`, `q`, derived constants |
| `rtl/mask_map.sv` | masks a 128-bit value and maps both shares into the tower |
| `rtl/masked_inv.sv` | masked inversion in GF(((2²)²)²) |
| `rtl/masked_affine.sv` | S-box affine map `q·x + r` on shares |
| `rtl/masked_sbox.sv` | masked S-box |
| `rtl/masked_round.sv` | one masked round |
| `rtl/masked_key_expand.sv` | one masked key-schedule step |
| `rtl/masked_aes_core.sv` | iterative core, control and registers |
| `rtl/unmap_demask.sv` | maps both shares back and removes the mask |
| `rtl/masked_aes_gf4_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | plain AES-128 reference (GF(2⁸), no tables, no masking) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Modules are found by name in `rtl/` and `tb/`; the packages are listed first. Each testbench
prints `TB_RESULT checks=N failures=M` and stops. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/aes_gf_pkg.sv tb/aes_ref_pkg.sv tb/tb_masked_aes_gf4_top.sv \
  --top-module tb_masked_aes_gf4_top -o sim && ./obj_dir/sim
```

The end-to-end test checks both FIPS-197 examples (`69c4e0d8…c55a` and `3925841d…0b32`) and
random blocks against the reference model. It also checks the 11-cycle latency. It exercises
and counts: zero masks, random masks, all-zero fresh bits, a `start` while busy, back-to-back
blocks, a reset in the middle of an operation, and the final round without MixColumns. The
S-box and inversion tests cover all 256 inputs under several random masks.

## What follows the published design, and what is chosen here

Taken from the published design:
* the data flow: mask, map to the GF(2²)-based field, AES rounds with a masked key expansion,
  map back, demask;
* Boolean masking by XOR, with the linear steps applied share-wise;
* GF(2²) with w² + w + 1;
* the S-box affine map in mapped form, `q = M·A·M⁻¹` and `r = M·b`.

Chosen here, because the published design leaves it open:
* the key length (AES-128);
* the intermediate polynomials (φ, λ) and the isomorphism `M`, and therefore the numbers in
  `q` and `r`;
* the masked-multiplier structure and its 18 fresh bits per S-box;
* a round-per-cycle organisation with 16 + 4 S-boxes;
* the start/busy/done handshake and the synchronous reset;
* masks and randomness supplied as ports.

Encryption only; no decryption.

The published resource figures for the GF(2²) variant are about 15.4k LUTs, 298 registers and
212 I/O pins on a Virtex-6. They suggest a different register organisation than this one, which
keeps 526 flip-flops of state. This top level also has far more pins (1005) than such a device
offers (240). Placing it stand-alone would need a narrower external interface, for example
loading words serially.
