# Composite-field AES S-box and an AES-128 core built on it

The AES S-box maps a byte to the affine image of its multiplicative inverse in
GF(2^8). A table needs 256 entries per S-box and a second table for the inverse
S-box. This design computes both directions with one small logic datapath
instead. The byte is first mapped into an isomorphic *composite* field,
GF(((2^2)^2)^2). There, inverting an 8-bit element takes one 4-bit inversion,
three 4-bit multiplications and a few XORs. The result is mapped back to
GF(2^8). Two multiplexers add the affine stage (forward S-box) or the inverse
affine stage (inverse S-box). So SubBytes and InvSubBytes share all of the
arithmetic.

Every linear stage is written in a "shared term" form. The affine map, the
inverse affine map and both field isomorphisms are XOR networks, and XOR
pairs that appear in several output bits are computed once. In the same way,
squaring a 4-bit element and scaling it by the constant λ are merged into a
single three-XOR block.

The S-box is used in a complete iterative AES-128 core (`aes128_core`). The
core encrypts and decrypts, does one round per clock, and expands the key on
chip.

## The composite field

Everything below depends on the field. The S-box is only correct if the
isomorphic map, the 4-bit arithmetic and the constant λ all belong to the
same tower:

| level | elements | reduction polynomial |
|---|---|---|
| GF(2^2) | 2 bits | x^2 + x + 1 |
| GF((2^2)^2) | 4 bits, high pair * y + low pair | y^2 + y + φ, φ = {10} |
| GF((2^4)^2) | 8 bits, high nibble * z + low nibble | z^2 + z + λ, λ = {1000} |

**Inversion** (`gf8_mul_inv`). Write an 8-bit element as q = h·z + l. Then:

```
d      = λ·h² ⊕ (h ⊕ l)·l          (a GF(2^4) value)
q⁻¹    = (h·d⁻¹)·z + (h ⊕ l)·d⁻¹
```

The 4-bit inverse d⁻¹ (`gf4_inv`) is a fixed sum of products of the four
bits. It maps 0 to 0, so the whole chain maps 0 to 0, as AES requires. The
4-bit multiplier (`gf4_mul`) uses the three-AND Karatsuba form at both levels.

**λ·h² in one block** (`gf4_square_lambda`). Squaring and multiplying by a
constant are both linear over GF(2), so their composition is linear too. With
h = q2 ⊕ q3 it reduces to:

```
K3 = q0 ⊕ q3,  K2 = q1 ⊕ h,  K1 = h,  K0 = q2
```

These equations fix λ: {1000} is the only constant that gives them. The
separate blocks `gf4_square` and `gf4_mul_lambda` are kept for comparison. The
parameter `SQ_LAMBDA_COMBINED = 0` puts them in the datapath instead. Both
settings give the same function.

**Isomorphic map** (`sbox_iso_map`, GF(2^8) → composite field):

```
q0 = b0^b2          q4 = b1^b5^b7
q1 = b1^b6^b7       q5 = b1^b4^b5^b6
q2 = b2^b5          q6 = b1^b2^b3^b4^b5^b6
q3 = b1^b3^b6^b7    q7 = b5^b7
```

Shared terms: b6^b7, b5^b7, b2^b5, b1^b3, b4^b6.

**Inverse map** (`sbox_inv_iso_map`):

```
b0 = q0^q1^q3^q5^q6    b4 = q1^q5^q7
b1 = q4^q7             b5 = q1^q2^q3^q5^q6
b2 = q1^q3^q5^q6       b6 = q2^q3^q4^q5^q6
b3 = q1^q3             b7 = q1^q2^q3^q5^q6^q7
```

Shared terms: q1^q3, q5^q6, q5^q7.

The isomorphic map is a field isomorphism for this tower with λ = {1000}. Its
inverse is the exact matrix inverse. Together with the affine stage they
reproduce the AES S-box for all 256 inputs. The testbenches check each of
these properties on its own.

## Forward and inverse S-box (`composite_sbox`)

```
          dec                                                         dec
           |                                                           |
din --+-[IAT]--|1\                                          +--[AT]--|0\
      |        |  |--[ISO]--[MI (gf8_mul_inv)]--[ISO^-1]--+          |  |-- dout
      +--------|0/                                          +--------|1/
```

* Encryption, `dec = 0`: ISO, then MI, then ISO⁻¹, then the affine map AT.
  AT is the XOR form of s = A·b ⊕ {63}. The constant becomes inverters on bits
  0, 1, 5 and 6.
* Decryption, `dec = 1`: first the inverse affine map IAT (constant {05},
  inverters on bits 0 and 2), then ISO, MI and ISO⁻¹. The output multiplexer
  bypasses AT.

The S-box is purely combinational.

AT uses the shared terms b6^b7, b4^b5, b0^b1 and b2^b3. IAT uses q2^q5,
q3^q6 and q4^q7.

## The AES-128 core (`aes128_core`)

### Datapath

* `aes_round` is one combinational round. It contains one `aes_sub_bytes`
  (16 composite S-boxes, used in both directions), ShiftRows and
  InvShiftRows, MixColumns and InvMixColumns, and the AddRoundKey XOR.
* A final round skips (Inv)MixColumns.
* A 128-bit state register holds the state between rounds.
* `aes_key_expand` is one step of the AES-128 key schedule. It uses four more
  composite S-boxes in forward mode. It fills an 11-entry round-key store, one
  key per cycle. The core stores the keys because decryption uses them in
  reverse order.

### Decryption order

Decryption uses the *equivalent inverse cipher*. Each round runs InvSubBytes,
InvShiftRows, InvMixColumns, then AddRoundKey. So decryption has the same step
order as encryption. This only works if the keys of rounds 1 to 9 are passed
through InvMixColumns first ("mixed" round keys). `aes_round` does that mixing
itself, so the key store holds plain keys only.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_load`, `key_in` | in | 1, 128 | start key expansion of `key_in` |
| `key_ready` | out | 1 | all 11 round keys are stored |
| `start`, `decrypt`, `data_in` | in | 1, 1, 128 | process one block |
| `busy` | out | 1 | key expansion or a block is running |
| `done`, `data_out` | out | 1, 128 | one-cycle pulse; the result is held until the next result |

* **Byte order.** Blocks and keys use FIPS-197 byte order. Byte 0 is in bits
  [127:120]. State byte (row r, column c) is byte r + 4c.
* **Key load.** `key_load` is taken when the core is idle. `key_ready` rises
  10 cycles after the edge that took it.
* **Block.** `start` is taken when the core is idle and `key_ready` is high.
  The block is XORed with round key 0 (encryption) or round key 10
  (decryption). The 10 rounds follow. `done` pulses 10 cycles after the edge
  that took `start`. `decrypt` is sampled together with `start`.
* **Back to back.** If `start` is held, the next block is taken at the end of
  the `done` cycle. Each block then takes 11 cycles.
* **Ignored requests.** `start` and `key_load` are ignored while `busy` is
  high.
* **Reset.** Reset clears the control state, `key_ready` and `data_out`.
* **Assertions.** Two assertions check that `done` lasts one cycle and that
  no block runs without keys.

## Modules

| module | what it is |
|---|---|
| `aes_pkg` | shared types (`byte_t`, `gf4_t`, `block_t`), `NR`, `xtime` |
| `aes128_core` | top: control FSM, round-key store, state register |
| `aes_round` | one encrypt or decrypt round |
| `aes_sub_bytes` | 16 composite S-boxes |
| `aes_shift_rows`, `aes_inv_shift_rows` | byte permutations |
| `aes_mix_columns`, `aes_inv_mix_columns` | column mixing over GF(2^8) |
| `aes_key_expand` | one AES-128 key-schedule step |
| `composite_sbox` | forward and inverse S-box with the two multiplexers |
| `sbox_affine`, `sbox_inv_affine` | AT and IAT in shared-term form |
| `sbox_iso_map`, `sbox_inv_iso_map` | field isomorphism and its inverse |
| `gf8_mul_inv` | inversion in GF(((2^2)^2)^2) |
| `gf4_square_lambda` | combined λ·q² (the default) |
| `gf4_square`, `gf4_mul_lambda` | separate q² and λ·q (`SQ_LAMBDA_COMBINED = 0`) |
| `gf4_mul`, `gf4_inv` | GF((2^2)^2) multiply and inverse |

## Simulation

Each `tb/tb_<module>.sv` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_core.sv --top-module tb_aes128_core
./obj_dir/Vtb_aes128_core
```

Replace `tb_aes128_core` with any other testbench name to run that one.

The expected values come from `tb/aes_ref_pkg.sv`. It is written
independently of the RTL:

* GF(2^8) products are computed by shift-and-add.
* Inverses are found by search.
* The affine map uses its rotate form.
* Composite-field products use schoolbook multiplication.
* The AES model is the plain FIPS-197 cipher and inverse cipher.

What the testbenches cover:

* Every 4-bit and 8-bit block is checked over its whole input space.
* The two maps are checked over all 65,536 operand pairs for the field
  homomorphism.
* The S-box is checked against all 256 table values in both directions.
* The AES transforms are checked on the FIPS-197 round-1 values and on
  random states.
* `tb_aes128_core` runs the core with default parameters. It runs the
  FIPS-197 appendix B and C.1 vectors both ways, 24 random encrypt/decrypt round
  trips under 8 keys, back-to-back blocks, and ignored requests. It checks
  every latency. It fails if any of these mechanisms never happens.
* `tb_aes128_core_separate_sq` runs the same test on the
  `SQ_LAMBDA_COMBINED = 0` build.

## Relation to the published description, and limits

### Taken from the publication

* The S-box datapath and its multiplexer settings.
* The affine and inverse affine equations and their shared terms.
* The combined λ·q² equations.
* Squaring in GF(2^4).
* The order of the AES round transformations, including the mixed round keys
  of the decryption flow.

### Derived here

* **The field polynomials and λ = {1000}** are derived from the printed
  λ·q² and squaring equations; the publication does not state them.
* **Isomorphic map, row 3.** The publication's printed equations for this row
  disagree with each other. Row 3 (`q3 = b1^b3^b6^b7`) is the one that makes
  the map a field isomorphism.
* **Inverse map, bit 2.** It is `q1^q3^q5^q6`, the exact matrix inverse. One
  printed variant has `q5^q7` instead, which does not invert the map.

### This design's own choices

* The 4-bit multiplier and inverter: the publication shows them only as boxes.
* The whole AES-128 core architecture:
  * one round per clock and 16 S-boxes,
  * the key store and on-chip key schedule,
  * the handshake, latencies and reset.

### Not in the RTL

* The publication reports a transistor-level implementation: six-transistor
  XOR cells, 0.8 V supply, 250 nm CMOS and 0.0923 µW. None of it can be
  expressed or checked in RTL.
* Only 128-bit keys are supported (10 rounds). 192- and 256-bit keys are not.
* The core has no protection against side channels or faults.
