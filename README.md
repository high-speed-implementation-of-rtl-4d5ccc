# MISTY1 and AES-128 encryption engines with selectable substitution-table styles

Two block-cipher engines, MISTY1 (64-bit block, 128-bit key, 8 rounds) and
AES-128 (128-bit block, 128-bit key, 10 rounds), are built the same way. Each
uses a *loop architecture*: a loop body of two cipher rounds sits between
registers and runs once per clock until the block is done. Most of the logic in
both ciphers is substitution tables (S7/S9 in MISTY1, the S-box in AES), so the
main design choice is how those tables are built. Three styles can be selected
per engine with a parameter:

| `SBOX_TYPE` | MISTY1 | AES |
|---|---|---|
| 2 | S7 and S9 as look-up tables, one copy per use (6 S7 + 12 S9 per loop body) | sixteen S-box tables per round |
| 3 | S7 and S9 computed from their Boolean equations | S-box computed: inverse in the composite field GF((2^4)^2), then the affine map |
| 4 (default) | rearranged FI function (FI') with the widened tables S7A and S9A | T-boxes: S-box and MixColumns merged into one 8-to-32-bit table |

Type 4 is the default for both ciphers. It is the style that gives the highest
throughput and throughput per area when the designs are compared on an FPGA.
A fourth style, with a single table time-shared by all accesses, is not
provided (see *Departures*).

## Top level: `crypto_top`

`crypto_top` places the two engines side by side. They share only `clk` and
`rst_n`. Each engine has its own ports: `m_*` for MISTY1 and `a_*` for AES.

| port | width | meaning |
|---|---|---|
| `m_in_valid` / `m_in_ready` | 1 / 1 | offer a MISTY1 block; it is accepted when both are high at a rising edge |
| `m_pt`, `m_key` | 64, 128 | plaintext and key, sampled at acceptance |
| `m_out_valid`, `m_ct` | 1, 64 | one-cycle strobe; `m_ct` holds the ciphertext until the next result |
| `a_in_valid` / `a_in_ready` | 1 / 1 | the same for AES |
| `a_pt`, `a_key` | 128, 128 | AES plaintext and key |
| `a_out_valid`, `a_ct` | 1, 128 | AES result strobe and ciphertext |

Parameters: `MISTY1_SBOX_TYPE` (4), `AES_SBOX_TYPE` (4) and
`AES_ROUNDS_PER_PASS` (2, or 1 when `AES_SBOX_TYPE` is 3; 1 gives a one-round
loop body).

Timing at the defaults:

* MISTY1: `m_out_valid` rises 4 clocks after acceptance. A new block can be
  accepted during the last pass of the previous one, so a continuous stream
  runs at one block per 4 clocks (16 bits per clock).
* AES: `a_out_valid` rises 5 clocks after acceptance and the stream rate is
  one block per 5 clocks (25.6 bits per clock). With `AES_ROUNDS_PER_PASS = 1`
  these become 10 clocks.

A key goes with every block, so consecutive blocks may use different keys.
`rst_n` is asynchronous and active low. It clears only the control state;
the data registers are not reset.

Block bytes are big-endian: MISTY1 `pt[63:32]` is the left half and key
word K0 is `key[127:112]`. AES byte 0 is `pt[127:120]`, in FIPS-197 order.

## MISTY1 engine (`misty1_core`)

### Loop body

The eight MISTY1 rounds group into four identical pairs. Pass *p*
(p = 0..3) computes:

```
D0 = FL(D0, 2p)        D1 = FL(D1, 2p+1)
D1 = D1 ^ FO(D0, 2p)
D0 = D0 ^ FO(D1, 2p+1)
```

After the fourth pass, the final FL layer (FL indices 8 and 9) and the half
swap turn the state into the ciphertext. They are applied on the way into the
output register, in the same clock as the last pass. The loop body therefore
holds 4 FL units, 2 FO units (6 FI units) and 2 more FL units for the output.

### Subkey selection

The key schedule (`misty1_keysched`) expands the key into 16 words:
EK[0..7] are the key words K0..K7, and EK[8+i] = FI(Ki, K(i+1 mod 8)). Eight
FI units compute this combinationally, and the result is registered when the
block is accepted. Inside the loop, each pass picks its subkeys from the
registered words by index arithmetic modulo 8. For FO index k:

* KO1..KO4 = EK[k], EK[k+2], EK[k+7], EK[k+4]
* KI1..KI3 = EK[8+(k+5)], EK[8+(k+1)], EK[8+(k+3)]

For FL index 2p the AND key is EK[p] and the OR key is EK[8+(p+6)]. For FL
index 2p+1 the AND key is EK[8+(p+2)] and the OR key is EK[p+4].

### FI and the FI' rearrangement (type 4)

The standard FI splits its 16-bit input into a 9-bit half d9 and a 7-bit half
d7. It then uses three table look-ups in series (S9, S7, S9), with
truncating and zero-extending XORs between them. FI' computes the same
function with one table fewer on the critical path:

```
d9'' = S9(d9) ^ d7 ^ KI[8:0]
out  = S7A(d7) ^ S9A(d9'') ^ spread(KI[15:9] ^ KI[6:0])

S7A(x) = S7(x) ^ (S7(x) << 9)                   7-bit in, 16-bit out
S9A(x) = S9(x) ^ (x & 7f) ^ ((x & 7f) << 9)     9-bit in, 16-bit out
spread(v) = v ^ (v << 9)                         for a 7-bit v
```

The S7 look-up depends only on the input, so it runs beside the first S9. The
7-bit fields that the original FI moves between halves are placed in the
widened table outputs, where they collapse into 16-bit XORs. To see that the
two forms agree, expand the original output `{d7_out, S9(d9'') ^ d7_out}` with
`d7_out = S7(d7) ^ d9''[6:0] ^ KI[6:0] ^ KI[15:9]`: each 7-bit term then
appears once in the upper field and once in the low field. The testbench compares
both forms bit for bit on random inputs.

### S7 and S9

Both S-boxes are defined by their algebraic normal form: XORs of products of
input bits, with bit 0 the least significant bit (`s7_eq` and `s9_eq` in
`misty1_pkg`). Type 3 uses these equations directly as logic. The tables of
the other types are filled from the same functions at elaboration, so no
table constants appear in the source.

## AES engine (`aes_core`)

The block is XORed with the key when it is accepted (initial AddRoundKey).
Each pass then runs `ROUNDS_PER_PASS` round units in series. With two rounds
per pass, four passes do rounds 1-8, and a fifth pass does rounds 9 and 10 on
the same two units. In that pass the second unit is told it is the last round
and skips MixColumns.

Round keys are expanded on the fly. Each round unit has its own key-expansion
step (`aes_keyexp`: RotWord, SubWord, Rcon, XOR chain). The step is fed by
the previous unit's round key, and the last round key of a pass is registered
for the next pass. The round constant is derived from the round number
(pass × rounds per pass + unit + 1).

### T-box round (type 4)

`aes_tbox` returns {2s, s, s, 3s} for s = S(a). This is the contribution of a
row-0 byte to its column after SubBytes and MixColumns. For rows 1..3 the
same word is rotated right by 8, 16 or 24 bits. ShiftRows is folded into
which input byte addresses which T-box. Output column c is then:

```
T(a0) ^ ror8(T(a1)) ^ ror16(T(a2)) ^ ror24(T(a3)) ^ rk_c
```

Here a_r is the byte in row r of column (c + r) mod 4. In the final round the
plain S-box value, bits 23:16 of each T-box word, is used instead. No extra
tables are needed for that. The key expansion uses plain S-box tables.

### Computed S-box (type 3)

The byte is multiplied by a constant 8×8 binary matrix to move it into
GF((2^4)^2). This field is built as GF(2^4) = GF(2)[z]/(z^4+z+1), extended
by y^2 + y + λ. λ is the first element of GF(2^4) for which this polynomial
is irreducible.

The inverse of a1·y + a0 is a1·d⁻¹·y + (a0 + a1)·d⁻¹, where
d = a1²λ + a1·a0 + a0². Computing it takes a few GF(2^4) multipliers and one
GF(2^4) inversion (d¹⁴). The result is mapped back to the AES basis and put
through the affine transformation.

Both basis-change matrices are found at elaboration by constant functions in
`aes_pkg`. The forward matrix comes from a root β of the AES polynomial in the
tower field: column i is β^i. The inverse matrix is found by search. In the original comparison this style
was built with a one-round loop body, because the computed S-box is large.
`ROUNDS_PER_PASS` therefore defaults to 1 for this type; setting it to 2
gives the same two-round body as the other types.

## Files

| file | contents |
|---|---|
| `rtl/misty1_pkg.sv` | MISTY1 types, S7/S9 equations, table initialisers |
| `rtl/misty1_s7.sv`, `misty1_s9.sv` | S-boxes (table or equations) |
| `rtl/misty1_s7a.sv`, `misty1_s9a.sv` | widened tables of FI' |
| `rtl/misty1_fi.sv`, `misty1_fo.sv`, `misty1_fl.sv` | round functions |
| `rtl/misty1_keysched.sv` | expanded key EK[0..15] |
| `rtl/misty1_core.sv` | MISTY1 loop-architecture engine |
| `rtl/aes_pkg.sv` | AES types, GF(2^8) and GF((2^4)^2) arithmetic, table initialisers |
| `rtl/aes_sbox.sv`, `aes_tbox.sv` | S-box (table or composite field), T-box |
| `rtl/aes_round.sv`, `aes_keyexp.sv` | one round, one key-expansion step |
| `rtl/aes_core.sv` | AES loop-architecture engine |
| `rtl/crypto_top.sv` | both engines |
| `tb/crypto_ref_pkg.sv` | behavioural reference models of both ciphers |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_crypto_top` and `tb_crypto_top_variants` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The S-boxes are checked exhaustively. This covers the first sixteen
  entries of the published S7 and S9 tables and the permutation property.
  Table and computed forms must agree, and the AES S-box is compared with a
  reference that finds each inverse by exhaustive search.
* FI, FO, FL, the key schedule, the AES round and key expansion are checked
  on thousands of random inputs against `crypto_ref_pkg`. That package is a
  word-level software model written separately from the datapaths. Types 2, 3
  and 4 are checked together.
* The engines are checked against the published MISTY1 test vectors (key
  `00112233…eeff`) and the two FIPS-197 AES-128 examples, for every type, and
  against each other on random blocks and keys. The testbenches also check
  latency (4, 5 and 10 clocks) and the streaming rate.
* `tb_crypto_top_variants` runs the top level once with type-2 and once
  with type-3 substitution for both ciphers (type 3 with its one-round AES
  loop body). Both instances are checked against the reference models.
* `tb_crypto_top` runs both engines at once at the default parameters. It
  checks 69 blocks per engine against the reference models, with random gaps
  in `in_valid`, and measures the sustained rate of an 8-block burst. It fails
  unless blocks have been accepted both from idle and back to back.

Running a testbench with Verilator (packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/misty1_pkg.sv rtl/aes_pkg.sv tb/crypto_ref_pkg.sv tb/tb_crypto_top.sv \
  --top-module tb_crypto_top -Mdir obj && ./obj/Vtb_crypto_top
```

Each testbench finishes in well under a second. To lint the whole design:
`verilator --lint-only -Wall -Irtl rtl/misty1_pkg.sv rtl/aes_pkg.sv rtl/crypto_top.sv`.
Its one warning, SYNCASYNCNET, comes from the pass-counter assertions. They
sample `rst_n` in `disable iff` beside flip-flops that use it as an
asynchronous reset. The `disable iff` is needed because the registers hold
arbitrary values before the first reset.

## Departures and open points

* **Shared-table style.** The slowest style in the comparison uses one S7 and
  one S9 table (MISTY1) or a single S-box (AES), with every access scheduled
  through them. That behaviour is an outcome of high-level-synthesis
  scheduling, not a specified datapath, so it is not provided. `SBOX_TYPE`
  accepts 2, 3 and 4; other values stop elaboration.
* **Rounds 9 and 10 of AES** reuse the two loop-body round units in a fifth
  pass. Separate hardware for them would save the last-round multiplexing but
  double the round logic.
* **Key handling, handshake, reset and output timing** are this design's own
  choices:
  * A key goes with every block.
  * The MISTY1 key schedule is combinational, with eight FI units in parallel.
  * AES round keys are expanded on the fly.
  * The input uses a valid/ready handshake, and the result is a one-cycle
    strobe.
* **AES type 2** has sixteen S-boxes per round unit, so a two-round loop body
  holds 32 S-boxes plus 8 in the key expansion.
* **Composite field.** The computed AES S-box uses a two-level field
  GF((2^4)^2) with a polynomial basis. Other tower constructions, such as
  GF(((2^2)^2)^2) or normal bases, give the same mapping with different gate
  counts.
* **Throughput.** No clock frequency was determined. At the latencies above,
  the reported type-4 throughputs would need 12.6 MHz (MISTY1, 202.3 Mbps) and
  54.4 MHz (AES, 1393.5 Mbps). FPGA timing and area have not been measured for
  this RTL.
* **Table contents.** The table contents are computed from the S-box
  equations or from the GF(2^8) definition at elaboration. Synthesis tools see
  them as constant ROMs.
