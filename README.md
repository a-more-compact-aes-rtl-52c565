# AES-128 in tower-field arithmetic

This is an AES-128 encryptor and decryptor whose data never leaves a
*composite-field* (tower-field) representation between the first and the last
round. The S-box inversion in GF(2^8) is cheap when a byte is written as a
pair of GF(2^4) elements, each a pair of GF(2^2) elements, in normal bases.
Most compact AES circuits change into that representation just for the S-box
and change back afterwards. Here the state stays in the tower basis through
ShiftRows, MixColumns and AddRoundKey. The linear part of the S-box is then
folded into the constant multiplications of MixColumns. The result is one 8x8
bit matrix per "affine times constant" product instead of several separate
transformations.

The approach follows Canright and Osvik, *A More Compact AES*: the choice of
tower bases (#127 for encryption, #94 for decryption), the decompositions of
MixColumns and InvMixColumns, and where the combined transformations are
placed. That work counts bit operations and does not propose a circuit. The
clocked architecture here is this design's own: one round per clock, the
key schedule and the handshakes.

## The two representations of a byte

A byte is either in the **standard basis** (the AES polynomial basis, as in
FIPS-197) or in a **tower basis**. A tower basis is fixed by three elements:

| level            | basis      | encryption (#127) | decryption (#94) |
|------------------|------------|-------------------|------------------|
| GF(2^8)/GF(2^4)  | [Y^16, Y]  | Y = 0xAF          | Y = 0xF2         |
| GF(2^4)/GF(2^2)  | [Z^4, Z]   | Z = 0xE1          | Z = 0x5C         |
| GF(2^2)/GF(2)    | [W^2, W]   | W = 0xBD          | W = 0xBD         |

(Element values are given in the standard basis.) Bits 7..0 of a tower byte are
the coefficients of Y^16Z^4W^2, Y^16Z^4W, Y^16ZW^2, Y^16ZW, YZ^4W^2, YZ^4W,
YZW^2 and YZW. So bits 7:4 are the Y^16 half and bits 3:0 the Y half, and the
same split repeats inside each nibble. The 8x8 matrix X whose columns are
these eight products converts tower to standard (`x = X u`). Its inverse X^-1
converts the other way. `aes_tower_pkg` holds X and X^-1 for both bases, and
derives every other matrix from them by constant functions at elaboration
time.

All three levels use normal bases with trace 1 (Y^16 + Y = 1, and likewise
for Z and W). The only per-level constants are the norms:

| basis | N = Z^5 (in GF(2^2)) | nu = Y^17 (in GF(2^4)) |
|-------|----------------------|------------------------|
| #127  | W   (`2'b01`)        | `4'h7`                 |
| #94   | W^2 (`2'b10`)        | `4'h2`                 |

## The Galois inverter (`gf256_inv`, `gf16_inv`)

For a = a1·Y^16 + a0·Y the inverse (x^254, so 0 maps to 0) is

    d     = a1·a0 + nu·(a1 + a0)^2        in GF(2^4)
    t     = d^-1                          (gf16_inv)
    a^-1  = (t·a0)·Y^16 + (t·a1)·Y

`gf16_inv` applies the same formula one level down, with N in place of nu.
At the bottom, the inverse in GF(2^2) is a swap of the two bits. Products in
a normal basis share one cross term:
(a1,a0)·(b1,b0) = (a1b1 + e, a0b0 + e), with e = norm·(a1+a0)(b1+b0).
`gf256_inv` takes N and NU as parameters, so both towers use the same module.

The inverters are written from these formulas. They are not hand-minimised
netlists, so they have more gates than the roughly 96 bit operations per
byte that a hand-optimised tower inverter reaches. The function is the same.

## Encryption datapath (basis #127)

| step | module | what happens to each byte |
|------|--------|---------------------------|
| round 0 | `enc_first_round` | X^-1 (into the tower), then XOR round key 0 (tower) |
| rounds 1-9 | `enc_round` | ShiftRows, inverter, `enc_mix_column`, XOR round key (tower) |
| round 10 | `enc_last_round` | ShiftRows, inverter, M·X (affine + back to standard), XOR 0x63, XOR round key 10 (standard) |

**`enc_mix_column`** is the core of the idea. MixColumns is split as

    [2 3 1 1]   [2 3 0 0]   [0 0 1 1]
    [1 2 3 1] = [0 3 2 0] + [1 1 1 1]
    [1 1 2 3]   [0 0 2 3]   [1 1 0 0]
    [3 1 1 2]   [2 0 0 3]   [1 1 1 1]

Rows 0 and 2 of the column therefore need only the scaling by 2, and rows 1
and 3 only the scaling by 3. Each inverter output a_j gets two
transformations:

- x_j = A·a_j with A = X^-1 M X, the S-box affine matrix in the tower basis;
- t_j = A2·a_j (j even) or A3·a_j (j odd), with A2 = X^-1 T2 M X and
  A3 = X^-1 T3 M X.

With the shared sums s01 = x0+x1, s23 = x2+x3 and s = s01+s23, the outputs
are

    y0 = t0 + t1 + s23     y1 = t1 + t2 + s
    y2 = t2 + t3 + s01     y3 = t0 + t3 + s

That is 11 byte additions per column. Every row of the MixColumns matrix sums
to 1, so the affine constant c = X^-1·0x63 is added once to each output byte.

## Decryption datapath (basis #94)

The state register always holds **inverter inputs**: the inverse affine map
of each inverse S-box is already applied in the step before.

| step | module | what happens |
|------|--------|--------------|
| start | `dec_first_round` | XOR round key 10 (standard), X^-1 M^-1 plus d = X^-1 M^-1·0x63, InvShiftRows |
| rounds 9-1 | `dec_round` | inverter, XOR round key (tower), `dec_mix_column`, InvShiftRows |
| end | `dec_last_round` | inverter, X (back to standard), XOR round key 0 (standard) |

**`dec_mix_column`** merges InvMixColumns with the inverse affine map of the
*next* S-box, using

    [E B D 9]   [3 2 0 0]       [1 0 1 0]       [0 1 0 1]
    [9 E B D] = [0 3 2 0] + D x [0 1 0 1] + 9 x [1 0 1 0]
    [D 9 E B]   [0 0 3 2]       [1 0 1 0]       [0 1 0 1]
    [B D 9 E]   [2 0 0 3]       [0 1 0 1]       [1 0 1 0]

Each byte w_j gets B2 = X^-1 M^-1 T2 X and B3 = X^-1 M^-1 T3 X. Only the two
sums e02 = w0+w2 and e13 = w1+w3 get BD and B9, giving P = BD·e02 + B9·e13
and Q = BD·e13 + B9·e02. Then

    u0 = B3w0 + B2w1 + P     u1 = B3w1 + B2w2 + Q
    u2 = B3w2 + B2w3 + P     u3 = B2w0 + B3w3 + Q

plus d on every byte: 12 byte additions per column.

## Key schedule (`key_schedule`)

The key expansion runs entirely in the tower basis of its datapath. The key
is converted with X^-1 on load. SubWord uses the tower inverter followed by A
and c. The round constant is held in the tower basis and advanced by the
tower form of multiply-by-2. The XOR chain is the same in any basis. One
round key is produced per clock into an 11 x 128-bit register file, so
`ready` rises 11 clocks after `key_load`. The cores convert round key 10
(encryption), or round keys 10 and 0 (decryption), back to the standard basis
with X where the datapath adds them in the standard basis. Each direction has
its own schedule instance with its own basis parameters.

## Cores and top level

`aes_enc_core` and `aes_dec_core` each hold a 128-bit state register and one
instance of each kind of round, and run one round per clock. A block takes
**11 clocks** from the accepting clock to the `done` pulse. A new block can
be accepted in the clock in which `done` pulses, so a stream of blocks runs
at 128 bits per 11 clocks per direction. Both cores check this latency with
an assertion.

`aes_compact_top` puts an encryptor and a decryptor side by side. Each has
its own datapath and key schedule; there is no merged encrypt/decrypt unit.
Its ports:

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `key_load`, `key[127:0]` | in | load a cipher key; taken only while `key_load_ready` (both cores idle) |
| `key_load_ready` | out | no block in flight |
| `key_ready` | out | both key schedules hold valid round keys |
| `enc_in_valid`, `enc_in_ready`, `enc_in[127:0]` | in/out/in | plaintext handshake; a block is taken when valid and ready are both high |
| `enc_out_valid`, `enc_out[127:0]` | out | one-clock pulse with the ciphertext; no back-pressure |
| `dec_*` | | the same for decryption |

Blocks use FIPS-197 byte order: byte 0 (row 0, column 0) is in bits 127:120.
An assertion in the top checks that the round keys stay valid while any block
is in flight.

After synthesis (generic cells, flattened), the top is about 6,600
word-level cells, 552 flip-flop bits and 2,816 bits of round-key storage.

## Where this RTL departs from the published approach

- **Gate-level optimisation is absent.** The published counts come from
  heuristically minimised XOR networks: 15 XORs per byte for X^-1, 17 + 18
  XORs for the two encryption matrix pairs, and an 8 XOR / 5 AND / 2 OR
  GF(2^4) inverter. Those netlists are not available. Here each matrix is an
  XOR tree read straight from the matrix, and synthesis may share terms or
  not. The function is identical; the area is larger.
- **The affine constants are explicit XORs** (c, d, and 0x63 in the last
  round). They are not folded into the round keys, which the approach allows
  as an option.
- **AES-128 only.** The 192- and 256-bit key sizes are not supported.
- **Architecture.** The iterative round-per-clock structure, the stored
  round keys, the handshakes and the reset are choices made here. The
  published approach counts operations per round and leaves the architecture
  open. It notes that a 32-bit-datapath design would need a different
  structure to benefit; no such variant is built here.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/aes_ref_pkg.sv` is an independent standard-basis AES model: x^254
inverses, a bitwise affine map, MixColumns from its matrix, and the textbook
key expansion. It shares only the printed X / X^-1 matrices with the design.

- `tb_gf16_inv`, `tb_gf256_inv`: exhaustive, both bases, against x^254.
- `tb_enc_mix_column`, `tb_dec_mix_column`, and the six round testbenches:
  random inputs against the standard-basis round mapped through X and X^-1.
- `tb_key_schedule`: all 11 round keys of 20 keys in both bases, and the
  11-clock `ready` timing.
- `tb_aes_enc_core`, `tb_aes_dec_core`: the FIPS-197 C.1 vector
  (key 000102…0f, plaintext 00112233…ff, ciphertext 69c4e0d8…c55a) and
  random blocks, back-to-back starts, a start while busy, and the 11-clock
  latency.
- `tb_aes128_block`: one block each way through the top for the two
  FIPS-197 examples (appendices B and C.1), with published expected values
  and the 11-clock latency.
- `tb_aes_compact_top`: end to end at the default (and only) configuration.
  It runs six keys, with encryption and decryption streams running at the
  same time and valid held until ready. It counts input stalls, key loads
  held off by busy cores, and clocks with both cores busy, and fails if any
  of these never happens.

To run one with Verilator 5 (from the folder holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/aes_tower_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_compact_top.sv \
        --top-module tb_aes_compact_top
    ./obj_dir/Vtb_aes_compact_top

The packages are named first. `-y` lets Verilator find each module in the
file of the same name. Any other testbench runs the same way. Each one
finishes in well under a second.

## Changing the design

- To use another tower basis, give the key schedule and the round modules
  the basis's X, X^-1, N and nu. The round modules currently name the
  `*127` / `*94` constants of `aes_tower_pkg`. All combined matrices follow
  automatically from the formulas in the package.
- To pipeline, put the round modules one after another with registers in
  between. They are purely combinational and take their round key as an
  input.
