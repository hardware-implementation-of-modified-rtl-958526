# Secure image link: integer 9/7 wavelet + AES-128 with W7 per-plane keys

This RTL protects grey-scale images in two stages. First, an integer-only
9/7 lifting wavelet transforms the image. Then the coefficients are cut
into 128-bit planes, and each plane is encrypted with AES-128 under a key of
its own. The keys are not stored or exchanged. A W7 key stream generator
(eight cells, each with three majority-clocked LFSRs) makes a new 16-byte
key for every plane from one 128-bit seed. A receiver that holds the same
seed regenerates the same key sequence, decrypts each plane and runs the
inverse wavelet to get the image back. This scheme is called modified AES
(MAES).

Two planes with the same content therefore encrypt to unrelated
ciphertexts. In plain AES-ECB image encryption, flat areas leak through
as repeated ciphertext blocks; per-plane keys close that leak.

```
 sender                                                         receiver
 pixels ─► mdwt_2d ─► plane_pack ─► maes_encrypt ─► ciphertext ─► maes_decrypt ─► plane_unpack ─► midwt_2d ─► pixels
 8 bit     (2D DWT)   8 x 16 bit     W7 + AES-128    128-bit       W7 + AES-128    16-bit coefs     (inverse)    8 bit
                      -> 128 bit            ▲          planes             ▲
                                            └──── same 128-bit seed ──────┘
```

`maes_image_top` holds both sides, each with its own ports. The channel
between `ct_out` and `ct_in` is outside the design.

## The integer 9/7 lifting wavelet

This is the part that needs the most care. It is also where this RTL
departs most from the usual description of the scheme.

### What is computed

One level of the CDF 9/7 wavelet, done by lifting. A line `X` of N samples
is split into even and odd samples. Four lifting steps follow, then a
scaling step. They work in place, one line at a time (`dwt97_line`):

| step | updates | formula (all products are `round(coef * sum / 256)`) |
|------|---------|------------------------------------------------------|
| P1   | odd     | `X(2i+1) += a * (X(2i) + X(2i+2))`, a = -406/256 |
| U1   | even    | `X(2i)   += b * (X(2i-1) + X(2i+1))`, b = -14/256 |
| P2   | odd     | `X(2i+1) += c * (X(2i) + X(2i+2))`, c = 226/256 |
| U2   | even    | `X(2i)   += d * (X(2i-1) + X(2i+1))`, d = -114/256 |
| scale| both    | high = `X(2i+1) * K` (294/256), low = `X(2i) / K` (223/256) |

Every constant is a real lifting constant multiplied by 256 and rounded to
an integer. The source values are a = -1.586134342, b = -0.0529801185,
c = 0.882911076, d = -0.443506852 and K = 1.149604398. The constants live in
`rtl/dwt_pkg.sv`. The arithmetic is integer only: a multiply by a small
constant, an add, and an add-128/arithmetic-shift-by-8 for rounding.
Synthesis reduces the constant products to shifts and adds. No fractional
or floating-point arithmetic remains.

Note that d is negative here. Most references for CDF 9/7 give
d = +0.4435. The sign was kept because the design specifies it. The
transform stays perfectly invertible up to the two scale roundings, because
that property comes from the lifting structure, not from the constant
values. But its filters are not exactly the textbook 9/7 pair.

Borders use whole-sample symmetric extension: `X(-1) = X(1)` and
`X(N) = X(N-2)`.

### Why the direct "merged" form is not used

The scheme was presented with the lifting steps folded into direct
integer formulas for the low-pass and high-pass outputs. Examples are
`YL(i) = 135 S(i) - 99 D(i-1) - 87 [S(i-1) + S(i+1)]` and a similar
four-term formula with 163/22/280/14 for the high-pass. These formulas do
not match the lifting steps they were derived from:

- terms are dropped (`b*Xo(i)` in S, `d*D(i)` in YL, `c*b*Xo(i+1)` in YH);
- three of the high-pass coefficients have wrong values or signs
  (-163, -280 and +14 against about -141, +267 and -14).

Evaluated as printed, the high-pass output of a smooth ramp is in the
hundreds instead of near zero. So the RTL implements the lifting steps
themselves, with the same "scale by 256 and round" rule applied to each
lifting constant. It keeps the stated goals: integer-only arithmetic and
small constant multipliers.

### 2D organisation (`mdwt_2d`, `midwt_2d`)

Each side has an N x N frame buffer of CW-bit words (N = 128, CW = 16) and
one line engine. Forward: the image streams in row-major order and fills
the frame. Then every **column** is transformed, then every **row**. Each
line goes through the same three steps:

1. Copy it into the engine (N clocks).
2. Lift it (5N/2 + 1 clocks, one sample per clock, two in the scale step).
3. Copy it back in subband order, low half first (N clocks).

The frame then holds the usual quadrant layout, LL | HL over LH | HH, and
is streamed out row-major as signed 16-bit coefficients.

The inverse does the mirror image. It runs the inverse lifting (unscale,
then undo U2, P2, U1, P1) first along rows, then down columns. The result
is clamped to 0..255 and sent as 8-bit pixels.

Measured at 128 x 128, the round trip ends within 7 grey levels of the
original. By image type:

| image | largest error | PSNR |
|-------|---------------|------|
| textured gradient | 5 | 49 dB |
| 1-pixel checkerboard | 3 | 41 dB |
| uniform noise | 7 | 48 dB |
| sharp-edged disc | 5 | 45 dB |

The error comes only from the rounding in the two scale steps; the lifting
steps cancel exactly.

Only one decomposition level is built. The coefficients are not quantised,
so the wavelet stage does not shrink the data. Its 16-bit coefficients
fill 2048 planes, where the raw 8-bit image would fill 1024. No
quantiser or coefficient selection is specified for this scheme, so none
was added.

## W7 key stream generator (`w7_cell`, `w7_keystream`)

Each cell has three LFSRs of 38, 43 and 47 bits, 128 bits in all, loaded
straight from the seed:

- LFSRa bit j = key[j]
- LFSRb bit j = key[38+j]
- LFSRc bit j = key[81+j]

On each step a majority function looks at one clocking bit per register.
Only the registers whose clocking bit equals the majority shift, so two or
three of them move. A register shifts towards its top bit and feeds the XOR
of its taps into bit 0. The output bit is the XOR of one tap of each
register, taken after the shift.

Eight such cells (C1..C8) share the seed and step together. Their bits form
one key stream byte per clock, C1 in bit 0. A control unit loads them and
then steps them on request.

**These parts are this design's own choice, not the W7 specification:**

- the feedback polynomials: x^38+x^6+x^5+x+1, x^43+x^42+x^38+x^37+1 and
  x^47+x^42+1, all primitive;
- the clocking taps: cell k clocks on bits 11+2k, 13+2k and 15+2k;
- the output taps: bits 37-k, 42-k and 46-k;
- the byte bit order;
- the optional warm-up (`WARMUP`, default 0 steps).

The register lengths, the key mapping and the majority-clocked,
eight-cell, byte-per-clock structure are the scheme's. Interoperating with
another W7 implementation needs that generator's real tap tables. They go
into the `w7_cell` parameters and the three feedback expressions. Without
warm-up the first key stream bytes depend closely on the seed bits. For
anything beyond a demonstration, set `W7_WARMUP` to a few hundred.

## MAES: one AES key per plane (`maes_encrypt`, `maes_decrypt`)

Plane n is encrypted under key stream bytes 16n..16n+15, with the first
byte as the most significant key byte (AES byte 0). The key stream runs on
from plane to plane and restarts only on `key_load`, so key loads belong at
image boundaries.

Each plane goes through a strict sequence of phases:

| phase | clocks |
|-------|--------|
| accept the plane | 1 |
| draw 16 key stream bytes | 17 |
| expand the key into 11 round keys (`aes_key_expand`) | 12 |
| ten AES rounds (`aes_encrypt_core` or `aes_decrypt_core`, one round per clock) | 12 |
| hand the result out | 1 |
| **total, output never stalled** | **43** |

Both ends use valid/ready handshakes. An assertion checks that the output
holds while it is stalled.

The AES-128 cores follow FIPS-197: Nk = 4, Nr = 10, ShiftRows, SubBytes,
MixColumns and AddRoundKey, and the straightforward inverse cipher. The
S-box is not a typed table. `maes_pkg` computes it at elaboration time as
the multiplicative inverse in GF(2^8) (x^254, modulo x^8+x^4+x^3+x+1)
followed by the AES affine map. The decryption core reads the stored round
keys from 10 down to 0.

## Timing of one 128 x 128 image

| stage | clocks |
|-------|--------|
| load pixels | 16,384 |
| forward transform, columns + rows | 2 x 128 x (4.5 x 128 + 2) = 147,968 |
| read out and encrypt 2048 planes (the read-out waits for the cipher) | 2048 x 43 = 88,064 |
| receiver: decrypt and load, overlapping the sender's encryption | + about 45 after the last plane |
| receiver: inverse transform | 147,968 |
| receiver: send pixels | 16,384 |

With random stalls on every stream, the end-to-end testbench takes one
image from first pixel in to last pixel out in about 424,000 clocks. No
clock rate or throughput is specified for this scheme.

## Top-level interface (`maes_image_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key` | in | 128 | W7 seed, shared by both sides |
| `enc_key_load`, `dec_key_load` | in | 1 | restart that side's key stream from `key` |
| `pix_in_valid/ready/data` | in/out/in | 1/1/8 | plain image, row-major |
| `ct_out_valid/ready/data` | out/in/out | 1/1/128 | ciphered planes |
| `ct_in_valid/ready/data` | in/out/in | 1/1/128 | ciphered planes to decrypt |
| `pix_out_valid/ready/data` | out/in/out | 1/1/8 | reconstructed image, row-major |
| `enc_key_count`, `dec_key_count` | out | 32 | plane keys drawn since the last key load |
| `fwd_lines`, `inv_lines` | out | 32 | wavelet lines processed |
| `fwd_pass`, `inv_pass` | out | 2 | wavelet pass running: 0 none, 1 columns, 2 rows |

Parameters:

- `N` is the image side. It must be a power of two, at least 4. The
  default is 128, the image size the scheme was evaluated with.
- `CW` is the coefficient width. It must divide 128. The default is 16.
- `W7_WARMUP` is the number of silent W7 steps after each key load, on
  both sides. The default is 0.

Memory is one N x N x CW frame buffer per side (2 x 256 Kbit at the
defaults). Each side also holds the 11 x 128-bit round-key file, and each
line engine holds N x CW bits.

## How far to trust it

**Checked against independent references.**

- AES-128 matches both worked examples of FIPS-197 and a separately
  written AES model on random keys and blocks.
- Encryption and decryption are checked with latency.
- The W7 RTL matches a bit-array model of the same (assumed) taps.
- The wavelet matches an array-based model of the same integer lifting,
  exactly, at every coefficient and pixel.
- The full 128 x 128 link checks every ciphertext plane and every output
  pixel against the models, and counts that every mechanism happens.

**This design's own choices, not from the scheme:**

- the W7 tap positions;
- the coefficient width and plane packing order, with the first
  coefficient in the top 16 bits;
- the border extension;
- the subband layout;
- the clamping;
- the sequential schedules, handshakes and reset behaviour.

**Departures from the scheme's text:**

- The lifting steps are used in place of the inconsistent merged formulas
  (see above).
- The constant multiplies are not hand-factored into 64+x shift-and-add
  form.
- No wavelet-domain compression is done.

## Files

The RTL in `rtl/` comes first, then the testbenches in `tb/`. Each file
opens with a comment on what it does, its interface and its timing.

RTL, `rtl/`:

| file | contents |
|------|----------|
| `maes_pkg.sv` | AES types, the S-box built at elaboration, round functions |
| `dwt_pkg.sv` | integer lifting constants, rounding multiply |
| `aes_key_expand.sv` | key schedule, 11 round keys, one per clock |
| `aes_encrypt_core.sv` | iterative cipher core |
| `aes_decrypt_core.sv` | iterative inverse cipher core |
| `w7_cell.sv` | one W7 cell |
| `w7_keystream.sv` | eight cells, control unit, byte output |
| `maes_encrypt.sv` | per-plane key generation and AES encryption |
| `maes_decrypt.sv` | per-plane key generation and AES decryption |
| `dwt97_line.sv` | 1D lifting engine, forward or inverse (`INVERSE`) |
| `mdwt_2d.sv` | forward 2D transform with frame buffer |
| `midwt_2d.sv` | inverse 2D transform with frame buffer |
| `plane_pack.sv` | coefficients to 128-bit planes |
| `plane_unpack.sv` | 128-bit planes to coefficients |
| `maes_image_top.sv` | both sides of the link |

Testbenches, `tb/`:

| file | contents |
|------|----------|
| `tb_ref_pkg.sv` | reference models: AES, W7, integer lifting, test image |
| `tb_<block>.sv` | one self-checking testbench per block |
| `tb_maes_image_top.sv` | the full-size end-to-end run |
| `tb_four_images.sv` | four different 128 x 128 images back to back, with key reloads |

Every testbench ends with `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing -Wno-fatal --top-module tb_maes_image_top \
  -y rtl -y tb rtl/maes_pkg.sv rtl/dwt_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_maes_image_top.sv -o sim
./obj_dir/sim
```

Replace `tb_maes_image_top` with any other `tb_<block>` to run that block's
test. The full-size run takes about 15 s to build and under 1 s to
simulate. It prints the reconstruction error, the PSNR, and how often
each mechanism occurred. The block tests run at reduced sizes:
16-sample lines, 16 x 16 images, and a 20-step W7 warm-up.

To change the image size, override `N` on `maes_image_top`. To use other
W7 taps, edit the `w7_cell` parameters in `w7_keystream.sv` and the
feedback lines in `w7_cell.sv`, and the matching reference model in
`tb_ref_pkg.sv`. To change the lifting constants, edit `dwt_pkg.sv` and
the constants at the top of the wavelet section of `tb_ref_pkg.sv`.
