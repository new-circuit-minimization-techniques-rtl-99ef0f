# Low-depth AES SBox through GF(2^4), with a combined SBox and an AES round

The AES SBox is inversion in GF(2^8) followed by an affine map. Gate-level
SBoxes compute that inverse through the subfield GF(2^4). There are three stages:
- a linear layer at the top;
- a small nonlinear core;
- a linear layer at the bottom that converts back and applies the affine map.

The bottom layer adds depth after the slowest part of the circuit. This design
removes it. The output of the 4-bit inverter is only four bits, Y_0..Y_3. The
final result is therefore a Y-weighted sum of four 8-bit vectors, and those
vectors depend only on the input. So they are computed in the top layer, in
parallel with the nonlinear core. The bottom layer becomes 32 NAND2 gates and
eight 4-input XORs.

The RTL contains:

* `sbox_fwd`: the forward SBox in this architecture;
* `sbox_comb`: a combined SBox/InvSBox that shares the nonlinear core and
  uses *floating multiplexers* in its top layer;
* an iterative AES-128 encryption datapath (`aes_round`) with sixteen
  forward SBoxes, one round per clock;
* `aes_sbox_top`: the top level, which has the AES datapath and the combined
  SBox side by side.

All SBox logic is combinational. Every SBox variant is checked
exhaustively against a field-arithmetic reference model.

## The arithmetic

All arithmetic is in GF(2^8) = GF(2)[z]/(z^8+z^4+z^3+z+1), the AES field.
Bytes are polynomial coordinates, bit 0 = z^0. The elements with x^16 = x form
the subfield GF(16).

For an input U:

```
X    = U^17 = U * U^16                  lies in GF(16)          ("Mul-Sum")
Y    = X^-1                             4-bit inversion
U^-1 = Y * U^16 = sum_i Y_i * (beta_i * U^16)
SBox(U) = Aff(U^-1) + 0x63 = sum_i Y_i * L_i + 0x63,   L_i = Aff(beta_i * U^16)
```

Here Y = sum_i Y_i * beta_i. The Y_i are single bits and Aff is GF(2)-linear,
so the sum can be split as above. Each L_i is a linear function of U, and
together they form the 32-bit vector `l`.

The GF(16) basis is **beta = (0x0C, 0x51, 0xB0, 0xEC)**. In this basis, the
inverse Y = X^-1 of a 4-bit X is:

```
Y0 = X1X2X3 + X0X2 + X1X2 + X2 + X3
Y1 = X0X2X3 + X0X2 + X1X2 + X1X3 + X3
Y2 = X0X1X3 + X0X2 + X0X3 + X0 + X1
Y3 = X0X1X2 + X0X2 + X0X3 + X1X3 + X1
```

The 9-gate inverter described below implements exactly these equations.
Four orderings of one basis satisfy them; this design uses the first.

The 0x63 cannot be folded into L. For U = 0 all Y_i are 0, so the constant
is added separately at the output.

### Q and Mul-Sum (the part that takes the most thought)

X = U^17 is quadratic in the bits of U. To compute it, write U in a normal
basis over GF(16): U = a0*Yn + a1*Yn^16, with Yn = 0x12 and Yn + Yn^16 = 1.
Then

```
U^17 = a0*a1 + n*(a0 + a1)^2,    n = Yn^17
```

The product a0*a1 is a Karatsuba multiplication over GF(4): three GF(4)
products of three AND gates each. That is nine AND gates, whose operands are
nine pairs of linear forms of U. These 18 forms are **Q**, and pair j is
(q[2j], q[2j+1]).

The linear term n*(a0+a1)^2 depends only on a0+a1. Its coordinates are sums
within pairs, q[2j]^q[2j+1]. So Mul-Sum needs no further inputs. Each output
bit X_k is the XOR of, for every pair, one of the following:
- `a&b` (product only);
- `a^b` (linear term only);
- `a|b` (both, since a|b = ab + a + b);
- nothing.

`sbox_pkg` tabulates this choice as two 9-bit masks per output bit,
`MS_AND` and `MS_XOR`, and the 18 base rows of Q as `Q_BASE`.

### Everything else is computed, not tabulated

`sbox_pkg::top_rows()` is a constant function. At elaboration it computes
every row of every top layer from GF(2^8) arithmetic: the 32 L rows, the
whole inverse direction, and the transformed variants. The functions involved
are multiplication, repeated squaring and the affine map written with
rotations. A row is an 8-bit mask; bit m set means input bit U[m] enters that
output. Each output bit is then `^(u & row) ^ const`. Sharing XORs between
rows is left to synthesis.

## Blocks of the forward SBox (`sbox_fwd`)

```
u ──► sbox_top_fwd ──q[17:0]──► sbox_mulsum ──x[3:0]──► gf16_inv ──y[3:0]──┐
          │                                                                ▼
          └──────────────l[31:0]────────────────────────────────────► sbox_bottom ──► r
                                                                      (+0x63)
```

* **`sbox_top_fwd`** forms Q and L from U, with XORs only.
* **`sbox_mulsum`**: Q (18) to X (4), with nine AND/XOR/OR gates and small
  XOR trees.
* **`gf16_inv`** is a 9-gate network of depth 3:
  ```
  T0 = NAND(X0,X2)  T1 = NOR(X1,X3)  T2 = XNOR(T0,T1)
  T3 = MUX(X1,X2,1) T4 = MUX(X3,X0,1)
  Y0 = MUX(X2,T2,X3) Y1 = MUX(T2,X3,T3) Y2 = MUX(X0,T2,X1) Y3 = MUX(T2,X1,T4)
  ```
  **MUX(s, a, b) means `s ? a : b`.** With that argument order the network
  reproduces the polynomials above for all 16 inputs; with the other order it
  does not.
* **`sbox_bottom`** computes `r[j] = XOR_i NAND(y[i], l[8i+j]) ^ c[j]`. In
  each 4-input XOR the four inversions cancel. `c` is 0x63 for the forward
  SBox and 0x00 for the inverse.

The critical path runs through the top XOR trees, Mul-Sum, the three gate
levels of the inverter, one NAND and one XOR4. No linear layer follows the
inverter.

## Combined SBox and floating multiplexers (`sbox_comb`, `sbox_top_fmux`)

The inverse SBox is InvSBox(U) = V^-1 with V = A^-1*(U + 0x63) =
A^-1*U + 0x05. So the same Mul-Sum, inverter and output layer serve both
directions, and only the top layer changes. `sbox_top_inv` forms Q and L for
V; its rows carry constant bits. Its L vectors are beta_i * V^16 with no
affine map. The output constant becomes 0x00.

Selecting between two top layers needs a multiplexer on each of the 50 output
bits. Forward row F and inverse row I usually share inputs. The floating
multiplexer sums the shared inputs once, outside the multiplexer:

```
out = (F&I)*U  ^  MUX(fwd, (F&~I)*U, (I&~F)*U ^ c)
```

`sbox_top_fmux` builds exactly this. The general rewrite also allows XORing
the same term Δ into both multiplexer inputs; this design uses Δ = 0.

The `FLOATING_MUX` parameter of `sbox_comb` selects the top layer:
- `FLOATING_MUX = 1` (default) uses `sbox_top_fmux`;
- `FLOATING_MUX = 0` uses `sbox_top_fwd` and `sbox_top_inv` with a plain
  50-bit multiplexer.

Both settings compute the same function. The classic combined SBox also needs
a multiplexer between two bottom matrices. Here L already contains the bottom
matrix of each direction, so that multiplexer is the L multiplexer plus the
choice of output constant.

Port `fwd`: 1 (`SBOX_FWD`) selects SBox, 0 (`SBOX_INV`) selects InvSBox.

## Additional transformations (`ALPHA`, `FROB`)

Squaring and multiplication by a constant are linear. So for any
alpha in 1..255 and frob in 0..7, the middle can invert
W = alpha * U^(2^frob) instead of U. The bottom then takes the 2^frob-th
root of alpha * W^-1:

```
U^-1 = sum_i Y_i * root_frob(alpha * beta_i * W^16),   Y = (W^17)^-1
root_frob(v) = v^(2^(8-frob))
```

That gives 2040 different top/bottom matrix pairs for the same SBox. Among
them, an XOR minimiser can look for the cheapest or shallowest. The choice is
exposed as parameters:
- `ALPHA`, `FROB` on `sbox_top_fwd`, `sbox_top_inv` and `sbox_fwd`;
- `ALPHA_F`, `FROB_F`, `ALPHA_I`, `FROB_I` on `sbox_top_fmux` and
  `sbox_comb`.

The default (1, 0) is the plain representation. An illegal value is reported
with `$error` during elaboration.

## AES encryption datapath (`aes_round`) and top level (`aes_sbox_top`)

`aes_round` is the usual iterative round:

```
plaintext ^ roundkey1 ─┐
                       MUX(load) → SubBytes (16 × sbox_fwd) → ShiftRows ─┬─ MixColumns ─┐
state register ────────┘                                                  └──────────────MUX(last)
MUX(last) ^ roundkey_n → state register (en) → ciphertext
```

**State layout.** The 128-bit state is column-major: byte b sits at bits
[127-8b -: 8], in row b%4 and column b/4 (FIPS-197 order).

**Encrypting one block with AES-128:**
1. Hold `en` high for 10 clocks.
2. Assert `load` in the first of those clocks and `last` in the tenth.
3. Present the round key of round r on `roundkey_n` in the r-th clock, and
   the initial round key on `roundkey1` throughout.

The ciphertext is in the register after the tenth rising edge.
- `en = 0` holds the state.
- `rst_n` is an asynchronous, active-low clear.
- The key schedule is not part of the design: round keys are inputs.
- `aes_mix_columns` uses the xtime formulation, and its XOR count is left to
  synthesis.

`aes_sbox_top` brings out:
- the AES datapath ports: `clk`, `rst_n`, `en`, `load`, `last`, `plaintext`,
  `roundkey1`, `roundkey_n`, `ciphertext`;
- the combined SBox ports: `cb_in`, `cb_fwd`, `cb_out`.

The combined SBox works independently of the AES datapath.

## Files

| file | contents |
|---|---|
| `rtl/sbox_pkg.sv` | types, `Q_BASE`, `MS_AND`/`MS_XOR`, field functions, `top_rows()` |
| `rtl/sbox_top_fwd.sv`, `rtl/sbox_top_inv.sv` | top linear / affine layers |
| `rtl/sbox_top_fmux.sv` | combined top layer with floating multiplexers |
| `rtl/sbox_mulsum.sv`, `rtl/gf16_inv.sv`, `rtl/sbox_bottom.sv` | Mul-Sum, 4-bit inverter, NAND/XOR4 output layer |
| `rtl/sbox_fwd.sv`, `rtl/sbox_comb.sv` | forward and combined SBoxes |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`, `rtl/aes_round.sv` | AES round |
| `rtl/aes_sbox_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | reference model used by the testbenches (see below) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The reference model in `tb/aes_ref_pkg.sv` is built only from field
arithmetic: inversion as x^254, the affine map by rotations, AES-128 key
expansion and encryption. It shares no matrix with the RTL.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/sbox_pkg.sv tb/aes_ref_pkg.sv tb/tb_sbox_comb.sv --top-module tb_sbox_comb
./obj_dir/Vtb_sbox_comb
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself after a
fixed time if something hangs. Coverage by testbench:

* `tb_gf16_inv` covers all 16 inputs. `tb_sbox_top_fwd`, `tb_sbox_top_inv`,
  `tb_sbox_top_fmux` and `tb_sbox_mulsum` cover all 256 inputs per direction.
* `tb_sbox_fwd` is exhaustive, for the default and three other
  (ALPHA, FROB) choices.
* `tb_sbox_comb` is exhaustive in both directions, including the
  InvSBox(SBox(x)) round trip. It runs the floating-multiplexer form, the
  plain form and a transformed variant.
* `tb_aes_round` runs the FIPS-197 C.1 vector and random blocks. It also
  checks the 10-clock latency, hold and reset.
* `tb_aes_sbox_top` runs the whole design at its defaults: AES blocks
  (FIPS-197 and random) while sweeping the combined SBox over all 512 cases.
  It counts every mechanism (first-round multiplexer, MixColumns path,
  last-round bypass, hold, reset, both SBox directions, zero field element)
  and fails if one never occurred.

## How far this follows the published design, and where it departs

Taken from the published architecture:
- the structure: 18-bit Q, Mul-Sum, 4-bit X and Y, 32-bit L, and an output
  layer of 32 NAND2 + 8 XOR4 with no bottom matrix;
- the 9-gate GF(2^4) inverter;
- the combined SBox that shares the middle;
- floating multiplexers;
- the (alpha, beta) family of transformations;
- the iterative AES round around the SBoxes.

This design's own:

* **All matrices.** The published netlists are not reproduced here.
  Q_BASE, the Mul-Sum masks and the GF(16) basis are derived as described
  above and verified exhaustively.
* **Gate counts.** The top layers are written as masked parities, so their
  XOR sharing and depth depend on the synthesis tool, not on an
  XOR-minimisation search. Area and depth will not match the published
  gate-level figures, for example 130 gates at depth 12 for the fast forward
  SBox.
* **The smaller variants are not included.** Both the low-area forward and
  combined SBoxes and the conventional 15-gate inverter have no netlist
  available here.
* **The default (ALPHA, FROB) = (1, 0)** is arbitrary. The published circuits
  use searched values that are not known here.
* **The output constant** is a separate input of the output layer.
* **Unspecified AES details.** Mux polarities, the register enable, reset,
  byte order and round control are this design's choices.
* **Not included:** the AES key schedule; the decryption round (InvShiftRows,
  InvMixColumns); the 92-XOR MixColumns circuit; the earlier "architecture A"
  with two GF(16) multipliers and a bottom matrix.

`aes_shift_rows` is pure wiring, so a synthesis report lists all of its
outputs as tied straight to inputs.
