# Subband-decomposition DCT/IDCT linear array (8-point, 32-bit)

This is an 8-point DCT and IDCT processor. It uses four multipliers, one adder tree, one 4-input
adder and eight accumulator lanes, and it computes a full 8-point transform in 10 clock steps
(DCT) or 8 clock steps (IDCT).

The main idea comes from splitting the signal into subbands. Split a signal repeatedly into
half-sum and half-difference bands: `x_L[n] = (x[2n] + x[2n+1])/2` and
`x_H[n] = (x[2n] - x[2n+1])/2`, three levels deep. The 8-point DCT then factors as

    C = Fh · R · x

- `R` is an 8×8 matrix whose entries are all ±1, times `sqrt(2)/8`. It is a Walsh–Hadamard-type
  matrix, so `R·x` needs only additions.
- `Fh` is block diagonal: `1`, `1`, a 2×2 rotation by π/8, and a 4×4 orthonormal block. It needs
  4 + 16 = 20 multiplications and only ten distinct constants.

`R` is orthogonal up to a scale (`R·Rᵀ = I/4`), and every block of `Fh` is orthonormal. So the
inverse is just the transposes taken in the reverse order:

    x = R⁻¹ · Fh⁻¹ · C   with  R⁻¹ ∝ Rᵀ,  Fh⁻¹ = Fhᵀ

The same units serve both directions.

## The factorisation as built

The rows of `R` are used in this order. Row `k` produces `y[k]`, and `+`/`-` is the sign applied
to `x[0..7]`:

| y   | signs on x[0..7] |
|-----|------------------|
| y0  | + + + + + + + +  |
| y1  | + - - + + - - +  |
| y2  | + + - - - - + +  |
| y3  | + - + - - + - +  |
| y4  | + + + + - - - -  |
| y5  | + + - - + + - -  |
| y6  | + - + - + - + -  |
| y7  | + - - + - + + -  |

With this row order, `Fh` is block diagonal. Its 8 output lanes then hold the DCT coefficients
in the order **X0, X4, X2, X6, X1, X7, X3, X5**. The ports re-order this by wiring, so `din` and
`dout` are always in natural order. The permutation is its own inverse
(`sbdct_pkg::lane_to_k`).

Write `c8 = cos(π/8)`, `s8 = sin(π/8)`, `c1/s1 = cos/sin(π/16)` and `c3/s3 = cos/sin(3π/16)`.
Then `Fh` (without its outer factor 2) is:

    lane 0:  y0
    lane 1:  y1
    lane 2:   c8·y2 + s8·y3
    lane 3:  -s8·y2 + c8·y3
    lane 4:   c1c8·y4 + c1s8·y5 + s1c8·y6 - s1s8·y7
    lane 5:  -s1c8·y4 - s1s8·y5 + c1c8·y6 - c1s8·y7
    lane 6:  -c3s8·y4 + c3c8·y5 + s3s8·y6 + s3c8·y7
    lane 7:   s3s8·y4 - s3c8·y5 + c3s8·y6 + c3c8·y7

The ten ROM words are c8, s8, c1c8, c1s8, s1c8, s1s8, c3c8, c3s8, s3c8 and s3s8. Their values are
0.9239, 0.3827, 0.9061, 0.3753, 0.1802, 0.0747, 0.7682, 0.3182, 0.5133 and 0.2126. They are
computed at elaboration from `$cos`/`$sin` and rounded to `COEF_FRAC` = 30 fraction bits.

**Scaling.** The constant factors of `R` (`sqrt(2)/8`) and `Fh` (2) are not applied. Both
directions therefore return **2·sqrt(2) times the orthonormal transform**:

- `dout = 2√2 · DCT(din)` in DCT mode.
- `dout = 2√2 · IDCT(din)` in IDCT mode.
- A DCT followed by an IDCT gives `8·x`.
- A row-column 2-D DCT gives 8 times the orthonormal 2-D DCT.

In a codec, this factor folds into the quantiser.

## Datapath units

| unit | module | what it does |
|------|--------|--------------|
| Fast adder (FA) | `fast_adder` | Adds eight inputs, each with sign ±1, in one step. The tree is six CSA(3,2) cells and one carry-propagate adder: (x6,x5,x4)→A, A+x7→B, (x3,x2,x1)→C, C+x0→D, D+B.sum→E, E+B.carry→F, then F→final adder. That is four carry-save levels and one carry-propagate add. A subtracted input is inverted, and the count of inverted inputs enters the final adder as the missing "+1"s. |
| CSA(3,2) | `csa_3_2` | Bitwise full adders: `a+b+c = sum + carry` (mod 2^W). |
| Multiplier array (MA) | `multiplier_array`, `multiplier` | Four signed multipliers, `K_i = round(Y_i·Z_i / 2^30)`, captured in product registers. |
| Constant ROM | `coef_rom` | The 10 words above, with 4 read ports. Each port has a negate flag. |
| Full CSA(4,2) (FCSA) | `fcsa_4_2` | Adds the four products to give one `z[k]` of the IDCT (two CSA(3,2) and one adder). In *pair* mode it gives `K0+K1` and `K2+K3` instead, for the IDCT rotation. |
| CSA array (CA) | `csa_array` | Eight lanes, `S_i ← B_i ± A_i`, each with an output register. It accumulates the DCT outputs of lanes 4–7 and all eight IDCT outputs. |
| Register banks | `word_bank` ×2 | Bank A holds the input block. Bank B holds `y[0..7]` (DCT) or `z[0..7]` (IDCT). Together they are the 16 words of intermediate storage. |
| Sequencer | `sbdct_ctrl` | Steps a block through its schedule and issues a control word (`ctrl_t`) for each step. Also does the valid/ready handshake. |
| Top | `subband_dct_idct` | Wires the units together and re-orders the ports. |

Shared types, constants and the sign and coefficient tables are in `sbdct_pkg`.

## Step schedules

This is the core of the design. One step is one clock. The product registers sit between a
multiplication step and the addition that uses its products, so products formed in step *s*
are used in step *s+1*.

**DCT, 10 steps** (bank A = x, bank B = y):

| step | name | FA (→ bank B) | MA (→ product regs) | CA |
|------|------|---------------|---------------------|----|
| 0 | Add1 | y0 | – | lane0 ← y0 |
| 1 | Add2 | y1 | – | lane1 ← y1 |
| 2 | Add3 | y2 | – | – |
| 3 | Mul1 | y3 | y2·c8, y2·(−s8), y3·s8, y3·c8 (y3 taken directly from the FA) | – |
| 4 | Add4 | y4 | – | lane2 ← K0+K2, lane3 ← K1+K3 |
| 5 | Mul2 | y5 | y4 × column 4 of the 4×4 block | – |
| 6 | Mul3 | y6 | y5 × column 5 | lanes4–7 ← K |
| 7 | Mul4 | y7 | y6 × column 6 | lanes4–7 += K |
| 8 | Mul5 | – | y7 × column 7 | lanes4–7 += K |
| 9 | Add5 | – | – | lanes4–7 += K → C complete |

**IDCT, 8 steps** (bank A = C in lane order, bank B = z). `z = Fhᵀ·C`, then
`x[n] = Σ_k sign(k,n)·z[k]`:

| step | name | MA | FCSA (→ bank B) | CA (all 8 lanes) |
|------|------|----|-----------------|------------------|
| 0 | Mul1 | C2·c8, C3·(−s8), C2·s8, C3·c8 | z0 = C0, z1 = C1 (no arithmetic) | – |
| 1 | Mul2 | C4..C7 × row 4 of the block | pair: z2 = K0+K1, z3 = K2+K3 | S ← z0 ± z1 |
| 2 | Mul3 | C4..C7 × row 5 | z4 = ΣK | S ± z2 |
| 3 | Mul4 | C4..C7 × row 6 | z5 = ΣK | S ± z3 |
| 4 | Mul5 | C4..C7 × row 7 | z6 = ΣK | S ± z4 |
| 5 | Add1 | – | z7 = ΣK | S ± z5 |
| 6 | Add2 | – | – | S ± z6 |
| 7 | Add3 | – | – | S ± z7 → x complete |

Both directions use exactly five multiplication steps: 4 + 16 = 20 multiplications.

## Interface and timing

```
subband_dct_idct #(DATA_W = 32, COEF_W = 32, COEF_FRAC = 30)
  clk, rst_n            synchronous, active-low reset
  in_valid, in_ready    block handshake; taken on a clock edge where both are high
  in_mode               0 = DCT, 1 = IDCT (sampled with the block)
  din[7:0]              eight signed DATA_W-bit words, natural order
  out_valid             one-clock pulse; dout is meaningful only then
  out_mode              mode of the finished block
  dout[7:0]             eight signed words, natural order
```

- **Latency.** `out_valid` is high 11 clocks (DCT) or 9 clocks (IDCT) after the accepting edge.
- **Throughput.** `in_ready` is high when idle and during a block's last step. A stream of blocks
  therefore runs at one block per 10 clocks (DCT) or 8 clocks (IDCT), with no gap, and the mode
  may change from block to block.
- **No output back-pressure.** The result must be taken in the `out_valid` cycle.

## Numbers

- **Data.** 32-bit two's complement. The sums of eight terms wrap modulo 2^32, so keep
  |din| < 2^28.
- **Constants.** Q2.30 in 32 bits. Every product is rounded to nearest (ties up).
- **Error against the exact scaled transform.** At most 2 LSB per DCT output (0 for X0 and X4).
  At most 10 LSB per IDCT output. The testbenches allow 3 and 12.
- **Changing sizes.** `DATA_W`, `COEF_W` and `COEF_FRAC` are parameters. The ROM conversion goes
  through a 64-bit integer, so `COEF_FRAC` must stay below about 62.

## Departures and own choices

The factorisation, the unit set (FA, MA with a 10-word ROM, FCSA(4,2), CA, 16 words of storage),
the adder-tree shapes, the constants and the step order follow the published architecture.
Everything below is this implementation's own choice.

- **Clocking.** One clock per step, with product registers between the MA and the adders. The
  published figure of "5 multiplication cycles" latency counts only multiplication cycles. Here
  latency is counted in clocks.
- **Blocks are not overlapped** beyond starting the next block in the last step. The FA is idle
  in the last two DCT steps.
- **Extra adder in the FCSA.** The IDCT needs `z2` and `z3` in the same step, and one 4-input
  tree gives only one sum. Pair mode zeroes two tree inputs and adds a second two-input adder.
- **CA lanes can subtract**, which `R⁻¹` needs. The FA subtracts by inversion with a correction
  constant.
- **Interface choices:** the handshake, the reset, natural-order ports and the unnormalised
  scaling.
- **Coefficient signs.** Where the published data-flow tables and the published `Fh` matrix
  disagree on a sign or value (three coefficients), the matrix is followed. It is the one that
  reproduces the DCT.

**Not included:**

- Variable-length (16/32/64-point) operation built from this 8-point core. Its data flow is not
  specified.
- A transpose memory for 2-D transforms.
- The FPGA test platform around the core: microcontroller, board SRAM and USB host link.

## Simulation

Every module is in `rtl/<name>.sv`, and the package `sbdct_pkg` must be read first. Each
testbench in `tb/` is self-checking and ends with a `TB_RESULT checks=N failures=M` line. For
example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sbdct_pkg.sv \
    tb/tb_subband_dct_idct.sv --top-module tb_subband_dct_idct
./obj_dir/Vtb_subband_dct_idct
```

| testbench | covers |
|-----------|--------|
| `tb_subband_dct_idct` | Full-size end to end. Random DCT/IDCT blocks against a floating-point reference. Latency of 11 and 9 clocks. Back-to-back blocks, mode switches, held-off inputs, DCT→IDCT round trips. Counts each of these and fails if one never happened. |
| `tb_dct2d_8x8` | The 8×8 2-D DCT/IDCT of JPEG/MPEG blocks, row-column, with the transpose done in the testbench. Checks against a 2-D reference and the 64·x round trip. |
| `tb_sbdct_ctrl` | Handshake, step counts, out_valid timing, the work issued per block. |
| `tb_fast_adder`, `tb_csa_3_2`, `tb_fcsa_4_2`, `tb_csa_array`, `tb_multiplier_array`, `tb_coef_rom`, `tb_word_bank` | Each unit against an independent model. |

To change the design:

- **Schedule:** the control-word tables in `sbdct_ctrl.sv`. The operand multiplexers they steer
  are in `subband_dct_idct.sv`.
- **Transform matrices:** the sign table `r_neg` and the coefficient table `blk_coef` in
  `sbdct_pkg.sv`.
