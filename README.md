# Vedic-multiplier MAC neuron with carry-select adders

This is one processing element of an artificial neural network, a single neuron, in
synthesizable SystemVerilog. Each clock it multiplies an input sample by its weight and adds
the product into an accumulator. The accumulated sum, less a threshold, then goes through a
sigmoid activation.

Its arithmetic is built to avoid long carry chains:

- **The multiplier** uses the Urdhva Tiryakbhyam ("vertically and crosswise") method of Vedic
  arithmetic. All partial products are formed at the same time, with no shifting. Half-size
  multipliers are combined with three adders to make a larger one, so 16 x 16 is built from
  8 x 8, 8 x 8 from 4 x 4, and 4 x 4 from 2 x 2.
- **The adders** are square-root carry-select adders. In the multiplier, each group adds for a
  carry in of 0 with a ripple adder, and a binary-to-excess-1 converter (BEC) gives the result
  for a carry in of 1. The accumulator uses a reduced area-delay-power carry-select adder,
  which selects carry words instead of sums.

```
 x[15:0] ─┐
          ├─► vedic_mult16 ──product[31:0]──► csla_adp (40 b) ──► acc register ─┬─► acc
 w[15:0] ─┘   (4 x vedic_mult8 + 3 csla_bec)        ▲                            │
                                                    └── acc (0 while rst_n = 0) ◄┘
                                   threshold ──► z = acc - threshold ──► sigmoid_act ──► y, fire
```

## The multiplier

### 2 x 2 cell
`vedic_mult2` has four AND gates and two half adders:

- `p0 = a0·b0`
- the two crosswise products `a1·b0` and `a0·b1` go into one half adder, which gives `p1`
  and a carry
- that carry and the vertical product `a1·b1` go into a second half adder, which gives `p2`
  and `p3`

### Doubling the width
For an N x N multiplier with halves of H = N/2 bits, four half-size multipliers produce these
products at the same time:

| product | meaning | weight |
|---|---|---|
| q0 = aL·bL | vertical, low | 2^0 |
| q1 = aH·bL | crosswise | 2^H |
| q2 = aL·bH | crosswise | 2^H |
| q3 = aH·bH | vertical, high | 2^N |

Three N-bit carry-select adders (`vedic_combine`) merge them:

1. `{c1,s1} = q1 + q2`
2. `{c2,s2} = s1 + q0[N-1:H]`
3. `s3 = q3 + {c1|c2, s2[N-1:H]}`

The product is `p = {s3, s2[H-1:0], q0[H-1:0]}`.

Two facts keep this small:

- The carries `c1` and `c2` are never both 1, because `q1 + q2 + q0[N-1:H] < 2^(N+1)`. One OR
  gate therefore merges them.
- The third adder never carries out, because the product fits in 2N bits.

`vedic_mult4`, `vedic_mult8` and `vedic_mult16` are this construction applied to the next
smaller multiplier. The MAC uses `vedic_mult16`.

### Column-form 8 x 8 (`urdhva_mult8`)
The same method can be written column by column:

- Column k adds every `a[i]·b[k-i]`, plus the carries handed to it by earlier columns.
- Bit 0 of the column sum is `p[k]`.
- The bits of weight 2, 4 and 8 go to columns k+1, k+2 and k+3. A column holds at most 14
  bits, so its sum fits in 4 bits.
- The carry into column 15 is `p[15]`.

Setting `COLUMN_8X8 = 1` on `vedic_mult16`, `mac_unit` or `processing_unit` uses this form for
the four 8 x 8 stages. The default is the 4 x 4 / 2 x 2 hierarchy. Both give identical
products; the testbench of `vedic_mult16` checks them side by side.

## The adders

### Square-root grouping
Both carry-select adders split the word into groups that grow by one bit, starting from the
least significant bit. The widths follow from the functions in `vedic_pkg`:

| adder width | groups (LSB first) |
|---|---|
| 16 | 2, 2, 3, 4, 5 |
| 8 | 2, 2, 3, 1 |
| 40 | 2, 2, 3, 4, 5, 6, 7, 8, 3 |

A longer group gets its select signal later, so it has more time to ripple.

### BEC carry-select adder (`csla_bec`), used in the multiplier
- **Group 0** is a ripple adder (`rca`, made of `full_adder`, made of `half_adder`). It is fed
  by `cin`.
- **Every other group of n bits** has one n-bit ripple adder with carry in 0. Its sum and carry
  form an (n+1)-bit word.
- An (n+1)-bit `bec` turns that word into word + 1. For 4 bits the equations are:
  - `x0 = ~b0`
  - `x1 = b1 ^ b0`
  - `x2 = b2 ^ b1·b0`
  - `x3 = b3 ^ b2·b1·b0`
- A multiplexer, steered by the carry out of the group below, picks one of the two words. The
  top bit of the chosen word is the group's carry out.

The BEC replaces the second ripple adder (carry in 1) that a plain carry-select adder would
need.

### Reduced area-delay-power carry-select adder (`csla_adp`), used for the accumulator
Each group chains four units. Only CS and FSG depend on the carry in, so those few gates are
the only ones on the path from group to group.

| unit | module | function |
|---|---|---|
| HSG | `adp_hsg` | half sum `s0 = a^b`, half carry `c0 = a&b` |
| CG0 | `adp_cg0` | carry word for carry in 0: `c[0]=c0[0]`, `c[i]=c0[i] \| s0[i]&c[i-1]` |
| CG1 | `adp_cg1` | same for carry in 1: `c[0]=c0[0] \| s0[0]` |
| CS | `adp_cs` | `c = c1_0 \| cin & c1_1`: one AND-OR gate per bit |
| FSG | `adp_fsg` | `s[0]=s0[0]^cin`, `s[i]=s0[i]^c[i-1]`, `cout=c[n-1]` |

The CS unit needs no full multiplexer. A bit that is set in the carry word for carry in 0 is
always set in the carry word for carry in 1, so an OR with a gated term is enough.

## MAC timing and reset
- `mac_unit` has a single register, the accumulator. The product is combinational.
- Operands sampled at a rising edge are in `acc` right after that edge, so the latency is one
  clock.
- `rst_n` is synchronous and active low. It does more than clear the accumulator: it loads it
  with `0 + a·b`.

With `a = 205` and `b = 3` held:

| cycle | rst_n | acc after the edge |
|---|---|---|
| 1 | 0 | 615 |
| 2 | 1 | 1230 |
| 3 | 1 | 1845 |
| … | 1 | +615 per clock |

A neuron evaluation is therefore:

1. Present the first sample with `rst_n = 0`.
2. Present the remaining samples with `rst_n = 1`, one per clock.
3. To hold the result, present zero operands.

There is no enable input. The accumulator is 40 bits wide by default: the 32-bit product
plus 8 guard bits, enough for at least 256 full-scale products. It wraps around on overflow.
Operands are unsigned.

## Activation
`processing_unit` forms `z = acc - threshold` as a signed number. `sigmoid_act` reads `z` as a
fixed-point value with `FRAC` fraction bits (default 8).

It approximates `1/(1+e^-z)` with a piecewise-linear curve that needs only shifts and
additions:

| \|z\| | y(\|z\|) |
|---|---|
| ≥ 5 | 1 |
| 2.375 … 5 | \|z\|/32 + 0.84375 |
| 1 … 2.375 | \|z\|/8 + 0.625 |
| 0 … 1 | \|z\|/4 + 0.5 |

- For negative `z`, `y = 1 - y(|z|)`.
- `y` has 8 fraction bits (256 = 1.0) and is truncated.
- Its error against the exact sigmoid stays under 0.025. The testbench checks this bound at
  every input step from -7 to +7.
- `fire = (z >= 0)` is the hard threshold output of a binary neuron.
- `y` and `fire` are combinational from the accumulator register.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `ACC_W` | `processing_unit`, `mac_unit` | 40 | accumulator width (≥ 32) |
| `FRAC` | `processing_unit`, `sigmoid_act` | 8 | fraction bits of `z` (≥ 8) |
| `Z_W` | `sigmoid_act` | 41 | width of `z` (`ACC_W + 1` in the top) |
| `COLUMN_8X8` | `processing_unit`, `mac_unit`, `vedic_mult16` | 0 | 8 x 8 stages in column form |
| `W` | adders, `bec`, ADP units | 16 / 40 / 4 | word width |

The operand width is fixed at 16 bits by the multiplier hierarchy.

## Files
- `rtl/vedic_pkg.sv` — group-size functions and the activation output format.
- `rtl/processing_unit.sv` (top) → `mac_unit.sv`, `sigmoid_act.sv`.
- `rtl/mac_unit.sv` → `vedic_mult16.sv`, `csla_adp.sv`.
- `rtl/vedic_mult16/8/4.sv` → `vedic_combine.sv` → `csla_bec.sv` → `rca.sv`, `bec.sv`.
- `rtl/vedic_mult2.sv`, `urdhva_mult8.sv`, `full_adder.sv`, `half_adder.sv`, `adp_*.sv`.
- `tb/tb_<module>.sv` — one self-checking testbench per module.

## Simulation
Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It has a watchdog
that counts a failure if the simulation hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/vedic_pkg.sv tb/tb_processing_unit.sv --top-module tb_processing_unit
./obj_dir/Vtb_processing_unit
```

To run a different testbench, replace `tb_processing_unit` with its name.

What the testbenches cover:

- **`tb_processing_unit`** is the end-to-end test, at the default parameters.
  - It runs 21 neuron evaluations. The first is the 205 x 3 example.
  - After each evaluation it checks the accumulator, then sweeps the threshold so that `z`
    falls in all eight sigmoid segments.
  - It counts clear-and-load cycles, accumulate cycles, and `fire` high and low. It fails if
    any of them never occurs.
- **The multipliers:**
  - `vedic_mult2`, `vedic_mult4`, `vedic_mult8` and `urdhva_mult8` are tested on all operand
    pairs. This includes 10110110 x 11011001 = 1001101001000110.
  - `vedic_mult16` gets corner cases and 200 000 random pairs in both forms.
- **The adders** are tested exhaustively at a small width, then with random and
  carry-through-every-position cases at full width.
- **`tb_mac_unit`** also checks the one-clock latency and wraps the 40-bit accumulator.

## Where this design makes its own choices
The neuron structure comes from the design description. So do the Vedic multiplier
hierarchy, the 2 x 2 cell, the BEC equations and the HSG/CG/CS/FSG units. The following are
choices made here, and deserve a look before reuse:

- **Adder arrangement inside the multiplier.** The description gives three adders per
  doubling step but not their wiring. The wiring above is the usual one.
- **Group sizes.** The 16-bit groups 2, 2, 3, 4, 5 are the customary square-root split.
  Other widths continue that series.
- **Which carry-select adder goes where.** The BEC adder is in the multiplier and the reduced
  area-delay-power adder is in the accumulator. The description presents both adders as part
  of the proposed unit without placing the second one.
- **MAC reset and width.** Reset acts as clear-and-load, chosen to reproduce the 205 x 3
  example (615 during reset). The accumulator is 40 bits wide, has no enable, and wraps
  around. A MAC adds the product (615) each clock, not the operand 205.
- **Activation.** The piecewise-linear sigmoid, the fixed-point formats, the threshold
  subtraction and the `fire` output are all choices made here.
- **Column-form multiplier.** It computes the full 16-bit product. Bit 15 is the carry out of
  column 14, not the lone product `a7·b7`.
- **Scope.** Only one neuron is provided. A network of them, its layer sizes and how weights
  are supplied are not defined here.
- **Not verified.** Timing, area and power are unverified. The carry-select structures are
  written at gate level, but a synthesis tool is free to restructure them.
