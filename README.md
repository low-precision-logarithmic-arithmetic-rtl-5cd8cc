# Low-precision LNS neuron

This is a neural-network neuron that computes

    X' = act(B + S_in + sum_{i=1..N} W_i * X_i)

on N input pairs in parallel. It is built for FPGA inference with weights and
activations of 4 or 5 bits. Weights and activations are kept in a
**logarithmic number system (LNS)**. That gives more dynamic range per bit than
fixed point, so a network quantised without retraining needs fewer bits for
the same accuracy. Each multiplication becomes a small fixed-point addition.
The one costly LNS operation, addition, is avoided: each product is converted
back to ordinary fixed point and the products are summed exactly. At 4–5 bits
every conversion is a small table, so this costs little.

The default build is a fully parallel 784-input neuron (one output of the first
layer of a 784-300-100-10 MNIST perceptron). It uses logs of 4 bits
(MSB m = 2, LSB l = -1) and a 9-bit linear sum with LSB l' = -6.

## Data flow

```
 lane i (x N)                                 shared
 L_X[i] ─┐ ufix(m,l)
         (+)── L_P ufix(m+1,l) ──┐
 L_W[i] ─┘                       [b^-x table]── P[i] sfix(1,l') ──┐
 s_W[i] ─────────────────────────┘                                │
                                         B, S_in sfix(2,l') ──► [ Σ ] ──► S_out sfix(2,l')
                                                                  │
                                                     [activation + log table]
                                                                  │
                                                         L_X' ufix(m,l)
```

| module | role |
|---|---|
| `lns_mul` | `L_P = L_X + L_W`, exact. The carry is kept as an extra integer bit. |
| `lns_exp` | table `{s_W, L_P} -> (-1)^s_W * b^-L_P`, rounded to nearest at 2^l' |
| `lns_sum` | exact sum of the N products, the bias and `S_in` |
| `lns_act_log` | table `S -> -log_b(act(S))`, rounded to nearest at 2^l', then clamped |
| `lns_neuron` | top level: N lanes, the sum and the output table |
| `lns_pkg` | the `act_e` type and the constant functions that fill the tables |

The neuron is purely combinational. It has no clock, no reset and no
handshake. Whoever uses it registers its inputs and outputs as needed. The
reference FPGA results for this structure (about 12.5k LUTs and about 10 ns
for the default configuration on a Kintex-7) are for the combinational
neuron.

## Number formats

All formats are fixed point, named by the weight of their top and bottom bits:

* `ufix(M,L)`: unsigned, with bits of weight 2^M down to 2^L (M-L+1 bits).
* `sfix(M,L)`: two's complement. The top bit has weight -2^M.

The formats rely on three facts, which the offline preparation of the network
makes true:

1. **Activations are non-negative.** They come out of a ReLU, and the network
   input can be shifted. So activations carry no sign bit. Weights do carry
   one, `s_W`.
2. **Every |W| and every X is below 1.** After training, each layer's weights
   are divided by a power of two (8, 16 or 32 in practice). This adds a
   constant to every `L_W`. Because ReLU is piecewise linear, the
   classification does not change. Then every logarithm is negative, so only
   its negation `L = -log_b|A|` is stored, as unsigned `ufix(m,l)`. With
   m = 2 and l = -1, L runs from 0 to 7.5 in steps of 0.5. Larger codes mean
   smaller values.
3. **The final sum is below 1 in magnitude.** The bias is scaled by the same
   factor. The sum format `sfix(2,l')` keeps one more integer bit than that
   needs.

The product `L_P = L_X + L_W` is `ufix(m+1,l)`: the carry is kept, so the
product is exact. A carry means a very small product, which the conversion
then rounds towards zero. Each linear product satisfies |P| <= 1, so it fits
`sfix(1,l')`.

### Zero without a zero bit

A normal LNS format needs an extra "is zero" bit, because log 0 is undefined.
This design has no such bit. **The largest code stands for zero.**

With m = 2, l = -1 the largest code is 7.5, and 2^-7.5 ≈ 0.0055. That is less
than half of 2^-6, so the round-to-nearest `b^-x` table maps it to 0 when
l' >= -6. Any product with a zero-coded operand has L_P >= 7.5 and also
becomes 0. The output table returns the largest code whenever act(S) <= 0,
so zeros pass on to the next layer.

If l' is lower than this threshold, the zero code becomes a small non-zero
value, and the many zeros of a network add up to an error. Two of the
configurations below are in that case:

* MNIST (2,-1) with l' = -7: 2^-7.5 rounds to 1 unit of 2^-7. Truncating
  instead of rounding would give 0, because the first one bit of 2^-7.5 has
  weight 2^-8. The reference design counts this configuration among those
  where zero still works, which matches truncation. This RTL rounds to
  nearest.
* CIFAR-10 (2,-2) with l' = -10: the zero code is 2^-7.75, which rounds to 5
  units of 2^-10.

In both, a product is exactly 0 only when L_P is large enough, for example
when both operands carry the zero code (the padding used below does this).

### Rounding

Both tables round to nearest. `lns_exp` rounds the linear value b^-L_P to a
multiple of 2^l'. `lns_act_log` rounds the logarithm -log_b(act(S)) to a
multiple of 2^l. Ties go away from zero; they only arise for exact values such
as b^0 = 1. The output table also clamps:

* act(S) >= 1 gives code 0;
* values too small to represent give the largest code, which is zero.

Because of that clamp, ReLU and ReLU1 (min(max(x,0),1)) produce the same
table.

### The sum

Every term of the sum is a multiple of 2^l', so the sum is exact. `lns_sum`
adds in two's complement modulo 2^(3-l'). The result is right whenever the
true final sum lies in [-4, 4), even if a partial sum leaves that range along
the way. No overflow flag is produced. Keeping the sum in range is the job of
the weight scaling described above.

## Tables

The two tables are generated when the design is elaborated, by constant
functions in `lns_pkg` that use real arithmetic. No data files are read.

* `lns_exp`, entry `{s, k}` (k = L_P code): `round(b^(-k*2^l) * 2^-l')`,
  negated when s = 1. The table has 2^(m-l+3) entries of 2-l' bits: 64 × 8 bits
  by default, one table per lane.
* `lns_act_log`, entry for the sum code `s` (two's complement, value
  s*2^l'): `clamp(round(-log_b(act(s*2^l')) * 2^-l), 0, 2^(m-l+1)-1)`. The
  table has 2^(3-l') entries of m-l+1 bits: 512 × 4 bits by default.

Because the tables are computed, the base `BASE` can be any real number, not
only 2. The activation can be changed too. `ACT_RELU` is the default. A
sigmoid table, `ACT_SIGMOID`, is provided as an example of another activation.
tanh cannot be used, because negative activations have no sign bit.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 784 | input pairs per pass |
| `MSB` | 2 | m, top bit of the logarithms |
| `LSB` | -1 | l, bottom bit of the logarithms |
| `SUM_LSB` | -6 | l', bottom bit of the linear products and the sum |
| `BASE` | 2.0 | b, base of the logarithms |
| `ACT` | `ACT_RELU` | activation fused into the output table |
| `W_LSB` | `LSB` | bottom bit of the weight logs; a larger value stores weights in fewer bits |

Port widths follow from these parameters. With the defaults:

* `lx`, `lw`: N × 4 bits;
* `sw`: N bits;
* `bias`, `s_in`, `s_out`: 9 bits;
* `lx_out`: 4 bits.

A weight therefore takes 5 bits (4 for the log, 1 for the sign) and an
activation 4 bits.

Weights can be stored more coarsely than activations by setting `W_LSB`
above `LSB`. For example, `W_LSB = 0` gives 3-bit weight logs with integer
steps. `lns_mul` pads L_W with zeros on the right before adding, so the adder
stays as wide as before. Only weight memory and bandwidth are saved. Check
the zero threshold again when doing this. With `W_LSB = 0`, the weight zero
code is 7.0, and 2^-7 is exactly half of 2^-6. That tie rounds up, so l' = -5
or higher is needed for an isolated zero weight to give 0.

Configurations evaluated for this neuron:

| use | (m, l) | l' | log bits | sum bits |
|---|---|---|---|---|
| MNIST MLP (default) | (2, -1) | -6 | 4 | 9 |
| MNIST MLP | (2, -1) | -7 | 4 | 10 |
| CIFAR-10 VGG-like | (3, -1) | -11 | 5 | 14 |
| CIFAR-10 VGG-like | (2, -2) | -10 | 5 | 13 |

Raising l' makes the conversion error larger. Lowering it below the zero
threshold turns the zero code into a small non-zero value, and the many zeros
of a network then add up to an error. Increasing m adds values only near 0
(between 2^-(2^(m+1)-2^l) and 0). Lowering l adds values between the existing
ones.

## Longer dot products: S_in and S_out

A layer's dot product can have more inputs than N. For example, a 3×3
convolution over 512 channels has 4608 inputs. Such a dot product is
computed in passes:

1. First pass: apply the bias, with `s_in = 0`.
2. Each later pass: feed the previous `s_out` back into `s_in`, with
   `bias = 0`.
3. Use `lx_out` of the last pass only.

Unused lanes are padded with the zero code on both `lx` and `lw`. The
controller that sequences these passes, and the activation and weight
buffers, are not part of this RTL.

## How this RTL relates to the reference design

It follows the reference design in:

* the structure (per-lane log adder and b^-x table, exact linear sum, fused
  activation and log table);
* the formats, the kept carry, the zero encoding;
* correct rounding in both tables;
* the default parameters.

Choices made here where the reference leaves things open:

* **Sum width.** The sum is `sfix(2,l')`, 9 bits by default. The reference
  also describes a sign bit at weight 2^1 for the sum, which would be one bit
  narrower. The wider form was used.
* **Bias and S_in formats.** Both are taken to be `sfix(2,l')`.
* **S_in / S_out.** The reference shows them as ports without describing
  them. They are read here as a partial-sum chain.
* **Zero threshold.** The reference says the zero code still maps to 0 for
  (2,-1) with l' = -7. That holds only if `b^-x` truncates. The same source
  also calls its tables correctly rounded. This RTL rounds to nearest, so with
  l' = -7 an operand with the zero code contributes 2^-7 when the other
  operand has the log code 0.
* **Output rounding.** The output table is described in one place as a floor
  of the logarithm, and elsewhere as correctly rounded. Round-to-nearest is
  used.
* **Saturation.** The clamping rules of the output table are this design's
  own.
* **Summation structure.** The reference sums with a generated FPGA
  compressor tree. Here it is a plain adder expression, and its structure is
  left to synthesis.
* **Sigmoid.** The sigmoid option is an addition.

Not included: the fixed-point comparison neurons (6- and 8-bit linear). The
offline steps (network training, weight and bias scaling, float-to-LNS
quantisation) are software and not included either.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`.
The reference values in `tb/tb_lns_ref_pkg.sv` are computed independently of
the RTL tables: products through exp/ln, and the output code by searching all
codes for the nearest one.

| testbench | what it covers |
|---|---|
| `tb_lns_mul` | every code pair, three formats (one with coarser weights) |
| `tb_lns_exp` | every table entry of (2,-1)/l'=-6 and (3,-1)/l'=-11, including the zero encoding |
| `tb_lns_act_log` | every sum code for ReLU (two formats) and for sigmoid |
| `tb_lns_sum` | 2000 random vectors, plus running sums that wrap around |
| `tb_lns_neuron` | N = 12/16 in all four configurations, 3-pass chaining, sigmoid, coarser weight format. It counts each mechanism and fails if one never occurs: zero operands, carry, negative weights, products rounding to 0, ReLU zero, saturation, bias, S_in, wrap-around. |
| `tb_lns_neuron_full` | the default 784-input neuron, 300 outputs of random data |
| `tb_lns_mnist_mlp` | 300- and 100-input MNIST neurons on the default neuron, the remaining lanes padded |
| `tb_lns_cifar_layer` | a 4608-input CIFAR-10 output on 784-input neurons, 6 chained passes, both CIFAR formats |

`lns_neuron_harness` (in `tb/`) is the shared stimulus generator and checker.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/lns_pkg.sv tb/tb_lns_ref_pkg.sv tb/tb_lns_neuron_full.sv \
    --top-module tb_lns_neuron_full -o sim
./obj_dir/sim
```

Replace the last file and the top module to run another testbench. The full
784-lane neuron builds in seconds and simulates 300 operations in well under a
second. The CIFAR testbench instantiates two 784-lane neurons and takes about
half a minute to build.

What is not verified here: timing and area on an FPGA. The LUT counts quoted
above are the reference implementation's, not this RTL's.
