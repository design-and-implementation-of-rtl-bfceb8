# 32-bit convolution and deconvolution on a radix-256 Booth / redundant-binary multiplier

Convolution of two sequences is dominated by multiplications. This design
computes the linear and circular convolution of two 4-sample sequences of
32-bit samples, and the inverse operation (deconvolution), using a
multiplier built to keep carry propagation out of the partial-product sum:

* **Radix-256 Booth encoding** cuts a 32-bit multiplier operand into four
  signed digits in the range -128..128, so a 32 x 32 product has only four
  partial products instead of 32.
* **Redundant binary (RB) addition** adds those partial products with no
  carry chain: every digit of the sum depends only on a fixed number of
  neighbouring digits, so the adder delay does not grow with the width.
  A single carry-propagating adder remains, at the very end, to turn the RB
  result back into two's complement.

Samples are 32 bits, signed or unsigned (selected per operation).

## Block structure

```
conv_top
├── conv_core            4x4 array of r256_mult, 3-stage pipeline, linear + circular
│   └── r256_mult  (x16)
│       ├── r256_precomputer   +-1B, +-3B, +-5B, +-7B
│       ├── r256_ctrl_gen      Booth digits of A (S and T digits per group)
│       ├── r256_selector      digit x B, shifted into partial products PP_i
│       ├── rb_adder  (x2)     carry-free RB addition
│       └── rb2nb              RB -> two's complement
└── deconv_unit          sequential recursion, one r256_mult + seq_divider
```

`r256_pkg` holds the shared types (`booth_digit_t`, the FDMPP index enum) and
the default sizes (`DATA_W = 32`, `SEQ_L = 4`).

## How a product is formed (r256_mult)

This is the part of the design that needs the most care. All of it is
combinational.

### 1. Operand extension

Both operands are widened from 32 to 33 bits: with the top bit copied when
`is_signed = 1`, with a zero otherwise. From here on the datapath is purely
signed, and an unsigned operand is just a non-negative 33-bit number. The
33-bit multiplier needs five radix-256 digit groups. For signed operands the
fifth digit is always zero (it only sees copies of the sign bit), so signed
products have four non-zero partial products; unsigned products with the top
bit of A set use the fifth.

### 2. Radix-256 digits as two radix-16 digits (r256_ctrl_gen)

A zero is appended below A (`a[-1] = 0`) and A is cut into overlapping 9-bit
groups `a[8i+7 .. 8i-1]`. Each group is a radix-256 Booth digit

    D_i = -128 a[8i+7] + 64 a[8i+6] + ... + a[8i] + a[8i-1]      (-128..128)

Rather than selecting one of 257 multiples of B, each group is split into two
overlapping 5-bit windows, each a radix-16 Booth digit (-8..8):

    S_i = -8 a[8i+3] + 4 a[8i+2] + 2 a[8i+1] + a[8i]   + a[8i-1]
    T_i = -8 a[8i+7] + 4 a[8i+6] + 2 a[8i+5] + a[8i+4] + a[8i+3]
    D_i = S_i + 16 T_i

The shared bit `a[8i+3]` appears with weight -8 in S and +16 in T, which
nets to its true weight 8. Each S/T digit leaves the generator as a 5-bit
`booth_digit_t` (sign, magnitude 0..8).

### 3. Precomputed multiples (r256_precomputer) and selection (r256_selector)

Every magnitude 0..8 is an odd number times a power of two (2 = 1<<1,
4 = 1<<2, 6 = 3<<1, 8 = 1<<3), so eight precomputed values, the
*fundamental digit-multiplied partial products* +-1B, +-3B, +-5B, +-7B, are
enough. The selector has one multiplexer per S digit and one per T digit; it
picks the right FDMPP (negated copy for negative digits) and shifts it,
giving SGDMPP_i = S_i·B and TGDMPP_i = 16·T_i·B. One adder per group forms
D_i·B = SGDMPP_i + TGDMPP_i, which is shifted left 8i places into the 64-bit
partial product PP_i.

### 4. From partial products to one RB number

Each RB digit is a bit pair (d+, d-) with value d+ - d-, so (0,0) and (1,1)
are zero, (1,0) is +1 and (0,1) is -1. A pair of ordinary (NB) numbers x, y
becomes one RB number for free with

    x + y = x - ~y - 1        (positive digits x, negative digits ~y)

So PP0/PP1 and PP2/PP3 each become one RB operand worth their sum plus one.
A third RB operand carries PP4 as positive digits and the constant 2 (the
number of pairs) as negative digits, which cancels the two surplus ones.
All of this is wiring and inverters.

### 5. Carry-free RB addition (rb_adder)

For each digit position the sum of the two operand digits, x_i + y_i in
-2..2, is rewritten as 2·c_i + s_i using the two digits one position below:

| x_i + y_i | both digits at i-1 non-negative | otherwise   |
|-----------|---------------------------------|-------------|
|  2        | c = 1, s = 0                    | c = 1, s = 0 |
|  1        | c = 1, s = -1                   | c = 0, s = 1 |
|  0        | c = 0, s = 0                    | c = 0, s = 0 |
| -1        | c = 0, s = -1                   | c = -1, s = 1 |
| -2        | c = -1, s = 0                   | c = -1, s = 0 |

The final digit is z_i = s_i + c_{i-1}. The rule guarantees that s_i and the
incoming carry never have the same non-zero sign, so z_i stays in {-1, 0, 1}
and nothing propagates further. Two RB adders in a chain add the three RB
operands; the carry out of digit 63 is dropped (arithmetic is modulo 2^64,
and every 32 x 32 product fits in 64 bits).

### 6. Back to two's complement (rb2nb)

The product is `z+ - z-`, formed as `z+ + ~z- + 1`. This is the only
carry-propagating adder in the multiplier.

## Convolution (conv_core)

For f(0..3) and g(0..3):

    linear    y(n)  = sum_k f(k) g(n-k),            n = 0..6
    circular  yc(n) = sum_k f(k) g((n-k) mod 4),    n = 0..3   (= y(n) + y(n+4))

All 16 products f(k)·g(j) are computed in parallel by 16 multipliers, then
summed along the anti-diagonals k + j = n (linear) and k + j = n mod 4
(circular). Both results are produced on every operation.

Pipeline: input registers → multipliers → product registers → sums → output
registers. A new pair of sequences can be accepted every clock;
`conv_valid_o` rises exactly 3 clocks after the `conv_valid_i` it belongs to.
There is no back-pressure.

Outputs are `YW = 2N + clog2(L) + 1 = 67` bits wide so that a sum of 32 x 32
products never overflows, signed or unsigned. Products are sign-extended
(signed mode) or zero-extended (unsigned mode) before summing.

Worked example: f = {3,4,2,6}, g = {1,0,3,6} gives y = {3,4,11,36,30,30,36}
and yc = {33,34,47,36}.

## Deconvolution (deconv_unit)

Given y = f * g and g, with g(0) ≠ 0, f is recovered sample by sample:

    f(0) = y(0) / g(0)
    f(n) = ( y(n) - sum_{k<n} f(k) g(n-k) ) / g(0)

The unit runs this recursion sequentially: an accumulator is loaded with
y(n); one radix-256 multiplier forms one product f(k)·g(n-k) per clock,
which is subtracted; then a restoring divider (`seq_divider`, one quotient
bit per clock) divides the magnitude of the accumulator by |g(0)| and the
sign is applied afterwards. Only y(0..3) are needed, so `y_lin[0..3]` of the
convolution can be fed back directly.

Timing: sample n takes n + YW + 4 clocks, so with the defaults `dec_done_o`
pulses 290 clocks after the edge that samples `dec_start_i`; `dec_busy_o` is
high in between and `dec_f_o` holds the result from `dec_done_o` on. A start
while busy is ignored. A zero
g(0) is reported one clock after start by `dec_done_o` together with
`dec_err_o`. If y is not an exact convolution, each quotient is truncated
toward zero and cut to 32 bits.

## Top-level interface (conv_top)

Parameters: `N = 32` (sample width), `L = 4` (sequence length), `YW = 67`.
Clock `clk`; `rst` is synchronous and active high and clears all registers.
The two datapaths are independent and can run at the same time.

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `conv_valid_i` | in | 1 | f, g valid this clock |
| `conv_signed_i` | in | 1 | 1: two's complement samples, 0: unsigned |
| `conv_f_i`, `conv_g_i` | in | L x N | input sequences |
| `conv_valid_o` | out | 1 | results valid (3 clocks later) |
| `conv_y_lin_o` | out | (2L-1) x YW | linear convolution y(0..6) |
| `conv_y_circ_o` | out | L x YW | circular convolution yc(0..3) |
| `dec_start_i` | in | 1 | capture y, g, mode and start |
| `dec_signed_i` | in | 1 | signed mode of the deconvolution |
| `dec_y_i` | in | L x YW | y(0..3) |
| `dec_g_i` | in | L x N | g(0..3) |
| `dec_busy_o`, `dec_done_o`, `dec_err_o` | out | 1 | status; done is a one-clock pulse |
| `dec_f_o` | out | L x N | recovered f(0..3) |

Coarse synthesis (yosys, word-level) of the whole top gives about 50 k cells
and 2.7 k flip-flops; almost all of it is the 16 multipliers.

## Where this implementation departs from the original description

* Each radix-256 digit is handled as two radix-16 Booth digits,
  D = S + 16·T, as derived above. The original gives the control signals as
  a 4-bit Sdigit and an 8-bit Tdigit; here both are 5-bit sign/magnitude
  codes and the factor 16 is a fixed shift in the selector.
* Unsigned operands: the original says both are supported but not how. Here
  a one-bit operand extension and a fifth digit group (always zero for signed
  operands) handle it.
* Many widths in the original description (32-bit partial products, 66-bit
  RB sum, 33-bit result) describe a 16-bit multiplier. This design uses
  64-bit partial products and product, and 67-bit convolution outputs where
  the original shows 64-bit ones.
* The original shows the seven linear outputs in reverse order (first output
  = y(6)); here index n holds y(n).
* Pipelining is mentioned without placement; the three register stages of
  `conv_core` are this design's choice, as are the valid strobes.
* The original divider for deconvolution is not described; a restoring
  divider stands in for it.
* The original also describes an earlier design using Vedic multiplication
  and division, used only for comparison; it is not built. Its FPGA area and
  delay figures cannot be compared with this RTL directly.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench and ends with a
`TB_RESULT checks=N failures=M` line:

| Testbench | What it checks |
|-----------|----------------|
| `tb_r256_precomputer` | all eight multiples against constant multiplication |
| `tb_r256_ctrl_gen` | each S/T digit against its bit window; digits rebuild A |
| `tb_r256_selector` | all 17 x 17 (S, T) digit pairs, extreme multiplicands |
| `tb_rb_adder` | every digit-code combination at one position; random RB operands |
| `tb_rb2nb` | random and corner RB values |
| `tb_r256_mult` | corner and random products, signed and unsigned |
| `tb_conv_core` | worked example; random streams with gaps and back-to-back inputs; 3-clock latency |
| `tb_deconv_unit` | worked example; random signed/unsigned round trips; cycle count; g(0)=0 |
| `tb_conv_top` | end to end at the default size: convolution, deconvolution of its result while the pipeline keeps streaming, and a count of each mechanism (signed, unsigned, back-to-back, circular wrap, Booth digit ±8, negative digits, deconvolution, both datapaths busy, g(0)=0 error), failing if any never occurs |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/r256_pkg.sv tb/tb_conv_top.sv --top-module tb_conv_top
./obj_dir/Vtb_conv_top
```

The full-size top testbench builds in under a minute and runs in well under
a second.

## Changing the design

`N` and `L` are parameters of `conv_top`, `conv_core` and `deconv_unit`;
`YW` follows from them. The multiplier derives its group count from `N`
(`num_groups` in `r256_pkg`). Signed/unsigned behaviour is a run-time input,
not a parameter.
