# Multiplier-free adaptive FIR filtering with distributed arithmetic

This is an adaptive 16-tap FIR filter that learns its weights by the **block
least-mean-square (block LMS)** rule and never multiplies. Every product is
replaced by **distributed arithmetic (DA)**: small look-up tables of
pre-added sums, read one bit position at a time, with the results shifted and
added. The central idea is that **one bank of tables serves both halves of the
algorithm**. The same tables give the filter output, where the weights are the
operands read bit by bit. They also give the gradient for the weight update,
where the errors are the operands read bit by bit.

Next to it sits a second, simpler circuit: a **fixed-coefficient 16-tap DA FIR
filter**. Its tables hold sums of constant coefficients and are addressed by the
input bits. The two filters share clock and reset and nothing else. The top
level, `da_top`, brings out the ports of both.

## Block LMS in brief

The filter has weights `w[0..15]`. For input `x(k)` and desired signal `d(k)`:

```
y(k) = sum_n w[n] * x(k-n)                 output
e(k) = d(k) - y(k)                         error
```

Block LMS keeps the weights fixed for a block of L samples and then updates them
once with the error/input correlation summed over the block:

```
w[n] <- w[n] + mu * sum_{k in block} e(k) * x(k-n)
```

Here the block length equals the filter length: L = N = 16.

## Distributed arithmetic

Take an inner product `sum_j a[j]*b[j]` over four terms, where the `b[j]` are
B-bit two's-complement numbers. Write each `b[j]` in bits:

```
sum_j a[j]*b[j] = sum_{bit t<B-1} 2^t * T(t)  -  2^(B-1) * T(B-1)
T(t) = sum_j a[j] * bit_t(b[j])
```

`T(t)` can take only 16 values, one for each 4-bit pattern of
`{bit_t(b[3]), .., bit_t(b[0])}`. A 16-word table holding all subset sums of the
`a[j]` supplies it with a single read. Serial DA reads one bit position per
cycle, least significant first. The adder tree adds the words from all tables
in use, and an accumulator adds them at weight `2^t`, subtracting the sign bit's
term. After B cycles the accumulator holds the exact inner product.

Which operand goes into the tables and which one addresses them is the only
difference between the two filters:

| filter | table contents (`a`) | table address (`b`, bit-serial) |
|---|---|---|
| fixed FIR (`da_fir`) | constant coefficients, four per table | input samples |
| adaptive (`da_blms_filter`) | input samples, four consecutive per table | weights (output) or errors (gradient) |

## The shared table bank of the adaptive filter

This is the part that takes some thought.

**Tables.** Each time a sample `x(t)` is taken, sixteen adder cells build the
table of the *window* ending at `t`:

```
lut_t[a] = a[0]*x(t) + a[1]*x(t-1) + a[2]*x(t-2) + a[3]*x(t-3)
```

These cells use the new sample and the three held in a small input delay. The
bank is a shift register of tables: `lut[0]` belongs to the newest window, and
`lut[k]` to the window `k` samples older. Sixteen tables are kept (module
`lut_update`).

**Key fact.** Weight `w[n]` multiplies `x(k-n)`, and the window of age `n` starts
exactly at `x(k-n)`. So read port `n` of the multiplexer array is wired
permanently to table `n` (module `mux_array`).

**Output.** Group `p` holds weights `4p..4p+3`, and the samples they multiply
are `x(k-4p) .. x(k-4p-3)`. That is exactly the window of age `4p`. In cycle `t`
of the output phase, port `4p` is addressed with
`{w[4p+3][t], w[4p+2][t], w[4p+1][t], w[4p][t]}`. The other ports get address 0,
and word 0 of every table is 0. The adder tree adds the four words, and the
accumulator runs over the 16 weight bits.

**Gradient.** Split a block into rows of four samples, `i = 4r .. 4r+3`. Once
the fourth error `e3` of a row is known, weight `n`'s share of the row's
gradient is `sum_{i'} e_{i'} * x(T-3+i'-n)`, where `T` is the newest sample.
Those are again the four samples of the window of age `n`, in the opposite
order. So, in cycle `t` of the gradient phase, *every* port gets the same
address `{e0[t], e1[t], e2[t], e3[t]}` (the oldest error on the top bit). Each of
the 16 gradient accumulators adds its own port's word at weight `2^t`,
subtracting the sign bit's term. After the row's 16 cycles, `grad[n]` has grown
by exactly that sum. Because the gradient pass runs
after every fourth sample, it only ever needs the 16 newest tables.

**Update.** After the block's fourth row, each weight is updated once (shown
for the default widths):

```
w[n] <- sat16( w[n] + (grad[n] >>> (15 + MU_SHIFT)) )
```

The gradients are then cleared (module `weight_update`).

All of this is exact integer arithmetic. The testbenches compare the filter bit
for bit with a model that uses ordinary multiplications.

## Cycle schedule (adaptive filter)

`blms_control` sequences everything. A sample is taken when `read` and
`in_valid` are both high, and `read` is high only when the controller is idle.

| phase | cycles | what happens |
|---|---|---|
| take sample | 1 | new window table built and shifted in; `d` latched; accumulator cleared |
| output phase | 16 | one weight bit per cycle through ports 0, 4, 8, 12 |
| output cycle | 1 | `out_valid`: `y`, `e` on the ports; `e` stored |
| gradient phase | 16 | after every 4th sample of a block only |
| apply | 1 | after the 16th sample only; `block_update` pulses one cycle later |

- **Latency:** `out_valid` comes 17 cycles after the cycle in which the sample
  was taken.
- **Sample spacing:** 18 cycles. After every fourth sample it is 34 cycles, and
  after the last sample of a block it is 35.
- **Throughput:** one block of 16 samples takes 16·18 + 4·16 + 1 = 353 cycles,
  about 22 cycles per sample.

The tables never change during an output phase, and the weights change only in
the apply cycle. So all 16 outputs of a block use the same weights, which is
what block LMS requires.

## The fixed-coefficient filter

`da_fir` follows the classic serial-DA structure:

```
input control -> shift register -> 4 constant tables -> adder tree -> accumulator
```

- **Input control** (`input_control`) handles the READ / INPUT VALID handshake.
- **Shift register** (`shift_register`) holds 16 samples. In cycle `t` it forms
  each table's address from bit `t` of four samples.
- **Tables** (`da_lut_rom`) hold sums of four coefficients. They are computed at
  elaboration from the `COEFS` parameter and synthesize to constants.
- **Adder tree and accumulator** (`adder_tree`, `da_accumulator`) produce the
  output.

Timing: one sample every 18 cycles, with the output 17 cycles after the sample
is taken.

The default coefficients are an example low-pass filter, a 16-tap
Hamming-windowed sinc with cut-off 0.2 of the sample rate and unity DC gain, in
Q1.15:

```
h[n] = 0.4*sinc(0.4*(n-7.5)) * (0.54 - 0.46*cos(2*pi*n/15)),  c[n] = round(32768*h[n]/sum(h))
= {0, 183, 259, -541, -1665, 0, 6025, 12124, 12124, 6025, 0, -1665, -541, 259, 183, 0}
```

Pass your own coefficients through `COEFS`.

## Number formats

The numbers below are for the default widths.

- **Samples, desired values, errors, weights, coefficients:** 16-bit two's
  complement, read as Q1.15.
- **Table words:** 18 bits, since a sum of four 16-bit values needs two guard
  bits.
- **Adder-tree sum:** 20 bits.
- **Full inner product (`y_full`):** 36 bits, with no rounding anywhere in the
  datapath.
- **`y`:** `y_full >>> 15` (floor), saturated to 16 bits.
- **`e`:** `d - y`, saturated to 16 bits. `e_sat` flags the saturation.
- **Gradient accumulators:** 36 bits. Each is a sum of 16 products of 32 bits,
  so it cannot overflow.
- **Step size:** `mu = 2^-MU_SHIFT` applied to the block sum; the default
  `MU_SHIFT` is 6. Weights saturate at ±1.

For white input of variance σ² (full scale = 1), the per-block contraction of
the weight error is roughly `mu·L·σ²`. With the defaults and inputs within ±0.5,
the mean error falls by about 6-7× within 120 blocks in the system-identification tests.

## Module map

```
da_top
├── da_blms_filter          adaptive filter
│   ├── blms_control        handshake and phase schedule
│   ├── lut_update          input delay + 16 adder_cell + bank of 16 tables
│   │   └── adder_cell
│   ├── mux_array           16 read ports, port k -> table k
│   ├── adder_tree          4 words -> 1
│   ├── da_accumulator      serial shift-accumulate over weight bits
│   ├── error_computation   e = d - y
│   └── weight_update       weights, table addressing, gradients, update
└── da_fir                  fixed filter
    ├── input_control
    ├── shift_register
    ├── da_lut_rom  (x4)
    ├── adder_tree
    └── da_accumulator
blms_pkg                    shared constants and the saturation function
```

## Interfaces

Both filters take `clk` and an asynchronous active-low reset `rst_n`. Reset
clears all history, tables and weights: the adaptive filter starts with zero
weights.

`da_blms_filter` (prefixed `blms_` on `da_top`):

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid`, `in_data`, `in_desired` | in | 1, 16, 16 | sample `x` and desired `d`; taken when `read` is high |
| `read` | out | 1 | filter is idle and takes a valid sample this cycle |
| `out_valid` | out | 1 | one-cycle pulse: `y_out`, `y_full`, `e_out`, `e_sat` valid |
| `y_out`, `y_full` | out | 16, 36 | output, and unscaled inner product |
| `e_out`, `e_sat` | out | 16, 1 | error, and its saturation flag |
| `block_update` | out | 1 | pulse after the weights were updated |
| `weights` | out | 16 × 16 | current weights |

`da_fir` (prefixed `fir_`): `in_valid`, `in_data`, `read`, `out_valid`, `y_out`,
`y_full`, with the same meaning.

`in_data` and `in_desired` only need to be valid in the cycle the sample is
taken.

## Simulation

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/blms_pkg.sv tb/da_top_tb.sv \
          --top-module da_top_tb -o sim && ./obj_dir/sim
```

Replace `da_top` with any other module name to test that module.

- `da_top_tb` runs the whole design at its default parameters, with both
  filters active at once, in well under a second.
- `da_blms_filter_tb` and `da_fir_tb` test the two filters on their own.
- `da_8bit_tb` runs both filters with 8-bit samples, coefficients and weights,
  against the same kind of reference models.

What the end-to-end tests establish:

- **Adaptive filter:**
  - Every `y_full`, `y`, `e` and `e_sat` matches a multiply-based block-LMS
    model bit for bit, and so do all weights after every block.
  - Latency and sample spacing are exactly as tabulated above.
  - System identification of a random 16-tap FIR reduces the mean error more
    than 5×.
  - An overload phase drives the weights, `y` and `e` into saturation.
  - The tests count block updates, gradient passes, stalls and saturations,
    and each must occur.
- **Fixed filter:**
  - The impulse response equals the coefficients.
  - Random input matches the direct-form sum.
  - A worst-case input pattern saturates the output.

The block testbenches check each unit against an independent model: every
table word, every address bit, every controller cycle. The weight-update test
uses a behavioural table bank.

## Changing the design

- **`N_TAPS`:** must be a multiple of 4. The adaptive filter keeps `N_TAPS`
  tables, and the adder tree needs `N_TAPS/4` to be a power of two.
- **`BLOCK_L`:** must be a multiple of 4, since the gradient runs in rows of
  four samples.
- **`XW` / `WW` / `CW`:** set the sample, weight and coefficient widths.
  - The serial phases last `WW` cycles (adaptive output) or `XW` cycles
    (gradient, fixed filter). 8-bit data and coefficients, for example, halve
    the cycle count.
  - Every value stays a fraction with one integer bit, so the scaling follows
    the widths:
    - adaptive output: `y = y_full >>> (WW-1)`;
    - fixed filter: `y = y_full >>> (CW-1)`;
    - gradient: scaled by `2^-(2*XW-WW-1)`, and then by `mu`.
  - With 8-bit weights, a larger step (`MU_SHIFT = 2`) works better, because
    at `2^-6` most block updates round to zero. This is the setting
    `da_8bit_tb` uses.
- **`MU_SHIFT`:** sets the step size.

## How far this follows the original description

The original description sets the architecture, but many details are this
design's own.

**Taken from the description:**

- Both block structures:
  - adaptive: weight update, LUT update with input delay and adder cell, mux
    array, adder tree, error computation with desired input;
  - fixed: input control with READ/INPUT VALID, shift register, four LUTs, adder
    tree, accumulator with OUTPUT VALID.
- 16 taps with 16-bit data and coefficients.
- Four values per table.
- Serial (bit-per-cycle) DA, least significant bit first.
- Block length equal to the filter length.
- Coefficient tables precomputed because the coefficients are constant.
- One table shared by the output and the weight-increment computation.

**This design's own choices:**

- The way the tables are shared: a bank of one window table per tap, with port
  `k` wired to table `k` and the error order reversed for the gradient.
- Running the gradient pass after every fourth sample.
- The cycle schedule and handshake timing.
- The Q1.15 formats, floor scaling and saturation everywhere.
- The step size `2^-6`.
- Zero initial weights and asynchronous reset.
- The example low-pass coefficients.
- Placing the fixed FIR and the adaptive filter side by side, with no
  connection between them.

**Differences in detail:**

- In the original block diagram, the weight update block feeds the LUT update
  block. Here the weights do not enter the tables. The weight update block
  produces the read address of every table port, so the weights (or errors)
  select words from the input-sum tables.
- The original diagram shows a single output after the error computation. Here
  both `y` and `e` are brought out, together with the unscaled `y_full` and the
  current weights.
- READ is drawn with the input signals. Here it is produced by the filter: it is
  high when the filter can take a sample, and a sample is taken when READ and
  INPUT VALID are both high.
- Every table holds all 16 subset sums. The offset-binary trick that halves a DA
  table is not used.
- The multiplication counts quoted for block LMS describe the algorithm in
  software terms. This hardware has no multipliers, and its speed is set by
  the serial schedule above.

**Not modelled:**

- Power and area figures.
- FPGA mapping.
- A parallel-DA variant, which is named only as future work.
- The published waveforms of the adder cell and adder block. The adder cell
  here is checked against its own definition instead.
