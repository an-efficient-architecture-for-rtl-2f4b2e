# 8-point DCT with 21 constant multipliers

This design computes the 8-point discrete cosine transform (unnormalised DCT-II)

    X_k = sum_{n=0..7} x_n * cos(pi * (2n+1) * k / 16),   k = 0..7

directly, with no fast-transform recursion. It folds the input block once, then sorts
the 21 multiplications it needs by constant. Only seven constants
`c_k = cos(k*pi/16)`, k = 1..7, occur. Each gets one multiplier bank, M1..M7, and
every lane of a bank multiplies by that bank's constant. Samples enter serially. A new
transform starts every eighth sample, so the design sustains one sample per clock.
The eight coefficients come out in parallel and also as an ordered stream X0, X1, …, X7.

## The factorisation

The cosine has symmetries, so the samples are first folded about the middle of the block
(the butterfly):

| sums          | differences     |
|---------------|-----------------|
| A = x0 + x7   | A' = x0 − x7    |
| B = x1 + x6   | B' = x1 − x6    |
| C = x2 + x5   | C' = x2 − x5    |
| D = x3 + x4   | D' = x3 − x4    |

The even coefficients use only the sums:

    X0 = A + B + C + D
    X2 = (A − D)·c2 + (B − C)·c6
    X4 = (A − B − C + D)·c4
    X6 = (C − B)·c2 + (A − D)·c6

The odd coefficients use only the differences. Each is a signed combination of all four
differences, and each difference meets each of c1, c3, c5 and c7 exactly once across the
four outputs:

    X1 = A'·c1 + B'·c3 + C'·c5 + D'·c7
    X3 = A'·c3 − C'·c1 − D'·c5 − B'·c7
    X5 = A'·c5 − B'·c1 + D'·c3 + C'·c7
    X7 = A'·c7 − D'·c1 + C'·c3 − B'·c5

That regularity is what the multiplier banks exploit. Take the odd half row by row: the
products with c1 are A'c1, C'c1, B'c1 and D'c1, which go to X1, X3, X5 and X7. A bank of
four lanes with the fixed constant c1 produces all four of them. The same holds for c3,
c5 and c7. The resulting operand order per bank is:

| bank | constant | lanes (lane i feeds output)                       |
|------|----------|---------------------------------------------------|
| M1   | c1       | A' → X1, C' → X3, B' → X5, D' → X7                |
| M3   | c3       | B' → X1, A' → X3, D' → X5, C' → X7                |
| M5   | c5       | C' → X1, D' → X3, A' → X5, B' → X7                |
| M7   | c7       | D' → X1, B' → X3, C' → X5, A' → X7                |
| M2   | c2       | A−D → X2, C−B → X6                                |
| M6   | c6       | B−C → X2, A−D → X6                                |
| M4   | c4       | A−B−C+D → X4                                      |

In total there are 4·4 + 2·2 + 1 = 21 multipliers. A direct evaluation without the
folding needs 64 multiplications. Every multiplier has a constant operand, so synthesis
turns each one into a few shifted additions.

The adders and subtractors that remain:

| where                          | adders | subtractors |
|--------------------------------|--------|-------------|
| butterfly                      | 4      | 4           |
| X0 chain                       | 3      | –           |
| operands of M2, M6             | –      | 3 (A−D shared) |
| operand of M4                  | 1      | 2           |
| output combiners X1..X7        | 8      | 6           |
| **total**                      | **16** | **15**      |

## Datapath and timing

```
in_data ──► x7 ► x6 ► x5 ► x4 ► x3 ► x2 ► x1 ► x0     (dct_input_sreg)
             │    │    │    │    │    │    │    │
             └────┴────┴─ butterfly ─┴────┴────┘      (dct_butterfly)
                 A..D │            │ A'..D'
          dct_even_part            dct_odd_part       (M2,M4,M6 / M1,M3,M5,M7)
                 X0,2,4,6 │        │ X1,3,5,7
                     output register X[0..7]          (dct8_top)
                              │
                     dct_out_serializer ──► ser_data (X0..X7 in order)
```

* Each accepted sample enters `x7`, and the chain shifts toward `x0`. After eight
  samples, `x0` holds the first sample of the frame and `x7` the last.
* The butterfly, the multiplier banks and the combiners form a single combinational
  stage. It runs from the register chain to the output register.
* Cycle E is the clock edge that stores the eighth sample of a frame. `frame_valid` is
  high in the cycle after E. The output register loads at E+1, so `out_valid` pulses
  and `X[0..7]` is valid after edge E+1. Latency: two clocks from the last sample to
  the parallel result.
* The serialiser loads at E+2 and outputs X0 there, then X1 at E+3, and so on up to X7
  at E+9. At full rate the next frame's X0 follows X7 with no gap.
* `in_valid` may drop at any time. The chain and the frame counter then hold. There is
  no back-pressure: the output side always keeps up, because a frame takes at least
  eight clocks.

The critical path starts at the sample registers. It passes the butterfly adder, up to
three operand adders, one constant multiplier and up to three combiner adders. The design has no internal pipelining. To
raise the clock, add registers between the butterfly, the banks and the combiners.

## Number formats

* Samples are signed two's complement, `DATA_W` bits wide (default 8).
* The constants are `round(cos(k*pi/16) * 2^COEF_FRAC)` (default `COEF_FRAC` = 12). They
  are stored without a sign bit, because all seven are positive. `dct8_pkg::coef`
  computes them at elaboration, so changing `COEF_FRAC` regenerates them.
* Sums and differences grow by one bit per stage. Products are exact. The outputs are
  `DATA_W + COEF_FRAC + 4` bits wide (default 24), with `COEF_FRAC` fractional bits:
  `X_k ≈ X[k] / 2^COEF_FRAC`. X0 is shifted left to the same format. Nothing is
  rounded or saturated after the multipliers, and no output can overflow.
* The only error is in the constants. With 12 fractional bits and 8-bit samples, every
  output stays within ±0.2 of the exact real-valued DCT.
* Some output bits are constant zero. These are the low `COEF_FRAC` bits of X0, and the
  low 4 bits of X4, because round(c4·2^12) = 2896 is a multiple of 16. Synthesis
  reports them as constant.
* No normalisation (the √(1/8), √(2/8) factors of the orthonormal DCT) is applied.
  Fold it into a later quantiser if needed.

## Modules

| file                        | role |
|-----------------------------|------|
| `rtl/dct8_pkg.sv`           | default widths, `coef()` constant generator, `out_w()` |
| `rtl/dct_input_sreg.sv`     | serial-in register chain x7→x0, frame counter, `frame_valid` |
| `rtl/dct_butterfly.sv`      | A..D, A'..D' |
| `rtl/dct_cmul_bank.sv`      | `LANES` multipliers by one constant cos(`K`·π/16) |
| `rtl/dct_even_part.sv`      | X0, X2, X4, X6 with banks M2, M4, M6 |
| `rtl/dct_odd_part.sv`       | X1, X3, X5, X7 with banks M1, M3, M5, M7 |
| `rtl/dct_out_serializer.sv` | loads X0..X7, emits them one per clock in order |
| `rtl/dct8_top.sv`           | the complete transform |

Ports of `dct8_top` (parameters `DATA_W`, `COEF_FRAC`):

| port        | dir | width            | meaning |
|-------------|-----|------------------|---------|
| `clk`       | in  | 1                | clock, rising edge |
| `rst_n`     | in  | 1                | asynchronous reset, active low |
| `in_valid`  | in  | 1                | `in_data` carries a sample |
| `in_data`   | in  | DATA_W           | signed sample |
| `out_valid` | out | 1                | one-clock pulse: `X` holds a new frame |
| `X[8]`      | out | DATA_W+COEF_FRAC+4 | X0..X7, held until the next frame |
| `ser_valid` | out | 1                | `ser_data` carries a coefficient |
| `ser_data`  | out | DATA_W+COEF_FRAC+4 | coefficient number `ser_index` |
| `ser_index` | out | 3                | k = 0..7, in increasing order |

## Where this RTL goes beyond, or differs from, the architecture it implements

The architecture fixes the folding, the seven banks with their lane counts and
constants, the operands and signs of every combiner, and the serial register chain.
This RTL adds the following choices of its own:

* Word lengths (`DATA_W` = 8, `COEF_FRAC` = 12) and the fixed-point format.
* The `in_valid` qualifier, the frame counter, `frame_valid`/`out_valid`, the output
  register and the asynchronous reset.
* The output-ordering stage. The architecture only requires that outputs be put in
  order with delays, and this is the simplest buffer that does it.
* The difference A − D is formed once and feeds both M2 and M6. That is why 15
  subtractors are built rather than 16. The architecture states a total of 14 adders.
  Its own structure needs 16, as listed above, and 16 are built.
* X6 is built as (C − B)·c2 + (A − D)·c6, which follows from the DCT definition and is
  verified against it.
* The constant multipliers are written as `*` by a constant. No particular shift-and-add
  decomposition or cross-bank subexpression sharing is hand-coded. Synthesis chooses
  the decomposition.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. `tb/dct_ref_pkg.sv` computes
the reference straight from the definition above, without the folding or the banks. It
gives two references:

* **Bit-exact:** each cos((2n+1)kπ/16) is replaced by sign·round(|cos|·2^12).
* **Real-valued:** an accuracy bound.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_dct_butterfly`      | extremes and 500 random vectors |
| `tb_dct_cmul_bank`      | all seven constants, every 9-bit operand in every lane; constants within ½ LSB of cos |
| `tb_dct_even_part`, `tb_dct_odd_part` | 2012 frames each (extremes, impulses, random): bit-exact and within 0.2 of the real DCT |
| `tb_dct_input_sreg`     | 2000 cycles with random gaps; `frame_valid` timing and sample order |
| `tb_dct_out_serializer` | order, timing, back-to-back loads, a reload mid-sequence |
| `tb_dct8_top`           | 400 frames end to end at default parameters |

`tb_dct8_top` checks three things:

* `out_valid` comes exactly one clock after each frame's last sample, and at no other
  time.
* All eight coefficients are correct, bit-exact and within 0.2 of the real DCT.
* The serial stream is in order.

It also counts input gaps, back-to-back frames, full-scale frames and complete serial
sequences, and fails if any of them never happens.

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_dct8_top \
  rtl/dct8_pkg.sv tb/dct_ref_pkg.sv $(ls rtl/*.sv | grep -v dct8_pkg) tb/tb_dct8_top.sv -o sim
./obj_dir/sim
```

Use the same command with another testbench name for the other blocks. All of them
finish in well under a second.
