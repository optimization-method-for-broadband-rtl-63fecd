# Multiplierless transposed-form FIR filter with shared subexpressions

A fixed-coefficient FIR filter does not need multipliers. Every coefficient
can be written in canonic signed digit (CSD) form, a sum of signed powers of
two with no two non-zero digits next to each other, so each product
`c * x` becomes a handful of shifted copies of `x` added or subtracted. In a
transposed-form filter all taps multiply the *same* input sample, and the
same digit patterns turn up again and again across the coefficient set (for
a symmetric filter, every coefficient appears twice). Computing each
recurring pattern once and reusing it — common subexpression elimination,
CSE — removes most of the adders.

This RTL implements that filter structure. The default build is a 64-tap
root-raised-cosine (RRC) pulse-shaping filter of the kind used in broadband
modems: 10-bit input, 10-digit CSD coefficients, 16-bit output. Its
multiplier block uses 19 adder-subtractors where plain CSD expansion of the
same coefficients needs 86.

## Structure

```
            +------------------- mcm_block -------------------+
  x[9:0] -->|  node0 = x                                       |
            |  node1..19 = +/-(node_a << sa) +/-(node_b << sb) |--> p[0..63]
            |  p[k] = +/-(node_src << sh)                      |
            +--------------------------------------------------+
                                   |
            +------------------- tdf_chain -------------------+
            |  r[63] <= p[63]                                  |
            |  r[k]  <= p[k] + r[k+1]                          |--> acc[22:0]
            |  acc    = p[0] + r[1]                            |
            +--------------------------------------------------+
                                   |
                    y[15:0] = acc[22:7]   (cse_fir)
```

| File | Contents |
|---|---|
| `rtl/fir_cse_pkg.sv` | node and tap types; coefficient sets and adder graphs |
| `rtl/mcm_block.sv` | multiplier block, built from an adder-graph table |
| `rtl/tdf_chain.sv` | transposed-form adder/delay line |
| `rtl/cse_fir.sv` | top: multiplier block, chain and output selection |

### The adder graph (the part to understand first)

`mcm_block` contains no coefficient-specific code. It is generated from two
tables, which are parameters:

* `NODES[i]` describes adder `i+1`: `node = ±(node[src_a] << sh_a) ±
  (node[src_b] << sh_b)`. Node 0 is the input sample. A node may only use
  nodes with smaller indices, which is checked at elaboration.
* `TAPS[k]` says where the product of tap `k` comes from:
  `p[k] = ±(node[src] << sh)`.

Every node therefore carries `x` times a constant integer. Coefficients are
handled as integers: a coefficient with `F` fractional digits is scaled by
`2^F`, and a right shift by `k` in fractional notation becomes a left shift by
`F-k`. Nothing is rounded inside the multiplier block, so the products are
exact.

Example, the multiplier by `0.11100111 = 231/256`. Its CSD form is
`1.00(-1)0100(-1)`, that is `x - x/8 + x/32 - x/256`, 3 adders (plain binary
needs 5). The leading digits `1 0 0 -1` and the trailing digits
`1 0 0 -1` are the same pattern, so with `t = x - x/8` the product is
`t + t/32`, 2 adders. In the integer tables (`FIG1_*`):

```
node1 = (x << 3) - x        //  7x
node2 = (node1 << 5) + node1 // 231x
```

The three-tap example filter (`F1_*`) has `h0 = 0.100(-1)0101`,
`h1 = 1.00100(-1)00` and `h2 = 1.0(-1)0(-1)0000` (117, 284 and 176 in units
of 1/256). Its two shared terms `A = x - x/8` and `B = x + x/4` feed all three
taps: `h0·x = A/2 + B/64`, `h1·x = x + A/8`, `h2·x = x - B/4`. That is 5
adders instead of 7.

### How the default graph was obtained

The 64 RRC coefficients are

```
c[k] = round(512 · g(t_k) / g(0)),   t_k = (k - 31.5) / 8,   k = 0..63
g(t) = [sin(πt(1-α)) + 4αt·cos(πt(1+α))] / [πt(1 - (4αt)²)],   α = 0.3
```

(the filter is normalised to a peak of 1 and quantised to multiples of
1/512, ten CSD digits of weights 2^0 … 2^-9). The table `RRC_COEF` holds
them; the full-size testbench recomputes them from this formula and compares.

The graph is the result of this elimination procedure, run on the CSD digits
of those coefficients:

1. Write every coefficient in CSD.
2. For `n` from 5 (the most non-zero digits a 10-digit CSD number can
   hold) down to 2: list every choice of `n` non-zero digits in every
   coefficient. Two choices are the same pattern when they have the same
   relative digit positions and signs, up to an overall sign and shift (shifts are wires and a negated pattern is
   absorbed by the adder that consumes it). Within one coefficient, count
   only occurrences that do not share digits.
3. Take the most frequent pattern. On ties prefer the pattern spanning fewer
   digit positions (a narrower adder), then the one with fewer subtractions.
   If it occurs only once, go to the next smaller `n`.
4. Remove its occurrences from every coefficient, replacing each by a
   reference to the pattern, and add the pattern itself to the set as a new
   coefficient, which later steps may share from in turn. Recount and repeat.
5. Every coefficient then costs one adder per term beyond the first.

For the RRC set this gives 18 shared patterns and 19 adders in total; most
taps reduce to a single shifted, possibly negated, node. To build a filter
with other coefficients, produce new `NODES`/`TAPS` tables by the same
procedure (or by hand) and pass them as parameters together with `N_TAPS`,
`N_NODES` and suitable widths.

## Timing and interface

`cse_fir` ports:

| Port | Width | Meaning |
|---|---|---|
| `clk` | 1 | one input sample per rising edge |
| `rst_n` | 1 | asynchronous, active low; empties the delay line |
| `x` | 10 | signed input sample |
| `y` | 16 | signed output |

There is no handshake and no clock enable. The filter has zero latency: `y`
is the output for the sample on `x` in the same cycle, because in the
transposed structure the last adder of the chain sits after the final delay,
directly on `p[0]`. The critical path is therefore the deepest chain of the
multiplier block plus one chain adder; between registers, every chain stage
has only one adder. Add a register on `x` or `y` if the surrounding design
needs one.

The sum is exact: `sum |c| = 5800` and `|x| ≤ 512` give a worst case of
2 969 600, which fits the 23-bit accumulator (`ACC_W`). `y` is its 16 most
significant bits, truncated toward minus infinity, i.e. `y = acc >>> 7`.
The DC gain is `sum c / 128 = 3820 / 128 ≈ 29.8` output LSBs per input LSB;
a full-scale step of +511 settles at 15 250. The quantised filter is flat to
about 0.04 fs, 3 dB down at 0.0625 fs (half the symbol rate at 8 samples per
symbol) and at least 38 dB down from 0.095 fs upward (33 dB from 0.09 fs).

## Where this design makes its own choices

The structure — transposed form, CSD coefficients, shared subexpressions,
64 taps, 10-bit input, 10-digit coefficients, 16-bit output — follows the
method the design is based on. The following are this design's own:

* **Coefficient values.** Roll-off 0.3 and 8 samples per symbol were chosen
  to give the intended main lobe, side lobes and stop-band edge near 0.09 fs;
  any other coefficient set can be substituted through the tables.
* **Elimination tie-breaks** beyond "shorter pattern first, additions before
  subtractions", the greedy count of non-overlapping occurrences, and the
  order of terms in each coefficient's adder chain.
* **Integer scaling** of coefficients and exact arithmetic in the multiplier
  block and chain; the output as the top 16 bits with truncation (no
  rounding, no saturation — none is needed since the sum cannot overflow).
* **Reset and clocking**: asynchronous active-low reset of the delay line,
  one sample per clock, no pipeline registers.

## Verification

Each testbench checks its outputs against values computed independently and
prints `TB_RESULT checks=N failures=M`; each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_mcm_block.sv` | all 1024 input values through the RRC graph (against `x·c[k]`), the three-tap graph and the 231/256 multiplier (against coefficients written out from their digit strings) |
| `tb/tb_tdf_chain.sv` | 5-tap chain, random and full-scale products, `y[n] = Σ p_k[n-k]` each cycle, reset mid-stream |
| `tb/tb_cse_fir.sv` | full default filter: coefficients against the RRC formula; impulses of both signs; full-scale steps; the input sequence reaching the largest possible sum in both signs; a pass-band tone (0.02 fs, gain checked) and a stop-band tone (0.2 fs, at least 40 dB down); 3000 random samples with a reset in the middle; every output compared with `floor(Σ c[k]x[n-k] / 128)` |
| `tb/tb_cse_fir_filter1.sv` | the same top configured as the three-tap example filter, full-precision output, against `117x[n] + 284x[n-1] + 176x[n-2]` |

Running one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/fir_cse_pkg.sv rtl/mcm_block.sv rtl/tdf_chain.sv rtl/cse_fir.sv \
    tb/tb_cse_fir.sv --top-module tb_cse_fir
./obj_dir/Vtb_cse_fir
```

All four run in well under a second. The full-size testbench runs the top
with no parameter overrides.

## Not included

* The offline tool chain around the filter — coefficient quantisation, the
  pattern search and the HDL generation — is software; only its output, the
  tables in `fir_cse_pkg`, is part of this RTL.
* Filters for other coefficient sets (for example random sets of 16 to 256
  taps with 8-, 12- or 16-bit coefficients) need their own tables; the
  modules accept them through parameters, but no such tables are provided.
