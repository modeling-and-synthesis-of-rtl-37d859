# Approximate adders with aligned fixed internal carries and conditional bounding

When an adder is clocked faster than its full carry chain (or its supply is
lowered until the chain no longer fits in the cycle), the upper sum bits see
stale carries and the result is wrong by unpredictable, often huge amounts.
This design replaces that uncontrolled failure with a controlled one. The
adder is split at bit `h`:

* the upper `N-h` bits are an ordinary exact adder whose carry-in is
  **hardwired** (to 0, to 1, or to a per-addition dither bit) instead of coming
  from the lower bits. Every upper bit shares this one fixed carry (the carry
  segments are *aligned*), so the worst an upper-part error can ever be is
  exactly `2^h`: this is the AFIC structure (aligned, fixed internal carry);
* the lower `h` bits compute the true sum `S` and its carry-out `C`, and
  **conditionally bound** the result: when `C` disagrees with the carry the
  upper part assumed, the lower bits are saturated toward the true value.

The critical path is now `max(N-h, h)` bit positions instead of `N`, and the
error is zero whenever the true carry matches the hardwired one and never
larger than `2^h` otherwise.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and checked with
Verilator and Yosys/slang.

## Conditional bounding: CUB, CLB and dithering

With the upper carry hardwired to 0 the adder can only underestimate: if
`C = 1`, the upper part is short by `2^h`. The best the lower bits can do is
output their largest value, all ones. With the carry hardwired to 1 the adder
can only overestimate, and the lower bits should output all zeros when
`C = 0`. Per LSB `i`:

| name | hardwired upper carry | LSB output                         |
|------|-----------------------|------------------------------------|
| CUB (conditional upper bounding) | 0 | `S'_i = S_i OR C`              |
| CLB (conditional lower bounding) | 1 | `S'_i = S_i AND C`             |
| CDB (dithered)                   | `d` | `d ? (S_i AND C) : (S_i OR C)` |

So for CUB the error is `-(S+1)` when `C = 1` and zero otherwise, and for CLB
it is `+(2^h - S)` when `C = 0`. The names refer to what the LSB logic does
(it bounds the low part from above or below), not to the sign of the error.

A plain CUB or CLB adder errs in one direction only, so errors pile up in
accumulations. The dithered adder picks CUB or CLB per addition with one
control bit `d` that drives both the upper carry and a multiplexer between
the two LSB blocks. `dither_ctrl` produces `d` in one of five ways:

* **external**: `d` is an input, for the application to control;
* **clock**: `d` alternates 0, 1, 0, 1, ... on every addition;
* **history**: a register remembers the last decision. When the true LSB
  carry of an addition differs from the carry that was hardwired, the
  opposite bounding is used for the next addition; otherwise the choice is
  kept. (This update rule is one reading of "use the opposite bounding after
  a mismatch"; see *Departures and open points*.);
* **h-1**: `d = A[h-1]`, the top LSB bit of one operand. If `A[h-1]` and
  `B[h-1]` are equal, the LSB carry-out equals them, so the prediction is
  exact. When they differ, the choice is effectively random. This is the
  default: it costs no state and gives the best quality;
* **random**: bit 0 of a 16-bit LFSR (`x^16+x^14+x^13+x^11+1`, seed
  `16'hACE1`, stepped once per addition).

Measured on 10,000 uniform random 16-bit operand pairs with `h = 9`
(`tb/tb_workload_adder_psnr.sv`, PSNR with peak `2^16`):

| LSB logic       | mean error | PSNR    |
|-----------------|-----------:|--------:|
| exact CUB       | -83        | 53.1 dB |
| h-1 dithering   | +0.3       | 62.0 dB |

These match the published figures for this configuration (52.9 dB and
61.9 dB) to within 0.2 dB. The testbench checks this.

### Splitting the LSB block

`cb_logic` can split its `h` bits into isolated segments of `SEG` bits
(parameter `SEG`, which must divide `H`). Each segment starts with carry-in 0
and is bounded by its own carry-out. Carries between segments are dropped. This
shortens the LSB path when `h` is larger than the timing budget, at some cost
in quality. `SEG = H` (the default) is the flat, exact CB function.

### Inexact bounding logic (`IMPL`, `cb2_approx`)

The exact CB function is still a full `h`-bit adder plus bounding gates.
Much of it can be removed at a small quality cost by letting the LSB logic
be slightly wrong. The method: take the truth table of a small CB segment,
move some rows' output values up or down by 1, re-minimise the table as a
sum of products, and keep each result that is not dominated in (literal
count, total squared distance TD from the exact table). For 2-bit segments
this search gives:

| realisation | CUB (`s1`, `s0`)              | literals / TD | CLB (`s1`, `s0`)         | literals / TD |
|-------------|-------------------------------|---------------|--------------------------|---------------|
| exact       | `S OR C`                      | 14 / 0        | `S AND C`                | 12 / 0        |
| `CB_IMPL_TD1` | `a1+b1`, `a0+b0+a1b1`       | 6 / 1         | `0`, `a1b1(a0+b0)`       | 6 / 1         |
| `CB_IMPL_TD2` | `a1+b1`, `a0+b0`            | 4 / 2         | `0`, `a1b1`              | 2 / 2         |
| `CB_IMPL_MIN` | `a1+b1`, `1`                | 2 / 4         | `0`, `b1`                | 1 / 6         |

The CUB points at 14/0, 6/1 and 4/2 are the published ones for this
search. The published minimum-literal CUB point has 3 literals and TD 6.
This search found the 2-literal, TD 4 function above, which is better on both
counts, so that one is used.

`cb2_approx` holds these functions. With `IMPL` other than `CB_IMPL_EXACT`,
`cb_logic` builds its `h` bits from `h/2` such segments, with no adder. If `h`
is odd, the top bit is a 1-bit exact segment (`a OR b` for CUB, `a AND b` for
CLB). `afic_adder`, `dithering_adder` and `approx_trunc_mult` pass `IMPL`
through. At `h = 9` the results are:

| LSB logic     | PSNR    | published | rel. error, full range | rel. error, 8-bit operands |
|---------------|--------:|----------:|-----:|------:|
| exact CUB     | 53.1 dB | 52.9 dB   | 0.17 % | 0 % |
| CUB, TD2      | 51.3 dB | 51.2 dB (CUB opt) | 0.26 % | 21.3 % |
| CUB, MIN      | 51.8 dB | 49.6 dB (CUB min) | 0.25 % | 29.5 % |
| exact h-1     | 62.0 dB | 61.9 dB   | 0.05 % | 0 % |
| h-1, TD2      | 57.3 dB | 58.6 dB (h-1 opt) | 0.14 % | 21.3 % |
| h-1, MIN      | 57.1 dB | 57.2 dB (h-1 min) | 0.16 % | 29.5 % |

Which Pareto points the published "opt" and "min" rows use is not stated. The
CUB min row differs because its function differs from the one used here.
Relative error is the mean of `|error| / (a + b)`. With operands below the
partition boundary, exact bounding logic never sees an LSB carry and is
error-free. The inexact segments are wrong there about a fifth of the time
or more, which matters if the data is mostly small. The published relative
errors are in the same range: 0.2 to 0.4 % full range, 18 to 24 % for small
operands, 0 % for exact logic.

## Blocks

All modules are in `rtl/`, one per file. Shared enums are in
`approx_pkg` (`adder_arch_e`, `cb_mode_e`, `cb_impl_e`, `dither_src_e`,
`als_variant_e`).

| module | what it is | timing |
|--------|------------|--------|
| `exact_adder` | W-bit adder with carry in/out; `ARCH` = ripple (`ARCH_RCA`), 4-bit lookahead groups (`ARCH_CLA`), Kogge-Stone prefix (`ARCH_KS`) | combinational |
| `cb2_approx` | literal-reduced 2-bit CUB / CLB / dithered segment | combinational |
| `cb_logic` | CUB / CLB / dithered LSB logic, optionally segmented, exact or built from `cb2_approx` | combinational |
| `afic_adder` | the approximate adder: `exact_adder` on the upper bits + `cb_logic`; output `s` is `N+1` bits, `c_lsb` is the true LSB carry | combinational |
| `dither_ctrl` | the five dither schemes | state changes on `posedge clk` when `en`; async reset `rst_n` low gives `d = 0` |
| `dithering_adder` | `afic_adder` in CDB mode + `dither_ctrl` | sum combinational; `en` marks an addition |
| `approx_trunc_mult` | truncated N x N multiplier with an AFIC last-stage adder | combinational |
| `seq_mult` | shift-add multiplier whose accumulator uses a dithering adder | `start`/`busy`/`done`, N cycles |
| `als_adder2` | four 2-bit adders made by approximate two-level logic synthesis | combinational |
| `approx_top` | all of the above side by side | |

Defaults are the main published configuration: a 16-bit adder split at
`h = 9` on a lookahead base (`afic_adder`, `dithering_adder`), and a 16-bit
truncated multiplier with `h = 5`, the middle of the published `h = 3, 5, 7`.

### Truncated multiplier (`approx_trunc_mult`)

Signal-processing multipliers usually keep only the upper half of the
product. The cheapest way is to not generate the partial-product bits of
weight below `2^N` at all. Here each of the N rows `b_i * a * 2^i` supplies
only its bits at or above column N. A tree of 3:2 carry-save compressors
reduces the rows, three at a time, until two remain. Row counts per level
come from a constant function `nrows()`, so the tree has depth
`O(log N)`. The final two-operand addition holds most of the critical path,
and it is an `afic_adder` with `H` LSBs. Output `p` is the upper N product
bits. Relative to the plain truncated product (same dropped columns, exact
last stage) the error is in `[-2^h, 0]` for CUB.

The published multipliers use a Dadda column-compression tree. This design
uses a row-wise carry-save tree instead. The two trees reduce to the same sum
(modulo `2^N`), so only the depth and cell count differ. No correction
constant is added for the dropped columns.

### Sequential multiplier (`seq_mult`)

A shift-add multiplier is a chain of accumulations, the case where a
one-sided adder error grows fastest. Each cycle, the multiplier bit in
`lo[0]` selects `A` or 0. The dithering adder adds it to the upper
accumulator `hi`, and `{sum, lo}` shifts right by one. After N cycles,
`{hi, lo}` is the 2N-bit product. `start` is accepted only while `busy` is
low. `done` pulses for one cycle exactly N cycles after the accepting clock
edge, and `p` holds until the next `done`. The adder works every cycle
(adding 0 when the bit is 0), so the dither state advances once per cycle.
The structure, `N = 16` and `H = 4` are choices of this design.

### 2-bit synthesized adders (`als_adder2`)

These four sum-of-products adders show what approximate logic synthesis
produces under an error-magnitude limit of 1, with and without a limit on how
many of the 16 input pairs may be wrong:

* `ALS_EXACT`: exact;
* `ALS_F1`: `S0` is constant 1 and the upper bits ignore `a0`, `b0`. It is
  wrong on 8 pairs, always by 1;
* `ALS_F1R2`: wrong on 2 pairs;
* `ALS_F1R1`: wrong on 1 pair.

The testbench verifies these counts and the magnitude limit exhaustively.

## Top level (`approx_top`)

The units are independent uses of the same adder idea, so they sit side by
side and share only `clk` and `rst_n`:

* `add_*`: 16-bit h-1 dithering adder, `h = 9`, lookahead base;
* `opt_*`: the same adder with TD2 inexact LSB segments. It has no state,
  since the h-1 dither bit is `opt_a[8]`;
* `mul_*`: 16-bit truncated multiplier, AFIC-CUB, `h = 5`;
* `seq_*`: 16-bit sequential multiplier, `h = 4`, h-1 dithering;
* `als_*`: the four 2-bit adders on shared operands.

The top's parameters `ADD_N/ADD_H/MUL_N/MUL_H/SEQ_N/SEQ_H` resize the units.
With the h-1 scheme, `add_d` is simply `add_a[8]`. `als_y_f1[0]` is constant 1
by construction.

## Simulating

Every testbench in `tb/` is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. The arithmetic
reference models (`afic_ref`, `lsb_carry`) are in `tb/approx_ref_pkg.sv`.
They compute with integer sums and remainders, not gates. To build and run
one testbench with Verilator from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/approx_pkg.sv tb/approx_ref_pkg.sv tb/tb_approx_top.sv \
    --top-module tb_approx_top --Mdir obj_top -o sim
./obj_top/sim
```

| testbench | covers |
|-----------|--------|
| `tb_exact_adder` | all three carry structures, W = 7 and 16 |
| `tb_cb2_approx` | exhaustive; TD of every realisation, per-row distance at most 1, dither selection |
| `tb_cb_logic` | CUB/CLB/dithered against the arithmetic definition; exhaustive 4-bit segmented block; inexact builds against their bitwise forms |
| `tb_afic_adder` | default, CUB, CLB, and a 24-bit segmented adder; error sign and `2^h` bound; exact iff carries match |
| `tb_dither_ctrl` | all five schemes cycle by cycle, reset, `en` hold |
| `tb_dithering_adder` | h-1, clock and history adders against a model; accumulated error much closer to zero than CUB |
| `tb_approx_trunc_mult` | 16-bit CUB and CLB, 24-bit; bounds against the bitwise truncated product |
| `tb_seq_mult` | bit-exact against a cycle model, latency N, start ignored while busy |
| `tb_als_adder2` | exhaustive; magnitude and error-count limits |
| `tb_approx_top` | whole design at default sizes; counts dither 0/1, carry match/mismatch, LSB saturation to ones and zeros, inexact-LSB deviations, multiplier errors, completed and ignored sequential requests, approximate 2-bit outputs, and fails if any never occurred |
| `tb_workload_adder_psnr` | 16-bit, h = 9 and 11, CUB vs h-1, exact and inexact LSB logic: PSNR and mean error |
| `tb_workload_mult_psnr` | truncated multipliers, N = 16 (h = 3, 5, 7) and N = 24 (h = 3, 7, 11) |
| `tb_workload_accumulate` | 24-bit, h = 10: chains of 32 additions with CUB and each dither scheme |

Results of the accumulation run (400 chains of 32 random 18-bit values;
final-sum error):

| scheme  | mean   | rms    |
|---------|-------:|-------:|
| CUB     | -15226 | 15322  |
| random  | 695    | 3232   |
| clock   | 864    | 1839   |
| history | -12    | 666    |
| h-1     | 385    | 1511   |

## Departures and open points

* **Inexact bounding logic** is built from this design's own rerun of the
  row-flip search for 2-bit segments (see above). The published equations
  are not available. Only 2-bit segments are used; wider searched segments
  (3 bits) and mixing segment widths are not built. In the dithered block
  the CUB and CLB functions are not shared.
* **Timing starvation itself is not modelled.** Energy savings come from
  lowering the supply until the shorter `max(N-h, h)` path just meets timing.
  RTL cannot represent this. The conventional over-clocked adder used as a
  baseline is not built.
* **Multiplier quality.** PSNR falls with `h` as expected: for N = 24,
  128.9 dB (plain truncation), 128.9, 121.0 and 98.5 dB for h = 3, 7, 11.
  The published curve starts at about 145 dB for truncation and drops further
  (to about 89 dB at h = 11). Likely causes are a different truncation
  column or correction constant, or a different PSNR peak. The truncation
  point (drop all columns below N, no correction) is this design's choice.
* **History dithering rule.** "Flip after a mismatch, else hold" is one
  reading of the scheme. Another plausible reading would set `d` to the last
  observed true carry.
* **Clock dithering** toggles once per addition (`en`), not on every clock
  edge.
* **Segmented CLB.** In a segmented LSB block each segment is bounded by its
  own carry, in both CUB and CLB modes. The CLB case is by analogy with CUB.
* **Sequential multiplier** size, `h` and the right-shift organisation are
  this design's choices.
* The application studies (IDCT decoder and image-sharpening filter with
  24-bit AFIC adders) are not included. Their datapaths are not specified
  here, but `afic_adder #(.N(24), .H(8..12), .ARCH(ARCH_RCA))` gives the
  adders they used.
