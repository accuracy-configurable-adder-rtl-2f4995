# SARA: a simple accuracy-reconfigurable adder, with delay-adaptive reconfiguration

In a ripple-carry adder the slowest sum bit waits for a carry that may have
rippled through every bit below it. Many workloads (audio, video, machine
learning) tolerate a small arithmetic error. So an adder can trade accuracy for
a shorter carry chain, and it pays to choose that trade-off at run time.

This design is an accuracy-configurable adder that needs no redundant adders
and no error-correction logic. The N-bit adder is cut into short ripple
subadders. At each cut the upper subadder can start its carry chain from a
one-gate *carry prediction* instead of waiting for the real carry. That is the
whole approximation, and one multiplexer per cut switches it on or off. A
detector can also decide per cut, from the operands, whether the cut is needed
at all. This is delay-adaptive reconfiguration (DAR). As an application, an
8x8 Wallace-tree multiplier uses the same adder as its final adder.

Everything is combinational SystemVerilog. There is no clock and no reset.

## The three cells

Each bit has generate `g = a & b` and propagate `p = a ^ b`.

| cell | file | sum | carry-out | role |
|---|---|---|---|---|
| full adder | `rtl/full_adder.sv` | `p ^ cin` | `g \| p & cin` | ordinary bit of a subadder; 3:2 counter of the Wallace tree |
| carry-out selectable FA | `rtl/cos_fa.sv` | `p ^ cin` | `g \| p & cin`, plus `c_prdt = g` | top bit of each subadder except the last |
| carry-in configurable FA | `rtl/cic_fa.sv` | `p ^ cin` (always the real carry) | `g \| p & c_hat`, with `c_hat = approx ? c_prdt : cin` | bottom bit of each subadder except the first |

The prediction `c_prdt = g` of the lower subadder's top bit is a safe
under-estimate. If `g = 1` the real carry is certainly 1. If `g = 0` the
prediction says 0, and it is wrong only when that bit propagates and a carry
arrives from below.

## Subadders and boundaries (`rtl/sara_adder.sv`)

With N = 16 and subadder width L = 4 there are K = N/L = 4 subadders and three
boundaries, after bits 3, 7 and 11 (bits are numbered from 0). Input
`approx[k-1]` sets the boundary below subadder k:

* **accurate** (`approx = 0`): the real carry passes. With all three boundaries
  accurate, the circuit is an exact 16-bit ripple-carry adder.
* **approximate** (`approx = 1`): the boundary is split. The bottom sum bit of
  the upper subadder still uses the real carry, so that bit is never wrong.
  But the carry that ripples on through the upper subadder starts from the
  prediction.

Here is the timing of an approximate boundary, counting bits from 1 as in
hardware diagrams. Take sum bit S9, the bottom bit of the third subadder. It
uses the real carry C8 out of bits 5..8. But the chain that produced C8 started
from the prediction `g4` of bit 4, not from bit 1. So S9 sits behind one
generate gate, four carry cells and the sum XOR: 6 stages. In a ripple-carry
adder the same path is 9 stages. In general, no carry path in approximate mode
is longer than L + 1 carry cells.

### The error

A cut carry is lost only when all three of these hold at the same time:

* the boundary's top bit propagates;
* a carry arrives into that bit;
* the bit above the boundary propagates, so the lost carry would have reached
  a higher sum bit.

The prediction can only be too low. So an approximate result is never larger
than the exact one, and the error is a missing carry of weight 2^(i+2) at the
boundary, where i is the index of the boundary's top bit.

For L = 1 every bit is its own subadder. Such a bit is built as a
carry-in configurable cell, and its prediction `a & b` is formed beside it.

## Delay-adaptive reconfiguration (`rtl/dar_detect.sv`)

Cutting every boundary pays the accuracy price even for operands whose carry
chains are short anyway. DAR cuts a boundary only when a long chain could run
through it. The detector takes the W propagate bits just below each boundary,
`p[i-W+1 .. i]` for a boundary whose top bit is i. It sets that boundary
approximate only when all W bits are 1.

If a boundary stays accurate, one of those W bits does not propagate. Any carry
crossing the boundary must then start inside the window, and it stops at the
next boundary at the latest. So the longest carry run is L + W cells. Raising W
cuts boundaries less often, which lowers the error rate, at the cost of a
longer worst path. The default is W = 2. The source gives the window size and
the L + W bound but not which W bits form the window; taking the bits below
the boundary is this design's choice, and it meets the bound.

## Accuracy modes (`rtl/sara_dar_adder.sv`, `rtl/aca_pkg.sv`)

`sara_dar_adder` wraps the adder and the detector. A 2-bit `mode` input of
type `aca_pkg::acc_mode_e` sets the accuracy:

| mode | boundaries | behaviour (16 bits, L = 4, W = 2) |
|---|---|---|
| `ACC_ACCURATE` | all accurate | exact; longest chain 16 |
| `ACC_APPROX` | all approximate (SARA4) | longest chain L + 1 = 5; wrong on about 31 % of random operand pairs |
| `ACC_DAR` | chosen per boundary by the detector (SARA4_DAR2) | longest chain L + W = 6; wrong on about 16 % of random pairs |

The unused code 3 behaves like `ACC_ACCURATE`. The output `approx_sel` shows
which boundaries were cut. The source leaves the choice of configuration to
the system; this three-way encoding and its run-time selection are this
design's own.

Error rates measured on 50,000 random 16-bit operand pairs
(`tb/tb_table1_configs.sv`):

| configuration | L | mode | wrong results | mean error |
|---|---|---|---|---|
| SARA1 | 1 | approximate | 64.5 % | 8312 |
| SARA4 | 4 | approximate | 30.9 % | 1006 |
| SARA8 | 8 | approximate | 12.5 % | 64 |
| SARA4_DAR2 | 4 | DAR, W = 2 | 15.6 % | 498 |
| ripple-carry | 4 | accurate | 0 | 0 |

This agrees with the published accuracy ranking: SARA1 is the least accurate,
SARA4 and SARA8 moderate, and SARA4_DAR2 high. The published area and delay
figures (LUT counts and ns on an FPGA) cannot be reproduced by a functional
simulation. They are not checked here.

## Wallace multiplier (`rtl/wallace_mult.sv`)

An 8x8 unsigned multiplier. Its 64 partial products `x[i] & y[j]` are placed
in 16 columns by weight. Each reduction stage works column by column:

* every group of three bits goes through a full adder;
* a pair left over goes through a half adder (`rtl/half_adder.sv`);
* a single leftover bit passes on unchanged.

Sums stay in their column and carries move up one column. For 8x8 this takes
four stages, with column heights 8, 6, 4, 3 and finally 2. Constant functions
(`height`, `stay`, `up`) compute the tree's wiring at elaboration time, so
`WIDTH` can be changed.

The two remaining rows go to a 16-bit `sara_dar_adder` (L = 4, W = 2), and the
multiplier's `mode` input selects its accuracy. The reduction tree itself is
always exact. Only the final addition approximates, and an approximate product
is never larger than the exact one.

* The product is 16 bits, because an 8x8 unsigned product always fits.
* A carry out of the top column, and the final adder's carry-out, are always 0
  and are dropped.
* Which L and W the final adder uses is not specified by the source; the
  adder's defaults are reused.
* In `ACC_ACCURATE`, 254 x 254 = 64516.
* In `ACC_APPROX`, about 4 % of all 65,536 operand pairs give a different
  product.

## Top level (`rtl/aca_top.sv`)

`aca_top` places the two units side by side. Each has its own operands and its
own mode:

* **adder:** `add_a`, `add_b`, `add_cin`, `add_mode` in; `add_s`, `add_cout`,
  `add_approx_sel` out;
* **multiplier:** `mul_x`, `mul_y`, `mul_mode` in; `mul_prod`,
  `mul_approx_sel` out.

Parameters are `N = 16`, `L = 4`, `W = 2` and `MW = 8`. The multiplier's final
adder is 2·MW bits wide and uses the same L and W.

Both units are purely combinational, so a result is valid one
combinational-path delay after the inputs change. Register the ports as your
timing requires.

## Choices made where the source is silent

* There is a carry-in port. The source numbers carries from C_0 but does not
  say what drives it.
* Every boundary has its own mode bit in `sara_adder`.
* Which bits form the DAR window: the W bits just below each boundary.
* The mode encoding, and the fact that mode code 3 acts as accurate.
* The Wallace grouping schedule, the 16-bit product, and L and W of the
  multiplier's final adder.
* `N` must be a multiple of `L`. An assertion reports it at elaboration if not.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`. The word-level
reference models are in `tb/aca_ref_pkg.sv`: a segment-by-segment integer
model of the adder and a model of the detector.

Example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/aca_pkg.sv tb/aca_ref_pkg.sv tb/tb_aca_top.sv --top tb_aca_top
    ./obj_dir/Vtb_aca_top

| testbench | what it shows |
|---|---|
| `tb_full_adder`, `tb_cos_fa`, `tb_cic_fa` | the cells, exhaustively |
| `tb_sara_adder` | L = 1, 4 and 8 against the reference, with random per-boundary modes |
| `tb_dar_detect` | all 2^16 propagate patterns, W = 2 and W = 3 |
| `tb_sara_dar_adder` | the three modes; DAR errs less often than fixed approximation |
| `tb_wallace_mult` | all 2^16 operand pairs in every mode, and the tree's two rows summing to x·y |
| `tb_aca_top` | end to end at default parameters, with random mode switching; counts every mechanism |
| `tb_table1_configs` | the SARA1, SARA4, SARA8 and SARA4_DAR2 error rates and their ranking |
| `tb_carry_chain` | exercised carry-path lengths: L + 1 when approximate, the 6-stage versus 9-stage S9 path, and the L + W bound under DAR |

Delay is measured by toggling one input bit and finding the highest sum bit
that changes. It is a count of logic stages, not a timing analysis.
