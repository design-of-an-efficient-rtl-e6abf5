# Reconfigurable root-raised-cosine interpolation filter

A digital up converter (DUC) moves a baseband signal up to an intermediate
frequency. Before mixing, it raises the sample rate and pulse-shapes the
signal with a root-raised-cosine (RRC) filter. Different radio standards need
different interpolation factors and roll-offs. This design is one RRC
interpolation filter that covers six settings, chosen at run time:

| `intp_sel` | factor L | taps N = 6L+1 | unique coefficients | `flt_sel` = 0 | `flt_sel` = 1 |
|---|---|---|---|---|---|
| 4 | 4 | 25 | 13 | roll-off 0.22 | roll-off 0.35 |
| 6 | 6 | 37 | 19 | roll-off 0.22 | roll-off 0.35 |
| 8 | 8 | 49 | 25 | roll-off 0.22 | roll-off 0.35 |

Each filter spans 6 input symbols, so every polyphase branch has 7 taps.
The filter has no general-purpose multiplier. Each coefficient is a hard-wired
shift-and-add network built from multiplexers. The adders are carry select
adders that use binary-to-excess-1 converters (BEC). Because an RRC response
is symmetric, only half of each filter (13, 19 or 25 words) is stored and
multiplied.

The ideas follow a published architecture for a multi-standard DUC pulse
shaper. That architecture has a first and second "coding pass" that pick
coefficients, a partial product generator, a multiplexer unit and a final
addition unit, and BEC carry select adders. Where that description is silent,
this implementation makes its own choices, listed under
[Choices made here](#choices-made-here).

## Data path

```
rrcin ──► data_generator ──up_data──► coef_gen ──prod[25]──► coef_sel ──tap[49]──► accum_unit ──► rrcout
 (16b)    divide by 4/6/8,            FCP → SCP → coeffs     symmetric              transposed FIR
          sample and hold             PPG + 25 mux/add units  tap mapping            chain, 22 bit
```

* **data_generator**: three free-running counters divide the clock by 4, 6
  and 8. Each counter drives a 16-bit register that samples `rrcin` at that
  rate. `intp_sel` picks the register that drives `up_data`. Each word is
  held for L clocks, so the input is up-sampled by L with sample-and-hold,
  not zero stuffing (see [Sample-and-hold](#sample-and-hold-up-sampling)).
* **coef_gen** multiplies `up_data` by all 25 unique coefficients of the
  selected filter in the same clock. It contains:
  * `fcp`: chooses the roll-off set.
  * `scp`: chooses the filter length.
  * `ppg`: one partial product generator, shared by all multipliers.
  * `mux_add_unit`: one per coefficient.
* **coef_sel** copies the products onto the N taps. Tap k of an N-tap filter
  uses product `min(k, N-1-k)`. Taps at index N and above get 0.
* **accum_unit** is the transposed-form FIR chain:
  `r[k] <= r[k+1] + tap[k]`, and `rrcout = r[0]`.

In transposed form every new input is multiplied by every coefficient at
once. That is why one shared partial product generator is enough: its
result depends only on the data word.

## Sample-and-hold up-sampling

The filter does not insert L-1 zeros between input words. It repeats each
word for L clocks and filters that held stream with the N-tap RRC response.
The overall response to one input word is therefore the RRC response
convolved with a box of L ones. For the first L outputs after a word
arrives, the output is a running sum of the outermost coefficients times
that word.

This is how the original filter behaves. Its published simulation starts at
factor 8 with the word 4521 and prints the outputs -59, -82, -60, 15, 136,
290, 449, 582. This design gives -59, -82, -60, 15, 137, 290, 449, 583. At
factor 4 it prints -85, -53, 120, 346, and this design gives -84, -52, 121,
346. The small differences come from coefficient rounding.

If you want textbook zero-stuffed interpolation, change one thing in
`data_generator`: drive `up_data` with the register only in the clock after
a capture, and with 0 otherwise. Nothing else depends on the choice.

## The coefficient multiplier (hardest part)

Coefficients are *coded*. Each is 17 bits: a sign bit (bit 16, 1 =
negative) and a 16-bit magnitude in Q1.15, so bit i weighs 2^(i-15). The
magnitude is cut into eight 2-bit groups. Group g (bits 2g+1:2g) has shift
`s = 14 - 2g` and chooses one of four partial products:

| bits | partial product | weight |
|---|---|---|
| 00 | 0 | 0 |
| 01 | `x >> (s+1)` | 2^-(s+1) |
| 10 | `x >> s` | 2^-s |
| 11 | `M8 >> s`, with `M8 = x + (x >> 1)` | 1.5 · 2^-s |

Only the pattern 11 needs an addition. That addition is done once, in the
`ppg` block, which forms the 17-bit `M8` with a carry select adder. It then
outputs `M8` shifted right by 2, 4, …, 14 (15, 13, …, 3 significant bits).
Each `mux_add_unit` has eight 4:1 multiplexers. Its balanced tree of seven
16-bit carry select adders (4 + 2 + 1) sums the eight selected terms. A
two's-complement stage and a multiplexer driven by the sign bit then give
the 17-bit signed product.

Example: magnitude `0x4623` (0.548) has the groups, from the top, 01 00 01
10 00 10 00 11. The product is therefore
`x>>1 + x>>5 + x>>6 + x>>10 + M8>>14`
(0.5 + 1/32 + 1/64 + 1/1024 + 1.5/16384 = 0.548).

Two properties matter when you change the coefficients:

* **The magnitude must be below 1.0** (bit 15 clear). The adders are 16 bits
  wide. With bit 15 clear, the sum of the partial products stays below 2^16.
  An assertion in `mux_add_unit` fires if a coefficient breaks this rule.
  All stored coefficients are at most 0.55.
* **Each partial product is truncated on its own.** The product can fall a
  few LSBs below `floor(x·|c|/2^15)`; the tests allow at most 8 LSBs. The
  testbenches model this truncation exactly.

## Carry select adder with BEC

`csla16` splits 16 bits into five groups of 2, 2, 3, 4 and 5 bits (bits
1:0, 3:2, 6:4, 10:7, 15:11):

* The lowest group is a 2-bit ripple-carry adder (`rca`) that takes the
  carry input.
* Every other group is a `csla_group`. It adds its bits with carry 0 in a
  ripple adder, producing W+1 bits. A (W+1)-bit BEC (`bec`, x+1 without a
  full-adder chain) forms the carry-1 result.
* The carry out of the group below selects between the two results. These
  carries are C2, C4, C7 and C11.

A classic carry select adder uses a second ripple adder for the carry-1
case. A BEC is smaller than that ripple adder. The group widths grow so that
each group's local sum is ready about when its select carry arrives.

## Coefficient storage and selection

* `fcp` (first coding pass) holds six tables, 114 words in all. These are
  the symmetric halves of the six filters. A row of 2:1 multiplexers per
  filter picks the roll-off, so 57 words leave the block. A full-length
  store would need 111 words per roll-off.
* `scp` (second coding pass) selects per position CF1..CF25 (index 0..24):
  * positions 0..12 choose among L = 4, 6 and 8;
  * positions 13..18 choose between L = 6 and 8;
  * positions 19..24 exist only for L = 8.

  Positions beyond the chosen half length output a zero coefficient.
* In each table, index 0 is the outermost tap and the last index is the
  centre tap.

The coefficient values belong to this design. The source architecture fixes
only lengths and roll-offs. The values are root-raised-cosine taps over 6
symbols, `t = (k - 3L)/L`:

```
h(t)        = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)]
h(0)        = 1 - b + 4 b / pi
h(±1/(4b))  = b/sqrt(2) · [(1+2/pi) sin(pi/(4b)) + (1-2/pi) cos(pi/(4b))]
```

The taps are scaled to unit energy and rounded to 1/32768. To use other
taps, replace the six `localparam` tables in `rtl/rrc_pkg.sv`, keeping every
magnitude below 1.0.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock = output sample rate |
| `rst` | in | 1 | synchronous, active high; clears dividers, sample registers and the chain |
| `rrcin` | in | 16 | unsigned input sample |
| `intp_sel` | in | 4 | interpolation factor as a number: 4, 6 or 8 (any other value means 4) |
| `flt_sel` | in | 1 | roll-off: 0 = 0.22, 1 = 0.35 |
| `in_strobe` | out | 1 | `rrcin` is captured at the coming rising edge |
| `rrcout` | out | 22 (`ACC_W`) | signed filter output, one per clock |

* After reset the first capture is at the first rising edge, then one every
  L clocks. `in_strobe` is high in the clock before each capture edge. The
  source only has to hold `rrcin` valid at that edge.
* From its capture edge a word drives the multipliers for L clocks. It
  reaches `rrcout` at the next rising edge, through the outermost tap, and
  reaches the centre tap 3L clocks later.
* The arithmetic is combinational from the `data_generator` registers to the
  accumulation registers, so there is one register stage between input and
  output.
* Changing `intp_sel` or `flt_sel` takes effect at once. For up to 49
  clocks afterwards, outputs mix products made with the old and the new
  setting.
* Output range: the sum of |h| over one filter is at most 4.39 (factor 8,
  roll-off 0.22). So `|rrcout| < 4.39 · 65536 < 2^19`, and the 22-bit chain
  cannot overflow.

## Choices made here

The source architecture defines the blocks and their order, the 16-bit data
width, the coded coefficient format with 2-bit groups, the shared 3x/2
partial product, and the BEC carry select adder with its group sizes. It
also defines the halved coefficient rows (13/19/25), the 2:1 roll-off
multiplexers and sample-and-hold up-sampling. The following are this
design's own:

* **Filter structure.** The coefficient selector and accumulation unit are
  only named in the source. They are built as a symmetric tap mapping
  feeding a transposed-form adder/delay chain.
* **Clocking.** One clock with enables. The source has the clock divided
  into three sample clocks.
* **Handshake.** The `in_strobe` output is added so the source knows when
  `rrcin` is captured.
* **Coefficients.** The source prints no coefficient values. The values
  here come from the unit-energy RRC formula above, and they reproduce the
  published outputs to within 1 LSB. The index order and the rule that
  magnitudes stay below 1.0 are also this design's own.
* **Registers.** Everything from the sample registers to the accumulation
  chain is combinational, including the partial product generator. The
  source's FPGA figures suggest that its generator held a few registers, but
  it describes none.
* **Select encodings.** `flt_sel` = 0 means 0.22. Invalid `intp_sel` values
  fall back to 4.
* **Product width.** The signed product is 17 bits rather than 16, so that
  a 16-bit magnitude of either sign fits.
* **Accumulation adders.** The accumulation unit uses plain `+` adders; the
  source names no adder type for it.
* **Three-way selection.** The second coding pass chooses among three
  filters, not two.
* **Output width.** The output is 22 bits wide; the block diagram of the
  source labels the output 16 bits.

Not included: the digital mixer and the digital local oscillator of the
DUC, which the source does not specify. They would attach to `rrcout`. The
earlier ripple-carry-adder variant of the same filter is not included either.

## Files

| file | content |
|---|---|
| `rtl/rrc_pkg.sv` | sizes, types (`coef_t`, `prod_t`, …), coefficient tables, `factor_of` |
| `rtl/rrc_filter.sv` | top level |
| `rtl/data_generator.sv` | dividers, sample registers, sample-and-hold |
| `rtl/coef_gen.sv` | FCP + SCP + PPG + 25 multipliers |
| `rtl/fcp.sv`, `rtl/scp.sv` | first and second coding pass |
| `rtl/ppg.sv`, `rtl/mux_add_unit.sv` | shift-and-add multiplier |
| `rtl/csla16.sv`, `rtl/csla_group.sv`, `rtl/bec.sv`, `rtl/rca.sv` | BEC carry select adder and its parts |
| `rtl/coef_sel.sv` | symmetric tap mapping |
| `rtl/accum_unit.sv` | transposed FIR chain |
| `tb/rrc_ref_pkg.sv` | reference product and tap mapping for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and ends with
`$finish`. A watchdog stops it if it hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rrc_pkg.sv tb/rrc_ref_pkg.sv tb/tb_rrc_filter.sv \
    --top-module tb_rrc_filter -o sim
./obj_dir/sim
```

Replace `tb_rrc_filter` with any other `tb_<module>` to test that module.

* `tb_rrc_filter` runs the top at its default parameters, for about 4000
  clocks. It compares every output with a convolution model computed
  independently. The run covers:
  * all six settings;
  * setting changes while samples are in flight;
  * invalid `intp_sel` codes;
  * an impulse per setting, which also checks the one-clock latency;
  * a reset mid-stream;
  * full-scale input.

  Each of these is counted, and the run fails if any of them never happens.
* `tb_rrc_fig_runs` replays the two published simulation runs at factors 4
  and 8. It checks every output against the model, and checks the first L
  outputs against the published values to within 2 LSBs.
* `tb_fcp` recomputes the RRC taps in floating point and checks every stored
  word to within one LSB.
* `tb_mux_add_unit` checks the multiplier against the reference product and
  against the exact product.
* The adder testbenches (`tb_rca`, `tb_bec`, `tb_csla_group`) are
  exhaustive. `tb_csla16` uses corner cases and random vectors.

Synthesised with Yosys as a generic netlist, the whole filter is about 13,900
word-level cells. It has 56 flip-flop bits in the data generator, plus the
49 × 22-bit accumulation chain.
