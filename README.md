# Reconfigurable FRM filter with distributed arithmetic and Brent-Kung adders

A hearing aid splits sound into frequency bands and amplifies each band to
match the wearer's hearing loss. The bands must have sharp edges, and
the filters must run on a battery. This design uses *frequency-response masking*
(FRM) to get sharp band edges from short filters. It computes every filter
with *distributed arithmetic* (DA), which needs no multipliers: coefficient
sums are read from small RAMs and added with parallel prefix adders. The
default adder is Brent-Kung, the prefix network with the fewest nodes. The
coefficients sit in writable two-bank RAMs, so the response can be changed
while audio is flowing, for example when a hearing aid is refitted.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. The
self-checking testbenches are in `tb/`.

## Signal flow: frequency-response masking

```
                 +-----------------+    m[n]   +-------------+
 x[n] --+------->| H(z^M)  u_model |---+------>| H_M(z)      |--+
        |        +-----------------+   |       | u_mask      |  |
        |                              |(-)    +-------------+  (+)--> y[n]
        |        +-----------------+   v  c[n] +-------------+  |
        +------->| z^-M(N-1)/2     |-->(+)---->| H_CM(z)     |--+
                 | (centre tap)    |           | u_cmask     |
                 +-----------------+           +-------------+

   Y(z) = H(z^M) H_M(z) + [z^-M(N-1)/2 - H(z^M)] H_CM(z)
```

* **Model filter H(z).** This is a 45-tap (N = 45) linear-phase low-pass filter.
  Its taps are in `frm_pkg::H_HALF`, and the filter is symmetric:
  h(44-n) = h(n). The taps are quantised to 16 bits with 14 fraction bits,
  `H_HALF[i] = round(h(i) * 2^14)`, and sum to 16247/16384 (DC gain 0.992).
* **Interpolation by M.** Replacing z by z^M puts M-1 zero taps between
  coefficients. The response then repeats M times over the band, and each
  transition band becomes M times narrower, at no extra multiplications. In
  hardware this is only a longer delay line. `u_model` reads every M-th sample
  of a (N-1)M+1 = 177-sample line (M = 4).
* **Complementary branch.** Because H is linear phase, the delayed input minus
  H(z^M) is the exact complement. The delay z^-M(N-1)/2 is the centre sample
  of the model filter's own delay line, so no second delay line is needed
  (`da_pu.out_center`).
* **Masking filters.** H_M(z) and H_CM(z) keep the wanted images of each
  branch. Their sum gives a filter with the sharp edges of H(z^M) and no
  repeated pass bands.

No masking filter coefficients are built in. At power-up H_M is a unit
impulse and H_CM is zero, so `Y_n` is the periodic model filter H(z^M) alone.
Loading masking coefficients through the `lut_*` port turns the unit into a
complete FRM filter. The testbench does this.

## Distributed arithmetic in a processing unit (`da_pu`)

All three filters are instances of one processing unit. It computes
`y[n] = sum_t h(t) x[n - t*SPACING]` for TAPS taps, with two's-complement input
words of IN_W = 8 bits.

**Bit planes instead of products.** Write each sample as
`x = -2^7 x7 + sum_{b<7} 2^b xb`. Then

```
y = sum_b w_b * P_b,    P_b = sum_t h(t) * bit_b(x[n - t*SPACING]),
w_b = 2^b for b < 7,    w_7 = -2^7.
```

Each partial product P_b depends only on one bit from each tap. So it can be
looked up instead of multiplied.

**Partial product generator (`dram_ppg`).** The taps are grouped four at a
time (K = 4), which gives 12 groups for the 45-tap model filter and 4 for a
16-tap masking filter. Each group has a 16-word RAM, with

```
RAM_g[a] = sum_{j=0..3, a[j]=1} h(4g + j)     (taps past the end count as 0)
```

For a bit plane b, bit b of taps 4g..4g+3 forms the address of group g. The 12
words read are registered and then summed by a balanced tree of 11 prefix adders
(`ppa_tree`). Node i of the tree adds nodes 2i and 2i+1, so any group count
gives a balanced tree. RAM words are 18 bits (COEF_W + 2). The tree output is
18 + ceil(log2 GROUPS) bits, so no sum can overflow.

**Bit slices.** Eight bit planes done one after another would take 8 cycles.
The unit instead has PES = 4 processing elements. Element s handles the two
bits 2s and 2s+1 of every sample, one per cycle. Each element has its own copy
of the RAMs and its own shift accumulator (`shift_acc`). The accumulator adds
`P << j` in step j = 0, 1. For the top bit of the top slice (bit 7) it
subtracts instead. The unit output is

```
out_data = sum_s slice_acc[s] << (2s)
```

This is the full-precision result, with the coefficients' 14 fraction bits
still in it.

**Sequencing.** A 2-bit counter runs the unit through one sample:

| cycle after the accepting edge | action |
|---|---|
| 0, 1 | RAM read for bit j = 0, 1 of each slice |
| 1, 2 | shift-accumulate bit j = 0, 1 |
| 3 | slice sums combined into `out_data` |

`out_valid` is high in the cycle after that, which is 4 edges (IN_W/PES + 2)
after the accepting edge. `in_ready` is high again in the same cycle. A unit
therefore takes one sample every 4 cycles. The delay line shifts only when a
sample is accepted, so it stays still while the bit planes are read.

## Parallel prefix adders

Every adder in the partial product trees is a parallel prefix adder, built in
three stages:

* **Pre-processing:** p = a ^ b and g = a & b.
* **Carry graph:** pairs are combined with
  `(G,P)_i o (G,P)_j = (G_i | P_i G_j, P_i P_j)`.
* **Post-processing:** c(i+1) = G(i:0) | P(i:0) cin and s(i) = p(i) ^ c(i).

The carry graph can be one of four networks, chosen by the parameter `KIND`
(`frm_pkg::ppa_kind_e`). The same `KIND` reaches every adder of the filter.

| KIND | module | carry graph | levels (W=8) |
|---|---|---|---|
| `PPA_BK` (default) | `bk_adder` | up-sweep to power-of-two groups, then down-sweep | 5 |
| `PPA_KS` | `ks_adder` | every bit combines with the bit 2^l below it | 3 |
| `PPA_HC` | `hc_adder` | Kogge-Stone on odd bits, then one level for even bits | 4 |
| `PPA_LF` | `lf_adder` | bit i with bit l set combines with the top of the block below (Sklansky form) | 3 |

All four give identical sums. They differ only in area, wiring and switching
activity. Brent-Kung uses the fewest prefix nodes, which makes it the
low-power choice and the default. Each adder's width parameter defaults to
8 bits. Inside the trees the adders are 20 to 22 bits wide.

## Number formats and rounding

* Samples `X` and `Y_n` are 8-bit two's-complement integers.
* Coefficients are 16-bit two's complement with 14 fraction bits, so a unit
  tap is 16384.
* Between the model stage and the masking stage, the full-precision model
  output A gives two 8-bit signals:
  * `m = rs(A)`;
  * `c = rs(x_centre * 2^14 - A)`.

  Here `rs(v)` is `floor((v + 2^13) / 2^14)`: it rounds half up and saturates
  to the range -128..127.
* `Y_n = rs(A_mask + A_cmask)`.

The 8-bit intermediate format is a design choice that keeps the masking units
identical to the model unit. It adds quantisation noise at the branch points.
If this matters, widen `DATA_W_P` (all units follow it). Note that a wider
word needs more bit-serial cycles per sample.

## Reconfiguration

Each RAM has two banks. The `ctrl` input picks the bank that an accepted
input sample is filtered with. The sample keeps this bank through all three
units, because the model unit passes it on (`out_bank`). A sample is never
computed with a mix of old and new coefficients.

The write port (`lut_we`, `lut_filter`, `lut_bank`, `lut_group`, `lut_addr`,
`lut_data`) writes one RAM word per cycle. It can write any unit and bank at
any time. The word written is the group sum `RAM_g[a]` from the formula above,
computed by the host. A full filter needs 16 writes per group: 192 for the
model filter and 64 for each masking filter. The usual procedure is:

1. Write the inactive bank while audio runs.
2. Flip `ctrl`.

The RAM contents at power-up come from a constant function, as FPGA
distributed RAM contents would:

| unit | initial contents (both banks) |
|---|---|
| model | the model filter taps |
| H_M | a unit impulse |
| H_CM | zero |

Reset does not restore these contents. It clears only the delay lines, the
sequencing, and the read and output registers.

## Interface of the top, `frm_filter_bank`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset` | in | 1 | synchronous, active high |
| `x_valid`, `x_ready` | in/out | 1 | handshake: a sample is taken on a rising edge with both high |
| `X` | in | 8 | audio sample |
| `ctrl` | in | 1 | coefficient bank for this sample |
| `lut_we` | in | 1 | write one RAM word |
| `lut_filter` | in | 2 | `SEL_MODEL`, `SEL_MASK` or `SEL_CMASK` |
| `lut_bank`, `lut_group`, `lut_addr` | in | 1, 4, 4 | word address |
| `lut_data` | in | 18 | word (a sum of up to four coefficients) |
| `y_valid` | out | 1 | one-cycle strobe with each output sample |
| `Y_n` | out | 8 | filtered sample |

Timing:

* `y_valid` comes 10 edges after the edge that accepts the input. That is
  4 edges for the model unit, 1 to hand over, 4 for the masking units and 1
  for the output register.
* `x_ready` is low for 3 cycles after each accepted sample. The filter
  therefore takes one sample per 4 clocks. A 48 kHz audio stream needs only a
  192 kHz clock.
* Two assertions check that the masking units are always free when a model
  result arrives, and that they finish together.

Parameters of the top (defaults in brackets):

* `DATA_W_P` (8)
* `MODEL_N` (45)
* `M` (4)
* `MASK_TAPS` (16)
* `PES` (4; must divide `DATA_W_P`)
* `KIND` (`PPA_BK`)

The model filter taps are always those of `frm_pkg`. Changing `MODEL_N` only
truncates or zero-pads them.

## What is specified and what is chosen here

These parts follow the filter design:

* the FRM structure and equation;
* the 45 model-filter taps;
* 8-bit input and output;
* a processing unit made of DRAM partial product generators, prefix adders
  and shift accumulators;
* four processing elements joined by shifts and adds;
* Brent-Kung as the adder, with Kogge-Stone, Han-Carlson and Ladner-Fischer
  as alternatives;
* a `ctrl` input.

These are this implementation's own choices, and should be reviewed before use:

* **M = 4.** The interpolation factor is not specified. Band edges scale with
  it.
* **Masking filters.** Their length (16 taps), their coefficients (loaded at
  run time) and their power-up contents are not specified.
* **`ctrl`.** Its use as a bank select is a choice. So are the write port and
  the valid/ready handshake.
* **Widths and formats.** The coefficient format (Q2.14) and the RAM word
  width are choices. So are the 8-bit intermediate signals and
  round-half-up-with-saturation.
* **Structure details.** K = 4 taps per RAM, the bit-slice split of 2 bits per
  element, and LSB-first order with the sign plane subtracted are choices.
  So is the 4-cycle sequencing.
* **Prefix graphs.** Each adder uses the textbook graph of its family.
* **Output precision.** Shift accumulation uses a plain adder, not a prefix
  adder. Results are exact: nothing is truncated before the final rounding.

Not included: the audio codec (ADC/DAC) that feeds and drains the filter, and
the offline coefficient design. Nor is there a decimating analysis/synthesis
structure: the filter runs at the input sample rate. `X` and `Y_n` are where a codec
interface would attach.

## Verification

Each testbench checks its block against values computed independently in the
testbench, and ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bk_adder`, `tb_ks_adder`, `tb_hc_adder`, `tb_lf_adder` | all 2^17 8-bit operand/carry combinations and the example vector quoted for each 8-bit adder (for example Brent-Kung: 10100011 + 10101111 = 1_01010010); 20 000 random 22-bit additions with long carry chains |
| `tb_shift_acc` | random 1-4 step accumulations with shifts, subtraction and idle cycles against an integer model |
| `tb_dram_ppg` | every RAM word of both banks at power-up against a tap-by-tap sum; rewrite of bank 1; random reads of both banks; one-cycle read latency and hold |
| `tb_da_pu` (with `da_pu_check`) | two units against direct convolution: 45 taps, spacing 2, 4 elements of 2 bits, and 16 taps from a unit impulse, 2 elements of 4 bits; random offers while busy (refused); full-scale inputs; centre tap; latency of IN_W/PES+2; bank 1 reloaded with random taps; per-sample bank switching |
| `tb_frm_workloads` | four tops, one per adder network, at default parameters: impulse response equal to 127 x the real-valued model taps within one LSB at every 4th output; step response settling to 99 for an input of 100; identical outputs of all four variants over 2000 random samples |
| `tb_frm_filter_bank` | the top at its default parameters against a bit-exact model of the equations above; 10-cycle latency; coefficient loading during operation; bank switching |

`tb_frm_filter_bank` also counts the design's mechanisms and fails if one
never happens. The mechanisms are:

* a coefficient write;
* a bank switch;
* a refused input;
* branch saturation;
* output saturation;
* a -128 input.

It runs in a few seconds.

To run a testbench with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl rtl/frm_pkg.sv tb/tb_frm_filter_bank.sv \
          --top tb_frm_filter_bank -Mdir obj_top
./obj_top/Vtb_frm_filter_bank
```

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. The same command
with another `tb_*` name runs the other testbenches. For lint, use
`verilator --lint-only -Wall -Irtl rtl/frm_pkg.sv rtl/frm_filter_bank.sv`.
The one remaining warning (PROCASSINIT on the RAM) is intended, and is
explained in `dram_ppg.sv`.

## Files

| file | content |
|---|---|
| `rtl/frm_pkg.sv` | enums, widths, model filter taps, RAM-content function |
| `rtl/frm_filter_bank.sv` | top: three processing units, complement, rounding, output |
| `rtl/da_pu.sv` | DA processing unit: delay line, sequencing, bit slices |
| `rtl/dram_ppg.sv` | two-bank coefficient-sum RAMs and adder tree |
| `rtl/shift_acc.sv` | shift accumulator |
| `rtl/ppa_tree.sv`, `rtl/ppa_adder.sv` | adder tree; adder selector |
| `rtl/bk_adder.sv`, `ks_adder.sv`, `hc_adder.sv`, `lf_adder.sv` | the four prefix adders |
