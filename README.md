# DTCWT OFDM modulator-demodulator: systolic array and distributed-arithmetic RTL

This is an OFDM modem in which the usual FFT/IFFT pair is replaced by a
multi-level dual-tree complex wavelet transform (DTCWT). The transmitter
runs the inverse transform (IDTCWT), which places the symbols on wavelet
subcarriers. The receiver runs the forward transform, which splits the
received signal back into its subcarriers.

The receiver is the larger part. It can be set to 160, 320, 640, 1280 or
2560 decomposition levels (subcarriers). It is built from three ideas:

* **MDA first stage.** The first level is a multiplier-free distributed
  arithmetic filter bank with an 8-entry look-up table. MDA stands for
  modified distributed arithmetic.
* **OSA for later levels.** Every later level uses a four-PE optimum
  systolic array (OSA). The four PEs compute the low-pass and high-pass
  outputs of both trees from five shared, pre-added data terms.
* **Folding.** Each systolic array is reused for two or four successive
  levels. With fold by two, 1280 processing units cover 2560 levels. With
  fold by four, 640 units would do.

Everything is written in synthesizable SystemVerilog. There are no vendor
primitives.

## Signal flow

```
                    +-----------+   lo a/b   +--------+   +--------+       +--------+
 in_data (8 bit) -->| mda_unit  |--scale---->| fold_  |-->| fold_  |--...->| fold_  |--> apx_a/b
                    | x2 (a, b) |            | stage 1|   | stage 2|       | stage N|
                    +-----------+            +--------+   +--------+       +--------+
                       | hi a/b                  | det        | det            | det
                       v                         v            v                v
                    det0_a/b             det_a/b[0], det_lvl  ...         det_a/b[N-1]
```

* **Real and imaginary trees.** The two trees (a and b) run side by side
  through every block.
* **Decimation.** Each level halves the sample rate.
* **Detail outputs (subcarriers).** The high-pass output of a level is a
  demodulated subcarrier stream. It leaves on a detail port tagged with
  its level number.
* **Low-pass path.** The low-pass output of a level feeds the next level.
* **Approximation output.** At the configured last level, the low-pass
  output goes to `apx_a`/`apx_b` instead.

The transmitter (`idtcwt_modulator`) is the mirror image. Each tree is a
chain of seven synthesis stages that merges 8 symbol streams into one.
The last stages of the two trees are combined into `X'R = ya + yb` and
`X'I = ya - yb`.

`dtcwt_ofdm_modem` is the top. It holds both halves on one clock and
reset, each with its own ports.

## Fixed-point filters

All filters have 10 taps. Their coefficients are integers: the real
filters scaled by 64 and rounded. Every level divides its result by 64
with an arithmetic shift and saturates it to 16 bits.

| set | use | low-pass tree a (n = 0..9) |
|---|---|---|
| first stage | forward level 1 | 0 -6 6 45 45 6 -6 1 1 0 |
| later stages | forward levels >= 2, inverse stages 1..6 | 2 0 -6 15 44 44 0 -6 0 0 |
| inverse first stage | inverse stage 7 (output) | 0 1 1 -6 6 45 45 6 -6 0 |

The full tables are in `rtl/dtcwt_pkg.sv` (forward first stage) and
`rtl/idtcwt_stage.sv` (inverse). The inverse first-stage filters are the
forward ones reversed in time. The later-stage filters use the rounded
values 44 and -6 where the exact quantised values would be 38, 49 or -7.

## The distributed-arithmetic first stage (`mda_unit`)

Each first-stage filter has only three coefficient magnitudes: 45, 6 and 1.
The unit therefore never multiplies. A 10-sample shift register feeds a
two-stage adder array. The adder array folds each filter into three signed
terms. For the tree a low-pass filter (w0 = newest sample):

```
y = 45*(w3+w4) - 6*((w1-w2)-(w5-w6)) + 1*(w7+w8)
```

The terms are then evaluated with distributed arithmetic:

1. **Address.** Bit i of the three terms forms a 3-bit address.
2. **Table.** The table holds `45*b2 - 6*b1 + b0` for the eight addresses.
3. **Sum.** The filter output is the sum of `LUT(addr_i) << i` over all
   bit planes. The sign plane is subtracted, because the terms are two's
   complement.

The low-pass and high-pass filters of a tree use the same three
magnitudes. One table serves both on alternate cycles, and a multiplexer
chooses the address set. This implementation reads all bit planes in
parallel, using one copy of the 8-entry table per plane, so it does not
stall.

Timing: with one sample per cycle, the first output that spans ten real
samples is written on the 13th clock edge.

## The systolic array (`osa_pe`, `osa_array`)

Every later-level filter is evaluated in a grouped form with five
pre-added data terms:

```
b0 = x0+x9   b1 = x1+x2   b2 = x3+x4   b3 = x5+x6   b4 = x7+x8
y  = V[0]*b0 + V[1]*b1 + V[2]*b2 + V[3]*b3 + V[4]*b4
```

Four PEs share these terms:

| PE | tree | computes | input delay |
|---|---|---|---|
| PE0 | a | V0 . b | none |
| PE1 | a | V1 . b | one cycle |
| PE3 | b | V0 . c | one cycle |
| PE2 | b | V2 . c | two cycles |

* **Data.** The b terms pass from PE0 to PE1 through PE0's delay
  register. The c terms pass from PE3 to PE2 the same way.
* **Coefficients.** PE3 takes its coefficient stream from PE0's delay
  register.
* **Alignment.** The delays in the table line each PE's coefficient up
  with its data term.

Each PE is a multiply-accumulate unit. Its `s0` control either keeps the
partial sum (1) or emits it and clears the accumulator (0).

A job takes five cycles of input. For a job started in cycle 1, the
outputs appear in these cycles:

* cycle 5: PE0;
* cycle 6: PE1 and PE3;
* cycle 7: PE2.

The coefficient vectors are:

```
V0 = {a0, a1, a2, a1, a3}
V1 = {a0, a3, a1, a2, a1}
V2 = {a3, a1, a2, a1, a0}
```

with `a0..a3 = 2, -6, 44, 15`.

**This is an approximation.** The grouped form pairs x0 with x9, x1 with
x2, and so on. The quantised later-stage filters do not have that
symmetry, so the array computes a close relative of those filters, not
the filters themselves. The first stage, by contrast, is exact. The
modulator's stages use the tabulated filters directly.

## Folding and scheduling (`fold_unit`, `fold_stage`)

A processing unit has one systolic array and two fold units, one per tree.
A fold unit keeps a 10-sample register array for each of the levels it
serves: x, y, z and w for fold by four, only x and y for fold by two.

* **Level sources.** Array x takes samples from the previous unit. Each
  following array takes the scaled low-pass results that the unit
  computed for the level before it.
* **Unit output.** The low-pass result of the unit's last level leaves
  through a data register to the next unit.

The controller must interleave up to four levels that run at different
rates on one array:

* **Pending levels.** Every second sample written into a level's array
  makes that level pending. The level's five pre-added terms are copied
  into a holding register at that moment, so the array may keep shifting.
* **Issue.** A job may be issued every five cycles. The controller takes
  the lowest pending level first. A level-number tag travels down a
  shift register beside the job.
* **Routing.** When the results emerge 6 to 8 cycles later, the tag
  decides where they go: write-back to the next array, the data register,
  the approximation output, or the detail output.

Unit k covers global levels `(k-1)*F+2 .. k*F+1` for fold factor F.
Level 1 is the MDA stage.

**Input rate.** Stage 0 halves the rate, and a level job takes five
cycles. Input samples may therefore arrive at most once every four
cycles. The checked maximum is exactly one sample every four cycles,
with fold by four and a 13-level configuration. If the rate is exceeded,
the sticky `overrun` output goes high.

## Configuration

| input | meaning |
|---|---|
| `fold4` | 0: each unit serves 2 levels; 1: 4 levels |
| `ns_sel` | 0..4 selects the level count `NS_TAB[ns_sel]`, default 160, 320, 640, 1280, 2560 |

Both are static: change them only while `rst_n` is low.

* **Last level.** The last level's low-pass output goes to `apx_*`. Units
  behind it receive no data and stay idle.
* **Capacity.** With `N_PU = 1280`, fold by two reaches 2561 levels and
  fold by four 5121, so all five settings fit.

## Modulator (`idtcwt_stage`, `idtcwt_modulator`)

Each stage computes the upsample-by-2 synthesis filter bank in polyphase
form:

```
y[2n+p] = sum_k g0[2k+p]*a[n-k] + g1[2k+p]*d[n-k]     (p = 0, 1)
```

It emits the even output when a pair (a, d) is accepted and the odd
output afterwards. All streams use valid/ready handshakes.

* **Rates.** Stage k's symbol stream runs 2^(k-1) times faster than
  streams 0 and 1. At full rate the output delivers one sample per cycle.
* **Stream numbering.** Symbol streams `sym[t][k]` follow the 16-symbol
  layout. Tree a carries x0..x7 and tree b carries x8..x15. The first
  stage of a tree combines streams 0 and 1.

## Where this RTL departs from the source architecture

* **OSA rate.** Each PE has one multiplier and accumulates five products,
  so the array gives four outputs per five cycles, not four per cycle.
* **MDA table access.** The table is shared between the two filters on
  alternate rising edges, not on both clock edges.
* **Fold unit registers.** Each folded level keeps a full 10-sample
  register array, instead of one shared 18-cell input register and
  depth-4 arrays.
* **Later-stage coefficients.** The numeric values of a0..a3 are a
  choice, as described under the systolic array.
* **Modulator architecture.**
  * The modulator is the seven-level, 16-symbol structure, with direct
    constant-coefficient filters in every stage. It does not use
    OSA/MDA units.
  * It cannot be configured from 160 to 2560 levels.
  * The sign convention of the `X'R`/`X'I` combiner is a choice.
* **Fold latency.** The source quotes 10 cycles per six outputs for
  fold by two and 20 cycles per ten outputs for fold by four. Here a unit
  issues one level job every five cycles. The first detail output of a
  unit comes nine clock edges after the sample that completes a pair.
* **Not included.** The serial/parallel converters at the device
  boundary are not included.
* **Reset.** Reset is asynchronous and active-low everywhere.

## Files

| file | content |
|---|---|
| `rtl/dtcwt_pkg.sv` | widths, types, first-stage filters, OSA vectors, scaling |
| `rtl/osa_pe.sv` | multiply-accumulate PE with delay registers |
| `rtl/osa_array.sv` | four-PE systolic array and its sequencer |
| `rtl/mda_unit.sv` | first level of one tree, distributed arithmetic |
| `rtl/fold_unit.sv` | per-level register arrays, term capture, write-back |
| `rtl/fold_stage.sv` | processing unit: two fold units, one array, scheduler |
| `rtl/dtcwt_ofdm_demod.sv` | configurable demodulator |
| `rtl/idtcwt_stage.sv` | one synthesis level |
| `rtl/idtcwt_modulator.sv` | seven-level modulator |
| `rtl/dtcwt_ofdm_modem.sv` | top: modulator and demodulator |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/demod_ref_pkg.sv`, `tb/demod_check.svh` | demodulator reference model and checker |
| `tb/mod_check.svh` | modulator stimulus and reference |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
Each has a watchdog. Example with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dtcwt_pkg.sv tb/demod_ref_pkg.sv tb/tb_dtcwt_ofdm_modem.sv \
    --top-module tb_dtcwt_ofdm_modem
./obj_dir/Vtb_dtcwt_ofdm_modem
```

### Unit testbenches

| testbench | checks |
|---|---|
| `tb_osa_pe` | accumulate/emit control and delay registers against a software MAC |
| `tb_osa_array` | the four outputs and their 5/6/6/7-cycle latency for random jobs, back to back and with gaps |
| `tb_mda_unit` | impulse responses equal to the first-stage filters, random data against a direct convolution, output on the 13th edge |
| `tb_fold_unit` | term capture, write-back routing and the overrun flag, both fold modes |
| `tb_fold_stage` | a processing unit in all fold/last-level combinations; first detail output nine clock edges after the pair completes |
| `tb_idtcwt_modulator` | the modulator against a direct-form model, at full rate and with random stalls |

### Top-level tests

* **`tb_dtcwt_ofdm_demod`**
  * Runs the demodulator with 4 units and taps 3, 5, 6, 9 and 13.
  * Covers both fold modes, and the maximum input rate in a 13-level
    configuration.
  * Checks every detail and approximation output against a bit-exact
    software model.
* **`tb_dtcwt_ofdm_modem`**
  * Runs the same demodulator checks through the top, then both
    modulator phases.
  * Counts each mechanism and fails if one never occurred: LUT sharing,
    fold by 2, fold by 4, forwarding between units, approximation output,
    every tap setting, modulator back-pressure and symbol gaps.

### Simulated sizes

* **Largest size simulated.** The end-to-end test at 64 processing units
  builds in about 2 minutes and runs in under a second.
* **Full size not simulated.** No testbench runs the full-size top
  (1280 units). Verilator flattens the 1280 units into several hundred
  large C++ files, and the build alone takes far longer than a practical
  test run.
* **Only depth changes.** The structure is the same at every size.
  `N_PU` only sets how many identical units are chained.

## Trust and limits

* **Checked against software models.** All arithmetic is compared
  bit-exactly against independent software models: the first stage as a
  plain 10-tap convolution, later levels in grouped form, the modulator
  in direct upsample-and-convolve form.
* **Not checked.** None of this shows that the later-level filters are
  good wavelet filters (see the systolic-array section). It also does not
  show that the modulator and demodulator invert each other.
* **Deep levels not reached.** A decomposition of L levels needs 2^L
  input samples to produce its approximation output. Only small tap
  settings reach the last level in simulation. Deeper levels are
  exercised only as far as the input samples propagate.
