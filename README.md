# TM-CFAR detector

A radar receiver has to decide, range cell by range cell, whether an echo is a
target or just noise and clutter. A fixed threshold does not work: the
background level changes from place to place and from moment to moment, so a
fixed level either floods the display with false alarms or misses targets.
A CFAR (constant false alarm rate) detector instead estimates the background
from the cells around the cell under test (CUT) and scales that estimate into
a threshold that moves with it.

This RTL implements the **trimmed-mean** variant (TM-CFAR). The 8 reference
cells around the CUT are sorted, the smallest T1 and largest T2 are thrown
away, and the rest are averaged:

    Z    = X(T1+1) + ... + X(N-T2)          X(1) <= X(2) <= ... <= X(N)
    Tz   = T * Z / (N - T1 - T2)
    hit  = CUT > Tz

Throwing away the largest cells keeps a strong neighbouring target (an
interferer) from raising the threshold and masking the CUT. Throwing away the
smallest protects against drop-outs and clear patches pulling the estimate
down. With N = 8, T1 = T2 = 1 (the default), six cells are averaged. The same
datapath with T1 = T2 = 0 is the classic cell-averaging CFAR, and with
N - T1 - T2 = 1 it picks a single ranked cell, as an ordered-statistic CFAR
does.

## Datapath

```
 si ──► delay line (9 taps) ──┬─ taps 0..3, 5..8 ─► ranking ─► X(1)..X(8)
 start                        │                     (21 cmp/swap cells)
                              │                          │ X(2)..X(7)
                              │                          ▼
                              │                     trim & average ─► aver
                              │                                        │
 threshold (T) ───────────────┼──────────────────────────────► × T  [reg]
                              │                                        │ Tz
                              └─ tap 4 (CUT) ─► [reg] ─► comparator ◄──┘
                                                           │
                                                        TM_out
```

| Module               | What it does |
|----------------------|--------------|
| `tm_cfar_top`        | Wires the chain together; tracks window fill and `tm_valid`. |
| `tm_cfar_delay`      | 9-tap shift register: 4 leading cells, CUT, 4 lagging cells, all visible in parallel. |
| `tm_cfar_ranking`    | Sorts the 8 reference cells ascending with 21 compare-exchange cells. |
| `tm_cfar_cmp_swap`   | One compare-exchange cell: `out1 = min`, `out2 = max`. |
| `tm_cfar_trim_avg`   | Sums the kept cells at full width and divides by their count. |
| `tm_cfar_threshold`  | Registered multiplier `aver × T`, with fixed-point scaling and saturation. |
| `tm_cfar_comparator` | `q = CUT > Tz`. |
| `tm_cfar_pkg`        | Shared sizes: `DATA_W = 32`, `N_REF = 8`, `T1 = T2 = 1`, tap of the CUT. |

Trimming costs no logic: the top simply connects only the sorted lanes
`T1 .. N-T2-1` to the averaging block.

## The ranking network

Sorting is the only part of the design that is not obvious from the formula.
It is a fixed comparator network, so it is purely combinational and has the
same delay for every input. It uses 21 compare-exchange cells, arranged as:

1. The leading half (lanes 0-3) and the lagging half (lanes 4-7) are each
   sorted by a 4-input bubble network of 6 cells:
   `0-1, 1-2, 2-3, 0-1, 1-2, 0-1` (and the same offset by 4).
2. The two sorted halves are combined by Batcher's odd-even merge, 9 cells:
   `0-4, 1-5, 2-6, 3-7, 2-4, 3-5, 1-2, 3-4, 5-6`.

In every pair the lower lane receives the minimum. The cell count of 21 is
that of the published architecture; the arrangement is this implementation's
own (an optimal 8-input network needs 19 cells, and Batcher's full sort also
19, so the count says nothing about the layout). The pair list lives in two
`localparam` arrays (`LO`, `HI`) in `tm_cfar_ranking.sv`; any other valid
8-input network can be dropped in by editing them and `N_CELLS`. The
testbench applies all 256 zero/one patterns, which by the zero-one principle
proves that a comparator network sorts every input.

## Threshold arithmetic

- **Average.** The six kept samples are added in 35 bits, so the sum never
  overflows, then divided by the constant 6 (rounding down). The mean of 32-bit
  values fits in 32 bits.
- **Scale factor.** `threshold` carries T as an unsigned fixed-point number
  with `FRAC_BITS` fraction bits. The default is 0, i.e. T is an integer, as a
  bare 32-bit port suggests. Real CFAR factors are often fractional; set
  `FRAC_BITS` (e.g. 8 or 16) to give T a binary point. The 64-bit product is
  shifted right by `FRAC_BITS`, rounding down.
- **Saturation.** If the scaled product does not fit in 32 bits, Tz becomes
  `32'hFFFF_FFFF`. Since the comparison is strict, a saturated threshold can
  never produce a detection. (Plain truncation would wrap a huge threshold to a
  small one and fire false alarms.)
- **Choosing T.** T sets the false alarm probability for the chosen N, T1, T2.
  It is computed off line from the TM-CFAR false-alarm expression and applied
  on the `threshold` input. No hardware computes it.

All samples are unsigned: the input is meant to be square-law detected power,
which is never negative. The square-law detector itself is not part of this
RTL.

## Interface and timing

| Port        | Dir | Width | Meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | clock, rising edge |
| `rst_n`     | in  | 1  | synchronous, active low; clears the delay line and the valid logic |
| `start`     | in  | 1  | `si` holds a new sample: shift the window on this edge |
| `si`        | in  | 32 | detected range sample |
| `threshold` | in  | 32 | scale factor T (fixed point, see above) |
| `TM_out`    | out | 1  | detection decision for the CUT |
| `tm_valid`  | out | 1  | one-cycle pulse: `TM_out` belongs to a newly shifted, full window |

Parameters of `tm_cfar_top`: `WIDTH` (32), `T1_TRIM` (1), `T2_TRIM` (1),
`FRAC_BITS` (0). The window length is fixed at 8 reference cells because the
ranking network is built for 8 inputs.

Throughput is one sample per clock. `start` can be held high continuously or
pulsed; while it is low the window holds.

```
 edge:        k            k+1           k+2
 start=1, si=s ─┐
                ▼ window shifts (s enters tap 0)
                              ▼ Tz registered (uses T sampled at edge k+1),
                                CUT registered
                              TM_out, tm_valid=1 for this cycle
```

The decision for the window formed at edge k appears after edge k+1. The
scale factor used is the value of `threshold` at edge k+1. After reset,
`tm_valid` stays low until 9 samples have been shifted in, since before that
the window still holds the reset zeros. A sample reaches the CUT 4 shifts
after it enters, so the decision on `TM_out` at a given time concerns the
sample that entered 4 shifts before the newest one.

Registers: 9 × 32 delay-line bits, the 32-bit threshold register, the 32-bit
CUT register and 6 control bits. Ranking, averaging and the comparator are
combinational. The path from the delay line through the sort and the divider
to the multiplier input is long. Pipeline it (and delay the CUT to match) if
a high clock rate is needed.

## Relation to the published architecture

These points follow the published design:

- the five-stage chain (delay, ranking, trimming and average, adaptive
  threshold, comparator);
- the 9-tap delay line with the CUT in the middle;
- 8 reference cells sorted by 21 two-input subcomponents;
- 6 cells averaged (one trimmed at each end);
- 32-bit data, a 32-bit scale factor and a 32-bit threshold;
- a multiplier with a clock input;
- "CUT exceeds threshold" as the detection rule.

These are this implementation's own choices:

- the layout of the 21-cell network;
- rounding and the fixed-point format of T;
- saturation;
- the reset;
- reading `start` as a shift enable;
- the `tm_valid` output and fill tracking;
- the one-cycle CUT register;
- making T1/T2 parameters.

The published FPGA build reports 265 flip-flops. This RTL has 358 flip-flop
bits, because it keeps all nine 32-bit taps and adds the CUT register. Its
own resource and timing figures depend on the FPGA flow and are not
reproduced here.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and calls `$finish`. The shared reference
model (`tb/tm_cfar_ref_pkg.sv`) uses an insertion sort and 64/128-bit
arithmetic, independent of the RTL.

| Testbench               | Covers |
|-------------------------|--------|
| `tb_tm_cfar_top`        | Full design at default parameters. A random clutter stream (noise, targets, interferers, zero drop-outs) with random stalls is compared cycle by cycle with the model. The stream also covers a saturated threshold, a reset mid-stream with refill, and T = 0. The testbench counts each mechanism (shift, stall, detection, miss, a decision that trimming changed, a low outlier, saturation, window fill, reset) and fails if any never happened. |
| `tb_tm_cfar_modes`      | Cell-averaging (T1 = T2 = 0), single-ranked-cell (T1 = 5, T2 = 2) and fixed-point T (`FRAC_BITS = 4`) configurations. |
| `tb_tm_cfar_ranking`    | All 256 zero/one patterns, then random words with and without duplicates. |
| `tb_tm_cfar_delay`      | Random shift/hold, and reset over start. |
| `tb_tm_cfar_trim_avg`, `tb_tm_cfar_threshold`, `tb_tm_cfar_comparator`, `tb_tm_cfar_cmp_swap` | The arithmetic blocks, including extremes, one-cycle latency and saturation. |

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tm_cfar_pkg.sv tb/tm_cfar_ref_pkg.sv tb/tb_tm_cfar_top.sv \
    --top-module tb_tm_cfar_top
./obj_dir/Vtb_tm_cfar_top
```

Replace `tb_tm_cfar_top` with any other testbench name. Once built, each
simulation finishes in well under a second.
