# Dual-sampling tapped-delay-line TDC

A time-to-digital converter (TDC) measures when an asynchronous hit arrives, to a
few picoseconds, with ordinary FPGA logic. The coarse part is a cycle counter on a
500 MHz clock. The fine part, the position of the hit inside a 2 ns clock period,
comes from a tapped delay line (TDL). A hit launches a rising edge into a carry
chain, and at the next clock edge a bank of flip-flops records how far the edge
got.

The main idea is **dual sampling**. In this FPGA family each carry tap drives two
outputs, the carry output CO and the sum output O. Both can be registered in the
same slice. The sum output switches at a different moment from the carry output,
so registering both gives twice as many sample points along the same chain. A
430-tap chain therefore gives 860 bins of about 2.3 ps instead of 430 bins of
about 4.65 ps. The price is a wider flip-flop bank and encoder, and more bubbles,
which the realignment stage removes.

This repository holds synthesizable SystemVerilog for the whole digital
datapath. It also has a behavioural model of the carry chain, so that the design
can be simulated end to end.

## Datapath of one channel

```
hit -> pulse_launcher -> carry_chain_tdl (430 taps, O and CO per tap)
    -> dff_bank (860 bits) -> realign_fabric -> thermo_bin_encoder
       (therm_to_onehot, onehot_to_bin) -> online_calib -> timestamp_out -> ts
                                               coarse_counter (shared) ---^
```

`tdc_top` holds two such channels, which share one coarse counter. The interval
between two hits is the difference of the two timestamps.

Every stage is registered. Let `e` be the clock edge that first sees the hit:

| after edge | stage | content |
|---|---|---|
| e   | `dff_bank`       | raw code, bit 2j = sampled O_j, bit 2j+1 = sampled CO_j |
| e+1 | `realign_fabric` | thermometer code in arrival order |
| e+2 | `therm_to_onehot`| one-hot position, hit flag |
| e+3 | `onehot_to_bin`  | code = number of bits the edge has passed (1..860) |
| e+4 | `online_calib`   | fine time, hit to edge, in Tclk/2^16 |
| e+5 | `timestamp_out`  | `ts = coarse(e) * 2^16 - fine`, `ts_valid` |

The 48-bit `ts` counts units of Tclk/65536, about 0.03 ps at 500 MHz.

## The sampled code and why it must be realigned

If the LUT of every tap is held at 1, the carry multiplexer always passes the
carry on. The sum output is then `O_j = 1 XOR CI_j`, the inverse of the tap's
carry-in. Before a hit every CO is 0 and every O is 1. As the edge passes, each
CO rises and each O falls. `realign_fabric` inverts the O bits (the `INV` mask)
so that every bit rises.

The bits do not switch in their physical order. Tap delays are unequal. The sum
output may switch before or after its own carry output, or after the next tap.
Clock skew differs from slice to slice. The raw code therefore has bubbles, such
as `00010111`, and many bins of zero or negative width. The fix is to wire the
bits once in the order in which the edge actually reaches them. After that
rewiring every sample is a clean thermometer code (`00001111`).

This order depends on the chip and the placement. On hardware it is found by a
code density scan of each bit. In this RTL it is the parameter `MAP`: output bit
k of the fabric is raw bit `MAP[k]`. It is a fixed permutation of wires and costs
no logic. With `CUSTOM_MAP = 0` the fabric uses the physical order
S0, CS0, S1, CS1, and so on. That order is correct for the default chain model,
which has no bubbles. The reduced-size testbenches build bubbly chains and
compute `MAP` by sorting the model's arrival times (`sorted_map` in
`tb/tdc_top_tb.sv`).

## From thermometer code to time

`therm_to_onehot` marks the last 1 of the *leading* run of ones. A fabric output
of `00001111` gives `00001000`. Using only the leading run keeps the result
one-hot even when the tail of an earlier, draining edge is still in the chain. A
hit is reported when bit 0 is 1 and was 0 in the previous sample. `onehot_to_bin`
turns position k into code k+1, so `00001000` becomes 4.

A hit that arrives just before a clock edge may not reach even the first bit in
time. It is then reported one edge later, with a code near the top of the range.
The code range (about 2.02 ns in the model) must therefore be a little longer
than the clock period.

## Online calibration (code density)

Bins are unequal, so code c is not c × 2.3 ps. `online_calib` measures the bins
while the TDC runs. Hits are uncorrelated with the clock, so the share of hits
that land in a bin equals its share of the clock period. The block:

1. counts the codes of N = 2^`NLOG` hits (default 65,536) in a histogram `h`;
2. walks the histogram once, one code per cycle, and writes into a spare table
   the centre of each bin: `t(c) = (2·Σ_{i<c} h(i) + h(c)) · 2^16 / (2N)`. N is a
   power of two, so the division is a shift;
3. swaps the two tables, clears the histogram during the walk, and starts over.

Look-ups never stop. Hits during the 861-cycle walk use the old table and are
not counted. After reset the block spends 861 cycles clearing the histogram and
loading a start table of equal bins (Tclk/860), which is used until the first
round completes. `rounds` counts completed updates. `updating` is high during a
walk.

## Pulse launcher and dead time

A flip-flop clocked by the hit drives the chain input, so the edge starts at the
hit time. Its output goes through a two-stage synchronizer. When the synchronized
copy is high, the flip-flop is cleared and held clear for `HOLD_CYC` cycles
(default 2), so the falling edge can drain out of the chain. The flip-flop bank
has by then sampled the edge at the first edge after the hit and at the one
after it. A channel re-arms about 5 cycles (10 ns) after a hit and ignores hits
in between (`busy` is high). Two channels are independent, so a hit pair 10 ns
apart on the two channels is fine.

## Parameters (defaults)

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 430 | carry taps per chain (860 sampled bits) |
| `NCH` | 2 | channels in `tdc_top` |
| `FINE_W` | 16 | fine time width; LSB = Tclk/2^16 |
| `COARSE_W` | 32 | coarse counter width (wraps after 8.6 s) |
| `NLOG` | 16 | log2 of hits per calibration round |
| `HOLD_CYC` | 2 | launcher clear time, cycles |
| `CUSTOM_MAP`, `MAP` | 0, – | realignment order (see above) |
| `XOR_PCT_*`, `SKEW_MAX_FS` | 20/61, 0 | chain model: sum-output delay spread, slice skew |

## What follows the source and what is this design's own

Taken from the published design:
- dual sampling of O and CO in the same slice;
- 430 taps and a 500 MHz clock;
- the order of the stages: flip-flop bank, realignment by arrival order,
  thermometer to one-hot to binary, bin-by-bin code-density calibration with
  table updating, and coarse plus fine timestamp;
- two identical channels.

This design's own choices, where the source is silent:
- the LUT value of 1 and the resulting O polarity;
- how the launcher clears itself, and the dead time;
- the hit detection rule and the leading-run rule;
- the code = k+1 convention (it matches the source's worked example);
- the calibration formula, the histogram length, the two-table swap and the
  start table;
- the timestamp format and widths;
- one register per stage;
- synchronous active-high reset.

Other departures:
- The realignment map is a parameter. The scan that measures it on hardware is
  not part of the RTL.
- The delay line is a behavioural model with invented, pseudo-random delays:
  mean 4.7 ps per tap, and each sum output 20–80 % of its tap's delay behind the
  carry-in. Its results show that the logic works. They do not predict the
  resolution of real silicon. The model's interval RMS (1.5–3 ps at reduced size)
  comes only from quantization and histogram statistics, not from jitter. For an
  FPGA build, replace `carry_chain_tdl` with the vendor's carry primitives and
  keep them placed in one column.
- The on-board serial readout and the clock oscillator are not included. The
  clock is an input, and timestamps leave on ports.
- The source runs every stage at 500 MHz. Here each encoder stage handles all
  860 bits in one cycle: a serial leading-run AND and a 10-bit OR tree. Timing
  closure has not been attempted. A real build would probably need these stages
  split over more pipeline registers, and `LAT` in `timestamp_out` raised to
  match.
- Only the dual-sampling configuration is built. The single-sampling variant,
  used only as a comparison, is not.
- The source also reports codes up to about 885 from a 430-tap chain. This RTL
  keeps 430 taps and 860 bits. For a longer chain, raise `TAPS`.

## Simulation

Each module `rtl/X.sv` has a self-checking testbench `tb/X_tb.sv`, and each prints
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
  rtl/tdc_pkg.sv rtl/tdl_delay_pkg.sv tb/tdc_top_tb.sv --top-module tdc_top_tb
./obj_dir/Vtdc_top_tb
```

- `tdc_top_tb` is the end-to-end test at reduced size: 32 taps, a 140 ps clock
  so the chain spans one period, 2^10 hits per round, and bubbly chains with
  sorted maps. It calibrates both channels, then sweeps the interval between
  them from 0 to 440 ns in 10 ns steps, 24 pairs per step. At each step it
  checks the mean and the RMS of the interval error. It also counts, and
  requires, each mechanism at least once: raw bubbles, hits seen one edge late,
  hits ignored in the dead time, hits during a table walk, table swaps, and
  draining samples.
- `tdc_channel_tb` checks every code against the number of bits whose model
  arrival time precedes the sampling edge. After calibration it checks the fine
  time against the true hit-to-edge time.
- `tdc_top_full_tb` runs `tdc_top` with all defaults: 860 bits per channel and a
  2 ns clock. It sends 40 random hits per channel and 20 pairs 10 ns apart, all
  on the start table. At this size Verilator evaluates the wide encoder on every
  delay event of the chain model, about one second per hit, so a full
  65,536-hit calibration round is not simulated at full size. The largest size
  at which calibration rounds are simulated is 64 bits per chain, with 1,024 hits
  per round.
