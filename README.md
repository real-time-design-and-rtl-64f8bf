# MTD-SWVD: moving-target detection with a summed Wigner-Ville Doppler filter bank

A pulse-Doppler radar decides, for every range cell, whether the echoes of a burst of
pulses (a coherent processing interval, CPI) contain a moving target or only clutter
and noise. The classic moving-target detector (MTD) does this with an FFT across the
pulses followed by a CFAR threshold. This design replaces the FFT filter bank with a
**summed Wigner-Ville distribution (SWVD)**. It forms the bilinear kernel
x(n+k)·x\*(n−k), sums it over all time indices n, and takes the FFT of that summed
kernel. The result has lower Doppler sidelobes than a plain FFT and none of the cross
terms that a single-instant Wigner-Ville distribution shows between two targets.

The RTL is a complete, synthesizable processor in SystemVerilog. It is self-contained:
a built-in radar signal simulator, a clock-enable synchronizer, the SWVD filter bank, a
ping-pong corner-turn memory and a cell-averaging CFAR. Everything runs from one
40 MHz clock.

## Data set and numbers

| quantity | value |
|---|---|
| range cells per CPI | 32 |
| pulses per range cell (CPI length) | 8 |
| I/Q sample | 8-bit signed each |
| kernel length after interpolation by 2 | 16 points (8 computed, 8 derived) |
| Doppler bins | 16 |
| cross-product | 17-bit complex |
| summed kernel, FFT and magnitude word | 21 bits |
| CFAR | 1 guard cell and 4 reference cells on each side; threshold 4 × mean |

## Signal chain

```
radar_sim -> interpolator -> data_shift -> cmult -> kernel_acc -> fft16 -> magnitude
   (CLK1)       (CLK2)      (CLK2/CLK4)  (CLK4)     (CLK4)       (CLK4/CLK3)  (CLK3)
                                                  -> data_arrange -> cfar
                                                   (CLK3 write / CLK5 read)
```

`mtd_swvd_top` wires the chain together. Its outputs are the four points worth
watching on hardware: the simulator's I/Q samples, the FFT output, the arranged data
entering the CFAR, and the CFAR decisions. The corner-turn status (bank, swap, overrun)
and the divided clocks are brought out as well. Assertions in `mtd_swvd_top`,
`data_shift` and `fft16` check the stream rules between blocks: kernel and magnitude
frames in index order, nested clock enables, and no new FFT frame before the previous
one is sent.

### Rates: clock enables instead of clocks

`synchronizer` divides the 40 MHz clock into five enable strobes:

| strobe | divide | rate | used for |
|---|---|---|---|
| ce1 | 64 | 625 kHz | reading the simulator ROMs |
| ce2 | 32 | 1.25 MHz | interpolation, shifting |
| ce3 | 8 | 5 MHz | FFT output, magnitude, RAM write |
| ce4 | 4 | 10 MHz | pair selection, cross-multiplication, accumulation, FFT butterflies |
| ce5 | 104 | 384.6 kHz | RAM read, CFAR |

The five divided clocks are also brought out as square waves (`clk_div`) for
observation; no logic is clocked by them. All dividers leave reset together, so every
ce1 is also a ce2, ce3 and ce4. Exactly 8
ce4 strobes fall in each ce2 period, the last one on the ce2 itself. `data_shift`
depends on that nesting. The same block also counts ce1 strobes modulo 12: 8 counting
phases (`count_en`) followed by 4 hold-on phases. A range cell thus occupies 12 CLK1
periods = 768 master cycles, and a CPI occupies 32 × 768 = 24,576 cycles (614.4 µs).

### The summed kernel (the core of the design)

For one range cell with samples s0..s7:

1. **Interpolation by 2** (`interpolator`). A multiplexer driven by the CLK2 phase
   outputs s0, 0, s1, 0, …, s7, 0, followed by 8 zeros from the hold-on period: 24
   values at the CLK2 rate. The sample slot comes first; the zero slot is the CLK2
   strobe that coincides with CLK1.
2. **Sliding past a midpoint** (`data_shift`). A 15-register shift line advances at
   CLK2. Register 7 is the midpoint x(n); register 7−k holds x(n+k) and register 7+k
   holds x(n−k). During each shift a 3-bit lag counter steps k = 0..7 at CLK4, and
   two 8-to-1 multiplexers present the pair (x(n+k), x(n−k)). When s0 enters, the other
   14 registers are cleared, so the previous range cell's samples never pair with the
   new one. Every time index of the group passes the midpoint in 24 shifts, which
   gives 24 × 8 = 192 pairs per range cell.
3. **Cross-multiplication** (`cmult`): p = x(n+k)·conj(x(n−k)), 17 bits per part.
4. **Summation over time** (`kernel_acc`). Eight accumulators form
   SR(k) = Σn x(n+k)·x\*(n−k) for k = 0..7. The first product of a group restarts each
   sum. At the last product the sums move to an output buffer, so the next range cell
   can start at once.
5. **Hermitian completion**. The kernel goes to the FFT as 16 serial points:
   SR(0)…SR(7), 0, conj(SR(7))…conj(SR(1)). This uses SR(16−k) = conj(SR(k)). Only
   half the lags are ever multiplied, and the FFT output is real up to rounding.

The FFT then gives SWVD(m) = |(1/16) Σk SR(k) e^(−j2πkm/16)|. Because of the
interpolation, a target at Doppler f·Fr lands in bin 16·f. The simulator's target at
0.5 Fr lands in bin 8, weather clutter at 0.25 Fr in bin 4, and ground clutter in
bin 0.

### FFT and magnitude

`fft16` is an iterative radix-2 decimation-in-time FFT. Points are loaded in
bit-reversed order. One butterfly runs per CLK4 strobe (4 stages × 8), with Q14
twiddles. Each stage halves its results, which applies the 1/16 of the definition and
keeps every value within 21 bits. The result is held until **230 master cycles
(5.75 µs) after the start point**, then sent out in bin order, one bin per CLK3 strobe.
The first bin therefore appears 230 to 237 cycles after the start. Computing takes
about 190 cycles, so the fixed latency is always met.

`magnitude` computes floor(√(re² + im²)) with an unrolled digit-by-digit square root in
one clock cycle.

### Corner turn (`data_arrange`)

The magnitudes arrive range-major: 16 bins for range 0, then 16 bins for range 1, and
so on. The CFAR needs each bin's profile along range. Two RAMs of 512 × 21 bits work
in ping-pong:

- A write counter stores word i of a CPI at address i, which is range·16 + bin, in
  the write bank.
- When word 511 is written, the banks swap and the read side starts on the bank just
  filled.
- The read counter steps range fastest and bin slowest (address = range·16 + bin), one
  word per CLK5. Every 32 successive outputs are therefore one bin's range profile.

`rd_tick` pulses for every read slot, even when nothing is being read, so the CFAR can
flush its window after the last bin.

### CFAR (`cfar`)

An 11-cell window shifts with every read slot. Its centre is the cell under test, with
one guard cell on each side and four reference cells beyond each guard. The noise
estimate is the sum of both reference windows. Near either end of the 32-cell profile,
only one window lies inside the profile; that window's sum is doubled. A cell is
declared a target when CUT · 128 > noise · ALPHA_X16, i.e. CUT > 4 × mean with the
default ALPHA_X16 = 64. Each decision is output with its range, bin, CUT value and
noise sum.

## Real-time budget and the overrun flag

While one CPI is being acquired, the previous one is meant to be thresholded. The
filter bank keeps up easily: a range cell gives it 768 cycles, and it needs about 360
(FFT latency 230 + 16 outputs × 8). The CFAR read side does not keep up. Reading
512 words at 384.6 kHz takes 53,248 cycles, more than twice the 24,576-cycle CPI. If
CPIs follow each other back to back, a CPI completes while the previous one is still
being read. `data_arrange` then pulses `overrun` and restarts the read on the newest
CPI. The CFAR decisions for the interrupted CPI are lost.

A CPI is processed completely when the next one starts at least about 54,000 cycles
later. The simulator's `run` input supports this: `run` is sampled only at a CPI
boundary, so dropping it lets the current CPI finish and then pauses the simulator.
Setting `DIV5` to 47 or less (851 kHz or faster) makes back-to-back CPIs real-time.

## The radar signal simulator

`radar_sim` holds one CPI of I and Q samples, range-major (address = range·8 + pulse),
so that eight successive reads give the eight pulses of one range cell. An 8-bit
address counter reads one sample per CLK1 during the counting phases and stops during
the 4 hold-on phases, which output zeros. The contents are computed at elaboration time
from integer formulas rather than stored as a table:

- target: amplitude 48 at range 12, phase advancing by π per pulse (0.5 Fr);
- weather clutter: amplitude 12 at ranges 20–31, phase advancing by π/2 per pulse
  (0.25 Fr);
- ground clutter: +20 on I and Q at ranges 0–5 (0 Hz);
- noise: nz(a, s) = (((37a + s)·53) mod 256) div 32 − 4, with s = 11 for I and
  s = 101 for Q.

These are parameters of `radar_sim` (`TGT_RANGE`, `TGT_AMP`, `WX_FIRST`, `WX_AMP`,
`GND_LAST`, `GND_AMP`), passed through by `mtd_swvd_top`. To process other data, replace the module with real ADC samples
in the same order and timing.

## Where this design follows its source and where it chooses

The following come from the published design: the block structure; the five clock
rates; the 8-count/4-hold grouping; the 32 × 8 CPI with 8-bit samples; 15 shift
registers with two 8-to-1 multiplexers and a 3-bit lag counter; 17-bit products; the
Hermitian completion of the 16-point kernel; the 16-point FFT and its 5.75 µs latency;
the two-RAM ping-pong corner turn with bin-major reading; and a cell-averaging CFAR with
one guard cell on each side of the test cell.

The following are choices of this implementation:

- Clock-enable strobes in one clock domain instead of five divided clock nets.
- The simulator scene. The original data were generated offline and are not
  available; the formulas above reproduce its ingredients.
- Own equivalents of the two vendor cores (complex multiplier and FFT). The FFT
  scales by 1/2 per stage and holds its result to reach the fixed latency.
- Word widths after the multiplier (21 bits), RAM width, and the square-root method.
- CFAR window length (4 + 4), threshold factor (4) and edge handling.
- The `run` control and the `overrun` flag.
- The 3-pulse canceller that can precede an MTD filter bank is not included: the
  hardware chain processes the eight samples of each range cell directly.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_synchronizer` | strobe periods, nesting, 8/4 group pattern |
| `tb_radar_sim` | every ROM word against the scene formula, hold-on zeros, run stop/restart |
| `tb_interpolator` | sample/zero slot order |
| `tb_data_shift` | every (x(n+k), x(n−k)) pair of random groups, group clear, tags |
| `tb_cmult` | a·conj(b) including extreme operands |
| `tb_kernel_acc` | lag sums and Hermitian serialisation |
| `tb_fft16` | against a floating-point DFT (±8 LSB), latency 230–237 cycles |
| `tb_magnitude` | exact integer square root |
| `tb_data_arrange` | bin-major read order, bank swaps, overrun and restart |
| `tb_cfar` | window sums, edge rule and decisions against a reference |
| `tb_mtd_swvd_top` | whole processor at default parameters (see below) |
| `tb_two_targets` | two targets in one range cell (see below) |

`tb_mtd_swvd_top` checks the whole processor against a floating-point reference of the
SWVD computed from the scene formula. It runs about 300,000 cycles in three phases:

1. One CPI, then the simulator stops.
2. One more CPI, which goes to the other bank.
3. Two back-to-back CPIs, which must raise `overrun` exactly once.

Along the way it checks:

- every FFT output and every arranged word against the reference (±8 LSB);
- that the arranged words repeat exactly from CPI to CPI;
- every CFAR decision against a CA-CFAR recomputed on the arranged words;
- the FFT latency of every frame.

It also counts the mechanisms and fails if one never occurs: hold-on periods, Hermitian
points, both banks, stop/restart, detection of the target at range 12 / bin 8,
detections with a one-sided window, and overrun.

`tb_two_targets` shows the property that motivates the SWVD. It places two equal
targets in range cell 12, at 2/8 and 4/8 of the PRF, by moving the simulator's
0.25 Fr component onto the target's cell. A Wigner-Ville distribution taken at a
single time index would show a cross term between them, in bin 6, larger than either
target. The testbench computes that for comparison. On the processor's FFT output,
bins 4 and 8 come out near 9,300 and bin 6 stays below 5 % of them.

With Verilator 5, for example:

```
verilator --binary --timing -Irtl rtl/mtd_pkg.sv rtl/*.sv tb/tb_mtd_swvd_top.sv \
          --top-module tb_mtd_swvd_top
./obj_dir/Vtb_mtd_swvd_top
```

`mtd_pkg.sv` must come first; the file order of the others does not matter. The
full-system run takes well under a second.

## Files

- `rtl/mtd_pkg.sv`: widths, sizes, complex types, lag tag
- `rtl/synchronizer.sv`, `rtl/radar_sim.sv`, `rtl/interpolator.sv`,
  `rtl/data_shift.sv`, `rtl/cmult.sv`, `rtl/kernel_acc.sv`, `rtl/fft16.sv`,
  `rtl/magnitude.sv`, `rtl/data_arrange.sv` (with `rtl/dpram.sv`), `rtl/cfar.sv`:
  the blocks
- `rtl/mtd_swvd_top.sv`: the processor
- `tb/tb_*.sv`: one testbench per block, the system test and the two-target test

## Known limits

- At the published CLK5 rate, back-to-back CPIs are not processed in real time (see
  above).
- The FFT rounds and truncates at every stage. Outputs agree with an exact DFT to
  within a few LSBs of the 21-bit word.
- Sizes are fixed by the package: 8 pulses, 16 bins, 32 range cells. `fft16` is
  written for 16 points only.
- The design has not been mapped to an FPGA here, so its resource use has not been
  measured.
