# A digitally controlled PLL that measures frequency by counting

This is SystemVerilog for a clock-synthesizer PLL whose phase detector is
replaced by a counter. It follows the architecture of the paper "A Digitally
Controlled Phase-Locked Loop With a Digital Phase-Frequency Detector for
Fast Acquisition". Every fundamental cycle, the loop counts how many VCO
periods fit into one reference period. It then corrects the VCO control
code by a multiple of the counting error. The counter gives the frequency
error directly. So when the loop gain is 1, the frequency settles in a
single update, however far the VCO starts from the target. A charge-pump
PLL would instead need time roughly proportional to the initial frequency
error. After that, a short binary search with a halving gain removes the
error that is smaller than one count.

The loop filter, the detector and the sequencing are ordinary synchronous
logic (`dcpll_core`). The DAC and the ring oscillator are analog in
silicon; here they are behavioural models, so that the whole loop can be
simulated (`dcpll_top`).

Reference operating points: REF = 25 MHz. With N = 32, VCLK = 800 MHz and
OUT = 400 MHz. With N = 16, VCLK = 400 MHz and OUT = 200 MHz. The initial
gain is 32.

## The fundamental cycle

One loop iteration takes two REF periods (`timing_gen`):

| REF period | phi1 / phi2 | VCO | what happens |
|---|---|---|---|
| measure | high | running, started in phase with REF | the detector counts VCLK pulses |
| update | low | held in reset (until full lock) | counter reloaded with N+1 |

The REF rising edge that ends the measure period is the **update edge**. The
count is complete and stable at that moment. On that edge the lock
indicator, the gain register and the DAC code register all take their new
values. The DAC code therefore settles during the update period, while the
VCO is stopped. The VCO then restarts with the new code, aligned with the
next measure period.

The VCO is reset at the start of every measurement so that each count
begins at a known phase. Without this, the count of pulses in a window
would depend on where the window happened to fall. Once acquisition is
complete (`full_lock`), the reset stops and the VCO runs freely.

After reset, phi2 stays high until the first REF edge and then goes low
for one REF period. This gives the counter a load edge before the first
measure period. The first measure period starts on the second REF edge
after reset is released, and the third edge is the first update edge.

## Measuring frequency by counting (the DPFD)

The detector (`dpfd`) has three parts: a sampler, a 6-bit down-counter and
an output mask.

- **Sampler** (`dpfd_sampler`). Node X follows VCLK while phi1 is high. It
  holds its level when phi1 falls and is cleared to 0 while phi2 is low. In
  silicon this is a pair of tristate inverters plus a cross-coupled latch
  that forces X to a rail, which avoids metastability. Here it is a latch
  with an asynchronous clear. The latch is the circuit, not an accident.
- **Down-counter** (`dpfd_counter`). It loads N+1 while phi2 is low and
  decrements on each rising edge of X. The VCO stops with its output high.
  So when the window opens, X jumps from 0 to 1, which counts one extra
  edge. The +1 in the preload cancels that edge. If REF encloses M VCLK
  periods, the counter ends at **N − M**.
- **Mask** (`dpfd_mask`). This is explained under phase acquisition below.

N − M is proportional to the frequency error: N − M ≈ (N/ω_REF)(ω_REF −
ω_OUT). Near lock it carries a quantisation error ε between −1 and 1. At the
target frequency the count is either N or N − 1, depending on the sub-period
timing:

- 0 means VCLK is slightly fast (OUT leads REF);
- 1 means VCLK is slightly slow (OUT lags REF).

The counter has 6 bits, and its value is read as two's complement. The
preload of 33 for N = 32 wraps modulo 64, but the final value is still
correct as long as N − M is between −32 and 31. Over the VCO range
(57.2–934 MHz, so M = 2…37) that holds for both reference settings.

## Loop gain and the accumulator

The loop filter (`pi_controller`) is a barrel shifter, an adder and a
10-bit register. On each update edge:

    DCC ← clamp(DCC + FDO · Gn, 0, 1023)

Gn is a power of two, given as a one-hot word (`gain_t`). Bit i set means
×2^i, so `100000` is gain 32 and `000001` is gain 1. A shifter instead of a
multiplier means the loop gain can only be set within a factor of √2 of the
ideal value.

The closed-loop response is H(z) = K z⁻¹ / (1 − (1 − K) z⁻¹), where K is the
DAC-to-frequency gain times Gn, normalised to f_REF:

- K = 1 settles in one update;
- K between 0 and 2 is stable;
- a gain error e shrinks the remaining error by |e| per update.

With the VCO model used here, one DAC step is 0.857 MHz. Unity gain would
therefore need Gn = 25 / 0.857 ≈ 29.2. The nearest power of two is 32,
which gives a gain error of about 10 %.

`DCC_RESET` (286) is the code after reset. With the VCO model it gives a
free-running VCO frequency of about 302 MHz.

## Two modes: frequency acquisition, then successive approximation

`lock_detect` keeps `lock_ind` high during **frequency acquisition**. In
this mode the FDO is used as it is and the gain is the programmed initial
gain.

The first update whose raw reading is 0 or 1 switches the loop to **phase
acquisition**, and `lock_ind` falls. It stays low until `acq_restart` or
reset. The mode signal is combinational, so the update that detects the
switch is already a phase-mode step. From that point on:

- the mask turns a reading of 0 into −1, so every step is either +1
  ("too slow") or −1 ("too fast");
- `gain_controller` halves the gain at every update: 16, 8, 4, 2, 1. The
  gain then stays at 1.

This is a binary search on the sub-count error ε: ε ≈ Σ 2⁻ⁱ·Xᵢ. With an
initial gain of 32 it takes five updates. `full_lock` rises after the
update that used gain 1.

A simulated acquisition to 800 MHz from the 302 MHz free-running
frequency (updates are 80 ns apart):

| update | mode | raw N−M | FDO | Gn | DCC after |
|---|---|---|---|---|---|
| 1 | freq | 20 | 20 | 32 | 926 |
| 2 | freq | −2 | −2 | 32 | 862 |
| 3 | phase | 1 | +1 | 16 | 878 |
| 4 | phase | 0 | −1 | 8 | 870 |
| 5 | phase | 0 | −1 | 4 | 866 |
| 6 | phase | 1 | +1 | 2 | 868 |
| 7 | phase | 0 | −1 | 1 | 867 |

So the loop spends 2 fundamental cycles in frequency acquisition and 5 in
phase acquisition: 14 REF periods, against 16 measured on the original
chip. The VCO then runs within one DAC step (about 0.1 %) of 800 MHz.
Starting from the same free-running frequency with N = 16, the loop spends
one frequency cycle and five phase cycles: 12 REF periods, the same as the
chip.

### Choosing the initial gain

The initial gain does two jobs. It sets how fast the frequency converges
(the error shrinks by |1 − K| per update). It also sets the reach of the
successive approximation: the halving steps add up to at most ±Gn DAC
steps. Frequency acquisition can end anywhere within about two REF counts
of the target, so the search only closes that gap when Gn is close to one
REF count's worth of DAC steps (K ≈ 1). With the VCO model, acquiring
800 MHz from 302 MHz gives:

| Gn | K | frequency updates | phase updates | final VCLK |
|---|---|---|---|---|
| 32 | 1.10 | 2 | 5 | 800.0 MHz |
| 16 | 0.55 | 4 | 4 | 797.5 MHz |
| 8 | 0.27 | 8 | 3 | 790.0 MHz |
| 4 | 0.14 | 18 | 2 | 790.0 MHz |

Set `init_gain` to the power of two nearest to f_REF divided by the VCO
gain per DAC step.

## Analog parts, as models

- `dac_decoder` (synthesizable). This is the row/column decoder of one
  5-bit sub-DAC. Its 32 equal cells sit in four rows of eight. Code c
  switches on the first c cells in row order, a thermometer code. Raising
  the code only adds cells, which keeps the DAC monotonic.
- `dac` (behavioural, `real` output). Two decoders feed an MSB sub-DAC
  weighted ×32 and an LSB sub-DAC. The output is
  VC = VDD − V_T·ln(n)·(R_L/R_B)·DCC. It depends on a resistor ratio, not on
  an absolute resistor. The constants are chosen so that codes 0–1023 span
  2.0 V below VDD = 3.3 V. Cell mismatch is not modelled. Neither is the
  MSB/LSB scaling error, which the loop would correct anyway.
- `vco` (behavioural). While reset is held, the ring is made non-inverting
  and the output stops high. On release it stays high for half a period,
  then oscillates. Its frequency is linear in VDD − VC between 57.2 and
  934 MHz. It reads the control voltage again every half period. Jitter is
  not modelled.
- `out_divider` (synthesizable). A toggle flop: OUT = VCLK / 2.

The PTAT bias generator and the replica bias of the ring oscillator have no
logic function. They only appear as constants in the two models.

## Interface of `dcpll_top`

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | reference clock REF |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `n_mult` | in | 6 | multiplication factor N (VCLK = N·REF) |
| `init_gain` | in | 6 | one-hot initial gain (`6'b100000` = 32) |
| `acq_restart` | in | 1 | one REF cycle high: start a new acquisition, e.g. after changing N |
| `out_clk` | out | 1 | synthesized clock, VCLK/2 |
| `vclk` | out | 1 | VCO clock |
| `dcc` | out | 10 | DAC code (loop-filter state) |
| `fdo` | out | 6 | masked detector output of the last measurement |
| `gn` | out | 6 | gain in use |
| `lock_ind` | out | 1 | high during frequency acquisition |
| `full_lock` | out | 1 | acquisition complete |

`dcpll_core` has the same controls. It takes `vclk` as an input and gives
`vco_rst_n` as an output, and it is the part to synthesize. Assert
`acq_restart` whenever `n_mult` changes, so that the new target is acquired
at full gain.

## Where this departs from, or fills in, the original design

- **Gain shift edge.** The original shifts the gain register on the rising
  edge of phi1. Here it shifts on the update edge, together with the mode
  switch. As a result, the update that detects lock already uses half the
  initial gain. This reproduces the original's "five phase cycles starting
  from gain 32".
- **Mode switch condition.** The original says phase acquisition starts
  when the detector output "decreases to 1". Here a reading of 0 or 1
  triggers it. This also covers a VCO that approaches from above or lands
  exactly on N.
- **Lock indicator polarity.** The original describes it two ways. Here it
  is 1 during frequency acquisition and 0 afterwards.
- **phi1/phi2.** The exact waveforms, the start-up sequence and the use of
  phi2 as an asynchronous counter load are this design's choices.
- **Chosen values.** The DAC code clamp, the reset code 286, the asynchronous
  reset and `acq_restart` are this design's additions.
- **Model laws.** The linear VCO law and the DAC constants are assumptions.
  With them, the 800 MHz acquisition takes two frequency cycles where the
  chip needed three, most likely because the chip's estimated gain error (11.25 %) was
  larger than the model's.
- **After full lock.** The VCO is no longer reset, and the detector keeps
  running with gain 1 and ±1 steps. The count then depends on the VCO's
  phase when the window opens, so the code wanders by a few steps. In
  simulation the frequency stays within 0.2 % of the target.

## Simulating

Everything is plain SystemVerilog-2017; each testbench prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/dcpll_pkg.sv tb/tb_dcpll_top.sv --top tb_dcpll_top
    ./obj_dir/Vtb_dcpll_top

`tb_dcpll_top` runs the whole loop with default parameters and takes well
under a second. It runs three acquisitions:

- 800 MHz from the free-running VCO;
- 400 MHz from the free-running VCO;
- 800 MHz again from lock at 400 MHz, through `acq_restart`.

For each acquisition it checks the following:

- the number of frequency-acquisition and phase-acquisition cycles;
- the REF-period budget;
- the VCLK frequency, measured by counting edges, within 0.5 %;
- OUT = VCLK/2.

It also checks that each mechanism occurred:

- frequency-mode steps;
- mode switches;
- masked −1 steps;
- gain halvings;
- the gain sticking at its minimum;
- the free-running VCO after full lock;
- restart.

`tb_dcpll_gain_sweep` repeats the 800 MHz acquisition with gains 32, 16, 8
and 4. It checks the number of frequency updates against the |1 − K|ⁿ
estimate, and the number of phase updates against log2(Gn).

Every other module has its own testbench, `tb/tb_<module>.sv`, which it
checks against independently computed values. In `tb_dcpll_core`, the
digital core runs open loop: the bench drives VCLK at chosen frequencies
and compares every update with an integer model of the loop.

The files in `rtl/` are one module or package each. `dcpll_pkg` holds the
shared widths and types and must be compiled first. Time units are 1 ns
with 1 fs precision, so that VCO periods are resolved well below one DAC
step.
