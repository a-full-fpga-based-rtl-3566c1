# Adaptive LMS look-up-table predistorter for a power amplifier

A power amplifier (PA) compresses and phase-shifts large signals. A digital
predistorter (DPD) placed before it applies the inverse distortion so that
the cascade DPD + PA behaves linearly. This design does the predistortion
*and* its adaptation entirely in logic, while transmission continues:
adaptation is switched on and off with write enables. Nothing has to stop to
go into a training mode, and no host computer computes the coefficients.

The predistorter is memoryless. Its function is one complex gain per input
amplitude, stored in a look-up table (LUT):

    y(k) = x(k) · conj( G(|x(k)|) )                       (basic cell)
    G_new(|x(k)|) = G_old(|x(k)|) + mu · x(k) · conj(e(k))   (LMS update)

## The four cells and how the inverse is found

Everything is built from one unit: the **basic predistortion cell (BPC)**, a
gain LUT in a dual-port RAM addressed by |x|, followed by a complex
multiplier. Four BPCs are used, each in a different role:

| cell  | input          | output         | LUT written by                          | role |
|-------|----------------|----------------|-----------------------------------------|------|
| BPC#1 | Tx_Data        | Tx_DPD → DACs  | copy of BPC#4's updates (`we`)          | the predistorter in the signal path |
| BPC#2 | Tx_DPD         | PA model out   | its own LMS, reference Rx_Data (`we_pa`) | identifies the PA |
| BPC#3 | Tx_Data        | Rx_MOD         | copy of BPC#2's updates (`we_pa`)       | PA model applied to the undistorted signal |
| BPC#4 | Rx_MOD         | Tx_MOD         | its own LMS, reference Tx_Data (`we_pd`) | learns the inverse of the PA model |

The chain is:

1. BPC#2 and its LMS learn the PA: the gain that maps Tx_DPD (what the PA
   received) to Rx_Data (what came back). Each new gain is also written into
   BPC#3.
2. BPC#3 feeds the *undistorted* Tx_Data through this PA model. Its output
   Rx_MOD is what the PA would give without predistortion.
3. BPC#4 and its LMS learn to map Rx_MOD back to Tx_Data. That is a
   post-inverse of the PA. For a memoryless PA the post-inverse equals the
   pre-inverse, so each BPC#4 update is copied into BPC#1.

The adaptive loops never include the real PA's latency: both LMS blocks see
cells whose output appears three cycles after their input. The real PA enters
only through the measured Rx_Data.

Every copied gain goes into the LUT entry where the cell that computed it
read its old gain. BPC#3 is written at BPC#2's update address (an |Tx_DPD|
bin). BPC#1 is written at BPC#4's update address (an |Rx_MOD| bin). BPC#1
then reads that bin with |Tx_Data|. This is why the post-inverse works as a
pre-inverse: a BPC#4 bin at PA-output amplitude A holds the gain that makes
the PA deliver amplitude A.

## Cell pipeline and LMS timing

This is the part to understand before changing anything. One complex sample
enters per clock. For sample x(k), entering in cycle k (`rtl/bpc.sv`):

| cycle | event |
|-------|-------|
| k+1   | port-A address = quantised \|x(k)\| (registered) |
| k+2   | `old_gain` = G(\|x(k)\|) out of the RAM; x(k), delayed by 2, meets it |
| k+3   | y(k) = x(k)·conj(G) out of the registered multiplier; `x_d3` = x(k) (LMS IN_DATA) |
| k+4   | LMS: e(k) = reference − y(k) registered (`lms_error`) |
| k+5   | LMS: G_new registered; `upd_addr` = \|x(k)\| from x delayed by 4, registered |
| end of k+5 | G_new written through port B at `upd_addr` |

The delays of 2, 3 and 4 samples on x are the ones the architecture uses.
Taking the magnitude unit, the RAM read and the multiplier as one register
each makes them line up exactly as in the table.

Consequences:

* **Stale reads.** Samples k+1 … k+4 may fall in the same LUT bin as sample
  k. They then read the gain from before k's update, and each of their
  updates overwrites k's. Each write is still a valid LMS step from a slightly
  older gain, so this slows convergence for slowly moving signals but does
  not bias the result.
* **References must be delayed.** The reference of each LMS must belong to
  the same sample as the cell output. The top therefore delays Rx_Data by 3
  (for BPC#2) and Tx_Data by 6 (for BPC#4: 3 in BPC#3, then 3 in BPC#4).
* `mu_shift` is read by the update stage. Treat it as a quasi-static
  setting.
* The RAM is read-first. When both ports hit the same address in one cycle,
  port A returns the old gain.

## Number formats and the LMS arithmetic

Both formats are this design's choice; they live in `rtl/dpd_pkg.sv`.

* Samples: 16-bit I and Q, Q1.15 (full scale [−1, 1)), type `cplx_t`.
* Gains: 18-bit I and Q, Q2.16 (range [−2, 2)), type `gain_t`. Each partial
  product fits one 18×18 multiplier. All LUTs start at 1 + 0j.
* Complex multiplier: full-precision products, rounded half-up, saturated to
  16 bits.
* LMS: e has 17 bits. x·conj(e) is formed at full width (30 fraction bits)
  and shifted right by 14 + `mu_shift` with rounding, so mu = 2^−mu_shift.
  The sum is saturated to Q2.16. The effective step grows with |x|², so
  low-amplitude bins converge more slowly.
* LUT address: |x| ≈ max(|I|,|Q|) + 3/8·min(|I|,|Q|). This is exact within
  about 7 % and needs only adds and shifts. The range [0, 1) of full scale is
  spread over the 2^ADDR_W entries (default 256). Larger magnitudes use the
  last entry. The same function indexes reads and writes, so the error only
  blurs bin boundaries.

## Return path conditioning

Before Rx_Data can be compared with Tx_DPD it needs three corrections:

* **Offset cancellation** (`offset_cancellation`). Removes the DC offset of
  I and Q with a recursive mean, est += (x − est)/2^16. `offset_en` low
  freezes the estimate. The time constant is about 65 k samples: long enough
  that the wander from the signal itself stays around ±100 LSB.
* **Time alignment** (`time_alignment`). Delays Tx_DPD by `align_delay`
  samples and Tx_Data by `align_delay` + 3 (BPC#1's latency). Each uses a
  circular buffer of up to 63 samples of delay.
  Set `align_delay` = loop delay from `dac` to `adc` + 1 (the offset
  canceller's register). The design does not measure the delay.
* **Amplitude and phase correction.** Rx_Data is multiplied by `corr_coef`
  (Q2.16, plain product, not conjugated). Set it to the inverse of the return
  path gain measured while the PA is driven in its linear region.

Choice of `corr_coef` and the target gain: BPC#4 can only train bins that
Rx_MOD reaches. With the coefficient normalised to the small-signal gain, a
compressing PA's model output never reaches the peak of Tx_Data. The top
LUT entries of BPC#1 then stay untrained. Scale `corr_coef` by 1/G_t,
where G_t < 1 is the linear gain the linearised PA is asked for, so that the
compressed output still spans the input range. The testbench uses G_t = 0.88.

## Operating sequence

1. Reset; select the source (`tx_sel` = 1 for the internal 16-QAM generator,
   0 for `tx_ext`); set `offset_en` = 1, `align_delay` and `corr_coef`.
   After configuration all LUTs hold unity, so `dac` = Tx_Data delayed by 3
   cycles. Reset clears the pipelines and the offset estimate but not the
   LUTs: learned gains survive a reset.
2. Raise `we_pa` and wait for `lms_err_pa` to settle: the PA model has been
   identified.
3. Raise `we_pd` and `we`: BPC#4 learns the inverse and BPC#1 follows.
4. Drop the enables to freeze the predistorter, or keep them high to track
   drift. Each enable can change in any cycle while data flows.

`mu_shift_pa` = `mu_shift_pd` = 1 worked in simulation. With plain LMS the
step scales with |x|², so the lowest-amplitude bins are the last to settle.
In the test, after 1.07 M samples of adaptation, the gain of the lowest
amplitude group is still 2 % off target. What is left of the residual sits
there and at the peak, where Rx_MOD barely reaches.

## Test source

`signal_generator` produces 16-QAM. Symbols come from a PRBS
x^23 + x^18 + 1, Gray-coded per rail to {−3, −1, 1, 3}·AMP (AMP = 5400, peak
about 0.7 of full scale), with SPS = 8 samples per symbol. Pulse shaping is
two cascaded moving sums of 8 samples each, a quadratic B-spline spanning
three symbols. The shaping matters: a linearly interpolated signal visits too
few distinct amplitudes, and the bins BPC#4 trains (at |Rx_MOD|) then miss
the bins BPC#1 reads (at |Tx_Data|).

## Verification

Each module has a self-checking testbench in `tb/` that compares it against
an independent model written in the testbench. Every one ends with a line
`TB_RESULT checks=N failures=M`.

`tb_dpd_top` runs the whole design at its default parameters. The loop is
closed through `tb/rf_model.sv`, a behavioural stand-in for the DACs,
modulator, PA, demodulator and ADCs:

* PA AM/AM r/(1 + 0.25r²) and AM/PM 0.4r² rad;
* return path gain 0.8 and phase 0.5 rad;
* DC offset (300, −200);
* loop delay 6 cycles.

The test runs five phases:

1. Frozen unity LUTs. `dac` is checked exactly against Tx_Data three cycles
   earlier.
2. PA identification. The LMS error power falls from 2.9·10⁶ to 9.5·10³
   LSB².
3. Full adaptation.
4. Hot disable. Every `dac` sample is checked exactly against
   Tx_Data·conj(G) from BPC#1's table. The PA output's nonlinear error is the
   residual after the best complex linear gain. It falls from −26.3 dB
   without predistortion to −41.3 dB; the test requires at least 6 dB.
   Over eight amplitude groups, the spread of the PA gain falls from 10.2 %
   to 3.3 % (at least 2× required). The spread of its phase falls from
   0.18 rad to 0.03 rad (at least 4× required).
5. External source, checked the same exact way.

The test also counts that each mechanism occurred: offset removal, alignment,
writes of each kind, hot enable and disable, frozen operation and the
external source. It simulates about 1.1 M cycles in a few seconds.

Simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -y rtl -y tb rtl/dpd_pkg.sv tb/tb_dpd_top.sv --top-module tb_dpd_top
    ./obj_dir/Vtb_dpd_top

Replace `tb_dpd_top` with any other `tb_*` to run a unit test.

## What is not here, and where this departs from the architecture

* The analog side is outside the logic: DACs, ADCs, I/Q modulator and
  demodulator, local oscillator and PA. `dac` and `adc` are ports;
  `tb/rf_model.sv` is a simulation-only model, not a synthesizable block.
* The I/Q packing to and from the converters is plain wiring in `dpd_top`.
* Only one BPC is used for predistortion, so the design is memoryless. PAs
  with memory effects would need parallel cells fed with delayed inputs,
  which are not built.
* In the original block scheme BPC#3's write address is drawn from |Tx_Data|
  delayed by 4. Here BPC#3 is written at BPC#2's own update address, so that
  each identified gain lands in the amplitude bin it was measured for.
* This design's own choices: all word widths, the LUT depth, the magnitude
  approximation, the register stages, the LMS rounding and saturation, the
  power-of-two step size, the offset estimator, the run-time (not estimated)
  delay and correction coefficient, read-first RAM, the test signal, and the
  `tx_sel`/`tx_ext` input.
* No timing closure has been attempted. At one sample per clock, a 100 MS/s
  signal needs a 100 MHz clock. The critical paths are the complex multiplies
  (16×17 bits in the LMS update stage, 16×18 bits in the cell multiplier).
