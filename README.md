# Pipelined 12-bit, 100 MS/s AD converter with digital post-correction

A pipelined converter splits a conversion into many small steps. Each of
its 16 identical stages resolves only 1.5 bits (three codes), subtracts
the matching coarse level from its input and passes the amplified
remainder (the *residue*) to the next stage. All stages work at once on
successive samples, so one sample completes every clock period.

The catch is accuracy. Each stage's gain, comparator levels, DAC levels
and offset all carry errors. If every stage's code is given its ideal
binary weight, those errors appear directly in the result. This design
does not assume ideal weights. Instead it **measures** the real weight
of every code of every stage once, with a calibration procedure, and
stores the measured values in an on-chip correction unit. That unit then
forms the output as a plain sum of the weights selected by the stage
codes. The 1.5-bit redundancy keeps the residues in range even when the
comparators are off by a lot. Measured weights absorb the gain and DAC
errors. What remains is the amplifier's cubic distortion and the
rounding of the weights.

The RTL contains three parts:

| Part | Module | Nature |
|---|---|---|
| Analog pipeline: 16 stages, each with a sub-ADC, switch matrix/sub-DAC and sample-and-hold amplifier (SHA) | `analog_pipeline`, `basic_block`, `sub_adc`, `switch_matrix`, `sha`, plus `switch_logic` | behavioural model with real-valued voltages; `switch_logic` is plain logic |
| Correction logic: one cell per stage | `correction_logic`, `slicefirst`, `sliceother`, `mux16` | synthesizable |
| Calibration / measurement unit, intended for an FPGA next to the converter | `measurement`, `calib`, `lastst`, `calst`, `controller`, `counter`, `result`, `store` | synthesizable |

The top module `pipelined_adc` wires all three together. Shared
constants and types are in `adc_pkg`.

## How a sample becomes a number

### One stage

A stage sees a differential input `Vin` in the range ±Amax (Amax = 0.8 V).

- **Comparators.** Two comparators at −Amax/3 and +Amax/3 produce the
  thermometer code `d1d0`: `00` below the lower level, `01` between,
  `11` above.
- **Residue.** The SHA outputs `A·(Vin − V_DAC) − A3·(Vin − V_DAC)³`.
  `V_DAC` is −2/3·Amax, 0 or +2/3·Amax for the three codes.
  - The nominal gain A is 2. The model uses the closed-loop gain of the
    designed amplifier, A = 1.8647, and its cubic term A3 = 0.033 V⁻².
- **Why the code may be wrong.** The comparator levels sit a third of
  the range away from the points where the residue would leave ±Amax.
  A comparator error of up to about Amax/6 therefore still leaves a
  residue that the following stages can convert. That is the
  redundancy, and the reason for "1.5 bits".

### Clocking

Two clock pairs run each stage. In the table, Ts is the sample period
(10 ns at 100 MS/s).

| Time in period | Event |
|---|---|
| 0 | CLK1A falls: stages 0, 2, … enter *hold*; CLK2A rises: stages 1, 3, … *sample* |
| 0.3 Ts | CLK2B falls: sample moment of stages 1, 3, … |
| 0.4 Ts | CLK1B rises: reset of stages 0, 2, … |
| 0.5 Ts | CLK1A rises: stages 0, 2, … sample; CLK2A falls: stages 1, 3, … hold |
| 0.8 Ts | CLK1B falls: sample moment of stages 0, 2, … |
| 0.9 Ts | CLK2B rises: reset of stages 1, 3, … |

CLKA high is the sample phase. The falling edge of CLKB is the sample
moment: the SHA freezes its input and the sub-ADC latches its code.
CLKB high while CLKA is low is a short reset phase, which clears the
SHA before the next sample. CLK2A/CLK2B are CLK1A/CLK1B delayed by half
a period. A stage therefore holds its residue while its successor
samples it.

The A clocks switch on the half-period grid. The exact positions of the
B edges (0.3, 0.4, 0.8 and 0.9 Ts) are the testbench clock generator's
choice. Only their order matters: the successor's sample moment (its
CLKB falling) must come *before* the current stage's reset (its CLKB
rising). The
clock generator `tb/tb_clkgen.sv` produces exactly these waveforms. The
converter expects them as inputs; a clock generator circuit is not
part of the design.

### Correction logic

Cell *i* holds two 16-bit two's-complement weights for stage *i*:

- `w0` is used for code `00`.
- `w2` is used for code `11`.
- Code `01` contributes zero.

Each cell adds its selected weight to the partial sum from cell *i*−1
and registers the result on the falling edge of its stage's CLKA. That
is the moment the stage's code is valid, and half a period after the
previous cell registered. The partial sum thus travels down the cells
in step with the sample travelling down the analog stages. The output
is

    D = Σ_i  (w0[i] if code=00, 0 if code=01, w2[i] if code=11)

D is 16 bits, signed. It appears on the last cell's output 7.7 Ts after
stage 0's sample moment, so 8 sample periods later when read on the
rising edge of CLK2A.

Weights are written serially:

- `Csel` picks the cell.
- `C01` picks the weight: 0 for `w0`, 1 for `w2`.
- `Calib` enables writing.
- `SDA` is shifted in on every rising `SCLK` edge, MSB first.

`Calib` also drives the one-hot `Cal` vector that puts the selected
analog stage into calibration mode.

### What the weights mean and how they are measured

With the last stage's weights fixed at −1 and +1, the weights of the
other stages are measured from stage 14 down to stage 0. When stage *i*
is measured, every stage after it is already calibrated.

In calibration mode, stage *i* does not sample the converter input. It
samples one of the two nominal comparator reference levels of its
sub-ADC, −V_ADC (with `C01` = 0) or +V_ADC (with `C01` = 1). Its code is also forced to `e1e0`. The rest of
the pipeline then converts the resulting residue. Four measurements
give the two weights:

| Measurement | Input | Forced code | Sign into S |
|---|---|---|---|
| b | −V_ADC | 01 | + |
| a | −V_ADC | 00 | − |
| c | +V_ADC | 01 | + |
| d | +V_ADC | 11 | − |

- **w0 = b − a.** Measurements b and a differ only in the code the stage
  claims. Their difference is exactly what code `00` must add to keep
  the output continuous at the lower comparator level. The result is
  negative.
- **w2 = c − d.** The same argument at the upper comparator level gives
  a positive result.
- **Why this works.** Both measurements of a pair use the same analog
  input, so its exact value does not matter. The comparator errors do
  not enter at all. The stage gain and the DAC levels are captured as
  they actually are.

### The calibration unit

The calibration unit runs on its own clock. In the top module this is
the input `fpga_clk`, which should be CLK2A because CLK2A rises while D
is stable. The unit is built as a set of small state machines:

- **`calib`** is the main sequence. A rising edge on `cal` raises
  `bsy`, then:
  1. pulses `Reset`, which zeroes all weights;
  2. raises `Calib` and starts `lastst`;
  3. starts `calst`;
  4. drops back to normal operation.
- **`lastst`** writes w0 = 0xFFFF into the last cell (16 one-bits),
  then w2 = 0x0001. Because the weight was just cleared, a single
  one-bit is enough for w2.
- **`calst`** is the measurement loop. For each measurement it:
  1. tells `controller` to advance;
  2. waits `DELAY` clocks so the pipeline is filled with samples taken
     under the new settings;
  3. takes 2^NSUB sub-measurements;
  4. runs `store`.
- **`controller`** steps through 60 measurement states: 15 stages × b,
  a, c, d. For each state it drives `Csel`, `C01`, `e1e0` and `m`, the
  add/subtract flag.
- **`counter`** flags when 2^NSUB sub-measurements are done.
- **`result`** is the accumulator S (32 bits for NSUB = 16). It adds D
  when `m` = 0 and subtracts it when `m` = 1. A falling edge of `m`
  clears it. The weight is S(31:16), the average.
- **`store`** acts only when `m` = 1 (after a and after d). It shifts
  S(31:16) out over `SCLK`/`SDA`, MSB first, to the cell selected by
  `Csel`/`C01`.

A full calibration at the defaults takes about 60 × 2^16 ≈ 3.94 million
clocks, about 39 ms at 100 MHz. Averaging 2^16 sub-measurements exists
to suppress noise. The analog model is noise-free, so in simulation the
average is exact after one sample, and a smaller NSUB gives the same
weights.

## The analog model

The analog model is there so the digital parts can be exercised end to
end. It does not describe circuits.

- **`sub_adc`**
  - Two real-valued comparisons.
  - A calibration multiplexer (`eIE`), which forces the code.
  - A latch that is transparent while `nLatch` is high.
- **`switch_matrix`**
  - The sub-DAC levels.
  - The switches to the four SHA capacitors. Each code drives its own
    connection pattern; `t0` selects the input, `t1`/`t2` the
    calibration references and `u0` the common-mode reset.
- **`sha`**
  - Freezes the combined capacitor voltage on the falling edge of
    `Control1`.
  - In hold, outputs `A·x − A3·x³`.
  - Outputs zero during `Control1` high and during the reset phase.
  - Settling and noise are not modelled.
- **`basic_block`**
  - Maps the stage clocks onto these controls.
  - Crosses the sub-ADC reference outputs so that `C01` = 0 selects
    −V_ADC.
- **`analog_pipeline`**
  - Chains N stages on alternating clock pairs.
  - Gives each stage fixed random deviations. The standard deviations
    are: comparator levels 0.03·Amax, DAC levels and capacitor match
    0.01, offset 0.01·Amax, gain 1 %.
  - The deviations are drawn from `SEED` by a small pseudo-random
    generator at elaboration time. A different `SEED` gives a
    different "chip".

Not modelled at all:

- the front-end sample-and-hold;
- the amplifier and switch circuits;
- the reference generators;
- the clock generator;
- thermal noise.

The converter input must be held from stage 0's sample phase to its
sample moment. The testbenches do this.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `pipelined_adc` | `N` | 16 | stages (and correction cells) |
| | `NSUB` | 16 | log2 of sub-measurements per measurement |
| | `DELAY` | 32 | clocks between a setting change and the first sub-measurement |
| | `GAIN` | 1.8647 | nominal SHA gain |
| | `SEED` | 1 | deviation seed of the analog model |
| `analog_pipeline` | `AMAX` | 0.8 | full scale (V) |
| | `A3` | 0.033 | SHA cubic term (1/V²) |
| | `SIGMA_*` | 0.03 / 0.01 / 0.01 / 0.01 | deviation sigmas: comparator / DAC / offset / gain |
| `correction_logic`, `measurement` | `W` | 16 | weight and output width |

`DELAY` must exceed the pipeline latency, about 8 periods, plus a few
clocks of margin.

## Departures and design choices

These points are this implementation's own decisions, made where the
original description leaves room.

- **Serial bus sharing.** `lastst` drives the bus until it reports
  ready. After that, `controller` and `store` drive it.
- **`result` register.** S is one 32-bit register, not two 16-bit
  halves. D is sign-extended before it is added.
- **Invalid code `10`.**
  - In the correction cell it selects w2.
  - In the switch logic it opens all DAC switches.
- **Pulse widths and state timing.** The reset pulse, `Start1`/`Start2`,
  the two clocks per serial bit in `store`, and `lastst`'s one clock per
  state were chosen here. `DELAY` = 32 is also a choice.
- **Stage numbering.** Stages are numbered from 0. The original text
  numbers them from 1, so its "odd stages on CLK1" are stages 0, 2, 4, …
  here.
- **Combined reset.** The external reset and the calibration `Reset`
  pulse are combined. The combined signal is a synchronous reset in the
  calibration unit and an asynchronous one in the correction cells.
  Verilator reports this as SYNCASYNCNET on `pipelined_adc`; it is
  intentional, since in a real system the two parts sit on different
  chips.
- **Synthesis.** `pipelined_adc` and the analog models use `real`
  signals and cannot be synthesized. The correction logic and the
  calibration unit are synthesizable on their own. Synthesize
  `correction_logic` and `measurement` as separate tops.

## Verification

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=… failures=…` and has a watchdog. Highlights:

- **`correction_logic_tb`**
  - Loads random weights serially and checks the one-hot `Cal`.
  - Feeds random codes that are valid only near each cell's own clock
    edge, so a cell on the wrong clock phase fails.
  - Checks D against a computed sum and checks the latency of 7.5
    periods from stage 0's register edge.
- **`analog_pipeline_tb`**
  - With ideal stages, reproduces a textbook 10-stage example: 0.4 V
    at Amax = 1.5 V gives codes 1 2 1 0 1 2 1 0 1 2.
  - Checks that 16 ideal stages reconstruct random inputs to within
    Amax·2⁻¹⁵.
  - Checks that the residues of the deviating default pipeline stay
    inside ±Amax.
- **`measurement_tb`** runs the calibration unit against a small digital
  model of a converter and checks the weights received over the serial
  bus.
- **`pipelined_adc_tb`** is the end-to-end test, with NSUB = 6 for
  speed. It:
  - calibrates the full converter, then checks the last-stage weights
    and the sign and stage-to-stage ratio of all weights;
  - converts a slow ramp over ±0.78 V and checks monotonicity;
  - checks the deviation from a straight line: at most 1 LSB of 12 bits;
    the result is 0.87 LSB;
  - checks the 8-period latency;
  - counts each mechanism and fails if one never happened. The
    mechanisms are last-stage programming, each of the four measurement
    kinds, stores with `m` = 0 and `m` = 1, calibration mode, normal
    conversion, and stage-0 codes that differ from ideal comparators.
- **`pipelined_adc_full_tb`** does the same at the default parameters,
  with 2^16 sub-measurements and about 3.94 M clocks. It takes about
  15 s in Verilator.

Simulate any testbench with plain Verilator:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/adc_pkg.sv tb/pipelined_adc_tb.sv --top-module pipelined_adc_tb
    ./obj_dir/Vpipelined_adc_tb

**What the results say.** With the default deviations the calibrated
converter is linear to within about 0.9 LSB at 12 bits. Without the
cubic term the error falls to about 0.3 LSB, which is the rounding of
the 16-bit weights. The SHA's third-order distortion is therefore the
limit, and the calibration cannot remove it.

**What is not verified.**

- Behaviour with noise.
- Timing of the calibration unit on a real FPGA. The original
  implementation reports about 105 MHz; this RTL has not been timed.
- The analog circuits themselves.
