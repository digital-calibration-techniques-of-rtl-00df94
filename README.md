# Digital calibration logic for 1.5-bit/stage pipelined and algorithmic ADCs

A pipelined ADC built from 1.5-bit stages makes each stage do two things:

- decide a code D ∈ {−1, 0, +1} by comparing the input with ±Vref/4;
- pass on the residue `α·Vin − β·D·Vref`.

In an ideal stage α = 2 and β = 1. Capacitor mismatch and finite op-amp gain move both away from those values. A converter that still sums the codes with binary weights then shows missing codes and steps in its transfer curve.

All the logic here has one job: find each stage's real α and β with as little extra analog hardware as possible, then compute the output as

    Dout = Σ D_k · W_k,
    W_k = β_k / (α_1 ⋯ α_k)             for a calibrated stage
    W_k = 2^-(k-NCAL) / (α_1 ⋯ α_NCAL)   for the ideal backend stages

Several ways of finding α and β are implemented. They are alternatives, and the top-level module `adc_cal_top` places them side by side, each with its own ports.

| Section | Converter | How α, β (or the weights) are found |
|---|---|---|
| J | 10 stages, 3 calibrated | Input ramp. Stages with gain above 2 get their capacitors swapped. The heights of the remaining jumps are measured and subtracted per output segment. |
| R | 10 stages, 3 calibrated | Slow input ramp. Stages are calibrated one after the other (3, 2, 1) from the samples just before and after their code changes from 0 to +1. |
| D | 12 stages, 4 calibrated | Input ramp plus an already calibrated reference converter. The weights are read directly when the code vector matches special patterns. |
| P | 12 stages, 4 calibrated | Three selectable sources (below). |
| A | 12-bit algorithmic ADC | Fixed-point iteration on a single looped stage. |
| G | 9-bit, 1 bit/stage algorithmic ADC | One conversion of 0 V with the first bit forced to 1 gives the jump heights S1..S3. |

The three sources of section P:

- **Foreground stage cycling.** The four MSB stages are rotated into a ring and fed Vref/4. The coefficients are found by fixed-point iteration.
- **Technique 1 (background).** An extra stage takes the place of one pipeline stage. Meanwhile, that stage is looped into an algorithmic converter and solved by Newton-Raphson.
- **Technique 2 (background).** Two extra stages take the place of a pair of stages. The pair is looped as a two-stage cyclic converter and solved by fixed-point iteration.

The analog parts are not in the RTL: residue amplifiers, comparators, sample-and-holds, the ramp integrator and the switches. They sit outside, behind the ports. The testbenches replace them with real-valued models (`tb/adc_model_pkg.sv`).

## Getting α and β from two conversions

The coefficient-based techniques (R, P and A) all rely on one trick. Feed a stage Vcal = Vref/4 twice:

1. once with its code forced to 0, giving residue `α·Vref/4`;
2. once forced to +1, giving residue `α·Vref/4 − β·Vref`.

The stages after it digitise both residues. In Vref units, the digital residues Dres0 and Dres1 then give

    α = 4 · Dres0        β = Dres0 − Dres1

(`alpha_beta_update`). A residue is estimated from the codes of the stages that follow, using their own coefficients. The estimate runs from the last code back, one divider step per stage:

    r ← (β_s·D + r) / α_s

When those later stages are the calibrated stages themselves, the coefficients used to estimate a residue are the ones being sought. Two different answers to this loop are implemented:

- **Fixed-point iteration.** This covers stage cycling (`fpi_cal_ctrl`), the algorithmic converter (`fpi_algo_cal`) and technique 2. Start from α = 2, β = 1. Recompute all coefficients from the stored code sets, and repeat until no coefficient moves by more than 2 LSB (2^-16). With ±10 % mismatch and 52 dB op-amp gain this takes 3 to 10 passes.
- **Newton-Raphson.** This covers technique 1 and the Ch. 4 algorithmic converter (`newton_alpha_solver`). In a single looped stage every code has the same weight β/α^i. Take the difference of the two conversions and substitute x = 1/α. The result is a polynomial g(x) = Σ c_i x^i that must be zero, with c_i the code differences. Five Newton steps from α = 2 are run, α ← α + g/h with h = Σ i·c_i·x^(i+1). Then β = 0.25 / Σ D0_i x^i.

All coefficients, residues and weights use 24-bit two's complement with 16 fraction bits (`adc_cal_pkg::fxp_t`). Sixteen fraction bits are the accuracy a 12-bit converter with four calibrated stages needs. Division is done by one shared sequential divider per block (`fxp_divider`), so:

- a residue estimate takes about 40 clocks per term;
- a complete weight regeneration takes a few hundred clocks.

## Stage cycling (`fpi_cal_ctrl`)

Static controls:

- **CAL:** calibration mode.
- **CAL1..CAL4:** which stage receives Vcal.
- **FRC:** force the selected stage's code to +1 (high) or 0 (low).

The stage receiving Vcal heads a ring through the other calibrated stages. The ring continues into the ideal backend.

- **Order.** The stages are visited as 1, 4, 3, 2, each with FRC = 0 and then FRC = 1. This gives eight code sets.
- **Switch selects.** `in_sel` of each calibrated stage chooses normal input, Vcal or ring input. `be_src` chooses which stage's residue feeds the backend.
- **Settling.** After every control change the block waits `ACQ_WAIT` = 16 clocks for the aligned codes to settle.

## Background techniques (`subst_cal_ctrl`, `pair_cal_ctrl`)

Both keep the converter running by putting calibrated extra stages in place of the stage or stages being calibrated. While a stage is out, `alpha_use`/`beta_use` supply the coefficients of the extra stage that stands in for it, so the output weights remain valid.

### Technique 1

1. `calex` goes high first, so the extra stage is calibrated as an algorithmic converter.
2. For each stage n, `cal_e[n]` rises one clock before `cal[n]`. It moves the extra stage to the fast clock. For stages 2 and 4 the two clock phases are exchanged (`ex_clk_swap`), because neighbouring pipeline stages work on opposite phases.
3. At the end, `cal_e[n]` falls one clock before `cal[n]`.
4. While a stage is out, it runs on the slow clock: `slow_clk = cal & cal_e`.

### Technique 2

1. `cal_ex` first, for the extra pair.
2. For each pair p:
   - `swap[2p]` rises, then one clock later `swap[2p+1]`;
   - `cal_pair[p]` follows.
3. The release happens in the same order.

The one-clock offset between the two swaps stands for the half clock period that separates neighbouring stages.

### Loop handshake

The controllers' loop interface is `code_valid`/`code_in`, one code per slow conversion cycle. The controllers drive:

- `vcal_sel`, which puts Vcal on the loop input;
- `frc_en`/`frc_val`, which force the loop stage's code. `adc_cal_top` applies them to the loop stage through `stage_encoder` and also brings them out.

## Ramp-based and jump-based calibration

**`seq_cal_ctrl` (section R)**

- A slowly rising input makes D_n change from 0 to +1 near Vref/4, Vref/8 and Vref/16 for stages 1, 2 and 3.
- The samples just before and just after that change count as two conversions of the same input.
- Stage 3 is calibrated first, so the coefficients needed for stages 2 and 1 are already known.
- The ramp step must leave time for each computation, about 2·(NCAL−n)·40 clocks.

**`jump_detector` and `segment_corrector` (section J)**

- Rising ramp: one `jump_detector` per calibrated stage decides whether that stage's gain is above 2. If it is, the analog side must swap its capacitors (`j_swap`).
- Falling ramp: the detector measures the height S_n of the jump in the raw code (`raw_code_adder`) where the stage's MSB changes.
- With all gains at or below 2, the transfer curve breaks into segments. `segment_corrector` moves each segment back with `out = raw − Σ_n S_n · Σ_{m≤n} 2^(n−m) D_m`. This closed form covers every code combination. For example, codes (−1, −1, −1) get S1 + 3·S2 + 7·S3 added.

**`direct_weight_extract` (section D)**

- As a ramp rises, the first sample whose code vector equals one of five patterns latches the reference converter's reading: (+1, −1, 0…), (0, +1, 0…), (0, 0, +1, −1, 0…), (0, 0, 0, +1, 0…), (0, 0, 0, 0, +1, 0…).
- From these readings, W1 = A1 + A2, W2 = A2, W3 = A3 + A4, W4 = A4 and W5 = A5.
- W6 to W12 are W5 halved step by step.

**`algo_s_extract` (section G)**

- An algorithmic converter is one stage used N times, so a single forced conversion shows every "stage's" jump at once.
- With the input at 0 V and the first bit forced to 1, the N-bit result is R1. Let R_j be its top N−j+1 bits and R_j' their bitwise complement.
- Then S_j = R_j − R_j'. An ideal stage gives S_j = 1, exactly one code; a gain below 2 gives more.
- The block only produces the S_j. Applying them to the algorithmic converter's raw output is left to the user.

## The output path

- **`stage_encoder`** turns each stage's two comparator outputs into a code, and can force that code to 0 or +1. Codes are +1 = `2'b10`, 0 = `2'b01`, −1 = `2'b00`.
- **`code_align`** delays stage k by N_ST−1−k conversions, so that all codes of one sample meet.
- **`weighted_sum_corrector`** selects +W, 0 or −W for each code, adds them in one clock, and rounds the sum to an NOUT-bit code (Dout·2^(NOUT−1)).
- **`weight_gen`** recomputes the weights whenever the selected coefficients change.
- **`flash2_encoder`** converts the 2-bit flash's thermometer code by counting ones, which also tolerates a bubble. Its output is brought out but is not part of the weighted sum: P models all 12 positions as 1.5-bit stages.

## Files and simulation

`rtl/`:

- `adc_cal_pkg.sv` (types and helpers);
- one module per file;
- `adc_cal_top.sv` as the top.

`tb/`:

- `adc_model_pkg.sv`, the real-valued converter model;
- one self-checking testbench per module, `tb_<module>.sv`;
- `tb_adc_cal_top.sv`, which runs every section end to end at the default sizes. In the top-level testbench, P checks the output error in four states:

  | State | Largest error |
  |---|---|
  | Before calibration | about 90 LSB |
  | After stage cycling | under 1 LSB |
  | After technique 1 | under 1 LSB |
  | After technique 2 | about 1 LSB |

  The testbench also counts each mechanism: acquisitions, forcing, weight regeneration, substitutions, phase exchange, swaps and pattern hits. It fails if any of them never happens.

Every testbench prints `TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing -Wno-fatal -Wno-lint -Wno-style \
      rtl/adc_cal_pkg.sv tb/adc_model_pkg.sv \
      $(ls rtl/*.sv | grep -v adc_cal_pkg) tb/tb_adc_cal_top.sv \
      --top-module tb_adc_cal_top
    ./obj_dir/Vtb_adc_cal_top

The packages come first. The top-level run takes about 10 s.

## Where this departs from the source design, and what to trust

- **Own choices.** These are not given by the source design:
  - the handshakes (start pulses, `code_valid`, done/valid levels);
  - `ACQ_WAIT`;
  - the convergence tolerance and the iteration limit (10 passes; the source reports 5 to 10);
  - 12 codes per background calibration conversion;
  - the one-clock spacings of the early and swap signals;
  - the 24-bit number format.
- **Reconstructed correction table.** The segment-correction table of the jump-based method was rebuilt from its closed form.
- **Newton-Raphson formulation.** The polynomial is this design's own formulation of the two-conversion difference.
- **Flash and converter length.** Technique 1 and 2's converter is 11 stages plus a 2-bit flash. Here it is modelled as 12 encoded stages, with the flash encoder separate.
- **Ramp generation.** The coarse/fine ramp and its switching are analog and outside. The testbenches ramp in fine steps, which makes the calibration times here longer than the cycle counts the source reports.
- **Verification scope.** Verification is by simulation against real-valued models with capacitor mismatch and finite gain. Noise, comparator offset and op-amp settling are not modelled.
- **Lint warnings.** Verilator's lint reports width and unused-signal warnings. They come from index arithmetic on parameterised arrays and from status outputs left open in the top. None of them is a functional problem.
