# Histogram self-calibration for a 12-bit pipeline ADC

A pipeline ADC whose first stage resolves 3 bits has a transfer curve made of
eight straight segments. Capacitor mismatch in the first stage's multiplying DAC
and its inter-stage gain shift these segments against each other, leaving a step
in the output at each of the seven segment boundaries. This RTL measures those
steps without any special test signal path inside the converter: the input is
switched to a Gaussian noise source, a histogram of the output codes is taken
around each boundary, and the difference between the measured and the ideal
Gaussian histogram gives the size of each step. From the steps the circuit
computes four 7-bit calibrating codes, which are then added to or subtracted from
every output word during normal conversion.

Three ideas keep the hardware small (a few hundred flip-flops, one shared adder):

* **Symmetry.** A fully differential first stage has mirror-symmetric errors, so
  segment *s* and segment 7-*s* need the same correction with opposite sign: four
  code registers serve eight segments, and the histogram bins on either side of
  mid-scale can be added into one register.
* **Normalisation by accumulation.** Instead of counting samples and multiplying
  each count by the inverse of its ideal Gaussian probability, each sample that
  lands in a bin adds that bin's normalisation factor to a working register. An
  ideal converter then leaves the same value in every register.
* **Powers of two.** All scalings are radix-2, so they are done by which bits of
  the 29-bit working registers are wired to the 7-bit code registers.

The first stage is deliberately built with a gain slightly below 4 (3.9). That
opens a small gap (missing codes) at each boundary instead of an overlap that
could not be undone digitally; the calibration then moves every segment back onto
a single straight line whose slope is 3.9/4 of the ideal one.

## Signal path

```
 flash[2:0] ──►┌──────────────────┐ y[11:0]  ┌────────────┐ out_code[11:0]
 backend[9:0]─►│ error_correction │─────────►│ code_adder │──────────────►
               └──────────────────┘ coarse   └────────────┘      │
                                                  ▲ C1..C4       ▼
                                          ┌──────────────┐  ┌─────────────┐
                                          │ cal_code_regs│◄─│ cal_control │
                                          └──────────────┘  └─────────────┘
                                                  ▲ Reg1..4        │ ctrl
    norm_rom (N1..N4) ─┐        ┌──────────────┐  │                │
    C1..C4 (<<SHIFT) ──┼─► B ──►│    add29     │─►working_regs ◄───┘
    Reg[b], constant ──┘  A ───►│ a+b, a-b, b-a│
    Reg[a], OFF (<<SHIFT) ─┘    └──────────────┘
                 setup_regs: OFF, sigma ──► sigma_out (noise source gain)
```

* `error_correction` delays the flash code by one clock so that it meets the
  back-end code of the same sample, and forms `y = 512*flash + backend - 256`
  (the back end covers twice the nominal residue range; the result is clipped to
  0..4095). Two clocks of latency.
* `code_adder` picks code register `s[1:0]` for segments 0..3 and `~s[1:0]` for
  segments 4..7, adds the code when the MSB of `y` is 0 and subtracts it when the
  MSB is 1, clips, and registers the result. One clock of latency, so
  `out_valid` follows `in_valid` by three clocks.
* The calibration logic watches `out_code`, i.e. the words already corrected with
  the codes in use. Conversion never stops during calibration; the codes change
  only in the single clock in which all four registers are reloaded.

## From histogram to codes

Notation: the converter has 12 bits, segments are numbered 1..8, the seven
segment boundaries 1..7. Bins are 64 output codes wide and centred on the
boundaries where a gain-3.9 converter puts them after correction
(550, 1050, 1549, 2048, 2547, 3046, 3546), so bin *j* covers codes
`BIN_LO[j] .. BIN_LO[j]+63`.

1. **Sampling.** Noise with mean 2048 and standard deviation 1024 output codes
   (full scale = ±2σ) drives the converter for 2^24 samples. A word in bin *j*
   adds `N[r]` to `Reg[r]`, where *r* = *j* for the three lower bins, 6-*j* for the
   three upper ones and 3 for the centre bin (indices from 0). The factors are
   `N_r = round(8 / p_r)`, *p_r* being the probability of a Gaussian sample landing
   in bin *r*: 936, 516, 361, 321. With 2^24 samples an ideal bin therefore sums
   to 2^27, and a register holding a pair of bins to 2^28.
2. **Deviation.** Subtracting 2^28 (pairs) or 2^27 (centre) leaves, per register,
   the shortfall of samples caused by the step inside the bin. A step of *d* LSB
   removes *d* of the 64 codes' worth of input range from the bin, so one LSB of
   step equals 2^27/64 = 2^21 in the register. A gap (missing codes) gives a
   negative value, `Dev`.
3. **Codes.** With `Dev[1..3]` the summed pair deviations and `Dev[4]` the centre
   one, the codes are `C1 = -½·ΣDev`, `Ck = C(k-1) + ½·Dev[k-1]`. In the registers
   this is done in place, from the centre outwards, in four operations:
   `Reg4 = -Reg4; Reg3 = Reg4 - Reg3; Reg2 = Reg3 - Reg2; Reg1 = Reg2 - Reg1`.
   The factor ½ and the 2^21 scale together make one code LSB equal to 2^22 in
   the register.
4. **Update.** Because the histogram was taken on corrected words, the result is
   a correction of the codes in use: each code, shifted left by 22, is added to
   its register. The code registers then load bits [28:22] of the four working
   registers in one clock. The lower bits are dropped (truncation), which is the
   main source of the roughly one LSB of residual error.

A calibration cycle takes `2^LOG2_SAMPLES + 14` clocks at one valid word per
clock (0.42 s at 40 MHz with the default 2^24 samples); with the offset step
described below it takes five more. Repeating the cycle refines the codes
(multi-step calibration): each cycle starts from the codes the last one left.

At reset the code registers hold the codes of an ideal converter with gain 3.9,
`Ck = round((1792 - 512(k-1)) · (1 - 3.9/4))` = 45, 32, 19, 6. The bins and the
first histogram thus already line up with the reduced-gain characteristic.

### Offset step

`OFF` (7 bits, two's complement LSBs) is meant to hold the offset of the noise
source and converter found while setting the noise source up. When
`cal_sub_offset` is high together with `cal_start`, the cycle first computes
`Ck - OFF` for all four codes through the shared adder and reloads the code
registers, then takes the histogram. `sigma` is a 7-bit trim word passed on to the
gain stage of the noise source. How these two values are measured is not part of
this RTL; they are written through `off_ld`/`off_in` and `sigma_ld`/`sigma_in`.

### Control sequence

| phase  | clocks       | operation of the 29-bit adder                         |
|--------|--------------|-------------------------------------------------------|
| OFFSET | 4 (+1 load)  | `Reg[r] = C[r]<<22 - OFF<<22`, then codes reload       |
| CLEAR  | 1            | all working registers zero                            |
| SAMPLE | 2^24 words   | `Reg[r] = Reg[r] + N[r]` for a word in bin *r*        |
| SUBEXP | 4            | `Reg[r] = Reg[r] - 2^28` (pairs) / `- 2^27` (centre)  |
| CODES  | 4            | in-place `Reg4=-Reg4 … Reg1=Reg2-Reg1`                |
| ADDOLD | 4            | `Reg[r] = Reg[r] + C[r]<<22`                          |
| WRITE  | 1            | `C[r] = Reg[r][28:22]`                                |

`cal_busy` is high from the clock after `cal_start` through WRITE; `cal_done`
pulses in the clock after WRITE; a `cal_start` while busy is ignored. Assertions
in `cal_control` state these rules (enable them with `--assert`).
`cal_bin_hit` marks words that fell into a bin.

## Interface of `selfcal_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a flash code is present |
| `flash` | in | 3 | first-stage flash code |
| `backend` | in | 10 | back-end code, one clock after the flash code of the same sample |
| `out_valid`, `out_code` | out | 1, 12 | calibrated word, three clocks after `in_valid` |
| `cal_start`, `cal_sub_offset` | in | 1 | start a calibration cycle (optionally with the offset step) |
| `cal_busy`, `cal_done`, `cal_bin_hit` | out | 1 | status |
| `off_ld`, `off_in` | in | 1, 7 | load OFF |
| `sigma_ld`, `sigma_in`, `sigma_out` | in/out | 1, 7 | load and read the noise-gain trim |
| `codes_out` | out | 4×7 | current C1..C4 |

Parameters: `LOG2_SAMPLES` (24), `BIN_LO` (seven bin starts), `NORM` (four
factors), `CODE_INIT` (reset codes), `SIGMA_W` (7). The shift of the code field
follows as `LOG2_SAMPLES - 2`.

## Files

`rtl/selfcal_pkg.sv` holds sizes, types and the control word `ctrl_t`. Blocks:
`error_correction`, `code_adder`, `cal_code_regs`, `working_regs`, `add29`,
`norm_rom`, `setup_regs`, `cal_control`, and the top `selfcal_top`. Each has a
self-checking testbench `tb/tb_<block>.sv`. `tb/adc_model.sv` and
`tb/wgn_model.sv` are behavioural models of the analog first stage (gain 3.9,
symmetric DAC level errors of up to 4 LSB, comparator offsets, 0.2 LSB thermal
noise) and of the noise source; they are used only by the system tests.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  --top-module tb_selfcal_top rtl/selfcal_pkg.sv tb/tb_selfcal_top.sv
./obj_dir/Vtb_selfcal_top
```

* `tb_selfcal_top` (2^20 samples per histogram, about 2 s): INL measured with a
  0.5-LSB ramp before calibration (5.0 LSB with the model's errors), a first
  calibration (codes within 1 LSB of the values the model implies, INL 1.9 LSB),
  an offset step (codes drop by exactly OFF) followed by a second calibration that
  restores them, and the sigma path. It counts each mechanism and fails if one
  never happened.
* `tb_selfcal_full` (about 15 s): one calibration at the default 2^24 samples with
  the top's parameters untouched. Codes come out as 47, 29, 23, 4 against model
  values 47.7, 29.6, 23.1, 4.9; INL drops from 5.0 to 1.9 LSB.

* `tb_stimulus_errors` (about 5 s): six calibrations from reset with an
  imperfect noise source, mean moved by -14, -7, +7 and +14 LSB, and σ off by
  -1/512 and +1/512 (set through the sigma register). All give codes within
  1 LSB of the model values and INL between 1.8 and 2.3 LSB, which shows that the
  pairwise folding cancels the first-order effect of a noise offset and that a
  σ accurate to 9 bits is enough.

The INL limits in the tests are 2.5 LSB because each ramp point is one
conversion with thermal noise and integer codes; the codes themselves are checked
to within 2 LSB.

## Changing the design

* **Histogram size.** `LOG2_SAMPLES` sets the number of samples and, through the
  shift, where the code field sits in the working registers. The factors in
  `NORM` stay valid for any size, because the ideal bin content is defined as
  2^(LOG2_SAMPLES+3). Above 24 the 29-bit registers would overflow; below 24 the
  statistics get worse (2^20 gives about ±1 LSB of spread).
* **Bins or noise level.** If the bin positions or the noise σ change, recompute
  `N_r = round(8/p_r)` with
  `p_r = Φ((hi_r + ½ - 2048)/σ) - Φ((lo_r - ½ - 2048)/σ)` and keep every factor
  below 1024.
* **Front-end gain.** A different gain *g* moves the boundaries to
  `2048 + (g/4)(512j - 2048)` and the reset codes to
  `round((1792 - 512(k-1))(1 - g/4))`; update `BIN_LO`, `NORM` and `CODE_INIT`.

## Interpretations and departures

* The sign convention (lower half adds, upper half subtracts) and the recurrence
  `Ck = C(k-1) + ½·Dev[k-1]` were chosen so that the result is self-consistent:
  with this indexing the innermost code is half the centre step, as symmetry
  demands.
* The digital error correction that merges the 3-bit and 10-bit codes is the
  usual overlap adder for this stage split (`512*flash + backend - 256`); only
  its place in the chain and its 3/10/12-bit widths are given by the method.
* Seven bins folded into four registers, rather than a five-bin histogram; the
  four registers and four normalisation factors fix the folding.
* The normalisation factors are a fixed ROM. Fine trimming of the noise level by
  adjusting these factors, which the method allows, is not implemented.
* The measurement that sets OFF and sigma (a histogram of the noise source
  itself) is not implemented; the registers are loaded from outside.
* The offset step subtracts OFF from all four codes. With the add/subtract
  convention above this shifts the two halves in opposite directions; the next
  histogram sees that as a centre step and removes it.
* Overflow of the 29-bit registers is not detected; at the default size and for
  steps within the 7-bit code range it cannot occur.
* The analog parts (sample-and-hold, flash, MDAC, back-end ADC, noise amplifier,
  programmable-gain amplifier) exist only as behavioural test models.
