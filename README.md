# 6-bit SAR ADC with foreground calibration

A successive-approximation (SAR) analog-to-digital converter finds the code of
an input level by binary search: it sets the most significant bit, asks a
comparator whether the input is at or above what a DAC makes of that trial
code, keeps or clears the bit, and moves on to the next bit. A 6-bit result
takes six comparisons. The result is only as good as the DAC: if the weight
of a DAC bit is not exactly 2^k, because of component mismatch, the search
lands on wrong codes and the transfer curve gets steps of the wrong size.

This design adds a *foreground* calibration to the converter. Before normal
use, the converter is fed a known test signal. Whenever a conversion produces
a code with exactly one bit set (000001, 000010, ..., 100000), the test level
that caused it is the real weight of that bit, and it is stored in a register
file. In normal operation each raw code is then corrected by adding up the
stored weights of its set bits instead of the nominal powers of two.

Everything here is digital. The "analog" input is a 6-bit number that stands
for the input level, and the DAC and comparator are behavioural models that
work on such numbers. The DAC model can be given a per-bit mismatch, which is
how the calibration is exercised.

## Block structure

```
Converter (sar_adc):

   vin --> sample_hold --hold--> sar_comparator (+) --cmp--> saradc --> result[5:0], valid
              ^                        (-)                   |  |
              |                         ^                    |  |
              +------- sample ----------|--------------------+  |
                                        +--- sar_dac <-- value[5:0]

Calibration around it (sar_adc_fgcal):

   cal_test_gen --vt--> [vin mux] --> sar_adc --result--> cal_pattern_detect --hit, idx--> cal_regfile
        ^                    ^           ^  |                                                   |
        | step               |  go mux --+  +--result--> cal_correct <-------- coef[0..5] -------+
        |                    |                             |
   cal_seq (cal_start, busy, done, we, step)               +--> corrected[8:0]
```

| Module | Role |
|---|---|
| `sar_pkg` | resolution (`SAR_BITS` = 6), state encodings, width of the corrected output |
| `saradc` | SAR controller: sampling, binary search, `valid` |
| `sample_hold` | captures the input level at the rising edge of `sample` |
| `sar_dac` | behavioural DAC: sum of `2**k + ERR[k]` over the set bits |
| `sar_comparator` | behavioural comparator: `cmp = hold >= vdac` |
| `sar_adc` | controller, sample-and-hold, DAC and comparator closed into a loop |
| `cal_test_gen` | test signal: a ramp over all 64 input levels |
| `cal_pattern_detect` | recognises one-hot codes and names the set bit |
| `cal_regfile` | six calibration coefficients, one per bit |
| `cal_correct` | corrected = sum of the coefficients of the set bits |
| `cal_seq` | runs a calibration: takes the converter over, steps the ramp, stores |
| `sar_adc_fgcal` | top level |

## The conversion

The controller has the ports `clk`, `go`, `cmp` in and `sample`, `value[5:0]`,
`result[5:0]`, `valid` out. There is no reset pin: `go` low resets it.

| Rising edge (counted from the first that sees `go` high) | State after it | What happens |
|---|---|---|
| 1 | SAMPLE | `sample` high for one cycle; the sample-and-hold takes `vin` at the next edge |
| 2 | CONV | `value` = 100000 (MSB trial) |
| 3 ... 7 | CONV | previous trial bit kept if `cmp` was 1; next bit tried |
| 8 | DONE | last bit decided; `valid` high, `result` final |

`result` and `valid` stay until `go` falls; dropping `go` at any time aborts
the conversion and clears the result at the next edge. A new conversion needs
`go` low for at least one rising edge.

Example, held level 010110 with an ideal DAC: the trial codes are 100000
(too high), 010000 (kept), 011000 (too high), 010100 (kept), 010110 (kept,
equal counts as "at or above") and 010111 (too high), giving 010110.

The comparator treats equality as "input at or above the DAC", so an input
that equals a code converts to that code. With a strict comparison every
level would convert one code low.

## The foreground calibration

### What is measured

With the ramp test signal rising one level at a time, a given one-hot code
`1 << k` first appears at the lowest input level whose binary search ends on
exactly that code. That level is the threshold of bit k alone, i.e. the real
weight of bit k as the DAC makes it. The pattern detector passes only one-hot
codes; the register file keeps the first write to each entry and ignores
later ones, so it holds exactly these thresholds. Codes with more than one bit
set, or none, are discarded.

An entry that never receives a write (its one-hot code never appears, which
can happen with large mismatch) keeps its nominal weight 2^k; `coef_filled`
shows which entries were measured.

### Sequencing

`cal_start` (taken while no calibration runs) starts a run:

1. one cycle (CAL_START): converter held in reset, ramp back to 0, register
   file back to the nominal weights 1, 2, 4, 8, 16, 32;
2. for every ramp level: CAL_CONV holds `go` high until the converter's
   `valid` (N + 4 = 10 cycles per level including the next cycle), then one
   CAL_STORE cycle drops `go`, writes the level if the code is one-hot and
   steps the ramp;
3. after level 63, CAL_DONE: `cal_done` goes high and the converter is handed
   back.

A run takes 1 + 64 × 10 = 641 clock cycles. While `cal_busy` is high the
user's `go` and `vin` are ignored and `valid` stays low.

### Correction

`corrected = sum over k of result[k] * coef[k]`, 9 bits wide so that any sum
of six 6-bit coefficients fits. It is combinational from `result` and is
valid together with `valid`. Before any calibration, and with an ideal DAC
after it, `corrected` equals `result`.

With the DAC mismatch used in `tb_sar_adc_fgcal` (bit weights 1, 3, 3, 9, 14,
29 in place of 1, 2, 4, 8, 16, 32) the summed absolute error between the
input level and the output, over all 64 levels, falls from 155 for the raw
code to 46 for the corrected one. Over the other error sets of
`tb_fgcal_mismatch_sweep` it falls from 256 to 45 (all weights low), 232 to
14 (all weights high), 102 to 58 (mixed) and 207 to 21 (MSB 6 LSB low).
The correction cannot restore codes that the
mismatched search never produces; it only gives each produced code its true
level.

## What follows the source design and what is this design's own

Taken from the source design: the 6-bit resolution; the controller's ports
(`clk`, `go`, `cmp`, `sample`, `value[5:0]`, `result[5:0]`, `valid`) and its
behaviour (go low resets, go high samples and converts, `valid` when done);
sampling at the rising edge of `sample`; six comparisons MSB first; the
010110 example; the calibration flow of converting test samples, keeping only
codes with a single "1", storing them in a register file and using them as
the real bit weights to correct the output.

This design's own choices, where the source is silent or loose:

- one sample cycle before the six compare cycles, and `valid` held until
  `go` falls;
- the comparator counts equality as "at or above". The source describes the
  comparison as "greater than", but its own example converts a held 010110
  to 010110, which only the inclusive comparison does;
- the test signal is a full single-step ramp, the first one-hot hit per bit
  is kept, and entries start at the nominal weights;
- the correction is a plain weighted sum, with a 9-bit output;
- the whole calibration sequencing (`cal_seq`), the `cal_start` /
  `cal_busy` / `cal_done` handshake and the `rst_n` of the calibration logic;
- the DAC mismatch parameter `ERR` of the behavioural DAC.

The DAC and comparator are behavioural models of analog parts. They are
written so that the tools accept them, but a silicon implementation would
replace them with the analog circuits and drive `vin` from a real
sample-and-hold.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N` | 6 | all modules | resolution |
| `ERR[N]` | all 0 | `sar_dac`, `sar_adc`, `sar_adc_fgcal` | DAC error of bit k in LSBs (weight `2**k + ERR[k]`) |
| `CW` | 9 (`N + clog2(N)`) | `cal_correct`, `sar_adc_fgcal` | corrected output width |

`N` can be changed; the ramp then has `2**N` levels and a calibration run
takes `1 + 2**N * (N + 4)` cycles.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog.
`tb_sar_adc_fgcal` is the end-to-end test with a mismatched DAC (calibration,
correction, abort, recalibration, and a count of each mechanism);
`tb_sar_adc_fgcal_full` runs the top at its default parameters (the 010110
example, one full calibration, all 64 levels); `tb_fgcal_mismatch_sweep`
calibrates five converters with different DAC error sets side by side.

```
verilator --binary --timing --assert -Irtl tb/tb_sar_adc_fgcal.sv \
    --top-module tb_sar_adc_fgcal -Mdir obj
./obj/Vtb_sar_adc_fgcal
```

With `-Irtl`, verilator finds every module and the package `sar_pkg` in the
file of the same name, so only the testbench needs to be named; the same
command works for any `tb/tb_<module>.sv`. Each testbench completes in well under a second.

## How far it can be trusted

Every testbench compares against values it computes itself: a reference
binary search over the (mismatched) DAC weights, a reference calibration that
finds the first level of each one-hot code, and the weighted sum. Each was
also run against a deliberately broken copy of its module (for example a
strict comparator, a register file that lets later writes overwrite, a
sequencer that does not drop `go` between test levels) and failed. The
latency of a conversion (8 rising edges) and the length of a calibration run
(641 cycles) are checked cycle-exactly.

Not covered: any analog behaviour (noise, offset, settling, nonlinearity
within a bit weight), and calibration with a test signal other than the
ramp. The generic synthesis of the controller alone is about 20 word-level
cells and 16 flip-flops; no standard-cell mapping has been done here.
