# Low-power all-digital clock generators

This is a set of clock generators built only from standard-cell style logic. Each one is a digital control loop around a delay element whose delay is set by a code:

- a ring oscillator (DCO) for the PLL and the spread-spectrum generator;
- a delay line (DCDL) for the DLL and the phase shifter;
- a forward/backward mirror delay line for the synchronous mirror delay.

Each loop has two parts:

- **Coarse step.** A time-to-digital converter (TDC) or a one-shot measurement sets the code close to its final value at once.
- **Fine step.** A bang-bang binary search finds the exact code in a few reference cycles, and tracking then follows drift.

The delay elements are analog in nature, so they are modelled behaviourally as transport delays. All controllers, decoders and arithmetic are synthesizable RTL.

The top, `clockgen_top`, places five independent parts side by side, each with its own ports:

| Part | Module | Port prefix |
|---|---|---|
| Cascaded low-power DCO, stand-alone | `dco` + `dco_code_decoder` | `dco_` |
| TDC-based fast-lock ADPLL with average-code output | `adpll_tdc` + `code_averager` | `pll_` |
| All-digital spread-spectrum clock generator | `adsscg` | `ss_` |
| ADDLL with DDR DQS phase shifter | `ddr_phase_shift` | `ddr_` |
| All-digital synchronous mirror delay | `adsmd` | `smd_` |

Shared constants are in `rtl/clkgen_pkg.sv`. Time units are ps (`timescale 1ps/1fs`).

## Cascaded DCO

`dco_code_decoder` splits the binary code. From MSB down, the fields are:

- coarse, M=5 bits;
- 1st fine, P=4 hysteresis delay cells;
- 2nd fine, Q=32 long-delay varactors;
- 3rd fine, R=8 short-delay varactors.

The coarse field selects a tap of the segmental delay line. Only the AND gates up to that tap are enabled, which is where the power saving comes from. Each fine field becomes a thermometer enable for its cells.

`dco` adds one pass around the ring: T_INTR + c·120.21 + n1·98.91 + n2·3.74 + n3·1.47 ps. It toggles the output after each pass.

- Code 0 gives 952 MHz.
- The largest code gives about 107 MHz.
- The resolution is 1.47 ps.

A `restart` input gives a fresh rising edge at once. Loops use it to realign the DCO with the reference during frequency search.

## TDC-based ADPLL

`adpll_tdc` is built from these parts:

- a reference pre-divider (`clk_divider`, ratio N);
- a two-level flash TDC;
- a period calculator;
- the loop controller;
- a bang-bang PFD;
- a DCO with a 14-bit code;
- a feedback divider (ratio M).

**TDC.** `flash_tdc_2level` measures one Ref_N period in two steps:

- four large cells of 8t each measure the coarse part;
- a multiplexer then starts eight small cells of t = 165 ps at the last large cell passed, to measure the remainder.

**Period calculation.** `tdc_period_calc` converts the two thermometer words into the period Tr = (8·L1 + L2)·2. It then forms Tr/M without a divider:

- shift by the power of two below M and by the one above;
- average the two results.

If every flip-flop is set, the period is out of range (`ovf`), and the controller starts from mid-band instead.

**Loop controller.** `adpll_controller` loads the TDC code into the coarse field, since the DCO coarse cell equals the TDC cell. It then runs a binary search on the full code:

- each Ref_N cycle, the PFD decision moves the code by the step;
- the step halves whenever the decision reverses;
- DCO and divider are restarted at each Ref_N edge, so the PFD compares frequency.

When the step reaches 1, the loop enters phase tracking. A reversal halves the step. Eight decisions in the same direction (`SPEEDUP_BOUNDARY`) double it.

**Code averager.** `code_averager` takes the minimum and maximum code over 256 cycles and outputs their mean. This gives a jitter-free frequency code.

**DCO for this loop.** The PLL's DCO uses binary-weighted fine stages (T/4, T/128, T/1024 of the 165 ps coarse cell). This keeps the 14-bit code monotonic, which the binary search needs.

## Spread-spectrum clock generator

`adsscg` is built from these parts:

- dividers FIN/M and DCO/N;
- the PFD;
- a loop filter;
- the RDTM modulation controller;
- the DCO code generator;
- an 18-bit DCO, with steps of 242.41 / 102.82 / 3.92 / 1.1 ps.

**Loop filter.** `sscg_loop_filter` runs the same halving search with step S_N to lock the centre frequency. In tracking:

- each reversal of the decision issues `load`;
- `load` sets the code to the baseline, which is the mean of the codes at the last two reversals.

With `mode=1`, decisions are taken only at the ends of modulation groups. There the modulation is back at the centre.

**RDTM modulator.** `rdtm_modulator` produces the triangular offset as a sequence of sub-sections of ±S_SS:

- S = 2<<STEP;
- COUNT = 8<<SEC_SEL sub-sections per period;
- the sections are reordered into groups of Q = COUNT/4.

Group g plays +a, +b, −a, −b with a = g+1 and b = Q−g, and odd groups are mirrored. Each group returns to the centre, so the phase error can be corrected often. The largest change between neighbouring levels is Q+1 steps.

**Code generator.** `dco_code_gen` applies ±S_N and ±S_SS to the code, with saturation. It then passes the result through `dco_mono_adjust`. When the code crosses a tuning-stage boundary, `dco_mono_adjust` adds a compensation code on the way up and subtracts it on the way down:

- 320 at coarse/1st fine;
- 48 at 1st/2nd fine;
- 4 at 2nd/3rd fine.

This removes the jump that mismatched stage delays would cause.

## ADDLL and DQS phase shifter

`addll` is built from four parts:

- **DCDL** (`dcdl`): four equal stages with taps P90/P180/P270/P360. Each stage is 16 coarse cells, one hysteresis cell and 16 varactors. The stage delay is 150 + 4·code ps for the 9-bit control.
- **Decoder** (`dll_code_decoder`): splits DLL_CTRL[8:0] into thermometer C[15:0] (bits 8:5), the HDC enable F[0] (bit 4) and thermometer F[16:1] (bits 3:0).
- **TDC** (`dll_tdc`): measures one input period once after reset with a chain of coarse cells. Its 4-bit result is the coarse code.
- **Controller** (`addll_controller`):
  1. loads {TDC code, 10000};
  2. runs a 5-bit binary search on the fine bits from the phase detector (P360 against the input), one decision every two cycles;
  3. reaches lock at cycle 13, then tracks by ±1.

**Phase shift.** `ddr_phase_shift` adds two blocks:

- `phase_controller` forms the DQS control code. This is DLL_CTRL plus GAIN·r_adj (read) or GAIN·w_adj (write), saturated.
- `dcps` is a copy of the decoder and one DCDL stage. It delays DQS by a quarter period plus the adjustment.

## Synchronous mirror delay

`smd_delay_path` models the delay path of the ADSMD:

- the input buffer;
- the delay-matching copy of the input buffer, clock driver, EMDC and fine-tuning line;
- a forward delay line of 64 AND cells, gated by BLK;
- the mirror control circuit, which latches the forward front at the next input edge;
- the backward line of the same length;
- the fine-tuning delay line (8 steps of 24 ps);
- the clock driver.

After lock, the total delay is one input period, so the output aligns with the input.

`smd_timing_ctrl` drives the path:

- It lowers BLK at the second IB_OUT edge and latches the mirror length.
- It then runs a 3-bit binary search of FTC every two cycles, using a flop that compares the delayed output with IB_OUT.
- It reaches lock at cycle 10, then tracks.

`adsmd` connects the two.

## Parameters and timing summary

| Block | Key defaults | Lock |
|---|---|---|
| DCO | CW=5, F1W=2, F2W=5, F3W=3, T_INTR=525 ps | — |
| ADPLL | 14-bit code, T_CELL=165 ps, N[2:0], M[6:0] | ≤ 29 Ref_N cycles when the TDC is in range |
| ADSSCG | 18-bit code, SEC_SEL/STEP 3 bits each | ≈ 34 FIN_M cycles |
| ADDLL | 9-bit DLL_CTRL, 150 + 4·code ps per stage | 13 cycles |
| ADSMD | 64 cells of 80 ps, FTC 3 bits of 24 ps | 10 cycles |

Gate delays that are not specified for a library (the DLL cells, the SMD cells and the intrinsic ring delays) are this design's values. They are chosen to cover 200–400 MHz for the DLL and SMD, and 27–54 MHz for the spread-spectrum generator.

## Limits

- The stand-alone DCO's slowest code gives 107 MHz, below the 191 MHz lower end of its operating range.
- Ref_N periods longer than the flash TDC covers (80 small cells ≈ 13 ns) are handled by the mid-band fallback, not by a coarse lock.
- The read and write DQS paths share one DCPS, selected by `write`.
- The spread-spectrum loop was simulated at small spreading ratios (about 0.5 %), not at the largest settings.
- The hysteresis cell and the varactor exist only as delay terms inside the behavioural models.

## Verification

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=… failures=…`.

| Testbench | Covers |
|---|---|
| `tb_dco` | DCO with its decoder |
| `tb_flash_tdc_2level` | flash TDC |
| `tb_tdc_period_calc` | period calculator |
| `tb_adpll_tdc` | ADPLL with its controller |
| `tb_code_averager` | code averager |
| `tb_clk_divider` | clock divider |
| `tb_bb_pfd` | PFD |
| `tb_rdtm_modulator` | RDTM modulator |
| `tb_dco_mono_adjust` | stage-boundary compensation |
| `tb_adsscg` | full SSCG |
| `tb_ddr_phase_shift` | ADDLL and DQS phase shifter |
| `tb_adsmd` | ADSMD |

`tb_clockgen_top` runs the whole top at its default parameters. It checks each mechanism and reports how often each occurred:

- DCO frequencies;
- PLL lock, step flips and speed-ups;
- SSCG loads, compensations and spreading;
- DLL lock and DQS adjustment;
- SMD lock and FTC steps.

Run a testbench with Verilator, for example:

```
verilator --binary --timing -Irtl rtl/clkgen_pkg.sv $(ls rtl/*.sv | grep -v clkgen_pkg) \
          tb/tb_clockgen_top.sv --top-module tb_clockgen_top
obj_dir/Vtb_clockgen_top
```
