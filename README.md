# PVT sensors and DVFS control for a micro-watt, sub-threshold system

Logic running near or below its threshold voltage changes speed by large
factors with process corner, supply voltage and temperature (PVT). A system
that scales its voltage and frequency to save energy at that operating point
therefore has to know all three. It needs this to choose a voltage that keeps
the clock safe, and to keep the PLL's VCO in a range that can still reach the
target frequency.

This RTL is the digital half of such a system:

- **PVT sensors.** Frequency-to-digital converters (FDCs) count ring
  oscillators inside a timed window. There is a 4-bit process monitor, a
  10-bit temperature sensor, an 11-bit temperature sensor with an *adaptive
  pulse width*, and a delay-line voltage sensor with a 5-bit one-hot output.
- **Calibration.** The raw temperature code is corrected in two ways. The
  1-point calibration uses one reading at 25 °C. The self-calibration uses
  the process and voltage codes.
- **DVFS control.** A workload estimate steps a performance level up or
  down. The level sets the PLL divider ratio. The level plus a PVT margin
  sets the code of the reference DAC.
- **Switched-capacitor (SC) DC-DC converter control.** Pulse-frequency
  modulation (PFM), non-overlapping phases and switch-width selection from a
  two-output comparator.
- **Low-voltage PLL digital part.** Feedback divider, phase-frequency
  detector and a 3-bit temperature code that re-centres the charge pump and
  VCO.

The analog parts are not RTL. These are the ring oscillators, the PTAT bias,
the delay lines, the comparator chains, the switch matrix and capacitors, the
voltage reference, the resistor string, and the charge pump, loop filter and
VCO. They appear as ports of the top module `pvt_dvfs_top`. The testbenches
close every loop with small behavioural models of them (`tb/*_model.sv`).

```
             ref_clk 10 MHz
   proc_ro ──► fdc_sensor (W=4)  ── proc_code ──┬─► voltage_sensor ◄── vs_taps
                                                │        │ v_code, vs_proc_ctrl
   ts_ro ────► fdc_sensor (W=10) ── t_raw ──┬───┼────────┼──► one_point_cal ─► t_1pt
                                            └───┴─► self_cal ◄┘
                                                      │ t_self
   apwg_ts_ro ► fdc_sensor (W=11, clk=apwg_pw_ro) ─► t_apwg
                                                      ▼
   fifo_util, stall ──► dvfs_controller (workload_filter inside)
                          │ vref_code             │ div_n
                          ▼                       ▼
        vref_dac_decoder ─► tap_sel    vco_clk ─► pll_divider ─► fb_clk ─► pfd ─► UP/DN
   vop1/vop2 ─► sc_pfm_controller (dcdc_clk) ─► phi1, phi2, sw_width
   t_self ─► ts_comp_encoder ─► pll_tc (3 bits to charge pump and VCO)
```

## Frequency-to-digital sensing

All three counting sensors are the same channel, `fdc_sensor`, used with
different clocks, oscillators and widths. It has three parts.

1. **`fixed_pulse_gen`.** A rising `start` sets a pulse flip-flop. While
   the pulse is high, a counter on `clk` runs. A comparator against `n`
   clears the flip-flop on a match. The pulse is exactly `n` clock periods
   wide. `start` is asynchronous and passes through a two-flop synchroniser,
   so the pulse rises on the third `clk` edge after `start`.
2. **`fdc_counter`.** It counts rising edges of the sensing oscillator
   while the pulse is high. The code is therefore `f_osc × n / f_clk`.
   - The original circuit ANDs the oscillator with the pulse and clocks the
     counter with the result. Here the oscillator clocks the counter and the
     pulse is a count enable. This counts the same edges without a gated
     clock.
   - The first enabled edge loads 1, so no clear is needed between
     conversions.
   - The count saturates instead of wrapping.
3. **Output stage.** `DONE_DLY` clock periods after the window closes, the
   oscillator-domain count has stopped moving. It is then copied into `code`
   and `done` strobes. One conversion takes `n + 8` clock periods from
   `start` to `done`.

The channel is used three ways.

| Use | oscillator | window clock | `n` (top parameter) | code |
|---|---|---|---|---|
| process monitor | 21-stage RO at its zero-TC supply | 10 MHz reference | `N_PROC` = 8 | 4 bits |
| temperature sensor | PTAT-starved or thermally sensitive RO | 10 MHz reference | `N_TS` = 500 | `T[9:0]` |
| temperature sensor, adaptive pulse width (APWG) | temperature RO | pulse-width RO | `N_APWG` = 64 | `T[10:0]` |

**Why the APWG version works.** The window is `n` periods of an oscillator
whose frequency follows process and supply the same way the sensing
oscillator does. The code is `n × f_osc / f_PW`, so the common process and
supply factor cancels. Only the temperature dependence of the ratio is left.
The end-to-end test shows this: changing both oscillators by 20 % moves the
code by at most 2 LSB.

**`voltage_sensor`.** The delay line is analog. Its five taps form a
thermometer code: tap *i* is reached when the supply is at least
0.30 V + 50 mV·*i*. The block samples the taps and XORs neighbouring taps
into one-hot `V[4:0]`:

| V[4:0] | supply |
|---|---|
| 00001 | 0.30 V |
| 00010 | 0.35 V |
| 00100 | 0.40 V |
| 01000 | 0.45 V |
| 10000 | 0.50 V |

All zeros means below 0.30 V. The process monitor drives one control bit
into the delay line to cancel its process dependence. Here that bit is 1
when the process code is below 8 (the slow half).

In the top, all three channels start together on `conv_start`. The voltage
sensor samples its taps when the process conversion ends, so `proc_code` and
`v_code` are both fresh when the temperature conversion ends. With the
default windows a full conversion takes 508 reference periods, which is
50.8 µs. That is inside the 100 µs a 10k samples/s rate allows.

## Calibration

**`one_point_cal`.** This corrects the process corner, which shifts the
temperature transfer curve by a roughly constant number of codes.

- *Calibration mode* (`mode = MODE_CALIBRATE`). Take one conversion at a
  known 25 °C. The block stores `P0 = D − 509` as a 9-bit signed offset.
  509 is the typical-corner code at 25 °C.
- *Measurement mode.* Each conversion is latched and `t_out = D − P0`.
- `ready` rises one clock after the first measurement and stays high.
- `P0` saturates to −256..255 and `t_out` to 0..1023.

**`self_cal`.** This is the calibration-free variant for the all-digital
sensor. It subtracts an offset chosen by the operating point from the raw
code:

```
T_cal = T_raw − OFFSET[proc_code][index of the set bit in v_code]
```

The 16 × 5 table of 9-bit signed offsets is held in registers. It resets to
zero and is written through `cfg_we / cfg_proc / cfg_vidx / cfg_offset`.
The published design says only that the process and voltage codes compensate
the temperature code. The table is the simplest structure that does this.
The offsets must be characterised per product.

In the top, `t_self` is the code the rest of the system uses, and
`conv_done` strobes when it is valid. `t_1pt` and `t_apwg` are brought out
beside it.

## DVFS control

**`workload_filter`.** It counts stall cycles over a window of
`2^WIN_LOG2` cycles. At the end of each window it forms
`x = fifo_util + stall_fraction`, both on a 0..255 scale. `x` then passes
through two filters:

- a 4-tap FIR with 4-bit coefficients, `>> 4`, so coefficients that sum to
  16 give unity gain;
- a first-order IIR, `y += (f − y) >>> alpha_shift`.

**`dvfs_controller`.** After each new workload value the level (0..7) moves
by at most one step:

- up if the workload is above `up_th`;
- down if it is below `down_th`;
- otherwise it holds.

The level maps to two outputs:

- `div_n = 6 + 2·level`, which gives 60..200 MHz from the 10 MHz reference;
- `vref_code = level + margin`, clamped to 7. The margin is +1 for a slow
  process (`proc_code < 8`) and +1 for a cold die (`temp_code < 384`). These
  are the two conditions that slow sub-threshold logic.

The order of each step keeps the clock from ever outrunning the supply:

- **Going up:** the voltage code rises first and the divider one decision
  later.
- **Going down:** the divider drops first and the voltage follows.

## Converter control

**`vref_dac_decoder`.** It selects one of eight resistor-string taps,
nominally 0.3 V + 0.1 V·code. The output is registered and break-before-make:
after a code change all taps are open for one clock, then the new tap closes.
The `$onehot0` assertion checks this.

**`sc_pfm_controller`.** The switch matrix rests in phi1. Each regulation
cycle runs as follows:

1. the controller waits `IDLE_CYC` clocks;
2. it pulses `cmp_clk` to clock the delay-line comparator;
3. it decides: `vop1 = 1` (VOUT below VREF) fires one phi2 pulse of
   `PHI2_CYC` clocks, with `DEAD_CYC` clocks of both phases low on each side;
4. `vop2 = 1` (VOUT well below VREF) also enables the extra switch width:
   `sw_width = {vop2, vop1}` is held for that pulse.

Without a pulse the cycle lasts `IDLE_CYC + 2` clocks. With a pulse it lasts
`IDLE_CYC + 2 + 2·DEAD_CYC + PHI2_CYC` clocks. The switching rate therefore
follows the load. An assertion checks that phi1 and phi2 never overlap.

The published text describes VOP1/VOP2 in two places that disagree. This
design follows the reading in which VOP1 = 1 means VREF > VOUT and both are 1
when the gap is large.

The controller runs on its own clock, `dcdc_clk`. At 10 MHz a decision every
four reference periods cannot hold a 50 µA load within a few millivolts. The
end-to-end test uses 100 MHz.

## PLL digital part

- **`pll_divider`** divides `vco_clk` by `div_n`. The output is high for
  `floor(n/2)` periods. A new ratio is taken only at the end of a full output
  cycle, so a ratio change never makes a runt pulse.
- **`pfd`** is the classic pair of flip-flops with an AND-gate reset
  producing UP/DN. The reset forms a deliberate combinational loop through
  the asynchronous clears; synthesis tools report it.
- **`ts_comp_encoder`** turns the calibrated temperature into a 3-bit code
  for the charge pump and VCO band, `tc = clamp((T − 320) >> 6, 0, 7)`. A
  new bin is taken only once the reading is more than 4 codes past the bin
  edge.

  In the test's PLL model a 0 °C die cannot reach 200 MHz with the band left
  at its 25 °C setting. With the code applied it locks.

## How far to trust it, and where it departs from the source design

These parts follow the source design closely:

- the FDC structure;
- the pulse generator (flip-flop, counter, comparator against N);
- the 1-point calibration (constant 509, demultiplexer, two subtractors,
  9-bit offset, 10-bit register, two-flop Ready);
- the one-hot voltage code table;
- the code widths;
- the 10 MHz → 200 MHz PLL with a divider and a 3-bit temperature code;
- the eight DAC levels;
- PFM regulation with phi2 on "VOUT below VREF".

These are this design's own choices:

- **Clocking.** The pulse generator and the calibration registers are
  synchronous to their clock; the original clocks some of their flip-flops
  by START or by done_t.
- **Window lengths.** `N_PROC`, `N_TS` and `N_APWG` are not given in the
  source.
- **Self-calibration table.** The form of the table (the source does not
  give the circuit) and its contents.
- **Workload and level logic.** The workload window, the FIR tap count,
  formats and the IIR form; the level thresholds, the level → ratio and
  level → DAC-code mappings, the PVT margin rule, and the order of voltage
  and frequency changes.
- **Converter control.** The PFM cycle counts and dead times, and the
  separate converter clock.
- **PLL code.** The bins and hysteresis of the PLL temperature code.
- **Delay-line control bit.** How the voltage sensor's control bit is
  derived.

Not implemented: the FIFO whose utilisation drives the workload estimate (a
near-threshold SRAM FIFO is only outlined as future work, so `fifo_util` and
`stall` are inputs); the automatic topology selection and frequency scaling of
the general SC converter architecture, which is only surveyed as background.
The converter built here regulates one gain setting with PFM.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `pvt_dvfs_top` | `N_PROC` / `N_TS` / `N_APWG` | 8 / 500 / 64 | sensor windows in window-clock periods |
| `pvt_dvfs_top`, `dvfs_controller`, `workload_filter` | `WIN_LOG2` | 8 | workload window = 256 cycles |
| `fdc_sensor` | `W`, `NW`, `DONE_DLY` | 10, 10, 4 | code width, window counter width, settle time |
| `dvfs_controller` | `N_BASE`, `N_STEP` | 6, 2 | `div_n = N_BASE + N_STEP·level` |
| `dvfs_controller` | `PROC_SLOW_TH`, `TEMP_COLD_TH` | 8, 384 | PVT margin conditions |
| `sc_pfm_controller` | `IDLE_CYC`, `DEAD_CYC`, `PHI2_CYC` | 2, 1, 4 | regulation cycle |
| `ts_comp_encoder` | `T_LO`, `SHIFT`, `HYST` | 320, 6, 4 | PLL temperature bins |
| `pvt_pkg` | widths, `CAL_REF_25C_TT` | see file | shared widths, 509 |

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  rtl/pvt_pkg.sv tb/tb_pvt_dvfs_top.sv --top-module tb_pvt_dvfs_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block. Verilator has only two
states, so uninitialised registers start at arbitrary values; every block
resets what it reads. Running with `+verilator+rand+reset+2` randomises the
start values and exercises that.

**End-to-end test.** `tb_pvt_dvfs_top` runs the top at its default
parameters and takes about 6 s. It takes the design through these steps:

1. 1-point calibration in a fast corner, then a measurement at 60 °C;
2. programming one self-calibration entry, then a measurement at 80 °C;
3. APWG conversions in two process corners;
4. a heavy workload, with checks that:
   - the level climbs to 7;
   - the PLL locks at 200 MHz within 1 %;
   - the converter stays within 4 % of its reference;
5. a light workload that relocks the PLL at 60 MHz;
6. a cold die that locks only with the temperature code;
7. a slow corner that adds the supply margin and sets the delay-line
   control bit.

It counts every mechanism and fails if any never occurs: calibration and
measurement modes, self-correction, APWG, level up/down, phi2 pulses, wide
switch width, tap changes, PLL code changes, the margin and the control bit.

**Sensor sweep.** `tb_pvt_sensor_sweep` also runs the top at its defaults,
in under a second. It sweeps 0..100 °C in 10 °C steps in a slow, a typical
and a fast corner. In each corner it first sweeps the voltage sensor over
0.30..0.50 V, then runs the 1-point calibration at 25 °C and programs one
self-calibration entry. It then checks the following against the ideal code
of the oscillator model:

- the 1-point calibrated code, within 2 LSB;
- the self-calibrated code, within 1 LSB;
- the APWG code with the pulse-width oscillator at 0.8×, 1× and 1.2×,
  within 2 LSB.

Every fixed-window conversion must end within 100 µs (10k samples/s) and
every APWG conversion within 20 µs (50k samples/s).

The block tests for `workload_filter` and `dvfs_controller` shorten the
workload window through `WIN_LOG2`. All other tests use defaults.
