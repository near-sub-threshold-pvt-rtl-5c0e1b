// pvt_dvfs_top: digital core of a PVT-aware micro-watt DVFS system.
//
// Sub-threshold logic changes speed by large factors with process corner,
// supply and temperature, so a DVFS system built for it must know all three.
// This core holds the digital half of such a system:
//   - Sensors. Four frequency-to-digital channels (fdc_sensor) count ring
//     oscillators inside a timed window: the process monitor (4-bit code
//     from the 21-stage oscillator at its zero-temperature-coefficient
//     supply), the temperature sensor (T[9:0]), and the temperature sensor
//     with adaptive pulse width (T[10:0], its window timed by a ring
//     oscillator that tracks process and supply). The voltage sensor decodes
//     the taps of a current-starved delay line into a one-hot code V[4:0]
//     and receives a process control bit.
//   - Calibration. The raw temperature code is corrected two ways: by the
//     1-point calibration (one reading at 25 C gives the process offset) and
//     by the self-calibration (offset chosen by the process and voltage
//     codes). The self-calibrated code feeds the rest of the system.
//   - Supply. The DVFS controller filters the workload (FIFO utilisation and
//     stall duration) and steps a performance level up or down. Its voltage
//     code, raised by a PVT margin, drives the tap decoder of the reference
//     DAC; the PFM controller of the switched-capacitor converter fires phi2
//     pulses whenever the delay-line comparator finds VOUT below that
//     reference, and sets the switch width from the comparator's two outputs.
//   - Clock. The DVFS level sets the PLL feedback divider ratio; the PLL's
//     phase-frequency detector compares the reference with the divided VCO
//     clock; the temperature code, reduced to 3 bits, is sent to the charge
//     pump and VCO to keep the VCO range on target.
// The analog parts (ring oscillators, delay lines, comparator chains, switch
// matrix and capacitors, voltage reference and resistor string, charge pump,
// loop filter, VCO) are outside; their signals are the ports of this module.
//
// Clocks: ref_clk (the 10 MHz reference) runs the control logic and times
// the fixed-width sensor windows; proc_ro, ts_ro, apwg_ts_ro and apwg_pw_ro
// are the sensor oscillators; dcdc_clk clocks the converter's PFM control
// and comparator (the regulation rate is one comparator decision every
// IDLE_CYC + 2 of its cycles); vco_clk is the PLL output. rst_n is an
// asynchronous active-low reset. conv_start starts one conversion of all
// sensors; conv_done strobes when the calibrated temperature is valid.
module pvt_dvfs_top
  import pvt_pkg::*;
#(
  parameter int unsigned N_PROC   = 8,    // process window, ref_clk periods
  parameter int unsigned N_TS     = 500,  // temperature window, ref_clk periods
  parameter int unsigned N_APWG   = 64,   // APWG window, pulse-width RO periods
  parameter int unsigned WIN_LOG2 = 8     // DVFS workload window, 2**n cycles
) (
  input  logic               ref_clk,
  input  logic               rst_n,
  // sensors
  input  logic               conv_start,
  input  logic               proc_ro,
  input  logic               ts_ro,
  input  logic               apwg_ts_ro,
  input  logic               apwg_pw_ro,
  input  logic [VCODE_W-1:0] vs_taps,
  output logic               vs_proc_ctrl,
  output logic [PROC_W-1:0]  proc_code,
  output logic [VCODE_W-1:0] v_code,
  output logic               v_valid,
  output logic               sensors_busy,
  output logic [TEMP_W-1:0]  t_raw,
  output logic [APWG_W-1:0]  t_apwg,
  output logic               t_apwg_done,
  // calibration
  input  cal_mode_e          cal_mode,
  output logic [TEMP_W-1:0]  t_1pt,
  output logic [OFFS_W-1:0]  t_1pt_offset,
  output logic               t_1pt_ready,
  input  logic               scal_we,
  input  logic [PROC_W-1:0]  scal_proc,
  input  logic [2:0]         scal_vidx,
  input  logic [OFFS_W-1:0]  scal_offset,
  output logic [TEMP_W-1:0]  t_self,
  output logic               conv_done,
  // DVFS workload interface
  input  logic [7:0]         fifo_util,
  input  logic               stall,
  input  logic [3:0]         wl_coef [4],
  input  logic [2:0]         wl_alpha_shift,
  input  logic [10:0]        wl_up_th,
  input  logic [10:0]        wl_down_th,
  output logic [LVL_W-1:0]   dvfs_level,
  output logic [10:0]        workload,
  output logic [15:0]        dvfs_up_cnt,
  output logic [15:0]        dvfs_down_cnt,
  // SC DC-DC converter
  input  logic               dcdc_clk,
  input  logic               dcdc_en,
  input  logic               vop1,
  input  logic               vop2,
  output logic               cmp_clk,
  output logic               phi1,
  output logic               phi2,
  output logic [1:0]         sw_width,
  output logic               phi2_fire,
  output logic [LVL_W-1:0]   vref_code,
  output logic [(1<<LVL_W)-1:0] vref_tap_sel,
  // PLL
  input  logic               vco_clk,
  output logic               pfd_up,
  output logic               pfd_dn,
  output logic               fb_clk,
  output logic [7:0]         div_n,
  output logic [TC_W-1:0]    pll_tc
);

  logic proc_done, ts_done, ts_valid;
  logic proc_busy, ts_busy, apwg_busy;

  // ---------------- sensors ----------------
  fdc_sensor #(.W(PROC_W), .NW(10)) u_proc (
    .clk(ref_clk), .osc(proc_ro), .rst_n(rst_n), .start(conv_start),
    .n(10'(N_PROC)), .code(proc_code), .done(proc_done), .busy(proc_busy)
  );

  voltage_sensor u_vs (
    .clk(ref_clk), .rst_n(rst_n), .sample(proc_done), .taps(vs_taps),
    .proc_code(proc_code), .proc_ctrl(vs_proc_ctrl), .v_code(v_code), .valid(v_valid)
  );

  fdc_sensor #(.W(TEMP_W), .NW(10)) u_ts (
    .clk(ref_clk), .osc(ts_ro), .rst_n(rst_n), .start(conv_start),
    .n(10'(N_TS)), .code(t_raw), .done(ts_done), .busy(ts_busy)
  );

  fdc_sensor #(.W(APWG_W), .NW(10)) u_apwg (
    .clk(apwg_pw_ro), .osc(apwg_ts_ro), .rst_n(rst_n), .start(conv_start),
    .n(10'(N_APWG)), .code(t_apwg), .done(t_apwg_done), .busy(apwg_busy)
  );

  // ---------------- calibration ----------------
  one_point_cal u_1pt (
    .clk(ref_clk), .rst_n(rst_n), .mode(cal_mode), .ts(t_raw), .done_t(ts_done),
    .t_out(t_1pt), .offset(t_1pt_offset), .ready(t_1pt_ready)
  );

  self_cal u_scal (
    .clk(ref_clk), .rst_n(rst_n), .t_raw(t_raw), .t_valid(ts_done),
    .proc_code(proc_code), .v_code(v_code),
    .cfg_we(scal_we), .cfg_proc(scal_proc), .cfg_vidx(scal_vidx), .cfg_offset(scal_offset),
    .t_cal(t_self), .t_cal_valid(ts_valid)
  );
  assign conv_done    = ts_valid;
  assign sensors_busy = proc_busy | ts_busy | apwg_busy;

  // ---------------- DVFS control and supply ----------------
  dvfs_controller #(.WIN_LOG2(WIN_LOG2)) u_dvfs (
    .clk(ref_clk), .rst_n(rst_n), .fifo_util(fifo_util), .stall(stall),
    .coef(wl_coef), .alpha_shift(wl_alpha_shift), .up_th(wl_up_th), .down_th(wl_down_th),
    .proc_code(proc_code), .temp_code(t_self),
    .level(dvfs_level), .div_n(div_n), .vref_code(vref_code), .workload(workload),
    .up_cnt(dvfs_up_cnt), .down_cnt(dvfs_down_cnt)
  );

  vref_dac_decoder u_dac (
    .clk(ref_clk), .rst_n(rst_n), .en(dcdc_en), .code(vref_code), .tap_sel(vref_tap_sel)
  );

  sc_pfm_controller u_pfm (
    .clk(dcdc_clk), .rst_n(rst_n), .en(dcdc_en), .vop1(vop1), .vop2(vop2),
    .cmp_clk(cmp_clk), .phi1(phi1), .phi2(phi2), .sw_width(sw_width), .phi2_fire(phi2_fire)
  );

  // ---------------- PLL digital part ----------------
  pll_divider #(.NW(8)) u_div (
    .vco_clk(vco_clk), .rst_n(rst_n), .n(div_n), .fb_clk(fb_clk)
  );

  pfd u_pfd (
    .ref_clk(ref_clk), .fb_clk(fb_clk), .rst_n(rst_n), .up(pfd_up), .dn(pfd_dn)
  );

  ts_comp_encoder u_tc (
    .clk(ref_clk), .rst_n(rst_n), .t(t_self), .t_valid(ts_valid), .tc(pll_tc)
  );

endmodule
