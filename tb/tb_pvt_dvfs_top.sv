// tb_pvt_dvfs_top: end-to-end test of the PVT-aware DVFS core at its default
// parameters, with behavioural models of every analog part around it.
//
// The temperature oscillator is set so that the 10-bit code of a typical die
// is D = 409 + 4 * T (T in degrees C; 509 at 25 C) and a process corner adds
// a constant shift p0. The process oscillator gives a 4-bit code of 8 in the
// typical corner. The APWG channel's oscillators both scale with the corner.
// The converter model runs from 0.5 V in its gain-1/2 setting; its
// reference is taken from the DAC tap select as 0.15 V + 10 mV * tap (a
// scaled copy of the 0.3..1.0 V taps that this gain setting can reach).
//
// Sequence: 1-point calibration at 25 C in a fast corner and a measurement
// at 60 C; programming of the self-calibration table and a measurement at
// 80 C; APWG conversions in two corners; a heavy workload that steps the
// DVFS level up to 7 with the converter and PLL following (PLL locked at
// 200 MHz within 1 %, converter within 4 % of its reference); a light
// workload that steps it back down; a cold die where the PLL only reaches
// 200 MHz with the temperature code applied, and a slow-corner reading that
// adds the supply margin. Each mechanism is counted and must occur.
module tb_pvt_dvfs_top;
  import pvt_pkg::*;

  // ---------------- stimulus and models ----------------
  logic ref_clk = 0, rst_n = 0, conv_start = 0;
  real  temp_c = 25.0;
  int   p0 = 0;                  // temperature code shift of the corner
  int   proc_code_model = 8;     // process monitor code of the corner
  real  g_proc = 1.0;            // APWG oscillator process factor
  int   corner_mv = 0;
  int   vin_mv = 400;
  logic tc_en = 1;

  always #50 ref_clk = ~ref_clk;   // 10 MHz reference
  logic dcdc_clk = 0;
  always #5 dcdc_clk = ~dcdc_clk;  // 100 MHz converter control clock

  int ts_half, proc_half, apwg_pw_half, apwg_ts_half;
  always_comb begin
    int code;
    real f_pw, f_ts;
    code = 409 + $rtoi(4.0 * temp_c) + p0;
    ts_half = 25000000 / code;                  // f = code * 20 kHz (N_TS = 500)
    proc_half = 400000 / proc_code_model;       // f = code * 1.25 MHz (N_PROC = 8)
    f_pw = 20.0e6 * g_proc;
    f_ts = f_pw * (785.0 + 3.45 * temp_c) / 64.0;
    apwg_pw_half = $rtoi(0.5e12 / f_pw);
    apwg_ts_half = $rtoi(0.5e12 / f_ts);
  end

  logic ts_ro, proc_ro, apwg_ts_ro, apwg_pw_ro;
  osc_model u_o1 (.en(1'b1), .half_ps(ts_half),      .out(ts_ro));
  osc_model u_o2 (.en(1'b1), .half_ps(proc_half),    .out(proc_ro));
  osc_model u_o3 (.en(1'b1), .half_ps(apwg_ts_half), .out(apwg_ts_ro));
  osc_model u_o4 (.en(1'b1), .half_ps(apwg_pw_half), .out(apwg_pw_ro));

  logic [4:0] vs_taps;
  logic vs_proc_ctrl;
  vs_delay_line_model u_vdl (.vin_mv, .corner_mv, .proc_ctrl(vs_proc_ctrl), .taps(vs_taps));

  // ---------------- DUT ----------------
  logic [3:0] proc_code;
  logic [4:0] v_code;
  logic v_valid, sensors_busy;
  logic [9:0] t_raw, t_1pt, t_self;
  logic [10:0] t_apwg;
  logic t_apwg_done, t_1pt_ready, conv_done;
  logic [8:0] t_1pt_offset;
  cal_mode_e cal_mode = MODE_MEASURE;
  logic scal_we = 0;
  logic [3:0] scal_proc = 0;
  logic [2:0] scal_vidx = 0;
  logic [8:0] scal_offset = 0;
  logic [7:0] fifo_util = 0;
  logic stall = 0;
  logic [3:0] wl_coef [4];
  logic [2:0] wl_alpha_shift = 3'd1;
  logic [10:0] wl_up_th = 11'd300, wl_down_th = 11'd100;
  logic [2:0] dvfs_level, vref_code, pll_tc;
  logic [10:0] workload;
  logic [15:0] dvfs_up_cnt, dvfs_down_cnt;
  logic dcdc_en = 0, vop1, vop2, cmp_clk, phi1, phi2, phi2_fire;
  logic [1:0] sw_width;
  logic [7:0] vref_tap_sel, div_n;
  logic vco_clk, pfd_up, pfd_dn, fb_clk;

  pvt_dvfs_top dut (.*);

  // converter, comparator and PLL models
  real vref_v, vout, f_vco;
  always_comb begin
    vref_v = 0.0;
    for (int k = 0; k < 8; k++) if (vref_tap_sel[k]) vref_v = 0.15 + 0.01 * k;
  end
  real vref_hold = 0.15;
  always @(vref_tap_sel) if (vref_tap_sel != 0) vref_hold = vref_v;
  real vin_dcdc = 0.5, iload = 50.0;
  dlc_model u_cmp (.clk(cmp_clk), .vref(vref_hold), .vout, .vop1, .vop2);
  sc_plant_model u_sc (.phi2, .sw_width, .vin(vin_dcdc), .iload_ua(iload), .vout);
  pll_analog_model u_pll (.up(pfd_up), .dn(pfd_dn), .tc(pll_tc), .tc_en, .temp_c, .vco_clk, .f_vco);

  // ---------------- checking ----------------
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_cal = 0, n_meas = 0, n_selfcorr = 0, n_apwg = 0;
  int n_up, n_down;
  int n_phi2 = 0, n_wide = 0, n_tap_change = 0, n_tc_change = 0, n_margin = 0, n_ctrl = 0;
  logic [7:0] tap_q = 0;
  logic [2:0] tc_q = 0;
  always @(posedge t_apwg_done) n_apwg++;
  always @(posedge ref_clk) if (rst_n) begin
    #2;
    if (conv_done && cal_mode == MODE_CALIBRATE) n_cal++;
    if (conv_done && cal_mode == MODE_MEASURE) n_meas++;
    if (conv_done && t_self != t_raw) n_selfcorr++;
    if (vref_tap_sel != 0 && vref_tap_sel != tap_q) begin n_tap_change++; tap_q = vref_tap_sel; end
    if (pll_tc != tc_q) begin n_tc_change++; tc_q = pll_tc; end
    if (vref_code > dvfs_level) n_margin++;
    if (vs_proc_ctrl) n_ctrl++;
  end
  always @(negedge dcdc_clk) if (rst_n) begin
    if (phi2_fire) n_phi2++;
    if (phi2_fire && sw_width == 2'b11) n_wide++;
    // the two converter phases never overlap
    if (phi1 && phi2) check(0, "phi1 and phi2 overlap");
  end
  assign n_up = int'(dvfs_up_cnt);
  assign n_down = int'(dvfs_down_cnt);

  task automatic convert();
    @(negedge ref_clk); conv_start = 1;
    @(negedge ref_clk); conv_start = 0;
    @(posedge conv_done); #1;
    @(negedge ref_clk);
  endtask

  // average fb_clk period in ns over n cycles
  task automatic fb_period(input int n, output real per);
    realtime t0;
    @(posedge fb_clk); t0 = $realtime;
    repeat (n) @(posedge fb_clk);
    per = ($realtime - t0) / n;
  endtask

  task automatic run_workload(input int windows, input int fifo, input int stall_pct);
    repeat (windows * 256) begin
      @(negedge ref_clk);
      fifo_util = 8'(fifo);
      stall = ($urandom_range(0, 99) < stall_pct);
    end
  endtask

  function automatic int vidx_of(input logic [4:0] v);
    for (int i = 0; i < 5; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    real per, vmin, vmax;
    int t_conv0;
    wl_coef[0] = 4'd8; wl_coef[1] = 4'd4; wl_coef[2] = 4'd2; wl_coef[3] = 4'd2;
    #230 rst_n = 1;
    #1us;

    // ---- 1-point calibration (fast corner, p0 = +40) ----
    p0 = 40; proc_code_model = 11; corner_mv = 10; temp_c = 25.0;
    cal_mode = MODE_CALIBRATE;
    t_conv0 = $rtoi($realtime);
    convert();
    // conversion inside the 100 us of a 10k samples/s rate
    check($realtime - t_conv0 < 100000, $sformatf("conversion took %0.0f ns", $realtime - t_conv0));
    check($signed(t_1pt_offset) >= 38 && $signed(t_1pt_offset) <= 42,
          $sformatf("offset %0d, expected about 40", $signed(t_1pt_offset)));
    check(proc_code >= 10 && proc_code <= 12, $sformatf("process code %0d, expected about 11", proc_code));
    check(v_code == 5'b00100, $sformatf("voltage code %b at 0.40 V", v_code));
    cal_mode = MODE_MEASURE; temp_c = 60.0;
    convert();
    @(negedge ref_clk);
    check(t_1pt_ready, "ready after the first measurement");
    check(int'(t_1pt) >= 647 && int'(t_1pt) <= 651, $sformatf("1-point result %0d at 60 C, expected 649", t_1pt));

    // ---- self calibration: table entry for this operating point ----
    @(negedge ref_clk);
    scal_we = 1; scal_proc = proc_code; scal_vidx = 3'(vidx_of(v_code)); scal_offset = 9'(p0);
    @(negedge ref_clk); scal_we = 0;
    temp_c = 80.0;
    convert();
    check(int'(t_self) >= 727 && int'(t_self) <= 731, $sformatf("self-calibrated %0d at 80 C, expected 729", t_self));

    // ---- APWG sensor: process cancels ----
    begin
      int a1, a2;
      temp_c = 50.0; g_proc = 1.0; convert(); a1 = int'(t_apwg);
      g_proc = 0.8; convert(); a2 = int'(t_apwg);
      check(a1 >= 955 && a1 <= 960, $sformatf("APWG code %0d at 50 C, expected about 957", a1));
      check(a1 - a2 <= 2 && a2 - a1 <= 2, $sformatf("APWG code moves with process: %0d vs %0d", a1, a2));
      g_proc = 1.0;
    end

    // ---- DVFS up: heavy workload ----
    temp_c = 80.0; convert();
    dcdc_en = 1;
    run_workload(12, 250, 90);
    check(dvfs_level == 3'd7, $sformatf("level %0d after heavy load, expected 7", dvfs_level));
    check(div_n == 8'd20, $sformatf("divider %0d, expected 20", div_n));
    run_workload(4, 250, 90);           // let PLL and converter settle
    fb_period(20, per);
    check(per > 99.0 && per < 101.0, $sformatf("PLL feedback period %0.2f ns, expected 100", per));
    check(f_vco > 198.0e6 && f_vco < 202.0e6, $sformatf("VCO at %0.1f MHz, expected 200", f_vco / 1.0e6));
    vmin = 9.0; vmax = 0.0;
    repeat (2000) begin @(posedge ref_clk); if (vout < vmin) vmin = vout; if (vout > vmax) vmax = vout; end
    check(vmin > 0.96 * vref_hold && vmax < 1.04 * vref_hold,
          $sformatf("converter %0.4f..%0.4f V for reference %0.3f V", vmin, vmax, vref_hold));

    // ---- DVFS down: light workload ----
    run_workload(12, 20, 0);
    check(dvfs_level == 3'd0, $sformatf("level %0d after light load, expected 0", dvfs_level));
    check(div_n == 8'd6, "divider back at 6");
    run_workload(4, 20, 0);
    fb_period(20, per);
    check(per > 99.0 && per < 101.0, $sformatf("PLL relocked at 60 MHz: period %0.2f ns", per));

    // ---- cold die: temperature code needed for 200 MHz ----
    temp_c = 0.0; convert();
    tc_en = 0;
    run_workload(12, 250, 90);
    fb_period(20, per);
    check(per > 102.0, $sformatf("without the temperature code the VCO cannot reach 200 MHz (%0.2f ns)", per));
    tc_en = 1;
    run_workload(4, 250, 90);
    fb_period(20, per);
    check(per > 99.0 && per < 101.0, $sformatf("with the temperature code it locks (%0.2f ns)", per));

    // ---- slow corner: supply margin and voltage-sensor control bit ----
    proc_code_model = 5; corner_mv = -30; p0 = -30;
    run_workload(12, 20, 0);
    convert();
    check(proc_code <= 6, $sformatf("slow process code %0d", proc_code));
    check(vs_proc_ctrl, "control bit set in the slow corner");
    @(negedge ref_clk);
    check(int'(vref_code) == int'(dvfs_level) + 1 + (t_self < 10'd384 ? 1 : 0),
          $sformatf("slow corner margin: level %0d code %0d temp %0d", dvfs_level, vref_code, t_self));
    repeat (3) @(negedge ref_clk);
    check(vref_tap_sel == 8'(1 << vref_code), $sformatf("DAC tap %b for code %0d", vref_tap_sel, vref_code));
    convert();
    check(v_code == 5'b00100, $sformatf("voltage code %b in the slow corner with the control bit", v_code));

    // ---- every mechanism seen ----
    check(n_cal > 0, "calibration mode used");
    check(n_meas > 0, "measurement mode used");
    check(n_selfcorr > 0, "self-calibration correction applied");
    check(n_apwg > 0, "APWG conversions");
    check(n_up > 0, "DVFS level up");
    check(n_down > 0, "DVFS level down");
    check(n_phi2 > 0, "phi2 pulses");
    check(n_wide > 0, "wide switch width");
    check(n_tap_change > 1, "reference tap changes");
    check(n_tc_change > 0, "PLL temperature code changes");
    check(n_margin > 0, "PVT supply margin");
    check(n_ctrl > 0, "voltage sensor control bit");
    $display("mechanisms: cal=%0d meas=%0d selfcorr=%0d apwg=%0d up=%0d down=%0d phi2=%0d wide=%0d tap=%0d tc=%0d margin=%0d ctrl=%0d",
             n_cal, n_meas, n_selfcorr, n_apwg, n_up, n_down, n_phi2, n_wide, n_tap_change, n_tc_change, n_margin, n_ctrl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
