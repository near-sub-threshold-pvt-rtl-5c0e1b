// tb_pvt_sensor_sweep: sensor workload test of the PVT-aware DVFS core at its
// default parameters. It sweeps the temperature from 0 C to 100 C in 10 C
// steps in three process corners (slow, typical, fast) and checks every
// temperature path against the ideal code of the oscillator model:
//   - 1-point calibration: one conversion at 25 C in calibration mode, then
//     the corrected code D - P0 must be within 2 LSB of the typical-corner
//     code 409 + 4 * T (509 at 25 C);
//   - self-calibration: the offset table entry of the corner's process and
//     voltage codes is programmed with the corner shift; t_self must be
//     within 1 LSB of the same code;
//   - adaptive pulse width: the pulse-width oscillator moves with the corner
//     (0.8x, 1x, 1.2x), the code must stay within 2 LSB of 785 + 3.45 * T;
//   - rates: every conversion of the fixed-window channels must finish
//     within 100 us (10k samples/s) and every APWG conversion within 20 us
//     (50k samples/s).
// It also sweeps the supply seen by the voltage sensor from 0.30 V to 0.50 V
// in each corner and checks the one-hot code, with the process control bit
// undoing the slow corner's shift of the delay line.
//
// The analog side is modelled as in the end-to-end test: ring oscillators
// with a settable period and a delay line whose taps switch at
// 0.30 V + 50 mV * i. The converter and PLL ports are left idle.
module tb_pvt_sensor_sweep;
  import pvt_pkg::*;

  logic ref_clk = 0, rst_n = 0, conv_start = 0;
  always #50 ref_clk = ~ref_clk;   // 10 MHz reference

  real temp_c = 25.0;
  int  p0 = 0;
  int  proc_code_model = 8;
  real g_proc = 1.0;
  int  corner_mv = 0;
  int  vin_mv = 400;

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
  logic dcdc_clk = 0, dcdc_en = 0, vop1 = 0, vop2 = 0, cmp_clk, phi1, phi2, phi2_fire;
  logic [1:0] sw_width;
  logic [7:0] vref_tap_sel, div_n;
  logic vco_clk = 0, pfd_up, pfd_dn, fb_clk;

  pvt_dvfs_top dut (.*);

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

  // conversion times, measured from the start strobe
  realtime t_start, t_apwg_end;
  always @(posedge t_apwg_done) t_apwg_end = $realtime;

  task automatic convert(output real t_conv, output real t_apwg_conv);
    @(negedge ref_clk); conv_start = 1; t_start = $realtime;
    @(negedge ref_clk); conv_start = 0;
    @(posedge conv_done); #1;
    t_conv = $realtime - t_start;
    t_apwg_conv = t_apwg_end - t_start;
    @(negedge ref_clk);
  endtask

  function automatic int abs_i(input int x);
    return x < 0 ? -x : x;
  endfunction

  function automatic int vidx_of(input logic [4:0] v);
    for (int i = 0; i < 5; i++) if (v[i]) return i;
    return 0;
  endfunction

  int worst_1pt = 0, worst_self = 0, worst_apwg = 0;
  real worst_t = 0.0, worst_ta = 0.0;

  initial begin
    int cp0 [3], cproc [3], cmv [3];
    real cg [3];
    real t_conv, t_ac;
    cp0 = '{-40, 0, 40}; cproc = '{5, 8, 11}; cmv = '{-30, 0, 10}; cg = '{0.8, 1.0, 1.2};
    wl_coef[0] = 4'd8; wl_coef[1] = 4'd4; wl_coef[2] = 4'd2; wl_coef[3] = 4'd2;
    #230 rst_n = 1;
    #1us;

    for (int c = 0; c < 3; c++) begin
      p0 = cp0[c]; proc_code_model = cproc[c]; corner_mv = cmv[c]; g_proc = cg[c];

      // voltage sensor over its range
      for (int v = 0; v < 5; v++) begin
        vin_mv = 300 + 50 * v;
        convert(t_conv, t_ac);
        check(v_code == 5'(1 << v), $sformatf("corner %0d: V = %b at %0d mV", c, v_code, vin_mv));
      end
      vin_mv = 400;

      // 1-point calibration at 25 C
      temp_c = 25.0; cal_mode = MODE_CALIBRATE;
      convert(t_conv, t_ac);
      check(abs_i(int'($signed(t_1pt_offset)) - p0) <= 1,
            $sformatf("corner %0d: offset %0d, expected %0d", c, $signed(t_1pt_offset), p0));
      cal_mode = MODE_MEASURE;

      // self-calibration entry for this corner's operating point
      @(negedge ref_clk);
      scal_we = 1; scal_proc = proc_code; scal_vidx = 3'(vidx_of(v_code)); scal_offset = 9'(p0);
      @(negedge ref_clk); scal_we = 0;

      for (int k = 0; k <= 10; k++) begin
        int ideal, ideal_a, e1, e2, ea;
        temp_c = 10.0 * k;
        ideal = 409 + 40 * k;
        ideal_a = $rtoi(785.0 + 3.45 * temp_c + 0.5);
        convert(t_conv, t_ac);
        e1 = abs_i(int'(t_1pt) - ideal);
        e2 = abs_i(int'(t_self) - ideal);
        ea = abs_i(int'(t_apwg) - ideal_a);
        check(e1 <= 2, $sformatf("corner %0d, %0.0f C: 1-point %0d, ideal %0d", c, temp_c, t_1pt, ideal));
        check(e2 <= 1, $sformatf("corner %0d, %0.0f C: self-calibrated %0d, ideal %0d", c, temp_c, t_self, ideal));
        check(ea <= 2, $sformatf("corner %0d, %0.0f C: APWG %0d, ideal %0d", c, temp_c, t_apwg, ideal_a));
        check(t_conv < 100000.0, $sformatf("conversion %0.0f ns over 100 us", t_conv));
        check(t_ac < 20000.0, $sformatf("APWG conversion %0.0f ns over 20 us", t_ac));
        if (e1 > worst_1pt) worst_1pt = e1;
        if (e2 > worst_self) worst_self = e2;
        if (ea > worst_apwg) worst_apwg = ea;
        if (t_conv > worst_t) worst_t = t_conv;
        if (t_ac > worst_ta) worst_ta = t_ac;
      end
    end

    check(t_1pt_ready, "1-point ready");
    $display("worst error (LSB): 1-point %0d, self-calibrated %0d, APWG %0d; slowest conversion %0.1f us, APWG %0.1f us",
             worst_1pt, worst_self, worst_apwg, worst_t / 1000.0, worst_ta / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
