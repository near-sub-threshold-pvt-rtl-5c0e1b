// tb_sc_pfm_controller: closes the PFM loop around a comparator model and a
// gain-1/2 switched-capacitor model (0.5 V in). Checks that phi1 and phi2
// never overlap and are separated by the dead time, the phi2 width and the
// regulation-cycle length in clock cycles, that no pulse fires while VOUT is
// above VREF, that the wide switch setting is used while VOUT is far below
// VREF, that the output settles within 4 % of VREF for loads of 10..100 uA,
// and that the phi2 rate grows with the load.
module tb_sc_pfm_controller;
  logic clk = 0, rst_n = 0, en = 0;
  logic vop1, vop2, cmp_clk, phi1, phi2, phi2_fire;
  logic [1:0] sw_width;
  logic force_mode = 0;
  logic f_vop1 = 0, f_vop2 = 0;
  logic m_vop1, m_vop2;
  real vref = 0.2, vin = 0.5, iload = 10.0, vout;
  int checks = 0, failures = 0;
  int fires = 0, wide = 0;

  dlc_model u_cmp (.clk(cmp_clk), .vref, .vout, .vop1(m_vop1), .vop2(m_vop2));
  sc_plant_model u_sc (.phi2, .sw_width, .vin, .iload_ua(iload), .vout);
  assign vop1 = force_mode ? f_vop1 : m_vop1;
  assign vop2 = force_mode ? f_vop2 : m_vop2;

  sc_pfm_controller #(.IDLE_CYC(2), .DEAD_CYC(1), .PHI2_CYC(4)) dut (
    .clk, .rst_n, .en, .vop1, .vop2, .cmp_clk, .phi1, .phi2, .sw_width, .phi2_fire);

  always #5 clk = ~clk;   // 100 MHz controller clock

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // phase monitor
  logic phi1_q = 0, phi2_q = 0;
  int gap = 0, p2len = 0;
  int ovl_bad = 0, dead_bad = 0, len_bad = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (phi1 && phi2) ovl_bad++;
    if (phi2_fire) begin fires++; if (sw_width == 2'b11) wide++; end
    if (!phi1 && !phi2) gap++;
    if (phi2 && !phi2_q && gap < 1) dead_bad++;
    if (phi1 && !phi1_q && phi2_q) dead_bad++;
    if (phi2) p2len++;
    if (!phi2 && phi2_q && p2len != 4) len_bad++;
    if (!phi2) p2len = 0;
    if (phi1 || phi2) gap = 0;
    phi1_q = phi1; phi2_q = phi2;
  end

  int fire_lo, fire_hi;
  initial begin
    #22 rst_n = 1;
    // --- directed: comparator says VOUT above VREF, no pulses, 4-cycle period
    force_mode = 1; f_vop1 = 0; en = 1;
    begin
      int c0, n_cmp, t;
      n_cmp = 0; c0 = fires;
      for (t = 0; t < 40; t++) begin @(posedge clk); #1 if (cmp_clk) n_cmp++; end
      check(fires == c0, "no phi2 while VOUT above VREF");
      check(n_cmp == 10, $sformatf("comparator clocked %0d times in 40 cycles, expected 10", n_cmp));
      // comparator says below: each cycle is 4 + 1 + 4 + 1 = 10 cycles
      f_vop1 = 1; f_vop2 = 1;
      @(posedge phi2_fire); c0 = fires;
      for (t = 0; t < 100; t++) @(posedge clk);
      #1 check(fires - c0 == 10, $sformatf("%0d pulses in 100 cycles, expected 10", fires - c0));
      check(sw_width == 2'b11 || !phi2, "wide switches for a large error");
      // small error: only VOP1, narrow switches for the next pulses
      f_vop2 = 0;
      @(posedge phi2_fire); @(posedge phi2_fire); #1;
      check(phi2 && sw_width == 2'b01, $sformatf("narrow switches for a small error (%b)", sw_width));
      @(negedge phi2); repeat (2) @(posedge clk); #1;
      check(sw_width == 2'b00, "switch width released after the pulse");
      en = 0; f_vop1 = 0; f_vop2 = 0;
      repeat (20) @(posedge clk);
      #1 check(phi1 && !phi2, "disabled converter rests in phi1");
    end
    // --- closed loop start-up and regulation
    force_mode = 0; en = 1; wide = 0;
    repeat (4000) @(posedge clk);
    check(wide > 0, "wide switch width used during start-up");
    for (int k = 0; k < 2; k++) begin
      real vmin, vmax;
      int f0;
      iload = (k == 0) ? 10.0 : 100.0;
      repeat (3000) @(posedge clk);
      vmin = 1.0; vmax = 0.0; f0 = fires;
      repeat (5000) begin @(posedge clk); if (vout < vmin) vmin = vout; if (vout > vmax) vmax = vout; end
      if (k == 0) fire_lo = fires - f0; else fire_hi = fires - f0;
      check(vmin > vref * 0.96 && vmax < vref * 1.04,
            $sformatf("load %0.0f uA: vout %0.4f..%0.4f outside 4%% of %0.3f", iload, vmin, vmax, vref));
    end
    check(fire_hi > fire_lo, $sformatf("phi2 rate grows with load (%0d vs %0d)", fire_lo, fire_hi));
    check(ovl_bad == 0, "phi1 and phi2 never overlap");
    check(dead_bad == 0, "dead time between phases");
    check(len_bad == 0, "phi2 pulse width 4 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
