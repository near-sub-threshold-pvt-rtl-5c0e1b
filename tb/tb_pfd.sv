// tb_pfd: drives the detector with a reference and a feedback clock of the
// same frequency at several phase offsets and with different frequencies.
// Checks that UP is high for the lead time when the reference leads, DN
// when the feedback leads, that both are never high after the reset
// settles, and that a frequency error gives pulses of one sign only.
module tb_pfd;
  logic ref_clk = 0, fb_clk = 0, rst_n = 0, up, dn;
  int checks = 0, failures = 0;

  pfd dut (.ref_clk, .fb_clk, .rst_n, .up, .dn);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  realtime up_t, dn_t, t_up_rise, t_dn_rise;
  int up_pulses, dn_pulses;
  always @(posedge up) t_up_rise = $realtime;
  always @(negedge up) begin up_t += $realtime - t_up_rise; up_pulses++; end
  always @(posedge dn) t_dn_rise = $realtime;
  always @(negedge dn) begin dn_t += $realtime - t_dn_rise; dn_pulses++; end

  // ten edges of each clock; fb delayed by skew_ns (negative: fb leads)
  task automatic run_phase(input int skew_ns);
    up_t = 0; dn_t = 0; up_pulses = 0; dn_pulses = 0;
    for (int k = 0; k < 10; k++) begin
      if (skew_ns >= 0) begin
        ref_clk = 1; #(skew_ns); fb_clk = 1; #1;
        check(!(up && dn), "UP and DN both high");
        #(49 - skew_ns); ref_clk = 0; fb_clk = 0; #50;
      end else begin
        fb_clk = 1; #(-skew_ns); ref_clk = 1; #1;
        check(!(up && dn), "UP and DN both high");
        #(49 + skew_ns); ref_clk = 0; fb_clk = 0; #50;
      end
    end
  endtask

  initial begin
    #10 rst_n = 1; #10;
    for (int s = -30; s <= 30; s += 10) begin
      run_phase(s);
      if (s > 0) check(up_t == 10.0 * s && dn_t == 0, $sformatf("skew %0d: up %0.1f dn %0.1f", s, up_t, dn_t));
      else if (s < 0) check(dn_t == -10.0 * s && up_t == 0, $sformatf("skew %0d: up %0.1f dn %0.1f", s, up_t, dn_t));
      else check(up_t == 0 && dn_t == 0, "no error, no pulse");
    end
    // frequency error: reference 100 ns, feedback 130 ns
    up_pulses = 0; dn_pulses = 0; up_t = 0; dn_t = 0;
    fork
      repeat (20) begin ref_clk = 1; #50; ref_clk = 0; #50; end
      repeat (15) begin #30; fb_clk = 1; #65; fb_clk = 0; #35; end
    join
    check(up_pulses > 10, $sformatf("fast reference gives UP pulses (%0d)", up_pulses));
    check(dn_t == 0 && up_t > 0, $sformatf("and no DN time (%0.1f ns)", dn_t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
