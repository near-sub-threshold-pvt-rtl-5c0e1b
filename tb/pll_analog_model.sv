// pll_analog_model: behavioural model of the charge pump, loop filter and
// VCO of the low-voltage PLL (not synthesizable).
//
// The loop filter state is a normalised control value u: UP raises it and
// DN lowers it at KI per ns (charge pump into the integrating capacitor),
// and while UP or DN is on the VCO also sees a proportional step KP (the
// resistor in series with the capacitor). The VCO runs at
//     f = Fc * clamp(u + KP*(up - dn), U_MIN, U_MAX)
// where the centre frequency Fc = F_NOM * tf(T) / tf(T_tc) follows the die
// temperature: tf(T) = 0.75 + 0.005 * T (T in degrees C), so a cold die runs
// slow and a hot one fast. The 3-bit temperature code tc selects a VCO band
// that cancels tf at the centre temperature of its bin, T_tc = 16 * tc - 14.25, the temperature of a calibrated code 352 + 64 * tc;
// with tc_en low the band is fixed at the 25 C setting.
module pll_analog_model #(
  parameter real F_NOM = 200.0e6,
  parameter real KI    = 0.0004,
  parameter real KP    = 0.02,
  parameter real U_MIN = 0.2,
  parameter real U_MAX = 1.1
) (
  input  logic       up,
  input  logic       dn,
  input  logic [2:0] tc,
  input  logic       tc_en,
  input  real        temp_c,
  output logic       vco_clk,
  output real        f_vco
);
  real u = 0.5;

  function automatic real tf(input real t);
    return 0.75 + 0.005 * t;
  endfunction

  // integrate the charge pump every 0.1 ns and recompute the frequency
  always begin
    real fc, uu, tbin;
    #0.1ns;
    if (up && !dn) u = u + KI * 0.1;
    if (dn && !up) u = u - KI * 0.1;
    if (u < U_MIN) u = U_MIN;
    if (u > U_MAX) u = U_MAX;
    tbin = tc_en ? 16.0 * real'(int'(tc)) - 14.25 : 25.0;
    fc = F_NOM * tf(temp_c) / tf(tbin);
    uu = u + (up ? KP : 0.0) - (dn ? KP : 0.0);
    if (uu < U_MIN) uu = U_MIN;
    if (uu > U_MAX) uu = U_MAX;
    f_vco = fc * uu;
  end

  initial vco_clk = 1'b0;
  always begin
    real half;
    half = (f_vco > 1.0e6) ? 0.5e9 / f_vco : 500.0;
    #(half * 1ns);
    vco_clk = ~vco_clk;
  end
endmodule
