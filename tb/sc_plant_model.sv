// sc_plant_model: behavioural model of the switched-capacitor switch matrix
// and output node in its gain-1/2 configuration (not synthesizable).
// Each phi2 pulse moves the output toward the no-load voltage by the charge
// sharing of flying capacitor Cf and hold capacitor Ch:
//     Vout <- a * Vin + b * Vout,  a = 2ChCf/(Ch+Cf)^2,  b = (Ch-Cf)^2/(Ch+Cf)^2
// whose fixed point is Vin/2. With the narrow switch width only part of the
// charge settles (factor NARROW). The load draws iload_ua continuously from
// the hold capacitor.
module sc_plant_model #(
  parameter real CF     = 80.0e-12,
  parameter real CH     = 4.0e-9,
  parameter real NARROW = 0.8
) (
  input  logic       phi2,
  input  logic [1:0] sw_width,
  input  real        vin,
  input  real        iload_ua,
  output real        vout
);
  real a, b;
  initial begin
    a = 2.0 * CH * CF / ((CH + CF) * (CH + CF));
    b = ((CH - CF) * (CH - CF)) / ((CH + CF) * (CH + CF));
    vout = 0.0;
  end
  // charge transfer at the end of each phi2 pulse
  always @(negedge phi2) begin
    real vn;
    vn = a * vin + b * vout;
    vout = sw_width[1] ? vn : vout + NARROW * (vn - vout);
  end
  // load discharge, integrated every 10 ns
  always begin
    #10ns;
    vout = vout - (iload_ua * 1.0e-6) * 10.0e-9 / CH;
    if (vout < 0.0) vout = 0.0;
  end
endmodule
