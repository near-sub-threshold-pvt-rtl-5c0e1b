// pvt_pkg: widths and constants shared by the PVT sensor, calibration and
// DVFS control blocks.
//
// The widths of the sensor outputs follow the design: a 4-bit process code,
// a 5-bit one-hot voltage code (0.30 V .. 0.50 V in 50 mV steps), a 10-bit
// temperature code T[9:0], an 11-bit code T[10:0] for the sensor with the
// adaptive pulse width generator, a 9-bit calibration offset and a 3-bit
// temperature code for the PLL. The 1-point calibration reference 509 is the
// TT-corner reading at 25 C. The DVFS level width (3 bits, eight levels that
// match the eight taps of the reference DAC) is a choice of this design.
package pvt_pkg;

  localparam int unsigned PROC_W  = 4;    // process monitor output
  localparam int unsigned VCODE_W = 5;    // voltage sensor V[4:0], one-hot
  localparam int unsigned TEMP_W  = 10;   // temperature sensor T[9:0]
  localparam int unsigned APWG_W  = 11;   // APWG temperature sensor T[10:0]
  localparam int unsigned OFFS_W  = 9;    // calibration offset Offset[8:0]
  localparam int unsigned TC_W    = 3;    // temperature code to the PLL
  localparam int unsigned LVL_W   = 3;    // DVFS level / reference DAC code

  // TT-corner, 25 C reading used by the 1-point calibration.
  localparam logic [TEMP_W-1:0] CAL_REF_25C_TT = 10'd509;

  // Operating mode of the 1-point calibration block.
  typedef enum logic {
    MODE_MEASURE   = 1'b0,
    MODE_CALIBRATE = 1'b1
  } cal_mode_e;

  // Phases of the PFM switch controller of the SC DC-DC converter.
  typedef enum logic [2:0] {
    PFM_PHI1   = 3'd0,   // common phase, comparator idle
    PFM_SAMPLE = 3'd1,   // comparator clock high
    PFM_DECIDE = 3'd2,   // comparator result is read
    PFM_DEAD1  = 3'd3,   // both phases off before phi2
    PFM_PHI2   = 3'd4,   // charge-transfer phase
    PFM_DEAD2  = 3'd5    // both phases off after phi2
  } pfm_state_e;

endpackage
