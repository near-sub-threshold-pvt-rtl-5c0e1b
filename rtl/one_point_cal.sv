// one_point_cal: 1-point calibration of the temperature sensor code.
//
// The process corner shifts the whole transfer curve of the sensor by a
// roughly constant number of codes. The chip is therefore read once at a
// known temperature (25 C) in calibration mode; the difference to the
// TT-corner reading at 25 C, 509, is the offset P0 = D(25 C, P) - 509, stored
// as a 9-bit two's complement Offset[8:0]. In measurement mode every reading
// D(T, P) is latched and the output is T = D(T, P) - P0.
//
// A demultiplexer steers the sensor code TS[9:0] by mode: to the first
// subtractor (against the constant 509) in calibration mode, or to the
// measurement register in measurement mode. done_t, the sensor's end of
// conversion strobe, loads whichever register mode selects. ready rises one
// clk period after the first measurement is latched and then stays high
// until reset (the two flip-flops with D tied high).
//
// Timing: done_t is a one-cycle strobe in the clk domain. Offset and the
// measurement register update on the clk edge where done_t is high; t_out is
// combinational from them.
//
// Follows the design: the constant 509, the demultiplexer, both subtractors,
// Offset[8:0], the 10-bit measurement register and the two-flop ready chain.
// This implementation's own choices: an explicit register for the offset, the
// saturation of P0 to -256..255 and of T to 0..1023, active-high calibration
// mode, and synchronous capture on clk instead of clocking by done_t.
module one_point_cal
  import pvt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cal_mode_e          mode,
  input  logic [TEMP_W-1:0]  ts,
  input  logic               done_t,
  output logic [TEMP_W-1:0]  t_out,
  output logic [OFFS_W-1:0]  offset,
  output logic               ready
);

  localparam int OFFS_MAX = (1 <<< (OFFS_W - 1)) - 1;
  localparam int OFFS_MIN = -(1 <<< (OFFS_W - 1));
  localparam int TEMP_MAX = (1 <<< TEMP_W) - 1;

  logic [TEMP_W-1:0] meas;
  logic              ready_q1;
  int                p0;
  int                tcal;

  // First subtractor: P0 = TS - 509, saturated into Offset[8:0].
  always_comb begin
    p0 = int'(ts) - int'(CAL_REF_25C_TT);
    if (p0 > OFFS_MAX) p0 = OFFS_MAX;
    if (p0 < OFFS_MIN) p0 = OFFS_MIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset   <= '0;
      meas     <= '0;
      ready_q1 <= 1'b0;
      ready    <= 1'b0;
    end else begin
      if (done_t) begin
        if (mode == MODE_CALIBRATE) offset <= OFFS_W'(p0);
        else begin
          meas     <= ts;
          ready_q1 <= 1'b1;
        end
      end
      if (ready_q1) ready <= 1'b1;
    end
  end

  // Second subtractor: T = D - P0, saturated into T[9:0].
  always_comb begin
    tcal = int'(meas) - int'($signed(offset));
    if (tcal < 0)        tcal = 0;
    if (tcal > TEMP_MAX) tcal = TEMP_MAX;
    t_out = TEMP_W'(tcal);
  end

endmodule
