// voltage_sensor: digital back end of the all-digital supply voltage sensor.
//
// The sensor launches an edge into a chain of current-starved inverters whose
// speed depends on the measured supply. At the sampling clock edge a row of
// flip-flops captures how far the edge has travelled: five taps, placed so
// that the edge reaches tap i when the supply is at least 0.30 V + i * 50 mV,
// give a thermometer code. XOR gates between neighbouring taps turn it into
// the one-hot code V[4:0]: V[0] = 0.30 V, V[1] = 0.35 V, V[2] = 0.40 V,
// V[3] = 0.45 V, V[4] = 0.50 V. An all-zero code means below 0.30 V.
//
// The process monitor drives one control bit into the delay line to cancel
// its process dependence. This block derives that bit from the 4-bit
// process code: proc_ctrl = 1 (speed up the starved inverters) when the code
// is below PROC_SLOW_TH, the slow side of the process spread.
//
// Timing: taps are sampled on the clk edge where sample is high; v_code and
// valid appear one clk edge later (valid is a one-cycle strobe).
//
// The delay line, flip-flops, XOR decoding, one-hot code table and the
// process control bit follow the design; the threshold that forms the control
// bit and the sample/valid handshake are this implementation's choices.
module voltage_sensor
  import pvt_pkg::*;
#(
  parameter logic [PROC_W-1:0] PROC_SLOW_TH = 4'd8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,
  input  logic [VCODE_W-1:0] taps,       // delay-line taps, tap 0 = shortest
  input  logic [PROC_W-1:0]  proc_code,
  output logic               proc_ctrl,
  output logic [VCODE_W-1:0] v_code,
  output logic               valid
);

  logic [VCODE_W-1:0] therm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      therm   <= '0;
      valid   <= 1'b0;
    end else begin
      valid   <= sample;
      if (sample) therm <= taps;
    end
  end

  // Neighbouring taps XORed; the last tap stands alone.
  always_comb begin
    for (int i = 0; i < int'(VCODE_W) - 1; i++) v_code[i] = therm[i] ^ therm[i+1];
    v_code[VCODE_W-1] = therm[VCODE_W-1];
  end

  assign proc_ctrl = (proc_code < PROC_SLOW_TH);

endmodule
