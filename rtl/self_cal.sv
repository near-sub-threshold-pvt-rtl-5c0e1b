// self_cal: process and voltage compensation of the all-digital temperature
// sensor code.
//
// The all-digital sensor's code moves with process corner and supply as well
// as with temperature. The process monitor (4-bit code) and the voltage
// sensor (one-hot V[4:0]) identify the operating point; this block subtracts
// an offset chosen by that pair from the raw temperature code:
//     T_cal = T_raw - OFFSET[proc_code][voltage index]
// The 16 x 5 offset table is held in registers, 9-bit two's complement, and
// is written through a simple write port (cfg_we with address and data); it
// resets to zero, which leaves the code uncalibrated. A voltage code that is
// not one-hot (below 0.30 V, or a bubble) selects the lowest set bit, or row
// entry 0 when no bit is set. The result saturates to 0..1023.
//
// Timing: t_raw is taken on the clk edge where t_valid is high; t_cal and
// t_cal_valid (one-cycle strobe) follow one clk edge later, so the output
// latency is one cycle.
//
// The use of the process and voltage sensor codes to correct the temperature
// code follows the design. The form of the correction (an offset table
// indexed by the two codes), its programming port and saturation are this
// implementation's choices.
module self_cal
  import pvt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [TEMP_W-1:0]  t_raw,
  input  logic               t_valid,
  input  logic [PROC_W-1:0]  proc_code,
  input  logic [VCODE_W-1:0] v_code,
  input  logic               cfg_we,
  input  logic [PROC_W-1:0]  cfg_proc,
  input  logic [2:0]         cfg_vidx,
  input  logic [OFFS_W-1:0]  cfg_offset,
  output logic [TEMP_W-1:0]  t_cal,
  output logic               t_cal_valid
);

  localparam int unsigned NP = 1 << PROC_W;
  localparam int TEMP_MAX = (1 <<< TEMP_W) - 1;

  logic [OFFS_W-1:0] table_q [NP][VCODE_W];
  logic [2:0]        vidx;
  int                tc;

  always_comb begin
    vidx = '0;
    for (int i = int'(VCODE_W) - 1; i >= 0; i--) if (v_code[i]) vidx = 3'(i);
  end

  always_comb begin
    tc = int'(t_raw) - int'($signed(table_q[proc_code][vidx]));
    if (tc < 0)        tc = 0;
    if (tc > TEMP_MAX) tc = TEMP_MAX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < int'(NP); p++)
        for (int v = 0; v < int'(VCODE_W); v++) table_q[p][v] <= '0;
      t_cal       <= '0;
      t_cal_valid <= 1'b0;
    end else begin
      if (cfg_we && cfg_vidx < 3'(VCODE_W)) table_q[cfg_proc][cfg_vidx] <= cfg_offset;
      t_cal_valid <= t_valid;
      if (t_valid) t_cal <= TEMP_W'(tc);
    end
  end

endmodule
