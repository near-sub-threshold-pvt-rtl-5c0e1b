// dvfs_controller: PVT-aware dynamic voltage and frequency scaling control.
//
// A workload_filter turns FIFO utilisation and stall duration into a
// filtered workload value. After every new value the controller moves the
// performance level one step: up when the workload is above up_th, down
// when it is below down_th, otherwise it holds. There are eight levels.
//   - Frequency: the PLL divider ratio is div_n = N_BASE + level * N_STEP
//     (with the defaults 6..20, i.e. 60..200 MHz from a 10 MHz reference).
//   - Voltage: the reference DAC code is the level plus a PVT margin,
//     clamped to 7. The margin adds one step when the process monitor reads
//     a slow corner (proc_code below PROC_SLOW_TH) and one when the
//     calibrated temperature code is below TEMP_COLD_TH, the two conditions
//     that slow sub-threshold logic down.
// When the level goes up, the voltage code is raised first and the divider
// ratio one decision later; when it goes down, the divider ratio drops first
// and the voltage one decision later, so the clock never runs ahead of the
// supply. up_cnt and down_cnt count the level changes.
//
// Timing: level, div_n and vref_code change on the clk edge after wl_valid.
// With the defaults div_n is always even and at most 20, so its bit 0 and
// its top bits are constant; a synthesis tool reports them as idle.
//
// Follows the design: workload from FIFO utilisation and stall duration,
// configurable FIR and IIR filtering, step-wise increment and decrement of
// frequency and voltage, and supply adjustment from the PVT sensors. This
// implementation's own choices: the thresholds, the number of levels, the
// level-to-ratio mapping, the form of the PVT margin and the ordering of
// voltage and frequency changes.
module dvfs_controller
  import pvt_pkg::*;
#(
  parameter int unsigned       WIN_LOG2     = 8,
  parameter int unsigned       N_BASE       = 6,
  parameter int unsigned       N_STEP       = 2,
  parameter logic [PROC_W-1:0] PROC_SLOW_TH = 4'd8,
  parameter logic [TEMP_W-1:0] TEMP_COLD_TH = 10'd384
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        fifo_util,
  input  logic              stall,
  input  logic [3:0]        coef [4],
  input  logic [2:0]        alpha_shift,
  input  logic [10:0]       up_th,
  input  logic [10:0]       down_th,
  input  logic [PROC_W-1:0] proc_code,
  input  logic [TEMP_W-1:0] temp_code,
  output logic [LVL_W-1:0]  level,
  output logic [7:0]        div_n,
  output logic [LVL_W-1:0]  vref_code,
  output logic [10:0]       workload,
  output logic [15:0]       up_cnt,
  output logic [15:0]       down_cnt
);

  localparam int LVL_MAX = (1 << LVL_W) - 1;

  logic             wl_valid;
  logic [LVL_W-1:0] f_level;    // level the clock runs at
  logic [LVL_W-1:0] v_level;    // level the supply is set for
  int               margin;
  int               vsum;

  workload_filter #(.WIN_LOG2(WIN_LOG2)) u_wl (
    .clk        (clk),
    .rst_n      (rst_n),
    .fifo_util  (fifo_util),
    .stall      (stall),
    .coef       (coef),
    .alpha_shift(alpha_shift),
    .workload   (workload),
    .wl_valid   (wl_valid)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level    <= '0;
      f_level  <= '0;
      v_level  <= '0;
      up_cnt   <= '0;
      down_cnt <= '0;
    end else if (wl_valid) begin
      // Voltage leads on the way up, frequency leads on the way down.
      if (workload > up_th && int'(level) < LVL_MAX) begin
        level    <= level + 1'b1;
        v_level  <= level + 1'b1;
        f_level  <= level;
        up_cnt   <= up_cnt + 1'b1;
      end else if (workload < down_th && level != '0) begin
        level    <= level - 1'b1;
        f_level  <= level - 1'b1;
        v_level  <= level;
        down_cnt <= down_cnt + 1'b1;
      end else begin
        f_level <= level;
        v_level <= level;
      end
    end
  end

  always_comb begin
    margin = 0;
    if (proc_code < PROC_SLOW_TH) margin++;
    if (temp_code < TEMP_COLD_TH) margin++;
    vsum = int'(v_level) + margin;
    if (vsum > LVL_MAX) vsum = LVL_MAX;
    vref_code = LVL_W'(vsum);
    div_n     = 8'(N_BASE + int'(f_level) * N_STEP);
  end

endmodule
