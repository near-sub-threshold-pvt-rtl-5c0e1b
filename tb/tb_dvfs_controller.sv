// tb_dvfs_controller: a heavy workload walks the level up to 7 and a light
// one walks it back to 0. After every decision the testbench checks the
// level, the divider ratio 6 + 2 * level of the clock-side level, the DAC
// code of the supply-side level plus PVT margin, and that the supply leads
// the clock on the way up and trails it on the way down. The PVT margin is
// checked for the slow-process and cold conditions and its clamp at 7.
module tb_dvfs_controller;
  localparam int WL = 3;
  logic clk = 0, rst_n = 0, stall = 0;
  logic [7:0] fifo_util = 0;
  logic [3:0] coef [4];
  logic [2:0] alpha_shift = 0;
  logic [10:0] up_th = 11'd300, down_th = 11'd100, workload;
  logic [3:0] proc_code = 4'd10;
  logic [9:0] temp_code = 10'd600;
  logic [2:0] level, vref_code;
  logic [7:0] div_n;
  logic [15:0] up_cnt, down_cnt;
  int checks = 0, failures = 0;

  dvfs_controller #(.WIN_LOG2(WL)) dut (.clk, .rst_n, .fifo_util, .stall, .coef, .alpha_shift,
    .up_th, .down_th, .proc_code, .temp_code, .level, .div_n, .vref_code, .workload, .up_cnt, .down_cnt);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // level model driven by the filtered workload the block reports
  int m_level = 0, m_f = 0, m_v = 0;
  always @(posedge clk) if (rst_n && dut.wl_valid) begin
    int wl;
    wl = int'(workload);
    if (wl > int'(up_th) && m_level < 7) begin m_level++; m_v = m_level; m_f = m_level - 1; end
    else if (wl < int'(down_th) && m_level > 0) begin m_level--; m_f = m_level; m_v = m_level + 1; end
    else begin m_f = m_level; m_v = m_level; end
    #1;
    begin
      int margin, vexp;
      margin = (proc_code < 8 ? 1 : 0) + (temp_code < 384 ? 1 : 0);
      vexp = m_v + margin; if (vexp > 7) vexp = 7;
      check(int'(level) == m_level, $sformatf("level %0d expected %0d", level, m_level));
      check(int'(div_n) == 6 + 2 * m_f, $sformatf("div_n %0d expected %0d", div_n, 6 + 2 * m_f));
      check(int'(vref_code) == vexp, $sformatf("vref_code %0d expected %0d", vref_code, vexp));
    end
  end

  task automatic windows(input int nwin, input int fifo, input bit st);
    repeat (nwin << WL) begin @(negedge clk); fifo_util = 8'(fifo); stall = st; end
  endtask

  initial begin
    coef[0] = 4'd16 - 4'd8; coef[1] = 4'd8; coef[2] = 4'd0; coef[3] = 4'd0;
    #22 rst_n = 1;
    windows(12, 250, 1);           // heavy: fifo almost full and stalling
    check(level == 7, "reached the top level");
    check(div_n == 8'd20, "top level runs 200 MHz (N = 20)");
    check(up_cnt == 7, $sformatf("seven up steps (%0d)", up_cnt));
    // PVT margin: slow process, then cold too (clamped at 7 here)
    proc_code = 4'd3; windows(2, 200, 0);
    windows(14, 10, 0);            // light: level walks down
    check(level == 0, "back at the bottom level");
    check(down_cnt == 7, $sformatf("seven down steps (%0d)", down_cnt));
    @(negedge clk); check(vref_code == 3'd1, "slow process adds one step");
    temp_code = 10'd300; @(negedge clk);
    check(vref_code == 3'd2, "slow and cold add two steps");
    proc_code = 4'd12; temp_code = 10'd700; @(negedge clk);
    check(vref_code == 3'd0 && div_n == 8'd6, "typical conditions, lowest point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
