// tb_self_cal: fills the offset table with the shift each (process,
// voltage) operating point puts on a linear sensor, then checks that raw
// readings at random temperatures and operating points come back on the
// reference curve; checks the one-cycle latency and the saturation.
module tb_self_cal;
  logic clk = 0, rst_n = 0, t_valid = 0, cfg_we = 0;
  logic [9:0] t_raw, t_cal;
  logic [3:0] proc_code, cfg_proc;
  logic [4:0] v_code;
  logic [2:0] cfg_vidx;
  logic [8:0] cfg_offset;
  logic t_cal_valid;
  int checks = 0, failures = 0;
  int shift_tab [16][5];

  self_cal dut (.clk, .rst_n, .t_raw, .t_valid, .proc_code, .v_code, .cfg_we, .cfg_proc,
                .cfg_vidx, .cfg_offset, .t_cal, .t_cal_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    t_raw = 0; proc_code = 0; v_code = 5'b00001; cfg_proc = 0; cfg_vidx = 0; cfg_offset = 0;
    #22 rst_n = 1;
    // uncalibrated: passes through
    @(negedge clk); t_raw = 10'd321; t_valid = 1;
    @(negedge clk); t_valid = 0;
    check(t_cal_valid && t_cal == 10'd321, "zero table passes the code");
    // program shifts: slow corners and low supply read low, fast/high read high
    for (int p = 0; p < 16; p++)
      for (int v = 0; v < 5; v++) begin
        shift_tab[p][v] = (p - 8) * 6 + (v - 2) * 15;
        @(negedge clk); cfg_we = 1; cfg_proc = 4'(p); cfg_vidx = 3'(v);
        cfg_offset = 9'(shift_tab[p][v]);
      end
    @(negedge clk); cfg_we = 0;
    for (int k = 0; k < 60; k++) begin
      int p, v, tc, ref_code;
      p = int'($urandom_range(0, 15)); v = int'($urandom_range(0, 4)); tc = int'($urandom_range(0, 100));
      ref_code = 300 + 5 * tc;
      proc_code = 4'(p); v_code = 5'(1 << v);
      t_raw = 10'(ref_code + shift_tab[p][v]); t_valid = 1;
      @(negedge clk); t_valid = 0;
      check(t_cal_valid, "valid after one cycle");
      check(int'(t_cal) == ref_code, $sformatf("p=%0d v=%0d T=%0d: out %0d expected %0d", p, v, tc, t_cal, ref_code));
    end
    // saturation at 0
    proc_code = 15; v_code = 5'b10000; t_raw = 10'd5; t_valid = 1;
    @(negedge clk); t_valid = 0;
    check(t_cal == 0, "saturates at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
