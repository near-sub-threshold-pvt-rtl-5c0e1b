// tb_one_point_cal: calibrates at 25 C in several process corners (the
// corner shifts every reading by a constant), then checks that measurements
// come out as D - (D25 - 509), i.e. on the TT curve; checks the 9-bit
// offset, its saturation, the output saturation and the Ready flag.
module tb_one_point_cal;
  import pvt_pkg::*;
  logic clk = 0, rst_n = 0, done_t = 0;
  cal_mode_e mode;
  logic [9:0] ts, t_out;
  logic [8:0] offset;
  logic ready;
  int checks = 0, failures = 0;

  one_point_cal dut (.clk, .rst_n, .mode, .ts, .done_t, .t_out, .offset, .ready);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic feed(input cal_mode_e m, input int code);
    @(negedge clk); mode = m; ts = 10'(code); done_t = 1;
    @(negedge clk); done_t = 0;
  endtask

  // TT-corner reading at temperature tc (a linear sensor, 4 codes per degree)
  function automatic int tt_code(input int tc);
    return 409 + 4 * tc;
  endfunction

  initial begin
    mode = MODE_MEASURE; ts = 0;
    #22 rst_n = 1;
    @(negedge clk);
    check(!ready && offset == 0, "reset state");
    for (int k = 0; k < 8; k++) begin
      int p0, tc, d, expv;
      p0 = int'($urandom_range(0, 160)) - 80;    // corner shift
      feed(MODE_CALIBRATE, tt_code(25) + p0);
      check($signed(offset) == p0, $sformatf("offset %0d expected %0d", $signed(offset), p0));
      for (int j = 0; j < 5; j++) begin
        tc = int'($urandom_range(0, 100));
        d = tt_code(tc) + p0;
        feed(MODE_MEASURE, d);
        expv = tt_code(tc);
        check(int'(t_out) == expv, $sformatf("T=%0d D=%0d out=%0d expected %0d", tc, d, t_out, expv));
        @(negedge clk);
        check(ready, "ready after a measurement");
      end
    end
    // saturation of P0 and of T
    feed(MODE_CALIBRATE, 900);
    check($signed(offset) == 255, "P0 saturates at +255");
    feed(MODE_MEASURE, 100);
    check(t_out == 0, "T saturates at 0");
    feed(MODE_CALIBRATE, 100);
    check($signed(offset) == -256, "P0 saturates at -256");
    feed(MODE_MEASURE, 1000);
    check(t_out == 10'd1023, "T saturates at 1023");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
