// tb_ts_comp_encoder: sweeps the temperature code up and down and checks the
// 3-bit code against the bin formula (t - 320) >> 6 clamped to 0..7, with
// the 4-code hysteresis at every bin edge.
module tb_ts_comp_encoder;
  logic clk = 0, rst_n = 0, t_valid = 0;
  logic [9:0] t;
  logic [2:0] tc;
  int checks = 0, failures = 0;

  ts_comp_encoder dut (.clk, .rst_n, .t, .t_valid, .tc);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int bin_of(input int v);
    int b;
    b = (v < 320) ? 0 : (v - 320) / 64;
    return b > 7 ? 7 : b;
  endfunction

  int model_tc = 0;
  task automatic step(input int v);
    int lo, hi;
    lo = 320 + model_tc * 64 - 4;
    hi = 320 + (model_tc + 1) * 64 + 4;
    if ((model_tc != 0 && v < lo) || (model_tc != 7 && v >= hi)) model_tc = bin_of(v);
    @(negedge clk); t = 10'(v); t_valid = 1;
    @(negedge clk); t_valid = 0;
    check(int'(tc) == model_tc, $sformatf("t=%0d tc=%0d expected %0d", v, tc, model_tc));
  endtask

  initial begin
    t = 0;
    #22 rst_n = 1;
    for (int v = 250; v <= 900; v += 3) step(v);
    check(tc == 7, "top bin reached");
    for (int v = 900; v >= 250; v -= 3) step(v);
    check(tc == 0, "bottom bin reached");
    // the hysteresis: just across an edge does not switch
    step(384 + 10); step(384 + 2); step(384 - 2);
    check(tc == 1, "hysteresis holds the bin");
    step(384 - 5);
    check(tc == 0, "leaving by more than the hysteresis switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
