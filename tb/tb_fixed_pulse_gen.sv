// tb_fixed_pulse_gen: checks that the pulse is exactly n clock periods wide,
// starts 3 clock edges after start, ends with a done strobe and ignores a
// start edge that arrives while it is running.
module tb_fixed_pulse_gen;
  logic clk = 0, rst_n = 0, start = 0;
  logic [9:0] n;
  logic pulse, done;
  int checks = 0, failures = 0;

  fixed_pulse_gen #(.NW(10)) dut (.clk, .rst_n, .start, .n, .pulse, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nv, input bit restart_mid);
    int t_rise, width, ndone;
    n = 10'(nv);
    @(negedge clk); start = 1;
    t_rise = 0;
    do begin @(posedge clk); #1; t_rise++; end while (!pulse && t_rise < 10);
    check(t_rise == 3, $sformatf("rise latency %0d", t_rise));
    width = 0; ndone = 0;
    start = 0;
    while (pulse) begin
      if (restart_mid && width == 2) start = 1;
      @(posedge clk); #1;
      width++;
      if (done) ndone++;
    end
    check(width == nv, $sformatf("n=%0d width=%0d", nv, width));
    check(ndone == 1, $sformatf("done count %0d", ndone));
    start = 0;
    repeat (6) begin @(posedge clk); #1 check(!pulse, "retrigger by mid-pulse start"); end
  endtask

  initial begin
    n = 10'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 0);
    run(2, 0);
    run(7, 1);
    for (int i = 0; i < 12; i++) run(1 + int'($urandom_range(0, 60)), i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
