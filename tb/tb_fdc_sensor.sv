// tb_fdc_sensor: runs conversions with oscillator/reference frequency ratios
// and checks code = floor-ish(n * f_osc / f_clk) within one count, the
// conversion time (window n periods plus fixed overhead), and the
// process-cancelling property of the adaptive pulse width: when the window
// clock and the sensing oscillator scale together the code stays the same.
module tb_fdc_sensor;
  logic clk, osc, rst_n = 0, start = 0;
  logic [9:0] n;
  logic [10:0] code;
  logic done, busy;
  int clk_half = 50000;     // 10 MHz reference in ps half period
  int osc_half = 25000;
  int checks = 0, failures = 0;

  osc_model u_clk (.en(1'b1), .half_ps(clk_half), .out(clk));
  osc_model u_osc (.en(1'b1), .half_ps(osc_half), .out(osc));

  fdc_sensor #(.W(11), .NW(10), .DONE_DLY(4)) dut (.clk, .osc, .rst_n, .start, .n, .code, .done, .busy);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int ccount;
  always @(posedge clk) ccount++;

  task automatic convert(input int nv, input int ch, input int oh, output int got, output int took);
    int c0;
    clk_half = ch; osc_half = oh; n = 10'(nv);
    @(negedge clk); start = 1; c0 = ccount;
    @(posedge done); #1;
    took = ccount - c0;
    got = int'(code);
    @(negedge clk); start = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int got, took, expv;
    n = 10'd10;
    #1us rst_n = 1;
    #1us;
    for (int i = 0; i < 10; i++) begin
      int nv, ch, oh;
      nv = int'($urandom_range(10, 400));
      ch = 50000;
      oh = int'($urandom_range(8000, 60000));
      convert(nv, ch, oh, got, took);
      expv = (nv * ch) / oh;
      if (expv > 2047) expv = 2047;
      check(got >= expv - 1 && got <= expv + 1, $sformatf("n=%0d ratio %0d/%0d: code=%0d expected %0d", nv, ch, oh, got, expv));
      // start sync 3 + window n + done delay (DONE_DLY + 1)
      check(took == nv + 3 + 5, $sformatf("conversion took %0d cycles for n=%0d", took, nv));
    end
    // adaptive pulse width: scale both clocks by the same process factor
    begin
      int g1, g2;
      convert(200, 40000, 30000, g1, took);
      convert(200, 52000, 39000, g2, took);
      check(g1 - g2 <= 1 && g2 - g1 <= 1, $sformatf("process cancel %0d vs %0d", g1, g2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
