// tb_pll_divider: checks the output period is n VCO periods (n = 20 gives
// 10 MHz from 200 MHz), the high time floor(n/2), that a new n is taken
// only at the end of an output cycle, and that n below 2 acts as 2.
module tb_pll_divider;
  logic vco_clk = 0, rst_n = 0, fb_clk;
  logic [7:0] n;
  int checks = 0, failures = 0;
  int vcount = 0;

  pll_divider #(.NW(8)) dut (.vco_clk, .rst_n, .n, .fb_clk);
  always #2.5 vco_clk = ~vco_clk;   // 200 MHz
  always @(posedge vco_clk) vcount++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int nv, input int cycles);
    int r0, f0, hi;
    realtime t0, t1;
    n = 8'(nv);
    repeat (2) @(posedge fb_clk);      // new ratio taken at a cycle end
    for (int k = 0; k < cycles; k++) begin
      t0 = $realtime; r0 = vcount;
      @(negedge fb_clk); hi = vcount - r0;
      @(posedge fb_clk); t1 = $realtime;
      check(vcount - r0 == (nv < 2 ? 2 : nv), $sformatf("n=%0d period %0d", nv, vcount - r0));
      check(hi == (nv < 2 ? 1 : nv / 2), $sformatf("n=%0d high %0d", nv, hi));
    end
    if (nv == 20) check(t1 - t0 == 100.0, "200 MHz / 20 = 10 MHz");
  endtask

  initial begin
    n = 20;
    #12 rst_n = 1;
    measure(20, 4);
    measure(7, 4);
    measure(2, 3);
    measure(1, 2);
    for (int k = 0; k < 6; k++) measure(int'($urandom_range(2, 40)), 2);
    measure(20, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
