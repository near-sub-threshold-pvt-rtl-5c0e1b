// tb_vref_dac_decoder: checks that each code selects exactly its own tap
// (tap k = 0.3 V + 0.1 V * k), that a code change opens all taps for one
// cycle before the new tap closes, and that disable opens all taps.
module tb_vref_dac_decoder;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] code;
  logic [7:0] tap_sel;
  int checks = 0, failures = 0;

  vref_dac_decoder dut (.clk, .rst_n, .en, .code, .tap_sel);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // nominal tap voltage of the one-hot select, in mV
  function automatic int tap_mv(input logic [7:0] s);
    for (int k = 0; k < 8; k++) if (s == 8'(1 << k)) return 300 + 100 * k;
    return -1;
  endfunction

  initial begin
    code = 0;
    #22 rst_n = 1; en = 1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 30; k++) begin
      int c;
      c = (k < 8) ? k : int'($urandom_range(0, 7));
      if (3'(c) == code) c = (c + 1) % 8;
      code = 3'(c);
      @(negedge clk);
      check(tap_sel == 0, "all taps open right after a change");
      @(negedge clk);
      check(tap_sel == 0, "break before make");
      @(negedge clk);
      check(tap_mv(tap_sel) == 300 + 100 * c, $sformatf("code %0d -> %b", c, tap_sel));
      repeat (2) @(negedge clk);
      check(tap_mv(tap_sel) == 300 + 100 * c, "tap held");
    end
    en = 0;
    @(negedge clk); @(negedge clk);
    check(tap_sel == 0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
