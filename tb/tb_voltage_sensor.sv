// tb_voltage_sensor: sweeps the supply over the 0.30..0.50 V table in the
// typical, slow and fast corners and checks the one-hot code against the
// table (V[i] for 0.30 V + i * 50 mV), the all-zero code below 0.30 V, the
// process control bit and the one-cycle sampling latency.
module tb_voltage_sensor;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [4:0] taps, v_code;
  logic [3:0] proc_code;
  logic proc_ctrl, valid;
  int vin_mv, corner_mv;
  int checks = 0, failures = 0;

  vs_delay_line_model u_dl (.vin_mv, .corner_mv, .proc_ctrl, .taps);
  voltage_sensor dut (.clk, .rst_n, .sample, .taps, .proc_code, .proc_ctrl, .v_code, .valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic measure(input int mv, input int corner, input int pcode);
    logic [4:0] expv;
    vin_mv = mv; corner_mv = corner; proc_code = 4'(pcode);
    @(negedge clk); sample = 1;
    @(negedge clk); sample = 0;
    check(valid, "valid one cycle after sample");
    if (mv < 300) expv = '0;
    else if (mv >= 500) expv = 5'b10000;
    else expv = 5'(1 << ((mv - 300) / 50));
    check(v_code == expv, $sformatf("vin=%0d corner=%0d code=%b expected %b", mv, corner, v_code, expv));
    check(proc_ctrl == (pcode < 8), "process control bit");
    @(negedge clk);
    check(!valid, "valid is a strobe");
  endtask

  initial begin
    vin_mv = 0; corner_mv = 0; proc_code = 8;
    #22 rst_n = 1;
    // Table rows, typical corner (process code 8, control bit 0)
    for (int mv = 250; mv <= 520; mv += 10) measure(mv, 0, 8);
    // slow corner: the delay line reads 30 mV low, the control bit restores it
    for (int mv = 300; mv <= 500; mv += 50) measure(mv + 5, -30, 3);
    // fast corner reads 10 mV high, within the bin
    for (int mv = 300; mv <= 500; mv += 50) measure(mv + 5, 10, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
