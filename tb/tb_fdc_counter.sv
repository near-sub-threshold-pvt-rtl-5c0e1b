// tb_fdc_counter: counts oscillator edges inside a gate window and compares
// with the number of rising edges counted independently in the testbench;
// checks restart at 1 in a new window and saturation.
module tb_fdc_counter;
  logic osc = 0, rst_n = 0, gate = 0;
  logic [5:0] count;
  int checks = 0, failures = 0;
  int edges;

  fdc_counter #(.W(6)) dut (.osc, .rst_n, .gate, .count);

  always #7 osc = ~osc;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #500000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: rising osc edges that see gate high
  always @(posedge osc) if (gate) edges++;

  initial begin
    #30 rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      int len;
      len = int'($urandom_range(1, 50));
      #(3 + $urandom_range(0, 13));
      edges = 0;
      gate = 1;
      #(len * 14);
      gate = 0;
      #40;
      check(int'(count) == (edges > 63 ? 63 : edges),
            $sformatf("window %0d: count=%0d edges=%0d", k, count, edges));
    end
    // long window saturates
    edges = 0; gate = 1; #(14 * 100); gate = 0; #40;
    check(count == 6'd63, $sformatf("saturation count=%0d", count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
