// tb_workload_filter: drives random FIFO utilisation and stall patterns and
// compares every workload value with a model of the window average, the
// 4-tap FIR (coefficients / 16) and the first-order IIR, for several
// coefficient sets and IIR shifts; checks one value per window.
module tb_workload_filter;
  localparam int WL = 4;               // 16-cycle windows
  logic clk = 0, rst_n = 0, stall = 0, wl_valid;
  logic [7:0] fifo_util = 0;
  logic [3:0] coef [4];
  logic [2:0] alpha_shift;
  logic [10:0] workload;
  int checks = 0, failures = 0;

  workload_filter #(.WIN_LOG2(WL)) dut (.clk, .rst_n, .fifo_util, .stall, .coef, .alpha_shift, .workload, .wl_valid);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference model
  int wc = 0, sc = 0, hist[4] = '{0, 0, 0, 0}, y = 0, expq[$];
  int cyc = 0, last_valid = -1;
  always @(posedge clk) if (rst_n) begin
    int x, f, sf;
    cyc++;
    if (wc == (1 << WL) - 1) begin
      sf = ((sc + int'(stall)) * 256) >> WL;
      if (sf > 255) sf = 255;
      x = int'(fifo_util) + sf;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = x;
      f = 0;
      for (int i = 0; i < 4; i++) f += hist[i] * int'(coef[i]);
      f = f >> 4;
      if (f > 2047) f = 2047;
      y = y + ((f - y) >>> int'(alpha_shift));
      expq.push_back(y);
      sc = 0; wc = 0;
    end else begin
      sc += int'(stall); wc++;
    end
    #1;
    if (wl_valid) begin
      int e;
      e = expq.pop_front();
      check(int'(workload) == e, $sformatf("workload %0d expected %0d", workload, e));
      if (last_valid >= 0) check(cyc - last_valid == (1 << WL), "one value per window");
      last_valid = cyc;
    end
  end

  initial begin
    coef[0] = 4'd15; coef[1] = 4'd1; coef[2] = 4'd0; coef[3] = 4'd0;
    alpha_shift = 0;
    #22 rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      for (int w = 0; w < 12; w++) begin
        int p;
        p = int'($urandom_range(0, 100));
        for (int c = 0; c < (1 << WL); c++) begin
          @(negedge clk);
          // keep inputs steady near the window boundary used to change coef
          fifo_util = 8'($urandom_range(0, 255));
          stall = ($urandom_range(0, 99) < p);
        end
      end
      // wait for the pipeline to drain, change settings at a window start
      wait (wl_valid == 1'b1);
      @(negedge clk);
      case (phase)
        0: begin coef[0] = 4'd4; coef[1] = 4'd4; coef[2] = 4'd4; coef[3] = 4'd4; alpha_shift = 3'd0; end
        1: begin coef[0] = 4'd8; coef[1] = 4'd4; coef[2] = 4'd2; coef[3] = 4'd2; alpha_shift = 3'd2; end
        default: begin coef[0] = 4'd15; coef[1] = 4'd15; coef[2] = 4'd15; coef[3] = 4'd15; alpha_shift = 3'd1; end
      endcase
    end
    check(expq.size() <= 1, "every value produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
