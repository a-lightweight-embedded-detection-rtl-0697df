// Self-checking test of the tdc_sensor behavioural model at its defaults
// (128 taps, 5 ns period, 1860 ps initial delay, 10 ps per element).
// Expected tap ranges were worked out by hand from the timing: tap i reads 1
// when (1860 + 10*(i+1)) * slowdown, modulo 5000 ps, is at least 2500 ps.
`timescale 1ns/1ps
module tb_tdc_sensor;
  logic clk = 0;
  logic [15:0]  slowdown;
  logic [127:0] taps;
  int checks = 0, failures = 0;

  tdc_sensor dut (.clk, .slowdown, .taps);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // taps lo..hi are 1, all others 0 (lo > hi: all zero)
  task automatic check(int s, int lo, int hi, string what);
    logic [127:0] exp_taps = '0;
    for (int i = lo; i <= hi; i++) exp_taps[i] = 1'b1;
    slowdown = 16'(s);
    @(posedge clk); #0.1;
    checks++;
    if (taps !== exp_taps) begin
      failures++;
      $display("FAIL %s: taps=%h expected %h", what, taps, exp_taps);
    end
  endtask

  initial begin
    check(16384,  63, 127, "nominal: 65 ones");
    check(20480,  13, 127, "x1.25: 115 ones");
    check(12288,   1,   0, "x0.75: line never reaches mid-period, all 0");
    check(24576,   0, 127, "x1.5: saturated, all 1");
    check(32768,   0,  62, "x2.0: code wrapped past one period");
    check(16384,  63, 127, "back to nominal");
    // the taps must not follow the input before the sampling edge
    @(negedge clk) slowdown = 16'd24576;
    #0.1 checks++;
    if (taps[0] !== 1'b0) begin failures++; $display("FAIL taps changed between edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
