// Self-checking test of running_variance (T = 4, 8-bit samples).
// A reference computes the population variance of the last four samples
// with plain integer arithmetic on a sample history kept here, and checks
// the output two edges after each sample, the valid flag after reset, the
// steep-ramp value 500 and the slow-ramp value 5.
`timescale 1ns/1ps
module tb_running_variance;
  logic clk = 0, rst_n = 0;
  logic [7:0]  sample;
  logic [15:0] variance;
  logic        valid;
  int checks = 0, failures = 0;
  int hist[$];          // samples captured since reset
  int seen500 = 0, seen5 = 0;

  running_variance dut (.clk, .rst_n, .sample, .variance, .valid);

  always #2.5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // variance of hist[k..k+3] as mean of squares minus square of mean, floored
  function automatic int ref_var(int k);
    longint sx = 0, sxx = 0;
    for (int i = k; i < k + 4; i++) begin
      sx  += hist[i];
      sxx += hist[i] * hist[i];
    end
    return int'((4 * sxx - sx * sx) / 16);
  endfunction

  task automatic step(int v);
    int n;
    sample = 8'(v);
    @(posedge clk);
    hist.push_back(v);
    #0.1;
    n = hist.size();
    checks++;
    if (valid !== (n >= 5)) begin
      failures++;
      $display("FAIL valid=%0b after %0d samples", valid, n);
    end
    if (n >= 5) begin
      checks++;
      if (int'(variance) != ref_var(n - 5)) begin
        failures++;
        $display("FAIL n=%0d var=%0d expected %0d", n, variance, ref_var(n - 5));
      end
      if (variance == 500) seen500++;
      if (variance == 5)   seen5++;
    end
  endtask

  initial begin
    sample = 8'd200;
    repeat (3) @(posedge clk);
    #0.1 checks++;
    if (valid || variance != 0) begin failures++; $display("FAIL reset state"); end
    @(negedge clk) rst_n = 1;
    // constant baseline: zero variance, the step from reset is not reported
    for (int i = 0; i < 8; i++) step(77);
    // steep fall of 20 per cycle, then flat
    for (int v = 100; v >= 0; v -= 20) step(v);
    for (int i = 0; i < 6; i++) step(0);
    // slow fall of 2 per cycle
    for (int v = 100; v >= 40; v -= 2) step(v);
    // full-range extremes
    for (int i = 0; i < 6; i++) step(i % 2 ? 128 : 0);
    for (int i = 0; i < 6; i++) step(i % 2 ? 255 : 0);
    // random
    for (int i = 0; i < 400; i++) step($urandom_range(0, 255));
    for (int i = 0; i < 400; i++) step(60 + $urandom_range(0, 12));
    checks++;
    if (seen500 == 0) begin failures++; $display("FAIL steep ramp never gave 500"); end
    checks++;
    if (seen5 == 0) begin failures++; $display("FAIL slow ramp never gave 5"); end
    // reset again in the middle of a stream: valid drops, refills after 4
    @(negedge clk) rst_n = 0;
    @(posedge clk); #0.1 checks++;
    if (valid) begin failures++; $display("FAIL valid during reset"); end
    @(negedge clk) rst_n = 1;
    hist.delete();
    for (int i = 0; i < 10; i++) step(30 + 3 * i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
