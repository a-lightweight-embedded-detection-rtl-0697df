// Self-checking test of detection_threshold with M = 64.
// Sweeps the variance across the threshold with the valid flag on and off
// and checks that attack_detected is exactly (valid && variance > 64) of the
// previous cycle.
`timescale 1ns/1ps
module tb_detection_threshold;
  logic clk = 0, rst_n = 0;
  logic [15:0] variance;
  logic        var_valid;
  logic        attack_detected;
  int checks = 0, failures = 0;

  detection_threshold dut (.clk, .rst_n, .variance, .var_valid, .attack_detected);

  always #2.5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int v, bit vld);
    bit expected;
    variance  = 16'(v);
    var_valid = vld;
    expected  = vld && (v > 64);
    @(posedge clk); #0.1;
    checks++;
    if (attack_detected !== expected) begin
      failures++;
      $display("FAIL var=%0d valid=%0b flag=%0b", v, vld, attack_detected);
    end
  endtask

  initial begin
    variance = 16'd1000; var_valid = 1;
    repeat (2) @(posedge clk);
    #0.1 checks++;
    if (attack_detected) begin failures++; $display("FAIL flag during reset"); end
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 130; v++) step(v, 1'b1);
    step(63, 1); step(64, 1); step(65, 1); step(64, 1);
    step(500, 0); step(65, 0); step(65, 1); step(0, 1);
    step(65535, 1); step(4096, 1);
    for (int i = 0; i < 300; i++) step($urandom_range(0, 200), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
