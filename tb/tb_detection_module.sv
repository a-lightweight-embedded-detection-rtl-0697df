// Self-checking test of one detection chain (TDC model, Hamming weight,
// running variance, threshold M = 64) at its default sizes.
// The test drives the TDC's slowdown input with a noisy baseline, a small
// resistive step, a slow drift and short steep drops, and checks every cycle
// against a reference computed here: the tap count from the TDC timing rule,
// the variance of four counts with integer arithmetic, and the threshold.
// Latency checked: hw 1 edge after the TDC sample, variance 3, flag 4.
// It also counts how often each situation was flagged: steep drops must be,
// the noise, step and drift must not.
`timescale 1ns/1ps
module tb_detection_module;
  logic clk = 0, rst_n = 0;
  logic [15:0] slowdown;
  logic [7:0]  hw;
  logic [15:0] variance;
  logic        var_valid, attack_detected;
  int checks = 0, failures = 0;
  int s_hist[$];              // slowdown value present at each edge
  int phase_hist[$];          // scenario phase at each edge
  int flagged[5];             // detections per phase
  int n_edges = 0;
  int n_alarms = 0;           // rising edges of attack_detected
  logic det_q = 0;

  typedef enum int {P_QUIET = 0, P_STEP = 1, P_DRIFT = 2, P_DROP = 3, P_AFTER = 4} phase_e;
  phase_e phase;

  detection_module dut (.clk, .rst_n, .slowdown, .hw, .variance, .var_valid, .attack_detected);

  always #2.5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_hw(int s);
    int c = 0;
    for (int i = 0; i < 128; i++) begin
      longint d = (longint'(1860) + longint'(10 * (i + 1))) * longint'(s);
      if ((d % (longint'(5000) << 14)) >= (longint'(2500) << 14)) c++;
    end
    return c;
  endfunction

  function automatic int ref_var(int last);   // samples for edges last-3..last
    longint sx = 0, sxx = 0;
    for (int k = last - 3; k <= last; k++) begin
      int h = ref_hw(s_hist[k]);
      sx += h; sxx += h * h;
    end
    return int'((4 * sxx - sx * sx) / 16);
  endfunction

  always @(posedge clk) begin
    s_hist.push_back(int'(slowdown));
    phase_hist.push_back(int'(phase));
    n_edges++;
    #0.1;
    if (rst_n && n_edges > 12) begin
      automatic int n = n_edges - 1;  // index of this edge
      checks++;
      if (int'(hw) != ref_hw(s_hist[n - 1])) begin
        failures++; $display("FAIL edge %0d hw=%0d expected %0d", n, hw, ref_hw(s_hist[n - 1]));
      end
      checks++;
      if (!var_valid || int'(variance) != ref_var(n - 3)) begin
        failures++; $display("FAIL edge %0d var=%0d expected %0d", n, variance, ref_var(n - 3));
      end
      checks++;
      if (attack_detected != (ref_var(n - 4) > 64)) begin
        failures++; $display("FAIL edge %0d flag=%0b", n, attack_detected);
      end
      if (attack_detected) flagged[phase_hist[n - 4]]++;
      if (attack_detected && !det_q) n_alarms++;
      det_q = attack_detected;
    end
  end

  task automatic drive(int s, int cycles);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      slowdown = 16'(s + $urandom_range(0, 160) - 80);
    end
  endtask

  initial begin
    phase = P_QUIET;
    slowdown = 16'd16384;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    drive(16384, 100);
    phase = P_STEP;                       // resistive shift of about 4 taps
    drive(16384 + 300, 40);
    phase = P_DRIFT;                      // slow drop, 0.3 taps per cycle
    for (int k = 0; k < 80; k++) drive(16684 + 20 * k, 1);
    phase = P_AFTER;                      // abrupt return to nominal
    drive(16384, 12);
    phase = P_QUIET;
    drive(16384, 40);
    for (int a = 0; a < 10; a++) begin
      phase = P_DROP;                     // steep drop, about 25 taps
      drive(16384 + 1600 + 100 * a, 1 + a % 3);
      phase = P_AFTER;
      drive(16384, 12);
      phase = P_QUIET;
      drive(16384, 30);
    end
    repeat (6) @(posedge clk);
    #0.2;
    checks++;
    if (flagged[P_DROP] == 0) begin failures++; $display("FAIL steep drops never flagged"); end
    checks++;
    if (flagged[P_QUIET] + flagged[P_STEP] + flagged[P_DRIFT] != 0) begin
      failures++;
      $display("FAIL false detections quiet=%0d step=%0d drift=%0d",
               flagged[P_QUIET], flagged[P_STEP], flagged[P_DRIFT]);
    end
    // ten steep drops and the abrupt end of the drift: one alarm each
    checks++;
    if (n_alarms != 11) begin failures++; $display("FAIL %0d alarms, expected 11", n_alarms); end
    $display("detections: drop=%0d after=%0d quiet=%0d step=%0d drift=%0d",
             flagged[P_DROP], flagged[P_AFTER], flagged[P_QUIET], flagged[P_STEP], flagged[P_DRIFT]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
